// tb_ctapm_fbb_lut: checks the reset content of the forward-body-bias table (per level a
// starting code of 0, 3, 2, 1, 0 for 600..200 MHz, one code higher per 5 degC sub-step, the
// same in every temperature step) on both read ports, then rewrites random codes and reads
// them back.
module tb_ctapm_fbb_lut;
  import ctapm_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       we;
  logic [7:0] widx, idx_b;
  logic [3:0] wdata, rdata_a, rdata_b;
  logic [2:0] ts_a, level_a, sub_a;
  int checks = 0, failures = 0;
  int base [5] = '{0, 3, 2, 1, 0};
  logic [3:0] model [200];

  ctapm_fbb_lut dut (.clk, .rst_n, .we_i(we), .widx_i(widx), .wdata_i(wdata),
                     .ts_a_i(ts_a), .level_a_i(level_a), .sub_a_i(sub_a), .rdata_a_o(rdata_a),
                     .idx_b_i(idx_b), .rdata_b_o(rdata_b));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_code(int t, int l, int s);
    int i;
    i = (t*5 + l)*5 + s;
    ts_a = 3'(t); level_a = 3'(l); sub_a = 3'(s); idx_b = 8'(i);
    #1;
    checks++;
    if (rdata_a !== model[i] || rdata_b !== model[i]) begin
      failures++;
      $display("FAIL step=%0d level=%0d sub=%0d a=%h b=%h exp=%h", t, l, s, rdata_a, rdata_b, model[i]);
    end
  endtask

  initial begin
    we = 0; widx = 0; wdata = 0; ts_a = 0; level_a = 0; sub_a = 0; idx_b = 0;
    for (int t = 0; t < 8; t++) for (int l = 0; l < 5; l++) for (int s = 0; s < 5; s++)
      model[(t*5 + l)*5 + s] = 4'(base[l] + s);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) for (int l = 0; l < 5; l++) for (int s = 0; s < 5; s++)
      check_code(t, l, s);
    for (int k = 0; k < 300; k++) begin
      int i;
      i = $urandom_range(0, 199);
      @(negedge clk);
      we = 1; widx = 8'(i); wdata = 4'($urandom);
      model[i] = wdata;
      @(negedge clk);
      we = 0;
      check_code(i / 25, (i / 5) % 5, i % 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
