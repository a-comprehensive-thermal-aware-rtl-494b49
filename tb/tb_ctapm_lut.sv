// tb_ctapm_lut: checks the reset content of the look-up table on both read ports against
// values derived independently from the numerical supply table (VDDID = (VDD - 500 mV) /
// 10 mV) and the standby rows of the table diagram, then rewrites random cells and reads
// them back through both ports.
module tb_ctapm_lut;
  import ctapm_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       we;
  logic [6:0] widx, idx_b;
  lut_entry_t wdata, rdata_a, rdata_b;
  logic [3:0] row_a;
  logic [2:0] ts_a;
  int checks = 0, failures = 0;

  // Numerical supply table in mV: [600, 500, 400, 300, 200 MHz][-40 .. 150 degC steps].
  int vdd_mv [5][8] = '{
    '{860, 870, 890, 910, 930, 940, 960, 980},
    '{780, 780, 790, 800, 810, 820, 830, 840},
    '{700, 700, 700, 710, 710, 710, 720, 720},
    '{630, 630, 620, 620, 610, 610, 600, 600},
    '{570, 560, 550, 530, 520, 510, 500, 500}
  };
  // Reverse bias codes of the Deep / Deeper Sleep rows, 0..150 degC in six steps.
  logic [3:0] rbb [6] = '{4'hF, 4'hE, 4'hD, 4'hC, 4'hA, 4'h9};

  lut_entry_t model [72];

  ctapm_lut dut (.clk, .rst_n, .we_i(we), .widx_i(widx), .wdata_i(wdata),
                 .row_a_i(row_a), .ts_a_i(ts_a), .rdata_a_o(rdata_a),
                 .idx_b_i(idx_b), .rdata_b_o(rdata_b));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cell(int r, int t);
    row_a = 4'(r); ts_a = 3'(t); idx_b = 7'(r*8 + t);
    #1;
    checks++;
    if (rdata_a !== model[r*8+t] || rdata_b !== model[r*8+t]) begin
      failures++;
      $display("FAIL row=%0d step=%0d a=%h b=%h exp=%h", r, t, rdata_a, rdata_b, model[r*8+t]);
    end
  endtask

  initial begin
    we = 0; widx = 0; wdata = '0; row_a = 0; ts_a = 0; idx_b = 0;
    for (int r = 0; r < 9; r++)
      for (int t = 0; t < 8; t++) begin
        lut_entry_t e;
        e = '0;
        if (r < 5) begin
          e.vddid = 6'((vdd_mv[r][t] - 500) / 10);
          e.clksp = 1; e.cktsp = 1;
        end else if (r == 5) begin
          e.vdd_keep = 1; e.vbb_keep = 1; e.clksp = 0; e.cktsp = 1;
        end else if (r == 6) begin
          e.vdd_keep = 1; e.vbb_keep = 1;
        end else if (r == 7) begin
          e.vdd_keep = 1; e.vbbid = (t < 2) ? 4'hF : rbb[t-2];
        end else begin
          e.vddid = 0; e.vbbid = (t < 2) ? 4'hF : rbb[t-2];
        end
        model[r*8+t] = e;
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 9; r++) for (int t = 0; t < 8; t++) check_cell(r, t);
    // Reprogram random cells.
    for (int k = 0; k < 300; k++) begin
      int i;
      i = $urandom_range(0, 71);
      @(negedge clk);
      we = 1; widx = 7'(i); wdata = lut_entry_t'($urandom);
      model[i] = wdata;
      @(negedge clk);
      we = 0;
      check_cell(i / 8, i % 8);
    end
    // A write beyond the table changes nothing.
    @(negedge clk); we = 1; widx = 7'd100; wdata = '1; @(negedge clk); we = 0;
    for (int r = 0; r < 9; r++) for (int t = 0; t < 8; t++) check_cell(r, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
