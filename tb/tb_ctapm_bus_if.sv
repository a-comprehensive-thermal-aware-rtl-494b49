// tb_ctapm_bus_if: performs APB-style reads and writes across the whole address map of the
// bus interface and checks the decoded write strobes, island and cell index, the read data
// chosen from the right register or table cell, and pslverr for unmapped addresses,
// misaligned addresses, islands or cells beyond range and writes to read-only registers.
module tb_ctapm_bus_if;
  import ctapm_pkg::*;

  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  logic psel, penable, pwrite, pready, pslverr;
  logic [15:0] paddr;
  logic [31:0] pwdata, prdata;
  logic mode_we, glob_we, lut_we, fbb_we;
  logic island;
  logic [7:0] idx;
  logic [31:0] wdata;
  lut_entry_t lut_wdata;
  logic [31:0] glob_word, mode_word [N], status_word [N], ctrl_word [N];
  lut_entry_t lut_rdata [N];
  logic [3:0] fbb_rdata [N];
  int checks = 0, failures = 0;
  int n_err = 0;

  ctapm_bus_if dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .mode_we_o(mode_we), .glob_we_o(glob_we), .lut_we_o(lut_we), .fbb_we_o(fbb_we),
    .island_o(island), .idx_o(idx), .wdata_o(wdata), .lut_wdata_o(lut_wdata),
    .glob_word_i(glob_word), .mode_word_i(mode_word), .status_word_i(status_word),
    .ctrl_word_i(ctrl_word), .lut_rdata_i(lut_rdata), .fbb_rdata_i(fbb_rdata));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one transfer; sample strobes and read data in the access cycle.
  task automatic xfer(input logic wr, input logic [15:0] a, input logic [31:0] d,
                      output logic [31:0] rd, output logic err, output logic [3:0] we,
                      output logic isl, output logic [7:0] ix);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    #1;
    rd = prdata; err = pslverr; we = {fbb_we, lut_we, mode_we, glob_we}; isl = island; ix = idx;
    checks++;
    if (!pready) failures++;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  // Reference decode of the address map.
  function automatic int kind(logic [15:0] a, output int isl, output int ix);
    isl = 0; ix = a[9:2];
    if (a[1:0] != 0) return -1;
    if (a[15:14] == 2'b00) begin
      if (a[13:0] == 14'h0000) return 0;              // GLOBAL
      if (a[13:0] == 14'h0004) return 1;              // CONFIG
      if (a[13:8] == 6'd1) begin
        isl = a[7:4];
        if (isl >= N) return -1;
        if (a[3:0] == 4'h0) return 2;                 // MODE
        if (a[3:0] == 4'h4) return 3;                 // STATUS
        if (a[3:0] == 4'h8) return 4;                 // CTRL
      end
      return -1;
    end
    isl = a[13:10];
    if (isl >= N) return -1;
    if (a[15:14] == 2'b01) return (ix < 72) ? 5 : -1;  // main table
    if (a[15:14] == 2'b10) return (ix < 200) ? 6 : -1; // FBB table
    return -1;
  endfunction

  function automatic logic [15:0] pick_addr();
    logic [15:0] a;
    int isl, sel;
    isl = $urandom_range(0, 2);
    sel = $urandom_range(0, 6);
    unique case (sel)
      0: a = 16'h0000;
      1: a = 16'h0004;
      2: a = 16'h0100 + 16'(isl*16) + 16'($urandom_range(0, 3) * 4);
      3: a = 16'h4000 + 16'(isl*1024) + 16'($urandom_range(0, 80) * 4);
      4: a = 16'h8000 + 16'(isl*1024) + 16'($urandom_range(0, 210) * 4);
      5: a = 16'($urandom);
      default: a = 16'h0100 + 16'($urandom_range(0, 255));
    endcase
    return a;
  endfunction

  initial begin
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      logic [15:0] a;
      logic [31:0] d, rd, exp_rd;
      logic err, isl_o, wr;
      logic [3:0] we, exp_we;
      logic [7:0] ix_o;
      int kd, isl, ix;
      // Fresh read-back values.
      glob_word = $urandom;
      for (int i = 0; i < N; i++) begin
        mode_word[i] = $urandom; status_word[i] = $urandom; ctrl_word[i] = $urandom;
        lut_rdata[i] = lut_entry_t'($urandom); fbb_rdata[i] = 4'($urandom);
      end
      a = pick_addr(); d = $urandom; wr = 1'($urandom);
      kd = kind(a, isl, ix);
      xfer(wr, a, d, rd, err, we, isl_o, ix_o);
      exp_we = 0;
      exp_rd = 0;
      if (wr) begin
        unique case (kd)
          0: exp_we = 4'b0001;
          2: exp_we = 4'b0010;
          5: exp_we = 4'b0100;
          6: exp_we = 4'b1000;
          default: exp_we = 0;
        endcase
      end else begin
        unique case (kd)
          0: exp_rd = glob_word;
          1: exp_rd = {8'd1, 8'd8, 8'd5, 8'd2};
          2: exp_rd = mode_word[isl];
          3: exp_rd = status_word[isl];
          4: exp_rd = ctrl_word[isl];
          5: exp_rd = {14'd0, lut_rdata[isl].cktsp, lut_rdata[isl].clksp, 3'd0,
                       lut_rdata[isl].vbb_keep, lut_rdata[isl].vbbid, 1'b0,
                       lut_rdata[isl].vdd_keep, lut_rdata[isl].vddid};
          6: exp_rd = {28'd0, fbb_rdata[isl]};
          default: exp_rd = 0;
        endcase
      end
      checks++;
      if (err != (kd < 0 || (wr && (kd == 1 || kd == 3 || kd == 4)))) begin
        failures++; $display("FAIL pslverr a=%h wr=%0d err=%0d kind=%0d", a, wr, err, kd);
      end
      if (err) n_err++;
      checks++;
      if (we != exp_we) begin
        failures++; $display("FAIL strobes a=%h wr=%0d we=%b exp=%b", a, wr, we, exp_we);
      end
      if (kd >= 2) begin
        checks++;
        if (int'(isl_o) != isl) begin failures++; $display("FAIL island a=%h", a); end
      end
      if (kd >= 5) begin
        checks++;
        if (int'(ix_o) != ix) begin failures++; $display("FAIL index a=%h", a); end
      end
      if (!wr) begin
        checks++;
        if (rd != exp_rd) begin failures++; $display("FAIL read a=%h rd=%h exp=%h", a, rd, exp_rd); end
      end
      if (wr && kd == 5) begin
        checks++;
        if (lut_wdata != '{vdd_keep: d[6], vddid: d[5:0], vbb_keep: d[12], vbbid: d[11:8],
                           clksp: d[16], cktsp: d[17]}) failures++;
      end
    end
    checks++;
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
