// tb_ctapm_ctrl: drives the control logic with random states, performance levels, table cells
// and forward-body-bias codes, and compares the registered peripheral controls with a model:
// row = level in Normal, NUM_LEVELS + state - 1 otherwise; keep bits hold VDDID / VBBID;
// frequency selection follows the level only in Normal; with FBB enabled VBBID in Normal is
// the fine-table code. Also checks the reset values and the one-clock latency.
module tb_ctapm_ctrl;
  import ctapm_pkg::*;

  logic         clk = 0, rst_n = 0;
  pstate_e      state;
  logic [2:0]   perf;
  logic         fbb_en;
  logic [3:0]   row;
  logic [2:0]   level;
  lut_entry_t   entry;
  logic [3:0]   fbb_vbbid;
  island_ctrl_t ctrl, model;
  int checks = 0, failures = 0;
  int n_keep_vdd = 0, n_keep_vbb = 0, n_fbb = 0;

  ctapm_ctrl dut (.clk, .rst_n, .state_i(state), .perf_i(perf), .fbb_en_i(fbb_en),
                  .row_o(row), .level_o(level), .entry_i(entry), .fbb_vbbid_i(fbb_vbbid),
                  .ctrl_o(ctrl));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state = ST_NORMAL; perf = 0; fbb_en = 0; entry = '0; fbb_vbbid = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ctrl.vddid != 6'd48 || ctrl.vbbid != 0 || !ctrl.clksp || !ctrl.cktsp || ctrl.freq_sel != 0) begin
      failures++; $display("FAIL reset values %p", ctrl);
    end
    model = ctrl;
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      int lvl, exp_row;
      @(negedge clk);
      state     = pstate_e'($urandom_range(0, 4));
      perf      = 3'($urandom_range(0, 7));
      fbb_en    = 1'($urandom);
      entry     = lut_entry_t'($urandom);
      fbb_vbbid = 4'($urandom);
      lvl = (perf > 4) ? 4 : perf;
      exp_row = (state == ST_NORMAL) ? lvl : 5 + int'(state) - 1;
      #1;
      checks++;
      if (int'(row) != exp_row || int'(level) != lvl) begin
        failures++; $display("FAIL row %0d/%0d level %0d/%0d", row, exp_row, level, lvl);
      end
      // Model of the next registered value.
      model.clksp = entry.clksp;
      model.cktsp = entry.cktsp;
      if (!entry.vdd_keep) model.vddid = entry.vddid; else n_keep_vdd++;
      if (state == ST_NORMAL) begin
        model.freq_sel = 3'(lvl);
        model.vbbid = fbb_en ? fbb_vbbid : entry.vbbid;
        if (fbb_en) n_fbb++;
      end else if (!entry.vbb_keep) model.vbbid = entry.vbbid;
      else n_keep_vbb++;
      // Not yet visible before the edge.
      @(posedge clk);
      #1;
      checks++;
      if (ctrl !== model) begin
        failures++; $display("FAIL k=%0d ctrl=%p exp=%p", k, ctrl, model);
      end
    end
    checks++;
    if (n_keep_vdd == 0 || n_keep_vbb == 0 || n_fbb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
