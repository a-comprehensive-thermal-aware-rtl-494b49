// tb_ctapm_unit_simple: end-to-end test of the simplified power management unit, the
// configuration without body bias generators (BODY_BIAS = 0), at otherwise default size.
//
// The simplified unit keeps supply scaling over performance level and temperature, clock
// gating in HALT and power gating in Sleep, but never drives body bias. The test checks that
// the configuration word reports no body bias; that the forward-body-bias table window answers
// with a bus error; that every level and temperature step still gives the supply of the
// numerical table, with VBBID at 0000 even with the forward-body-bias enable set; and that
// the walk down to Deeper Sleep and back stops the gated clock, turns the sleep transistor
// off and drops the supply to its lowest code while VBBID stays 0000, also after software
// writes a bias code into a table cell. It ends with random modes and temperatures checked
// against a reference model. Each mechanism is counted and one that never happened counts as
// a failure.
module tb_ctapm_unit_simple;
  import ctapm_pkg::*;

  localparam int N = 2;

  logic                     clk = 0, rst_n = 0;
  logic                     psel = 0, penable = 0, pwrite = 0;
  logic [15:0]              paddr = 0;
  logic [31:0]              pwdata = 0, prdata;
  logic                     pready, pslverr;
  logic                     mode_valid = 0;
  logic                     mode_island = 0;
  mode_t                    mode_cmd = '0;
  logic signed [TEMP_W-1:0] temp [N];
  logic                     iclk [N];
  logic [VDDID_W-1:0]       vddid [N];
  logic [VBBID_W-1:0]       vbbid [N];
  logic [PERF_W-1:0]        freq_sel [N];
  logic                     clksp [N], st_ctrl [N], gclk [N];
  pstate_e                  state [N];

  int checks = 0, failures = 0;

  // Numerical supply table, mV: [600, 500, 400, 300, 200 MHz][-40~-25 ... 125~150 degC].
  int vdd_mv [5][8] = '{
    '{860, 870, 890, 910, 930, 940, 960, 980},
    '{780, 780, 790, 800, 810, 820, 830, 840},
    '{700, 700, 700, 710, 710, 710, 720, 720},
    '{630, 630, 620, 620, 610, 610, 600, 600},
    '{570, 560, 550, 530, 520, 510, 500, 500}
  };
  int step_lo [8] = '{-40, -25, 0, 25, 50, 75, 100, 125};

  // Mechanism counters.
  int n_dvs = 0, n_thermal = 0, n_halt_gated = 0, n_sleep_pg = 0, n_deep_nobb = 0;
  int n_deeper = 0, n_fbb_ignored = 0, n_slverr = 0, n_random = 0;

  ctapm_unit #(.BODY_BIAS(1'b0)) dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .mode_valid_i(mode_valid), .mode_island_i(mode_island), .mode_i(mode_cmd),
    .temp_i(temp), .island_clk_i(iclk),
    .vddid_o(vddid), .vbbid_o(vbbid), .freq_sel_o(freq_sel), .clksp_o(clksp),
    .st_ctrl_o(st_ctrl), .gclk_o(gclk), .state_o(state));

  always #5 clk = ~clk;
  initial begin
    iclk[0] = 0; iclk[1] = 0;
    forever #3 iclk[0] = ~iclk[0];
  end
  initial forever #7 iclk[1] = ~iclk[1];

  int gedges [N];
  initial begin gedges[0] = 0; gedges[1] = 0; end
  always @(posedge gclk[0]) gedges[0]++;
  always @(posedge gclk[1]) gedges[1]++;

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic apb(input logic wr, input logic [15:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    #1;
    rd = prdata; err = pslverr;
    @(posedge clk);
    #1;
    psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    logic [31:0] rd; logic err;
    apb(1, a, d, rd, err);
    check(!err, $sformatf("write %h accepted", a));
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    logic err;
    apb(0, a, 0, d, err);
    check(!err, $sformatf("read %h accepted", a));
  endtask

  function automatic logic [31:0] mode_word(mode_t m);
    return {20'd0, m.dprslp, m.dpslp, m.slp, m.stpclk, 5'd0, m.perf};
  endfunction

  function automatic int step_of(int t);
    int s = 0;
    for (int k = 1; k < 8; k++) if (t >= step_lo[k]) s = k;
    return s;
  endfunction

  function automatic int depth(mode_t m);
    if (!m.stpclk) return 0;
    if (!m.slp)    return 1;
    if (!m.dpslp)  return 2;
    if (!m.dprslp) return 3;
    return 4;
  endfunction

  task automatic settle(int n = 8);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Reference model of the settled controls per island: supply as in the full unit, body
  // bias always 0000.
  int m_depth [N];
  int m_vdd [N], m_freq [N];

  task automatic model_apply(int i, mode_t m, int t);
    int od, nd, lvl;
    od = m_depth[i];
    nd = depth(m);
    lvl = (m.perf > 4) ? 4 : int'(m.perf);
    if (nd == 0) begin
      m_vdd[i] = (vdd_mv[lvl][step_of(t)] - 500) / 10;
      m_freq[i] = lvl;
    end else begin
      if (nd == 4 || od == 4) m_vdd[i] = 0;
      else if (od == 0) m_vdd[i] = (vdd_mv[lvl][step_of(t)] - 500) / 10;
      if (od == 0) m_freq[i] = lvl;
    end
    m_depth[i] = nd;
  endtask

  task automatic check_model(int i, string tag);
    check(int'(state[i]) == m_depth[i], $sformatf("%s island %0d state %0d exp %0d", tag, i, state[i], m_depth[i]));
    check(int'(vddid[i]) == m_vdd[i], $sformatf("%s island %0d vddid %0d exp %0d", tag, i, vddid[i], m_vdd[i]));
    check(vbbid[i] == 0, $sformatf("%s island %0d vbbid %0d exp 0", tag, i, vbbid[i]));
    check(int'(freq_sel[i]) == m_freq[i], $sformatf("%s island %0d freq %0d exp %0d", tag, i, freq_sel[i], m_freq[i]));
    check(clksp[i] == (m_depth[i] == 0), $sformatf("%s island %0d clksp", tag, i));
    check(st_ctrl[i] == (m_depth[i] <= 1), $sformatf("%s island %0d st_ctrl", tag, i));
  endtask

  task automatic set_mode(int i, mode_t m, int t, bit ext);
    temp[i] = TEMP_W'(t);
    if (ext) begin
      @(negedge clk);
      mode_valid = 1; mode_island = 1'(i); mode_cmd = m;
      @(negedge clk);
      mode_valid = 0;
    end else begin
      wr(16'h0100 + 16'(i*16), mode_word(m));
    end
    model_apply(i, m, t);
  endtask

  initial begin
    logic [31:0] d;
    logic err;
    int g0;
    temp[0] = 25; temp[1] = 25;
    for (int i = 0; i < N; i++) begin
      m_depth[i] = 0; m_vdd[i] = 48; m_freq[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    check(vddid[0] == 6'd48 && vbbid[0] == 0 && clksp[0] && st_ctrl[0], "reset controls");

    // Configuration word: no body bias.
    rd(16'h0004, d);
    check(d == {8'd0, 8'd8, 8'd5, 8'd2}, "config word without body bias");

    // Forward-body-bias table window is unmapped.
    apb(0, 16'h8000, 0, d, err);
    check(err, "FBB table read gives a bus error");
    if (err) n_slverr++;
    apb(1, 16'h8404, 32'h5, d, err);
    check(err, "FBB table write gives a bus error");
    if (err) n_slverr++;

    // Forward-body-bias enable set: must have no effect.
    wr(16'h0000, 32'd1);

    // 1. Performance level x temperature sweep on both islands.
    for (int i = 0; i < N; i++) begin
      int prev_vdd, prev_lvl;
      prev_vdd = -1;
      prev_lvl = -1;
      for (int p = 0; p < 5; p++) begin
        for (int s = 0; s < 8; s++) begin
          int t;
          t = step_lo[s] + $urandom_range(0, (s == 0) ? 14 : 24);
          set_mode(i, '{dprslp:0, dpslp:0, slp:0, stpclk:0, perf:3'(p)}, t, 0);
          settle(4);
          check(int'(vddid[i]) == (vdd_mv[p][s] - 500) / 10,
                $sformatf("island %0d level %0d step %0d (%0d degC): vddid %0d, table %0d mV",
                          i, p, s, t, vddid[i], vdd_mv[p][s]));
          check_model(i, "sweep");
          if (vbbid[i] == 0) n_fbb_ignored++;
          if (prev_vdd >= 0 && int'(vddid[i]) != prev_vdd) begin
            if (prev_lvl != p) n_dvs++; else n_thermal++;
          end
          prev_vdd = vddid[i];
          prev_lvl = p;
        end
      end
    end

    // 2. A bias code written into the Normal and Deep Sleep cells is not driven.
    //    Cell index = row * 8 + step; 600 MHz row 0, Deep Sleep row 7; step of 60 degC is 4.
    wr(16'h4000 + 16'((0 * 8 + 4) * 4), {14'd0, 1'b1, 1'b1, 3'd0, 1'b0, 4'b0011, 1'b0, 1'b0, 6'd43});
    wr(16'h4000 + 16'((7 * 8 + 4) * 4), {14'd0, 1'b0, 1'b0, 3'd0, 1'b0, 4'b1101, 1'b0, 1'b1, 6'd0});

    // 3. Walk island 0 down to Deeper Sleep and back.
    set_mode(0, '{dprslp:0, dpslp:0, slp:0, stpclk:0, perf:3'd0}, 60, 0);
    settle(4);
    check(vddid[0] == 6'd43 && vbbid[0] == 0, "Normal 600 MHz, 60 degC, programmed FBB code ignored");
    check_model(0, "normal");
    set_mode(0, '{dprslp:0, dpslp:0, slp:0, stpclk:1, perf:3'd0}, 60, 0);
    settle(6);
    check(state[0] == ST_HALT && !clksp[0] && st_ctrl[0], "HALT: clock off, power on");
    g0 = gedges[0];
    settle(20);
    check(gedges[0] == g0, "HALT: gated clock stopped");
    if (gedges[0] == g0) n_halt_gated++;
    check_model(0, "halt");

    set_mode(0, '{dprslp:0, dpslp:0, slp:1, stpclk:1, perf:3'd0}, 60, 0);
    settle();
    check(state[0] == ST_SLEEP && !st_ctrl[0], "Sleep: sleep transistor off");
    if (!st_ctrl[0]) n_sleep_pg++;
    check_model(0, "sleep");

    set_mode(0, '{dprslp:0, dpslp:1, slp:1, stpclk:1, perf:3'd0}, 60, 0);
    settle();
    check(state[0] == ST_DEEP && vbbid[0] == 0 && vddid[0] == 6'd43,
          "Deep Sleep: no reverse body bias, supply kept");
    if (state[0] == ST_DEEP && vbbid[0] == 0) n_deep_nobb++;
    check_model(0, "deep");

    set_mode(0, '{dprslp:1, dpslp:1, slp:1, stpclk:1, perf:3'd0}, 130, 1);
    settle();
    check(state[0] == ST_DEEPER && vddid[0] == 0 && vbbid[0] == 0, "Deeper Sleep: lowest supply only");
    if (vddid[0] == 0) n_deeper++;
    check_model(0, "deeper");

    set_mode(0, '{dprslp:0, dpslp:0, slp:0, stpclk:0, perf:3'd2}, 30, 0);
    settle();
    check(state[0] == ST_NORMAL && vddid[0] == 6'((710 - 500) / 10) && clksp[0] && st_ctrl[0],
          "back to Normal at 400 MHz, 30 degC");
    g0 = gedges[0];
    settle(20);
    check(gedges[0] > g0, "gated clock running again");
    check_model(0, "wake");

    // Restore the two programmed cells to their reset values.
    wr(16'h4000 + 16'((0 * 8 + 4) * 4), {14'd0, 1'b1, 1'b1, 3'd0, 1'b0, 4'b0000, 1'b0, 1'b0, 6'd43});
    wr(16'h4000 + 16'((7 * 8 + 4) * 4), {14'd0, 1'b0, 1'b0, 3'd0, 1'b0, 4'b1101, 1'b0, 1'b1, 6'd0});

    // 4. Random modes and temperatures.
    for (int k = 0; k < 300; k++) begin
      int i, t, sel;
      mode_t m;
      i = $urandom_range(0, N - 1);
      t = $urandom_range(0, 189) - 40;
      m = '0;
      m.perf = 3'($urandom_range(0, 5));
      sel = $urandom_range(0, 4);
      unique case (sel)
        0: m.stpclk = 0;
        1: m.stpclk = 1;
        2: begin m.stpclk = 1; m.slp = 1; end
        3: begin m.stpclk = 1; m.slp = 1; m.dpslp = 1; end
        default: begin m.stpclk = 1; m.slp = 1; m.dpslp = 1; m.dprslp = 1; end
      endcase
      set_mode(i, m, t, 1'($urandom_range(0, 1)));
      settle();
      check_model(i, "random");
      n_random++;
    end

    $display("mechanisms: dvs=%0d thermal=%0d halt_gated=%0d sleep_pg=%0d deep_nobb=%0d deeper=%0d fbb_ignored=%0d slverr=%0d random=%0d",
             n_dvs, n_thermal, n_halt_gated, n_sleep_pg, n_deep_nobb, n_deeper, n_fbb_ignored,
             n_slverr, n_random);
    check(n_dvs > 0, "mechanism: supply scaling over levels");
    check(n_thermal > 0, "mechanism: supply scaling over temperature");
    check(n_halt_gated > 0, "mechanism: clock gating in HALT");
    check(n_sleep_pg > 0, "mechanism: power gating in Sleep");
    check(n_deep_nobb > 0, "mechanism: Deep Sleep without body bias");
    check(n_deeper > 0, "mechanism: lowest supply in Deeper Sleep");
    check(n_fbb_ignored > 0, "mechanism: FBB enable has no effect");
    check(n_slverr > 0, "mechanism: FBB window unmapped");
    check(n_random > 0, "mechanism: random modes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
