// tb_ctapm_unit: end-to-end test of the power management unit at its default size (two
// islands, five performance levels, eight temperature steps).
//
// Directed part: sweeps every performance level through every temperature step on both
// islands and checks VDDID against the numerical supply table in mV (VDDID = (VDD - 500 mV)
// / 10 mV); shows two islands at different temperatures at the same level getting different
// supplies; walks island 0 through HALT, Sleep, Deep Sleep and Deeper Sleep and back while
// island 1 keeps running, checking clock gating (on the gated clock itself), the sleep
// transistor, reverse body bias and the lowest supply; uses the external Mode port; turns
// forward body bias on; reprograms a table cell and reads it back; reads status words; and
// provokes a bus error. Random part: random modes (over the bus or the Mode port),
// temperatures and FBB enable for random islands, each followed by a settling time, compared
// with a reference model of the settled controls. Each mechanism is counted and a mechanism
// that never happened counts as a failure.
module tb_ctapm_unit;
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
  logic [3:0] rbb [8] = '{4'hF, 4'hF, 4'hF, 4'hE, 4'hD, 4'hC, 4'hA, 4'h9};
  int fbb_base [5] = '{0, 3, 2, 1, 0};

  // Mechanism counters.
  int n_dvs = 0, n_thermal = 0, n_coherence = 0, n_halt_gated = 0, n_sleep_pg = 0;
  int n_deep_rbb = 0, n_deeper = 0, n_fbb = 0, n_ext_mode = 0, n_lut_prog = 0, n_slverr = 0;
  int n_random = 0;

  ctapm_unit dut (
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

  // Gated clock edge counters.
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

  function automatic int sub_of(int t);
    int lo, d;
    lo = (step_of(t) == 0) ? -50 : step_lo[step_of(t)];
    d = (t - lo) / 5;
    return (d > 4) ? 4 : d;
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

  // Reference model of the settled controls per island.
  int    m_depth [N];
  int    m_vdd [N], m_vbb [N], m_freq [N];
  mode_t m_mode [N];
  logic  m_fbb_en = 0;

  task automatic model_apply(int i, mode_t m, int t);
    int od, nd, lvl, st, nv, nb;
    od = m_depth[i];
    nd = depth(m);
    lvl = (m.perf > 4) ? 4 : m.perf;
    st = step_of(t);
    nv = (vdd_mv[lvl][st] - 500) / 10;
    nb = m_fbb_en ? fbb_base[lvl] + sub_of(t) : 0;
    if (nd == 0) begin
      m_vdd[i] = nv; m_vbb[i] = nb; m_freq[i] = lvl;
    end else begin
      if (nd == 4 || od == 4) m_vdd[i] = 0;
      else if (od == 0) m_vdd[i] = nv;
      if (nd >= 3) m_vbb[i] = rbb[st];
      else if (od >= 3) m_vbb[i] = rbb[st];
      else if (od == 0) m_vbb[i] = nb;
      if (od == 0) m_freq[i] = lvl;
    end
    m_depth[i] = nd;
    m_mode[i] = m;
  endtask

  task automatic check_model(int i, string tag);
    check(int'(state[i]) == m_depth[i], $sformatf("%s island %0d state %0d exp %0d", tag, i, state[i], m_depth[i]));
    check(int'(vddid[i]) == m_vdd[i], $sformatf("%s island %0d vddid %0d exp %0d", tag, i, vddid[i], m_vdd[i]));
    check(int'(vbbid[i]) == m_vbb[i], $sformatf("%s island %0d vbbid %0d exp %0d", tag, i, vbbid[i], m_vbb[i]));
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
      n_ext_mode++;
    end else begin
      wr(16'h0100 + 16'(i*16), mode_word(m));
    end
    model_apply(i, m, t);
  endtask

  initial begin
    logic [31:0] d;
    logic err;
    int g0, g1;
    temp[0] = 25; temp[1] = 25;
    for (int i = 0; i < N; i++) begin
      m_depth[i] = 0; m_vdd[i] = 48; m_vbb[i] = 0; m_freq[i] = 0; m_mode[i] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    check(vddid[0] == 6'd48 && freq_sel[0] == 0 && clksp[0] && st_ctrl[0], "reset controls");

    // Configuration word.
    rd(16'h0004, d);
    check(d == {8'd1, 8'd8, 8'd5, 8'd2}, "config word");

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
          check(freq_sel[i] == 3'(p) && vbbid[i] == 0 && clksp[i] && st_ctrl[i],
                "normal state controls");
          check_model(i, "sweep");
          if (prev_vdd >= 0 && int'(vddid[i]) != prev_vdd) begin
            if (prev_lvl != p) n_dvs++; else n_thermal++;
          end
          prev_vdd = vddid[i];
          prev_lvl = p;
        end
      end
    end

    // 2. Two islands, same level, different temperatures: different supplies.
    set_mode(0, '{dprslp:0, dpslp:0, slp:0, stpclk:0, perf:3'd0}, 10, 0);
    set_mode(1, '{dprslp:0, dpslp:0, slp:0, stpclk:0, perf:3'd0}, 140, 0);
    settle(4);
    check(vddid[0] == 6'((890 - 500) / 10) && vddid[1] == 6'((980 - 500) / 10),
          "same level at 10 and 140 degC");
    if (vddid[0] != vddid[1] && freq_sel[0] == freq_sel[1]) n_coherence++;

    // 3. Walk island 0 down to Deeper Sleep and back; island 1 keeps running.
    set_mode(0, '{dprslp:0, dpslp:0, slp:0, stpclk:1, perf:3'd0}, 60, 0);
    settle(6);
    check(state[0] == ST_HALT && !clksp[0] && st_ctrl[0], "HALT: clock off, power on");
    check(vddid[0] == 6'((930 - 500) / 10), "HALT keeps the last supply (600 MHz, 60 degC)");
    g0 = gedges[0]; g1 = gedges[1];
    settle(20);
    check(gedges[0] == g0, "HALT: gated clock stopped");
    check(gedges[1] > g1, "other island clock still running");
    if (gedges[0] == g0) n_halt_gated++;
    check_model(0, "halt");

    set_mode(0, '{dprslp:0, dpslp:0, slp:1, stpclk:1, perf:3'd0}, 60, 0);
    settle();
    check(state[0] == ST_SLEEP && !st_ctrl[0], "Sleep: sleep transistor off");
    if (!st_ctrl[0]) n_sleep_pg++;
    check_model(0, "sleep");

    set_mode(0, '{dprslp:0, dpslp:1, slp:1, stpclk:1, perf:3'd0}, 60, 0);
    settle();
    check(state[0] == ST_DEEP && vbbid[0] == 4'b1101 && vbbid[0][3], "Deep Sleep: reverse body bias");
    if (vbbid[0][3]) n_deep_rbb++;
    check_model(0, "deep");

    set_mode(0, '{dprslp:1, dpslp:1, slp:1, stpclk:1, perf:3'd0}, 130, 1);
    settle();
    check(state[0] == ST_DEEPER && vddid[0] == 0 && vbbid[0] == 4'b1001, "Deeper Sleep: lowest supply");
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

    // 4. Forward body bias on: Normal VBBID from the fine table.
    wr(16'h0000, 32'd1);
    m_fbb_en = 1;
    set_mode(1, '{dprslp:0, dpslp:0, slp:0, stpclk:0, perf:3'd1}, 12, 0);
    settle(4);
    check(vbbid[1] == 4'd5, "FBB 500 MHz at 12 degC gives code 0101");
    if (vbbid[1] != 0) n_fbb++;
    check_model(1, "fbb");
    wr(16'h0000, 32'd0);
    m_fbb_en = 0;
    set_mode(1, '{dprslp:0, dpslp:0, slp:0, stpclk:0, perf:3'd1}, 12, 0);
    settle(4);
    check(vbbid[1] == 0, "FBB off again");

    // 5. Reprogram island 1's cell for 500 MHz at 0~25 degC and read it back.
    wr(16'h4000 + 16'(1*1024) + 16'((1*8 + 2) * 4), {14'd0, 1'b1, 1'b1, 3'd0, 1'b0, 4'd0, 2'b0, 6'd40});
    settle(3);
    check(vddid[1] == 6'd40, "reprogrammed cell drives the supply");
    rd(16'h4000 + 16'(1*1024) + 16'((1*8 + 2) * 4), d);
    check(d[5:0] == 6'd40 && d[17:16] == 2'b11, "cell read back");
    if (vddid[1] == 6'd40) n_lut_prog++;
    wr(16'h4000 + 16'(1*1024) + 16'((1*8 + 2) * 4),
       {14'd0, 1'b1, 1'b1, 3'd0, 1'b0, 4'd0, 2'b0, 6'((790 - 500) / 10)});
    rd(16'h8000 + 16'(0*1024) + 16'(((2*5 + 1)*5 + 3) * 4), d);
    check(d == 32'd6, "FBB table read back");

    // 6. Status words.
    settle(2);
    rd(16'h0104, d);
    check(d[2:0] == 3'(state[0]) && $signed(d[24:16]) == 30 && d[10:8] == 3'd3, "island 0 status word");
    rd(16'h0118, d);
    check(d[5:0] == vddid[1] && d[11:8] == vbbid[1] && d[16] == clksp[1] && d[17] == st_ctrl[1] &&
          d[22:20] == freq_sel[1], "island 1 control word");

    // 7. Bus errors.
    apb(1, 16'h0104, 32'd0, d, err);
    check(err, "write to read-only status is refused");
    if (err) n_slverr++;
    apb(0, 16'hC000, 32'd0, d, err);
    check(err, "unmapped address is refused");
    if (err) n_slverr++;

    // 8. Random operation.
    for (int k = 0; k < 400; k++) begin
      int i, t;
      mode_t m;
      i = $urandom_range(0, N - 1);
      t = $urandom_range(0, 230) - 50;
      m = mode_t'($urandom);
      m.perf = 3'($urandom_range(0, 5));
      if ($urandom_range(0, 9) == 0) begin
        m_fbb_en = 1'($urandom);
        wr(16'h0000, {31'd0, m_fbb_en});
        // A change of FBB enable only shows in Normal; refresh the model of both islands.
        for (int j = 0; j < N; j++) if (m_depth[j] == 0) model_apply(j, m_mode[j], temp[j]);
      end
      set_mode(i, m, t, 1'($urandom));
      settle();
      for (int j = 0; j < N; j++) check_model(j, "random");
      if (m_depth[i] == 4) n_deeper++;
      if (m_depth[i] == 0 && m_fbb_en && vbbid[i] != 0) n_fbb++;
      n_random++;
    end

    $display("mechanisms: dvs=%0d thermal=%0d coherence=%0d halt_gated=%0d sleep_pg=%0d deep_rbb=%0d deeper=%0d fbb=%0d ext_mode=%0d lut_prog=%0d slverr=%0d random=%0d",
             n_dvs, n_thermal, n_coherence, n_halt_gated, n_sleep_pg, n_deep_rbb, n_deeper,
             n_fbb, n_ext_mode, n_lut_prog, n_slverr, n_random);
    check(n_dvs > 0, "DVS level change happened");
    check(n_thermal > 0, "thermal supply adjustment happened");
    check(n_coherence > 0, "per-island supply at equal level happened");
    check(n_halt_gated > 0, "HALT clock gating happened");
    check(n_sleep_pg > 0, "Sleep power gating happened");
    check(n_deep_rbb > 0, "Deep Sleep reverse bias happened");
    check(n_deeper > 0, "Deeper Sleep happened");
    check(n_fbb > 0, "forward body bias happened");
    check(n_ext_mode > 0, "external Mode port used");
    check(n_lut_prog > 0, "table reprogramming happened");
    check(n_slverr > 0, "bus error happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
