// tb_ctapm_status_regs: writes the mode and global registers from the bus side and from the
// external Mode port (including both in the same cycle, where the Mode port wins), feeds
// random hardware status, and checks the register outputs and the 32-bit read words against
// the documented bit layout and the one-clock capture delay.
module tb_ctapm_status_regs;
  import ctapm_pkg::*;

  localparam int N = 2;
  logic                     clk = 0, rst_n = 0;
  logic                     mode_we, glob_we, ext_valid;
  logic                     island, ext_island;
  logic [31:0]              wdata;
  mode_t                    ext_mode;
  pstate_e                  state  [N];
  logic signed [TEMP_W-1:0] temp   [N];
  logic [2:0]               tstep  [N];
  island_ctrl_t             ctrl   [N];
  mode_t                    mode   [N];
  logic                     fbb_en;
  logic [31:0]              mode_word [N], status_word [N], ctrl_word [N], glob_word;
  int checks = 0, failures = 0;
  mode_t m_mode [N];
  logic  m_fbb;
  int    n_ext_wins = 0;

  ctapm_status_regs dut (
    .clk, .rst_n, .mode_we_i(mode_we), .glob_we_i(glob_we), .island_i(island), .wdata_i(wdata),
    .ext_mode_valid_i(ext_valid), .ext_mode_island_i(ext_island), .ext_mode_i(ext_mode),
    .state_i(state), .temp_i(temp), .tstep_i(tstep), .ctrl_i(ctrl),
    .mode_o(mode), .fbb_en_o(fbb_en), .mode_word_o(mode_word), .status_word_o(status_word),
    .ctrl_word_o(ctrl_word), .glob_word_o(glob_word));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] exp_mode_word(mode_t m);
    return {20'd0, m.dprslp, m.dpslp, m.slp, m.stpclk, 5'd0, m.perf};
  endfunction

  initial begin
    pstate_e      s_q [N];
    logic [8:0]   t_q [N];
    logic [2:0]   ts_q [N];
    island_ctrl_t c_q [N];
    mode_we = 0; glob_we = 0; ext_valid = 0; island = 0; ext_island = 0; wdata = 0; ext_mode = '0;
    for (int i = 0; i < N; i++) begin
      state[i] = ST_NORMAL; temp[i] = 0; tstep[i] = 0; ctrl[i] = '0;
      m_mode[i] = '0;
    end
    m_fbb = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (mode[0] != '0 || mode[1] != '0 || fbb_en || glob_word != 0) failures++;
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      mode_we   = 1'($urandom);
      glob_we   = ($urandom_range(0, 7) == 0);
      ext_valid = 1'($urandom);
      island    = 1'($urandom);
      ext_island = 1'($urandom);
      wdata     = $urandom;
      ext_mode  = mode_t'($urandom);
      for (int i = 0; i < N; i++) begin
        state[i] = pstate_e'($urandom_range(0, 4));
        temp[i]  = 9'($urandom);
        tstep[i] = 3'($urandom);
        ctrl[i]  = island_ctrl_t'($urandom);
        s_q[i] = state[i]; t_q[i] = temp[i]; ts_q[i] = tstep[i]; c_q[i] = ctrl[i];
      end
      if (glob_we) m_fbb = wdata[0];
      for (int i = 0; i < N; i++) begin
        if (ext_valid && int'(ext_island) == i) begin
          m_mode[i] = ext_mode;
          if (mode_we && int'(island) == i) n_ext_wins++;
        end else if (mode_we && int'(island) == i) begin
          m_mode[i] = '{dprslp: wdata[11], dpslp: wdata[10], slp: wdata[9], stpclk: wdata[8],
                        perf: wdata[2:0]};
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (fbb_en != m_fbb || glob_word != {31'd0, m_fbb}) begin
        failures++; $display("FAIL global");
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (mode[i] != m_mode[i] || mode_word[i] != exp_mode_word(m_mode[i])) begin
          failures++; $display("FAIL mode %0d: %p exp %p word %h", i, mode[i], m_mode[i], mode_word[i]);
        end
        checks++;
        if (status_word[i] != {7'd0, t_q[i], 5'd0, ts_q[i], 5'd0, 3'(s_q[i])}) begin
          failures++; $display("FAIL status %0d: %h", i, status_word[i]);
        end
        checks++;
        if (ctrl_word[i] != {9'd0, c_q[i].freq_sel, 2'd0, c_q[i].cktsp, c_q[i].clksp, 4'd0,
                             c_q[i].vbbid, 2'd0, c_q[i].vddid}) begin
          failures++; $display("FAIL ctrl %0d: %h", i, ctrl_word[i]);
        end
      end
    end
    checks++;
    if (n_ext_wins == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
