// tb_ctapm_state_fsm: drives the request bits of the low power state machine, first walking
// Normal -> HALT -> Sleep -> Deep Sleep -> Deeper Sleep and back one step per clock, then
// with random requests, and compares every state with a model that moves one state per clock
// towards the depth given by the leading run of set requests (stpclk, slp, dpslp, dprslp).
module tb_ctapm_state_fsm;
  import ctapm_pkg::*;

  logic    clk = 0, rst_n = 0;
  mode_t   mode;
  pstate_e state;
  int      checks = 0, failures = 0;
  int      model;
  int      visits [5];

  ctapm_state_fsm dut (.clk, .rst_n, .mode_i(mode), .state_o(state));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int depth(mode_t m);
    if (!m.stpclk) return 0;
    if (!m.slp)    return 1;
    if (!m.dpslp)  return 2;
    if (!m.dprslp) return 3;
    return 4;
  endfunction

  task automatic step_and_check(mode_t m);
    mode = m;
    @(posedge clk);
    if (model < depth(m)) model++;
    else if (model > depth(m)) model--;
    #1;
    checks++;
    visits[int'(state)]++;
    if (int'(state) != model) begin
      failures++;
      $display("FAIL t=%0t state=%0d expected=%0d", $time, state, model);
    end
  endtask

  initial begin
    mode = '0;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++; if (state != ST_NORMAL) failures++;
    // Walk down with all requests set: one state per clock.
    for (int k = 0; k < 5; k++) step_and_check('{dprslp:1, dpslp:1, slp:1, stpclk:1, perf:0});
    checks++; if (state != ST_DEEPER) failures++;
    // Drop everything: climb back one state per clock.
    for (int k = 0; k < 5; k++) step_and_check('0);
    checks++; if (state != ST_NORMAL) failures++;
    // Stop half way: HALT then Sleep only.
    for (int k = 0; k < 4; k++) step_and_check('{dprslp:0, dpslp:0, slp:1, stpclk:1, perf:0});
    checks++; if (state != ST_SLEEP) failures++;
    for (int k = 0; k < 3000; k++) begin
      mode_t m;
      m = mode_t'($urandom);
      // Hold requests for a few clocks so deep states are reached too.
      repeat ($urandom_range(1, 6)) step_and_check(m);
    end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (visits[s] == 0) begin
        failures++;
        $display("FAIL state %0d never visited", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
