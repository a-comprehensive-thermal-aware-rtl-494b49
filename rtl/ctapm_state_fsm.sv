// ctapm_state_fsm: low power state machine of one voltage island.
//
// Five states: Normal (active; supply scaled per performance level and temperature), HALT
// (local clock gated), Sleep (sleep transistor off), Deep Sleep (reverse body bias added) and
// Deeper Sleep (lowest supply and strongest reverse body bias). The states are entered in that
// order and left in reverse order, one step per clock, as the request bits demand:
//   Normal -> HALT when stpclk is set, HALT -> Normal when it is cleared;
//   HALT -> Sleep when slp is set, Sleep -> HALT when slp is cleared;
//   Sleep -> Deep Sleep when dpslp is set, Deep Sleep -> Sleep when it is cleared;
//   Deep Sleep -> Deeper Sleep when dprslp is set, back when it is cleared.
// The chain and the first three request names follow the state diagram of the design; the
// separate dprslp request for the Deep/Deeper pair is this design's choice, since one signal
// cannot both leave Deep Sleep for Sleep and for Deeper Sleep. A request that is dropped while
// deeper states are still requested makes the island climb back one state per clock, leaving
// a state whenever its own request or any request above it in the chain is cleared.
//
// Timing: state_o is a register; it moves at most one state per rising clock edge.
// Reset (active low, asynchronous) puts the island in Normal.
module ctapm_state_fsm
  import ctapm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mode_t   mode_i,
  output pstate_e state_o
);

  pstate_e state_d;

  always_comb begin
    state_d = state_o;
    unique case (state_o)
      ST_NORMAL: if (mode_i.stpclk) state_d = ST_HALT;
      ST_HALT: begin
        if (!mode_i.stpclk)  state_d = ST_NORMAL;
        else if (mode_i.slp) state_d = ST_SLEEP;
      end
      ST_SLEEP: begin
        if (!mode_i.stpclk || !mode_i.slp) state_d = ST_HALT;
        else if (mode_i.dpslp)             state_d = ST_DEEP;
      end
      ST_DEEP: begin
        if (!mode_i.stpclk || !mode_i.slp || !mode_i.dpslp) state_d = ST_SLEEP;
        else if (mode_i.dprslp)                             state_d = ST_DEEPER;
      end
      ST_DEEPER: begin
        if (!mode_i.stpclk || !mode_i.slp || !mode_i.dpslp || !mode_i.dprslp)
          state_d = ST_DEEP;
      end
      default: state_d = ST_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_o <= ST_NORMAL;
    else        state_o <= state_d;
  end

  // The island never skips a state.
  property p_one_step;
    @(posedge clk) disable iff (!rst_n)
      $past(rst_n) |-> (($past(state_o) == state_o) ||
                        (int'($past(state_o)) - int'(state_o) == 1) ||
                        (int'(state_o) - int'($past(state_o)) == 1));
  endproperty
  a_one_step: assert property (p_one_step);

endmodule
