// ctapm_clock_gate: local clock gate of one voltage island.
//
// The island's clock (from its frequency synthesizer) is ANDed with an enable, as in the
// usual clock-gating scheme for positive-edge registers; the enable only changes while the
// clock is low, at falling edges, so the gated clock never shows a shortened pulse: a pulse
// that has started is always completed, and the first pulse after re-enabling is whole.
// CLKSP comes from the power management clock domain, so it first passes a two-flop
// synchronizer clocked by the island clock (this synchronizer and the falling-edge enable
// register are this design's choices).
//
// Timing: after en_i changes, the gated clock stops or restarts within three island clock
// periods. Reset (active low, asynchronous) leaves the clock running.
module ctapm_clock_gate (
  input  logic clk_i,   // island clock
  input  logic rst_n,
  input  logic en_i,    // CLKSP: 1 = clock on
  output logic gclk_o   // gated local clock
);

  logic [1:0] sync_q;
  logic       en_q;

  always_ff @(posedge clk_i or negedge rst_n) begin
    if (!rst_n) sync_q <= 2'b11;
    else        sync_q <= {sync_q[0], en_i};
  end

  always_ff @(negedge clk_i or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b1;
    else        en_q <= sync_q[1];
  end

  assign gclk_o = clk_i & en_q;

endmodule
