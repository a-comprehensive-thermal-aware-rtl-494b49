// ctapm_temp_step: turns a thermal sensor reading into the temperature step that indexes the
// look-up tables.
//
// The supply table splits the temperature axis into eight steps: -40~-25, -25~0, 0~25, 25~50,
// 50~75, 75~100, 100~125 and 125~150 degC. The step is the number of step edges (-25, 0, 25,
// ..., 125) at or below the reading, so a reading on an edge belongs to the hotter step and
// readings outside -40..150 fall into the first or last step. The forward body bias table
// divides each 25 degC step into five 5 degC sub-steps (0~5, 5~10, ... degC); the sub-step is
// counted from the step's lower edge (the first step is taken to start at -50 degC so that all
// sub-steps stay 5 degC wide), clamped to 0..4.
//
// Purely combinational: temp_i (signed degC) -> tstep_o, sub_o. The edge position, the step
// width and the number of steps are parameters whose defaults are the table's.
module ctapm_temp_step
  import ctapm_pkg::*;
#(
  parameter int unsigned NUM_TSTEPS = 8,
  parameter int          FIRST_EDGE = -25,  // lower edge of step 1, degC
  parameter int          STEP_WIDTH = 25,   // degC
  parameter int          SUB_WIDTH  = 5     // degC
) (
  input  logic signed [TEMP_W-1:0]       temp_i,
  output logic [$clog2(NUM_TSTEPS)-1:0]  tstep_o,
  output logic [$clog2(NUM_SUB)-1:0]     sub_o
);

  localparam int unsigned TS_W = $clog2(NUM_TSTEPS);

  int t;
  int lo;
  int unsigned k;
  int unsigned s;

  always_comb begin
    t = int'(temp_i);
    k = 0;
    for (int unsigned e = 1; e < NUM_TSTEPS; e++) begin
      if (t >= FIRST_EDGE + int'(STEP_WIDTH) * (int'(e) - 1)) k = e;
    end
    lo = FIRST_EDGE + int'(STEP_WIDTH) * (int'(k) - 1);
    s = 0;
    for (int unsigned j = 1; j < NUM_SUB; j++) begin
      if (t >= lo + int'(SUB_WIDTH) * int'(j)) s = j;
    end
    tstep_o = TS_W'(k);
    sub_o   = ($clog2(NUM_SUB))'(s);
  end

endmodule
