// ctapm_island: the per-island slice of the power management unit.
//
// Each voltage island has its own state, its own look-up tables and its own controls, so the
// unit repeats this slice once per island. It ties together the island's low power state
// machine (ctapm_state_fsm), the temperature step encoder for its thermal sensor
// (ctapm_temp_step), its main look-up table (ctapm_lut), its fine forward-body-bias table
// (ctapm_fbb_lut) and its control logic (ctapm_ctrl).
//
// Interface: the island's mode register and the global forward-body-bias enable in; its
// sensor temperature in; table write and read-back ports shared with the bus interface;
// state, temperature step and the registered peripheral controls out.
// With BODY_BIAS = 0 (the simplified unit without body bias generators) the fine table is
// left out and VBBID stays 0000.
// Timing: a mode change moves the state one clock later and the controls one clock after
// that; a temperature change moves the controls one clock later.
module ctapm_island
  import ctapm_pkg::*;
#(
  parameter int unsigned NUM_LEVELS = 5,
  parameter int unsigned NUM_TSTEPS = 8,
  parameter bit          BODY_BIAS  = 1'b1,
  localparam int unsigned LUT_DEPTH = (NUM_LEVELS + NUM_STANDBY) * NUM_TSTEPS,
  localparam int unsigned FBB_DEPTH = NUM_TSTEPS * NUM_LEVELS * NUM_SUB,
  localparam int unsigned LUT_IDX_W = $clog2(LUT_DEPTH),
  localparam int unsigned FBB_IDX_W = $clog2(FBB_DEPTH),
  localparam int unsigned TS_W      = $clog2(NUM_TSTEPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mode_t                    mode_i,
  input  logic                     fbb_en_i,
  input  logic signed [TEMP_W-1:0] temp_i,
  input  logic                     lut_we_i,
  input  logic                     fbb_we_i,
  input  logic [7:0]               idx_i,
  input  lut_entry_t               lut_wdata_i,
  input  logic [VBBID_W-1:0]       fbb_wdata_i,
  output lut_entry_t               lut_rdata_o,
  output logic [VBBID_W-1:0]       fbb_rdata_o,
  output pstate_e                  state_o,
  output logic [TS_W-1:0]          tstep_o,
  output island_ctrl_t             ctrl_o
);

  localparam int unsigned ROW_W = $clog2(NUM_LEVELS + NUM_STANDBY);
  localparam int unsigned LVL_W = $clog2(NUM_LEVELS);

  logic [$clog2(NUM_SUB)-1:0] sub;
  logic [ROW_W-1:0]           row;
  logic [LVL_W-1:0]           level;
  lut_entry_t                 entry;
  logic [VBBID_W-1:0]         fbb_vbbid;
  logic                       lut_idx_ok, fbb_idx_ok;

  assign lut_idx_ok = int'(idx_i) < LUT_DEPTH;
  assign fbb_idx_ok = int'(idx_i) < FBB_DEPTH;

  ctapm_state_fsm u_fsm (
    .clk, .rst_n, .mode_i, .state_o
  );

  ctapm_temp_step #(.NUM_TSTEPS(NUM_TSTEPS)) u_temp_step (
    .temp_i, .tstep_o, .sub_o(sub)
  );

  ctapm_lut #(.NUM_LEVELS(NUM_LEVELS), .NUM_TSTEPS(NUM_TSTEPS)) u_lut (
    .clk, .rst_n,
    .we_i(lut_we_i && lut_idx_ok), .widx_i(LUT_IDX_W'(idx_i)), .wdata_i(lut_wdata_i),
    .row_a_i(row), .ts_a_i(tstep_o), .rdata_a_o(entry),
    .idx_b_i(LUT_IDX_W'(idx_i)), .rdata_b_o(lut_rdata_o)
  );

  if (BODY_BIAS) begin : g_fbb
    ctapm_fbb_lut #(.NUM_LEVELS(NUM_LEVELS), .NUM_TSTEPS(NUM_TSTEPS)) u_fbb_lut (
      .clk, .rst_n,
      .we_i(fbb_we_i && fbb_idx_ok), .widx_i(FBB_IDX_W'(idx_i)), .wdata_i(fbb_wdata_i),
      .ts_a_i(tstep_o), .level_a_i(level), .sub_a_i(sub), .rdata_a_o(fbb_vbbid),
      .idx_b_i(FBB_IDX_W'(idx_i)), .rdata_b_o(fbb_rdata_o)
    );
  end else begin : g_no_fbb
    // Simplified unit: no body bias generators, so no forward-body-bias table.
    assign fbb_vbbid   = '0;
    assign fbb_rdata_o = '0;
  end

  ctapm_ctrl #(.NUM_LEVELS(NUM_LEVELS), .BODY_BIAS(BODY_BIAS)) u_ctrl (
    .clk, .rst_n,
    .state_i(state_o), .perf_i(mode_i.perf), .fbb_en_i,
    .row_o(row), .level_o(level), .entry_i(entry), .fbb_vbbid_i(fbb_vbbid),
    .ctrl_o
  );

endmodule
