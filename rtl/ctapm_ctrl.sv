// ctapm_ctrl: control logic of one voltage island.
//
// Every clock it forms the look-up table row from the island's power state and, in the Normal
// state, its desired performance level, reads the cell of the current temperature step, and
// registers the values sent to the peripheral circuits: VDDID to the DC-DC converter, VBBID to
// the body bias generator, CLKSP to the local clock gate, CKTSP to the sleep transistor and
// the performance level to the frequency synthesizer. A cell whose keep bit is set leaves
// VDDID or VBBID as it was, so HALT and Sleep hold the supply of the last Normal level. The
// frequency selection only follows the performance level in the Normal state and is held in
// the standby states. Because the temperature step is part of the address, a change of
// temperature alone moves the supply (and body bias) to the cell that keeps the island at its
// speed: this is the thermal-aware part. With forward body bias enabled (fbb_en_i), VBBID in
// the Normal state comes from the fine forward-body-bias table instead of the main table.
// With BODY_BIAS = 0 (simplified unit without body bias generators) VBBID stays 0000.
//
// Timing: ctrl_o changes one rising edge after its inputs. After reset, before the first
// look-up, the outputs hold the highest characterised supply code, no body bias, clock on,
// sleep transistor on and the fastest level. A performance level beyond NUM_LEVELS-1 is
// treated as the slowest level. All of this is this design's choice; the description gives
// the function of the control logic, not its insides.
module ctapm_ctrl
  import ctapm_pkg::*;
#(
  parameter int unsigned NUM_LEVELS = 5,
  parameter bit          BODY_BIAS  = 1'b1,
  localparam int unsigned NUM_ROWS  = NUM_LEVELS + NUM_STANDBY,
  localparam int unsigned ROW_W     = $clog2(NUM_ROWS),
  localparam int unsigned LVL_W     = $clog2(NUM_LEVELS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pstate_e            state_i,
  input  logic [PERF_W-1:0]  perf_i,
  input  logic               fbb_en_i,
  output logic [ROW_W-1:0]   row_o,     // to look-up table read port A
  output logic [LVL_W-1:0]   level_o,   // to forward-body-bias table read port A
  input  lut_entry_t         entry_i,
  input  logic [VBBID_W-1:0] fbb_vbbid_i,
  output island_ctrl_t       ctrl_o
);

  logic [LVL_W-1:0] level;
  island_ctrl_t     ctrl_d;

  always_comb begin
    level = (int'(perf_i) < NUM_LEVELS) ? LVL_W'(perf_i) : LVL_W'(NUM_LEVELS - 1);
    if (state_i == ST_NORMAL) row_o = ROW_W'(level);
    else                      row_o = ROW_W'(NUM_LEVELS + int'(state_i) - 1);
    level_o = level;

    ctrl_d       = ctrl_o;
    ctrl_d.clksp = entry_i.clksp;
    ctrl_d.cktsp = entry_i.cktsp;
    if (!entry_i.vdd_keep) ctrl_d.vddid = entry_i.vddid;
    if (state_i == ST_NORMAL) begin
      ctrl_d.freq_sel = PERF_W'(level);
      ctrl_d.vbbid    = fbb_en_i ? fbb_vbbid_i : entry_i.vbbid;
    end else if (!entry_i.vbb_keep) begin
      ctrl_d.vbbid = entry_i.vbbid;
    end
    if (!BODY_BIAS) ctrl_d.vbbid = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_o.vddid    <= VDDID_SAFE;
      ctrl_o.vbbid    <= '0;
      ctrl_o.clksp    <= 1'b1;
      ctrl_o.cktsp    <= 1'b1;
      ctrl_o.freq_sel <= '0;
    end else begin
      ctrl_o <= ctrl_d;
    end
  end

endmodule
