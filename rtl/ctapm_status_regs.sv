// ctapm_status_regs: status register file of the power management unit.
//
// It records the system information coming from software and from hardware:
//  - per island, the mode register: desired performance level and the state requests
//    (stpclk, slp, dpslp, dprslp) written by the operating system or scheduler over the bus,
//    or by the external Mode port (the application interface for user commands);
//  - a global control register; bit 0 enables forward body bias (off after reset, since
//    forward body bias was found too weak to use for this technology);
//  - per island, a copy of the hardware status, sampled every clock: power state,
//    temperature reading, temperature step and the values sent to the peripheral circuits.
// It presents every register as a 32-bit read word for the bus interface.
//
// Word layouts (bit positions are this design's choice):
//   MODE   [2:0] perf, [8] stpclk, [9] slp, [10] dpslp, [11] dprslp
//   STATUS [2:0] state, [10:8] temperature step, [24:16] temperature (signed degC)
//   CTRL   [5:0] VDDID, [11:8] VBBID, [16] CLKSP, [17] CKTSP, [22:20] frequency selection
//   GLOBAL [0] fbb_en
// Timing: writes take effect on the rising edge of the write strobe's cycle; when the Mode
// port and the bus write the same island's mode in one cycle, the Mode port wins. Hardware
// status words lag the hardware by one clock. Reset clears every request and selects
// performance level 0 (fastest).
module ctapm_status_regs
  import ctapm_pkg::*;
#(
  parameter int unsigned NUM_ISLANDS = 2,
  parameter int unsigned NUM_TSTEPS  = 8,
  localparam int unsigned ISL_W      = (NUM_ISLANDS > 1) ? $clog2(NUM_ISLANDS) : 1,
  localparam int unsigned TS_W       = $clog2(NUM_TSTEPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // bus writes
  input  logic                     mode_we_i,
  input  logic                     glob_we_i,
  input  logic [ISL_W-1:0]         island_i,
  input  logic [31:0]              wdata_i,
  // external Mode port
  input  logic                     ext_mode_valid_i,
  input  logic [ISL_W-1:0]         ext_mode_island_i,
  input  mode_t                    ext_mode_i,
  // hardware status
  input  pstate_e                  state_i  [NUM_ISLANDS],
  input  logic signed [TEMP_W-1:0] temp_i   [NUM_ISLANDS],
  input  logic [TS_W-1:0]          tstep_i  [NUM_ISLANDS],
  input  island_ctrl_t             ctrl_i   [NUM_ISLANDS],
  // register contents
  output mode_t                    mode_o   [NUM_ISLANDS],
  output logic                     fbb_en_o,
  output logic [31:0]              mode_word_o   [NUM_ISLANDS],
  output logic [31:0]              status_word_o [NUM_ISLANDS],
  output logic [31:0]              ctrl_word_o   [NUM_ISLANDS],
  output logic [31:0]              glob_word_o
);

  pstate_e                  state_q [NUM_ISLANDS];
  logic signed [TEMP_W-1:0] temp_q  [NUM_ISLANDS];
  logic [TS_W-1:0]          tstep_q [NUM_ISLANDS];
  island_ctrl_t             ctrl_q  [NUM_ISLANDS];

  function automatic mode_t word_to_mode(input logic [31:0] w);
    mode_t m;
    m.perf   = w[PERF_W-1:0];
    m.stpclk = w[8];
    m.slp    = w[9];
    m.dpslp  = w[10];
    m.dprslp = w[11];
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fbb_en_o <= 1'b0;
      for (int i = 0; i < NUM_ISLANDS; i++) begin
        mode_o[i]  <= '0;
        state_q[i] <= ST_NORMAL;
        temp_q[i]  <= '0;
        tstep_q[i] <= '0;
        ctrl_q[i]  <= '0;
      end
    end else begin
      if (glob_we_i) fbb_en_o <= wdata_i[0];
      for (int i = 0; i < NUM_ISLANDS; i++) begin
        if (ext_mode_valid_i && int'(ext_mode_island_i) == i) mode_o[i] <= ext_mode_i;
        else if (mode_we_i && int'(island_i) == i)            mode_o[i] <= word_to_mode(wdata_i);
        state_q[i] <= state_i[i];
        temp_q[i]  <= temp_i[i];
        tstep_q[i] <= tstep_i[i];
        ctrl_q[i]  <= ctrl_i[i];
      end
    end
  end

  always_comb begin
    glob_word_o = {31'd0, fbb_en_o};
    for (int i = 0; i < NUM_ISLANDS; i++) begin
      mode_word_o[i] = '0;
      mode_word_o[i][PERF_W-1:0] = mode_o[i].perf;
      mode_word_o[i][8]  = mode_o[i].stpclk;
      mode_word_o[i][9]  = mode_o[i].slp;
      mode_word_o[i][10] = mode_o[i].dpslp;
      mode_word_o[i][11] = mode_o[i].dprslp;

      status_word_o[i] = '0;
      status_word_o[i][2:0]            = state_q[i];
      status_word_o[i][8 +: TS_W]      = tstep_q[i];
      status_word_o[i][16 +: TEMP_W]   = temp_q[i];

      ctrl_word_o[i] = '0;
      ctrl_word_o[i][VDDID_W-1:0]      = ctrl_q[i].vddid;
      ctrl_word_o[i][8 +: VBBID_W]     = ctrl_q[i].vbbid;
      ctrl_word_o[i][16]               = ctrl_q[i].clksp;
      ctrl_word_o[i][17]               = ctrl_q[i].cktsp;
      ctrl_word_o[i][20 +: PERF_W]     = ctrl_q[i].freq_sel;
    end
  end

endmodule
