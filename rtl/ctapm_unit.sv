// ctapm_unit: comprehensive thermal-aware power management unit (top level).
//
// The unit manages NUM_ISLANDS voltage islands. For each island it keeps a low power state
// (Normal, HALT, Sleep, Deep Sleep, Deeper Sleep), reads the island's thermal sensor, and
// looks up in the island's own programmable table the supply code (VDDID), body bias code
// (VBBID), clock-gating control (CLKSP) and sleep-transistor control (CKTSP) that suit the
// state, the desired performance level and the current temperature step. Since the supply is
// chosen per temperature step, islands at different temperatures still run at the same speed
// for the same performance level. Software reaches the unit through an APB-style bus
// interface (mode registers, status, table programming, see ctapm_bus_if); an external Mode
// port can set an island's mode directly.
//
// Outputs per island go to peripheral circuits that are not part of this RTL: VDDID to a
// DC-DC converter (VDD = 500 mV + 10 mV * VDDID with the reset tables), VBBID to a body bias
// generator (0XXX forward, 1XXX reverse bias, 0000 none), freq_sel to a frequency synthesizer
// (level 0 = 600 MHz ... level 4 = 200 MHz), st_ctrl to the sleep transistor (1 = on). The
// island clocks from the synthesizers come back in through island_clk_i and leave gated as
// gclk_o according to CLKSP.
//
// BODY_BIAS = 1 (default) is the full unit. BODY_BIAS = 0 is the simplified unit for a process
// where body bias does not pay off: no body bias generators, VBBID stays 0000, the islands have
// no forward-body-bias table and its bus window answers with an error. Power state machine,
// supply scaling, clock gating and power gating are unchanged.
//
// Timing: everything but the clock gates runs on clk; a mode write moves an island's state
// one clock after the write and its controls one clock after that.
module ctapm_unit
  import ctapm_pkg::*;
#(
  parameter int unsigned NUM_ISLANDS = 2,
  parameter int unsigned NUM_LEVELS  = 5,
  parameter int unsigned NUM_TSTEPS  = 8,
  parameter int unsigned ADDR_W      = 16,
  parameter bit          BODY_BIAS   = 1'b1,
  localparam int unsigned ISL_W      = (NUM_ISLANDS > 1) ? $clog2(NUM_ISLANDS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // APB slave
  input  logic                     psel,
  input  logic                     penable,
  input  logic                     pwrite,
  input  logic [ADDR_W-1:0]        paddr,
  input  logic [31:0]              pwdata,
  output logic [31:0]              prdata,
  output logic                     pready,
  output logic                     pslverr,
  // external Mode port
  input  logic                     mode_valid_i,
  input  logic [ISL_W-1:0]         mode_island_i,
  input  mode_t                    mode_i,
  // thermal sensors and island clocks
  input  logic signed [TEMP_W-1:0] temp_i       [NUM_ISLANDS],
  input  logic                     island_clk_i [NUM_ISLANDS],
  // peripheral controls
  output logic [VDDID_W-1:0]       vddid_o      [NUM_ISLANDS],
  output logic [VBBID_W-1:0]       vbbid_o      [NUM_ISLANDS],
  output logic [PERF_W-1:0]        freq_sel_o   [NUM_ISLANDS],
  output logic                     clksp_o      [NUM_ISLANDS],
  output logic                     st_ctrl_o    [NUM_ISLANDS],
  output logic                     gclk_o       [NUM_ISLANDS],
  output pstate_e                  state_o      [NUM_ISLANDS]
);

  localparam int unsigned TS_W = $clog2(NUM_TSTEPS);

  logic               mode_we, glob_we, lut_we, fbb_we;
  logic [ISL_W-1:0]   bus_island;
  logic [7:0]         idx;
  logic [31:0]        wdata;
  lut_entry_t         lut_wdata;
  logic               fbb_en;

  mode_t              mode        [NUM_ISLANDS];
  logic [31:0]        mode_word   [NUM_ISLANDS];
  logic [31:0]        status_word [NUM_ISLANDS];
  logic [31:0]        ctrl_word   [NUM_ISLANDS];
  logic [31:0]        glob_word;
  lut_entry_t         lut_rdata   [NUM_ISLANDS];
  logic [VBBID_W-1:0] fbb_rdata   [NUM_ISLANDS];
  logic [TS_W-1:0]    tstep       [NUM_ISLANDS];
  island_ctrl_t       ctrl        [NUM_ISLANDS];

  ctapm_bus_if #(
    .NUM_ISLANDS(NUM_ISLANDS), .NUM_LEVELS(NUM_LEVELS), .NUM_TSTEPS(NUM_TSTEPS),
    .ADDR_W(ADDR_W), .BODY_BIAS(BODY_BIAS)
  ) u_bus_if (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .mode_we_o(mode_we), .glob_we_o(glob_we), .lut_we_o(lut_we), .fbb_we_o(fbb_we),
    .island_o(bus_island), .idx_o(idx), .wdata_o(wdata), .lut_wdata_o(lut_wdata),
    .glob_word_i(glob_word), .mode_word_i(mode_word), .status_word_i(status_word),
    .ctrl_word_i(ctrl_word), .lut_rdata_i(lut_rdata), .fbb_rdata_i(fbb_rdata)
  );

  ctapm_status_regs #(.NUM_ISLANDS(NUM_ISLANDS), .NUM_TSTEPS(NUM_TSTEPS)) u_regs (
    .clk, .rst_n,
    .mode_we_i(mode_we), .glob_we_i(glob_we), .island_i(bus_island), .wdata_i(wdata),
    .ext_mode_valid_i(mode_valid_i), .ext_mode_island_i(mode_island_i), .ext_mode_i(mode_i),
    .state_i(state_o), .temp_i, .tstep_i(tstep), .ctrl_i(ctrl),
    .mode_o(mode), .fbb_en_o(fbb_en),
    .mode_word_o(mode_word), .status_word_o(status_word), .ctrl_word_o(ctrl_word),
    .glob_word_o(glob_word)
  );

  for (genvar i = 0; i < NUM_ISLANDS; i++) begin : g_island
    ctapm_island #(
      .NUM_LEVELS(NUM_LEVELS), .NUM_TSTEPS(NUM_TSTEPS), .BODY_BIAS(BODY_BIAS)
    ) u_island (
      .clk, .rst_n,
      .mode_i(mode[i]), .fbb_en_i(fbb_en), .temp_i(temp_i[i]),
      .lut_we_i(lut_we && (int'(bus_island) == i)),
      .fbb_we_i(fbb_we && (int'(bus_island) == i)),
      .idx_i(idx), .lut_wdata_i(lut_wdata), .fbb_wdata_i(wdata[VBBID_W-1:0]),
      .lut_rdata_o(lut_rdata[i]), .fbb_rdata_o(fbb_rdata[i]),
      .state_o(state_o[i]), .tstep_o(tstep[i]), .ctrl_o(ctrl[i])
    );

    ctapm_clock_gate u_clock_gate (
      .clk_i(island_clk_i[i]), .rst_n, .en_i(ctrl[i].clksp), .gclk_o(gclk_o[i])
    );

    assign vddid_o[i]    = ctrl[i].vddid;
    assign vbbid_o[i]    = ctrl[i].vbbid;
    assign freq_sel_o[i] = ctrl[i].freq_sel;
    assign clksp_o[i]    = ctrl[i].clksp;
    assign st_ctrl_o[i]  = ctrl[i].cktsp;
  end

endmodule
