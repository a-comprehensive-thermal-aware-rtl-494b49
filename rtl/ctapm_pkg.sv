// ctapm_pkg: types and constants shared by the thermal-aware power management unit.
//
// The unit drives, for every voltage island, a 6-bit supply-voltage ID (VDDID), a 4-bit
// body-bias ID (VBBID), a clock-gating control (CLKSP: 1 = clock on) and a sleep-transistor
// control (CKTSP: 1 = sleep transistor on, island powered). These four fields and their widths
// are the ones of the look-up table diagram in the design description; the VDDID encoding
// VDD = 500 mV + 10 mV * VDDID and the 5 x 8 table of codes below are its numerical look-up
// table (five performance levels, eight temperature steps from -40 to 150 degC).
//
// Choices made here: temperatures are signed 9-bit integers in degC; a look-up table entry
// carries two "keep" bits that stand for the "-" (unchanged) cells of the table diagram;
// VBBID 0000 means no body bias (forward body bias was given up for this technology, so the
// performance rows carry 0000); the reverse-body-bias codes of the Deep/Deeper Sleep rows for
// the two sub-zero temperature steps, which the diagram does not cover, repeat the 0-25 degC code.
package ctapm_pkg;

  localparam int unsigned VDDID_W    = 6;
  localparam int unsigned VBBID_W    = 4;
  localparam int unsigned TEMP_W     = 9;   // signed degC
  localparam int unsigned PERF_W     = 3;   // performance level index, 0 = fastest
  localparam int unsigned NUM_STANDBY = 4;  // HALT, Sleep, Deep Sleep, Deeper Sleep rows
  localparam int unsigned NUM_SUB    = 5;   // 5 degC sub-steps per 25 degC step (FBB table)

  // Highest supply code of the numerical table (980 mV): used before the first look-up.
  localparam logic [VDDID_W-1:0] VDDID_SAFE = 6'd48;

  typedef enum logic [2:0] {
    ST_NORMAL = 3'd0,
    ST_HALT   = 3'd1,
    ST_SLEEP  = 3'd2,
    ST_DEEP   = 3'd3,
    ST_DEEPER = 3'd4
  } pstate_e;

  // One look-up table cell.
  typedef struct packed {
    logic               vdd_keep;  // 1: leave VDDID as it is ("-" cell)
    logic [VDDID_W-1:0] vddid;
    logic               vbb_keep;  // 1: leave VBBID as it is ("-" cell)
    logic [VBBID_W-1:0] vbbid;
    logic               clksp;     // 0: clock off, 1: clock on
    logic               cktsp;     // 0: sleep transistor off, 1: on
  } lut_entry_t;

  localparam int unsigned LUT_ENTRY_W = $bits(lut_entry_t);

  // Request bits written by software (system state) or by the external Mode port.
  typedef struct packed {
    logic              dprslp;  // request Deeper Sleep (from Deep Sleep)
    logic              dpslp;   // request Deep Sleep (from Sleep)
    logic              slp;     // request Sleep (from HALT)
    logic              stpclk;  // request HALT (from Normal)
    logic [PERF_W-1:0] perf;    // desired performance level in Normal state
  } mode_t;

  // Values the unit sends to the peripheral circuits of one island.
  typedef struct packed {
    logic [VDDID_W-1:0] vddid;     // to the DC-DC converter
    logic [VBBID_W-1:0] vbbid;     // to the body bias generator
    logic               clksp;     // to the local clock gate
    logic               cktsp;     // CTRL of the sleep transistor
    logic [PERF_W-1:0]  freq_sel;  // to the frequency synthesizer
  } island_ctrl_t;

  // Logical supply look-up table: [performance level][temperature step].
  // Levels 600, 500, 400, 300, 200 MHz; steps -40~-25, -25~0, 0~25, ..., 125~150 degC.
  localparam logic [VDDID_W-1:0] VID_TABLE [5][8] = '{
    '{6'b100100, 6'b100101, 6'b100111, 6'b101001, 6'b101011, 6'b101100, 6'b101110, 6'b110000},
    '{6'b011100, 6'b011100, 6'b011101, 6'b011110, 6'b011111, 6'b100000, 6'b100001, 6'b100010},
    '{6'b010100, 6'b010100, 6'b010100, 6'b010101, 6'b010101, 6'b010101, 6'b010110, 6'b010110},
    '{6'b001101, 6'b001101, 6'b001100, 6'b001100, 6'b001011, 6'b001011, 6'b001010, 6'b001010},
    '{6'b000111, 6'b000110, 6'b000101, 6'b000011, 6'b000010, 6'b000001, 6'b000000, 6'b000000}
  };

  // Reverse body bias codes of the Deep and Deeper Sleep rows, per temperature step.
  localparam logic [VBBID_W-1:0] RBB_TABLE [8] = '{
    4'b1111, 4'b1111, 4'b1111, 4'b1110, 4'b1101, 4'b1100, 4'b1010, 4'b1001
  };

  // Forward body bias codes of the fine table, [level][5 degC sub-step]; every 25 degC step
  // starts from the same row.
  localparam logic [VBBID_W-1:0] FBB_TABLE [5][NUM_SUB] = '{
    '{4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100},
    '{4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111},
    '{4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110},
    '{4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101},
    '{4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100}
  };

  // Reset content of the main table. Rows 0..NUM_LEVELS-1 are performance levels, then HALT,
  // Sleep, Deep Sleep and Deeper Sleep. Levels and steps beyond the printed table reuse its
  // last row / column.
  function automatic lut_entry_t lut_default(input int unsigned row, input int unsigned ts,
                                             input int unsigned num_levels);
    lut_entry_t e;
    int unsigned r, t;
    r = (row < 5) ? row : 4;
    t = (ts < 8) ? ts : 7;
    e = '0;
    if (row < num_levels) begin
      e.vddid = VID_TABLE[r][t];
      e.vbbid = '0;
      e.clksp = 1'b1;
      e.cktsp = 1'b1;
    end else begin
      unique case (row - num_levels)
        0: begin e.vdd_keep = 1'b1; e.vbb_keep = 1'b1; e.clksp = 1'b0; e.cktsp = 1'b1; end
        1: begin e.vdd_keep = 1'b1; e.vbb_keep = 1'b1; end
        2: begin e.vdd_keep = 1'b1; e.vbbid = RBB_TABLE[t]; end
        default: begin e.vddid = '0; e.vbbid = RBB_TABLE[t]; end
      endcase
    end
    return e;
  endfunction

  function automatic logic [VBBID_W-1:0] fbb_default(input int unsigned level,
                                                     input int unsigned sub);
    int unsigned r;
    r = (level < 5) ? level : 4;
    return FBB_TABLE[r][(sub < NUM_SUB) ? sub : NUM_SUB-1];
  endfunction

endpackage
