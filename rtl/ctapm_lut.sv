// ctapm_lut: programmable look-up table of one voltage island.
//
// Each island has its own table. Rows are the NUM_LEVELS performance levels of the Normal
// state (row 0 = fastest) followed by the HALT, Sleep, Deep Sleep and Deeper Sleep rows; the
// columns are the NUM_TSTEPS temperature steps. A cell (lut_entry_t) holds VDDID, VBBID, CLKSP,
// CKTSP and two keep bits that stand for the table's "-" cells, which leave the value applied
// before unchanged. The table is held in registers: reset loads the characterised values (the
// logical supply table for the performance rows, the HALT/Sleep/Deep/Deeper rows of the table
// diagram), and software may rewrite any cell afterwards, which is how the table is tuned to a
// particular chip.
//
// Ports: one write port (we_i, widx_i, wdata_i; written on the rising clock edge) and two
// combinational read ports: port A by row and temperature step for the control logic, port B
// by flat index (row * NUM_TSTEPS + step) for bus read-back. Out-of-range indices read zero
// and ignore writes.
module ctapm_lut
  import ctapm_pkg::*;
#(
  parameter int unsigned NUM_LEVELS = 5,
  parameter int unsigned NUM_TSTEPS = 8,
  localparam int unsigned NUM_ROWS  = NUM_LEVELS + NUM_STANDBY,
  localparam int unsigned DEPTH     = NUM_ROWS * NUM_TSTEPS,
  localparam int unsigned IDX_W     = $clog2(DEPTH),
  localparam int unsigned ROW_W     = $clog2(NUM_ROWS),
  localparam int unsigned TS_W      = $clog2(NUM_TSTEPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we_i,
  input  logic [IDX_W-1:0] widx_i,
  input  lut_entry_t       wdata_i,
  input  logic [ROW_W-1:0] row_a_i,
  input  logic [TS_W-1:0]  ts_a_i,
  output lut_entry_t       rdata_a_o,
  input  logic [IDX_W-1:0] idx_b_i,
  output lut_entry_t       rdata_b_o
);

  lut_entry_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < NUM_ROWS; r++)
        for (int unsigned t = 0; t < NUM_TSTEPS; t++)
          mem[r*NUM_TSTEPS + t] <= lut_default(r, t, NUM_LEVELS);
    end else if (we_i && (int'(widx_i) < DEPTH)) begin
      mem[widx_i] <= wdata_i;
    end
  end

  logic [IDX_W:0] idx_a;
  assign idx_a = (IDX_W+1)'(row_a_i) * (IDX_W+1)'(NUM_TSTEPS) + (IDX_W+1)'(ts_a_i);

  always_comb begin
    rdata_a_o = '0;
    rdata_b_o = '0;
    if (int'(idx_a) < DEPTH && int'(row_a_i) < NUM_ROWS && int'(ts_a_i) < NUM_TSTEPS)
      rdata_a_o = mem[idx_a[IDX_W-1:0]];
    if (int'(idx_b_i) < DEPTH) rdata_b_o = mem[idx_b_i];
  end

endmodule
