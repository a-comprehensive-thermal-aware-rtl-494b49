// ctapm_fbb_lut: fine forward-body-bias table of one voltage island.
//
// When forward body bias is used to cancel the small frequency loss inside one temperature
// step, each temperature step gets an extra table of its own that picks VBBID for every
// performance level in 5 degC sub-steps. This block holds all of them: NUM_TSTEPS planes of
// NUM_LEVELS x 5 four-bit codes, flat index ((step * NUM_LEVELS) + level) * 5 + sub-step.
// Reset loads the characterised codes (the same level-by-sub-step rows for every step,
// rising by one code per 5 degC); software may rewrite any code. The control logic uses
// this table only while forward body bias is enabled; it is disabled after reset.
//
// Ports: a write port (written on the rising edge), read port A by step/level/sub-step for
// the control logic and read port B by flat index for bus read-back, both combinational.
// Out-of-range indices read zero and ignore writes.
module ctapm_fbb_lut
  import ctapm_pkg::*;
#(
  parameter int unsigned NUM_LEVELS = 5,
  parameter int unsigned NUM_TSTEPS = 8,
  localparam int unsigned DEPTH     = NUM_TSTEPS * NUM_LEVELS * NUM_SUB,
  localparam int unsigned IDX_W     = $clog2(DEPTH),
  localparam int unsigned LVL_W     = $clog2(NUM_LEVELS),
  localparam int unsigned TS_W      = $clog2(NUM_TSTEPS),
  localparam int unsigned SUB_W     = $clog2(NUM_SUB)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we_i,
  input  logic [IDX_W-1:0]   widx_i,
  input  logic [VBBID_W-1:0] wdata_i,
  input  logic [TS_W-1:0]    ts_a_i,
  input  logic [LVL_W-1:0]   level_a_i,
  input  logic [SUB_W-1:0]   sub_a_i,
  output logic [VBBID_W-1:0] rdata_a_o,
  input  logic [IDX_W-1:0]   idx_b_i,
  output logic [VBBID_W-1:0] rdata_b_o
);

  logic [VBBID_W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned t = 0; t < NUM_TSTEPS; t++)
        for (int unsigned l = 0; l < NUM_LEVELS; l++)
          for (int unsigned s = 0; s < NUM_SUB; s++)
            mem[(t*NUM_LEVELS + l)*NUM_SUB + s] <= fbb_default(l, s);
    end else if (we_i && (int'(widx_i) < DEPTH)) begin
      mem[widx_i] <= wdata_i;
    end
  end

  int unsigned idx_a;
  always_comb begin
    idx_a = (int'(ts_a_i) * NUM_LEVELS + int'(level_a_i)) * NUM_SUB + int'(sub_a_i);
    rdata_a_o = '0;
    rdata_b_o = '0;
    if (idx_a < DEPTH && int'(level_a_i) < NUM_LEVELS && int'(sub_a_i) < NUM_SUB)
      rdata_a_o = mem[IDX_W'(idx_a)];
    if (int'(idx_b_i) < DEPTH) rdata_b_o = mem[idx_b_i];
  end

endmodule
