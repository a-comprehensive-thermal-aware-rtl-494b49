// ctapm_bus_if: bus interface of the power management unit.
//
// An APB-style slave (psel/penable/pwrite/paddr/pwdata/prdata/pready/pslverr, 32-bit data,
// byte addresses, no wait states) through which the operating system or scheduling software
// reaches the status registers and reprograms the look-up tables. The choice of APB and the
// address map are this design's; the description only names a bus interface.
//
// Address map (ADDR_W = 16):
//   0x0000          GLOBAL  RW  [0] forward body bias enable
//   0x0004          CONFIG  RO  [7:0] islands, [15:8] performance levels, [23:16] temperature steps
//                               [24] body bias present (BODY_BIAS)
//   0x0100 + 16*i   MODE    RW  island i requests and performance level
//   0x0104 + 16*i   STATUS  RO  island i state, temperature step, temperature
//   0x0108 + 16*i   CTRL    RO  island i VDDID, VBBID, CLKSP, CKTSP, frequency selection
//   0x4000 + 1024*i + 4*k   main look-up table cell k of island i, k = row*steps + step
//                           [5:0] VDDID, [6] keep VDDID, [11:8] VBBID, [12] keep VBBID,
//                           [16] CLKSP, [17] CKTSP
//   0x8000 + 1024*i + 4*k   forward body bias table code k of island i, [3:0] VBBID
// With BODY_BIAS = 0 there is no forward body bias table and its window is unmapped.
// Up to 16 islands. An access to an unmapped address, beyond a table, or a write to a
// read-only register completes with pslverr and changes nothing.
//
// Timing: a transfer takes the usual two cycles (setup, access). Write strobes are
// combinational in the access cycle and act on that cycle's rising edge; read data is
// combinational from the addressed register or table cell in the access cycle.
module ctapm_bus_if
  import ctapm_pkg::*;
#(
  parameter int unsigned NUM_ISLANDS = 2,
  parameter int unsigned NUM_LEVELS  = 5,
  parameter int unsigned NUM_TSTEPS  = 8,
  parameter int unsigned ADDR_W      = 16,
  parameter bit          BODY_BIAS   = 1'b1,
  localparam int unsigned ISL_W      = (NUM_ISLANDS > 1) ? $clog2(NUM_ISLANDS) : 1,
  localparam int unsigned LUT_DEPTH  = (NUM_LEVELS + NUM_STANDBY) * NUM_TSTEPS,
  localparam int unsigned FBB_DEPTH  = NUM_TSTEPS * NUM_LEVELS * NUM_SUB
) (
  input  logic                clk,
  input  logic                rst_n,
  // APB slave
  input  logic                psel,
  input  logic                penable,
  input  logic                pwrite,
  input  logic [ADDR_W-1:0]   paddr,
  input  logic [31:0]         pwdata,
  output logic [31:0]         prdata,
  output logic                pready,
  output logic                pslverr,
  // decoded accesses
  output logic                mode_we_o,
  output logic                glob_we_o,
  output logic                lut_we_o,
  output logic                fbb_we_o,
  output logic [ISL_W-1:0]    island_o,
  output logic [7:0]          idx_o,      // table cell index, shared by both tables
  output logic [31:0]         wdata_o,
  output lut_entry_t          lut_wdata_o,
  // read-back
  input  logic [31:0]         glob_word_i,
  input  logic [31:0]         mode_word_i   [NUM_ISLANDS],
  input  logic [31:0]         status_word_i [NUM_ISLANDS],
  input  logic [31:0]         ctrl_word_i   [NUM_ISLANDS],
  input  lut_entry_t          lut_rdata_i   [NUM_ISLANDS],
  input  logic [VBBID_W-1:0]  fbb_rdata_i   [NUM_ISLANDS]
);

  typedef enum logic [2:0] {
    T_NONE, T_GLOBAL, T_CONFIG, T_MODE, T_STATUS, T_CTRL, T_LUT, T_FBB
  } target_e;

  logic    access;
  target_e target;
  int      isl;
  logic    ro;

  assign access  = psel && penable;
  assign pready  = 1'b1;
  assign wdata_o = pwdata;

  always_comb begin
    lut_wdata_o.vddid    = pwdata[VDDID_W-1:0];
    lut_wdata_o.vdd_keep = pwdata[6];
    lut_wdata_o.vbbid    = pwdata[8 +: VBBID_W];
    lut_wdata_o.vbb_keep = pwdata[12];
    lut_wdata_o.clksp    = pwdata[16];
    lut_wdata_o.cktsp    = pwdata[17];
  end

  // Address decode.
  always_comb begin
    target = T_NONE;
    isl    = 0;
    idx_o  = paddr[9:2];
    ro     = 1'b0;
    unique case (paddr[15:14])
      2'b00: begin
        if (paddr[13:8] == 6'd0) begin
          if (paddr[7:0] == 8'h00) target = T_GLOBAL;
          else if (paddr[7:0] == 8'h04) begin target = T_CONFIG; ro = 1'b1; end
        end else if (paddr[13:8] == 6'd1) begin
          isl = int'(paddr[7:4]);
          unique case (paddr[3:0])
            4'h0: target = T_MODE;
            4'h4: begin target = T_STATUS; ro = 1'b1; end
            4'h8: begin target = T_CTRL;   ro = 1'b1; end
            default: target = T_NONE;
          endcase
        end
      end
      2'b01: begin
        isl = int'(paddr[13:10]);
        if (int'(paddr[9:2]) < LUT_DEPTH) target = T_LUT;
      end
      2'b10: begin
        isl = int'(paddr[13:10]);
        if (BODY_BIAS && int'(paddr[9:2]) < FBB_DEPTH) target = T_FBB;
      end
      default: target = T_NONE;
    endcase
    if (target inside {T_MODE, T_STATUS, T_CTRL, T_LUT, T_FBB} && isl >= NUM_ISLANDS)
      target = T_NONE;
    if (paddr[1:0] != 2'b00) target = T_NONE;
    island_o = ISL_W'(isl);
  end

  assign pslverr   = access && ((target == T_NONE) || (pwrite && ro));
  assign glob_we_o = access && pwrite && (target == T_GLOBAL);
  assign mode_we_o = access && pwrite && (target == T_MODE);
  assign lut_we_o  = access && pwrite && (target == T_LUT);
  assign fbb_we_o  = access && pwrite && (target == T_FBB);

  // Read data.
  always_comb begin
    prdata = '0;
    if (access && !pwrite) begin
      unique case (target)
        T_GLOBAL: prdata = glob_word_i;
        T_CONFIG: prdata = {7'd0, BODY_BIAS, 8'(NUM_TSTEPS), 8'(NUM_LEVELS), 8'(NUM_ISLANDS)};
        T_MODE:   prdata = mode_word_i[island_o];
        T_STATUS: prdata = status_word_i[island_o];
        T_CTRL:   prdata = ctrl_word_i[island_o];
        T_LUT: begin
          prdata[VDDID_W-1:0]  = lut_rdata_i[island_o].vddid;
          prdata[6]            = lut_rdata_i[island_o].vdd_keep;
          prdata[8 +: VBBID_W] = lut_rdata_i[island_o].vbbid;
          prdata[12]           = lut_rdata_i[island_o].vbb_keep;
          prdata[16]           = lut_rdata_i[island_o].clksp;
          prdata[17]           = lut_rdata_i[island_o].cktsp;
        end
        T_FBB:    prdata[VBBID_W-1:0] = fbb_rdata_i[island_o];
        default:  prdata = '0;
      endcase
    end
  end

  // APB handshake rules.
  a_enable_needs_select: assert property (@(posedge clk) disable iff (!rst_n)
    penable |-> psel);
  a_setup_then_access: assert property (@(posedge clk) disable iff (!rst_n)
    (psel && !penable) |=> (psel && penable));
  a_stable_in_access: assert property (@(posedge clk) disable iff (!rst_n)
    (psel && !penable) |=> ($stable(paddr) && $stable(pwrite) && $stable(pwdata)));

  initial begin
    assert (NUM_ISLANDS >= 1 && NUM_ISLANDS <= 16)
      else $error("ctapm_bus_if: the address map holds 1 to 16 islands");
    assert (LUT_DEPTH <= 256 && FBB_DEPTH <= 256)
      else $error("ctapm_bus_if: a table does not fit its 1 KiB window");
  end

endmodule
