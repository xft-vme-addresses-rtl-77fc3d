// fpga_regs: the VME register block found in every FPGA of the XFT board.
//
// Offsets (bytes from the FPGA base):
//   0x00 R   firmware version (parameter FW_VERSION)
//   0x04 W   reset: any write starts a RESET_CYCLES-long soft_rst pulse
//   0x08 R/W DAQ software version, power-up 0
//   0x0C R/W control register 1 (CTRL1_INIT)
//   0x10 R   status register 1, fixed 0x00c0ffee
//   0x14 W   pulse 1: any write gives a one-cycle pulse1 strobe
//   0x18 R/W control register 2 (CTRL2_INIT)
//   0x1C R/W control register 3 (CTRL3_INIT)
//   0x20 R   status register 2 (parameter STATUS2)
//   0x24 R   state register 1 (input state1), only if HAS_STATE
//   0x28 R   state register 2 (input state2), only if HAS_STATE
// Control register 1 keeps only the bits set in CTRL1_MASK (the Control
// FPGA's bunch count shift has data bits 7:0); the others read as zero.
// Any other offset reads as zero and ignores writes; a write to a read-only
// register is ignored. The request arrives as a one-cycle lb_req_t strobe that
// the board decoder has already qualified (space SP_REG and this FPGA); the
// response (ack and read data) is registered and comes exactly one clock later.
//
// Offsets, fixed values, power-up values and the 8 data bits of the Control
// FPGA's control register 1 follow the XFT register map; the other control
// registers keep all 32 bits and the FPGA uses the fields it needs.
// Two points are this design's own: the soft reset pulse length, and that the
// soft reset leaves this register file alone (it clears the FPGA's data path,
// so values written by software survive it). rst_n is the power-up reset.
module fpga_regs
  import xft_pkg::*;
#(
  parameter logic [31:0] FW_VERSION   = FW_VERSION_DATAIO,
  parameter logic [31:0] STATUS2      = STATUS2_DATAIO,
  parameter logic [31:0] CTRL1_INIT   = CTRL_INIT_ZERO,
  parameter logic [31:0] CTRL2_INIT   = CTRL_INIT_ZERO,
  parameter logic [31:0] CTRL3_INIT   = CTRL_INIT_ZERO,
  parameter logic [31:0] CTRL1_MASK   = 32'hFFFF_FFFF,   // implemented bits of ctrl1
  parameter bit          HAS_STATE    = 1'b0,
  parameter int unsigned RESET_CYCLES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  lb_req_t     bus_req,     // req already qualified for this block
  output lb_rsp_t     bus_rsp,
  input  logic [31:0] state1,
  input  logic [31:0] state2,
  output logic [31:0] daq_sw_version,
  output logic [31:0] ctrl1,
  output logic [31:0] ctrl2,
  output logic [31:0] ctrl3,
  output logic        soft_rst,    // active-high, RESET_CYCLES long
  output logic        pulse1
);

  localparam int unsigned RCW = $clog2(RESET_CYCLES + 1);

  logic [7:0]     off;
  logic           wr, rd;
  logic [RCW-1:0] rst_cnt;
  logic [31:0]    rdata_c;

  assign off = bus_req.addr[7:0];
  assign wr  = bus_req.req &&  bus_req.we;
  assign rd  = bus_req.req && !bus_req.we;

  always_comb begin
    rdata_c = 32'h0;
    unique case (off)
      REG_FW_VERSION: rdata_c = FW_VERSION;
      REG_DAQ_SW:     rdata_c = daq_sw_version;
      REG_CTRL1:      rdata_c = ctrl1;
      REG_STATUS1:    rdata_c = STATUS1_VALUE;
      REG_CTRL2:      rdata_c = ctrl2;
      REG_CTRL3:      rdata_c = ctrl3;
      REG_STATUS2:    rdata_c = STATUS2;
      REG_STATE1:     rdata_c = HAS_STATE ? state1 : 32'h0;
      REG_STATE2:     rdata_c = HAS_STATE ? state2 : 32'h0;
      default:        rdata_c = 32'h0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      daq_sw_version <= 32'h0;
      ctrl1          <= CTRL1_INIT & CTRL1_MASK;
      ctrl2          <= CTRL2_INIT;
      ctrl3          <= CTRL3_INIT;
      pulse1         <= 1'b0;
      rst_cnt        <= '0;
      bus_rsp        <= LB_RSP_IDLE;
    end else begin
      pulse1  <= 1'b0;
      bus_rsp <= '{ack: bus_req.req, rdata: rd ? rdata_c : 32'h0};
      if (rst_cnt != '0) rst_cnt <= rst_cnt - 1'b1;
      if (wr) begin
        unique case (off)
          REG_RESET:  rst_cnt        <= RCW'(RESET_CYCLES);
          REG_DAQ_SW: daq_sw_version <= bus_req.wdata;
          REG_CTRL1:  ctrl1          <= bus_req.wdata & CTRL1_MASK;
          REG_PULSE1: pulse1         <= 1'b1;
          REG_CTRL2:  ctrl2          <= bus_req.wdata;
          REG_CTRL3:  ctrl3          <= bus_req.wdata;
          default: ;
        endcase
      end
    end
  end

  assign soft_rst = (rst_cnt != '0);

endmodule
