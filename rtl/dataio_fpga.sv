// dataio_fpga: one DataIO FPGA of the XFT board, as seen from VME: its
// register block and its DAQ readout buffers.
//
// The register block (fpga_regs) answers offsets 0x00..0x28 with firmware
// version 0x0d509190, status registers 0x00c0ffee and 0x00000cdf, and all
// control registers powering up to zero. Bits 5:0 of control register 1 are
// the six channel enables of the readout (bit 0 = mezzanine 1 channel 1 ...
// bit 5 = mezzanine 2 channel 3; '1' enables). A write to the reset register
// gives a short soft reset that clears the readout word counts. The request
// comes from the board decoder already tagged with its space (SP_REG, SP_WC or
// SP_RAM) and is answered one clock later; the two sub-blocks' responses are
// OR-ed, since only the addressed one acknowledges.
//
// The register values and the use of control register 1 follow the XFT
// register map; the data input interface is that of dataio_daq.
module dataio_fpga
  import xft_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH,
  parameter int unsigned NBUF  = N_BUF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  lb_req_t                 bus_req,    // qualified for this FPGA
  output lb_rsp_t                 bus_rsp,
  input  logic [$clog2(NBUF)-1:0] wr_buf,
  input  logic [N_CHAN-1:0]       wr_start,
  input  logic [N_CHAN-1:0]       wr_valid,
  input  logic [31:0]             wr_data [N_CHAN],
  output logic [N_CHAN-1:0]       chan_en,
  output logic [31:0]             ctrl2,
  output logic [31:0]             ctrl3,
  output logic [31:0]             daq_sw_version,
  output logic                    soft_rst,
  output logic                    pulse1
);

  lb_req_t     reg_req, daq_req;
  lb_rsp_t     reg_rsp, daq_rsp;
  logic [31:0] ctrl1;

  always_comb begin
    reg_req     = bus_req;
    daq_req     = bus_req;
    reg_req.req = bus_req.req && bus_req.space == SP_REG;
    daq_req.req = bus_req.req && (bus_req.space == SP_WC || bus_req.space == SP_RAM);
  end

  fpga_regs #(
    .FW_VERSION (FW_VERSION_DATAIO),
    .STATUS2    (STATUS2_DATAIO),
    .CTRL1_INIT (CTRL_INIT_ZERO),
    .CTRL2_INIT (CTRL_INIT_ZERO),
    .CTRL3_INIT (CTRL_INIT_ZERO),
    .HAS_STATE  (1'b0)
  ) u_regs (
    .clk            (clk),
    .rst_n          (rst_n),
    .bus_req        (reg_req),
    .bus_rsp        (reg_rsp),
    .state1         (32'h0),
    .state2         (32'h0),
    .daq_sw_version (daq_sw_version),
    .ctrl1          (ctrl1),
    .ctrl2          (ctrl2),
    .ctrl3          (ctrl3),
    .soft_rst       (soft_rst),
    .pulse1         (pulse1)
  );

  assign chan_en = ctrl1[N_CHAN-1:0];

  dataio_daq #(.DEPTH(DEPTH), .NBUF(NBUF), .NCH(N_CHAN)) u_daq (
    .clk      (clk),
    .rst_n    (rst_n),
    .soft_rst (soft_rst),
    .chan_en  (chan_en),
    .wr_buf   (wr_buf),
    .wr_start (wr_start),
    .wr_valid (wr_valid),
    .wr_data  (wr_data),
    .bus_req  (daq_req),
    .bus_rsp  (daq_rsp)
  );

  assign bus_rsp = '{ack: reg_rsp.ack | daq_rsp.ack, rdata: reg_rsp.rdata | daq_rsp.rdata};

endmodule
