// control_fpga: the Control FPGA of the XFT board: its VME register block,
// the identification PROM and the FILAR overflow detection.
//
// Registers (offsets from YY000000): firmware version 0x0c508110; control
// register 1 bits 7:0 = bunch count shift, power-up 41; control register 2
// bit 0 = ignore event aborts, power-up 1; control register 3 bits 19:0 =
// word count clear delay in 12.5 ns ticks (power-up 16) and bits 29:20 = the
// word count maximum (power-up 1023); status registers 0x00c0ffee and
// 0xdeadbeef; state register 1 (0x24) = {2'b00, wc_reg1, wc_reg0, current
// count}; state register 2 (0x28) = {4'b0000, timer enables 3..0, event
// count, total >= max, overflow, wc_reg3, wc_reg2}. The IDPROM answers
// YY100000..YY10007C. A write to the reset register clears the overflow
// detection.
//
// Event aborts: abort_out repeats abort_in unless control register 2 bit 0
// says to ignore aborts. The overflow detection counts word_sent strobes per
// event (see filar_overflow_detection). Requests come tagged by the board
// decoder (SP_REG or SP_IDPROM) and are answered one clock later.
//
// The register layout and power-up values follow the XFT register map; the
// abort gate is this design's simplest reading of "determines if the aborts
// are ignored".
module control_fpga
  import xft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lb_req_t     bus_req,     // qualified for this FPGA
  output lb_rsp_t     bus_rsp,
  input  logic        word_sent,
  input  logic        event_end,
  input  logic        abort_in,
  output logic        abort_out,
  output logic        overflow,
  output logic [7:0]  bc_shift,
  output logic        ignore_aborts,
  output logic [31:0] daq_sw_version,
  output logic        soft_rst,
  output logic        pulse1
);

  lb_req_t     reg_req, prom_req;
  lb_rsp_t     reg_rsp, prom_rsp;
  logic [31:0] ctrl1, ctrl2, ctrl3, state1, state2;

  logic [9:0]  cur_wc;
  logic [9:0]  wc_reg [4];
  logic [3:0]  timer_en;
  logic [1:0]  ev_cnt;
  logic        total_ge_max;

  always_comb begin
    reg_req      = bus_req;
    prom_req     = bus_req;
    reg_req.req  = bus_req.req && bus_req.space == SP_REG;
    prom_req.req = bus_req.req && bus_req.space == SP_IDPROM;
  end

  assign state1 = {2'b00, wc_reg[1], wc_reg[0], cur_wc};
  assign state2 = {4'b0000, timer_en, ev_cnt, total_ge_max, overflow, wc_reg[3], wc_reg[2]};

  fpga_regs #(
    .FW_VERSION (FW_VERSION_CTRL),
    .STATUS2    (STATUS2_CTRL),
    .CTRL1_INIT (CTRL1_INIT_CTRL),
    .CTRL2_INIT (CTRL2_INIT_CTRL),
    .CTRL3_INIT (CTRL3_INIT_CTRL),
    .CTRL1_MASK (CTRL1_MASK_CTRL),
    .HAS_STATE  (1'b1)
  ) u_regs (
    .clk            (clk),
    .rst_n          (rst_n),
    .bus_req        (reg_req),
    .bus_rsp        (reg_rsp),
    .state1         (state1),
    .state2         (state2),
    .daq_sw_version (daq_sw_version),
    .ctrl1          (ctrl1),
    .ctrl2          (ctrl2),
    .ctrl3          (ctrl3),
    .soft_rst       (soft_rst),
    .pulse1         (pulse1)
  );

  idprom u_idprom (
    .clk     (clk),
    .rst_n   (rst_n),
    .bus_req (prom_req),
    .bus_rsp (prom_rsp)
  );

  filar_overflow_detection #(.WC_W(10), .DLY_W(20), .NSLOT(4)) u_ovf (
    .clk          (clk),
    .rst_n        (rst_n),
    .soft_rst     (soft_rst),
    .word_sent    (word_sent),
    .event_end    (event_end),
    .clear_delay  (ctrl3[19:0]),
    .wc_max       (ctrl3[29:20]),
    .cur_wc       (cur_wc),
    .wc_reg       (wc_reg),
    .timer_en     (timer_en),
    .ev_cnt       (ev_cnt),
    .total_ge_max (total_ge_max),
    .overflow     (overflow)
  );

  assign bc_shift      = ctrl1[7:0];
  assign ignore_aborts = ctrl2[0];
  assign abort_out     = abort_in && !ignore_aborts;

  assign bus_rsp = '{ack: reg_rsp.ack | prom_rsp.ack, rdata: reg_rsp.rdata | prom_rsp.rdata};

endmodule
