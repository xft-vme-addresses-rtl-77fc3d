// xft_board: the VME-visible logic of the XFT board: one VME A32/D32 slave
// serving a Control FPGA and two DataIO FPGAs.
//
// A VME cycle whose A31:24 match board_base becomes a single-cycle local bus
// request (vme_slave). board_addr_decoder tags it with the owning FPGA and
// address space; the FPGA answers one clock later and the slave then raises
// DTACK*. The Control FPGA holds the board's control registers, the IDPROM and
// the FILAR overflow detection, fed by word_sent / event_end; the DataIO FPGAs
// each hold six channels of four 128-word readout buffers, filled through the
// dio*_wr_* ports and read through VME together with their word counts.
// All logic runs on one clock (80 MHz in the original, 12.5 ns per overflow
// timer tick); rst_n is the power-up reset. Each FPGA's reset register gives
// that FPGA's data path a soft reset; its register contents survive it.
//
// What the blocks contain follows the XFT register map; the local bus and the
// data input ports are this design's own. In the original the three FPGAs
// are separate chips, here they are instances in one top.
module xft_board
  import xft_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH,
  parameter int unsigned NBUF  = N_BUF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_base,
  // VME bus
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:0] vme_addr,
  input  logic [31:0] vme_data_in,
  output logic [31:0] vme_data_out,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  // Control FPGA
  input  logic        word_sent,
  input  logic        event_end,
  input  logic        abort_in,
  output logic        abort_out,
  output logic        filar_overflow,
  output logic [7:0]  bc_shift,
  // DataIO FPGA 1 readout inputs
  input  logic [$clog2(NBUF)-1:0] dio1_wr_buf,
  input  logic [N_CHAN-1:0]       dio1_wr_start,
  input  logic [N_CHAN-1:0]       dio1_wr_valid,
  input  logic [31:0]             dio1_wr_data [N_CHAN],
  // DataIO FPGA 2 readout inputs
  input  logic [$clog2(NBUF)-1:0] dio2_wr_buf,
  input  logic [N_CHAN-1:0]       dio2_wr_start,
  input  logic [N_CHAN-1:0]       dio2_wr_valid,
  input  logic [31:0]             dio2_wr_data [N_CHAN],
  // per-FPGA soft resets, channel enables and pulse strobes
  output logic [2:0]        fpga_soft_rst,   // {DataIO 2, DataIO 1, Control}
  output logic [2:0]        fpga_pulse1,
  output logic [N_CHAN-1:0] dio1_chan_en,
  output logic [N_CHAN-1:0] dio2_chan_en
);

  lb_req_t host_req, ctrl_req, dio1_req, dio2_req;
  lb_rsp_t host_rsp, ctrl_rsp, dio1_rsp, dio2_rsp;

  // Software-only registers (DAQ SW version, unused control registers) are
  // readable over VME and have no other load here, so those pins stay open.

  vme_slave u_vme (
    .clk          (clk),
    .rst_n        (rst_n),
    .board_base   (board_base),
    .vme_as_n     (vme_as_n),
    .vme_ds_n     (vme_ds_n),
    .vme_write_n  (vme_write_n),
    .vme_am       (vme_am),
    .vme_addr     (vme_addr),
    .vme_data_in  (vme_data_in),
    .vme_data_out (vme_data_out),
    .vme_data_oe  (vme_data_oe),
    .vme_dtack_n  (vme_dtack_n),
    .bus_req      (host_req),
    .bus_rsp      (host_rsp)
  );

  board_addr_decoder u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .host_req (host_req),
    .host_rsp (host_rsp),
    .ctrl_req (ctrl_req),
    .ctrl_rsp (ctrl_rsp),
    .dio1_req (dio1_req),
    .dio1_rsp (dio1_rsp),
    .dio2_req (dio2_req),
    .dio2_rsp (dio2_rsp)
  );

  control_fpga u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .bus_req        (ctrl_req),
    .bus_rsp        (ctrl_rsp),
    .word_sent      (word_sent),
    .event_end      (event_end),
    .abort_in       (abort_in),
    .abort_out      (abort_out),
    .overflow       (filar_overflow),
    .bc_shift       (bc_shift),
    .ignore_aborts  (),
    .daq_sw_version (),
    .soft_rst       (fpga_soft_rst[0]),
    .pulse1         (fpga_pulse1[0])
  );

  dataio_fpga #(.DEPTH(DEPTH), .NBUF(NBUF)) u_dio1 (
    .clk            (clk),
    .rst_n          (rst_n),
    .bus_req        (dio1_req),
    .bus_rsp        (dio1_rsp),
    .wr_buf         (dio1_wr_buf),
    .wr_start       (dio1_wr_start),
    .wr_valid       (dio1_wr_valid),
    .wr_data        (dio1_wr_data),
    .chan_en        (dio1_chan_en),
    .ctrl2          (),
    .ctrl3          (),
    .daq_sw_version (),
    .soft_rst       (fpga_soft_rst[1]),
    .pulse1         (fpga_pulse1[1])
  );

  dataio_fpga #(.DEPTH(DEPTH), .NBUF(NBUF)) u_dio2 (
    .clk            (clk),
    .rst_n          (rst_n),
    .bus_req        (dio2_req),
    .bus_rsp        (dio2_rsp),
    .wr_buf         (dio2_wr_buf),
    .wr_start       (dio2_wr_start),
    .wr_valid       (dio2_wr_valid),
    .wr_data        (dio2_wr_data),
    .chan_en        (dio2_chan_en),
    .ctrl2          (),
    .ctrl3          (),
    .daq_sw_version (),
    .soft_rst       (fpga_soft_rst[2]),
    .pulse1         (fpga_pulse1[2])
  );

endmodule
