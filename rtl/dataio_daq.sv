// dataio_daq: DAQ readout of one DataIO FPGA: six channel buffers (two
// mezzanine cards of three channels) and their VME readout.
//
// VME view, relative to the board base (XX = A31:24, F = 8 for DataIO 1 and
// C for DataIO 2):
//   word count  XX0F0800 + 0x100*buffer + 4*channel   channel 0..5 =
//               mezzanine 1 channels 1-3, mezzanine 2 channels 1-3
//   RAM         XX(8+buffer)F0000 + 0x800*(mezz-1) + 0x200*(ch-1) + 4*word
// so A21:20 pick the buffer, A11 the mezzanine, A10:9 the channel and A8:2
// the word of a RAM read; A9:8 the buffer and A4:2 the channel of a word count
// read. The request (lb_req_t, already qualified as SP_WC or SP_RAM for this
// FPGA) is answered one clock later, with the RAM's registered output or the
// registered word count. Writes are acknowledged and ignored: both windows are
// read-only. chan_en[5:0] are the channel enables of control register 1
// (bit n enables channel n above).
//
// The address layout, the six channels, four buffers, 128-word buffers and
// the enable bits follow the XFT readout map. The fill interface (a buffer
// number shared by all channels, and per-channel start, valid and data) is
// this design's own.
module dataio_daq
  import xft_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH,
  parameter int unsigned NBUF  = N_BUF,
  parameter int unsigned NCH   = N_CHAN
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    soft_rst,
  input  logic [NCH-1:0]          chan_en,
  input  logic [$clog2(NBUF)-1:0] wr_buf,
  input  logic [NCH-1:0]          wr_start,
  input  logic [NCH-1:0]          wr_valid,
  input  logic [31:0]             wr_data [NCH],
  input  lb_req_t                 bus_req,
  output lb_rsp_t                 bus_rsp
);

  localparam int unsigned BW = $clog2(NBUF);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [31:0]   rd_data [NCH];
  logic [CW-1:0] wc      [NCH][NBUF];

  // RAM address fields
  logic [2:0]    ram_ch;
  logic [BW-1:0] ram_buf;
  logic [AW-1:0] ram_word;
  logic          ram_rd;
  assign ram_ch   = bus_req.addr[11] ? 3'(N_CH_PER_MEZZ) + 3'(bus_req.addr[10:9])
                                     : 3'(bus_req.addr[10:9]);
  assign ram_buf  = bus_req.addr[20 +: BW];
  assign ram_word = bus_req.addr[2 +: AW];
  assign ram_rd   = bus_req.req && !bus_req.we && bus_req.space == SP_RAM;

  // word count address fields
  logic [2:0]    wc_ch;
  logic [BW-1:0] wc_buf;
  assign wc_ch  = bus_req.addr[4:2];
  assign wc_buf = bus_req.addr[8 +: BW];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    daq_channel_buffer #(.DEPTH(DEPTH), .NBUF(NBUF), .DW(32)) u_buf (
      .clk      (clk),
      .rst_n    (rst_n),
      .soft_rst (soft_rst),
      .enable   (chan_en[c]),
      .wr_start (wr_start[c]),
      .wr_valid (wr_valid[c]),
      .wr_buf   (wr_buf),
      .wr_data  (wr_data[c]),
      .rd_en    (ram_rd && ram_ch == 3'(c)),
      .rd_buf   (ram_buf),
      .rd_word  (ram_word),
      .rd_data  (rd_data[c]),
      .wc       (wc[c])
    );
  end

  // response, one clock after the request
  logic          ram_rd_q;
  logic [2:0]    ram_ch_q;
  logic [31:0]   wc_q;
  logic          ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q    <= 1'b0;
      ram_rd_q <= 1'b0;
      ram_ch_q <= '0;
      wc_q     <= '0;
    end else begin
      ack_q    <= bus_req.req;
      ram_rd_q <= ram_rd;
      ram_ch_q <= ram_ch;
      wc_q     <= '0;
      if (bus_req.req && !bus_req.we && bus_req.space == SP_WC && wc_ch < 3'(NCH))
        wc_q <= 32'(wc[wc_ch][wc_buf]);
    end
  end

  always_comb begin
    bus_rsp.ack   = ack_q;
    bus_rsp.rdata = wc_q;
    if (ram_rd_q && ram_ch_q < 3'(NCH)) bus_rsp.rdata = rd_data[ram_ch_q];
  end

endmodule
