// daq_channel_buffer: the DAQ readout store of one input channel of a DataIO
// FPGA: NBUF buffers of DEPTH 32-bit words, each with its word count.
//
// Write side (the channel's data path): wr_start empties buffer wr_buf; each
// wr_valid then appends wr_data to that buffer at the position given by its
// word count, which counts up. wr_start and wr_valid in the same cycle start
// the buffer with that word. A full buffer ignores further words. When enable
// is low the channel stores nothing (its counts keep their values).
// Read side (VME): rd_en with rd_buf/rd_word reads one word; rd_data is valid
// the next clock (synchronous RAM). wc[b] is buffer b's word count, readable
// at any time.
//
// Four buffers per channel, 0x200 bytes (128 long words) of RAM per buffer and
// a word count register per buffer and channel follow the XFT DAQ readout map,
// as does the channel enable. How a buffer is filled (start strobe, append at
// the count, stop when full) is this design's own choice. soft_rst clears the
// word counts; RAM contents are not cleared.
module daq_channel_buffer #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned NBUF  = 4,
  parameter int unsigned DW    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     soft_rst,
  input  logic                     enable,
  input  logic                     wr_start,
  input  logic                     wr_valid,
  input  logic [$clog2(NBUF)-1:0]  wr_buf,
  input  logic [DW-1:0]            wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(NBUF)-1:0]  rd_buf,
  input  logic [$clog2(DEPTH)-1:0] rd_word,
  output logic [DW-1:0]            rd_data,
  output logic [$clog2(DEPTH+1)-1:0] wc [NBUF]
);

  localparam int unsigned BW = $clog2(NBUF);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DW-1:0] mem [NBUF * DEPTH];
  logic [CW-1:0] base_cnt;     // count the write lands on
  logic          do_wr;

  assign base_cnt = wr_start ? '0 : wc[wr_buf];
  assign do_wr    = enable && wr_valid && (base_cnt < CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBUF; b++) wc[b] <= '0;
    end else if (soft_rst) begin
      for (int b = 0; b < NBUF; b++) wc[b] <= '0;
    end else if (enable) begin
      if (do_wr)         wc[wr_buf] <= base_cnt + 1'b1;
      else if (wr_start) wc[wr_buf] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[{wr_buf, base_cnt[AW-1:0]}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_buf, rd_word}];
  end

  initial assert (DEPTH == (1 << AW) && NBUF == (1 << BW))
    else $error("DEPTH and NBUF must be powers of two");

endmodule
