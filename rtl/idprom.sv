// idprom: the board's read-only identification PROM, seen by VME at
// YY100000..YY10007C (32 long words) through the Control FPGA.
//
// Each long word carries one ASCII character in bits 31:24 and zeros below,
// spelling the board identification "00xx 105 PULSAR XFT RX" from entry 0;
// the entries after the text read zero. The characters and their places come
// from the XFT register map; using ASCII spaces as separators and zeros
// after the text is this design's own choice.
// The contents are a fixed function (xft_pkg::idprom_char), so the block is a
// small ROM. A read request (lb_req_t, already qualified for SP_IDPROM) is
// answered one clock later with ack and the data; writes are acknowledged and
// ignored.
module idprom
  import xft_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  lb_req_t bus_req,
  output lb_rsp_t bus_rsp
);

  logic [4:0] idx;
  assign idx = bus_req.addr[6:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rsp <= LB_RSP_IDLE;
    end else begin
      bus_rsp.ack   <= bus_req.req;
      bus_rsp.rdata <= (bus_req.req && !bus_req.we) ? {idprom_char(idx), 24'h0} : 32'h0;
    end
  end

endmodule
