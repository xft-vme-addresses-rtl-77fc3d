// board_addr_decoder: steers a local bus request to the FPGA that owns its
// address and merges the answers.
//
// The board-local address (A23:0) is decoded by xft_pkg::decode_addr:
//   YY000000..YY0000FC  Control FPGA registers       YY100000..YY10007C IDPROM
//   YY080000..YY0800FC  DataIO 1 registers           YY0C0000..  DataIO 2
//   YY080800..YY080BFC  DataIO 1 word counts         YY0C0800..  DataIO 2
//   YY(8..B)80000..     DataIO 1 readout RAM         YY(8..B)C0000.. DataIO 2
// The request goes on to exactly one FPGA port with its space tag filled in;
// the others see req low. An address nobody owns is acknowledged by the
// decoder itself one clock later with read data zero, so a VME cycle never
// hangs. All targets answer exactly one clock after the request, so the
// responses are simply OR-ed.
//
// The address map is the XFT register map's; acknowledging unowned addresses
// with zero (rather than a VME bus error) is this design's own choice.
module board_addr_decoder
  import xft_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  lb_req_t host_req,
  output lb_rsp_t host_rsp,
  output lb_req_t ctrl_req,
  input  lb_rsp_t ctrl_rsp,
  output lb_req_t dio1_req,
  input  lb_rsp_t dio1_rsp,
  output lb_req_t dio2_req,
  input  lb_rsp_t dio2_rsp
);

  decode_t dec;
  lb_req_t fwd;
  logic    miss_ack;

  assign dec = decode_addr(host_req.addr);

  always_comb begin
    fwd       = host_req;
    fwd.space = dec.space;
    ctrl_req     = fwd;
    dio1_req     = fwd;
    dio2_req     = fwd;
    ctrl_req.req = host_req.req && dec.target == TGT_CTRL;
    dio1_req.req = host_req.req && dec.target == TGT_DIO1;
    dio2_req.req = host_req.req && dec.target == TGT_DIO2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss_ack <= 1'b0;
    else        miss_ack <= host_req.req && dec.target == TGT_NONE;
  end

  assign host_rsp.ack   = ctrl_rsp.ack | dio1_rsp.ack | dio2_rsp.ack | miss_ack;
  assign host_rsp.rdata = ctrl_rsp.rdata | dio1_rsp.rdata | dio2_rsp.rdata;

  // Exactly one target answers a request.
  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl_rsp.ack, dio1_rsp.ack, dio2_rsp.ack, miss_ack}));

endmodule
