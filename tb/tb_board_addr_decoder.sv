// tb_board_addr_decoder: sends requests at addresses taken from the XFT
// address map (registers, IDPROM, word counts and RAM windows of every FPGA)
// and at addresses outside it. Simple responders stand in for the FPGAs and
// answer one clock later with a signature, so the test checks which FPGA got
// the request, the space tag it carried, the merged response, and that an
// address nobody owns is still acknowledged, with zero data.
module tb_board_addr_decoder;
  import xft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  lb_req_t host_req, ctrl_req, dio1_req, dio2_req;
  lb_rsp_t host_rsp, ctrl_rsp, dio1_rsp, dio2_rsp;

  board_addr_decoder u_dut (
    .clk(clk), .rst_n(rst_n), .host_req(host_req), .host_rsp(host_rsp),
    .ctrl_req(ctrl_req), .ctrl_rsp(ctrl_rsp), .dio1_req(dio1_req), .dio1_rsp(dio1_rsp),
    .dio2_req(dio2_req), .dio2_rsp(dio2_rsp));

  // responders: signature = {target, space, low address}
  always_ff @(posedge clk) begin
    ctrl_rsp <= '{ack: ctrl_req.req, rdata: ctrl_req.req ? {4'h1, 4'(ctrl_req.space), ctrl_req.addr} : 32'h0};
    dio1_rsp <= '{ack: dio1_req.req, rdata: dio1_req.req ? {4'h2, 4'(dio1_req.space), dio1_req.addr} : 32'h0};
    dio2_rsp <= '{ack: dio2_req.req, rdata: dio2_req.req ? {4'h3, 4'(dio2_req.space), dio2_req.addr} : 32'h0};
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // tgt: 0 none, 1 ctrl, 2 dio1, 3 dio2; sp: space code (1 reg, 2 idprom, 3 wc, 4 ram)
  task automatic probe(input logic [23:0] a, input int tgt, input int sp);
    @(negedge clk);
    host_req = '{req: 1'b1, we: 1'b0, addr: a, wdata: 32'h0, space: SP_NONE};
    @(negedge clk);
    host_req.req = 1'b0;
    check($sformatf("ack for %h", a), 32'(host_rsp.ack), 32'd1);
    check($sformatf("data for %h", a), host_rsp.rdata,
          (tgt == 0) ? 32'h0 : {4'(tgt), 4'(sp), a});
    @(negedge clk);
    check("single ack", 32'(host_rsp.ack), 32'd0);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // register blocks
    probe(24'h000000, 1, 1);  probe(24'h00000C, 1, 1);  probe(24'h000028, 1, 1);
    probe(24'h080000, 2, 1);  probe(24'h080020, 2, 1);
    probe(24'h0C0004, 3, 1);  probe(24'h0C001C, 3, 1);
    // IDPROM
    probe(24'h100000, 1, 2);  probe(24'h10007C, 1, 2);
    // word count registers
    probe(24'h080800, 2, 3);  probe(24'h080B14, 2, 3);  probe(24'h080A0C, 2, 3);
    probe(24'h0C0800, 3, 3);  probe(24'h0C0B14, 3, 3);
    // RAM windows: each buffer, first and last word, both mezzanines
    probe(24'h880000, 2, 4);  probe(24'h8801FC, 2, 4);  probe(24'h980200, 2, 4);
    probe(24'hA805FC, 2, 4);  probe(24'hB80800, 2, 4);  probe(24'h880DFC, 2, 4);
    probe(24'h8C0000, 3, 4);  probe(24'h9C0A00, 3, 4);  probe(24'hBC0DFC, 3, 4);
    // nobody's
    probe(24'h040000, 0, 0);  probe(24'h080C00, 0, 0);  probe(24'h080818, 0, 0);
    probe(24'h100080, 0, 0);  probe(24'h880600, 0, 0);  probe(24'h840000, 0, 0);
    probe(24'hC80000, 0, 0);  probe(24'h200000, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
