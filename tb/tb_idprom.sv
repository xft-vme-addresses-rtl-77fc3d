// tb_idprom: reads all 32 IDPROM long words and compares bits 31:24 with the
// identification string, expected zeros below, acknowledge timing and that a
// write changes nothing.
module tb_idprom;
  import xft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  lb_req_t req;
  lb_rsp_t rsp;

  idprom u_dut (.clk(clk), .rst_n(rst_n), .bus_req(req), .bus_rsp(rsp));

  localparam string ID = "00xx 105 PULSAR XFT RX";

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic read(input logic [23:0] a, output logic [31:0] d, input bit we = 1'b0);
    @(negedge clk);
    req = '{req: 1'b1, we: we, addr: a, wdata: 32'hffff_ffff, space: SP_IDPROM};
    @(negedge clk);
    req.req = 1'b0;
    check("ack after one clock", 32'(rsp.ack), 32'd1);
    d = rsp.rdata;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0]  exp;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // a write is acknowledged and changes nothing
    read(24'h100008, d, 1'b1);
    for (int i = 0; i < 32; i++) begin
      read(24'h100000 + 24'(4 * i), d);
      exp = (i < ID.len()) ? ID[i] : 8'h00;
      check($sformatf("idprom[%0d]", i), d, {exp, 24'h0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
