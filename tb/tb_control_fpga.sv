// tb_control_fpga: exercises the Control FPGA through its local bus port.
// Checks the power-up register values and the outputs they drive (bunch
// count shift, ignore aborts), the abort gate in both settings, an IDPROM
// read, the state registers while events are counted, an overflow with a
// small word count maximum, the timed clearing of the word counts, and the
// reset register clearing the overflow detection.
module tb_control_fpga;
  import xft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  lb_req_t     req;
  lb_rsp_t     rsp;
  logic        word_sent, event_end, abort_in, abort_out, overflow, ign, srst, p1;
  logic [7:0]  bcs;
  logic [31:0] sw;

  control_fpga u_dut (
    .clk(clk), .rst_n(rst_n), .bus_req(req), .bus_rsp(rsp),
    .word_sent(word_sent), .event_end(event_end), .abort_in(abort_in),
    .abort_out(abort_out), .overflow(overflow), .bc_shift(bcs),
    .ignore_aborts(ign), .daq_sw_version(sw), .soft_rst(srst), .pulse1(p1));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic bus(input space_e sp, input bit we, input logic [23:0] a,
                     input logic [31:0] wd, output logic [31:0] d);
    @(negedge clk);
    req = '{req: 1'b1, we: we, addr: a, wdata: wd, space: sp};
    @(negedge clk);
    req.req = 1'b0;
    check("ack", 32'(rsp.ack), 32'd1);
    d = rsp.rdata;
  endtask

  // send an event of n words, the last word with event_end
  task automatic send_event(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      word_sent = 1'b1;
      event_end = (i == n - 1);
    end
    @(negedge clk);
    word_sent = 1'b0; event_end = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    req = '0; word_sent = 0; event_end = 0; abort_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    bus(SP_REG, 0, 24'h000000, 0, d); check("fw version", d, 32'h0c50_8110);
    bus(SP_REG, 0, 24'h00000C, 0, d); check("bunch count shift", d, 32'd41);
    check("bc_shift out", 32'(bcs), 32'd41);
    bus(SP_REG, 0, 24'h000020, 0, d); check("status2", d, 32'hdead_beef);
    bus(SP_REG, 0, 24'h00001C, 0, d); check("ctrl3 power-up", d, {2'b0, 10'd1023, 20'd16});
    bus(SP_IDPROM, 0, 24'h100024, 0, d); check("idprom P", d, 32'h5000_0000);

    // aborts: ignored after power-up, passed when bit 0 of ctrl2 is cleared
    abort_in = 1'b1; #1;
    check("abort ignored", 32'(abort_out), 32'd0);
    bus(SP_REG, 1, 24'h000018, 32'h0, d);
    #1 check("abort passed", 32'(abort_out), 32'd1);
    check("ignore_aborts out", 32'(ign), 32'd0);
    abort_in = 1'b0;

    // two events with the default delay of 16 ticks: state registers
    send_event(5);
    send_event(7);
    bus(SP_REG, 0, 24'h000024, 0, d);
    check("state1", d, {2'b00, 10'd7, 10'd5, 10'd0});
    bus(SP_REG, 0, 24'h000028, 0, d);
    check("state2", d, {4'b0, 4'b0011, 2'd2, 1'b0, 1'b0, 10'd0, 10'd0});
    repeat (20) @(negedge clk);
    bus(SP_REG, 0, 24'h000024, 0, d);
    check("state1 cleared by timers", d, 32'h0);
    bus(SP_REG, 0, 24'h000028, 0, d);
    check("state2 after timers", d, {4'b0, 4'b0000, 2'd2, 1'b0, 1'b0, 10'd0, 10'd0});

    // maximum 10 words, long delay: overflow
    bus(SP_REG, 1, 24'h00001C, {2'b0, 10'd10, 20'd1000}, d);
    send_event(6);
    check("no overflow at 6", 32'(overflow), 32'd0);
    send_event(6);
    check("overflow at 12", 32'(overflow), 32'd1);
    bus(SP_REG, 0, 24'h000028, 0, d);
    check("state2 overflow", d, {4'b0, 4'b1100, 2'd0, 1'b1, 1'b1, 10'd6, 10'd6});
    // reset register clears the detector
    bus(SP_REG, 1, 24'h000004, 0, d);
    repeat (6) @(negedge clk);
    check("overflow cleared by reset", 32'(overflow), 32'd0);
    bus(SP_REG, 0, 24'h000028, 0, d);
    check("state2 after reset", d, 32'h0);
    bus(SP_REG, 0, 24'h00001C, 0, d);
    check("ctrl3 kept over reset", d, {2'b0, 10'd10, 20'd1000});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
