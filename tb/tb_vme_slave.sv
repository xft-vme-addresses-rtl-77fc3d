// tb_vme_slave: a VME master model runs A32/D32 write and read cycles
// against the slave, whose local bus side is answered by a small register
// array in the testbench. Checks: one local request per cycle with the right
// address, direction and data; read data on the VME data lines with DTACK*;
// DTACK* released after the strobes; the strobe-to-DTACK* latency; and that a
// cycle for another board or with a non-A32 address modifier gets no answer.
module tb_vme_slave;
  import xft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #6.25ns clk = ~clk;   // 80 MHz

  int checks = 0, failures = 0;

  logic        as_n, write_n, data_oe, dtack_n;
  logic [1:0]  ds_n;
  logic [5:0]  am;
  logic [31:0] addr, din, dout;
  lb_req_t     req;
  lb_rsp_t     rsp;
  localparam logic [7:0] BASE = 8'h5a;

  vme_slave u_dut (
    .clk(clk), .rst_n(rst_n), .board_base(BASE),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_am(am),
    .vme_addr(addr), .vme_data_in(din), .vme_data_out(dout), .vme_data_oe(data_oe),
    .vme_dtack_n(dtack_n), .bus_req(req), .bus_rsp(rsp));

  // local bus responder
  logic [31:0] regs [16];
  int n_req = 0;
  logic [23:0] last_addr;
  always_ff @(posedge clk) begin
    rsp <= '{ack: req.req, rdata: (req.req && !req.we) ? regs[req.addr[5:2]] : 32'h0};
    if (req.req) begin
      n_req++;
      last_addr <= req.addr;
      if (req.we) regs[req.addr[5:2]] <= req.wdata;
    end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One VME cycle; returns whether DTACK* came, the read data and the latency
  // in clocks from data strobe to DTACK*.
  task automatic vme_cycle(input logic [31:0] a, input logic [5:0] m, input bit wr,
                           input logic [31:0] wd, output bit acked,
                           output logic [31:0] rd, output int lat);
    addr = a; am = m; write_n = !wr; din = wd;
    #20ns as_n = 1'b0;
    #10ns ds_n = 2'b00;
    lat = 0; acked = 0;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #1ns;
      lat++;
      if (!dtack_n) begin acked = 1; break; end
    end
    rd = dout;
    if (acked && !wr) check("data_oe on read", 32'(data_oe), 32'd1);
    #10ns ds_n = 2'b11; as_n = 1'b1;
    repeat (4) @(posedge clk);
    #1ns;
    check("dtack released", 32'(dtack_n), 32'd1);
    check("data_oe released", 32'(data_oe), 32'd0);
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit acked;
    logic [31:0] rd, v [16];
    int lat, nr;
    as_n = 1; ds_n = 2'b11; write_n = 1; am = 6'h09; addr = 0; din = 0;
    for (int i = 0; i < 16; i++) regs[i] = 0;
    #30ns rst_n = 1'b1;
    #20ns;

    for (int i = 0; i < 16; i++) begin
      v[i] = $urandom();
      nr = n_req;
      vme_cycle({BASE, 18'h0, 4'(i), 2'b00}, (i % 2) ? 6'h0D : 6'h09, 1'b1, v[i], acked, rd, lat);
      check("write acked", 32'(acked), 32'd1);
      check("one request per write", 32'(n_req - nr), 32'd1);
      check("write address", 32'(last_addr), {8'h0, 18'h0, 4'(i), 2'b00});
      check("latency", 32'(lat), 32'd5);
    end
    for (int i = 15; i >= 0; i--) begin
      nr = n_req;
      vme_cycle({BASE, 18'h0, 4'(i), 2'b00}, 6'h0A, 1'b0, 32'h0, acked, rd, lat);
      check("read acked", 32'(acked), 32'd1);
      check("read data", rd, v[i]);
      check("one request per read", 32'(n_req - nr), 32'd1);
    end
    // another board's address: no answer, no request
    nr = n_req;
    vme_cycle({8'h5b, 24'h000004}, 6'h09, 1'b1, 32'h1234, acked, rd, lat);
    check("other board ignored", 32'(acked), 32'd0);
    check("no request for other board", 32'(n_req - nr), 32'd0);
    // A24 address modifier: ignored
    vme_cycle({BASE, 24'h000004}, 6'h39, 1'b1, 32'h1234, acked, rd, lat);
    check("A24 cycle ignored", 32'(acked), 32'd0);
    check("no request for A24", 32'(n_req - nr), 32'd0);
    check("register untouched", regs[1], v[1]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
