// tb_fpga_regs: self-checking test of the per-FPGA register block, in its
// DataIO configuration (defaults) and its Control FPGA configuration.
// Checks fixed read values, power-up values, read/write registers, ignored
// writes to read-only registers, the state registers, the reset pulse length,
// the pulse strobe and the one-clock acknowledge latency.
module tb_fpga_regs;
  import xft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  lb_req_t req_d, req_c;
  lb_rsp_t rsp_d, rsp_c;
  logic [31:0] sw_d, c1_d, c2_d, c3_d, sw_c, c1_c, c2_c, c3_c;
  logic srst_d, p1_d, srst_c, p1_c;
  logic [31:0] st1, st2;

  fpga_regs u_dut_d (
    .clk(clk), .rst_n(rst_n), .bus_req(req_d), .bus_rsp(rsp_d),
    .state1(32'h1111_1111), .state2(32'h2222_2222),
    .daq_sw_version(sw_d), .ctrl1(c1_d), .ctrl2(c2_d), .ctrl3(c3_d),
    .soft_rst(srst_d), .pulse1(p1_d));

  fpga_regs #(
    .FW_VERSION(FW_VERSION_CTRL), .STATUS2(STATUS2_CTRL),
    .CTRL1_INIT(CTRL1_INIT_CTRL), .CTRL2_INIT(CTRL2_INIT_CTRL),
    .CTRL3_INIT(CTRL3_INIT_CTRL), .CTRL1_MASK(CTRL1_MASK_CTRL), .HAS_STATE(1'b1)
  ) u_dut_c (
    .clk(clk), .rst_n(rst_n), .bus_req(req_c), .bus_rsp(rsp_c),
    .state1(st1), .state2(st2),
    .daq_sw_version(sw_c), .ctrl1(c1_c), .ctrl2(c2_c), .ctrl3(c3_c),
    .soft_rst(srst_c), .pulse1(p1_c));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One access on either instance (sel 0 = DataIO, 1 = Control).
  task automatic access(input bit sel, input bit we, input logic [7:0] off,
                        input logic [31:0] wd, output logic [31:0] rd);
    lb_req_t r;
    r = '{req: 1'b1, we: we, addr: {16'h0, off}, wdata: wd, space: SP_REG};
    @(negedge clk);
    if (sel) req_c = r; else req_d = r;
    @(negedge clk);
    req_c.req = 1'b0; req_d.req = 1'b0;
    check("ack one clock after req", 32'(sel ? rsp_c.ack : rsp_d.ack), 32'd1);
    rd = sel ? rsp_c.rdata : rsp_d.rdata;
    @(negedge clk);
    check("ack lasts one clock", 32'(sel ? rsp_c.ack : rsp_d.ack), 32'd0);
  endtask

  task automatic rd_chk(input bit sel, input logic [7:0] off, input logic [31:0] exp, input string what);
    logic [31:0] d;
    access(sel, 1'b0, off, 32'h0, d);
    check(what, d, exp);
  endtask

  task automatic wr(input bit sel, input logic [7:0] off, input logic [31:0] v);
    logic [31:0] d;
    access(sel, 1'b1, off, v, d);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rst_len;
    logic [31:0] saved;
    req_d = '0; req_c = '0;
    st1 = 32'h0abc_1234; st2 = 32'h0fed_4321;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // fixed values and power-up values, DataIO
    rd_chk(0, REG_FW_VERSION, 32'h0d50_9190, "dio fw version");
    rd_chk(0, REG_DAQ_SW,     32'h0,         "dio daq sw power-up");
    rd_chk(0, REG_CTRL1,      32'h0,         "dio ctrl1 power-up");
    rd_chk(0, REG_STATUS1,    32'h00c0_ffee, "dio status1");
    rd_chk(0, REG_CTRL2,      32'h0,         "dio ctrl2 power-up");
    rd_chk(0, REG_CTRL3,      32'h0,         "dio ctrl3 power-up");
    rd_chk(0, REG_STATUS2,    32'h0000_0cdf, "dio status2");
    rd_chk(0, REG_STATE1,     32'h0,         "dio has no state1");
    rd_chk(0, 8'h40,          32'h0,         "dio unmapped offset");
    // Control
    rd_chk(1, REG_FW_VERSION, 32'h0c50_8110, "ctrl fw version");
    rd_chk(1, REG_CTRL1,      32'd41,        "ctrl bunch count shift power-up");
    rd_chk(1, REG_CTRL2,      32'h1,         "ctrl ignore aborts power-up");
    rd_chk(1, REG_CTRL3,      32'h3ff0_0010, "ctrl ctrl3 power-up");
    rd_chk(1, REG_STATUS1,    32'h00c0_ffee, "ctrl status1");
    rd_chk(1, REG_STATUS2,    32'hdead_beef, "ctrl status2");
    rd_chk(1, REG_STATE1,     32'h0abc_1234, "ctrl state1");
    rd_chk(1, REG_STATE2,     32'h0fed_4321, "ctrl state2");
    check("ctrl1 output", c1_c, 32'd41);
    check("ctrl3 output", c3_c, 32'h3ff0_0010);

    // read/write registers
    for (int i = 0; i < 4; i++) begin
      logic [31:0] v;
      v = $urandom();
      wr(0, REG_DAQ_SW, v);     rd_chk(0, REG_DAQ_SW, v, "dio daq sw rw");
      check("dio daq sw out", sw_d, v);
      wr(0, REG_CTRL1, v ^ 32'h5a5a_0000); rd_chk(0, REG_CTRL1, v ^ 32'h5a5a_0000, "dio ctrl1 rw");
      check("dio ctrl1 out", c1_d, v ^ 32'h5a5a_0000);
      wr(1, REG_CTRL2, ~v);     rd_chk(1, REG_CTRL2, ~v, "ctrl ctrl2 rw");
      check("ctrl ctrl2 out", c2_c, ~v);
      wr(1, REG_CTRL3, v + 1);  rd_chk(1, REG_CTRL3, v + 1, "ctrl ctrl3 rw");
      check("ctrl ctrl3 out", c3_c, v + 1);
    end
    // Control FPGA control register 1 holds bits 7:0 only
    wr(1, REG_CTRL1, 32'h1234_5678); rd_chk(1, REG_CTRL1, 32'h0000_0078, "ctrl ctrl1 bits 7:0");
    check("ctrl ctrl1 out", c1_c, 32'h78);
    // read-only registers ignore writes
    wr(0, REG_FW_VERSION, 32'h1234_5678); rd_chk(0, REG_FW_VERSION, 32'h0d50_9190, "fw ro");
    wr(0, REG_STATUS1, 32'h1234_5678);    rd_chk(0, REG_STATUS1, 32'h00c0_ffee, "status1 ro");
    // write data of other registers not disturbed by an unmapped write
    wr(0, 8'h80, 32'hffff_ffff);          rd_chk(0, REG_CTRL1, c1_d, "unmapped write ignored");

    // pulse 1: exactly one cycle
    @(negedge clk);
    req_d = '{req: 1'b1, we: 1'b1, addr: 24'h14, wdata: 32'h0, space: SP_REG};
    @(negedge clk); req_d.req = 1'b0;
    check("pulse1 high", 32'(p1_d), 32'd1);
    @(negedge clk);
    check("pulse1 one clock", 32'(p1_d), 32'd0);

    // reset register: soft reset pulse of 4 clocks, registers kept
    saved = c3_c;
    @(negedge clk);
    req_c = '{req: 1'b1, we: 1'b1, addr: 24'h04, wdata: 32'h0, space: SP_REG};
    @(negedge clk); req_c.req = 1'b0;
    rst_len = 0;
    while (srst_c) begin rst_len++; @(negedge clk); end
    check("soft reset length", 32'(rst_len), 32'd4);
    rd_chk(1, REG_CTRL3, saved, "ctrl3 survives soft reset");
    rd_chk(1, REG_CTRL2, c2_c, "ctrl2 after soft reset");

    // power-up reset restores power-up values
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    rd_chk(1, REG_CTRL1, 32'd41, "ctrl1 after reset");
    rd_chk(1, REG_CTRL2, 32'h1, "ctrl2 after reset");
    rd_chk(0, REG_DAQ_SW, 32'h0, "daq sw after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
