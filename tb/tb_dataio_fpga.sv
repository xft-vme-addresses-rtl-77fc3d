// tb_dataio_fpga: exercises one DataIO FPGA through its local bus port.
// Checks the register values, that all channels are disabled at power-up
// (control register 1 = 0, nothing stored), that the enable bits of control
// register 1 select channels individually, read-back of stored words and word
// counts at the readout map's addresses, and that the reset register clears
// the word counts while control register 1 keeps its value.
module tb_dataio_fpga;
  import xft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  lb_req_t     req;
  lb_rsp_t     rsp;
  logic [1:0]  wr_buf;
  logic [5:0]  wr_start, wr_valid, chan_en;
  logic [31:0] wr_data [6];
  logic [31:0] c2, c3, sw;
  logic        srst, p1;

  dataio_fpga u_dut (
    .clk(clk), .rst_n(rst_n), .bus_req(req), .bus_rsp(rsp),
    .wr_buf(wr_buf), .wr_start(wr_start), .wr_valid(wr_valid), .wr_data(wr_data),
    .chan_en(chan_en), .ctrl2(c2), .ctrl3(c3), .daq_sw_version(sw),
    .soft_rst(srst), .pulse1(p1));

  localparam logic [11:0] CH_OFF [6] = '{12'h000, 12'h200, 12'h400, 12'h800, 12'hA00, 12'hC00};

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

  // every channel writes n words into buffer b
  task automatic fill(input int b, input int n, input logic [31:0] tag);
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      wr_buf = 2'(b);
      wr_start = (w == 0) ? '1 : '0;
      wr_valid = '1;
      for (int c = 0; c < 6; c++) wr_data[c] = tag + 32'(c * 256 + w);
    end
    @(negedge clk);
    wr_start = '0; wr_valid = '0;
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
    req = '0; wr_buf = '0; wr_start = '0; wr_valid = '0;
    for (int c = 0; c < 6; c++) wr_data[c] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    bus(SP_REG, 0, 24'h080000, 0, d); check("fw version", d, 32'h0d50_9190);
    bus(SP_REG, 0, 24'h080020, 0, d); check("status2", d, 32'h0000_0cdf);
    bus(SP_REG, 0, 24'h08000C, 0, d); check("ctrl1 power-up", d, 32'h0);
    check("channels disabled", 32'(chan_en), 32'h0);

    fill(0, 10, 32'h1000_0000);
    for (int c = 0; c < 6; c++) begin
      bus(SP_WC, 0, 24'h080800 + 24'(4 * c), 0, d);
      check("nothing stored while disabled", d, 32'h0);
    end

    // enable mezzanine 1 channel 2 and mezzanine 2 channel 3
    bus(SP_REG, 1, 24'h08000C, 32'h0000_0022, d);
    check("chan_en", 32'(chan_en), 32'h22);
    fill(3, 9, 32'h3000_0000);
    for (int c = 0; c < 6; c++) begin
      bus(SP_WC, 0, 24'h080B00 + 24'(4 * c), 0, d);
      check($sformatf("word count ch%0d", c), d, (c == 1 || c == 5) ? 32'd9 : 32'd0);
    end
    for (int w = 0; w < 9; w++) begin
      bus(SP_RAM, 0, {8'hB8, 4'h0, CH_OFF[1] + 12'(4 * w)}, 0, d);
      check("ram mezz1 ch2", d, 32'h3000_0000 + 32'(256 + w));
      bus(SP_RAM, 0, {8'hB8, 4'h0, CH_OFF[5] + 12'(4 * w)}, 0, d);
      check("ram mezz2 ch3", d, 32'h3000_0000 + 32'(5 * 256 + w));
    end

    // reset register: counts cleared, enables kept
    bus(SP_REG, 1, 24'h080004, 0, d);
    repeat (6) @(negedge clk);
    bus(SP_WC, 0, 24'h080B04, 0, d); check("word count after reset", d, 32'h0);
    bus(SP_REG, 0, 24'h08000C, 0, d); check("ctrl1 kept", d, 32'h22);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
