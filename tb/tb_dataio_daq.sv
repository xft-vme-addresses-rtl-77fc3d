// tb_dataio_daq: fills the six channels' buffers of one DataIO readout with
// known data (different lengths per channel and buffer), with one channel
// disabled, then reads every word count and every stored word through the
// local bus at the VME addresses of the readout map, checking data, the
// one-clock acknowledge and that a write to the windows changes nothing.
module tb_dataio_daq;
  import xft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [5:0]  chan_en, wr_start, wr_valid;
  logic [1:0]  wr_buf;
  logic [31:0] wr_data [6];
  lb_req_t     req;
  lb_rsp_t     rsp;

  dataio_daq u_dut (
    .clk(clk), .rst_n(rst_n), .soft_rst(1'b0), .chan_en(chan_en), .wr_buf(wr_buf),
    .wr_start(wr_start), .wr_valid(wr_valid), .wr_data(wr_data),
    .bus_req(req), .bus_rsp(rsp));

  // channel offsets inside a RAM window, from the readout map
  localparam logic [11:0] CH_OFF [6] = '{12'h000, 12'h200, 12'h400, 12'h800, 12'hA00, 12'hC00};
  localparam logic [3:0]  F = 4'h8;   // DataIO 1 addresses

  function automatic logic [31:0] pattern(input int ch, input int b, input int w);
    return {8'(ch), 8'(b), 16'(w)} ^ 32'h5a00_0000;
  endfunction
  function automatic int nwords(input int ch, input int b);
    return ((ch * 37 + b * 53) % 128) + 1;
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic bus(input space_e sp, input bit we, input logic [23:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{req: 1'b1, we: we, addr: a, wdata: 32'hdead_0000, space: sp};
    @(negedge clk);
    req.req = 1'b0;
    check("ack", 32'(rsp.ack), 32'd1);
    d = rsp.rdata;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int exp_n;
    req = '0; chan_en = 6'b111011; wr_start = '0; wr_valid = '0; wr_buf = '0;
    for (int c = 0; c < 6; c++) wr_data[c] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    // fill: all channels in parallel, one buffer after the other
    for (int b = 0; b < 4; b++) begin
      for (int w = 0; w < 128; w++) begin
        @(negedge clk);
        wr_buf = 2'(b);
        for (int c = 0; c < 6; c++) begin
          wr_start[c] = (w == 0);
          wr_valid[c] = (w < nwords(c, b));
          wr_data[c]  = pattern(c, b, w);
        end
      end
    end
    @(negedge clk); wr_valid = '0; wr_start = '0;

    // writes to the read-only windows are acknowledged and ignored
    bus(SP_WC, 1'b1, {4'h0, F, 16'h0800}, d);
    bus(SP_RAM, 1'b1, {4'h8, F, 16'h0000}, d);

    for (int b = 0; b < 4; b++) begin
      for (int c = 0; c < 6; c++) begin
        exp_n = chan_en[c] ? nwords(c, b) : 0;
        bus(SP_WC, 1'b0, {4'h0, F, 4'h0, 12'h800 + 12'(b * 'h100) + 12'(c * 4)}, d);
        check($sformatf("word count ch%0d buf%0d", c, b), d, 32'(exp_n));
        for (int w = 0; w < exp_n; w++) begin
          bus(SP_RAM, 1'b0, {4'(8 + b), F, 4'h0, CH_OFF[c] + 12'(4 * w)}, d);
          check($sformatf("ram ch%0d buf%0d w%0d", c, b, w), d, pattern(c, b, w));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
