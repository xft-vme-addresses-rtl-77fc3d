// tb_daq_channel_buffer: random fill and read-back of one channel's four
// readout buffers against a queue model. Checks the word counts every clock,
// the data of random reads one clock after rd_en, that a full buffer (128
// words) drops further words, that a disabled channel stores nothing, and
// that the soft reset clears the counts.
module tb_daq_channel_buffer;

  localparam int DEPTH = 128;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        soft_rst, enable, wr_start, wr_valid, rd_en;
  logic [1:0]  wr_buf, rd_buf;
  logic [6:0]  rd_word;
  logic [31:0] wr_data, rd_data;
  logic [7:0]  wc [4];

  daq_channel_buffer u_dut (
    .clk(clk), .rst_n(rst_n), .soft_rst(soft_rst), .enable(enable),
    .wr_start(wr_start), .wr_valid(wr_valid), .wr_buf(wr_buf), .wr_data(wr_data),
    .rd_en(rd_en), .rd_buf(rd_buf), .rd_word(rd_word), .rd_data(rd_data), .wc(wc));

  logic [31:0] model [4][$];
  int n_full = 0, n_disabled = 0, n_reads = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit          pend;
    logic [31:0] pend_exp;
    soft_rst = 0; enable = 1; wr_start = 0; wr_valid = 0; rd_en = 0;
    wr_buf = 0; rd_buf = 0; rd_word = 0; wr_data = 0;
    pend = 0; pend_exp = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    for (int cyc = 0; cyc < 30000; cyc++) begin
      for (int b = 0; b < 4; b++) check("word count", int'(wc[b]), model[b].size());
      if (pend) begin check("read data", int'(rd_data), int'(pend_exp)); n_reads++; end
      pend = 0;

      // stimulus
      enable   = (cyc % 5000) < 4500;
      wr_buf   = 2'($urandom_range(0, 3));
      wr_start = ($urandom_range(0, 299) == 0);
      wr_valid = ($urandom_range(0, 1) == 0);
      wr_data  = $urandom();
      soft_rst = (cyc == 21000);
      rd_en    = 0;
      for (int t = 0; t < 4; t++) begin
        int b;
        b = $urandom_range(0, 3);
        if (model[b].size() > 0) begin
          rd_en   = 1;
          rd_buf  = 2'(b);
          rd_word = 7'($urandom_range(0, model[b].size() - 1));
          pend_exp = model[b][rd_word];
          pend = 1;
          break;
        end
      end
      if (rd_en && wr_valid && enable && rd_buf == wr_buf) rd_en = 0;  // no read of a word being written
      if (!rd_en) pend = 0;

      @(posedge clk);
      if (soft_rst) begin
        for (int b = 0; b < 4; b++) model[b] = {};
      end else if (enable) begin
        if (wr_start) model[wr_buf] = {};
        if (wr_valid) begin
          if (model[wr_buf].size() < DEPTH) model[wr_buf].push_back(wr_data);
          else n_full++;
        end
      end else if (wr_valid) begin
        n_disabled++;
      end
      @(negedge clk);
    end
    checks += 3;
    if (n_full == 0)     begin failures++; $display("FAIL full buffer never reached"); end
    if (n_disabled == 0) begin failures++; $display("FAIL disabled channel never written"); end
    if (n_reads == 0)    begin failures++; $display("FAIL no reads"); end
    $display("reads %0d, words dropped when full %0d, when disabled %0d", n_reads, n_full, n_disabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
