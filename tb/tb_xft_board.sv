// tb_xft_board: end-to-end test of the whole board through its VME pins, at
// the default sizes (six channels of four 128-word buffers per DataIO FPGA).
//
// A VME master model runs A32/D32 cycles. The test reads the firmware and
// status words of all three FPGAs and the IDPROM string, writes and reads the
// control registers, enables channels, fills every buffer of both DataIO
// FPGAs (some to the full 128 words, with extra words that must be dropped,
// and some channels disabled) and reads all word counts and stored words
// back. It drives events into the overflow detection until it overflows, lets
// the timers clear the counts, checks the state registers, the abort gate in
// both settings, the reset and pulse registers, an unowned address and a cycle
// for another board. Each mechanism is counted and must happen at least once.
module tb_xft_board;
  import xft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #6.25ns clk = ~clk;   // 80 MHz

  int checks = 0, failures = 0;

  localparam logic [7:0] BASE = 8'h42;

  logic        as_n, write_n, data_oe, dtack_n;
  logic [1:0]  ds_n;
  logic [5:0]  am;
  logic [31:0] vaddr, din, dout;
  logic        word_sent, event_end, abort_in, abort_out, ovf;
  logic [7:0]  bcs;
  logic [1:0]  d1_buf, d2_buf;
  logic [5:0]  d1_start, d1_valid, d2_start, d2_valid, d1_en, d2_en;
  logic [31:0] d1_data [6];
  logic [31:0] d2_data [6];
  logic [2:0]  srst, p1;

  xft_board u_dut (
    .clk(clk), .rst_n(rst_n), .board_base(BASE),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_am(am),
    .vme_addr(vaddr), .vme_data_in(din), .vme_data_out(dout), .vme_data_oe(data_oe),
    .vme_dtack_n(dtack_n),
    .word_sent(word_sent), .event_end(event_end), .abort_in(abort_in),
    .abort_out(abort_out), .filar_overflow(ovf), .bc_shift(bcs),
    .dio1_wr_buf(d1_buf), .dio1_wr_start(d1_start), .dio1_wr_valid(d1_valid), .dio1_wr_data(d1_data),
    .dio2_wr_buf(d2_buf), .dio2_wr_start(d2_start), .dio2_wr_valid(d2_valid), .dio2_wr_data(d2_data),
    .fpga_soft_rst(srst), .fpga_pulse1(p1), .dio1_chan_en(d1_en), .dio2_chan_en(d2_en));

  // mechanisms seen
  int n_reg_rw = 0, n_idprom = 0, n_ram = 0, n_wc = 0, n_full_drop = 0, n_disabled = 0;
  int n_overflow = 0, n_timer_clear = 0, n_abort_pass = 0, n_abort_ign = 0;
  int n_soft_rst = 0, n_pulse = 0, n_unowned = 0, n_other_board = 0;

  localparam logic [11:0] CH_OFF [6] = '{12'h000, 12'h200, 12'h400, 12'h800, 12'hA00, 12'hC00};
  localparam string ID = "00xx 105 PULSAR XFT RX";

  always @(posedge clk) begin
    if (srst != 0) n_soft_rst++;
    if (p1 != 0)   n_pulse++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic vme(input logic [31:0] a, input bit wr, input logic [31:0] wd,
                     output logic [31:0] rd, output bit acked);
    vaddr = a; am = 6'h09; write_n = !wr; din = wd;
    #15ns as_n = 1'b0;
    #5ns ds_n = 2'b00;
    acked = 0;
    for (int i = 0; i < 30; i++) begin
      @(posedge clk); #1ns;
      if (!dtack_n) begin acked = 1; break; end
    end
    rd = dout;
    #5ns ds_n = 2'b11; as_n = 1'b1;
    while (!dtack_n) begin @(posedge clk); #1ns; end
  endtask

  task automatic vw(input logic [23:0] a, input logic [31:0] v);
    logic [31:0] rd; bit ok;
    vme({BASE, a}, 1'b1, v, rd, ok);
    check($sformatf("dtack on write %h", a), 32'(ok), 32'd1);
  endtask

  task automatic vr(input logic [23:0] a, output logic [31:0] rd);
    bit ok;
    vme({BASE, a}, 1'b0, 32'h0, rd, ok);
    check($sformatf("dtack on read %h", a), 32'(ok), 32'd1);
  endtask

  task automatic vr_chk(input logic [23:0] a, input logic [31:0] exp, input string what);
    logic [31:0] rd;
    vr(a, rd);
    check(what, rd, exp);
  endtask

  function automatic logic [31:0] pattern(input int f, input int ch, input int b, input int w);
    return {4'(f), 4'(ch), 8'(b), 16'(w)} ^ 32'ha500_3c00;
  endfunction
  // words offered per channel and buffer: some over the 128-word capacity
  function automatic int offered(input int f, input int ch, input int b);
    return ((f * 71 + ch * 37 + b * 53) % 140) + 1;
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, en [2];
    bit ok;
    as_n = 1; ds_n = 2'b11; write_n = 1; am = 6'h09; vaddr = 0; din = 0;
    word_sent = 0; event_end = 0; abort_in = 0;
    d1_buf = 0; d2_buf = 0; d1_start = 0; d1_valid = 0; d2_start = 0; d2_valid = 0;
    for (int c = 0; c < 6; c++) begin d1_data[c] = 0; d2_data[c] = 0; end
    #40ns rst_n = 1'b1;
    #40ns;

    // --- identification and fixed registers -----------------------------
    vr_chk(24'h000000, 32'h0c50_8110, "ctrl fw version");
    vr_chk(24'h080000, 32'h0d50_9190, "dio1 fw version");
    vr_chk(24'h0C0000, 32'h0d50_9190, "dio2 fw version");
    vr_chk(24'h000010, 32'h00c0_ffee, "ctrl status1");
    vr_chk(24'h080010, 32'h00c0_ffee, "dio1 status1");
    vr_chk(24'h000020, 32'hdead_beef, "ctrl status2");
    vr_chk(24'h0C0020, 32'h0000_0cdf, "dio2 status2");
    vr_chk(24'h00000C, 32'd41,        "bunch count shift power-up");
    vr_chk(24'h000018, 32'd1,         "ignore aborts power-up");
    vr_chk(24'h00001C, 32'h3ff0_0010, "ctrl3 power-up");
    vr_chk(24'h08000C, 32'h0,         "dio1 ctrl1 power-up");
    for (int i = 0; i < 32; i++) begin
      vr_chk(24'h100000 + 24'(4 * i), {(i < ID.len()) ? ID[i] : 8'h00, 24'h0}, "idprom");
      n_idprom++;
    end

    // --- read/write registers ------------------------------------------
    vw(24'h000008, 32'hcafe_0001); vr_chk(24'h000008, 32'hcafe_0001, "ctrl daq sw"); n_reg_rw++;
    vw(24'h080008, 32'hcafe_0002); vr_chk(24'h080008, 32'hcafe_0002, "dio1 daq sw"); n_reg_rw++;
    vw(24'h0C0008, 32'hcafe_0003); vr_chk(24'h0C0008, 32'hcafe_0003, "dio2 daq sw"); n_reg_rw++;
    vw(24'h00000C, 32'h1234_564d); vr_chk(24'h00000C, 32'd77, "bunch count shift bits 7:0"); n_reg_rw++;
    check("bc_shift pin", 32'(bcs), 32'd77);
    vw(24'h0C0018, 32'h1234_5678); vr_chk(24'h0C0018, 32'h1234_5678, "dio2 ctrl2"); n_reg_rw++;
    vr_chk(24'h080018, 32'h0, "dio1 ctrl2 untouched");

    // --- abort gate ----------------------------------------------------------
    abort_in = 1'b1; #1ns;
    check("abort ignored", 32'(abort_out), 32'd0); n_abort_ign++;
    vw(24'h000018, 32'h0); #1ns;
    check("abort passed", 32'(abort_out), 32'd1); n_abort_pass++;
    abort_in = 1'b0;

    // --- DAQ readout: fill every buffer of both DataIO FPGAs --------------
    en[0] = 32'h3d;   // DataIO 1: mezz 1 ch 2 disabled
    en[1] = 32'h1f;   // DataIO 2: mezz 2 ch 3 disabled
    vw(24'h08000C, en[0]); vw(24'h0C000C, en[1]);
    check("dio1 enables pin", 32'(d1_en), en[0]);
    check("dio2 enables pin", 32'(d2_en), en[1]);
    for (int b = 0; b < 4; b++) begin
      for (int w = 0; w < 140; w++) begin
        @(negedge clk);
        d1_buf = 2'(b); d2_buf = 2'(b);
        for (int c = 0; c < 6; c++) begin
          d1_start[c] = (w == 0); d2_start[c] = (w == 0);
          d1_valid[c] = (w < offered(0, c, b));
          d2_valid[c] = (w < offered(1, c, b));
          d1_data[c] = pattern(0, c, b, w);
          d2_data[c] = pattern(1, c, b, w);
          if (w >= 128 && d1_valid[c] && en[0][c]) n_full_drop++;
          if (w >= 128 && d2_valid[c] && en[1][c]) n_full_drop++;
          if (d1_valid[c] && !en[0][c]) n_disabled++;
          if (d2_valid[c] && !en[1][c]) n_disabled++;
        end
      end
    end
    @(negedge clk);
    d1_valid = 0; d2_valid = 0; d1_start = 0; d2_start = 0;

    for (int f = 0; f < 2; f++) begin
      logic [3:0] fn;
      fn = f ? 4'hC : 4'h8;
      for (int b = 0; b < 4; b++) begin
        for (int c = 0; c < 6; c++) begin
          int n;
          n = en[f][c] ? ((offered(f, c, b) > 128) ? 128 : offered(f, c, b)) : 0;
          vr_chk({4'h0, fn, 4'h0, 12'h800 + 12'(b * 'h100) + 12'(4 * c)}, 32'(n), "word count");
          n_wc++;
          for (int w = 0; w < n; w++) begin
            vr_chk({4'(8 + b), fn, 4'h0, CH_OFF[c] + 12'(4 * w)}, pattern(f, c, b, w), "ram word");
            n_ram++;
          end
        end
      end
    end

    // --- FILAR overflow detection ---------------------------------------
    // maximum 100 words, words cleared 2000 ticks after their event
    vw(24'h00001C, {2'b0, 10'd100, 20'd2000});
    for (int e = 0; e < 3; e++) begin
      for (int i = 0; i < 40; i++) begin
        @(negedge clk); word_sent = 1'b1; event_end = (i == 39);
      end
      @(negedge clk); word_sent = 1'b0; event_end = 1'b0;
    end
    @(negedge clk);
    check("overflow after 120 words", 32'(ovf), 32'd1);
    if (ovf) n_overflow++;
    vr_chk(24'h000024, {2'b00, 10'd40, 10'd40, 10'd0}, "state1");
    vr_chk(24'h000028, {4'b0, 4'b0111, 2'd3, 1'b1, 1'b1, 10'd0, 10'd40}, "state2 overflow");
    repeat (2100) @(negedge clk);
    check("overflow gone after clear delay", 32'(ovf), 32'd0);
    vr_chk(24'h000028, {4'b0, 4'b0000, 2'd3, 1'b0, 1'b0, 10'd0, 10'd0}, "state2 cleared");
    n_timer_clear++;

    // --- reset and pulse registers --------------------------------------
    vw(24'h080014, 32'h0);
    vw(24'h080004, 32'h0);
    vr_chk(24'h080800, 32'h0, "dio1 word count after reset");
    vr_chk(24'h0C0800, 32'(offered(1, 0, 0)), "dio2 word count not reset");
    vr_chk(24'h08000C, en[0], "dio1 enables kept over reset");

    // --- unowned address, other board -----------------------------------
    vr_chk(24'h040000, 32'h0, "unowned address reads zero"); n_unowned++;
    vme({8'h43, 24'h000000}, 1'b0, 32'h0, rd, ok);
    check("other board gets no dtack", 32'(ok), 32'd0);
    if (!ok) n_other_board++;
    // bus still works afterwards
    vr_chk(24'h000000, 32'h0c50_8110, "ctrl fw version again");

    // --- every mechanism happened -----------------------------------------
    begin
      int seen [14];
      string nm [14];
      seen = '{n_reg_rw, n_idprom, n_ram, n_wc, n_full_drop, n_disabled, n_overflow,
               n_timer_clear, n_abort_pass, n_abort_ign, n_soft_rst, n_pulse, n_unowned,
               n_other_board};
      nm = '{"register write/read", "IDPROM read", "RAM read", "word count read",
             "full buffer drop", "disabled channel", "overflow", "timer clear",
             "abort passed", "abort ignored", "soft reset", "pulse 1", "unowned address",
             "other board"};
      for (int i = 0; i < 14; i++) begin
        checks++;
        $display("mechanism %-20s seen %0d", nm[i], seen[i]);
        if (seen[i] == 0) begin failures++; $display("FAIL mechanism never seen: %s", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
