// tb_filar_overflow_detection: drives random word/event traffic into the
// overflow detector and compares every output, every clock, with a reference
// model written here: current count, the four word count registers and their
// timers (a register is cleared exactly clear_delay clocks after it was
// loaded), the event counter, total >= max and the registered overflow flag.
// Also counts that overflow, a timer clear and a busy-slot merge all happen.
module tb_filar_overflow_detection;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        soft_rst, word_sent, event_end;
  logic [19:0] clear_delay;
  logic [9:0]  wc_max;
  logic [9:0]  cur_wc;
  logic [9:0]  wc_reg [4];
  logic [3:0]  timer_en;
  logic [1:0]  ev_cnt;
  logic        ge, ovf;

  filar_overflow_detection u_dut (
    .clk(clk), .rst_n(rst_n), .soft_rst(soft_rst), .word_sent(word_sent),
    .event_end(event_end), .clear_delay(clear_delay), .wc_max(wc_max),
    .cur_wc(cur_wc), .wc_reg(wc_reg), .timer_en(timer_en), .ev_cnt(ev_cnt),
    .total_ge_max(ge), .overflow(ovf));

  // reference model state
  int m_cur, m_ev, m_ovf;
  int m_reg [4];
  int m_age [4];   // clocks since load, -1 = idle
  int n_ovf = 0, n_clear = 0, n_merge = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic int m_total();
    int t = m_cur;
    for (int i = 0; i < 4; i++) t += m_reg[i];
    return t;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    soft_rst = 0; word_sent = 0; event_end = 0;
    clear_delay = 20'd16; wc_max = 10'd200;
    m_cur = 0; m_ev = 0; m_ovf = 0;
    for (int i = 0; i < 4; i++) begin m_reg[i] = 0; m_age[i] = -1; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    for (int cyc = 0; cyc < 20000; cyc++) begin
      // compare outputs with the model (state after the last edge)
      check("cur_wc", int'(cur_wc), m_cur);
      check("ev_cnt", int'(ev_cnt), m_ev);
      for (int i = 0; i < 4; i++) begin
        check("wc_reg", int'(wc_reg[i]), m_reg[i]);
        check("timer_en", int'(timer_en[i]), int'(m_age[i] >= 0));
      end
      check("total_ge_max", int'(ge), int'(m_total() >= int'(wc_max)));
      check("overflow", int'(ovf), m_ovf);
      if (ovf) n_ovf++;

      // stimulus for the next edge
      if (cyc == 8000) clear_delay = 20'd300;
      if (cyc == 14000) begin clear_delay = 20'd1; wc_max = 10'd1023; end
      word_sent = ($urandom_range(0, 3) != 0);
      event_end = ($urandom_range(0, 39) == 0);
      soft_rst  = (cyc == 12000);

      // model the edge from the state before it
      @(posedge clk);
      begin
        int nxt_cur, tot, e, dly;
        bit was_busy;
        tot = m_total();
        nxt_cur = (word_sent && m_cur < 1023) ? m_cur + 1 : m_cur;
        dly = (clear_delay == 0) ? 1 : int'(clear_delay);
        e = m_ev;
        was_busy = (m_age[e] >= 0);
        if (soft_rst) begin
          m_cur = 0; m_ev = 0; m_ovf = 0;
          for (int i = 0; i < 4; i++) begin m_reg[i] = 0; m_age[i] = -1; end
        end else begin
          m_ovf = int'(tot >= int'(wc_max));
          for (int i = 0; i < 4; i++) begin
            if (m_age[i] >= 0) begin
              m_age[i]++;
              if (m_age[i] >= dly && !(event_end && i == e)) begin
                m_reg[i] = 0; m_age[i] = -1; n_clear++;
              end
            end
          end
          if (event_end) begin
            if (was_busy) begin
              m_reg[e] = m_reg[e] + nxt_cur;
              if (m_reg[e] > 1023) m_reg[e] = 1023;
              n_merge++;
            end else begin
              m_reg[e] = nxt_cur;
            end
            m_age[e] = 0;
            m_ev = (m_ev + 1) % 4;
            m_cur = 0;
          end else begin
            m_cur = nxt_cur;
          end
        end
      end
      @(negedge clk);
    end
    checks += 3;
    if (n_ovf == 0)   begin failures++; $display("FAIL overflow never seen"); end
    if (n_clear == 0) begin failures++; $display("FAIL no timer clear seen"); end
    if (n_merge == 0) begin failures++; $display("FAIL no busy-slot merge seen"); end
    $display("overflow cycles %0d, timer clears %0d, merges %0d", n_ovf, n_clear, n_merge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
