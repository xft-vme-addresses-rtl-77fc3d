// filar_overflow_detection: keeps the FILAR receiver from being sent more
// words than it can hold.
//
// The Control FPGA counts the words it sends (word_sent). When an event ends
// (event_end, which may coincide with its last word) the event's count moves
// from the current word count into one of four word count registers, chosen
// by a 2-bit event counter that then advances, and that register's timer is
// enabled. clear_delay ticks of clk later (one tick is 12.5 ns at 80 MHz; a
// delay of 0 acts as 1) the timer clears the register and disables itself:
// by then the receiver is taken to have drained that event. The sum of the four registers and the current
// count is the number of words that may still sit in the receiver; when it is
// at or above wc_max, total_ge_max is set, and overflow follows it one clock
// later as the registered flag the rest of the board acts on.
//
// From the XFT register map: the four 10-bit word count registers, the current
// count, the four timer enables, the 2-bit event count, the comparison and
// overflow flags, the 20-bit clear delay and the 10-bit maximum. This design's
// own choices: the current count saturates at 1023; an event that finds its
// register still timing adds its count to it and restarts the timer; overflow
// is total_ge_max delayed by one register; soft_rst clears all state.
module filar_overflow_detection #(
  parameter int unsigned WC_W  = 10,   // word count width
  parameter int unsigned DLY_W = 20,   // clear delay width
  parameter int unsigned NSLOT = 4     // word count registers / timers
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  soft_rst,
  input  logic                  word_sent,
  input  logic                  event_end,
  input  logic [DLY_W-1:0]      clear_delay,
  input  logic [WC_W-1:0]       wc_max,
  output logic [WC_W-1:0]       cur_wc,
  output logic [WC_W-1:0]       wc_reg   [NSLOT],
  output logic [NSLOT-1:0]      timer_en,
  output logic [$clog2(NSLOT)-1:0] ev_cnt,
  output logic                  total_ge_max,
  output logic                  overflow
);

  localparam int unsigned SW   = $clog2(NSLOT);
  localparam int unsigned TOTW = WC_W + $clog2(NSLOT + 1);
  localparam logic [WC_W-1:0] WC_SAT = '1;

  logic [DLY_W-1:0] tmr [NSLOT];
  logic [WC_W-1:0]  cur_next;     // current count including this cycle's word
  logic [TOTW-1:0]  total;

  always_comb begin
    cur_next = cur_wc;
    if (word_sent && cur_wc != WC_SAT) cur_next = cur_wc + 1'b1;
  end

  always_comb begin
    total = TOTW'(cur_wc);
    for (int i = 0; i < NSLOT; i++) total += TOTW'(wc_reg[i]);
  end

  assign total_ge_max = (total >= TOTW'(wc_max));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_wc   <= '0;
      timer_en <= '0;
      ev_cnt   <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < NSLOT; i++) begin
        wc_reg[i] <= '0;
        tmr[i]    <= '0;
      end
    end else if (soft_rst) begin
      cur_wc   <= '0;
      timer_en <= '0;
      ev_cnt   <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < NSLOT; i++) begin
        wc_reg[i] <= '0;
        tmr[i]    <= '0;
      end
    end else begin
      overflow <= total_ge_max;
      // timers: count enabled slots, clear the register when the delay is reached
      for (int i = 0; i < NSLOT; i++) begin
        if (timer_en[i]) begin
          if ((DLY_W+1)'(tmr[i]) + 1'b1 >= (DLY_W+1)'(clear_delay)) begin
            wc_reg[i]   <= '0;
            timer_en[i] <= 1'b0;
            tmr[i]      <= '0;
          end else begin
            tmr[i] <= tmr[i] + 1'b1;
          end
        end
      end
      // event bookkeeping (overrides the timer update of the chosen slot)
      if (event_end) begin
        cur_wc           <= '0;
        ev_cnt           <= ev_cnt + 1'b1;
        timer_en[ev_cnt] <= 1'b1;
        tmr[ev_cnt]      <= '0;
        if (timer_en[ev_cnt]) begin
          wc_reg[ev_cnt] <= ((WC_W+1)'(wc_reg[ev_cnt]) + (WC_W+1)'(cur_next) > (WC_W+1)'(WC_SAT))
                            ? WC_SAT : wc_reg[ev_cnt] + cur_next;
        end else begin
          wc_reg[ev_cnt] <= cur_next;
        end
      end else begin
        cur_wc <= cur_next;
      end
    end
  end

  // The event counter addresses every slot only when NSLOT is a power of two.
  initial assert (NSLOT == (1 << SW)) else $error("NSLOT must be a power of two");

endmodule
