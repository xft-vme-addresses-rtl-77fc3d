// vme_slave: VME A32/D32 single-cycle slave front end of the XFT board.
//
// The asynchronous VME strobes (AS*, DS0*, DS1*, WRITE*) are brought into the
// board clock through two flip-flops each. When the address strobe and both
// data strobes are seen low, the address modifier is an A32 single-cycle code
// (0x09, 0x0A, 0x0D, 0x0E) and A31:24 equal the board's base address
// (board_base, the "XX"/"YY" of the address map), the slave samples address
// and write data (stable on the bus while the strobes are low) and issues one
// local bus request (lb_req_t, A23:0, space SP_NONE for the decoder to fill).
// When the one-cycle acknowledge returns it drives DTACK* low, and on reads
// also the read data with vme_data_oe, until the master releases the data
// strobes; then it lets DTACK* go and waits for the next cycle.
// Latency: about 2 clocks of synchronisation, 1 to issue, 1 to acknowledge
// and 1 to drive DTACK*, so DTACK* falls 5 clocks after the strobes.
//
// The address width (A32), the data width (D32) and the read/write access of
// each register come from the XFT register map; the handshake follows common
// VME slave practice and is this design's own: the map does not describe the
// bus cycle, and address modifiers and bus errors are not mentioned in it.
module vme_slave
  import xft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_base,
  // VME bus
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:0] vme_addr,
  input  logic [31:0] vme_data_in,
  output logic [31:0] vme_data_out,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  // local bus
  output lb_req_t     bus_req,
  input  lb_rsp_t     bus_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DTACK} state_e;
  state_e state;

  logic [1:0] as_sync, ds_sync;
  logic       as_s, ds_s, ds_any_s;
  logic       am_ok, hit;
  logic       we_q;

  assign as_s     = as_sync[1];
  assign ds_s     = ds_sync[1];
  assign am_ok    = vme_am inside {6'h09, 6'h0A, 6'h0D, 6'h0E};
  assign hit      = as_s && ds_s && am_ok && vme_addr[31:24] == board_base;

  logic [1:0] dsa_sync;
  assign ds_any_s = dsa_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync  <= '0;
      ds_sync  <= '0;
      dsa_sync <= '0;
    end else begin
      as_sync  <= {as_sync[0], !vme_as_n};
      ds_sync  <= {ds_sync[0], vme_ds_n == 2'b00};
      dsa_sync <= {dsa_sync[0], vme_ds_n != 2'b11};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      bus_req      <= '{req: 1'b0, we: 1'b0, addr: 24'h0, wdata: 32'h0, space: SP_NONE};
      vme_data_out <= 32'h0;
      vme_data_oe  <= 1'b0;
      vme_dtack_n  <= 1'b1;
      we_q         <= 1'b0;
    end else begin
      bus_req.req <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (hit) begin
            bus_req <= '{req: 1'b1, we: !vme_write_n, addr: vme_addr[23:0],
                         wdata: vme_data_in, space: SP_NONE};
            we_q    <= !vme_write_n;
            state   <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (bus_rsp.ack) begin
            vme_data_out <= we_q ? 32'h0 : bus_rsp.rdata;
            vme_data_oe  <= !we_q;
            vme_dtack_n  <= 1'b0;
            state        <= S_DTACK;
          end
        end
        S_DTACK: begin
          if (!ds_any_s) begin
            vme_dtack_n <= 1'b1;
            vme_data_oe <= 1'b0;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The local bus carries one request at a time.
  a_single_req: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req.req |-> ##1 !bus_req.req);

endmodule
