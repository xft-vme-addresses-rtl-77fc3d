// xft_pkg: types and constants shared by the XFT board's VME register logic.
//
// The board holds three FPGAs behind one VME A32 slave: the Control FPGA and
// two DataIO FPGAs. Inside the board the VME cycle becomes a single-cycle
// local bus request (lb_req_t) that the board decoder tags with the target
// FPGA and address space; every target answers exactly one clock later with
// an lb_rsp_t (ack plus read data). The address map, register offsets,
// firmware versions, fixed status words and power-up values are those of the
// XFT register map. The local bus itself, its one-cycle latency and the
// space tags are this design's own choices.
package xft_pkg;

  // ---------------------------------------------------------------------
  // Board-local address map (A23:0; A31:24 is the board's base address)
  // ---------------------------------------------------------------------
  localparam logic [3:0] FPGA_CTRL_NIB = 4'h0;   // YY00xxxx, YY10xxxx
  localparam logic [3:0] FPGA_DIO1_NIB = 4'h8;   // YY08xxxx, XX88..XXB8xxxx
  localparam logic [3:0] FPGA_DIO2_NIB = 4'hC;   // YY0Cxxxx, XX8C..XXBCxxxx

  // Register offsets inside one FPGA (byte addresses)
  localparam logic [7:0] REG_FW_VERSION = 8'h00;
  localparam logic [7:0] REG_RESET      = 8'h04;
  localparam logic [7:0] REG_DAQ_SW     = 8'h08;
  localparam logic [7:0] REG_CTRL1      = 8'h0C;
  localparam logic [7:0] REG_STATUS1    = 8'h10;
  localparam logic [7:0] REG_PULSE1     = 8'h14;
  localparam logic [7:0] REG_CTRL2      = 8'h18;
  localparam logic [7:0] REG_CTRL3      = 8'h1C;
  localparam logic [7:0] REG_STATUS2    = 8'h20;
  localparam logic [7:0] REG_STATE1     = 8'h24;   // Control FPGA only
  localparam logic [7:0] REG_STATE2     = 8'h28;   // Control FPGA only

  // Fixed read values
  localparam logic [31:0] FW_VERSION_DATAIO = 32'h0d50_9190;
  localparam logic [31:0] FW_VERSION_CTRL   = 32'h0c50_8110;
  localparam logic [31:0] STATUS1_VALUE     = 32'h00c0_ffee;
  localparam logic [31:0] STATUS2_DATAIO    = 32'h0000_0cdf;
  localparam logic [31:0] STATUS2_CTRL      = 32'hdead_beef;

  // Power-up values of the control registers
  localparam logic [31:0] CTRL1_INIT_CTRL   = 32'd41;          // bunch count shift
  localparam logic [31:0] CTRL1_MASK_CTRL   = 32'h0000_00ff;   // its data bits 7:0
  localparam logic [31:0] CTRL2_INIT_CTRL   = 32'h0000_0001;   // ignore aborts
  localparam logic [31:0] CTRL3_INIT_CTRL   = {2'b00, 10'd1023, 20'd16};
  localparam logic [31:0] CTRL_INIT_ZERO    = 32'h0000_0000;

  // DAQ readout geometry of one DataIO FPGA
  localparam int unsigned N_MEZZ        = 2;
  localparam int unsigned N_CH_PER_MEZZ = 3;
  localparam int unsigned N_CHAN        = N_MEZZ * N_CH_PER_MEZZ;  // 6
  localparam int unsigned N_BUF         = 4;
  localparam int unsigned BUF_DEPTH     = 128;                      // 0x200 bytes

  // ---------------------------------------------------------------------
  // Local bus
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    SP_NONE   = 3'd0,   // nothing on the board answers this address
    SP_REG    = 3'd1,   // FPGA register block, offsets 0x00..0xFC
    SP_IDPROM = 3'd2,   // YY100000..YY10007C
    SP_WC     = 3'd3,   // DataIO word count registers, 0x800..0xBFC
    SP_RAM    = 3'd4    // DataIO readout RAM, XX8x..XXBx
  } space_e;

  typedef enum logic [1:0] {
    TGT_NONE = 2'd0,
    TGT_CTRL = 2'd1,
    TGT_DIO1 = 2'd2,
    TGT_DIO2 = 2'd3
  } target_e;

  typedef struct packed {
    logic        req;     // one-cycle strobe
    logic        we;      // 1 = write
    logic [23:0] addr;    // board-local byte address
    logic [31:0] wdata;
    space_e      space;   // filled in by the board decoder
  } lb_req_t;

  typedef struct packed {
    logic        ack;     // one cycle, exactly one clock after req
    logic [31:0] rdata;   // valid with ack on reads, zero otherwise
  } lb_rsp_t;

  localparam lb_rsp_t LB_RSP_IDLE = '{ack: 1'b0, rdata: 32'h0};

  typedef struct packed {
    target_e target;
    space_e  space;
  } decode_t;

  // Full decode of a board-local address.
  function automatic decode_t decode_addr(input logic [23:0] a);
    decode_t d;
    d.target = TGT_NONE;
    d.space  = SP_NONE;
    if (a[23:22] == 2'b10) begin
      // RAM windows: A21:20 buffer, A19:16 FPGA, A11 mezzanine, A10:9 channel
      if (a[15:12] == 4'h0 && a[10:9] != 2'b11) begin
        if (a[19:16] == FPGA_DIO1_NIB) begin d.target = TGT_DIO1; d.space = SP_RAM; end
        if (a[19:16] == FPGA_DIO2_NIB) begin d.target = TGT_DIO2; d.space = SP_RAM; end
      end
    end else if (a[23:20] == 4'h1) begin
      if (a[19:7] == '0) begin d.target = TGT_CTRL; d.space = SP_IDPROM; end
    end else if (a[23:20] == 4'h0 && a[15:12] == 4'h0) begin
      if (a[11:8] == 4'h0) begin
        if (a[19:16] == FPGA_CTRL_NIB) begin d.target = TGT_CTRL; d.space = SP_REG; end
        if (a[19:16] == FPGA_DIO1_NIB) begin d.target = TGT_DIO1; d.space = SP_REG; end
        if (a[19:16] == FPGA_DIO2_NIB) begin d.target = TGT_DIO2; d.space = SP_REG; end
      end else if (a[11:10] == 2'b10 && a[7:5] == 3'b000 && a[4:2] < 3'd6) begin
        if (a[19:16] == FPGA_DIO1_NIB) begin d.target = TGT_DIO1; d.space = SP_WC; end
        if (a[19:16] == FPGA_DIO2_NIB) begin d.target = TGT_DIO2; d.space = SP_WC; end
      end
    end
    return d;
  endfunction

  // Identification PROM contents: one ASCII character per entry in bits 31:24.
  function automatic logic [7:0] idprom_char(input logic [4:0] idx);
    case (idx)
      5'd0:  return "0";
      5'd1:  return "0";
      5'd2:  return "x";
      5'd3:  return "x";
      5'd4:  return " ";
      5'd5:  return "1";
      5'd6:  return "0";
      5'd7:  return "5";
      5'd8:  return " ";
      5'd9:  return "P";
      5'd10: return "U";
      5'd11: return "L";
      5'd12: return "S";
      5'd13: return "A";
      5'd14: return "R";
      5'd15: return " ";
      5'd16: return "X";
      5'd17: return "F";
      5'd18: return "T";
      5'd19: return " ";
      5'd20: return "R";
      5'd21: return "X";
      default: return 8'h00;
    endcase
  endfunction

endpackage
