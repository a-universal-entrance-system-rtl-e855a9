// irphy_pkg: types and constants shared by the IrDA physical layer core.
//
// Holds the register addresses of the host register map, the Master Control
// Register layout, the speed-group encoding and the fixed 4PPM chip patterns
// of the FIR flags (PA preamble, STA start flag, STO stop flag). The register
// addresses, MCR fields and flag chip patterns are the document's; a chip
// pattern is written with the first chip sent in the most significant bit.
package irphy_pkg;

  // MCR[4:3] speed group
  typedef enum logic [1:0] {
    SPEED_SIR  = 2'b00,   // 9.6 .. 115.2 kb/s, 3/16 RZI
    SPEED_FIR  = 2'b01,   // 4 Mb/s, 4PPM
    SPEED_IRTX = 2'b10,   // "IR transmit mode" (not defined further)
    SPEED_RSVD = 2'b11
  } speed_e;

  typedef struct packed {
    logic [2:0] rsvd_7_5;
    speed_e     speed;       // [4:3]
    logic       rsvd_2;
    logic       tx_mode;     // [1] 0 receive, 1 transmit
    logic       mode_switch; // [0]
  } mcr_t;

  // Register addresses common to both modes
  localparam logic [3:0] A_MCR      = 4'h0;
  // SIR mode (MCR[4:3] = 00)
  localparam logic [3:0] A_SIR_BRCR = 4'h1;
  localparam logic [3:0] A_SIR_FCR  = 4'h2;
  localparam logic [3:0] A_SIR_TXF  = 4'h3;
  localparam logic [3:0] A_SIR_RXF  = 4'h4;
  // FIR mode (MCR[4:3] = 01)
  localparam logic [3:0] A_FIR_IER    = 4'h1;
  localparam logic [3:0] A_FIR_IIR    = 4'h2;
  localparam logic [3:0] A_FIR_FCR    = 4'h3;
  localparam logic [3:0] A_FIR_LCR    = 4'h4;
  localparam logic [3:0] A_FIR_OFDLR0 = 4'h5;
  localparam logic [3:0] A_FIR_OFDLR1 = 4'h6;
  localparam logic [3:0] A_FIR_IFDLR0 = 4'h7;
  localparam logic [3:0] A_FIR_IFDLR1 = 4'h8;
  localparam logic [3:0] A_FIR_RXF    = 4'h9;
  localparam logic [3:0] A_FIR_TXF    = 4'hA;

  // FIR IIR / IER bit positions
  localparam int IIR_RX_TRIG   = 0;
  localparam int IIR_RX_EOF    = 1;
  localparam int IIR_CRC_ERR   = 2;
  localparam int IIR_RX_OVR    = 3;
  localparam int IIR_RX_ERR    = 4;
  localparam int IIR_TX_LOW    = 5;
  localparam int IIR_TX_UNDR   = 6;
  localparam int IIR_BUSY      = 7;

  localparam logic [7:0] FIR_FCR_RESET = 8'b0011_0011;

  // 4PPM flags, first chip in the MSB
  localparam logic [15:0] PA_CHIPS  = 16'b1000_0000_1010_1000;
  localparam logic [31:0] STA_CHIPS = 32'b0000_1100_0000_1100_0110_0000_0110_0000;
  localparam logic [31:0] STO_CHIPS = 32'b1100_0000_1100_0000_0110_0000_0110_0000;
  localparam int          PA_REPEAT = 16;

  // CRC32 residue of a frame followed by its own (inverted) FCS
  localparam logic [31:0] CRC32_RESIDUE = 32'hC704_DD7B;

  // SIR clock divisor (115200*16 Hz clock -> 16x bit-rate enable) from BRCR
  function automatic logic [3:0] sir_divisor(input logic [7:0] brcr);
    case (brcr)
      8'd1:    return 4'd6;    // 19200
      8'd2:    return 4'd3;    // 38400
      8'd3:    return 4'd2;    // 57600
      8'd4:    return 4'd1;    // 115200
      default: return 4'd12;   // 9600
    endcase
  endfunction

  // 4PPM: data bit pair value -> 4 chips (first chip in bit 3)
  function automatic logic [3:0] ppm_encode(input logic [1:0] dbp);
    return 4'b1000 >> dbp;
  endfunction

endpackage
