// crc32: bit-serial IEEE 802 CRC32 generator and checker.
//
// Polynomial x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1
// in a 32-bit left-shifting register (x^31 term in bit 31). The register is
// preset to all ones by `clr` (and by reset). On each cycle with `en` high one
// bit is processed:
//   fcs_mode = 0: `din` is a payload bit (bytes are fed LSB first); the
//                 register takes feedback crc[31]^din and `dout` = din.
//   fcs_mode = 1: a 0 is fed back, so the register acts as a plain shift
//                 register, and `dout` = ~crc[31] (inverted FCS, MSB of the
//                 register first); `bad_fcs` inverts it once more to send a
//                 deliberately wrong FCS for test.
// For checking, the receiver feeds payload and received FCS with fcs_mode = 0;
// `residue_ok` is then high when the register holds 0xC704DD7B.
// `dout` is combinational; the register updates on the clock edge. All of
// this follows the document's CRC32 description; only the enable is added.
module crc32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic        din,
  input  logic        fcs_mode,
  input  logic        bad_fcs,
  output logic        dout,
  output logic [31:0] crc,
  output logic        residue_ok
);
  import irphy_pkg::*;

  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  logic fb;
  assign fb = (crc[31] ^ din) & ~fcs_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        crc <= '1;
    else if (clr)      crc <= '1;
    else if (en)       crc <= {crc[30:0], 1'b0} ^ (fb ? POLY : 32'h0);
  end

  assign dout       = fcs_mode ? (~crc[31] ^ bad_fcs) : din;
  assign residue_ok = (crc == CRC32_RESIDUE);
endmodule
