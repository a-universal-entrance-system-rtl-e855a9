// irphy_tb_pkg: reference models shared by the IrPHY testbenches.
//
// Written independently of the RTL: the CRC uses the byte-wise reflected
// IEEE 802.3 algorithm (polynomial 0xEDB88320, preset all ones, final
// inversion), and the FIR frame builder writes out the chip sequence of a
// complete 4 Mb/s frame from the flag patterns and the 4PPM table:
// 16 x PA, STA, payload and FCS (LSB first, bit pairs (first, second) ->
// chip position first*2+second), STO.
package irphy_tb_pkg;

  typedef byte unsigned bytes_t[$];
  typedef bit chips_t[$];

  function automatic bit [31:0] crc32_ref(bytes_t data);
    bit [31:0] c = 32'hFFFF_FFFF;
    foreach (data[i]) begin
      c ^= 32'(data[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  function automatic void add_pattern(ref chips_t q, input string s);
    for (int i = 0; i < s.len(); i++) begin
      if (s[i] == "1") q.push_back(1'b1);
      else if (s[i] == "0") q.push_back(1'b0);
    end
  endfunction

  function automatic void add_byte(ref chips_t q, input byte unsigned b);
    for (int k = 0; k < 8; k += 2) begin
      int pos = 2 * int'(b[k]) + int'(b[k+1]);
      for (int c = 0; c < 4; c++) q.push_back(c == pos);
    end
  endfunction

  function automatic chips_t fir_frame(bytes_t data, bit bad_crc);
    chips_t q;
    bit [31:0] fcs = crc32_ref(data);
    if (bad_crc) fcs ^= 32'h0000_0100;
    for (int r = 0; r < 16; r++) add_pattern(q, "1000 0000 1010 1000");
    add_pattern(q, "0000 1100 0000 1100 0110 0000 0110 0000");
    foreach (data[i]) add_byte(q, data[i]);
    for (int i = 0; i < 4; i++) add_byte(q, fcs[8*i +: 8]);
    add_pattern(q, "1100 0000 1100 0000 0110 0000 0110 0000");
    return q;
  endfunction

endpackage
