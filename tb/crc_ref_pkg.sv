// crc_ref_pkg: reference model for the CRC testbenches.
//
// Computes a modulo-2 remainder the textbook way, independent of the RTL's
// shift-register loops: the dividend is held as one wide integer and, from
// its top bit down, the full generator (leading 1 included) is XORed in,
// aligned under every 1 that remains above the remainder field. Widths up to
// 64 bits.
package crc_ref_pkg;

  // Remainder of dividend (dividend_w bits) divided by gen (deg+1 bits,
  // leading 1 included).
  function automatic logic [63:0] mod2_rem(logic [63:0] dividend, int dividend_w,
                                          logic [63:0] gen, int deg);
    logic [63:0] v = dividend;
    for (int b = dividend_w - 1; b >= deg; b--)
      if (v[b]) v = v ^ (gen << (b - deg));
    return v & ((64'd1 << deg) - 1);
  endfunction

  // CRC-8-CCITT check value of one byte: remainder of data * x^8 by 0x107.
  function automatic logic [7:0] crc8_ref(logic [7:0] data);
    return 8'(mod2_rem({48'd0, data, 8'd0}, 16, 64'h107, 8));
  endfunction

  // CRC-8-CCITT syndrome of a 16-bit codeword.
  function automatic logic [7:0] syn8_ref(logic [15:0] cw);
    return 8'(mod2_rem({48'd0, cw}, 16, 64'h107, 8));
  endfunction

endpackage
