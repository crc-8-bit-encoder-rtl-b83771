// crc_checker: combinational CRC syndrome calculator for the receiver.
//
// Divides the whole received codeword (dataword followed by remainder)
// modulo 2 by the generator polynomial and returns the remainder, the
// syndrome. A codeword built by crc_generator leaves syndrome zero; a
// non-zero syndrome means the codeword was corrupted. Every single-bit and
// every odd-weight error, and every burst of up to CRC_W bits, gives a
// non-zero syndrome for the default polynomial.
//
// How: the codeword bits enter the partial remainder at its low end, most
// significant codeword bit first; whenever the bit shifted out at the top is
// 1 the polynomial is XORed in. This is plain (non-augmented) long division,
// so the result is codeword(x) mod G(x). The loop unrolls into an XOR
// network, no clock.
//
// Interface: codeword in (CW_W = DATA_W + CRC_W bits), syndrome out.
// Defaults follow the source design (16-bit codeword, x^8+x^2+x+1); the
// loop structure is this implementation's own.
module crc_checker #(
  parameter int unsigned        CW_W  = crc8_pkg::CW_W,
  parameter int unsigned        CRC_W = crc8_pkg::CRC_W,
  parameter logic [CRC_W-1:0]   POLY  = crc8_pkg::CRC8_CCITT_POLY
) (
  input  logic [CW_W-1:0]  codeword,
  output logic [CRC_W-1:0] syndrome
);

  always_comb begin
    logic [CRC_W-1:0] rem;
    logic             fb;
    rem = '0;
    for (int i = CW_W - 1; i >= 0; i--) begin
      fb  = rem[CRC_W-1];
      rem = {rem[CRC_W-2:0], codeword[i]};
      if (fb) rem = rem ^ POLY;
    end
    syndrome = rem;
  end

endmodule
