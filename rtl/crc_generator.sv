// crc_generator: combinational CRC remainder generator.
//
// Returns the remainder of (dataword * x^CRC_W) divided modulo 2 by the
// generator polynomial, i.e. the check value the encoder appends to the
// dataword. The division is the schoolbook long division of the augmented
// dataword, written as a bit-serial loop that the synthesis tool unrolls into
// one XOR network (for the CRC-8 default, one small XOR function per
// remainder bit). Each step shifts the partial remainder left by one; when
// the bit leaving it, XORed with the next dataword bit, is 1, the polynomial
// is subtracted (XORed) in. Feeding the dataword bit in at the top of the
// remainder this way is the same as appending CRC_W zeros and dividing.
//
// Interface: dataword in, remainder out, no clock; purely combinational.
// The remainder register starts at zero and no final XOR or bit reflection is
// applied: that is what reproduces the source design's published codewords.
// POLY omits the leading x^CRC_W term. The defaults are the CRC-8-CCITT
// generator and 8-bit dataword of the source design; the parameters let the
// same block run the small 4-bit / G(x)=1011 teaching example.
module crc_generator #(
  parameter int unsigned        DATA_W = crc8_pkg::DATA_W,
  parameter int unsigned        CRC_W  = crc8_pkg::CRC_W,
  parameter logic [CRC_W-1:0]   POLY   = crc8_pkg::CRC8_CCITT_POLY
) (
  input  logic [DATA_W-1:0] dataword,
  output logic [CRC_W-1:0]  remainder
);

  always_comb begin
    logic [CRC_W-1:0] rem;
    logic             fb;
    rem = '0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb  = rem[CRC_W-1] ^ dataword[i];
      rem = {rem[CRC_W-2:0], 1'b0};
      if (fb) rem = rem ^ POLY;
    end
    remainder = rem;
  end

endmodule
