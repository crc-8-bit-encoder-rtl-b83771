// crc8_pkg: widths and generator polynomial shared by the CRC-8-CCITT
// encoder, decoder and their sub-blocks.
//
// The generator is G(x) = x^8 + x^2 + x + 1. It is written in the usual
// "normal" form, without the implicit x^8 term: 8'h07. A dataword is 8 bits
// and a codeword is the dataword followed by its 8-bit remainder, 16 bits in
// all. The widths and the polynomial follow the source design; the struct
// view of a codeword is this implementation's own convenience.
package crc8_pkg;

  localparam int unsigned DATA_W = 8;            // dataword width
  localparam int unsigned CRC_W  = 8;            // degree of G(x), remainder width
  localparam int unsigned CW_W   = DATA_W + CRC_W; // codeword width

  // x^8 + x^2 + x + 1, leading term implicit
  localparam logic [CRC_W-1:0] CRC8_CCITT_POLY = 8'h07;

  typedef logic [DATA_W-1:0] dataword_t;
  typedef logic [CRC_W-1:0]  remainder_t;

  // Codeword layout: dataword in the upper byte, remainder in the lower byte.
  typedef struct packed {
    dataword_t  data;
    remainder_t crc;
  } codeword_t;

endpackage
