// crc8_codec_top: CRC-8-CCITT encoder and decoder joined by a link.
//
// The transmitter side (crc8_encoder) turns each 8-bit dataword into a
// 16-bit codeword {data, crc8(data)}. The codeword is brought out as
// `codeword_tx` and, on its way to the receiver side (crc8_decoder), is
// XORed with `err_mask`: a 1 in err_mask flips that codeword bit, standing
// in for noise on the transmission link. The decoder checks the received
// codeword, forwards its dataword on `data_out` when the remainder is zero,
// and shows the remainder on `remaind`; a corrupted codeword is discarded
// (data_out = 0, remaind != 0).
//
// Timing: codeword_tx follows data_in by one clock edge; data_out and
// remaind follow the received codeword by one more, so data_in reaches
// data_out after two clock edges (err_mask is sampled together with
// codeword_tx). One dataword per clock. rst (active high, synchronous)
// clears both stages.
//
// The encoder and decoder follow the source design; the link with an error
// mask is this implementation's way of joining them for testing.
module crc8_codec_top
  import crc8_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] data_in,
  input  logic [CW_W-1:0]   err_mask,
  output logic [CW_W-1:0]   codeword_tx,
  output logic [DATA_W-1:0] data_out,
  output logic [CRC_W-1:0]  remaind
);

  logic [CW_W-1:0] codeword_rx;

  crc8_encoder u_encoder (
    .clk      (clk),
    .rst      (rst),
    .data     (data_in),
    .codeword (codeword_tx)
  );

  assign codeword_rx = codeword_tx ^ err_mask;

  crc8_decoder u_decoder (
    .clk      (clk),
    .rst      (rst),
    .codeword (codeword_rx),
    .data     (data_out),
    .remaind  (remaind)
  );

endmodule
