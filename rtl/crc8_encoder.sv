// crc8_encoder: registered CRC-8-CCITT encoder.
//
// Every clock cycle the 8-bit dataword on `data` is copied to the upper byte
// of the codeword while crc_generator divides it, augmented with eight
// zeros, by G(x) = x^8 + x^2 + x + 1; the 8-bit remainder fills the lower
// byte. The 16-bit result is captured in an output register, so `codeword`
// follows `data` by one clock edge and a new dataword can be accepted every
// cycle (one codeword per clock, no handshake).
//
// Ports: clk, rst (active high), data[7:0], codeword[15:0]
// = {data, crc8(data)}. With rst high the codeword register is cleared to
// zero at the clock edge. Example: data 185 (8'hB9) gives codeword 47398
// (16'hB926).
//
// Port names, widths, active-high reset and codeword layout follow the
// source design. The reset being synchronous, and the single register stage
// at the output, are this implementation's choices.
module crc8_encoder
  import crc8_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] data,
  output logic [CW_W-1:0]   codeword
);

  remainder_t crc;
  codeword_t  cw_next;

  crc_generator #(
    .DATA_W (DATA_W),
    .CRC_W  (CRC_W),
    .POLY   (CRC8_CCITT_POLY)
  ) u_generator (
    .dataword  (data),
    .remainder (crc)
  );

  assign cw_next = '{data: data, crc: crc};

  always_ff @(posedge clk) begin
    if (rst) codeword <= '0;
    else     codeword <= cw_next;
  end

endmodule
