// crc8_decoder: registered CRC-8-CCITT decoder (checker plus decision logic).
//
// The received 16-bit codeword goes to crc_checker, which divides all of it
// by G(x) = x^8 + x^2 + x + 1 and yields the 8-bit remainder (syndrome).
// crc_decision_logic accepts the codeword when the remainder is zero and
// passes its upper byte, the dataword, on; otherwise it discards it and the
// data output is zero. Data and remainder are captured in output registers,
// so both follow `codeword` by one clock edge; one codeword is checked per
// clock.
//
// Ports: clk, rst (active high), codeword[15:0] in; data[7:0] (accepted
// dataword, 0 when discarded) and remaind[7:0] (remainder: 0 for a clean
// codeword, the non-zero syndrome of a corrupted one) out. With rst high
// both output registers are cleared to zero at the clock edge. Example:
// codeword 47398 (16'hB926) gives data 185 and remaind 0.
//
// Port names and widths, the zero remainder for a valid codeword and the
// discard of a corrupted one follow the source design. Synchronous reset,
// the single register stage and showing a discarded dataword as zero are
// this implementation's choices. The decision logic's accept/discard flags
// are left unconnected: the non-zero remaind output already signals a
// discard, and the port list is kept to the five ports of the source design.
module crc8_decoder
  import crc8_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [CW_W-1:0]   codeword,
  output logic [DATA_W-1:0] data,
  output logic [CRC_W-1:0]  remaind
);

  codeword_t  rx;
  remainder_t syndrome;
  dataword_t  data_next;

  assign rx = codeword;

  crc_checker #(
    .CW_W  (CW_W),
    .CRC_W (CRC_W),
    .POLY  (CRC8_CCITT_POLY)
  ) u_checker (
    .codeword (rx),
    .syndrome (syndrome)
  );

  crc_decision_logic #(
    .DATA_W (DATA_W),
    .CRC_W  (CRC_W)
  ) u_decision (
    .syndrome (syndrome),
    .rx_data  (rx.data),
    .data_out (data_next),
    .accept   (),
    .discard  ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      data    <= '0;
      remaind <= '0;
    end else begin
      data    <= data_next;
      remaind <= syndrome;
    end
  end

endmodule
