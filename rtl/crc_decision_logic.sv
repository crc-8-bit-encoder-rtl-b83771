// crc_decision_logic: accept-or-discard decision of the CRC receiver.
//
// Takes the syndrome from crc_checker and the dataword part of the received
// codeword. A zero syndrome accepts the codeword: the dataword is passed on
// and `accept` is high. A non-zero syndrome discards it: `accept` is low,
// `discard` is high and the dataword output is forced to zero so that no
// corrupted data reaches the next stage.
//
// Interface: combinational, no clock. accept and discard are always
// complements. Accepting on a zero syndrome and discarding otherwise follows
// the source design; forcing the discarded dataword to zero and bringing out
// separate accept/discard flags are this implementation's choices.
module crc_decision_logic #(
  parameter int unsigned DATA_W = crc8_pkg::DATA_W,
  parameter int unsigned CRC_W  = crc8_pkg::CRC_W
) (
  input  logic [CRC_W-1:0]  syndrome,
  input  logic [DATA_W-1:0] rx_data,
  output logic [DATA_W-1:0] data_out,
  output logic              accept,
  output logic              discard
);

  always_comb begin
    accept   = (syndrome == '0);
    discard  = !accept;
    data_out = accept ? rx_data : '0;
  end

endmodule
