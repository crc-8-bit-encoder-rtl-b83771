// crc_decision_logic_tb: self-checking test of the accept/discard logic.
//
// A zero syndrome must pass the dataword through with accept high; any
// non-zero syndrome (each single set bit, then random values) must give
// accept low, discard high and a zero data output.
module crc_decision_logic_tb;
  int checks = 0, failures = 0;

  logic [7:0] syndrome, rx_data, data_out;
  logic       accept, discard;

  crc_decision_logic dut (.*);

  task automatic apply(logic [7:0] s, logic [7:0] d);
    syndrome = s;
    rx_data  = d;
    #1;
    checks++;
    if (s == 0 ? (data_out !== d || !accept || discard)
               : (data_out !== 0 || accept || !discard)) begin
      failures++;
      $display("FAIL syndrome %h data %h: out %h accept %b discard %b",
               s, d, data_out, accept, discard);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++) apply(8'd0, 8'(d));
    for (int b = 0; b < 8; b++) apply(8'(1 << b), 8'hA5);
    repeat (500) apply(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
