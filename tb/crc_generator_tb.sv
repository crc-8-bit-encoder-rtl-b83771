// crc_generator_tb: self-checking test of the combinational CRC generator.
//
// Checks the CRC-8-CCITT instance against the five published dataword /
// codeword pairs (185 -> 47398, 70 -> 18133, 80 -> 20663, 90 -> 23169,
// 130 -> 33415) and against a reference long division for all 256 datawords.
// A second instance with a 4-bit dataword and G(x) = x^3 + x + 1 (1011)
// must turn 1101 into remainder 001, the classroom example whose codeword
// 1101001 divides with remainder 000, and match the reference for all 16
// datawords.
module crc_generator_tb;
  import crc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0] d8;
  logic [7:0] r8;
  logic [3:0] d4;
  logic [2:0] r4;

  crc_generator dut8 (.dataword(d8), .remainder(r8));
  crc_generator #(.DATA_W(4), .CRC_W(3), .POLY(3'b011)) dut4 (.dataword(d4), .remainder(r4));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    logic [7:0]  tbl_d[5]  = '{8'd185, 8'd70, 8'd80, 8'd90, 8'd130};
    logic [15:0] tbl_cw[5] = '{16'd47398, 16'd18133, 16'd20663, 16'd23169, 16'd33415};
    foreach (tbl_d[i]) begin
      d8 = tbl_d[i];
      #1;
      check($sformatf("table codeword for %0d", tbl_d[i]), {d8, r8}, tbl_cw[i]);
    end
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v);
      #1;
      check($sformatf("crc8(%0d)", v), r8, crc8_ref(d8));
    end
    d4 = 4'b1101;
    #1;
    check("G=1011 example", r4, 3'b001);
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v);
      #1;
      check($sformatf("G=1011 rem(%0d)", v), r4, 3'(mod2_rem(64'(v) << 3, 7, 64'b1011, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
