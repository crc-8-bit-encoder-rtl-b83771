// crc_checker_tb: self-checking test of the combinational CRC checker.
//
// CRC-8-CCITT instance: the published codewords and every valid codeword
// {d, crc8(d)} must give syndrome 0; every single-bit error on every valid
// codeword must give a non-zero syndrome equal to the reference remainder;
// every error burst of length 2..8 (every pattern) must give a non-zero
// syndrome; random multi-bit corruptions
// must match the reference. A 7-bit instance with G(x) = 1011 must divide
// the example codeword 1101001 with remainder 000 and a corrupted 1101011
// with a non-zero remainder.
module crc_checker_tb;
  import crc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] cw;
  logic [7:0]  syn;
  logic [6:0]  cw7;
  logic [2:0]  syn7;

  crc_checker dut (.codeword(cw), .syndrome(syn));
  crc_checker #(.CW_W(7), .CRC_W(3), .POLY(3'b011)) dut7 (.codeword(cw7), .syndrome(syn7));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] tbl_cw[5] = '{16'd47398, 16'd18133, 16'd20663, 16'd23169, 16'd33415};
    logic [15:0] valid, e;
    foreach (tbl_cw[i]) begin
      cw = tbl_cw[i];
      #1;
      check($sformatf("table codeword %0d", tbl_cw[i]), syn, 0);
    end
    for (int v = 0; v < 256; v++) begin
      valid = {8'(v), crc8_ref(8'(v))};
      cw = valid;
      #1;
      check($sformatf("valid %h", valid), syn, 0);
      for (int b = 0; b < 16; b++) begin
        cw = valid ^ (16'd1 << b);
        #1;
        check($sformatf("1-bit error %h", cw), syn, syn8_ref(cw));
        checks++;
        if (syn == 0) begin
          failures++;
          $display("FAIL undetected single-bit error %h", cw);
        end
      end
      for (int len = 2; len <= 8; len++)
        for (int s = 0; s + len <= 16; s++)
          for (int mid = 0; mid < (1 << (len - 2)); mid++) begin
          // burst of length len starting at bit s: both end bits set,
          // every pattern of the bits between them
          e = 16'(((mid << 1) | 1 | (1 << (len - 1))) << s);
          cw = valid ^ e;
          #1;
          checks++;
          if (syn == 0) begin
            failures++;
            $display("FAIL undetected burst %h on %h", e, valid);
          end
        end
    end
    repeat (2000) begin
      cw = 16'($urandom);
      #1;
      check($sformatf("random %h", cw), syn, syn8_ref(cw));
    end
    cw7 = 7'b1101001;
    #1;
    check("G=1011 example", syn7, 3'b000);
    cw7 = 7'b1101011;
    #1;
    check("G=1011 corrupted", syn7, 3'(mod2_rem(64'b1101011, 7, 64'b1011, 3)));
    checks++;
    if (syn7 == 0) begin
      failures++;
      $display("FAIL corrupted example not detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
