// crc8_encoder_tb: self-checking test of the registered CRC-8-CCITT encoder.
//
// Replays the published sequence: reset with data 185 (codeword 0), data 185
// (codeword 47398), reset with data 70 (0), then 70, 80, 90, 130 (18133,
// 20663, 23169, 33415). Inputs change half a cycle before a rising edge and
// each codeword is checked right after that edge, which also checks the
// one-edge latency; the codeword must not have changed before the edge.
// Then 300 random bytes, with random resets, against a reference division.
module crc8_encoder_tb;
  import crc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0;
  logic        rst;
  logic [7:0]  data;
  logic [15:0] codeword;

  crc8_encoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Apply inputs on the falling edge; check the codeword after the next
  // rising edge. Just before that edge the codeword must still hold `prev`.
  task automatic step(logic r, logic [7:0] d, logic [15:0] exp, logic [15:0] prev);
    @(negedge clk);
    rst  = r;
    data = d;
    #4;
    check("before edge", codeword, prev);
    @(posedge clk);
    #1;
    check($sformatf("rst=%0b data=%0d", r, d), codeword, exp);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] prev;
    rst  = 1;
    data = 0;
    @(posedge clk);
    #1;
    check("initial reset", codeword, 0);
    step(1, 8'd185, 16'd0,     16'd0);
    step(0, 8'd185, 16'd47398, 16'd0);
    step(1, 8'd70,  16'd0,     16'd47398);
    step(0, 8'd70,  16'd18133, 16'd0);
    step(0, 8'd80,  16'd20663, 16'd18133);
    step(0, 8'd90,  16'd23169, 16'd20663);
    step(0, 8'd130, 16'd33415, 16'd23169);
    step(0, 8'd130, 16'd33415, 16'd33415);
    prev = 16'd33415;
    repeat (300) begin
      logic       r;
      logic [7:0] d;
      logic [15:0] exp;
      r   = ($urandom % 10) == 0;
      d   = 8'($urandom);
      exp = r ? 16'd0 : {d, crc8_ref(d)};
      step(r, d, exp, prev);
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
