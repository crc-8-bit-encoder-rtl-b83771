// crc8_decoder_tb: self-checking test of the registered CRC-8-CCITT decoder.
//
// Replays the published sequence: reset with codeword 47398 (data 0), 47398
// (data 185), reset with codeword 0 (data 0), then 18133, 20663, 23169,
// 33415 (data 70, 80, 90, 130), remainder 0 throughout. Outputs are checked
// right after the rising edge that follows each input change, and must not
// change before it (one-edge latency). Then random traffic: valid codewords
// must give their dataword and remainder 0; corrupted ones (random error
// masks, including every single-bit error) must give data 0 and the
// reference remainder, which must be non-zero for single-bit errors.
module crc8_decoder_tb;
  import crc_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_accept = 0, n_discard = 0;

  logic        clk = 0;
  logic        rst;
  logic [15:0] codeword;
  logic [7:0]  data;
  logic [7:0]  remaind;

  logic [7:0]  prev_data = 0, prev_rem = 0;

  crc8_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step(logic r, logic [15:0] cw, logic [7:0] exp_data, logic [7:0] exp_rem);
    @(negedge clk);
    rst      = r;
    codeword = cw;
    #4;
    check("data before edge", 16'(data), 16'(prev_data));
    check("remaind before edge", 16'(remaind), 16'(prev_rem));
    @(posedge clk);
    #1;
    check($sformatf("data rst=%0b cw=%h", r, cw), 16'(data), 16'(exp_data));
    check($sformatf("remaind rst=%0b cw=%h", r, cw), 16'(remaind), 16'(exp_rem));
    prev_data = exp_data;
    prev_rem  = exp_rem;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst      = 1;
    codeword = 0;
    @(posedge clk);
    #1;
    check("initial reset data", 16'(data), 0);
    check("initial reset remaind", 16'(remaind), 0);
    step(1, 16'd47398, 8'd0,   8'd0);
    step(0, 16'd47398, 8'd185, 8'd0);
    step(1, 16'd0,     8'd0,   8'd0);
    step(0, 16'd18133, 8'd70,  8'd0);
    step(0, 16'd20663, 8'd80,  8'd0);
    step(0, 16'd23169, 8'd90,  8'd0);
    step(0, 16'd33415, 8'd130, 8'd0);
    // every single-bit error on one published codeword
    for (int b = 0; b < 16; b++) begin
      logic [15:0] cw;
      cw = 16'd47398 ^ (16'd1 << b);
      checks++;
      if (syn8_ref(cw) == 0) begin
        failures++;
        $display("FAIL reference misses bit %0d", b);
      end
      step(0, cw, 8'd0, syn8_ref(cw));
      n_discard++;
    end
    repeat (600) begin
      logic [7:0]  d;
      logic [15:0] cw, e;
      d  = 8'($urandom);
      cw = {d, crc8_ref(d)};
      e  = ($urandom % 2) ? 16'($urandom) : 16'd0;
      cw = cw ^ e;
      if (syn8_ref(cw) == 0) begin
        step(0, cw, cw[15:8], 8'd0);
        n_accept++;
      end else begin
        step(0, cw, 8'd0, syn8_ref(cw));
        n_discard++;
      end
    end
    checks++;
    if (n_accept == 0 || n_discard == 0) begin
      failures++;
      $display("FAIL accept %0d discard %0d", n_accept, n_discard);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
