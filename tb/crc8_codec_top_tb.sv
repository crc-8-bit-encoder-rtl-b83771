// crc8_codec_top_tb: end-to-end test of encoder, link and decoder.
//
// The top has no parameters, so this runs the design at its full size.
// First the published stream (185, 70, 80, 90, 130) is sent over a clean
// link and must come out unchanged, two clock edges after it went in, with
// remainder 0 and the published codewords on codeword_tx. Then random bytes
// are sent, with resets now and then and a corrupting error mask on about
// one cycle in three. A cycle-level reference model predicts codeword_tx,
// data_out and remaind every cycle. The test counts how often each
// mechanism happened: reset, a codeword accepted, a codeword discarded on
// error, and a single-bit error caught; any of them that never happened
// counts as a failure.
module crc8_codec_top_tb;
  import crc_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_reset = 0, n_accept = 0, n_discard = 0, n_single = 0;

  logic        clk = 0;
  logic        rst;
  logic [7:0]  data_in;
  logic [15:0] err_mask;
  logic [15:0] codeword_tx;
  logic [7:0]  data_out;
  logic [7:0]  remaind;

  // reference pipeline state
  logic [15:0] m_cw = 0;
  logic [7:0]  m_data = 0, m_rem = 0;

  crc8_codec_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One clock cycle: apply inputs at the falling edge, advance the model at
  // the rising edge and compare.
  task automatic cycle(logic r, logic [7:0] d, logic [15:0] e);
    logic [15:0] rx;
    @(negedge clk);
    rst      = r;
    data_in  = d;
    err_mask = e;
    rx = m_cw ^ e;
    @(posedge clk);
    if (r) begin
      m_cw = 0; m_data = 0; m_rem = 0;
      n_reset++;
    end else begin
      m_rem  = syn8_ref(rx);
      m_data = (m_rem == 0) ? rx[15:8] : 8'd0;
      m_cw   = {d, crc8_ref(d)};
      if (m_rem == 0) n_accept++;
      else            n_discard++;
      if (m_rem != 0 && $countones(e) == 1) n_single++;
    end
    #1;
    check("codeword_tx", codeword_tx, m_cw);
    check("data_out", 16'(data_out), 16'(m_data));
    check("remaind", 16'(remaind), 16'(m_rem));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  stream[5] = '{8'd185, 8'd70, 8'd80, 8'd90, 8'd130};
    logic [15:0] cws[5]    = '{16'd47398, 16'd18133, 16'd20663, 16'd23169, 16'd33415};
    rst = 1; data_in = 0; err_mask = 0;
    cycle(1, 8'd0, 16'd0);
    // published stream, checked against the published values directly
    for (int i = 0; i < 7; i++) begin
      cycle(0, (i < 5) ? stream[i] : 8'd0, 16'd0);
      if (i < 5) check($sformatf("published codeword %0d", i), codeword_tx, cws[i]);
      if (i >= 1 && i <= 5) begin
        check($sformatf("stream out %0d", i - 1), 16'(data_out), 16'(stream[i - 1]));
        check("stream remaind", 16'(remaind), 0);
      end
    end
    for (int k = 0; k < 4000; k++) begin
      logic        r;
      logic [15:0] e;
      r = ($urandom % 50) == 0;
      case ($urandom % 6)
        0:       e = 16'd1 << ($urandom % 16);
        1:       e = 16'($urandom);
        default: e = 16'd0;
      endcase
      cycle(r, 8'($urandom), e);
    end
    $display("reset %0d accept %0d discard %0d single-bit caught %0d",
             n_reset, n_accept, n_discard, n_single);
    checks++;
    if (n_reset == 0 || n_accept == 0 || n_discard == 0 || n_single == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
