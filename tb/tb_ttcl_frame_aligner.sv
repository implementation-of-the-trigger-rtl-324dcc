// tb_ttcl_frame_aligner: checks acquisition, position tracking, loss and
// re-acquisition of frame alignment.
//
// The stimulus is a word queue built here; the expected position of every
// word is known from how the queue was built (tagged in a parallel queue),
// so each output word is compared with its own expected position.
module tb_ttcl_frame_aligner;
  import ttcl_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [WORD_W-1:0] rx_word, word;
  logic              rx_valid;
  logic [POS_W-1:0]  pos;
  logic              word_valid, aligned;

  ttcl_frame_aligner #(.MISS_LIMIT(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [WORD_W-1:0] sq [$];
  int                sp [$];     // expected position, -1 = not part of a frame

  task automatic frame(frame_type_e t);
    sq.push_back(header(t)); sp.push_back(0);
    for (int i = 1; i < 5; i++) begin sq.push_back(16'(t) * 16'h11 + 16'(i)); sp.push_back(i); end
  endtask

  int acquired = 0, lost = 0;
  logic aligned_q;

  initial begin
    #201;
    forever #2000000 begin
      failures++; $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
    end
  end

  initial begin
    int exp_pos;
    bit slipped = 0;
    rx_word = '0; rx_valid = 0;
    // garbage, then idle frames (not hunted), then a frame sync
    for (int i = 0; i < 3; i++) begin sq.push_back(16'h0BC2); sp.push_back(-1); end
    frame(FT_IDLE); frame(FT_IDLE);
    frame(FT_FRAME_SYNC);
    for (int i = 0; i < 6; i++) frame(i % 2 ? FT_TRIG_ACCEPT : FT_IDLE);
    // slip by one word: headers now fall on the wrong position
    sq.push_back(16'h0000); sp.push_back(-2);
    for (int i = 0; i < 5; i++) frame(FT_IDLE);
    frame(FT_FRAME_SYNC);
    for (int i = 0; i < 3; i++) frame(FT_TIMESTAMP);

    repeat (3) @(posedge clk);
    rst <= 0;
    aligned_q = 0;
    while (sq.size() > 0) begin
      @(negedge clk);
      // occasional stall cycle
      if ($urandom_range(0, 6) == 0) begin
        rx_valid = 0;
        @(negedge clk);
      end
      rx_word  = sq.pop_front();
      exp_pos  = sp.pop_front();
      rx_valid = 1;
      @(posedge clk); #1;
      rx_valid = 0;
      if (aligned && !aligned_q) acquired++;
      if (!aligned && aligned_q) lost++;
      if (exp_pos == -2) slipped = 1;
      if (acquired == 2) slipped = 0;
      if (aligned && !slipped && exp_pos >= 0) begin
        check(word_valid, "word_valid while aligned");
        check(exp_pos == 32'(pos), $sformatf("pos %0d expected %0d", pos, exp_pos));
        check(word == rx_word, "word passed through");
      end
      if (!aligned) check(!word_valid, "no word_valid while hunting");
      aligned_q = aligned;
    end
    check(acquired == 2, $sformatf("alignment acquired %0d times, expected 2", acquired));
    check(lost == 1, $sformatf("alignment lost %0d times, expected 1", lost));
    check(aligned, "aligned at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
