// tb_trigger_matcher: accepts with offset-adjusted times in the future must
// fire exactly once, in the cycle after the counter equals the adjusted time;
// accepts already in the past must be dropped as late; a full queue must
// drop and flag further accepts; flush must discard queued accepts.
module tb_trigger_matcher;
  localparam int TS_W = 48, OFF_W = 16, DEPTH = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             flush, accept_valid, trig, late, overflow;
  logic [TS_W-1:0]  accept_ts, ts_now;
  logic [OFF_W-1:0] offset;
  logic [$clog2(DEPTH+1)-1:0] level;

  trigger_matcher #(.TS_W(TS_W), .OFF_W(OFF_W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // free-running local time, independent of the DUT
  always @(posedge clk) ts_now <= rst ? 48'd1000 : ts_now + 1;

  logic [TS_W-1:0] expected [$];
  int n_trig = 0, n_late = 0, n_ovf = 0;

  always @(negedge clk) if (!rst) begin
    if (trig) begin
      n_trig++;
      if (expected.size() == 0) check(0, $sformatf("unexpected trigger at %0d", ts_now - 1));
      else check(expected.pop_front() == ts_now - 1, $sformatf("trigger at %0d", ts_now - 1));
    end
    n_late += int'(late);
    n_ovf  += int'(overflow);
  end

  task automatic accept(logic [TS_W-1:0] t);
    @(negedge clk);
    accept_valid = 1; accept_ts = t;
    @(negedge clk);
    accept_valid = 0;
  endtask

  initial begin
    logic [TS_W-1:0] last;
    flush = 0; accept_valid = 0; accept_ts = '0; offset = 16'd10;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);

    // A: a stream of future accepts
    last = ts_now;
    for (int k = 0; k < 60; k++) begin
      logic [TS_W-1:0] t;
      t = ts_now + 48'($urandom_range(0, 6));
      if (t <= last) t = last + 1;
      last = t;
      expected.push_back(t + 48'(offset));
      accept(t);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(expected.size() == 0, "all stream accepts fired");
    check(n_trig == 60, $sformatf("stream triggers %0d", n_trig));
    check(n_late == 0 && n_ovf == 0, "no late or overflow in stream");

    // B: late accepts (adjusted time already passed)
    offset = 16'd3;
    accept(ts_now - 48'd50);
    accept(ts_now - 48'd4);
    repeat (5) @(negedge clk);
    check(n_late == 2, $sformatf("late count %0d", n_late));
    check(n_trig == 60, "late accepts do not trigger");

    // C: overflow - 20 accepts far ahead, only DEPTH are kept
    offset = 16'd500;
    last = ts_now;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      accept_valid = 1; accept_ts = last + 48'(k);
      if (k < DEPTH) expected.push_back(last + 48'(k) + 48'(offset));
    end
    @(negedge clk);
    accept_valid = 0;
    @(negedge clk);
    check(n_ovf == 4, $sformatf("overflow count %0d", n_ovf));
    check(level == DEPTH, "queue full");
    repeat (600) @(negedge clk);
    check(expected.size() == 0, "queued accepts fired after overflow");
    check(n_trig == 60 + DEPTH, $sformatf("triggers after overflow %0d", n_trig));

    // D: flush discards pending accepts
    offset = 16'd0;
    accept(ts_now + 48'd100);
    accept(ts_now + 48'd120);
    check(level == 2, "two pending before flush");
    @(negedge clk); flush = 1;
    @(negedge clk); flush = 0;
    check(level == 0, "flush empties queue");
    repeat (150) @(negedge clk);
    check(n_trig == 60 + DEPTH, "no trigger after flush");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
