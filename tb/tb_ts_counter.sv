// tb_ts_counter: the counter advances by one per clock, clears on sync in
// the same edge, and two counters cleared by one sync stay equal even when
// they started from different values.
module tb_ts_counter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic            sync;
  logic [47:0]     ts_a, ts_b;
  logic [11:0]     ts_small;

  ts_counter #(.TS_W(48)) dut_a (.clk, .rst, .sync, .ts(ts_a));
  ts_counter #(.TS_W(48)) dut_b (.clk, .rst(1'b0), .sync, .ts(ts_b));
  ts_counter #(.TS_W(12)) dut_w (.clk, .rst, .sync(1'b0), .ts(ts_small));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [47:0] model;
    sync = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    check(ts_a == 0, "zero after reset");
    model = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); model++;
      check(ts_a == model, $sformatf("count %0d vs %0d", ts_a, model));
    end
    // sync clears both counters in the same edge
    sync = 1;
    @(negedge clk);
    sync = 0;
    check(ts_a == 0 && ts_b == 0, "cleared by sync");
    model = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk); model++;
      check(ts_a == model && ts_b == model, "counting after sync, both equal");
    end
    // 12-bit counter wraps after 4096 counts
    check(ts_small == 12'(5000 + 100 + 1), $sformatf("12-bit wrap %0d", ts_small));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
