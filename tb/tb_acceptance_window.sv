// tb_acceptance_window: the window must be open for exactly 'len' cycles
// after a trigger, be restarted by a trigger while open, and stay shut for
// len = 0. A reference countdown in the testbench gives the expected state.
module tb_acceptance_window;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        trig, open_o;
  logic [15:0] len;

  acceptance_window #(.LEN_W(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int open_cycles = 0;

  initial begin
    int remain = 0;
    trig = 0; len = 16'd20;
    repeat (3) @(negedge clk);
    rst = 0;
    // single window, count its cycles
    trig = 1; @(negedge clk); trig = 0;
    for (int i = 0; i < 40; i++) begin
      open_cycles += int'(open_o);
      @(negedge clk);
    end
    check(open_cycles == 20, $sformatf("window length %0d", open_cycles));
    // random triggers and lengths against a reference
    remain = 0;
    for (int i = 0; i < 3000; i++) begin
      trig = ($urandom_range(0, 40) == 0);
      if ($urandom_range(0, 50) == 0) len = 16'($urandom_range(0, 60));
      @(posedge clk);
      if (trig) remain = int'(len); else if (remain > 0) remain--;
      @(negedge clk);
      check(open_o == (remain > 0), $sformatf("cycle %0d open=%0b remain=%0d", i, open_o, remain));
    end
    // len = 0 opens nothing
    trig = 0; repeat (70) @(negedge clk);
    len = 0; trig = 1; @(negedge clk); trig = 0;
    check(!open_o, "len 0 keeps window shut");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
