// tb_delay_line: random data through the delay line at several delay
// settings, including 0 and the maximum; every output sample must equal the
// input sample 'delay' cycles earlier, kept in a history array here.
module tb_delay_line;
  localparam int W = 5, DEPTH = 256;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [W-1:0]             d, q;
  logic [$clog2(DEPTH)-1:0] delay;

  delay_line #(.W(W), .DEPTH(DEPTH)) dut (.*);

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

  logic [W-1:0] hist [$];   // hist[0] = current input, hist[k] = k cycles ago

  initial begin
    int settings [6] = '{0, 1, 2, 17, 100, 255};
    d = '0; delay = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // after reset, all stages hold zero
    for (int i = 0; i < 300; i++) hist.push_front('0);
    foreach (settings[s]) begin
      delay = 8'(settings[s]);
      for (int i = 0; i < 400; i++) begin
        d = W'($urandom());
        hist.push_front(d);
        if (hist.size() > 300) void'(hist.pop_back());
        #1;
        check(q == hist[settings[s]], $sformatf("delay %0d: q=%h expected %h", settings[s], q, hist[settings[s]]));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
