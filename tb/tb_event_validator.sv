// tb_event_validator: events inside the window are recorded with the
// capture time (counter minus input delay) and channel; events outside are
// rejected; with require_accept low everything is recorded; counters agree.
module tb_event_validator;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        evt_valid, window_open, require_accept, out_valid, rejected;
  logic [3:0]  evt_ch, out_ch;
  logic [47:0] ts_now, out_ts;
  logic [7:0]  in_delay;
  logic [31:0] n_accepted, n_rejected;

  event_validator #(.CH_W(4), .TS_W(48), .DLY_W(8), .CNT_W(32)) dut (.*);

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

  initial begin
    int acc = 0, rej = 0;
    bit  e_take, e_rej;
    logic [3:0]  e_ch;
    logic [47:0] e_ts;
    evt_valid = 0; window_open = 0; require_accept = 1; evt_ch = 0;
    ts_now = 48'd5000; in_delay = 8'd30;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      evt_valid   = ($urandom_range(0, 2) == 0);
      evt_ch      = 4'($urandom());
      window_open = ($urandom_range(0, 1) == 0);
      if (i == 1000) require_accept = 0;
      if (i % 300 == 0) in_delay = 8'($urandom());
      ts_now = ts_now + 1;
      e_take = evt_valid && (window_open || !require_accept);
      e_rej  = evt_valid && !e_take;
      e_ch   = evt_ch;
      e_ts   = ts_now - 48'(in_delay);
      @(posedge clk); #1;
      acc += int'(e_take); rej += int'(e_rej);
      check(out_valid == e_take && rejected == e_rej, $sformatf("event %0d decision", i));
      if (e_take) check(out_ch == e_ch && out_ts == e_ts, $sformatf("event %0d record", i));
      @(negedge clk);
    end
    check(n_accepted == 32'(acc) && n_rejected == 32'(rej), "counters");
    check(acc > 100 && rej > 100, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
