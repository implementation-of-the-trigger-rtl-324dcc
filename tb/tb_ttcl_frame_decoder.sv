// tb_ttcl_frame_decoder: drives aligned frames of every type into the decoder
// and checks the decoded pulses, timestamps and commands, their one-cycle
// latency after the last word, and that broken or unmarked frames are ignored.
module tb_ttcl_frame_decoder;
  import ttcl_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [WORD_W-1:0] word;
  logic [POS_W-1:0]  pos;
  logic              word_valid;
  logic              imp_sync, accept_valid, cmd_valid, frame_valid;
  logic [TS_W-1:0]   accept_ts, sys_ts;
  logic [ADDR_W-1:0] cmd_addr;
  logic [WORD_W-1:0] cmd_data;
  frame_t            frame;

  ttcl_frame_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // counts of output pulses
  int n_sync = 0, n_acc = 0, n_cmd = 0, n_frame = 0;
  always @(posedge clk) if (!rst) begin
    n_sync  += int'(imp_sync);
    n_acc   += int'(accept_valid);
    n_cmd   += int'(cmd_valid);
    n_frame += int'(frame_valid);
  end

  task automatic send(logic [WORD_W-1:0] w [5], int break_at = -1);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      word = w[i]; pos = POS_W'(i); word_valid = (i != break_at);
    end
    @(negedge clk);
    word_valid = 0;
  endtask

  task automatic expect_after(string what, bit s, bit a, bit c);
    // outputs appear in the cycle after the last word: sampled here at the
    // negedge following that posedge
    check(imp_sync == s && accept_valid == a && cmd_valid == c,
          $sformatf("%s: sync=%0b acc=%0b cmd=%0b", what, imp_sync, accept_valid, cmd_valid));
    @(negedge clk);
    check(!imp_sync && !accept_valid && !cmd_valid, {what, ": single-cycle pulse"});
  endtask

  initial begin
    logic [WORD_W-1:0] w [5];
    logic [TS_W-1:0]   t;
    word = '0; pos = '0; word_valid = 0;
    repeat (3) @(posedge clk);
    rst = 0;

    // trigger accept
    t = 48'h1234_5678_9ABC;
    w = '{header(FT_TRIG_ACCEPT), t[47:32], t[31:16], t[15:0], 16'h0};
    send(w);
    expect_after("accept", 0, 1, 0);
    check(accept_ts == t, $sformatf("accept_ts %h", accept_ts));

    // imperative sync
    w = '{header(FT_IMP_SYNC), 16'h0, 16'h0, 16'h0, 16'h0};
    send(w);
    expect_after("imp sync", 1, 0, 0);

    // system timestamp
    t = 48'hFEDC_BA98_7654;
    w = '{header(FT_TIMESTAMP), t[47:32], t[31:16], t[15:0], 16'h0};
    send(w);
    expect_after("timestamp", 0, 0, 0);
    check(sys_ts == t, $sformatf("sys_ts %h", sys_ts));

    // command
    w = '{header(FT_COMMAND), 16'h0002, 16'hBEEF, 16'h0, 16'h0};
    send(w);
    expect_after("command", 0, 0, 1);
    check(cmd_addr == 7'h02 && cmd_data == 16'hBEEF, "command fields");

    // idle and frame sync: nothing
    w = '{header(FT_IDLE), 16'h0, 16'h0, 16'h0, 16'h0};
    send(w);
    expect_after("idle", 0, 0, 0);
    w = '{header(FT_FRAME_SYNC), SYNC_FILL, SYNC_FILL, SYNC_FILL, SYNC_FILL};
    send(w);
    expect_after("frame sync", 0, 0, 0);

    // broken accept frame (word 2 missing) and one without marker: nothing
    t = 48'h0000_0000_0042;
    w = '{header(FT_TRIG_ACCEPT), t[47:32], t[31:16], t[15:0], 16'h0};
    send(w, 2);
    expect_after("broken frame", 0, 0, 0);
    w = '{16'h0004, t[47:32], t[31:16], t[15:0], 16'h0};
    send(w);
    expect_after("unmarked frame", 0, 0, 0);

    // back-to-back random accepts
    for (int k = 0; k < 20; k++) begin
      t = {$urandom(), $urandom()};
      w = '{header(FT_TRIG_ACCEPT), t[47:32], t[31:16], t[15:0], 16'(k)};
      send(w);
      expect_after("random accept", 0, 1, 0);
      check(accept_ts == t, "random accept_ts");
    end

    check(n_sync == 1 && n_cmd == 1 && n_acc == 21, $sformatf("pulse counts %0d %0d %0d", n_sync, n_cmd, n_acc));
    check(n_frame == 26, $sformatf("frames decoded %0d", n_frame));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
