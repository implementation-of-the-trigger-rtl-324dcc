// tb_ttcl_if_fpga: the interface-board firmware fed by a TTCL master model.
// Checks lock, imperative sync (counter cleared), trigger flags at
// accept time + OFFSET + TRIG_DELAY + 2 counter values, late accepts counted,
// a command frame changing TRIG_DELAY, the system timestamp readback, the
// trigger-enable bit, and loss and recovery of lock after a word slip.
// Registers are accessed with the spi_master block as the SPI driver.
module tb_ttcl_if_fpga;
  import ttcl_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [WORD_W-1:0] rx_word;
  logic              rx_valid, pll_locked;
  logic              sclk, cs_n, mosi, miso;
  logic              trig_flag, sync_flag, lock_flag;
  logic [TS_W-1:0]   ts;

  ttcl_master_model #(.LEAD(3)) u_m (.clk, .rst, .word(rx_word), .valid(rx_valid));

  ttcl_if_fpga dut (.*);

  logic              s_start, s_rw, s_busy, s_done;
  logic [ADDR_W-1:0] s_addr;
  logic [WORD_W-1:0] s_wdata, s_rdata;
  spi_master #(.HALF_DIV(4)) u_spi (
    .clk, .rst, .start(s_start), .rw(s_rw), .addr(s_addr), .wdata(s_wdata),
    .busy(s_busy), .done(s_done), .rdata(s_rdata), .sclk, .cs_n, .mosi, .miso
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #3000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic spi(bit r, logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d, output logic [WORD_W-1:0] q);
    @(negedge clk);
    s_start = 1; s_rw = r; s_addr = a; s_wdata = d;
    @(negedge clk);
    s_start = 0;
    while (!s_done) @(negedge clk);
    q = s_rdata;
  endtask
  task automatic wr(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d);
    logic [WORD_W-1:0] q;
    spi(0, a, d, q);
  endtask
  task automatic rd(logic [ADDR_W-1:0] a, output logic [WORD_W-1:0] q);
    spi(1, a, 16'h0, q);
  endtask

  logic [TS_W-1:0] exp_trig [$];
  int n_trig = 0, n_sync = 0;
  bit ts_zero_ok = 1;
  logic sync_q = 0;
  always @(negedge clk) if (!rst) begin
    if (sync_q) ts_zero_ok &= (ts == 0);
    sync_q = sync_flag;
    n_sync += int'(sync_flag);
    if (trig_flag) begin
      n_trig++;
      if (exp_trig.size() == 0) check(0, $sformatf("unexpected trigger at ts %0d", ts));
      else begin
        logic [TS_W-1:0] e;
        e = exp_trig.pop_front();
        check(ts == e, $sformatf("trigger at ts %0d expected %0d", ts, e));
      end
    end
  end

  task automatic wait_idle();
    while (u_m.pending() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
  endtask

  initial begin
    logic [WORD_W-1:0] q;
    logic [TS_W-1:0]   t;
    s_start = 0; s_rw = 0; s_addr = '0; s_wdata = '0; pll_locked = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (40) @(negedge clk);
    check(!lock_flag, "no lock without clock-manager lock");
    pll_locked = 1;
    @(negedge clk);
    check(lock_flag, "locked after alignment");
    rd(REG_ID, q);
    check(q == ID_VALUE, "ID readable");
    rd(REG_STATUS, q);
    check(q == 16'h0003, $sformatf("status %h", q));

    // imperative sync clears the counter
    u_m.push_frame(FT_IMP_SYNC, 16'h0, 16'h0, 16'h0, 16'h0);
    wait_idle();
    check(n_sync == 1, "one sync flag");
    check(ts_zero_ok, "counter zero after sync");
    check(ts < 100, $sformatf("counter restarted, ts=%0d", ts));

    // offset and delay
    wr(REG_OFFSET, 16'd40);
    wr(REG_TRIG_DELAY, 16'd5);
    for (int k = 0; k < 8; k++) begin
      t = ts + 48'd10;
      exp_trig.push_back(t + 48'd40 + 48'd5 + 48'd2);
      u_m.send_ts(FT_TRIG_ACCEPT, t);
      wait_idle();
    end
    repeat (60) @(negedge clk);
    check(n_trig == 8 && exp_trig.size() == 0, $sformatf("triggers %0d", n_trig));

    // late accept
    u_m.send_ts(FT_TRIG_ACCEPT, ts - 48'd100);
    wait_idle();
    rd(REG_LATE_CNT, q);
    check(q == 16'd1, $sformatf("late count %0d", q));

    // command frame sets the trigger delay
    u_m.send_cmd(REG_TRIG_DELAY, 16'd9);
    wait_idle();
    rd(REG_TRIG_DELAY, q);
    check(q == 16'd9, "trig delay set by command frame");
    t = ts + 48'd10;
    exp_trig.push_back(t + 48'd40 + 48'd9 + 48'd2);
    u_m.send_ts(FT_TRIG_ACCEPT, t);
    wait_idle();
    repeat (60) @(negedge clk);
    check(n_trig == 9, "trigger with commanded delay");

    // system timestamp readback
    u_m.send_ts(FT_TIMESTAMP, 48'h0102_0304_0506);
    wait_idle();
    rd(REG_SYS_TS0, q); check(q == 16'h0506, "sys ts lo");
    rd(REG_SYS_TS1, q); check(q == 16'h0304, "sys ts mid");
    rd(REG_SYS_TS2, q); check(q == 16'h0102, "sys ts hi");

    // trigger disabled: accept is counted but fires nothing
    wr(REG_CTRL, 16'h0002);
    u_m.send_ts(FT_TRIG_ACCEPT, ts + 48'd10);
    wait_idle();
    repeat (80) @(negedge clk);
    check(n_trig == 9, "no trigger when disabled");
    rd(REG_ACC_CNT, q);
    check(q == 16'd11, $sformatf("accepts received %0d", q));
    rd(REG_TRIG_CNT, q);
    check(q == 16'd9, $sformatf("triggers counted %0d", q));
    wr(REG_CTRL, 16'h0003);

    // word slip: lock lost, then regained at the next frame-sync frame
    u_m.slip();
    begin
      int lost = 0;
      for (int i = 0; i < 100; i++) begin
        @(negedge clk);
        if (!lock_flag) lost = 1;
      end
      check(lost == 1, "lock lost after slip");
    end
    repeat (60) @(negedge clk);
    check(lock_flag, "lock regained");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
