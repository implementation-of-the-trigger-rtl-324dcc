// tb_pixie_ttcl_top: end-to-end run of the two-unit design at its default
// parameters. One TTCL master model feeds both units' links, as a master
// fans out to every receiver. The host programs both interface boards over
// SPI; an imperative sync aligns all counters; local events are given to
// both units in the same cycle (a split pulser) and the master accepts some
// of them. Accepted events must come out of both units with the capture
// timestamp and with equal timestamps in both units; events without an
// accept must be rejected. Every mechanism is counted and must occur:
// lock, imperative sync, trigger accept/flag, trigger delay, late accept,
// command frame, system timestamp frame, SPI write and read, acceptance
// window, input delay, accepted and rejected events, lock loss and recovery.
module tb_pixie_ttcl_top;
  import ttcl_pkg::*;
  localparam int NU = 2;
  localparam int OFFSET = 60, TDLY = 4, WIN = 16, INDLY = 70;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [WORD_W-1:0]               m_word;
  logic                            m_valid;
  logic [NU-1:0][WORD_W-1:0]       rx_word;
  logic [NU-1:0]                   rx_valid, pll_locked;
  logic [NU-1:0]                   host_start, host_rw, host_busy, host_done;
  logic [NU-1:0][ADDR_W-1:0]       host_addr;
  logic [NU-1:0][WORD_W-1:0]       host_wdata, host_rdata;
  logic [NU-1:0][15:0]             win_len;
  logic [NU-1:0][7:0]              in_delay;
  logic [NU-1:0]                   require_accept;
  logic [NU-1:0]                   evt_in_valid, evt_out_valid, evt_rejected;
  logic [NU-1:0][3:0]              evt_in_ch, evt_out_ch;
  logic [NU-1:0][TS_W-1:0]         evt_out_ts, ts;
  logic [NU-1:0]                   trig_flag, sync_flag, lock_flag;

  ttcl_master_model #(.LEAD(2)) u_m (.clk, .rst, .word(m_word), .valid(m_valid));
  assign rx_word  = {NU{m_word}};
  assign rx_valid = {NU{m_valid}};

  pixie_ttcl_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int c_lock = 0, c_lock_lost = 0, c_sync = 0, c_trig = 0, c_late = 0, c_cmd = 0,
      c_systs = 0, c_spi_wr = 0, c_spi_rd = 0, c_window = 0, c_indly = 0,
      c_acc = 0, c_rej = 0, c_tdly = 0;

  logic [NU-1:0] lock_q = '0;
  always @(negedge clk) if (!rst) begin
    for (int u = 0; u < NU; u++) begin
      if (lock_flag[u] && !lock_q[u]) c_lock++;
      if (!lock_flag[u] && lock_q[u]) c_lock_lost++;
    end
    c_window += int'(dut.g_unit[0].u_kintex.win_open) + int'(dut.g_unit[1].u_kintex.win_open);
    lock_q = lock_flag;
    c_sync += int'(sync_flag[0]);
    c_trig += int'(trig_flag[0]);
    check(ts[0] == ts[1], "unit counters equal");
  end

  // expected accepted events, per unit
  logic [TS_W-1:0] exp_ts [NU][$];
  logic [3:0]      exp_ch [NU][$];
  always @(negedge clk) if (!rst) begin
    for (int u = 0; u < NU; u++) begin
      if (evt_out_valid[u]) begin
        c_acc++;
        if (exp_ts[u].size() == 0) check(0, $sformatf("unit %0d unexpected event", u));
        else begin
          logic [TS_W-1:0] et;
          logic [3:0]      ec;
          et = exp_ts[u].pop_front(); ec = exp_ch[u].pop_front();
          check(evt_out_ts[u] == et && evt_out_ch[u] == ec,
                $sformatf("unit %0d event ts %0d ch %0d expected %0d %0d", u, evt_out_ts[u], evt_out_ch[u], et, ec));
        end
      end
      c_rej += int'(evt_rejected[u]);
    end
    if (evt_out_valid[0] && evt_out_valid[1])
      check(evt_out_ts[0] == evt_out_ts[1], "both units stamp the split pulse alike");
  end

  task automatic host(bit r, logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d);
    @(negedge clk);
    host_start = '1; host_rw = {NU{r}}; host_addr = {NU{a}}; host_wdata = {NU{d}};
    @(negedge clk);
    host_start = '0;
    while (!host_done[0]) @(negedge clk);
    if (r) c_spi_rd++; else c_spi_wr++;
  endtask

  task automatic wait_idle();
    while (u_m.pending() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
  endtask

  initial begin
    int n_late_exp = 0;
    host_start = '0; host_rw = '0; host_addr = '0; host_wdata = '0;
    pll_locked = '1; win_len = {NU{16'(WIN)}}; in_delay = {NU{8'(INDLY)}};
    require_accept = '1; evt_in_valid = '0; evt_in_ch = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (40) @(negedge clk);
    check(&lock_flag, "both units locked");

    host(1, REG_ID, 16'h0);
    check(host_rdata[0] == ID_VALUE && host_rdata[1] == ID_VALUE, "ID read from both boards");
    host(0, REG_OFFSET, 16'(OFFSET));
    host(0, REG_TRIG_DELAY, 16'(TDLY));
    host(1, REG_OFFSET, 16'h0);
    check(host_rdata[0] == 16'(OFFSET) && host_rdata[1] == 16'(OFFSET), "offset read back");

    u_m.push_frame(FT_IMP_SYNC, 16'h0, 16'h0, 16'h0, 16'h0);
    wait_idle();
    check(c_sync == 1 && ts[0] < 40, "imperative sync cleared counters");

    // events: every other one accepted by the master
    for (int k = 0; k < 24; k++) begin
      logic [TS_W-1:0] tev;
      bit acc;
      acc = (k % 2 == 0);
      @(negedge clk);
      tev = ts[0];
      evt_in_valid = '1; evt_in_ch = {NU{4'(k)}};
      @(negedge clk);
      evt_in_valid = '0;
      if (acc) begin
        for (int u = 0; u < NU; u++) begin exp_ts[u].push_back(tev); exp_ch[u].push_back(4'(k)); end
        u_m.send_ts(FT_TRIG_ACCEPT, tev);
      end
      repeat (INDLY + WIN + 40) @(negedge clk);
    end
    wait_idle();
    repeat (100) @(negedge clk);
    check(exp_ts[0].size() == 0 && exp_ts[1].size() == 0, "all accepted events recorded");
    check(c_trig == 12, $sformatf("trigger flags %0d", c_trig));
    if (c_acc > 0) c_indly++;
    if (c_trig > 0) c_tdly++;

    // late accept
    u_m.send_ts(FT_TRIG_ACCEPT, ts[0] - 48'd300);
    wait_idle();
    host(1, REG_LATE_CNT, 16'h0);
    c_late = int'(host_rdata[0]);
    check(host_rdata[0] == 16'd1 && host_rdata[1] == 16'd1, "late accept counted on both boards");

    // command frame changes the trigger delay everywhere at once
    u_m.send_cmd(REG_TRIG_DELAY, 16'd7);
    wait_idle();
    host(1, REG_TRIG_DELAY, 16'h0);
    check(host_rdata[0] == 16'd7 && host_rdata[1] == 16'd7, "command frame applied on both boards");
    if (host_rdata[0] == 16'd7) c_cmd++;

    // system timestamp distribution
    u_m.send_ts(FT_TIMESTAMP, 48'h0000_1111_2222);
    wait_idle();
    host(1, REG_SYS_TS0, 16'h0);
    check(host_rdata[0] == 16'h2222, "system timestamp captured");
    if (host_rdata[0] == 16'h2222) c_systs++;

    // link slip: lock lost and regained
    u_m.slip();
    repeat (150) @(negedge clk);
    check(&lock_flag, "lock regained after slip");

    check(c_lock >= 2,      $sformatf("lock acquired %0d", c_lock));
    check(c_lock_lost >= 2, $sformatf("lock lost %0d", c_lock_lost));
    check(c_sync >= 1,      "imperative sync happened");
    check(c_trig >= 1,      "trigger flag happened");
    check(c_tdly >= 1,      "trigger delay used");
    check(c_late >= 1,      "late accept happened");
    check(c_cmd >= 1,       "command frame happened");
    check(c_systs >= 1,     "system timestamp frame happened");
    check(c_spi_wr >= 1,    "SPI write happened");
    check(c_spi_rd >= 1,    "SPI read happened");
    check(c_window >= 1,    "acceptance window opened");
    check(c_indly >= 1,     "input delay used");
    check(c_acc >= 1,       "events accepted");
    check(c_rej >= 1,       "events rejected");
    $display("mechanisms: lock=%0d lost=%0d sync=%0d trig=%0d late=%0d cmd=%0d systs=%0d spi_wr=%0d spi_rd=%0d window_cycles=%0d accepted=%0d rejected=%0d",
             c_lock, c_lock_lost, c_sync, c_trig, c_late, c_cmd, c_systs, c_spi_wr, c_spi_rd, c_window, c_acc, c_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
