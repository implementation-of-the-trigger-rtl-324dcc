// tb_two_unit_timestamp_sync: the two-unit timestamp comparison. A pulser
// signal is split to both units; 100 pulses at random intervals are
// recorded by each unit and the timestamp difference between the units must
// be zero for every pulse, with every stamp equal to the counter value at
// the pulse. The master distributes an imperative sync first, and each unit
// validates its events against the master's trigger accepts for the pulse
// times, so the whole chain (sync, accept, offset, delay, window, input
// delay) is used for every pulse. Default parameters throughout.
module tb_two_unit_timestamp_sync;
  import ttcl_pkg::*;
  localparam int NU = 2, NPULSE = 100;
  localparam int OFFSET = 40, TDLY = 0, WIN = 8, INDLY = 46;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [WORD_W-1:0]         m_word;
  logic                      m_valid;
  logic [NU-1:0][WORD_W-1:0] rx_word;
  logic [NU-1:0]             rx_valid, pll_locked;
  logic [NU-1:0]             host_start, host_rw, host_busy, host_done;
  logic [NU-1:0][ADDR_W-1:0] host_addr;
  logic [NU-1:0][WORD_W-1:0] host_wdata, host_rdata;
  logic [NU-1:0][15:0]       win_len;
  logic [NU-1:0][7:0]        in_delay;
  logic [NU-1:0]             require_accept;
  logic [NU-1:0]             evt_in_valid, evt_out_valid, evt_rejected;
  logic [NU-1:0][3:0]        evt_in_ch, evt_out_ch;
  logic [NU-1:0][TS_W-1:0]   evt_out_ts, ts;
  logic [NU-1:0]             trig_flag, sync_flag, lock_flag;

  ttcl_master_model #(.LEAD(4)) u_m (.clk, .rst, .word(m_word), .valid(m_valid));
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

  logic [TS_W-1:0] pulse_ts [$];
  logic [TS_W-1:0] rec [NU][$];
  always @(negedge clk) if (!rst)
    for (int u = 0; u < NU; u++) if (evt_out_valid[u]) rec[u].push_back(evt_out_ts[u]);

  task automatic host_wr(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d);
    @(negedge clk);
    host_start = '1; host_rw = '0; host_addr = {NU{a}}; host_wdata = {NU{d}};
    @(negedge clk);
    host_start = '0;
    while (!host_done[0]) @(negedge clk);
  endtask

  initial begin
    host_start = '0; host_rw = '0; host_addr = '0; host_wdata = '0;
    pll_locked = '1; win_len = {NU{16'(WIN)}}; in_delay = {NU{8'(INDLY)}};
    require_accept = '1; evt_in_valid = '0; evt_in_ch = {NU{4'd13}};
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (40) @(negedge clk);
    host_wr(REG_OFFSET, 16'(OFFSET));
    host_wr(REG_TRIG_DELAY, 16'(TDLY));
    u_m.push_frame(FT_IMP_SYNC, 16'h0, 16'h0, 16'h0, 16'h0);
    while (u_m.pending() > 0) @(negedge clk);
    repeat (10) @(negedge clk);

    for (int k = 0; k < NPULSE; k++) begin
      @(negedge clk);
      pulse_ts.push_back(ts[0]);
      evt_in_valid = '1;
      u_m.send_ts(FT_TRIG_ACCEPT, ts[0]);
      @(negedge clk);
      evt_in_valid = '0;
      repeat ($urandom_range(INDLY + WIN + 10, 200)) @(negedge clk);
    end
    repeat (300) @(negedge clk);

    check(rec[0].size() == NPULSE && rec[1].size() == NPULSE,
          $sformatf("pulses recorded %0d / %0d of %0d", rec[0].size(), rec[1].size(), NPULSE));
    for (int k = 0; k < NPULSE && k < rec[0].size() && k < rec[1].size(); k++) begin
      check(rec[0][k] == rec[1][k], $sformatf("pulse %0d: delta TS = %0d", k, rec[0][k] - rec[1][k]));
      check(rec[0][k] == pulse_ts[k], $sformatf("pulse %0d: stamp %0d expected %0d", k, rec[0][k], pulse_ts[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
