// tb_kintex_ttcl: the Kintex TTCL logic with trigger, sync and lock flags
// driven directly. A cycle-indexed reference in the testbench decides for
// each local event whether its delayed arrival falls in an acceptance
// window (open in the win_len cycles after a trigger) and what its capture
// timestamp is (a reference counter cleared by sync). Also checks the
// bypass mode and one SPI write and read through a bit-level slave model.
module tb_kintex_ttcl;
  import ttcl_pkg::*;
  localparam int D = 30, L = 20, N = 4000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              trig_flag, sync_flag;
  logic              sclk, cs_n, mosi, miso;
  logic              host_start, host_rw, host_busy, host_done;
  logic [ADDR_W-1:0] host_addr;
  logic [WORD_W-1:0] host_wdata, host_rdata;
  logic [15:0]       win_len;
  logic [7:0]        in_delay;
  logic              require_accept;
  logic              evt_in_valid, evt_out_valid, evt_rejected;
  logic [3:0]        evt_in_ch, evt_out_ch;
  logic [TS_W-1:0]   evt_out_ts, ts;
  logic [31:0]       n_accepted, n_rejected;

  kintex_ttcl #(.HALF_DIV(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // SPI slave model: captures the 24-bit word, answers reads with 16'h5AA5
  logic [23:0] spi_rx;
  logic [15:0] spi_sh;
  int          spi_n;
  always @(negedge cs_n) begin spi_n = 0; miso = 0; end
  always @(posedge sclk) if (!cs_n) begin
    spi_rx = {spi_rx[22:0], mosi}; spi_n++;
    if (spi_n == 8) spi_sh = 16'h5AA5;
  end
  always @(negedge sclk) if (!cs_n && spi_n >= 8) begin
    miso = spi_sh[15]; spi_sh = {spi_sh[14:0], 1'b0};
  end

  bit          trig_h [N];
  bit          evt_h [N];
  logic [3:0]  ch_h [N];
  logic [47:0] ts_h [N];
  int n_acc_ref = 0, n_rej_ref = 0, n_windows = 0;

  initial begin
    logic [47:0] ts_ref;
    bit          e_take, e_valid, have_exp;
    logic [3:0]  e_ch;
    logic [47:0] e_ts;
    trig_flag = 0; sync_flag = 0; miso = 0;
    host_start = 0; host_rw = 0; host_addr = '0; host_wdata = '0;
    win_len = 16'(L); in_delay = 8'(D); require_accept = 1;
    evt_in_valid = 0; evt_in_ch = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);

    ts_ref = ts;
    have_exp = 0;
    for (int c = 0; c < N; c++) begin
      // check the decision made in the previous cycle
      if (have_exp) begin
        check(evt_out_valid == e_take && evt_rejected == (e_valid && !e_take),
              $sformatf("cycle %0d decision valid=%0b exp=%0b", c, evt_out_valid, e_take));
        if (e_take) check(evt_out_ch == e_ch && evt_out_ts == e_ts, $sformatf("cycle %0d record ts %0d exp %0d", c, evt_out_ts, e_ts));
      end
      check(ts == ts_ref, $sformatf("cycle %0d counter", c));
      // stimulus for cycle c
      sync_flag    = (c == 500);
      trig_flag    = ($urandom_range(0, 45) == 0);
      evt_in_valid = ($urandom_range(0, 4) == 0);
      evt_in_ch    = 4'($urandom());
      if (c == 3000) require_accept = 0;
      trig_h[c] = trig_flag; evt_h[c] = evt_in_valid; ch_h[c] = evt_in_ch; ts_h[c] = ts_ref;
      n_windows += int'(trig_flag);
      // reference decision for the event arriving at the validator now
      e_valid = 0; e_take = 0;
      if (c >= D && evt_h[c-D]) begin
        bit open;
        open = 0;
        for (int t = c - L; t <= c - 1; t++) if (t >= 0 && trig_h[t]) open = 1;
        e_valid = 1;
        e_take  = open || !require_accept;
        e_ch    = ch_h[c-D];
        // capture time; an event still in the input delay when a sync
        // clears the counter is stamped in the new count (arrival - delay)
        e_ts    = (c - D < 501 && c >= 501) ? ts_h[c] - 48'(D) : ts_h[c-D];
        n_acc_ref += int'(e_take);
        n_rej_ref += int'(!e_take);
      end
      have_exp = 1;
      @(negedge clk);
      ts_ref = sync_flag ? 48'd0 : ts_ref + 1;
    end
    trig_flag = 0; sync_flag = 0; evt_in_valid = 0;
    @(negedge clk);
    check(n_accepted == 32'(n_acc_ref) && n_rejected == 32'(n_rej_ref),
          $sformatf("counters %0d/%0d expected %0d/%0d", n_accepted, n_rejected, n_acc_ref, n_rej_ref));
    check(n_acc_ref > 50 && n_rej_ref > 50 && n_windows > 20, "windows, accepts and rejects exercised");

    // host register write and read through the SPI master
    host_start = 1; host_rw = 0; host_addr = REG_OFFSET; host_wdata = 16'h0123;
    @(negedge clk); host_start = 0;
    while (!host_done) @(negedge clk);
    check(spi_rx == {1'b0, REG_OFFSET, 16'h0123}, "SPI write word");
    host_start = 1; host_rw = 1; host_addr = REG_ID;
    @(negedge clk); host_start = 0;
    while (!host_done) @(negedge clk);
    check(host_rdata == 16'h5AA5, $sformatf("SPI read %h", host_rdata));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
