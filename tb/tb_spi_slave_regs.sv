// tb_spi_slave_regs: a bit-banged SPI mode-0 master in the testbench writes
// and reads the interface registers; checks write/readback, read-only
// status and timestamp words, ignored writes, command-frame writes and the
// command-over-SPI priority when both hit one register in the same cycle.
module tb_spi_slave_regs;
  import ttcl_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              sclk, cs_n, mosi, miso;
  logic              cmd_valid;
  logic [ADDR_W-1:0] cmd_addr;
  logic [WORD_W-1:0] cmd_data;
  logic [WORD_W-1:0] status, late_cnt, trig_cnt, acc_cnt;
  logic [TS_W-1:0]   sys_ts;
  logic [WORD_W-1:0] ctrl, offset, trig_delay;

  spi_slave_regs dut (.*);

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

  localparam int HALF = 8;

  task automatic xfer(bit rd, logic [ADDR_W-1:0] a, logic [WORD_W-1:0] wd, output logic [WORD_W-1:0] rdv);
    logic [23:0] sh;
    sh = {rd, a, wd};
    rdv = '0;
    cs_n = 0;
    for (int b = 23; b >= 0; b--) begin
      mosi = sh[b];
      repeat (HALF) @(negedge clk);
      sclk = 1;
      if (b < 16) rdv = {rdv[14:0], miso};
      repeat (HALF) @(negedge clk);
      sclk = 0;
    end
    repeat (HALF) @(negedge clk);
    cs_n = 1;
    repeat (2 * HALF) @(negedge clk);
  endtask

  task automatic wr(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d);
    logic [WORD_W-1:0] dummy;
    xfer(0, a, d, dummy);
  endtask

  task automatic rd_check(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] e, string what);
    logic [WORD_W-1:0] v;
    xfer(1, a, 16'h0, v);
    check(v == e, $sformatf("read %s: %h expected %h", what, v, e));
  endtask

  initial begin
    logic [WORD_W-1:0] v;
    sclk = 0; cs_n = 1; mosi = 0;
    cmd_valid = 0; cmd_addr = '0; cmd_data = '0;
    status = 16'h0003; late_cnt = 16'd7; trig_cnt = 16'd1234; acc_cnt = 16'd99;
    sys_ts = 48'hA1A2_B3B4_C5C6;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    check(ctrl == CTRL_RESET && offset == 0 && trig_delay == 0, "reset values");
    rd_check(REG_ID, ID_VALUE, "ID");
    wr(REG_OFFSET, 16'h1357);
    check(offset == 16'h1357, "offset written");
    wr(REG_TRIG_DELAY, 16'h0042);
    check(trig_delay == 16'h0042, "trig_delay written");
    wr(REG_CTRL, 16'h0001);
    check(ctrl == 16'h0001, "ctrl written");
    rd_check(REG_OFFSET, 16'h1357, "offset");
    rd_check(REG_TRIG_DELAY, 16'h0042, "trig_delay");
    rd_check(REG_CTRL, 16'h0001, "ctrl");
    rd_check(REG_STATUS, 16'h0003, "status");
    rd_check(REG_LATE_CNT, 16'd7, "late count");
    rd_check(REG_TRIG_CNT, 16'd1234, "trig count");
    rd_check(REG_ACC_CNT, 16'd99, "accept count");
    rd_check(REG_SYS_TS0, 16'hC5C6, "sys ts 15:0");
    rd_check(REG_SYS_TS1, 16'hB3B4, "sys ts 31:16");
    rd_check(REG_SYS_TS2, 16'hA1A2, "sys ts 47:32");
    rd_check(7'h55, 16'h0000, "unknown address");
    wr(REG_STATUS, 16'hFFFF);
    rd_check(REG_STATUS, 16'h0003, "status after ignored write");
    check(ctrl == 16'h0001 && offset == 16'h1357 && trig_delay == 16'h0042, "controls unchanged by ignored write");

    // random write/read pairs
    for (int k = 0; k < 20; k++) begin
      logic [ADDR_W-1:0] a;
      logic [WORD_W-1:0] d;
      a = ADDR_W'($urandom_range(0, 2));
      d = 16'($urandom());
      wr(a, d);
      rd_check(a, d, "random readback");
    end

    // command frame write
    @(negedge clk);
    cmd_valid = 1; cmd_addr = REG_OFFSET; cmd_data = 16'h2468;
    @(negedge clk);
    cmd_valid = 0;
    check(offset == 16'h2468, "command frame writes offset");
    rd_check(REG_OFFSET, 16'h2468, "offset after command");

    // command and SPI write hit TRIG_DELAY in the same cycle: command wins
    fork
      wr(REG_TRIG_DELAY, 16'h0011);
    join_none
    wait (dut.spi_we == 1'b1);
    // spi_we is sampled by the register file at the next rising edge
    cmd_valid = 1; cmd_addr = REG_TRIG_DELAY; cmd_data = 16'h0022;
    @(posedge clk); #1;
    cmd_valid = 0;
    check(trig_delay == 16'h0022, $sformatf("command wins over SPI, got %h", trig_delay));
    wait fork;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
