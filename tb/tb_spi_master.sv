// tb_spi_master: a bit-level SPI slave model in the testbench receives the
// master's transactions; checks the 24 bits sent, MISO data returned for
// reads, the SCLK period of 2*HALF_DIV clocks, and busy/done behaviour.
module tb_spi_master;
  import ttcl_pkg::*;
  localparam int HALF_DIV = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              start, rw, busy, done, sclk, cs_n, mosi, miso;
  logic [ADDR_W-1:0] addr;
  logic [WORD_W-1:0] wdata, rdata;

  spi_master #(.HALF_DIV(HALF_DIV)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // slave model: shift in on rising SCLK, drive read data after the 8th bit
  logic [23:0] rx;
  int          nbits;
  logic [15:0] reply;
  logic [15:0] reply_sh;
  time         last_rise, period;
  always @(negedge cs_n) begin nbits = 0; rx = '0; miso = 0; end
  always @(posedge sclk) if (!cs_n) begin
    rx = {rx[22:0], mosi};
    nbits++;
    period = $time - last_rise;
    last_rise = $time;
    if (nbits == 8) reply_sh = reply;
  end
  always @(negedge sclk) if (!cs_n && nbits >= 8) begin
    miso = reply_sh[15];
    reply_sh = {reply_sh[14:0], 1'b0};
  end

  task automatic run(bit r, logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d);
    int cyc = 0;
    @(negedge clk);
    start = 1; rw = r; addr = a; wdata = d;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    // a second start while busy is ignored
    start = 1; wdata = ~d;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(nbits == 24, $sformatf("bits %0d", nbits));
    check(rx == {r, a, d}, $sformatf("frame %h expected %h", rx, {r, a, d}));
    check(period == time'(2 * HALF_DIV * 10), $sformatf("sclk period %0t", period));
    if (r) check(rdata == reply, $sformatf("rdata %h expected %h", rdata, reply));
    // 24 bits of 2*HALF_DIV clocks plus setup and chip-select gap
    check(cyc >= 24 * 2 * HALF_DIV && cyc <= 24 * 2 * HALF_DIV + 5 * HALF_DIV, $sformatf("duration %0d", cyc));
    @(negedge clk);
    check(!busy && cs_n && !sclk, "idle after done");
  endtask

  initial begin
    start = 0; rw = 0; addr = '0; wdata = '0; miso = 0; last_rise = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(cs_n && !sclk && !busy, "idle after reset");
    reply = 16'hC3A5;
    run(0, 7'h01, 16'hABCD);
    run(1, 7'h0F, 16'h0000);
    for (int k = 0; k < 10; k++) begin
      reply = 16'($urandom());
      run(1'($urandom()), 7'($urandom()), 16'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
