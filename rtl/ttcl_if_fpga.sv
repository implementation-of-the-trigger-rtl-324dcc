// ttcl_if_fpga: firmware of the FPGA on the TTCL interface board.
//
// Receives the deserialized TTCL word stream (16-bit words, one per cycle of
// the recovered 50 MHz clock), aligns and decodes its frames and produces
// the three flags the Pixie-Net XL pulse processing FPGA (Kintex) needs:
//   sync_flag - an imperative sync frame arrived (CTRL bit1 enables it); the
//               local timestamp counter clears in the same edge, and so does
//               the Kintex counter that receives the flag;
//   trig_flag - a trigger-accept timestamp plus the user OFFSET equalled the
//               local timestamp counter (CTRL bit0 enables accepts); the flag
//               leaves after a further user delay of TRIG_DELAY cycles;
//   lock_flag - the interface clocks are locked to the link: the clock
//               manager reports lock and frame alignment is held.
// The Kintex reads and writes the control registers over SPI (spi_slave_regs);
// TTCL command frames write the same registers in every unit at once.
//
// Timing: from the last word of a trigger-accept frame at rx_word (cycle n),
// aligner +1, decoder +1, matcher enqueue and compare +2. The matcher fires
// when the counter equals accept time + OFFSET; the flag then passes the
// TRIG_DELAY line and an output register, so trig_flag is high in the cycle
// in which the counter reads accept time + OFFSET + TRIG_DELAY + 2. An
// accept whose adjusted time is reached before it is enqueued is dropped
// and counted as late. sync_flag is high one cycle, two cycles after the
// last word of the imperative sync frame; the counter reads 0 in the next.
// The decode chain follows the design description; gating bits, the lock
// definition and the register map are this design's choices.
module ttcl_if_fpga
  import ttcl_pkg::*;
#(
  parameter int MATCH_DEPTH = 16,
  parameter int DELAY_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] rx_word,
  input  logic              rx_valid,
  input  logic              pll_locked,
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              mosi,
  output logic              miso,
  output logic              trig_flag,
  output logic              sync_flag,
  output logic              lock_flag,
  output logic [TS_W-1:0]   ts
);

  logic [WORD_W-1:0] a_word;
  logic [POS_W-1:0]  a_pos;
  logic              a_valid, aligned;

  logic              imp_sync, accept_valid, cmd_valid, frame_valid;
  logic [TS_W-1:0]   accept_ts, sys_ts;
  logic [ADDR_W-1:0] cmd_addr;
  logic [WORD_W-1:0] cmd_data;
  frame_t            frame;

  logic [WORD_W-1:0] ctrl, offset, trig_delay;
  logic              match, late, overflow;
  logic [$clog2(MATCH_DEPTH+1)-1:0] level;
  logic [WORD_W-1:0] late_cnt, trig_cnt, acc_cnt;
  logic              trig_pre;

  ttcl_frame_aligner u_align (
    .clk, .rst, .rx_word, .rx_valid,
    .word(a_word), .pos(a_pos), .word_valid(a_valid), .aligned
  );

  ttcl_frame_decoder u_dec (
    .clk, .rst, .word(a_word), .pos(a_pos), .word_valid(a_valid),
    .imp_sync, .accept_valid, .accept_ts, .sys_ts,
    .cmd_valid, .cmd_addr, .cmd_data, .frame_valid, .frame
  );

  assign sync_flag = imp_sync && ctrl[1];

  ts_counter #(.TS_W(TS_W)) u_ts (.clk, .rst, .sync(sync_flag), .ts);

  trigger_matcher #(.TS_W(TS_W), .OFF_W(WORD_W), .DEPTH(MATCH_DEPTH)) u_match (
    .clk, .rst, .flush(sync_flag),
    .accept_valid(accept_valid && ctrl[0]), .accept_ts, .offset,
    .ts_now(ts), .trig(match), .late, .overflow, .level
  );

  delay_line #(.W(1), .DEPTH(DELAY_DEPTH)) u_tdly (
    .clk, .rst, .d(match), .delay(trig_delay[$clog2(DELAY_DEPTH)-1:0]), .q(trig_pre)
  );

  always_ff @(posedge clk) begin
    if (rst) trig_flag <= 1'b0;
    else     trig_flag <= trig_pre;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      late_cnt <= '0;
      trig_cnt <= '0;
      acc_cnt  <= '0;
    end else begin
      if (late || overflow)  late_cnt <= late_cnt + 1'b1;
      if (match)             trig_cnt <= trig_cnt + 1'b1;
      if (accept_valid)      acc_cnt  <= acc_cnt + 1'b1;
    end
  end

  assign lock_flag = pll_locked && aligned;

  spi_slave_regs u_regs (
    .clk, .rst, .sclk, .cs_n, .mosi, .miso,
    .cmd_valid, .cmd_addr, .cmd_data,
    .status({14'd0, lock_flag, aligned}),
    .late_cnt, .trig_cnt, .acc_cnt, .sys_ts,
    .ctrl, .offset, .trig_delay
  );

endmodule
