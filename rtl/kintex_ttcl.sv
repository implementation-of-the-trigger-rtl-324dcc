// kintex_ttcl: TTCL-related firmware of one Pixie-Net XL Kintex FPGA.
//
// Holds a timestamp counter that runs on the TTCL clock and clears on the
// sync flag from the interface board, so it equals the interface board's
// counter and every other unit's. Local events from pulse processing
// (evt_in_valid with a channel number) pass through a user input delay, then
// are recorded only while the acceptance window, opened by the TTCL trigger
// flag for win_len cycles, is open (unless require_accept is low). Recorded
// events carry the timestamp of their capture. An SPI master lets the host
// side program the interface board's registers. These functions follow the
// design description; register widths, the bypass bit and the host request
// ports are this design's choices. The lock flag goes to the Kintex status
// registers, which are outside this block.
module kintex_ttcl
  import ttcl_pkg::*;
#(
  parameter int CH_W        = 4,
  parameter int DELAY_DEPTH = 256,
  parameter int HALF_DIV    = 8
) (
  input  logic                           clk,
  input  logic                           rst,
  // from the interface board
  input  logic                           trig_flag,
  input  logic                           sync_flag,
  // SPI to the interface board
  output logic                           sclk,
  output logic                           cs_n,
  output logic                           mosi,
  input  logic                           miso,
  // host register requests towards the interface board
  input  logic                           host_start,
  input  logic                           host_rw,
  input  logic [ADDR_W-1:0]              host_addr,
  input  logic [WORD_W-1:0]              host_wdata,
  output logic                           host_busy,
  output logic                           host_done,
  output logic [WORD_W-1:0]              host_rdata,
  // Kintex control registers
  input  logic [15:0]                    win_len,
  input  logic [$clog2(DELAY_DEPTH)-1:0] in_delay,
  input  logic                           require_accept,
  // local events
  input  logic                           evt_in_valid,
  input  logic [CH_W-1:0]                evt_in_ch,
  // validated events
  output logic                           evt_out_valid,
  output logic [CH_W-1:0]                evt_out_ch,
  output logic [TS_W-1:0]                evt_out_ts,
  output logic                           evt_rejected,
  output logic [31:0]                    n_accepted,
  output logic [31:0]                    n_rejected,
  output logic [TS_W-1:0]                ts
);

  logic            win_open;
  logic            d_valid;
  logic [CH_W-1:0] d_ch;

  ts_counter #(.TS_W(TS_W)) u_ts (.clk, .rst, .sync(sync_flag), .ts);

  delay_line #(.W(1 + CH_W), .DEPTH(DELAY_DEPTH)) u_indly (
    .clk, .rst, .d({evt_in_valid, evt_in_ch}), .delay(in_delay), .q({d_valid, d_ch})
  );

  acceptance_window #(.LEN_W(16)) u_win (.clk, .rst, .trig(trig_flag), .len(win_len), .open_o(win_open));

  event_validator #(.CH_W(CH_W), .TS_W(TS_W), .DLY_W($clog2(DELAY_DEPTH))) u_val (
    .clk, .rst, .evt_valid(d_valid), .evt_ch(d_ch), .window_open(win_open),
    .require_accept, .ts_now(ts), .in_delay,
    .out_valid(evt_out_valid), .out_ch(evt_out_ch), .out_ts(evt_out_ts),
    .rejected(evt_rejected), .n_accepted, .n_rejected
  );

  spi_master #(.HALF_DIV(HALF_DIV)) u_spi (
    .clk, .rst, .start(host_start), .rw(host_rw), .addr(host_addr), .wdata(host_wdata),
    .busy(host_busy), .done(host_done), .rdata(host_rdata),
    .sclk, .cs_n, .mosi, .miso
  );

endmodule
