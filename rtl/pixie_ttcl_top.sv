// pixie_ttcl_top: Pixie-Net XL with TTCL interface boards, TTCL logic only.
//
// The Pixie-Net XL main board carries two Kintex FPGAs; each has its own
// clocking daughterboard, here the TTCL interface board, with its own TTCL
// fiber link. For every unit u this top wires one interface-board FPGA
// (ttcl_if_fpga) to one Kintex core (kintex_ttcl): trigger and sync flags
// from the board to the Kintex, SPI between them; each board's lock flag is
// brought out as a port for the Kintex status registers. The deserializer
// chip, clock chips, ADCs, pulse processing and the host processor are not
// part of the RTL; their signals are this top's ports:
//   rx_word/rx_valid - 16-bit words from each deserializer;
//   pll_locked       - lock of each interface FPGA's clock manager;
//   host_*           - register requests from the host towards each board;
//   win_len/in_delay/require_accept - Kintex control registers;
//   evt_in_*         - local triggers from pulse processing;
//   evt_out_*        - events validated by the TTCL trigger, with timestamps.
// All logic runs on one clock, the recovered TTCL word clock, which the
// interface board also provides for ADC sampling. The two-unit structure
// follows the board's block diagram; the single clock is this design's
// simplification.
module pixie_ttcl_top
  import ttcl_pkg::*;
#(
  parameter int N_UNITS     = 2,
  parameter int CH_W        = 4,
  parameter int DELAY_DEPTH = 256,
  parameter int MATCH_DEPTH = 16,
  parameter int HALF_DIV    = 8
) (
  input  logic                                         clk,
  input  logic                                         rst,
  input  logic [N_UNITS-1:0][WORD_W-1:0]               rx_word,
  input  logic [N_UNITS-1:0]                           rx_valid,
  input  logic [N_UNITS-1:0]                           pll_locked,
  input  logic [N_UNITS-1:0]                           host_start,
  input  logic [N_UNITS-1:0]                           host_rw,
  input  logic [N_UNITS-1:0][ADDR_W-1:0]               host_addr,
  input  logic [N_UNITS-1:0][WORD_W-1:0]               host_wdata,
  output logic [N_UNITS-1:0]                           host_busy,
  output logic [N_UNITS-1:0]                           host_done,
  output logic [N_UNITS-1:0][WORD_W-1:0]               host_rdata,
  input  logic [N_UNITS-1:0][15:0]                     win_len,
  input  logic [N_UNITS-1:0][$clog2(DELAY_DEPTH)-1:0]  in_delay,
  input  logic [N_UNITS-1:0]                           require_accept,
  input  logic [N_UNITS-1:0]                           evt_in_valid,
  input  logic [N_UNITS-1:0][CH_W-1:0]                 evt_in_ch,
  output logic [N_UNITS-1:0]                           evt_out_valid,
  output logic [N_UNITS-1:0][CH_W-1:0]                 evt_out_ch,
  output logic [N_UNITS-1:0][TS_W-1:0]                 evt_out_ts,
  output logic [N_UNITS-1:0]                           evt_rejected,
  output logic [N_UNITS-1:0]                           trig_flag,
  output logic [N_UNITS-1:0]                           sync_flag,
  output logic [N_UNITS-1:0]                           lock_flag,
  output logic [N_UNITS-1:0][TS_W-1:0]                 ts
);

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    logic            sclk, cs_n, mosi, miso;
    logic [TS_W-1:0] board_ts;
    logic [31:0]     n_acc, n_rej;

    ttcl_if_fpga #(.MATCH_DEPTH(MATCH_DEPTH), .DELAY_DEPTH(DELAY_DEPTH)) u_board (
      .clk, .rst,
      .rx_word(rx_word[u]), .rx_valid(rx_valid[u]), .pll_locked(pll_locked[u]),
      .sclk, .cs_n, .mosi, .miso,
      .trig_flag(trig_flag[u]), .sync_flag(sync_flag[u]), .lock_flag(lock_flag[u]),
      .ts(board_ts)
    );

    kintex_ttcl #(.CH_W(CH_W), .DELAY_DEPTH(DELAY_DEPTH), .HALF_DIV(HALF_DIV)) u_kintex (
      .clk, .rst,
      .trig_flag(trig_flag[u]), .sync_flag(sync_flag[u]),
      .sclk, .cs_n, .mosi, .miso,
      .host_start(host_start[u]), .host_rw(host_rw[u]), .host_addr(host_addr[u]),
      .host_wdata(host_wdata[u]), .host_busy(host_busy[u]), .host_done(host_done[u]),
      .host_rdata(host_rdata[u]),
      .win_len(win_len[u]), .in_delay(in_delay[u]), .require_accept(require_accept[u]),
      .evt_in_valid(evt_in_valid[u]), .evt_in_ch(evt_in_ch[u]),
      .evt_out_valid(evt_out_valid[u]), .evt_out_ch(evt_out_ch[u]), .evt_out_ts(evt_out_ts[u]),
      .evt_rejected(evt_rejected[u]), .n_accepted(n_acc), .n_rejected(n_rej),
      .ts(ts[u])
    );

    // The Kintex counter must track the interface board's counter.
    a_ts_equal: assert property (@(posedge clk) disable iff (rst) ts[u] == board_ts);
  end

endmodule
