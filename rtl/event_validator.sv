// event_validator: records local events only inside the acceptance window.
//
// Local events (already passed through the input delay) are recorded when
// the acceptance window is open, or always when require_accept is low.
// A recorded event is stamped with the time it was captured, which is the
// counter value now minus the input delay, so the stamp does not depend on
// the delay setting. Outputs are registered (one cycle latency); accepted
// and rejected events are counted. Validation against the TTCL window
// follows the design description; the bypass bit, the counters and the
// stamp correction are this design's choices. An event still inside the
// input delay when an imperative sync clears the counter is stamped in the
// new count (its stamp wraps below zero).
module event_validator #(
  parameter int CH_W  = 4,
  parameter int TS_W  = 48,
  parameter int DLY_W = 8,
  parameter int CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              evt_valid,
  input  logic [CH_W-1:0]   evt_ch,
  input  logic              window_open,
  input  logic              require_accept,
  input  logic [TS_W-1:0]   ts_now,
  input  logic [DLY_W-1:0]  in_delay,
  output logic              out_valid,
  output logic [CH_W-1:0]   out_ch,
  output logic [TS_W-1:0]   out_ts,
  output logic              rejected,
  output logic [CNT_W-1:0]  n_accepted,
  output logic [CNT_W-1:0]  n_rejected
);

  logic take;
  assign take = evt_valid && (window_open || !require_accept);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out_ch     <= '0;
      out_ts     <= '0;
      rejected   <= 1'b0;
      n_accepted <= '0;
      n_rejected <= '0;
    end else begin
      out_valid <= take;
      rejected  <= evt_valid && !take;
      if (take) begin
        out_ch     <= evt_ch;
        out_ts     <= ts_now - TS_W'(in_delay);
        n_accepted <= n_accepted + 1'b1;
      end
      if (evt_valid && !take) n_rejected <= n_rejected + 1'b1;
    end
  end

endmodule
