// ts_counter: local time stamp counter.
//
// Counts one per clock of the recovered TTCL clock. The sync input (the
// imperative sync flag, decoded once and fanned out to every unit in the
// same cycle) clears it, so that all counters in the system hold the same
// value afterwards. The counter then restarts from 0 in the next cycle.
// Counter width TS_W and the clear-to-zero value are this design's choice.
module ts_counter #(
  parameter int TS_W = 48
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sync,
  output logic [TS_W-1:0] ts
);

  always_ff @(posedge clk) begin
    if (rst || sync) ts <= '0;
    else             ts <= ts + 1'b1;
  end

endmodule
