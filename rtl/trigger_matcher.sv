// trigger_matcher: turns trigger-accept messages into a local trigger flag.
//
// A trigger-accept frame carries the timestamp for which events are
// acceptable. The block adds the user offset (covering transmission delay)
// and holds the adjusted time in a queue; when the local timestamp counter
// equals the adjusted time at the head of the queue, trig pulses for one
// cycle. This much follows the link's description. The queue, and what
// happens to an accept whose adjusted time has already passed (dropped,
// 'late' pulse) or that finds the queue full (dropped, 'overflow' pulse),
// are this design's choices. Accepts are expected in increasing time order;
// only the head is compared. flush empties the queue (used on imperative
// sync, which invalidates queued times).
//
// Timing: an accept presented in cycle n can fire at the earliest in cycle
// n+2 (one cycle to enqueue, one to compare the registered head).
// The offset is sampled when the accept arrives.
module trigger_matcher #(
  parameter int TS_W  = 48,
  parameter int OFF_W = 16,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             flush,
  input  logic             accept_valid,
  input  logic [TS_W-1:0]  accept_ts,
  input  logic [OFF_W-1:0] offset,
  input  logic [TS_W-1:0]  ts_now,
  output logic             trig,
  output logic             late,
  output logic             overflow,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int AW = $clog2(DEPTH);
  localparam int LW = $clog2(DEPTH+1);

  logic [TS_W-1:0] mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic            push, pop, full, empty;
  logic [TS_W-1:0] head;

  assign full  = (level == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (level == '0);
  assign head  = mem[rd_ptr];
  assign push  = accept_valid && !full;
  assign pop   = !empty && (head <= ts_now);

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= accept_ts + TS_W'(offset);
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      level    <= '0;
      trig     <= 1'b0;
      late     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      trig     <= pop && (head == ts_now);
      late     <= pop && (head != ts_now);
      overflow <= accept_valid && full;
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      level <= level + LW'(push) - LW'(pop);
    end
  end

endmodule
