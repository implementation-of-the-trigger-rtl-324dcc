// acceptance_window: acceptance window opened by the TTCL trigger flag.
//
// When trig pulses, the window opens for the next 'len' cycles: open_o is
// high in cycles n+1 .. n+len for a trigger in cycle n. A trigger while the
// window is open restarts it with the full length; len = 0 opens nothing.
// The user-defined length follows the design description; the restart rule
// is this design's choice.
module acceptance_window #(
  parameter int LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             trig,
  input  logic [LEN_W-1:0] len,
  output logic             open_o
);

  logic [LEN_W-1:0] remain;

  always_ff @(posedge clk) begin
    if (rst)                remain <= '0;
    else if (trig)          remain <= len;
    else if (remain != '0)  remain <= remain - 1'b1;
  end

  assign open_o = (remain != '0);

endmodule
