// delay_line: programmable delay of a W-bit signal by 0..DEPTH-1 cycles.
//
// A shift register of DEPTH-1 stages; the output tap is chosen by 'delay',
// so q(n) = d(n - delay). delay = 0 passes d straight through. Several
// pulses may be in flight at once. Used for the user-defined delay of the
// trigger flag on the interface FPGA and for the user-defined input delay
// of local events on the Kintex ("acts like an analog delay cable").
// The maximum of 255 cycles (DEPTH = 256, an 8-bit register) is this
// design's choice. Changing 'delay' takes effect at once on the tap.
module delay_line #(
  parameter int W     = 1,
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [W-1:0]             d,
  input  logic [$clog2(DEPTH)-1:0] delay,
  output logic [W-1:0]             q
);

  logic [W-1:0] sr [DEPTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH - 1; i++) sr[i] <= '0;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < DEPTH - 1; i++) sr[i] <= sr[i-1];
    end
  end

  assign q = (delay == '0) ? d : sr[delay - 1'b1];

endmodule
