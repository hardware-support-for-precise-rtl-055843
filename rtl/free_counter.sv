// free_counter: free-running counter clocked by the reference frequency.
// It is the time base of the timestamper (counting nanoseconds when INC is
// the reference period in ns) and the coarse counter of the time-measurement
// device (INC = 1, counting periods). Sampling it at two events gives
// n = n_STOP - n_START periods. The counter starts at 0 after reset and
// advances by INC on every clock edge while en is high; it wraps modulo 2^W.
// The width and the increment are this design's choices; the increment
// parameter sets the reference frequency the counter is built for.
`timescale 1ns/1ps
module free_counter #(
  parameter int unsigned W   = 64,
  parameter int unsigned INC = 8     // ns per tick at a 125 MHz reference
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  count <= '0;
    else if (en) count <= count + W'(INC);
endmodule
