// tdl_carry_chain: behavioural model (not synthesizable logic) of the tapped
// delay line of the interpolating time counter. In the FPGA the line is the
// carry chain of a column of slices: its elements sit in one row, so every
// element has nearly the same delay tau. The hit (START) edge enters at
// tap 0 and moves one element further every tau; taps[i] is the output of
// element i, i.e. the hit delayed by (i+1)*tau. The catch register samples
// these outputs on the reference clock, giving a thermometer code whose
// number of ones is the time since the hit in units of tau. Each element is
// modelled as a transport delay. NTAPS and TAU_PS are this design's
// assumptions (a line longer than one reference period of 5 ns).
`timescale 1ns/1ps
module tdl_carry_chain #(
  parameter int unsigned NTAPS  = 256,
  parameter int unsigned TAU_PS = 25
) (
  input  logic             hit,
  output logic [NTAPS-1:0] taps
);
  initial taps = '0;
  always @(hit) taps[0] <= #(TAU_PS * 1ps) hit;
  for (genvar i = 1; i < NTAPS; i++) begin : g_el
    always @(taps[i-1]) taps[i] <= #(TAU_PS * 1ps) taps[i-1];
  end
endmodule
