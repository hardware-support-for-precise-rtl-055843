// catch_register: the flip-flops behind the delay-line taps. On every
// reference clock edge the first rank samples all taps together with the
// coarse counter; a second rank gives a metastable first-rank bit a cycle
// to settle. A hit is recognised when tap 0 of the settled code has risen
// since the previous cycle: then hit_valid is high for one cycle, with code
// (the thermometer code of that edge) and coarse (the coarse count sampled
// at the same edge). The hit signal must stay high for longer than the
// line (NTAPS*tau) and low again for as long before the next hit.
// Latency: hit_valid follows the capturing edge by two clocks. The
// sampling of the taps follows the tapped-delay-line method; the second
// rank and the edge rule are this design's choices.
`timescale 1ns/1ps
module catch_register #(
  parameter int unsigned NTAPS = 256,
  parameter int unsigned CW    = 48     // coarse counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NTAPS-1:0] taps,
  input  logic [CW-1:0]    coarse_in,
  output logic             hit_valid,
  output logic [NTAPS-1:0] code,
  output logic [CW-1:0]    coarse
);
  logic [NTAPS-1:0] r1, r2;
  logic [CW-1:0]    c1, c2;
  logic             t0_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0; r2 <= '0; c1 <= '0; c2 <= '0; t0_q <= 1'b0;
      hit_valid <= 1'b0; code <= '0; coarse <= '0;
    end else begin
      r1   <= taps;
      c1   <= coarse_in;
      r2   <= r1;
      c2   <= c1;
      t0_q <= r2[0];
      hit_valid <= r2[0] && !t0_q;
      code      <= r2;
      coarse    <= c2;
    end
  end
endmodule
