// prio_encoder_pipe: pipelined priority encoder that turns the thermometer
// code of the catch register into the number of delay elements the hit has
// passed: fine = (index of the highest set bit) + 1, or 0 for an all-zero
// code. Taking the highest set bit makes the result insensitive to
// "bubbles" (isolated zeros below the edge). The code is cut into groups
// of G bits. Stage 1 registers, for each group, whether it holds a one and
// the index of its highest one; stage 2 picks the highest non-empty group
// and registers the result. Latency 2 clocks, one code per clock. The
// encoder and its pipelining follow the block diagram of the device; the
// two-stage split and G are this design's choices.
`timescale 1ns/1ps
module prio_encoder_pipe #(
  parameter int unsigned N = 256,  // taps, a multiple of G
  parameter int unsigned G = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0]          code,
  output logic                  out_valid,
  output logic [$clog2(N+1)-1:0] fine
);
  localparam int unsigned NG = N / G;
  localparam int unsigned GW = $clog2(G);
  localparam int unsigned FW = $clog2(N+1);

  logic [NG-1:0] any_q;
  logic [GW-1:0] idx_q [NG];
  logic          v1;

  // stage 1: per-group priority encoding
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      any_q <= '0;
      v1    <= 1'b0;
      for (int g = 0; g < NG; g++) idx_q[g] <= '0;
    end else begin
      v1 <= in_valid;
      for (int g = 0; g < NG; g++) begin
        logic [GW-1:0] ix;
        ix = '0;
        for (int b = 0; b < G; b++)
          if (code[g*G + b]) ix = GW'(b);
        idx_q[g] <= ix;
        any_q[g] <= |code[g*G +: G];
      end
    end
  end

  // stage 2: highest non-empty group
  logic [FW-1:0] f_c;
  always_comb begin
    f_c = '0;
    for (int g = 0; g < NG; g++)
      if (any_q[g]) f_c = FW'(g*G) + FW'(idx_q[g]) + FW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      fine      <= '0;
    end else begin
      out_valid <= v1;
      fine      <= f_c;
    end
  end
endmodule
