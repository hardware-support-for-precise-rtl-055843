// output_logic: hands composed records to the next level. Records of REC_W
// bits enter on rec_valid (one cycle each, no back-pressure) and are kept
// in a FIFO of DEPTH entries; a record arriving at a full FIFO is dropped
// and counted in n_overflow. The head record is sent as NWORDS 32-bit
// words, most significant first, on a valid/ready stream; out_last marks
// the final word of a record. The FIFO and the word stream are this
// design's choice of how the output logic passes data on.
`timescale 1ns/1ps
module output_logic #(
  parameter int unsigned REC_W = 96,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rec_valid,
  input  logic [REC_W-1:0] rec,
  output logic [31:0]      out_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             out_last,
  output logic [15:0]      n_overflow,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned NWORDS = (REC_W + 31) / 32;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned WW     = (NWORDS > 1) ? $clog2(NWORDS) : 1;

  logic [REC_W-1:0]      mem [DEPTH];
  logic [AW-1:0]         wr_ptr, rd_ptr;
  logic [AW:0]           cnt;
  logic [WW-1:0]         word;
  logic [NWORDS*32-1:0]  head;
  logic                  push, pop;

  assign head      = (NWORDS*32)'(mem[rd_ptr]);
  assign out_valid = (cnt != '0);
  assign out_data  = head[(NWORDS - 1 - 32'(word))*32 +: 32];
  assign out_last  = (32'(word) == NWORDS - 1);
  assign push      = rec_valid && (cnt != (AW+1)'(DEPTH));
  assign pop       = out_valid && out_ready && out_last;
  assign level     = cnt;

  always_ff @(posedge clk)
    if (push) mem[wr_ptr] <= rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      cnt        <= '0;
      word       <= '0;
      n_overflow <= '0;
    end else begin
      if (push) wr_ptr <= (32'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (32'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
      if (rec_valid && !push) n_overflow <= n_overflow + 16'd1;
      if (out_valid && out_ready) word <= out_last ? '0 : word + 1'b1;
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    cnt <= (AW+1)'(DEPTH));
endmodule
