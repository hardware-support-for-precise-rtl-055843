// tb_free_counter: checks that the free-running counter starts at zero,
// advances by INC on every enabled clock, holds while disabled and wraps
// modulo 2^W (checked on a 6-bit instance).
`timescale 1ns/1ps
module tb_free_counter;
  logic clk = 0, rst_n = 0, en = 0;
  logic [63:0] cnt;
  logic [5:0]  cnt6;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  free_counter #(.W(64), .INC(8)) dut (.clk, .rst_n, .en, .count(cnt));
  free_counter #(.W(6),  .INC(3)) dut6 (.clk, .rst_n, .en, .count(cnt6));

  task automatic check(input logic [63:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(cnt, 0, "reset");
    en = 1;
    for (int i = 1; i <= 30; i++) begin
      @(negedge clk);
      check(cnt, 64'(8*i), "count");
      check(64'(cnt6), 64'((3*i) % 64), "wrap");
    end
    en = 0;
    repeat (5) @(negedge clk);
    check(cnt, 240, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
