// tb_catch_register: drives tap codes and a coarse count into the catch
// register and checks that a hit is reported exactly once, two clocks after
// the capturing edge, with the code and the coarse count of that edge; a
// code that stays high gives no second report.
`timescale 1ns/1ps
module tb_catch_register;
  localparam int N = 32, CW = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] taps = 0;
  logic [CW-1:0] cin = 0;
  logic hv;
  logic [N-1:0] code;
  logic [CW-1:0] coarse;
  int checks = 0, failures = 0, n_hv = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cin <= cin + 1'b1;

  catch_register #(.NTAPS(N), .CW(CW)) dut (.clk, .rst_n, .taps, .coarse_in(cin),
    .hit_valid(hv), .code, .coarse);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100us; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      logic [N-1:0] c1;
      logic [CW-1:0] cexp;
      int k;
      repeat ($urandom_range(2, 6)) @(negedge clk);
      k = $urandom_range(1, N);
      c1 = N'((33'(1) << k) - 1);
      taps = c1;
      cexp = cin;           // value the next edge samples
      @(negedge clk); taps = '1;
      check(!hv, "not yet (1)");
      @(negedge clk);
      check(!hv, "not yet (2)");
      @(negedge clk);
      check(hv && code == c1 && coarse == cexp, $sformatf("hit t=%0d", t));
      repeat (5) begin @(negedge clk); check(!hv, "single report"); end
      taps = '0;
      repeat (4) @(negedge clk);
      check(!hv, "falling edge is no hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
