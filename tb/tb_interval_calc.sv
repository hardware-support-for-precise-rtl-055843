// tb_interval_calc: random START/STOP timestamp pairs, including pairs in
// the same clock and STOPs without a START, checked against
// (n_STOP - n_START) * T_ref - (f_STOP - f_START) * tau one clock later.
`timescale 1ns/1ps
module tb_interval_calc;
  localparam int CW = 48, FW = 9, TREF = 5000, TAU = 25;
  logic clk = 0, rst_n = 0;
  logic sv = 0, pv = 0;
  logic [CW-1:0] sc = 0, pc = 0;
  logic [FW-1:0] sf = 0, pf = 0;
  logic iv_valid;
  logic signed [63:0] iv_ps;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  interval_calc #(.CW(CW), .FW(FW), .T_REF_PS(TREF), .TAU_PS(TAU)) dut (.clk, .rst_n,
    .start_valid(sv), .start_coarse(sc), .start_fine(sf),
    .stop_valid(pv), .stop_coarse(pc), .stop_fine(pf), .iv_valid, .iv_ps);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint exp;
    repeat (3) @(negedge clk); rst_n = 1;
    // STOP without START: ignored
    @(negedge clk); pv = 1; pc = 100; pf = 3;
    @(negedge clk); pv = 0;
    check(!iv_valid, "stop alone ignored");
    for (int t = 0; t < 300; t++) begin
      longint c0, dc;
      int f0, f1;
      bit same;
      same = (t % 5 == 0);
      c0 = longint'({$urandom, $urandom}) & 64'hFFFF_FFFF_FFFF;
      dc = same ? 0 : $urandom_range(0, 400000);
      f0 = $urandom_range(0, 256); f1 = $urandom_range(0, 256);
      @(negedge clk); sv = 1; sc = CW'(c0); sf = FW'(f0);
      if (!same) begin
        @(negedge clk); sv = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      pv = 1; pc = CW'(c0 + dc); pf = FW'(f1);
      @(negedge clk); sv = 0; pv = 0;
      exp = dc * TREF - longint'(f1 - f0) * TAU;
      check(iv_valid && iv_ps == exp, $sformatf("interval %0d exp %0d", iv_ps, exp));
      @(negedge clk);
      check(!iv_valid, "one result per pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
