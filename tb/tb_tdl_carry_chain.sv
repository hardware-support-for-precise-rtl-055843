// tb_tdl_carry_chain: checks the delay-line model: after a rising hit the
// number of taps that are high grows by one every tau, the code is a
// thermometer code, and the falling edge drains the line the same way.
`timescale 1ns/1ps
module tb_tdl_carry_chain;
  localparam int N = 64, TAU = 25;
  logic hit = 0;
  logic [N-1:0] taps;
  int checks = 0, failures = 0;

  tdl_carry_chain #(.NTAPS(N), .TAU_PS(TAU)) dut (.hit, .taps);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ones(input logic [N-1:0] v);
    int n = 0;
    for (int i = 0; i < N; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    #1us; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #10ns;
    check(taps == '0, "idle line is empty");
    hit = 1;
    // sample in the middle between element transitions
    #12ps;
    for (int k = 0; k < N + 4; k++) begin
      int exp;
      exp = (k < N) ? k : N;
      check(ones(taps) == exp, $sformatf("ones after %0d tau: %0d", k, ones(taps)));
      check(taps == N'((65'(1) << exp) - 1), "thermometer code");
      #25ps;
    end
    hit = 0;
    #((TAU * 10 + 12) * 1ps);
    check(ones(taps) == N - 10, "falling edge drains");
    #(TAU * N * 1ps);
    check(taps == '0, "empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
