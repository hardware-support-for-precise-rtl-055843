// tb_prio_encoder_pipe: streams one random thermometer code (with bubbles
// and some all-zero / all-one codes) per clock into the encoder and checks
// each result two clocks later against a reference that looks for the
// highest set bit.
`timescale 1ns/1ps
module tb_prio_encoder_pipe;
  localparam int N = 256, G = 16, FW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [N-1:0] code = 0;
  logic out_valid;
  logic [FW-1:0] fine;
  int checks = 0, failures = 0;
  int expq[$];
  always #5 clk = ~clk;

  prio_encoder_pipe #(.N(N), .G(G)) dut (.clk, .rst_n, .in_valid, .code, .out_valid, .fine);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_fine(input logic [N-1:0] c);
    for (int i = N - 1; i >= 0; i--) if (c[i]) return i + 1;
    return 0;
  endfunction

  initial begin
    #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int lat[$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int e;
      e = expq.pop_front();
      check(int'(fine) == e, $sformatf("fine %0d exp %0d", fine, e));
      check(cyc - lat.pop_front() == 2, "latency 2");
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int k;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      k = $urandom_range(0, N);
      if (t % 97 == 0) k = N;
      if (t % 89 == 0) k = 0;
      code = '0;
      for (int i = 0; i < k; i++) code[i] = 1'b1;
      if (k > 4 && $urandom_range(0, 1)) code[k - 1 - $urandom_range(1, 3)] = 1'b0;  // bubble
      if (in_valid) begin expq.push_back(ref_fine(code)); lat.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    check(expq.size() == 0, "all results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
