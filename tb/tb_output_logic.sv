// tb_output_logic: pushes random records into output_logic while the
// consumer applies random back-pressure, and checks that every record comes
// out as three words, most significant first, in order, with out_last on
// the third; then fills the FIFO to force an overflow and checks the drop
// count.
`timescale 1ns/1ps
module tb_output_logic;
  localparam int REC_W = 96, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic rec_valid = 0;
  logic [REC_W-1:0] rec = 0;
  logic [31:0] out_data;
  logic out_valid, out_ready = 0, out_last;
  logic [15:0] n_ovf;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;
  logic [REC_W-1:0] q[$];
  int wi = 0;
  logic [REC_W-1:0] cur;
  int n_out = 0;
  always #5 clk = ~clk;

  output_logic #(.REC_W(REC_W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .rec_valid, .rec,
    .out_data, .out_valid, .out_ready, .out_last, .n_overflow(n_ovf), .level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // consumer / scoreboard
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (wi == 0) cur = q.pop_front();
    check(out_data == cur[REC_W-1-32*wi -: 32], "word order");
    check(out_last == (wi == 2), "last flag");
    wi = (wi == 2) ? 0 : wi + 1;
    if (wi == 0) n_out++;
  end

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] ovf0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      rec_valid = 0;
      if ($urandom_range(0, 7) == 0) begin
        rec_valid = 1;
        rec = {32'($urandom), 32'($urandom), 32'($urandom)};
      end
    end
    @(negedge clk); rec_valid = 0; out_ready = 1;
    repeat (200) @(negedge clk);
    check(n_ovf == 0, "no overflow at this rate");
    check(n_out > 20, "records seen");
    // overflow: stop the consumer and push DEPTH+3 records
    out_ready = 0;
    ovf0 = n_ovf;
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(negedge clk); rec_valid = 1; rec = REC_W'(i);
    end
    @(negedge clk); rec_valid = 0;
    check(n_ovf - ovf0 == 3, "three dropped");
    check(level == DEPTH, "full");
    out_ready = 1;
    repeat (3 * DEPTH + 5) @(negedge clk);
    check(q.size() == 0 && level == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the scoreboard learns what was accepted
  always @(posedge clk) if (rst_n && rec_valid && level < DEPTH) q.push_back(rec);
endmodule
