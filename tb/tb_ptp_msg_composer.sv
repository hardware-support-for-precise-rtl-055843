// tb_ptp_msg_composer: checks that the composer keeps the counter value of
// the SFD cycle, builds a record only for matching verdicts (one cycle after
// the verdict), discards the timestamp of non-matching frames, and counts
// both kinds of frame.
`timescale 1ns/1ps
module tb_ptp_msg_composer;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] count = 0;
  logic sfd = 0, rv = 0, rm = 0;
  ptp_info_t info = '0;
  logic rec_valid;
  ts_record_t rec;
  logic [15:0] n_m, n_i;
  int checks = 0, failures = 0, exp_m = 0, exp_i = 0;
  always #5 clk = ~clk;
  always @(posedge clk) count <= count + 64'd8;

  ptp_msg_composer #(.DIR(1'b1)) dut (.clk, .rst_n, .count, .sfd, .res_valid(rv),
    .res_match(rm), .res_info(info), .rec_valid, .rec, .n_matched(n_m), .n_ignored(n_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [TS_W-1:0] ts_exp;
    bit match;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      repeat ($urandom_range(1, 20)) @(negedge clk);
      sfd = 1; ts_exp = count;
      @(negedge clk); sfd = 0;
      repeat ($urandom_range(5, 60)) begin
        @(negedge clk); check(!rec_valid, "no record while frame runs");
      end
      match = $urandom_range(0, 1);
      rv = 1; rm = match;
      info.msg_type = 4'($urandom); info.seq_id = 16'($urandom); info.domain = 8'($urandom);
      @(negedge clk); rv = 0; rm = 0;
      check(rec_valid == match, "record only on match");
      if (match) begin
        exp_m++;
        check(rec.ts == ts_exp, "timestamp of the SFD cycle");
        check(rec.dir == 1'b1 && rec.msg_type == info.msg_type && rec.seq_id == info.seq_id,
              "record fields");
      end else exp_i++;
      @(negedge clk); check(!rec_valid, "single record");
      check(n_m == 16'(exp_m) && n_i == 16'(exp_i), "counters");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
