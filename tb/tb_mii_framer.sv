// tb_mii_framer: drives MII nibble streams into mii_framer and checks the
// SFD event (one pulse, one cycle after the 0xD nibble), the reassembled
// bytes (low nibble first), the end-of-frame pulse and error flag, and that
// a burst without a start-of-frame delimiter is ignored.
`timescale 1ns/1ps
module tb_mii_framer;
  logic clk = 0, rst_n = 0, dv = 0, er = 0;
  logic [3:0] d = 0;
  logic sfd, bv, fe, ferr;
  logic [7:0] bd;
  int checks = 0, failures = 0;
  int cyc = 0, sfd_cyc = -1, n_sfd = 0, n_fe = 0;
  byte unsigned got[$];
  bit last_err;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  mii_framer dut (.clk, .rst_n, .dv, .er, .d, .sfd, .byte_valid(bv),
                  .byte_data(bd), .frame_end(fe), .frame_err(ferr));

  always @(negedge clk) begin
    if (sfd) begin n_sfd++; sfd_cyc = cyc; end
    if (bv) got.push_back(bd);
    if (fe) begin n_fe++; last_err = ferr; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic nib(input logic [3:0] n, input logic e = 0);
    @(negedge clk); dv = 1; d = n; er = e;
  endtask

  int dcyc;
  task automatic send(input byte unsigned b[$], input int npre, input int err_at = -1);
    for (int i = 0; i < npre; i++) nib(4'h5);
    nib(4'hD); dcyc = cyc;
    foreach (b[i]) begin nib(b[i][3:0], i == err_at); nib(b[i][7:4], 0); end
    @(negedge clk); dv = 0; er = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte unsigned b[$];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      b = {};
      for (int i = 0; i < 20 + t; i++) b.push_back(8'($urandom));
      got = {}; n_sfd = 0; n_fe = 0;
      send(b, 1 + t % 15, (t % 5 == 4) ? 3 : -1);
      check(n_sfd == 1, "one sfd");
      check(sfd_cyc == dcyc + 1, "sfd timing");
      check(got == b, "bytes");
      check(n_fe == 1, "frame end");
      check(last_err == (t % 5 == 4), "error flag");
    end
    // a burst with no delimiter is ignored
    got = {}; n_sfd = 0; n_fe = 0;
    repeat (8) nib(4'h5); repeat (10) nib(4'h3);
    @(negedge clk); dv = 0; repeat (4) @(negedge clk);
    check(n_sfd == 0 && n_fe == 0 && got.size() == 0, "no sfd ignored");
    // a burst not starting with preamble is ignored
    nib(4'hA); nib(4'hD); repeat (10) nib(4'h1);
    @(negedge clk); dv = 0; repeat (4) @(negedge clk);
    check(n_sfd == 0 && n_fe == 0 && got.size() == 0, "bad start ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
