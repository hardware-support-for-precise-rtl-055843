// tb_i2c_master: runs register writes and reads between i2c_master and a
// behavioural slave on an open-drain bus, and checks the data, the
// acknowledge error for an absent device, START/STOP counts and the
// duration of each access: 116 quarter-bit periods for a write and 156 for
// a read (START, three or four bytes of nine bits, repeated START, STOP).
`timescale 1ns/1ps
module tb_i2c_master;
  localparam int QDIV = 5;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_read = 0;
  logic [6:0] cmd_dev = 0;
  logic [7:0] cmd_reg = 0, cmd_wdata = 0;
  logic done, ack_err;
  logic [7:0] rdata;
  logic scl_o, sda_o, sda_s;
  wire  scl = scl_o;
  wire  sda = sda_o & sda_s;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  i2c_master #(.QDIV(QDIV)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_read,
    .cmd_dev, .cmd_reg, .cmd_wdata, .done, .ack_err, .rdata, .scl_o, .sda_o, .sda_i(sda));
  i2c_slave_model #(.ADDR(7'h50)) slave (.scl, .sda, .sda_s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input bit rd, input logic [6:0] dev, input logic [7:0] r, w,
                        output logic [7:0] data, output bit err, output longint dur);
    longint t0;
    @(negedge clk);
    check(cmd_ready, "ready when idle");
    cmd_valid = 1; cmd_read = rd; cmd_dev = dev; cmd_reg = r; cmd_wdata = w;
    @(negedge clk); cmd_valid = 0; t0 = cyc;   // accepted at the edge just passed
    check(!cmd_ready, "busy");
    while (!done) @(negedge clk);
    dur = cyc - t0;
    data = rdata; err = ack_err;
  endtask

  initial begin
    #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] d, model[256];
    bit e;
    longint dur;
    int st0;
    foreach (model[i]) model[i] = 8'(i * 3 + 1);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [7:0] r, w;
      r = 8'($urandom); w = 8'($urandom);
      if ($urandom_range(0, 1)) begin
        access(0, 7'h50, r, w, d, e, dur);
        model[r] = w;
        check(!e, "write acknowledged");
        check(dur == 116 * QDIV, $sformatf("write duration %0d", dur));
      end else begin
        access(1, 7'h50, r, 0, d, e, dur);
        check(!e && d == model[r], $sformatf("read reg %0d: %h exp %h", r, d, model[r]));
        check(dur == 156 * QDIV, $sformatf("read duration %0d", dur));
      end
      check(scl === 1'b1 && sda === 1'b1, "bus idle after STOP");
    end
    check(slave.regs == model, "register contents");
    // absent device
    st0 = slave.n_stop;
    access(1, 7'h51, 8'h10, 0, d, e, dur);
    check(e, "ack error for absent device");
    check(slave.n_stop == st0 + 1, "STOP after NACK");
    access(0, 7'h50, 8'h10, 8'hA5, d, e, dur);
    access(1, 7'h50, 8'h10, 0, d, e, dur);
    check(!e && d == 8'hA5, "recovers after NACK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
