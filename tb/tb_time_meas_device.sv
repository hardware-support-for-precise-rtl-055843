// tb_time_meas_device: end-to-end test of the interpolating time counter at
// its default size (256 taps of 25 ps, 5 ns reference). START and STOP hits
// are placed at random picosecond times; the measured interval must be
// within one tau of the true one (quantisation of each reading is < tau).
// The record stream is decoded and each record's coarse and fine values
// are checked against the hit time. Pairs in the same reference period and
// an I2C write and read-back through a register model are covered too.
`timescale 1ns/1ps
module tb_time_meas_device;
  localparam int TAU = 25, TREF = 5000;
  logic clk = 0, rst_n = 0;
  logic [1:0] hit = 0;
  logic iv_valid;
  logic signed [63:0] iv_ps;
  logic [31:0] out_data;
  logic out_valid, out_ready = 1, out_last;
  logic [15:0] n_ovf;
  logic i2c_cmd_valid = 0, i2c_cmd_ready, i2c_cmd_read = 0;
  logic [6:0] i2c_cmd_dev = 7'h50;
  logic [7:0] i2c_cmd_reg = 0, i2c_cmd_wdata = 0, i2c_rdata;
  logic i2c_done, i2c_ack_err, scl_o, sda_o, sda_s;
  wire  sda = sda_o & sda_s;
  int checks = 0, failures = 0;
  int n_iv = 0, n_same = 0, n_rec = 0;
  longint true_iv;
  always #2.5ns clk = ~clk;

  time_meas_device dut (.clk, .rst_n, .hit, .iv_valid, .iv_ps, .out_data, .out_valid,
    .out_ready, .out_last, .n_overflow(n_ovf), .i2c_cmd_valid, .i2c_cmd_ready,
    .i2c_cmd_read, .i2c_cmd_dev, .i2c_cmd_reg, .i2c_cmd_wdata, .i2c_done,
    .i2c_ack_err, .i2c_rdata, .scl_o, .sda_o, .sda_i(sda));
  i2c_slave_model #(.ADDR(7'h50)) slave (.scl(scl_o), .sda, .sda_s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // edge times of the reference clock, by coarse count seen at that edge
  longint edge_ps[longint];
  longint ncnt = 0;
  always @(posedge clk) if (rst_n) begin
    edge_ps[ncnt] = longint'($realtime * 1000.0);
    ncnt++;
  end

  // record stream: {channel, fine, coarse}; hit time = edge - fine * tau
  logic [95:0] acc;
  int wi = 0;
  longint hit_ps[2][$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    acc = {acc[63:0], out_data};
    wi = (wi == 2) ? 0 : wi + 1;
    if (wi == 0) begin
      int ch, fine;
      longint coarse, est, tr;
      ch = int'(acc[71:64]); fine = int'(acc[63:48]); coarse = longint'(acc[47:0]);
      tr = hit_ps[ch].pop_front();
      // the coarse value is the count of edges before the capturing edge
      est = edge_ps[coarse] - longint'(fine) * TAU;
      check(tr <= est && est - tr < TAU + 1, $sformatf("record ch%0d est %0d true %0d", ch, est, tr));
      n_rec++;
    end
  end

  always @(posedge clk) if (rst_n && iv_valid) begin
    longint d;
    d = iv_ps - true_iv;
    check(d > -TAU - 1 && d < TAU + 1, $sformatf("interval %0d true %0d", iv_ps, true_iv));
    n_iv++;
  end

  task automatic pulse(input int ch, input longint at_ps);
    real dl;
    dl = real'(at_ps - longint'($realtime * 1000.0)) / 1000.0;   // ns
    #(dl);
    hit[ch] = 1;
    hit_ps[ch].push_back(at_ps);
    #20ns hit[ch] = 0;
  endtask

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0, t1;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      longint now;
      now = longint'($realtime * 1000.0);
      t0 = now + 1000 + $urandom_range(0, 9999);
      t1 = (t % 4 == 0) ? t0 + $urandom_range(0, 3000) : t0 + $urandom_range(100, 300000);
      true_iv = t1 - t0;
      if (t1 / TREF == t0 / TREF) n_same++;
      fork
        pulse(0, t0);
        pulse(1, t1);
      join
      #50ns;
    end
    #100ns;
    check(n_iv == 60, $sformatf("intervals %0d", n_iv));
    check(n_rec == 120, $sformatf("records %0d", n_rec));
    check(n_same > 0, "START and STOP in one reference period");
    // I2C: program a synthesizer register and read it back
    @(negedge clk); i2c_cmd_valid = 1; i2c_cmd_read = 0; i2c_cmd_reg = 8'h21; i2c_cmd_wdata = 8'h5C;
    @(negedge clk); i2c_cmd_valid = 0;
    while (!i2c_done) @(negedge clk);
    @(negedge clk); i2c_cmd_valid = 1; i2c_cmd_read = 1;
    @(negedge clk); i2c_cmd_valid = 0;
    while (!i2c_done) @(negedge clk);
    check(!i2c_ack_err && i2c_rdata == 8'h5C && slave.regs[8'h21] == 8'h5C, "i2c write/read");
    check(n_ovf == 0, "no overflow");
    $display("intervals %0d, records %0d, same-period pairs %0d", n_iv, n_rec, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
