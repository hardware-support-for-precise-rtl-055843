// tb_time_hw_top: end-to-end test of both designs at their default sizes.
// Timestamper: PTP and non-PTP frames on the receive and transmit MII under
// layer 2, 3 and 4 criteria, including frames that end in the same cycle on
// both channels (the merge holds one while the other is sent) and a stalled
// output stream (FIFO overflow); every record is compared with the
// expected direction, messageType, sequenceId and timestamp.
// Measurement device: START/STOP hit pairs at random picosecond times,
// some in the same reference period; each interval must be within one tau
// of the truth. I2C: a register write, a read-back and an access to an
// absent device. Each of these events is counted and must have happened.
`timescale 1ns/1ps
module tb_time_hw_top;
  import ts_pkg::*;
  import tb_frame_pkg::*;
  localparam int INC = 40, DEPTH = 16, TAU = 25, TREF = 5000;
  logic clk = 0, ts_clk = 0, rst_n = 0;
  match_cfg_t cfg = DEFAULT_CFG;
  logic       dv[2] = '{0, 0}, er[2] = '{0, 0};
  logic [3:0] dd[2] = '{0, 0};
  logic [TS_W-1:0] ts_time;
  logic [31:0] ts_out_data, tm_out_data;
  logic ts_out_valid, ts_out_ready = 1, ts_out_last;
  logic tm_out_valid, tm_out_ready = 1, tm_out_last;
  logic [15:0] n_rx, n_tx, n_ign, n_ovf, tm_ovf;
  logic [1:0] hit = 0;
  logic iv_valid;
  logic signed [63:0] iv_ps;
  logic i2c_cmd_valid = 0, i2c_cmd_ready, i2c_cmd_read = 0;
  logic [6:0] i2c_cmd_dev = 7'h50;
  logic [7:0] i2c_cmd_reg = 0, i2c_cmd_wdata = 0, i2c_rdata;
  logic i2c_done, i2c_ack_err, scl_o, sda_o, sda_s;
  wire  sda = sda_o & sda_s;
  int checks = 0, failures = 0;
  longint cyc = 0, rst_cyc = 0;
  always #2.5ns clk = ~clk;      // measurement reference, 200 MHz
  always #20ns ts_clk = ~ts_clk;  // MII clock, 25 MHz
  always @(posedge ts_clk) cyc++;

  time_hw_top dut (.rst_n, .ts_clk, .tm_clk(clk), .ts_cfg(cfg),
    .rx_dv(dv[0]), .rx_er(er[0]), .rxd(dd[0]), .tx_en(dv[1]), .tx_er(er[1]), .txd(dd[1]),
    .ts_time, .ts_out_data, .ts_out_valid, .ts_out_ready, .ts_out_last,
    .ts_n_rx_matched(n_rx), .ts_n_tx_matched(n_tx), .ts_n_ignored(n_ign),
    .ts_n_overflow(n_ovf), .pps_hit(hit), .tm_iv_valid(iv_valid), .tm_iv_ps(iv_ps),
    .tm_out_data, .tm_out_valid, .tm_out_ready, .tm_out_last, .tm_n_overflow(tm_ovf),
    .i2c_cmd_valid, .i2c_cmd_ready, .i2c_cmd_read, .i2c_cmd_dev, .i2c_cmd_reg,
    .i2c_cmd_wdata, .i2c_done, .i2c_ack_err, .i2c_rdata, .scl_o, .sda_o, .sda_i(sda));
  i2c_slave_model #(.ADDR(7'h50)) slave (.scl(scl_o), .sda, .sda_s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // event counters
  int ev_rx = 0, ev_tx = 0, ev_ignored = 0, ev_l2 = 0, ev_l3 = 0, ev_l4 = 0;
  int ev_merge_wait = 0, ev_overflow = 0, ev_stall = 0;
  int ev_interval = 0, ev_same_period = 0, ev_i2c_wr = 0, ev_i2c_rd = 0, ev_i2c_nack = 0;

  always @(posedge ts_clk) begin
    if (dut.u_ts.pend[0] && dut.u_ts.pend[1]) ev_merge_wait++;
    if (ts_out_valid && !ts_out_ready) ev_stall++;
  end

  // ---------------- timestamper ----------------
  ts_record_t expq[2][$];
  bit compare = 1;
  logic [95:0] acc;
  int wi = 0;
  always @(posedge ts_clk) if (rst_n && ts_out_valid && ts_out_ready) begin
    acc = {acc[63:0], ts_out_data};
    wi = (wi == 2) ? 0 : wi + 1;
    if (wi == 0 && compare) begin
      ts_record_t r, e;
      r = ts_record_t'(acc);
      if (expq[r.dir].size() == 0) check(0, "unexpected record");
      else begin
        e = expq[r.dir].pop_front();
        check(r == e, $sformatf("record dir %0d seq %h ts %0d, expected seq %h ts %0d",
                                r.dir, r.seq_id, r.ts, e.seq_id, e.ts));
      end
    end
  end
  always @(negedge ts_clk) if (compare) ts_out_ready = ($urandom_range(0, 3) != 0);

  task automatic send(input int c, input frame_t f, input bit exp);
    bytes_t b;
    longint k;
    b = build(f);
    repeat (7) begin @(negedge ts_clk); dv[c] = 1; dd[c] = 4'h5; end
    @(negedge ts_clk); dd[c] = 4'hD; k = cyc;
    foreach (b[i]) begin
      @(negedge ts_clk); dd[c] = b[i][3:0];
      @(negedge ts_clk); dd[c] = b[i][7:4];
    end
    @(negedge ts_clk); dv[c] = 0;
    if (exp) begin
      ts_record_t e;
      e = '0;
      e.dir = c[0]; e.msg_type = f.msg_type; e.seq_id = f.seq_id;
      e.ts = TS_W'(INC) * TS_W'(k + 1 - rst_cyc);
      expq[c].push_back(e);
      if (c == 0) ev_rx++; else ev_tx++;
    end else ev_ignored++;
  endtask

  task automatic traffic(input int c, input int n, input layer_e lay, input int seed,
                         input bit all_match = 0);
    for (int t = 0; t < n; t++) begin
      frame_t f;
      bit m;
      f = default_frame();
      f.udp = (lay != LAYER_L2);
      f.msg_type = 4'((t + seed) % 4);
      f.seq_id = 16'(seed * 256 + t);
      f.pad = 12;                     // same length on both channels
      m = 1;
      if (!all_match && (t + seed) % 5 == 3) begin
        case (lay)
          LAYER_L2: f.ethtype = 16'h88F5;
          LAYER_L3: f.ip_dst = 32'hE000_006B;
          default:  f.udp_port = 16'd320;
        endcase
        m = 0;
      end
      send(c, f, m);
      if (m) case (lay)
        LAYER_L2: ev_l2++;
        LAYER_L3: ev_l3++;
        default:  ev_l4++;
      endcase
      repeat (20) @(negedge ts_clk);
    end
  endtask

  // ---------------- measurement device ----------------
  longint true_iv;
  always @(posedge clk) if (rst_n && iv_valid) begin
    longint d;
    d = iv_ps - true_iv;
    check(d > -TAU - 1 && d < TAU + 1, $sformatf("interval %0d true %0d", iv_ps, true_iv));
    ev_interval++;
  end

  task automatic pulse(input int ch, input longint at_ps);
    real dl;
    dl = real'(at_ps - longint'($realtime * 1000.0)) / 1000.0;
    #(dl);
    hit[ch] = 1;
    #20ns hit[ch] = 0;
  endtask

  task automatic pps_pairs(input int n);
    for (int t = 0; t < n; t++) begin
      longint t0, t1, now;
      now = longint'($realtime * 1000.0);
      t0 = now + 1000 + $urandom_range(0, 9999);
      t1 = (t % 3 == 0) ? t0 + $urandom_range(0, 3000) : t0 + $urandom_range(100, 200000);
      true_iv = t1 - t0;
      if (t1 / TREF == t0 / TREF) ev_same_period++;
      fork
        pulse(0, t0);
        pulse(1, t1);
      join
      #50ns;
    end
  endtask

  task automatic i2c(input bit rd, input logic [6:0] dev, input logic [7:0] r, w);
    @(negedge clk);
    i2c_cmd_valid = 1; i2c_cmd_read = rd; i2c_cmd_dev = dev; i2c_cmd_reg = r; i2c_cmd_wdata = w;
    @(negedge clk); i2c_cmd_valid = 0;
    while (!i2c_done) @(negedge clk);
  endtask

  initial begin
    #50ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint unsigned recv0;
    repeat (3) @(negedge ts_clk); rst_n = 1; rst_cyc = cyc;
    fork
      begin
        for (int phase = 0; phase < 3; phase++) begin
          cfg = DEFAULT_CFG;
          cfg.layer = layer_e'(phase);
          fork
            traffic(0, 10, layer_e'(phase), 1);
            traffic(1, 10, layer_e'(phase), 2);
          join
          repeat (100) @(negedge ts_clk);
        end
      end
      pps_pairs(30);
      begin
        i2c(0, 7'h50, 8'h07, 8'hC3);
        ev_i2c_wr++;
        check(!i2c_ack_err, "i2c write");
        i2c(1, 7'h50, 8'h07, 0);
        ev_i2c_rd++;
        check(!i2c_ack_err && i2c_rdata == 8'hC3, "i2c read-back");
        i2c(1, 7'h22, 8'h00, 0);
        if (i2c_ack_err) ev_i2c_nack++;
      end
    join
    check(expq[0].size() == 0 && expq[1].size() == 0, "all records delivered");
    check(32'(n_rx) == ev_rx && 32'(n_tx) == ev_tx && 32'(n_ign) == ev_ignored, "statistics");
    // overflow: stall the timestamp stream
    compare = 0; ts_out_ready = 0;
    cfg.layer = LAYER_L2;
    traffic(0, DEPTH + 3, LAYER_L2, 7, 1'b1);
    ev_overflow = int'(n_ovf);
    ts_out_ready = 1;
    repeat (100) @(negedge ts_clk);
    check(n_ovf == 3, "three records dropped");
    check(32'(n_rx) == ev_rx && 32'(n_tx) == ev_tx, "per-direction counts");

    $display("rx %0d tx %0d ignored %0d | L2 %0d L3 %0d L4 %0d | merge-wait %0d stall %0d overflow %0d",
             ev_rx, ev_tx, ev_ignored, ev_l2, ev_l3, ev_l4, ev_merge_wait, ev_stall, ev_overflow);
    $display("intervals %0d same-period %0d | i2c wr %0d rd %0d nack %0d",
             ev_interval, ev_same_period, ev_i2c_wr, ev_i2c_rd, ev_i2c_nack);
    check(ev_rx > 0, "rx timestamp");      check(ev_tx > 0, "tx timestamp");
    check(ev_ignored > 0, "ignored frame");
    check(ev_l2 > 0 && ev_l3 > 0 && ev_l4 > 0, "all three layers");
    check(ev_merge_wait > 0, "merge wait");  check(ev_stall > 0, "stream stall");
    check(ev_overflow > 0, "overflow");
    check(ev_interval == 30, "intervals");  check(ev_same_period > 0, "same-period pair");
    check(ev_i2c_wr > 0 && ev_i2c_rd > 0 && ev_i2c_nack > 0, "i2c accesses");
    check(tm_ovf == 0, "measurement stream kept up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
