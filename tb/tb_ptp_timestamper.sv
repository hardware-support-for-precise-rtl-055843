// tb_ptp_timestamper: end-to-end test of the IEEE 1588 timestamper. Random
// PTP and non-PTP frames are sent at the same time on the receive and the
// transmit MII, under layer 2 and layer 4 criteria. For every frame that
// should match, the expected record (direction, messageType, sequenceId,
// and the counter value of the cycle after the SFD nibble, in ns) is
// queued; the 3-word records read from the output stream, with random
// back-pressure, must equal them in order per direction. A last phase
// holds the output stream until records are dropped and checks the
// overflow count.
`timescale 1ns/1ps
module tb_ptp_timestamper;
  import ts_pkg::*;
  import tb_frame_pkg::*;
  localparam int INC = 40, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  match_cfg_t cfg = DEFAULT_CFG;
  logic       dv[2] = '{0, 0}, er[2] = '{0, 0};
  logic [3:0] dd[2] = '{0, 0};
  logic [TS_W-1:0] time_now;
  logic [31:0] out_data;
  logic out_valid, out_ready = 1, out_last;
  logic [15:0] n_rx, n_tx, n_ign, n_ovf;
  int checks = 0, failures = 0;
  longint cyc = 0, rst_cyc = 0;
  ts_record_t expq[2][$];
  int n_recv = 0, n_exp = 0, n_nonmatch = 0, n_both = 0;
  bit compare = 1;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  ptp_timestamper dut (.clk, .rst_n, .cfg,
    .rx_dv(dv[0]), .rx_er(er[0]), .rxd(dd[0]), .tx_en(dv[1]), .tx_er(er[1]), .txd(dd[1]),
    .time_now, .out_data, .out_valid, .out_ready, .out_last,
    .n_rx_matched(n_rx), .n_tx_matched(n_tx), .n_ignored(n_ign), .n_overflow(n_ovf));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reading the stream
  logic [95:0] acc;
  int wi = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    acc = {acc[63:0], out_data};
    check(out_last == (wi == 2), "last flag");
    wi = (wi == 2) ? 0 : wi + 1;
    if (wi == 0) begin
      ts_record_t r, e;
      r = ts_record_t'(acc);
      n_recv++;
      if (compare) begin
        if (expq[r.dir].size() == 0) check(0, "unexpected record");
        else begin
          e = expq[r.dir].pop_front();
          check(r == e, $sformatf("record dir %0d seq %h ts %0d exp seq %h ts %0d",
                                  r.dir, r.seq_id, r.ts, e.seq_id, e.ts));
        end
      end
    end
  end

  // send one frame on channel c; queue the expected record
  task automatic send(input int c, input frame_t f, input bit exp);
    bytes_t b;
    longint k;
    b = build(f);
    repeat (7) begin @(negedge clk); dv[c] = 1; dd[c] = 4'h5; end
    @(negedge clk); dd[c] = 4'hD; k = cyc;
    foreach (b[i]) begin
      @(negedge clk); dd[c] = b[i][3:0];
      @(negedge clk); dd[c] = b[i][7:4];
    end
    @(negedge clk); dv[c] = 0;
    if (exp) begin
      ts_record_t e;
      e = '0;
      e.dir = c[0]; e.msg_type = f.msg_type; e.seq_id = f.seq_id;
      e.ts = TS_W'(INC) * TS_W'(k + 1 - rst_cyc);
      expq[c].push_back(e);
      n_exp++;
    end else n_nonmatch++;
    repeat ($urandom_range(12, 40)) @(negedge clk);
  endtask

  task automatic traffic(input int c, input int n, input bit l4, input bit all_match = 0);
    for (int t = 0; t < n; t++) begin
      frame_t f;
      bit m;
      f = default_frame();
      f.udp = l4;
      f.msg_type = 4'($urandom_range(0, 3));
      f.seq_id = 16'($urandom);
      f.pad = $urandom_range(10, 30);
      m = 1;
      if (!all_match) case ($urandom_range(0, 5))
        0: begin f.msg_type = 4'hB; m = 0; end          // Announce: not in mask
        1: begin if (l4) f.udp_port = 320; else f.ethtype = 16'h0800; m = 0; end
        default: ;
      endcase
      send(c, f, m);
    end
  endtask

  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (compare) out_ready = ($urandom_range(0, 4) != 0);

  initial begin
    longint unsigned got_m;
    repeat (3) @(negedge clk); rst_n = 1; rst_cyc = cyc;
    for (int phase = 0; phase < 2; phase++) begin
      cfg = DEFAULT_CFG;
      cfg.layer = phase ? LAYER_L4 : LAYER_L2;
      fork
        traffic(0, 30, phase[0]);
        traffic(1, 30, phase[0]);
      join
      repeat (200) @(negedge clk);
    end
    check(expq[0].size() == 0 && expq[1].size() == 0, "all records delivered");
    check(32'(n_rx) + 32'(n_tx) == n_exp && 32'(n_ign) == n_nonmatch, "statistics");
    check(n_ovf == 0, "no overflow in normal traffic");
    check(time_now == TS_W'(INC) * TS_W'(cyc - rst_cyc), "counter runs at INC per clock");
    // overflow phase: stall the stream
    compare = 0; out_ready = 0;
    cfg.layer = LAYER_L2;
    @(negedge clk);
    traffic(0, DEPTH + 4, 1'b0, 1'b1);
    got_m = n_recv;
    out_ready = 1;
    repeat (200) @(negedge clk);
    check(n_ovf > 0, "overflow happened");
    check(longint'(n_recv) - longint'(got_m) == DEPTH, "a full FIFO drained");
    $display("records %0d, non-matching %0d, overflow %0d", n_exp, n_nonmatch, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
