// tb_ptp_analyzer: feeds byte streams of random PTP / non-PTP frames into
// ptp_analyzer under random match criteria (layer 2, 3 and 4, message
// masks, domain filter) and compares the verdict and the extracted fields
// with a reference model written from the frame description. Also covers
// truncated frames and frames with an MII error. The verdict must appear
// exactly one cycle after frame_end.
`timescale 1ns/1ps
module tb_ptp_analyzer;
  import ts_pkg::*;
  import tb_frame_pkg::*;
  logic clk = 0, rst_n = 0;
  match_cfg_t cfg;
  logic sof = 0, bv = 0, fe = 0, ferr = 0;
  logic [7:0] bd = 0;
  logic rv, rm;
  ptp_info_t info;
  int checks = 0, failures = 0;
  int n_match = 0, n_nomatch = 0;
  int layer_hits[3] = '{0, 0, 0};
  always #5 clk = ~clk;

  ptp_analyzer dut (.clk, .rst_n, .cfg, .sof, .byte_valid(bv), .byte_data(bd),
                    .frame_end(fe), .frame_err(ferr), .res_valid(rv),
                    .res_match(rm), .res_info(info));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit model(input frame_t f, input match_cfg_t c, input int len, input bit err);
    bit lay, hdr;
    int p;
    p   = f.udp ? 42 : 14;
    hdr = len >= p + 32;
    case (c.layer)
      LAYER_L2: lay = !f.udp && f.ethtype == 16'h88F7;
      LAYER_L3: lay = f.udp && f.ip_proto == 17 && f.ip_dst == c.ip_dst;
      LAYER_L4: lay = f.udp && f.ip_proto == 17 && f.ip_dst == c.ip_dst && f.udp_port == c.udp_port;
      default:  lay = 0;
    endcase
    // in layer 2 mode a UDP frame is read at the wrong offset: it fails on EtherType
    return lay && hdr && !err && f.version == 2 && c.msg_mask[f.msg_type] &&
           (c.any_domain || c.domain == f.domain);
  endfunction

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    frame_t f;
    bytes_t b;
    int len;
    bit err, exp;
    layer_e lay;
    cfg = DEFAULT_CFG;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      f = default_frame();
      f.udp      = $urandom_range(0, 1);
      f.msg_type = 4'($urandom_range(0, 15));
      f.version  = ($urandom_range(0, 9) == 0) ? 4'd1 : 4'd2;
      f.domain   = 8'($urandom_range(0, 2));
      f.seq_id   = 16'($urandom);
      f.ip_dst   = ($urandom_range(0, 4) == 0) ? 32'hE000_006B : 32'hE000_0181;
      f.udp_port = ($urandom_range(0, 3) == 0) ? 16'd320 : 16'd319;
      f.ip_proto = ($urandom_range(0, 9) == 0) ? 8'd6 : 8'd17;
      f.ethtype  = ($urandom_range(0, 9) == 0) ? 16'h0806 : 16'h88F7;
      cfg            = DEFAULT_CFG;
      cfg.layer      = layer_e'($urandom_range(0, 2));
      cfg.msg_mask   = ($urandom_range(0, 2) == 0) ? 16'($urandom) : 16'hFFFF;
      cfg.any_domain = $urandom_range(0, 1);
      cfg.domain     = 8'($urandom_range(0, 2));
      b   = build(f);
      len = ($urandom_range(0, 9) == 0) ? $urandom_range(10, b.size()) : b.size();
      err = ($urandom_range(0, 14) == 0);
      exp = model(f, cfg, len, err);
      lay = cfg.layer;
      // drive: sof, then one byte every second cycle, then frame_end
      @(negedge clk); sof = 1;
      @(negedge clk); sof = 0;
      cfg = '0;   // criteria are sampled at sof only
      for (int i = 0; i < len; i++) begin
        @(negedge clk); bv = 1; bd = b[i];
        @(negedge clk); bv = 0;
      end
      @(negedge clk); fe = 1; ferr = err;
      @(negedge clk); fe = 0; ferr = 0;
      check(rv === 1'b1, "verdict one cycle after frame_end");
      check(rm === exp, $sformatf("match t=%0d", t));
      if (exp) begin
        check(info.msg_type == f.msg_type && info.seq_id == f.seq_id && info.domain == f.domain,
              "fields");
        n_match++;
        layer_hits[int'(lay)]++;
      end else n_nomatch++;
      @(negedge clk);
      check(rv === 1'b0, "single verdict");
    end
    $display("matched %0d (L2 %0d, L3 %0d, L4 %0d), rejected %0d", n_match,
             layer_hits[0], layer_hits[1], layer_hits[2], n_nomatch);
    check(n_match > 20 && n_nomatch > 20, "both outcomes seen");
    check(layer_hits[0] > 0 && layer_hits[1] > 0 && layer_hits[2] > 0, "every layer matched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
