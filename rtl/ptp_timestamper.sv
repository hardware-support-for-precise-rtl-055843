// ptp_timestamper: IEEE 1588 timestamper that sits on the MII between a
// PHY and a MAC and only listens. One free-running counter (nanoseconds,
// advancing by INC_NS per reference clock) is shared by a receive and a
// transmit channel. Each channel is an mii_framer (SFD event and bytes), a
// ptp_analyzer (match criteria on layer 2, 3 or 4) and a ptp_msg_composer
// (timestamp taken at the SFD, record built on a match). The two channels'
// records are merged, receive first when both are pending, into
// output_logic, which streams them to the higher PTP logic as 32-bit words
// (three per record). A record that finds its channel's pending slot still
// full is dropped and counted; with frames of at least 64 bytes this cannot
// happen. The MII signals are taken as synchronous to clk, i.e. the
// reference clock is also the MII clock. The block structure follows the
// timestamper description; clocking, record format and merging are this
// design's choices.
`timescale 1ns/1ps
module ptp_timestamper
  import ts_pkg::*;
#(
  parameter int unsigned INC_NS     = 40,  // reference period in ns (25 MHz MII clock)
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  match_cfg_t  cfg,
  // MII receive direction (PHY to MAC)
  input  logic        rx_dv,
  input  logic        rx_er,
  input  logic [3:0]  rxd,
  // MII transmit direction (MAC to PHY)
  input  logic        tx_en,
  input  logic        tx_er,
  input  logic [3:0]  txd,
  // current time
  output logic [TS_W-1:0] time_now,
  // stream of timestamp records to the higher PTP logic
  output logic [31:0] out_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_last,
  // statistics
  output logic [15:0] n_rx_matched,
  output logic [15:0] n_tx_matched,
  output logic [15:0] n_ignored,
  output logic [15:0] n_overflow
);
  free_counter #(.W(TS_W), .INC(INC_NS)) u_cnt (
    .clk, .rst_n, .en(1'b1), .count(time_now));

  logic       ch_dv  [2];
  logic       ch_er  [2];
  logic [3:0] ch_d   [2];
  assign ch_dv[0] = rx_dv;  assign ch_er[0] = rx_er;  assign ch_d[0] = rxd;
  assign ch_dv[1] = tx_en;  assign ch_er[1] = tx_er;  assign ch_d[1] = txd;

  logic        rec_valid [2];
  ts_record_t  rec       [2];
  logic [15:0] n_match   [2];
  logic [15:0] n_ign     [2];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic       sfd, bv, fe, ferr, rv, rm;
    logic [7:0] bd;
    ptp_info_t  info;
    mii_framer u_framer (
      .clk, .rst_n, .dv(ch_dv[c]), .er(ch_er[c]), .d(ch_d[c]),
      .sfd, .byte_valid(bv), .byte_data(bd), .frame_end(fe), .frame_err(ferr));
    ptp_analyzer u_an (
      .clk, .rst_n, .cfg, .sof(sfd), .byte_valid(bv), .byte_data(bd),
      .frame_end(fe), .frame_err(ferr),
      .res_valid(rv), .res_match(rm), .res_info(info));
    ptp_msg_composer #(.DIR(c[0])) u_comp (
      .clk, .rst_n, .count(time_now), .sfd, .res_valid(rv), .res_match(rm),
      .res_info(info), .rec_valid(rec_valid[c]), .rec(rec[c]),
      .n_matched(n_match[c]), .n_ignored(n_ign[c]));
  end

  assign n_rx_matched = n_match[0];
  assign n_tx_matched = n_match[1];
  assign n_ignored    = n_ign[0] + n_ign[1];

  // Merge: one pending slot per channel, receive channel first.
  logic       pend   [2];
  ts_record_t pend_r [2];
  logic       mrg_valid;
  ts_record_t mrg_rec;
  logic [15:0] n_ovf_fifo, n_ovf_merge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend[0] <= 1'b0; pend[1] <= 1'b0;
      pend_r[0] <= '0; pend_r[1] <= '0;
      mrg_valid <= 1'b0;
      mrg_rec   <= '0;
      n_ovf_merge <= '0;
    end else begin
      mrg_valid <= 1'b0;
      if (pend[0]) begin
        mrg_valid <= 1'b1; mrg_rec <= pend_r[0]; pend[0] <= 1'b0;
      end else if (pend[1]) begin
        mrg_valid <= 1'b1; mrg_rec <= pend_r[1]; pend[1] <= 1'b0;
      end
      for (int c = 0; c < 2; c++)
        if (rec_valid[c]) begin
          // the slot is free, or is being emptied this cycle
          if (!pend[c] || c == 0 || !pend[0]) begin
            pend[c] <= 1'b1; pend_r[c] <= rec[c];
          end else n_ovf_merge <= n_ovf_merge + 16'd1;
        end
    end
  end

  output_logic #(.REC_W($bits(ts_record_t)), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .rec_valid(mrg_valid), .rec(mrg_rec),
    .out_data, .out_valid, .out_ready, .out_last,
    .n_overflow(n_ovf_fifo), .level());

  assign n_overflow = n_ovf_fifo + n_ovf_merge;
endmodule
