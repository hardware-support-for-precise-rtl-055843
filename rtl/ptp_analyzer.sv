// ptp_analyzer: the packet analyzer FSM of the timestamper. It follows the
// bytes of one frame (as delivered by mii_framer) and extracts the fields
// that decide whether the frame is a PTP message to timestamp:
//   Ethernet EtherType (bytes 12-13),
//   IPv4 version/IHL (14), protocol (23), destination address (30-33),
//   UDP destination port (36-37),
//   PTP messageType (low nibble of PTP byte 0), versionPTP (byte 1),
//   domainNumber (byte 4) and sequenceId (bytes 30-31).
// The PTP header starts at byte 14 on layer 2 and at byte 42 on layers 3
// and 4 (IPv4 without options, UDP). The criteria (cfg) are sampled at the
// SFD and held for the frame. When frame_end arrives the analyzer gives its
// verdict for one cycle: res_valid with res_match and the extracted fields.
// A frame matches when
//   L2: EtherType 0x88F7;
//   L3: EtherType 0x0800, IHL 5, protocol UDP, IPv4 destination = cfg.ip_dst;
//   L4: as L3 and UDP destination port = cfg.udp_port;
// and in all modes versionPTP = 2, the messageType bit is set in
// cfg.msg_mask, the domain is accepted, the header reached the sequenceId
// and the MII reported no error. The supported layers and the existence of
// configurable criteria follow the timestamper description; the concrete
// fields compared are this design's choice. VLAN tags and IPv4 options are
// not parsed.
`timescale 1ns/1ps
module ptp_analyzer
  import ts_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  match_cfg_t cfg,
  input  logic       sof,         // SFD event, start of a frame
  input  logic       byte_valid,
  input  logic [7:0] byte_data,
  input  logic       frame_end,
  input  logic       frame_err,
  output logic       res_valid,
  output logic       res_match,
  output ptp_info_t  res_info
);
  match_cfg_t  cfg_q;
  logic [10:0] idx;            // byte index inside the frame (saturating)
  logic [15:0] ethtype;
  logic [7:0]  ip_vihl, ip_proto;
  logic [3:0]  ptp_ver;        // versionPTP (low nibble of PTP byte 1)
  logic [31:0] ip_dst;
  logic [15:0] udp_dport;
  ptp_info_t   info;
  logic        hdr_done;       // sequenceId fully received

  logic [10:0] p;              // offset of the PTP header
  assign p = (cfg_q.layer == LAYER_L2) ? 11'(OFS_PTP_L2) : 11'(OFS_PTP_UDP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q     <= DEFAULT_CFG;
      idx       <= '0;
      ethtype   <= '0;
      ip_vihl   <= '0;
      ip_proto  <= '0;
      ip_dst    <= '0;
      udp_dport <= '0;
      ptp_ver   <= '0;
      info      <= '0;
      hdr_done  <= 1'b0;
    end else if (sof) begin
      cfg_q    <= cfg;
      idx      <= '0;
      hdr_done <= 1'b0;
      ethtype  <= '0;
      ptp_ver  <= '0;
    end else if (byte_valid) begin
      if (idx != '1) idx <= idx + 11'd1;
      case (idx)
        11'd12: ethtype[15:8] <= byte_data;
        11'd13: ethtype[7:0]  <= byte_data;
        11'd14: ip_vihl       <= byte_data;
        11'd23: ip_proto      <= byte_data;
        11'd30: ip_dst[31:24] <= byte_data;
        11'd31: ip_dst[23:16] <= byte_data;
        11'd32: ip_dst[15:8]  <= byte_data;
        11'd33: ip_dst[7:0]   <= byte_data;
        11'd36: udp_dport[15:8] <= byte_data;
        11'd37: udp_dport[7:0]  <= byte_data;
        default: ;
      endcase
      if (idx == p)          info.msg_type     <= byte_data[3:0];
      if (idx == p + 11'd1)  ptp_ver           <= byte_data[3:0];
      if (idx == p + 11'd4)  info.domain       <= byte_data;
      if (idx == p + 11'd30) info.seq_id[15:8] <= byte_data;
      if (idx == p + 11'd31) begin
        info.seq_id[7:0] <= byte_data;
        hdr_done         <= 1'b1;
      end
    end
  end

  // Verdict, evaluated on the fields gathered so far.
  logic layer_ok, ptp_ok;
  always_comb begin
    unique case (cfg_q.layer)
      LAYER_L2: layer_ok = (ethtype == ETHTYPE_PTP);
      LAYER_L3: layer_ok = (ethtype == ETHTYPE_IPV4) && (ip_vihl == 8'h45) &&
                           (ip_proto == IPPROTO_UDP) && (ip_dst == cfg_q.ip_dst);
      LAYER_L4: layer_ok = (ethtype == ETHTYPE_IPV4) && (ip_vihl == 8'h45) &&
                           (ip_proto == IPPROTO_UDP) && (ip_dst == cfg_q.ip_dst) &&
                           (udp_dport == cfg_q.udp_port);
      default:  layer_ok = 1'b0;
    endcase
    ptp_ok = hdr_done && (ptp_ver == 4'd2) && cfg_q.msg_mask[info.msg_type] &&
             (cfg_q.any_domain || (info.domain == cfg_q.domain));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_match <= 1'b0;
      res_info  <= '0;
    end else begin
      res_valid <= frame_end;
      res_match <= frame_end && layer_ok && ptp_ok && !frame_err;
      res_info  <= info;
    end
  end
endmodule
