// ts_pkg: types and constants shared by the IEEE 1588 (PTP) timestamper blocks.
// Frame layout constants follow the Ethernet II, IPv4, UDP and PTPv2 header
// formats; the layer-selection encoding and the record layout are this
// design's own choices.
package ts_pkg;

  // Width of the free-running timestamp counter (nanoseconds).
  localparam int unsigned TS_W = 64;

  // Which protocol layer the match criteria are applied on.
  typedef enum logic [1:0] {
    LAYER_L2 = 2'd0,  // raw Ethernet, EtherType 0x88F7
    LAYER_L3 = 2'd1,  // IPv4 carrying UDP, destination address compared
    LAYER_L4 = 2'd2   // as L3 and the UDP destination port compared too
  } layer_e;

  // Run-time match criteria.
  typedef struct packed {
    layer_e      layer;
    logic [15:0] msg_mask;   // bit n set: PTP messageType n is timestamped
    logic [31:0] ip_dst;     // IPv4 destination for L3/L4
    logic [15:0] udp_port;   // UDP destination port for L4
    logic [7:0]  domain;     // PTP domainNumber to accept
    logic        any_domain; // 1: ignore domain
  } match_cfg_t;

  // Result of analysing one frame.
  typedef struct packed {
    logic [3:0]  msg_type;
    logic [7:0]  domain;
    logic [15:0] seq_id;
  } ptp_info_t;

  // Timestamp record handed to the higher PTP logic (96 bits, 3 words).
  typedef struct packed {
    logic        dir;       // 0: receive, 1: transmit
    logic [6:0]  rsvd;
    logic [3:0]  msg_type;
    logic [3:0]  rsvd2;
    logic [15:0] seq_id;
    logic [TS_W-1:0] ts;
  } ts_record_t;

  localparam logic [15:0] ETHTYPE_PTP  = 16'h88F7;
  localparam logic [15:0] ETHTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IPPROTO_UDP  = 8'd17;
  localparam logic [31:0] PTP_PRIMARY_MCAST = 32'hE000_0181; // 224.0.1.129
  localparam logic [15:0] PTP_EVENT_PORT    = 16'd319;

  // Byte offsets from the first byte after the SFD.
  localparam int unsigned OFS_PTP_L2  = 14;
  localparam int unsigned OFS_PTP_UDP = 42;  // 14 + 20 (IHL=5) + 8

  localparam match_cfg_t DEFAULT_CFG = '{
    layer: LAYER_L2, msg_mask: 16'h000F, ip_dst: PTP_PRIMARY_MCAST,
    udp_port: PTP_EVENT_PORT, domain: 8'd0, any_domain: 1'b1};

endpackage
