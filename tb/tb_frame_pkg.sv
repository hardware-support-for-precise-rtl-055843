// tb_frame_pkg: testbench helpers that build Ethernet frames carrying a
// PTPv2 header, as raw Ethernet (EtherType 0x88F7) or as IPv4/UDP, so that
// the timestamper testbenches can drive them nibble by nibble on an MII.
package tb_frame_pkg;
  typedef byte unsigned bytes_t[$];

  typedef struct {
    bit        udp;        // 0: layer 2 frame, 1: IPv4/UDP frame
    bit [3:0]  msg_type;
    bit [3:0]  version;
    bit [7:0]  domain;
    bit [15:0] seq_id;
    bit [31:0] ip_dst;
    bit [15:0] udp_port;
    bit [7:0]  ip_proto;
    bit [15:0] ethtype;    // used for layer 2 frames
    int        pad;        // bytes after the PTP header
  } frame_t;

  function automatic frame_t default_frame();
    frame_t f;
    f.udp = 0; f.msg_type = 0; f.version = 2; f.domain = 0; f.seq_id = 16'h1234;
    f.ip_dst = 32'hE000_0181; f.udp_port = 319; f.ip_proto = 17; f.ethtype = 16'h88F7;
    f.pad = 10;
    return f;
  endfunction

  // Frame bytes from the destination address on (no preamble, no FCS check).
  function automatic bytes_t build(input frame_t f);
    bytes_t b;
    for (int i = 0; i < 6; i++) b.push_back(8'h01);        // dst MAC
    for (int i = 0; i < 6; i++) b.push_back(8'(8'h10 + i)); // src MAC
    if (!f.udp) begin
      b.push_back(f.ethtype[15:8]); b.push_back(f.ethtype[7:0]);
    end else begin
      b.push_back(8'h08); b.push_back(8'h00);
      b.push_back(8'h45); b.push_back(8'h00);               // version/IHL, TOS
      b.push_back(8'h00); b.push_back(8'd72);               // total length
      for (int i = 0; i < 4; i++) b.push_back(8'h00);       // id, flags
      b.push_back(8'd1); b.push_back(f.ip_proto);            // TTL, protocol
      b.push_back(8'h00); b.push_back(8'h00);               // checksum
      for (int i = 0; i < 4; i++) b.push_back(8'(8'd192 + i)); // src IP
      for (int i = 3; i >= 0; i--) b.push_back(f.ip_dst[i*8 +: 8]);
      b.push_back(8'h01); b.push_back(8'h3F);               // src port
      b.push_back(f.udp_port[15:8]); b.push_back(f.udp_port[7:0]);
      b.push_back(8'h00); b.push_back(8'd52);               // UDP length
      b.push_back(8'h00); b.push_back(8'h00);               // checksum
    end
    // PTP header (34 bytes)
    b.push_back({4'h0, f.msg_type});
    b.push_back({4'h0, f.version});
    b.push_back(8'h00); b.push_back(8'd44);                 // messageLength
    b.push_back(f.domain);
    for (int i = 5; i < 30; i++) b.push_back(8'(i * 7));     // flags, correction, ids
    b.push_back(f.seq_id[15:8]); b.push_back(f.seq_id[7:0]);
    b.push_back(8'h00); b.push_back(8'h7F);                 // control, logInterval
    for (int i = 0; i < f.pad; i++) b.push_back(8'(i));
    return b;
  endfunction
endpackage
