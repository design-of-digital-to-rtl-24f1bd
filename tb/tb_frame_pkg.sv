// tb_frame_pkg: builds Ethernet II / IPv4 / UDP frames byte by byte for the
// receiver testbenches.  The header values are written out here on their
// own, not taken from the design's package, so that a wrong constant in the
// design shows up as a failed check.
package tb_frame_pkg;

  typedef byte unsigned bytes_t[$];

  typedef struct {
    logic [47:0] mac;   // destination MAC
    logic [15:0] eth;   // EtherType
    logic [7:0]  pro;   // IP protocol
    logic [31:0] ip;    // destination IP
    logic [15:0] port;  // UDP destination port
  } hdr_t;

  function automatic hdr_t good_hdr();
    hdr_t h;
    h.mac  = 48'hFF_FF_FF_FF_FF_FF;
    h.eth  = 16'h0800;
    h.pro  = 8'h11;
    h.ip   = 32'hFF_FF_FF_FF;
    h.port = 16'd3435;
    return h;
  endfunction

  // Frame from the destination MAC to the frame check sequence (no preamble).
  // Short frames are padded to 60 bytes before the 4-byte check sequence,
  // whose value here is arbitrary (the receiver does not check it).
  function automatic bytes_t build_frame(hdr_t h, bytes_t payload);
    bytes_t f;
    int unsigned udp_len = 8 + payload.size();
    int unsigned ip_len  = 20 + udp_len;
    for (int i = 5; i >= 0; i--) f.push_back(h.mac[i*8 +: 8]);
    f.push_back(8'h00); f.push_back(8'h0A); f.push_back(8'h35);       // source MAC
    f.push_back(8'h01); f.push_back(8'h02); f.push_back(8'h03);
    f.push_back(h.eth[15:8]); f.push_back(h.eth[7:0]);
    f.push_back(8'h45); f.push_back(8'h00);                           // version/IHL, TOS
    f.push_back(8'(ip_len >> 8)); f.push_back(8'(ip_len));
    f.push_back(8'h12); f.push_back(8'h34);                           // identification
    f.push_back(8'h40); f.push_back(8'h00);                           // flags, offset
    f.push_back(8'h40); f.push_back(h.pro);                           // TTL, protocol
    f.push_back(8'h00); f.push_back(8'h00);                           // header checksum
    f.push_back(8'hC0); f.push_back(8'hA8); f.push_back(8'h01); f.push_back(8'h0A);  // source IP
    for (int i = 3; i >= 0; i--) f.push_back(h.ip[i*8 +: 8]);
    f.push_back(8'h13); f.push_back(8'h88);                           // source port
    f.push_back(h.port[15:8]); f.push_back(h.port[7:0]);
    f.push_back(8'(udp_len >> 8)); f.push_back(8'(udp_len));
    f.push_back(8'h00); f.push_back(8'h00);                           // UDP checksum
    foreach (payload[i]) f.push_back(payload[i]);
    while (f.size() < 60) f.push_back(8'h55);                         // padding
    f.push_back(8'hD5); f.push_back(8'h55); f.push_back(8'hAB); f.push_back(8'hD5);  // FCS
    return f;
  endfunction

  // RX_DATA(0:3) pattern for an MII nibble value (index 0 = RXD0).
  function automatic logic [0:3] mii_pins(logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

endpackage
