// voice_pkg: constants and small functions shared by the voice-packet receiver.
//
// The receiver accepts broadcast UDP voice packets from a 100 Mb/s Ethernet
// PHY's MII receive port and plays the payload bytes on a 12-bit SPI DAC.
// This package holds the values the address-match stage compares against
// (the assigned MAC, EtherType, IP protocol, IP address and UDP port), the
// byte offsets of those header fields counted from the first byte of the
// destination MAC, the 32-bit DAC command word layout and the 8-to-12-bit
// sample widening.
//
// The match values are the ones the design specifies.  The header offsets
// follow standard Ethernet II / IPv4 (20-byte header, no options) / UDP
// framing.  The DAC command and address codes, and the widening by bit
// replication, are this implementation's choices.
package voice_pkg;

  // Nibble codes as they appear on RX_DATA(0:3), index 0 = RXD0 written first.
  localparam logic [0:3] NIB_PREAMBLE = 4'b1010;  // 0x5 on the MII pins
  localparam logic [0:3] NIB_SFD      = 4'b1011;  // 0xD on the MII pins

  // Values assigned to the sender application.
  localparam logic [47:0] DEF_MAC  = 48'hFF_FF_FF_FF_FF_FF;
  localparam logic [15:0] DEF_ETH  = 16'h0800;          // IPv4
  localparam logic [7:0]  DEF_PRO  = 8'h11;             // UDP
  localparam logic [31:0] DEF_IP   = 32'hFF_FF_FF_FF;   // 255.255.255.255
  localparam logic [15:0] DEF_PORT = 16'd3435;

  // Byte offsets from the first destination-MAC byte.
  localparam int unsigned OFS_MAC     = 0;   // 6 bytes, destination MAC
  localparam int unsigned OFS_ETH     = 12;  // 2 bytes, EtherType
  localparam int unsigned OFS_PRO     = 23;  // 1 byte, IP protocol
  localparam int unsigned OFS_IP      = 30;  // 4 bytes, destination IP
  localparam int unsigned OFS_PORT    = 36;  // 2 bytes, UDP destination port
  localparam int unsigned OFS_UDPLEN  = 38;  // 2 bytes, UDP length
  localparam int unsigned OFS_PAYLOAD = 42;  // first payload byte
  localparam int unsigned UDP_HDR_BYTES = 8;

  // 32-bit DAC word: 8 don't-care, 4 command, 4 address, 12 data, 4 don't-care.
  typedef struct packed {
    logic [7:0]  dc_hi;
    logic [3:0]  cmd;
    logic [3:0]  addr;
    logic [11:0] data;
    logic [3:0]  dc_lo;
  } dac_word_t;

  localparam logic [3:0] DAC_CMD_WRITE_UPDATE = 4'b0011;  // write and update channel
  localparam logic [3:0] DAC_ADDR_A           = 4'b0000;  // DAC_OUTA

  // Widen an unsigned 8-bit sample to the DAC's 12 bits (00h->000h, FFh->FFFh).
  function automatic logic [11:0] widen_sample(input logic [7:0] b);
    return {b, b[7:4]};
  endfunction

  // Nibble on RX_DATA(0:3) as an MII value (bit 0 = RXD0).
  function automatic logic [3:0] nib_value(input logic [0:3] d);
    return {d[3], d[2], d[1], d[0]};
  endfunction

endpackage
