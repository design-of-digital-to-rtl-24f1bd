// address_match: checks that a frame comes from the voice sender application
// and marks its UDP payload for the buffer.
//
// After the one-cycle am_enable from the frame starter, the unit walks the
// frame header one MII nibble per rx_clk, low nibble of each byte first, and
// compares in order the destination MAC, the EtherType, the IP protocol, the
// destination IP address and the UDP destination port with the assigned
// values.  The first mismatch drops the frame: the unit goes idle until the
// next am_enable.  If all five match, it reads the UDP length field and
// raises buff_enable for exactly the (length - 8) payload bytes, so the
// buffer sees neither Ethernet padding nor the frame check sequence.
//
// Timing: buff_enable is registered and is high in exactly the cycles in
// which rx_data carries a payload nibble (two per byte, low nibble first).
// A header-only packet (length 8) raises nothing.
//
// The compared fields and their values are the design's.  Fixed offsets for
// a 20-byte IPv4 header and the use of the UDP length field to end the
// payload are this implementation's choices.
module address_match
  import voice_pkg::*;
#(
  parameter logic [47:0] MATCH_MAC  = DEF_MAC,
  parameter logic [15:0] MATCH_ETH  = DEF_ETH,
  parameter logic [7:0]  MATCH_PRO  = DEF_PRO,
  parameter logic [31:0] MATCH_IP   = DEF_IP,
  parameter logic [15:0] MATCH_PORT = DEF_PORT
) (
  input  logic       rx_clk,
  input  logic       rst_n,
  input  logic [0:3] rx_data,
  input  logic       am_enable,
  output logic       buff_enable
);

  typedef enum logic [1:0] {AM_IDLE, AM_HEADER, AM_PAYLOAD} am_state_t;

  am_state_t   state;
  logic [5:0]  byte_idx;    // header byte being received
  logic        hi_nib;      // 0: low nibble of the byte, 1: high nibble
  logic [3:0]  low_nib;     // low nibble held until the byte is complete
  logic [15:0] udp_len;
  logic [16:0] nib_left;    // payload nibbles still to come

  logic [3:0]  nib;
  logic [7:0]  cur_byte;
  logic        byte_ok;     // current byte agrees with the assigned value
  logic        last_hdr;    // current byte is the last header byte

  assign nib      = nib_value(rx_data);
  assign cur_byte = {nib, low_nib};
  assign last_hdr = (byte_idx == 6'(OFS_PAYLOAD - 1));

  // Expected value of each compared header byte; bytes not compared pass.
  always_comb begin
    byte_ok = 1'b1;
    unique case (byte_idx)
      6'(OFS_MAC + 0):  byte_ok = (cur_byte == MATCH_MAC[47:40]);
      6'(OFS_MAC + 1):  byte_ok = (cur_byte == MATCH_MAC[39:32]);
      6'(OFS_MAC + 2):  byte_ok = (cur_byte == MATCH_MAC[31:24]);
      6'(OFS_MAC + 3):  byte_ok = (cur_byte == MATCH_MAC[23:16]);
      6'(OFS_MAC + 4):  byte_ok = (cur_byte == MATCH_MAC[15:8]);
      6'(OFS_MAC + 5):  byte_ok = (cur_byte == MATCH_MAC[7:0]);
      6'(OFS_ETH + 0):  byte_ok = (cur_byte == MATCH_ETH[15:8]);
      6'(OFS_ETH + 1):  byte_ok = (cur_byte == MATCH_ETH[7:0]);
      6'(OFS_PRO):      byte_ok = (cur_byte == MATCH_PRO);
      6'(OFS_IP + 0):   byte_ok = (cur_byte == MATCH_IP[31:24]);
      6'(OFS_IP + 1):   byte_ok = (cur_byte == MATCH_IP[23:16]);
      6'(OFS_IP + 2):   byte_ok = (cur_byte == MATCH_IP[15:8]);
      6'(OFS_IP + 3):   byte_ok = (cur_byte == MATCH_IP[7:0]);
      6'(OFS_PORT + 0): byte_ok = (cur_byte == MATCH_PORT[15:8]);
      6'(OFS_PORT + 1): byte_ok = (cur_byte == MATCH_PORT[7:0]);
      default: byte_ok = 1'b1;
    endcase
  end

  always_ff @(posedge rx_clk) begin
    if (!rst_n) begin
      state       <= AM_IDLE;
      byte_idx    <= '0;
      hi_nib      <= 1'b0;
      low_nib     <= '0;
      udp_len     <= '0;
      nib_left    <= '0;
      buff_enable <= 1'b0;
    end else begin
      unique case (state)
        AM_IDLE: begin
          buff_enable <= 1'b0;
          if (am_enable) begin
            // This nibble is the low nibble of destination MAC byte 0.
            state    <= AM_HEADER;
            byte_idx <= '0;
            low_nib  <= nib;
            hi_nib   <= 1'b1;
          end
        end
        AM_HEADER: begin
          if (!hi_nib) begin
            low_nib <= nib;
            hi_nib  <= 1'b1;
          end else begin
            hi_nib <= 1'b0;
            if (byte_idx == 6'(OFS_UDPLEN))     udp_len[15:8] <= cur_byte;
            if (byte_idx == 6'(OFS_UDPLEN + 1)) udp_len[7:0]  <= cur_byte;
            if (!byte_ok) begin
              state <= AM_IDLE;
            end else if (last_hdr) begin
              if (udp_len > 16'(UDP_HDR_BYTES)) begin
                state       <= AM_PAYLOAD;
                nib_left    <= {udp_len - 16'(UDP_HDR_BYTES), 1'b0};
                buff_enable <= 1'b1;
              end else begin
                state <= AM_IDLE;
              end
            end else begin
              byte_idx <= byte_idx + 6'd1;
            end
          end
        end
        AM_PAYLOAD: begin
          nib_left <= nib_left - 17'd1;
          if (nib_left == 17'd1) begin
            buff_enable <= 1'b0;
            state       <= AM_IDLE;
          end
        end
        default: state <= AM_IDLE;
      endcase
    end
  end

endmodule
