// buffer: stores the voice payload bytes and hands them to the DAC process.
//
// Write side (rx_clk): while buff_enable is high, payload nibbles on
// RX_DATA(0:3) are paired into bytes, low nibble first, and written to a
// byte memory.  The write address is an address block number and an offset
// within the 256-byte block (00h..FFh); when an offset passes FFh the next
// block is used.  Bytes are collected across as many packets as needed.
// When BYTE_LIMIT bytes are held the buffer stops accepting data and
// raises dac_enable.  It then waits for the DAC process to start (dac_on
// high) and to finish (dac_on low) before it empties and starts filling
// again; packets arriving meanwhile are dropped.
//
// Read side (clk, the 50 MHz board clock): the read address returns to 0
// while dac_on is low.  Each one-cycle request reads the next byte; it is on
// data_out from the clk edge after the request and holds until the next one.
//
// Clock crossing: the full flag crosses to clk and dac_on crosses to rx_clk
// through two-flip-flop synchronizers.  Memory contents are written only
// while the DAC process is idle and read only while it runs, so the data
// itself needs no synchronizer.  led_buff is high while the buffer holds
// bytes that have not been played.
//
// The fill-until-limit-then-enable flow and the 256-byte address blocks are
// the design's.  The memory size (32 KiB, the capacity of sixteen 16-kbit
// block RAMs), the byte limit, the handshake and the LED meaning are this
// implementation's choices.
module buffer
  import voice_pkg::*;
#(
  parameter int unsigned MEM_BYTES   = 32768,
  parameter int unsigned BYTE_LIMIT  = 32768,
  parameter int unsigned BLOCK_BYTES = 256
) (
  input  logic       rx_clk,
  input  logic       rx_rst_n,
  input  logic       clk,
  input  logic       rst_n,
  input  logic [0:3] rx_data,
  input  logic       buff_enable,
  input  logic       dac_on,
  input  logic       request,
  output logic [7:0] data_out,
  output logic       dac_enable,
  output logic       led_buff
);

  localparam int unsigned ADDR_W = $clog2(MEM_BYTES);
  localparam int unsigned OFS_W  = $clog2(BLOCK_BYTES);
  localparam int unsigned BLK_W  = ADDR_W - OFS_W;
  localparam int unsigned CNT_W  = $clog2(BYTE_LIMIT + 1);

  typedef enum logic [1:0] {B_FILL, B_FULL, B_DRAIN} buff_state_t;

  logic [7:0] mem [MEM_BYTES];

  // ---------------- write side, rx_clk ----------------
  buff_state_t      state;
  logic [BLK_W-1:0] blk;
  logic [OFS_W-1:0] ofs;
  logic [CNT_W-1:0] count_byte;
  logic             hi_nib;
  logic [3:0]       low_nib;
  logic             full_rx;
  logic             dac_on_rx;
  logic [3:0]       nib;
  logic             we;

  assign nib = nib_value(rx_data);
  assign we  = (state == B_FILL) && buff_enable && hi_nib;

  always_ff @(posedge rx_clk) begin
    if (we) mem[{blk, ofs}] <= {nib, low_nib};
  end

  always_ff @(posedge rx_clk) begin
    if (!rx_rst_n) begin
      state      <= B_FILL;
      blk        <= '0;
      ofs        <= '0;
      count_byte <= '0;
      hi_nib     <= 1'b0;
      low_nib    <= '0;
      full_rx    <= 1'b0;
    end else begin
      unique case (state)
        B_FILL: begin
          if (!buff_enable) begin
            hi_nib <= 1'b0;              // drop a half byte at packet end
          end else if (!hi_nib) begin
            low_nib <= nib;
            hi_nib  <= 1'b1;
          end else begin
            hi_nib <= 1'b0;
            // address adjust: next offset, next block after FFh
            ofs <= ofs + 1'b1;
            if (ofs == OFS_W'(BLOCK_BYTES - 1)) blk <= blk + 1'b1;
            count_byte <= count_byte + 1'b1;
            if (count_byte == CNT_W'(BYTE_LIMIT - 1)) begin
              state   <= B_FULL;
              full_rx <= 1'b1;
            end
          end
        end
        B_FULL: begin
          if (dac_on_rx) begin
            state   <= B_DRAIN;
            full_rx <= 1'b0;
          end
        end
        B_DRAIN: begin
          if (!dac_on_rx) begin
            state      <= B_FILL;
            blk        <= '0;
            ofs        <= '0;
            count_byte <= '0;
          end
        end
        default: state <= B_FILL;
      endcase
    end
  end

  assign led_buff = (state == B_FULL) || (state == B_FILL && count_byte != '0);

  sync_2ff u_sync_on (.clk(rx_clk), .rst_n(rx_rst_n), .d(dac_on),  .q(dac_on_rx));
  sync_2ff u_sync_en (.clk(clk),    .rst_n(rst_n),    .d(full_rx), .q(dac_enable));

  // ---------------- read side, clk ----------------
  logic [ADDR_W-1:0] raddr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      raddr <= '0;
    end else if (!dac_on) begin
      raddr <= '0;
    end else if (request) begin
      raddr <= raddr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (request) data_out <= mem[raddr];
  end

  initial begin
    assert (BYTE_LIMIT >= 1 && BYTE_LIMIT <= MEM_BYTES)
      else $error("buffer: BYTE_LIMIT must be 1..MEM_BYTES");
    assert (MEM_BYTES == (1 << ADDR_W) && BLOCK_BYTES == (1 << OFS_W) && BLOCK_BYTES < MEM_BYTES)
      else $error("buffer: MEM_BYTES and BLOCK_BYTES must be powers of two, block smaller than memory");
  end

endmodule
