// frame_starter: finds the start of an Ethernet frame on the MII receive port.
//
// While RX_DV is high and the unit is armed, every preamble nibble (1010 on
// RX_DATA(0:3), 0x5 on the pins) increments a 4-bit counter.  Any other
// nibble clears it, except the start-of-frame nibble 1011 (0xD) arriving with
// the counter at 15: then am_enable pulses for one cycle and the unit disarms,
// so that preamble-like nibbles inside the frame are ignored.  A preamble
// nibble arriving with the counter already at 15 clears it as well.  The
// unit re-arms when RX_DV falls at the end of the frame.
//
// Timing: am_enable is registered; it is high in the cycle whose rx_data is
// the first nibble of the destination MAC.
//
// The counting rule and the 15-nibble threshold are the design's.  Counting
// only while RX_DV is high, re-arming on RX_DV low, and the synchronous
// active-low reset are this implementation's choices.
module frame_starter
  import voice_pkg::*;
#(
  parameter int unsigned PREAMBLE_NIBBLES = 15
) (
  input  logic       rx_clk,
  input  logic       rst_n,
  input  logic       rx_dv,
  input  logic [0:3] rx_data,
  output logic       am_enable
);

  logic       state_fs;   // 1 = armed, looking for a preamble
  logic [3:0] count_fs;

  always_ff @(posedge rx_clk) begin
    if (!rst_n) begin
      state_fs  <= 1'b1;
      count_fs  <= '0;
      am_enable <= 1'b0;
    end else begin
      am_enable <= 1'b0;
      if (!rx_dv) begin
        state_fs <= 1'b1;
        count_fs <= '0;
      end else if (state_fs) begin
        if (rx_data == NIB_PREAMBLE) begin
          if (count_fs < 4'(PREAMBLE_NIBBLES)) count_fs <= count_fs + 4'd1;
          else                                  count_fs <= '0;
        end else if (rx_data == NIB_SFD && count_fs == 4'(PREAMBLE_NIBBLES)) begin
          am_enable <= 1'b1;
          state_fs  <= 1'b0;
          count_fs  <= '0;
        end else begin
          count_fs <= '0;
        end
      end
    end
  end

endmodule
