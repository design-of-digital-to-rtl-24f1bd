// tb_mii_source: testbench model of the Ethernet PHY's MII receive side.
// It generates RX_CLK (period RX_PERIOD) and, through the task send_frame,
// drives RX_DV and RX_DATA(0:3) with a preamble of npre 0x5 nibbles, the
// 0xD start-of-frame nibble and the frame bytes low nibble first, followed
// by a 12-byte (24-nibble) inter-frame gap.  Signals change on the falling
// edge of RX_CLK.
module tb_mii_source
  import tb_frame_pkg::*;
#(
  parameter int RX_PERIOD = 40
) (
  output logic       rx_clk,
  output logic       rx_dv,
  output logic [0:3] rx_data
);

  initial begin
    rx_clk  = 1'b0;
    rx_dv   = 1'b0;
    rx_data = '0;
    forever #(RX_PERIOD / 2) rx_clk = ~rx_clk;
  end

  task automatic put(input logic dv, input logic [3:0] v);
    @(negedge rx_clk);
    rx_dv   = dv;
    rx_data = mii_pins(v);
  endtask

  task automatic send_frame(input bytes_t f, input int npre);
    repeat (npre) put(1'b1, 4'h5);
    put(1'b1, 4'hD);
    foreach (f[i]) begin
      put(1'b1, f[i][3:0]);
      put(1'b1, f[i][7:4]);
    end
    repeat (24) put(1'b0, 4'h0);
  endtask

endmodule
