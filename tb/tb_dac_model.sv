// tb_dac_model: testbench model of the serial port of the board's
// four-channel 12-bit DAC.  While dac_cs is low it shifts in spi_mosi on
// every rising spi_sck; when dac_cs rises it checks that exactly 32 bits
// arrived, that the don't-care bits are zero and that command and channel
// are 0011 and 0000, and records the 12-bit sample in `samples`.  It also
// counts words with a wrong format (bad) and records the smallest and largest
// spacing, in clk cycles, between successive falling edges of dac_cs since
// the last restart_gap().
module tb_dac_model (
  input logic clk,
  input logic rst_n_seen,   // ignore edges before the design is out of reset
  input logic dac_cs,
  input logic spi_mosi,
  input logic spi_sck
);

  logic [11:0] samples[$];
  int bad = 0;
  longint cyc = 0;
  longint last_fall = -1;
  longint min_gap = 64'h7FFF_FFFF_FFFF_FFFF, max_gap = 0;

  logic [31:0] sh;
  int nbits = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge spi_sck or posedge dac_cs) begin
    if (dac_cs) begin
      if (rst_n_seen && nbits != 0) begin
        if (nbits != 32 || sh[31:16] != 16'h0030 || sh[3:0] != 4'h0) begin
          bad++;
          if (bad < 5) $display("  DAC model: bad word %08h (%0d bits)", sh, nbits);
        end
        samples.push_back(sh[15:4]);
      end
      nbits = 0;
    end else begin
      sh = {sh[30:0], spi_mosi};
      nbits++;
    end
  end

  always @(negedge dac_cs) if (rst_n_seen) begin
    if (last_fall >= 0) begin
      if (cyc - last_fall < min_gap) min_gap = cyc - last_fall;
      if (cyc - last_fall > max_gap) max_gap = cyc - last_fall;
    end
    last_fall = cyc;
  end

  // Forget the spacing seen so far; call between playbacks.
  function automatic void restart_gap();
    last_fall = -1;
    min_gap   = 64'h7FFF_FFFF_FFFF_FFFF;
    max_gap   = 0;
  endfunction

endmodule
