// sync_2ff: two-flip-flop synchronizer for a single level signal entering
// the clk domain.  The output follows the input two to three clk edges
// later.  Used for the buffer-full and DAC-busy handshake between the MII
// receive clock and the 50 MHz board clock; the signals it carries are
// levels held far longer than three cycles of either clock.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
