// por_reset: power-on reset for one clock domain of an FPGA design with no
// reset pin.  The shift register starts at zero when the device is
// configured (the declaration's initial value), so rst_n is low for the
// first STAGES clock edges and then stays high for good.  Lint tools note
// that a register with a declared initial value is also assigned in a
// process; that is intended here, as the initial value is the FPGA's
// configuration value and the only reset this register has.
module por_reset #(
  parameter int unsigned STAGES = 4
) (
  input  logic clk,
  output logic rst_n
);

  logic [STAGES-1:0] sr = '0;

  always_ff @(posedge clk) sr <= {sr[STAGES-2:0], 1'b1};

  assign rst_n = sr[STAGES-1];

endmodule
