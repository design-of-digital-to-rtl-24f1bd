// tb_frame_starter: self-checking test of the preamble / start-of-frame
// detector.  Nibble streams are driven on the falling clock edge; the
// expected am_enable cycles are written into each scenario by hand: a
// pulse in exactly the cycle after a start-of-frame nibble that follows
// exactly 15 preamble nibbles, and nowhere else.
module tb_frame_starter;
  import tb_frame_pkg::*;

  logic       rx_clk = 1'b0;
  logic       rst_n;
  logic       rx_dv;
  logic [0:3] rx_data;
  logic       am_enable;

  int checks = 0, failures = 0;
  int cyc = 0;             // nibble cycle counter
  int pulses[$];           // cycles in which am_enable was high

  frame_starter dut (.*);

  always #20 rx_clk = ~rx_clk;

  always @(posedge rx_clk) begin
    cyc <= cyc + 1;
    if (am_enable) pulses.push_back(cyc);
  end

  // Drive one nibble for one cycle; returns the cycle number it is sampled in.
  task automatic nib(input logic dv, input logic [3:0] v, output int at);
    @(negedge rx_clk);
    rx_dv   = dv;
    rx_data = mii_pins(v);
    at      = cyc;
  endtask

  task automatic idle(input int n);
    int t;
    repeat (n) nib(1'b0, 4'h0, t);
  endtask

  // Preamble of n nibbles then SFD; returns the cycle of the SFD nibble.
  task automatic preamble(input int n, output int sfd_at);
    int t;
    repeat (n) nib(1'b1, 4'h5, t);
    nib(1'b1, 4'hD, sfd_at);
  endtask

  task automatic expect_pulses(input string what, input int exp[$]);
    idle(2);
    checks++;
    if (pulses != exp) begin
      failures++;
      $display("FAIL %s: am_enable at %p, expected %p", what, pulses, exp);
    end
    pulses.delete();
  endtask

  int t, sfd;

  initial begin
    rst_n = 1'b0; rx_dv = 1'b0; rx_data = '0;
    repeat (3) @(negedge rx_clk);
    rst_n = 1'b1;
    idle(2);
    pulses.delete();

    // 1: a correct preamble of 15 nibbles and SFD
    preamble(15, sfd);
    repeat (10) nib(1'b1, 4'h3, t);
    idle(4);
    expect_pulses("15 preamble nibbles", '{sfd + 1});

    // 2: one preamble nibble short
    preamble(14, sfd);
    idle(4);
    expect_pulses("14 preamble nibbles", '{});

    // 3: one preamble nibble too many (count at 15 is cleared)
    preamble(16, sfd);
    idle(4);
    expect_pulses("16 preamble nibbles", '{});

    // 4: a foreign nibble inside the preamble restarts the count
    repeat (7) nib(1'b1, 4'h5, t);
    nib(1'b1, 4'h7, t);
    preamble(15, sfd);
    idle(4);
    expect_pulses("broken then full preamble", '{sfd + 1});

    // 5: preamble-like data inside a frame is ignored until RX_DV falls
    begin
      int first;
      preamble(15, first);
      repeat (5) nib(1'b1, 4'hA, t);
      preamble(15, sfd);
      repeat (3) nib(1'b1, 4'h0, t);
      idle(3);
      expect_pulses("pattern inside frame", '{first + 1});
    end

    // 6: RX_DV low in the middle of the preamble restarts the count
    repeat (8) nib(1'b1, 4'h5, t);
    idle(1);
    repeat (7) nib(1'b1, 4'h5, t);
    nib(1'b1, 4'hD, t);
    idle(4);
    expect_pulses("RX_DV gap in preamble", '{});

    // 7: preamble nibbles with RX_DV low are not counted
    repeat (15) nib(1'b0, 4'h5, t);
    nib(1'b1, 4'hD, t);
    idle(4);
    expect_pulses("preamble without RX_DV", '{});

    // 8: two frames back to back with an RX_DV gap both start
    begin
      int s1;
      preamble(15, s1);
      repeat (4) nib(1'b1, 4'h1, t);
      idle(1);
      preamble(15, sfd);
      idle(4);
      expect_pulses("two frames", '{s1 + 1, sfd + 1});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge rx_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
