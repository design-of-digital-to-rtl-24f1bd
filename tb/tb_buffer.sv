// tb_buffer: self-checking test of the payload buffer at a reduced size
// (1 KiB memory, 600-byte limit, 256-byte blocks), so the fill crosses two
// block boundaries.  The write side is fed in bursts of nibbles, one of
// them ending on a half byte that must be dropped.  The testbench then
// plays the DAC process's part: it answers dac_enable with dac_on, issues
// requests and compares every byte read back, sends more data while
// playback runs (it must be dropped), ends playback and checks that a second
// fill with new data is read back correctly.
module tb_buffer;
  import tb_frame_pkg::*;

  localparam int MEM   = 1024;
  localparam int LIMIT = 600;

  logic       rx_clk = 1'b0, clk = 1'b0;
  logic       rx_rst_n, rst_n;
  logic [0:3] rx_data;
  logic       buff_enable;
  logic       dac_on;
  logic       request;
  logic [7:0] data_out;
  logic       dac_enable;
  logic       led_buff;

  int checks = 0, failures = 0;
  int blocks_crossed = 0;

  buffer #(.MEM_BYTES(MEM), .BYTE_LIMIT(LIMIT), .BLOCK_BYTES(256)) dut (.*);

  always #20 rx_clk = ~rx_clk;   // 25 MHz
  always #10 clk    = ~clk;      // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Write a burst of bytes as nibbles, optionally followed by a lone nibble.
  task automatic burst(input bytes_t b, input bit half);
    foreach (b[i]) begin
      @(negedge rx_clk); buff_enable = 1'b1; rx_data = mii_pins(b[i][3:0]);
      @(negedge rx_clk); buff_enable = 1'b1; rx_data = mii_pins(b[i][7:4]);
    end
    if (half) begin
      @(negedge rx_clk); buff_enable = 1'b1; rx_data = mii_pins(4'hF);
    end
    @(negedge rx_clk); buff_enable = 1'b0; rx_data = mii_pins(4'h0);
    repeat (5) @(negedge rx_clk);
  endtask

  function automatic bytes_t data_set(int n, int seed);
    bytes_t p;
    for (int i = 0; i < n; i++) p.push_back(8'(i * 13 + seed + (i >> 8)));
    return p;
  endfunction

  // Read n bytes as the DAC process would and compare.
  task automatic play(input bytes_t exp, input string what);
    int bad = 0;
    @(negedge clk); dac_on = 1'b1;
    foreach (exp[i]) begin
      @(negedge clk); request = 1'b1;
      @(negedge clk); request = 1'b0;
      if (data_out !== exp[i]) begin
        if (bad < 5) $display("  %s byte %0d: got %02h expected %02h", what, i, data_out, exp[i]);
        bad++;
      end
      if (i > 0 && i % 256 == 0) blocks_crossed++;
      repeat (2) @(negedge clk);
    end
    check(bad == 0, {what, ": data read back"});
  endtask

  bytes_t a, b, all;
  int t0;

  initial begin
    rx_rst_n = 1'b0; rst_n = 1'b0;
    rx_data = '0; buff_enable = 1'b0; dac_on = 1'b0; request = 1'b0;
    repeat (3) @(negedge rx_clk);
    rx_rst_n = 1'b1; rst_n = 1'b1;
    repeat (2) @(negedge rx_clk);
    check(!led_buff && !dac_enable, "empty after reset");

    // First fill: 250 + 250 (+ half byte) + 150, of which 100 fit.
    a = data_set(650, 3);
    burst(a[0:249], 1'b0);
    check(led_buff && !dac_enable, "partly filled: LED on, DAC not enabled");
    burst(a[250:499], 1'b1);
    check(!dac_enable, "500 bytes: not yet full");
    burst(a[500:649], 1'b0);
    repeat (4) @(negedge clk);
    check(dac_enable && led_buff, "600 bytes: dac_enable raised");

    // Playback, with new data arriving that must be dropped.
    fork
      play(a[0:599], "first playback");
      begin
        repeat (10) @(negedge rx_clk);
        check(!dac_enable, "dac_enable dropped once dac_on is seen");
        burst(data_set(200, 99), 1'b0);
      end
    join
    @(negedge clk); dac_on = 1'b0;
    repeat (6) @(negedge rx_clk);
    check(!led_buff && !dac_enable, "empty after playback");

    // Second fill with new data.
    b = data_set(600, 71);
    burst(b[0:299], 1'b0);
    burst(b[300:599], 1'b0);
    repeat (4) @(negedge clk);
    check(dac_enable, "second fill: dac_enable raised");
    play(b, "second playback");
    @(negedge clk); dac_on = 1'b0;
    repeat (6) @(negedge rx_clk);
    check(blocks_crossed == 4, "address blocks crossed during reads");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge rx_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
