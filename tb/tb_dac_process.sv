// tb_dac_process: self-checking test of the DAC playback unit.  A small
// model of the buffer answers each request with the next sample on the
// following clock edge.  A model of the DAC's serial port shifts in
// spi_mosi on each rising spi_sck while dac_cs is low and checks, when
// dac_cs rises, that 32 bits arrived and that they form the expected
// command word (command 0011, channel 0000, the byte widened to 12 bits by
// repeating its top four bits, zero don't-care bits).  It also checks the
// number of words per playback, the spacing of requests (SAMPLE_PERIOD),
// the SPI clock phase length (SCK_HALF), dac_on/led_dac framing and a
// second playback started by a new rising dac_enable.
module tb_dac_process;

  localparam int LIMIT  = 6;
  localparam int PERIOD = 150;
  localparam int HALF   = 2;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       dac_enable;
  logic [7:0] data_in;
  logic       request;
  logic       dac_on, led_dac, dac_cs, dac_clr, spi_mosi, spi_sck;

  int checks = 0, failures = 0;
  int cyc = 0;

  dac_process #(.BYTE_LIMIT(LIMIT), .SAMPLE_PERIOD(PERIOD), .SCK_HALF(HALF)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Buffer model.
  byte unsigned samples[$];
  int sent = 0;
  int last_req = -1, bad_gap = 0, reqs = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (request) begin
      data_in <= samples[sent];
      sent    <= sent + 1;
      if (last_req >= 0 && cyc - last_req != PERIOD) bad_gap++;
      last_req <= cyc;
      reqs     <= reqs + 1;
    end
  end

  // DAC serial port model.
  logic [31:0] sh;
  int nbits = 0, words = 0, bad_words = 0;
  always @(posedge spi_sck or posedge dac_cs) begin
    if (dac_cs) begin
      if (rst_n) begin
        logic [7:0]  b;
        logic [31:0] exp;
        b   = samples[words];
        exp = {8'h00, 4'b0011, 4'b0000, b, b[7:4], 4'h0};
        if (nbits != 32 || sh !== exp) begin
          bad_words++;
          $display("  word %0d: %0d bits %08h, expected %08h", words, nbits, sh, exp);
        end
        if (!dac_on) bad_words++;
        words++;
      end
      nbits = 0;
    end else begin
      sh = {sh[30:0], spi_mosi};
      nbits++;
    end
  end

  // SPI clock phase length and idle level.
  int last_edge = -1, bad_phase = 0;
  always @(spi_sck) begin
    if (last_edge >= 0 && !dac_cs && (cyc - last_edge) != HALF) bad_phase++;
    last_edge = cyc;
  end
  always @(negedge dac_cs) last_edge = -1;

  task automatic playback(input string what, input int first);
    int t0;
    @(negedge clk); dac_enable = 1'b1; last_req = -1;
    @(negedge clk);
    check(dac_on && led_dac, {what, ": dac_on after enable"});
    t0 = cyc;
    wait (!dac_on);
    @(negedge clk);
    check(words == first + LIMIT, $sformatf("%s: %0d words, expected %0d", what, words - first, LIMIT));
    check(reqs == first + LIMIT, {what, ": one request per word"});
    check(cyc - t0 >= (LIMIT - 1) * PERIOD && cyc - t0 <= (LIMIT - 1) * PERIOD + 64 * HALF + 10,
          $sformatf("%s: playback length %0d cycles", what, cyc - t0));
    // Holding enable high does not restart playback.
    repeat (PERIOD) @(negedge clk);
    check(!dac_on && words == first + LIMIT, {what, ": no restart while enable stays high"});
    dac_enable = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; dac_enable = 1'b0; data_in = '0;
    for (int i = 0; i < 2 * LIMIT; i++) samples.push_back(8'(i * 53 + 7));
    samples[1] = 8'hFF; samples[2] = 8'h00; samples[LIMIT] = 8'h80;
    repeat (2) @(negedge clk);
    check(!dac_clr && dac_cs, "DAC clear asserted, CS high in reset");
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(dac_clr && dac_cs && !dac_on && !spi_sck, "idle after reset");

    playback("first", 0);
    playback("second", LIMIT);
    check(bad_words == 0, "SPI words correct and inside dac_on");
    check(bad_gap == 0, "request spacing equals SAMPLE_PERIOD");
    check(bad_phase == 0, "SPI clock phase equals SCK_HALF");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * LIMIT * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
