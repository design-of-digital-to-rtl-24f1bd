// tb_voice_protocol_full: one complete operation of the receiver with every
// parameter at its default: 32 KiB buffer, 32768-byte playback, 8 kHz
// samples, 25 MHz SPI clock.  The PHY model sends 23 broadcast UDP voice
// frames (22 of 1472 payload bytes and one of 384), exactly filling the
// buffer; the DAC model then receives 32768 SPI words, which must carry the
// payload bytes in order, widened to 12 bits, spaced 6250 clk cycles apart.
// The run covers about 4.1 s of simulated time.
module tb_voice_protocol_full;
  import tb_frame_pkg::*;

  localparam int TOTAL  = 32768;
  localparam int CHUNK  = 1472;
  localparam int PERIOD = 6250;

  logic       RX_CLK, RX_DV;
  logic [0:3] RX_DATA;
  logic       CLK_50MHZ = 1'b0;
  logic       SPI_MOSI, SPI_SCK, DAC_CLR, LED_BUFF, LED_DAC, DAC_CS;

  int checks = 0, failures = 0;

  voice_protocol dut (.*);

  tb_mii_source #(.RX_PERIOD(40)) phy (.rx_clk(RX_CLK), .rx_dv(RX_DV), .rx_data(RX_DATA));
  tb_dac_model dac (.clk(CLK_50MHZ), .rst_n_seen(DAC_CLR), .dac_cs(DAC_CS),
                    .spi_mosi(SPI_MOSI), .spi_sck(SPI_SCK));

  always #10 CLK_50MHZ = ~CLK_50MHZ;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Payload byte number k of the voice stream.
  function automatic byte unsigned voice_byte(int k);
    return 8'(k * 11 + (k >> 8) * 3 + (k >> 13));
  endfunction

  int sent = 0;
  longint t_full, t_first, t_last;

  initial begin
    wait (DAC_CLR);
    repeat (10) @(posedge RX_CLK);

    while (sent < TOTAL) begin
      automatic bytes_t p;
      automatic int n = (TOTAL - sent < CHUNK) ? TOTAL - sent : CHUNK;
      for (int i = 0; i < n; i++) p.push_back(voice_byte(sent + i));
      phy.send_frame(build_frame(good_hdr(), p), 15);
      sent += n;
      if (sent < TOTAL) check(LED_BUFF && !LED_DAC, $sformatf("%0d bytes held, waiting", sent));
    end

    wait (LED_DAC);
    t_first = dac.cyc;
    $display("playback started");
    while (LED_DAC) @(posedge CLK_50MHZ);
    t_last = dac.cyc;
    repeat (10) @(posedge CLK_50MHZ);

    check(dac.samples.size() == TOTAL, $sformatf("%0d samples played", dac.samples.size()));
    check(dac.bad == 0, "every SPI word well formed");
    begin : compare
      int bad;
      bad = 0;
      foreach (dac.samples[i]) begin
        automatic byte unsigned b = voice_byte(i);
        if (dac.samples[i] != {b, b[7:4]}) begin
          if (bad < 5) $display("  sample %0d: %03h expected byte %02h", i, dac.samples[i], b);
          bad++;
        end
      end
      check(bad == 0, "samples equal the voice stream");
    end
    check(dac.min_gap == longint'(PERIOD) && dac.max_gap == longint'(PERIOD), "8 kHz sample spacing");
    check(!LED_BUFF, "buffer empty after playback");
    $display("playback: %0d clk cycles (%0d us)", t_last - t_first, (t_last - t_first) / 50);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOTAL * PERIOD + 2_000_000) @(posedge CLK_50MHZ);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
