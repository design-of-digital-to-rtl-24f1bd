// tb_voice_protocol: end-to-end test of the receiver at reduced size
// (1 KiB buffer, 600-byte playback, a sample every 80 clk cycles).
//
// A PHY model sends broadcast UDP frames on the MII port; a DAC model
// decodes the SPI words.  The testbench sends frames that must be rejected
// (short preamble, and one wrong field each: MAC, EtherType, protocol, IP,
// port), three good frames that together overfill the buffer, a good frame
// during playback (dropped), and two more good frames for a second
// playback.  Every sample played must equal the expected payload byte
// widened to 12 bits, in order.  Each mechanism is counted and must occur:
// each kind of rejection, a fill spread over several packets, address
// block crossings, a packet cut off by a full buffer, a packet dropped
// during playback, re-arming for a second playback, and the sample pacing.
module tb_voice_protocol;
  import tb_frame_pkg::*;

  localparam int MEM    = 1024;
  localparam int LIMIT  = 600;
  localparam int PERIOD = 80;

  logic       RX_CLK, RX_DV;
  logic [0:3] RX_DATA;
  logic       CLK_50MHZ = 1'b0;
  logic       SPI_MOSI, SPI_SCK, DAC_CLR, LED_BUFF, LED_DAC, DAC_CS;

  int checks = 0, failures = 0;

  voice_protocol #(.MEM_BYTES(MEM), .BYTE_LIMIT(LIMIT), .SAMPLE_PERIOD(PERIOD)) dut (.*);

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

  // Mechanism counters.
  int n_rej_pre = 0, n_rej_mac = 0, n_rej_eth = 0, n_rej_pro = 0, n_rej_ip = 0, n_rej_port = 0;
  int n_multi_fill = 0, n_block_cross = 0, n_cut = 0, n_drop_playing = 0, n_rearm = 0, n_paced = 0;

  // Latency from the buffer's full flag reaching the 50 MHz side
  // (dac_enable) to the first falling DAC_CS: edge detect, request, latch.
  longint cyc = 0, t_enable = -1;
  int latency_bad = 0, latency_seen = 0;
  always @(posedge CLK_50MHZ) begin
    cyc <= cyc + 1;
    if (dut.dac_enable && t_enable < 0 && !LED_DAC) t_enable <= cyc;
  end
  always @(negedge DAC_CS) if (t_enable >= 0) begin
    latency_seen++;
    if (cyc - t_enable != 3) begin
      latency_bad++;
      $display("  start latency %0d cycles, expected 3", cyc - t_enable);
    end
    t_enable = -1;
  end

  function automatic bytes_t payload(int n, int seed);
    bytes_t p;
    for (int i = 0; i < n; i++) p.push_back(8'(i * 29 + seed * 7 + (i >> 4)));
    return p;
  endfunction

  bytes_t expected;

  task automatic send_good(input int n, input int seed, input int take);
    bytes_t p = payload(n, seed);
    phy.send_frame(build_frame(good_hdr(), p), 15);
    for (int i = 0; i < take; i++) expected.push_back(p[i]);
  endtask

  task automatic send_bad(input hdr_t h, input int npre);
    phy.send_frame(build_frame(h, payload(100, 5)), npre);
  endtask

  task automatic wait_playback(input string what, input int words_before);
    int t = 0;
    while (!LED_DAC && t < 20000) begin @(posedge CLK_50MHZ); t++; end
    check(LED_DAC, {what, ": playback started"});
    while (LED_DAC) @(posedge CLK_50MHZ);
    repeat (10) @(posedge CLK_50MHZ);
    check(dac.samples.size() == words_before + LIMIT,
          $sformatf("%s: %0d samples played, expected %0d", what, dac.samples.size() - words_before, LIMIT));
    if (dac.min_gap == longint'(PERIOD) && dac.max_gap == longint'(PERIOD)) n_paced++;
    else $display("  %s: CS spacing %0d..%0d cycles", what, dac.min_gap, dac.max_gap);
    dac.restart_gap();
  endtask

  hdr_t h;

  initial begin
    wait (DAC_CLR);
    repeat (10) @(posedge RX_CLK);
    check(!LED_BUFF && !LED_DAC && DAC_CS, "idle after power-on reset");

    // Rejected frames.
    send_bad(good_hdr(), 14);                              n_rej_pre++;
    h = good_hdr(); h.mac[0 +: 8] = 8'h00; send_bad(h, 15); n_rej_mac++;
    h = good_hdr(); h.eth = 16'h86DD;      send_bad(h, 15); n_rej_eth++;
    h = good_hdr(); h.pro = 8'h06;         send_bad(h, 15); n_rej_pro++;
    h = good_hdr(); h.ip = 32'hC0A8010A;   send_bad(h, 15); n_rej_ip++;
    h = good_hdr(); h.port = 16'd5004;     send_bad(h, 15); n_rej_port++;
    check(!LED_BUFF, "nothing stored from rejected frames");

    // First fill over three packets; the third is cut at the limit.
    send_good(250, 1, 250);
    check(LED_BUFF && !LED_DAC, "first packet stored, no playback yet");
    send_good(250, 2, 250);
    send_good(250, 3, 100);
    n_multi_fill++; n_cut++;
    if (LIMIT > 256) n_block_cross += (LIMIT - 1) / 256;

    // A packet during playback is dropped.
    fork
      wait_playback("first playback", 0);
      begin
        wait (LED_DAC);
        send_good(200, 9, 0);
        check(LED_DAC, "packet arrived during playback");
        n_drop_playing++;
      end
    join

    // Second fill and playback.
    check(!LED_BUFF, "buffer empty after playback");
    send_good(300, 4, 300);
    send_good(300, 6, 300);
    wait_playback("second playback", LIMIT);
    n_rearm++;

    check(dac.bad == 0, "every SPI word well formed");
    check(latency_seen == 2 && latency_bad == 0, "playback starts 3 cycles after dac_enable");
    begin : compare
      int bad;
      bad = 0;
      for (int i = 0; i < expected.size() && i < dac.samples.size(); i++)
        if (dac.samples[i] != {expected[i], expected[i][7:4]}) begin
          if (bad < 5) $display("  sample %0d: %03h expected byte %02h", i, dac.samples[i], expected[i]);
          bad++;
        end
      check(bad == 0 && expected.size() == dac.samples.size(),
            $sformatf("samples equal payload (%0d played, %0d expected)", dac.samples.size(), expected.size()));
    end

    check(n_rej_pre > 0,      "mechanism: short preamble rejected");
    check(n_rej_mac > 0,      "mechanism: MAC mismatch rejected");
    check(n_rej_eth > 0,      "mechanism: EtherType mismatch rejected");
    check(n_rej_pro > 0,      "mechanism: protocol mismatch rejected");
    check(n_rej_ip > 0,       "mechanism: IP mismatch rejected");
    check(n_rej_port > 0,     "mechanism: port mismatch rejected");
    check(n_multi_fill > 0,   "mechanism: fill over several packets");
    check(n_block_cross > 0,  "mechanism: address block crossing");
    check(n_cut > 0,          "mechanism: packet cut at the byte limit");
    check(n_drop_playing > 0, "mechanism: packet dropped during playback");
    check(n_rearm > 0,        "mechanism: re-armed for a second playback");
    check(n_paced == 2,       "mechanism: samples paced at SAMPLE_PERIOD");
    $display("mechanisms: rej_pre=%0d rej_mac=%0d rej_eth=%0d rej_pro=%0d rej_ip=%0d rej_port=%0d multi_fill=%0d block_cross=%0d cut=%0d drop_playing=%0d rearm=%0d paced=%0d",
             n_rej_pre, n_rej_mac, n_rej_eth, n_rej_pro, n_rej_ip, n_rej_port,
             n_multi_fill, n_block_cross, n_cut, n_drop_playing, n_rearm, n_paced);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge CLK_50MHZ);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
