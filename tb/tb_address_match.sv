// tb_address_match: self-checking test of the header checker.  Each frame
// is driven nibble by nibble (low nibble first) with a one-cycle am_enable
// on its first nibble, as the frame starter gives it.  The monitor rebuilds
// bytes from the nibbles marked by buff_enable; they must equal the UDP
// payload exactly (no header, padding or check sequence), and nothing may
// be marked when any one of the five compared fields is wrong.
module tb_address_match;
  import tb_frame_pkg::*;

  logic       rx_clk = 1'b0;
  logic       rst_n;
  logic [0:3] rx_data;
  logic       am_enable;
  logic       buff_enable;

  int checks = 0, failures = 0;
  bytes_t got;
  logic   have_low = 1'b0;
  logic [3:0] low;

  address_match dut (.*);

  always #20 rx_clk = ~rx_clk;

  // Rebuild payload bytes from marked nibbles.
  always @(posedge rx_clk) begin
    if (buff_enable) begin
      if (!have_low) begin
        low      <= {rx_data[3], rx_data[2], rx_data[1], rx_data[0]};
        have_low <= 1'b1;
      end else begin
        got.push_back({rx_data[3], rx_data[2], rx_data[1], rx_data[0], low});
        have_low <= 1'b0;
      end
    end
  end

  task automatic send(input bytes_t f);
    foreach (f[i]) begin
      for (int h = 0; h < 2; h++) begin
        @(negedge rx_clk);
        am_enable = (i == 0 && h == 0);
        rx_data   = mii_pins(h == 0 ? f[i][3:0] : f[i][7:4]);
      end
    end
    @(negedge rx_clk);
    am_enable = 1'b0;
    rx_data   = mii_pins(4'h0);
    repeat (6) @(negedge rx_clk);
  endtask

  function automatic bytes_t make_payload(int n, int seed);
    bytes_t p;
    for (int i = 0; i < n; i++) p.push_back(8'((i * 37 + seed) ^ (i >> 3)));
    return p;
  endfunction

  task automatic check_frame(input string what, input hdr_t h, input int n, input bit accept);
    bytes_t p = make_payload(n, n + 11);
    bytes_t exp;
    got.delete();
    send(build_frame(h, p));
    if (accept) exp = p;
    checks++;
    if (got != exp || have_low) begin
      failures++;
      $display("FAIL %s: got %0d bytes, expected %0d", what, got.size(), exp.size());
    end
  endtask

  hdr_t h;

  initial begin
    rst_n = 1'b0; am_enable = 1'b0; rx_data = '0;
    repeat (3) @(negedge rx_clk);
    rst_n = 1'b1;

    check_frame("good, 10 bytes", good_hdr(), 10, 1);
    check_frame("good, 1 byte", good_hdr(), 1, 1);
    check_frame("good, 0 bytes", good_hdr(), 0, 1);
    check_frame("good, 300 bytes", good_hdr(), 300, 1);
    for (int k = 0; k < 6; k++) begin
      h = good_hdr(); h.mac[k*8 +: 8] = 8'hFE;
      check_frame($sformatf("MAC byte %0d wrong", k), h, 20, 0);
    end
    h = good_hdr(); h.eth = 16'h0806;  check_frame("EtherType ARP", h, 20, 0);
    h = good_hdr(); h.eth = 16'h0900;  check_frame("EtherType high byte", h, 20, 0);
    h = good_hdr(); h.pro = 8'h06;     check_frame("protocol TCP", h, 20, 0);
    for (int k = 0; k < 4; k++) begin
      h = good_hdr(); h.ip[k*8 +: 8] = 8'h0A;
      check_frame($sformatf("IP byte %0d wrong", k), h, 20, 0);
    end
    h = good_hdr(); h.port = 16'd3436; check_frame("port low byte", h, 20, 0);
    h = good_hdr(); h.port = 16'h0C6B; check_frame("port high byte", h, 20, 0);
    check_frame("good after rejects", good_hdr(), 46, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge rx_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
