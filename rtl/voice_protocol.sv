// voice_protocol: receiver that turns broadcast UDP voice packets arriving
// on an Ethernet PHY's MII port into sound on a four-channel SPI DAC.
//
// Chain: frame_starter (finds preamble and start-of-frame nibble) ->
// address_match (checks destination MAC, EtherType, IP protocol,
// destination IP and UDP port, marks the payload) -> buffer (stores payload
// bytes until BYTE_LIMIT are held) -> dac_process (plays them one 32-bit SPI
// word per byte).  The first three stages run on RX_CLK, the PHY's receive
// clock (25 MHz at 100 Mb/s); buffer reading and the DAC process run on
// CLK_50MHZ.  The buffer holds the two-flip-flop handshake between them.
//
// The pins are the design's thirteen: three clock/valid inputs, the four
// RX_DATA(0:3) bits and six outputs.  There is no reset pin; each clock
// domain has a power-on reset from a register that starts at zero when the
// FPGA is configured (por_reset).
//
// Instance names (fs, match, store, convert) follow the design's
// schematic.
//
// Parameters: MEM_BYTES is the buffer memory, BYTE_LIMIT the number of bytes
// collected before playback starts and played per playback, SAMPLE_PERIOD
// the CLK_50MHZ cycles between samples (6250 = 8 kHz), SCK_HALF the
// CLK_50MHZ cycles per SPI clock phase.
module voice_protocol
  import voice_pkg::*;
#(
  parameter int unsigned MEM_BYTES     = 32768,
  parameter int unsigned BYTE_LIMIT    = 32768,
  parameter int unsigned SAMPLE_PERIOD = 6250,
  parameter int unsigned SCK_HALF      = 1
) (
  input  logic       RX_CLK,
  input  logic       CLK_50MHZ,
  input  logic       RX_DV,
  input  logic [0:3] RX_DATA,
  output logic       SPI_MOSI,
  output logic       SPI_SCK,
  output logic       DAC_CLR,
  output logic       LED_BUFF,
  output logic       LED_DAC,
  output logic       DAC_CS
);

  logic       rx_rst_n, rst_n;
  logic       am_enable, buff_enable;
  logic       dac_enable, dac_on, request;
  logic [7:0] data;

  por_reset u_por_rx  (.clk(RX_CLK),    .rst_n(rx_rst_n));
  por_reset u_por_clk (.clk(CLK_50MHZ), .rst_n(rst_n));

  frame_starter fs (
    .rx_clk    (RX_CLK),
    .rst_n     (rx_rst_n),
    .rx_dv     (RX_DV),
    .rx_data   (RX_DATA),
    .am_enable (am_enable)
  );

  address_match match (
    .rx_clk      (RX_CLK),
    .rst_n       (rx_rst_n),
    .rx_data     (RX_DATA),
    .am_enable   (am_enable),
    .buff_enable (buff_enable)
  );

  buffer #(
    .MEM_BYTES  (MEM_BYTES),
    .BYTE_LIMIT (BYTE_LIMIT)
  ) store (
    .rx_clk      (RX_CLK),
    .rx_rst_n    (rx_rst_n),
    .clk         (CLK_50MHZ),
    .rst_n       (rst_n),
    .rx_data     (RX_DATA),
    .buff_enable (buff_enable),
    .dac_on      (dac_on),
    .request     (request),
    .data_out    (data),
    .dac_enable  (dac_enable),
    .led_buff    (LED_BUFF)
  );

  dac_process #(
    .BYTE_LIMIT    (BYTE_LIMIT),
    .SAMPLE_PERIOD (SAMPLE_PERIOD),
    .SCK_HALF      (SCK_HALF)
  ) convert (
    .clk        (CLK_50MHZ),
    .rst_n      (rst_n),
    .dac_enable (dac_enable),
    .data_in    (data),
    .request    (request),
    .dac_on     (dac_on),
    .led_dac    (LED_DAC),
    .dac_cs     (DAC_CS),
    .dac_clr    (DAC_CLR),
    .spi_mosi   (SPI_MOSI),
    .spi_sck    (SPI_SCK)
  );

endmodule
