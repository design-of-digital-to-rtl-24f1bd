// dac_process: plays the buffered voice bytes on the board's SPI DAC.
//
// A rising dac_enable starts the process: dac_on (and led_dac) go high and a
// down-counter is loaded with BYTE_LIMIT.  For each sample the unit pulses
// request for one cycle, takes the byte the buffer returns on data_in the
// next cycle, widens it to 12 bits, and latches the 32-bit DAC word
//   [31:24] don't care (0)  [23:20] command  [19:16] channel address
//   [15:4]  12-bit sample   [3:0]   don't care (0)
// It then pulls dac_cs low and shifts the word out MSB first: spi_mosi
// changes while spi_sck is low and is stable across each rising edge, where
// the DAC samples it; spi_sck is high and low for SCK_HALF clk cycles each.
// After 32 rising edges dac_cs returns high, the counter is decremented and,
// when it reaches zero, dac_on falls and the unit waits for the next rising
// dac_enable.  Sample starts (request pulses) are spaced SAMPLE_PERIOD clk
// cycles apart, or back to back if a word takes longer.  dac_clr, the DAC's
// active-low clear, is held low during reset and high afterwards.
//
// Timing at the defaults (50 MHz clk): SCK 25 MHz, one word takes 67 clk
// cycles, samples play at 8 kHz.
//
// Requesting one byte at a time, the widening to 12 bits, the 32-bit word
// layout and the count-down to zero are the design's.  The command code
// (write and update), the channel (A), widening by bit replication, SPI
// clock rate and the 8 kHz sample pacing are this implementation's choices.
module dac_process
  import voice_pkg::*;
#(
  parameter int unsigned BYTE_LIMIT    = 32768,
  parameter int unsigned SAMPLE_PERIOD = 6250,
  parameter int unsigned SCK_HALF      = 1,
  parameter logic [3:0]  DAC_CMD       = DAC_CMD_WRITE_UPDATE,
  parameter logic [3:0]  DAC_ADDR      = DAC_ADDR_A
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dac_enable,
  input  logic [7:0] data_in,
  output logic       request,
  output logic       dac_on,
  output logic       led_dac,
  output logic       dac_cs,
  output logic       dac_clr,
  output logic       spi_mosi,
  output logic       spi_sck
);

  localparam int unsigned CNT_W  = $clog2(BYTE_LIMIT + 1);
  localparam int unsigned PACE_W = $clog2(SAMPLE_PERIOD + 1) + 1;
  localparam int unsigned DIV_W  = $clog2(SCK_HALF + 1);

  typedef enum logic [2:0] {D_IDLE, D_REQ, D_LOAD, D_SHIFT, D_END, D_GAP, D_DONE} dac_state_t;

  dac_state_t        state;
  logic              en_d;
  logic [CNT_W-1:0]  count;
  logic [PACE_W-1:0] pace;
  logic [DIV_W-1:0]  div;
  logic [4:0]        bitcnt;
  dac_word_t         latch;
  dac_word_t         word_in;

  assign word_in = '{dc_hi: 8'h00, cmd: DAC_CMD, addr: DAC_ADDR,
                     data: widen_sample(data_in), dc_lo: 4'h0};

  assign request = (state == D_REQ);
  assign led_dac = dac_on;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= D_IDLE;
      en_d     <= 1'b0;
      count    <= '0;
      pace     <= '0;
      div      <= '0;
      bitcnt   <= '0;
      latch    <= '0;
      dac_on   <= 1'b0;
      dac_cs   <= 1'b1;
      dac_clr  <= 1'b0;
      spi_mosi <= 1'b0;
      spi_sck  <= 1'b0;
    end else begin
      dac_clr <= 1'b1;
      en_d    <= dac_enable;
      if (pace != '0) pace <= pace - 1'b1;

      unique case (state)
        D_IDLE: begin
          if (dac_enable && !en_d) begin
            dac_on <= 1'b1;
            count  <= CNT_W'(BYTE_LIMIT);
            state  <= D_REQ;
          end
        end
        D_REQ: begin
          pace  <= PACE_W'(SAMPLE_PERIOD - 1);
          state <= D_LOAD;
        end
        D_LOAD: begin
          latch    <= word_in;
          spi_mosi <= word_in[31];
          dac_cs   <= 1'b0;
          spi_sck  <= 1'b0;
          div      <= '0;
          bitcnt   <= '0;
          state    <= D_SHIFT;
        end
        D_SHIFT: begin
          if (div != DIV_W'(SCK_HALF - 1)) begin
            div <= div + 1'b1;
          end else begin
            div <= '0;
            if (!spi_sck) begin
              spi_sck <= 1'b1;
            end else begin
              spi_sck <= 1'b0;
              if (bitcnt == 5'd31) begin
                state <= D_END;
              end else begin
                bitcnt   <= bitcnt + 1'b1;
                spi_mosi <= latch[5'd30 - bitcnt];
              end
            end
          end
        end
        D_END: begin
          dac_cs <= 1'b1;
          count  <= count - 1'b1;
          state  <= (count == CNT_W'(1)) ? D_DONE : D_GAP;
        end
        D_GAP: begin
          if (pace == '0 || pace == PACE_W'(1)) state <= D_REQ;
        end
        D_DONE: begin
          dac_on <= 1'b0;
          state  <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  initial begin
    assert (BYTE_LIMIT >= 1 && SAMPLE_PERIOD >= 1 && SCK_HALF >= 1)
      else $error("dac_process: BYTE_LIMIT, SAMPLE_PERIOD and SCK_HALF must be at least 1");
  end

endmodule
