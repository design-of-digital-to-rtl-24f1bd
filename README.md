# Ethernet voice-packet receiver with SPI DAC output

A PC sends digitised voice as broadcast UDP packets over a switched
Ethernet LAN. This FPGA receiver takes the packets straight from the board's
Ethernet PHY, on the MII receive port (a 4-bit nibble per receive clock).
It keeps only the packets addressed to the voice application and collects
their payload bytes in block RAM. It then plays each byte as one 12-bit
sample on the board's four-channel SPI DAC, which drives a speaker. No
processor or MAC core is involved. Four small hardware units process the
byte stream in order, one nibble per clock:

```
 MII (RX_CLK domain)                                          CLK_50MHZ domain
 RX_DV, RX_DATA(0:3) ──► frame_starter ──am_enable──► address_match ──buff_enable──► buffer ══► dac_process ──► SPI_MOSI / SPI_SCK / DAC_CS / DAC_CLR
                                                                                  (block RAM,   ◄─request──     LED_DAC
                                                                                   CDC)         ──data_out─►
                                                                                   LED_BUFF     ◄─dac_on───
                                                                                                ──dac_enable►
```

The top module is `voice_protocol`. Its thirteen pins are RX_CLK,
CLK_50MHZ, RX_DV and RX_DATA(0:3) as inputs, and SPI_MOSI, SPI_SCK, DAC_CS,
DAC_CLR, LED_BUFF and LED_DAC as outputs. There is no reset pin. Each clock
domain gets a power-on reset (`por_reset`) from a register that the FPGA
loads with zero at configuration. The four units are instantiated as
`fs`, `match`, `store` and `convert`.

## Bit and byte order on the MII port

`RX_DATA` is declared `[0:3]`, and `RX_DATA[0]` is the PHY's RXD0. A vector
literal such as `4'b1010` therefore reads left to right as RXD0..RXD3. That
literal is the Ethernet preamble nibble 0x5, and `4'b1011` is 0xD, the
second nibble of the start-of-frame byte 0xD5. Each byte arrives low nibble
first. `voice_pkg::nib_value` turns the pins into a normal 4-bit value.

## Frame starter (`frame_starter`)

A 4-bit counter counts preamble nibbles while the unit is armed and RX_DV
is high:

* a 1010 nibble increments the counter. If the counter already holds 15,
  the nibble clears it instead, so exactly 15 preamble nibbles are needed;
* a 1011 nibble with the counter at 15 is the start of a frame. The unit
  pulses `am_enable` for one cycle, clears the counter and disarms;
* any other nibble clears the counter.

While disarmed, the unit ignores payload bytes such as 0x55 or 0xD5, which
would otherwise look like another preamble. It re-arms when RX_DV goes low
between frames. `am_enable` is registered, so it is high in the same cycle
as the first nibble of the destination MAC.

## Address matching (`address_match`)

From `am_enable` on, the unit counts header bytes and compares five fields,
in order, with the values assigned to the sender application:

| field | byte offset from destination MAC | value |
|---|---|---|
| destination MAC | 0–5 | FF:FF:FF:FF:FF:FF |
| EtherType | 12–13 | 0x0800 (IPv4) |
| IP protocol | 23 | 0x11 (UDP) |
| destination IP | 30–33 | 255.255.255.255 |
| UDP destination port | 36–37 | 3435 (decimal) |

The first mismatch drops the frame, and the unit waits for the next
`am_enable`. If all five fields match, the unit reads the UDP length field
(offsets 38–39). It then raises `buff_enable` for exactly 2 × (length − 8)
nibble cycles, starting with the first payload nibble at offset 42. Ethernet
padding and the frame check sequence never reach the buffer. The offsets
assume a 20-byte IPv4 header with no options. The compared values are
parameters of `address_match`, with defaults in `voice_pkg`.

The port is specified as "3435" with no base. It is taken here as
decimal 3435 (0x0D6B). The protocol "11" is taken as hexadecimal, the UDP
protocol number. Change `MATCH_PORT` if your sender uses 0x3435.

## Buffer (`buffer`) and the clock crossing

This is the hardest part to follow, because the unit spans two clocks and
works in three phases.

**Fill (RX_CLK).** Payload nibbles marked by `buff_enable` are paired into
bytes and written to a `MEM_BYTES` byte array, which synthesis maps to block
RAM. The write address is a block number and an offset within a 256-byte
block (00h–FFh). When the offset passes FFh, the next block is used. Bytes
are collected across as many packets as it takes. When `BYTE_LIMIT` bytes
are stored, the buffer stops accepting data and sets its full flag. The rest
of the packet that completed the fill is dropped. So is a half byte left at
the end of a burst.

**Hand-over.** The full flag crosses to CLK_50MHZ through a two-flip-flop
synchronizer and becomes `dac_enable`. The DAC process answers with
`dac_on`, which crosses back the same way. When the write side sees
`dac_on`, it clears the full flag.

**Drain (CLK_50MHZ).** Each one-cycle `request` reads the next byte. The
byte is on `data_out` after the next clock edge. The read address returns to
zero while `dac_on` is low. When `dac_on` falls, the write side empties the
buffer and starts filling again. Packets that arrive during playback are
dropped.

The RAM contents need no synchronizer. The write side writes only while the
DAC process is idle, and the read side reads only while it runs. The
four-phase `full → dac_on → !full → !dac_on` handshake keeps the two apart
by at least two synchronizer delays.

`LED_BUFF` is high while the buffer holds bytes that have not been played.

## DAC process (`dac_process`)

A rising `dac_enable` sets `dac_on` (also `LED_DAC`) and loads a down-counter
with `BYTE_LIMIT`. Each sample then goes through the same steps:

1. `request` pulses for one cycle;
2. the returned byte `b` is widened to 12 bits as `{b, b[7:4]}`, so 00h
   becomes 000h and FFh becomes FFFh;
3. the 32-bit word `{8'h00, cmd 4'b0011, addr 4'b0000, sample[11:0], 4'h0}`
   is latched;
4. `DAC_CS` goes low and the word is shifted out MSB first. `SPI_SCK` idles
   low. `SPI_MOSI` changes while SCK is low, and the DAC samples it on each
   rising edge. Each SCK phase lasts `SCK_HALF` clock cycles;
5. after 32 rising edges, `DAC_CS` returns high and the counter is
   decremented.

Sample starts are spaced `SAMPLE_PERIOD` clock cycles apart. At the
defaults this is 6250 cycles, or 8 kHz, and one word takes 67 cycles. When
the counter reaches zero, `dac_on` falls. `DAC_CLR`, the DAC's active-low
clear, is low only during reset. The command 0011 means "write and update".
The address 0000 selects output A. Both are `dac_process` parameters.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `MEM_BYTES` | 32768 | top, buffer | buffer size: sixteen 16-kbit block RAMs |
| `BYTE_LIMIT` | 32768 | top, buffer, dac_process | bytes collected before playback, and played per playback |
| `BLOCK_BYTES` | 256 | buffer | address block size (00h–FFh) |
| `SAMPLE_PERIOD` | 6250 | top, dac_process | CLK_50MHZ cycles per sample (8 kHz) |
| `SCK_HALF` | 1 | top, dac_process | CLK_50MHZ cycles per SPI clock phase (25 MHz SCK) |
| `PREAMBLE_NIBBLES` | 15 | frame_starter | preamble nibbles before the start-of-frame nibble |
| `MATCH_*` | table above | address_match | assigned MAC, EtherType, protocol, IP, port |

## What follows the source design and what does not

The following come from the published design:

* the four units and their order;
* the unit ports and the top-level pins;
* the preamble counting rule;
* the five compared fields, their order and values;
* the 256-byte address blocks;
* fill to a byte limit, then enable the DAC;
* byte-at-a-time requests;
* widening each byte to 12 bits;
* the 32-bit DAC word layout;
* counting down to zero.

The following are this implementation's own choices:

* the MII bit order of `RX_DATA(0:3)`;
* ending the payload with the UDP length field;
* the buffer size and the byte limit;
* the handshake and re-arming after playback;
* the two-flop synchronizers;
* the power-on reset;
* the LED meanings;
* the widening formula;
* the DAC command and channel;
* the SPI clock rate;
* above all, the 8 kHz sample pacing. The source design gives no sample
  rate.

Known differences and limits:

* **Latency.** The source design reports that its simulated stimulus
  finished playing about 40 ms after it arrived. Its stimulus size and
  sample rate are unknown, so that figure is not reproduced. At the
  defaults here, playback starts only after 32 KiB (about 4.1 s of 8 kHz
  audio) has arrived, and lasts as long again. A lower `BYTE_LIMIT` cuts
  the delay in proportion.
* **Gaps.** Filling and playback never overlap, because the source design
  fills and then drains. Voice that arrives during playback is lost.
* **Robustness.** The receiver checks no frame check sequence, IP header
  checksum or IP options. A frame that ends before its UDP length says
  leaves `buff_enable` high into the next frame's preamble.
* **Resources.** The source design reports its FPGA resource use. Those
  figures were not compared with this RTL.

## Simulation

Each unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog:

| testbench | what it covers |
|---|---|
| `tb_frame_starter` | 14/15/16-nibble preambles, broken preamble, RX_DV gaps, patterns inside a frame, back-to-back frames |
| `tb_address_match` | payload sizes 0/1/10/300, every MAC and IP byte, EtherType, protocol and both port bytes wrong |
| `tb_buffer` | 600-byte fill over 3 bursts across block boundaries, half-byte drop, handshake, drop during playback, second fill |
| `tb_dac_process` | word format, word count, request spacing, SCK phase, no restart without a new rising enable |
| `tb_voice_protocol` | whole receiver at 1 KiB / 600 bytes / 80-cycle samples: every reject path, multi-packet fill, cut-off, drop during playback, two playbacks, sample pacing, 3-cycle start latency; all samples compared |
| `tb_voice_protocol_full` | whole receiver at default parameters: 23 frames fill 32 KiB, and all 32768 samples are compared at 8 kHz spacing (about 4.1 s simulated, a few minutes of run time) |

The testbenches share `tb_frame_pkg` (builds Ethernet/IPv4/UDP frames),
`tb_mii_source` (PHY model: RX_CLK at 25 MHz, preamble, nibbles, gaps) and
`tb_dac_model` (decodes and checks SPI words).

Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/voice_pkg.sv tb/tb_frame_pkg.sv rtl/sync_2ff.sv rtl/por_reset.sv \
  rtl/frame_starter.sv rtl/address_match.sv rtl/buffer.sv rtl/dac_process.sv \
  rtl/voice_protocol.sv tb/tb_mii_source.sv tb/tb_dac_model.sv \
  tb/tb_voice_protocol.sv --top-module tb_voice_protocol
./obj_dir/Vtb_voice_protocol
```

For the other testbenches, swap in the right testbench file and top module
and leave out files they do not use. Verilator warns about the ascending
`[0:3]` ranges. These are kept on purpose, to match the MII pin naming
above.
