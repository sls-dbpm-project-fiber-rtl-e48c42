# FOL – SHARC link ports over an 8b10b fibre link

The Fibre Optical Link (FOL) module joins the link ports of SHARC DSPs on
two different baseboards through optical fibres. Each FOL board has two fibre
channels. Each channel carries one DSP link-port stream in each direction:
words a DSP writes into link port 3 (channel 0) or 4 (channel 1) come out of
link port 1 or 2 of the DSP on the other board. The fibre runs 8b10b at
1.5 Gbit/s, which leaves 1.2 Gbit/s of 16-bit payload per direction. The hard
parts are:

* the fibre has no frame or clock of its own, so each receiver must find the
  10-bit symbol boundary, the 16-bit word boundary and the 32-bit DSP word
  boundary in the bit stream;
* the two ends run from independent oscillators, with six clock domains on
  each board;
* a DSP may stop reading. The far DSP must then be held off through the fibre
  itself, before any buffer overflows.

This repository holds the synthesizable logic of the FPGA on one FOL board
(top module `fol_top`). It also holds testbenches for every block, and one
testbench that connects two complete boards back to back.

## One channel, end to end

```
 DSP link port 3/4                                           far board
 LCLK/LDAT ─► dsp2system ─► mc_tx ─► async_fifo ─► tx_sync_splitter ─► gxb_tx_encoder ─► 20 bit ─► SERDES ─► fibre
   LACK ◄──┘  (nibble FIFO,    (marker, hi,          (data, or IDLE/STOP        (8b10b, running
               32-bit words)    lo half words)        words when empty)          disparity)

 fibre ─► SERDES ─► 20 bit ─► gxb_word_aligner ─► gxb_rx_decoder ─► rx_sync_combiner ─► async_fifo ─► mc_rx
                              (comma search,       (8b10b decode,     (16-bit boundary,      (rx clock ->  (32-bit
                               symbol boundary)     error flags)       link stable, STOP,     system clock)  words)
                                                                       error counter)                         │
 DSP link port 1/2  ◄─ ddr_out ◄─ system2dsp ◄─ async_fifo (32 words, "half full" = STOP to the far end) ◄──┘
 LCLK/LDAT, LACK ─►
```

`fol_top` instantiates this chain twice (generate loop `g_ch`). It adds the
shared register slave (`mem_slave`), the two interrupt generators
(`irq_error`, `irq_trigger`), the reference oscillator set-up
(`osc_config` with the I2C master `i2c_link`), one `reset_gen` per clock
domain and the synchronisers between domains (`pulse_sync`, two-flop and Gray-code
crossings).

## The fibre protocol

Everything on the fibre is a *FOL word*: 16 bits plus two K flags (one per
byte), sent low byte first, each byte as one 8b10b symbol. Bit 0 of a symbol
(8b10b bit `a`) goes out first. A DSP word takes three FOL words: a 32-bit
marker, then the high half, then the low half. At 75 MHz that is at most
800 Mbit/s of DSP data per direction. Control words always have the
K28.5 comma in the low byte. The high byte gives the word's meaning:

| FOL word | high byte | low byte | meaning |
|---|---|---|---|
| `W_IDLE`   | K28.0 | K28.5 | nothing to send, and the sender's receiver is ready for data |
| `W_STOP`   | K28.2 | K28.5 | nothing to send, and the far end must stop sending data |
| `W_SYNC32` | K28.4 | K28.5 | the next two data words are the high and low half of a 32-bit word |
| data       | D     | D     | a half word of DSP data |

When its FIFO is empty the transmitter sends idle words. Each idle word is
IDLE or STOP depending on the local flow-control state, so the state is
repeated all the time. When the state changes, one IDLE or STOP word goes out
ahead of any queued data, so the far end learns of it within a few clocks.

The constants and the 8b10b encoding function are in `fol_pkg`. The code is
the standard 8b10b code. The decoder does not use a decode table: it decodes
each 6b and 4b sub-block, then re-encodes the result under both disparities.
A symbol that matches neither is a code error. A symbol that is valid only
under the other disparity is a disparity error.

## Getting into step

A receiver gets 20 bits per recovered clock, at an unknown bit offset.
Alignment takes three stages:

1. **Symbol boundary** (`gxb_word_aligner`): it looks for K28.5, of either
   disparity, at all 20 offsets of a 40-bit window. It then takes the offset
   modulo 10, so that every output word holds two whole symbols. If a comma
   turns up at a new offset, it realigns at once. `byte_sync` reports that a
   comma has been found.
2. **16-bit boundary** (`rx_sync_combiner`): the symbols may still be one
   byte off the FOL word boundary. The combiner keeps the previous byte pair
   and looks at the stream either as received or shifted by one byte. If it
   sees K28.5 in the high byte, it switches view (a *slip*).
3. **32-bit boundary** (`rx_sync_combiner`, `mc_rx`): the half word after
   `W_SYNC32` is stored with a mark bit. `mc_rx` starts a DSP word only at a
   marked half word. It drops an unmarked half word that arrives when no high
   half is waiting.

The link is *stable* once a control word is seen while byte sync holds and
no 8b10b error occurs. Any code or disparity error clears the stable state
until the next control word. While the link is not stable, no data is stored
and the far end counts as stopped. Errors are counted per clock that has one,
saturating at 255. The count crosses into the DSP clock domain in Gray code.

## Flow control

The DSP-bound FIFO of each channel holds 32 words. When it is half full, or
when the local receiver is not stable, the local transmitter of the same
channel sends STOP. The far board sees `remote_stop` and drops LACK on its
link port 3/4, and the far DSP stops after the word it is sending. Sixteen
free words cover the words already in flight (fibre, FIFOs, synchronisers).

LACK on link ports 3/4 is high only when all of these hold:

* the local receiver of that channel is stable;
* the far end did not send STOP;
* the local nibble FIFO has more than `LACK_MARGIN` (24) free entries.

The third condition holds the DSP off when the local fibre transmitter
falls behind.

On the output side, `system2dsp` starts a word only while the DSP's LACK is
high. So a DSP that stops reading fills its FIFO, and the far DSP then stops
sending. The end-to-end testbench checks that no word is lost along this
chain.

An overflow can happen only if flow control is bypassed. Then `mc_rx` drops
the word and raises IRQ1.

## DSP link ports

* **Input (link ports 3/4 → FPGA)**, `dsp2system`: the DSP drives LCLK and
  renews LDAT on the rising edge. The FPGA samples on the falling edge,
  straight into a 64-entry nibble FIFO written on the inverted LCLK. Words
  are built from eight nibbles, most significant first, in the system clock
  domain. LACK is registered in the DSP clock domain.
* **Output (FPGA → link ports 1/2)**, `system2dsp` + `ddr_out`: LCLK idles
  low. The data nibble changes with the rising edge of LCLK and is sampled by
  the DSP on the falling edge. The speed is set per port by register 0x20 or
  0x21:
  * full speed (1): one LCLK period per DSP clock period. LCLK is high in the
    first half of the clock and low in the second, which needs the DDR output
    register `ddr_out`.
  * half speed (0, the reset default): one LCLK period per two DSP clocks.

  A word takes 8 clocks at full speed and 16 at half speed. One idle clock
  follows each word, and LACK is checked before each word.

`ddr_out` uses one rising-edge and one falling-edge flip-flop per bit,
joined by XOR (q = a ^ b). Only one of the two changes per edge, so the
output is free of glitches. On an FPGA the DDR output cell of the I/O block
can replace it.

## Registers

The DSP bus has an 8-bit data path and word offsets. Select, read and write
strobes are active low and are sampled on the rising DSP clock edge. A read
drives `rdata`, `rdata_oe` and `ack` from the next edge for as long as the
strobe is held. A write takes effect on the first edge at which it is
sampled, and is acknowledged in the same way.

| offset | access | content |
|---|---|---|
| 0x00–0x07 | R | firmware ID, ASCII `FOLSHARC` ('F' at 0x00) |
| 0x08–0x0B | R | firmware revision (0 = test), day, month, year (parameters `FW_*`) |
| 0x10 / 0x11 | R | transmitter 1 / 2 active (bit 0) |
| 0x12 / 0x13 | R | receiver 1 / 2 stable (bit 0) |
| 0x14 / 0x15 | R | receiver 1 / 2 error counter |
| 0x20 / 0x21 | R/W | link port 1 / 2 speed, 1 = full, 0 = half |
| 0x22 / 0x23 | R/W | link port 1 / 2 FIFO reset on a 0→1 write |
| 0x24 | R/W | trigger select: 0 none, 1 A, 2 B, 3 C |
| 0x25 | R/W | trigger polarity: 1 = low active |
| 0x26 / 0x27 | R/W | link port 3 / 4 FIFO reset on a 0→1 write |

Unused addresses and bits read 0. A FIFO reset bit produces a reset pulse of
four DSP clocks in the reset generators of that path. All writable registers
reset to 0.

## Interrupts

* **IRQ1, errors** (`irq_error`): a low pulse (`IRQ_PULSE` = 4 DSP clocks)
  for each new error. An error is a word dropped at a full FIFO, or a
  receiver leaving the stable state. A new event during a pulse restarts it.
* **IRQ2, trigger** (`irq_trigger`): the three trigger inputs are
  synchronised. The selected one, with its polarity applied, pulses IRQ2 on
  each inactive-to-active edge. After reset no trigger is selected. Changing
  the selection is not an event.

## Clocks and resets

| clock | source | used for |
|---|---|---|
| `sclk` | DSP clock, phase compensated by an FPGA PLL | link-port LACK and outputs, registers, interrupts |
| `lp_in_lclk[i]` | the DSP | writing the input nibble FIFO |
| `sys_clk` | transmitter PLL, 75 MHz | transmit path, media converters, system side of all FIFOs |
| `rx_clk[i]` | clock recovery of receiver i, 75 MHz | aligner, decoder, combiner, write side of the receive FIFO |
| `cfg_clk` | 4 × the 20 MHz oscillator, 80 MHz | reference oscillator set-up and its I2C access |

The 75 MHz transmitter core clock also serves as the general system clock.
A FIFO between `mc_tx` and the splitter still decouples the two stages.

Each domain has a `reset_gen`. It asserts reset asynchronously while its PLL
lock flag is low, or while a register FIFO reset is active. It releases the
reset on the fifth clock edge after the cause goes away. FIFOs that span two
reset domains are cleared by either reset.

## What is outside this RTL

These parts appear on the board but are not logic:

* the PLLs (20 MHz → 40/80 MHz, DSP clock compensation, transmitter);
* the transceiver's analogue part: serializer, deserializer, clock-recovery
  PLLs and the 750 MHz DDR serial output;
* the transceiver calibration block;
* global clock buffers;
* the optical transceivers.

`fol_top` starts at their parallel side. Recovered clocks, lock flags and the
20-bit transmit and receive words are ports.

The oscillator set-up runs inside `fol_top`. Its result comes out as
`osc_cfg_done`, `osc_cfg_fail` and `osc_ref_en`. The I2C lines are open
drain: `i2c_scl_low` and `i2c_sda_low` pull a line low, and `i2c_sda_in`
reads the SDA level.

## Reference oscillator set-up

The transceiver needs an 83.333 MHz reference from an external, programmable
oscillator. `osc_config` prepares it once after the configuration PLL locks:

1. It reads the oscillator's current settings (six registers from 7).
2. It writes the new settings, skipping registers that already hold their
   target value.
3. It reads all six back. On a difference it writes all of them again, at
   most twice, and then gives up with `fail`.
4. It writes the enable register (135, value 0x40). `done` and `ref_en` then
   go high, so the reference may be handed to the transceiver PLL.

A byte that is not acknowledged also ends in `fail`. Only a new reset starts
the sequence again. The register numbers and values are parameters
(`FIRST_REG`, `NREG`, `TARGET`, `EN_REG`, `EN_VAL`). **The `TARGET` default
is a placeholder.** The real settings for 83.333 MHz depend on the part and
must come from the oscillator's data sheet. The same goes for computing
them from the values read, which this design does not do.

`i2c_link` performs one register access per request:

* write: START, device address with W, register, data, STOP;
* read: START, device address with W, register, repeated START, device
  address with R, one data byte answered with NACK, STOP.

One SCL period is four quarters of `CLK_DIV` clocks: SDA changes in the
first quarter, SCL is high in the second and third, and SDA is sampled at
the end of the second. With the defaults (`CLK_DIV` = 200 at 80 MHz) SCL
runs at 100 kHz. If a byte is not acknowledged, `ack_err` is set and the
transfer ends with STOP at once. The device address defaults to 0x55, the
usual address of the SI570 oscillator. The device may not stretch the
clock. The block is held in reset while the configuration PLL is unlocked.

## Choices made in this design

The description of the board leaves these points open. Each was decided here:

* The control-word encoding (K28.5 plus K28.0, K28.2 or K28.4), low byte
  first, bit `a` first.
* One 32-bit marker before every DSP word, high half first, and the most
  significant nibble first on the link ports.
* The flow-control thresholds: DSP-bound FIFO depth 32, STOP at half full;
  nibble FIFO depth 64, LACK margin 24; transmit FIFO 16 words, receive FIFO
  16 half words.
* The register bus timing, the FIFO reset pulse length, and the IRQ pulse
  polarity and length.
* The error counter counts clocks with an 8b10b error and saturates. It also
  counts errors seen before the first alignment, so it reads non-zero after
  start-up.
* The meaning of half and full speed: one LCLK period per two DSP clocks,
  or one per DSP clock.
* The line rate: the clock drawings give 1.25 GHz / 125 MHz, while the text
  gives 1.5 Gbit/s, 750 MHz and 75 MHz. The text is followed. No frequency
  appears in the RTL, so this only matters for the PLL settings.
* The register table of the module this board replaces is not implemented.
* The I2C rate (100 kHz) and device address (0x55) of the oscillator access.
* The oscillator register numbers, the placeholder target values, write-only-what-differs and two retries.

## Files

`rtl/` holds one module or package per file: `fol_pkg`, `async_fifo`,
`reset_gen`, `pulse_sync`, `ddr_out`, `dsp2system`, `mc_tx`,
`tx_sync_splitter`, `gxb_tx_encoder`, `gxb_word_aligner`, `gxb_rx_decoder`,
`rx_sync_combiner`, `mc_rx`, `system2dsp`, `mem_slave`, `irq_error`,
`irq_trigger`, `i2c_link`, `osc_config` and the top `fol_top`. Each file begins with a description of
its interface and timing.

`tb/` holds `tb_<module>` for each of them, plus these models used by
`tb_fol_top`:

* `tb_lp_sender` and `tb_lp_receiver`: SHARC link ports;
* `tb_fiber`: a fibre, with a chosen bit offset, disconnection and bit-error
  injection;
* `tb_i2c_slave`: an I2C register device standing in for the oscillator
  (also used by `tb_i2c_link` and `tb_osc_config`).

## Simulating

Every testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/fol_pkg.sv tb/tb_fol_top.sv --top-module tb_fol_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_fol_top` with any other testbench name. Use
`+verilator+rand+reset+2` so that uninitialised state starts random: the
testbenches are written for it.

`tb_fol_top` runs two complete boards at their default parameters. It uses
slightly different DSP and transceiver clocks on each board, and fibres with
bit offsets of 0, 7, 13 and 19. The boards stand side by side: link port 3
sends to the left neighbour and link port 4 to the right one. So channel 0
of one board pairs with channel 1 of the other. It simulates about 7 ms,
most of it the I2C set-up at 100 kHz, in about ten seconds. It checks:

* link acquisition, including 16-bit slips;
* register reads of the ID and status;
* four streams of numbered words, delivered complete and in order;
* STOP and resume caused by the half-speed outputs, and LACK throttling;
* a DSP that stops reading;
* full-speed LCLK timing;
* a FIFO reset;
* a bit error: error counter, link loss, IRQ1 and recovery;
* a disconnected fibre: STOP back to the sender, IRQ1 and reconnection;
* a forced overflow with IRQ1;
* IRQ2 on the selected trigger only;
* at start-up, in parallel with the rest, the oscillator set-up: it
  completes on board A and gives up on board B, whose bus has no device.

It counts each of these mechanisms and fails if one never happened. The
block testbenches cover the corner cases:

* `tb_gxb_rx_decoder` decodes a long random stream of data and K symbols
  with no error flagged. It then injects single bit errors, each of which
  must be flagged within three words.
* `tb_async_fifo` checks random traffic between unrelated clocks.
* `tb_tx_sync_splitter` fills the FIFO and toggles the stop request at
  random. Data must come out complete and in order. Every control word must
  show the request as it was two clocks earlier.
* `tb_irq_trigger` toggles all three trigger inputs at random. It compares
  the IRQ2 pulses with the active edges of the selected input and checks the
  delay from an edge to IRQ2.
* `tb_reset_gen` drops the lock and raises the extra reset for random lengths
  and phases. Reset must start at once and end after the hold time.
* `tb_osc_config` runs the oscillator set-up on four buses. The first is a
  normal start-up. On the second, a register is spoiled once, which forces
  one retry. On the third it is spoiled every time, so the set-up gives up.
  The fourth has no device.
