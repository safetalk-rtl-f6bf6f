# SafeTalk: an encrypted voice link on one FPGA

SafeTalk scrambles speech so that someone listening on the line hears only
noise. A microphone signal is digitised by an 8-bit ADC. Each sample is
encrypted with a stream cipher and sent as an asynchronous serial byte.
It is meant to go through a telephone modem, or over a direct wire. At the
other end an identical unit decrypts the bytes and plays them through an
8-bit DAC.

This repository holds the digital part of one end, in synthesizable
SystemVerilog. That part is:

- the ADC controller;
- the optional 1:8 down-sampler and its hold-type reconstruction;
- the keystream generator and cipher;
- the transmit and receive FIFOs;
- the UART;
- the controller that moves bytes between them;
- the register that drives the DAC.

The analog front and back ends are not described as logic and are not
included. These are the microphone amplifiers, filters, sample-and-hold,
converter chips and speaker. A behavioural model of the ADC0809's digital
pins is provided for simulation only.

The cipher is a teaching-grade design. Its key is fixed in the hardware,
and the period is short by cryptographic standards (see below). It stops a
casual listener, not an attacker.

## How a sample travels

```
 ADC0809 ──bits/eoc──► input_reader ─► compressor* ─► shift_reg ─► stream_cipher ─► s_to_p ─┐
   ▲   soc/sample ◄───┘  (adc_cipher_connect: the encryptor)                                │
   └── slow clock (clock_divider, clk/30 ≈ 840 kHz)                                          ▼
                                                              dsp_ctrl ──► TX FIFO 16x8 ──► UART tx ──► line
 line ──► UART rx ──► dsp_ctrl ──► RX FIFO 16x8 ──► shift_reg ─► stream_cipher ─► s_to_p ─► decompressor* ─► dataout ─► DAC
                                                    (dac_cipher_connect: the decryptor)
 * only active when comp_en = 1
```

`safetalk` is the top. Everything runs on one clock, `clk`, which is
25.175 MHz on the original board. The original used separate divided
clocks for the ADC and the UART. Here each such clock is a one-cycle
enable strobe on `clk`, made by `clock_divider`. The divided ADC clock is
still brought out on `adc_clk`, because the converter chip needs a real
clock. The reset `rst_n` is asynchronous and active low.

Step by step:

1. **Conversion** (`input_reader`, a five-state machine stepped at each
   falling edge of the slow clock):
   - The sample-and-hold is switched from sample to hold.
   - `soc` is pulsed for one slow-clock period.
   - The controller waits for `eoc` to go high.
   - It latches the 8 data bits and flags them valid for one cycle.

   One sample takes 4 states plus the converter's 84-clock conversion,
   88 slow clocks in all. That is 2640 `clk` cycles, or about 9.54 k
   samples per second.
2. **Optional down-sampling** (`compressor`): when `comp_en` is 1, only the
   first of every 8 samples is passed on.
3. **Encryption**: each byte is sent through three stages.
   - `shift_reg` serialises it, LSB first.
   - `stream_cipher` XORs each bit with one keystream bit.
   - `s_to_p_data_conv` reassembles the byte.

   The encrypted byte appears 10 clocks after the sample was accepted.
4. **Queueing and sending** (`dsp_ctrl`):
   - The byte is written into the 16-entry transmit FIFO.
   - When the FIFO is not empty and the UART transmitter is idle, one byte
     is read out and handed to the transmitter.
5. **Receiving**: when the UART signals a received byte, `dsp_ctrl` reads
   it into the receive FIFO. From there it feeds bytes one at a time into
   the decryptor, which is the same serialise, XOR and reassemble chain.
6. **Output**: each decrypted byte is loaded into the `dataout` register.
   The register holds the value for the DAC until the next byte arrives.
   With `comp_en` = 1 the byte goes through the decompressor first, a hold
   register that adds one clock. The DAC therefore sees a staircase at
   1/8 of the sample rate.

## The keystream

The keystream comes from a Geffe generator (`key_generator`), built from
three linear feedback shift registers (`lfsr`):

| register | polynomial / taps        | TAPS mask  | key (reset value) |
|----------|--------------------------|------------|-------------------|
| 8 bit    | x^8 + x^4 + x^3 + x^2 + 1   | `8'h8E`    | `8'h08`           |
| 11 bit   | x^11 + x^2 + 1              | `11'h402`  | `11'h00B`         |
| 13 bit   | x^13 + x^4 + x^3 + x + 1    | `13'h100D` | `13'h000D`        |

Each register works the same way:

- On every step it shifts right.
- The bit leaving at the LSB is its output.
- The new MSB is the XOR of the tap bits.
- Term x^i of the polynomial is register bit i-1.

The 13-bit register's output selects between the other two:
`key = s13 ? a8 : b11`. The constants live in `safetalk_pkg`.

This exact mapping matters. It reproduces the hand-worked register
sequences of the original design. It also reproduces its encrypted test
bytes: the first two keystream bytes are `0x0A` and `0x98`, LSB first.
Every unit that must talk to another has to use the same mapping.

**These registers are not maximal length.** The polynomials were chosen as
primitive, but with this shift direction and tap numbering the periods are
shorter than intended:

| register | period | intended |
|----------|--------|----------|
| 8 bit    | 105    | 255      |
| 11 bit   | 889, after one start-up step | 2047 |
| 13 bit   | 6141   | 8191     |

So the combined stream repeats after lcm(105, 889, 6141) = 27,296,745 bits.
That is about 3.4 million bytes, or about seven minutes of continuous
traffic at the full line rate. The registers are kept as published, so
that this design interoperates with the original's keystream. Changing
`LFSR*_TAPS` in `safetalk_pkg` gives true maximal-length registers, but
both ends must be changed together. `tb/keystream_model_pkg.sv` holds an
independent model of the generator that the testbenches compare against.

The cipher consumes one keystream bit per data bit, and only when a data
bit is valid. The keystream position is therefore simply the number of
bytes processed since reset. The two ends stay in step only if:

- both are reset before the first byte;
- no byte is lost or duplicated on the line.

A single lost or extra byte garbles everything that follows until both
ends are reset. A corrupted byte damages only that byte.

## Flow control: what happens when the line is too slow

The UART sends 11 line bits per byte. At its default rate (below) it moves
7.95 k bytes per second. The ADC produces 9.54 k samples per second. So
with `comp_en` = 0 the link cannot keep up:

- The transmit FIFO fills in roughly 100 samples.
- After that about one sample in six must be discarded.

A sample is discarded **before** it is encrypted:

- `dsp_ctrl` raises `enc_allow` only while the FIFO has room for one more
  byte, counting a byte still inside the encryptor.
- A new sample that finds `enc_allow` low is dropped and `tx_drop` pulses.
- The dropped sample never consumes keystream, so the two ends stay
  aligned.

If the transmit FIFO dropped bytes after encryption instead, the
sender's keystream would run ahead of the receiver's for good.

With `comp_en` = 1 the need is 1.19 k bytes per second. That is well
within the line's capacity, and nothing is dropped.

The receive side cannot overflow in normal operation. It drains each
received byte within a few clocks of its arrival.

The original design had a second workaround on this path: its receiver
lost frames whose first data bit was 0. It therefore forces the
transmitted byte's LSB to 1 (`FORCE_TX_LSB`, on by default). The
ciphertext LSB is forced, not the plain sample. As a result the LSB of
every decrypted sample is the inverse of that byte's first keystream bit,
and the top seven bits are exact. Set `FORCE_TX_LSB = 0` to send the true
byte; this receiver does not need the workaround.

## The UART

`uart` contains `uart_txmit` and `uart_rxcvr`.

The frame:

- 1 start bit (low);
- 8 data bits, LSB first;
- 1 parity bit, even by default (`ODD_PARITY`);
- 1 stop bit (high);
- the line idles high.

Both halves use a strobe at 16 times the bit rate. The top makes it with
a second `clock_divider`: `UART_DIVISOR = 9` gives one strobe every 18
clocks, that is 1.3986 MHz. A bit therefore lasts 288 clocks, the rate is
87.41 kbit/s, and a frame lasts 3168 clocks. `UART_DIVISOR = 23` gives
34.2 kbit/s, the rate for a 33.6 kbit/s modem.

Handshakes:

- **Transmit:** while `txrdy` is high, a falling edge on `write_n` loads
  `datain` and starts the frame. `txrdy` is low until the stop bit has been
  sent.
- **Receive:** `rxrdy` rises when a byte has arrived. A falling edge on
  `read_n` copies the byte to `dataout` and clears `rxrdy`.

The receiver confirms a start bit at its middle (8 strobes in) and then
samples every 16 strobes. It reports three flags for the latest frame:

- `parityerr`: the parity was wrong;
- `framingerr`: the stop bit was low;
- `overrun`: a byte was overwritten before it was read. This flag is
  cleared by a read.

The flags come out of the top as status only. A byte with a bad parity or
stop bit is still delivered.

The transmitter starts its start bit at the moment of the write, not on a
strobe. The start bit can therefore be up to one strobe period (18 clocks)
short. The receiver's mid-bit sampling tolerates this.

## The ADC controller

`input_reader` drives the ADC0809 and the sample-and-hold:

- `adc_sample` is high while the sample-and-hold tracks the input.
- `adc_soc` starts a conversion.
- `adc_eoc` from the chip means "done" when high. It is synchronised by
  two flip-flops.
- `adc_clk` is the converter clock, clk/30 ≈ 839 kHz, within the chip's
  range.

The states, in order, are: sample, start conversion, wait for end of
conversion, end, read. The controller simply waits for as long as the
converter needs.

## Files

| file | block |
|------|-------|
| `rtl/safetalk_pkg.sv` | shared types (`sample_t`), LFSR constants, frame constants, parity function |
| `rtl/safetalk.sv` | top: the whole link end, plus the DAC test counter |
| `rtl/adc_cipher_connect.sv` | ADC control, optional down-sampler, encryptor, drop logic |
| `rtl/dac_cipher_connect.sv` | decryptor and optional hold reconstruction |
| `rtl/clock_divider.sv` | clk/(2·DIVISOR) clock with edge strobes |
| `rtl/input_reader.sv` | ADC0809 / sample-and-hold state machine |
| `rtl/lfsr.sv`, `rtl/key_generator.sv` | keystream |
| `rtl/stream_cipher.sv` | register plus XOR |
| `rtl/shift_reg.sv`, `rtl/s_to_p_data_conv.sv` | byte to bits and back |
| `rtl/compressor.sv`, `rtl/decompressor.sv` | keep 1 in N / hold |
| `rtl/fifo.sv` | 16×8 FIFO: active-low read request, synchronous clear, registered output |
| `rtl/uart.sv`, `rtl/uart_txmit.sv`, `rtl/uart_rxcvr.sv` | UART |
| `rtl/dsp_ctrl.sv` | flow controller, with assertions on its handshake rules |
| `rtl/dsctest.sv` | DAC test pattern: triangle counting 0..255..0 |

Top-level parameters, all with the original's values except the last:

| parameter | default | meaning |
|-----------|---------|---------|
| `ADC_DIVISOR` | 15 | ADC clock = clk / 30 |
| `UART_DIVISOR` | 9 | 16x baud strobe every 18 clocks (87.4 kbit/s) |
| `FIFO_DEPTH` | 16 | entries per FIFO |
| `COMP_N` | 8 | down-sampling ratio when `comp_en` = 1 |
| `ODD_PARITY` | 0 | even parity |
| `FORCE_TX_LSB` | 1 | force the transmitted LSB to 1 |
| `DSCTEST_DIV` | 10000 | clocks per test-counter step; not from the original |

## Where this differs from the original

- **One clock.** The original ran the UART and FIFOs from a divided clock.
  Here the whole design runs on one clock with enable strobes, and the
  UART's "16x clock" input is a strobe (`mclkx16_en`).
- **Compression is a mode.** The original describes the down-sampler and
  its reconstruction, but its delivered version ran without them. Both are
  built here and selected by `comp_en`, which must match at both ends.
  The ratio is keep 1 in 8. One passage reads as "remove 1 in 8", but
  that would not reach the 8 kHz rate it names.
- **Dropping policy.** The original says no data is lost. At its own rates
  that cannot hold without compression. The drop-before-encryption rule
  and `tx_drop` are additions.
- **The ADC's end-of-conversion polarity** follows the state diagram and
  the simulation tests: high means done. One description of the
  converter says the opposite.
- **`soc`** is high for exactly one slow-clock period. One diagram label
  would keep it high while waiting; the text says it lasts one period.
- **The UART's insides** are not given in detail by the original. The
  frame, the flags and the handshakes follow it. The oversampling scheme,
  the false-start check and when flags clear are this design's own.
- **The FIFO's output is registered.** A write to a full FIFO is ignored
  even when a read happens in the same cycle.
- **The decompressor** is a plain hold register; the original gives only
  its interface.
- **The cycle-level sequencing** in `dsp_ctrl` is this design's own: the
  exact cycles of the read and write strobes and the busy/allow
  handshakes. The conditions it acts on are the original's.
- **The test counter's step rate** is not given by the original.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

The expected values are computed independently of the RTL:

- by the keystream model;
- by frame builders in the testbench;
- by reference queues;
- from the original's published test vectors: register sequences,
  encrypted bytes and UART frames.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/safetalk_pkg.sv tb/keystream_model_pkg.sv \
  tb/tb_safetalk.sv --top-module tb_safetalk
./obj_dir/Vtb_safetalk
```

For another block, replace `tb_safetalk` with that block's testbench.

`tb_safetalk` is the end-to-end test. It runs the top at its default
parameters. The ADC model (`tb/adc0809_model.sv`) feeds random samples
and `tx` is looped back to `rx`. About 390 conversions run over 42 ms of
simulated time, which takes about a second:

- 200 conversions with compression off: the FIFO fills and samples are
  dropped;
- 160 conversions with compression on;
- a further switch off and on, then a drain.

It checks:

- every surviving sample arrives in order on `dataout` with the expected
  value;
- the UART bit timing;
- the ADC clock and sample-cycle timing;
- the forced LSB.

At the end it injects one frame with bad parity and one with a bad stop
bit, and checks that the flags rise. It counts each mechanism and fails if
one never happened: FIFO queueing and filling, drops, compression, the
decompressor, mode switches, waiting on `eoc`, and both error flags.
Receiver overrun is exercised only in the UART receiver's own test: the
controller always reads in time.

`tb_safetalk_modem` runs the same link at the 33.6 kbit/s modem setting
(`UART_DIVISOR = 23`, 34.2 kbit/s, 736 clocks per bit):

- With compression on, 400 conversions pass without a single drop.
- It then shows that uncompressed speech overflows this line.

Testbenches use `$urandom` and need no files.
