# Reconfigurable BPSK / QPSK / 16-QAM / 256-QAM transceiver back end

This is the baseband back end of a software-defined radio transceiver. It can
switch between four modulation schemes while running. The transmitter sends
32-bit data words (audio samples in the original application) with BPSK,
QPSK, 16-QAM or 256-QAM, as chosen by four push buttons. The receiver is not
told which scheme is in use. It measures the power of every received carrier
cycle, and because the four constellations are scaled to lie in four
separate power bands, that power alone identifies the scheme. The receiver
then switches its symbol detector to match.

The RTL covers the digital signal chain between the front-end processor and
the data converters:

```
buttons -> custom_register -> mod_select --------------.
                                                       v
tx word -> block_encoder -> interleaver -> ps_converter -> modulator -> DAC A (I), DAC B (Q)
  (32 b)    (8,4) x 8       8 x 8          1/2/4/8 bit      ^   amplitude_mapper
            = 64 b                         per symbol       |
                                                  dds (cos) + dds (sin)

ADC -> power_select --> receive_sel --.
   \                                   v
    -> demodulator (I/Q correlators) -> detector -> sp_converter -> deinterleaver -> block_decoder -> rx word
         ^ dds (cos) + dds (sin), receive side
```

`sdr_backend` is the top level. Every other file in `rtl/` is one block of
this chain. `sdr_pkg` holds the shared types, number formats and the code
tables.

## The power-band trick

Each symbol lasts exactly one carrier cycle: 64 samples, or 0.8 us for a
1.25 MHz carrier at 80 Msps. The transmitted signal is
x(n) = A cos(wn) + B sin(wn). Over one whole cycle its mean square is
(A^2 + B^2) / 2. The amplitude levels are chosen so that the schemes do not
overlap in power:

| scheme  | I / Q levels                | bits/symbol | power per symbol  | RECEIVE_SEL band |
|---------|-----------------------------|-------------|-------------------|------------------|
| BPSK    | I = +-0.125, Q = 0          | 1           | 0.0078            | P < 0.01         |
| QPSK    | +-0.1875 each               | 2           | 0.0352            | 0.01 .. 0.05     |
| 16-QAM  | +-0.3125, +-0.875 each      | 4           | 0.098 .. 0.766    | 0.05 .. 0.9      |
| 256-QAM | +-1, +-3, .. +-15 each      | 8           | 1 .. 225          | >= 0.9           |

`power_select` computes P = sum(x^2) / 64 over each 64-sample window.
`receive_sel` compares P with 0.01, 0.05 and 0.9. In parallel, the
`demodulator` correlates the same window with the local carriers,
A = (2/64) sum x cos and B = (2/64) sum x sin. The `detector` slices A and B
for the scheme just found. Power and amplitudes come from the same window,
so the decision always applies to the symbol it was measured on.

The price is that the low-order schemes run at very low power: a BPSK
symbol carries about 45 dB less power than the strongest 256-QAM symbol.
The forward error correction makes up for part of that.

## Bits, symbols and words

- **Block code.** Each 4-bit nibble of the 32-bit word becomes one extended
  Hamming (8,4) codeword, so nibble n becomes byte n of a 64-bit word. In a
  codeword, bits 7..1 are Hamming positions 7..1: data in 3, 5, 6, 7 and
  parity in 1, 2, 4. Bit 0 is the overall parity. The decoder corrects one
  error per codeword, which is up to 8 per word. It flags two errors in a
  codeword (`rx_uncorrectable`) and passes that data through uncorrected.
- **Interleaver.** The 64 bits form an 8 x 8 matrix with one codeword per
  row. The matrix is read out by column: output bit c*8+r is input bit
  r*8+c. Any 8 consecutive transmitted bits therefore come from 8 different
  codewords. A burst of up to 8 bit errors, or one lost 256-QAM symbol, is
  corrected.
- **Symbols.** `ps_converter` sends the interleaved word MSB first: 1, 2, 4
  or 8 bits per carrier cycle, so one word takes 64, 32, 16 or 8 cycles
  (4096, 2048, 1024 or 512 clocks). In a 256-QAM symbol the upper nibble
  drives I and the lower nibble drives Q. In 16-QAM, bits 3:2 drive I and
  bits 1:0 drive Q.
- **Gray codes.** 256-QAM uses the 4-bit slice table of the original
  design. It is the reflected Gray code of the level index k (level
  2k - 15) XORed with 0001, so 0001 maps to -15, 0000 to -13, and 1001 to
  +15. 16-QAM uses the 2-bit Gray code on each axis: 00, 01, 11, 10 from
  -0.875 up to +0.875.
- **Scheme changes.** The scheme is read from the button register when a
  word is loaded into the P/S converter, and it holds for the whole word. A
  button press takes effect at the next word boundary.
- **Framing.** If no word is waiting at a word boundary, the transmitter
  sends one carrier cycle at zero amplitude. `receive_sel` reports
  carrier-off below half the BPSK power, which is 0.0039. The S/P converter
  drops any partial word at that point (`rx_dropped`) and starts the next
  word with the next symbol.
- **Scheme hold on receive.** The scheme detected for a word's first symbol
  is kept for the rest of that word. `sp_converter` latches it and feeds it
  back to `detector`, which slices every later symbol of the word with it.
  This matters because the number of bits a symbol adds depends on the
  scheme. A noisy QPSK symbol whose power crosses into the 16-QAM band
  would otherwise add four bits instead of two, and every later word would
  be misframed. With the hold, such a symbol costs at most its own bits,
  which the code corrects. `rx_sel_override` pulses for each symbol where
  the power decision and the held scheme disagreed. A wrong decision on a
  word's first symbol still gives that word the wrong scheme. The framing
  recovers at the next carrier-off symbol.

## Number formats and timing

| quantity  | format                                             |
|-----------|----------------------------------------------------|
| amplitude | signed 9 bit, 1/16 units (0.125 = 2, 15 = 240)     |
| carrier   | signed 16 bit, 1.0 = 32767, 1024-entry sine table  |
| DAC / ADC | signed 16 bit, 10 fractional bits (+-15 fits)      |
| power     | unsigned 32 bit, 20 fractional bits                |

The design processes one sample per clock. The `dds` phase step is 2^32/64,
which gives 64 samples per carrier cycle. The DDS cycle start is the symbol
tick. A symbol reaches `dac_a`/`dac_b` two clocks after the carrier sample it
multiplies.

**The receiver is coherent and has no synchronisation.** The receive DDS
pair runs on the same clock as the transmit pair and starts
`RX_DELAY = 3 + CHANNEL_LATENCY` clocks later. That delay covers two
modulator stages, the ADC input register and the clocks spent outside the
chip. `CHANNEL_LATENCY` (default 0) must equal the actual loop delay from
`dac_a`/`dac_b` to `adc`. The design assumes a loop-back arrangement with
both chains on one FPGA and the two DAC outputs summed into the single ADC
input, as the test bench's channel model does. It does not recover carrier
phase, frequency or symbol timing. A link with a separate transmitter would
need that recovery added in front of `power_select`.

A received word leaves `block_decoder` 7 clocks after the end of its last
symbol at the DAC. Back-to-back words arrive 64 x (symbols per word) clocks
apart. The end-to-end test checks both figures.

## Interfaces of `sdr_backend`

- `btn_wr_en`, `btn_wr_data[3:0]`: the front end writes the button lines
  {B1, B2, B3, B4}. The register holds the value until the next write.
  0000 or B1 selects BPSK, B2 QPSK, B3 16-QAM and B4 256-QAM. If several
  lines are set, the highest-numbered button wins.
- `tx_data`, `tx_valid`, `tx_ready`: a valid/ready word stream. It is
  two register stages deep before the P/S converter.
- `dac_a`, `dac_b`, `adc`: one sample per clock.
- `rx_data`, `rx_valid`: a one-cycle pulse per word. The receiver cannot
  stall. The word comes with `rx_mode`, `rx_corrected` (codewords fixed,
  0..8) and `rx_uncorrectable`.
- `rx_power`, `rx_power_valid`, `rx_sel`, `rx_sel_override`, `tx_mode`,
  `tx_active`: status outputs for observing the scheme decisions.

The front-end processor side is not part of the RTL: the audio codec,
the video-port transfer of 32-bit samples, and the DSP program that reads
the buttons. Nor are the converters and the RF stage. The word stream and
the button write port stand in for the processor link.

## How it departs from the original design

The original was built from model-based blocks, and many details are this
RTL's own choices. Each file's header says which:

- Original: the power bands, the amplitude levels, the 256-QAM Gray table,
  the (8,4) code, the 8 x 8 interleaver, the 64-sample window, the
  1.25 MHz / 64-sample carrier and the button-to-scheme table.
- Own choices: the number formats, the codeword bit layout, the
  row-in/column-out interleaver order, the 16-QAM axis code, the bit
  polarity, the per-word scheme latch on both sides, carrier-off framing, the
  double-error flag, the correlator demodulator and the valid/ready
  handshakes.
- The original says a wrong scheme decision lasts at most one carrier
  cycle. Here the decision and the demodulation use the same window, so a
  wrong decision cannot carry over to another symbol. Inside a word the
  held scheme takes precedence over the power decision.
- The original ran on a Virtex-4 with 19 DSP48 slices. This RTL uses 5
  multipliers (2 in the modulator, 1 for power, 2 for the correlators) and
  four 1024 x 16 sine ROMs.
- Throughput at 80 Msps is 19.5 k words/s for BPSK and 39 k for QPSK,
  rising to 156 k for 256-QAM. That is below a 48 kHz audio sample rate
  for BPSK and QPSK. The original does not state its audio sample rate.

## Simulating

Each block has a self-checking test bench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_sdr_backend.sv` runs the whole
design at its default parameters. It loops the DACs back to the ADC and
sends 15 words: every scheme, six scheme switches, carrier-off gaps, one
single bit error, one 8-bit burst error and one double error. One QPSK
symbol is also received 1.35 times too strong, so that its power falls in
the 16-QAM band. The scheme hold must override that decision. It checks the
data, the detected schemes, the correction counts, the power bands, the
latency and the word spacing. It finishes in well under a second.

`tb/tb_awgn_audio.sv` sends a stereo test tone through a channel with
Gaussian noise. It sends 48 words in each of BPSK, QPSK and 16-QAM, then 192
words in 256-QAM. The noise is set per scheme. For the three low schemes it
is well inside the decision margins, and every word must arrive exact. For
256-QAM the noise standard deviation is 3.0 sample units, about half a
decision distance on each demodulated amplitude. Over eight noise seeds,
about 1.3 % of the coded bits arrive wrong. After decoding, 0.1 to 0.25 % of
the data bits are wrong, and 2 to 6 % of the words are not exact. The bench
requires corrections, fewer errors after decoding than before, and at least
90 % exact words.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sdr_pkg.sv \
    tb/tb_sdr_backend.sv --top-module tb_sdr_backend -o sim
./obj_dir/sim
```

For another block, put its test bench in place of `tb_sdr_backend.sv`. The
package must come first on the command line. `-y rtl` finds the rest.
