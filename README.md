# Body-coupled FSK transceiver with convolutional coding and Viterbi decoding

Body-coupled communication (BCC) sends data through the human body between
wearable nodes. This RTL implements a small, all-digital BCC link: data bits
are protected by a rate-1/3 convolutional code, sent as binary frequency-shift
keying (FSK) whose two tones come from direct digital synthesisers (DDS)
instead of oscillators, passed through a noisy channel model, and recovered
by a receiver that finds the frame header, demodulates by matching against
its own copies of the two tones, and corrects errors with a hard-decision
Viterbi decoder. Everything, the channel included, is one synchronous design
with 1-bit data in and 1-bit data out.

The architecture follows the article "Low-power body-coupled transceiver for
miniaturized body area networks": its frame header, code, tone frequencies,
DDS structure, channel model and Viterbi decoder organisation. Where the
article leaves out details (symbol length, bit orders, handshakes, how the
receiver finds its timing, how the traceback starts), the choices made here
are listed in [Departures and own choices](#departures-and-own-choices).

## Signal path

```
           bcc_tr
 din ──► bcc_tx ─────────────────────────► bcc_channel ─────► bcc_rx ──────────────► dout
         ├ bcc_hdr_gen   header ROM         LFSR noise / 4       ├ DEMUX (sel)
         ├ bcc_conv_enc  (3,1,4) encoder    OR-ed into sample    ├ bcc_hdr_rec   header recovery
         ├ bcc_p2s       3 → 1 bits                              ├ bcc_fsk_demod tone matching (2 × bcc_dds)
         ├ bcc_fsk_mod   2 × bcc_dds + MUX                       ├ bcc_s2p       1 → 3 bits
         └ TX MUX (sel)  header / FSK                            └ bcc_viterbi   8 × bcc_acs, bcc_tbm, output shift register
```

Samples on the channel are 12-bit two's complement words, one per clock.
With a 100 MHz clock the two tones are 1 MHz (bit 1) and 500 kHz (bit 0).

## Frame and timing

```
| preamble C55555CC | SOF A5 | payload: (N_DATA + 4) × 3 channel bits |
|   32 bits          | 8 bits |  N_DATA data bits + 4 zero tail bits, rate 1/3 |
```

* Every channel bit lasts `SPB` clock cycles (samples); default 20.
* Header bits go out as baseband levels: +2047 for 1, −2048 for 0. The line
  sits at 0 between frames.
* Payload bits go out as `SPB` samples of the 1 MHz tone (1) or the 500 kHz
  tone (0). Both DDSs run continuously, so each tone is phase-continuous.
* The four zero tail bits return the encoder to state 0, so the decoder can
  trace back from a known end state.

With the defaults (`SPB` = 20, `N_DATA` = 20) a frame is
(40 + 72) × 20 = 2240 cycles of samples. `start` in an idle cycle begins the
frame the next cycle, and `tx_done` pulses 2241 cycles after `start`. The
transmitter takes a data bit in each cycle where `din_ready` is high. That
cycle is the last one of the channel bit before the bit's codeword goes out.
The first decoded bit appears on `dout` `N_DATA` + 8 = 28 cycles after
`tx_done`, and the rest follow on consecutive cycles. Those 28 cycles cover
the symbol decision, the last codeword in the serial-to-parallel register,
the last trellis step, the traceback of `N_DATA` + 4 steps at one step per
cycle, and the load of the output shift register.

## The code and its trellis

The encoder has four register bits F3..F0 besides the input bit. The register
shifts right, so F3 is the newest bit and F0 the oldest:

```
C0 = din ^ F2 ^ F0                 G0 = [0101]
C1 = din ^ F3 ^ F1 ^ F0            G1 = [1011]
C2 = din ^ F3 ^ F2 ^ F1 ^ F0       G2 = [1111]      (generator bits tap F3..F0)
next F = {din, F3, F2, F1}
```

The codeword goes out C0 first. These equations live in `bcc_pkg::ce_code`,
which the encoder does not use but the ACS units do. The encoder has its own
copy, written from the same equations.

Four register bits give 16 trellis states. A state `s = {F3,F2,F1,F0}` can
only be reached from `{F2,F1,F0,0}` and `{F2,F1,F0,1}`. The decoder groups
states into 8 **butterflies**. Butterfly `b` (0..7) reads the metrics of
states `{b,0}` and `{b,1}` (2b and 2b+1) and writes those of `{0,b}` and
`{1,b}` (b and b+8). Each `bcc_acs` instance is one butterfly. That is why
8 ACS units give 16 decision bits per step, 2 per unit. For each of its two
new states the unit adds the Hamming distance between the received word and
the expected codeword to each candidate metric, and keeps the smaller sum.
Its decision bit is 1 if the path from `{b,1}` won. A tie keeps `{b,0}`.
Every tap set includes `din`, so the two branches leaving a state always
carry complementary codewords.

**Path metrics** are 6 bits. At the start of a frame state 0 gets 0 and the
others get 16. After four steps every state is reachable from state 0 with a
metric of at most 12, so paths from other start states are dropped. When all
16 metrics have their MSB set, the MSB is cleared in all of them. This keeps
them in range, because their spread stays below 32: at most 16 + 9 early in
the frame, at most 12 after.

**Traceback** (`bcc_tbm`) stores one 16-bit decision vector per trellis step
in a 24-entry memory, addressed by a step counter. After the last step of the
frame it starts at state 0 and walks back one step per cycle. At step t:

```
decoded bit u_t   = state[3]                       (the input that led into the state)
previous state    = {state[2:0], decision_t[state]}
```

The bits of the data steps (t < `N_DATA`) form a 20-bit block. The
decoder's output shift register loads the block and shifts it out, earliest
bit first.

## Tone generation (`bcc_dds`)

`Fout = Fclk × FCW / 2^20`. FCW 10485 gives 1 MHz and FCW 5243 gives 500 kHz
at 100 MHz. The DDS has four stages:

1. **Phase accumulator**: a frequency register, an adder and a 20-bit phase
   register.
2. **Complementor**: in the 2nd and 4th quarter of the period, the 10 phase
   bits below the top two are inverted. This folds the ramp into a triangle
   that addresses a quarter sine.
3. **Segment table ("MUX tree")**: the top 3 address bits select one of 8
   linear segments. The table holds `base[k] = round(2047·sin(π/2·k/8))` and
   `slope[k] = base[k+1] − base[k]`, with base[8] = 2047. The low 7 bits
   interpolate: `base + (slope × frac) >> 7`. The error is at most about
   11 LSB (0.5 % of full scale); the testbench allows 20 LSB.
4. **Format converter**: in the second half of the period (phase MSB set) the
   magnitude is negated.

The output is registered and follows the phase register by one cycle. All
DDS instances start at phase 0 on reset. Instances with the same FCW
therefore produce identical samples in the same cycle, and the receiver
relies on this.

## Channel model (`bcc_channel`)

A 10-bit maximal-length LFSR (x¹⁰ + x⁷ + 1, seed 1) is the noise source. Its
value divided by 4 gives an 8-bit noise word, which is OR-ed into the
transmitted sample. The channel adds no delay. OR can only set bits, and only
bits 7..0. A larger `SCALE_SHIFT`/`LFSR_W` combination widens the noise.

## Receiver synchronisation and demodulation

**Header recovery** (`bcc_hdr_rec`) reads a header bit from the sample's
sign. A phase counter restarts on every level change and wraps every `SPB`
cycles. The bit is sampled at phase `SPB/2`, the middle of the bit, and
shifted into a 40-bit register. When the register equals C55555CC A5,
`frame_sync` pulses. The receiver then waits for the last cycle of that bit
(`bit_end`) and switches its DEMUX to data. The first payload symbol
therefore starts on the exact sample boundary, in the same cycle as the
transmitter's switch. The alternating preamble gives the phase counter many
level changes to lock on. After 3 × (`N_DATA` + 4) channel bits the DEMUX
returns to header search and the header register is cleared.

**Demodulation** (`bcc_fsk_demod`) uses the receiver's own 1 MHz and 500 kHz
DDSs. Each received sample counts as a match for a tone when its top
`MATCH_BITS` = 4 bits equal that tone's; the nominal noise never reaches
these bits. Over the `SPB` samples of a symbol, the bit is 1 if DDS1 matched
more samples than DDS2, and 0 otherwise. FCW1 is not exactly twice FCW2, so
the tones slowly drift against each other. At rare relative phases their top
bits agree for a whole symbol, and that symbol may be decided wrongly. This
happens about once in 10⁵ channel bits at `SPB` = 20 and in 1.5 % at
`SPB` = 6. The Viterbi decoder removes these errors.

**Requirement:** the demodulator only works if its DDSs are in step with the
transmitter's. Both ends must share the clock and the reset, and the channel
must add no latency. This holds in `bcc_tr`. A link between two separate
chips would need carrier and phase recovery, which this design does not
have.

## Files

| file | module | role |
|---|---|---|
| `rtl/bcc_pkg.sv` | package | sample type, header constants, `ce_code`, `hamming3` |
| `rtl/bcc_tr.sv` | `bcc_tr` | top: transmitter, channel, receiver |
| `rtl/bcc_tx.sv` | `bcc_tx` | frame controller, TX MUX |
| `rtl/bcc_hdr_gen.sv` | `bcc_hdr_gen` | header ROM and serialiser |
| `rtl/bcc_conv_enc.sv` | `bcc_conv_enc` | (3,1,4) convolutional encoder |
| `rtl/bcc_p2s.sv` | `bcc_p2s` | 3-bit PISO with 2-bit counter |
| `rtl/bcc_dds.sv` | `bcc_dds` | DDS |
| `rtl/bcc_fsk_mod.sv` | `bcc_fsk_mod` | two DDSs and the tone MUX |
| `rtl/bcc_channel.sv` | `bcc_channel` | LFSR noise channel |
| `rtl/bcc_rx.sv` | `bcc_rx` | DEMUX and receive controller |
| `rtl/bcc_hdr_rec.sv` | `bcc_hdr_rec` | header recovery and bit timing |
| `rtl/bcc_fsk_demod.sv` | `bcc_fsk_demod` | tone-matching demodulator |
| `rtl/bcc_s2p.sv` | `bcc_s2p` | 3-bit SIPO |
| `rtl/bcc_viterbi.sv` | `bcc_viterbi` | path metrics, 8 ACS units, TBM, output register |
| `rtl/bcc_acs.sv` | `bcc_acs` | one ACS butterfly |
| `rtl/bcc_tbm.sv` | `bcc_tbm` | decision memory and traceback |

### Top-level parameters (`bcc_tr`)

| parameter | default | meaning |
|---|---|---|
| `SPB` | 20 | samples (cycles) per channel bit, this design's choice |
| `N_DATA` | 20 | data bits per frame = traceback output block |
| `LFSR_W` | 10 | noise LFSR width |
| `SCALE_SHIFT` | 2 | noise divided by 2^SCALE_SHIFT (scaling factor 4) |
| `MATCH_BITS` | 4 | sample MSBs compared by the demodulator |
| `ACC_W` | 20 | DDS phase accumulator width |
| `FCW1`, `FCW2` | 10485, 5243 | tone frequency control words (1 MHz, 500 kHz at 100 MHz) |

`SPB` ≥ 4 keeps the mid-bit sampling meaningful. `N_DATA` sets the decision
memory depth (`N_DATA` + 4) and the output register width.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/bcc_pkg.sv tb/tb_bcc_tr.sv --top-module tb_bcc_tr
./obj_dir/Vtb_bcc_tr
```

Replace `tb_bcc_tr` with any other testbench name. The transmitter and
the traceback module carry concurrent assertions for their handshake rules
(`--assert` enables them in Verilator). Every testbench finishes in
a few seconds.

| testbench | what it shows |
|---|---|
| `tb_bcc_tr` | 8 frames end to end at the defaults: data, header detection, frame length, output latency. Also counts each mechanism (header, both MUX switches, both tones, noise, tail bits, traceback, output register) |
| `tb_bcc_tr_noise` | 2000 frames (40,000 bits) on the nominal channel and on one with twice the noise amplitude. Counts raw channel-bit errors and decoded errors |
| `tb_bcc_tr_rate` | 2000 frames at `SPB` = 6 sent back to back, near the intended data rate, with raw errors corrected by the decoder |
| `tb_bcc_tx`, `tb_bcc_rx` | sample-exact transmitter output, and receiver behaviour with a corrupted header and deliberately flipped symbols |
| `tb_bcc_viterbi`, `tb_bcc_tbm`, `tb_bcc_acs` | decoder correction with up to 4 errors per 20-bit frame (12 per 100-bit frame), traceback timing, ACS arithmetic including ties, metric normalisation |
| `tb_bcc_dds`, `tb_bcc_fsk_mod` | every sample within 20 LSB of an ideal `$sin` model, tone frequencies from zero-crossing counts |
| the rest | leaf blocks against reference models |

Results: no decoded errors in 40,000 bits on either channel of
`tb_bcc_tr_noise`. The heavier channel has 686 raw channel-bit errors in
144,000. At `SPB` = 6 there are 2117 raw errors in 144,000 channel bits and
still no decoded errors.

## Performance against the reported figures

The article reports 19.5 clock cycles per bit: 5.13 Mbps at 100 MHz and
13.78 Mbps at 268.77 MHz. It also reports a BER of 10⁻⁷ and about 310
Artix-7 slices. Here the rate is set by `SPB`:

* default `SPB` = 20: 60 cycles per trellis step, 112 cycles per data bit
  including header and tail (0.89 Mbps at 100 MHz);
* `SPB` = 6: 18 cycles per trellis step on the payload (5.56 Mbps of coded
  payload at 100 MHz), 33.7 cycles per data bit overall.

The default favours a clean tone decision over the reported rate. A BER of
10⁻⁷ needs more than 10⁷ simulated bits; the runs above cover 4·10⁴. FPGA
area, frequency and power were not reproduced.

## Departures and own choices

Taken from the article: the 40-bit header and its values, the (3,1,4) code
and its equations, the 3-bit PISO/SIPO with a 2-bit counter, the FSK tone
MUX with FCWs 10485/5243, the DDS stages (accumulator, complementor,
segment-based half-sine, format converter), the LFSR channel with scaling
factor 4 and OR corruption, and a hard-decision Viterbi decoder. The decoder
has 8 ACS units with 6-bit metrics and 2 decisions each, a TBM with a
counter-addressed decision memory, a 20-bit output block and a right-shifting
output register.

Chosen here:

* **Symbol length** `SPB` = 20 and **demodulator decision**: top-4-bit
  matching with a majority vote per symbol.
* **Header signalling**: full-scale baseband levels, and the receiver's
  timing recovery and 40-bit matcher. The article only names a header
  recovery unit.
* **DEMUX select**: the receiver derives it from header detection. The
  transmitter's select line comes from its own frame controller.
* **Frame termination**: 4 zero tail bits, and a traceback from state 0 over
  the whole frame.
* **Conventions**: the register shift direction (F3 newest), the butterfly
  pairing of states, tie rules, channel-bit order C0, C1, C2, and header
  bit order (preamble first, MSB first).
* **Details**: DDS accumulator width 20 (derived from the FCW values and a
  100 MHz clock), 8-segment sine table, LFSR polynomial and seed, 6-bit
  metric initialisation and normalisation.
* **Reset and clocking**: asynchronous active-low reset everywhere, and one
  shared clock for both ends.

Points where the article's own description differs or is unclear:

* **Header order.** Its transmitter algorithm writes the header as
  {SOF, preamble}, with the SOF in the upper bits. A preamble has to come
  before the start-of-frame word on the line, so here the preamble goes
  first, MSB first, followed by the SOF.
* **P2S input width.** The algorithm writes the P2S input as a 4-bit word
  with a leading zero, while the prose describes a 3-bit PISO. The 3-bit
  form is built.
* **Sine interpolation.** The article builds the segments with shifts and a
  ROM. Here each segment's slope is multiplied by the 7 fractional address
  bits, a 9 × 7-bit constant-table product.
* **Noise.** The article calls its noise source AWGN, but it is an LFSR. The
  noise here is therefore uniform pseudo-random bits, not Gaussian.
* **ACS numbering.** The article feeds each ACS unit the metrics of states
  k and k + 8. That is the same butterfly as here, with the states numbered
  in the opposite bit order (newest bit as LSB).
* **Demodulator rule.** The article's rule is "1 if the sample matches DDS1,
  0 if it matches DDS2", applied per sample. Here the rule compares the top
  4 bits and decides per symbol by majority.

The article's payload description is ambiguous: it mentions "12-bit" FSK
modulation and a 52-bit sequence. Here 12 bits is taken as the sample width,
and the payload length is set by `N_DATA`.
