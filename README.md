# Partial SDR platform: one modulator for four air interfaces

A software-defined radio should switch between air-interface standards without changing
its hardware. This design does that for the transmit side of four standards, using one
linear I/Q modulator. The standards are GSM, IS-136, UTRA-FDD (the 3G uplink) and EDGE.
At first sight they differ a lot: GMSK is a constant-envelope frequency modulation,
IS-136 uses π/4-DQPSK, the UTRA-FDD uplink is CDMA with complex scrambling, and EDGE
uses 8PSK. Written the right way, each one is a chain of the same steps:

    bits -> differential precoder -> NRZ level -> bit-to-symbol mapper
         -> OVSF spreader -> channel weighting + complex scrambling -> pulse-shaping FIR -> I/Q samples

A small set of parameters decides what each step does, or whether it does anything.
Loading a different parameter record (a *preset*) turns the same gates into a different
transmitter.

Around the modulator, the top level `sdr_platform` also holds the front and back ends of a
UTRA-FDD receiver:

- a 49-tap root-raised-cosine (RRC) receive filter;
- a rake receiver that despreads the data and control channels;
- a K = 9 Viterbi decoder for the rate 1/2 and rate 1/3 codes;
- the CRC check that decides whether a 20 ms speech frame is kept or discarded.

The stages between the rake and the decoder (control-bit removal, deinterleaving) are not
built. The channel simulator between transmitter and receiver is not built either. Their
places are brought out as ports.

## The parameter record

Everything the modulator does is set by one packed struct, `sdr_pkg::mod_cfg_t`.
`mod_config` holds the active record. It loads either a preset (`load_preset` with
`std_sel`) or any record you supply (`load_custom` with `cfg_in`). After every load it
pulses `restart` for one cycle. That pulse clears the burst counters, the modulation
memory, the spreading-code position, the scrambling-code position and the FIR delay line.
While `restart` is high, each stage holds its `in_ready` low, so no bit is lost across a
switch. After reset, the GSM preset is active.

| field | GSM | IS-136 | UTRA-FDD | EDGE |
|---|---|---|---|---|
| burst length (bits) | 148 | 312 | 330 | 444 |
| precoder on | 1 | 0 | 0 | 1 |
| NRZ (+1 / −1 / 0 = off) | +1 | +1 | −1 | +1 |
| modulation number | 1 (GMSK) | 2 (π/4-DQPSK) | 4 (dual QPSK) | 4 (8PSK) |
| SF I / SF Q | 1 / 1 | 1 / 1 | 8 / 256 | 1 / 1 |
| filter number | 1 (GMSK C0) | 2 (RRC 0.35) | 3 (RRC 0.22) | 1 (GMSK C0) |
| I length / Q length | 0 / 0 | 0 / 0 | 320 / 10 | 0 / 0 |

The UTRA-FDD preset also sets some values that the table above does not fix. These are
this design's own choices, typical for an uplink dedicated channel:

- OVSF code numbers 2 (I) and 0 (Q);
- channel weights β_d = 15/16 and β_c = 8/16;
- scrambling code number 1;
- scrambling enabled. No other preset scrambles.

Spreading factors are stored as log2 values, so SF = 2^k with k from 0 to 9.

## The chain, stage by stage

Every stage passes data on a valid/ready handshake and has one register stage. Each
module's opening comment gives its exact timing. The output runs at OSR = 4 samples per
symbol (or per chip), one sample per clock at most. Samples are 18-bit signed I and Q.

**Differential precoder** (`diff_precoder`). It computes β_k = b_k ⊕ b_{k−1}, with
b_{−1} = 1 at the start of every burst. The 1 stands for the dummy bits that GSM and EDGE
send before the first user bit. The burst start is found by counting bits modulo the
burst length. When the precoder is switched off, bits pass through unchanged.

**NRZ coder** (`nrz_coder`). With NRZ = +1, β = 0 gives +1 and β = 1 gives −1. With
NRZ = −1 the mapping is reversed. With NRZ = 0, the bit passes through as level 0 or 1.

**Bit-to-symbol mapper** (`symbol_mapper`). This is the stage that does most of the work.

- *GMSK, linearised (mode 1).* GMSK can be produced by a linear I/Q modulator. Laurent's
  decomposition gives the main term Σ j^k·d_k·C0(t − kT). So the mapper emits
  Z_k = j^k·d_k, with k counted from the start of the burst. The pulse-shaping FIR then
  applies the C0 pulse (filter 1). Combined with the differential precoder, this gives
  the GSM signal without the smaller Laurent terms. Those terms are left out here; an
  exact GMSK modulator would add them.
- *π/4-DQPSK (mode 2).* Each bit pair advances the phase: 00 by +π/4, 01 by +3π/4,
  11 by −3π/4 and 10 by −π/4. The phase starts at 0 in each burst.
- *QPSK (mode 3).* Gray coded: the first bit sets the sign of I and the second the sign
  of Q.
- *Mode 4 with I length = 0: 8PSK.* Three bits per symbol, Gray coded onto the eight
  phases kπ/4. There is no 3π/8 symbol rotation.
- *Mode 4 with I length > 0: dual QPSK (UTRA-FDD uplink).* The first I-length bits of a
  burst go to the I branch (DPDCH, the data channel). The next Q-length bits go to the
  Q branch (DPCCH, the control channel). The two branches carry different numbers of bits
  and are spread by different factors. So the mapper stores one burst in two branch
  buffers (`BUF_DEPTH` = 640 entries), then reads the branches out as two independent
  streams. The input is held off while the buffer is read out (single buffering). In the
  UTRA preset this is what limits the rate.

Symbols lie on a circle of radius 4096 (`AMP`) at multiples of π/8. Each branch has its
own valid/ready stream.

**OVSF spreader** (`ovsf_spreader`). Each branch is multiplied by its OVSF code
c(SF, n). Spreading factors can be set separately for I and Q, up to 512. The code is
not stored. Chip k of c(SF, n) is negative when the parity of (bit-reversed n) AND k is
odd. This is the tree rule c(2SF, 2n) = [c, c], c(2SF, 2n+1) = [c, −c]. The function
`ovsf_neg` in `sdr_pkg` implements it and is shared with the rake. With SF = 1 on both
branches, the stage simply pairs I and Q symbols into one complex value.

**Weighting and scrambling** (`weight_scrambler`, `scrambling_code_gen`). This stage runs
only when `scramble_on` is set.

1. The I chip is weighted by β_d/16 and the Q chip by β_c/16.
2. The complex chip is multiplied by the UTRA-FDD uplink long code
   S(i) = c1(i)·(1 + j·(−1)^i·c2(2⌊i/2⌋)).

The two parts of S are ±1, so the multiplication needs only sign changes and adds.
c1 and c2 come from the Gold code built on x^25+x^3+1, whose register starts as
{1, code number}, and y^25+y^3+y^2+y+1, whose register starts as all ones. c2 is c1
shifted by 16 777 232 chips. It is produced without shifting: taps 4, 7 and 18 of x are
XORed with taps 4, 6 and 17 of y. The chip index wraps, and the generator reloads,
every 38 400 chips (one 10 ms frame at 3.84 Mchip/s).

**Pulse shaping** (`pulse_shaper`). A polyphase interpolating FIR: 49 taps at
4 samples per chip, with three banks selected by the filter number.

- Bank 1 is C0(t) for BT = 0.3. It is the product of four shifted copies of the Laurent
  pulse S(t), built from the Gaussian phase pulse, and made exactly symmetric.
- Banks 2 and 3 are RRC pulses with roll-off 0.35 and 0.22.

The coefficients are Q1.14 with each peak at exactly 1.0. They sit in
`rtl/pulse_coeffs.hex`, 147 words in bank order. Each output is rounded, shifted right
by 14 and saturated to 18 bits. A chip enters while the last phase of the previous chip
leaves, so the modulator sustains one sample per clock.

## Receive side

**RRC receive filter** (`rx_rrc_filter`). 49 taps, roll-off 0.22, at the sample rate.
It is the filter matched to transmit filter 3 and reads the same coefficients (bank 3
of `rtl/pulse_coeffs.hex`). The output is rounded, shifted right by 16 and saturated.
Latency is one cycle and there is no back-pressure. Chained with transmit filter 3, it
gives a raised-cosine response. Counting samples from the start of a transmission,
chip c peaks at transmit sample 4c + 24 and at receive-filter output 4c + 48.

**Rake receiver** (`rake_receiver`). The rake is the receiver's most expensive part, and
it can be built in very different ways. This one is the plain form:

- `NFING` fingers (3 by default) pick paths at given delays of 0 to `DMAX` (63) samples.
- Each finger multiplies its sample by the conjugate of the path's complex gain (Q1.14),
  and the fingers are summed. This is maximal-ratio combining.
- The sum is descrambled with conj(S).
- The I and Q parts are despread with the branches' OVSF codes. Symbols come out on
  `dpdch` (one per SF_I chips) and `dpcch` (one per SF_Q chips).

All fingers read one shared delay line at tap DMAX − delay. So they all see the same chip
at the same instant, and a single code generator serves them. The chip is combined DMAX
samples after its zero-delay instant, then every 4 samples. `frame_start` marks the
sample that holds chip 0 of a frame on a zero-delay path.

**Path delays, channel gains and frame timing are inputs.** There is no path searcher,
channel estimator or synchroniser. The rake reads its spreading factors, code numbers
and scrambling code from the same parameter record as the modulator.

**Viterbi decoder** (`viterbi_decoder`). Constraint length 9 (256 states). It decodes at
rate 1/2 (generators 561, 753 octal) or rate 1/3 (557, 663, 711), chosen per block. These
are the UTRA-FDD polynomials. How a block runs:

1. A block is `n_bits` information bits plus 8 zero tail bits.
2. Each hard-decision code symbol runs all 256 add-compare-select steps in one clock and
   stores a 256-bit survivor row.
3. Path metrics are 8-bit and compared modulo 256.
4. After the last symbol, a traceback from state 0 runs one step per clock.
5. The bits are then sent out in order.

So the symbol input runs at one per clock, the traceback takes n_bits + 8 clocks, and
the output runs at one bit per clock. The UTRA-FDD receiver uses a decoder per coded
class; here one instance serves all classes in turn.

**CRC check** (`crc_checker`). It checks the 12-bit UTRA-FDD CRC,
D^12+D^11+D^3+D^2+D+1, over `data_len` data bits followed by 12 parity bits. One cycle
after the last parity bit, `done` pulses together with `crc_ok` and `discard`. In the
top level the check watches the decoder's output bits and starts with the decoder.

## Where this design departs from the description it follows, and what it assumes

- **Chip rate.** The description quotes the chip rate both as 3.48 and as
  3.84 Mchip/s. 3.84 Mchip/s is the UTRA-FDD rate and is used here.
- **Table values are taken as given.** EDGE is listed with the precoder on and with
  filter 1 (the GMSK pulse), not with the linearised-GMSK pulse plus 3π/8 rotation that
  the EDGE standard uses. UTRA-FDD is listed with NRZ −1. The presets reproduce these
  values, so the EDGE preset is not a standard EDGE signal.
- **Own choices, not taken from the description:**
  - bus widths (16-bit symbols, 18-bit samples);
  - OSR = 4 and the 49-tap transmit filter length;
  - Q1.14 coefficients;
  - the handshakes;
  - the single dual-QPSK buffer;
  - the π/4-DQPSK phase steps;
  - the 8PSK Gray map;
  - the OVSF code numbers, weights and scrambling code;
  - the receive-filter roll-off (0.22);
  - the rake structure and its size;
  - the Viterbi polynomials, tail bits and hard decisions;
  - the CRC polynomial;
  - the asynchronous active-low reset.
- **Only one DPDCH.** Further DPDCHs switched onto the I and Q branches are not built.

## Not built

- Channel coding and interleaving on the transmit side.
- The channel simulator.
- Path search and channel estimation for the rake.
- Pilot/TPC removal, the two deinterleavers and DTX removal.
- The GSM/EDGE receivers.
- The speech codecs.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=… failures=…`. Run them
from the directory that holds `rtl/` and `tb/`. The pulse shaper (and the testbenches
that use its table) read `rtl/pulse_coeffs.hex` by that relative path. Compile
`rtl/sdr_pkg.sv` first, and `tb/tb_ref_pkg.sv` (the reference models) before any
testbench. For example, the full end-to-end test at default parameters:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/sdr_pkg.sv tb/tb_ref_pkg.sv \
      rtl/mod_config.sv rtl/diff_precoder.sv rtl/nrz_coder.sv rtl/symbol_mapper.sv \
      rtl/ovsf_spreader.sv rtl/scrambling_code_gen.sv rtl/weight_scrambler.sv \
      rtl/pulse_shaper.sv rtl/gen_modulator.sv rtl/rx_rrc_filter.sv \
      rtl/rake_receiver.sv rtl/viterbi_decoder.sv rtl/crc_checker.sv rtl/sdr_platform.sv \
      tb/tb_sdr_platform.sv --top-module tb_sdr_platform -o sim
    ./obj_dir/sim

`tb_sdr_platform` loops the transmit output into the receiver (an ideal channel). It runs
the sequence GSM, IS-136, UTRA-FDD over 16 slots (crossing a scrambling-frame
boundary), EDGE, a custom QPSK record, GMSK with NRZ off, and UTRA-FDD twice more. Some runs
have random back-pressure. It checks:

- every transmit sample, bit-exactly, against a reference model of the whole chain;
- every receive-filter output against a convolution in the testbench;
- the sign of every rake DPDCH and DPCCH symbol against the bit sent on it;
- in a final two-path run (an echo two chips late at half amplitude, with a second
  finger on it), that combining raises the DPDCH symbol size by the expected quarter;
- two coded speech blocks with channel errors through the Viterbi decoder and CRC, plus
  one block with a corrupted CRC, which must be discarded.

It also counts each mechanism (mode switch, burst restart, each NRZ setting, each
modulation and filter, spreading, scrambling, frame wrap, output stall, input hold-off,
rake symbols, two-path combining, error correction, frame kept, frame discarded) and
fails if any of them never happens. It runs in about 20 seconds.

Each block has its own testbench in `tb/`, named `tb_<module>`. Compile it with the
block's file and the files the block instantiates: `gen_modulator` uses all the transmit
stages, and `weight_scrambler` and `rake_receiver` use `scrambling_code_gen`. Some
testbenches override parameters to stay short. For example, `tb_weight_scrambler` uses a
100-chip frame and `tb_viterbi_decoder` uses 256-bit blocks.

## Changing it

- **New standard.** Add a preset to `sdr_pkg::preset_cfg`. Any record can also be loaded
  at run time with `load_custom`.
- **New pulse.** Add a bank to `rtl/pulse_coeffs.hex`: 49 Q1.14 words, peak 16384. Then
  raise `NBANKS` and the width of `filter_num_t`.
- **Sizes.** `BUF_DEPTH` limits I length and Q length for dual QPSK. `MAX_SF_LOG2` limits
  the spreading factor. `DEC_MAX_BITS` limits the decoder block. `RAKE_FINGERS` and
  `RAKE_DMAX` size the rake.
