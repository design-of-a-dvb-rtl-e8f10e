# DVB-T/H receiver back end in SystemVerilog

This RTL covers the part of a DVB-T/DVB-H COFDM receiver that runs after the FFT. It takes
frequency-domain cells and the channel estimate for each carrier, and it turns them back into the
188-byte MPEG transport stream. In order, it does:

- zero-forcing equalization;
- TPS decoding, which gives the transmission parameters;
- symbol and bit de-interleaving;
- soft QAM demapping;
- depuncturing and Viterbi decoding;
- convolutional byte de-interleaving;
- Reed-Solomon RS(204,188) correction;
- descrambling.

A three-phase power manager decides which parts run. The main design ideas are these:

- **The cell is de-interleaved before it is demapped.** The symbol de-interleaver stores the
  equalized I/Q cell as a 24-bit word (2 × 12 bit). It does not store the six 6-bit soft values
  (36 bit) that the demapper makes from that cell. In 8K mode this saves about a third of the
  largest memory in the back end.
- **Hold instead of double buffering between the demapper and the bit de-interleaver.** The
  bit de-interleaver has a single memory of 126 × 36 bit. Once one 126-cell section is in it, the
  symbol de-interleaver and the demapper stop until the section has been read out bit by bit.
- **The Viterbi decoder adapts to the code rate.** Its decision depth is set by the code rate
  that the TPS decoder reports.
- **The outer de-interleaver uses one single-port memory.** One memory of 1122 bytes and an
  address generator hold all eleven delay lines. Each byte is a read followed by a write at the
  same address.
- **Power phases.** The phases are INIT, EQUALIZE, DECODE and SLEEP. They gate the equalizer/TPS
  group (module 2) and the demapper/decoder group (module 3).

The FFT and the time and frequency synchronisers are not part of this
RTL. Their results come in through the ports of `dvb_rx_top`. These are the cells, the channel
estimate `H`, the carrier kind and `sync_done`. Five pieces of the front half are
included. They stand beside the back end in the top, with their own ports:

- a fractional carrier-frequency-offset estimator that correlates the guard interval with the end
  of the symbol;
- an integer carrier-frequency-offset estimator that finds the guard bands in the FFT output;
- a channel estimator that interpolates the scattered pilots along frequency;
- a carrier-frequency compensator that rotates the 8-bit time-domain samples into 9-bit samples
  for the FFT;
- a scattered-pilot order detector that works on the FFT output.

## Data path and handshakes

```
cells+H -> channel_equalizer -> symbol_deinterleaver -> qam_demapper -> bit_deinterleaver
            |   (2 stages, ce)    (2 x 6048 x 24 bit)    (comb. here)    (126 x 36 bit)
            +-> tps_decoder -> params (mode, QAM, rate, ...) to all blocks below
bit_deinterleaver -> depuncturer -> viterbi_decoder -> ts_sync -> outer_deinterleaver
                                   (64 ACS, reg. exch.)  (byte/packet sync)   (1122 B)
outer_deinterleaver -> rs_decoder -> descrambler -> transport stream
                       (ping-pong 2 x 204 B)
```

- The equalizer advances only when `ce` is high. In the top, `ce` is the symbol de-interleaver's
  `in_ready`, and `cell_ready` is the same signal. So the whole chain can hold the cell source.
  Pilot and TPS cells also wait while the back end is full. This keeps TPS tracking in step with
  the data cells.
- From the symbol de-interleaver onwards the blocks use valid/ready, or plain valid where the
  consumer is always faster. Each block takes at most one item per clock.
- Decoding starts at the first symbol of a TPS frame after the power manager enters DECODE. Here
  is why. The symbol de-interleaver needs to know whether a symbol is even or odd, and the TPS
  decoder's symbol counter gives this. The depuncturer also restarts its puncturing period at
  that point.
- `ts_sync` finds the packet boundary in the Viterbi output bits. It hunts for the byte 0x47 or
  0xB8 and confirms it one packet (204 bytes) later. It loses lock after three missed sync bytes.

## Blocks

| module | what it does | notes |
|---|---|---|
| `dvb_pkg` | shared types: FFT mode, constellation, code rate, TPS fields; GF(256) helpers | |
| `channel_equalizer` | X = Y·conj(H)/\|H\|² with saturation, 2 stages | `H_SHIFT`: the estimate has unity gain at 2^9 |
| `tps_decoder` | differential BPSK per TPS carrier, majority vote, 68-symbol frame sync, BCH check, field decode | locks after sync word + length + BCH match |
| `sym_perm_gen` | H(q) permutation for 2K/4K/8K: 10/11/12-bit LFSR plus a bit map, skipping values ≥ N | one address per clock |
| `symbol_deinterleaver` | two banks; an even symbol is written in order and read at H(q), an odd symbol is written at H(q) and read in order | `MAX_CELLS=6048` |
| `qam_demapper` | soft bits for QPSK/16QAM/64QAM | 6-bit soft values, positive = bit 1 |
| `bit_deinterleaver` | six cyclic-shift bit interleavers (0, 63, 105, 42, 21, 84) and the demultiplexer, inverted | holds the input while it reads out |
| `depuncturer` | re-inserts erased bits as soft 0 for rates 1/2 … 7/8 | |
| `viterbi_decoder` | K=7, G=171/133 octal, 64 parallel ACS, modulo path metrics, register-exchange survivors | depth 36/48/60/72/96 for rates 1/2 … 7/8 |
| `ts_sync` | bit-to-byte packing with packet sync | |
| `outer_deinterleaver` | Forney de-interleaver I=12, M=17 in one memory | total delay 2244 bytes |
| `rs_decoder` | syndromes while the packet is stored; serial Berlekamp-Massey (16 clocks); error evaluator (16); Chien search with Forney values and in-place correction (204); output (188) | flags packets with more than 8 errors |
| `descrambler` | PRBS 1+x^14+x^15, restarted at each inverted sync byte, sync bytes untouched | |
| `power_manager` | phase FSM and module enables | |
| `cfo_compensator` | NCO (16-bit phase) and 13-stage pipelined CORDIC; y = x·e^(−j2πφ) | 8-bit in, 9-bit out, 16 clocks latency |
| `pre_fft_afc` | N-sample delay line (read-first RAM), guard-interval correlation Σ r[n+N]·conj(r[n]), serial CORDIC angle | one estimate per symbol, in sub-carrier spacings × 2^16 |
| `post_fft_afc` | in-band energy of 33 candidate windows (shift −16..16) accumulated in parallel while the bins stream by | no memory; stable after three equal estimates |
| `sp_order_detection` | energy of carrier classes k mod 12 = 0, 3, 6, 9 per symbol; largest class = pilot pattern | locks when three symbols step by one; unlocks after two misses |
| `dvb_rx_top` | wires it all up | |

### Soft values

The demapper expects the equalized cell scaled so that one lattice step is 2^`UNIT_SHIFT` (128).
It gives the signed distance to each bit's decision boundary:

- One lattice unit is 16 soft steps.
- The result is clipped to −32..31, so there are 64 levels.
- Positive means the bit is 1.

The bit labels follow the Gray mapping of the DVB-T standard:

- y0 is the sign of I and y1 the sign of Q, with 0 meaning a positive value.
- The further bits split the magnitude. In 16QAM, 1 marks the inner level.
- In 64QAM, the (y2,y4) labels of |I| = 7, 5, 3, 1 are 00, 01, 11, 10.

### Viterbi decoder

All 64 states are updated in one clock. Branch metrics are ±x ± y offset by 64, so they are never
negative. The path metrics are 14-bit and wrap. The best state is found by modular comparison, so
no normalisation is needed. Each state keeps a 96-bit decision register. The output bit is taken
at the depth chosen by the code rate, from the best state. The bit for trellis step n appears one
clock after step n + depth has been accepted.

### Reed-Solomon decoder

One packet fills one buffer while the other is being corrected, so input can arrive every clock.
A packet needs 16 + 16 + 204 + 188 = 424 clocks, plus one idle clock between steps. The key
equation is solved with one Berlekamp-Massey iteration per clock.

The Chien search starts at position 0 and steps by α each clock. For this shortened code its
start terms are the Λ and Ω coefficients multiplied by α^(52·k). Error values come from the
Forney formula, with Λ'(x) taken as the odd part of Λ. The decoder declares a packet
uncorrectable in two cases:

- the degree of Λ is above 8;
- the number of roots found differs from the degree of Λ.

An uncorrectable packet is passed through unchanged with `out_err` set.

### Front-half pieces

The **frequency compensator** keeps a phase φ that grows by the frequency word `freq` for every
sample. The first sample after `phase_clr` is rotated by zero. The rotation is done in three
parts:

- The two top phase bits select a rotation by a multiple of 90°.
- Thirteen shift-and-add CORDIC stages remove the remaining angle, which is below 90°.
- A constant multiply (19898/2^15) cancels the CORDIC gain.

The output is rounded and saturated to 9 bits. With 8-bit inputs this is exact to within about
1 LSB.

The **fractional CFO estimator** uses the fact that the guard interval repeats the last G
samples of the symbol, N samples later. An offset of ε sub-carrier spacings turns each such pair
by 2πε. The block keeps the last N samples in a circular memory, and it adds up
r[n+N]·conj(r[n]) over the guard interval. Then it finds the angle of the sum with 15 CORDIC
vectoring steps, one per clock. The result appears about 20 clocks after the symbol. `mode`,
`gi` and `sym_start` must come from a timing synchroniser, and that synchroniser is not part of
this RTL. Turning ε into the compensator's `freq` word (ε/N cycles per sample) is also left to
the frequency loop outside.

The **integer CFO estimator** relies on the spectrum having empty guard bands. Only K of the
N bins carry energy: 1705 of 2048 in 2K, 3409 of 4096 in 4K and 6817 of 8192 in 8K. An integer
offset slides the occupied band sideways. For every candidate shift s in −16..16 there is an
accumulator. It collects the power of the bins that the band would cover if it were shifted by
s. After the last bin, the candidate with the most energy is the estimate. All 33 accumulators
run in parallel on the streaming bins, so no spectrum memory is needed.

The **pilot-order detector** sums |Y|² over each of the four carrier classes that can hold
scattered pilots. Pilots are sent 4/3 louder than the average data cell, so the class that holds
them has the most energy. The pattern advances by one every symbol. So the block declares lock
when three consecutive symbols give indices that step by one. While locked it reports its own
prediction, and it drops lock after two symbols in a row disagree.

The **channel estimator** stores the K used carriers of a symbol and, on the fly, the channel at
each scattered pilot. Pilots sit on k mod 12 = 3·(l mod 4), where l is the pattern index from
the pilot-order detector. A pilot is sent as ±4/3, with the sign from the reference sequence
(PRBS x^11 + x^2 + 1, all ones at carrier 0). So its channel value is ±3/4 of the received
cell. After the last carrier the block reads the symbol back in carrier order, one cell per
clock, and holds its input (`in_ready` low) meanwhile. Each cell leaves with
H(k) = P_m + (P_m+1 − P_m)·d/12, where d is the distance to the pilot on the left. The 1/12 is a
multiply by 683/8192. Carriers before the first pilot or after the last one take the nearest
pilot's value. Only this frequency-direction interpolation is built. The time-direction pass,
which would fill every third carrier from four consecutive symbols, is not.

### Power management

| phase | enables | when |
|---|---|---|
| INIT (0) | module 1 only | after reset, or when `sync_done` drops |
| EQUALIZE (1) | modules 1, 2 | `sync_done` is high; the equalizer and TPS decoder run, and the decoders are held |
| DECODE (2) | modules 1, 2, 3 | `tps_ok` is high |
| SLEEP (3) | none | `suspend` is high (time slicing); it returns to INIT |

The enables are registered, so they change one clock after the phase decision. In this RTL they
act as clock-enable/hold signals. A chip would drive clock-gating cells from them.

## What this design adds to, or leaves out of, the receiver it follows

- These standard details are written from the DVB-T/H standard, not from the receiver
  description this design follows:
  - the permutation tables, puncturing patterns and bit-interleaver shifts;
  - the TPS sync words, BCH code and field positions;
  - the RS field polynomial and the PRBS.
- Word lengths other than 24 bits into the symbol memory, 36 bits into the bit memory and 6-bit
  soft values are this design's choice. For example: 12-bit I/Q, 14-bit path metrics, and
  `H_SHIFT` = 9.
- The Viterbi decoder does not have the path-merging/path-prediction memory-access reduction of
  the receiver it follows. It uses register exchange, and the decision depth follows the code
  rate.
- The DVB-H in-depth interleaver (8K permutation spread over several 2K/4K symbols) is not
  built. Only native 2K/4K/8K symbol interleaving is supported.
- Hierarchical modulation is not decoded. Only the high-priority stream is decoded, and the
  TPS fields for it are still reported.
- The DVB-H additions to TPS (cell id, time-slicing and MPE-FEC flags) are ignored.
- Most of the front end is not built: the time synchroniser, the fine timing and the
  SCO/CFO tracking loops (and so the frequency word for the compensator), the FFT and the
  time-direction half of the channel estimator. The same holds for the MPE-FEC link layer. The
  two CFO estimators, the compensator, the pilot-order detector and the channel estimator are
  built, but no FFT connects them to the back end, and the channel estimate is not yet wired
  to the equalizer.
- The Reed-Solomon key-equation solver is a plain serial Berlekamp-Massey, not a decomposed
  solver.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_channel_equalizer` | random cells and channels against a real-valued model (±5 LSB), with `ce` toggling |
| `tb_tps_decoder` | TPS frames built with sync, length, BCH parity and DBPSK; some carriers corrupted; checks lock and fields |
| `tb_symbol_deinterleaver` | H(q) is a bijection in 2K/4K/8K; even/odd symbols with random back-pressure; 2K write rate |
| `tb_qam_demapper` | every lattice point of all three constellations: label bits from the soft signs, magnitudes on the lattice |
| `tb_bit_deinterleaver` | against a model of the standard interleaver; hold and burst length of 126·v |
| `tb_depuncturer` | every puncturing pattern: kept values in place, 0 for erased ones |
| `tb_viterbi_decoder` | rates 1/2 and 3/4 with noise and sign flips; exact latency |
| `tb_outer_deinterleaver` | against a FIFO-based interleaver model, delay 2244 bytes |
| `tb_rs_decoder` | 0–8 errors corrected, 9 and 12 errors flagged, errors in the parity bytes |
| `tb_descrambler` | against a reference scrambler over 8-packet groups; the sequence starts 03 F6 08 |
| `tb_power_manager` | INIT, EQUALIZE, DECODE, loss of sync, suspend and resume, with the enables after each step |
| `tb_cfo_compensator` | random samples and frequency words against a real-valued rotation (±2 LSB); phase clear; 16-clock latency |
| `tb_pre_fft_afc` | OFDM-like symbols with guard copies under offsets up to ±0.48, all guard ratios, 2K/4K/8K: estimate within 0.01 |
| `tb_channel_estimator` | 2K and 8K symbols, all four pilot phases, through channels linear in frequency: every cell unchanged, H within 3 LSB (exact interpolation), nearest pilot outside the pilot range, input held during read-out |
| `tb_post_fft_afc` | spectra with the used band shifted by −16..16 bins in 2K/4K/8K: exact estimate; stable flag from the third symbol |
| `tb_sp_order_detection` | 2K and 8K symbols with moving pilots: lock at the third symbol, correct index, one bad symbol tolerated, relock after a phase jump |
| `tb_dvb_rx_top` | end to end at default parameters |

`tb_dvb_rx_top` contains a full transmitter model:

- scrambler, RS encoder, outer interleaver;
- a rate-2/3 convolutional encoder with puncturing;
- 16QAM bit interleaver and mapping;
- 2K symbol interleaver;
- TPS frames.

The cells go through a random flat channel with noise. Some byte errors are inserted on purpose
between the outer interleaver and the inner coder. The testbench checks the following:

- TPS lock with the sent parameters;
- every power phase;
- back-pressure stalls and bit de-interleaver holds;
- packet lock;
- RS correction, and RS failure during the start-up transient;
- the descrambler group restart;
- suspend;
- a tone at a known frequency offset comes out of the compensator as a constant;
- the pilot-order detector locks on six FFT-output symbols and reports the right pattern;
- the same tone, cut as one 2K symbol, gives the CFO estimator half a sub-carrier spacing;
- three 2K spectra shifted by 3 bins give an integer offset of 3, stable at the third.
- one 2K symbol through a flat channel gives the channel estimator's H on every carrier, and a
  second symbol offered at once is held while the first is read out.

At least 24 packets must come out error-free and equal to the sent ones. The first few packets
after lock are flagged, because the outer de-interleaver still holds data from before lock.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/dvb_pkg.sv tb/tb_dvb_rx_top.sv --top-module tb_dvb_rx_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_dvb_rx_top` with any other testbench name. The end-to-end test sends about 160 2K
symbols, which is about 250k cells. It runs in a few seconds.

## Changing it

- **Smaller memories.** For 2K-only use, set `MAX_CELLS` on `dvb_rx_top` to 1512. Keep
  `VIT_DEPTH` at 96 or more if rate 7/8 is needed.
- **Word lengths.** `IQ_W` and `SOFT_W` are in `dvb_pkg`. The demapper's scale is
  `UNIT_SHIFT`. The channel estimate scale is `H_SHIFT`.
- **Assertions.** The top asserts that the outer de-interleaver never offers a byte while the RS
  decoder's buffer is busy. With the default rates the RS decoder is always faster than its
  input.
