# Turbo Hadamard encoder/decoder system in SystemVerilog

Turbo Hadamard codes (THC) are low-rate channel codes that work within about a
decibel of the ultimate Shannon limit (Eb/N0 = -1.59 dB). This RTL holds a complete
THC link: a pseudo-random message source, the encoder, a transmitter, a
bit-accurate model of a BPSK/AWGN channel with quantised soft outputs, the
receiver buffers and the iterative decoder. The main configuration is
r = 7, K = 585, M = 5. Each code word carries 4095 message bits in 358020 code
bits, a rate of 0.0114. The decoder runs M sub-decoders side by side on M
different code words, so its throughput does not depend on M. It needs about
2·I·M·K clock cycles per set of M code words, which at 100 MHz is about
3 Gbit/s of code bits.

## The code

**Hadamard code word.** An order-r Hadamard code word is a column of ±H, where H
is the 2^r × 2^r Sylvester Hadamard matrix. This design uses the systematic
form. The r information bits `d` sit at positions 2^b and a sign bit `q` sits at
position 0. Every other position i carries `q ^ <i, d ^ q>`, the GF(2) inner
product of the index bits (`hadamard_enc`).

**Component code.** The r bits of each block go through a single parity check.
Its result drives a two-state recursive convolutional code 1/(1+D), so
`q_k = XOR(d_k) ^ q_{k-1}`. The Hadamard encoder then turns (d_k, q_k) into a
2^r-bit word (`conv_hadamard_enc`). A component code word is K such blocks
linked by the convolutional state.

**Turbo code.** M component codes encode the same 4095 bits, each in a
different order (interleaver). The information bits are sent once. For each
component, the 2^r − r other positions are sent (q and the 120 parity bits).
One row of the transmitted set is therefore `r + M(2^r − r)` = 612 bits.

**FIWS interleavers.** The bits of a block are r columns ("windows") of depth K.
An interleaver moves a bit only to another row of its own window. The r bits a
decoder needs in one cycle therefore always come from r different RAMs, and
there are no access conflicts. Component 0 uses natural order. Component m
permutes window w by `(A·k + B) mod K`, where A is prime to K
(`thc_pkg::perm`, `fiws_addr`). These affine maps stand in for random
patterns held in ROMs; they take no storage and can be generated at any K.

## Decoding a component code (`thc_subdecoder`)

This is the hardest part of the design. The decoder's input for each block k
is 2^r LLRs:

- r a priori LLRs at positions 2^b. Each is the APP LLR from the previous
  sub-decoder minus this sub-decoder's own extrinsic LLR from the previous
  iteration.
- 2^r − r channel LLRs at the other positions.

The pipeline has three parts:

1. **FHT** (`fht`, r stages, one bit of growth per stage). It gives, for all 2^r
   code words at once, the correlation `y` of the inputs with the word. `y/2` is
   the log-probability of that word, up to a constant.
2. **BCJR** (`thc_bcjr`). It runs over the two-state trellis. Half the 2^r words
   belong to each trellis branch. The branch metric is the largest `y` of the
   branch (max-log). The forward recursion runs while blocks arrive and stores
   the metrics. The backward recursion then runs from block K−1 down to 0. For
   every block it outputs, per code word, the log-probability of the word with
   α and β added. The two outputs correspond to the two ways the word's sign
   can combine with the trellis states.
3. **DFHT** (`dfht`, also called APP-FHT). It has the FHT's butterfly
   structure, but works on log-probabilities. Each butterfly combines pairs
   with max* (the Jacobian logarithm max(a,b) + ln(1+e^−|a−b|), from a table
   computed at elaboration). After r stages, each position holds the
   log-probability of the word sets that have a 0 there and a 1 there. Their
   difference is the APP LLR of the bit.

The extrinsic LLR (APP − a priori) is stored per code word for the next
iteration. The sub-decoder's latency is 2R + K + 2 cycles from the first input
block to the first output block. The backward recursion produces its first
output in the cycle right after the last forward step, with no idle cycle
between the two recursions.

### Number formats

| quantity | format |
|---|---|
| channel LLR | N_CH = 6 bits, step 1/64, levels −31..31 (clipped at ±0.5) |
| FHT input (a priori and APP LLRs) | N_FHT = 10 bits, step 1/64 |
| FHT output | N_FHT + r bits |
| BCJR α, β | N_BCJR = 7 magnitude bits; log domain, step 2^−LOG_FRAC nat |
| DFHT | N_DFHT = 10 magnitude bits + sign, same log step |

The log domain is normalised every step so the largest value is 0. Values
therefore only need a floor. An FHT output in 1/64 LLR units becomes the log
domain by a rounding shift, since both steps are powers of two.
LOG_FRAC = 5 (1/32 nat) is this design's choice. The Jacobian table has
160 entries.

## The decoder ring (`thc_decoder`)

Sub-decoder m always decodes component m. The code words rotate: in stage t,
sub-decoder m works on code word (m − t) mod M. In one stage every sub-decoder
does the following:

- **Forward phase (K cycles).** It reads its K blocks. In stage 0 these are
  the channel LLRs of the information bits. In later stages they come from the
  FIWS interleaver RAM in front of it. The parity LLRs come from the receive
  buffer bank of the code word it is working on.
- **Backward phase.** It writes its APP LLRs into the RAM of the next
  sub-decoder. The write de-interleaves with the writer's pattern and the read
  interleaves with the reader's pattern, so every RAM always holds natural
  order.

A stage takes 2K + 2R + 4 cycles. After I·M stages (I iterations), the RAM in
front of sub-decoder m holds the final APP LLRs of code word m. A K-cycle
output phase then reads out the signs as decisions for all M code words side
by side. At full size, one set of five code words takes 59888 cycles.

## Around the decoder

- **`lfsr_prng`.** A 102-stage LFSR with feedback 1 + x^35 + x^36 + x^101 + x^102,
  unrolled to give several bits per clock. It is the message source, and one
  copy per lane is the noise source of the channel.
- **`thc_encoder`.** For each code word it has a K-cycle generate phase and a
  K-cycle encode phase:
  - Generate: r message bits per cycle go to the transmit buffer and into r
    window memories.
  - Encode: all M component encoders run in parallel, each reading through its
    own pattern.
- **`tx_buffer`.** Two sets of RAMs, each M·K rows: information rows r bits
  wide and parity rows M(2^r − r) bits wide. The encoder fills one set while
  the transmitter empties the other. Full flags arbitrate.
- **`thc_transmitter`.** Sends each 612-bit row as W_T-bit words. With the
  default W_T = 18, that is 34 words per row, one per cycle.
- **`awgn_channel`.** Sends 0 as +1 and 1 as −1, with σ² = 1/(2·rc·Eb/N0) and
  LLR = 2x/σ². Each lane draws a 16-bit uniform integer from its LFSR. A table
  holds the cumulative probability of every quantisation boundary, computed at
  elaboration from the Gaussian distribution. The table maps the integer to
  one of the 63 levels, and the level is negated for a transmitted 1. Its
  output histogram matches the exact one to within sampling noise (see
  `tb_awgn_channel`).
- **`rx_buffer`.** Collects rows into two sets. Each set has one bank per code
  word, with the information LLRs in r separately addressed window RAMs and the
  parity LLRs in one row. When a set is full it hands the set to the decoder
  (`dec_start`). `overflow` flags a row arriving for a set the decoder still
  holds.
- **`thc_system`.** The top. It wires everything together on a single clock.

## Error-rate performance

This decoder was run through the full system with the defaults (one set of
five code words, 20475 message bits, I = 10):

| Eb/N0 | raw channel sign errors | decoded bit errors |
|---|---|---|
| −0.45 dB | 44 % | 3580 (17.5 %) |
| −0.2 dB | — | 0 |
| 0 dB | — | 0 |
| 1 dB | — | 0 |

The shorter configurations at the same −0.45 dB do better:

- M = 3 (code length 216450, `tb_thc_system_m3`): 24 decoded errors out of
  12285 bits, against 42 % raw errors.
- M = 4 (length 287235, `tb_thc_system_m4`): 77 errors out of 16380 bits.

Codes with fewer components start their waterfall earlier, as expected for
this code family.

So for M = 5 the waterfall of this fixed-point decoder lies between −0.45 and −0.2 dB.
That is probably somewhat later than the best fixed-point decoders of this
code family reach. The likely causes are the max-log branch metric and the
coarse 1/32-nat log step; both are easy to change (`LOG_FRAC`, `thc_bcjr`). The channel model's default, EBN0_DB = −0.45 dB, is
therefore a point on the slope. The full-size testbench checks only that
decoding removes more than half of the channel errors there. One set is far
too small a sample to measure error floors.

## Where this design makes its own choices

- The interleaver patterns are affine maps, not random ROM contents.
- One clock drives everything. The transmitter (18 bits per cycle, 99450
  cycles per set) is slower than the decoder (59888 cycles per set), so the
  decoder always keeps up.
- W_T = 18, LOG_FRAC = 5, the 16-bit channel random integers, the LFSR seeds,
  and all handshakes (full flags, `dec_start`/`dec_busy`) are choices of this
  design.
- Writes into the interleaver RAMs are de-interleaved, so the RAMs hold natural
  order.
- The final output phase that reads out the decisions is an addition of this
  design.
- Reset is asynchronous and active low. It clears control state, not RAMs.
- The concatenated zigzag Hadamard (CZHC) system is not included, nor is the
  transmission of punctured codes. Only the code lengths 216450 (M = 3) and
  287235 (M = 4) are reachable by changing M. W_T must divide the row length:
  for example 10 or 37 for M = 3, and 1 or 491 for M = 4 (491 is prime).

## Simulating

Each file in `rtl/` holds one module, and `thc_pkg.sv` must come first. Every
testbench in `tb/` prints `TB_RESULT checks=N failures=F`. For example:

```
verilator --binary --timing --assert rtl/thc_pkg.sv $(ls rtl/*.sv | grep -v thc_pkg) \
    tb/tb_thc_system.sv --top-module tb_thc_system -Mdir obj -o sim && obj/sim
```

| testbench | what it runs |
|---|---|
| `tb_thc_system` | end to end at r=3, K=16, M=3, I=3: three sets; checks every transmitted row against a model of the code, every decision, decode time, and that buffer swaps, encoder stalls, all stages and channel errors occur |
| `tb_thc_system_full` | end to end with every default (one set of 5 × 358020 bits), about 1 min to build and 1.5 min to run |
| `tb_thc_system_m3`, `tb_thc_system_m4` | end to end at the 216450 and 287235 lengths (M = 3 with W_T = 10; M = 4 with W_T = 491, one row per cycle) |
| `tb_thc_decoder` | decoder alone with clean, noisy and erased-information sets |
| `tb_thc_subdecoder` | one sub-decoder over four passes, including exact extrinsic bookkeeping |
| `tb_thc_bcjr`, `tb_fht`, `tb_dfht` | against exact behavioural models |
| `tb_awgn_channel` | 360000 samples against numerically integrated probabilities |
| others | one per block: LFSR sequence, encoders, buffers, transmitter, interleaver |

To change the code, override R, K, M and I on `thc_system`. W_T must divide
r + M(2^r − r), and K must be at least 2.
