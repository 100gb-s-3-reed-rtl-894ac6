# Three-parallel RS(255,239) FEC for 100 Gb/s optical links

This is synthesizable SystemVerilog for a Reed-Solomon forward error correction
decoder that handles 16 lanes of 100G-class traffic. It processes **three code
symbols per clock** on each of 16 channels. At 300 MHz that is
16 × 24 bit × 300 MHz = 115.2 Gb/s of line data. The code is the optical-transport
RS(255,239): 8-bit symbols, 16 parity symbols, and up to t = 8 symbol errors
corrected per 255-symbol codeword.

The architecture follows C.-S. Choi and H. Lee, *Three-Parallel Reed-Solomon
based Forward Error Correction Architecture for 100Gb/s Optical Communications*.
Its main idea is simple. The syndrome and Chien/correction stages must run at
line rate, so each channel has its own copy of them, working three symbols
wide. The key equation solver (KES) is the largest block, but it only needs
about 18 clocks per codeword, while a codeword takes 85 clocks to arrive. So
**one KES is shared by four channels**. The channels are skewed in time so that
their syndrome sets arrive at the KES one after another. The 16-channel device
is therefore four identical four-channel groups. A three-parallel encoder for
the same code sits next to the decoder.

## Data format

A channel carries one codeword per 85 clocks, as triples of symbols.
`sym3_t` is `logic [2:0][7:0]`, and lane `[2]` (lane A) holds the highest-degree
symbol:

| clock of codeword | lane A `[2]` | lane B `[1]` | lane C `[0]` |
|---|---|---|---|
| 0  | r254 | r253 | r252 |
| 1  | r251 | r250 | r249 |
| …  | … | … | … |
| 84 | r2   | r1   | r0   |

r254…r16 are the message symbols m238…m0. r15…r0 are the parity symbols.
`frame_start` is high on clock 0 of every codeword. All 16 channels are framed
together.

The decoder is a pure pipeline with no back-pressure. Codewords must follow
each other without idle clocks. `in_valid` only labels the data, and it travels
with the data to `dout_valid`. Send one more frame after the last codeword to
flush it: its syndromes leave when the next `frame_start` arrives.

## Per-channel datapath

```
din ─► input buffer ─► syndrome (16 cells) ─8b serial─► shared KES ─16b─► Chien/Forney ─► output buffer ─► dout
  └──────────────────────────► FIFO (one read port per channel) ───────────────┘ (XOR)
```

### Syndrome block (`rs_syn_cell`, `rs_syndrome3p`)
Cell *i* computes S_i = R(α^i) with Horner's rule in steps of three symbols:

    acc ← A·α^{2i} + B·α^{i} + C + acc·α^{3i}

All the multipliers are by constants. On the first clock of a codeword the
feedback is replaced by 0. On that same clock, the finished syndrome of the
previous codeword moves into an output register. The 16 output registers form a
shift chain S0 → S1 → … → S15. So the next 16 clocks deliver the syndromes
serially on 8 bits, **S15 first**.

### Key equation solver (`rs_kes`)
The KES collects the 16 syndromes of one channel. It then finds the error
locator σ(x) (degree ≤ 8) and the evaluator ω(x) = S(x)σ(x) mod x^16
(degree ≤ 7).

The reference architecture uses a pipelined degree-computationless modified
Euclidean (pDCME) solver, but its internals are not available here. This design
uses the **inversionless Berlekamp–Massey** iteration instead. It takes one clock
per syndrome (16 clocks), plus one clock in which ω is formed from S and σ.
The resulting pair (σ, ω) equals the Euclidean one up to a common non-zero
factor. That factor cancels in both of the later steps: the root search and the
Forney ratio ω/σ_odd. This is the largest departure from the reference design,
both in hardware and in pipeline shape.

The KES has a fixed latency, `KES_LAT` = 82 clocks by default. This is counted
from the clock on which S15 enters to the first output beat. The result is
parked in per-channel holding registers until then. The output to each Chien
block is nine 16-bit beats {σ_j, ω_j}, j = 0…8.

### Chien search, Forney and correction (`rs_chien_forney3p`, `rs_chien_cell`, `gf_mul_pipe`, `rs_inv_rom`)
Each Chien cell holds three registers per polynomial coefficient. Every clock
they are multiplied by (α^K)^3, so each clock evaluates the polynomials at three
consecutive points α^l. Evaluating at α^l tests position 255 − l. Starting at
α^1, α^2, α^3 therefore tests r254, r253 and r252 on the first clock, the same
order in which the data arrives.

σ is split into an even part and an odd part. The odd part is evaluated as
x·(σ1 + σ3x² + …), and that product is also x·σ′(x), the Forney denominator.
So, for each lane:

- σ(α^l) = even + odd. A zero here means position 255 − l is in error.
- The error value is Y = ω(α^l) · inv(odd), where inv is a 256-entry inverse ROM.
  In GF(2^8) the minus sign of the textbook formula vanishes.

The multipliers are 2-stage pipelines. The register counts on the paths
(3 on even, 1 on odd, 1 after the ROM, 4 on ω, 3 on the zero flag) line up all
the paths. The received symbol from the FIFO is XORed with the gated error value
and registered. The corrected triple leaves 8 clocks after the block's `load`
strobe. `err_loc` flags the lanes that were corrected.

## Sharing the KES: the channel schedule

`rs_fec_ctrl` is the set of three controllers. It is a free-running counter,
0…84, that `frame_start` resets. The input buffer (`rs_stagger_buf`) delays
channel *k* by *k*·18 clocks. Relative to each codeword's `frame_start`, the
events for channel *k* happen at these clocks, modulo 85:

| event | clock (channel k) | k = 0, 1, 2, 3 |
|---|---|---|
| syndrome block starts the codeword (controller #1) | 18k | 0, 18, 36, 54 |
| S15 leaves the syndrome block and enters the KES (controller #2) | 86 + 18k | 1, 19, 37, 55 |
| KES busy: 16 collect + 1 load + 16 iterate + 1 ω | … | 34 of every 85 clocks, overlapped |
| first σ/ω beat to the Chien block | 86 + 82 + 18k | |
| Chien `load` (controller #3) | 177 + 18k | 7, 25, 43, 61 |
| corrected triple leaves the Chien block | 185 + 18k | |

The KES input slots are 18 clocks apart. Each slot carries 16 syndromes, so the
four channels use 72 of the 85 clocks. The engine finishes each codeword before
the next channel's syndromes are complete.

The output buffer delays channel *k* by (3 − k)·18 clocks, so all channels leave
together. The FIFO is one memory of 256 words × (4 × 24 + 2) bits per group.
It has one read port per channel, at delay 184 + 18k, and delivers each received
triple to its Chien block on the clock where its error value is ready.

**Latency.** The decoder latency is 85 + 1 + 82 + 9 + 1 + 7 + 3·18 =
**239 clocks** from input triple to corrected triple, for every channel.
This is checked by the testbenches. The reference design quotes 242 clocks. The
difference comes from this design's own choice of pipeline and skew, which the
reference does not spell out.

## Encoder (`rs_enc3p`)

The encoder computes p(x) = x^16·m(x) mod g(x), three message symbols per
clock, over 80 clocks. The 239 message symbols are padded with one zero symbol
in front, giving [0, m238, m237], [m236, m235, m234], …, [m2, m1, m0].

Each clock the 16-symbol remainder P advances by three positions:

    P′ = (P mod x^13)·x^3 + (M2+P15)·g2(x) + (M1+P14)·g1(x) + (M0+P13)·g0(x),
    gK(x) = x^(16+K) mod g(x)

The gK coefficients are computed during elaboration, from
g(x) = ∏_{i=0}^{15}(x − α^i). Every product is a constant multiplier.

In the reference design, the zero pad comes from a register on the M2 input
port. Here, the M2 lane of the first triple (`in_first`) is forced to zero.

The parity comes out in two forms:
- all 16 symbols in parallel (`parity_valid`), one clock after the 80th triple;
- as a three-lane stream over the following six clocks, p15 first, ending with
  (p0, 0, 0).

## Field and code

- GF(2^8) with field polynomial x^8+x^4+x^3+x^2+1 (0x11D) and α = 0x02. This is
  the polynomial of the ITU-T G.709 RS(255,239) code. The reference text does not
  state it.
- g(x) = (x − α^0)(x − α^1)…(x − α^15). The syndromes are S_i = R(α^i),
  i = 0…15.
- `rs_gf_pkg` holds the types and constants. It also holds the functions that
  generate the constants during elaboration: alpha powers, the inverse table and
  x^n mod g(x).

## Files

| file | role |
|---|---|
| `rtl/rs_gf_pkg.sv` | types, code constants, GF(2^8) functions |
| `rtl/rs_fec_100g.sv` | **top**: 4 groups (16 channels) + encoder |
| `rtl/rs_fec_4ch.sv` | one four-channel group |
| `rtl/rs_fec_ctrl.sv` | controllers #1–#3 (schedule counter) |
| `rtl/rs_stagger_buf.sv` | input/output staircase buffers |
| `rtl/rs_fifo.sv` | received-data FIFO with per-channel read ports |
| `rtl/rs_syndrome3p.sv`, `rtl/rs_syn_cell.sv` | syndrome block and cell |
| `rtl/rs_kes.sv` | shared key equation solver |
| `rtl/rs_chien_forney3p.sv`, `rtl/rs_chien_cell.sv` | Chien/Forney/correction and its cell |
| `rtl/gf_mul_pipe.sv` | 2-stage GF multiplier |
| `rtl/rs_inv_rom.sv` | 256 × 8 inverse ROM |
| `rtl/rs_enc3p.sv` | three-parallel encoder |
| `tb/rs_tb_pkg.sv` | reference model: log/antilog GF arithmetic, encoder, syndromes, error injection |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters of the top: `NGRP` = 4 groups, `STEP` = 18 clocks of skew per channel,
and `KES_LAT` = 82. The controller asserts that 4·`STEP` ≤ 85 and `STEP` ≥ 18.
The KES asserts that 40 ≤ `KES_LAT` < 128.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To run
the full 16-channel test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_rs_fec_100g rtl/rs_gf_pkg.sv tb/rs_tb_pkg.sv tb/tb_rs_fec_100g.sv
./obj_dir/Vtb_rs_fec_100g
```

`tb_rs_fec_100g` runs the top at its default parameters. The design's own
encoder encodes six messages. Then 96 codewords with 0 to 8 random symbol errors
each stream through all 16 channels. The testbench checks:
- every output symbol, the framing, `err_loc` and the 239-clock latency;
- that each shared KES served each of its four channels;
- that words with no errors and words with exactly t = 8 errors both occurred.

`tb_rs_fec_4ch` does the same for one group, with 48 codewords. The
unit testbenches compare each block with the reference model in `tb/rs_tb_pkg.sv`:
- encoder parity, syndromes, KES roots and error values (via Chien/Forney in the
  testbench), Chien cell sweeps, multiplier products and inverse ROM contents;
- FIFO and buffer delays, and the controller strobe schedule.

`tb_rs_gf_pkg` checks the package functions themselves: every product, every
inverse, the powers of alpha and the x^n mod g(x) remainders.

The reference model computes GF products with log/antilog tables. The RTL
multiplies by shift-and-add.

## What to trust, and where this design departs

Verified in simulation:
- functional decoding of all error counts up to t = 8;
- agreement of the encoder with a reference division;
- the complete timing schedule.

Not verified:
- operation at 300 MHz, gate counts and power: these belong to the reference
  implementation's standard-cell flow;
- behaviour beyond t errors. There is no decoding-failure flag. A word with more
  than 8 errors is "corrected" wherever σ happens to have roots.

Departures from the reference architecture:
- KES algorithm: Berlekamp–Massey instead of pDCME (see above). Its hardware
  cost differs from the reference.
- Latency is 239 clocks instead of 242.
- Syndromes leave the syndrome block S15 first, as the shift-chain direction
  implies.
- Chien cells pre-multiply by α^K when loading, so that the first clock
  evaluates α^1…α^3.
- The single multiplier for x·σ′(x) is shared between σ(α^l) and the Forney
  denominator.
- Each group has its own copy of the controllers. The reference shows one set
  shared by all four groups.
- The FIFO organisation, the 18-clock skew step, the 16-bit beat format of the
  KES output, reset values and the encoder's parity output format are this
  design's choices.
