# PUFKY: a key generator built on a ring-oscillator PUF

A chip that needs a secret key usually stores it in protected non-volatile
memory. This design instead *re-measures* the key every time it is needed: the
exact frequencies of a few hundred identical ring oscillators differ from chip
to chip because of manufacturing variation, and the order of those frequencies
is a device-unique, unpredictable bit string. The difficulty is that this string
is noisy (a few percent of its bits change between measurements) and not fully
random. The design therefore chains three stages:

1. a **ring-oscillator PUF** that turns frequency orderings into 53 responses of
   42 bits with about 98 % entropy per bit;
2. a **secure sketch** built from two concatenated error-correcting codes, a
   (7,1,3) repetition code and a shortened (318,174,17) BCH code, which removes
   the noise using public *helper data* (2052 bits) recorded once at enrolment;
3. an **entropy accumulator**, the SPONGENT-128 hash, which compresses the 318
   corrected bits (at least 128 bits of entropy remain after the helper data is
   made public) into a 128-bit key.

The helper data reveals nothing useful about the key and can be stored off-chip
in the clear. The RTL follows the structure of the PUFKY reference design
(reference configuration: 16 x 53 oscillators, failure rate below 1e-9, 5.62 ms
per key at 54 MHz); where that design leaves details open, the choices made here
are listed in the last sections.

## Enrolment and reconstruction

Both operations run through the same datapath (`pufky`, top level):

```
           42 bits            6 bits                318 bits          128 bits
 ropuf ──────────► rep_sketch ───────► bch LFSR + ──────────► spongent ───────► key
  (53x)             │  ▲               318-bit buffer ◄─ bch_decoder
                    ▼  │ 36 bits          │ ▲ 144 bits
                  helper_ram ◄────────────┘ │
                  (57 x 36 bit) ────────────┘          all sequenced by pufky_ctrl
```

* **Enrolment** (`enroll = 1`): for each of the 53 responses the repetition
  sketch's helper bits are written to the helper RAM, and the first bit of each
  7-bit block goes on. The 318 such bits are divided by the BCH generator
  polynomial; the 144-bit remainder is the BCH helper data. Since the syndrome of
  the reference data against its own helper data is zero, the BCH decoder is
  skipped. The 318 bits are hashed into the key.
* **Reconstruction** (`enroll = 0`): the helper data (loaded by the application
  through the `hd_*` port) is read back word by word. Each noisy block is
  corrected by a majority decision, the 318 resulting bits go through the same
  LFSR, and remainder XOR stored remainder is `e(x) mod g(x)` of the remaining
  error pattern `e`. The BCH decoder turns it into error positions, which are
  XORed into the buffered bits while the buffer is rotated once, and the
  corrected bits are hashed. If no more than 17 of the 318 bits are wrong after
  the repetition stage, the enrolled key comes out again.

## The ring-oscillator PUF (`ropuf`)

*Measurement.* The 848 oscillators are arranged as B = 16 batches of A = 53.
Each batch has one multiplexer and one counter (`ro_counter`), so one
measurement reads oscillator `sel` of all 16 batches in parallel. The counter
is clocked by the oscillator itself. The window is not counted in system clock
cycles but in T_MEAS cycles of a separate timer oscillator (87 us), so the
response does not depend on the system clock frequency. The handshake between
the clock domains is:

1. `start` latches `sel`; counters and the timer are cleared (asynchronous
   clear, all oscillators are stopped) for two clock cycles;
2. the 16 selected oscillators and the timer oscillator are enabled;
3. when the timer reaches T_MEAS it disables all of them itself, so every count
   freezes on the same oscillator edge;
4. the timer's done flag is synchronised (two flip-flops), four more cycles
   pass, and the now static counts are copied into the clock domain (`f_raw`).

*Normalisation.* Each oscillator has a position-dependent expected frequency
that would otherwise dominate the ordering. Its characterised value mu is read
from a ROM (parameter `MU`, 16 x 53 entries) and subtracted: `F' = F - mu`. The
values come from measuring a batch of devices once; the default table is zero.

*Lehmer-Gray order encoding* (`lehmer_gray_enc`). The ascending order of the 16
values F'_1..F'_16 is written as 15 Lehmer coefficients
`L_j = #{ i <= j : F'_{j+1} > F'_i }`, j = 1..15, so L_j ranges over 0..j. Each
is written in Gray code on ceil(log2(j+1)) bits (1, 2, 2, 3, 3, 3, 3, then 4
bits), 49 bits in all; L_1 is in the least significant bit. This needs only the
120 pairwise comparisons, no sorting, and when two neighbouring frequencies swap
places only one coefficient moves by one, so only one output bit flips.

*Entropy compression* (`entropy_compress`). A coefficient whose range is not a
power of two has a biased top bit. Seven such bits are folded away by XOR: the
top bit of L_j (j = 1, 3, ..., 13) is XORed into the top bit of L_{j+1}. This
gives the 42-bit response `x`, at the price of a slightly higher bit error
rate.

The oscillators are behavioural models (`ring_osc`). Their half periods are
4000 ps +/- 40 ps, set per oscillator by a hash of the parameter `DEVICE_SEED`
and the oscillator position, with +/- 40 ps of uniform jitter per half period
drawn from a small xorshift generator inside each model. At the 87 us window
this gives counts of about 10 900 and a few flipped response bits per
measurement. A ring oscillator is a deliberate combinational loop: a synthesis
tool reports each model as a loop through an inverter and a one-bit latch (the
held output while disabled). On silicon the rings are placed by hand from
inverting cells and kept out of timing analysis; the model only stands in for
them in simulation.

## The secure sketch

### Repetition code (`rep_sketch`, combinational)

A 42-bit response is six blocks of 7 bits; bit 7k is the block's first bit x_1.
Helper data: `h_i = x_1 XOR x_{i+1}` (6 bits per block, block k at
`hd[6k+5:6k]`). At reconstruction, `s = h(x') XOR h`; if more than three bits of
s are set, x'_1 is judged wrong and inverted. Only the corrected first bits
(6 per response, 318 in all) continue. At enrolment the sketch is fed its own
helper data, so s = 0.

### BCH code, GF(2^9)

The 318 bits form the polynomial c(x); the first bit produced (block 0 of
response 0) is the coefficient of x^317. The code is the binary BCH code of
length 511 and designed distance 35 over GF(2^9) with field polynomial
x^9 + x^4 + 1, shortened by 193 positions. Its generator polynomial g(x) has
degree 144: the 34 roots alpha^1..alpha^34 fall into 16 cyclotomic cosets of
size 9 (the cosets of 17 and 33 coincide). `pufky_pkg::bch_gen_poly` computes
g(x) at elaboration time as the product of (x - alpha^r) over those cosets.

`bch_syndrome_gen` is a 144-bit LFSR that computes `c(x) mod g(x)` one bit per
cycle, while the responses are being measured.

`bch_decoder` takes `s(x) = e(x) mod g(x)` and, since g(alpha^i) = 0, works
entirely from `z_i = s(alpha^i) = e(alpha^i)`:

| step | loop | cycles (T = 17, N = 318) |
|---|---|---|
| syndrome evaluation | z_i = sum_j s_j alpha^(i j), i = 1..34, j = 0..143 | 34 x 144 = 4896 |
| inversionless Berlekamp-Massey | 34 iterations: discrepancy over min(i,17)+1 terms, then update of Lambda and b (18 terms, two multipliers) | 1 + 459 + 612 |
| shortening offset | Lambda_j *= alpha^(193 j) | 17 |
| Chien search | Lambda(alpha^(193+c)) for c = 1..318, 17 multiplications each | 5406 |

A root at alpha^(193+c) marks an error at position 318-c. The error bits leave
the decoder in order of position, 317 first (`err_valid`/`err_bit`), exactly the
order in which the controller rotates its buffer, so each bit is corrected in
place. A decode takes 11 391 cycles. Errors beyond 17 are not detected.

## Entropy accumulator (`spongent`)

SPONGENT-128 (128-bit output, 136-bit state, 8-bit rate, 70 rounds). A round
XORs a 7-bit LFSR counter (start 0x7A, feedback x^7 + x^6 + 1) into the low
state bits and its bit reversal into the high bits, applies the 4-bit S-box
`E D B 0 2 1 4 F 7 A 8 5 9 C 3 6` to all 34 nibbles, and moves bit j to
`j*34 mod 135` (bit 135 stays). The message arrives one bit per cycle
(`in_valid`/`in_ready`, first bit into the block's MSB), is padded with a one and
zeros, and each 8-bit block is XORed into state bits 7..0 before a permutation.
Sixteen 8-bit blocks are then squeezed, with a permutation between them; the
first forms the key's most significant byte. One round per cycle: 4185 cycles for
the 318-bit input.

## Interface and timing of `pufky`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start`, `enroll` | in | 1 | start pulse; enroll = 1 enrols, 0 reconstructs |
| `busy`, `done` | out | 1 | busy until the one-cycle `done` |
| `key`, `key_valid` | out | 128, 1 | key; `key_valid` pulses one cycle before `done` |
| `hd_addr`, `hd_we`, `hd_wdata`, `hd_rdata` | in/out | 6, 1, 36, 36 | helper RAM port, read data one cycle after the address; do not use while busy |
| `rep_corr`, `bch_corr` | out | 9 | bits corrected by each code in the last run |

Helper RAM map: word w = 0..52 holds the repetition helper data of response w;
words 53..56 hold the BCH remainder, bits 35:0 in word 53. Export all 57 words
after enrolment; write them back before a reconstruction.

At 54 MHz one key takes about 4.92 ms: 53 x (87 us window + about 10 cycles),
then 11 391 decoder cycles, 4185 hash cycles and a few hundred cycles of
control. This is within the 5.62 ms of the reference design.

Parameters of the top: `T_MEAS` (timer cycles per window, 8700), `MU`
(normalisation ROM), `RO_JITTER_PS` and `DEVICE_SEED` (oscillator model only).
The code sizes live in `pufky_pkg`.

## How far it follows the reference design

Taken from the reference design: the architecture and block boundaries; 16 x 53
oscillators in batches sharing a counter; a window of 87 us set by an
independent oscillator; normalisation by a ROM of expected frequencies;
Lehmer coefficients with Gray coding; 49 -> 42 bit XOR compression; C_REP(7,1,3)
with combinational syndrome generation and decoding; the (318,174,17) BCH code
with an LFSR syndrome generator; the three decoding algorithms in the given
form (syndrome evaluation, inversionless Berlekamp-Massey, Chien search);
SPONGENT-128 as accumulator; 2052 bits of helper data in a RAM with an external
read/write port; a 128-bit key.

Choices of this implementation, where the reference leaves them open:

* **BCH decoder structure.** The reference runs the three algorithms as firmware
  on a small coprocessor (10-bit instructions, a five-entry address RAM with an
  address ALU, a data RAM, and a GF(2^u) multiply-accumulate ALU with one
  register). Its instruction encoding and firmware are not available, so
  `bch_decoder` is a hardwired state machine running the same loops with two
  multipliers and register arrays. It is about 4.4 times faster (11.4k instead
  of about 50k cycles) and larger than the coprocessor.
* Field polynomial x^9 + x^4 + 1, all bit orderings, the helper RAM word layout
  (36-bit words, dual port), counter width (16 bits), the clock-domain handshake
  of the measurement, and which bits the entropy compression pairs.
* The 318-bit buffer in the controller, and skipping the decoder at enrolment.
* SPONGENT-128's round details come from the published SPONGENT specification;
  no official test vector was available, so the implementation is checked only
  against an independent bit-level model written to the same description.
* The bus wrapper for an embedded processor is not included; its signals are
  the plain ports above.

Trust: every block has a self-checking testbench. The decoder is checked on
random error patterns of up to 17 errors; the full design is checked at its
default size, including reconstruction with injected errors that only the BCH
stage can repair. The security level (entropy, failure rate) depends on the
physical oscillators and cannot be judged from simulation.

## Simulating

All files are SystemVerilog-2017; simulations need Verilator 5 with `--timing`
(the oscillator models use delays). Example, the full-size end-to-end test
(about 2 minutes of simulation):

```
verilator --binary --timing -Irtl -Itb rtl/pufky_pkg.sv tb/spongent_ref_pkg.sv \
    rtl/*.sv tb/tb_pufky.sv --top-module tb_pufky -o sim
./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.

| testbench | block | what it does |
|---|---|---|
| `tb_pufky` | `pufky`, `pufky_ctrl` | enrolment, helper data export/import with injected errors, two reconstructions, default size |
| `tb_ropuf` | `ropuf` | 4 oscillators per batch, 5 us window, nonzero normalisation ROM; recomputes the encoding from the raw counts |
| `tb_ropuf_char` | `ropuf` | response statistics over several modelled devices and repeated measurements |
| `tb_rep_sketch` | `rep_sketch` | all error weights per block |
| `tb_bch_syndrome_gen` | `bch_syndrome_gen` | remainders against long division, codewords give zero |
| `tb_bch_decoder` | `bch_decoder` | random error patterns of weight 0..17, decode latency |
| `tb_spongent` | `spongent` | messages of several lengths, input stalls, against `spongent_ref_pkg` |
| `tb_helper_ram` | `helper_ram` | both ports, collisions |
| `tb_ring_osc` | `ring_osc` | frequency, jitter bound, stop when disabled |

To model a different chip, change `DEVICE_SEED`; to use measured normalisation
data, pass it as `MU` (entry `batch * 53 + index`).
