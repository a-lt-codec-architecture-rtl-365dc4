# LT codec with a table-driven degree generator and counter-based permutation

An LT (Luby transform) code is a rateless erasure code. Every coded bit
(check node) is the XOR of a few message bits (variable nodes). How many bits
go into one check node, its *degree*, is drawn at random from a degree
distribution. Which bits go in is picked by a permutation. A receiver that
gets enough of the coded bits, in any order and with any of them lost, can
recover the message. It does this by *peeling*: it finds a check node that
depends on a single unknown bit, reads that bit off, removes it from every
other check node, and repeats.

This RTL implements a complete codec for blocks of **K = 128 message bits**
encoded into **N = 256 coded bits**. It has three ideas:

* **A loadable degree generator.** A table holds the probability of each
  degree. The hardware builds the running sum of that table. It then draws a
  degree by comparing an LFSR random number with the running sum. Any
  distribution can be loaded. The default is Luby's robust soliton
  distribution.
* **Permutation by shifted counters.** K counters start at different values
  (counter *i* at *i*) and all advance together. The first *d* counters name
  the rows of a degree-*d* column. No random-permutation hardware is needed.
* **A hard-decision peeling decoder.** It works on a copy of the same
  generator matrix, one column at a time, and uses no belief propagation and
  no arithmetic beyond XOR and a population count.

## Block structure

```
            seed                 rand
   start ──► lfsr_unit ───────────────► degree_gen_unit ◄── prob_*/deg_*/csum_start
                                          │ degree, adrs (one per clock)
                                          ▼
                                  gen_matrix_unit ── G (K x N bits)
                                          │               │
              sin (K) ──► lt_encoder ◄────┘               │
                              │ cout (N)                  │
                              ▼          erase (N)        ▼
                          ────────────── (channel) ──► lt_decoder ──► sout, s_recovered
```

| File | Block |
|---|---|
| `rtl/lt_pkg.sv` | sizes and the robust soliton table function |
| `rtl/lfsr_unit.sv` | LFSR random number source |
| `rtl/degree_gen_unit.sv` | degree generation unit (probability, cumulative-sum and degree memories, comparator) |
| `rtl/gen_matrix_unit.sv` | generator matrix unit (counters, selector, column register `tg`, matrix memory) |
| `rtl/lt_encoder.sv` | N parallel AND/XOR check-node units |
| `rtl/lt_decoder.sv` | peeling decoder |
| `rtl/lt_codec_top.sv` | the codec: the blocks above and their sequencing |

The channel is not part of the design. The `erase` input of the top stands
for it: bit *n* high means coded bit *n* was lost.

## Degree generation

`degree_gen_unit` holds three memories of `NDEG = 128` entries:

* `prob[j]` is the probability of entry *j*, as a 16-bit fraction of 65535.
* `csum[j]` is the running sum, `csum[j] = csum[j-1] + prob[j]`.
* `deg[j]` is the degree that entry *j* stands for.

The running sum is built serially, two clocks per entry. In the first clock
`prob[j]` goes into the temporary register `tp1` and `csum[j-1]` into `tp2`.
In the second clock the sum is written to `csum[j]`. A full rebuild takes
256 clocks. It runs by itself after reset, and again on `csum_start`.
`csum_ready` is low while it runs.

To draw a degree, a comparator finds the first index *k* with
`rand <= csum[k]`. The degree is then `deg[k]`. The random number is uniform
over 1..65535. So entry *k* is chosen with probability
`prob[k] / 65535`, which makes the quantised table the exact distribution of
the hardware. If a loaded table sums to less than 65535 and no entry
qualifies, the last entry is used.

The default table is the robust soliton distribution for K = 128, with
c = 0.1 and δ = 0.5. It is computed during elaboration by `lt_pkg::rsd_cdf`,
so no number table ships with the RTL:

```
R      = c · ln(K/δ) · √K                  (≈ 6.27, so the spike is at degree 20)
rho(1) = 1/K,  rho(i) = 1/(i(i−1))
tau(i) = R/(iK) for i < K/R,  R·ln(R/δ)/K at i = ⌊K/R⌋,  0 above
mu(i)  = (rho(i) + tau(i)) / Σ (rho + tau)
prob[j] = round(65535·F(j+1)) − round(65535·F(j)),   F(d) = Σ_{i≤d} mu(i)
```

Rounding the running sum rather than each probability makes the table end at
exactly 65535. `deg[j]` resets to `j + 1`.

To load another distribution, write `prob` and `deg` through `prob_we` and
`deg_we`, then pulse `csum_start`. A codec `start` given during the rebuild
waits for it to finish.

## Permutation by shifted counters

`gen_matrix_unit` has K counters that count modulo K. Counter *i* starts at
*i*, so the K counts are always a permutation of 0..K−1. For a column of
degree *d*, the selector sets a 1 in the column register `tg` at the count
of each of the first *d* counters. It leaves every other row at 0. Then all
counters advance by one. With K = 4 and degrees 1, 3, 2, 1, 4:

| column | degree | counters 1..4 | rows set |
|---|---|---|---|
| c0 | 1 | 0 1 2 3 | 0 |
| c1 | 3 | 1 2 3 0 | 1 2 3 |
| c2 | 2 | 2 3 0 1 | 2 3 |
| c3 | 1 | 3 0 1 2 | 3 |
| c4 | 4 | 0 1 2 3 | 0 1 2 3 |

As a result, column *n* of degree *d* covers the cyclic window of rows
*n, n+1, …, n+d−1* (mod K). The randomness of the code comes only from the
degrees. The neighbour sets are a fixed function of the column index. This
keeps the hardware tiny: there is no random-index generator and no collision
check. The price is weaker codes than with truly random neighbours. In the
end-to-end test, blocks with the robust soliton distribution decode fully
with no erasures and with about 6 % erasures. One block with 21 % erasures
recovers only 63 of the 128 bits.

Each column appears in `tg` one clock after its degree. One clock later it
is written to the matrix memory at its column address. The whole matrix
(`g_o[n]` is column *n*, bit *r* is row *r*) feeds the encoder and the
decoder. `clear` restarts the counters. The top pulses it at every block,
so a given seed always produces the same matrix. Degrees above K set every
row.

## Encoder

`lt_encoder` computes every check node at once:
`c[n] = XOR_r (s[r] AND G[r][n])`. There are N copies of a K-input AND array
followed by a reduction XOR. `start` registers all N results, and
`c_valid` pulses one clock later.

## Peeling decoder

`lt_decoder` needs the most care to follow. On `start` it copies the matrix
and the check nodes. Erased check nodes (`rx_i[n] = 0`) and their columns are
zeroed, so they take no part. It then loops:

1. **Scan (N + 3 clocks).** Column *j* is copied into `tg`. Its population
   count goes into `tsum`. `se_flag[j]` is set when that count is 1, i.e.
   when check node *j* depends on a single unknown bit. This is a three-stage
   pipeline that handles one column per clock.
2. **Pick (1 clock).** The lowest flagged column becomes `col_index`. The
   position of its single 1 becomes `row_index`. If nothing is flagged,
   decoding ends and `done` pulses.
3. **Assign (1 clock).** `s[row_index] = c[col_index]`. The value is also
   kept in `tc`, and the bit is marked recovered.
4. **Check-node update (1 clock).** Every other check node whose column has
   a 1 in `row_index` is XORed with `tc`. All N updates happen together.
5. **Matrix update (N + 2 clocks).** Each column is copied to `tg2`. Bit
   `row_index` is cleared, and the column is written back. This is one
   column per clock, pipelined.

Each recovered bit costs 2N + 8 = 520 clocks. From the start edge to the
`done` pulse a run takes **N + 5 + r·(2N + 8)** clocks for *r* recovered
bits. For a full block that is 66 821 clocks.

The set of bits a peeling decoder recovers does not depend on the order in
which single-edge check nodes are used. So the decoder's `rec_o` can be
compared directly with any software peeler. Bits that are not recovered read
0 in `s_o`. `success` is high only when all K bits are recovered.

## Top-level operation and timing

`lt_codec_top` runs one block per `start`:

| phase | clocks | what happens |
|---|---|---|
| start | 1 | LFSR loaded with `seed` (0 becomes 1), counters cleared |
| GEN | N | one degree per clock for columns 0..N−1, LFSR stepped each clock |
| flush | 3 | last degree reaches `tg`, then the matrix memory |
| encode | 1 | `cout` registered, `cout_valid` pulses |
| decode | N + 5 + r(2N+8) | decoder runs on `cout`, the matrix and `~erase` |

`cout_valid` arrives N + 4 = 260 clocks after the edge that samples `start`.
`done` pulses at the end. `sout`, `s_recovered` and `dec_success` then hold
until the next block. `gen_degree_valid`, `gen_degree` and `gen_adrs` show
every degree as it is drawn. `erase` is sampled when decoding begins, one
clock after `cout_valid`. All blocks use one clock and an asynchronous
active-low reset.

The LFSR is a 16-bit Galois register with polynomial
x¹⁶ + x¹⁴ + x¹³ + x¹¹ + 1 and period 65535.

## Where this design makes its own choices

The block partition and the inner structure of each block follow the
published architecture. These points are its own:

* **Widths and constants.** The 16-bit LFSR and its polynomial, the 16-bit
  probabilities, the 128-entry tables, and the RSD constants c = 0.1 and
  δ = 0.5.
* **Schedules.** The two-clock cumulative-sum schedule and its automatic run
  after reset, and the pipeline timing of every block and of the top-level
  sequencing.
* **Comparator.** The degree comparator checks all 128 table entries in
  parallel, so a degree is drawn every clock.
* **Decoder details.** The lowest-index choice among single-edge columns,
  the erasure input, and the stop rule.
* **Counter increment.** The counters advance by one per column, all with the
  same increment.
* **Latency.** Encoding takes about N clocks, close to the total of about
  257.5 clocks (2.575 µs at 100 MHz) quoted for this architecture. Decoding
  with the column-serial scan and matrix update described above takes about
  66 800 clocks for a full block, far more than that figure allows.
  Reaching it would take a fully parallel peeling step, which is not built
  here.
* **A message with only bit 0 set.** With this permutation its check nodes
  are not all ones: only the columns whose window contains row 0 see that
  bit. The end-to-end test encodes and decodes this message.

## Size

The matrix is held in flip-flops twice: in the GMU and in the decoder's
working copy, K·N = 32 768 bits each. The decoder also has 256-to-1 column
multiplexers of 128 bits. This makes the design large for an FPGA, and slow
to synthesise with generic tools. Both copies are plain arrays, so they can
be mapped to RAM by restructuring the scan and update loops, which already
touch one column per clock. The parallel check-node update is the exception.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. Build and run any of them with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_lt_codec_top -y rtl -y tb +libext+.sv \
  rtl/lt_pkg.sv tb/lt_tb_pkg.sv tb/tb_lt_codec_top.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_lfsr_unit` | sequence against a bit-level model, seed load, zero seed, period 65535 |
| `tb_degree_gen_unit` | rebuild time, 3000 draws against a floating-point RSD, a loaded table at its boundaries, fallback entry |
| `tb_gen_matrix_unit` | the K = 4 counter example above, `clear`, and 256 full-size columns against the window rule |
| `tb_lt_encoder` | 40 random matrices and messages at full size |
| `tb_lt_decoder` | 120 random codes (K = 32, N = 64, 0/20/50 % erasures) against a software peeler, with exact clock counts |
| `tb_lt_codec_top` | six full-size blocks at default parameters (see below) |
| `tb_rsd_distribution` | a full LFSR period through the degree generator; the degree histogram against the robust soliton distribution |

`tb_lt_codec_top` runs the whole codec at its default parameters (about one
second of simulation). It checks every drawn degree, every check node, the
encode latency, the decode clock count and the decoded result against an
independent model. It also
makes sure that each of these happens at least once: erased check nodes, a
fully decoded block, a block that decodes only in part, a new distribution
loaded, and a `start` that waits for the cumulative-sum rebuild.

`tb_rsd_distribution` relies on the LFSR visiting every value 1..65535 once
per period. So the degree histogram over one period is the stored table itself, with
no sampling noise. The test checks that every degree's count is within one
of 65535 times its floating-point robust soliton probability. For example, degree 2 is 0.4041
and the spike at degree 20 is 0.0976.

`tb/lt_tb_pkg.sv` holds the reference models the testbenches share: the LFSR
step, the robust soliton distribution in floating point, and a software
peeling decoder.

## Changing the design

* `K` and `N` are parameters of every block. The package defaults are 128
  and 256. `$clog2` widths follow them, but `DEG_W_P` must hold K.
* A different default distribution means changing `lt_pkg::rsd_prob`. Any
  distribution can also be loaded at run time.
* `NDEG_P` sets the table size. The default RSD table uses degrees
  1..`NDEG_P`, so keep it at K, or load your own table.
