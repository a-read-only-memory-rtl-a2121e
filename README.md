# A number theoretic transform built from look-up tables

This RTL computes 128-point number theoretic transforms (NTTs) with no
multiplier and no adder in the butterfly. Every addition, subtraction and
multiplication is a ROM look-up followed by a register. Two ideas make that
possible:

* **Small sub-moduli.** A residue modulo a prime such as 193 needs 8 or 9
  bits, which is too wide to address a table with two operands at once. So
  each operand is first split into its residues modulo 30 and modulo 31.
  Two 5-bit sub-residues address a 1K-word table. Since 30 × 31 = 930 is
  more than twice the prime, a sum or difference of two residues is
  unambiguous in that pair. A reconstruction table brings it back.
* **Index (discrete-log) multiplication.** With a primitive root g of the
  prime, every non-zero residue x is g^i for one index i. A product becomes
  an index sum modulo m − 1, which is again done in the sub-moduli 30 and 31.
  Zero has no index; the value 31 marks it, since no legal sub-residue can
  be 31.

The transform runs over three primes at once, a residue number system:

| prime | type | field | generator α of order 128 | index base |
|---|---|---|---|---|
| 191 | 4n+3 | complex integers x + y·j, j² = −1 | 66 + 6j | 19 |
| 193 | 4n+1 | x + y·√125 | √125 | 5 |
| 449 | 4n+1 | x + y·√391 | √391 | 3 |

Integer results are rebuilt with the Chinese remainder theorem over
191·193·449 = 16 551 487, which gives a signed range of ±8 275 743.

## The processor

`ntt_rns_processor` is the top. A transform moves through it like this:

1. **Distributor** (`rns_distributor`). Each input point is a pair of
   signed 16-bit integers, reduced modulo each prime.
   * In GF(191²) the pair is re + im·j.
   * In the 4n+1 fields it is re + im·√r.
   * Either way, two blocks of real data can be carried at once, as the two
     components. Convolving with a real sequence keeps them apart, so both
     components come back as integers.
   * With `in_raw = 1` the residues are taken directly from `in_point`. This
     is how a spectrum is fed back, for example after a pointwise product.
2. **Supporting memory** (`ntt_buffer`). Two banks of 128 points, each point
   54 bits (3 primes × 2 components × 9 bits). Input goes to bank 0.
3. **Butterfly** (`rns_butterfly`). Three ROM pipelines side by side, one per
   prime. They accept one butterfly per clock and return results 7 clocks
   later.
4. **Controller** (`ntt_controller`). It runs four phases: LOAD, RUN, DRAIN
   and UNLOAD.
   * LOAD takes 128 points.
   * RUN issues 7 stages × 64 butterflies on consecutive clocks.
   * DRAIN waits 7 clocks.
   * UNLOAD delivers 128 results in natural order.
5. **Scaling.** For the inverse transform, each residue is multiplied by
   128⁻¹ mod m on the way out.
6. **Reconstruction** (`crt_reconstruct`). It turns the residues back into
   signed integers, one clock later.

Top-level timing: after `start`, the processor needs 128 clocks with
`in_valid` while `in_ready` is high. The first result appears 456 clocks
after the last input point. Then `out_valid` is high for 128 consecutive
clocks, with `out_index` running 0..127. `done` pulses with the last result.
Each result is given two ways:

* `out_point`: the residues.
* `out_re` / `out_im`: the reconstructed signed integers.

### Memory addressing (constant geometry)

Every stage uses the same access pattern:

* Butterfly p reads locations p and p + 64 of the source bank.
* It writes its sum to location 2p of the other bank, and its twiddled
  difference to 2p + 1.
* The banks swap roles after every stage.

The twiddle factor of butterfly p in stage s (stages 0..6) is α^P, where
P = p with its s lowest bits cleared. For the inverse transform it is
α^(128 − P). After the seventh stage, location k holds transform point
bitrev₇(k). Unloading therefore reads the bit-reversed addresses.

The stages are issued back to back, without emptying the pipeline in
between. Butterfly p of stage s + 1 needs the results of butterflies p/2 and
32 + p/2 of stage s. Those are written by clock 40 + p/2, at the latest
counted from the start of stage s, and they are read at clock 64 + p. So the
seven-clock lag never stalls the machine.

## The butterfly pipelines

Each butterfly computes two outputs:

* C = A + B
* D = (A − B)·α^P

Every box in the stage lists below is a ROM whose output is registered.
Sums and differences are carried in the sub-moduli. Products are carried as
index pairs.

### 4n+1 primes: `bf_4n1` (193, 449), 5 stages, 32 ROMs, 2 multiplexers

| stage | tables | what happens |
|---|---|---|
| 1 | 8 × TRSM | a, b, a′, b′ reduced mod 30 and mod 31 |
| 2 | 8 × TADD/TSUB | sums and differences in both sub-moduli |
| 3 | 2 × TFIN, 4 × TSUIN, 2 × twiddle | the sums are rebuilt mod m; each difference becomes its index mod 30/31; the twiddle table gives the index of α^P and the parity of P |
| 4 | 4 × TADD (2 enabled) | index sums; for odd P the √r part uses TADMUL, which also adds the index of r |
| 5 | 2 × TINV + 2 muxes | products back mod m; for odd P the two products swap places |

Why there is a swap: α = √r, so an even power α^P = r^(P/2) is a plain
number q. The two parts of the difference are then simply multiplied by q.
An odd power is q·√r, and

  (x + y√r)·q√r = r·q·y + q·x·√r.

The parity bit from the twiddle table selects the TADMUL table and the swap.
The control word (direction, stage, position) enters with the operands. It
waits two registers so that it reaches the twiddle tables together with its
data.

### 4n+3 prime: `bf_4n3` (191), 7 stages, 48 ROMs

Here the twiddle factor γ + βj has two non-zero parts, which takes four
index multiplications and one extra add/subtract.

| stage | tables | what happens |
|---|---|---|
| 1 | 8 × TRSM | as above |
| 2 | 8 × TADD/TSUB | as above |
| 3 | 4 × TSUIN, 4 × twiddle | indices of x, y, γ and β; the sums wait in sub-modulus form |
| 4 | 8 × TADD | indices of xγ, yγ, xβ, yβ |
| 5 | 8 × TINV | the four products, delivered straight into mod 30 / mod 31 |
| 6 | 2 × TSUB, 2 × TADD | xγ − yβ and yγ + xβ in the sub-moduli |
| 7 | 4 × TFIN | the two sums and the two products rebuilt mod 191 |

In `rns_butterfly` the 4n+1 results pass two more registers. All three
fields then deliver together, 7 clocks after the operands.

### The tables

Each table is its own module. Its contents are computed at elaboration from
the formula below, in `ntt_pkg`; there are no data files.

| module | address | data |
|---|---|---|
| `rom_trsm` | x (mod m) | x mod 30 or x mod 31 |
| `rom_tadd` | a, b (5 bits each) | (a + b + K) mod MS, or 31 if either input is 31; K = 0 gives TADD, K = index of r gives TADMUL |
| `rom_tsub` | a, b | (a − b) mod MS |
| `rom_tfin` | r₀, r₁ | CRT value v = (31·r₀ + 900·r₁) mod 930, then v mod m; in the signed variant, v ≥ 931 − m means v − 930 |
| `rom_tsuin` | r₀, r₁ | index of the signed difference, mod 30 or 31; 31 for zero |
| `rom_tinv` | r₀, r₁ (index sum) | g^(v mod (m − 1)) mod m, optionally reduced mod 30/31; 0 when either input is 31 |
| `rom_twiddle` | {inv, stage, position} (10 bits) | {parity of P, index of α^P (or of γ or β) mod MS} |

Signed and unsigned reconstruction need separate tables for 449. The sums
(0..896) and the negative differences (482..929 as seen mod 930) overlap
there.

## Clock strobes for a latch-built butterfly

`stage_strobe_gen` models the clock circuit of a butterfly built from
level-sensitive latches:

* A 4-bit counter drives a one-of-sixteen decoder.
* Decoder outputs 0, 2, 4, 6 and 8 strobe the latches of stages 5, 4, 3, 2
  and 1. Using alternate outputs leaves one idle clock between any two
  strobes, and the output stage is always latched before the stage feeding
  it.

The RTL butterflies do not need these strobes: every register is clocked on
the same edge. The processor brings the strobes out on `strobe_count` and
`stage_strobe`.

## Where this departs from the original design

This RTL follows the original ROM-oriented butterfly in these respects:

* the sub-moduli, index arithmetic and zero marker;
* the table types and counts;
* the stage structure and pipeline lags;
* the two-stage alignment of the 4n+1 units;
* the twiddle addressing.

These parts are this design's own:

* **Edge-triggered registers and one clock** in place of level-sensitive
  latches with staggered strobes. The original recommends this itself as the
  way to reach the full table rate.
* **Valid flags and an asynchronous reset** in the pipelines.
* **The 4n+3 stage contents.** Only its stage count and table count were
  given. The table split used here is the one that gives 48 ROMs.
* **The TADMUL offset.** It is the index of r: 3 for √125 mod 193 and 7 for
  √391 mod 449.
* **The whole processor around the butterfly.** This covers the
  constant-geometry memory, the controller and its load/unload protocol,
  the raw-residue input, the 16-bit sample width, where the 128⁻¹ scaling
  happens, and the CRT stage. The original describes these only as blocks.
* **Two memory banks, random access.** The original's processor streams
  through FIFO sub-memories with an ordered-input, ordered-output
  factorisation, and needs a third buffer for real-time use. Here two
  random-access banks use one fixed access pattern, and the output order is
  fixed by the unload address. Loading and unloading do not overlap a
  transform.
* **Primitive roots 19 (for 191) and 3 (for 449).** Any primitive root gives
  identical results.
* **Stage numbering.** The original's hardware test names its operating
  point as "stage 2, butterfly 4, α = 125". Under the power rule above, that
  factor (α² = 125) is reached at stage 1, position 2 or 3, so the test
  reproduces it there.
* **The pointwise product.** A convolution needs one between the forward
  and inverse transforms. It is not part of the processor; the testbenches
  compute it.

## How far it has been checked

Each module has a self-checking testbench in `tb/`. Expected values are
always worked out independently, by direct arithmetic rather than by the
table formulas.

* **Tables.** Swept exhaustively over every legal input. The index tables
  are checked by raising g to the recovered exponent.
* **Butterflies.** Thousands of random operands, stages, positions and
  directions are compared against GF(m²) arithmetic, with the latency
  checked (5 and 7 clocks).
  * The 193 unit also reproduces the original hardware measurement.
  * Inputs 30 + 65√125 and 41 + 103√125 with α² give 71 + 168√125 and
    169 + 75√125.
  * With 31 in place of 30 they give 72 + 168√125 and 101 + 75√125.
* **Processor, end to end** (`tb_ntt_rns_processor`, default size). It runs:
  * a forward transform, compared point by point with a direct O(N²)
    transform in all three fields;
  * the inverse of that spectrum, which must return the input integers;
  * a 128-point cyclic convolution through the full CRT range, including
    results no two of the primes could hold.

  It also checks the cycle counts and that every mechanism occurred at
  least once.
* **Workloads** (`tb_ntt_workloads`). It replays the original's three test
  programs:
  * ramp data through forward and inverse;
  * a pulse of height 1 convolved with a pulse of height 2;
  * two real blocks convolved at once with a constant sequence.

All testbenches pass. Timing on real hardware has not been studied. The
tables are large ROMs: 1K words for most of them.

## Running it

Everything is plain SystemVerilog with `ntt_pkg.sv` as the only package.
For example, with Verilator:

    verilator --binary --timing --assert -y rtl -Irtl rtl/ntt_pkg.sv \
        tb/tb_ntt_rns_processor.sv --top-module tb_ntt_rns_processor
    ./obj_dir/Vtb_ntt_rns_processor

Every testbench ends with the line
`TB_RESULT checks=<n> failures=<n>`. The table contents are generated when
the design is elaborated, which takes a few seconds per butterfly.

To change the field, change the parameters: the prime, its generator and
its index base (`M`, `R` or `ARE`/`AIM`, `G`). Every table follows from
them. The butterflies assume the transform length 128 and the sub-moduli
30/31. A new prime must be below 930/2 and must have an element of order
128 in GF(m²).
