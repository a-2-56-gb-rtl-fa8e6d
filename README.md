# Decision-confined soft-decision RS(255,239) decoder

A Reed-Solomon RS(255,239) code over GF(2^8) corrects up to t = 8 wrong
symbols per 255-symbol codeword. A hard-decision decoder ignores how sure the
receiver was about each bit. A soft decoder uses that information: it flips some
of the least reliable bits and decodes again, and can then correct some words
with more than 8 symbol errors.

The classic way to do this is the Chase algorithm. It decodes every flip pattern
of the η least reliable bits and then picks the candidate codeword closest to
the received signal. That needs 2^η complete decoders' worth of work, storage
for every candidate codeword, and a distance calculation at the end.

This decoder works on a simpler rule, called *decision confinement*. The flip
patterns are tried one after another. The first pattern whose error-locator
polynomial Λ(x) has degree **less than t** is taken as the answer, and no other
candidate is ever completed. A received word with more than t errors almost
always gives a locator of degree exactly t, so degree < t is a good sign that
the candidate can be decoded. If no pattern meets the rule, the decoder falls
back to the ordinary hard decision. Because of this fallback, it does not add an
error floor at high signal-to-noise ratio.

The design has the following characteristics:

* η = 5 least reliable bits (LRPs), so there are 32 candidates: the hard word
  plus 31 flip patterns.
* There is one syndrome calculator, one key-equation solver, one Chien search
  and one error-value evaluator. Each is built once; none is duplicated per
  candidate.
* The key-equation solver is an *iteration-reduced* RiBM. It does two
  Berlekamp-Massey steps per clock, so one Λ(x) takes 8 cycles instead of 16.
  This is what lets all 32 candidates fit in one pipeline stage.
* There is a 3-stage pipeline with a fixed stage length of 259 cycles. The
  decoder takes one 8-bit symbol per clock. At 320 MHz this is 2.56 Gb/s on the
  line, or 2.52 Gb/s of codeword symbols, because a new codeword can start
  only every 259 cycles.

## Interface and data format

`rs_soft_decoder` (top, `rtl/rs_soft_decoder.sv`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_sof` | in | 1 | symbol valid; first symbol of a codeword |
| `in_sym` | in | 8 | hard-decision symbol |
| `in_rel` | in | 8 × `REL_W` | reliability of each bit, `in_rel[b]` for bit b; smaller means less reliable |
| `out_valid`, `out_sof` | out | 1 | corrected symbol valid; first symbol of a codeword |
| `out_sym` | out | 8 | corrected symbol |
| `out_status` | out | `dec_status_t` | `fail`, `flipped`, `cand[4:0]`, `nerr[3:0]`, valid with `out_sof` |

The interface has these rules:

* A codeword is 255 symbols on consecutive cycles. The first symbol is the
  coefficient of x^254.
* Codewords may start every 259 cycles or later.
* The first corrected symbol appears **778 = 3·259 + 1** cycles after the first
  input symbol. The corrected symbols also come on 255 consecutive cycles.

The code has these properties:

* The field polynomial is x^8+x^4+x^3+x^2+1 (0x11D), the one used by ITU-T
  G.975.
* The generator polynomial has roots α^1 … α^16.
* Bit b of a symbol is the coefficient of α^b. Flipping bit b of the symbol at
  position l therefore adds α^b·x^l to the received polynomial.

`out_status` reports the following:

* `fail`: the Chien search found a root count different from deg Λ, or more
  than 8 roots. The received word is then passed through unchanged.
* `flipped`: a flip pattern, not the hard word, was accepted.
* `cand`: the flip pattern that was applied, one bit per LRP. LRP 0 is the
  least reliable.
* `nerr`: the number of symbol errors corrected on top of the flips.

Everything shared lives in the package `rtl/rs_pkg.sv`:

* the constants `N K T ETA PERIOD REL_W`
* the GF(2^8) multiply and power functions
* the LRP record (`lrp_t`: reliability, position, bit index)
* the status record

## Pipeline and schedule

```
 in ──► stage 1 (259) ──► stage 2 (259) ──────────► stage 3 (259) ──────► read-back + XOR ──► out
        syndromes S1..S16   Gray-code candidate loop   Chien search (128)
        5 LRPs               syndrome updater          Bjorck-Pereyra (≤92)
        write memory bank    IR-RiBM solver, deg<t?
```

There is no flow control inside the pipeline. The top module keeps three
counters. When a codeword's first symbol arrives, stage 1 starts. Exactly 259
cycles later stage 2 starts for that word, and 259 cycles after that, stage 3.
The stored word is read back during the last cycle of stage 3 and the cycles
after it. Each stage hands its results to the next in registers that it holds
until its own next start. So three codewords can be in flight at once.

The codeword memory (`rs_cw_mem`) has three banks of 256 bytes. The bank being
written rotates with every codeword. A word is read back three stage periods
after it was written, by which time the writer has moved on to the other two
banks. The memory is a plain register array with a registered read port.

Assertions in the top check the schedule itself. Codewords must not start less
than 259 cycles apart, and each stage's results must have arrived before the
next stage starts.

## Stage 1: syndromes and least reliable bits

**Syndromes** (`rs_syndrome_calc`). There are sixteen Horner cells,
S_i ← S_i·α^i + r, one symbol per cycle. Each cell multiplies by a constant.
The result is valid the cycle after the last symbol.

**Reliability evaluator** (`rs_rel_eval`). It keeps the 5 least reliable of
the 255·8 = 2040 bits of a codeword. Each cycle it has to merge 8 new bits into
a running list of 5. Doing that in one cycle would mean a 13-input selection, so
it is a small pipelined merge-sort tree instead:

```
 8 bits ─► 4× sort-2 ─► 2× merge 2+2→4 ─► reg ─► merge 4+4 keep 5 ─► reg ─► merge 5+5 with running list keep 5
```

Every merge is built from rank comparisons. Each entry counts how many entries
of the other list must come before it, and that count gives its output slot.
When two reliabilities are equal, the bit that arrived earlier wins, and within
a symbol the lower bit index wins. The list is restarted on `in_sof`. The final
5 LRPs are valid 3 cycles after the last symbol, well inside the 259-cycle
stage. The stage is 259 cycles long rather than 255 to leave room for this
pipeline delay.

## Stage 2: the candidate loop

This stage (`rs_dc_ctrl`) decides which candidate is decoded. It contains the
syndrome updater and the key-equation solver.

### Gray-code order

Candidate i (i = 1 … 31) flips the LRP set given by the Gray code
γ_i = i xor (i >> 1). Neighbouring Gray codes differ in exactly one bit,
κ = the number of trailing zeros of i. So candidate i differs from candidate
i−1 by a single bit flip, and its syndromes are

  S_j^[i] = S_j^[i−1] + e'_κ · (α^{l'_κ})^j,   j = 1 … 16,

where l'_κ is the symbol position of LRP κ and e'_κ = α^b is its bit.

### Syndrome updater

`rs_syn_updater` applies one flip to the syndromes in 8 cycles. Its parts
are:

* LUT1, an 8-entry table from bit index to e'.
* LUT2, a 256-entry antilog ROM from position to α^l.
* Four multipliers and one squarer.

It keeps β = α^l and β² and handles two syndromes per cycle.

### Acceptance rule and timing

The solver needs 8 cycles per candidate, and the updater produces the next
candidate's syndromes during those 8 cycles. The loop stops at the first
candidate with deg Λ < 8. It keeps that candidate's Λ, its degree, its first 8
syndromes (needed by the error evaluator) and its flip pattern.

**The hard candidate is solved first, not last.** The plain algorithm tries the
hard word only after all 31 flip patterns have failed. That would need
8 + 31·8 + 8 = 264 cycles, which does not fit in 259. Here the hard word's Λ is
computed in the first 8 cycles, while the updater builds the first flipped
syndromes, and the result is kept.

* If a flipped candidate is accepted, it is used.
* If none is, the stored hard result is used.

A word with fewer than 8 errors would in any case be accepted by the hard
candidate, since all its syndromes are the same as the hard ones.

* **Selection:** the chosen result is the same as with hard-last ordering.
* **Cost:** the solver always runs at least twice per codeword. The hard-last
  order needs about 1.07 runs at high SNR. In fixed-function hardware this
  changes only switching activity, not throughput.
* **Cycle budget:** at most 1 + 32·8 = 257 cycles are needed.
* **Degree above t:** if the last candidate gives a degree above t, the loop
  also falls back to the hard result.

## The iteration-reduced key-equation solver

This is the most involved part of the design (`rs_kes_irribm`, built from
`rs_ir_pe`).

### What it computes

Reformulated inversionless Berlekamp-Massey (RiBM) finds Λ(x) from
S_1 … S_16 in 2t = 16 steps. Odd steps have a discrepancy that must be
computed. Even steps have one that is already known to follow from the
previous step. The solver merges each odd/even pair into a single
clock-cycle iteration, so it needs t = 8 iterations. The iterations are
numbered τ = 1 … 8.

### Array

There are 2t+1 = 17 processing elements.

* At the start, PE_i (i = 0 … 15) holds S_{i+1} in both its δ and θ
  registers. PE_16 holds 1, which is Λ_0.
* Every iteration each PE computes

  δ_i ← g0·δ_{i+2} + g1·δ_{i+1} + g2·θ_{i+1} + g3·θ_i

  so the array shifts down by two positions.
* θ_i either keeps its value or loads δ_{i+1} or δ_{i+2}.
* g1 and g3 are never both non-zero, so each PE has only three multipliers.
* After 8 iterations PE_0 … PE_8 hold Λ_0 … Λ_8.

### The five cases

The controller looks at δ_0 (the odd-step discrepancy), δ_1 (the even-step
discrepancy if the odd step does nothing) and the length register L:

| case | condition | g0 | g1 | g2 | g3 | θ | new L |
|---|---|---|---|---|---|---|---|
| 1 | δ0 = 0, δ1 = 0 | c | 0 | 0 | 0 | keep | L |
| 2 | δ0 = 0, δ1 ≠ 0, L > τ−1 | c | 0 | 0 | δ1 | keep | L |
| 3 | δ0 = 0, δ1 ≠ 0, L ≤ τ−1 | c | 0 | 0 | δ1 | ← δ_{i+2} | 2τ−L |
| 4 | δ0 ≠ 0, L ≤ τ−1 | c·δ0 | β | δ0² | 0 | ← δ_{i+1} | 2τ−1−L |
| 5 | δ0 ≠ 0, L > τ−1 | c² | 0 | c·δ0 | β | keep | L |

Here c is the running scale factor of the inversionless method, and α (the
odd-step coefficient) is updated along with it. β is the even-step discrepancy
that follows a non-zero odd step.

### β look-ahead

Computed directly, β would need the *new* δ_0 and δ_1. That puts two
multiply-add levels after the array update, on one critical path. Instead, β
for the next iteration is computed in parallel with the array update. It is
taken from δ_1 … δ_3 and θ_0 … θ_2 of the current values, using the same g's.
The longest path is then two multipliers and two adders.

### Masking at the boundary

The part of the array that holds Λ, and the part that holds the scaled
auxiliary polynomial B (inside θ), must not pick up entries that belong to the
discrepancy products below them. The general description zeroes two θ entries
at 2t − 2τ. In this design the boundary is tracked explicitly:

* `bpos = 2t − 2τ` is where Λ_0 lands in this iteration.
* `qpos` is the PE that holds B_0. It starts at 2t. Case 3 moves it to bpos,
  and case 4 to bpos + 1.

A PE at or above bpos then has these inputs forced to zero:

* δ_{i+1} if the PE is exactly at bpos;
* θ_i if the PE is below qpos;
* θ_{i+1} if i+1 is below qpos.

The masking was derived for this design. It was checked against a textbook
Berlekamp-Massey decoder in software and in simulation, on random error
patterns of every weight from 0 to 12. The two agree on Λ up to a non-zero
factor and on its degree.

### Timing

The first iteration is done on the `start` cycle itself, from the syndromes on
the input port. `done` pulses 8 cycles after `start`. A new `start` may
coincide with `done`, which is how the candidate loop runs solves back to back.
Λ comes out scaled by a non-zero constant. That moves no root, and the error
evaluator does not use Λ's coefficients.

## Stage 3: error positions and values

### Chien search

`rs_chien_par2` tests two positions per cycle, so the 255 positions take
128 cycles.

* It works with a running set of terms Λ_j·α^{−jp}.
* Each cycle these are multiplied by α^{−2j}, using 8 constant multipliers
  per lane.
* Each root stores its position l and its locator X = α^l.
* If the number of roots differs from deg Λ, or exceeds 8, `fail` is set.

### Error values (Björck–Pereyra)

`rs_bp_eval` needs no error-evaluator polynomial Ω(x). The error values e_k at
the v found locators X_k solve the Vandermonde system

  S_j = Σ_k e_k X_k^j,  j = 1 … v,

and the Björck–Pereyra method solves it in place on S_1 … S_v. It has three
steps:

1. Repeated multiply-subtract: S_i ← S_i − X_k·S_{i−1}.
2. Divide-and-subtract: S_i ← S_i / (X_i − X_{i−k}), then
   S_{i−1} ← S_{i−1} − S_i.
3. Final divisions: S_k ← S_k / X_k.

The hardware has one multiplier, one adder and one divider, and does one
operation per cycle. The divider is a 256-entry inverse ROM followed by the
multiplier. The divide and the subtract of step 2 take separate cycles. This
gives v(v−1)/2 + v(v−1) + v cycles, which is 92 for v = 8, so the whole of
stage 3 takes at most 128 + 92 + a few cycles.

The evaluator uses the syndromes of the *accepted candidate*, not of the
received word, so the values it finds are errors relative to that candidate.

## Output correction

The output stage reads the stored received word and adds two things to each
symbol:

* the flip pattern of the accepted candidate, at the LRP positions;
* the Björck–Pereyra error values, at the Chien positions.

Both are applied by position compare against small register lists, with no
second memory. When `fail` is set, nothing is added.

## Where this design departs from the original architecture

* **Hard candidate order:** the hard candidate is solved first, for the cycle
  budget explained above. Decisions are unchanged.
* **Masking:** the boundary masking in the solver replaces the published
  θ-zeroing rule, with the same result.
* **Syndrome updater:** one squarer is enough for the update schedule used
  here; the original block has two.
* **Fallback on a high last degree:** a last candidate with degree above t
  falls back to the hard decision.
* **Things the original leaves open:**
  * the field polynomial;
  * the width and meaning of the reliability input (4 bits here, smaller means
    less reliable);
  * tie breaking between equal reliabilities;
  * the handshake;
  * reset;
  * what to do when the Chien search fails.
* **Not built:** pads, clocking and test access of the fabricated chip. The
  RTL is one clock domain and makes no claim about reaching 320 MHz.

A generic gate-level synthesis of the top gives about 4.3 k cells and about
2.1 k flip-flops. The flip-flop count excludes the 3×256-byte codeword memory
and the two 256-byte ROMs.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench compares the
block against an independent model in `tb/rs_tb_pkg.sv`, which includes:

* log/antilog-table field arithmetic;
* a systematic encoder;
* direct syndromes;
* textbook Berlekamp-Massey.

| testbench | what it checks |
|---|---|
| `tb_rs_syndrome_calc` | all 16 syndromes of random words; valid timing |
| `tb_rs_rel_eval` | 5 LRPs against a full sort, including ties; output timing |
| `tb_rs_cw_mem` | random reads/writes on three banks; read-during-write |
| `tb_rs_syn_updater` | every flip against recomputed syndromes; 8-cycle update |
| `tb_rs_ir_pe` | PE arithmetic and every mux/zero setting |
| `tb_rs_kes_irribm` | Λ and degree against BM for 0–12 errors; 8-cycle latency; back-to-back |
| `tb_rs_dc_ctrl` | accepted candidate, flip pattern and Λ against a software loop; done within 258 cycles |
| `tb_rs_chien_par2` | roots, locators, failure flag; 128-cycle latency |
| `tb_rs_bp_eval` | error values for 1–8 errors; cycle count |
| `tb_rs_soft_decoder` | whole decoder at full size, 30 codewords back to back |
| `tb_rs_awgn_workload` | whole decoder on a simulated BPSK/AWGN channel at 6.0, 6.5 and 7.0 dB |

`tb_rs_soft_decoder` runs the top with all defaults. It feeds codewords at the
minimum spacing and compares every output symbol and status word with a
software reference decoder. It also checks the 778-cycle latency. It counts
each mechanism and fails if any of them never happened:

* clean words;
* words corrected through a flip pattern;
* words corrected through the hard fallback;
* words beyond t errors;
* reported failures;
* back-to-back words.

It takes about 20 s in Verilator.

`tb_rs_awgn_workload` sends 40 random codewords at each of three Eb/N0
points, 6.0, 6.5 and 7.0 dB. Each bit goes through a BPSK/AWGN channel and
gets a 4-bit reliability of floor(8·|y|). The results are statistical, so the
testbench checks properties that every decoded word must have:

* A failed word is passed through unchanged.
* Every other output is a codeword.
* A hard result changes at most `nerr` ≤ 8 symbols.
* A flipped result changes at most 7 symbols outside the LRP symbols.

It also prints, for each point:

* how many words a hard decoder could have corrected;
* how many came out right;
* the average number of candidates searched.

With the fixed seed, the average number of candidates searched is 8.95, 1.05
and 1.00 at 6.0, 6.5 and 7.0 dB. At 6.0 dB, 33 of 40 words came out right,
against 32 that were within reach of a hard decoder.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rs_pkg.sv tb/rs_tb_pkg.sv tb/tb_rs_soft_decoder.sv \
    --top-module tb_rs_soft_decoder -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

## Changing the design

* **Field:** all sizes and the field polynomial are in `rs_pkg`. The ROMs and
  constant multipliers are computed from the polynomial by functions at
  elaboration, so changing it needs no tables.
* **Reliability width:** `REL_W` only widens the reliability compares.
* **Number of LRPs:** `ETA` sets the number of LRPs and candidates. The
  merge-sort tree is written for keeping 5. With fewer LRPs the loop is
  shorter, and 2^ETA·8 + 1 must stay within `PERIOD`.
* **Stage length:** `PERIOD` is the stage length. It must be at least 259 for
  the evaluator and candidate loop to finish.
