# RS(32,28) Reed-Solomon encoder and decoder

This is a Reed-Solomon codec for 8-bit symbols. A block holds 28 data
symbols and 4 parity symbols, 32 in all. The decoder finds and repairs up to
two wrong symbols anywhere in a block, whatever the bit pattern inside each
wrong symbol. That makes the code strong against bursts: a burst of up to 9
flipped bits never touches more than two symbols. When a block has more
damage than that, the decoder usually notices, raises `dec_err` and passes
the block on unchanged.

Everything is synthesizable SystemVerilog. The code size is set by two
parameters, `N` (block length, at most 255) and `K` (data symbols). The
number of correctable errors is `T = (N-K)/2`. The defaults are `N=32`,
`K=28`, so `T=2`.

## The arithmetic

Symbols are elements of GF(2^8). A symbol is a polynomial of degree 7 over
bits. Addition is XOR. Multiplication is a polynomial product reduced modulo
the field polynomial p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D). α = 2 (the
element x) is a primitive element, so every non-zero symbol is a power of α.
The field is defined in `gf_pkg`. It holds `GF_M` = 8, `GF_POLY` (the low
byte of p(x)), the symbol type `gf_t`, and constant-folding helper functions
for the modules' fixed tables.

* `gf_mult` is a combinational multiplier. It forms the 15-bit carry-less
  product, then clears bits 14..8 one at a time by XORing in shifted copies
  of p(x).
* `gf_inv` is a sequential inverter. It uses γ^-1 = γ^254 =
  γ^2 · γ^4 · … · γ^128. Each clock squares one register and multiplies the
  square into an accumulator. The result is ready 7 clocks after `start`.
  The inverse of 0 is returned as 0.

The code's generator polynomial is g(x) = (x+α)(x+α²)(x+α³)(x+α⁴), or in
general the product over α^1..α^(2T). Its coefficients are computed at
elaboration time, so changing `N`/`K` needs no new tables.

Symbol order: within a block, the first symbol on the wire is the
coefficient of x^(N-1) and the last is x^0. The data come first, the parity
last. The code is systematic: the data symbols appear unchanged in the
codeword.

## Encoder (`rs_encoder`)

The encoder is the usual division circuit. It is a shift register of 2T
symbol registers `bb[0..2T-1]` with a constant multiplier g_i in front of
each one. For every data symbol:

    fb      = d_in + bb[2T-1]
    bb[0]   = g_0 · fb
    bb[i]   = bb[i-1] + g_i · fb

Meanwhile the data symbol goes straight to the output. After the K-th data
symbol the registers hold the remainder of x^(N-K)·m(x) divided by g(x).
That remainder is the parity. The encoder then shifts it out over the next
2T clocks, highest power first.

Interface:

* Inputs: `enable` and `d_in`. A symbol is taken when both `enable` and
  `in_ready` are high. `enable` may have gaps.
* Outputs: `out_enb` and `d_out`, plus two flags. `rs_ins` marks an output
  data symbol; `rs_calc` marks a parity symbol.
* Latency: each output symbol comes one clock after its input symbol.
* Parity: the four parity symbols follow the last data symbol on the next
  four clocks. `in_ready` is low during those four clocks.
* Throughput: with `enable` held high, a block takes exactly N clocks.

Example: 28 symbols of 0x36 give the parity bytes 9D 75 EA A3, in
transmission order. The encoder testbench checks this case.

## Decoder (`rs_decoder`)

The decoder is a chain of stages. Each stage is started by the done pulse
of the one before it:

| stage | module | computes | clocks |
|---|---|---|---|
| 1 | `syndrome_calc` | S_j = r(α^j), j = 1..2T, by Horner's rule as the symbols arrive | 1 after the last symbol |
| 2 | `euclid_mult` | unnormalised error locator λ(x) (modified Euclid) | steps + 2, or 1 if all S_j = 0 |
| 3 | `sigma_norm` | σ(x) = λ(x)/λ_0, and deg σ | 10 |
| 4 | `omega_calc` | error evaluator ω(x) = S(x)σ(x) mod x^(2T) | 1 |
| 5 | `chien_forney` | error value for every position, into the error memory | N + 8 per error |
| 6 | `error_corrector` | received symbol XOR error value, streamed out | N |

While this runs, `fifo_delay` keeps the received block. It is a 32-word RAM
with wrapping read and write counters. The error memory holds one error
value per position (zero where there is no error). It sits in
`error_corrector`.

Handshake:

* Input: `in_enb` and `d_in`. A symbol is taken when both `in_enb` and
  `in_ready` are high.
* `in_ready` falls after the N-th symbol. It rises again once the repaired
  block has left the decoder, so one block is decoded at a time.
* Output: the N symbols come on N consecutive clocks, marked by `out_enb`.
  `dec_done` is high with the last symbol.
* `dec_err` is updated when the Chien search ends and is held until the next
  search ends.
* Latency from the last input symbol to the first output symbol: 48 clocks
  for a clean 32-symbol block. A block with errors adds the number of
  Euclid steps plus one (at most 5). It also adds 8 clocks for each error
  found.

### Syndromes

S_j is the received polynomial evaluated at α^j. The `syndrome_calc` module
keeps one accumulator per root and updates it as `S_j ← S_j·α^j + d_in`
for each incoming symbol. All 2T syndromes are given out together, with a
flag `synd_zero` that says they are all zero (no errors).

### Key equation: the modified Euclidean algorithm

This stage is the heart of the decoder, and the least obvious part. The
syndrome polynomial is S(x) = S_1 + S_2 x + … + S_2T x^(2T-1). The locator
σ(x) and evaluator ω(x) satisfy σ(x)S(x) ≡ ω(x) mod x^(2T), with deg σ ≤ T
and deg ω < deg σ. Euclid's algorithm on x^(2T) and S(x) finds them. The
form used here needs no division:

* Registers R, Q, λ, μ start as R = x^(2T), Q = S(x), λ = 0, μ = 1.
* Each step takes the leading coefficients a = lead(R) and b = lead(Q). It
  takes l = deg R − deg Q.
  * If l ≥ 0: R ← b·R − a·x^l·Q and λ ← b·λ − a·x^l·μ.
  * If l < 0: the pairs (R, λ) and (Q, μ) swap roles first.
* The loop stops when deg R < T. λ is then a constant multiple of σ.
* Multiplying both sides of the update by b, instead of dividing by it, is
  what removes the inversion.

`euclid_mult` does one whole step per clock, with every coefficient product
in parallel, so it has several multipliers per coefficient. For T = 2 it needs at most four steps.
A guard also ends the loop after 2T steps. When all syndromes are zero the
loop is skipped and λ = 1. `iterations` reports the number of steps taken.

### Normalisation and evaluator

`sigma_norm` inverts λ_0 with `gf_inv` and multiplies every λ_i by the
inverse. This gives σ with σ_0 = 1. It also reports deg σ.

`omega_calc` forms ω_k = Σ_{i≤k} σ_i·S_(k-i+1) for k < 2T in one
registered clock.

### Chien search and Forney's formula

Position k of the block (k = 0 is the first symbol received) is the
coefficient of x^(N-1-k), so its error locator is X = α^(N-1-k). σ has a
root at X^-1 exactly when position k is in error. The search visits
positions in reception order, so the error memory fills in the same order
in which the corrector later reads it.

It uses term registers instead of evaluating the polynomials from scratch.
Register i holds σ_i·x^i, and likewise for ω. Each register starts at
σ_i·α^(-(N-1)i). Every step it is multiplied by the constant α^i. The sums
of the registers are:

* σ(x), the sum of all terms. It is zero at an error.
* x·σ'(x), the sum of the odd terms only (in GF(2^m) the even terms of the
  derivative vanish). Multiplied by X = x^-1 it gives σ'(x).
* ω(x).

At a root, the error value is e = ω(x) / σ'(x). This is Forney's formula
for a code whose generator roots start at α^1. The denominator goes to
`gf_inv`. The search
stops on that position for the 7-clock inversion plus one clock to use the
result. So a position costs one clock, and a position in error costs nine.
Every position writes one value into the error memory. Shortened codes
(N < 255) need no change: the starting terms already skip the positions
that are not sent.

### When a block cannot be corrected

At the end of the search `dec_err` is raised if any of these hold:

1. the number of roots found differs from deg σ. Some roots lie outside
   the block or are repeated, which can only mean more than T errors;
2. deg σ > T;
3. deg ω ≥ deg σ.

Rule 3 is needed in practice. Without it, some blocks with 3 or more errors
get a σ of degree 2 whose roots are valid positions. The "correction" then
produces a word that is not a codeword. With rule 3, every block that is
not flagged comes out as a valid codeword.

With `dec_err` raised, the corrector passes the received block through
unchanged. No decoder can always tell: a block with more than T errors can
sit within distance T of a different codeword. It is then "corrected" to
that codeword with `dec_err` low. The tests count these miscorrections and
check that the result is a codeword.

## Top level (`rs_top`)

`rs_top` holds one encoder and one decoder, each with its own ports
(`enc_*`, `dec_*`). The channel between them is left outside, so a link,
a memory model or a test can sit in the middle and add errors.

Size after generic synthesis at the defaults: about 1,950 cells, 637
flip-flop bits, and 512 memory bits (the delay buffer and the error memory).
The largest cost is the parallel Euclid step.

## How this design relates to the original VHDL design

The block structure follows the original design of this codec:

* the LFSR encoder;
* a syndrome calculator;
* a Euclid "multiplication" block for the key equation;
* a "division" block that inverts and normalises the locator and forms ω;
* a Chien search with Forney's formula and a sequential inverter, writing
  an error memory;
* a 32-word delay buffer;
* an XOR corrector.

The code parameters (RS(32,28), GF(2^8), roots α^1..α^4) are the original's.

These parts are this design's own choices:

* **Field polynomial.** 0x11D is used. It reproduces the parity values of
  the original encoder example, 9D 75 EA A3 for 28 × 0x36.
* **Parallel datapaths.** The original shares four multipliers and small
  RAMs over several clocks per Euclid step, computes ω serially, and
  shifts the syndromes out one per clock. Here each stage has its own
  multipliers: one Euclid step per clock, ω in one clock, syndromes handed
  over in parallel. The result is the same; only the timing and area
  differ.
* **Chien wait.** A root stalls the search for 8 clocks, set by this
  inverter's latency. The original's wait is slightly longer.
* **Failure rules.** Rule 3 (deg ω ≥ deg σ) and the 2T-step guard in the
  Euclid loop are additions.
* **Handshakes.** `in_ready` on both encoder and decoder, and the
  one-block-at-a-time decoder, are chosen here. So are the reset, which is
  synchronous and active high, and all stage latencies.
* **Failed blocks.** A flagged block is given out unchanged, with
  `dec_err` set.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops; a watchdog ends a hung run.
The reference model in `tb/rs_ref_pkg.sv` is written separately from the
RTL. It uses log/antilog tables, encodes by long division, and finds
syndromes, locator and evaluator by direct evaluation.

| testbench | what it covers |
|---|---|
| `tb_gf_mult` | all 65,536 products against a table-based reference |
| `tb_gf_inv` | every inverse, and its latency of 7 clocks |
| `tb_rs_encoder` | the 28 × 0x36 example; random blocks with gaps; latency; N-clock block period |
| `tb_syndrome_calc` | syndromes and `synd_zero` for clean and damaged words |
| `tb_euclid_mult` | locator against the reference; bypass; step count and latency |
| `tb_sigma_norm` | normalisation, deg σ, latency |
| `tb_omega_calc` | evaluator against the reference |
| `tb_chien_forney` | error memory contents and order, root count, every failure rule, search time |
| `tb_fifo_delay` | order, occupancy, mixed reads and writes |
| `tb_error_corrector` | XOR and bypass, N-clock burst, `last` |
| `tb_rs_decoder` | RS(32,28) and a shortened RS(20,16): 0–6 errors, latency formula |
| `tb_rs_top` | 300 blocks end to end at the default size, with input gaps, back-pressure, bypass, Chien stalls and failures all counted |

With Verilator 5, run for example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/gf_pkg.sv tb/rs_ref_pkg.sv rtl/*.sv tb/tb_rs_top.sv \
        --top-module tb_rs_top -o sim
    ./obj_dir/sim

Swap the last file and the top-module name for any other testbench. Each
testbench builds and runs in seconds. The package file is named first
because the modules import it; Verilator warns that it is listed twice,
which is harmless.

## Changing the code

* `N` and `K` are parameters of `rs_encoder`, `rs_decoder` and `rs_top`.
  All tables (generator coefficients, roots, Chien start and step values)
  are computed from them.
* Shortened codes (N < 255) work; `tb_rs_decoder` tests RS(20,16).
* Larger `T` grows the Euclid step as about (2T)² multipliers. The Euclid
  step counter is 4 bits, which limits T to 7.
* A different field size means changing `GF_M` and `GF_POLY` in `gf_pkg`.
  Some port widths, such as `deg_sigma`, assume small T.
