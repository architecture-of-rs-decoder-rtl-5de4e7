# RS(23,17) decoder for the MB-OFDM UWB PLCP header

In MB-OFDM UWB, the PLCP header carries the rate and length of the
frame. Its 17 bytes (PHY header, MAC header and header check sequence) are
protected by a Reed-Solomon RS(23,17) code over GF(2^8). This code is a shortened
RS(255,249) code with six parity bytes. It corrects up to t = 3 wrong bytes anywhere
in the 23-byte word. This RTL is a receiver-side decoder for that code. It takes one
byte per clock, keeps up with words that arrive back to back, and returns every byte
exactly **46 clocks** after it entered, corrected.

The architecture follows the paper "Architecture of RS decoder for MB-OFDM UWB". That
paper specifies:

- the decoder's stages;
- the cells of the syndrome, Chien search and Forney blocks;
- a key-equation solver built as a systolic array of six two-clock
  modified-Euclidean cells;
- a 255-word inverse ROM for the division;
- a FIFO as deep as the latency.

Where the paper leaves something open, this design makes its own choice, and the
sections below say so.

## The code

- Field: GF(2^8) on the primitive polynomial x^8 + x^4 + x^3 + x^2 + 1 (0x11D). The
  paper prints only the generator polynomial,
  g(x) = (x - a)(x - a^2)...(x - a^6) = x^6 + 126x^5 + 4x^4 + 158x^3 + 58x^2 + 49x + 117.
  0x11D is the polynomial that reproduces these coefficients. The end-to-end
  testbench recomputes them as a check.
- Word order: the received word is v(x) = v22 x^22 + ... + v0. Byte v22 is sent first
  and the six parity bytes come last.
- Syndromes: S_j = v(a^j), j = 1..6, and S(x) = S1 + S2 x + ... + S6 x^5.
- Key equation: S(x) Lambda(x) = Omega(x) mod x^6. The error locator Lambda has degree
  3 at most and the evaluator Omega has degree 2 at most.
- Error positions: byte v_p is wrong when Lambda(a^-p) = 0, with a^-p = a^(255-p). The
  Chien search therefore evaluates at a^n for n = 233, 234, ..., 255, which tests v22,
  v21, ..., v0 in the order the bytes arrived.
- Error value: Y = Omega(a^n) / Lambda'(a^n) (Forney). Since the first root of g is a^1,
  no extra factor is needed.

## Data flow and timing

```
in_sym ─┬─> syndrome_block ─serial S6..S1─> syndrome_s2p ─S(x)─> me_block ─Lambda,Omega─┬─> chien_block ─Lambda(a^n), Lambda'(a^n)─┐
        │                                                                                └─> forney_corrector <───────────────────┘
        └─> sym_fifo (46 words) ──────────────────────────────────────────────────────────────────> forney_corrector ──> out_sym
```

Clock budget of one word. The numbers are the clock edges at which the named
registers take the word's values, counted from the edge that samples v22 (edge 0):

| edges | registers |
|---|---|
| 0 – 22 | the six syndrome accumulators take v22 … v0 (Horner's rule) |
| 23 | the six syndrome output registers load; S6 is now on the serial output |
| 24 – 28 | the chain shifts: S5 … S1 appear on the serial output |
| 29 | the serial-to-parallel register holds S(x) |
| 30 – 41 | six ME cells, two edges each |
| 42 | the ME output buffer holds Lambda and Omega |
| 43 – 65 | Chien registers: Lambda(a^n), Lambda'(a^n) for n = 233 … 255 |
| 44 – 66 | Omega(a^n), the zero flag and 1/Lambda'(a^n); the FIFO is popped |
| 45 – 67 | output register: corrected v22 … v0 |

So v22, sampled at edge 0, is sampled by the next stage downstream at edge 46, and
so is every later byte relative to its own input edge.

Each stage is busy for at most 23 clocks per word, so a new word can start every 23
clocks. The syndrome accumulators start on the next word while the six syndromes
shift out. The Chien cells reload on the last evaluation clock of the previous word.
The ME array accepts a new word every clock.

The latency of 46 clocks is the paper's figure. The stage boundaries above are this
design's way of reaching it. The paper states only two of them: the two-clock ME cell
and the 12-clock ME array.

## The key equation solver (me_cell, me_block)

This is the part that needs the most explanation. The solver runs the modified
Euclidean recursion on four polynomials, starting from

    R = x^6,  Q = S(x),  L = 0,  U = 1.

Each step combines R and Q so that the leading term of the higher-degree one
cancels, and applies the same combination to L and U:

    if deg R >= deg Q:   R <- b*R - a*x^l*Q ,  L <- b*L - a*x^l*U ,  Q, U unchanged
    else (swap):         R <- a*Q - b*x^l*R ,  L <- a*U - b*x^l*L ,  Q <- R, U <- L

Here a and b are the leading coefficients of R and Q, and l = |deg R - deg Q|. The
recursion stops when deg R < t = 3. At that point Lambda = L and Omega = R, up to a
common factor that cancels in Omega/Lambda'. In GF(2^8), subtraction is XOR.

**Nominal degrees.** The cells do not compute true degrees. Each state carries
*nominal* degrees dR and dQ, which are upper bounds; the coefficient at dR may be zero.
A step always cancels the leading term, so the nominal degree of the combined polynomial
drops by exactly one per step. With 2t = 6 cells this is enough for any error pattern
the code can correct. Two cases need care, and the cell handles them as follows:

- *a = 0* (R's coefficient at dR is zero): nothing is computed. R is relabelled one
  degree lower (dR - 1).
- *b = 0* (Q's coefficient at dQ is zero, e.g. S6 = 0): Q is relabelled one degree
  lower (dQ - 1). Without this rule the update b*R - a*x^l*Q would discard R.

The paper's cell diagram shows a `zero` signal next to the degree computation, but the
text does not say what it does. The two rules above are this design's reading of it.
A software model of the whole decoder with these rules corrected all of 200,000 random
patterns of 0–3 errors within six steps. The RTL tests confirm this on their own random
patterns.

**Cell pipeline.** Each cell takes two clocks, as the paper specifies:

1. Degree computation. It picks a and b, decides stop / zero-R / zero-Q / update /
   swap, and steers R, Q, L, U through the swap multiplexers into a "hi" (higher degree)
   and a "lo" pair. It registers them together with the two multipliers and the shift l.
2. Arithmetic. It forms hi*lead(lo) + x^l*lo*lead(hi) for R and for L, 7 coefficients
   each, and registers the result together with the new degrees and the STOP flag
   (dR < 3).

The paper's cell diagram could also be read as a coefficient-serial cell. Here all
coefficients are processed in parallel, so that each cell completes a whole step in its
two clocks.

**Control and output buffer.** When a word leaves the sixth cell, the output buffer
takes Lambda = L[0..3] and Omega = R[0..2]; this adds one clock, for 13 in total.
Alongside each word, the control records the first cell whose output met the stop rule
(`stop_cell`, 1..6). `fail` is raised if the last cell still had not stopped while L is
non-zero. This needs more than three errors and is rare: random patterns of 4–6
errors almost always stop. The error pattern c(x - a^2)(x - a^3)...(x - a^6) is
an example that does trigger it, because its only non-zero syndrome is S1, and the
testbenches use it. An error-free word has all
syndromes zero: L stays 0, Lambda = Omega = 0, and the corrector changes nothing.

## Syndrome cells and their shift chain (syndrome_cell, syndrome_block, syndrome_s2p)

Cell i (i = 0..5) computes v(a^(i+1)) by Horner's rule, acc <- acc*a^(i+1) + v_n,
using a constant multiplier and an XOR. On the first byte of a word the old
accumulator is dropped; this is a design choice that avoids a clear cycle. A 2:1
multiplexer in front of each output register either loads the accumulator or takes
the previous cell's output. The six output registers therefore form a shift chain
that empties through the last cell. As a result, S6 comes out first and S1 last.
`syndrome_s2p` collects the six values back into S(x). The paper only names this
converter.

## Chien search and Forney (chien_cell, chien_block, inv_rom, forney_corrector)

A Chien cell is a register that loads a coefficient and then multiplies itself by a
constant a^j every clock. To begin at n = 233 instead of n = 0, the loaded coefficient
is multiplied once by a^(233 j). This premultiplier is a design choice.

The search uses the even/odd split of Lambda. In GF(2^m) the derivative of an even
power vanishes, so Lambda'(x) = l1 + l3 x^2 and the odd part of Lambda is
x*Lambda'(x). The block needs:

- hold registers for l0 and l1;
- two a^2-step cells for l2 x^2 and l3 x^2;
- one a-step cell that generates x itself.

These give Lambda' directly, and Lambda = l0 + l2 x^2 + x*Lambda'.

The Forney side evaluates Omega with the same kind of cells: a hold register for w0, an
a-step cell for w1 and an a^2-step cell for w2. It then registers three values:

- Omega(a^n);
- the flag Lambda(a^n) == 0;
- 1/Lambda'(a^n), from a synchronous inverse ROM.

One clock later it multiplies Omega by the inverse, masks the product with the zero flag
(the AND "switch"), and XORs the result onto the byte leaving the FIFO. An output
register follows.

The ROM contents are computed at elaboration from the field, so there is no data file.
The ROM has 256 entries rather than the paper's 255 words, so that address 0 reads 0.

## FIFO (sym_fifo)

This is a circular buffer in a dual-port RAM, 46 words deep as in the paper ("the same
size as the latency"). It has first-word fall-through reads and an occupancy counter.
With back-to-back words it holds at most 46 bytes. A write into a full FIFO without a
read sets the sticky `overflow` flag and fires an assertion in simulation.

## Top-level interface (rs_decoder)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid, in_sym | in | 1, 8 | received byte, v22 first; 23 valid bytes make a word; gaps allowed |
| out_valid, out_sym | out | 1, 8 | corrected byte, 46 clocks after it entered |
| out_first | out | 1 | marks corrected v22 |
| corr_flag | out | 1 | this byte was changed |
| word_done, word_fail, stop_cell | out | 1, 1, 3 | key equation result of a word: failure flag and first stopping cell |
| fifo_overflow | out | 1 | sticky; never set when the input rate is at most one byte per clock |

`stop_cell` is $clog2(2T+1) bits wide: 3 bits for t = 3.

The interface has no back-pressure. The word boundary is found by counting 23 valid
bytes, so the decoder must be reset before the first word and must receive whole
words. All of these interface choices are this design's own.

Shared types and the GF(2^8) functions are in `rs_pkg.sv`:

- `gf_mul`: a bit-parallel multiplier;
- `gf_pow`: a constant power of a, used to build constant multipliers;
- `gf_inv_table`: builds the inverse ROM contents;
- `me_state_t`: the packed R/Q/L/U/dR/dQ bundle that travels through the array, at the
  default t = 3. The ME cells declare the same layout locally, sized from their T
  parameter, and pass it between cells as a flat vector.

## Parameters and the RS(255,239) data-field code

`rs_decoder` has three parameters:

| parameter | default | meaning |
|---|---|---|
| N_SYM | 23 | bytes per word (code length n) |
| T | 3 | correctable bytes; 2T parity bytes and 2T syndromes |
| FIFO_DEPTH | N_SYM + 6T + 5 | FIFO words; must equal the latency |

Every block below the top is sized from N_SYM and T:

- 2T syndrome cells, with roots a^1 .. a^2T;
- a 2T-word S/P converter;
- 2T ME cells, whose polynomials have 2T+1 coefficients and whose degree
  fields have $clog2(2T+1)+1 bits;
- Chien cells for l2 .. lT and Forney cells for w1 .. w(T-1), started at
  n = 256 - N_SYM.

The latency is N_SYM + 6T + 5 clocks. That is N_SYM + 1 clocks for the syndromes,
2T - 1 clocks of shifting, 1 clock of S/P, 4T clocks in the ME array, 1 clock of
ME output buffer and 3 clocks of Chien, Forney and output registers.

The paper's data-field code is RS(255,239) with t = 8. The paper reports only a
synthesis estimate for it. With `rs_decoder #(.N_SYM(255), .T(8))` the same RTL
builds that decoder:

- 16 syndrome cells;
- 16 ME cells (32 clocks);
- Chien and Forney cells for Lambda of degree 8 and Omega of degree 7;
- a 308-word FIFO, for a latency of 308 clocks.

`tb_rs255_workload` runs it (see below). Changing N and TC at the top of that testbench
(and the width of its `stop_cell`) runs other sizes the same way; RS(63,53) with t = 5
passes as well. Any generator whose first root is a^1 works.
The Chien start n = 256 - N_SYM assumes a code shortened from length 255.

## Verification

Each module has a self-checking testbench in `tb/`. They compare against reference
arithmetic in `tb/tb_ref_pkg.sv`, which is written independently of the RTL. It uses
carry-less products reduced by long division, a generator built from its roots,
systematic encoding by polynomial division, and syndromes evaluated term by term.

- `tb_rs_decoder` runs the whole decoder at its default size. It encodes 400 random
  messages and adds 0–3 random errors, plus words with 4–6 errors. It sends the words
  back to back and with random gaps. It checks that:
  - every correctable word comes out equal to the transmitted codeword;
  - every byte has a latency of exactly 46 clocks;
  - `out_first` and the number of `corr_flag` pulses are right;
  - the FIFO never overflows.

  It also counts the solver's mechanisms (update, swap, zero-R, zero-Q, early stop)
  and the flow cases (back to back, gaps, error-free words). A mechanism that never
  occurs counts as a failure.
- `tb_rs255_workload` runs the decoder at N_SYM = 255, T = 8. It checks 40 words with
  0–8 errors for correct output and a latency of exactly 308 clocks. It also sends three
  S1-only words, which must raise `word_fail`. It builds its own encoder for the
  16-root generator.
- `tb_me_cell` checks the two-clock cell against a step written out independently,
  with every case forced.
- `tb_me_block` checks for random error patterns that Lambda has roots exactly at the
  error positions and that Omega/Lambda' gives the error values, with a 13-clock
  latency.
- The remaining testbenches check the syndrome values and their serial order and
  timing, the S/P converter, the Chien evaluations for n = 233..255, all 256 ROM words,
  the Forney/correction path with its two-clock timing, and the FIFO against a queue
  model.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rs_pkg.sv tb/tb_ref_pkg.sv tb/tb_rs_decoder.sv --top-module tb_rs_decoder
./obj_dir/Vtb_rs_decoder
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Departures and limits

- The default build is the header code: t = 3, 23-byte words. The RS(255,239)
  data-field decoder is the same RTL with other parameters (see above). The paper gives
  no latency and no clock budget for it. Its 308-clock latency and the split between
  stages follow from this design's own choices.
- The paper reports 27k gates and 232 MHz in a 0.18 um library. Neither is reproduced
  here.
- The ME cells process coefficients in parallel (see above). The zero-coefficient
  rules, the stop bookkeeping (`stop_cell`, `fail`), the premultiplied Chien
  start-up, the output register after the correction XOR and the streaming interface
  are this design's own choices.
- Words with more than three errors are not guaranteed to be detected. `word_fail`
  only reports a solver that did not stop. In random tests with 4–6 errors the
  solver practically always stops, so `word_fail` stays low for such words. Such words pass through with whatever the Chien search
  finds.
