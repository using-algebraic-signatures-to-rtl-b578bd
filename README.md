# Algebraic-signature output response analyzer for built-in self-test

A built-in self-test (BIST) applies a long stream of test patterns to a circuit
and has to decide, on chip, whether the stream of answers was right. Storing
every expected answer is too costly, so the answers are compacted into a short
*signature* in a multiple-input signature register (MISR) and only that
signature is compared with the one a known-good circuit produces. Compaction
loses information: a faulty circuit can produce the good signature
("aliasing" or "fault masking").

This design makes the MISR compute an **algebraic signature** instead of an
arbitrary LFSR remainder. The answers are read as elements of a Galois field
GF(2^n), and the register keeps up to three field elements:

| component | what it accumulates (words b_0 .. b_m)        | register                     |
|-----------|-----------------------------------------------|------------------------------|
| alpha^0   | b_0 + b_1 + ... + b_m (bitwise XOR)           | `parity_sig_reg`             |
| alpha     | sum of b_v * alpha^(m-v)                      | `alpha_sig_misr`             |
| alpha^2   | sum of b_v * alpha^(2(m-v))                   | `alpha2_sig_misr`            |

Here alpha = t is a generator of the field's multiplicative group. If the
signature has k such components with exponents 0..k-1 (or 1..k) and the stream
has at most 2^n - 1 words, then **any change of at most k words changes the
signature**: the differences would have to satisfy a k x k Vandermonde system
with distinct nodes alpha^i, which has only the zero solution. A one-component
signature therefore never misses a single wrong word, a two-component one never
misses two, and so on; for larger numbers of errors the signature behaves like
a random hash of its length. The registers themselves are generic: nothing in
them depends on the circuit under test, only the golden value does.

## Field arithmetic in flip-flops

A field element is an n-bit vector; bit i is the coefficient of t^i and sits
in flip-flop FF_i. The field is defined by a primitive polynomial phi of
degree n, given with its leading term as a parameter (`PHI`, e.g.
t^8+t^5+t^3+t^2+1 = `33'h12D`). Adding two elements is XOR. Multiplying by t
is a shift by one flip-flop (FF_i to FF_(i+1)); the bit leaving FF_(n-1) stands
for t^n, and since t^n = phi - t^n modulo phi it is XORed back into every FF_i for which
phi has a t^i term.

All three registers fold one word per accepted clock edge by Horner's rule:

    alpha   component: sig <= sig * t   + word
    alpha^2 component: sig <= sig * t^2 + word
    alpha^0 component: sig <= sig       + word

Input line i is XORed into FF_i; inputs narrower than the field (`IN_W < N`)
simply feed the low flip-flops.

**alpha MISR, GF(2^10), phi = t^10 + t^3 + 1.** FF9 feeds back into FF0 and FF3:

    FF0 <= FF9 ^ a0        FF3 <= FF2 ^ FF9 ^ a3
    FF1 <= FF0 ^ a1        FF4 <= FF3 ^ a4 ...   FF9 <= FF8

With phi = t^4 + t + 1 and n = 4 the same module is the textbook four-bit MISR
(feedback into the first and second flip-flop).

**alpha^2 MISR.** The contents move two flip-flops per word and two bits fall
out, the t^n and t^(n+1) coefficients from FF_(n-2) and FF_(n-1); they are
reduced by adding phi and t*phi respectively. For GF(2^8),
phi = t^8+t^5+t^3+t^2+1, this gives

    f0 = f6 ^ in0            f4 = f2 ^ f7 ^ in4
    f1 = f7 ^ in1            f5 = f3 ^ f6 ^ in5
    f2 = f0 ^ f6 ^ in2       f6 = f4 ^ f7 ^ in6
    f3 = f1 ^ f6 ^ f7 ^ in3  f7 = f5 ^ in7

The RTL forms the next state as two successive multiply-by-t steps, which is
the same logic for any phi without a t^(n-1) term and stays correct for those
with one. Worked example in GF(2^10): contents (m0..m9) = 1001001111 with a
zero input word become 1111110011.

**alpha^0 register.** One flip-flop per input line, each XORing its own line;
no bits move.

## The output response analyzer (`alg_sig_ora`)

`alg_sig_ora` builds the components selected by `CFG` from the three
registers, all fed by the same word and enable, and compares each built one
with a programmed golden value; `match` is the AND of the comparisons.

| `CFG`            | components           | k | signature bits (8-bit words, GF(2^n)) |
|------------------|----------------------|---|---------------------------------------|
| `ORA_SINGLE`     | alpha                | 1 | n                                     |
| `ORA_DOUBLE`     | alpha^0, alpha       | 2 | 8 + n                                 |
| `ORA_DOUBLE_ALT` | alpha, alpha^2       | 2 | 2n                                    |
| `ORA_TRIPLE`     | alpha^0, alpha, alpha^2 | 3 | 8 + 2n                             |

The guarantee needs 2^n - 1 >= the number of words. Beyond that length the
powers of alpha repeat with period 2^n - 1, and the same error in two words
exactly one period apart cancels in every component (the alpha^0 component
cancels any identical pair). For a 1024-word ROM this means GF(2^8) variants
miss an equal bit flip in words 255 apart, GF(2^10) variants miss one in words
0 and 1023, and GF(2^11) or GF(2^12) miss neither. The default is the
two-component alpha + alpha^2 analyzer over GF(2^11): it keeps the two-error
guarantee for 1024 words with 22 flip-flops, and, unlike parity + alpha, does
not let every pair of equal errors cancel in one of its two components.

## The BIST wrapper (`bist_top`)

    bist_start --> bist_controller --> bist_done, bist_pass, bist_fail
                     |   |     |
         tpg_init/en |   |     | ora_clear / ora_en
                     v   |     v
                    tpg  |   alg_sig_ora <--- golden_par / golden_a1 / golden_a2
                     |   |test_mode  ^
                     v   v           |
    sys_in ----> input_isolation --> cut_in ==> [circuit under test] ==> cut_out --+--> sys_out

The circuit under test (CUT) is outside the wrapper: `cut_in` drives it and
`cut_out` comes back. In normal operation (`test_mode` low) the system inputs
pass to the CUT; during the test the isolation multiplexer feeds it test
patterns instead.

**A self-test run.** Raise and hold `bist_start`.

Counting the first cycle in which `bist_start` is high as cycle 0 (the
controller is still idle then):

| cycle                      | state | what happens                                       |
|----------------------------|-------|----------------------------------------------------|
| 1                          | INIT  | TPG loads its seed, all signature registers clear  |
| 2 .. N_PATTERNS+1          | RUN   | one pattern per cycle to the CUT, TPG advances     |
| 2+L .. N_PATTERNS+1+L      |       | ORA captures the answer to each pattern L = `CUT_LATENCY` cycles later |
| N_PATTERNS+2 .. N_PATTERNS+L+1 | DRAIN | last answers captured                          |
| N_PATTERNS+L+2             | DONE  | `bist_done` high, `bist_pass` or `bist_fail`       |

`bist_done` and the verdict stay valid, and the signatures frozen on `sig_*`,
until `bist_start` falls; the wrapper then returns to normal operation. With
the defaults (1024 patterns, latency 1) a run takes 1027 cycles.

**Golden values.** Run the test once on a known-good circuit and read
`sig_par`, `sig_a1`, `sig_a2`, or compute them from the expected responses
with the formulas above; then drive them on `golden_*` (hard-wire, fuse or
register them). Golden inputs of components that `CFG` does not build are
ignored and those `sig_*` outputs read zero.

**Test pattern generator.** `tpg` is either a binary counter (default) or a
Galois LFSR, pattern <= pattern * t mod `POLY`. For a memory every address
must be read once and in a known order, which the counter does; an LFSR never
produces the all-zero pattern and suits logic under test.

## Parameters

| module / parameter            | default          | meaning                                  |
|-------------------------------|------------------|------------------------------------------|
| `bist_top.CFG`                | `ORA_DOUBLE_ALT` | analyzer configuration                   |
| `bist_top.N`, `PHI`           | 11, `33'h805`    | field GF(2^11), phi = t^11 + t^2 + 1     |
| `bist_top.OUT_W`              | 8                | CUT output (word) width                  |
| `bist_top.PAT_W`              | 10               | CUT input (pattern) width                |
| `bist_top.N_PATTERNS`         | 1024             | patterns per run                         |
| `bist_top.CUT_LATENCY`        | 1                | cycles from pattern to answer            |
| `bist_top.TPG_KIND`, `TPG_POLY`, `TPG_SEED` | counter, `33'h409`, 0 | pattern generator      |
| `alpha_sig_misr.N/PHI/IN_W`   | 10, `33'h409`, 6 | t^10 + t^3 + 1 example                   |
| `alpha2_sig_misr.N/PHI/IN_W`  | 8, `33'h12D`, 8  | t^8 + t^5 + t^3 + t^2 + 1 example        |
| `parity_sig_reg.IN_W`         | 6                |                                          |

Polynomials used for the four field sizes: GF(2^8) `33'h12D`, GF(2^10)
`33'h409`, GF(2^11) `33'h805`, GF(2^12) `33'h1053`
(t^12+t^6+t^4+t+1). All four are primitive; `PHI` must be primitive for the
guarantee, which the RTL does not check (it only checks degree and constant
term at elaboration). `N` may be 2..32 (3..32 for the alpha^2 register).

## What follows the method and what is this design's choice

Taken from the method: the three signature recurrences, their wiring, the
four analyzer configurations, the field sizes and the GF(2^8) and GF(2^10)
polynomials, the BIST block structure, and the 1024 x 8 ROM as the main test
case with the GF(2^11) alpha + alpha^2 analyzer as default.

This design's own: the choice of primitive polynomials for GF(2^11) and
GF(2^12); the enable, synchronous clear and synchronous active-low reset of
every register; the controller's states and its start/done handshake; the
latency alignment between pattern and capture; the counter mode of the TPG;
the equality comparator; and keeping the CUT outside the wrapper.

Not provided: analyzers with more than three components (alpha^3 and up),
which would extend the guarantee to more errors in the same way; the circuit
under test itself (the testbenches attach a
behavioural ROM model), and any gate-count or FPGA mapping estimate.

## Verification

Each testbench in `tb/` checks its block against values computed independently
(`sig_ref_pkg` does schoolbook GF multiplication and evaluates the signature
sums directly) and prints `TB_RESULT checks=N failures=M`.

| testbench            | what it shows                                                        |
|----------------------|----------------------------------------------------------------------|
| `tb_parity_sig_reg`  | running XOR, enable, clear priority, reset                           |
| `tb_alpha_sig_misr`  | GF(2^10), GF(2^4), GF(2^8): random streams vs. definition, feedback taps, maximal period 2^n - 1 |
| `tb_alpha2_sig_misr` | GF(2^8) flip-flop equations bit by bit, the GF(2^10) worked example, random streams |
| `tb_alg_sig_ora`     | all configurations: signatures, match, detection of every 1..k-word error, each component in the comparison, aliasing of a pair 255 words apart in GF(2^8) parity + alpha |
| `tb_tpg`             | counter sequence and wrap, LFSR steps and full period               |
| `tb_input_isolation` | mux selection                                                       |
| `tb_bist_controller` | latencies 0, 1, 3: one INIT cycle, pattern and capture counts, capture lag, start-to-done time |
| `tb_bist_top`        | default sizes end to end with a 1024 x 8 ROM: normal mode, isolation, a passing golden run in 1027 cycles, single and double bit flips all failing, repair |
| `tb_rom_workloads`   | all sixteen variants (four fields x four configurations) on the 1024 x 8 ROM: intact ROMs pass, single flips fail, guaranteed 2- and 3-flip cases fail, the 255- and 1023-word aliasing cases behave as predicted |

| `tb_rom_escape_rates` | Monte-Carlo run of the same sixteen variants: 2000 random sets of b = 2..10 flipped bits each (18,000 full BIST runs), escapes per million printed per variant and b; no guaranteed case may escape, and the GF(2^8) single signature must escape at about 2^-8 |

With 2000 error sets per b the escape table resolves rates of a few thousand
per million (one escape is 500 per million): the one-component signatures
come out near 2^-n of the runs, and the multi-component variants show no
escapes at this sample size. Rates of a few per million, where the variants
differ from each other, would need on the order of a million runs per entry.

Running one with Verilator (5.x), from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/algsig_pkg.sv tb/sig_ref_pkg.sv tb/rom_ref_pkg.sv \
      tb/tb_bist_top.sv --top-module tb_bist_top -o sim
    ./obj_dir/sim

Replace the testbench name for the others. Verilator's `-Wall` lint reports a
few unused upper bits of the 32-bit containers used by the field helper
function; they are harmless.
