# (31,16) BCH decoder for three errors

This is a binary BCH decoder for the (31,16) code over GF(2^5). It takes a
31-bit received word, corrects up to three flipped bits and returns the
transmitted codeword. It uses less area than the usual
syndrome / Berlekamp-Massey / Chien chain in three ways:

* **Fewer syndromes to compute.** Only the three odd syndromes S1, S3 and S5
  are computed from the word. The even ones are squares of these:
  S2 = S1², S4 = S2² and S6 = S3².
* **No iterative key-equation solver.** The iterative solver is replaced by
  the closed-form Peterson solution. For t = 3 this costs a handful of field
  multipliers and a single inversion.
* **A cheaper Chien search.** The error-locator polynomial is evaluated at
  all 31 positions in parallel, in nested (factorized) form. Each position
  needs only three constant multipliers.

The whole decoder is combinational logic between an input buffer register and
an output register. It accepts one word per clock and produces the result two
clocks later.

## Code and field

| item | value |
|---|---|
| length n, data bits k, correctable errors t | 31, 16, 3 |
| field | GF(2^5), primitive polynomial p(x) = x^5 + x^2 + 1 |
| minimal polynomials | m1 = x^5+x^2+1, m3 = x^5+x^4+x^3+x^2+1, m5 = x^5+x^4+x^2+x+1 |
| generator g(x) = m1·m3·m5 | x^15+x^11+x^10+x^9+x^8+x^7+x^5+x^3+x^2+x+1 (hex 8FAF) |
| bit order | bit i of a word is the coefficient of x^i |

The choice of p(x) is not fixed by the code length. This design uses the
common choice for GF(32). An encoder that uses a different primitive
polynomial produces a different code, which this decoder will not decode.
Only the constants in `bch_gf_pkg` depend on p(x).

## Data path

```
data ─► [buffer reg] ─┬─► bch_syndrome ─► bch_peterson ─► bch_chien ─┐
                      │    S1..S6          L0..L3          err[30:0] │
                      └──────────────────────────────────────────────┴─► bch_correct ─► [out reg] ─► origdata
```

### Syndromes (`bch_syndrome`)

For j = 1, 3, 5, the received word r(x) is first reduced modulo the minimal
polynomial m_j(x). This is a fixed XOR network that leaves a 5-bit remainder
b_j. Because m_j(α^j) = 0, the syndrome is S_j = r(α^j) = b_j(α^j). For j = 1
the remainder already is S1. For j = 3 and 5, b_j is multiplied out against
constant powers of α. The even syndromes come from squaring, which is linear
over GF(2) and so costs only XORs.

### Error locator (`bch_peterson`)

The locator is L(x) = 1 + L1·x + L2·x² + L3·x³, normalised so that L0 = 1.
Its coefficients solve the Peterson system

```
[ 1   0   0  ] [L1]   [S1]
[ S2  S1  1  ] [L2] = [S3]
[ S4  S3  S2 ] [L3]   [S5]
```

which, using S2 = S1² and S4 = S1⁴, reduces to

```
det = S3 + S1·S2
L1  = S1
L2  = (S2·S3 + S5) / det
L3  = det + S1·L2
```

When det = 0 there is no error or a single error. The inverse circuit
computes det^30, which returns 0 for a zero input. So this case needs no
special handling: it gives L2 = L3 = 0, and L(x) = 1 + S1·x is exactly the
single-error locator. With two or three errors det is never zero. The
division is a multiplication by det^30, built from four squarings and three
multiplications, so the design has no inversion table.

### Chien search (`bch_chien`)

Bit i is in error when α^-i is a root of L(x). All 31 positions are tested
at once. Each test computes ((L3·β + L2)·β + L1)·β + L0 with the constant
β = α^-i and sets `err[i]` when the result is zero. Because β is a constant,
every multiplier is a small XOR network.

### Correction (`bch_correct`)

`origdata = data ^ err`.

## Interface and timing (`bch_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | synchronous active-low reset; clears both valid flags and both registers |
| in_valid | in | 1 | `data` holds a word |
| data | in | 31 | received word |
| out_valid | out | 1 | `origdata` holds a decoded word |
| origdata | out | 31 | corrected codeword |

A word presented with `in_valid` at clock edge k is captured in the buffer
register. Its corrected form is registered at edge k+1 and is visible with
`out_valid` after that edge. There are no stalls: the decoder accepts a word
on every clock. The critical path runs through all four stages. The longest
part is the inversion inside the locator, followed by the Chien
multipliers.

## Limits and departures

* **More than three errors are not detected.** The output is then not
  meaningful. A failure flag could be added by comparing the number of roots
  found with the degree of L(x), but this design does not have one.
* **The clock, reset, valid flags and output register are this design's
  own.** The underlying design specifies a 31-bit `data` input and a 31-bit
  `origdata` output, and the buffer register that holds the received word.
* **The nested-form Chien evaluator and the remainder-based syndrome circuit
  are one reading** of the "modified" syndrome and "factorized" Chien blocks.
  They produce the same results as any other correct implementation, but
  their gate counts may differ.
* **Area and delay were not measured.** The underlying design reports Xilinx
  FPGA figures of about 400 slices and 16 ns for the whole decoder. These
  were not reproduced here.

## Files

| file | contents |
|---|---|
| `rtl/bch_gf_pkg.sv` | code constants, types (`gf_t`, `word_t`, `syn_t`, `lambda_t`) and GF(2^5) functions |
| `rtl/bch_syndrome.sv` | syndrome calculator |
| `rtl/bch_peterson.sv` | Peterson error-locator solver |
| `rtl/bch_chien.sv` | parallel Chien search |
| `rtl/bch_correct.sv` | error correction |
| `rtl/bch_decoder.sv` | top level |
| `tb/tb_bch_ref_pkg.sv` | independent reference: log/antilog field arithmetic, syndromes from the definition, encoder c(x) = m(x)·g(x) |
| `tb/tb_bch_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
A watchdog ends any run that hangs. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bch_gf_pkg.sv tb/tb_bch_ref_pkg.sv \
  rtl/bch_syndrome.sv rtl/bch_peterson.sv rtl/bch_chien.sv \
  rtl/bch_correct.sv rtl/bch_decoder.sv tb/tb_bch_decoder.sv \
  --top-module tb_bch_decoder
./obj_dir/Vtb_bch_decoder
```

The unit tests build the same way, from the package files, one module and
its testbench.

* **`tb_bch_decoder`** streams about 3000 random codewords through the
  decoder, each with 0 to 3 bit errors. Words arrive back-to-back and with
  idle gaps, and a reset is applied mid-stream. The test checks every output
  word and its two-cycle latency. It also counts how often each case
  occurred, and fails if any of them never did. A final pass then decodes
  every error pattern of weight 1 to 3 (31 + 465 + 4495 patterns), each on a
  fresh random codeword.
* **`tb_bch_peterson`** compares L(x) exactly with ∏(1 + α^p·x), built from
  the injected error positions.
* **`tb_bch_chien`** uses locators with known roots, and random locators
  checked against a direct evaluation.
* **`tb_bch_syndrome`** checks all six syndromes against their definition.
  It also checks that every codeword gives zero syndromes.
