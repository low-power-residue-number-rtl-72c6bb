# RNS FIR filter with decomposed-table, FSM-driven reverse conversion

An FIR filter does one multiply and one add per tap. In ordinary binary, the
carries of those wide products and sums set the clock rate. This filter
computes in a **residue number system (RNS)** instead. Each number is held as
its remainders modulo three small coprime moduli, `{2^n-1, 2^n, 2^n+1}`.
Each remainder channel runs its own narrow multiply-accumulate, with no
carries between channels. The costly step in an RNS is getting back to binary
(*reverse conversion*). Here it uses one small lookup table per modulus
instead of one large table, plus a small finite-state machine (FSM) that adds
the three table outputs in turn.

With the default `n = 3`, the moduli are 7, 8 and 9. The dynamic range is
`M = 7*8*9 = 504`, the samples and coefficients are 8-bit signed words and the
filter has 8 taps.

## Data flow

```
             +-------------------- rns_fir_channel (CH0, mod 2^n-1) --+
in_sample -->| fwd conv -> delay line -> mod mul per tap -> mod adders |--+ r0
coef      -->| fwd conv -> coefficient registers                       |  |
             +---------------------------------------------------------+  |
             (same for CH1, mod 2^n, and CH2, mod 2^n+1)      r1, r2 ---->+
                                                                          v
                          rns_reverse_converter: 3 x rns_crt_lut + FSM + mod-M adder
                                                                          |
                                                           out_valid, out_y (signed)
```

| module | role |
|---|---|
| `rns_pkg` | moduli, dynamic range, widths, modular inverse and CRT weights (elaboration-time functions) |
| `rns_forward_converter` | signed binary to residue `|x|_m` |
| `rns_mod_multiplier` | `|a*b|_m` using the special form of each modulus |
| `rns_mod_adder` | `|a+b|_m`, compare and subtract |
| `rns_fir_channel` | one residue channel: converters, delay line, coefficients, multipliers, adder chain |
| `rns_crt_lut` | one channel's reverse-conversion table |
| `rns_reverse_converter` | FSM that adds the three table terms modulo M and maps the sum to a signed value |
| `rns_fir_top` | the complete filter |

## Residue arithmetic in the channels

Channel 0 works modulo `2^n-1`, channel 1 modulo `2^n` and channel 2 modulo
`2^n+1`. All residues travel on `n+1`-bit buses, because the largest residue
of the `2^n+1` channel is `2^n`.

**Forward conversion.** A signed value `x` becomes `|x|_m` in `[0, m)`, so -1
becomes `m-1`. To do this, the sign bit is flipped, giving the unsigned value
`x + 2^(W-1)`. That value is reduced modulo `m`, and the constant
`|2^(W-1)|_m` is subtracted with a single correction.

**Modular multiplication.** The product is split at bit `n` into a high part
`H` and a low part `L`:

- modulo `2^n`, the result is `L`;
- modulo `2^n-1`, since `2^n ≡ 1`, the result is `|L + H|` with at most two
  subtractions;
- modulo `2^n+1`, since `2^n ≡ -1`, the result is `|L - H|`, adding `m` once
  if negative.

No divider is needed.

**Filtering.** Each channel is a direct-form FIR:
`y_res = |Σ h_k · x[n-k]|_m`. A chain of modular adders sums the products of
the modular multipliers. The samples and coefficients of a channel pass
through that channel's own forward converters.

## Reverse conversion: decomposed tables and FSM post-accumulation

By the Chinese remainder theorem (CRT), the value with residues
`r0, r1, r2` is

```
X = | W0·r0 + W1·r1 + W2·r2 |_M,   W_i = | M_i · |M_i^-1|_{m_i} |_M,   M_i = M / m_i
```

A single table addressed by all three residues would need `m0·m1·m2` entries.
Here the table is split by modulus: `rns_crt_lut` for channel `i` holds only
the `m_i` terms `|W_i·r|_M`. For `n = 3` that gives three tables of 7, 8 and 9
nine-bit entries, each addressed by at most 4 bits. The tables are computed at
elaboration from the formula above, so any `n` from 2 to 12 gives a correct
table without data files.

The three terms still need to be added modulo `M`. `rns_reverse_converter`
does this with one modulo-M adder, stepped by an FSM:

| state | action |
|---|---|
| IDLE | wait for `start`; capture the three residues |
| CH0 | `acc = T0(r0)` |
| CH1 | `acc = |acc + T1(r1)|_M` |
| CH2 | `X = |acc + T2(r2)|_M`; output the signed value; a new `start` here goes straight to CH0 |

**Signed results.** A sum `X` in `[M/2, M)` is read as `X - M`. The output
range is therefore `[-M/2, M/2-1]`, which is `[-252, 251]` for `n = 3`. A
filter result outside that range wraps around modulo `M`. This is the usual
RNS rule that the moduli must be chosen for the range the data needs. The
filter raises no overflow flag.

## Timing and interface of `rns_fir_top`

All signals are sampled on the rising edge of `clk`. `rst_n` is an
active-low, synchronous reset. It clears the delay lines and the coefficients.

- **Samples.** A sample is taken on an edge where `in_valid && in_ready`. It
  shifts into all three delay lines.
- **Conversion start.** One cycle later, the channel sums have settled and the
  reverse converter starts.
- **Output.** `out_valid` pulses on the 4th clock edge after the edge that
  took the sample. `out_y` holds its value until the next result.
- **Throughput.** The converter works for three cycles, so `in_ready` is low
  for two cycles after each sample. At most one sample is taken every 3
  clocks, and a new conversion starts while the previous one completes.
- **Look-ahead.** `in_ready` looks one cycle ahead through the converter's
  `ready_next` output. An assertion checks that every scheduled start finds
  the converter ready.
- **Coefficients.** `coef_we / coef_addr / coef` write coefficient `h_k`, the
  weight of `x[n-k]`, at any time, even while samples stream. A write is used
  for every sample taken on the same edge or later.

| parameter | default | meaning |
|---|---|---|
| `N` | 3 | moduli `2^N-1, 2^N, 2^N+1` (2 to 12) |
| `DATA_W` | 8 | signed sample and coefficient width |
| `TAPS` | 8 | filter length |

The output width is `range_w(N)`: 9 bits for `N = 3`, 15 bits for `N = 5`.

## Configurations

- **Default:** `N=3, DATA_W=8, TAPS=8`.
- **4-tap filter:** runs on the default hardware with coefficients 4 to 7 left
  at zero.
- **16-tap filter:** needs `TAPS=16`.
- **16-bit word length with moduli 31, 32, 33:** needs `N=5, DATA_W=16`.

All of these are simulated; see below. A 32-bit input word with full-precision
products would need `n` of about 22. That is beyond the 64-bit elaboration
arithmetic of `rns_pkg`, which limits `N` to 12.

## Where this RTL departs from, or adds to, the published architecture

- **FIR form.** The FIR uses the multiplier-and-adder form: one modular
  multiplier per tap. The published evaluation also calls its filter
  distributed-arithmetic based, but never describes such a structure.
- **Forward converters, modular multiplier and modular adder.** Only their
  function is published. The circuits here are simple standard forms.
- **Reverse-converter FSM.** The published text only speaks of FSM ordering
  of the post-accumulation. The order used here (one channel per state,
  through one shared adder) is this design's own.
- **This design's own choices:** the channel numbering, residue bus widths,
  the valid/ready handshake, the coefficient write port and the reset.
- **Not included:** the EEG classification system that would use the filter.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb_rns_forward_converter` | every 8-bit input for moduli 7/8/9, 4000 random 16-bit inputs for 31/32/33 |
| `tb_rns_mod_adder`, `tb_rns_mod_multiplier` | every operand pair for moduli 7/8/9 and 15/16/17 |
| `tb_rns_crt_lut` | every table entry for n=3 and n=5 is below M, gives residue r mod m_i and 0 mod the other moduli |
| `tb_rns_fir_channel` | three channels against an exact integer FIR, with shift gaps and a coefficient reload |
| `tb_rns_reverse_converter` | random values including ±M/2 edges, the 3-edge latency, back-to-back starts, the `ready_next` prediction |
| `tb_rns_fir_top` | the full filter at default parameters, 3000 samples against an exact model, checking value and the 4-edge latency of every output |
| `tb_rns_fir_workloads` | 4/8/16-tap and n=3/n=5 configurations through `tb_rns_fir_harness` |

`tb_rns_fir_top` covers four phases: random `in_valid`, continuous
`in_valid` (full rate), coefficient reloads while samples stream, and
large-amplitude data whose sums leave the dynamic range. It counts input
stalls, reloads, negative and positive results, out-of-range results and
full-rate back-to-back samples. It fails if any of them never occurs.

The results are only as good as these tests: arithmetic is checked
exhaustively at the small moduli and by random tests at the larger ones. No
timing or area figures were produced for this RTL.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rns_pkg.sv tb/tb_rns_fir_top.sv \
          --top-module tb_rns_fir_top -Mdir obj_top
./obj_top/Vtb_rns_fir_top
```

Replace the testbench name to run the others; `-Irtl -Itb` lets Verilator find
the submodules by file name. Every module compiles as a top of its own with
default parameters. `verilator --lint-only -Wall -Irtl rtl/rns_pkg.sv rtl/<module>.sv`
lints one module.

To change the filter size, override `N`, `DATA_W` and `TAPS` on
`rns_fir_top`. Keep the data small enough that
`|Σ h_k·x[n-k]| < M/2`.
