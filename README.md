# Fixed-coefficient FIR filter with shared sub-expressions

In a millimetre-wave radio every antenna has its own digital signal chain. A
base-station array therefore holds many copies of the same FIR filter, and the
energy of each copy adds up. When the coefficients are fixed at design time, no
general multiplier is needed. Each product becomes a handful of shifted copies
of the input that are added or subtracted. The cost of the filter then follows
the number of non-zero **signed digits** in its coefficients, not the number
of taps.

This RTL implements that idea as a synthesizable SystemVerilog filter:

* **Direct form.** The input is delayed first. The taps are then multiplied
  and summed in an adder tree. The transposed form (multiply first, then delay
  and accumulate) needs far more flip-flops and adds its results one by one,
  so it is not used here.
* **Symmetric (linear-phase) coefficients.** Two taps that share a
  coefficient are added before the multiplication. A 25-tap filter thus needs
  only 13 constant multiplications.
* **Canonic signed-digit (CSD) shift-and-add multipliers.** The default
  coefficients are a 21-digit set for the low-pass specification S1a (pass
  band to 0.15, stop band from 0.25 of the sample rate, ripple 0.00645). That
  is the fewest digits any coefficient set meeting the specification needs.
* **Common sub-expression sharing across coefficients.** A digit pattern such
  as `10-1` (= 3) that occurs in several coefficients is multiplied only once.

A second, smaller datapath stands next to the filter. It is a six-input sum
of products whose coefficients were chosen to show sub-expression sharing
at its clearest.

## Datapath of the filter (`fir_df_sym`)

```
x_in ─► fir_delay_line ─► sym_preadder ─► sum of products ─► y_out register
        25 x 12-bit regs   13 pair sums    (SOP_STYLE)        24 bits
        taps[0] = input    centre first
        register
```

| stage | module | what it does |
|---|---|---|
| structural delays | `fir_delay_line` | `taps[k] = x[n-k]`; `taps[0]` is the input register |
| pre-adder | `sym_preadder` | `u[0] = x[n-12]`, `u[m] = x[n-12-m] + x[n-12+m]` |
| sum of products | `csd_mult` + `adder_tree`, or `subexpr_sop` | `sum_m c_m * u[m]` |
| output register | in `fir_df_sym` | `y_out` |

The 13 unique coefficients, centre tap first, are

```
c = {256, 192, 57, -36, -41, 0, 22, 10, -7, -8, 0, 4, 1}
```

The full impulse response is `h_k = c[|k-12|]`, for k = 0..24. The DC gain is
`256 + 2*194 = 644`. Because the coefficients are integers, the output is the
exact integer convolution. Divide it by the gain to get a unit-gain response.
Leaving the gain free, and not forcing it to 1, is what allows so few signed
digits. The gain can be corrected once at the end of a chain of filters.

**Timing.** The filter takes one sample per clock while `en` is high. Nothing
is pipelined between the input and output registers. A sample presented with
`en` high before edge *t* is in the input register after edge *t*. Its effect
reaches `y_out` after the next enabled edge, *t+1*. The latency is therefore
two enabled clocks. When `en` is low, the delay line and the output register
hold their values. `rst_n` is a synchronous active-low reset that clears every
register.

**Registers.** There are 25 × 12 delay bits plus 24 output bits, 324
flip-flops in all. The output is two bits wider than the exact need: the
largest magnitude is 2048 · Σ|h_k| = 2048 · 1012 = 2,072,576, which fits in 22 bits. The width was
chosen to match the register count of the reference direct-form filter this
design reproduces. Set `OUT_W = 22` for the minimum.

## Signed digits and the constant multiplier (`csd_mult`)

CSD writes an integer with the digits {-1, 0, +1} and never puts two non-zero
digits next to each other. This form has the fewest non-zero digits. For
example, `7 = 100-1` (8 − 1) and `57 = 100-1001` (64 − 8 + 1). `csd_mult`
recodes `|COEF|` at elaboration time with `fir_pkg::csd_pos/csd_neg`, which
scan from the LSB: an odd remainder r gives digit +1 if r mod 4 = 1 and −1 if
r mod 4 = 3. It then adds `x <<< i` for every +1 digit and subtracts it for
every −1 digit. A negative coefficient is built as the positive product
followed by a negation.

A coefficient with d digits costs d − 1 adders. The S1a set has 11 non-zero
coefficients and 21 digits. The plain shift-and-add filter therefore needs
21 − 11 = 10 multiplier adders, 4 negations, 10 tree adders and 12 pre-adders.

## Sub-expression sharing (`subexpr_sop`): the part to read carefully

Sharing does not happen inside one coefficient but *across* coefficients.
Each input is shifted to where a pattern sits in its coefficient. Shifted
inputs that share a pattern are summed first. The pattern is then multiplied
once.

`subexpr_sop` takes the coefficients as a table of **terms**
(`fir_pkg::sop_term_t`). Each term has four fields:

| field | meaning |
|---|---|
| `sub` | index of a sub-expression value in `SUB_VAL` |
| `inp` | which input |
| `shift` | left shift of that input |
| `neg` | subtract instead of add |

The hardware computes

```
G_s = Σ_{terms with sub = s} ±(in[inp] <<< shift)     -- one group per sub-expression
y   = Σ_s SUB_VAL[s] · G_s                            -- csd_mult per group, then adder_tree
```

so input n receives the coefficient `Σ_{its terms} ±SUB_VAL[sub] << shift`.
Digits that belong to no shared pattern go into a group whose value is 1.

**The six-input example (`sop_min_example`).** Its coefficients are
`3 + 5·2^(5+k)` for k = 0..5, which gives 163, 323, 643, 1283, 2563 and 5123.
Each coefficient holds `10-1` (3) at shift 0 and `101` (5) at shift 5+k.
With `SUB_VAL = {3, 5}` and twelve terms, the block computes

```
x_sum   = Σ x_k            x_shift = Σ x_k << (5+k)
y       = (x_sum << 2) − x_sum + (x_shift << 2) + x_shift
```

That is 13 adders. Digit-by-digit shift-and-add needs 23.

**The S1a table.** The sub-expressions were found with a greedy search. It
lists every CSD pattern of the odd numbers 3..75 that occurs in the
coefficients, then picks up to three patterns that do not overlap, so that
the most occurrences are shared. For S1a the patterns 3, 5 and 7 each occur
twice (the pair 7 and 9 ties):

| coefficient | decomposition | terms (sub value, shift) |
|---|---|---|
| 256 | 1<<8 | (1,8) |
| 192 | 3<<6 | (3,6) |
| 57 | 7<<3 + 1 | (7,3) (1,0) |
| −36 | −(1<<5) − (1<<2) | −(1,5) −(1,2) |
| −41 | −(5<<3) − 1 | −(5,3) −(1,0) |
| 22 | 3<<3 − (1<<1) | (3,3) −(1,1) |
| 10 | 5<<1 | (5,1) |
| −7 | −7 | −(7,0) |
| −8 | −(1<<3) | −(1,3) |
| 4, 1 | 1<<2, 1 | (1,2), (1,0) |

The group of value 1 has 8 terms (7 adders). The groups of 3, 5 and 7 need
1 adder each to form and 1 adder each to multiply. The final 4-input tree
needs 3 adders. That totals 16 adders, against 20 for the shift-and-add form.

**Safety net.** When `SOP_STYLE = SOP_SUBEXPR`, `fir_df_sym` rebuilds every
coefficient from the term table at elaboration. If one differs from `COEF`,
it stops with `$error`. A wrong table therefore cannot build silently.
`subexpr_sop` also rejects terms that name a missing input or sub-expression.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | widths, S1a coefficients and term table, example term table, CSD functions, `sop_term_t`, `sop_style_e` |
| `rtl/fir_delay_line.sv` | delay line with input register, clock enable, reset |
| `rtl/sym_preadder.sv` | pair pre-adder, odd (type I) and even (type II) lengths |
| `rtl/csd_mult.sv` | constant multiplier, CSD shift-and-add |
| `rtl/adder_tree.sv` | balanced pairwise adder tree |
| `rtl/subexpr_sop.sv` | sum of products with shared sub-expressions |
| `rtl/fir_df_sym.sv` | the filter; `SOP_STYLE` selects `SOP_SUBEXPR` (default) or `SOP_SHIFT_ADD` |
| `rtl/sop_min_example.sv` | registered six-input example |
| `rtl/fir_top.sv` | top: filter and example side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_fir_top` end to end |

## Changing the filter

For another symmetric filter, set `TAPS`, `COEF` (centre first, `(TAPS+1)/2`
values) and `OUT_W`. Choose one of two ways to build the sum of products:

* Set `SOP_STYLE(fir_pkg::SOP_SHIFT_ADD)`. This needs nothing else.
* Or supply `N_SUB`, `SUB_VAL`, `N_TERMS` and `TERMS` for sharing. The
  elaboration check tells you if the table is wrong.

Even tap counts (type II) are supported. Pick `OUT_W` at least
`IN_W + ceil(log2(Σ|h_k|)) + 1` for exact results. A narrower output wraps
modulo 2^OUT_W.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top -o sim
./obj_dir/sim
```

Replace `tb_fir_top` with any other testbench name. What each one covers:

* `tb_fir_top` runs the design at its default sizes. It drives the impulse
  response and checks the two-clock latency. It also drives a step (DC gain
  644), full-scale inputs matched to the coefficient signs, and 5000 clocks
  of full-amplitude white noise with random enable stalls. It resets in
  mid-stream and streams random sets into the SOP example. It counts each of
  these events and fails if one never happens.
* `tb_s1a_spec` measures the impulse response of the running filter and
  evaluates it at 50 frequencies per band. G is the mid-point of the
  pass-band extremes. The pass band deviates by 0.00601 and the stop band
  reaches 0.00624, both under the 0.00645 limit. It also streams sinusoids at
  0.05 and 0.35 of the sample rate and checks the output amplitudes.
* `tb_fir_df_sym` runs the sub-expression filter, the shift-and-add filter
  and an 8-tap even-length filter side by side. All three are compared with
  a direct convolution.
* The block testbenches compare every output with arithmetic done
  independently in the testbench.

## Limits and departures

* **Coefficient sets.** Only S1a and the six-input example have their
  coefficients in this RTL. Four more low-pass specifications were studied
  for this design (Y1, A, E and G, of 38, 43, 24 and 15 taps). Their
  coefficient sets are not available here. The filter is parameterised and
  can take them once they are known.
* **Coefficient selection.** The coefficients themselves come from an
  offline optimisation: a mixed-integer program that minimises the number of
  signed digits under frequency-response constraints. A heuristic breaks ties
  between optimal sets. Neither is hardware, and neither is part of this RTL.
* **Word widths.** All internal sums use the full output width. Trimming
  each node to its exact width, or truncating before the adder tree, would
  save area. Both are left to the synthesis tool or to future work.
* **Extras.** The clock enable, the synchronous reset and the register
  boundary of the six-input example are additions of this implementation.
* **Pipelining.** There is none. At very high clock rates the adder tree and
  the shared sub-expressions (which lengthen the logic depth) may need
  pipeline registers.
* **Canonic digits only.** The multipliers always use CSD. A non-canonic form
  can be cheaper in a few cases, for example `11` rather than `10-1` for 3,
  because a subtraction costs slightly more than an addition.
