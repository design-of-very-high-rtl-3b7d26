# Pipelined Sugeno fuzzy processors for trigger systems

A trigger in a particle physics experiment has a few hundred nanoseconds to
decide about an event. Fuzzy processors sold as microcontrollers evaluate a
rule base one rule at a time in software-like loops and are far too slow for
that. This RTL implements two hardware fuzzy processors built for it:

* **`fuzzy_proc4`**: 4 inputs of 7 bits, 7 trapezoidal fuzzy sets per input
  and a 7 bit output. It processes **only the rules that can fire**, one per
  clock, so every data set takes the same 16 clocks (320 ns at 50 MHz),
  whatever the fuzzy system. With `N_IN = 2` the same module is the two input
  processor: 4 clocks (80 ns) per data set.
* **`genetic_fuzzy_proc`**: 10 inputs of 9 bits and a 9 bit output. It is
  meant for the small rule bases that genetic rule generators produce, where
  every rule has its own membership functions. It processes every rule of the
  selected system, one per clock. Its 60 rule memory holds up to four systems,
  and each data set picks one of them.

Both use zero order Sugeno inference. Each rule *i* has a premise truth
θᵢ and a crisp consequent Zᵢ, and the output is
Zo = Σ θᵢ·Zᵢ / Σ θᵢ. The division runs beside the rule pipeline, so it
overlaps the next data set. `fuzzy_chips_top` holds both processors side by
side.

The architecture, stage plan, widths and sizes follow a published 0.7 µm CMOS
design of these chips. Where that description stops, this RTL makes its own
choices. They are listed in [What is this design's own](#what-is-this-designs-own).

## The key idea: store every rule, process only the active ones

Take a fuzzy system with N inputs and K fuzzy sets per input, where no more
than two membership functions (MFs) overlap at any point. Any input value then
has a non-zero truth in at most two *neighbouring* fuzzy sets. Of the Kᴺ
possible rules, at most 2ᴺ can have a non-zero premise: 16 of 2401 for four
inputs with seven sets. These are the *active rules*.

`fuzzy_proc4` relies on this:

1. **The full rule base is stored.** Before loading, any rule base is expanded
   to all 7⁴ = 2401 premise combinations. The rule's *address* encodes its
   premise. The address is the radix-7 number whose digits are the fuzzy set
   indices, first input most significant. Address 0 is "X0 is FS0 and X1 is
   FS0 and X2 is FS0 and X3 is FS0", and address 1 differs only in X3.
2. **Each rule word says what the original rule really was.** A word holds a
   4 bit *premise code* and the 7 bit consequent Z. The premise code has one
   bit per input, the first input in the most significant bit. A bit is 1 when
   that input appears in the original rule. Take a rule such as "if X1 is Mid
   and X2 is High then Z = 90". It is stored at every address whose X1 and X2
   digits match, with premise code `0110`. The alphas of X0 and X3 are then
   ignored for it. A premise code of `0000` marks a combination that the
   original system did not have, and its θ is forced to 0.
3. **The Active Rule Selector (ARS)** finds, for each input, the lower set
   `base` of the pair of neighbouring sets that covers every non-zero MF. The
   16 active rules are all the combinations of `base` and `base+1` across the
   four inputs. They are issued one per clock.

This keeps the processing time the same for every data set and every fuzzy
system, at the price of memory: 2401 × 11 bits of rule memory instead of a
few dozen rules.

Where a rule leaves an input out, it is stored once for every fuzzy set of
that input. It is therefore counted once for each of the two active sets of
that input (usually once with α = 0). This is how the scheme works, and the
reference model in the testbench does the same.

### How the selector picks the pair

For each input, `mf_ars` keeps the first and last point of the support of all
seven MFs. It takes the lowest fuzzy set whose support holds x. If x is in a
gap between supports, it takes the first set whose support has not yet ended.
The result is limited to 5, so the pair (base, base+1) always exists. The
MFs must be stored in order along the axis, with at most two overlapping.
Nothing checks this: it is the rule of the game for whoever builds the
fuzzy system.

## The four input pipeline

One rule enters stage 2 every clock, and the stages are fixed. Each block
passes its data on with a fixed delay, so no stage ever stalls. Back-pressure
exists only at the input register.

| stage | block | work |
|---|---|---|
| off pipe | `fuzzy_proc4` | input register, loaded on `in_valid && in_ready` |
| 1 | `mf_ars` | active pair of every input; held for the 16 issue clocks |
| 2 | `rule_addr_gen` | rule r → fuzzy set `base[v] + bit(r)` per input (MF shape address) |
| 3 | `rule_addr_gen`, `alpha_gen` | rule memory address (radix 7); MF shape memory read |
| 4–6 | `alpha_gen` ×4, `rule_mem` | α of each input; rule word read (premise code, Z) |
| 7 | `theta_op` | α rejection: α of an input absent from the rule → 15 (truth 1.0) |
| 8–9 | `theta_op` | tree of three two-input cells, each giving min and product |
| 10 | `theta_op` | θ = MIN or Product result (`tnorm`); 0 for premise code 0000. Z travels in a shift register over stages 7–10 |
| 11 | `defuzz_acc` | Σθ and θ·Z |
| 12 | `defuzz_acc` | ΣZθ; `done` after the last rule of a set |
| off pipe | `seq_divider` | Zo = ΣZθ / Σθ, 5 clocks |

Timing, counted from the clock edge that accepts a data set:

* rule 0 reaches stage 2 two edges later, and rule 15 reaches stage 12 at
  edge +27;
* `out_valid` pulses after edge **+32** (640 ns at 50 MHz). The published
  budget is 16 × 20 + 12 × 20 + 90 = 650 ns;
* back-to-back data sets are accepted every **16 clocks** (320 ns). A set
  offered early waits in the input register with `in_ready` low.

Stage 1 of one data set overlaps the last issue clock of the set before it,
and the sums restart on each set's first rule. The pipeline therefore runs
without bubbles.

### Arithmetic

* **α** (4 bits, 15 = 1.0), for a trapezoid with corners a ≤ b ≤ c ≤ d: it
  is 0 outside [a, d] and 15 on [b, c]. On the rising edge it is
  ⌊(x−a)·15/(b−a)⌋, and on the falling edge ⌊(d−x)·15/(d−c)⌋. Stage 4
  picks the edge, stage 5 scales by 15 and stage 6 divides.
* **Product T-norm**: p ⊗ q = ⌊p·q/15⌋, so that 15 ⊗ 15 = 15. It is applied
  as (α0 ⊗ α1) ⊗ (α2 ⊗ α3), and the rounding follows that order.
* **Sums**: Σθ ≤ 16·15 needs 8 bits. ΣZθ ≤ 16·15·127 needs 15 bits.
* **Division**: restoring, 2 quotient bits per clock, 8 quotient bits
  (ΣZθ ≤ 127·Σθ, so the quotient always fits 7 bits). The result is rounded
  down, and Zo = 0 when Σθ = 0 (no rule fired). The published chip takes
  90 ns; here it is 5 clocks = 100 ns.

### How close the output gets to a function

Precision is limited by 4 bit truth values and a 7 bit output. To measure
it, two smooth surfaces, x0·x1/127 and (x0+x1)/2, were each loaded as a 7 × 7
system of triangles. Each rule's Z is the surface value at the two peaks, with
no tuning. Over a 64 × 64 grid of inputs:

| surface | T-norm | mean error (of 127) | largest error |
|---|---|---|---|
| x0·x1/127 | MIN | 0.57 % | 3 LSB |
| x0·x1/127 | Product | 0.70 % | 5 LSB |
| (x0+x1)/2 | MIN | 0.39 % | 2 LSB |
| (x0+x1)/2 | Product | 0.56 % | 2 LSB |

So "about 1 %" holds on average for smooth functions. It does not hold as a
worst case bound. Product mode is a little worse, because its floor rounding
is applied three times per rule. When all four inputs take part in a rule,
Product mode has one more weakness. Where all four truth values are small,
the rounded product can be 0 for every active rule. The output then falls to 0.

### Two input variant

`fuzzy_proc4 #(.N_IN(2))` has 49 rules and 4 active rules per data set, so it
takes a data set every 4 clocks. The 2 bit-per-clock divider would need 5
clocks, so this variant retires 4 bits per clock (3 clocks), and the latency
is 18 clocks. The premise code keeps its 4 bit width, and only its top
`N_IN` bits are used.

## The genetic fuzzy processor

A genetic rule generator produces few rules (typically about ten). Each rule
has its own MF for every input, and most rules fire for most inputs, so
selecting active rules gains nothing. Instead, `genetic_fuzzy_proc` holds
whole rules in a single memory (`gen_rule_mem`, 60 words of 279 bits). Each
word has, for each of the 10 inputs, a **symmetric trapezoid**: its centre,
the half width of its flat top and the half width of its support. It also
has the 9 bit crisp Z.

A 4-entry system table gives each fuzzy system its first rule and rule count.
`in_sys` chooses the system for each data set. For a system of n rules:

| stage | work |
|---|---|
| G1 | rule memory read at `first + counter` |
| G2–G4 | `gen_alpha` ×10: d = \|x − centre\|; α = 15 if d ≤ top, 0 if d ≥ base, else ⌊(base − d)·15/(base − top)⌋ |
| G5 | θ = minimum of the ten α |
| G6–G7 | `defuzz_acc` (reused, sized for 60 rules and 9 bit Z) |
| then | `seq_divider`, 10 quotient bits, 6 clocks |

A data set takes n clocks, and `out_valid` rises n + 12 clocks after
acceptance. Back-to-back sets are spaced max(n, 6) clocks. The floor of 6 is
the divider's time: without it, a one-rule system would produce results
faster than the divider can take them. A count of 0 is run as one rule.

## Interfaces

All logic uses one clock and `rst_n`, an active-low reset that is applied
asynchronously. Reset clears only control state: valid flags, counters and
the divider. Memories and data registers are not reset, and are written
before use.

**`fuzzy_proc4`**

* `in_valid`, `in_ready`, `in_x[N_IN]` (7 bits each): valid/ready handshake
  for a data set.
* `tnorm`: `TNORM_MIN` or `TNORM_PRODUCT`. It is read by each rule at stage
  10, so change it only between data sets.
* `sup_we`, `sup_var`, `sup_fs`, `sup_data {first, last}`: MF support memory
  of the ARS.
* `shp_we`, `shp_var`, `shp_fs`, `shp_data {a, b, c, d}`: MF shape memories.
* `rule_we`, `rule_addr`, `rule_data {premise, z}`: rule memory, at address
  Σ fs[v]·7^(N_IN−1−v).
* `out_valid` (one clock), `out_z`.

Load the configuration while no data set is in flight. The support memory
must agree with the shape memory (first = a, last = d). Both are kept because
the ARS and the α generators read them in different stages.

**`genetic_fuzzy_proc`**

* `in_valid`, `in_ready`, `in_x[10]` (9 bits each), `in_sys` (2 bits).
* `rule_we`, `rule_addr`, `rule_data` (`g_rule_t`).
* `sys_we`, `sys_idx`, `sys_data {first, count}`.
* `out_valid`, `out_z`.

**`fuzzy_chips_top`** brings out the ports of both processors with the
prefixes `p4_` and `g_`. The two share only the clock and the reset.

Shared types are in `rtl/fuzzy_pkg.sv` and `rtl/genetic_pkg.sv`.

## What is this design's own

The following follow the published design:

* the block structure;
* the twelve stages and what each does;
* storing every rule, addressed by premise, with a premise code and a crisp Z;
* the ARS and the three two-input MIN/Product cells;
* the widths (7 bit inputs and output, 7 fuzzy sets, 4 bit α and θ, 128
  output values);
* 16 clocks per data set and a division beside the pipeline;
* for the genetic processor: 10 × 9 bit inputs, a 9 bit output, 60 rules,
  four selectable systems, one rule per clock and symmetric trapezoids.

The following are choices made here:

* the valid/ready handshake and the configuration write ports (the source
  only mentions "handshake signals" and loaded memories);
* the ARS selection rule and the radix-7 address;
* the α interpolation formula and the product renormalisation;
* the 2 bit-per-clock divider (100 ns instead of 90 ns), rounding down, and
  Zo = 0 for Σθ = 0;
* the first/last tags that separate data sets;
* what the reset clears;
* for the genetic processor, everything past its feature list: the MIN
  T-norm, 4 bit α, the rule word layout, the system table, the stage plan and
  the 6 clock minimum spacing.

The source chip splits the rule memory into five macros and has a pad ring.
Those are layout matters and are not modelled: each memory here is one array.
The 50 MHz clock is a property of the original 0.7 µm process. The RTL fixes
only the cycle counts.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/fuzzy_pkg.sv rtl/genetic_pkg.sv tb/fuzzy_ref_pkg.sv \
    tb/tb_fuzzy_chips_top.sv --top-module tb_fuzzy_chips_top -Mdir obj
./obj/Vtb_fuzzy_chips_top
```

Replace the testbench to run another. These testbenches exist:

* `tb_fuzzy_chips_top`: the whole design at default size.
* `tb_fuzzy_proc4`, `tb_fuzzy_proc4_n2`, `tb_genetic_fuzzy_proc`: the
  processors end to end.
* `tb_fuzzy_proc4_approx`: the function approximation measurement above.
  It checks every output against the reference model, and checks that the
  mean error is below 1 % of full scale.
* `tb_mf_ars`, `tb_rule_addr_gen`, `tb_alpha_gen`, `tb_rule_mem`,
  `tb_theta_op`, `tb_defuzz_acc`, `tb_seq_divider`, `tb_gen_alpha`,
  `tb_gen_rule_mem`: the blocks one at a time.

Each run takes seconds.

### What the tests cover

`proc4_agent` and `genetic_agent` drive the processors, and the top level
testbench uses both of them. They compare every output with a reference
model written separately in plain integer arithmetic (`tb/fuzzy_ref_pkg.sv`
and inside `genetic_agent`).

`proc4_agent` loads a random fuzzy system: evenly spread trapezoids with
random plateaus, and all 2401 rules, with about one in eight marked absent. It
then checks:

* MIN and Product mode;
* isolated data sets (exact latency) and bursts (exact 16 clock spacing, with
  the input stalling);
* rules with rejected inputs;
* a data set whose 16 active rules are all absent (Σθ = 0 → Zo = 0);
* that every non-zero MF lies inside the selected pair.

`genetic_agent` splits the 60 rules into systems of 10, 20, 29 and 1 rules.
It runs isolated sets and bursts on each system, and a burst that alternates
between two systems. Each mechanism is counted, and the test fails if one of
them never happens.

Assertions in the processors check two rules. A data set offered on
`in_valid` must stay offered until `in_ready` takes it. The divider must
never be started while a division is still running. Add `--assert` to the
Verilator command to enable them.

The block testbenches check each block against its own reference, including
its latency in clocks. Each block was also run in a deliberately broken form
(wrong address radix, MIN cell turned into MAX, Z shift register one stage
short, and so on), and its testbench caught every one.

### Limits worth knowing

* Only cycle behaviour is verified. Nothing here has been timed in a
  technology.
* The reference models share the design's stated arithmetic conventions
  (rounding down, the product order, the selection rule). They check the
  implementation of those conventions, not whether the conventions match the
  original silicon bit for bit.
* The configuration ports have no protection against being written while
  data sets are in flight.
