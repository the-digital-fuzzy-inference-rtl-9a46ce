# Digital max-min fuzzy inference with a center-of-area defuzzifier

This design is a complete fuzzy inference engine built only from comparators,
multiplexers, adders, counters and small RAMs. It evaluates seven fuzzy rules
by max-min inference on 4-bit membership grades, then converts the inferred
fuzzy set into a crisp number. The conversion uses a **center of area** (COA)
method: the result is the point of the output universe where the area under
the inferred membership function reaches half of its total. The usual
center-of-gravity method needs a multiplier and a divider. The half-area
search needs neither: two running sums, a one-bit right shift and a magnitude
comparator are enough.

The design has three parts:

- **MIN and MAX circuits**, built on a 4-bit comparator
  (`neural_comparator`, `fuzzy_min`, `fuzzy_max`).
- The **fuzzification circuit** (`fuzzification`). It finds each rule's
  firing strength and produces the inferred membership function point by
  point.
- The **COA defuzzifier** (`coa_defuzzifier`, with `mf_ram`,
  `program_counter`, `area_accumulator` and `area_comparator`).

`fuzzy_inference_system` is the top level. It joins the two circuits.

## MIN and MAX from one comparator

A membership grade is a 4-bit unsigned number from 0 to 15. Fuzzy AND is MIN
and fuzzy OR is MAX. Each is one comparator plus a 2:1 word selector.
`neural_comparator` drives its output low when A < B and high otherwise.
`fuzzy_min` passes A when the output is low and B when it is high.
`fuzzy_max` does the opposite. Equal inputs give the same result on either
side.

The original comparator is a voltage-mode "neural" circuit. The four A bits
drive equal PMOS pull-ups and the four B bits drive equal NMOS pull-downs, all
on one summing node. Two CMOS inverters act as the threshold (the "neuron").
Transmission-gate pairs do the word selection. In this RTL the comparator is
a plain `a >= b` and each transmission-gate pair is a multiplexer. No
transistor-level behaviour is modelled.

## Fuzzification: seven rule rows

Every rule row has the same chain of stages. Each stage is registered or
combinational as noted.

```
in_mu[k] --\
            MIN --> MAX --+--> match_q[k] (register, cleared by rreset_n)
ante_mu[k]-/        ^     |
                    +-----+            loadw
                                         |
                 match_q[k] ----------> [T] strength[k]
                                              |
                 cons_mu[k] ---------------> MIN --> clipped[k]
clipped[0..6] --> MAX chain --> mu_o
```

1. **Match.** Clear the match registers with `rreset_n` low for one clock.
   Then present one point of the input universe per clock: for every rule, its
   input grade (`in_mu_i[k]`) and its antecedent grade (`ante_mu_i[k]`). Each
   clock the register takes `max(register, min(input, antecedent))`. At the
   end of the sweep it holds the sup-min match, which is the firing strength.
   MAX is idempotent, so holding a point for extra clocks does no harm.
2. **Latch.** Set `loadw` high for one clock. The "T" registers then take the
   strengths. They hold them while a new match sweep runs.
3. **Infer.** For each point `y` of the output universe, present the
   consequent grades `cons_mu_i[k]`. Each rule's consequent is clipped at the
   rule's strength. The grades are then combined with MAX:
   `mu_o = max_k min(strength[k], cons_mu[k])`. This path is combinational.

Each rule row has its own input port, so a rule may match against a different
input variable.

## The half-area defuzzifier

The inferred grades are written into two identical 64-entry RAMs (RAM1 and
RAM2), one grade per output point. While `load_i` is high, two paths run on
the same clock:

- **Upper path.** Counter P.C.1 reads RAM1 at addresses 0, 1, …, 63, one per
  clock. A 10-bit adder with a feedback register sums the grades into the
  total `area`. Its right shift by one bit is `half`.
- **Lower path.** Counter P.C.2 points into RAM2. The lower adder forms
  `area_lo = acc_lo + RAM2[P.C.2]`. The 10-bit comparator tests
  `half > area_lo`. While the test holds, P.C.2 steps and `acc_lo` takes
  `area_lo`. When it fails, P.C.2 stops and the upper path carries on alone.

`half` only grows. The lower counter stops at the first address where the
running area is at least `half`, so it can wait but never overshoots. When
the upper sweep is over, P.C.2 holds the crisp value:

```
crisp = min { j : m[0] + ... + m[j] >= (m[0] + ... + m[63]) >> 1 }
```

`done_o` goes high when the upper sweep has finished and the comparator is
low.

**Timing.** The upper sweep always takes 64 clocks. The lower counter moves
at most one address per clock. If most of the area lies late in the universe,
`half` grows faster than the lower counter can follow, and it catches up
after the upper sweep ends. Counting from the first clock edge with `load_i`
high, `done_o` rises after 64 to 127 edges.

Driving `load_i` low clears both counters and both sums. This is how a new
defuzzification starts. The result stays on `crisp_o` as long as `load_i` is
high.

**Sizes.** With 64 points of at most 15 each, the total area is at most 960.
That fits the 10-bit adders, so no sum can overflow. The 64-entry depth is
this design's choice. It is the largest power of two for which the 10-bit
sums hold.

## Running one complete inference (`fuzzy_inference_system`)

The top level has no sequencer. A host, a counter board or a testbench drives
the three phases through the ports:

| phase | ports driven | clocks |
|---|---|---|
| clear | `rreset_n` low | 1 |
| match | `in_mu_i`, `ante_mu_i`, one input point per clock | input points |
| latch | `loadw` high | 1 |
| infer and store | `cons_mu_i`, `we_i` high, `waddr_i` = point index | 64 |
| defuzzify | `load_i` high, wait for `done_o`, read `crisp_o` | 64–127 |

Other top-level ports:

- `rst_n`: asynchronous active-low reset of all registers. The RAM contents
  are not reset.
- `strength_o`: the latched firing strengths.
- `mu_o`: the inferred grade.
- `cmp_o`: the comparator output.

Shared widths and types are in `fuzzy_pkg`:

- `MU_W` = 4: grade width.
- `N_RULES` = 7: number of rules.
- `AREA_W` = 10: width of the area sums and the comparator.
- `ADDR_W` = 6: RAM address width.

## What follows the original design and what is added

These parts follow the original design:

- 4-bit grades and seven rules.
- The MIN → MAX-with-feedback → T → MIN row structure, and the final MAX over
  the rows.
- The defuzzifier's two RAMs, two counters, two adders, the right shift and
  the 10-bit comparator.
- The rule that the lower counter steps while half the area exceeds the lower
  area.

These are this design's own choices:

- Modelling the comparator by its logic function, with A = B counted as
  "not smaller".
- The clocking and clear of the match and T registers, with synchronous
  clears.
- A separate input port per rule row.
- A RAM depth of 64, one shared write port for both RAMs, synchronous write
  and asynchronous read.
- Taking `half` from the registered upper sum.
- Stopping the upper sweep after one pass.
- The `done_o` flag, and the use of `load_i` low as the clear of the
  defuzzifier.
- No controller at the top level. The original demonstration board drives
  the phases from switches and counters, and that logic is not reproduced.

Not included:

- Any analog model of the comparator.
- The board-level control logic.
- The image-binarization application, whose rules and image sizes are not
  available.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fuzzy_pkg.sv \
    tb/tb_fuzzy_inference_system.sv --top-module tb_fuzzy_inference_system
./obj_dir/Vtb_fuzzy_inference_system
```

What each testbench covers:

- **`tb_fuzzy_inference_system`** runs the top at its default sizes.
  - The rule set has seven triangular antecedent sets over a 16-point input
    universe and seven triangular consequent sets over the 64-point output
    universe.
  - It runs 40 complete inferences with random fuzzy inputs.
  - It checks every strength, every inferred grade, the crisp value and the
    latency against a model of its own.
  - It counts match clears, latches, clipped consequents, overlapping rules
    and lower-counter stalls, and fails if any of them never occurs.
- **`tb_coa_defuzzifier`** tries zero, full, spike, ramp, triangle and random
  functions.
  - It checks the crisp value against the half-area formula.
  - It checks the exact number of clocks to `done_o` against a clock-by-clock
    model.
- **`tb_fuzzification`** sweeps random grades.
  - It checks the firing strengths and the inferred grade against max-min
    arithmetic.
  - It checks that the T registers hold while `loadw` is low.
- **Comparator, MIN and MAX** testbenches try all 256 input pairs.
- **Counter, accumulator, RAM and 10-bit comparator** testbenches use random
  stimulus against small reference models.
