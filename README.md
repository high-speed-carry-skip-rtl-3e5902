# 32-bit concatenation-incrementation carry skip adder with AOI/OAI skip gates and transmission-gate cells

A ripple carry adder is slow because, in the worst case (every bit pair
propagates, `a[i] ^ b[i] = 1` for all `i`), a carry entering bit 0 has to pass
through every full adder. A carry skip adder cuts the operands into stages and
lets a carry jump over a whole stage whose bits all propagate. This design
goes one step further: the ripple chains of all stages run at the same time,
each starting from a zero carry, and the real carry is added afterwards. The
carry crosses each stage through a single compound gate, an AND-OR-Invert
(AOI) or OR-AND-Invert (OAI) gate, rather than a multiplexer. The full adders,
XOR gates and multiplexers are written as the logic of transmission-gate
(pass-switch) cells, the circuit style intended for them.

The adder is purely combinational: `{cout, sum} = a + b + cin` for 32-bit `a`
and `b`, with no clock, register or reset.

A second skip structure can be selected at elaboration time
(`SKIP_STYLE = SKIP_MUX`). It is the classic carry skip adder built from the
same transmission-gate cells: each stage ripples the real carry in, and a
multiplexer bypasses the stage when all of its bits propagate. See
"Multiplexer-skip alternative" below.

## Datapath

```
 a,b[3:0]   a,b[7:4]          a,b[11:8]         ...   a,b[31:28]
    |          |                  |                        |
 rca_block  cska_stage 1 (AOI)  cska_stage 2 (OAI)  ... cska_stage 7 (AOI)
  cin ->      ripple(cin=0)     ripple(cin=0)           ripple(cin=0)
    |  c0     skip: ~c1          skip: c2                 skip: ~c7 --> inverter --> cout
    +-------->AOI--------------->OAI------------> ... --->AOI
              incrementer        incrementer              incrementer
    |          |                  |                        |
 sum[3:0]   sum[7:4]           sum[11:8]               sum[31:28]
```

* **Stage 0** (`rca_block`) is an ordinary 4-bit ripple chain fed by `cin`.
* **Stages 1 to 7** (`cska_stage`) each hold:
  * an `rca_block` adding the stage's four bit pairs with carry in 0. It
    gives a partial sum, its own carry out `Co_rca` and the group propagate
    `P` (AND of the four bit propagates);
  * a skip gate that forms the stage carry out
    `Co = Co_rca | (P & Ci)`;
  * an `incrementation_block` that adds the stage carry in `Ci` to the
    partial sum.

### Why adding the carry afterwards is exact

If any bit of a stage does not propagate, the stage's carry out does not
depend on its carry in, so `Co_rca` computed with carry in 0 is already the
true carry out. If every bit propagates, a zero carry in produces
`Co_rca = 0`, and the true carry out is simply `Ci`. Both cases are covered
by `Co_rca | (P & Ci)`.

The incrementer adds `Ci` to the partial sum. It never needs a carry out of
its own. The partial sum is all ones either because `P = 1` or because the
stage generated a carry. In both cases the skip gate already gives the right
carry out.

The incrementer is a chain of AND gates plus one XOR per bit:
`sum[i] = s_part[i] ^ (Ci & s_part[0] & ... & s_part[i-1])`.

### Carry polarity through AOI and OAI gates

An AOI gate computes its function inverted. Stage 1 therefore turns the true
carry `c0` into `~c1`: `~c1 = ~((P & c0) | Co_rca)`. Stage 2 takes that
complemented carry and uses an OAI gate to return to true polarity:

`c2 = ~((~P | ~c1) & ~Co_rca) = (P & c1) | Co_rca`

Stages alternate between the two forms in this way. Odd stages are AOI
stages, with a true carry in and a complemented carry out. Even stages are
OAI stages, with a complemented carry in and a true carry out. As a result,
no inverter sits on the carry path between stages. An OAI stage inverts its
`P` and `Co_rca` for the gate, and its carry in for the incrementer. These
inverters are off the stage-to-stage carry path.

With eight stages the last one (stage 7) is an AOI stage, so `cout` is its
output inverted. With an odd number of stages the last stage is an OAI stage,
and its output is `cout` directly.

### Critical path

The longest path is: one 4-bit ripple chain, then the row of skip gates (one
gate per stage), then one 4-bit incrementer. A plain ripple adder's critical
path is 32 full adders.

## Multiplexer-skip alternative

With `SKIP_STYLE = SKIP_MUX`, stages 1 to 7 are `cska_mux_stage` instances.
The stage's `rca_block` takes the true carry in. A `tg_mux2` controlled by
`P` then chooses the carry out: `Ci` when `P = 1` (the skip), otherwise
the chain's own carry out. All carries are at true polarity, and there are
no incrementers.

In this form, the sum bits of a stage still wait for the carry in to ripple
through the stage. The carry itself reaches the next stage after one
multiplexer. The AOI/OAI form replaces the multiplexer with a single
inverting compound gate, and it takes the ripple chains off the
stage-to-stage path.

## Transmission-gate cells

A transmission gate is an NMOS and a PMOS transistor in parallel. The control
drives the NMOS and its complement drives the PMOS. The RTL gives the logic
each cell realises, not its transistors:

| module          | function                          | how it is built in RTL |
|-----------------|-----------------------------------|------------------------|
| `tg_mux2`       | `y = sel ? d1 : d0`               | two complementary pass switches, ORed (exactly one conducts) |
| `tg_xor2`       | `y = a ^ b`                       | `a` steers `b` or `~b` through a `tg_mux2` |
| `tg_full_adder` | `s = a^b^cin`, `cout`, `p = a^b`  | two `tg_xor2`; carry `cout = p ? cin : a` from a `tg_mux2` |
| `aoi21`         | `y = ~((a & b) \| c)`             | skip gate of AOI stages |
| `oai21`         | `y = ~((a \| b) & c)`             | skip gate of OAI stages |

Synthesis maps these cells to whatever gates the target library has. The
transmission-gate style matters only for a full-custom layout.

## Parameters

| parameter          | default | meaning |
|--------------------|---------|---------|
| `ci_cska_tg.WIDTH`   | 32 | operand width |
| `ci_cska_tg.STAGE_W` | 4  | bits per stage; `WIDTH` must be a multiple of it (checked at elaboration) |
| `ci_cska_tg.SKIP_STYLE` | `SKIP_AOI_OAI` | `SKIP_AOI_OAI` (concatenation-incrementation, AOI/OAI skip gates) or `SKIP_MUX` (multiplexer skip) |

The defaults and the `skip_style_e` type live in `cska_pkg`. Every stage
has the same size. A variable-stage-size split, with stage sizes that first
grow and then shrink along the adder, would need a per-stage width list. It
is not provided.

## Where this design makes its own choices

* **4-bit fixed stages.** The design family is defined for both fixed and
  variable stage sizes, but no sizes are fixed for the 32-bit version. Four
  bits is a conventional choice.
* **Stage 0 is a plain ripple chain.** It has no skip gate or incrementer,
  because its carry in is `cin` itself.
* **The AOI stage comes first,** then stages alternate AOI/OAI.
* **Cell circuits.** The full adder, XOR and multiplexer use common
  transmission-gate arrangements (listed above). No specific transistor
  netlists are implied.
* **The default skip element.** By default skipping uses AOI/OAI gates. The
  multiplexer-skip form is kept as the `SKIP_MUX` option. In the default form,
  the transmission-gate multiplexer appears inside every full adder, as its
  carry select.
* **Not included.** A variable-latency variant of this adder uses a parallel
  prefix adder in the middle stages and allows extra time for long carry chains.
  It is not part of this RTL.

## Files

* `rtl/cska_pkg.sv`: default width and stage size.
* `rtl/ci_cska_tg.sv`: top level.
* `rtl/cska_stage.sv`, `rtl/rca_block.sv`, `rtl/incrementation_block.sv`:
  AOI/OAI stage, ripple chain and incrementer.
* `rtl/cska_mux_stage.sv`: multiplexer-skip stage.
* `rtl/aoi21.sv`, `rtl/oai21.sv`: skip gates.
* `rtl/tg_full_adder.sv`, `rtl/tg_xor2.sv`, `rtl/tg_mux2.sv`: cells.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_ci_cska_tg_mux.sv`: the 32-bit adder with `SKIP_MUX`.
* `tb/tb_ci_cska_tg_small.sv`: exhaustive tests of small configurations
  (8-bit/2-bit stages in both styles, 6-bit/2-bit stages, 3-bit single
  stage).

## Verification

Every testbench compares against a plain integer addition (or a truth table)
computed in the testbench. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* Cells and gates are tested exhaustively. So are the 4-bit `rca_block`,
  `incrementation_block`, both forms of `cska_stage` and `cska_mux_stage`.
* `tb_ci_cska_tg` runs the 32-bit adder at its default parameters. It
  applies corner cases, then one million random operand pairs. Half of the
  random pairs have `b` close to `~a`, so that carries travel long distances.
* From the operands alone, the testbench counts how often each mechanism is
  exercised:
  * skips through AOI stages;
  * skips through OAI stages;
  * a carry skipping three or more stages in a row;
  * full propagation from `cin` to `cout`;
  * carries generated inside a stage;
  * increments that ripple inside an incrementer;
  * carry out.
  
  A mechanism that never occurs counts as a failure.
* `tb_ci_cska_tg_mux` does the same for the multiplexer-skip form: 500,000
  pairs, counting skips, long skips and full propagation.
* `tb_ci_cska_tg_small` covers every input combination of the small
  configurations, including both endings of the carry chain (AOI last and
  OAI last).

Only logic is verified. Delay and power depend on the transistor
implementation and are outside what RTL simulation can check.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_ci_cska_tg -y rtl -y tb +libext+.sv \
    rtl/cska_pkg.sv tb/tb_ci_cska_tg.sv
./obj_dir/Vtb_ci_cska_tg
```

Replace `tb_ci_cska_tg` with any other testbench name to run it. To build
the adder at another size, override `WIDTH` and `STAGE_W` on `ci_cska_tg`.
