# Berger-coded burst-mode machine with concurrent error detection

An asynchronous burst-mode machine waits for a *burst* of input changes.
Once the burst is complete it changes state and drives an *output burst*.
This design adds concurrent error detection (CED) to such a machine using a
**Berger code**. A Berger code stores, next to the information bits, the
binary count of their zeros. Any error that moves bits in one direction only
(some 0→1 and none 1→0, or the reverse) changes that count, so the checker
always sees a non-codeword.

The method needs four extra pieces around the protected machine:

1. **Inverter-free re-encoding.** The machine's state code is extended so
   that no state bit has to be inverted. A single internal fault can then only
   move the outputs in one direction.
2. **Berger code predictor.** A second burst-mode machine with the same
   bursts produces the check bits of the expected outputs.
3. **Transition prediction function (TPF).** A third small machine tells
   whether the last input change completed a burst that moves the machine.
   After such a burst the protected machine and the predictor change
   independently, so the checker result is trusted only once the next
   burst starts.
4. **Hazard detector.** It catches a fault whose only effect is a glitch: two
   transitions on one output after a single input change. A glitch can leave
   the code valid, so the Berger checker alone misses it.

The RTL is a clocked emulation of this asynchronous structure, written in
synthesizable SystemVerilog. Every block is parameterised by a burst-mode
specification, and the default specification is a four-phase Q-element.

```
            +--> change_detect --- change ---+-----------> hazard_detect -- hazard --+
            |                                |                  ^                    |
            |                                +------------------|-----------+        v
  in -------+--> tpf_abmm ------------------ tpf ---------------|---------> ced_glue ---> error
            |                                                   | out       ^ (G1, G2, G3)
            +--> abmm (inverter-free) ------ out ---------------+           |
            |                                 |                            chk_err
            |                                 v                             |
            +--> berger_predictor -- check --> berger_checker --------------+
```

## Files

| file | role |
|---|---|
| `rtl/berger_pkg.sv` | specification table layout, Berger code and re-encoding functions, default Q-element specification |
| `rtl/abmm.sv` | the protected burst-mode machine with the inverter-free state code |
| `rtl/berger_predictor.sv` | the Berger code predictor (an `abmm` with check-bit outputs) |
| `rtl/tpf_abmm.sv` | the transition prediction function |
| `rtl/berger_checker.sv` | Berger checker with a two-rail output |
| `rtl/change_detect.sv` | input change detector |
| `rtl/hazard_detect.sv` | output hazard detector |
| `rtl/ced_glue.sv` | gates G1–G3 that form the error output |
| `rtl/berger_ced_top.sv` | top level: everything above wired together |
| `tb/*.sv` | one self-checking testbench per module, two more end-to-end benches and a test specification package |

## Describing a machine

All machines take the same specification, passed as flat packed parameters.
`s` is the specification state and `b` is a branch (one input burst) leaving
it. The flat branch index is `i = s*N_BR + b`.

| parameter | meaning |
|---|---|
| `N_IN`, `N_OUT`, `N_ST`, `N_BR` | inputs, outputs, states, maximum branches per state |
| `BR_VALID[i]` | branch `i` exists |
| `BR_TERM[i*N_IN +: N_IN]` | input vector once the burst is complete (entry inputs with the burst's inputs toggled) |
| `BR_NEXT[i*8 +: 8]` | state the branch leads to (up to 256 states) |
| `ST_OUT[s*N_OUT +: N_OUT]` | outputs on entry to state `s` |
| `SB`, `ST_CODE[s*SB +: SB]` | base state code before re-encoding (default: binary state index) |
| `INIT_IN` (top only) | inputs held during reset |

A burst is complete when the inputs equal the terminal vector of one of the
current state's branches. This is plain burst-mode: directed don't-cares are
not supported. The specification must satisfy the usual burst-mode rules:
each state has a unique entry point, and no burst of a state is a subset of
another burst of that state.

The default specification, the Q-element, has inputs `li` (bit 0) and `ri`
(bit 1) and outputs `lo` (bit 0) and `ro` (bit 1):

```
S0 in=00 out=00 : li+ -> S1 (ro+)
S1 in=01 out=10 : ri+ -> S2 (ro-)
S2 in=11 out=00 : ri- -> S3 (lo+)
S3 in=01 out=01 : li- -> S0 (lo-)
```

This table is the design's own. It is written from the well-known Q-element
handshake, as an example of a small controller.

## Inverter-free state re-encoding

This is the least obvious part of the design. In the gate-level machine, a
fault on an inverted state bit can push some outputs up and others down at
the same time. That is a bidirectional error, and a Berger code can miss it.
The cure is to recognise every state with *positive* state literals only.

A state `s` is recognised when every bit that is 1 in its code is 1 in the
state register:

```
st_hit[s] = &(code_q | ~CODE[s])      // the ~ is applied to a constant
```

This works only if no state's code is covered by another's. If `s` has no 1
bit that `t` lacks, the only way to tell `s` from `t` is a 0 in `s`: a
*negative identifier*. For every such ordered pair, each bit that is 0 in `s`
and 1 in `t` gets a **companion bit** holding its complement. After that,
every pair of states is told apart by a bit that is 1 in one of them. The
functions `neg_mask`, `aug_width` and `aug_code` in `berger_pkg` compute the
companions at elaboration time.

Examples:
- Q-element, base codes 00, 01, 10, 11: code 00 is covered by all the others,
  so both bits get companions. The register has 4 bits.
- Test spec B, base codes 000 to 100: all three bits get companions. Code
  000 becomes `111_000` and code 011 becomes `100_011` (companions on the
  left).

The outputs are then formed as an OR of the recognised states' output
vectors:

```
out = OR over s of (st_hit[s] ? ST_OUT[s] : 0)
```

From state bits to outputs everything is AND-OR of positive literals. If a
state bit is wrongly 1, more states can only be recognised, so outputs can
only rise. If it is wrongly 0, fewer states are recognised, so outputs can
only fall. Either way the error is unidirectional and changes the count of
zeros. `tb_berger_ced_top_stuck` flips each state bit in turn and checks
exactly this.

`abmm` asserts at every clock edge that exactly one state is recognised.

The published method finds negative identifiers from the dichotomies chosen
by its synthesis tool. Here every pair of distinct states is treated as a
dichotomy. That is conservative: it may add companions the tool would not
need, but it never adds too few.

## Berger code predictor and checker

`berger_predictor` is an `abmm` with the same states and bursts. Its output
table holds, for each state, the count of zeros of that state's outputs. It
has `K = ceil(log2(N_OUT+1))` bits. It keeps its own state register, so a
fault in the protected machine does not corrupt the prediction.

`berger_checker` recomputes the count of zeros of `out`. Bit `j` of the
recount and the complement of `check[j]` form a two-rail pair. The pairs are
joined by two-rail cells:

```
z1 = a0&a1 | b0&b1
z2 = a0&b1 | b0&a1
```

The result `z` is `01` or `10` for a codeword, and `00` or `11` otherwise.

## Checking synchronisation (TPF)

During an input burst the outputs of the machine and of the predictor are
steady, so the checker result can be trusted. Once a burst completes, both
machines change independently and can disagree until both have settled. In
burst mode the environment only sends the next burst after the machine has
settled, so the next input change marks the moment the outputs must be
right.

`tpf_abmm` tracks the specification in its own one-hot register and keeps a
copy of the inputs to see each input change. At every input change it
registers `tpf`:

- `tpf` = 1 if that change completed a burst that changes the state or an
  output (the machine is now moving);
- `tpf` = 0 if the burst is still incomplete (nothing moves).

`tpf` holds its value while the inputs are still, and is 0 after reset. When
every burst is a single input change, `tpf` is 1 after the first burst and
never changes again; a real implementation needs no TPF logic then.

## Hazard detection

After each input change an output may make at most one transition.

- `change_detect` compares each input with a one-cycle-delayed copy of
  itself. `change` is high for one cycle whenever some input takes a new
  value.
- `hazard_detect` keeps one feedback bit `seen[i]` per output. An input
  change clears it, and a transition of output `i` sets it. A transition
  while `seen[i]` is already 1 is a second transition, so `hazard_vec[i]`
  and `hazard` go high for that cycle. If a clear and a transition arrive in
  the same cycle, the clear wins.

A glitch that swaps two outputs (for example `10 → 01 → 10`) keeps the same
number of zeros. The Berger checker misses it, but the hazard detector
catches it. The end-to-end testbench exercises exactly this case.

## Error output

`berger_checker` gives one error indication, `chk_err = ~(z[1] ^ z[0])`.
`ced_glue` implements the three gates:

```
G1    = chk_err &  tpf & change    // after a burst: check at the next input change
G2    = chk_err & ~tpf             // inside a burst: check all the time
error = G1 | G2 | hazard           // G3
```

So a fault that shows up while the machine rests after a burst is reported
at the latest when the environment starts the next burst. A fault during a
multi-input burst is reported at once.

## Timing of the clocked emulation

- `in` is sampled on every rising `clk` edge and must be synchronous to
  `clk`.
- Cycle *t*: an input change is seen, so `change` = 1. `tpf` still shows
  the prediction of the previous input change, so G1 checks the outputs
  left by the previous burst in this cycle.
- End of cycle *t*: `tpf` takes the new prediction. If the change completed
  a burst, the state, `out` and `check` update at the same edge.
- Cycle *t+1*: `out`/`check` are new. `hazard_detect` records the output
  transitions of this cycle.
- The environment must leave the inputs alone for at least two cycles after
  a burst completes. This is the clocked equivalent of fundamental mode: if a
  new input change arrived in the same cycle as the output response, the
  hazard record would be cleared before it counted that response.
- `rst_n` is an active-low asynchronous reset. It puts every machine into
  state 0, with the outputs and check bits of state 0. Each delayed copy is
  loaded with the value held during reset (`INIT_IN` for the inputs, state
  0's outputs for the outputs).
- `error`, `hazard`, `z` and `chk_err` are combinational and should be
  sampled at the end of the cycle. `tpf` is registered.

## Where this RTL departs from the method

- **Clocked, not asynchronous.** The method builds hazard-free two-level
  logic with combinational feedback; delay lines and pass-transistor XORs
  make up the change detector. Here every delay is one clock cycle, and the
  machines are register-based emulations with the same burst behaviour.
  "Inverter-free" therefore shows only as the positive-literal state
  decoding and output logic of the RTL. It says nothing about the netlist a
  synthesis tool will make from it, nor about faults inside the next-state
  logic.
- **No state minimisation or logic synthesis of the machines.** The machines
  run the unminimised specification table. Outputs depend only on the state
  (Moore form), and a state count after minimisation cannot be reproduced.
- **Full-width Berger code.** The method's results use fewer check bits than
  `ceil(log2(r+1))` for several controllers, e.g. one check bit for three
  outputs. How that reduced code is built is not specified, so the standard
  code is used.
- **Checker insides are this design's own** (zero counter plus two-rail
  cells). The method uses a previously published Berger checker.
- **Gate functions of G1–G3 and the exact TPF timing are inferred.** The
  method gives the signals entering each gate and their roles: check during
  input bursts, not between them; combine checker and hazard into one
  error. The gate functions and the registered `tpf` above are this
  design's reading of that.
- **The benchmark controllers used to evaluate the method are not
  included.** Their specifications are not available; only their sizes
  (e.g. 2 inputs / 2 states / 2 outputs for the Q-element, up to 13 inputs /
  11 states / 14 outputs for the largest) are known. Any of them can be run
  by passing its table as parameters: the limits are 256 states, 256
  outputs and 4096 bits of base state code table.

## Verification

Each testbench compares against its own reference model. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_abmm` | random bursts on test spec B (two-input bursts, a two-branch state, 3 outputs); `out`, `fire` and the recognised state every cycle; re-encoding of the test codes |
| `tb_berger_predictor` | check bits = zeros of the expected outputs, every cycle of random bursts |
| `tb_tpf_abmm` | `tpf` against a reference updated at every input change; `tpf` = 0 inside two-input bursts is seen |
| `tb_change_detect` | random input sequences against the previous value |
| `tb_hazard_detect` | directed single/second-transition cases plus random sequences against a transition-count reference |
| `tb_berger_checker` | every info/check combination for R = 5 and R = 2 |
| `tb_ced_glue` | all 16 input combinations |
| `tb_berger_ced_top` | whole design at default parameters (Q-element), 200 handshakes; injects wrong check symbols and unidirectional output errors (detected at once when `tpf` = 0; held back while resting with `tpf` = 1 and detected at the next input change) and same-weight output glitches (caught only by the hazard detector); fails if any of these never happened |
| `tb_berger_ced_top_specb` | whole design on test spec B, 300 bursts; random unidirectional errors in both directions: inside two-input bursts detected at once (and their removal flagged as a hazard), while resting detected at the next input change |
| `tb_berger_ced_top_stuck` | whole design on test spec B; one bit of the protected machine's state register flipped at the first input change of a burst: outputs may only move in the flip's direction, and every output change must raise `chk_err` and `error` |

`tb/tb_spec_pkg.sv` holds test spec B and the reference helpers. Faults are
injected with `force`/`release` on the top's `out` and `check` nets, or on
the protected machine's state register `u_ifc.code_q`. Verilator notes that
forced register as driven from two processes.

To run one bench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_berger_ced_top \
  -y rtl -y tb +libext+.sv rtl/berger_pkg.sv tb/tb_spec_pkg.sv tb/tb_berger_ced_top.sv
./obj_dir/Vtb_berger_ced_top
```

Lint of the RTL (`verilator --lint-only -Wall`) reports only unused-signal
notes and a note that `rst_n` is used both as an asynchronous reset and in
the assertions' `disable iff`. Both are intentional.

## Changing the design

- **A different machine:** pass its tables to `berger_ced_top`. See
  `tb_berger_ced_top_specb` for a parameterised instance built from readable
  unpacked tables.
- **A different base state code:** override `ST_CODE`. The companion bits
  are recomputed automatically.
- **Another checker:** replace `berger_checker`. The glue logic only needs
  its error indication `chk_err`.
