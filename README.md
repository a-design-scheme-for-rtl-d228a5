# Non-scan delay-fault testable controller

A delay fault makes a signal change arrive too late, so it only shows when two test
vectors are applied back to back at full clock speed: the first vector sets up the
circuit, the second launches a transition, and the response is captured one clock
later. For the combinational part of a finite-state controller, each such two-pattern
test is a pair (I1&S1, I2&S2), with I the primary inputs and S the value of the state
register.

Scan-based designs apply those pairs by shifting state values in. Shifting is slow,
so the clock speed jumps between shift and launch. This design does not use scan. It
works in two ways:

* **Valid two-pattern tests.** S1 → S2 under I1 is a real transition of the
  controller's state transition graph (STG). These tests are applied by running the
  controller normally.
* **Invalid two-pattern tests.** The controller's own logic never makes the S1 → S2
  step, and S2 may even be a code the controller can never reach. A small added truth
  table, the **invalid test state/transition generator (ISTG)**, supplies S2 for one
  clock. The state register loads it through a 2:1 multiplexer in front of each
  flip-flop. After that, the second vector runs through the controller's ordinary
  logic.

No vector is ever shifted in. The clock therefore stays at its functional rate for the
whole test, and each vector costs one clock.

The extra hardware is:

| addition | width | role |
|---|---|---|
| `tmode` pin | 1 | multiplexer select: controller next state (0) or ISTG output (1) |
| `tsel` pins | ⌈log2 m⌉ | pick among ISTG rows that share a first vector (m of them) |
| `tout` pins | number of state flip-flops | bring the state register out so the state a test reaches can be observed |
| multiplexers | one per state flip-flop | feed the register from the controller logic or from the ISTG |
| ISTG | one row per distinct invalid transition | I1&S1 (and tsel) → S2 |

Some designs only need the faults that normal operation can reach to be tested. For
them, the ISTG and the multiplexers can be left out (`HAS_ISTG = 0`), and only `tout`
is added.

## Applying an invalid two-pattern test, clock by clock

```
             clock k             clock k+1               clock k+2
 SR          S1                  S2                      response R
 pi          I1                  I2                      (next vector)
 tmode       1 (MODE_ISTG)       0 (MODE_FUNC)
 tsel        row select          don't care
 effect      ISTG(I1,S1,tsel)=S2 controller logic sees    tout = R, po seen
             loaded at edge      I2&S2 at speed           during clock k+1
```

The first vector I1&S1 also goes through the controller logic during clock k. The
transition between the two vectors is what the test exercises. A valid test uses the
same timing with `tmode = 0` in both clocks.

Tests can be chained:

* The response state of one test can serve as S1 of the next.
* When the second vector of one test equals the first vector of the next, the two
  tests overlap by one clock.

In the end-to-end testbench, four tests (with the set-up moves between them) take 14
clocks on the 2-flip-flop example. For the same four tests, the usual single-chain
estimates are n(nFF+2)+nFF = 18 clocks for standard scan and 2n(nFF+1)+nFF = 26 for
enhanced scan. The scan figures also include slow shift clocks.

## Blocks

| file | what it is |
|---|---|
| `rtl/ctrl_dft_pkg.sv` | `test_mode_e` (`MODE_FUNC`, `MODE_ISTG`), the example controller and the example ISTG table |
| `rtl/stg_comb.sv` | the controller's combinational part: next state and Mealy outputs from a transition table |
| `rtl/istg.sv` | the ISTG truth table |
| `rtl/state_reg_mux.sv` | the per-flip-flop multiplexers and the state register, with synchronous reset |
| `rtl/dft_controller.sv` | the top: these three blocks, with `tout` driven from the state register |

Top-level ports of `dft_controller`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; loads `RESET_STATE` |
| `pi` | in | `NUM_PI` | primary inputs |
| `po` | out | `NUM_PO` | primary outputs, always from the controller logic |
| `tmode` | in | 1 (`test_mode_e`) | multiplexer select |
| `tsel` | in | `TSEL_W` | ISTG row select |
| `tout` | out | `NUM_SR` | state register |

Everything is combinational except the state register. `tout` shows the new state one
clock after the vector that produced it.

## Describing a controller and its ISTG

The controller and the ISTG are both given as parameters. This means any STG, under
any state assignment, can be built without editing the RTL.

**Controller table** (`stg_comb`, `N_TRANS` rows, KISS-style):

* `TR_PS[r]`: present-state code.
* `TR_IN[r]`, `TR_CARE[r]`: the input cube. Input bit k is compared only where care bit k is 1.
* `TR_NS[r]`, `TR_OUT[r]`: next state and outputs.

The lowest-numbered matching row wins. If no row matches (an unreachable code, or an
input cube the STG leaves open), the next state is `RESET_STATE` and the outputs are 0.
Fixing this behaviour matters: the faults that only unreachable states and added
transitions can expose depend on what the synthesized logic does there.

**ISTG table** (`istg`, `N_ROWS` rows):

* `ROW_IN[r]`, `ROW_CARE[r]`: a cube over `{pi, ps}`, that is, I1&S1 with the inputs in the upper bits.
* `ROW_TSEL[r]`, `ROW_TSEL_CARE[r]`: the tsel value the row needs, and whether tsel matters for it.
* `ROW_OUT[r]`: S2.

The lowest matching row wins. With no match, the output is 0.

The rows come from test generation done before the hardware is built:

1. Generate the invalid tests.
2. Fill their don't-care bits.
3. Merge compatible rows. Two rows can merge if no bit has a 0 against a 1; a don't-care
   matches either value.

Merging can also aim for as few distinct outputs as possible, since a table whose
outputs are all equal is very small. These steps are software and are not part of this
RTL.

**Default configuration** (`ctrl_dft_pkg`): 2 inputs, 2 outputs, 2 state bits.

| present | input | next | out |
|---|---|---|---|
| A=00 (reset) | 0- / 1- | A / B | 00 / 01 |
| B=01 | -0 / -1 | A / C | 00 / 10 |
| C=10 | 0- / 1- | C / A | 10 / 11 |
| 11 | any | A (unreachable code) | 00 |

| ISTG row | I1&S1 | tsel | S2 |
|---|---|---|---|
| 0 | 01&01 | 0 | 01 |
| 1 | 01&01 | 1 | 11 |
| 2 | 1-&11 | - | 10 |

Row 0 is the row produced by merging two X-filled tests, (0X&01, 1X&0X) and
(X1&X1, 00&01), into "0101|01". Rows 0 and 1 share a first vector, so they need one
tsel bit. Row 1 drives the register into the unreachable code, and row 2 leaves it
again. The STG and rows 1 and 2 are illustrative choices of this design.

## Where this design makes its own choices

The original method defines the architecture: the multiplexers, ISTG, `tmode`, `tsel`
and `tout`. It does not define the points below, which are choices of this design:

- **Controller.** Table-driven, Mealy outputs, first-match priority. Any controller
  (binary or one-hot) is given as a table.
- **Unspecified behaviour.** Unspecified codes go to `RESET_STATE` with zero outputs. A
  synthesis tool would make its own choice here. To model a particular netlist, encode
  its behaviour as extra table rows.
- **Reset.** Synchronous and active high; the reset code is a parameter.
- **ISTG details.** Rows may hold input don't-cares and a per-row "tsel matters" bit.
  An input no row covers gives S2 = 0.
- **tsel width.** `TSEL_W` is at least 1. A table that needs no tsel clears every
  `ROW_TSEL_CARE` bit, and the pin goes unused.
- **Outputs in test mode.** The primary outputs come from the controller logic in both
  modes.
- **Sharing test pins.** In a controller with a data path, `tsel` and `tout` could share
  data-path pins. No data path is modelled here, so the pins are dedicated.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_stg_comb` | all 16 input/state pairs against a hand-written case model; the same STG with one-hot codes |
| `tb_istg` | all 32 input/state/tsel combinations; a table with tsel ignored |
| `tb_state_reg_mux` | 400 random clocks of mode, reset and data; one-clock latency |
| `tb_dft_controller` | default parameters end to end (see below) |
| `tb_dft_controller_tout_only` | `HAS_ISTG = 0` against the full scheme on the same random stimulus: the light version must ignore `tmode` |
| `tb_benchmark_sizes` | eight controllers at the benchmark sizes below, with generated tables (helper `tb/bench_harness.sv`) |

`tb_dft_controller` runs the design at its default parameters:

* It applies a directed sequence of one valid and three invalid two-pattern tests,
  then 3000 random clocks.
* Every clock, `po` and `tout` are checked against a reference model.
* It checks that the directed sequence takes exactly one clock per vector.
* It counts how often each mechanism happened: reset, functional step, each ISTG row,
  the tsel split, an ISTG miss, entering and leaving the unreachable code. A mechanism
  that never happened counts as a failure.

The benchmark sizes follow the four controllers the method was evaluated on:

| controller | inputs/outputs/states | flip-flops, binary / one-hot | tsel bits, binary / one-hot |
|---|---|---|---|
| dk15 | 3 / 5 / 4 | 2 / 4 | 1 / 1 |
| dk17 | 2 / 3 / 8 | 3 / 8 | 0 (1 kept) / 2 |
| kirkman | 12 / 6 / 16 | 4 / 16 | 3 / 1 |
| sand | 11 / 9 / 32 | 5 / 32 | 4 / 3 |

The tsel width of each case is the reported extra-pin count minus `tout` and `tmode`.
The real transition tables of these controllers are not reproduced here. Their STGs
are generated from the sizes, so the test shows that the RTL handles these widths, not
that it matches those circuits.

How far to trust the design:

* Every block is checked exhaustively or against an independent model.
* Each testbench has been confirmed to fail on a deliberately broken copy of its block.
* All files pass Verilator lint and a second SystemVerilog front end.
* Not verified: actual delay-fault coverage. That needs a gate-level netlist and a
  delay ATPG, which are outside this RTL.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ctrl_dft_pkg.sv tb/tb_dft_controller.sv --top-module tb_dft_controller
./obj_dir/Vtb_dft_controller
```

Replace the testbench name to run another one. Each runs in well under a second.

To use your own controller:

1. Override the `TR_*` parameters of `dft_controller` (and `NUM_PI`, `NUM_PO`,
   `NUM_SR`, `N_TRANS`, `RESET_STATE`).
2. Override the `ROW_*` parameters with the ISTG table from your test generation (and
   `N_ROWS`, `TSEL_W`).
3. Apply the test sequence as in the timing diagram above.

`tb/bench_harness.sv` shows how to build the tables with constant functions.
