# Glitch-free NAND-based digitally controlled delay line

A digitally controlled delay line (DCDL) delays a signal by an amount set by a
binary control code. DCDLs are used in all-digital PLLs, DLLs and clock generators.
This design builds the line from two-input NAND gates only. The signal runs
forward through a row of delay elements. At the element selected by the code it
is folded back onto a return path, which brings it back to the output. Each
extra element the signal passes adds two NAND delays.

Folded NAND lines have a known weakness: changing the code can produce a short
false pulse (a glitch) on the output, even when the input is not moving. The
design here avoids that. It does so by giving every element a second control bit,
T, next to the usual S, and by registering both bits in a driving circuit made of
dual edge triggered flip-flops.

```
 code_i ──► dcdl_encoder ──S,T──► dcdl_driver ──S,S',T──► dcdl_line ──► out_o
                                   (flip-flops,            (N_DE NAND
                                    both clock edges)       delay elements)
 in_i  ───────────────────────────────────────────────────────┘
```

## The folded line

Each delay element (DE) has a forward input `f_i` and a forward output `f_o`,
which connects to the next element. It also has a return input `r_i`, coming
from the next element, and a return output `r_o`, going back towards the line
output. The line input drives the forward input of DE 0. The line output is the
return output of DE 0. The return input of the last element is tied to 1,
which is the neutral value of a NAND.

An element is made of four NAND2 gates:

| gate | function | role |
|------|----------|------|
| G1 forward | `f_o = ~(f_i & T)` | passes the signal to the next element; forced to 1 when T=0 |
| G2 turn    | `x   = ~(f_i & S)` | copy of the signal that is folded back; forced to 1 when S=0 |
| G3 return  | `r_o = ~(x & r_i)` | merges the folded copy with the return path from the next element |
| G4 dummy   | `~(r_i & 1)`       | drives nothing; makes the return node carry the same load as a forward node |

## Element states and the control law

With control code `c` (0 … N_DE-1), element `i` gets:

* `S_i = 0` for `i < c` and `S_i = 1` for `i >= c`. This is a thermometer code.
* `T_i = 0` for `i = c+1` and `T_i = 1` otherwise.

The `{S,T}` pair of an element names its state:

| S | T | state | what the element does |
|---|---|-------|------------------------|
| 0 | 1 | pass      | forwards the signal (`f_o = ~f_i`) and returns the next element's output (`r_o = ~r_i`) |
| 1 | 1 | turn      | folds the signal back, and still forwards it to the next element |
| 1 | 0 | post-turn | folds the signal back too, but blocks the forward path (`f_o = 1`) |

`{S,T} = 00` never occurs. The encoder asserts this.

Elements `0 … c-1` are in pass state. Element `c` turns. Element `c+1` is in
post-turn state. All elements beyond `c+1` are also `S=1, T=1`, but their
forward input is held at 1, so they sit at constant values.

## Why moving the turn point does not glitch

The key is that the turning element keeps its forward gate open. So the element
behind it (post-turn) is already folding the same live signal back, and its
return output `r_{c+1}` carries `~f_c`. The turning element's G3 therefore sees
`x_c = ~f_c` and `r_{c+1} = ~f_c`, two copies of the same value. Its output is
`f_c`, as it should be.

Now let the code go from `c` to `c+1`:

* Element `c` becomes pass. Its G2 output goes to 1, so G3 now passes only
  `r_{c+1}`. That value was already correct before the switch, so the output of
  element `c` does not move.
* Element `c+1` becomes turn. Its T goes from 0 to 1, which opens its forward
  gate towards element `c+2`.
* Element `c+2` becomes post-turn. It folds back a signal that is now arriving,
  while its own return output stays at the neutral value 1 until everything has
  settled.

Going down from `c` to `c-1` works the same way in reverse.

Compare this with a line whose forward gate is driven by `S'` instead of `T`.
There, the turning element blocks the forward path, and the element behind it
holds a constant. When the code moves up by one, the pass gate switches onto a
return node that has not yet received the signal, and the output shows a short
false pulse. If the code jumps by several steps, several such pulses appear.
Driving the forward gates of this design with `S'` instead of `T` turns it
into that line. Under the running-input test below, that variant produces 556
output edges for 400 input edges.

**Limits of the guarantee:**

* **One step at a time.** Switching is glitch-free when the code moves by one
  step per driver clock edge.
* **Direct jumps can still glitch.** A jump of two or more steps in one edge can
  glitch this line as well. `tb_dcdl_line` applies such jumps and reports the
  pulses, but does not count them as failures.
* **The line must be at rest while the control bits change.** No input edge may
  be inside the line at that moment. The simple way to get this is to clock the
  driver with the line output `out_o`: an output edge means the previous input
  edge has left the line.
* **Do not clock the driver with the line input.** T then changes on the
  post-turn element while the new edge is already travelling towards it. The
  edge races the reconfiguration. In simulation no extra output edge appeared,
  but the first edge after a switch often arrived two gate delays early or
  late. Whether this is clean in silicon depends on gate-level timing that
  this model does not capture.

## Delay

All gates have delay `T_PD`. In steady state the delay from input to output is
as follows:

* An edge that arrives rising at the turning element takes `(2c+2)·T_PD`. It
  passes c forward gates, then G2 and G3, then c return gates.
* An edge that arrives falling takes `(2c+4)·T_PD`. G3 of the turning element
  only falls once both of its inputs are high, and the copy from the post-turn
  element arrives two gate delays later.
* The last element (c = N_DE-1) has no post-turn element, so both edges take
  `(2c+2)·T_PD`.

The edge reaching element `c` has passed c inverting forward gates. So for odd
`c`, a rising input edge arrives there falling. With the default `N_DE = 4` and
`T_PD = 20` ps:

| code | input rising | input falling |
|------|-------------|---------------|
| 0 | 40 ps  | 80 ps  |
| 1 | 120 ps | 80 ps  |
| 2 | 120 ps | 160 ps |
| 3 | 160 ps | 160 ps |

The step per code is `2·T_PD` on average. For codes below the last one, rising
and falling edges differ by `2·T_PD`, which shifts the duty cycle.

## Driving circuit

`dcdl_driver` holds one flip-flop per S bit and one per T bit. S' is taken from
the flip-flop's complementary output. All bits share one clock, so S and T
change together. Reset is asynchronous and active low. It loads the encoding of
code 0: S = all ones, T = all ones except T_1.

* `DUAL_EDGE = 1` (default) uses `det_saff`, a dual edge triggered flip-flop.
  A new word is taken at every clock edge, rising or falling, so the latency
  from `code_i` to the line is one edge. When the driver is clocked by the
  delayed signal, this means one update per signal edge. The transistor cell is
  a sense-amplifier flip-flop with a pulse generator, a sense stage and a latch.
  Here it is replaced by its logic function, built from two single-edge
  registers:
  * on a rising edge: `q_r <= d ^ q_f`
  * on a falling edge: `q_f <= d ^ q_r`
  * output: `q = q_r ^ q_f`

  The clock never enters the data path.
* `DUAL_EDGE = 0` uses `nikolic_saff`, the Nikolic sense-amplifier flip-flop,
  modelled as a rising-edge flip-flop with Q and QB. Only rising clock edges
  update the line.

## Modules

| file | what it is |
|------|-----------|
| `rtl/dcdl_pkg.sv` | default sizes, `de_state_e` (pass / turn / post-turn encoded as `{S,T}`) |
| `rtl/nand2_cell.sv` | behavioural NAND2 with inertial delay `T_PD` |
| `rtl/dcdl_de.sv` | one four-gate delay element |
| `rtl/dcdl_line.sv` | `N_DE` elements chained into the folded line |
| `rtl/dcdl_encoder.sv` | code → S, T (combinational) |
| `rtl/det_saff.sv`, `rtl/nikolic_saff.sv` | the two driving flip-flops |
| `rtl/dcdl_driver.sv` | flip-flop bank for S, S', T |
| `rtl/dcdl_top.sv` | encoder + driver + line |

Top-level parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_DE` | 4 | number of delay elements (control bits S0 … S3) |
| `T_PD` | 20 | NAND delay in simulation time units (ps) |
| `DUAL_EDGE` | 1 | driving flip-flop: 1 = dual edge, 0 = Nikolic single edge |
| `CODE_W` | `$clog2(N_DE)` | width of `code_i` |

Ports of `dcdl_top`:

* `clk`, `rst_n`: driver clock and reset.
* `code_i`: the control code.
* `in_i`, `out_o`: the signal to delay and the delayed signal.
* `s_o`, `s_n_o`, `t_o`: the registered control bits, brought out for
  observation.

No file sets a `timescale`, so delays are in the simulator's default unit (1 ps
in Verilator).

## Trust and departures

* **Element wiring is reconstructed.** Four NAND gates per element, the S/T
  control law and the three states are as described for this kind of line. The
  gate-level wiring is a reconstruction from those rules: T on the forward gate,
  S on the turn gate, the fourth gate as a dummy load. It reproduces the stated
  behaviour, glitch-free single steps included, and the testbenches check it.
  It is not copied from a schematic.
* **Gate delays are not process data.** The 20 ps delay is a placeholder for a
  90 nm NAND2. Both NAND inputs have the same delay; the fast-input/slow-input
  difference of a real CMOS gate is not modelled. The absolute delays above, and
  the rising/falling asymmetry, come from this gate model, not from
  transistor-level measurements.
* **Synthesis sees only the logic.** `nand2_cell` is a behavioural model.
  Synthesis maps it to a NAND and drops the delay. A real line has to be built
  from hand-placed cells with `dont_touch` constraints, or the tool will reduce
  the whole line to its zero-delay logic function (`out = in`).
* **The flip-flops are logic models.** They give the sampling behaviour only.
  Power, area and clock-to-Q differences between the sense-amplifier flip-flop
  types are outside what RTL can show.
* **These are this design's own choices:** the reset value, the clamping of
  out-of-range codes (codes above `N_DE-1` act as `N_DE-1`), and the advice to
  clock the driver from the line output.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_nand2_cell`: truth table, the exact `T_PD` delay, and filtering of
  pulses shorter than `T_PD`.
* `tb_dcdl_de`: static outputs in each state, and the one-gate forward delay.
* `tb_dcdl_line`:
  * rising and falling delay for every code, against the gate-count formula;
  * no output movement when stepping the code up or down by one with the input
    held at 0 or at 1;
  * direct jumps applied and their glitches reported.
* `tb_dcdl_encoder`: every code, plus clamping on a 6-element instance.
* `tb_det_saff`, `tb_nikolic_saff`, `tb_dcdl_driver`: random data across both
  clock edges, reset words, and complementary outputs.
* `tb_dcdl_top`: the whole design at default parameters. It checks:
  * the reset word;
  * the one-edge latency on both clock edges;
  * every code's delays;
  * glitch-free stepping through all codes up and down.

  It also counts each element state and each mechanism, and fails if any never
  happened.
* `tb_dcdl_running` and `tb_dcdl_running_sff` run a square-wave input while
  the code takes a random walk. The driver is clocked by `out_o`. Every output
  edge must match one input edge in direction, and arrive after exactly the
  delay of the code in force. `_sff` uses the single-edge driver.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dcdl_pkg.sv \
    tb/tb_dcdl_top.sv --top-module tb_dcdl_top -Mdir obj_top
./obj_top/Vtb_dcdl_top
```

Replace `tb_dcdl_top` with any other testbench name. `--timing` is required,
because the line's behaviour lives in the gate delays.
