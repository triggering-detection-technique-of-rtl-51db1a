# Hazard-free logic as a guard against delay-triggered Hardware Trojans

A signal `x` and its complement `~x` are supposed never to be equal. In real
silicon they are, briefly: the inverter that makes `~x` needs time, so for
one inverter delay after `x` rises both rails are 1, and after `x` falls both
are 0. A Hardware Trojan hidden in a combinational block can use that moment
as its trigger and, while it lasts, push a wrong value into the logic.

The defence modelled here does not try to stop the Trojan from firing. It
makes the firing useless. A combinational function is written as a sum of
products that has **no static hazard** on the watched input: whenever the
output is meant to stay the same across an edge of that input, some product
term that does not contain the input holds it. The rails of the input may then
carry anything during the window, including whatever a Trojan drives, and the
output cannot move. A small detector raises a flag, `E`, for exactly the
window, so the trigger condition is also observable.

The RTL implements this for one five-input example function, guarded on its
input `x0`.

## The example function and where its hazard is

The function has inputs `x4 x3 x2 x1 x0` (minterm numbers below read them as
a binary number, `x4` most significant). Its minimal cover is five prime
implicants:

| name | product | minterms |
|---|---|---|
| A | `~x4 ~x1 ~x0` | 0, 4, 8, 12 |
| D | `x4 x1 ~x0` | 18, 22, 26, 30 |
| E | `x3 x2 x0` | 13, 15, 29, 31 |
| F | `x4 x2 x0` | 21, 23, 29, 31 |
| H | `~x2 ~x0` | 0, 2, 8, 10, 16, 18, 24, 26 |

Grouped on `x0`:

    f = (x3 x2 + x4 x2) · x0  +  (~x2 + ~x4 ~x1 + x4 x1) · ~x0
          \____ P ____/            \_________ Q _________/

When both `P` and `Q` are 1, the output is 1 on both sides of an `x0` edge,
but the 1 is handed over from the `x0` term to the `~x0` term. `P·Q = 1`
means `x2 = 1`, `x3 + x4 = 1` and `x4 == x1`, which is true for
`x4 x3 x2 x1` = `0110`, `1011` and `1111`. So the transitions

    12 <-> 13,   22 <-> 23,   30 <-> 31

are static-1 hazards: while `x0` and its complement rail are both 0 (after a
falling edge of `x0`), both terms are 0 and the output drops. A Trojan that
drives the `~x0` rail to 0 while `x0 = 1` gets the same drop on a rising edge.

The fix is the consensus of the two terms, `P·Q`, which reduces to two more
prime implicants:

| name | product | minterms |
|---|---|---|
| B | `~x4 x2 ~x1` | 4, 5, 12, 13 |
| G | `x4 x2 x1` | 22, 23, 30, 31 |

    B + G = x2 · (x4 xnor x1)

    y = (x3 x2 + x4 x2) · x0  +  (~x2 + ~x4 ~x1 + x4 x1) · ~x0  +  x2 · (x4 xnor x1)

This is what `hazard_free_clc` computes, with the `~x0` rail as its own
input `x0_n`.

**Minterm 5.** `B` also covers minterm 5, which the minimal cover leaves at
0. In the function's specification minterm 5 is a don't-care, so both
covers are correct. This design follows the seven-term cover, so `y(5) = 1`.
The testbenches use the seven-term on-set as reference.

### Why the Trojan cannot move a static output

Let the rails be `x0` (true) and `r` (complement, possibly wrong), and
`C = x2 (x4 xnor x1)`. Then `y = P·x0 + Q·r + C`. Also `C ⊇ P·Q`, and
`f(x0=1) = P + C`, `f(x0=0) = Q + C`.

* If `f` is 1 on both sides and `C = 0`, then `P = 1` and `Q = 1`, so
  `P·Q = 1` and `C = 1`, which is a contradiction. So `C = 1` and `y = 1` for any
  `x0`, `r`.
* If `f` is 0 on both sides, then `P = Q = C = 0` and `y = 0` for any `x0`, `r`.

Where `f` does change with `x0`, the window only delays the change, as any
gate delay would. `hazard_free_clc`'s testbench checks this exhaustively, and
checks that the minimal five-term circuit does drop to 0 on the three hazard
pairs.

The same analysis on `x1` gives `A1 = x4 (x2 + ~x0)` and `B1 = ~x4 (x2 + ~x0)`
as the coefficients of `x1` and `~x1`. Their product is 0, so `x1` has no
static hazard. The design states the same of `x2`, `x3` and `x4`. Only `x0` is
guarded in hardware.

## The guard around the function

`ht_guard_top` wires four parts:

```
           +----------+ x0_inv  +--------------+
 x.x0 ---->| inv_delay|--+----->| trigger_mux  |  x0_rail  +-----------------+
   |       +----------+  |      | in0      out |---------->| x0_n            |
   |                     |      | in1   sel    |           |                 |
   |   +----------------+|      +--------------+           | hazard_free_clc |--> y
   +-->| trigger_detect |+          ^       ^              |                 |
   |   |  t = xnor      |-----------|-------+---> trig_e   |                 |
   |   +----------------+           |                      |                 |
   |                      trojan_out+                      |                 |
 x (x4..x0) ---------------------------------------------->| x               |
                                                           +-----------------+
```

* **`inv_delay`** makes the `~x0` rail. It is a behavioural model: a
  continuous assignment with an inertial delay `DELAY_PS` (100 ps by
  default). It gives the two uncertainty windows in simulation.
* **`trigger_detect`** computes `E = xnor(x0, ~x0 rail)`. This is 1 exactly
  while the rails are equal:

  | x0 | ~x0 rail | E |
  |---|---|---|
  | 0 | 0 | 1 |
  | 0 | 1 | 0 |
  | 1 | 0 | 0 |
  | 1 | 1 | 1 |

* **`trigger_mux`** passes the inverter output while `E = 0`. While `E = 1`
  it passes `trojan_out`, the output of the Trojan logic. This models the
  worst case: during its trigger window the Trojan owns the `~x0` rail.
* **`hazard_free_clc`** is the function above.

Timing: all paths are combinational. `trig_e` rises with each `x0` edge and
falls `INV_DELAY_PS` later. Outside the window `y = f(x)`. Inside it, `y` holds
its value whenever `f` does not depend on `x0`. Otherwise `y` reaches the new
value at the end of the window.

### Ports of `ht_guard_top`

| port | dir | width | meaning |
|---|---|---|---|
| `x` | in | 5 (`ht_pkg::clc_in_t`, `x4`..`x0`) | primary inputs |
| `trojan_out` | in | 1 | output of the Trojan logic (not part of the design) |
| `y` | out | 1 | function output |
| `trig_e` | out | 1 | trigger condition on `x0` detected (`E`) |

Parameter: `INV_DELAY_PS` (int unsigned, default 100).

## Where this model makes its own choices

* **Multiplexer wiring.** The source schematic shows a multiplexer with
  select `E`. Its input 1 comes from the Trojan logic, and its input 0 is
  labelled. The schematic does not show clearly how input 0 and the output
  connect to the `~x0` AND gate. This model wires it so that the circuit
  computes the specified function whenever `E = 0`: input 0 is the inverter
  output, and the output is the `~x0` rail of the function. An extra
  XOR-type gate drawn between the multiplexer and the `~x0` AND gate is
  therefore not modelled.
* **The Trojan** is not part of the design. Its output is a top-level input.
  The test drives it as an adversary, with both values in every window.
* **Delay.** The design gives no delay value. 100 ps is this model's choice.
  Only the `x0` inverter is given a delay. Every other gate is zero-delay, so
  the windows in simulation come from that inverter alone. The complements of
  `x1`, `x2` and `x4` are formed inside `hazard_free_clc` and are not
  guarded.
* **`trig_e` is a port**, so that the detection can be seen. The design does
  not say what consumes `E`.
* **Don't-care 5** is set to 1, as described above.
* **Not built:** the generic Trojan threat model (Trojan logic XORed onto a
  block's output) and the unprotected five-term circuit. The testbenches
  model the unprotected circuit as a reference.

`inv_delay` is not synthesizable as intended. A synthesis tool keeps
`y = ~a` and drops the delay. The other modules are plain synthesizable
combinational logic. Synthesis may also remove the consensus term as
logically redundant, which would bring the hazard back. A real
implementation must keep it, for example with a keep/dont_touch attribute in
the target flow.

## Files

| file | contents |
|---|---|
| `rtl/ht_pkg.sv` | `clc_in_t`, the packed struct of the five inputs |
| `rtl/hazard_free_clc.sv` | the hazard-free function, `~x0` rail as input |
| `rtl/trigger_detect.sv` | XNOR trigger detector, `WIDTH` rail pairs |
| `rtl/trigger_mux.sv` | `E`-steered 2:1 multiplexer |
| `rtl/inv_delay.sv` | inverter with propagation delay (behavioural) |
| `rtl/ht_guard_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Delays need `--timing`:

```
verilator --binary --timing --assert rtl/ht_pkg.sv rtl/inv_delay.sv \
  rtl/trigger_detect.sv rtl/trigger_mux.sv rtl/hazard_free_clc.sv \
  rtl/ht_guard_top.sv tb/tb_ht_guard_top.sv --top-module tb_ht_guard_top
./obj_dir/Vtb_ht_guard_top
```

For a single block, list `rtl/ht_pkg.sv`, the block's file and its
testbench.

What the tests cover:

* `tb_hazard_free_clc`: all 32 inputs with a correct rail. All 32 with the
  rail equal to `x0`, checked wherever `f` is static. The three hazard pairs
  in both rail states. The reference five-term circuit glitches on each
  pair.
* `tb_trigger_detect`: the four-row table, plus all 256 input patterns of a
  4-bit instance.
* `tb_trigger_mux`: all 8 input patterns.
* `tb_inv_delay`: the output still holds its old value 10 ps before the
  delay has passed and has switched 10 ps after. A 100 ps pulse is
  absorbed (250 ps delay in this test).
* `tb_ht_guard_top`, at default parameters: all 16 values of `x4..x1`, both
  `x0` edge directions and both Trojan values. It checks `trig_e` at the
  edge, just before and just after one delay, and `y` inside and after the
  window. It counts triggers (64: 32 with both rails at 1 after a rising
  edge, 32 with both at 0 after a falling edge) and Trojan values that
  differ from the honest rail (32). It also counts static-1 holds (16, 12 of
  them on the hazard pairs), static-0 holds (4) and output transitions (44).
  The last count is output flips the Trojan would have caused in the
  unprotected circuit (3, one per hazard pair). Each count must be
  non-zero.

## Limits

The protection holds for a Trojan that acts through the rails of the
guarded input during that input's window. It is not a general Trojan
detector. A Trojan that changes the function's logic itself is outside this
model, and so is one that acts on an unguarded input or on a gate's internal
delay. The zero-delay gates mean that hazards from unequal path delays
inside the function are not simulated. Only the `x0` complement rail is
skewed. To guard another input, add the consensus terms for that input, give
it an `inv_delay`, and widen `trigger_detect`.
