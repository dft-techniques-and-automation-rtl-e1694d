# Scan-testable NULL Convention Logic: a full-adder pipeline stage with test structures

NULL Convention Logic (NCL) is clockless. Every signal is dual-rail, every gate
is a threshold gate that *holds* its output, and the pipeline stages talk to
each other through a request/acknowledge handshake. That is exactly what a
conventional scan-based ATPG tool cannot handle: there is no clock to scan
with, each gate has a hidden state loop (its hysteresis), and the handshake
forms a second, global loop between stages. Faults on those loops can neither
be controlled nor observed.

This RTL implements an NCL pipeline stage — a dual-rail full adder between
two NCL registers — together with four test structures that make it
testable by standard scan ATPG:

| structure | what it fixes | module |
|---|---|---|
| control point on the handshake feedback | makes the global feedback controllable | `ncl_gfp_tp` |
| balanced XOR tree to one pin | makes many buried nets observable | `ncl_xor_tree` |
| scannable observation latch (SOL) | observes a group of nets through the scan chain | `ncl_sol` |
| scan cell in each gate's internal feedback | turns every stateful gate into a combinational gate plus a scan bit | `ncl_th_gif_scan` |

The first three belong to the "test point" approach; the fourth, the
gate-internal-feedback (GIF) scan, is the stronger one. All four are built
and on by default, and each can be switched off by a parameter.

## NCL in brief

A dual-rail bit `D` is the pair `{D^1, D^0}` (`ncl_pkg::dr_t`, rail 1 in the
upper bit): `01` is DATA0, `10` is DATA1, `00` is NULL, `11` is illegal. A
computation is a DATA wavefront followed by a NULL wavefront, alternately.

A THmn threshold gate asserts its output when at least m of its n inputs are
1 (the *set* condition f) and releases it only when *all* inputs are 0; in
between it holds:

    Z = f + g·Z⁻        g = OR of all inputs

TH23, for example, is `Z = AB + BC + AC + (A+B+C)·Z⁻`. `ncl_th_gate`
implements the general case, plus a weight on input 0 (TH34w2 counts its
first input twice). The `g·Z⁻` term is the gate-internal feedback; it is
written as a level-sensitive storage node, so lint reports one latch per
gate — that latch is the gate's hysteresis. A TH1n gate is a plain OR; it has
no real feedback.

## The pipeline stage

```
              +-----------+         +------------+         +------------+
  a, b, cin ->| input reg |-- ra -->| full adder |-- fs -->| output reg |-> s, cout
              | 3 x 1 bit |   rb    |  4 gates   |   fco   | 2 x 1 bit  |
              +-----------+   rc    +------------+         +------------+
               |ko    ^ ki_in                               |ko     ^ ki
               v      |                                     v       |
        ko <- CD_in   +------ XOR(tc) <------------------ CD_out    (consumer)
             (TH33)                                       (TH22) --> cd_po
```

* **1-bit register** (`ncl_reg_bit`): each rail goes through a TH22 gate
  (a C-element) with `ki` as second input. `ki = 1` (request for data, rfd)
  lets DATA through, `ki = 0` (request for null, rfn) lets NULL through.
  `ko = NOR(z^0, z^1)`: rfn while the register holds DATA, rfd while NULL.
  `rst` resets it to NULL.
* **Completion detector** (`ncl_completion`): a THNN gate over the bits' `ko`.
  It goes to rfd only when every bit is NULL and to rfn only when every bit
  is DATA.
* **Full adder** (`ncl_full_adder`):
  `cout^1 = TH23(a^1,b^1,cin^1)`, `cout^0 = TH23(a^0,b^0,cin^0)`,
  `s^0 = TH34w2(cout^1,a^0,b^0,cin^0)`, `s^1 = TH34w2(cout^0,a^1,b^1,cin^1)`.
  It is input-complete: outputs become all-DATA only after every input is
  DATA, and all-NULL only after every input is NULL.

Handshake seen from outside: wait for `ko = 1`, present DATA on `a`, `b`,
`cin`; the sum appears on `s`, `cout` and `ko` falls to 0; the consumer
drops `ki` to 0 when it has taken the result; the producer presents NULL; the
outputs return to NULL and `ko` rises; the consumer raises `ki` again. If the
consumer keeps `ki = 1` on a full output register the stage stalls: the
output holds and the input register refuses the next DATA until the consumer
lets the NULL through.

## The test structures

### Control point on the global feedback

The request from the output completion detector to the input register
passes through an XOR with the primary input `tc`. `tc = 0` in normal use.
During test `tc` can force either request level, so the tester controls a
net that otherwise depends only on the circuit's own state. With `tc = 1`
the input register ignores a waiting DATA wavefront.

### XOR tree

The six rails leaving the input register are folded into `xor_po` by a
balanced tree (three XORs, then one, then one with the carried signal). In
normal use `xor_po` is 1 while the register holds DATA (three bits, one rail
each) and 0 while it holds NULL.

### Scannable observation latch

The four rails leaving the full adder feed a 4-input NAND whose output is
the D input of a scan flip-flop (`ncl_scan_ff`: `scan_in`, `d`, `rst`, `clk`,
`scan_en`, `q`). The SOL is the first cell of the scan chain.

### Scan cells in the gate-internal feedback (the main technique)

This is the part that needs the most care. `ncl_th_gif_scan` wraps a
threshold gate so that its hysteresis term uses a scan flip-flop `Q`
instead of the gate's own past output:

    test_mode = 1:  Z = f + g·Q       (purely combinational from inputs and Q)
    test_mode = 0:  Z = ordinary hysteresis gate

On a `clk` edge with `scan_en = 0` the cell captures `Z`; with `scan_en = 1`
it shifts. So in test mode every stateful gate becomes combinational logic
plus one scan bit whose state the tester loads, and whose output the tester
captures — exactly what scan ATPG expects. Every gate with a threshold above
1 gets a cell (16 in this stage); TH1n gates would be left alone
(`ncl_gate` makes that choice).

A test cycle:

1. `test_mode = 0`, `scan_en = 1`: shift the 17-bit pattern in (17 clocks).
2. Apply the primary inputs (`a`, `b`, `cin`, `ki`, `tc`), set `test_mode = 1`.
   The primary outputs `s`, `cout`, `ko`, `xor_po`, `cd_po` can be compared now.
3. One `clk` edge with `scan_en = 0` captures every gate output and the SOL.
4. Set `test_mode = 0` and quiet the inputs in the same instant, then shift out.

**Caveat — the handshake loop stays closed in test mode.** The path input
register → adder → output register → completion detector → `tc` XOR →
input register is still a loop, now without hysteresis; with `tc = 0` it
inverts once and can oscillate. Patterns must leave it unsensitised. Two
easy ways, both used by the testbench:

* `ki = 0` and the four output-register cells loaded with 0: the output
  register is forced to 0 and the loop is cut there;
* each input-register cell loaded with its own input rail: each input-register
  rail then equals its input whatever `ki_in` does.

Leaving test mode while arbitrary (even illegal) values sit on the inputs is
also best avoided; the testbench drops `test_mode` and returns the inputs to
NULL in the same step.

### Scan chain map (all structures on)

| cell | 0 | 1–6 | 7 | 8 | 9 | 10 | 11–12 | 13–14 | 15 | 16 |
|---|---|---|---|---|---|---|---|---|---|---|
| what | SOL | A, B, Cin registers (rail 0, rail 1 each) | cout^0 | cout^1 | s^0 | s^1 | S register (rail 0, 1) | Cout register (rail 0, 1) | input completion | output completion |

`scan_in` enters cell 0; `scan_out` is cell 16. The first bit shifted in
ends in cell 16. `SCAN_CELLS` inside the top gives the count for any
parameter setting.

## Parameters and configurations

`ncl_adder_stage_dft` parameters, all `1` by default:

| parameter | when 0 |
|---|---|
| `GIF_SCAN` | gates keep their own hysteresis; `test_mode` has no effect |
| `USE_TP` | `tc` is ignored |
| `USE_XOR_TREE` | `xor_po` is tied to 0 |
| `USE_SOL` | no SOL; the chain starts at the first gate cell |

With all four at 0 the stage is the plain NCL circuit; chain lengths are 0
(none or control point and tree only), 1 (SOL only), 16 (GIF scan only) and
17 (all). The building blocks take their own parameters: `ncl_th_gate` and
`ncl_th_gif_scan` (`N`, `M`, `W1`, default TH23), `ncl_completion` (`N`),
`ncl_xor_tree` (`N`, default 6), `ncl_sol` (`G`, default 4).

## Files

`rtl/`: `ncl_pkg` (dual-rail type and helpers), `ncl_th_gate`, `ncl_scan_ff`,
`ncl_th_gif_scan`, `ncl_gate` (plain or scan gate by parameter), `ncl_reg_bit`,
`ncl_completion`, `ncl_full_adder`, `ncl_gfp_tp`, `ncl_xor_tree`, `ncl_sol`,
`ncl_adder_stage_dft` (top).

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_ncl_adder_stage_variants.sv`, which runs the four configurations side by
side, and `tb_ncl_gate.sv`, which checks that a TH1n gate gets no scan cell. Each prints `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5 with timing support:

    verilator --binary --timing --assert -Irtl rtl/ncl_pkg.sv \
        tb/tb_ncl_adder_stage_dft.sv --top-module tb_ncl_adder_stage_dft
    ./obj_dir/Vtb_ncl_adder_stage_dft

Replace the testbench name for any other block. The end-to-end testbench
runs the top at its default parameters: all eight operand combinations and
random ones as DATA/NULL wavefronts, forced stalls, the control point
blocking and releasing the input register, chain length and reset, and 300
random scan patterns whose captured values (all 17 cells) and test-mode
outputs are compared against a gate-level model built in the testbench from
the threshold equations. It counts how often each mechanism occurred and
fails if any never did. It finishes in well under a second.

Lint reports a circular-logic warning on the top: that is the handshake
loop, intended. It also reports one latch per threshold gate: the hysteresis.

## How far to trust it, and where it departs

Follows the method: threshold-gate behaviour and TH23 structure; the register
handshake levels; the completion-detector role; the XOR control point with
`tc = 0` in normal use; the balanced XOR tree; the SOL as a NAND of four nets
into a scan flip-flop with `scan_in`/`scan_en`/`RST`/`CLK`; a scan cell in the
feedback of every gate other than TH1n, buffer-like in normal use and part of
the chain in test.

Design choices of this implementation:

* The GIF cell is an edge-triggered mux-D flip-flop (the same cell as the SOL),
  not a level latch, and a separate `test_mode` pin selects its feedback.
* Full-adder, register and completion-detector gate structures are the
  common NCL forms (TH23/TH34w2 adder, TH22 register rails, one THNN detector).
* Which nets feed the SOL (the adder outputs), the chain order, reset of every
  gate and cell by `rst`, and using all techniques together.
* The `cd_po` observation pin for the output completion detector.

Not built: the 4×4 dual- and quad-rail multipliers and the 72+32×32
multiply-accumulate unit that such test structures are normally evaluated
on, and the software that inserts the structures and runs ATPG. Fault
coverage figures are ATPG results and are not reproduced by simulation.

Verification is by simulation only: each module's testbench compares it
against an independent model and has been shown to fail on a deliberately
broken copy of the module. Nothing here has been through timing analysis or
a real NCL cell library; the RTL models gate behaviour, not delay
insensitivity under arbitrary wire delays.
