# Reversible-logic universal shift register

This is a 4-bit universal shift register built only from reversible gates. A
reversible gate has as many outputs as inputs, and its output pattern determines
its input pattern, so it erases no information. Reversible circuits are of
interest for very-low-power, quantum and optical logic. Building them costs two
things: **constant inputs**, which are fixed 0/1 lines fed in to make a function
reversible, and **garbage outputs**, which are outputs the circuit does not need
but cannot drop.

The idea behind this design is that almost everything is a multiplexer. A Fredkin
gate is already a 2-to-1 mux. Three of them make a 4-to-1 mux. Two muxes with
feedback make a master-slave D flip-flop. A Feynman gate, the reversible
controlled-NOT, copies each latch's output, because reversible logic does not
allow plain fan-out. Four 4-to-1 muxes and four such flip-flops make the register.

## Gates

| module         | inputs  | outputs                                  |
|----------------|---------|------------------------------------------|
| `fredkin_gate` | a, b, c | p = a, q = a'b ^ ac, r = a'c ^ ab        |
| `feynman_gate` | a, b    | p = a, q = a ^ b                         |

The Fredkin gate is a controlled swap: it passes b and c through when a = 0 and
exchanges them when a = 1. With b = 0, the Feynman gate outputs two copies of a.

## Multiplexers

* `fredkin_mux2`: the select goes to the gate's control pin, and the two data
  inputs go to b and c. Output q is then `s ? b : a`. The other two outputs (the
  select, and the input that was not chosen) are garbage. They are brought out as
  `garbage[1:0]`. No constant inputs are needed.
* `fredkin_mux4`: a two-level tree. Two muxes steered by `s0` pick `d[0]`/`d[1]`
  and `d[2]`/`d[3]`. A third mux, steered by `s1`, picks between them, so
  `y = d[{s1,s0}]`. It has three gates and six garbage outputs (`garbage[5:0]`).

## The flip-flop (`mux_dff`)

The flip-flop is the least obvious part. Each latch is a Fredkin mux whose
control input is the clock. One data pin takes the new value. The other takes the
latch's own output, looped back through a Feynman copy:

```
 master:  m = clk ? d : m        (Fredkin f1, Feynman f3 splits m)
 slave:   q = clk ? q : m        (Fredkin f2, Feynman f4 splits q)
```

Both gates see the same `clk` on their control pin. The slave acts as if it were
clocked by `clk'` because its data pins are in the opposite order, so no inverter
is needed. The master is transparent while `clk` is high and the slave while it
is low. They are never open together, so **q takes the value d had at the falling
edge of clk** and holds it for a full period. The source design does not name
the active edge; falling-edge capture follows from this gate wiring. The flip-flop
uses 2 Fredkin gates, 2 Feynman gates, 2 constant-0 inputs and has 4 garbage
outputs (`garbage[3:0]`).

Each storage loop is a real combinational loop: a gate output wired back to its
own input. Lint tools report it (Verilator UNOPTFLAT, yosys "logic loop"), and
this is expected. The loop settles at once in simulation. Synthesis for an FPGA
or a standard-cell library would turn it into a latch built from gates, not a
flip-flop. The RTL models the gate structure rather than targeting such a flow.

The flip-flop has no reset. Its state after power-up is whatever the loops settle
to.

## The register (`universal_shift_reg`)

Bit `i` is one `fredkin_mux4` feeding one `mux_dff`. All muxes share `s1`, `s0`:

| s1 s0 | mux input | operation     | next `q`                   |
|-------|-----------|---------------|----------------------------|
| 0 0   | 0         | no change     | `q`                        |
| 0 1   | 1         | shift left    | `{q[W-2:0], sil}`          |
| 1 0   | 2         | shift right   | `{sir, q[W-1:1]}`          |
| 1 1   | 3         | parallel load | `pin`                      |

`q[W-1]` is the leftmost stage. When shifting right, the serial input `sir`
enters there. When shifting left, `sil` enters the rightmost stage `q[0]`. These
four transfers give the usual serial-in serial-out, serial-in parallel-out,
parallel-in serial-out and parallel-in parallel-out uses.

Ports: `clk`, `s1`, `s0`, `sir`, `sil`, `pin[WIDTH-1:0]`, `q[WIDTH-1:0]`.
Parameter: `WIDTH` (default 4, the size of the original design).

Timing: drive the selects, serial inputs and `pin` while `clk` is high, and keep
them stable through the falling edge. The new contents appear on `q` just after
that edge.

At `WIDTH = 4` the register has 28 gates: 12 Fredkin gates in the muxes, plus
8 Fredkin and 8 Feynman gates in the flip-flops. It has 8 constant inputs.

## Where this departs from, or goes beyond, the source design

* **Garbage count.** The original text gives two counts. One is 6 garbage outputs
  per 4-to-1 mux. The other is a register total of 20, which assumes 1 per mux.
  This RTL follows the gate structure: every unused gate output is a garbage
  output. That gives 6 per mux, 4 per flip-flop and 40 for the register. Inside
  the register they are left unconnected, so Verilator reports empty pin
  connections.
* **Serial inputs.** The register has two separate serial inputs, `sir` and
  `sil`, one for each shift direction. The original drawing shows one serial
  arrow at each end.
* **Fan-out.** Each flip-flop output drives its own mux, its neighbours' muxes
  and the output port directly. The original design uses Feynman copies only
  inside the flip-flop and does not address fan-out in the register.
* **Clock edge.** The register captures on the falling edge, as described above.
* **Width.** `WIDTH` is a parameter. Only the 4-bit register was designed
  originally.
* **Other gates.** Only Fredkin and Feynman gates are used. Other common
  reversible gates (double Feynman, Peres, Toffoli) are not needed and are not
  provided.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`:

* `tb_fredkin_gate`, `tb_feynman_gate`, `tb_fredkin_mux2`, `tb_fredkin_mux4`: all
  input patterns. For the Fredkin gate the test also checks that the mapping is a
  bijection, which is what makes it reversible.
* `tb_mux_dff`: 400 clock periods. `d` changes at random times in both clock
  phases, and `q` is checked before and after each change and around each edge
  against a bit sampled at the falling edge.
* `tb_universal_shift_reg`: the register at its default width. It runs directed
  load/hold, serial-in, parallel-to-serial and serial-to-serial sequences with
  hand-worked values, then 2000 random cycles against a behavioural model. It
  checks that `q` does not change before the falling edge and is correct 1 ns
  after it. It counts each mode and each serial-in end, and fails if one was never
  used.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_universal_shift_reg \
  -y rtl -y tb +libext+.sv tb/tb_universal_shift_reg.sv
./obj_dir/Vtb_universal_shift_reg +verilator+rand+reset+2
```

`-Wno-fatal` is needed because of the deliberate latch loops described above.
