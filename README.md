# Clock-gated 8-bit serial shift register

A shift register clocks every flip-flop on every cycle, yet in most cycles
most of its bits do not change: a run of equal bits on the serial input
leaves the whole chain rewriting the value it already holds. This design
removes those useless clock edges. Each flip-flop gets its own clock gate,
which opens only when the flip-flop's data input differs from the value it
stores. A flip-flop whose next value equals its present value sees no clock
edge at all, so the clock tree's switching power falls with the data's
activity: for a constant input the chain's flip-flops receive no clock
edges, for random data about half of them, for alternating data about 90%.

The register is serial-in, serial-out and shifts "left": stage 0 takes the
serial input `si`, stage k takes the output of stage k-1, and the last stage
(stage 7) drives the serial output `so`.

## The per-stage clock gate

`clk_gate_xor` is two gates:

    en   = op ^ i          // op: flip-flop output, i: flip-flop data input
    oclk = ~(en & clk)     // local clock of that flip-flop

The XOR is the data-driven enable. The NAND does the gating, and it also
inverts the clock. This has two effects that anyone changing the design
needs to know.

**The chain updates on the falling edge of `clk`.** With the gate open,
`oclk` is `~clk`, so the positive-edge flip-flop behind it captures when
`clk` falls. With the gate closed, `oclk` rests at 1 and no edge reaches
the flip-flop.

**The enable may only change while `clk` is low.** While `clk` is low,
`oclk` is 1 whatever the enable does. While `clk` is high, `oclk` equals
`~en`. A falling enable then makes a false rising edge, and a rising enable
shortens the clock pulse. Inside the chain this rule holds by construction:
every flip-flop changes right after the falling edge of `clk`, while `clk`
is low, so all enables also change while `clk` is low. The one exception is
the serial input, which feeds stage 0's gate directly. Change `si` only
while `clk` is low, and set it up before the falling edge. An assertion in
`gated_shift_reg` reports any change of `si` while `clk` is high.

A gate that is closed when `clk` falls is always correct to skip. It is
closed only when the flip-flop's input already equals its output, so a
clock edge would have rewritten the same value.

The gate is plain combinational logic, without the latch that a standard
library clock-gating cell holds. That is a faithful model of the circuit
this register is built from, and the timing rule above is the price. If
the register has to accept an input that changes at any time, the
replacement is a latch-based cell (latch the enable while `clk` is low).
That cell would not change the function, only how the gate is built.

## Timing at the interface

| event | when |
|---|---|
| `si` sampled | falling edge of `clk` |
| `si` may change | only while `clk` is low (e.g. just after the falling edge) |
| `so` changes | just after a falling edge of `clk` |
| latency `si` to `so` | 8 cycles: a bit sampled at falling edge n appears on `so` after falling edge n+7 |
| throughput | one bit in and one bit out per clock cycle |

The register was characterised at a 50 MHz clock; the RTL has no timing of
its own beyond the rules above.

## Reset

`rst_n` is an asynchronous, active-low reset that clears every stage to 0.
It acts on the flip-flops directly and does not need the gated clocks, so it
works even while every gate is closed. The reset is an addition of this
design: the original circuit has none and relies on shifting known data in.
Assert and release it while `clk` is low. Releasing it while `clk` is high
could open stage 0's gate while `clk` is high; the `si` assertion does not
cover that case.

## Modules

| module | function |
|---|---|
| `gated_shift_reg` | top: parameter `WIDTH` (default 8); the chain of `WIDTH` stages, each a `clk_gate_xor` plus a `shift_dff`; ports `clk`, `rst_n`, `si`, `so` |
| `clk_gate_xor` | per-stage gate, `oclk = ~((op ^ i) & clk)` |
| `shift_dff` | positive-edge D flip-flop with asynchronous clear; ports `c`, `rst_n`, `i`, `o` |

Inside the top, `d[0]` is `si`, `d[k+1]` is the output of stage k, and
`gclk[k]` is stage k's local clock. `so` is `d[WIDTH]`. Only the serial
output is brought out; the stages can be watched through `d`.

The default configuration is 8 flip-flops with asynchronous reset, 8 XOR
gates and 8 NAND gates.

## Where this design departs from the circuit it follows

- **Gate pairing.** The gate of stage k compares stage k's own data input
  with its own output. This is the pairing that makes the gating correct. A
  pairing that is off by one stage clocks a flip-flop based on a
  neighbour's change, and it loses data.
- **Reset.** The asynchronous reset was added, as described above.
- **Clock edge.** The register as a whole is described as a positive-edge
  shift register. With the NAND gate it updates on the falling edge of the
  global clock. The gate was kept as designed, and the interface is
  specified on the falling edge.
- **Power.** The circuit's power was measured in a 45 nm process at 50 MHz
  and 0.8 V to 1.5 V supply, with a reduction of 42% to 91% against the
  ungated register. RTL cannot reproduce such figures. The end-to-end
  testbench instead counts the flip-flop clock edges, which are the part
  of clock power that gating removes. The input pattern behind the measured
  figures is not known, so the counts cannot be compared with them
  directly.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog.

- `tb_clk_gate_xor`: all eight input combinations of the gate, in fixed and
  random order, against the gating rule.
- `tb_shift_dff`: capture on the rising edge, no change between edges or on
  the falling edge, and asynchronous clear without a clock.
- `tb_gated_shift_reg`: the whole register at its default size with a 50 MHz
  clock. After every falling edge it compares all eight stages and `so` with
  its own model of a plain shift register. It also checks that each stage
  received exactly one local clock edge if its bit changed and none if it
  did not. It measures the 8-cycle latency and includes a reset in the
  middle of a stream. For each input pattern it prints the local clock edges
  against the 8 per cycle of an ungated register. A typical run:

      zeros        cycles=40  local clock edges=0    ungated=320  (0% of ungated)
      ones         cycles=40  local clock edges=8    ungated=320  (2% of ungated)
      alternating  cycles=40  local clock edges=292  ungated=320  (91% of ungated)
      random       cycles=400 local clock edges=1698 ungated=3200 (53% of ungated)

  (The 8 edges under "ones" are the chain filling up with ones after the
  zeros.)

To simulate with Verilator from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        --top-module tb_gated_shift_reg tb/tb_gated_shift_reg.sv
    ./obj_dir/Vtb_gated_shift_reg

Replace the testbench name to run the others. Each run takes well under a
second.

## Changing it

`WIDTH` sets the chain length; the logic and the latency scale with it. The
end-to-end testbench is written for the default of 8 (it checks this
first). To use an edge-triggered interface on the rising edge of a system
clock, drive `clk` with the inverted system clock. Then `si` must change
while the system clock is high.
