# RD53SEU test structures: triplicated registers and SET pulse analyzers

Readout chips for pixel detectors protect their configuration registers and
state machines with triple modular redundancy (TMR): each bit is stored three
times and a majority voter picks the value two copies agree on. Whether that
works in practice depends on layout and clocking details. If the three copies
sit too close together, one particle can upset two of them. If a glitch on the
combinational logic reaches all three copies at one clock edge, voting does
not help. The clock of each copy can be delayed so that the copies sample at
different times.

This RTL models the digital content of a small 65 nm test chip that measures
these effects. It holds 18 shift registers of 1024 triplicated bits. They
differ in TMR version, memory element and copy spacing. Each one is loaded
with a known pattern, left in the beam, read back and compared. Two further
structures measure the width of single-event transients (SETs), the short
glitches a particle causes in combinational logic.

## The three TMR versions

Every bit is three memory elements and a two-out-of-three voter
(`majority_voter`). A shift-register bit loads its input when `SHIFTEN` is
high. When `SHIFTEN` is low it reloads a hold value, and the hold value is what
tells the versions apart (`tmr_ff_cell`):

| version | hold value of each copy | effect of an upset copy |
|---|---|---|
| no correction (`TMR_NO_CORR`) | its own value | stays wrong until the next shift. The voter hides it, but a second upset in the same bit shows. |
| correction (`TMR_CORR`) | the voted value | repaired at the next clock edge. |
| clock skew (`TMR_SKEW`) | its own value | as without correction. In addition, copy 1 is clocked `delay 1` after copy 0 and copy 2 `delay 2` after it. A glitch shorter than `delay 1` on the data path can then reach only one copy. |

The skew delays are the chip's three pairs, 0.25/0.5 ns, 0.5/1.0 ns and
1.0/2.0 ns. They sit on the clock lines of copies 1 and 2 (`delay_cell`).

A skewed register needs hold margin. Suppose a bit's voted output changes
after copy 1 of that bit has clocked. Copy 2 of the next bit would then sample
the new value one cycle early. To prevent this, the path from each bit to the
next passes through a hold buffer of 2.5 ns (`HOLD_BUFFER_PS`), which is longer
than the largest clock delay. This sets the clock limit for skewed structures:
the period must exceed 2.5 ns + 2 ns, so the clock must be slower than about
220 MHz. The testbenches run at 100 MHz.

## Memory elements

- **D flip-flop** and **D flip-flop with asynchronous reset**
  (`ASYNC_RESET`). The reset is active low, clears to 0 and uses the `RESETB`
  pin. Both are built as `tmr_ff_cell` banks that form the shift chain
  directly.
- **Standard latch** and **custom latch.** A latch cannot shift, so a latch
  structure has two parts:
  - a chain of plain flip-flops used only as the access path;
  - a `tmr_latch_cell` bank of 1024 triplicated latches.

  `LOAD` (a level) makes the latches transparent, so they copy the chain.
  `READBACK` (one clock edge, priority over `SHIFTEN`) copies the voted latch
  values back into the chain, which is then shifted out. An upset in the
  access chain during exposure is therefore overwritten and not counted. The
  latches have no correction loop, because feeding the vote back through a
  transparent latch would make a combinational loop. The two latch flavours
  differ only as layout cells and share one model.

The three copies carry a `keep` attribute. Without it a synthesis tool merges
identical registers back into one.

## The 18 structures

`rd53seu_pkg::structure_cfg` holds the structure table. `SEL` on the chip
pins takes the structure number:

| SEL | version | element | copy spacing |
|---|---|---|---|
| 0-2 | no correction | DFF | 5 / 10 / 15 µm |
| 3-5 | correction | DFF | 5 / 10 / 15 µm |
| 6-8 | correction | DFF with async reset | 5 / 10 / 15 µm |
| 9-11 | no correction | standard latch | 5 / 10 / 15 µm |
| 12-14 | no correction | custom latch | 5 / 10 / 15 µm |
| 15-17 | clock skew | DFF | 10 µm; delays 0.25/0.5, 0.5/1.0, 1.0/2.0 ns |

The spacing between copies is a placement constraint. It has no logic effect,
and each instance carries it only as the label `SPACING_UM`. This particular
assignment of 18 combinations is this design's choice. The combinations it
draws from (three TMR versions, four elements, three spacings, three delay
pairs) are fixed.

## Pins and test sequence

`rd53seu_top` brings out these pins:

- `CLOCK`, `RESETB`, `SHIFTEN`, `LOAD`, `SHIFTIN`, `READBACK`, `SEL[4:0]` and
  `SHIFTOUT` for the 18 structures;
- dedicated pins for each SET structure.

`structure_select` routes `SHIFTEN`, `LOAD`, `READBACK` and `SHIFTIN` to the
selected structure and drives zeros to all the others, so they hold. It also
puts the selected structure's serial output on `SHIFTOUT`. `CLOCK` reaches all
structures directly. A `SEL` of 18 or more selects nothing.

A measurement with structure `s`:

1. Set `SEL = s`. Change pins away from the rising `CLOCK` edge; the benches
   use the falling edge.
2. Hold `SHIFTEN` high for 1024 clocks while presenting the pattern on
   `SHIFTIN`, one bit per clock.
3. Latch structures only: pulse `LOAD`.
4. Set `SHIFTEN` low for the exposure.
5. Latch structures only: hold `READBACK` high for one clock.
6. Hold `SHIFTEN` high for 1024 clocks. Sample `SHIFTOUT` before each clock.
   Bits come out in the order they went in: the first bit shifted in is on
   `SHIFTOUT` right after loading.

Comparing the read pattern with the written one gives the bit-flip count. That
count is the job of the external readout system, and the testbench does it
here.

## SET pulse-width structures

Each SET structure is a target block feeding an analyzer. These are
behavioural models: their function rests on gate delays, which only a layout
sets.

- `set_target_logic` is an even chain of inverters. A particle hit is modelled
  by an internal `strike` variable that inverts one inner node while it is
  set. A testbench drives `strike` through a hierarchical reference.
- `set_trigger_capture` feeds the pulse into 40 inverter stages of 40 ps, with
  a latch on every stage. When the pulse's leading edge leaves stage 40, it
  clocks a trigger flip-flop. Ten picoseconds later the flip-flop closes all
  latches. The pulse then lies over the last stages of the chain.
  `SET_TC_CAPTURED` shows it as a block of ones of length
  `ceil((w − 10 ps) / 40 ps)`, which gives the width `w` to one stage.
  Pulses up to 1.6 ns fit. `SET_TC_CLEAR` re-arms the analyzer.
- `set_temporal_filter` has eight stages in parallel. Each ANDs the pulse with
  a delayed copy of itself, so only pulses longer than that stage's delay
  pass. The delays are 50, 100, 200, 300, 400, 500, 650 and 800 ps. A passing
  pulse sets that stage's sticky flip-flop. `SET_TF_HIT` is therefore a
  thermometer code of the widest pulse seen since `SET_TF_CLEAR`.

Both analyzers have flip-flops that are cleared only by their clear pin.
Pulse clear once after power-up.

`delay_cell` models every delay as an inertial delay. A pulse shorter than
the delay does not come out, as with a slow buffer chain. Synthesis reduces it
to a wire.

## How far it can be trusted

These parts follow the source design:

- the 1 kb length and the 18 structures;
- the three TMR versions and how their correction works;
- the four memory-element types;
- the delay pairs;
- the pin set and the shared I/O;
- the 40 ps / 40-stage trigger-capture analyzer;
- the eight-stage temporal filter.

These are this design's own choices, made where the source is silent:

- the table assigning the 18 structures;
- the binary `SEL` pins;
- the `RESETB` pin (the source lists `CLOCK`, `SHIFTEN`, `LOAD`, `SHIFTIN` and
  `READBACK` as the only primary inputs);
- using the uncorrected cell as the base of the skewed version;
- the hold buffers;
- the latch access chain and `READBACK` timing;
- the inverter chain of the SET target;
- the 10 ps trigger delay and the parallel readout of the captured pattern;
- the eight filter delays and the parallel, sticky arrangement of the filter
  stages.

Layout effects are not modelled:

- copy spacing;
- multiple-bit upsets from one strike;
- the SEU sensitivity of the trigger-capture latches.

Upsets are injected in simulation instead.

In the RTL each structure's bits are vectors: one `tmr_ff_cell` or
`tmr_latch_cell` bank per structure, holding three copy vectors. The logic per
bit is the same as with one instance per bit.

## Files and simulation

`rtl/`:

| file | contents |
|---|---|
| `rd53seu_pkg.sv` | enums, structure table, sizes |
| `majority_voter.sv` | 2-of-3 voter |
| `tmr_ff_cell.sv` | bank of triplicated flip-flops, three versions, two flavours |
| `tmr_latch_cell.sv` | bank of triplicated latches |
| `delay_cell.sv` | behavioural delay (clock skew, hold buffers, SET delays) |
| `tmr_shift_register.sv` | one 1 kb structure |
| `structure_select.sv` | pin demultiplexer and output multiplexer |
| `set_target_logic.sv`, `set_trigger_capture.sv`, `set_temporal_filter.sv` | SET structures (behavioural) |
| `rd53seu_top.sv` | the chip |

Each module has a self-checking testbench `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`. `tb/rd53seu_top_tb.sv` runs the whole chip at
full size through its pins. For every structure it:

- loads a random pattern, then injects three upsets: one in a single copy,
  one in two copies of a bit, and, in latch structures, one in the access
  chain;
- checks correction or persistence, the reset, and the clock order of the
  skewed structures;
- forces a 200 ps transient on the data path into one bit of each
  flip-flop structure at a read-out clock edge;
- reads the pattern back and counts flipped bits: one (the double upset) in
  latch and skewed structures, two in the unskewed flip-flop structures, which
  capture the transient in all three copies.

It then checks that an unselected structure kept its data and runs both SET
analyzers. It counts each of these mechanisms and fails if one never happens.
`tb/tmr_shift_register_tb.sv` also shows the point of clock skew. A 200 ps
glitch on the data path at a clock edge is taken by all copies of an unskewed
structure, but by only one copy of a skewed one.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/rd53seu_pkg.sv \
  tb/rd53seu_top_tb.sv --top rd53seu_top_tb -o sim && ./obj_dir/sim
```

The full-size run builds in under a minute and simulates in a few seconds.
Put `rtl/rd53seu_pkg.sv` first on the command line. `-Wno-fatal` is needed
because the testbenches inject upsets by writing memory elements from outside,
which Verilator reports as a second driver. Every file sets
`timescale 1ps/1ps`, and delays are given in picoseconds.
