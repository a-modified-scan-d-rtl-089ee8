# Low-leakage scan flip-flops: parking the logic during scan shift

In scan test, every clock of a scan shift moves new bits through all the
flip-flops of the chain. In an ordinary mux-D scan flip-flop those bits also
appear on the functional output Q, so the combinational logic behind the
flip-flops switches on every shift clock, although nothing it computes is
used until the capture clock. That switching dominates test power, and it
limits how fast the chain can be shifted.

This design gates the functional output of each scan flip-flop. While scan
enable (SE) is high a transmission gate disconnects Q from the storage
element and a single transistor holds Q at a constant: a pull-up cell parks Q
at 1, a pull-down cell parks Q at 0. The logic therefore does not switch at
all during shift. Because each flip-flop can be built as either kind of
cell, the parked values form an arbitrary input vector for the logic. This
vector can be chosen as the one that makes the logic leak least, rather than
the all-zero vector that gating with an AND gate or an extra latch imposes.
The cost is three transistors per flip-flop.

The RTL models the two cells at the logic level, builds a scan chain from
them with a per-bit choice of cell, and adds a small sequencer that runs
test-per-scan on the chain.

## Files

| file | contents |
|---|---|
| `rtl/scan_dff_pullup.sv` | scan flip-flop with Q parked at 1 while SE=1 |
| `rtl/scan_dff_pulldown.sv` | scan flip-flop with Q parked at 0 while SE=1 |
| `rtl/lowleak_scan_chain.sv` | chain of `CHAIN_LEN` cells; `PARK_PATTERN[i]` picks the cell type of bit i |
| `rtl/scan_test_sequencer.sv` | scan-enable sequencer: `CHAIN_LEN` shift clocks, then one capture clock |
| `rtl/lowleak_scan_pkg.sv` | the sequencer's phase type |
| `rtl/lowleak_scan_top.sv` | top: sequencer plus chain, logic under test connected outside |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the workload and full-size runs |

## The cell

Both cells have the pins `clk`, `d`, `sd`, `se`, `q` and `sq`:

```
            se
            |
  d  --|0\  |    +------+        transmission gate
       |  |-+--->| D  Q |---+----[ on while se=0 ]----+---- q
  sd --|1/       |  >   |   |                         |
                 +------+   |          pull-up (on while se=1) to 1
  clk -------------^        |       or pull-down (on while se=1) to 0
                            +--------------------------------- sq
```

* `sq` is the stored bit at all times. It feeds the next cell's `sd`, so
  shifting is unaffected by the gating.
* `q` is the stored bit while `se=0`, and the cell's constant (1 or 0) while
  `se=1`. In RTL this is `q = se ? PARK : state`. It depends on `se` without
  a clock: the logic is parked as soon as `se` rises and sees the stored bit
  as soon as `se` falls.
* The flip-flop loads on the rising edge of `clk`: `sd` when `se=1`, `d`
  when `se=0`.
* There is no reset; a cell's content is undefined until it is loaded.

In silicon the parked value is held by one transistor while the
transmission gate is open. The RTL shows the logic function only. It says
nothing about the strength of the pull transistor, the gate's resistance in
the Q path, or the extra delay from the flip-flop to Q. Those would need a
transistor-level check of the real cell.

## Choosing the park pattern

`lowleak_scan_chain` takes `PARK_PATTERN`, a vector with one bit per cell:
bit i = 1 places a pull-up cell at position i, bit i = 0 a pull-down cell.
During every shift clock `q == PARK_PATTERN`. An immediate assertion in the
chain checks this in simulation.

The pattern is a property of the logic behind the chain, not of the chain,
and it is found offline. The method is to characterise the leakage of each
library cell per input state and map the logic onto those cells. Then
evaluate the total leakage for many input vectors (for example 10,000
random ones, or all of them for a small block) and keep the lowest. The
leakage figures used in the testbench are 65 nm values, in nW:

| cell | input 0 / 00 | 1 / 01 | 10 | 11 |
|---|---|---|---|---|
| INV | 3.912 | 29.17 | | |
| NAND2 | 0.93 | 10.5 | 3.96 | 61.7 |
| NOR2 | 7.92 | 29.62 | 12.7 | 2.81 |

No single value suits every gate: a NAND2 leaks least with both inputs at 0
and a NOR2 with both at 1. This is why a free choice per input pays off over
parking everything at 0. The savings reported for this technique on
ISCAS-85 and MCNC combinational benchmarks range from none (where all zeros
is already the best vector) to about 69 %, with most below 20 %.

`tb/tb_c17_park_workload.sv` carries out the procedure on the ISCAS-85 C17
circuit (six NAND2 gates). It finds the park vector with a constant function
at elaboration time and builds a 5-cell chain with it. With the first digit
of the NAND2 state read as the gate's first listed input, the best vector
sets only input N2 to 1. C17 then leaks 81.98 nW while shifting, against
139.72 nW parked at all zeros. Over 150 shift clocks the parked circuit's
nets make no transition at all. The same shifts through ungated flip-flops
would have made 693.

The default `PARK_PATTERN` is all zeros, which behaves like conventional
gated scan cells. Set it for the logic at hand.

## Test-per-scan timing

`scan_test_sequencer` produces the scan enable. While `test_mode` is high it
repeats a period of `CHAIN_LEN + 1` clocks:

| clock in period | `se` | `capture` | what happens |
|---|---|---|---|
| 0 .. CHAIN_LEN-1 | 1 | 0 | one bit in at `scan_in`, one bit out at `scan_out`; `q` parked |
| CHAIN_LEN | 0 | 1 | `q` shows the loaded pattern; the rising edge at the end captures `d` |

One pattern is therefore applied every m+1 clocks for an m-cell chain. The
logic switches only in the capture clock: once when `se` falls and the loaded
pattern replaces the park pattern, and once when `se` rises again. The clock
that samples a rising `test_mode` is still a functional clock (`se=0`).
Dropping `test_mode` returns to functional mode (`se=0`, registers load
`d` every clock) at the next edge, whatever the phase. `rst_n` is an
asynchronous, active-low reset into functional mode. Concurrent assertions
state that a capture is always followed by a fresh load and that `se` and
`capture` are never high together.

## Top level

`lowleak_scan_top` joins the sequencer and the chain. The combinational
logic under test is not part of this RTL. Connect its inputs to `func_q` and
its outputs to `func_d` (one register per logic input, the logic's outputs
captured back into them). A tester drives `test_mode` and
watches `se` and `shift_idx`. On each shift clock it presents bit `shift_idx`
of the next pattern on `scan_in` and reads the previous response on
`scan_out`. Bit k of a load (k = 0 first) ends in cell `CHAIN_LEN-1-k`.
`scan_out` shows cell `CHAIN_LEN-1` first.

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `CHAIN_LEN` | 207 | number of scan cells |
| `PARK_PATTERN` | all zeros | parked value per cell (1 = pull-up cell) |

The default of 207 cells is enough for one cell per primary input of each of
the 18 benchmark circuits the technique was evaluated on. The largest are
C7552 with 207 inputs and i2 with 201. At the defaults the top synthesises
to 207 flip-flops for the chain, 414 one-bit multiplexers and a small
counter.

## What is specified and what was chosen here

Taken from the technique as described: the cell structure (input mux, flip-flop,
scan output before the gate, gated Q parked at 1 or 0 during shift), the
use of both cell types to hold the logic at its least-leakage vector, the
leakage tables above and the m+1 test-per-scan period.

Choices of this design: SE=1 meaning shift, the rising clock edge, no reset in
the cells, the order of the chain, a single chain, the sequencer and its
`test_mode` interface, the defaults of `CHAIN_LEN` and `PARK_PATTERN`, and in
the workload testbench the C17 netlist and the pin order of the NAND2 table.

Not modelled: the transistor-level cells and their 65 nm implementation, the
library cells, the benchmark circuits, and the leakage search itself, which
is an offline step whose result enters as `PARK_PATTERN`.

## Simulating

All testbenches are self-checking and end with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/lowleak_scan_pkg.sv \
    tb/tb_lowleak_scan_top.sv --top-module tb_lowleak_scan_top
./obj_dir/Vtb_lowleak_scan_top
```

Replace the testbench name for the others:

| testbench | what it checks |
|---|---|
| `tb_scan_dff_pullup`, `tb_scan_dff_pulldown` | 400 random clocks against a reference model; `q` constant during shift |
| `tb_lowleak_scan_chain` | 8-cell chain with a mixed pattern: parking, load, capture, unload order |
| `tb_scan_test_sequencer` | shift/capture phases, the m+1 period, abort and restart |
| `tb_lowleak_scan_top` | 6-cell end to end with a modelled logic block: 14 patterns, a switch to functional mode and back; counts every mechanism |
| `tb_lowleak_scan_top_full` | the same at the default parameters (207 cells), three patterns |
| `tb_c17_park_workload` | C17 parked at its least-leakage vector, as described above |

Verilator has two-state simulation and starts uninitialised variables at
random values. The testbenches therefore load the chain before they check
anything that depends on its content.
