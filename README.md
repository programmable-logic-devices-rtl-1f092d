# A fine-grained SRAM-configured FPGA

This is the RTL of a small, regular FPGA in which every logic block computes
exactly one function of two variables. The function is formed by a
*universal logic module* (ULM): a single 2-to-1 multiplexer,

    F = ~SEL & X0 | SEL & X1

which, by choosing what is wired to X0, X1 and SEL, can act as AND, OR, XOR and
any other two-input gate. Each configurable logic block (CLB) adds a handful of
multiplexers around the ULM to pick its inputs, invert them, optionally register
the result, and steer signals to and from its four neighbours. Every
multiplexer select is a configuration bit; 17 of them set up one CLB, and
the device is programmed by shifting in one bitstream that holds the 17 bits of
every CLB. The structure is close to that of the Xilinx XC6200 family, without
its longer routing resources.

The default device is a 6 x 6 array (36 CLBs, 612 configuration bits). The
array size is a parameter; the architecture itself places no limit on it.

## The logic cell

```
        x0_inv                      clk
 X0 ──┬──►|0\                        │
      └─►o|1/──► I0 \            ┌───▼───┐
                    ULM ──O──┬──►│D     Q│──► I0 \
 X1 ──┬──►|0\                │   └───────┘       C/S mux ──► F
      └─►o|1/──► I1 /        └─────────────────► I1 /
        x1_inv   SEL                              cs
```

* **ULM.** `ulm.sv`, the 2-to-1 multiplexer above.
* **Input inverters.** X0 and X1 each pass through a 2-to-1 multiplexer that
  picks the signal or its complement. Without them XOR would need a second
  block to produce ~B; with them, SEL = A, X0 = B, X1 = ~B gives A XOR B in one
  cell.
* **Register and C/S.** The ULM output feeds a rising-edge D flip-flop. The C/S
  bit selects the combinational result (`cs = 1`) or the flip-flop (`cs = 0`)
  as the block's output F.

If constant inputs are available, this cell realises all 16 functions of two
variables, and `tb_clb` checks this exhaustively. The edge pins can supply
the constants.

Table of useful ULM settings (A, B are the routed inputs):

| function | SEL | X0 | X1 |
|---|---|---|---|
| A AND B | A | A | B |
| A OR B | A | B | A |
| A XOR B | A | B | ~B |
| A NAND B | A | ~A | ~B |
| A NOR B | A | ~B | ~A |

## Routing

A CLB has one input and one output on each side, `Nin/Nout`, `Ein/Eout`,
`Sin/Sout`, `Win/Wout`. There is only local routing. Each output drives the
facing input of the neighbouring CLB: `Eout` of one CLB is `Win` of the CLB to
its east, and `Sout` is `Nin` of the CLB below. Seven 4-to-1 multiplexers
(`mux4.sv`) do all the steering:

* **ULM inputs.** X0, X1 and SEL each choose one of `Nin, Ein, Sin, Win`
  (select 0, 1, 2, 3).
* **Side outputs.** Each side output chooses F or one of the inputs from the
  other three sides. Forwarding an input is how a signal crosses a CLB to
  reach one that is not adjacent. Several outputs may select F at once
  (fan-out).

| output | sel 0 | sel 1 | sel 2 | sel 3 |
|---|---|---|---|---|
| Nout | Ein | Sin | Win | F |
| Eout | Nin | Sin | Win | F |
| Sout | Nin | Ein | Win | F |
| Wout | Nin | Ein | Sin | F |

A CLB can route and compute at the same time. For example, it can forward
`Win` to `Sout` while its ULM works on `Nin` and `Ein` and drives `Eout`.

## Configuration word and bitstream

One CLB's 17 bits (`fpga_pkg::clb_cfg_t`), most significant first:

| bits | field | meaning |
|---|---|---|
| 16:15 | `n_out_sel` | Nout mux select |
| 14:13 | `e_out_sel` | Eout mux select |
| 12:11 | `s_out_sel` | Sout mux select |
| 10:9 | `w_out_sel` | Wout mux select |
| 8 | `x0_inv` | 1 = complement X0 |
| 7 | `x1_inv` | 1 = complement X1 |
| 6:5 | `x0_sel` | X0 source (0 N, 1 E, 2 S, 3 W) |
| 4:3 | `x1_sel` | X1 source |
| 2:1 | `sel_sel` | SEL source |
| 0 | `cs` | 1 combinational, 0 registered |

The count is 8 + 2 + 6 + 1 = 17. The order of the fields is this design's
choice.

**Loading.** Every CLB's word sits in a `cfg_sram`, a 17-bit shift register
with parallel outputs. The words are chained in row-major order from `cfg_in`
through CLB (0,0), (0,1), ... to (ROWS-1, COLS-1) and out at `cfg_out`. Hold
`cfg_shift` high for exactly `ROWS*COLS*17` rising clock edges, presenting one
bit per edge. Because bits travel down the chain, the stream starts with the
MSB of the *last* CLB and ends with the LSB of CLB (0,0). In other words, the
stream is the concatenation `{cfg[N-1], ..., cfg[1], cfg[0]}` sent from its
top bit down, where `N = ROWS*COLS` and `cfg[k]` is the word of CLB
`(k / COLS, k % COLS)`. During loading, `cfg_out` returns the previous
bitstream in the same order, so the device can be read back while it is
reloaded.

**While loading or in reset** (`cfg_shift` high or `rst_n` low), every CLB
side output is forced to 0. Each flip-flop is also cleared on every clock.
The configured logic starts on the first clock edge after `cfg_shift` falls,
with all registers at 0. `rst_n` (asynchronous, active low) clears every
configuration word to all-zero. In that state each side output forwards an
input and no output selects F. The device is then a loop-free set of wires
from the pins.

## The array and its pins

CLB (r, c) has row 0 at the north edge and column 0 at the west edge. Edge
sides connect to pins: the north side of row 0 to `pin_n_in[c]` and
`pin_n_out[c]`, the south side of the last row to `pin_s_*[c]`, the west side
of column 0 to `pin_w_*[r]` and the east side of the last column to
`pin_e_*[r]`. `clk` is the one global clock, shared by the flip-flops and the
configuration chain.

## Combinational loops: the rule a bitstream must follow

The hardest part of using this fabric is that routing is made of
configurable multiplexers, so a bitstream can build a combinational loop. For
example, two neighbours can each forward the other's output back, or a
combinational F can feed a path that returns to its own input. Lint and
synthesis tools therefore report the array's neighbour nets as circular
logic. The structure is inherent to the architecture, and the RTL leaves
these paths in place.

A correct bitstream must not close a loop through combinational CLBs. A
registered CLB (`cs = 0`) breaks any loop that passes through its F. A loop
made only of buffers settles, but to a value the simulator may choose. A
loop with an odd number of inversions oscillates: Verilator then stops with
a "did not converge" error. The gating during loading exists for this
reason: a half-shifted bitstream is arbitrary and would otherwise oscillate.

One loop-free discipline is used by the random tests and is easy to follow by
hand. Let combinational CLBs take their ULM inputs from north and west only.
Let their `Eout` and `Sout` carry only `Nin`, `Win` or F. Then signals moving
east and south never depend on signals moving north and west, and each
direction is acyclic by itself.

## Worked example

`tb_fine_fpga` configures this circuit, which takes a signal to a CLB that is
not adjacent:

* CLB A at (0,0) computes `Nin AND Win` (SEL = N, X0 = N, X1 = W,
  `cs = 1`) and drives it east (`e_out_sel = 3`).
* CLB B at (0,1) only forwards it south (`s_out_sel = 2`, Win).
* CLB C at (1,1) computes `Nin XOR Ein` (SEL = N, X0 = E, X1 = E with
  `x1_inv = 1`) and drives it south.
* The cleared CLBs below C pass it down to `pin_s_out[1]`.

The expected result is
`pin_s_out[1] = (pin_n_in[0] & pin_w_in[0]) ^ pin_n_in[2]`. In that
expression, `pin_n_in[2]` reaches C's east side through the cleared CLBs
(0,2) and (1,2).

A second configuration shows why registers matter for routing. CLB (0,0)
is registered (`cs = 0`) and computes `Win ? ~Sin : Sin`. Its F leaves east,
and the ring of CLBs (0,1), (1,1) and (1,0) carries it back into its own
`Sin`. They forward `Win` to `Sout`, `Nin` to `Wout` and `Ein` to `Nout`.
The result is a toggle flip-flop enabled by `pin_w_in[0]`, with Q visible on
`pin_n_out[0]` through `Nout = F`. The ring would be an illegal loop if
(0,0) were combinational.

## What follows the source architecture and what is added

Taken from the architecture:

* the ULM equation and its use as the logic element;
* the input inverters, register and C/S output choice;
* N/E/S/W side ports with nearest-neighbour links only;
* a 4-to-1 multiplexer on each side output and on each ULM input;
* the Eout multiplexer inputs (Nin, Sin, Win, F);
* the input order of the ULM multiplexers (Nin, Ein, Sin, Win);
* 17 SRAM configuration bits per CLB, split 8 + 2 + 6 + 1;
* a regular array with pins at the edge and a global clock.

Chosen here:

* **Select encodings.** The input orders of the other three output
  multiplexers follow the pattern of the printed Eout one. An invert bit of
  1 means "complement".
* **Bit order.** The field order inside the 17-bit word, and the serial
  load chain with its row-major bitstream order.
* **Reset and gating.** The asynchronous reset of the flip-flops and of the
  configuration. The output gating and flip-flop clearing while loading.
* **Pins.** An input pin and an output pin on every edge side. No tri-state.
* **Array size.** 6 x 6 as the default.

Not built:

* tri-state and other pad features;
* routing resources beyond nearest-neighbour (the XC6200 has longer lines);
* the software that generates bitstreams;
* the coarse-grained LUT-based commercial blocks that such a device is
  contrasted with.

## Files

| file | contents |
|---|---|
| `rtl/fpga_pkg.sv` | configuration word, select codes |
| `rtl/mux4.sv` | 4-to-1 selector |
| `rtl/ulm.sv` | universal logic module |
| `rtl/logic_cell.sv` | ULM + inverters + flip-flop + C/S |
| `rtl/clb.sv` | one CLB with its seven routing multiplexers |
| `rtl/cfg_sram.sv` | one CLB's configuration word, serially loaded |
| `rtl/fine_fpga.sv` | the array (top), parameters `ROWS`, `COLS` |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fine_fpga_rect` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
for the whole device at its default size:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/fpga_pkg.sv tb/tb_fine_fpga.sv --top-module tb_fine_fpga
./obj_dir/Vtb_fine_fpga
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. `-Wno-fatal`
keeps the warnings on screen but does not stop the build. The array's
possible-loop warnings (see above) are expected.

Replace `tb_fine_fpga` with `tb_mux4`, `tb_ulm`, `tb_logic_cell`, `tb_clb` or
`tb_cfg_sram` for the block tests.

* **`tb_fine_fpga`** loads 102 bitstreams through the serial port: the two
  worked examples above and 100 random loop-free ones. It checks
  every output pin against a behavioural model of the array, which relaxes
  the neighbour nets until they settle. It also checks the read-back stream
  and that the pins stay at 0 while loading. It counts each mechanism it
  uses (combinational and registered CLBs, inversion, pass-through, fan-out,
  reconfiguration, read-back, registered feedback) and fails if any never
  occurs. It runs in well under a second.
* **`tb_fine_fpga_rect`** runs the same test on a 3 x 5 array, so that a
  mix-up of rows and columns cannot pass unnoticed.
* **The block testbenches** check against models that the testbenches
  compute themselves: `tb_mux4` against the truth table, `tb_ulm`
  exhaustively, `tb_logic_cell` with random inputs against a cycle model of
  the flip-flop, `tb_cfg_sram` on shifting, holding and serial output, and
  `tb_clb` with random configuration words and an exhaustive search over the
  16 two-input functions.

Confidence: every behaviour the architecture describes is exercised, but only
in simulation. The encodings above are this design's own, so a bitstream made
for another device of this family will not load correctly.
