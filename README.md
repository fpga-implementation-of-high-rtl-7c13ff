# Four-port NoC router (East / West / North / South)

A small network-on-chip router built from the plainest parts: multiplexers, a
demultiplexer and D flip-flops. It has one input and one output in each compass
direction. In each clock cycle it can move one word from any input to any output.
Behind each output sits a three-stage buffer. The buffer reports whether it is
empty or full, so whatever drives the router can avoid sending into a port that
has filled up. The design targets area and clock rate. It has no routing tables,
no arbiters and no header decoding: the sender names the source and the
destination of each transfer directly.

```
 data_in_E ─┐                                       ┌─► FIFO E ─► data_out_E, empty_E, full_E
 data_in_W ─┤   ┌────────────── controller unit ──┐ ├─► FIFO W ─► data_out_W, empty_W, full_W
 data_in_N ─┼──►│ 4 x 4:1 mux ─► 4 output regs ───┼─┼─► FIFO N ─► data_out_N, empty_N, full_N
 data_in_S ─┘   │ (port_sel)      ▲ load enables   │ └─► FIFO S ─► data_out_S, empty_S, full_S
                │ req, E/W/N/S_rst ─► DEMUX ctrl ──┘
                └──────────────────────────────────┘
```

## How one transfer works

The sender drives three things in the same cycle:

* `port_sel` (2 bits) picks the **source** input: 0 = East, 1 = West, 2 = North, 3 = South.
* One of `E_rst`, `W_rst`, `N_rst`, `S_rst` picks the **destination** output. These are
  active-high destination lines. The `_rst` suffix is only their historical name; they do
  not reset anything.
* `req` asks for the transfer.

The controller has one 4:1 multiplexer per output direction. All four see the same
`port_sel`, so all four present the same source word. The **DEMUX controller** turns the
destination lines into a 2-bit address. The **DEMUX** then steers `req` onto the load
enable of that direction's output register. Only that register takes the word; the other
three keep their old values. So the muxes choose *what* moves, and the demux chooses
*where* it goes.

The destination lines are meant to be one-hot. If several are high, the first in the order
E, W, N, S wins. If none is high, `req` does nothing.

## The port buffer is a shift chain, not a read/write FIFO

This is the part most likely to surprise a reader. Each output's "FIFO" is three
registers in a chain, and all three share one enable, the push. On a push, the new word
enters stage 0 and every word moves one stage on. `data_out_X` is always the last stage.
**There is no read or pop input.** A word reaches `data_out_X` only after three words have
been sent to that direction. After that, each further push moves the next word to the
output and drops the oldest one.

A Counter counts pushes since reset and stops at 3. A Decision block turns the count into
the two flags:

| pushes since reset | `empty_X` | `full_X` | `data_out_X` |
|---|---|---|---|
| 0 | 1 | 0 | 0 (reset value) |
| 1, 2 | 0 | 0 | 0 (reset value) |
| 3 or more | 0 | 1 | the word pushed three pushes ago |

So `full_X` means "the chain is primed and `data_out_X` holds real data". A push into a full
port overwrites the oldest word and is not refused. If the sender must not lose words, it
has to watch `full_X` and the receiver has to take each word in the cycle it appears.
The flags only go back to empty on `rst`.

## Timing

Edges are counted from the edge that samples `req`, called edge *k*:

| edge | event |
|---|---|
| k | the addressed controller register loads `data_in[port_sel]`, and its valid bit sets |
| k+1 | that word is pushed into the direction's buffer (stage 0) |
| k+3 | if this was the first of three back-to-back words, it is now on `data_out_X` and `full_X` is high |

A new transfer can start every cycle. Transfers to different directions in successive
cycles do not interfere. Each buffer advances only when a word for its own direction
arrives.

## Modules

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | `NUM_PORTS`, `SEL_W`, default sizes, and the `dir_e` enum (E=0, W=1, N=2, S=3) used to index every four-wide bus |
| `rtl/noc_mux4.sv` | 4:1 word multiplexer |
| `rtl/noc_demux_ctrl.sv` | DEMUX controller (priority encoder of the destination lines) and DEMUX (one-hot load enables) |
| `rtl/noc_controller.sv` | four muxes, the demux, and four enabled output registers with registered valid bits |
| `rtl/noc_fifo.sv` | three-stage shift-chain buffer with counter and empty/full decision |
| `rtl/noc_router.sv` | top: controller plus four buffers, with flat per-direction ports |

Parameters: `DATA_W` (word width, default 8) and `DEPTH` (buffer stages, default 3).
Reset is synchronous and active high. It clears all registers, valid bits and counters.

## What follows the original design and what is chosen here

These parts follow the original design:

* one controller unit feeding four per-direction buffers;
* the port names;
* the controller's internals: four muxes under one shared `port_sel`, a DEMUX and DEMUX
  controller driven by `req` and the four destination lines, and one enabled D flip-flop
  register per output;
* the buffer as three D flip-flops in a chain sharing clock, reset and request, with a
  counter and decision block for the empty and full flags.

These are choices made here, because the original leaves them open:

* The data width is 8 bits.
* The `port_sel` encoding is 0 = E, 1 = W, 2 = N, 3 = S.
* Several high destination lines resolve by priority E > W > N > S.
* Reset is synchronous and active high.
* The counter saturates at the buffer depth. Empty means count 0 and full means count 3.
* A push into a full buffer drops the oldest word.
* The controller has an extra **valid bit per output register**. The original does not
  say what pushes each buffer. Here a buffer takes one push for each word its controller
  register receives, one cycle after the register loads. Without this, a buffer would
  either miss words or take stale ones again.
* The original wording is ambiguous on one point: it says `req` goes either to the output
  flip-flop's reset pin or to its enable. Here it goes to the enable.

## Size

At the default sizes the router has 140 flip-flops: four buffers of 3 × 8 data bits plus
a 2-bit counter, four 8-bit output registers, and four valid bits. A generic Spartan-6
mapping (`yosys synth_xilinx -family xc6s`) gives about 32 LUTs. The four muxes collapse
into one because they share `port_sel`.

The published implementation of this router on an XC6SLX45 reports 224 slice registers,
162 slice LUTs, 128 fully used LUT-FF pairs and 292.987 MHz. It gives no data width, so
the two sets of numbers cannot be matched exactly. The clock rate has not been checked
against vendor timing. Either way, the router fills a tiny part of that device, which has
54,576 registers and 27,288 LUTs.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module against an
independent model and ends with a `TB_RESULT checks=N failures=M` line:

* `tb_noc_fifo`: random pushes and holds. It checks data, empty and full after every edge,
  including overflow and a mid-run reset.
* `tb_noc_mux4`, `tb_noc_demux_ctrl`: all select values and all 32 combinations of `req`
  and the destination lines.
* `tb_noc_controller`: random traffic, checking all four registers and valid bits every
  cycle. It confirms that all 16 source/destination pairs occurred.
* `tb_noc_router`: end-to-end at the default parameters, against a cycle-accurate model of
  the whole router. It checks the req-to-output latency in cycles. It also counts, and
  requires at least once: every source/destination pair, a request with no destination, a
  request with several destinations, each buffer reaching full and being overrun, and a
  reset in mid-traffic.

The controller and DEMUX carry immediate assertions: at most one load enable is active,
and it is the addressed one.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/noc_pkg.sv rtl/noc_mux4.sv rtl/noc_demux_ctrl.sv rtl/noc_fifo.sv \
  rtl/noc_controller.sv rtl/noc_router.sv tb/tb_noc_router.sv \
  --top-module tb_noc_router -o sim
./obj_dir/sim
```

Swap in another `tb/tb_*.sv` and `--top-module` to run a different test. The package must
come first. Each run takes well under a second.
