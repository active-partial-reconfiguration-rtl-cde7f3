# Active partial reconfiguration: a swappable 4-bit calculator

This design shows *active* partial reconfiguration on an FPGA. Part of the chip
is reloaded with a new function while the rest keeps running and keeps its state.
The function is deliberately trivial. Two 4-bit operands are taken from DIP
switches, combined, and the 4-bit result is shown on LEDs. What matters is how
the chip is divided:

* **Fixed region.** This holds the user interface (`latchio`): the operand and
  result registers and a serial transmitter. It is never reconfigured, so the
  operands and the displayed result survive every swap.
* **Reconfigurable region.** This holds the computation (`reconfig`). It
  contains either an adder or a subtractor, and a partial bitstream swaps one
  for the other at run time.
* **Bus macros.** Every signal between the regions passes through one of three
  bus macros (`bm_4b_v2p`). These are fixed-placement 4-bit connectors on the
  region boundary, so that routing does not change when the reconfigurable
  side is rewritten.
* **Request to the host.** The hardware cannot reconfigure itself. After each
  computation, the fixed region sends one byte (`0x55`) over RS-232. A program
  on the host PC sees the byte and loads the other module's partial bitstream
  through the configuration port.

The target is a Xilinx Virtex-II Pro XC2VP30 (package ff896, speed grade -5) on a board with a 100 MHz
clock, four DIP switches, push buttons, four LEDs and an RS-232 port.

## Using it at the board

| Action | Effect |
|---|---|
| `PB_DOWN` | reset: clears operand and LED registers, idles the serial line |
| set switches, press `PB_RIGHT` | switches → operand 1 |
| set switches, press `PB_ENTER` | switches → operand 2 |
| press `PB_UP` | result of the loaded module → LEDs; request byte `0x55` sent to host |
| host loads the other partial bitstream | region now computes the other function; LEDs and operands unchanged |
| press `PB_UP` again | LEDs show the new module's result for the same operands |

The adder computes `op1 + op2` and the subtractor computes `op1 - op2`. Both
wrap modulo 16, because the result has the same 4-bit width as the operands.

## The region boundary: bus macros and local constants

This is the part of the design that is easiest to get wrong, and the reason the
top level (`apr_top`) looks the way it does.

**Every crossing goes through a bus macro.** On the device, each bus-macro bit
is one horizontal line. It has a tristate buffer on the left side
(reconfigurable) and one on the right side (fixed). A side drives the line when
its `T` input is 0. The three instances are:

| Instance | Direction | Left side (`li`/`lt`) | Right side (`ri`/`rt`) | Output |
|---|---|---|---|---|
| `busmacro1` | reconfigurable → fixed | result, enabled (`lt`=0) | dummy 0, off (`rt`=1) | result into `latchio` |
| `busmacro2` | fixed → reconfigurable | dummy 0, off | operand 1, enabled | operand 1 into `reconfig` |
| `busmacro3` | fixed → reconfigurable | dummy 0, off | operand 2, enabled | operand 2 into `reconfig` |

In RTL, a bus macro is the logic its tristates reduce to: `o = li` where
`lt`=0, `o = ri` where `rt`=0, and 0 where neither side drives. The synthesis
setup converts tristates to logic in the same way. Both sides driving the same
line would be contention, and an assertion in `bm_4b_v2p` flags it.

**Constants never cross the boundary.** The enables and the dummy data are 0s
and 1s. If a shared tie-off supplied them, a net would cross the region edge
outside a bus macro. So each region has its own pair of one-input LUTs (`lut1`):

* INIT `00` gives a local 0 ("fake ground").
* INIT `11` gives a local 1 ("fake VCC").

Each LUT's input comes from the other LUT's output. This keeps both as real
cells that the floorplan can lock into their region. There are three pairs:

* `internal_*_reco` sits in the reconfigurable region.
* `internal_*_fix` sits in the fixed region.
* `internal_*_mux` also sits in the fixed region. It is kept from the original
  floorplan but drives nothing.

Lint tools report each cross-coupled pair as a combinational loop. The loop is
intentional and harmless, because each LUT's output is constant whatever its
input.

**Floorplan used with this top level.** These constraints are not part of the
RTL. Reproduce them in the FPGA constraints to get a working partial flow:

* The reconfigurable area is slices X0–X19 and TBUFs X0–X18, over the full height
  (Y0–Y159). It holds instance `reconfig` and the `*_reco` constants.
* The fixed area is slices X20–X91 and TBUFs X20–X90. It holds `take` (the
  `latchio` instance) and the `*_fix` and `*_mux` constants.
* Both areas are `MODE = RECONFIG`, with `GROUP` and `PLACE` closed.
* The bus macros are placed at `TBUF_X16Y4`, `TBUF_X16Y12` and `TBUF_X16Y20`.
* The constant LUTs have `LOCK_PINS`.
* The clock constraint is a 10 ns period.

Pin locations:

| Signal | Pin |
|---|---|
| switches 0–3 | AC11, AD11, AF8, AF9 |
| LEDs 0–3 | AC4, AC3, AA6, AA5 |
| `PB_UP` | AH4 |
| `PB_ENTER` | AG5 |
| `PB_RIGHT` | AH2 |
| `PB_DOWN` | AG3 |
| clock | AJ15 |
| RS-232 TX | AE7 |

## How reconfiguration appears in simulation

On silicon, only one module exists in the reconfigurable region at a time. Each
configuration is built as its own top-level design with the same fixed part, and
the configuration logic performs the swap. RTL cannot rewrite itself. So
`reconfig` instantiates both the adder and the subtractor, and the top-level
input `rm_loaded` (type `apr_pkg::rm_kind_e`) selects which one's result leaves
the region. `rm_loaded` stands in for the configuration memory:

* Tie it to a constant to get the netlist of one configuration (`RM_ADDER` is
  the main one).
* Change it during simulation to model a partial reconfiguration.

The fixed region does not see `rm_loaded` at all. This matches the real system,
where the fixed region does not know when the swap happens.

To add a third module:

1. Give it the adder's ports.
2. Add an enumerator to `rm_kind_e`.
3. Add a case arm in `reconfig`.

## The request to the host (`rs232io`)

* **When a request is sent.** `latchio` holds `send_data` high while `PB_UP` is
  held, with `statusdata = 0x55`. The transmitter starts one frame on the rising
  edge of `send_data`, so each computation produces one request.
* **Frame format.** 8N1, least significant bit first, idle high.
* **Baud rate.** `CLK_HZ / BAUD` clocks per bit; the defaults are 100 MHz and 9600 baud.
* **Requests during a frame.** A request that arrives while a frame is in flight
  is held (one deep) and sent straight after, with one idle clock between the
  frames. Any further request in that time is dropped.
* **Receive pin.** It is wired up but not used. Nothing is read from the host.

## Timing

* Single clock, `clk` (100 MHz).
* Push buttons, switches and `PB_DOWN` go through two-flip-flop synchronisers
  (`sync2`). A button press loads its register on the **third** rising clock
  edge after the button goes high. The start bit of the request frame begins on
  that same edge.
* The computation is combinational, from the operand registers through two bus
  macros to the result register.
* A request frame takes `10 * CLK_HZ / BAUD` = 104,160 clocks (about 1.04 ms).
  Pressing `PB_UP` again within that time queues one more request.

## Files

| File | Contents |
|---|---|
| `rtl/apr_pkg.sv` | operand width (4), request byte `0x55`, `rm_kind_e` |
| `rtl/apr_top.sv` | top level: regions, bus macros, constant LUTs |
| `rtl/latchio.sv` | fixed region: synchronisers, three 4-bit registers, request logic |
| `rtl/rs232io.sv` | RS-232 transmitter for the request byte |
| `rtl/sync2.sv` | two-flip-flop synchroniser |
| `rtl/reconfig.sv` | reconfigurable region (module chosen by `rm_loaded`) |
| `rtl/adder.sv`, `rtl/subtractor.sv` | the two reconfigurable modules |
| `rtl/bm_4b_v2p.sv` | 4-bit bus macro, logic model |
| `rtl/lut1.sv` | one-input LUT (local constants) |
| `tb/tb_*.sv` | one self-checking testbench per module |

The top-level parameters are `CLK_HZ` (default 100,000,000) and `BAUD` (default 9600).
Every module's width parameter `W` defaults to 4.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, and a
watchdog ends a run that stalls.

* **`tb_apr_top`** runs the whole design at its default parameters. It acts as
  both the user and the host: it latches operands, computes, decodes the request
  byte from the serial line, then swaps the module. It checks these points:
  * The LEDs do not change when the module is swapped.
  * The same operands give the other module's result afterwards.
  * The LEDs update on the third clock edge.
  * Sums that wrap and differences that borrow both occur.

  The run takes under a second.
* **`tb_rs232io`** and **`tb_latchio`** run at 16 clocks per bit. They check
  frame contents and timing, the one-deep hold and the button-to-register
  latency.
* **`tb_adder`**, **`tb_subtractor`** and **`tb_reconfig`** are exhaustive over
  all operand pairs.

Example, with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/apr_pkg.sv tb/tb_apr_top.sv \
          --top-module tb_apr_top -Mdir obj_top
./obj_top/Vtb_apr_top
```

Replace `apr_top` with any other module name to run its testbench. For a lint
check: `verilator --lint-only -Wall -Irtl rtl/apr_pkg.sv rtl/apr_top.sv`. Expect
two `UNOPTFLAT` warnings for the constant-LUT loops described above, and one
`UNUSEDSIGNAL` for the unused receive pin.

## How far it follows the original, and where it departs

These parts follow the original:

* the split into `latchio` and a reconfigurable adder/subtractor
* the 4-bit widths
* which button loads which register
* `PB_DOWN` as reset
* the request byte `0x55`, sent on every `PB_UP`
* the three bus macros, their directions, enables and dummy data
* the per-region constant LUT pairs
* the instance names used by the floorplan
* the 100 MHz clock

These are this design's own choices:

* **Button handling.** The original clocked each register directly from its
  push button. Here the buttons, switches and reset are synchronised into the
  system clock domain, and each register loads on the synchronised rising
  edge. There is no debouncer, so a bouncing `PB_UP` can send more than one
  request byte. Registers load on the rising edge of the button signal, as in
  the original. On a board whose buttons are active-low, that edge is the
  release.
* **Reset clears the registers.** The original passed reset only to the serial
  block.
* **The serial transmitter.** Only its role and port list are given in the
  original. The 8N1 format, 9600 baud, edge-triggered start and one-deep hold
  are this design's choices.
* **The subtractor** is built by analogy with the adder: `op1 - op2`, wrapping.
* **Bus-macro model.** The line value is logic, not tristates. An undriven line
  reads 0.
* **`rm_loaded`** models the partial reconfiguration, as described above. The
  configuration port, the partial bitstreams and the host program are outside
  this RTL.
