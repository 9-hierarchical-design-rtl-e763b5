# One-dimensional digitizer interface

A graphics tablet finds its pen by sweeping: a grid of parallel wires lies
under the surface, one wire at a time is energized, and a detector reports
when the wire being driven is the one under the pen cursor (for example by a
phase reversal of the picked-up signal). If a counter selects the wires,
the count at the moment of detection *is* the pen's position. This RTL is the
digital part of such a tablet, reduced to one axis: it runs the sweep,
captures the position, and hands it to a receiver with a two-wire
handshake.

It is a small design, and its interest lies in how it is split up: one
controller, one counter, one register and one synchronizer, each simple
enough to test on its own, wired together structurally at the top.

## Signals at the boundary

| port      | dir | width    | meaning |
|-----------|-----|----------|---------|
| `clk`     | in  | 1        | single clock; every flip-flop uses its rising edge |
| `rst_n`   | in  | 1        | synchronous reset, active low; hold for at least two clocks |
| `rdy`     | in  | 1        | receiver ready / request for a new measurement (asynchronous) |
| `int_det` | in  | 1        | from the grid electronics: cursor detected on the energized wire |
| `dav`     | out | 1        | data available on `data` |
| `data`    | out | GRIDSIZE | last captured position |
| `grid`    | out | GRIDSIZE | number of the wire to energize (the counter value) |

`GRIDSIZE` (default 4) sets the counter width, so the grid has
2**GRIDSIZE wire positions.

The grid itself (coil, wires, detector) is analog and is not part of the
RTL; its two signals, `grid` and `int_det`, are ports of the top.
`tb/grid_sensor_model.sv` is a behavioural stand-in used by the tests.

## Block structure

```
          +-----+ srdy  +---------+ count, n_clr  +---------+ grid  +---------+
  rdy --->| D Q |------>|         |-------------->| grid_ctr|------>| grid_reg|---> data
          +-----+       | grid_fsm|<--------------|         |   |   +---------+
                        |         |   err         +---------+   |        ^ n_ld
  int_det ------------->|         |-----------------------------|--------+
  dav <-----------------|         |                             +------> grid
                        +---------+
```

* `synchronizer` – samples `rdy` into `srdy`. One flip-flop by default;
  `STAGES` lengthens the chain if a second flip-flop is wanted for more
  metastability margin (the top uses the default).
* `grid_ctr` – counter with a synchronous active-low clear (priority) and
  a count enable. `err` is high whenever the count is all ones.
* `grid_reg` – register that copies the count on an edge where `n_ld` is
  low. The load is a synchronous enable, never a gated clock.
* `grid_fsm` – the controller, described next.
* `digitizer_pkg` – the default grid size and the state type with its
  encoding.

`int_det` is deliberately not synchronized: it only ever changes as a
result of `grid` changing, and `grid` comes from a register on the same
clock, so it is already in step with the clock. `rdy` comes from another
system and must be synchronized.

## The controller

Five states, Moore outputs (except `dav`), codes chosen so that most
transitions change one bit:

| state | code | outputs | next |
|-------|------|---------|------|
| READY | 000 | `dav = !srdy` | `srdy` ? Count : READY |
| Count | 001 | `count = 1` | `err` ? ERR : `int` ? Load : Count |
| Load  | 011 | `n_ld = 0` | Reset |
| Reset | 100 | `n_clr = 0` | READY |
| ERR   | 010 | `n_clr = 0` | Count |

The points that are easy to miss:

* **Overflow wins over detection.** In Count, `err` is tested before `int`.
  The all-ones count therefore never reports a position: reaching it means
  the sweep passed every usable wire without seeing the cursor. The
  controller clears the counter (ERR) and starts a new sweep without
  involving the receiver; `dav` stays low until a position is found.
* **The captured value is one past the detecting wire.** The counter is
  still enabled on the edge that leaves Count, so when `int` is seen with
  the counter at N, the register receives N+1 in the Load state. Usable
  cursor wires are 0 .. 2**GRIDSIZE-2, reported as 1 .. 2**GRIDSIZE-1.
  A receiver that wants the wire index subtracts one.
* **Reset is the state after Load**, not the power-on state. It clears
  the counter so that the next sweep starts from wire 0, and it keeps
  `grid` at 0 while the design waits in READY.
* **Unused codes** (101, 110, 111) lead to Reset, so a disturbed state
  register recovers within two clocks.

Two assertions in `grid_fsm` state the rules the datapath relies on: the
counter is never enabled while it is cleared or loaded, and every load is
followed by a clear.

## Handshake and timing

1. After a measurement (and after reset) the controller sits in READY with
   `dav` high and `data` valid. `data` is stable for as long as `dav` is
   high.
2. The receiver raises `rdy` when it has taken the data and wants the next
   one. One clock later `srdy` is high; `dav` falls at once and on the next
   edge the sweep begins from wire 0.
3. `rdy` should fall again before the sweep ends. If it is still high when
   the controller returns to READY, a new sweep starts immediately and
   `dav` is not shown.

Counting from the edge at which `srdy` goes high, `dav` returns after

    N + 4 + (2**GRIDSIZE + 1) * misses   clocks,

where N is the counter value at which `int_det` was seen and `misses` is
the number of sweeps that ran to the end without the cursor (each costs
the full sweep plus one ERR clock). At the default size that is 17 clocks
per failed sweep and 4 to 18 clocks for a found position.

The clock period must cover a flip-flop delay plus the combinational path
from the counter through the grid detector's response to the controller,
plus setup time: the detector has one clock to answer a change of `grid`.

## Design choices beyond the original description

* `rst_n` is an addition. The original interface has no reset pin and
  relies on the controller passing through Reset; here `rst_n` forces the
  Reset state (which also clears the counter), clears the synchronizer and
  sets `data` to 0.
* The cursor-detected input is called `int_det` (`int` is a reserved word)
  and the register module `grid_reg` (likewise for `reg`).
* The unused state codes recover to Reset.
* The relation between the captured count and the physical pen position,
  and the grid electronics' own timing, are not specified; the test model
  reports detection in the same clock the wire is selected.
* The design at its default size needs 12 flip-flops (3 state,
  1 synchronizer, 4 counter, 4 register), small enough for a 128-macrocell
  CPLD of the CY7C374i class it was sized for.

## Tests

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`; each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_synchronizer` | one- and two-stage delay against random `rdy`, reset |
| `tb_grid_ctr` | count, clear priority, hold, wrap and `err` against a reference count |
| `tb_grid_reg` | load and hold with random data, reset value |
| `tb_testreg` | counter feeding the register, loaded at random moments |
| `tb_grid_fsm` | all outputs after every edge against an independent model of the state table; all eight transitions taken; `err` and `int` together in Count |
| `tb_grid_top` | whole design at its default size with a grid model and a receiver: 204 measurements including both end positions, failed sweeps and a receiver that keeps `dav` waiting; checks `data`, the exact clock count above, that `data` survives failed sweeps, and that `grid` is 0 in READY |

To run one with Verilator (5.x), from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_grid_top \
    rtl/digitizer_pkg.sv rtl/synchronizer.sv rtl/grid_ctr.sv rtl/grid_reg.sv \
    rtl/grid_fsm.sv rtl/grid_top.sv tb/grid_sensor_model.sv tb/tb_grid_top.sv
./obj_dir/Vtb_grid_top
```

Uninitialized variables are randomized by Verilator; everything the tests
read is reset or assigned first, so results do not depend on the seed.

To change the grid size, set `GRIDSIZE` on `grid_top` (or change
`GRIDSIZE_DEFAULT` in `digitizer_pkg`); `tb_grid_top` follows the package
default.
