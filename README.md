# DSF scan chain: a full-scan architecture with a dmuxed scan flip-flop

In a full-scan design, every shift clock moves a new bit into every scan cell.
In a conventional muxed scan flip-flop, the cell output Q drives both the next
cell and the combinational logic. Shifting therefore toggles the logic inputs on
every clock, and the logic burns power on values it never uses. The *dmuxed scan
flip-flop* (DSF) splits the cell's output in two. A demultiplexer behind the
flip-flop sends Q to the logic only in capture mode and to the next cell only in
shift mode. During shift, a pull-down holds the logic-side output at 0, so the
combinational logic sees a constant input for the whole load/unload phase. In
capture mode the cell behaves like an ordinary muxed scan flip-flop.

This repository gives a synthesizable SystemVerilog model of the cell and of a
scan chain built from it, with self-checking testbenches.

## The DSF cell (`rtl/dsf_cell.sv`)

```
          SE=0: pass                      +--------+ SE=0 --> c_out (to logic; 0 while SE=1)
 DI ----[transmission gate]--+            |  dmux  |
                             +--> D  Q -->|        |
 SI -------------------------+    FF      +--------+ SE=1 --> s_out (to next cell's SI)
```

Three parts, all steered by the one scan-enable line `se`:

* **Input node.** DI reaches the flip-flop's D input through a transmission
  gate that conducts only in capture mode (`se = 0`). SI is wired to the same
  node with no switch. This works because inside a chain SI is the previous
  cell's `s_out`, and the dmux switches that output off in capture mode. So the
  D node has exactly one driver in each mode. The RTL writes the node as
  `d = se ? si : di`.
* **Flip-flop.** One D flip-flop that samples on the rising clock edge. It has
  an asynchronous active-low clear (`rst_n`).
* **Output dmux (`rtl/dsf_dmux.sv`).** Two transmission gates steer Q:
  * `se = 0` sends Q to `c_out`.
  * `se = 1` sends Q to `s_out`.

  An NMOS pull-down gated by `se` ties `c_out` low while the cell shifts.

| `se` | mode    | D samples | `c_out`      | `s_out`             |
|------|---------|-----------|--------------|---------------------|
| 0    | capture | `di`      | Q            | off (0 in this RTL) |
| 1    | shift   | `si`      | 0 (blocked)  | Q                   |

Timing: `c_out` and `s_out` are combinational in Q and `se`. When `se` rises,
`c_out` drops to 0 in the same cycle, before any shift clock. When `se` falls,
`c_out` shows the loaded bit right away, so the logic evaluates the pattern
during the capture cycle. Data moves one cell per clock. A captured value
appears on `c_out` one clock after it was on `di`.

## The chain (`rtl/dsf_scan_chain.sv`, top level)

`CHAIN_LEN` DSF cells are linked in order: `s_out[i]` feeds SI of cell `i+1`.
The last cell's `s_out` is the scan-out pin `so`. `se`, `clk` and `rst_n` are
shared by all cells.

The external scan-in pin has no dmux in front of it. Wired straight to cell
0's D node, it would fight the DI transmission gate in capture mode. The chain
therefore enters through a small SE-controlled gate
(`rtl/dsf_scan_in_gate.sv`). The gate passes `si` in shift mode and is off in
capture mode.

The combinational logic of the circuit under test is **not** part of the RTL.
The chain brings out `c_out[CHAIN_LEN-1:0]` (its inputs from the cells) and
`di[CHAIN_LEN-1:0]` (its outputs back to the cells). Connect the logic between
them. Primary inputs and outputs go straight to the logic.

Ports of `dsf_scan_chain`:

| port    | dir | width     | meaning                                         |
|---------|-----|-----------|-------------------------------------------------|
| `clk`   | in  | 1         | clock, rising edge                              |
| `rst_n` | in  | 1         | asynchronous active-low clear of every cell     |
| `se`    | in  | 1         | 0 = capture, 1 = shift                          |
| `si`    | in  | 1         | scan-in pin                                     |
| `so`    | out | 1         | scan-out pin (0 in capture mode)                |
| `di`    | in  | CHAIN_LEN | logic outputs, captured when `se = 0`           |
| `c_out` | out | CHAIN_LEN | cell values to the logic; all 0 when `se = 1`   |

### Applying a test pattern

1. Hold `se = 1` for `CHAIN_LEN` clocks and shift in the pattern. The bit
   meant for cell `CHAIN_LEN-1` goes first and the bit for cell 0 goes last.
   Meanwhile `so` delivers the previous response, starting with cell
   `CHAIN_LEN-1`. `so` is valid before the first clock edge.
2. Drive `se = 0` for one clock. `c_out` now equals the loaded pattern. The
   logic answers on `di`, and the clock edge stores the answer.
3. Return to step 1 to unload the answer and load the next pattern.

So a pattern costs `CHAIN_LEN + 1` clocks. That is the same as with muxed scan
cells: the DSF does not change test length or the patterns.

## Parameters

| parameter   | default | note |
|-------------|---------|------|
| `CHAIN_LEN` | 449     | Cells in the chain. The architecture fixes no length. 449 is the flip-flop count of the largest circuit in the evaluation set (ITC'99 b15), so every circuit there fits in one chain. |

`rtl/dsf_pkg.sv` holds the shared constants:

* the two SE values, `SE_CAPTURE = 0` and `SE_SHIFT = 1`;
* the blocked output level, `BLOCKED_LEVEL = 0`.

## How far the RTL follows the circuit

The architecture is defined at the transistor level: transmission gates, a
shared wired node and a pull-down device. The RTL keeps the logic function of
each part and makes these choices where a two-state, synthesizable model must
differ:

* **Switched-off outputs.** In silicon, `s_out` in capture mode and the
  scan-in gate's output in capture mode float. Here they are driven to 0.
  Nothing reads them in that mode, so chain behaviour is unchanged. A 0 on
  `so` during capture means "not driven".
* **Shared D node.** The wired junction of the DI transmission gate and SI is
  written as a two-way selection on `se`. A synthesis tool maps it to a
  mux. The low-power property lives on the output side (`c_out` held low),
  and that part is exact.
* **Scan-in gate.** The architecture shows an SE-controlled element between
  the scan-in pin and the first cell, but gives no circuit for it. Its
  behaviour here (pass in shift, off in capture) is inferred from the wired
  D node it protects.
* **Reset.** A reset phase appears in the cell's timing, but its kind is not
  specified. This RTL uses an asynchronous active-low clear. After reset every
  cell holds 0, so `c_out` and `so` are 0.
* **Clock edge.** Rising edge, as is usual for this kind of cell.

The power, delay and area advantages of the DSF are transistor-level results.
An RTL model cannot show them. What it can show is the behaviour they come
from: during shift, `c_out` never toggles after the first clock.

The comparison methods are not included. These are a muxed scan cell with an
AND gate on its output, and one with a hold multiplexer on its output. The
testbenches do keep a behavioural model of a plain muxed scan chain, used as the
reference for transition counts.

## Verification

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_dsf_dmux.sv` | Full truth table of the dmux, including the pull-down. |
| `tb/tb_dsf_scan_in_gate.sv` | Full truth table of the scan-in gate. |
| `tb/tb_dsf_cell.sv` | One cell against an independent reference bit. Runs a shift phase, a capture phase and a reset phase, then 400 random cycles. Checks both outputs before and after every edge, the one-clock latency, and an asynchronous reset in mid-cycle. |
| `tb/tb_dsf_scan_chain.sv` | End to end at `CHAIN_LEN = 8` with six patterns. Every `so` and `c_out` value is predicted from the applied patterns. Checks the clock count per pattern and counts each mechanism: shift clocks, capture clocks, SE switches, resets, and shift clocks whose switching was blocked. Fails if any count is zero. |
| `tb/tb_dsf_scan_chain_full.sv` | The top at its default size (449 cells): three full scan tests and a reset. |
| `tb/tb_itc99_workloads.sv` | Ten chains sized like the ITC'99 circuits of the evaluation (4 to 449 flip-flops), each with that circuit's pattern count (14 to 618). |

`dsf_scan_chain` also carries an assertion. On every clock in shift mode it
checks that all `c_out` bits are 0.

`tb/dsf_chain_driver.sv` holds the shared sequencer and checker. It closes the
loop through a small stand-in logic function of its own. It also runs a
conventional muxed scan chain model in parallel and counts, on every shift
clock, the transitions each chain presents to the logic inputs.

For the DSF chain, the only transitions in shift mode are the drops to 0 at the
moment `se` rises. Any later toggle counts as a failure. For the benchmark-sized
runs, the transitions at the stand-in logic's inputs are:

| size (cells, patterns) | conventional | DSF |
|------------------------|-------------:|----:|
| b01 (5, 21)            | 269          | 56  |
| b07 (49, 88)           | 105 691      | 2 152 |
| b12 (121, 185)         | 1 357 215    | 11 231 |
| b15 (449, 618)         | 62 440 539   | 138 510 |

These counts cover the logic *inputs* only, with random patterns and a
stand-in logic. They are not the whole-circuit figures of the real benchmarks.
There, the logic driven by primary inputs keeps switching and only part of the
total activity is removed. Published figures for this architecture average
about 30 % fewer transitions over the whole circuit.

### Running a testbench

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    --top-module tb_dsf_scan_chain rtl/dsf_pkg.sv tb/tb_dsf_scan_chain.sv
./obj_dir/Vtb_dsf_scan_chain
```

Replace the top module and file to run another testbench. The package file
must come first.
