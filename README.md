# Mixed mode scan: a serial scan chain and a random access scan array in parallel

Full serial scan has two costs. Every flip-flop gets a scan multiplexer in front of its data
input, and every test pattern has to be shifted through the whole chain. Random access scan
(RAS) avoids the long shifts: the flip-flops are arranged like a small memory and read or
written a row at a time. Its cost is the row and column wiring on every cell.

A *mixed mode* scan design splits the flip-flops of a circuit into two groups:

* a **serial part**, a conventional scan chain. It holds the flip-flops whose test patterns are
  mostly specified (care) bits, so shifting them is not wasted.
* a **RAS part**. It holds the flip-flops whose patterns are mostly don't-care, so only the rows
  that matter need to be touched.

Both parts are built from **one common scan cell**, so a single cell library serves both. Both
parts are also loaded and unloaded **at the same time**. A controller driven by two test mode
pins steps the RAS rows by itself, so the RAS row address needs no pins.

At its default sizes the design has 12 scan cells, 2 sense-amplifier bits and 3 controller bits. It is
written in synthesizable SystemVerilog with one clock.

## Pins

| pin | width | meaning |
|---|---|---|
| `clk` | 1 | clock, rising edge |
| `rst` | 1 | synchronous, active high; clears every flip-flop and the row sequencer |
| `test_mode0`, `test_mode1` | 1, 1 | mode select (below) |
| `in_data` | `N_IN` = 3 | user data IN1..IN3 feeding the functional logic |
| `si0` | 1 | serial scan input (SI0) |
| `si_ras` | `RAS_COLS` = 2 | RAS column write data (SI1, SI2) |
| `finalout` | 1 | serial scan output, the last cell of the chain |
| `finalout2` | `RAS_COLS` = 2 | RAS row last read through the sense amplifiers |
| `func_out` | 1 | output of the example functional logic (parity of all flip-flops) |

## The four modes

The mode is the two-bit value `{test_mode0, test_mode1}`:

| code | mode | serial part | RAS part |
|---|---|---|---|
| 00 | functional | every cell loads its functional D | every cell loads its functional D |
| 01 | mixed | shifts once per row access | read step, then write step, row by row |
| 10 | p-random | holds | read step, then write step, row by row |
| 11 | p-serial | shifts every cycle | holds |

The code values come from the published architecture. Taking `test_mode0` as the left bit is
this design's reading of it.

## RAS row access: read step, then write step

This part takes the most care to use correctly. In modes 01 and 10, `mode_ctrl` walks through
the RAS rows. Each row takes two clock cycles:

1. **Read step.** The row decoder enables row `r`. Each column's read line carries that row's
   cell. The sense amplifiers latch the lines at the clock edge, so after that edge `finalout2`
   shows the row's old contents.
2. **Write step.** Row `r` loads `si_ras`, one bit per column. In mixed mode the serial chain
   also shifts one position at the same edge: `si0` enters cell 0, and `finalout` moves on. After
   this step the row counter advances to `r+1`, wrapping from the last row to row 0.

A row is read before it is written, so the response captured in a row leaves through
`finalout2` before the next stimulus replaces it. One pass over the array takes
`2*RAS_ROWS` cycles. In that pass the serial chain shifts `RAS_ROWS` times. At the default
sizes (`N_SERIAL = RAS_ROWS = 4`), one mixed-mode pass therefore unloads and reloads both parts
completely.

In modes 00 and 11 the sequencer returns to row 0 and the read step. A mixed or p-random
unload that follows a capture therefore always starts at row 0. A mode change takes effect in
the cycle the pins change. Switching directly between modes 01 and 10 keeps the current row
and step.

Mixed mode, entered after a capture, with `N_SERIAL = RAS_ROWS = 4`:

| cycle | step | RAS row | after the edge |
|---|---|---|---|
| 0 | read | 0 | `finalout2` = row 0 response |
| 1 | write + shift | 0 | row 0 = `si_ras`; chain shifted, `finalout` = next response bit |
| 2 | read | 1 | `finalout2` = row 1 response |
| 3 | write + shift | 1 | ... |
| ... | | | |
| 7 | write + shift | 3 | row counter wraps to 0 |

Sample `finalout` before each write step's edge: cell `N_SERIAL-1` is visible at the start,
and the others follow one per write step. A test runs this way:

1. Load with a mixed pass.
2. Hold mode 00 for one cycle to capture.
3. Unload and load the next pattern with another mixed pass.

P-serial (11) and p-random (10) load or unload one part alone, for example when one part needs
more patterns than the other.

## The common scan cell

`scan_cell` is a flip-flop with three load paths, chosen by enables:

* `capture_en` loads the functional input `d`.
* `shift_en` loads the scan input `si`.
* `ras_we` loads the column write data `ras_wd`.

Its state `q` is both the functional output and the scan output. In the serial part `ras_we`
is tied low; in the RAS part `shift_en` is tied low. The controller never raises two enables at
once; if that did happen, the priority would be capture, then shift, then RAS write.

The published cell is a transistor-level master/slave flip-flop built from transmission gates.
It works as follows:

* The scan input enters the master latch through its own gates, clocked by a slow scan clock
  `SCK`, so no multiplexer sits in the functional D path.
* `SCK` is held high in functional mode.
* In test mode the functional clock is held high while `SCK` pulses. Its low phase writes `SI`
  into the master latch.
* A dynamic slave latch drives the scan output.

That circuit has no RTL form. This design keeps what the cell *does* and uses one clock with
enables instead of the second clock. A synthesis tool therefore builds the load selection from
ordinary logic, so the timing benefit of the mux-free cell is not reproduced here.

`tb/scan_ff_tg.sv` is a latch-level behavioural model of that two-clock cell, for simulation
only. It has three latches:

* a master latch that takes `SI` while `SCK` is low, or `D` while `CP` is low and `SCK` high;
* a slave latch that drives `Q` while `CP` is high;
* an output latch that drives `SO` while `SCK` is high.

`tb/tb_scan_ff_tg_equiv.sv` drives a chain of these cells and the RTL `serial_scan_chain` with
the same random captures and shifts. A capture is one `CP` pulse with `SCK` high; a shift is one
`SCK` low pulse with `CP` high. The test checks that both chains hold the same states and scan
output.

## Functional logic and the state order

The published architecture does not give the circuit whose flip-flops are scanned. `cut_logic`
is an example chosen for this design. The flip-flops form a ring, each XORed with one user input:

    d[i] = q[(i-1) mod N_FF] ^ in_data[i mod N_IN]        func_out = ^q

State bit order, used by `cut_logic` and by the testbenches:

* bits `0 .. N_SERIAL-1` are the serial cells in chain order, so cell 0 is nearest `si0`;
* they are followed by the RAS cells row by row: row `r`, column `c` is bit
  `N_SERIAL + r*RAS_COLS + c`.

To scan a different circuit, replace `cut_logic`. Keep its ports: `q` is the current state
vector and `d` the next state.

## Files

| file | contents |
|---|---|
| `rtl/mms_pkg.sv` | mode enum, RAS step enum, enable struct |
| `rtl/scan_cell.sv` | common scan cell |
| `rtl/serial_scan_chain.sv` | serial part: `N` cells in a chain |
| `rtl/ras_array.sv` | RAS part: `ROWS x COLS` cells, row decoder, column read lines |
| `rtl/ras_sense_amp.sv` | sense amplifiers, modelled as a column-wide register loaded on a read |
| `rtl/mode_ctrl.sv` | mode decoder and two-step row sequencer, with assertions |
| `rtl/cut_logic.sv` | example functional logic |
| `rtl/mixed_mode_scan_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/scan_ff_tg.sv`, `tb/tb_scan_ff_tg_equiv.sv` | latch-level model of the two-clock scan cell and its equivalence test |

Parameters of the top: `N_IN` (3), `N_SERIAL` (4), `RAS_ROWS` (4) and `RAS_COLS` (2). Three
user inputs, three scan inputs and a 2-bit RAS output match the published block diagram. The
chain length and the row count are this design's choice, because the published design does not
give a flip-flop count. Any sizes of 1 or more work. With `RAS_ROWS = 1` the row address is a
single constant-0 bit.

## Where this design departs from the published one, and how far to trust it

* **One clock instead of a slow scan clock.** Described in the scan cell section above.
* **Internal row counter.** The published comparison favours a version with fewer RAS control
  inputs, and the block diagram has no address pins. This design therefore generates the row
  address internally. Random access to an *arbitrary* row, which RAS usually offers, is not
  available: rows are visited in order, and p-random mode can only skip work by leaving the
  mode early.
* **One shift per row access in mixed mode.** How the serial shift lines up with the two RAS
  steps is this design's choice.
* **Added pin.** `func_out` and the functional logic itself are examples, not part of the
  published design.
* **Not modelled.** The split of flip-flops into the two parts is made at design time from ATPG
  care-bit statistics. It is not hardware and is not modelled: the split here is fixed by
  position.

Verification:

* Every module has a self-checking testbench that compares it after every clock edge with a
  reference model written independently in the testbench.
* Each testbench was shown to fail on a deliberately broken copy of its module.
* `tb_mixed_mode_scan_top` runs the top at its default parameters through a complete flow:
  * p-serial load;
  * functional cycles;
  * a p-random pass, checked to take `2*RAS_ROWS` cycles;
  * capture, then a mixed unload/load;
  * 400 random mode sequences with resets.

  It counts every mechanism: capture, shift, RAS read, RAS write, a shift and a write in the
  same cycle, row wrap and mode switch.
* The published waveform shows p-serial mode with IN1..IN3 = 1,1,0 and SI0..SI2 = 1,0,1, ending
  with `finalout` = 1 and `finalout2` = 00. The top testbench applies the same pin values and
  checks those outputs.

Area and delay figures were not compared, because the published figures are for an unstated
FPGA and circuit size.

## Simulating

With Verilator 5 (the testbenches use timing controls):

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv rtl/mms_pkg.sv \
        tb/tb_mixed_mode_scan_top.sv --top-module tb_mixed_mode_scan_top
    ./obj_dir/Vtb_mixed_mode_scan_top

Use the same command with any other `tb/tb_<module>.sv`. Each testbench ends with
`TB_RESULT checks=N failures=M`, and has a watchdog that counts a failure if the run hangs. Lint
a module with

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/mms_pkg.sv rtl/<module>.sv --top-module <module>
