# TERO PUF for the Evarist III FPGA platform

A Physical Unclonable Function (PUF) turns the unavoidable manufacturing
differences between nominally identical circuits into a device-specific response.
This design uses **Transient Effect Ring Oscillators (TERO)**. A TERO cell is a loop
of two branches that, when its control input rises, oscillates for a while and then
settles. The number of oscillations before it settles depends on the mismatch
between the two branches, so it differs from cell to cell and from chip to chip.
The PUF starts two cells at the same moment, one from each of two separate blocks
of 128 cells. It counts the oscillations of each and reports both counts. Which
count is larger is the response bit for that pair of cells (the challenge).
The host makes that comparison.

The RTL is the application part of a platform in which a host PC talks over USB
to a fixed command sequencer. The sequencer passes 64-bit command words to an
application controller and reads results back from it. This repository holds:

* the application controller (`applic_ctrl`);
* the PUF core (`applic_wrp`) with its cells, selectors, multiplexers and counters;
* a top (`tero_puf_top`) that joins the two and exposes the sequencer-side bus.

The USB interface, the sequencer and the PLLs are platform parts and are not
included.

## Structure

```
                 tero_puf_top (clk_ctrl)
 sequencer  ┌──────────────────────────────────────────────────────────────┐
 ctrl2appl ─┤ applic_ctrl          select_tero_1[6:0] ┐                    │
 wr_ctrl2appl│  IDLE/CONFIG/        enable_tero ───────┼──► applic_wrp      │
 rd_data2bus │  START/READ FSM      data_req ──────────┤                    │
 data2bus  ◄─┤  window timer        cnt_reset ─────────┤  block 1: selector → 128 TERO cells → mux → 16-bit counter
 state2bus ◄─┤  result register     select_tero_2[6:0] ┘  block 2: selector → 128 TERO cells → mux → 16-bit counter
 busy2bus  ◄─┤                  ◄── appl_data[31:0] = {count 2, count 1}
            └──────────────────────────────────────────────────────────────┘
```

| File | Contents |
|---|---|
| `rtl/tero_puf_pkg.sv` | widths, mode codes, command-word struct, states, status codes, `make_cmd()` |
| `rtl/tero_puf_top.sv` | controller plus wrapper |
| `rtl/applic_ctrl.sv` | state machine, command decoding, capture window, result register |
| `rtl/applic_wrp.sv` | the two blocks with their selectors, multiplexers and counters |
| `rtl/tero_selector.sv` | routes `enable_tero` to the addressed cell only |
| `rtl/tero_mux.sv` | routes the addressed cell's output to the counter clock |
| `rtl/tero_counter.sv` | 16-bit oscillation counter clocked by the cell |
| `rtl/tero_block.sv` | 128 cell models, each with its own oscillation count (behavioural) |
| `rtl/tero_cell.sv` | behavioural TERO cell (not synthesizable) |

Only two cells can oscillate at once, one per block, because each selector
enables just the cell it addresses. On the FPGA the two blocks are placed apart,
and each cell is a hand-placed hard macro.

## Command word

The sequencer writes `ctrl2appl[63:0]` with a one-cycle `wr_ctrl2appl` strobe.

| Bits | Field | Meaning |
|---|---|---|
| 63 | end of script | host-side marker, ignored by the application |
| 58 | reset | return the controller to IDLE and restore the defaults |
| 35:20 | acquisition time | capture window in `clk_ctrl` cycles (CNT_MAX) |
| 18:12 | select_tero_2 | cell address in block 2 |
| 10:4 | select_tero_1 | cell address in block 1 |
| 2:0 | mode | 0 = IDLE, 3 = CONFIG, 7 = START (data acquisition) |

Worked example: `0x000000000500F093` sets mode 3 (configuration), block-1 cell 9,
block-2 cell 15 and an 80-cycle window. `tero_puf_pkg::make_cmd(mode, acq_time,
sel1, sel2)` builds such words.

A typical host session is: reset (`0x0400000000000000`); configure (for example
`0x0000000005000003`, cells 0/0, 80 cycles); start (`0x0000000000000007`); then
any number of reads. Each read returns one new acquisition of the same pair. To
measure another pair, configure and start again. No reset is needed in between.

## The controller and the acquisition cycle

This is the part that needs the most care. The two counters are clocked by the
oscillators themselves. Their clocks run only during a burst, and they are
unrelated to `clk_ctrl`.

States and what each holds (`status` is reported in `state2bus[7:0]`):

| State | status | cell addresses | window limit | configuration registers |
|---|---|---|---|---|
| IDLE | 0 | 0 | 0 | cells 0/0, acquisition time 255 |
| CONFIG | 1 | 0 | 0 | loaded from the last command word |
| START | 2 | configured | CNT_MAX | kept |
| READ | 3 | configured | CNT_MAX | kept |

Transitions:

* A mode command moves the controller to the state of the same name, from any
  state.
* The exception is MODE_START, which is ignored while an acquisition is already
  running (START or READ).
* The reset flag returns the controller to IDLE, as does the synchronous `rst`
  input.
* START → READ is taken by the controller itself when the window has lasted
  CNT_MAX cycles.
* READ → START is taken when the sequencer reads the result with `rd_data2bus`.

One acquisition, cycle by cycle:

1. **Clear.** Outside a window and its readout, `cnt_reset` is high and holds
   both counters at 0 (asynchronous clear). `cnt_reset` falls on the first clock
   edge in START. That is the edge where the window opens, or one cycle earlier
   when the addresses still have to change.
2. **Window.** `enable_tero` is high for exactly CNT_MAX `clk_ctrl` cycles.
   CNT_MAX = 0 means 65536 cycles. The addressed cells see the rising edge and
   burst. The counters count rising edges of their cell's output while
   `enable_tero` is high. The addresses are set one cycle before the window
   opens, so the selectors are stable when the enable arrives.
3. **Request.** When the window closes, the controller moves to READ and raises
   `data_req`. Only then do the counters drive their values onto `appl_data`;
   the rest of the time they drive 0.
4. **Capture.** `READ_WAIT` (default 2) cycles later, the controller copies
   `appl_data` into `data2bus[31:0]` and lowers `busy2bus`. Because the window
   has closed, the counters are frozen, so the multi-bit capture across clock
   domains is safe without a synchronizer. This assumes the cells have settled
   or have been stopped, which happens when `enable_tero` falls.
5. **Read.** When the sequencer pulses `rd_data2bus`, the controller:
   * lowers `data_req`;
   * raises `cnt_reset`;
   * raises `busy2bus`;
   * goes back to START, where the next window opens one cycle later.

The counter clear is a register of its own, separate from `enable_tero` and
`data_req`. Those two change on the same clock edge, so a clear decoded from
them could glitch. After `rst`, `cnt_reset` is low for the reset cycles and rises
in the first IDLE cycle, which gives the counters a clean clearing edge.

If the window is shorter than the burst, the counts are cut to the oscillations
that fit in it. Choosing a window longer than the slowest cell's burst is the
user's job.

`busy2bus` is high in START and in READ until the result is captured. A
sequencer waits for it to fall before reading.

## The TERO cell model

`tero_cell` is a simulation model, because the real cell is an analog circuit.
After a rising `ctrl` edge it produces `OSC_COUNT` periods of `2*HALF_PERIOD` ns
and then rests at 0. A falling `ctrl` forces the output to 0 and ends the burst.
It is written as a loop of scheduled events, with each output transition
launching the next one. That loop shows up as a combinational loop to synthesis
tools. `ctrl` must stay low for at least `HALF_PERIOD` between bursts.

`tero_block` gives cell `i` of block `b` the count

```
k = b*N_CELLS + i
h = (k * 2654435761) xor (k >> 3)          (32-bit, wrapping)
OSC_COUNT = OSC_NOMINAL - OSC_SPREAD/2 + (h mod OSC_SPREAD)
```

With the defaults (100, 64) every cell makes 68 to 131 oscillations of 4 ns.
That is at most 524 ns, well inside an 80-cycle window at a 10 ns clock. The
model has no run-to-run noise, so every acquisition of a pair gives the same
counts. This makes the testbenches exact, but it does not model the noise a real
PUF sees. Neither the counts, the period nor the spread come from measured
silicon. They are placeholders to be replaced by a characterised model.

For an FPGA build, replace `tero_cell` with the vendor-specific placed cell, or
`tero_block` with the array of them. Everything else is synthesizable RTL.

## Parameters

| Parameter | Where | Default | Origin |
|---|---|---|---|
| cells per block / address width | package, `applic_wrp` | 128 / 7 | platform design |
| counter width `CNT_W` | package, `applic_wrp` | 16 | platform design |
| default acquisition time | package | 255 cycles | platform design |
| `READ_WAIT` | `applic_ctrl`, top | 2 | this design |
| `OSC_NOMINAL`, `OSC_SPREAD`, `HALF_PERIOD` | cell model, top | 100, 64, 2.0 ns | this design (model only) |

## What follows the reference design and what is chosen here

These parts follow the reference design:

* two separate blocks of 128 cells;
* per block, a selector, a multiplexer used as the counter clock, and a 16-bit
  counter;
* the four states and the registers each one sets;
* the 255-cycle default window;
* the command-word layout and mode codes;
* the reset command word;
* the 64/128/96-bit widths of the sequencer bus.

These are choices of this design, made where the reference is silent:

* READ → START on a read;
* the exact meaning of the counter's `reset`, `enable_tero` and `data_req`
  inputs (asynchronous clear, count enable, output enable);
* `READ_WAIT`;
* the status codes 0..3;
* the meaning of `busy2bus`;
* the order `{block 2, block 1}` in `appl_data`;
* wrap-around of the counters;
* synchronous active-high `rst`;
* ignoring MODE_START during an acquisition.

The platform clocks `clk_if` and `clk_appl` are not used: everything synchronous
runs on `clk_ctrl`. The platform's separate data channel to the application
(`data2appl`, `wr_data2appl`) carries nothing for this PUF and is left out.

Not included: the USB interface and the sequencer (platform parts, described
elsewhere); the PLLs; the gate-level cell netlists for the two FPGA families.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tero_cell_tb`: edge count, period, rest level, early stop.
* `tero_block_tb`: each of the 128 cells gives its own count and the others stay
  silent.
* `tero_selector_tb`, `tero_mux_tb`: exhaustive over all 128 addresses.
* `tero_counter_tb`: counting, enable gating, output gating, asynchronous clear,
  wrap at 2^16.
* `applic_wrp_tb`: 22 cell pairs at full size, checked against the mismatch
  formula, including a window shorter than the burst.
* `applic_ctrl_tb`: window lengths in cycles (80, 255, 1), addresses, clear,
  capture, `busy2bus`, mode changes and the reset command in the middle of an
  acquisition.
* `tero_puf_top_tb`: the full design at default parameters. It plays the host
  script (reset; cells 0/0 with 100 reads; block-1 cell 64 with 100 reads;
  reset), then the 9/15 example with 200 chained reads, a truncated window, IDLE,
  the default window and a reconfiguration mid-acquisition. That is 412
  acquisitions, each checked. It also counts each mechanism and fails if any of
  them never happened.

A broken copy of every module (for example a window one cycle too long, or the
two counts swapped) makes its testbench fail.

## Simulating

With Verilator 5 (needs `--timing` for the cell model):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/tero_puf_pkg.sv tb/tero_puf_top_tb.sv --top-module tero_puf_top_tb
./obj_dir/Vtero_puf_top_tb
```

Swap the testbench name to run any other. The full-size run takes a few seconds.
To lint the synthesizable part on its own, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/tero_puf_pkg.sv rtl/applic_ctrl.sv`.
