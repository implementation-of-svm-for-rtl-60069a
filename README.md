# Stored-pattern space vector modulation for a cascaded H-bridge inverter

Space vector modulation (SVM) for a multilevel inverter has to choose among many
voltage vectors every sampling period. Computed in real time on a processor, this
forces a long sampling time, and a long sampling time gives distorted output with
high harmonic content. This design takes the computation out of the real-time
loop. The modulator runs offline at a short sampling time, DT = 5 µs. It yields the
switching state of every IGBT for each sample of one 50 Hz output period. Those
states are stored in on-chip memory, and the FPGA replays them to the gate drivers
at exactly the same DT. The inverter then switches just as the offline model did,
with no computation left in the FPGA.

The target is a three-phase, five-level cascaded H-bridge multilevel inverter
(CHMI). Each phase is a series string of two H-bridge cells, each with its own DC
source, so a phase can produce −2, −1, 0, +1 and +2 times the cell voltage. That
takes 3 × 2 × 4 = 24 IGBT gate signals. The three-level inverter, with one cell per
phase, is the same hardware with `CELLS = 1`.

## How the replay works

```
            +--------------+ tick  +------------------+ addr  +---------------+
 clk ------>| sample_timer |------>| sample_sequencer |------>| switch_memory |
 run ------>|  ÷ DIV (250) |   +-->|  0..DEPTH-1, wrap|       | 4000 x 24 bit |
            +--------------+   |   +------------------+       +-------+-------+
                               |                            rd_word  |  ^ ld_en/ld_addr/ld_data
                               |                                     v
                               +---------------------------> gate register --> gates[23:0]
```

* **`sample_timer`** divides the clock by `DIV = CLK_HZ × DT`. At the default
  50 MHz this is 250, so one cycle in 250 carries a `tick`. The tick falls on the
  last cycle of each sampling period.
* **`sample_sequencer`** holds the table address. It steps by one on each tick
  and returns to 0 after entry `DEPTH − 1`, so one stored period repeats for as
  long as `run` is high. `DEPTH = 4000` is one 20 ms period of 5 µs samples.
* **`switch_memory`** is a block-RAM-style table with one word per sample. Its
  read output is registered. It gets its content from `INIT_FILE` (`$readmemh`,
  one hex word per line) or through the load port.
* **`svm_fpga_player`** is the top module. On each tick its gate register loads
  the word at the current address. The word then drives the gates for a whole
  sampling period.

### Timing

The read address changes only on a tick, and ticks are at least two cycles apart.
So the registered memory output is already correct for the new address before the
next tick. This is why there is no read stall and no prefetch logic. The timer
asserts that `DIV ≥ 2`.

* After `run` rises, the first word (entry 0) reaches `gates` at the `DIV`-th
  rising edge.
* From then on `gates` changes exactly every `DIV` cycles. There is no jitter,
  since the rate is fixed by the counter.
* A full period takes `DEPTH × DIV` = 1,000,000 cycles (20 ms).
* `sample_strobe` is high in the first cycle of each new word, and `sample_idx`
  gives that word's table index.
* `period_start` marks entry 0 and `period_end` marks entry `DEPTH − 1`.
* When `run` goes low, all gates switch off on the next edge. The timer and the
  address go back to 0, so the next start replays from the beginning of the
  period.

### Gate word layout

Bit `(phase × CELLS + cell) × 4 + s` drives switch `S(s+1)`:

* phase 0/1/2 is a/b/c;
* cell 0 is the cell nearest the star point;
* within a cell, S1/S2 are the upper/lower switches of the left leg and S3/S4
  those of the right leg.

The struct `chmi_svm_pkg::hbridge_gates_t` names the four bits of a cell. A cell
adds +1 cell voltage with S1+S4 on, −1 with S2+S3 on, and 0 with S1+S3 or S2+S4 on.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | FPGA clock |
| `DT_NS` | 5000 | sampling time DT in ns |
| `CELLS` | 2 | H-bridge cells per phase: 2 = five-level, 1 = three-level |
| `DEPTH` | 4000 | samples stored, one 50 Hz period at DT |
| `INIT_FILE` | `""` | optional `$readmemh` file with the table |

Memory at the defaults is 96,000 bits, which fits easily in the block RAM of any
mid-size FPGA. Synthesis gives about 35 word-level cells and 59 flip-flops around
the memory.

## What is established and what is chosen here

These points follow the design this RTL implements:

* the switching states are computed offline and stored in the FPGA;
* they are replayed at the sampling time they were computed at, DT = 5 µs;
* the inverter is a five-level cascaded H-bridge, with the three-level one as a
  variant;
* the fundamental is 50 Hz, which gives 4000 samples per period.

These points are choices made in this RTL and were not specified:

* **Clock.** 50 MHz. Change `CLK_HZ`. `CLK_HZ × DT` should be a whole number of
  cycles, or DT is rounded down.
* **Table depth and content.** The table holds exactly one fundamental period and
  replays it cyclically, so other output frequencies need another table or
  another `DEPTH`.
* **Word format.** Raw gate bits rather than encoded levels, with the layout
  given above.
* **Loading.** The load port and the empty default `INIT_FILE` are choices of
  this RTL. No ready-made 4000-word table comes with it.
* **Start and stop.** The `run` input, the restart from sample 0, and all IGBTs
  off while stopped or in reset.
* **No dead time and no shoot-through protection.** The gate register applies
  the stored states exactly as they are. If the gate drivers do not insert dead
  time themselves, the table must contain only safe transitions, or a dead-time
  stage must be added after `gates`.
* **No modulator.** The space vector modulator itself, which produces the
  table, is not part of this RTL. The testbenches use a simple stand-in table:
  nearest-level rounding of a three-phase sine. The hardware does not depend on
  how its table was made.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M` at the end.

| testbench | what it covers |
|---|---|
| `tb_sample_timer` | first tick exactly 250 cycles after start, 250-cycle spacing, one-cycle ticks, silence while stopped, restart |
| `tb_sample_sequencer` | address against a reference counter with random tick gaps (DEPTH = 7), wrap flag, hold, return to 0 on stop |
| `tb_switch_memory` | full 4000 × 24 table filled at random and read back, one-cycle read latency, single overwrite, `INIT_FILE` content from `tb/switch_init_test.hex` (word k = (k × 0x010101) xor 0xA5A5A5) |
| `tb_svm_fpga_player` | the top at its default parameters, run end to end (see below) |
| `tb_svm_fpga_player_3l` | the same end-to-end test with `CELLS = 1` (three-level, 12 gate bits) |

`tb_svm_fpga_player` proceeds as follows:

1. It builds a five-level table for modulation index 0.9 and loads it through the
   load port.
2. It replays one full period and ten more samples.
3. It stops the player, then restarts it.

At every sample it checks:

* the gate word and its table index;
* that the word came exactly 250 cycles after the previous one;
* the period markers;
* the phase voltage levels, as seen by `tb/chmi_power_stage_model.sv`, a
  behavioural model of the H-bridge power stage that also flags shoot-through.

It also counts the period wrap, the stop with gates off, the restart from sample 0
and each of the five phase levels, and reports a failure for any of these that
never happened. It simulates the full 1,000,000-cycle period in under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/chmi_svm_pkg.sv tb/tb_svm_fpga_player.sv --top-module tb_svm_fpga_player
./obj_dir/Vtb_svm_fpga_player
```

Run it from the directory that holds `rtl/` and `tb/`, because
`tb_switch_memory` reads its `.hex` file by the relative path
`tb/switch_init_test.hex`. Verilator lint gives only unused-parameter warnings for
package constants that a given module does not use.

## Files

* `rtl/chmi_svm_pkg.sv`: constants (phases, switches per cell, 50 Hz, DT), the
  H-bridge gate struct, and functions for the word width and the table depth.
* `rtl/sample_timer.sv`, `rtl/sample_sequencer.sv`, `rtl/switch_memory.sv`: the
  three building blocks.
* `rtl/svm_fpga_player.sv`: the top module.
* `tb/`: the testbenches listed above, the power-stage model and the small
  initial-content file.
