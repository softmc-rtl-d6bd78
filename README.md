# SoftMC controller in SystemVerilog

SoftMC is a memory controller for DRAM *experiments*, not for performance.
A normal controller hides DRAM timing behind a scheduler; SoftMC does the
opposite. The host writes a program of raw DDR3 commands with explicit gaps
between them (ACTIVATE, wait 3 cycles, READ, ...), and the FPGA plays it on the
command bus cycle for cycle. That makes it possible to break the datasheet
timing on purpose, or to leave a row unrefreshed for half a second, and then
look at which bits came back wrong. Three experiments show what it is for:

* **Retention time.** Write a row, switch refresh off, wait, read the row
  back, and count the bytes that flipped.
* **Ready-to-access latency.** Read a row only 3, 4, 5 or 6 cycles after
  activating it, and see whether recently refreshed (highly charged) cells
  can be read sooner than the standard allows.
* **Activation latency.** The same kind of loop, but the row is closed again
  sooner after ACTIVATE than the standard allows.

This repository holds the FPGA side of that system as synthesizable
SystemVerilog. It covers the instruction path from the host link to the DDR3
command bus, the refresh and calibration maintenance, and the read-data
path back to the host. The PCIe transport and the DDR PHY are not included.
They are represented by their ports, and by a behavioural model for
simulation.

## The instruction word

Everything the host asks for is a 32-bit instruction. The type is in
bits [31:28]. There are four types:

| type   | bits [27:0]                                                                      |
|--------|-----------------------------------------------------------------------------------|
| DDR    | unused [27:25], CKE [24], CS#[1:0] [23:22], RAS# [21], CAS# [20], WE# [19], bank [18:16], address [15:0] |
| WAIT   | cycles [27:0]                                                                     |
| BUSDIR | unused [27:1], dir [0] (0 = write, 1 = read)                                      |
| END    | unused                                                                            |

The field widths and their order are SoftMC's. The following are choices
made in this implementation:

* **Type codes.** END = 0, DDR = 1, WAIT = 2, BUSDIR = 3 (`softmc_pkg::instr_type_e`).
* **Pin levels.** A DDR instruction carries the levels of the bus pins
  directly. The host therefore builds commands from the JEDEC truth table.
  For example, ACTIVATE on rank 0 is CKE=1, CS#=10, RAS#=0, CAS#=1, WE#=1,
  with the row in the address field. Nothing in the hardware knows what a
  command means, so any command can be sent, including MRS, ZQ, refresh and
  power-down entry.
* **Write data.** A WRITE is a DDR instruction with RAS#=1, CAS#=0, WE#=0
  and some CS# low. The word that follows it in the stream is its data, not
  an instruction. That 32-bit word is repeated across the whole
  512-bit burst (64 DQ × 8 beats). Repeated patterns are what retention and
  latency tests use, and this keeps the 32-bit instruction format unchanged.

`softmc_pkg` also provides `mk_ddr`, `mk_wait`, `mk_busdir` and `mk_end` to
build instruction words. The testbenches use them the way host software would.

## Timing of a sequence

The main promise of the design is exact spacing. The dispatcher follows three
rules:

1. Every instruction other than WAIT takes one cycle.
2. A `WAIT n` that directly follows a DDR or BUSDIR instruction counts
   from that instruction's cycle. `ACT, WAIT 5, WR` puts the WRITE
   **exactly 5 cycles** after the ACTIVATE. `WAIT 0` and `WAIT 1` both mean
   back to back.
3. Further WAITs add their full count. A WAIT at the start of a sequence
   delays the first command by n cycles.

On every idle cycle the bus carries a deselect. The CKE level of the last DDR
instruction is kept, so the bus stays in power-down until the program raises
CKE again.

To make rule 2 free of bubbles, the instruction queue shows its three oldest
words at once. The dispatcher can then consume `WR`, its data word and the
following `WAIT` in the same cycle.

A second mechanism protects the timing from the host link. **A sequence
only starts once it is complete in the queue.** The receiver counts END
instructions as they arrive, skipping write-data words that happen to look
like END. The dispatcher waits for that count to be non-zero. A slow or
bursty host link can therefore never insert a gap in the middle of a
programmed sequence.

The cost is that a sequence has to fit in the queue (4096 words by default).
If the queue fills before any END has arrived, `seq_too_long` goes high and
stays high. The sequence can never run, and the host has to reset the
controller.

A WAIT is at most 2^28−1 cycles, which is 0.67 s at 400 MHz. That is enough to
hold a whole retention interval inside one sequence.

## Sharing the command bus: refresh and calibration

Three sources drive the bus: the dispatcher, the auto-refresh controller and
the calibration controller. `cmd_arbiter` gives the bus to one of them at a
time. The owner keeps the bus until it signals `done`. While the bus is free,
a pending refresh goes first, then a pending calibration, then a complete
instruction sequence. **A running sequence is never interrupted.** Refresh and
calibration only happen between sequences.

* **Auto-refresh** (`autoref_ctrl`) owes one refresh every `T_REFI` cycles.
  When it gets the bus it issues PRECHARGE ALL, waits `T_RP`, then issues
  one REFRESH per owed refresh, each followed by `T_RFC`. Up to 8 refreshes
  can be owed, which is the postponement DDR3 allows. Beyond that,
  `ref_missed` pulses.
  * A long WAIT inside a sequence therefore also postpones refresh, which is
    intended for retention experiments.
  * `ref_enable = 0` stops refresh altogether.
* **Calibration** (`calib_ctrl`) issues PRECHARGE ALL, waits `T_RP`, then
  issues ZQCS every `T_ZQI` cycles (128 ms by default). `cal_enable`
  switches it off.
* **No maintenance while CKE is low.** Neither controller gets the bus while
  the last sequence left CKE low. The host has to bring the device out of
  power-down or self-refresh first.
* **PHY start-up.** Nothing is granted before `phy_ready`.
* **Spacing after maintenance.** When maintenance hands the bus back, the
  next command comes at least `T_RFC+1` (or `T_ZQCS+1`) cycles after the
  REFRESH (or ZQCS).

Maintenance commands go to both ranks at once (CS# = 00).

## Read data path

The PHY returns each READ as one 512-bit burst on `phy_rd_valid`/`phy_rd_data`,
whenever it has captured it. `read_capture` stores whole bursts in a
128-entry FIFO, which holds one full 8 KB row of a 64-bit module. It hands
them to the host link as 32-bit words, lowest word first, 16 words per burst,
with valid/ready flow control.

If the host stops reading and the FIFO fills, further bursts are dropped.
`rd_overflow` goes high and stays high, and `rd_dropped` counts the dropped
bursts. The host can therefore tell lost data from DRAM errors.

BUSDIR only drives `phy_bus_dir`. A program must switch the direction
before its READs and switch it back before its WRITEs. With the bus set the
wrong way the PHY captures nothing; the simulation model drops such a READ.

## Module map and interfaces

```
 host_instr_* (32-bit words)
        │
        ▼
 instr_receiver ──────── seq_avail ─────────────┐
        │  ▲                                     │
        │  └───────────── seq_done ───────────┐  │
        ▼                                     │  ▼
 instr_queue ── head0..2 / pop_n ──► instr_dispatcher ──► phy_wr_en, phy_wr_data,
                                              │            phy_bus_dir
                                              │ disp_cmd
 autoref_ctrl ── ref_cmd ──┐                  ▼
 calib_ctrl ──── cal_cmd ──┴──────────► cmd_arbiter ──► phy_cmd
        (req / grant / done between each source and the arbiter)

 host_rd_* ◄── read_capture ◄── phy_rd_valid, phy_rd_data
```

| file | role |
|------|------|
| `rtl/softmc_pkg.sv` | instruction types, field layout, `ddr_cmd_t`, command helpers |
| `rtl/instr_receiver.sv` | host words into the queue, counts complete sequences |
| `rtl/instr_queue.sv` | instruction FIFO with a three-word look-ahead |
| `rtl/instr_dispatcher.sv` | executes DDR / WAIT / BUSDIR / END with exact spacing |
| `rtl/autoref_ctrl.sv` | periodic PRECHARGE ALL + REFRESH, postponement, enable |
| `rtl/calib_ctrl.sv` | periodic PRECHARGE ALL + ZQCS |
| `rtl/cmd_arbiter.sv` | single owner of the command bus, maintenance between sequences |
| `rtl/read_capture.sv` | read-burst FIFO, 32-bit stream to the host, overflow report |
| `rtl/softmc_top.sv` | the controller |

Ports of `softmc_top`:

* **Host link.** `host_instr_*` carries instruction words in and
  `host_rd_*` carries read data out. Both are 32-bit valid/ready streams.
* **Control.** The inputs are `ref_enable` and `cal_enable`.
* **Status.** The outputs are `seq_busy`, `seq_done`, `seq_too_long`,
  `maint_busy`, `ref_missed`, `rd_overflow` and `rd_dropped`.
* **PHY.**
  * `phy_cmd` carries the command pins (`ddr_cmd_t`), one command per clock.
  * `phy_wr_en`/`phy_wr_data` present the write burst in the same cycle as
    its WRITE.
  * The other PHY ports are `phy_bus_dir`, `phy_rd_valid`/`phy_rd_data`
    and `phy_ready`.

Every module resets asynchronously on `rst_n` low. Each command source
registers its command; the arbiter only selects between those registers, so
`phy_cmd` passes through one multiplexer after a flip-flop.

## Parameters and their origin

The original gives the instruction format and the block structure, but no
clock rates, depths or DRAM timing. The defaults below assume a 400 MHz
command clock (DDR3-800, one command per controller clock) and a 2 Gb DDR3
device.

| parameter | default | meaning |
|-----------|---------|---------|
| `Q_DEPTH` | 4096 | instruction queue words; a full-row write program of 1024 single-column WRITEs (3078 words) fits |
| `RD_DEPTH` | 128 | read bursts buffered (one 8 KB row) |
| `T_REFI` | 3120 | 7.8 µs = 64 ms / 8192 refreshes |
| `T_RFC` | 64 | 160 ns |
| `T_RP` | 6 | 13.75 ns, used by the maintenance sequences only |
| `T_ZQI` | 51 200 000 | 128 ms between ZQ calibrations |
| `T_ZQCS` | 64 | clocks |

All timing inside a host program is the host's business. The controller does
not check it, so that it can be violated on purpose.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/softmc_pkg.sv tb/tb_softmc_top.sv --top-module tb_softmc_top
./obj_dir/Vtb_softmc_top
```

* **Block testbenches.** `tb_instr_queue`, `tb_instr_receiver`,
  `tb_instr_dispatcher`, `tb_autoref_ctrl`, `tb_calib_ctrl` and
  `tb_read_capture` test the blocks one by one. They compare against
  reference models or hand-worked cycle counts.
* **`tb_softmc_top`.** Runs the whole controller at reduced timing against
  `tb/ddr3_phy_model.sv`. This model is a behavioural PHY plus DDR3 device.
  A READ less than 4 cycles after its ACTIVATE returns flipped bits, and a
  row left without refresh or activation for 5000 cycles loses its "weak"
  bytes (one byte in every 16th burst, starting with burst 1; it leaks to
  0). The test covers:
  * write-and-read-back;
  * the ready-to-access sweep over 3 to 6 cycles, where only 3 cycles shows
    errors;
  * retention with refresh off, where errors appear, and with refresh on,
    where none do;
  * refresh postponed and missed during a long sequence;
  * queue back-pressure;
  * a READ blocked by the bus direction;
  * read-buffer overflow and an overlong sequence.

  It also checks that no command falls inside tRFC of a REFRESH.
* **`tb_softmc_workloads`.** Runs the three characterization experiments as
  loops against the same model, with the same scaled-down decay time:
  * a retention sweep (write, wait 1000 to 9000 cycles with refresh off,
    read back);
  * the ready-to-access test (write, wait, ACT-PRE, wait, read at 3 to 6
    cycles after ACTIVATE);
  * the activation latency test (the same loop with ACT-to-PRECHARGE
    distances of 4, 8 and 16 cycles).

  It predicts each error count from the model's two effects and checks every
  ACT-to-READ and ACT-to-PRECHARGE distance on the bus.
* **`tb_softmc_full`.** Uses every default. It writes and reads back a whole
  8 KB row, then runs for 51.2 M cycles until the first ZQ calibration,
  checking the refresh rate on the way. It then switches refresh off and runs
  one sequence that writes a row, waits 28 M cycles (70 ms) in a single WAIT
  and reads the row back. Exactly the model's 8 weak bytes must be wrong,
  since its default decay time is 64 ms. It takes under a minute.

## What is not here, and where this departs from the original

* **DDR PHY.** This is the FPGA vendor's IO block, which handles DQS
  capture, write and read leveling, and DRAM initialisation. It is outside
  the RTL. The interface assumed for it (one command per clock, whole bursts
  on the data side) is simpler than a real multi-rate PHY, which would need
  a thin adapter.
* **PCIe transport.** This is the host side, and the original uses an
  existing PCIe framework for it. Only its word streams appear, as
  valid/ready ports.
* **Host software.** The C++ library that builds instruction sequences is not
  included.
* **Calibration controller.** The original only names this block. Here it is
  a periodic ZQ short calibration, which is an interpretation.
* **Inside the named blocks.** The internal structure of the auto-refresh
  controller, the receiver and the read capture is not described in the
  original either. What is here is the simplest logic that does the named
  job.
* **Own choices.** The sequence-complete rule, the WAIT counting rule, the
  write-data word, the type codes and the arbitration are this design's own.
  They are the places to look first when making these files interoperate with
  other SoftMC software.
