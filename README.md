# DDR SDRAM controller

A DDR SDRAM moves data on both edges of its clock. A user's logic, on the other
hand, wants one wide word per clock and simple commands. This controller sits
between the two. It accepts one-hot commands (READ, WRITE, REFRESH,
PRECHARGE, LOAD_MR) and 128-bit words once per controller clock. From these it
drives a 64-bit DDR SDRAM with ACTIVE / READ / WRITE / PRECHARGE / REFRESH /
LOAD MODE REGISTER commands, and moves two 64-bit beats per memory clock
with a data strobe (DQS). A 128-bit user word is therefore exactly one memory
clock of DQ traffic, and a burst of 4 beats is two user words.

After power-up the memory runs with burst length 4 and CAS latency 2, with a
64-bit data bus. Burst lengths 2 and 8 and CAS latencies 2.5 and 3 can be
selected at run time with a LOAD_MR command. The controller also runs the
memory's power-up sequence on its own.

The design is a direct, one-access-at-a-time controller. Each READ or WRITE
opens its row, transfers one burst and closes the row again with auto
precharge. There is no command pipelining across accesses, no open-row
policy and no interleaving between banks (see *Departures* below).

## Structure

```
ddr_top
├── user_interface      input registers, reset synchroniser
└── ddr_controller      the controller core
    ├── ddr_clock       memory clock ddr_clk / ddr_clkb      (Clock)
    ├── controller      timing and control state machine    (controller)
    ├── ddr_counter ×3  burst, CAS latency and tRCD counters (Brst_cntr, Cst_cntr, Rcd_cntr)
    ├── address_latch   row / column / bank / mode values    (Address latch)
    └── data_path       SDR <-> DDR data conversion          (Data path)
ddr_pkg                 widths, command and state enums, mode register codes
```

Every file begins with a comment that gives its interface and exact timing.
The sections below explain how the parts fit together.

## Clocks

Two clocks come in from outside: `u_clk` (called `clk` inside) and `u_clk2x`,
which runs at twice the frequency. Every rising edge of `clk` must coincide
with a rising edge of `clk2x`. In an FPGA both come from one clock manager,
which is not part of this RTL.

* **Clock block (`ddr_clock`)** regenerates `clk` as `ddr_clk`/`ddr_clkb`,
  retimed on the falling edge of `clk2x`. The memory clock therefore lags
  `clk` by a quarter period. Command and address pins change on `clk`, so
  the memory samples them in the middle of their valid window.
* **Write strobe.** DQS is launched on the falling edge of `clk2x`, which is
  also where the memory clock edges are. DQ is launched on the rising edges,
  so each DQS edge sits in the centre of its DQ beat, as the memory needs.
* **Read capture.** A DDR memory returns DQ edge-aligned with its clock.
  With the quarter-period lag, every rising edge of `clk2x` falls in the
  middle of a read beat. The data path samples DQ there. It does not use
  the returned DQS.

The data path needs to know which of the two `clk2x` edges in a `clk` period
it is on. It finds out with a toggle flop on `clk` and a copy of it on
`clk2x`; they differ only at the edge that coincides with `clk`.

This scheme holds only while the board and pad delays are small against a
quarter period. At the 100 MHz assumed here that is 2.5 ns.

## User commands and timing

`u_cmd[7:1]` is one-hot:

| u_cmd     | command   |
|-----------|-----------|
| `0000001` | NOP       |
| `0000010` | LOAD_MR: `u_addr[21:20]` selects MR (0) or EMR (1), `u_addr[11:0]` is the value |
| `0000100` | READ      |
| `0001000` | WRITE     |
| `0010000` | PRECHARGE (all banks) |
| `0100000` | REFRESH   |

The address splits as bank `u_addr[21:20]`, row `u_addr[19:8]` and column
`u_addr[7:0]`. For example, `0x297863` is bank 2, row `0x978`, column `0x63`.
The column is issued as `0x463`: A10 is set, which requests auto precharge.

Protocol at `ddr_top`, with all cycles counted on `u_clk`:

* A command is driven for one cycle. It is taken only in a cycle where
  `u_busy` is low that does not directly follow the previous command.
  Drive NOP at all other times. A command given while busy is dropped.
* **WRITE in cycle n:** ACT goes out in n+2 and WRITE in n+2+T_RCD. Word k
  of the burst (k = 0 … BL/2-1) must be on `u_data_i` in cycle
  n+1+T_RCD+k. The low 64 bits become the first beat of the pair.
* **READ in cycle n:** word k appears on `u_data_o`, with `u_data_valid`
  high for one cycle, in cycle n+3+T_RCD+ceil(CL)+k.
* **REFRESH in cycle n:** `u_ref_ack` is high in cycle n+2.
* `u_busy` is high during the power-up wait and sequence, and during every
  command until its recovery time (tRP, tRFC, tMRD, and write recovery plus
  tRP / tRC after an access) has passed.

With the defaults (T_RCD = 3, CL = 2, BL = 4), a read returns its first word
8 cycles after the command and a write takes its first word 4 cycles after.

## Controller state machine

States: IDLE, PRECHARGE, REFRESH, LOAD_MR, ACT, ACT_WAIT, READ,
READ_WAIT, READ_DATA, WRITE and WRITE_DATA. The state decides the
command-pin values (RAS#, CAS#, WE#) and the data-path controls directly
(a Moore machine).

* PRECHARGE, REFRESH and LOAD_MR each last one cycle and return to IDLE.
* READ and WRITE go through ACT. ACT loads the tRCD counter and waits in
  ACT_WAIT until `rcd_end`.
* WRITE takes the first user word. For burst length 2 it goes straight back
  to IDLE. Otherwise it continues to WRITE_DATA, which loops until the
  burst counter ends (burst length 8) or exits after one cycle (burst
  length 4).
* READ loads the CAS-latency counter and waits in READ_WAIT until
  `cas_lat_end`. For burst length 8 the machine then spends the burst in
  READ_DATA. Otherwise it returns to IDLE, and the data path alone
  collects the data.
* In the WRITE cycle the controller raises `ddr_dqs_t` and `ddr_write_en`
  (one bit per beat). floor(CL) cycles after READ it raises
  `u_data_valid_en` and `ddr_read_en` (one bit per clock of data). These
  are the data path's only instructions.
* A fifth counter, the recovery timer, is held loaded while the machine is
  away from IDLE and counts down in IDLE. `u_busy` stays high until it
  ends. This keeps tRP, tRFC, tMRD, tWR and tRC between commands.

### Power-up

After reset, CKE is held low for `INIT_WAIT` clocks (200 µs at 100 MHz). The
machine then issues, with the proper gaps, the following commands:

1. PRECHARGE ALL
2. LOAD MODE REGISTER to the EMR (DLL enabled, `EMR_INIT`)
3. LOAD MODE REGISTER to the MR (DLL reset, `MR_INIT` = BL 4, CL 2)
4. PRECHARGE ALL
5. AUTO REFRESH, twice

Only then does `u_busy` fall. Many memory datasheets also ask for a second
MR write without DLL reset and for 200 clocks before the first read. This
controller does not issue that MR write itself; a user LOAD_MR can do it.

## Counters

`ddr_counter` is a loadable down counter. Its end flag is high when the count
is zero and it is not loading in that cycle. Because of that rule, the state
that loads a counter never sees its end flag in the same cycle.

| Counter   | Loaded with | Times |
|-----------|-------------|-------|
| burst     | `burst_max` (2 for BL 8, else 0) | the READ_DATA / WRITE_DATA loops |
| CAS       | `cas_lat_max` = floor(CL)-2 | READ to first data |
| tRCD      | T_RCD-2 | ACT to READ/WRITE |
| recovery  | per command | command spacing |

## Address latch

The address latch registers `u_addr` when a command is accepted. It drives
`ddr_ad`/`ddr_ba` with one of three values:

* the row, during ACT;
* the mode value, during LOAD_MR: the user's value or one of the two
  power-up values;
* the column with A10 set, at all other times.

It also keeps a copy of the mode register. From that copy's burst-length
and CAS-latency fields it decodes `burst_2`, `burst_8`, `burst_max`,
`cas_lat_max` and `cas_lat_half`. The mode register uses the standard DDR
layout:

* A[2:0] is the burst length: 001 = 2, 010 = 4, 011 = 8.
* A[6:4] is the CAS latency: 010 = 2, 110 = 2.5, 011 = 3.
* A8 is DLL reset.

Other codes decode as BL 4 / CL 2.

## Data path

**Write.** In the clock after WRITE, the low half of the user word goes out
on DQ at the rising edge of `clk2x`, and the high half half a clock later.
Each following clock brings the next user word. DQS follows this pattern:

* preamble: driven low from three quarters of a clock after WRITE;
* burst: toggles in the centre of each beat;
* postamble: half a clock, then released.

The first rising edge of DQS thus comes one memory clock after the WRITE
command. That is the nominal tDQSS.

**Read.** `u_data_valid_en` arrives floor(CL) clocks after READ. Sampling
starts on the next mid-beat edge, or one `clk2x` later when CL has a half
clock. Beats are paired into 128-bit words, first beat low, and each word is
presented for exactly one `clk` cycle, aligned to `clk`.

`ddr_dq` and `ddr_dqs` are brought out as output, output enable and input.
The bidirectional pads belong to the board or FPGA wrapper. `ddr_dm` is held
low, because the user port has no byte mask.

## Parameters

The memory timings are counted in controller clocks and assume a DDR-266
class part at 100 MHz. Change them for another part or clock.

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `T_RCD` | 3 | ACT to READ/WRITE (min 2) |
| `T_RP`  | 3 | precharge period (min 2) |
| `T_RFC` | 8 | refresh cycle (min 2) |
| `T_MRD` | 2 | mode register set to next command (min 2) |
| `T_WR`  | 2 | write recovery |
| `T_RC`  | 7 | ACT to ACT, same bank |
| `INIT_WAIT` | 20000 | power-up wait with CKE low |
| `MR_INIT`, `EMR_INIT` | `12'h022`, `12'h000` | power-up mode values (on `ddr_controller`) |

The data widths (64-bit DQ, 128-bit user word, 22-bit user address, 12-bit
memory address) are constants in `ddr_pkg`.

## Departures from the original description

The design follows a published description of the controller. That
description gives the block structure, the port names of the address latch,
data path and controller, the state names and transition conditions, and
the power-up order. Where it was silent, this design makes its own
choices:

* **One access at a time.** The description mentions command pipelining and
  bank management for throughput. Its state machine does not show them,
  and the state machine was followed. Rows are closed by auto precharge
  after every burst.
* **Refresh on request only.** There is no internal refresh timer and no
  power-down mode. The user must issue REFRESH often enough (every 7.8 µs
  for a typical part).
* **Own additions:** the `u_busy` handshake, the recovery timer, the
  PRECHARGE command code, the timing values and all mode encodings.
* **Clocking:** read capture on `clk2x` instead of a separate capture
  clock. The original also names a third clock, `lac_clk`, without giving
  its use; here it is left out. The feedback clock inputs of the
  original's clock manager are not present either.
* **No data mask:** `ddr_dm` is tied low.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end.

* `tb_ddr_top` runs the whole controller at its default parameters,
  including the full 20000-clock power-up wait. It uses a behavioural memory
  model, `tb/ddr_sdram_model.sv`, which checks the following and fails the
  test on any violation:
  * the power-up order;
  * tRP, tRFC, tMRD, tRC and tRCD;
  * commands to closed or open banks;
  * write DQS timing (tDQSS);
  * DQ bus contention.

  The testbench writes and reads back bursts at every burst length and CAS
  latency, and checks the exact cycle of every data word. It also counts
  each state-machine mechanism (ACT_WAIT and READ_WAIT loops, data loops,
  the BL 2 shortcut, half-cycle CAS, refresh, mode switch, busy rejection)
  and fails any that never happened.
* `tb_ddr_controller` tests the core without the input registers, at a short
  power-up wait.
* `tb_controller`, `tb_address_latch`, `tb_data_path`, `tb_ddr_counter`,
  `tb_ddr_clock` and `tb_user_interface` test each block against its own
  reference model.

To simulate with Verilator (5.x), for example the end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/ddr_pkg.sv rtl/*.sv tb/ddr_sdram_model.sv tb/tb_ddr_top.sv \
  --top-module tb_ddr_top -o sim && ./obj_dir/sim
```

Replace the testbench file and top module name to run the others. All
packages must come first on the command line. Verilator is a two-state
simulator, so every register the design reads is reset.
