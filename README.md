# DDR2 SDRAM controller

A DDR2 SDRAM cannot simply be read and written like an SRAM. Before a word can
be touched its row has to be opened in one of eight banks, data moves in bursts
on both clock edges with a strobe beside it, rows must be closed again before
another row of the same bank can be used, every row has to be refreshed within
64 ms, and the device only works after a fixed power-up ritual that programs its
mode registers. This controller hides all of that. A host hands it a request,
"write these four 16-bit words at bank/row/column" or "read four words from
there", and the controller produces the command and data pins of one x16 DDR2
device, with the right spacing between commands, and returns read bursts.

The design follows the FPGA DDR2 controller of *Implementation of FPGA based
Memory Controller for DDR2 SDRAM*, which builds it as one finite state machine
following the DDR2 state diagram and the DDR2 command truth table, intended for
recording audio into DDR2 memory on a Spartan-3 board. That source fixes the
command set, the states, the pin list and the widths (14 address bits, 3 bank
bits, 10 column bits, 16 data bits, 4n prefetch). It gives no clock rate and no
timing values, and it does not describe the data path. Those parts, and the host
handshake, are this design's own choices. They follow the DDR2 standard and are
marked as such below.

## Blocks and the command slot

```
 host: wr/rd/mrs, address,      +--------------------+  ref_req   +--------------------+
 burst, masks, pd_req, sr_req ->|   ddr2_ctrl_fsm    |<-----------| ddr2_refresh_timer |
                                |                    |----------->|                    |
                                +--------------------+  ref_ack   +--------------------+
                                  |            |
                    command slot  |            | wr_issue + burst, rd_issue
                                  v            |
  +-----------+  slot      +------------+      |
  | ddr2_init |----------->| mux        |      |
  +-----------+ until done +------------+      |
                                  |            |
                                  v            |
                           +--------------+    |
                           | ddr2_cmd_enc |    |
                           +--------------+    |
                                  | CKE CS# RAS# CAS# WE#, with BA and A of the slot
                                  v            v
                           +---------------------------+
                           |         ddr2_phy          |--> read burst, data_valid
                           +---------------------------+
                             CK CK# CKE CS# RAS# CAS# WE# BA A DQ DQS DM ODT
```

| Module | Role |
|---|---|
| `ddr2_controller` | Top level; wires the blocks below. |
| `ddr2_init` | Power-up sequence and mode register programming. |
| `ddr2_ctrl_fsm` | Command state machine: which command goes out in which cycle. |
| `ddr2_refresh_timer` | Requests one REFRESH every `T_REFI` cycles and counts owed refreshes. |
| `ddr2_cmd_enc` | DDR2 truth table: command to CKE, CS#, RAS#, CAS#, WE#. |
| `ddr2_phy` | Double-data-rate data path, DQS, DM, ODT, CK/CK#, read capture, command pin re-timing. |
| `ddr2_oddr`, `ddr2_iddr` | DDR output and input registers used by `ddr2_phy`. |
| `ddr2_pkg` | Widths, the command and state enums, burst types. |

Every cycle the state machine fills one *command slot*: a command, a bank
address and an address word. Until initialisation is done, `ddr2_init` owns the
slot. The slot is set at a rising clock edge and encoded into pin levels. It
goes onto the pins at the next falling edge, so it is stable around the next
rising edge of CK, where the device samples it.

## The state machine

The states are those of the DDR2 state diagram:

| State | Meaning | Left by |
|---|---|---|
| `ST_INIT` | power-up sequence running | `init_done` |
| `ST_IDLE` | all banks precharged | REFRESH, self refresh entry, (E)MRS, ACTIVATE, power-down entry |
| `ST_REFRESHING` | waiting tRFC after REFRESH | back to Idle |
| `ST_SETTING_MR` | waiting tMRD after a host MRS/EMRS | back to Idle |
| `ST_SELF_REFR` | CKE low, device refreshes itself | `sr_req` falls: CKE high, wait tXSRD |
| `ST_PRE_PDN` | precharge power-down (CKE low) | request, refresh or `pd_req` low: wait tXP |
| `ST_ACTIVATING` | waiting tRCD after ACTIVATE | WRITE/READ directly, or Bank active |
| `ST_BANK_ACTIVE` | one row open | WRITE, READ, WRITE A, READ A, PRECHARGE, power-down |
| `ST_ACT_PDN` | active power-down (row stays open) | as precharge power-down, back to Bank active |
| `ST_WRITING` / `ST_READING` | burst in progress (BL/2 cycles) | next WRITE/READ to the same row directly, else Bank active |
| `ST_WRITING_AP` / `ST_READING_AP` | burst with auto precharge | Precharging, once the device has closed the row |
| `ST_PRECHARGING` | waiting tRP | Idle |
| `ST_PDN_EXIT` | waiting tXP / tXSRD after CKE rises | Idle or Bank active |

`ST_PDN_EXIT` is this design's addition. It makes the exit wait a state of its
own.

**One row is open at a time.** A request to the open row (same bank and row)
is a *row hit*: its WRITE or READ goes out as soon as the spacing rules allow. A
request to any other row is a *row miss*: the open bank is closed with a
single-bank PRECHARGE (A10 low), the state machine returns to Idle, and the new
row is opened with ACTIVATE. A request with `ap` set uses WRITE/READ with auto
precharge (A10 high). The device then closes the row by itself, and the state
machine waits until it is closed and precharged before leaving Idle again.

**Mode registers.** Besides reads and writes, the host can ask for a mode
register write (`mrs`). It is handled like a row miss: an open row is closed
first, then LOAD MODE goes out from Idle and the controller waits tMRD before
the next command. This is how the device's output drivers are recalibrated
(EMRS(1) with OCD default, then OCD exit), or how the on-die termination
value is changed.

**Priorities.** On every decision the order is: a due refresh, then a
self-refresh request, then the pending host request, then a power-down request.
If a row is open when a refresh or self refresh is due, it is closed with
PRECHARGE ALL (A10 high) first.

**Timing is counted, not looked up.** A state wait counter covers tRCD, tRP,
tRFC, the burst length, the auto-precharge delay, tCKE and tXP/tXSRD. Four more
down-counters guard the spacing between commands. Each is loaded when a command
goes out and must reach zero before the next command of its kind:

| Counter | Loaded by | Value (cycles) |
|---|---|---|
| to PRECHARGE | ACTIVATE | tRAS |
| | WRITE | WL + BL/2 + tWR (write recovery) |
| | READ | BL/2 |
| to READ | WRITE | WL + BL/2 + tWTR |
| | READ | BL/2 |
| to WRITE | READ | CL + BL/2 + 2 - WL |
| | WRITE | BL/2 |

WL = CL - 1 is the write latency; additive latency is 0. With the defaults
(CL = 3, tWTR = 2), write-to-read on a row hit takes 6 cycles and read-to-write
takes 5. Consecutive writes, or consecutive reads, to one row take 2 cycles each,
so the data bus stays busy on every clock edge.

## Data on the pins

This is the part that is easiest to get wrong when changing the design.

Two clocks come in. `clk` runs everything and is forwarded as CK. `clk90` is the
same clock a quarter period later. Both must come from one clock manager.

**Writes.** When WRITE goes out, `ddr2_ctrl_fsm` raises `wr_issue` together with
the whole burst and its masks. `ddr2_phy` delays the burst in a shift register
so that beat 0 leaves at the rising edge WL cycles after the device sampled
WRITE. After that come beat 1 at the falling edge, then beats 2 and 3 one cycle
later. DQ and DM go through DDR output registers on `clk`. DQS goes through a DDR
output register on `clk90` driving 1/0, so every DQS edge lies in the middle of
its data beat, where the device latches DQ. DQS is driven low one cycle ahead
(preamble) and released half a cycle after the last edge (postamble). ODT is
high from the WRITE command until the burst has left. Writes two cycles apart
join into one unbroken stream.

**Reads.** The device returns beat 0 at the rising CK edge CL cycles after it
sampled READ. `ddr2_phy` samples DQ at both edges of `clk90`, which is the
middle of each beat. It moves each pair of beats into the `clk` domain one cycle
later, and after the second pair it pulses `data_valid` for one cycle with the
whole burst on `data_out`. From the edge at which the state machine issues READ
to the `data_valid` cycle is **CL + 3 cycles**: one cycle until the device
samples the command, CL cycles of device latency, and two cycles of capture and
re-timing.

**DDR output registers.** `ddr2_oddr` stores the rising-edge value in a
rising-edge flip-flop and the falling-edge value in a falling-edge flip-flop.
Each stores its value XOR the other's, and the output is the XOR of the two.
The output changes only at clock edges and no clock signal enters the data
path. An FPGA's dedicated DDR output flip-flop can take its place.

**Pads.** Every bidirectional pin is brought out as value, output enable and
input (`dq_o`/`dq_oe`/`dq_i`, `dqs_o`/`dqs_oe`). The I/O buffers, and the
differential buffer for CK/CK#, belong to the board wrapper.

## Power-up and refresh

`ddr2_init` plays the DDR2 standard's power-up list. First CKE is held low for
200 µs, then 400 ns of NOP. Then it issues PRECHARGE ALL, EMRS(2), EMRS(3),
EMRS(1) with the DLL on, MRS with DLL reset, PRECHARGE ALL, two REFRESH, MRS
without DLL reset, and after 200 cycles EMRS(1) with OCD default, then EMRS(1)
with OCD exit. After each command it waits the required time.

The mode register selects:

- burst length 4
- sequential burst order
- CAS latency `CL`
- write recovery `T_WR`

EMRS(1) selects:

- DLL enabled
- full drive strength
- 75 Ω on-die termination
- additive latency 0
- DQS# disabled, so only a single-ended DQS is used

`ddr2_refresh_timer` starts once initialisation is done. The device needs 8192
REFRESH commands per 64 ms, which is one every 7.8 µs, or 975 cycles at 125 MHz.
A refresh that cannot be served at once is remembered. Up to eight may be owed,
and beyond that the sticky `refresh_overflow` output rises.

## Interface

Host side (all synchronous to `clk`):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `wr`, `rd` | in | 1 | request a write / read burst |
| `mrs` | in | 1 | request a mode register write: `ba` selects MR (0) or EMR(1)-(3), `row_addr` is the value |
| `ba`, `row_addr`, `column_addr` | in | 3, 14, 10 | where |
| `ap` | in | 1 | close the row after this access (auto precharge) |
| `data_in` | in | 4 x 16 | write burst, `data_in[0]` first |
| `mask_in` | in | 4 x 2 | per beat and byte: 1 = leave that byte unchanged |
| `busy` | out | 1 | a request is pending (or init is running); requests are ignored |
| `data_out`, `data_valid` | out | 4 x 16, 1 | read burst and its one-cycle strobe |
| `pd_req`, `sr_req` | in | 1 | hold high to stay in power-down / self refresh |
| `init_done`, `refresh_overflow`, `state` | out | | status |

A request is taken at the rising edge where `wr`, `rd` or `mrs` is high and
`busy` is low. `busy` then stays high until the request's command has been issued,
so one request is pending at a time. Reads return in request order. The
sequential burst wraps inside an aligned group of four columns, so a column
whose low two bits are not zero starts mid-group. A host mode register write
must keep the CAS latency and burst length fields equal to `CL` and 4: the data
path is built for those values and does not follow the register.

Memory side: `ck`, `ck_n`, `cke`, `cs_n`, `ras_n`, `cas_n`, `we_n`, `mem_ba`,
`mem_a`, `dq_o`/`dq_oe`/`dq_i`, `dqs_o`/`dqs_oe`, `dm` (one bit per byte),
`odt`.

## Parameters

All timing parameters of `ddr2_controller` are in `clk` cycles. The defaults
are for a 125 MHz clock and a DDR2-400-class device, rounded up:

| Parameter | Default | Meaning |
|---|---|---|
| `CL` | 3 | CAS latency (WL = CL-1), at least 3 |
| `T_RCD`, `T_RP`, `T_RAS` | 2, 2, 5 | 15 ns, 15 ns, 40 ns |
| `T_RFC` | 14 | 105 ns (512 Mb device) |
| `T_WR`, `T_WTR`, `T_MRD` | 2, 2, 2 | write recovery, write to read, mode register |
| `T_CKE`, `T_XP`, `T_XSRD` | 3, 2, 200 | power-down / self-refresh limits |
| `T_REFI` | 975 | 7.8 µs refresh interval |
| `T_POWERUP`, `T_NOP400`, `T_DLL` | 25000, 50, 200 | 200 µs, 400 ns, DLL lock |

For a faster clock, recompute the values in cycles and keep the device's CL in
step with `CL`. The mode register is programmed from `CL` and `T_WR`. The
widths in `ddr2_pkg` are those of the source (x16, 8 banks, A0-A13, 10 column
bits). Most of the controller's flip-flops are the write bursts held in the
write pipeline of `ddr2_phy`: WL+1 stages of 73 bits each (valid, four beats, masks).

## Where this design departs from its source, or adds to it

- **DM polarity.** The source says the input is masked when DM is low. A DDR2
  device masks a byte when DM is *high*. Because the controller has to drive a
  standard device, DM high means masked here.
- **Burst-wide host data.** The source's simulation shows a 16-bit `data_in`.
  Here one request carries the whole 4-beat burst, because every DDR2 WRITE moves
  a whole burst. Masks cover the beats the host does not want to write.
- **Everything about timing** (clock rate, CL, all t-values, WL = CL-1, the
  DQS/ODT windows, the read latency) comes from the DDR2 standard, because the
  source gives none.
- **Read capture with `clk90`** instead of the returned DQS. This is exact in
  simulation. On a board the capture phase has to be calibrated, or replaced by
  DQS-based capture.
- **Single open row, fixed priorities, one pending request.** These are choices
  made for simplicity. A controller that keeps one row open per bank would cut
  the row-miss cost.
- **Mode register writes from the host** go through the state diagram's Setting
  MRS/EMRS state. Its OCD default step is an ordinary EMRS(1) here and has no
  state of its own. The host request and its handshake are this design's own.
- **PRECHARGE while already idle**, a self-loop in the state diagram, is not
  offered: it would change nothing in the device.
- **Not built:** the DDR2 device itself (see `tb/ddr2_sdram_model.sv` for the
  simulation model), the FPGA I/O buffers, and the audio source that the source
  design records from.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line.

| Testbench | What it shows |
|---|---|
| `tb_ddr2_cmd_enc` | every command, with CKE held low and not held low, against the truth table |
| `tb_ddr2_refresh_timer` | interval, ack, owed refreshes, overflow |
| `tb_ddr2_init` | the 13 power-up commands, their mode register values and waits |
| `tb_ddr2_ctrl_fsm` | command order and exact spacing: tRCD, WRITE->WRITE, WRITE->READ, READ->WRITE, write recovery, tRAS, tRP, tRFC, tMRD, auto precharge, both power-downs, self refresh, tXP, tXSRD, host (E)MRS with and without an open row |
| `tb_ddr2_phy` | DQS edge times and beats, preamble, seamless back-to-back writes, read capture and latency, command pin re-timing, CK/CK# |
| `tb_ddr2_controller` | end to end against the device model, with shortened power-up and refresh: row hits of all four kinds, row misses, masks, auto precharge, refresh under traffic, both power-downs, self refresh, host OCD default/exit and MRS, read latency CL+3; each of these must happen |
| `tb_ddr2_write_stream` | a recorder-like stream of 200 writes to one row, with a shortened refresh interval: WRITEs every 2 cycles, one PRECHARGE ALL / REFRESH / ACTIVATE per refresh, every word stored |
| `tb_ddr2_controller_full` | the controller at its default parameters: full 200 µs power-up, 64 bursts over all banks across several refresh intervals, refresh rate 1 per 975 cycles |

The device model `tb/ddr2_sdram_model.sv` decodes the pins, stores data sparsely,
returns reads at CL and latches writes on DQS. It flags any violation of bank
state, tRCD, tRP, tRAS, tRFC, tMRD or write recovery. It also flags a write beat
without DQS/DQ drive and a mode register that does not match CL and BL 4. It is a
behavioural check of the protocol. It does not model analog timing, so
setup/hold margins, DQS skew and board delays are untested.

To run a testbench with Verilator 5 (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_ddr2_controller rtl/ddr2_pkg.sv tb/tb_ddr2_controller.sv
./obj_dir/Vtb_ddr2_controller
```

Replace the testbench name to run the others. All of them finish in seconds;
the full-size one simulates about 30 000 cycles (238 µs).
