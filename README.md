# A closed-page FIFO DDR4 controller with refresh

This is the scheduling core of a DDR4 memory controller that favours simple,
checkable timing over bandwidth. Requests are served strictly in arrival order,
one at a time. Each request gets a **slot** of fixed length. In that slot the
controller precharges the target bank (PRE), opens the row (ACT) and issues the
single read or write (CAS). The slot is long enough that every DDR4 timing
constraint between two consecutive slots holds, whatever the two requests are.
Every refresh interval the controller stops starting slots. It then precharges
all banks (PREA) and refreshes (REF).

Because every request follows the same command pattern at the same offsets, the
command stream can be checked cycle by cycle. This makes the controller a good
fit for designs where correctness and predictable latency count more than
throughput.

The architecture follows the FIFO controller described in *From the Standards
to Silicon: Formally Proved Memory Controllers*. In that publication the
controller is written as a transition system and proved equivalent to a
verified scheduling model; it then replaces the scheduler of an existing
AXI-to-DDR4 controller. This RTL is an independent SystemVerilog
implementation of the same structure. The timing numbers, the encodings and the
reset behaviour are this implementation's own choices. Each one is listed below.

## The controller as a transition system

The controller (`cava_fifo_ctrl`) has three registers:

| register | meaning | range |
|---|---|---|
| `state` | `IDLE`, `RUNNING` or `REFRESHING` | 2 bits |
| `cnt`   | cycle inside the current slot | 0 .. SLOT_LEN-1 |
| `cref`  | refresh counter, counts every cycle and wraps | 0 .. T_REFI-1 |

A fourth register, `req`, sits inside `next_cr` and holds the request of the
slot in progress. The request queue (`request_queue`) holds the requests that
have been accepted but whose slot has not started.

Five blocks compute the outputs and the next state from the registers, in
this order:

```
            pending_i, request_i (host)
                    |
 read_logic --pop--> request_queue --empty, head--> next_cr --request_o-->
     ^                    |  ack_o (host)              |
     |                    v                            v
  state, cnt, cref <-- update_logic <------------- cmd_gen --command_o-->
```

* `read_logic` pops the queue when a slot starts.
* `request_queue` is a 256-entry dual-port memory with read and write pointers.
  It gives `empty`, the head entry (read combinationally) and the handshake
  signal `ack_o` (= not full).
* `next_cr` drives `request_o`. This is the queue head in the cycle a slot
  starts, `req` during the rest of the slot, and the all-zero null request
  otherwise.
* `cmd_gen` drives `command_o`.
* `update_logic` computes the next `state`, `cnt` and `cref`.

Each block computes the "slot starts now" condition from the registers on its
own: `state == IDLE`, queue not empty, and `cref <= CNT_REF_PREA - SLOT_LEN`.

## Slot and refresh timeline

This is the part that needs the most care. All numbers are in controller
(system) clock cycles, at the default parameters.

**A slot** (SLOT_LEN = 20 cycles):

| slot cycle | state | command | request_o |
|---|---|---|---|
| 0 | IDLE (slot start) | PRE to the request's bank | queue head (popped at this edge) |
| 1 .. 4 | RUNNING | NOP | req |
| 5 = T_RP | RUNNING | ACT (row) | req |
| 6 .. 9 | RUNNING | NOP | req |
| 10 = T_RP + T_RCD | RUNNING | RD or WR (column) | req |
| 11 .. 19 | RUNNING | NOP | req |
| 20 | IDLE | next slot's PRE if the queue is not empty | |

With a backlog, slots follow each other every 20 cycles. A request accepted
while the controller is idle and its queue is empty gets its PRE in the next
cycle and its CAS 11 cycles after the acceptance cycle.

The PRE of a slot goes to the bank of its own request. A bank that an earlier
slot opened for a different request stays open. It is closed by that bank's
next PRE or by the PREA of the next refresh. This is safe because the slot
length covers the worst-case CAS-to-PRE time.

**Refresh** (T_REFI = 2600 cycles, T_RFC = 117, T_RP = 5):

| `cref` | what happens |
|---|---|
| 0 .. 2458 | slots may start (a slot started at 2458 ends at 2477) |
| 2459 .. 2477 | no new slot; a running slot finishes |
| 2478 = CNT_REF_PREA | PREA, state becomes REFRESHING |
| 2483 = T_REFI - T_RFC | REF |
| 2599 | last REFRESHING cycle; `cref` wraps to 0 and state becomes IDLE |

REF commands are therefore exactly T_REFI cycles apart. The first command
after a REF comes T_RFC cycles later, and the first REF comes 2483 cycles after
reset.

## Host handshake

`pending_i` offers the request on `request_i`. The request is accepted at the
rising edge where `pending_i` and `ack_o` are both high. At most one request
is accepted per cycle. `ack_o` is combinational and low only while the queue
holds 256 requests; the host must then hold the request. The pop and the push
of one edge are independent, but `ack_o` does not look ahead to a pop in the
same cycle.

## The system around the controller

`ddr4_cava_ctrl_top` wraps the controller with two more blocks:

* `address_mapping` splits a 30-bit byte address of one 8 Gb x8 DDR4 device
  into `{row[15:0], bank[1:0], bank_group[1:0], column[9:0]}` (high to low).
  It also adds the read/write flag.
* `phy_cmd_slot` encodes the command as DDR4 command/address pins. The PHY runs
  at a quarter of the DRAM clock and takes four command slots per system
  clock. The controller issues one command per system clock and always uses
  slot 0. Slots 1–3 are deselect (`cs_n` = 1). The encoding follows the DDR4
  truth table:
  * ACT has `act_n` = 0 and the row on A16..A0 (`ras_n`/`cas_n`/`we_n` carry
    A16/A15/A14).
  * PRE and PREA differ only in A10.
  * RD and WR are sent with A10 = 0 (no auto-precharge) and A12 = 1 (BL8).

  Address bits that do not matter are driven to 0.

`command_o` and `request_o` are also top-level outputs. A RD or WR there
marks when the data of that request moves. Write and read data buffers would
attach at this point.

The following are **not** part of this RTL:

* the AXI front end;
* the write and read data buffers;
* the vendor DDR4 PHY (DQ/DQS alignment, initialisation, clock conversion);
* the DRAM.

The top brings out their connection points as ports.

## Timing parameters

The controller takes timing values in controller cycles. Commands only use
slot 0, so k controller cycles are 4k DRAM clocks (nCK). A JEDEC minimum of n
nCK therefore becomes ceil(n/4) cycles. The refresh interval is a maximum, so
it becomes floor(tREFI/4). `cava_dram_pkg` computes the defaults from DDR4-2666
(18-18-18, tCK 0.75 ns) values for an 8 Gb x8 part:

| parameter | nCK | cycles | used for |
|---|---|---|---|
| T_RP | 18 | 5 | PRE to ACT, PREA to REF |
| T_RCD | 18 | 5 | ACT to CAS |
| tRAS | 43 | 11 | ACT to PRE (slot length) |
| tRTP | 10 | 3 | RD to PRE (slot length) |
| CWL + BL/2 + tWR | 14 + 4 + 20 | 10 | WR to PRE (slot length) |
| CWL + BL/2 + tWTR | 14 + 4 + 10 | 7 | WR to next RD (slot length) |
| tFAW | 28 | 7 | four ACTs (slot length) |
| T_RFC | 467 | 117 | REF to next command |
| T_REFI | 10400 | 2600 | REF spacing |

SLOT_LEN is the largest of these four values:

* T_RP + tRAS (= tRC);
* T_RP + T_RCD + max(RD-to-PRE, WR-to-PRE);
* WR-to-RD;
* ceil(tFAW/4).

With the values above it is 20, set by the write-to-precharge time. For other
speed grades, override the module parameters. The design checks at
elaboration that a slot plus the refresh sequence fits in T_REFI.

The controller runs at a quarter of the DRAM command rate and moves one BL8
burst per 20-cycle slot. It does not try to compete on bandwidth.

## Where this implementation makes its own choices

* **Timing values, slot offsets and refresh dates.** The architecture only
  says that a slot fits every command within the timing constraints, and that
  a refresh counter decides when PREA is due. The offsets and dates above are
  this design's.
* **Slot start rule.** A slot starts only if it ends by the PREA date, so the
  refresh is never late.
* **Encodings.** State: IDLE 0, RUNNING 1, REFRESHING 2. Commands: NOP 0,
  PRE 1, ACT 2, RD 3, WR 4, PREA 5, REF 6. Request: 31 bits,
  `{we, bg, ba, row, col}`. The null request is all zeros.
* **Queue.** The queue reads combinationally, has no bypass from an empty
  queue, and sets `ack_o` to exactly "not full". The depth must be a power of
  two.
* **Reset.** Asynchronous, active low. The registers reset to IDLE/0/0 and the
  queue to empty; the queue memory itself is not reset.
* **Address mapping and pin encoding.** The address bit order is this design's
  own. The pin encoding follows the DDR4 standard, not any vendor's PHY port
  list.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_read_logic`, `tb_update_logic`, `tb_cmd_gen` sweep every state,
  emptiness and slot-cycle value, and the refresh-counter values around each
  date, against reference tables.
* `tb_request_queue` checks random push/pop against a queue model. The queue
  is driven full (256) and empty.
* `tb_next_cr` checks random sequences against a model of the req register.
* `tb_cava_fifo_ctrl` is a cycle-exact check of the controller (8-entry queue)
  over three refresh intervals. The testbench predicts, from its own cycle
  count, the cycle of every PRE, ACT, CAS, PREA and REF. It also counts host
  stalls, refreshes, starts held back by the refresh, and back-to-back slots.
* `tb_phy_cmd_slot` and `tb_address_mapping` compare against the DDR4 truth
  table and the address split.
* `tb_ddr4_cava_ctrl_top` runs the whole top at its default parameters for
  four refresh intervals, with random reads and writes at changing load.
  `tb/ddr4_cmd_monitor.sv` decodes the PHY pins in DRAM clocks and keeps
  per-bank state. It checks:
  * tRP, tRCD, tRAS, tRTP, tWR and tRFC, and the REF spacing against tREFI;
  * ACT only to closed banks and CAS only to open ones.

  The testbench also checks that every accepted request comes out once, in
  order, with the right bank, row and column. It checks the 11-cycle latency
  of an isolated request and the 20-cycle spacing under backlog. Each of
  these mechanisms must occur at least once: queue-full stall, refresh, start
  held back by the refresh, back-to-back slots, idle with an empty queue, read
  and write.

The timing checks hold only for the DDR4-2666 values written in the package.
They say nothing about the real PHY or DRAM model, which this RTL does not
include.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_ddr4_cava_ctrl_top \
  -Irtl -Itb -y rtl -y tb rtl/cava_dram_pkg.sv tb/tb_ddr4_cava_ctrl_top.sv
./obj_dir/Vtb_ddr4_cava_ctrl_top
```

Replace the top module and file to run another testbench. Every testbench ends
within a second. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/cava_dram_pkg.sv rtl/<module>.sv`.

## Files

| file | content |
|---|---|
| `rtl/cava_dram_pkg.sv` | request, state, command and PHY-slot types; DDR4 timing and slot length |
| `rtl/cava_fifo_ctrl.sv` | the controller: registers and the five blocks |
| `rtl/read_logic.sv`, `rtl/request_queue.sv`, `rtl/next_cr.sv`, `rtl/cmd_gen.sv`, `rtl/update_logic.sv` | the five blocks |
| `rtl/address_mapping.sv`, `rtl/phy_cmd_slot.sv` | address split and PHY slot encoding |
| `rtl/ddr4_cava_ctrl_top.sv` | top: mapping, controller, slot encoder |
| `tb/tb_*.sv` | testbenches |
| `tb/ddr4_cmd_monitor.sv` | pin-level DDR4 timing checker used by the top testbench |
