# A DDR2 SDRAM device model built on two SRAMs

This is a synthesizable, cycle-accurate model of a DDR2 SDRAM. A memory
controller sees the usual DDR2 pins: CKE, CS#, RAS#, CAS#, WE#, BA, A, DQ,
DQS and DM/RDQS. The data itself is kept in two ordinary single-data-rate
SRAMs outside the model. The model turns the double-data-rate traffic into
one double-width word per clock. Even columns go to one SRAM and odd columns
to the other. The model also checks that the controller follows the DDR2
command rules. The aim is a DDR2 "device" that can go into an FPGA or a
simulation next to a real controller. It returns read data at exactly the
clock the standard demands and reports illegal command sequences.

The model has five blocks on two paths:

| path | block | module |
|---|---|---|
| control | instruction decoder | `ddr2_instr_decoder` |
| control | bank control: an all-bank FSM and one FSM per bank | `ddr2_bank_control`, `ddr2_all_bank_fsm`, `ddr2_bank_fsm` |
| data | DDR2 pin interface | `ddr2_interface` |
| data | SRAM interface | `ddr2_sram_interface` |
| data | address reorder | `ddr2_addr_reorder` |

`ddr2_model` is the top level and wires these blocks together. The shared
types are in `ddr2_pkg`: the command and error enumerations and the
mode-register struct.

```
 pins ──> instr_decoder ──cmd/bank/row/col──> bank_control ──burst_start/write/bank/row/col──┐
                                                  │ mode (BL, order, CL, AL, RDQS)            v
 DQ/DQS/DM <──> ddr2_interface <──2×DQ word / masks──> sram_interface ──{bank,row,col/2}──> addr_reorder ──> SRAM0 (even columns)
                                                                                 └────────> addr_reorder ──> SRAM1 (odd columns)
```

## Defaults

| parameter | default | meaning |
|---|---|---|
| `BANK_BITS` | 3 | 8 banks |
| `ROW_BITS` | 11 | row address width |
| `COL_BITS` | 9 | column address width |
| `ADDR_BITS` | 11 | address pins A10..A0 |
| `DQ_BITS` | 16 | data pins (two byte lanes, two DQS) |
| `T_RCD`, `T_RP`, `T_WR` | 3 clocks | ACTIVATE to READ/WRITE, PRECHARGE period, write recovery |
| `T_RFC` | 21 clocks | auto refresh period |
| `T_MRD` | 2 clocks | mode register set to next command |
| `SRAM_RD_LAT` | 1 | SRAM read latency: 1 = synchronous SRAM or block RAM, 0 = asynchronous SRAM |

The geometry (3/11/9 bits) is the design's own. The data width and the
timings are this model's choices: the timings are DDR2-400 values. Each SRAM
then holds 2^22 words of 16 bits, and its word address is
`{row, bank, column[8:1]}`.

Other DDR2 organisations build from the same parameters:

- `DQ_BITS` can be 4, 8 or any multiple of 8. There is one DQS and one DM
  per byte lane, and a single lane for x4.
- `BANK_BITS` can be 2 or 3.
- Column widths can go up to 11 bits. Column bits above A9 come from A11
  upwards, because A10 is the auto-precharge flag.
- `ADDR_BITS` must be at least `ROW_BITS`. It must also be larger than
  `COL_BITS` once the column reaches A11.

## Command decoding (`ddr2_instr_decoder`)

The decoder registers the pins on each rising clock edge. It decodes them
with the JEDEC truth table into one of the following commands:

- DESEL and NOP
- ACTIVATE
- READ and WRITE, each with or without auto precharge (A10)
- PRECHARGE of one bank or of all banks (A10)
- REFRESH and MODE REGISTER SET
- power-down entry and self-refresh entry, when CKE falls
- CKE exit, when CKE rises
- "no command", when CKE stays low
- illegal, for any other pattern

It also passes on the bank, the row address (all address pins) and the
column address (the low `COL_BITS` pins). The mode register operand is the
address pins zero-extended to 14 bits.

Everything appears one clock after the pins. In reset the outputs are DESEL
with zero addresses, and the previous CKE is taken as low. The first CKE rise
after reset is therefore a power-up exit.

## Sequence checking and scheduling (`ddr2_bank_control`)

This is the part with the most timing detail.

### The FSMs

`ddr2_all_bank_fsm` owns the device-wide states:

- normal;
- the tMRD wait after a mode register load;
- auto refresh (tRFC);
- active power down and precharge power down;
- self refresh.

It also holds the mode registers. The device comes out of reset in precharge
power down. Outside the normal state, row and column commands are refused.
MRS, REFRESH and self refresh need every bank idle.

The mode register fields are:

| register | bits | field | values |
|---|---|---|---|
| MR (BA = 0) | A2:0 | burst length | 011 = BL8, anything else = BL4 |
| MR | A3 | burst type | 0 = sequential, 1 = interleaved |
| MR | A6:4 | CAS latency | clamped to 3..6 |
| EMR (BA = 1) | A5:3 | additive latency | clamped to 0..5 |
| EMR | A11 | RDQS enable | |

EMR2 and EMR3 are accepted and ignored.

Each `ddr2_bank_fsm` moves through these states:

- IDLE
- ACTIVATING, for tRCD
- ACTIVE
- AUTOPRE_WAIT, the end of a burst with auto precharge
- PRECHARGING, for tRP

A READ or WRITE is allowed once tRCD − AL clocks have passed since the
ACTIVATE. This is the posted-CAS rule. With auto precharge, the precharge
starts after the burst:

- reads: AL + BL/2 clocks after the command;
- writes: WL + BL/2 + tWR clocks after the command.

PRECHARGE to an idle bank is a NOP.

### Errors

An illegal command does not change any state. It raises `seq_err` for one
clock, one clock after the decoder output, and `err_code` says why:

| code | meaning |
|---|---|
| `ERR_ILLEGAL` | pin pattern that is no command |
| `ERR_BANK_STATE` | e.g. READ to an idle bank, ACTIVATE to an open bank |
| `ERR_TIMING` | READ/WRITE before tRCD − AL, ACTIVATE before tRP |
| `ERR_DEV_STATE` | command not allowed in power down, self refresh, refresh or tMRD |
| `ERR_NOT_IDLE` | MRS/REFRESH/self refresh with a row open |
| `ERR_BURST` | the burst would overlap one already scheduled |

A refused READ or WRITE moves no data.

### The schedule

Read latency is RL = AL + CL and write latency is WL = RL − 1. An accepted
READ or WRITE waits in a shift register of up to 11 slots (`MAX_RL`). The
slot is chosen so the data path acts at the right edge. Call the rising edge
on which the command is on the pins E0:

- **Read:**
  1. The request leaves the schedule at E(RL−2).
  2. The SRAM interface addresses both SRAMs at E(RL−1). With an
     asynchronous SRAM, the request leaves one clock later and the SRAMs
     are read in the clock before E(RL).
  3. Their data returns at E(RL). The pin interface drives the first beat
     while CK is high in the clock that starts at E(RL).
  4. DQS is driven low as a preamble during the clock before that.
- **Write:**
  1. The controller strobes the first beat pair during clock WL.
  2. The pin interface registers the pair at E(WL+1) = E(RL).
  3. The request leaves the schedule at E(RL), so the SRAM write uses that
     pair. Each further pair follows one clock later.

Bursts of one direction can follow each other without gaps: a READ every
BL/2 clocks gives a seamless stream. Two requests that would use the same
slot are refused with `ERR_BURST`.

## Pin interface (`ddr2_interface`)

### Writes

When there are several DQS lanes, they are ANDed into one capture strobe.
The beat on the strobe's rising edge is held. Together with the beat on the
following falling edge, it forms a pair, with the first beat in the low half.
The pair and its DM masks are registered on the next rising clock edge. DM
high masks a byte.

With RDQS enabled, DM is an output pin, so nothing is masked.

### Reads

The pair from the SRAM interface is registered at the rising edge. Its low
half is driven on DQ while CK is high and its high half while CK is low.

DQS is CK gated by an enable that changes on the falling edge, so DQS has no
glitches. It is edge-aligned with DQ and preceded by a one-clock low
preamble. DQS# is its complement. RDQS and RDQS# copy DQS and DQS# when the
EMR RDQS bit is set.

### Tri-state pins

The bidirectional pins (DQ, DQS, DQS#, DM/RDQS) are split into `_in`, `_out`
and `_oe` signals. A board-level wrapper adds the tri-state buffers.

## SRAM interface (`ddr2_sram_interface`)

### Burst order

For each beat pair of a burst, this block computes the two column addresses
in JEDEC burst order. Let c be the start column and i the beat number:

- **Interleaved:** column = c XOR i.
- **Sequential:** the low two column bits count up from c and wrap within
  four. For BL8, bit 2 is c2 XOR i2, which is the standard's table for
  sequential BL8.

### Even/odd split

The two beats of a pair always differ only in column bit 0. So each pair
puts one beat in the even SRAM (SRAM0) and one in the odd SRAM (SRAM1), at
the same word address `{bank,row,column[8:1]}`. If a burst starts on an odd
column, the halves are swapped: the rising-edge beat still goes to SRAM1 and
comes back first.

### SRAM signals

The block drives both SRAMs' chip selects and write enables, and the data
masks as active-low byte enables. Two kinds of SRAM are supported:

- **`SRAM_RD_LAT = 1` (default):** synchronous SRAM, with read data one
  clock after the address. FPGA block RAM behaves this way. Writes happen on
  the rising edge that ends the clock in which WE# is low.
- **`SRAM_RD_LAT = 0`:** asynchronous SRAM, with read data in the same clock.
  WE# is then pulsed only while CK is low, when address and data are
  stable. The read request leaves the schedule one clock later, so the pins
  see the same latency.

## Address reorder (`ddr2_addr_reorder`)

A controller may lay the address fields out differently from the order the
memory bus uses. This block permutes the SRAM word address from
`{bank, row, column}` to `{row, bank, column}`. Consecutive rows of one bank
then lie 8×256 words apart, and the bank sits just above the column. It is
pure wiring, with one instance per SRAM.

The permutation is this model's choice. To use another field order, change
the single `assign` in the module.

## Where this model departs from a full DDR2 device

- **Pins:**
  - CK#, DQS# as an input, and ODT are not modelled.
  - Bidirectional pins are split into `_in`, `_out` and `_oe` signals.
- **Timing checks:** tRAS, tRC, tRRD, tFAW, tWTR and tRTP are not checked.
  A READ right after a write burst is caught only if the bursts would
  overlap.
- **Bursts:** read/write interrupt and BL4 burst chop of BL8 are not
  supported.
- **RDQS:** with the default 11 address pins, the EMR RDQS bit (A11) cannot
  be set. Build the model with `ADDR_BITS = 12` and `ROW_BITS = 12` to use
  RDQS.
- **Ranges:** the CAS latency is limited to 3..6 and the additive latency to
  0..5. Other values are clamped rather than flagged.
- **Not provided:**
  - a debug facility that follows internal state, apart from the status
    ports (`seq_err`, `err_code`, `bank_open`, `refreshing`, `power_down`,
    `self_refresh`);
  - a separate address-error output.
- **Refresh:** nothing stores charge, so refresh only costs time.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ddr2_instr_decoder` | 2000 random pin patterns against a reference truth table; reset values; CKE low with all pins low gives "no command" |
| `tb_ddr2_bank_fsm` | directed state sequences; the tRCD, tRP and auto-precharge delays; 1200 random clocks against a time-stamp reference of the bank |
| `tb_ddr2_all_bank_fsm` | mode-register decode and clamping, tMRD, tRFC, power down, self refresh |
| `tb_ddr2_bank_control` | error codes; the exact clock each burst leaves the schedule, at RL = 3 and RL = 6 |
| `tb_ddr2_interface` | DDR capture with skewed strobes, masks, read-side DQ/DQS/RDQS timing |
| `tb_ddr2_sram_interface` | 200 random bursts of every length, order and start column against the JEDEC tables |
| `tb_ddr2_addr_reorder` | random addresses against the expected permutation |
| `tb_ddr2_model` | end to end at the default parameters (see below) |
| `tb_ddr2_model_rdqs` | end to end with 12 address pins: RDQS pulses, and DM ignored while RDQS is on |
| `tb_ddr2_model_cfg` | round trips with random modes on three builds (harness in `tb/ddr2_cfg_harness.sv`): an x8 / 4-bank / 10-column part; an x4 / 8-bank / 11-column part, which uses the A11 column bit; the default part on asynchronous SRAMs |

`tb_ddr2_model` plays the controller against two behavioural SRAMs
(`tb/sram_model.sv`). It covers:

- four mode-register settings;
- BL4 and BL8 bursts in both orders;
- masked writes;
- seamless reads;
- AL > 0;
- auto precharge, PRECHARGE and PRECHARGE ALL;
- auto refresh, power down and self refresh;
- illegal sequences.

Read data and DQS are checked at the exact clock. The test counts each of
these mechanisms and fails if one never occurred.

To simulate with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/ddr2_pkg.sv tb/tb_ddr2_model.sv --top-module tb_ddr2_model
./obj_dir/Vtb_ddr2_model
```

Use the same command with another testbench name for the other tests.
