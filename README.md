# mygcd: a 3-cycle-per-step GCD engine

This is a small hardware engine for the greatest common divisor of two unsigned
16-bit numbers. It uses Euclid's algorithm in its subtraction form: subtract the
smaller number from the larger until the two are equal. The engine is a
controller/datapath pair. A datapath holds a 4-word register file, an adder/subtractor
and a comparator, and a finite-state machine sequences it.

The main point is the controller's schedule. The register file has one read
port and one write port, and both can be used in the same cycle. The schedule
overlaps a register-file read with a write wherever it can, so one subtraction
step takes **3 clock cycles**. A controller that does one register-file access
per cycle needs 5. Loading the operands and the first step take 6 cycles
together; a schedule without the overlap needs 7.

| | non-overlapping schedule | this schedule |
|---|---|---|
| operand load + first step | 7 cycles | 6 cycles |
| each further step | 5 cycles | 3 cycles |

Only the overlapping schedule is implemented here.

## Files

| file | module | role |
|---|---|---|
| `rtl/gcd_pkg.sv` | package | state enum, write-select codes, `dp_ctrl_t` control bundle |
| `rtl/siso_gen.sv` | `siso_gen` | top: controller + datapath |
| `rtl/cmp_add_ctrl.sv` | `cmp_add_ctrl` | the 10-state controller |
| `rtl/cmp_add_dp.sv` | `cmp_add_dp` | datapath: register file, write mux, adder unit, comparator unit |
| `rtl/reg_file.sv` | `reg_file` | 4 x 16-bit register file, asynchronous read, clocked write |
| `rtl/add_unit.sv` | `add_unit` | subtractor/adder with operand registers `add_l`, `add_r` |
| `rtl/cmp_unit.sv` | `cmp_unit` | comparator with operand registers `cmp_l`, `cmp_r` |
| `rtl/op_reg.sv` | `op_reg` | operand register with 2-way source mux and load enable |
| `tb/tb_*.sv` | | one self-checking testbench per module; `tb_siso_gen` is end to end |

## Interface and protocol (`siso_gen`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `reset` | in | 1 | asynchronous, active high |
| `data_in` | in | 16 | operand words |
| `data_out` | out | 16 | result while `ready` is high |
| `req` | out | 1 | engine wants a word on `data_in` |
| `ready` | out | 1 | result valid (one cycle) |

The source watches `req`. While `req` is high, it puts the next word on
`data_in`, and the engine takes that word at the next rising edge. The
reference waveform changes `data_in` at the falling edge, and the testbench
does the same. `req` is high for two cycles per operation: in the idle or
finished state, which takes the first operand, and in the next cycle, which
takes the second. `ready` is high for one cycle, in the finished state, with
the GCD on `data_out`. The next operation's first word is taken in that same
cycle, so operations run back to back with no idle cycle between them.

Latency: if a pair needs *k* subtraction steps, the engine spends 3 + 3k
cycles from taking the first operand to raising `ready`. For 16 and 4
(16-4=12, 12-4=8, 8-4=4), k = 3, which gives 12 cycles.

**Both operands must be non-zero.** With a zero operand the two values never
become equal and `ready` never rises. Nothing in the engine detects this case.

Outside the result cycle, `data_out` shows the register-file word that is
currently being read. That is useful for debugging, but it is not a result.

## The schedule

Register 0 and register 1 hold the two working values. `cmp_l` always mirrors
register 0 and `cmp_r` mirrors register 1. After every step, register 0 holds the
smaller value and register 1 holds the difference. Registers 2 and 3 exist but
are never used.

| state | what happens at the clock edge that enters it |
|---|---|
| `START` | nothing (after reset) |
| `READ1` | reg0 <= data_in |
| `READ2` | reg1 <= data_in; cmp_l <= reg0 |
| `INIT_COMP` | cmp_r <= reg1 |
| `LOAD_ADD_L0` | add_l <= reg0 (reg0 is the larger) |
| `LOAD_ADD_R1` | add_r <= reg1; cmp_l <= reg1; **reg0 <= reg1** (read and write in one cycle) |
| `LOAD_ADD_L1` | add_l <= reg1 (reg1 is the larger) |
| `LOAD_ADD_R0` | add_r <= reg0; cmp_l <= reg0 |
| `SUB_COMP` | reg1 <= add_l - add_r; cmp_r <= add_l - add_r |
| `FINISHED` | nothing written; `ready` = 1 |

Transitions: `START -> READ1 -> READ2 -> INIT_COMP`. From `INIT_COMP` and from
`SUB_COMP` the next state depends on the comparator flags:

- If `equal` is high, the next state is `FINISHED`.
- Otherwise, if `greater` (cmp_l > cmp_r) is high, the path is `LOAD_ADD_L0 -> LOAD_ADD_R1 -> SUB_COMP`.
- Otherwise, the path is `LOAD_ADD_L1 -> LOAD_ADD_R0 -> SUB_COMP`.

`FINISHED -> READ1` starts the next operation.

### Controls come from the *next* state

This is the subtle part. The datapath controls are combinational functions
of `next_state`, not of `current_state`. The operation listed for a state
therefore happens *at the edge that enters it*. While the machine sits in a
state, it is already driving the controls for its successor. `req` and `ready`
are registered from `next_state` at the same edges, so they are aligned with
`current_state`.

The 3-cycle step works like this, taking the `greater` branch as the example:

1. Entering `LOAD_ADD_L0`: register 0 is read into `add_l`.
2. Entering `LOAD_ADD_R1`: register 1 is read into `add_r` and into `cmp_l`.
   In the same cycle it is also written back into register 0, so register 0
   becomes the smaller value. The write port takes the read port's word (code
   `10`).
3. Entering `SUB_COMP`: the subtractor output `add_l - add_r` is written
   into register 1 and into `cmp_r`. The flags are then valid in `SUB_COMP`
   and decide the next state in that same cycle.

In the `less` branch register 0 is already the smaller value, so no copy is needed.

### Register-file write-select code (`wr_sel_en`)

| code | effect |
|---|---|
| `00` | no write |
| `01` | write the subtractor result |
| `10` | write the word on the read port (copy) |
| `11` | write `data_in` |

## Datapath (`cmp_add_dp`)

- `reg_file` has one read port and one write port. The read is asynchronous:
  `rd_data` follows `rd_addr` in the same cycle. The write is clocked. If a
  read and a write hit the same word in one cycle, the read returns the old
  value.
- `add_unit`: `result = sub ? add_l - add_r : add_l + add_r`, modulo
  2^16. The schedule always uses `sub = 1`.
- `cmp_unit`: `equal = cmp_l == cmp_r` and `greater = cmp_l > cmp_r`, both unsigned.
- Each of the four operand registers has a source select and a load enable:
  - `0` selects the register-file read word.
  - `1` selects the adder result.
  - Only `cmp_r` ever uses `1`.
- `data_out` is the register-file read word.
- Reset clears all registers and the register file to zero.

The controls travel as one packed struct, `gcd_pkg::dp_ctrl_t` (15 bits).
`cmp_add_ctrl` has two assertions:

- `ready` implies `req`.
- No subtraction or copy write happens in `START` or `FINISHED`.

## Where this RTL fills gaps

The controller is a faithful rendering of a fully specified state machine.
The datapath around it is known only from the control lines it accepts, so
the following points are this implementation's own reading:

- **Write-select codes.** The meaning of each `wr_sel_en` code was deduced from
  the states that use it.
- **Unused select inputs.** For `add_l`, `add_r` and `cmp_l`, select `1` takes the
  adder result. The schedule never uses these inputs.
- **Don't-care controls.** Where the schedule does not care about a control:
  - enables and `wr_sel_en` are driven to 0;
  - selects are driven to the register-file source;
  - `rd_addr` and `wr_addr` are driven to 0.

  Driving `rd_addr` to 0 makes `data_out` show register 0 in those cycles, so
  for inputs 16, 4 it reproduces the reference output sequence
  `0, 16, 4, 16, 4, 4, 12, 4, 4, 8, 4, 4, 4, 4` cycle by cycle.
- **Reset and read.** The asynchronous read, the reset values and the unsigned
  compare are choices made here.
- **No synthesis results.** Timing and area depend on a cell library.
  Reference figures exist for a 10 ns clock: 4.7 ns slack and an area of about
  21,000 in the library's units. They have not been reproduced.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each one also has a watchdog.

- `tb_reg_file`, `tb_add_unit`, `tb_cmp_unit`, `tb_cmp_add_dp` apply random
  stimulus and compare against a reference model written in the testbench.
- `tb_cmp_add_ctrl` plays the comparator with scripted outcomes. It checks:
  - the state sequence;
  - every required control value;
  - `req` and `ready`;
  - the 6-cycle first step and 3-cycle later steps;
  - an asynchronous reset in the middle of an operation.
- `tb_siso_gen` runs the top at its default parameters. It checks:
  - the full 16, 4 trace;
  - corner pairs: equal operands, (65535, 1) and (1, 65535), which take 65,534 steps each;
  - 300 random pairs, run back to back.

  For every pair it checks the result and the exact 3 + 3k latency. It also
  counts the greater branch, the less branch, immediate equality, the register
  copy and back-to-back restarts, and fails if any of them never happens.
  About 525,000 cycles run in under a second.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gcd_pkg.sv tb/tb_siso_gen.sv \
          --top-module tb_siso_gen -Mdir obj -o sim
./obj/sim
```

Replace `tb_siso_gen` with any other testbench name. The sub-module testbenches
set `WORD_LENGTH` explicitly, and it can be changed there. The top has a single
parameter, `WORD_LENGTH` (default 16).
