# Handshake-driven power gating for a GALS 8051

A globally-asynchronous, locally-synchronous (GALS) 8051 microcontroller in
which the **request/acknowledge handshake between two clock islands also
serves as the power-management signal**. The controller hands every
arithmetic or logic operation to the ALU island over a four-phase handshake.
While it waits for the answer (request high, acknowledge low) its clock is
stopped. No RAM access is possible in that window. So the same request
signal that stops the clock also starts a power-down sequence for the RAM,
which is the largest consumer of the design. The acknowledge that restarts
the clock also starts the power-up sequence. No separate power-management
unit decides when to gate: the handshake that already exists makes the
decision.

The payoff grows with the length of the ALU operation. A division is the
case the design is sized for: about 140 ns, or roughly 20 cycles of a
150 MHz clock. During that time the RAM is first clock-gated and then
switched off.

## Structure

```
                 osc (free-running on-chip oscillator)
                  |
      +-----------+--------------------+------------------------+
      |           |                    |                        |
 clock_gen    pg_ctrl --N_PWR_REQ--> power_switch           alu_wrapper
 (stoppable      |   <--N_PWR_ACK--     (RAM supply)         + i8051_alu
  clock gclk)    | iso_en, save, restore, dom_ready              ^  |
      |          v                                          req |  | ack
      |     iso_clamp (RAM read data)                          |  v
      v                                                     ctr_wrapper
  controller island on gclk:                                    ^
  i8051_ctr <-> i8051_dec, i8051_rom, i8051_ram  <------------- +
```

* **Controller island** (clock `gclk`): the controller `i8051_ctr`, the
  combinational decoder `i8051_dec`, the program ROM `i8051_rom` and the
  data RAM with the special function registers, `i8051_ram`. The
  accumulator, B, PSW, SP and DPTR are SFRs inside the RAM block, so the
  controller reads them from the RAM for every instruction. This is why
  the RAM matters for power: it is busy on almost every clock.
* **ALU island** (its own clock, here the oscillator `osc`): the ALU wrapper
  `alu_wrapper` around the purely combinational `i8051_alu`.
* **Wrappers** `ctr_wrapper` and `alu_wrapper` carry one ALU operation per
  four-phase handshake. The operands travel as bundled data: they are held
  stable while `req` is high.
* **Clocking element** `clock_gen` derives `gclk` from `osc` through a
  latch-based clock gate.
* **Power gating**: `pg_ctrl` sequences the RAM domain. `power_switch` is a
  behavioural model of the header-switch fabric. `iso_clamp` holds the
  isolation cells on the RAM's read data.

## The handshake and the stoppable clock

One ALU operation goes through the four phases req+, ack+, req-, ack-:

1. The controller reaches its EXEC state with an ALU instruction and pulses
   `start`. `ctr_wrapper` latches the operation code and the three source
   bytes, and raises `req` on the next `gclk` edge.
2. `clock_gen` sees `req & !ack` during the low phase of `osc` and closes
   its enable latch. `gclk` has no further rising edge. The controller, the
   decoder inputs and the RAM are frozen.
3. `alu_wrapper` passes `req` through a two-flop synchronizer and latches
   the operands into the ALU. It then counts a delay that depends on the
   operation: `DIV_DELAY` = 20 for DIV, `MUL_DELAY` = 20 for MUL, 1 for
   everything else. This counter plays the part of a matched delay line.
   After the delay it registers the ALU result and raises `ack`. From `req`
   rising to `ack` rising takes 2 + delay + 1 ALU clocks: 23 for a division
   and 4 for an addition.
4. `ack` re-opens the clock gate, unless the RAM is still powered down (see
   below). On the first `gclk` edge `ctr_wrapper` captures the result, drops
   `req` and pulses `done`. When `alu_wrapper` sees `req` low it drops
   `ack`. `ctr_wrapper` accepts no new `start` until then.

`ack` reaches `ctr_wrapper` without a synchronizer. This is safe because the
clock that samples it does not tick while `ack` can change: it is stopped
from `req` rising until `ack` has risen. This is the usual argument for a
pausible clock. The latch in `clock_gen` is intended: it is the clock-gating
cell.

## The power-gating sequence

`pg_ctrl` runs on the always-on `osc`. It synchronizes `req` and `ack` with
two flops each. Its sequence for one long ALU operation, with the default
parameters, in `osc` clocks after `req` rises:

| clock   | state        | what happens                                        |
|---------|--------------|-----------------------------------------------------|
| 0       | ON           | `req` rises; the controller clock stops             |
| 2..7    | ENTRY        | wait: `req & !ack` must last `ENTRY_DELAY` = 6 clocks |
| 8       | SAVE         | `save` pulse (for retention registers)              |
| 9       | ISO          | `iso_en` high: RAM read data clamped to 0           |
| 10..    | PWR_OFF      | `n_pwr_req` high; wait for `n_pwr_ack` high         |
| ~13..24 | OFF          | RAM unpowered, until the synchronized `ack` arrives |
| 25..    | PWR_ON       | `n_pwr_req` low; wait for `n_pwr_ack` low (supply ramp) |
| ~31     | RESTORE      | `restore` pulse                                     |
| ~32     | UNISO        | isolation released                                  |
| ~33     | ON           | `dom_ready` high; the controller clock restarts     |

The switch protocol is the common request/acknowledge control of a switch
fabric. `N_PWR_REQ` high asks for "off". The fabric raises `N_PWR_ACK` when
the supply is fully off, and lowers it when the supply is fully on again
after `N_PWR_REQ` falls. Restore is issued only after that.

Two choices of this design make the sequence safe:

* **`ENTRY_DELAY`.** A short operation returns `ack` 4 clocks after `req`,
  which is too soon to be worth a power cycle. Gating therefore starts only
  after the controller has waited 6 clocks. In the demonstration program the
  division is gated and the subtraction is not.
* **`dom_ready` in the clock gate.** `ack` arrives while the RAM is still
  off, and powering up takes several clocks. `clock_gen` therefore keeps
  `gclk` stopped until `pg_ctrl` reports the domain ready (powered,
  restored, de-isolated). Without this the controller would write back into
  an unpowered RAM. The top-level assertion `a_no_write_unpowered` checks
  that this never happens.

**What is not modelled.** The RAM array is assumed to keep its contents
while its supply is off (retention memory). The RTL does not corrupt
anything when the switch opens: it only isolates the outputs and guarantees
that nothing accesses the RAM. The `save` and `restore` pulses come out as
top-level ports (`ret_save`, `ret_restore`) for retention registers, and
nothing inside consumes them. A power-aware simulation, with a UPF
description of the RAM domain, would add the corruption. Such a description
is not part of this RTL. The leakage and dynamic power savings themselves
can only be measured on a gate-level netlist with a cell library. The RTL
reproduces the control behaviour, not the power numbers.

## The 8051 core

The controller executes each instruction as a fixed sequence of states, one
per `gclk` cycle:

1. `FETCH`, then `B2` and `B3` for the second and third bytes, if the
   instruction has them.
2. `RD`, eleven read slots. The RAM reads synchronously, so each value is
   taken one slot after its address. The slots read:
   * ACC, PSW, B, SP, DPL and DPH;
   * the pointer register R0 or R1 of the current bank;
   * the operand: direct byte, Rn, @Ri, the byte holding an addressed bit,
     or the stack top;
   * the byte below the stack top (for RET).
3. `EXEC`. Moves, jumps, calls and bit operations are worked out here.
   Arithmetic, logic, INC/DEC and the compare of CJNE start a handshake
   instead.
4. `ALU_WAIT`, only after a handshake: the clock is stopped here.
5. `WB`, up to three RAM writes, one per cycle. Examples: result, B and
   PSW; stack byte and SP; the two halves of an exchange or of DPTR.

Every instruction reads all of its state, including the registers it does
not need. This keeps the sequencer simple, at a cost of 13 to 18 cycles per
instruction without the ALU wait. `MOV A,#imm`, for example, takes 15
cycles; `retire` pulses on the cycle after.

The whole instruction set is executed except MOVX, since there is no
external data memory. All addressing modes work: immediate, direct, Rn,
@Ri and bit. The register banks follow PSW.RS. Also covered:
* the stack, PUSH/POP, ACALL/LCALL and RET;
* every jump form, including JMP @A+DPTR;
* MOVC from both bases;
* DA, SWAP, XCH and XCHD;
* the parity flag, which reads as the parity of ACC.

What is left out:
* The MOVX opcodes and the unused A5 are skipped as one-byte no-operations.
* There are no interrupts, so RETI behaves as RET.
* There are no timers and no serial port.
* @Ri and the stack address the same 256-byte space as direct addressing,
  so indirect addresses 80h..FFh reach the SFRs. On a real 8051 they reach
  nothing, and on an 8052 they reach the upper 128 bytes of RAM. Keep
  pointers and the stack below 80h.

Only the operations that need the ALU cross the handshake and can stop the
clock:
* ADD, ADDC, SUBB;
* ANL, ORL, XRL;
* INC, DEC;
* CPL A, the rotates, DA, SWAP;
* MUL, DIV;
* the compare of CJNE.

INC and DEC are ADD with a constant 01h or FFh and write no flags.

The ALU operation codes (`alu_op_e` in `gals8051_pkg`) are 4 bits wide.
Division is 4, subtraction is 2 and "none" is F, which is the value the code
rests at between requests. The other codes are arbitrary. Division by zero
returns FF/FF and sets OV.

The ROM holds 4 KiB. By default it contains the demonstration program, a
division followed by a subtraction:

```
MOV A,#0FBh ; MOV B,#12h ; DIV AB      -> A = 0Dh, B = 11h  (251 / 18)
SUBB A,#04h                            -> A = 09h
MOV 30h,A ; MOV 31h,B ; MOV P1,A ; SJMP $
```

Set the `ROM_INIT_FILE` parameter to a `$readmemh` file to run another
program.

## Parameters (top level)

| parameter       | default | meaning                                           |
|-----------------|---------|---------------------------------------------------|
| `ROM_ADDR_W`    | 12      | ROM size 2^n bytes                                |
| `ROM_INIT_FILE` | ""      | program file; empty = built-in demonstration      |
| `DIV_DELAY`     | 20      | ALU wrapper delay for DIV (≈140 ns at 150 MHz)    |
| `MUL_DELAY`     | 20      | ALU wrapper delay for MUL (this design's choice)  |
| `ENTRY_DELAY`   | 6       | clocks of waiting before the RAM is gated         |
| `SW_OFF_CYCLES` | 2       | switch model: supply fall time                    |
| `SW_ON_CYCLES`  | 4       | switch model: supply rise time (slower, limits in-rush) |

## How far to trust it

Taken from the reference arrangement:
* the partition into islands;
* the four-phase protocol;
* the clock stop condition (`req & !ack`);
* the choice of the RAM as the gated block;
* the switch request/acknowledge protocol;
* the division latency of about 20 cycles;
* the demonstration program's division (FBh / 12h = 0Dh).

This design's own choices:
* the controller's state sequence, and which instructions use the ALU;
* the ALU encoding apart from DIV, SUBB and NONE;
* the wrapper synchronizers;
* `ENTRY_DELAY` and the `dom_ready` hold on the clock;
* the isolation-to-zero;
* the switch ramp lengths;
* the subtrahend of the demonstration program.

The 8051 core is a compact re-implementation of the standard instruction
set. It is not the original core used in the reference GALS experiment.
Expect its cycle counts and its internal structure to differ from that
core.

The on-chip oscillator is an analog part and appears only as the `osc`
input. `power_switch` is a behavioural model of an analog fabric: keep it
out of synthesis, or replace it with the library's switch cells.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Compile with the package first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/gals8051_pkg.sv rtl/*.sv tb/tb_gals8051_top.sv --top-module tb_gals8051_top
./obj_dir/Vtb_gals8051_top
```

(If your shell expands `rtl/*.sv` with the package again, verilator ignores
the duplicate.) Run it from the directory that holds `rtl/` and `tb/`: the
ROM test and the program tests read `tb/rom_test.hex` and `tb/prog_mix.hex`
by relative path (`tb/prog_ext.hex` too).

* `tb_gals8051_top`: the whole design at its default parameters, running the
  demonstration program. It checks:
  * the results (ACC = 09, B = 11, RAM[30h], RAM[31h], P1);
  * exactly one gated handshake (DIV) and one ungated one (SUBB);
  * one save, isolation, switch-off and restore;
  * the division's req-to-ack latency of 23 clocks;
  * a controller clock stop of at least 20 clocks.
* `tb_gals8051_prog`: the whole design running `tb/prog_mix.hex`, a program
  of arithmetic, logic, MUL/DIV and conditional jumps. It checks:
  * the final memory contents, computed by hand;
  * 25 handshakes, of which exactly the MUL and the DIV (2) are gated.
* `tb_i8051_ext`: the controller, decoder, ROM, RAM and ALU running
  `tb/prog_ext.hex`. That program covers the rest of the instruction set:
  @Ri, the register banks, the stack, calls and returns, MOVC, DPTR, CJNE,
  the bit instructions, XCH/XCHD, DA and SWAP.
* `tb_gals8051_ext`: the same program on the whole design. Here every ALU
  operation goes through the real handshake. It checks the memory contents
  and 22 handshakes, of which only the final MUL power-gates the RAM.
* One testbench per block: `tb_i8051_ctr` (the controller with the ALU
  behind a random-delay responder), `tb_i8051_dec`, `tb_i8051_alu`,
  `tb_i8051_ram`, `tb_i8051_rom`, `tb_ctr_wrapper`, `tb_alu_wrapper`,
  `tb_clock_gen`, `tb_pg_ctrl`, `tb_power_switch`.

Assertions check the handshake rules in the wrappers, the rule "isolation
whenever the switch is off" in `pg_ctrl`, and "no RAM write while
unpowered" in the top. They need `--assert`.

## Files

| file | content |
|------|---------|
| `rtl/gals8051_pkg.sv` | ALU op codes, request/response structs, SFR addresses, decoder record |
| `rtl/gals8051_top.sv` | top level |
| `rtl/i8051_ctr.sv`, `i8051_dec.sv`, `i8051_alu.sv`, `i8051_ram.sv`, `i8051_rom.sv` | 8051 blocks |
| `rtl/ctr_wrapper.sv`, `alu_wrapper.sv` | four-phase handshake wrappers |
| `rtl/clock_gen.sv` | stoppable clock |
| `rtl/pg_ctrl.sv`, `iso_clamp.sv`, `power_switch.sv` | power gating (the switch is a behavioural model) |
| `tb/*.sv`, `tb/*.hex` | testbenches and test programs |
