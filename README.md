# An 8085 microcomputer in SystemVerilog

This is a synthesizable model of a small Intel 8085 system: the 8-bit
processor, its clock and reset logic, and the usual glue around it. The glue is an
octal latch that splits the multiplexed address/data bus and a decoder that
turns IO/M, RD and WR into MEMR, MEMW, IOR and IOW. The system also has ROM,
RAM and one input and one output port. The processor runs the full 8085
instruction set, including the five hardware interrupts, RIM/SIM and the
serial SID/SOD pins. The bus signals follow the 8085 pin protocol closely
enough that the top level behaves like a board built around the chip, when
you look at it at the pins.

Everything is written for synthesis in one clock domain. The simulator used
for the testbenches is plain Verilator (two-state). No block needs x or z.

## The system and its bus

```
            A15-A8 ─────────────────────────────┐
  cpu8085   AD7-AD0 ──┬── addr_latch373 (G=ALE) ─┴─ addr[15:0] ──┬─ sys_memory
            ALE ──────┘                                          ├─ io_ports
            IO/M RD WR ── ctrl_decode8085 ── MEMR MEMW IOR IOW ──┘
            TRAP RST7.5 RST6.5 RST5.5 INTR/INTA, HOLD/HLDA, READY, SID/SOD
  clk_reset_gen: X1 → CLK OUT, T-state enable, RESET IN sync → RESET OUT
```

| Region | Addresses | Contents |
|---|---|---|
| ROM | 0000h–1FFFh (`ROM_BYTES` = 8192) | program; written only through the load port |
| RAM | 2000h–5FFFh (`RAM_BYTES` = 16384) | read/write |
| unpopulated | 6000h–FFFFh | reads FFh |
| input port | I/O address 00h (`IN_ADDR`) | `in_port` pins |
| output port | I/O address 01h (`OUT_ADDR`) | `out_port` latch, reset to 00h |

These sizes and addresses are choices of this design. Change them with the
parameters of `sys8085` (and `ROM_BASE`/`RAM_BASE` of `sys_memory`).

Because the model is two-state, there is no tri-stating. The top-level data
bus `data` is a priority mux:
1. the processor, while it drives AD7–AD0 (the T1 address, or write data);
2. the memory, on MEMR;
3. the input port, on IOR;
4. the interrupting device, during INTA;
5. otherwise FFh, which stands for a pulled-up bus.

The interrupting device is modelled by the `intr_opcode` input. The system
puts it on the bus whenever INTA is low.

The load port (`prog_we`, `prog_addr`, `prog_d`) writes straight into
memory. It is how a testbench places a program in ROM while RESET IN is held
low.

## Clocking: T-states on a clock enable

`x1` is the oscillator clock, standing in for the crystal on X1/X2.
`clk_reset_gen` divides it by two to give CLK OUT. In a real 8085 each CLK OUT
period is one T-state. Here the logic is not clocked from CLK OUT. Everything
runs on `x1`, and a clock enable `ce` is high once per CLK OUT period. RESET
IN passes through a two-flip-flop synchroniser. Its output is the internal
reset and also RESET OUT.

Reset sets PC to 0000h and clears the other registers and the flags. It also
sets all three RST masks and disables interrupts.

## Machine cycles (the hardest part)

`cpu8085` is a state machine over T-states (T1, T2, T3, T4, HALT, HOLD).
Every instruction is a chain of machine cycles. Each cycle shows its type on
IO/M, S1, S0:

| Cycle | IO/M S1 S0 | T-states |
|---|---|---|
| opcode fetch | 0 1 1 | 4 |
| memory read | 0 1 0 | 3 + waits |
| memory write | 0 0 1 | 3 + waits |
| I/O read | 1 1 0 | 3 + waits |
| I/O write | 1 0 1 | 3 + waits |
| interrupt acknowledge | 1 1 1 | 4 for the opcode, 3 for CALL's address bytes |
| halt | S1 S0 = 0 0 | until an interrupt or reset |

Inside a cycle:
- **T1:** ALE is high for one T-state. A15–A8 carry the high address byte
  and AD7–AD0 the low byte.
- **T2 and T3:** RD, WR or INTA is low.
- **READY** is sampled at the end of T2. While it is low the cycle repeats
  T2 (wait states).
- **Read data** is taken at the end of T3.
- **T4** (opcode fetch only) is used for decoding. Register-to-register work
  and 16-bit arithmetic also finish there.

The instruction step that ends a cycle chooses the next one. An address
taken from PC is incremented once its cycle ends.

**HOLD** is sampled when a machine cycle ends. When it is taken, HLDA rises
and the processor releases A15–A8, AD7–AD0, IO/M, RD and WR. `bus_oe` and
`ad_oe` show which lines are released; RD and WR then read high. Releasing
HOLD resumes the cycle that was next.

Resulting instruction lengths, in T-states:

| Instruction | T-states |
|---|---|
| MOV r,r / ALU r / INX / DCX / DAD / SPHL / PCHL | 4 |
| MVI r / ALU M / MOV r,M / LDAX / STAX | 7 |
| LXI / JMP / Jcc / RET / POP / PUSH / RST / IN / OUT / MVI M / INR M | 10 |
| LDA / STA | 13 |
| CALL, Ccc taken / LHLD / SHLD | 16 |
| Ccc not taken | 10 |
| Rcc | 10 if taken, 4 if not |
| XTHL | 19 |

These differ from Intel's data sheet in a few places. There, CALL takes 18,
PUSH/RST 12, INX/DCX/SPHL/PCHL 6 and XTHL 16. This design does not model the
data sheet's extra idle states, and a conditional jump or call always reads
both address bytes.

The ten opcodes the 8085 leaves undefined (08h, 10h, 18h, 28h, 38h, CBh,
D9h, DDh, EDh, FDh) execute as NOP. 20h and 30h are RIM and SIM.

## Interrupts

`int_ctrl8085` ranks the requests at every instruction boundary:
TRAP > RST 7.5 > RST 6.5 > RST 5.5 > INTR.

| Input | Sensing | Vector | Masked by |
|---|---|---|---|
| TRAP | rising edge, pin still high | 0024h | nothing |
| RST 7.5 | rising edge, latched | 003Ch | M7.5, IE |
| RST 6.5 | level | 0034h | M6.5, IE |
| RST 5.5 | level | 002Ch | M5.5, IE |
| INTR | level | opcode from the bus | IE |

- **Taking any interrupt** clears IE; the service routine re-enables it
  with EI.
- **EI** takes effect after the following instruction, so `EI; RET` returns
  before a pending interrupt is taken. DI takes effect at once.
- **Vectored interrupts** (TRAP and RST 5.5/6.5/7.5) spend one idle T-state,
  push PC in two memory writes and continue at the vector.
- **INTR** replaces the next opcode fetch with an interrupt-acknowledge
  cycle. The byte read from the bus is executed without advancing PC.
  Normally it is RST n (vector 8·n). If it is CALL, the two address bytes
  come from two more acknowledge cycles.
- **HLT** stops the processor until an interrupt (or reset). After the
  service routine, execution continues after the HLT.

**RIM** loads the accumulator with:

| Bit | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| Meaning | SID | I7.5 | I6.5 | I5.5 | IE | M7.5 | M6.5 | M5.5 |

The I bits show pending requests.

**SIM** reads the accumulator as follows:

| Bit | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| Meaning | SOD | SDE | (unused) | R7.5 | MSE | M7.5 | M6.5 | M5.5 |

- If MSE is set, bits 2–0 are loaded into the masks.
- If R7.5 is set, the RST 7.5 latch is cleared.
- If SDE is set, bit 7 is copied to the SOD pin. That is
  `serial_io8085`, which also samples SID for RIM.

## Datapath blocks

- **`alu8085`** is combinational:
  - ADD/ADC/SUB/SBB/CMP, ANA/XRA/ORA, the four rotates, DAA, CMA, STC/CMC
    and INR/DCR;
  - flags S, Z, AC, P and CY, stored in the flag byte as `S Z 0 AC 0 P 0 CY`;
  - subtraction sets CY on borrow;
  - ANA clears CY and sets AC; ORA/XRA clear both;
  - the rotates change only CY; INR/DCR leave CY alone.
- **`reg_array8085`** holds:
  - B, C, D, E, H, L, read as single registers or as pairs;
  - the temporaries W and Z, which hold the second and third bytes of an
    instruction;
  - SP and PC.

  It also does the DE↔HL swap for XCHG.
- **`incdec16`** is the 16-bit ±1 unit. It is used for PC, SP, INX/DCX and
  the second byte of LHLD/SHLD.
- **`i8085_pkg`** holds the shared types:
  - the flag struct and its byte packing;
  - ALU operation codes;
  - machine-cycle kinds and their status codes;
  - interrupt vectors.

## Simulating

Each `tb/tb_<module>.sv` is self-checking. At the end it prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl \
    rtl/i8085_pkg.sv tb/tb_sys8085.sv --top-module tb_sys8085
./obj_dir/Vtb_sys8085
```

The testbenches are:

- **`tb_sys8085`** runs the whole system at its default sizes, in a few
  milliseconds of CPU time. A hand-assembled program in ROM exercises
  every instruction group, the stack, both ports and RIM/SIM with SID/SOD.
  The testbench also:
  - inserts READY wait states during an I/O read;
  - takes the bus away with HOLD;
  - fires TRAP and RST 7.5;
  - raises RST 6.5 and 5.5 together, where 6.5 must win;
  - fires INTR answered with RST 1.

  It checks every memory write against hand-worked values and every
  machine cycle's status lines. It also counts the waits, holds, halts and
  acknowledges; if one of them never happens, that counts as a failure.
- **`tb_sys8085_examples`** runs the usual worked example of each
  instruction on the full system. Examples are LDA 2037h, SHLD 2500h,
  ADI 49h, SBI 65h, CPI 87h, the rotates of A7h, CALL/CZ to 2094h and
  RST 3. After each, the program pushes the accumulator and flags (or a
  register pair). The testbench compares every bus write with a
  hand-worked list.
- **`tb_cpu8085`** runs the processor with its own memory model. It checks
  instruction lengths against the table above, ALE and strobe widths, a
  CALL delivered over INTA, and HLT woken by RST 7.5.
- **The other testbenches** test one block each. They use exhaustive or
  random vectors compared against independent reference code.

## How far to trust it

- **Checked:** every block against its own testbench, and the system end to
  end. The ALU's flags are compared with a separate reference over random
  operands and a set of hand-worked examples.
- **Instruction encodings** are the standard 8085 ones.
- **Not matched to the data sheet:** exact T-state counts (see above).
  Software timing loops will run a little faster than on a real 8085.
- **Not modelled:** a DMA controller that would drive the bus during HOLD
  (HOLD/HLDA are only brought out), and the analog parts (power pins,
  crystal).
- **Not exercised by a full commercial program**, such as a monitor ROM.
