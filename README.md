# v8051 — a small, readable 8051-compatible soft core

This is an 8051 microcontroller core written in synthesizable SystemVerilog
for FPGAs. It favours clarity over speed. Every instruction runs through the
same fixed schedule of 17 internal clock cycles, whatever it does. The
schedule is a controller that steps through a two-level state machine. The
datapath is split into a handful of small, separately testable units: opcode
decoder, ALU, internal RAM with the special function registers (SFRs),
program ROM and external data RAM.

The core executes the whole 8051 instruction set (all 255 defined opcodes),
including MUL/DIV, decimal adjust, bit operations, register banks, the stack,
MOVC and MOVX. Interrupts, timers and the serial port are not implemented.
Their SFRs exist as plain read/write registers.

```
            clkfast ─┬─────────────────────────────────────────────┐
                     │                                             │
              ┌──────▼──────┐ ce (1 in 3)                          │
              │ v8051_clkdiv├───────────┬──────────┬────────┐      │
              └─────────────┘           │          │        │      │
                                 ┌──────▼─────┐    │        │      │
   ┌──────────┐  rom_addr/data   │            │    │        │      │
   │v8051_rom │◄────────────────►│            │ ram_*      ┌▼──────▼───┐  p0..p3_in
   │ 4 KB     │                  │ v8051_ctr  ├───────────►│ v8051_ram │◄──────────
   └──────────┘  dec_op_out/in   │ controller │◄───────────┤ 128 B+SFRs├──────────►
   ┌──────────┐◄────────────────►│            │            └───────────┘  p0..p3_out
   │v8051_dec │                  │            │ alu_*      ┌───────────┐
   └──────────┘                  │            ├───────────►│ v8051_alu │
                                 └─────┬──────┘◄───────────┤           │
                                       │ xm_* (MOVX)       └───────────┘
                         v8051_model   │
   ────────────────────────────────────┼──────────────
                                 ┌─────▼──────┐
                                 │ v8051_xram │ 64 KB    v8051_system (top)
                                 └────────────┘
```

## Clocking: one clock, one enable

The core has a single clock input, `clkfast`. Internally everything runs at a
third of that rate. `v8051_clkdiv` counts fast clocks and raises the enable
`ce` for one fast clock in every three. The controller, the RAM and the ROM
output register advance only on enabled edges. In this README a *slow clock*
means one such enabled edge, so one slow clock is three `clkfast` periods.

The reason for the fast clock is the program ROM. Its array is modelled like
a synchronous FPGA ROM that needs the address held for three clocks before
the data is valid. The ROM samples the array on every `clkfast` edge through
two register stages, and the controller changes the ROM address only on
enabled edges. So the address is always held long enough, and the byte
appears in `rom_data` one slow clock after it was addressed.

The slow clock is an enable, not a second clock. The whole design is a single
clock domain with no derived clock nets. `rst` is synchronous and active high.

## The instruction cycle

This is the part of the design that takes the most effort to follow.
`v8051_ctr` holds two one-hot state registers:

| CPU_STATE | meaning | EXE_STATEs used |
|---|---|---|
| `CS_0` | reset sequence, entered once after `rst` | ES_0..ES_5 |
| `CS_1` | reserved for interrupt entry; idles one slow clock | ES_0 |
| `CS_2` | fetch and decode | ES_0..ES_7 |
| `CS_3` | execute | ES_0..ES_7 |

**Reset (`CS_0`).** ES_0..ES_3 write FFh to P0..P3, ES_4 writes 07h to SP, and
ES_5 moves on to `CS_1`. The RAM itself is cleared to 00h by `rst`.

**Fetch (`CS_2`).** The controller reads three bytes from the ROM, starting at
PC. The first byte is the opcode (`op1`), the others are possible operands
(`op2`, `op3`). It also reads PSW and A from the RAM into local copies. The
opcode goes to the decoder. The decoder's 2nd-byte and 3rd-byte flags tell
the ALU how far to advance PC: in ES_4, PC + 1 + flags is computed with the
ALU's unsigned PC add (PCUADD). Fetching a third byte that an instruction
does not use is harmless.

**Execute (`CS_3`).** Every instruction uses the same slot plan. Each
instruction uses only the slots it needs:

| step | what may happen |
|---|---|
| ES_0 | pre-read: R*i* (for @R*i* forms), SP (stack forms) or DPL (DPTR forms) |
| ES_1 | operand read: R*n*, a direct byte, @R*i*, @SP, a bit, B or DPH |
| ES_2 | second read: @SP−1 (RET), external RAM (MOVX), ROM (MOVC, address from the ALU) |
| ES_3 | ALU operation; result(s), new PSW and the branch decision are registered |
| ES_4 | first write: the main destination, @SP+1, or the MOVX write |
| ES_5 | second write: the XCH partner, B, SP, @SP+2, or the other DPTR half |
| ES_6 | PSW (or SP for calls) written back; PC updated (PCSADD for relative jumps, PCUADD for JMP @A+DPTR, direct load for absolute jumps) |
| ES_7 | ALU inputs cleared; go to `CS_1` |

RAM reads return their data one slow clock after the request. This is why
reads and the uses of their data are spread over successive steps. The RAM
has a single port, so each step does at most one RAM access. A and PSW are
kept in the controller and written back to the RAM only when they change.
The RAM still holds A and PSW at their SFR addresses, so `MOV 0E0h,…` and bit
operations on `ACC.x` or `PSW.x` behave as on a standard 8051.

The cost is a fixed instruction time: 1 + 8 + 8 = **17 slow clocks = 51
`clkfast` periods** for every instruction. A standard 8051 needs 12 to 48
oscillator periods. `cpu_state`/`exe_state` are brought out to the top so
the sequencing can be watched on LEDs or a logic analyser.

## Decoder

`v8051_dec` is combinational. It turns the opcode into a 9-bit word
(`dec_t`):

- bits [6:0]: an *instruction pointer*, the index of the instruction form in
  the alphabetical list of the 111 8051 instruction forms. For example
  ACALL = 00h, ADD A,@R*i* = 03h, ADD A,#data = 04h, MOVC A,@A+DPTR = 45h,
  NOP = 4Ch and XRL A,R*n* = 69h. `instr_e` in `v8051_pkg` lists them all.
- bit [7]: the instruction has a second byte.
- bit [8]: the instruction has a third byte.

The one undefined opcode, A5h, gives pointer 6Fh and runs as a one-byte NOP.

## ALU

`v8051_alu` is combinational. It takes a 4-bit function code, three operands
and the incoming C and AC flags, and returns two result bytes plus C, AC and
OV:

| code | function | results |
|---|---|---|
| 0 | none | all zero |
| 1 / 2 | ADD / SUB (with `src_cy` as carry/borrow in) | des_1, C, AC, OV |
| 3 | MUL | {des_2, des_1} = product, OV if product > 255 |
| 4 | DIV (restoring, 8 unrolled stages) | des_1 quotient, des_2 remainder; divide by 0 gives FFh, 00h, OV = 1 |
| 5 | DA | decimal adjust of src_1 using C and AC |
| 6–9 | NOT, AND, XOR, OR | des_1 |
| A–D | RL, RLC, RR, RRC | des_1 (C for RLC/RRC) |
| E | PCSADD | {des_2,des_1} = {src_2,src_1} + sign-extended src_3 |
| F | PCUADD | {des_2,des_1} = {src_2,src_1} + src_3 |

Flags and results an operation does not define are driven to zero. The
controller decides which flags to store. CJNE uses SUB for its carry, and
DJNZ/INC/DEC use SUB/ADD with operand 1. INC DPTR uses the 16-bit PCUADD.
Stack-pointer increments and decrements use small adders in the controller
instead of the ALU.

## Memories and ports

**Internal RAM (`v8051_ram`).** It holds 128 bytes at 00h–7Fh, the 21
standard SFRs at 80h–FFh, and the port latches. It does one read or write per
slow clock, byte-wide or, with `is_bit_addr`, on a single bit. A bit address
below 80h selects byte 20h + addr[6:3]. From 80h up it selects the SFR at
{addr[7:3], 000}, so only the eleven SFRs whose addresses end in 0h or 8h
are bit-addressable. Read data is registered and held until the next read,
including during reset. Reset clears every byte and SFR to 00h.

- Reading P0–P3 returns the input pins `pX_in`. Writing a port sets the latch
  that drives `pX_out`. The outputs are never tri-stated. Read-modify-write
  instructions on a port (for example `ANL P1,#…`) therefore read the pins.
  A standard 8051 reads the latch for these.
- PSW.0 (parity) reads as the even parity of A.
- SFR addresses with no register read 00h and ignore writes.

**Program ROM (`v8051_rom`).** It is 4096 × 8 (`ADDR_W = 12`) and is loaded
at start-up with `$readmemh` from `INIT_FILE` (one hex byte per word, `//`
comments allowed). Words the file does not give read as 00h, which is NOP.
The core's `ROM_FILE` parameter is passed down to it. The default,
`rtl/v8051_rom_init.hex`, is a 23-byte demo program. It rotates 3Ah and 12h
through A and B and shows the results on P0 and P1.

**External data RAM (`v8051_xram`).** It has 16 address lines (64 KB) and is
reached by MOVX. It sits outside the core (`v8051_model`), on the `xm_*` bus,
and is joined to the core only in the top, `v8051_system`. MOVX @DPTR uses
the 16-bit DPTR; MOVX @R*i* puts 00h on the upper address byte. The core
holds strobes, address and data for a whole slow clock, and the memory
returns read data one slow clock later. It is not cleared by reset.

## Where this design departs from the original description

- **Clocks.** The design it follows derives a second, slower clock with a
  counter. Here the counter gives a clock enable instead (see above). The
  cycle counts are the same.
- **Execute slot plan.** The phase structure, the one-hot encodings, the
  reset sequence and the 17-clock instruction time follow the original. The
  placement of each read, ALU operation and write inside `CS_2`/`CS_3`
  follows this design's own uniform plan. The original places them per
  instruction, for example the ALU in ES_0 and the write in ES_1 for
  `ADD A,#data`.
- **Memory latency.** The original latches memory data two states after
  the read request. Here every memory answers in the next state, and the
  slot plan depends on that.
- **ALU test values.** A few of the original's published ALU test vectors
  disagree with the 8051 definition. Where they do, this design follows the
  8051: 55h + 50h = A5h sets OV (not C and AC), and RRC of 55h sets C.
  Division by zero follows the original (FFh, 00h, OV = 1).
- **Decoder bit numbering.** Bit [7] flags a second byte and bit [8] a third
  byte.
- **Interrupts, timers, serial port, power modes** are not implemented. `CS_1`
  is the slot kept for interrupt entry. RETI behaves like RET, and IE, IP,
  TCON, TMOD, TH/TL, SCON, SBUF and PCON are plain registers.
- **ROM file format.** Programs are loaded from `$readmemh` text, not Intel
  HEX. Convert with any hex-to-binary tool, or list the bytes one per line.

## Files

| file | contents |
|---|---|
| `rtl/v8051_pkg.sv` | state encodings, ALU codes, instruction pointers, `dec_t`, SFR addresses |
| `rtl/v8051_system.sv` | top: core + external RAM; ports P0–P3, clock, reset, state outputs |
| `rtl/v8051_model.sv` | the core: divider, controller, decoder, ALU, RAM, ROM |
| `rtl/v8051_ctr.sv` | controller state machine |
| `rtl/v8051_dec.sv`, `rtl/v8051_alu.sv` | decoder, ALU |
| `rtl/v8051_ram.sv`, `rtl/v8051_rom.sv`, `rtl/v8051_xram.sv` | memories |
| `rtl/v8051_clkdiv.sv` | one-in-three clock enable |
| `rtl/v8051_rom_init.hex` | default ROM contents (demo program) |
| `tb/*.sv`, `tb/*.hex` | self-checking testbenches and their test programs |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
stops it, and counts a failure, if it hangs.

| testbench | what it checks |
|---|---|
| `tb_v8051_alu` | all 16 functions on fixed vectors, then 4000 random vectors against an integer reference model |
| `tb_v8051_dec` | the reference opcodes with their full 9-bit words; byte-count flags of all 256 opcodes against the standard length table |
| `tb_v8051_ram` | reset values; 6000 random byte/bit reads and writes against a model; port pins/latches; parity; hold behaviour; `ce` gating; a directed bit test (20h–2Fh filled with A2h + 11h·k and read bit by bit; P1/PSW/A/B bit reads) |
| `tb_v8051_rom` | all 4096 words of the default image, one-slow-clock latency, `rom_rd` gating, three-fast-clock address hold |
| `tb_v8051_xram` | pattern and random writes/reads over the full 64 KB |
| `tb_v8051_clkdiv` | enable period 3 (and 5 with a parameter override), phase after reset |
| `tb_v8051_ctr` | controller with real decoder/ALU/RAM running a 548-byte program that covers every instruction group; 67 result bytes checked, all 111 instruction forms executed, plus phase lengths |
| `tb_v8051_model` | core running a port demo (A ← P0 pins, B ← P1 pins, four rotate rounds, repeat) for eight rounds of changing pin values, the first (3Ah/12h) against the published sequence 74h, E8h, D1h, A2h / 09h, 04h, 82h, C1h; instruction timing |
| `tb_v8051_system` | the full system running the coverage program end to end. It counts every mechanism (reset, CS_1, fetch, execute, 1/2/3-byte instructions, each ALU function, branches taken and not taken, calls, returns, push, MOVX read and write, MOVC, bit read and write, port read and write, OV and AC, clock enable) and fails on any that never occurs. It also checks 51 `clkfast` per instruction. |
| `tb_v8051_bcd` | the full system running a BCD demo: waits for the start pin P2.7, converts the P0 pins (18h) to decimal with ADD/DA, and counts 024 down to 001 on three 7-segment digit codes on P2/P1/P0 (40h, 24h, 1Bh … 40h, 40h, 79h), then restarts; a second input 9Ch checks the hundreds digit (156) |
| `tb_v8051_full` | the top at its default parameters with the default ROM image: reset values, the P0 sequence 74h, E8h, D1h, A2h and the P1 sequence 09h, 04h, 82h, C1h, repeated, with 357 `clkfast` between P0 updates |

Run one from the repository root, because the hex paths are relative to it.
The package must come first:

```
verilator --binary --timing -Wno-fatal rtl/v8051_pkg.sv \
    $(ls rtl/v8051_*.sv | grep -v pkg) tb/tb_v8051_full.sv \
    --top-module tb_v8051_full -o sim
./obj_dir/sim
```

All the testbenches finish within seconds. The expected values in the
program-level testbenches were worked out by hand from the 8051 instruction
definitions, not taken from this RTL.

## Trusting and changing it

- The design is checked by simulation only. No FPGA timing has been
  characterised for this code. The longest paths are likely to be controller
  state → ALU → controller registers, and the 8-stage divider.
- To run your own program, assemble it to bytes and write them one per line
  into a hex file. Then point `ROM_FILE` at it (`v8051_system #(.ROM_FILE("my.hex"))`).
- A larger ROM: raise `ADDR_W` in `v8051_rom`. The controller's ROM address
  is 12 bits wide, so also widen `rom_addr` and `fetch_addr` in `v8051_ctr`.
- Interrupts would go into `CS_1`. It already sits between every two
  instructions, so an interrupt could push PC and load a vector there.
