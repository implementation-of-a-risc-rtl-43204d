# A PIC16-compatible RISC microcontroller for a small FPGA

This is an 8-bit Harvard microcontroller that runs the Microchip PIC16 mid-range
instruction set (35 instructions, 14-bit instruction words), plus one extra
instruction, `MULT`. It is built for a Xilinx Spartan-IIE class FPGA and uses the
chip's block RAMs as program and data memory. Programs are not compiled into
the bitstream. A PC sends them over a serial line at 57600 baud, and a small
loader in the FPGA writes them into program memory, so the same bitstream runs any
program built with the usual PIC tool chain.

The main difference from a real PIC16 is speed per clock. A PIC16 takes four
oscillator clocks per instruction; this core takes two. The core clock is 12 MHz,
so it peaks at 6 MIPS.

Everything described here is synthesizable SystemVerilog in `rtl/`, with a
self-checking testbench for each block in `tb/`.

## System structure

```
            48 MHz                      +--------------------+
  CLOCK ---------> clock_gen --clk24--->| program_memory     |
                     |   |              | A: 2048 x 8 (load) |
                     |   +---clk24---+  | B: 1024 x 16 (run) |
                     |               |  +---------^-------+--+
                     clk12           |     8-bit  |       | 16-bit instruction
                     |               |  +---------+-+     |
  SERIAL RX -------->|---------------+->| program_  |     |
  SERIAL TX <--------|------------------| loader    |     |
                     |                  +-----+-----+     |
                     v                        | hold      v
                 +---------------------------------------------+    +-------------+
  RESET -------->| riscmcu (core)                              |<-->| data_memory |
                 |  inst_decode, calc_ram_address, alu/mult4,  | 8  | A: core     |
                 |  fsm (+ stack), registers and I/O ports     |    | B: debug    |
                 +--+----------+----------+----------+---------+    +-------------+
                    | PORTA(5) | PORTB(8) | PORTC(8) | PORTD(8)
```

| Module | Role |
|---|---|
| `riscmcu_top` | FPGA top level: wires the five units together |
| `clock_gen`, `clock_divider` | 48 MHz in; 24 MHz for the loader and both memories; 12 MHz for the core |
| `program_loader` (`baud_gen`, `uart_rx`, `uart_tx`) | Serial command interpreter that writes and reads program memory |
| `program_memory` | 16 kbit true dual-port RAM: byte port for the loader, word port for fetch |
| `data_memory` | 512 x 8 dual-port RAM: port A for the core, port B brought out for debugging |
| `riscmcu` | The core: W, STATUS, FSR, PCLATH, INTCON, OPTION, TRIS and port latches, operand preparation, write-back |
| `inst_decode` | Instruction register and registered decode |
| `calc_ram_address` | Direct/indirect data address, register-map decode, read multiplexer, bit mask |
| `alu`, `mult4` | Combinational ALU with the 4 x 4 multiplier |
| `fsm`, `stack` | Control states, program counter, 16-level return stack, interrupt entry |
| `pic_pkg` | Shared widths, enums, register addresses and instruction encoders |

## Clocks and memory timing

There are two clocks, and the core relies on the ratio between them.

- **clk24** is half the 48 MHz board clock. The loader and both memories run on it.
  On the FPGA this is the divide-by-two output of the clock DLL. Here it is a
  toggle flip-flop, which can be swapped for the vendor DLL and global buffers
  without touching anything else.
- **clk12** is clk24 divided by a second toggle flip-flop (`clock_divider`). The
  core runs on it because its longest combinational path runs through the read
  multiplexer, the ALU and the write-back.

Every rising edge of clk12 comes from, and follows, a rising edge of clk24. So each
core clock period contains two memory clock edges: one in the middle and one at the
end. The memories are synchronous block RAMs, but the core treats them almost as
asynchronous ones:

- The core changes an address only at a clk12 edge and holds it for the whole
  period. The memory registers the read data at the mid-period clk24 edge, and the
  data is stable before the next clk12 edge samples it.
- Data writes are requested during state S2 (`ram_we` high for the whole period),
  so the memory writes on the mid-period edge. The end-of-period edge writes the
  same value again, because the address and data have not yet changed.

In simulation the clk24 edge that coincides with a clk12 edge samples the old
address, just as the hardware does, because clk12 is itself a flip-flop output of
clk24.

## The core: two states per instruction

Execution alternates between two states, S1 and S2. `fsm` also has an interrupt
state (SINT) and a SLEEP state:

```
 reset -> S1 --irq--> SINT --> S1
          |
          +--> S2 --SLEEP instr--> SLEEP --wake--> S1
               |
               +--> S1
```

**S1: read.** The instruction register already holds the instruction.
`calc_ram_address` forms the data address, selects the addressed location's value
(a RAM byte, or a special register held in the core) and builds the bit mask
`1 << b`. The core latches the two ALU operands:

| Instruction | Operand A | Operand B |
|---|---|---|
| literal (`MOVLW`, `ADDLW`, `SUBLW`, `ANDLW`, `IORLW`, `XORLW`, `RETLW`) | k | W (`~W` for `SUBLW`) |
| `CLRF`, `CLRW` | 0 | W |
| `MOVWF` | W | W |
| `MULT` | W<3:0> | W<7:4> |
| other file instructions | f | W |
| `INCF`, `INCFSZ` / `DECF`, `DECFSZ` | f | 01h / FFh |
| `SUBWF` | f | `~W`, with carry-in 1 |
| `BCF` / `BSF`, `BTFSC`, `BTFSS` | f | `~mask` / `mask` |

A return instruction (`RETURN`, `RETLW`, `RETFIE`) also pops the stack in S1. The
popped address is kept in a register until S2.

**S2: execute, write back, fetch.** The ALU result goes to W, to a special register,
or to the data memory, and the flags are updated. In the same cycle the next
instruction word arrives from program memory at address PC, is loaded into the
instruction register (and decoded), and PC takes its next value.

### The program counter is always one ahead

PC always holds the address of the word being fetched, which is the executing
instruction plus one. That keeps the rules simple:

- `CALL` pushes PC itself as its return address.
- The next PC, in priority order, is:
  1. the popped address for a return;
  2. `{PCLATH<4:3>, k<10:0>}` for `CALL`/`GOTO`;
  3. `{PCLATH<4:0>, result}` for any instruction that writes PCL (a computed jump);
  4. otherwise PC + 1.
- Whenever the flow changes (cases 1-3), the word fetched in that same S2 is the
  wrong one. It is replaced by a NOP (`ir_flush`), so the instruction costs a
  second, idle instruction slot. A skip works the same way without changing the
  PC: `BTFSC`, `DECFSZ` and `INCFSZ` skip when the ALU result is zero, and `BTFSS`
  skips when it is not zero. The next instruction is flushed.

So an ordinary instruction takes 2 core clocks, and a jump, call, return or taken
skip takes 4. The testbenches check these counts cycle by cycle.

### Interrupts and the return address

There is one interrupt source, a rising edge on the PORTB<0> pin. Two flip-flops
synchronise the pin, an edge detector follows, and an edge sets PORTB0IF
(INTCON<1>). The interrupt request is `GIE & PORTB0IE & PORTB0IF`
(INTCON<7>, <4>, <1>).

The request is tested in S1. When it is set, the machine goes to SINT instead of
S2, so the instruction in the instruction register is **not** executed. SINT lasts
one clock. It pushes the return address, loads PC with 0004h, flushes the fetched
word, clears GIE and sets the flag. `RETFIE` pops the address and sets GIE again.
As on a PIC16, only the PC is saved. The service routine must save W and STATUS
itself, and must clear PORTB0IF before re-enabling interrupts.

The subtle part is which address to push. Normally the pre-empted instruction sits
at PC - 1, and that is what must be re-executed. But if the instruction register
holds a flushed NOP (the idle slot after a jump or skip), PC - 1 is the discarded
word. Pushing it would execute an instruction that should have been skipped, or
return into the middle of the old flow. `fsm` records whether the instruction
register holds such a bubble, and pushes PC instead of PC - 1 in that case. The
fsm testbench covers both cases.

### SLEEP

`SLEEP` goes from S2 to the SLEEP state. The instruction after it has already been
fetched in that S2. In SLEEP the PC and every register hold. The core wakes when
`PORTB0IE & PORTB0IF` is set, whether GIE is set or not, and returns to S1:

- With GIE clear, it simply executes the instruction fetched before sleeping.
- With GIE set, S1 sees the request and takes the interrupt. The return address is
  then that fetched instruction, which runs after `RETFIE`.

There is no oscillator to stop on an FPGA, so SLEEP only stops switching activity.

## Data addressing and the register map

The data address is 9 bits:

- **Direct**: `{RP1, RP0, f}`, from STATUS<6:5> and the 7-bit file field.
- **Indirect** (file field 0, the INDF register): `{IRP, FSR}`, from STATUS<7> and
  the FSR register.

Only the low 8 bits select among the special registers, so banks 2 and 3 mirror
banks 0 and 1:

| Address (low 8 bits) | Location |
|---|---|
| 02/82 | PCL (reads PC<7:0>; a write is a computed jump) |
| 03/83, 04/84, 0A/8A, 0B/8B | STATUS, FSR, PCLATH, INTCON |
| 05, 06, 0C, 0D | PORTA, PORTB, PORTC, PORTD |
| 85, 86, 8C, 8D | TRISA, TRISB, TRISC, TRISD |
| 81 | OPTION (storage only; no timer is built) |
| 0E-7F, 8E-FF | data RAM (the full 9-bit address goes to the memory) |
| others (00 via FSR = 0, 01, 07-09, 87-89) | read as 0, writes ignored |

The special registers live in the core, not in the RAM, so their reads do not
depend on memory timing.

## ALU and flags

The ALU is purely combinational and sorts instructions into nine groups:

- rotate left and rotate right through carry;
- swap nibbles;
- complement;
- AND, OR and XOR;
- add;
- 4 x 4 multiply;
- pass-through.

`BCF`, `BSF` and the bit tests are AND/OR operations with the mask operand. Flags
follow the PIC16 definitions:

- **Addition** sets C from the carry out of bit 7, DC from the carry out of bit 3,
  and Z.
- **Subtraction** is `f + ~W + 1`, so C and DC come out as inverted borrows, as on
  a PIC16 (`37h - 0` gives C = 1).
- `INCF`/`DECF` add 01h/FFh and set only Z.
- `DECFSZ`/`INCFSZ` set no flag; the zero result only drives the skip.

`MULT` (encoding `11 1011 xxxx xxxx`, a free code in the literal group) writes
`W<3:0> x W<7:4>` to W and sets Z. For example, W = 5Dh gives 41h.

When an instruction both writes STATUS as its destination and affects flags (for
example `ADDWF STATUS,F`), the flag update wins for the affected bits.

## I/O ports

PORTA is 5 bits wide; PORTB, PORTC and PORTD are 8 bits. The core never drives a
pin directly. Each port is three buses: the pin inputs, the output latch, and
output enables equal to `~TRIS`. The board-level tri-state pad sits outside. TRIS
registers reset to FFh, so every pin is an input after reset. Reading a port
returns the pin for input bits and the latch for output bits.

## Serial program loader

The loader runs at 57600 baud, 8N1. The baud generator divides 24 MHz by 26 to get
an enable pulse at 16 times the bit rate (0.16 % fast). The receiver confirms a
start bit at its middle, samples each bit at its middle, and accepts a byte only
when its stop bit is high.

Commands (all numbers are bytes):

| Send | Reply | Meaning |
|---|---|---|
| `55` | `AA` | link check |
| `57 AH AL N d1..dN` | `4B` ('K') after the last byte | write N bytes (N = 0 means 256) from byte address `{AH[2:0], AL}` |
| `52 AH AL N` | N bytes | read N bytes from the same address space |

Instruction word n occupies byte addresses 2n (bits 7:0) and 2n+1 (bits 13:8).
Unknown command bytes are ignored. While a command is being received or answered,
the `loading` output is high and the core is held in reset. When the command ends,
the core restarts from address 0. This is how a newly loaded program starts, and
it also means that any command, even a link check, restarts the running program.

The `dbg_*` port (clk24 domain) reads and writes the data RAM directly, for
inspection and for presetting data.

## What comes from the original design and what is new here

The thesis this design is based on describes the following, and the RTL follows
it:

- the system structure and clock rates;
- the memory sizes and port widths;
- the four control states and their transitions;
- the operand tables and destination rules;
- the next-PC rules and the register map;
- the 16-level stack, the single edge-triggered interrupt on PORTB<0> and its
  wake-up from SLEEP;
- the `MULT` instruction.

Choices made here, where that description is silent or incomplete:

- **Operands of `MOVF` and `MOVWF`.** The original operand table gives `MOVWF` a
  file operand and omits `MOVF`. Here `MOVWF` moves W and `MOVF` moves f, as the
  instructions require.
- **Subtraction.** It is done as `~W` plus a carry-in, rather than an explicit
  two's complement of W. This gives PIC-correct C and DC.
- **Flags.** The flags affected by `MOVF`, `CLRF`, `CLRW`, `RLF`, `RRF`, `DECFSZ`
  and `INCFSZ` follow the PIC16 data sheet.
- **Interrupt return address.** The address pushed when an interrupt arrives in an
  idle slot (see above) is handled here.
- **Serial protocol and byte order.** Both are new, as is holding the core in reset
  during loading.
- **Port pins.** The split pins, the pin-or-latch read-back and the two-flip-flop
  interrupt synchroniser are added here.
- **Reset values.** STATUS resets to 00h and OPTION to FFh.
- **Receiver start bit.** The receiver takes a *low* start bit, as RS-232 framing
  requires on the logic side.
- **Clock DLL.** It is replaced by a flip-flop (see Clocks).

Not built: the PIC16's other peripherals (timers, watchdog; `CLRWDT` is a NOP and
OPTION drives nothing), the PC-side download program, and the DLL itself. Only
PC<9:0> reach the 1024-word program memory.

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The important ones:

- **`tb_riscmcu_top`** runs the whole design at full size and real clock rates
  (about 0.12 s of simulated time). It sends the test program from
  `tb_prog_pkg` over the serial line, checks the loader's replies, and reads a
  block back. It lets the program run and pulses the interrupt pin (once while
  polling, once during SLEEP). It then checks 26 RAM results and the interrupt count through the debug
  port, plus the port pins and enables and cycle timing on the core clock. It
  counts each mechanism and fails any that never happened: flushes, skips,
  pushes, pops, interrupt entries, sleep cycles, indirect accesses, computed
  jumps and `MULT`. Finally it loads a second program while the first is
  running, and checks that the core was held in reset and then runs the new
  program.
- **`tb_riscmcu`** runs the same program on the core alone, with ideal memories.
  The program (built with the encoder functions in `pic_pkg`) covers every
  instruction group, all four skips, nested calls, a table lookup through PCL,
  indirect and banked addressing, ports, an interrupt and SLEEP. The expected
  values were worked out by hand from the instruction definitions.
- **`tb_riscmcu_selftest`** runs the board bring-up self-test on the core:
  - The program shows a 16 x 16 multiplication table on PORTC, computed with a
    shift-and-add subroutine.
  - It then steps through COMF, ADDLW, SUBLW, ANDLW, XORLW and `MULT` applied
    to the PORTB switches, one step per PORTD button press.
  - Next it walks a one left and right through PORTC, and sleeps until the
    interrupt pin wakes it.

  The testbench plays the operator: it sets random switch values, presses the
  button and checks every value written to PORTC (303 checks). In this version
  the delay loops are shortened, and the interrupt routine saves W and STATUS
  and clears its flag.
- **`tb_fsm`** follows the exact execution order through jumps, a call and
  return, a skip, SLEEP, an interrupt that pre-empts an instruction, and an
  interrupt in the idle slot after a `GOTO`.
- **`tb_alu`**, **`tb_mult4`** and **`tb_calc_ram_address`** compare against
  reference models over random and exhaustive inputs.
- **`tb_uart_rx`** also checks at ±3 % baud error, and that glitches and bad stop
  bits are rejected.

Running a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/pic_pkg.sv tb/tb_prog_pkg.sv tb/tb_riscmcu_top.sv \
    --top-module tb_riscmcu_top -o sim
./obj_dir/sim
```

For the other testbenches, replace the last file and the top module name;
`tb_prog_pkg.sv` is needed only by `tb_riscmcu` and `tb_riscmcu_top`. The
testbenches reset all state they read, so they also pass with random initial
values (`+verilator+rand+reset+2`).

Lint notes:

- Both memory ports share one clock, which keeps each RAM array in one
  process and one clock domain.
- Verilator reports the reset nets as both synchronous and asynchronous. This
  comes from the `disable iff (!rst_n)` of the built-in assertions, not from
  the logic.
- The remaining unused-bit warnings are real and harmless:
  - PC bits above bit 9, and instruction bits 15:14, are not used with the
    1024-word memory;
  - the decoded-instruction bundle passed to `fsm` carries fields it does not
    need;
  - `pushed`, `popped` and `indirect` are observation points for the
    testbenches.

## Changing the design

- **Stack depth**: parameter `STACK_DEPTH` of `riscmcu` (default 16).
- **Memory sizes**: `WORDS` of `program_memory` and `DEPTH` of `data_memory`.
  The top uses 10 PC bits and 9 data-address bits, so it must be adjusted with
  them.
- **Baud rate and clock**: `CLK_HZ` and `BAUD` of `program_loader`.
- **Interrupt pin**: chosen in `riscmcu_top` (`int_in`).
- **New instructions**: add them to `instr_e` and the encoder functions in
  `pic_pkg`, then to `inst_decode`, the operand cases in `riscmcu` and, if needed,
  an ALU group in `alu`.

The timing assumptions to keep when changing the memories: the program word must
be valid by the end of S2, and read data by the end of S1. Write data and address
are stable through S2.
