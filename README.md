# PSC 716 — a Personal Simple Computer

The PSC 716 is a deliberately tiny stored-program computer, small enough to
fit a CPLD and to be understood in one sitting. It is an accumulator machine:
one 4-bit register, A, takes part in every operation, and every instruction
names at most one memory operand. The name gives the two numbers that size
everything: **7**-bit instruction words and **16** words of memory.

An instruction word is a 3-bit opcode over a 4-bit address:

```
  6   5   4   3   2   1   0
+-----------+---------------+
|  opcode   |    address    |
+-----------+---------------+
```

Data are 4-bit two's complement numbers kept in the low four bits of a memory
word. The machine has no tri-state buses: multiplexers route every address and
data path, and all storage (memory, registers, output port) is edge-triggered
D flip-flops on one clock.

A front panel of DIP switches and two pushbuttons lets you key a program into
memory (*edit mode*) and then run it (*run mode*), watching results on four
hex displays and four condition-code LEDs.

## Instruction set

| opcode | mnemonic | operation | flags changed |
|---|---|---|---|
| 000 | `HLT` | stop; all state is kept | – |
| 001 | `LDA addr` | A ← M[addr] | NF ZF |
| 010 | `ADD addr` | A ← A + M[addr] | CF NF ZF VF |
| 011 | `SUB addr` | A ← A − M[addr] | CF NF ZF VF |
| 100 | `AND addr` | A ← A & M[addr] | NF ZF |
| 101 | `STA addr` | M[addr] ← 000 & A | – |
| 110 | `INA` | A ← DIP[3:0] | NF ZF |
| 111 | `OUA` | DIS4 ← A | – |

Only the low four bits of a memory word are used as data, and `STA` writes
zeros into the top three bits. `INA` and `OUA` ignore their address field.
There are no jumps: the program counter only counts up, and after location F
it wraps to 0.

### Condition codes

The ALU keeps four flags beside A:

* **CF** — carry out of bit 3 after `ADD`. After `SUB` it is the *borrow*:
  CF = 1 when the unsigned minuend is smaller than the subtrahend. Adders
  differ on this point; this design chose borrow, which is the inverted
  carry out of A + ~M + 1.
* **NF** — bit 3 of the result.
* **ZF** — result is zero.
* **VF** — two's complement overflow: the signed result left −8…+7. It is
  computed as carry-into-bit-3 XOR carry-out-of-bit-3.

`LDA`, `AND` and `INA` update only NF and ZF, and CF and VF keep their old
values. A program can therefore load or mask a value without losing the carry
or overflow of an earlier add. `STA`, `OUA` and `HLT` change no flag.

## How an instruction executes

Every instruction takes exactly **two clock cycles**. The `idms`
(instruction decoder and micro-sequencer) is a three-state machine:

```
           reset / edit mode
                 |
                 v
   +-------> FETCH ---------> EXECUTE ----(opcode = HLT)----> HALT
   |                            |                              (stays)
   +----------------------------+
```

| cycle | address bus | what happens at the closing clock edge |
|---|---|---|
| FETCH | PC | IR ← M[PC]; PC ← PC + 1 |
| EXECUTE `LDA/ADD/SUB/AND` | IR address | A and flags ← ALU(A, M[addr]) |
| EXECUTE `STA` | IR address | M[addr] ← 000 & A |
| EXECUTE `INA` | – | data bus switched to DIP[3:0]; A ← data through the ALU's load function |
| EXECUTE `OUA` | – | output register ← A |
| EXECUTE `HLT` | – | sequencer enters HALT |
| HALT | PC | nothing; every control line is inactive |

The control signals come from the sequencer state and the IR opcode alone,
through combinational logic (a Moore decoder). They are therefore steady for
the whole cycle. They travel as one packed struct, `ctrl_t` in
`psc716_pkg`:

| field | meaning |
|---|---|
| `pcc` | increment the PC |
| `irl` | load the IR from the memory word |
| `ira` | address bus from the IR address field (otherwise from the PC) |
| `mwe` | write the accumulator into memory |
| `ale` | ALU enable: update A and the flags |
| `alu_fn` | ALU function `{ALX, ALY}`: 00 ADD, 01 SUB, 10 LDA, 11 AND |
| `dsel_in` | data bus from the DIP input port (otherwise from memory) |
| `orl` | load the output port (DIS4) |

A program of *n* instructions that ends with `HLT` asserts `halted` exactly
2*n* clocks after run mode begins.

## The datapath

```
             +------+  pc   +---------+ abus +-----------+ word  +----+
             |  PC  |------>|         |----->| memory    |------>| IR |--opcode--> IDMS
             +------+       | bus_mux |      | 16 x 7    |       +----+
  IR addr ----------------->|         |      | (DFF)     |          |
  DIP[3:0] ---------------->|         | dbus +-----------+          +--addr--> bus_mux
                            |         |----> ALU (cla4) --> A --+--> output port --> DIS4
  A (as 000 & A) ---------->|         |----> memory write port  |
  editor addr/word/strobe ->|         |                         +--> back to ALU and bus_mux
                            +---------+
```

`bus_mux` takes the place of the tri-state buses of a classic textbook
machine. It forms:

* the **address bus**: IR address when `ira`, else PC;
* the **data bus** into the ALU: DIP[3:0] when `dsel_in`, else the low four
  bits of the addressed word;
* the **memory write port**: in edit mode, the editor's address, DIP[6:0] and
  its write strobe; in run mode, the address bus, `000 & A` and `mwe`.

The ALU (`alu`) holds A and the flags and uses `cla4` for `ADD` and `SUB`.
`cla4` is a four-bit carry-lookahead adder/subtractor. It forms a generate
`g = x & y'` and a propagate `p = x ^ y'` for each bit, where `y' = y ^ sub`.
All four carries are written out as two-level sum-of-products, so no carry
ripples from bit to bit. Subtraction feeds `sub` in as the carry-in.

The memory (`sram16x7`) has one write port and two combinational read ports.
The processor reads through port A. Port B feeds the editor display, so a
location can be watched while a program runs.

## Front panel: edit mode and run mode

| control | function |
|---|---|
| DIP[7] | 1 = edit mode, 0 = run mode |
| DIP[6:0] | in edit mode, the word to store |
| DIP[3:0] | in run mode, the input port read by `INA` |
| S1BC (right button) | next edit address (F wraps to 0), in either mode |
| S2BC (left button) | edit mode only: store DIP[6:0] at the edit address |
| DIS3 | edit address, one hex digit |
| DIS2:DIS1 | contents of that location, two hex digits (DIS2 is 0–7) |
| DIS4 | output port (last `OUA`) |
| LEDs | CF, NF, ZF, VF, and `halted` |

While DIP[7] = 1 the processor is held in reset: PC = 0, IR = 0, A = 0, all
flags 0, output port 0, sequencer in FETCH. Clearing DIP[7] starts the
program from address 0. To run a program again, flip DIP[7] up and down.
Memory is never reset, so a program survives any number of runs.

The pushbuttons are expected already debounced and synchronous to the clock.
The editor keeps last cycle's level of each button. It acts at the first
clock edge that sees the button down and not before, so holding a button
does one step or one write, not one per clock.

The displays come out of `psc716` twice: as 4-bit hex values (`dis_hex[0]`
= DIS1 … `dis_hex[3]` = DIS4) and as seven-segment patterns (`dis_seg`, bit
order `{g,f,e,d,c,b,a}`, active high unless `SEG_ACTIVE_LOW = 1`). Assigning
these to the pins of a particular board is left to a wrapper.

### Example: the 11-instruction test program

```
0 INA        60      8 OUA       70
1 OUA        70      9 STA F     5F
2 ADD B      2B      A HLT       00
3 STA E      5E      B data
4 OUA        70      C data
5 SUB C      3C      D data
6 OUA        70      E result
7 AND D      4D      F result
```

With DIP[3:0] = 5, B = 3, C = 1, D = 6 it runs as follows:
5 + 3 = 8 (overflow, VF = 1), so E ← 8.
8 − 1 = 7 (overflow again).
7 & 6 = 6, so F ← 6.
At the end, DIS4 = 6 and CF = 0, NF = 0, ZF = 0, VF = 1 (VF is kept by the `AND`).
The program fills all 16 locations.

## Files

| file | contents |
|---|---|
| `rtl/psc716_pkg.sv` | widths, opcode and ALU-function enums, flag and control structs |
| `rtl/psc716.sv` | top level: mode control, wiring, display decoders |
| `rtl/idms.sv` | fetch / execute / halt sequencer and instruction decoder |
| `rtl/prog_counter.sv` | 4-bit program counter |
| `rtl/instr_reg.sv` | 7-bit instruction register, opcode and address fields |
| `rtl/alu.sv` | accumulator, flags, ADD/SUB/LDA/AND |
| `rtl/cla4.sv` | 4-bit carry-lookahead adder/subtractor with condition codes |
| `rtl/sram16x7.sv` | 16 × 7 flip-flop memory, one write and two read ports |
| `rtl/mem_editor.sv` | edit address, pushbutton edge detection, editor display |
| `rtl/bus_mux.sv` | address, data and memory-write multiplexers |
| `rtl/out_port.sv` | output port register (DIS4) |
| `rtl/hex7seg.sv` | hex to seven-segment decoder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

All registers use one rising-edge clock and a synchronous, active-high reset
(`rst`). The top also resets the processor, but not the editor or the memory,
from DIP[7].

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends a run that
hangs. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/psc716_pkg.sv tb/tb_psc716.sv --top-module tb_psc716 -o sim
./obj_dir/sim
```

Swap the testbench name to test a single module (`tb_cla4`, `tb_alu`,
`tb_idms`, …).

`tb_psc716` runs the whole machine at its default parameters, only through
its panel. It keys programs in with DIP[6:0] and S2BC, switches to run mode,
and reads every memory location back by stepping the editor address. It
checks DIS4, the flags and the halt cycle against an instruction-level model
inside the testbench. The programs are:

* INA/OUA/HLT;
* `LDA 4; ADD|SUB|AND 5; STA 6; HLT` with random and chosen data (overflow,
  zero, carry);
* the 11-instruction program above, with random inputs and the hand-worked
  case;
* 40 random 16-word programs. Some have no `HLT`, run off the end of memory
  and overwrite their own code.

The testbench also counts each mechanism and fails if one never happens:
every opcode, each flag set, a halt, edit writes, an edit-address wrap,
mode switches, a run-mode write attempt that must be ignored, and a location
watched on DIS2:DIS1 while the program runs.
Concurrent assertions guard the control rules, and they fire in any
simulation run with `--assert`:
* a fetch is always followed by a non-fetch cycle;
* a memory write always uses the IR address;
* at most one destination is loaded per cycle;
* a halted sequencer drives no control line;
* an editor write lasts one cycle and happens only in edit mode;
* the editor and the processor never write memory in the same cycle.

The module testbenches are exhaustive where that is cheap (`cla4`: all 512
operand cases, `hex7seg`: all 16 digits). Elsewhere they run long random
sequences against a reference model.

## Design choices and limits

Much of this machine is fixed by its instruction set, the ALU function table,
the memory size, the multiplexed buses, flip-flop storage and the panel
behaviour. The following points are this implementation's own choices:

* **Control encoding and timing**: two clocks per instruction and a separate
  HALT state. The control-field names other than ALE/ALX/ALY are this
  design's.
* **CF on subtraction is the borrow.** Flip the XOR with `sub` in `cla4` if
  your convention is the raw carry out.
* **`INA` goes through the ALU's load function**, so it sets NF and ZF like
  `LDA`.
* **Edit mode holds the processor in reset**, and leaving it starts the
  program at address 0.
* **The editor display stays live in run mode** through a second memory read
  port, and S1BC steps the address in either mode. S2BC writes only in edit
  mode.
* **PC wraps** from F to 0, and a program without `HLT` runs on through
  memory.
* **Reset** is synchronous and active high. Memory contents are not reset.
* **Seven-segment decoding** uses order `{g..a}`, active high by default.
  The mapping of switches, buttons, displays and LEDs to package pins is not
  part of this RTL.
