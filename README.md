# A PDP-8-like computer, register by register

This is a twelve-bit, single-accumulator minicomputer in the style of the
Digital Equipment Corporation PDP-8, written so that its structure mirrors a
register-transfer definition of the machine. Every register of the machine is
its own module, and the control unit (the *major state generator*) does
nothing but issue named transfers between registers: `pc_mar`, `mem_mb`,
`mb_ir`, `ac_and_mb` and so on, one set per clock. An instruction is a
short sequence of such transfers, grouped into three major states: **fetch**,
**defer** (indirect addressing) and **execute**.

The definition this design follows treats the machine as a tree of named
registers plus an interpreter whose instructions correspond one-to-one with
data paths and logical units. Its rules carry over into the RTL:

- No two transfers issued in the same event time may modify the same
  register. Each module therefore has a plain load/priority structure, and
  the control unit never asks for a conflicting pair.
- Transfers read the old register values and write the new ones, like a
  simultaneous assignment. In hardware terms: everything is one clock edge.
- A value an instruction needs must sit in a register. This is why addition
  uses a count register, and why rotation goes through a separate shift
  register.

What runs is a working PDP-8 subset: the eight basic instructions with
direct, indirect and auto-index addressing; the group-1 and group-2 operate
microinstructions; the console teletype; one-level program interrupts; and a
front panel for loading and starting programs.

## The registers

| Register | Width | Module | Role |
|---|---|---|---|
| Accumulator (AC) | 12 | `pdp8_ac` | the only arithmetic register |
| Link (L) | 1 | `pdp8_ac` | carry out of AC; takes part in rotations |
| Shift register | 13 | `pdp8_shift` | holds L and AC rotated, during a rotate |
| Memory buffer (MB) | 12 | `pdp8_mb` | every word to or from memory passes through it |
| Memory address (MAR) | 12 | `pdp8_mar` | address presented to memory |
| Program counter (PC) | 5 + 7 | `pdp8_pc` | page address and word-in-page address |
| Instruction register (IR) | 3 | `pdp8_ir` | operation code only |
| Memory | 32 × 128 × 12 | `pdp8_memory` | 40 (octal) pages of 200 (octal) words |
| Keyboard buffer and flag | 8 + 1 | `pdp8_tty` | last key struck; set when a key arrives |
| Teleprinter buffer and flag | 8 + 1 | `pdp8_tty` | character being printed; set when printing is done |
| Interrupt, enable, run bits | 1 each | `pdp8_state_bits` | interrupt pending, interrupts allowed, machine running |
| Switch register | 12 | top-level input | front-panel toggles |

Bits are numbered as on the PDP-8: **bit 0 is the most significant bit**. All
words are declared `logic [0:11]` (`word_t` in `pdp8_pkg`). Verilator warns
about ascending ranges (`ASCRANGE`). The warning is expected, and the numbering
is kept so that bit positions in the RTL match PDP-8 documentation.

## Addresses and the last word of a page

Memory is divided into 32 pages of 128 words. A memory-reference instruction
holds only seven address bits. The word address is bits 5-11, and bit 4 selects
either **page 0** or the **current page**. The machine keeps the current page in
the program counter, which is why the PC is built as a 5-bit page field and a
7-bit word field. Its increment carries from the word field into the page
field, so as a whole it counts 0000-7777 and wraps.

The PC is advanced during fetch, before the operand address is formed. As a
result, an instruction in the **last word of a page** (address *p*177) that
refers to "the current page" actually gets the *next* page, because the PC
already points there. This quirk follows directly from keeping the page in the
program counter, and it is kept deliberately. The end-to-end test places a TAD
at 0377 that reads its operand from 0401, not 0201. A machine that took the
page from the instruction's own address would not have this quirk; doing that
would mean deriving the page from MAR instead of PC in `pdp8_mar`.

Indirect addressing (bit 3) makes the addressed word a pointer. A pointer in
0010-0017 is an auto-index register: it is incremented and written back before
use.

## How an instruction runs

Each clock is one *event time*. The state generator's outputs are a packed
struct `ctl_t` (in `pdp8_pkg`), with one bit per transfer. Fields are named
`source_destination`: `mb_mar` moves MB into MAR.

```
FETCH   0  MAR <- PC            (or: take an interrupt, or go to the panel if halted)
        1  MB <- M[MAR]
        2  IR <- MB[0:2], PC <- PC + 1
        3.. depends on the instruction
DEFER   0  MB <- M[MAR]
        1  MB <- MB + 1          (auto-index only)
        2  M[MAR] <- MB          (auto-index only)
        3  JMP: PC <- MB, done;  others: MAR <- MB
        4  go to EXECUTE
EXECUTE per instruction, below
```

| Instruction | Code | Execute steps | Event times, direct |
|---|---|---|---|
| AND | 0 | MB←M; AC←AC∧MB | 7 |
| TAD | 1 | MB←M, count←12; 12 serial-add steps | 18 |
| ISZ | 2 | MB←M; MB←MB+1; M←MB, skip if zero | 8 |
| DCA | 3 | MB←AC; M←MB, AC←0 | 7 |
| JMS | 4 | MB←PC; M←MB, PC←MAR; PC←PC+1 | 8 |
| JMP | 5 | (in fetch) PC←MAR | 5 |
| IOT | 6 | (in fetch) pulses IOP1, IOP2, IOP4 in event times 3, 4, 5 | 6 |
| OPR | 7 | (in fetch) microinstructions, see below | 6-8 |

Indirect addressing adds 4 event times, or 5 with auto-index. An indirect JMP
adds 3. An interrupt takes 5. These counts are this design's own. The source
description fixes the order of operations but gives no durations.

### Operate microinstructions

OPR instructions run entirely in the fetch state, one group step per event
time. The "operation at event time *j* of group *i*" structure comes from the
definition. The order inside each group is the PDP-8's.

- **Group 1** (bit 3 = 0): event time 3 does CLA (bit 4) and CLL (5). Event
  time 4 does CMA (6) and CML (7). Event time 5 does IAC (11), where a carry
  out of AC complements L. Event times 6-7 rotate: RAR (8) or RAL (9), twice
  when bit 10 is set. **Asking for both RAR and RAL is refused**, and the
  instruction then does no rotation. Rotating left and right at once is
  treated as improper, not as some combined shift.
- **Group 2** (bit 3 = 1): event time 3 tests SMA (5), SZA (6) and SNL (7).
  They are ORed, and bit 8 reverses the sense (SPA/SNA/SZL, with SKP when none
  is selected). Event time 4 does CLA. Event time 5 does OSR (9, AC ← AC ∨
  switches) and HLT (10). With bit 11 also set this would be a group-3
  (extended arithmetic) instruction on a real PDP-8. No such unit exists here,
  so it is executed as group 2.

### Serial addition and the count register

TAD does not use a twelve-bit adder. The sum is built by repeating one step
that involves both AC and MB:

```
AC  <- AC xor MB                       (sum without carries)
MB  <- (AC and MB) shifted toward bit 0 (the carries)
L   <- L xor (AC[0] and MB[0])         (carry out of the word)
```

Each step moves every pending carry one place toward bit 0. After twelve
steps no carry is left, MB is zero, AC holds the sum, and L has been
complemented exactly once if the addition overflowed. The number of steps is
held in a **count register** in the state generator, loaded with the word
length when the operand is read. The source description argues that an
operation needing a word-length argument implies such a register. The sum
half of the step is in `pdp8_ac` and the carry half in `pdp8_mb`. MB is
consumed by the addition, which TAD does not mind.

Increments (PC, MB, AC) are single-cycle `+1` here, not serial.

### Rotation through the shift register

A rotate takes two event times. In the first, L and AC are copied in parallel
into the 13-bit shift register, each bit landing one (or two) positions over
in the L-AC ring. In the second, the shift register is copied straight back
into L and AC. The rotation happens in the wiring of the first transfer, so no
register is ever both read and written by a shift in the same step.

## Interrupts

The interrupt source is outside the machine. A one-cycle `int_pulse` sets the
**interrupt bit**, which stays set until the interrupt is taken. In this
design the teletype flags do **not** raise interrupts by themselves. A system
that wants interrupt-driven teletype I/O has to route them into `int_pulse`
outside the top.

An interrupt is taken at the first event time of a fetch, when the interrupt
bit is set, the **enable bit** is set, and the one-instruction delay after ION
has passed. The machine then clears MB, forces JMS into IR, copies MB (zero)
to MAR and runs a normal JMS execute cycle. PC is saved in location 0 and
execution continues at location 1. Taking the interrupt also clears the
interrupt and enable bits. ION is IOT 6001 and IOF is 6002. As on the PDP-8,
after ION one more instruction always completes before an interrupt can be
taken. This allows the usual `ION; JMP I 0` return from a handler.

## Teletype and front panel

The teletype connects to the keyboard and teleprinter buffers:

| IOT | Name | Action |
|---|---|---|
| 6031 | KSF | skip if keyboard flag |
| 6032 | KCC | clear AC and keyboard flag |
| 6034 | KRS | OR keyboard buffer into AC bits 4-11 |
| 6036 | KRB | KCC then KRS |
| 6041 | TSF | skip if teleprinter flag |
| 6042 | TCF | clear teleprinter flag |
| 6044 | TPC | load teleprinter buffer from AC bits 4-11 and print |
| 6046 | TLS | TCF then TPC |

Device-side handshake: `kbd_strobe` (one cycle) delivers `kbd_char` and sets
the keyboard flag. The machine raises `tpr_start` for one cycle with the
character in `tto`. The device answers with a one-cycle `tpr_done` when it has
printed, which sets the teleprinter flag. A device event and a program clear of
the same flag in the same cycle leave the flag set.

The front panel takes one-cycle key pulses in `panel` (`panel_t`). The keys
only act while the machine is halted, except stop:

| Key | Action |
|---|---|
| load address | PC ← switches |
| deposit | M[PC] ← switches, PC ← PC + 1 |
| examine | MB ← M[PC], PC ← PC + 1 |
| start | clear AC and L, set run |
| continue | set run |
| stop | clear run at the end of the current instruction |

To run a program: load address, deposit each word, load address of the entry
point, start. HLT (7402) or stop brings the machine back to the panel state.

## Top-level interface (`pdp8_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears all registers, not memory) |
| `sw` | in | 12 | switch register |
| `panel` | in | `panel_t` | front-panel key pulses |
| `int_pulse` | in | 1 | interrupt request pulse |
| `kbd_strobe`, `kbd_char` | in | 1, 8 | key struck, and its code |
| `tpr_done` | in | 1 | teleprinter finished a character |
| `tpr_start`, `tto` | out | 1, 8 | print request pulse, and the character |
| `ac`, `link`, `pc`, `mb`, `mar`, `ir` | out | | register lights |
| `run`, `major`, `et`, `int_bit`, `enable` | out | | status lights |
| `instr_done` | out | 1 | high in the last event time of every instruction |

Memory has a combinational read and a clocked write. It is a plain RAM: the
read-and-restore cycle of core memory is not modelled. Its size is set by the
`PAGES` and `WORDS_PER_PAGE` parameters of `pdp8_memory` (defaults 32 and 128).

## Files

- `rtl/pdp8_pkg.sv`: word types, opcodes, bit positions, device codes,
  `ctl_t`, `panel_t`, `major_t`.
- `rtl/pdp8_major_state.sv`: the control unit. Start here to see what any
  instruction does.
- `rtl/pdp8_ac.sv`, `pdp8_mb.sv`, `pdp8_mar.sv`, `pdp8_pc.sv`, `pdp8_ir.sv`,
  `pdp8_shift.sv`: the registers and their transfers.
- `rtl/pdp8_memory.sv`, `pdp8_tty.sv`, `pdp8_state_bits.sv`: memory, teletype
  interface, interrupt/enable/run bits.
- `rtl/pdp8_top.sv`: wiring.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/pdp8_pkg.sv tb/tb_pdp8_top.sv --top-module tb_pdp8_top
./obj_dir/Vtb_pdp8_top
```

Replace `tb_pdp8_top` with any other testbench name to run it. Every testbench
ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_pdp8_top` runs the full-size machine (4096 words) in three phases:

1. A program is entered through the panel. It echoes three typed characters
   through the teletype (KSF/KRB/TLS/TSF, counted with ISZ). It then executes
   a TAD from the last word of a page. The test checks the printed characters,
   the page effect, the final PC and the counter word (read back with examine).
2. Memory is filled with random words, with extra ION/IOF, and run for 30,000
   instructions against an instruction-level reference model written in the
   testbench. AC, L and PC are compared after every instruction, and all of
   memory at the end. Random interrupt pulses are given, HLTs are continued,
   and the stop key restarts the program at a random address every 200
   instructions.
3. An interrupt-driven program: the main loop adds 1 to AC 64 times with
   interrupts on while 15 interrupt pulses arrive. The handler saves AC,
   counts the interrupt, restores AC and returns with `ION; JMP I 0`. Some
   pulses arrive while the handler is running and must wait until it has
   returned. The test checks AC, the halt address and that all 15 were taken.

It counts how often each mechanism occurred and fails if any never did. The
mechanisms are defer, auto-index, interrupt, rotate, refused double rotate,
serial addition, the ISZ/OPR/IOT skips, JMS, JMP, HLT, stop, teletype in and
out, the panel keys, last-word-of-page addressing, ION and IOF. It takes a few
seconds.

`tb_pdp8_major_state` checks the event-time count of each instruction kind in
the table above, including the twelve addition steps of TAD.

## What to trust, and what is this design's own

Taken from the machine's definition: the register set and widths, the 32 × 128
memory, the page/word structure of the PC and the page-0/current-page flag,
the fetch/defer/execute major states, the event-time-per-group structure of
OPR, serial addition with a count register, rotation through a shift register,
the refusal of simultaneous left and right rotation, an interrupt bit set by
an external pulse, and the named data paths between the registers.

Taken from the PDP-8 the machine models, because the definition assumes it
rather than spelling it out: the opcode assignments, the bit positions of the
instruction fields and microinstructions, auto-indexing, the teletype IOT codes
and their pulse meanings, the ION delay, the interrupt-as-JMS-0 convention, and
the panel keys.

This design's own choices:

- one clock per event time, and the number of event times in each major state;
- combinational memory read;
- single-cycle increments;
- asynchronous reset of every register;
- no interrupts from the teletype flags;
- group-3 OPR run as group 2;
- rotate-twice done in one transfer.

Not built: the extended arithmetic element and any other IOT device. The
definition also names a MAR-to-MB path that no instruction here uses, so it is
not built.

The instruction-level model in the top testbench was written separately from
the RTL but embodies the same reading of the instruction set. It confirms that
the RTL does what this README says. It cannot settle questions the definition
leaves open, such as whether the real machine shows the last-word-of-page
effect.
