# MAP: a multi-associative processor built from microprocessor parts

MAP is an array computer in which **eight control units (CUs)** each run their own
instruction stream and drive a **dynamically allocated subset of 1024 processing
elements (PEs)**. A PE belongs to one CU at a time. Its 8-bit OWNER tag equals the
ID of that CU's process. Every PE a CU owns executes the CU's broadcast
instructions in lock step, unless associative selection has switched it off.
Several SIMD programs can therefore share one PE array. Each program takes as
many PEs as it needs, and the programs can signal and preempt each other through
a small supervisor unit, the **CUPI** (Control Unit Processor Interface).

This repository holds synthesizable SystemVerilog for the whole machine:

| part | module | what it is |
|---|---|---|
| shared definitions | `map_pkg` | widths, opcodes, instruction fields, bus types, helper functions |
| processing element | `map_pe` + `map_ram` | 8 accumulators, SELECT/activity, ICTL/OCTL, 4K-word PE memory |
| distribution switch | `map_switch` + `map_bsa` | 8 CU lines × 16 sector buses, conflict arbitration |
| control unit | `map_cu` | fetch, decode, CU arithmetic, PE broadcast, streams, CUPI calls |
| CUPI | `map_cupi` | ID/SECTOR/INT/SIG/ARM/ABLE registers, inter-process instructions |
| main memory | `map_mm` | 16 modules × 256K words, three ports each |
| system | `map_top` | everything wired together; the I/O subsystem's memory port is brought out |

The design follows a short design note that describes the machine as it would be
built from bit-slice microprocessors. That note gives block diagrams, the
protocols between the blocks and a sample instruction set. It gives no bit-level
encodings and no cycle timing. Those, and everything else it leaves open, are
choices made here. They are listed below and in the opening comment of each file.

## Sizes

| parameter | default | where |
|---|---|---|
| CUs | 8 | `map_pkg::NUM_CU` |
| PEs | 1024, in 16 sectors of 64 | `map_top.N_PE`, `map_pkg::NUM_SECTOR` |
| PE memory | 4096 × 32 bit per PE | `map_top.PEM_WORDS` |
| main memory | 16 modules × 262144 × 32 bit (22-bit address) | `map_top.N_MOD`, `MOD_WORDS` |
| word | 32 bit | `map_pkg::WORD_W` |
| ID / OWNER / SELECT / Key / Mask | 8 bit | `map_pkg` |
| ICTL / OCTL | 10 bit | `map_pkg::CTL_W` |

All defaults are the machine's real sizes. Nothing was scaled down.

## Instruction words

Every instruction is one 32-bit word. The top byte is the opcode, `{type[2:0],
number[4:0]}`. The type decides who executes the instruction:

* **type 0**: the CUPI (inter-process instructions: HALT, PREEMPT, ARM, DISARM,
  CLEAR, LDID/STID, LDINT/STINT, LDSEC/STSEC, LDSIG/STSIG, SIGNAL, ENABLE,
  DISABLE, BMQE, BINA, BDARM, BDABL);
* **types 1-3**: the CU itself (CAC register arithmetic, logic, shifts, CU memory,
  branches, subroutine, push/pull, global PE↔CU transfers, streams and
  active-count branches);
* **types 4-7**: the PEs (4 = associative SET/SELECT family; 5-7 = PE register,
  immediate and PE-memory instructions).

Field layouts (own choice, see `map_pkg` and `tb/map_asm_pkg.sv`):

```
memory      {op[7:0], R[3:0], X[2:0], I, ADDR[15:0]}    EA = ADDR + index[X] (X=0: none), I = one indirection
register    {op, R3[3:0], R1[3:0], R2[3:0], D, 11'b0}
immediate   {op, R[3:0], OPD[19:0]}                      OPD sign-extended
associative {op, KEY[7:0], MASK[7:0], N, R[2:0], R2[2:0], 1'b0}
CU compare-branch: memory format with R = {R1[1:0], R2[1:0]}
```

PE register codes 0-7 are AC0-AC7, 8 is ICTL, 9 is OCTL and 10 is SELECT. Code 11
reads OWNER; that code is this design's choice.

## How a CU drives its PEs: the distribution switch

Each CU has a line into a crossbar. Each of the 16 sectors has a bus shared by
its 64 PEs. The CUPI holds a 16-bit **sector mask** for every CU, with one bit per
sector in which the CU owns PEs. A CU transfer is one word plus a command:

| command | meaning on the sector bus |
|---|---|
| `BC_INSTR` | instruction word; owning PEs start it |
| `BC_DATA` | operand for a GL or GM (CU → PE) |
| `BC_QUERY` | PEs that have a value pending (GS, GM PE → CU) drive it |
| `BC_SIN`, `BC_SOUT`, `BC_SXCH` | one slot of a stream |

The **bus sector allocator** (`map_bsa`) grants every requesting CU whose mask
does not overlap that of another CU granted in the same cycle. Overlapping
requests are resolved round-robin. A refused CU has first claim in the next
cycle, so it cannot starve. A granted CU's word, command and ID are copied onto
all its sectors in the same cycle. Only PEs whose OWNER equals that ID accept
the word.

Words going back to the CU are ORed over the CU's PEs. The switch also reports
whether none, one, or more than one of the CU's PEs is active. BCT0, BCT1 and
BCTG1 branch on that.

Two status signals come out of the allocator:
* `sector_conflict`: some pair of CUs has overlapping masks.
* `xmit_conflict`: a request was refused in this cycle.

A CU's grant also serves as the count enable of its PEs' ICTL/OCTL counters. A
blocked CU's PEs therefore never lose their place in a stream.

## Streams: ICTL and OCTL

LSTR, SSTR and XSTR move a vector between CU memory and the PEs in one pass over
the bus, with one word per cycle. The CU sends CAC[0] slots.

* LSTR: each slot carries the next MM word.
* SSTR: each slot collects one PE word into the next MM word.
* XSTR: each collected word is sent out again one slot later, so PEs exchange
  data through the CU.

Each owning PE counts its ICTL (input) or OCTL (output) register down once per
slot. It takes the slot's word, or drives its own, in the slot where the count
is zero. Loading each PE's ICTL/OCTL with its rank gives a scatter or gather.
Equal values broadcast one word to a group. Any other pattern gives a
permutation.

## Associative selection

Each PE has an 8-bit SELECT register and an activity flag:

* The SET family writes the Key bits selected by Mask into SELECT, either
  always (SET) or depending on a test of AC[R], or of AC[R] against AC[R2].
* `SELECT` compares SELECT with Key on the Mask bits. The flag becomes the
  result, or is ANDed with it when N is set.
* `COMSEL` uses the complement of the result.

Inactive PEs decode every instruction but execute only SELECT and COMSEL, so a
program can always wake its PEs up again.

## The processing element

`map_pe` holds:
* AC0-AC7, 32-bit accumulators;
* ICTL, OCTL, SELECT, OWNER and the activity flag;
* a 4K-word memory (`map_ram`, combinational read, clocked write).

A local instruction takes three cycles: receive, address (with index and one
level of indirection), then execute. The CU does not wait for the PEs to
answer. It waits a fixed `PE_LAT` = 3 cycles after each broadcast, the
"synchronous" method of the design note.

Built:
* integer add, subtract, multiply and divide (quotient and remainder);
* logical operations and shifts (circular, logical, arithmetic);
* memory-operand forms of these;
* immediate forms;
* the SET family with all 10 conditions, SELECT and COMSEL;
* GL, GS and GM;
* the three stream instructions.

## The control unit

`map_cu` fetches through its memory address/data registers. It routes each word
by type as described above, and steps each instruction through one memory
access, one switch transfer or one internal operation at a time.

**Relocation.** Every address the program forms is offset by the base register
loaded when the process starts (`cu_base_i`). Programs can therefore be
assembled from address 0. CUPI calls are not relocated: a type-0 instruction
becomes a store of `{opcode, R[1:0], relocated EA}` to address 3FFFF8 + CU
index. `map_top` diverts that store to the CUPI. The CU then waits for the
CUPI's completion. For the conditional type-0 instructions it also gets a
branch decision.

**Interrupts.** PREEMPT, SIGNAL and CLEAR redirect a CU only between two of its
instructions:
1. The CU raises `irq_ack_o` for one cycle. In that cycle `pc_o` still shows
   the interrupted instruction counter, which the CUPI saves.
2. The CU takes its new PC and CAC[0] from the CUPI.

HALT stops a CU. A halted CU starts again on `cu_start_i` or on an interrupt.

## The CUPI

For the process running on each CU, the CUPI keeps:
* ID;
* SECTOR;
* INT, the entry address for messages;
* SIG, the ID of the process being addressed;
* the ARM and ABLE flags.

Calls are served one at a time, round-robin. For a call from CU i, the receiver
j is the CU whose ID equals SIG[i]. Two predicates decide what is allowed:

* **privileged**: ID[j] has no bit that ID[i] lacks (a process has privilege
  over itself). HALT, PREEMPT, ARM, DISARM, CLEAR and the LD/ST register
  instructions need it. LDID additionally refuses a new ID with bits outside
  ID[i].
* **cooperative**: ID[j] and ID[i] share a bit. SIGNAL needs it.

Effects on the receiver:

* **PREEMPT** (receiver armed): the receiver is disarmed and restarted at the
  EA with the caller's CAC[0]. Its old instruction counter is saved at
  3FFFB8 + j.
* **SIGNAL** (receiver armed and able): the receiver restarts at INT[j] with
  the caller's CAC[0]. Its counter is saved at 3FFFB0 + j, ABLE is cleared and
  ARM is set again.
* **CLEAR**: the receiver returns to the counter saved by PREEMPT and is
  re-armed.

The caller is released as soon as the call is decided. It does not wait for the
receiver's switch.

## Main memory

Main memory has 16 modules, each with three ports, served in this priority
order:
1. the I/O subsystem's port;
2. a **preferred** private path (CU i to module i, the CUPI to module 15);
3. one **shared memory bus** that any unit can use to reach any module.

The shared bus carries one transfer per cycle and is handed out round-robin.
The module is the top four address bits. An access is granted and completed in
one cycle.

## Departures from the design note, and what is missing

* **Not built:**
  - PE floating point, NORM and FIX;
  - SETMAX, SETMXL, SETMIN, SETMNL, SETFST and CLRST, which need a way to
    compare values across PEs;
  - the CUPI's message queue (ENQUEUE/DEQUEUE);
  - LDST/STST and the monitor control MTRCTL.
* **Queue consequences:** a PREEMPT to a disarmed process, or a SIGNAL to a
  process that is not armed and able, is dropped instead of queued. BMQE always
  branches.
* **DISABLE** clears ABLE. The sample instruction set lists it as setting ABLE,
  the same as ENABLE. The name was followed.
* **Process state:** the CUPI keeps the state of the running process of each
  CU only. Swapping processes on a CU is left to system software.
* **Microprogramming:** the note builds CUs, PEs and the CUPI from
  microprogrammed bit-slice parts. Here each is a hard-wired sequencer; the
  instruction set is the same.
* **Outside the design:** the I/O subsystem, the operating system's allocation
  and PE memory loading. The top has ports for them: `pe_alloc_*`,
  `cupi_load_*`, `cu_start_*` and the `io_*` memory port.
* **Own choices:** the stream length (CAC[0]), PE_LAT and every bit
  layout above are this design's.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_map_pe` | PE arithmetic, memory addressing, SET/SELECT rules, streams, GL/GS, latency |
| `tb_map_ram` | PE memory against a model |
| `tb_map_bsa` | random requests against a model of the allocator |
| `tb_map_switch` | routing, ORed return, any/many, at 32 PEs |
| `tb_map_mm` | random traffic from all ports against a memory model and the priority rules |
| `tb_map_cu` | one CU with modelled memory, switch and CUPI |
| `tb_map_cupi` | the CUPI's predicates, registers, interrupts and round-robin service |
| `tb_map_top` | whole machine, 32 PEs, 1024-word MM modules |
| `tb_map_top_full` | the same programs with every size at its default |

The two top-level testbenches share `map_top_bench`. It loads four programs
through the I/O port, allocates PEs and processes, and runs the CUs:
* two CUs fight over a shared sector;
* one CU uses streams, selection, BCTG1 and GL/GS/GM;
* a supervisor CU SIGNALs one CU and PREEMPTs another.

It then reads memory back and checks that each mechanism occurred: transmission
conflict, stall, shared memory bus, CUPI call, interrupt, halt, stream in and
out, and PE deactivation.

With verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_map_top -Irtl -Itb -y rtl -y tb \
    rtl/map_pkg.sv tb/map_asm_pkg.sv tb/tb_map_top.sv
./obj_dir/Vtb_map_top
```

`-y rtl -y tb` lets verilator find each module in the file of its name, so only
the packages and the testbench need to be listed. `-Wno-fatal` keeps lint
warnings (unused bits, width extensions in the testbenches) from stopping the
build. For a block, name its testbench instead, e.g. `tb/tb_map_cupi.sv` with
`--top-module tb_map_cupi`.

The reduced top test builds in about half a minute and runs in well under a
second. The full-size test runs in under a second, too, but its C++ takes
about a quarter of an hour to compile on one core, because there are 1024 PE
instances and 32 Mbyte of memory arrays. Add `-j` to spread the compilation
over cores.
