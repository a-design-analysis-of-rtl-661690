# A microprogrammed processor with dynamically linked and loaded microprograms

Most microprogrammed machines run a fixed set of microprograms from a control store that
is fixed in size. The control store here is writable, and microprograms are addressed by
*segment and offset*, not by absolute control store address. A microprogram is a
variable-length segment of up to 256 words, and there can be up to 256 of them. A segment
table says where each segment sits in the 4,096-word control store, or that it is not
there at all. A jump to a segment that is not resident is caught by the successor logic.
Control then passes to a fault handler, itself a microprogram in segment 0. The handler
loads the missing segment from main memory with a DMA channel, enters it in the table and
continues at the saved target. The machine can therefore use more microcode than fits in
its control store. Segments can also be moved inside the store (to compact free space)
while microprograms keep running.

The datapath around this mechanism is a byte-oriented microengine. It has three 8-bit
buses, an ALU with a shifter, a local store of general registers and a byte-wide main
memory port with a one-line cache. One 64-bit microinstruction executes per clock.

Everything is SystemVerilog (IEEE 1800-2017) in `rtl/`, with self-checking testbenches in
`tb/`.

## Block structure

```
                      main memory bus (64 bit, req/ack)
                 +----------------+------------------+
                 |                |                  |
            mm_arbiter  <--- memory_port        dma_channel (L, CSADR1, CSADR2, CSDBR)
            (to outside)     (MAR, DBR,              |  steals the control store port
                              8-byte line)           v
   segment_table <--lookup-- microsequencer --addr--> control_store 4096 x 64
        ^                     |  ^    PC: seg/off + absolute
        |                     |  |    micro_stack (return addresses, seg:off)
        | bus port (SEG)      v  | flags
        +------------------ datapath: A/B/F buses, local store, ALU, shifter,
                              status, IR, switches, PC, masks, SEG/OFF, ZBASE
```

| File | Contents |
|---|---|
| `rtl/dll_pkg.sv` | widths, microinstruction struct, condition and successor codes, bus address map |
| `rtl/dll_processor.sv` | the top: wires the blocks below and brings out the main memory bus |
| `rtl/microsequencer.sv` | successor function, segment-offset and absolute PC, repetition, fault vector |
| `rtl/segment_table.sv` | 256 entries: defined, resident, base, length, main memory image address |
| `rtl/micro_stack.sv` | return stack of segment:offset addresses (16 deep) |
| `rtl/control_store.sv` | 4,096 x 64 writable store, one port |
| `rtl/datapath.sv` | buses, bus address decoding, special registers, status, memory controls |
| `rtl/alu.sv`, `rtl/shifter.sv`, `rtl/local_store.sv` | 8-bit ALU, 0-7 place shifter, 64-byte register file |
| `rtl/memory_port.sv` | MAR, DBR, one 8-byte cache line, access controls, stall |
| `rtl/dma_channel.sv` | block transfers: main memory to control store, control store to main memory, within the control store |
| `rtl/mm_arbiter.sv` | shares the main memory bus between the memory port and the DMA channel |

## Microinstruction format

The 64 bits, most significant first:

| Bits | Field | Meaning |
|---|---|---|
| 63 | E | extended precision: the instruction repeats, and the successor field changes meaning |
| 62 | T | 0 logic function, 1 arithmetic |
| 61:58 | function | T=0: truth table of the logic function, bit `{a,b}` is the result. T=1: `{op, carry-in}` with op INC, DEC, ADD, SUB (A-B) and carry-in 0, 1, C or not C |
| 57:56 | S select | shift-in bit: 0, 1, S or not S |
| 55:52 | shift | `{right, count}`, count 0..7, 0 = no shift |
| 51:41 | A field | `{M, Z, address}` |
| 40:30 | B field | `{M, Z, address}` |
| 29:19 | F field | `{M, Z, address}` (destination) |
| 18:0 | successor | see below |

Each bus field names one of 256 bus addresses. M set ORs the field with the bus's mask
register (AMASK, BMASK, FMASK). Z tells what happens to the address when the instruction
repeats: `/` keep, `+` increment, `-` decrement. Z can also be `C`: the 8 bits are then a
constant operand (an F field with `C` stores nothing). INC and DEC add or subtract the
carry-in bit, so "INC with carry-in 1" is an increment. A repetition carries from byte to
byte.

## The successor function

This is the heart of the design and the part that needs the most care.

### Forms

| Form | Layout of bits 18:0 | Meaning |
|---|---|---|
| two-way | `{0, c1[5:0], x[2:0], c2[5:0], y[2:0]}` | on c1 do x, else on c2 do y, else Step |
| offset | `{1, c[5:0], x[2:0], M, offset[7:0]}` | on c do x, else PC += offset (two's complement; M ORs in XMASK) |
| extended (E=1) | `{-, c[5:0], x[2:0], M, count[7:0]}` | execute up to *count* times in all; on c do x at once; after the last execution Step |
| on any | `{-, 6'h3F, sel, 00, M, value[7:0]}` | sel 0: **Jseg**, to word 0 of segment *value*; sel 1: **Joff**, to offset *value* of segment SEG |

The actions x and y are Step (+1), Skip (+2), Repeat (same address), Jump (to SEG:OFF),
Call (push PC+1, then Jump), Save&Step (push PC, then +1) and Return (to the top of the
stack). Code 7 acts as Step. The conditions are always, never, Z, N, C, V, U (underflow),
S (shift-out), interrupt and DMA busy, each with its complement (codes in `dll_pkg`).

### Which status a condition sees

Fetching the next instruction overlaps the execution of the current one. The two-way and
offset forms therefore test the flags left by the *previous* microinstruction. A branch on
the result of an operation goes in the instruction after it. The extended form is the
exception: its condition tests the flags of the *current* execution. This is what lets
`EINC(1) R5+ -> R5+, on C=0 Step, 4` stop after the first byte that produces no carry.

### Repetition

Repeat and the extended form do not refetch. The microinstruction register keeps the
instruction and steps its A, B and F addresses as their Z modifiers ask. So a 4-byte
operand at local store 5..8 is handled by one instruction in four clocks. On a repetition
the ALU carry-in is the previous carry-out, and a one-place shift takes the previous
shift-out as its shift-in. For E operations the zero flag stays clear once any byte was
nonzero, so Z describes the whole multi-byte result. Memory and PC controls in an E
instruction act only on its last execution. A 4-byte move into MAR with a read control
therefore starts one read, with the complete address.

### Local and global successors

The PC is kept twice: as segment:offset (`pc_seg`, `pc_off`) and as an absolute control
store address (`pc_abs`). Step, Skip, Repeat, Save&Step and the offset branch are local.
They update both forms by the same amount and need no table access.

Jump, Call, Return, Jseg and Joff are global. The target segment is looked up in the
segment table, and the absolute address is `base + offset`. This is done combinationally
in the same clock, so a global successor costs no extra cycle. Return addresses are pushed
as segment:offset. A segment that moves while a call is outstanding is still returned to
correctly.

### Missing-segment fault

A global successor to a segment whose entry is not *defined* or not *resident* does the
following instead of going to the target:

1. the target segment and offset are saved in FSEG and FOFF;
2. the F bit of the status register is set;
3. control goes to segment 0, offset 0, at the absolute address held in ZBASE.

A faulting Call still pushes its return address. After loading the segment, the handler
only has to copy FSEG:FOFF into SEG:OFF and Jump. A minimal handler (the end-to-end
testbench contains one) does the following:

```
SEG  <- FSEG                        select the faulting entry
DMA CSADR1 <- entry.mm_addr         source in main memory
DMA CSADR2 <- free control store    destination
DMA L <- entry.length-1 ; go MM->CS
wait while DMA busy                 (condition DMA, action Repeat)
entry.base <- destination ; entry.resident <- 1
STATUS.F <- 0 ; OFF <- FOFF ; Jump
```

Deciding which segment to remove when the store is full is a job for microcode. So is
compacting free space (for example a least-frequently-used policy with association lists).
The hardware provides the pieces: byte access to any table entry through SEG, the DMA
relocation, and the fault vector.

## Bus address map

All three buses share one 8-bit map.

| Address | Register |
|---|---|
| 00-3F | local store (64 bytes) |
| 40 | D, dummy: reads 0, writes ignored |
| 41 | STATUS `{0, F, U, V, N, Z, S, C}`; writing it also clears or sets F |
| 42 | SWITCH (switch register input) |
| 43 | IR |
| 44-47 | AMASK, BMASK, FMASK, XMASK |
| 48, 49 | SEG, OFF: the jump vector; SEG also selects the segment table entry on the bus |
| 4A, 4B | FSEG, FOFF (read only) |
| 4C-50 | segment table entry [SEG]: base low; `{D, R, 00, base[11:8]}`; length-1; main memory address low, high |
| 51, 52 | ZBASE low, high (absolute address of segment 0) |
| 54-59 | DMA: L, CSADR1 low/high, CSADR2 low/high, control (write `{mode, go}`, read `{mode, busy}`) |
| 80-BF | MAR byte `a[1:0]`, with access control `a[5:2]` |
| C0-CF | DBR, with access control `a[3:0]` |
| D0-D3 | PC bytes |
| D4-D7 | PC bytes, and PC += 2 after the reference |

An access control is `{modify, op}`:

- modify: none, increment MAR, decrement MAR;
- op: none, read, write, read-write.

Read-write writes DBR to memory if the same microinstruction writes DBR, and reads into
DBR otherwise. When several fields carry a control, the F field's is used first, then A,
then B.

## Memory port

MAR is a 32-bit byte address. DBR is one byte. A single 8-byte line caches the 64-bit main
memory word last read. An access control takes effect at the end of the microcycle:
first MAR is modified, then the access uses the new MAR.

- A read that hits the line loads DBR at once.
- A miss fetches the word, fills the line and then loads DBR.
- Writes go straight through to memory with a byte enable, and update the line on a hit.

While a transfer is open, any microinstruction that names MAR or DBR is held (`mem_stall`)
until the transfer ends. Other microinstructions run on. A sequential scan with
increment-and-read therefore overlaps its memory reads with useful work.

## Loading and relocating segments

The DMA channel moves L+1 words (up to 256) from CSADR1 to CSADR2. Mode 1 moves main memory
to the control store, mode 2 the control store to main memory, mode 0 within the control
store. It uses the single control store port by *stealing* cycles:

- one per word for a load or a store (m cycles for m words);
- two per word for a relocation (read into the CSDBR buffer, then write): 2m cycles.

The processor is held only in the stolen cycles, and runs between them while main memory
is being read. Words move in ascending order, so a segment can be moved down over itself.
On main memory the processor's port has priority over the DMA channel; a grant is held
until its acknowledge.

## Reset and start-up

The control store is not reset. It must hold at least segment 0 before reset is released
(the testbenches write it directly). Reset clears the registers and the local store. It
marks segment 0 defined and resident at address 0, length 256, and every other segment
undefined. The first clock after reset fetches segment 0, offset 0x80, the start-up
entry. Offsets 0..0x7F hold the fault handler.

## Interfaces of the top (`dll_processor`)

- `clk`, `rst_n` (asynchronous, active low), `switches[7:0]`, `intr`.
- Main memory: `m_req` held with `m_we`, `m_addr[15:0]` (64-bit word address), `m_wdata`
  and `m_be` until a one-cycle `m_ack`. Read data come on `m_rdata` with the ack.
- Observation:
  - PC in both forms (`pc_seg`, `pc_off`, `pc_abs`), `status_byte`;
  - the stall sources (`stall`, `mem_stall`, `dma_steal`), `dma_busy`;
  - `seg_fault`, `global_go`, `mm_conflict`;
  - the machine `machine_pc` and `ir_out`, and `stack_error` (return stack overflow or
    underflow).

## Verification

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each ends with a
`TB_RESULT checks=N failures=M` line.

| Testbench | What it checks |
|---|---|
| `tb_alu`, `tb_shifter` | random operands against a reference model, all functions and flags |
| `tb_local_store`, `tb_control_store`, `tb_micro_stack`, `tb_segment_table` | storage against models; stack overflow and underflow; table reset state and byte access |
| `tb_memory_port` | miss latency, zero-wait hits, increment and decrement, read-write, write-through, fills that arrive while other instructions complete, a random run |
| `tb_dma_channel` | all three modes; exactly m stolen cycles for a load or store and 2m for a relocation; an overlapping move |
| `tb_mm_arbiter` | two random masters; every request answered once; priority; grant held |
| `tb_microsequencer` | every successor form and action; Jseg and Joff with the X mask; faults on Jseg and Call; repetition with field stepping and suppressed controls; stall |
| `tb_datapath` | 3,000 random microinstructions against a model; masks, special registers, status and F bit, PC add-2, segment table, DMA and memory strobes; repetition carry and shift; constant F field |
| `tb_dll_processor` | end to end at full size (see below) |
| `tb_byte_search` | a string search microprogram on the full-size processor |

`tb_dll_processor` runs the complete processor at its default sizes. A boot program
defines segment 5, which is not resident, and calls it. The call faults, and the handler
loads the segment by DMA and continues. Segment 5 increments a 4-byte number with one
repeated E instruction and returns. The program then calls segment 5 again, now
resident, and reads and writes main memory. It relocates segment 5 in the control store,
calls it at its new place, runs a counted loop with an offset branch and halts. The
testbench counts each mechanism and fails if one never happens. One run gives:

| Mechanism | Count |
|---|---|
| cycles | 136 |
| missing-segment faults | 1 |
| global successors | 7 |
| stolen control store cycles | 24 (8 for the 8-word load, 16 for the 8-word relocation) |
| memory stalls | 5 |
| main memory conflicts | 8 |

`tb_byte_search` looks for the first occurrence of a byte in a string in main memory. The
loop is three microinstructions:

1. a 4-byte decrement of the remaining length (4 executions);
2. a compare against DBR with increment-and-read;
3. a branch on equality.

That is six cycles per byte. Measured: 22 bytes in 136 cycles, of which one cycle was a
memory stall. The next cache line is fetched while the loop runs.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dll_pkg.sv tb/mi_asm_pkg.sv rtl/*.sv tb/main_memory_model.sv tb/tb_dll_processor.sv \
  --top-module tb_dll_processor -Mdir obj_dll -o vtb
./obj_dll/vtb +verilator+rand+reset+2
```

Replace `tb_dll_processor` by any other testbench name. `tb/mi_asm_pkg.sv` has small
functions that build microinstructions from their fields. It is the easiest way to write
new microprograms. `tb/main_memory_model.sv` is a behavioural main memory with a
configurable latency; it clears itself at time 0, so load it after `#1`.

## Design choices and departures

The following come from the original design study: the field widths and order of the
microinstruction, the successor forms and actions, the 8-bit buses, the 64-bit main memory
bus, the 4,096 x 64 control store, the 256 segments of up to 256 words, the segment table,
the fault vector to segment 0 through a base register, the DMA registers, and the cycle
costs of loading (m) and relocating (2m).

The rest is this implementation's own:

- **Encodings.** The bus address map, the access control encoding, the condition and action
  codes, the select bit of Jseg/Joff, and the status register layout were all chosen here.
- **Condition timing.** The extended form tests the current execution's flags, while the
  other forms test the previous instruction's. The ordinary rule (previous status) cannot
  express an early stop on the carry of the current byte, which the extended form exists
  for.
- **Repeat count.** The count is the total number of executions, so `..., 4` handles four
  bytes.
- **Fault details.** FSEG/FOFF and the F status bit are additions that give the handler
  the faulting target.
- **Sizes.** The local store (64 bytes), return stack depth (16), PC and MAR width (32
  bits), main memory word address width (16 bits) and the reset entry point (0x80) were
  chosen here.
- **Memory port.** One cache line with write-through is the simplest cache that gives the
  behaviour described.
- **Timing.** The segment table lookup is taken to fit in the same cycle as successor
  evaluation, so global successors cost no extra cycle.
- **Outside the RTL.** The floating-point processor on the main memory bus is not
  included, and main memory itself is outside the top.

## Tool notes

The RTL lints cleanly with Verilator apart from style-level warnings:

- unused package constants, and some unused bits of the microinstruction in some modules;
- the stack's `empty` output, which is left open at the top because the successor logic
  does not need it;
- the asynchronous reset also appears in the `disable iff` of the concurrent assertions.

Yosys with the slang front end elaborates every module.
