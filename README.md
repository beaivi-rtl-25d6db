# Beaivi: a RISC-V / exposed-datapath DSP core in SystemVerilog

Beaivi is a small 32-bit DSP core that speaks two instruction sets. Ordinary
control code is written as RV32IM and runs with the code density of a RISC
machine. Hot loops are written for an *exposed datapath*: a transport-triggered
architecture (TTA) in which a 64-bit instruction word holds five *moves*, each
one carrying a value from a source (register, function-unit result,
immediate) to a destination (register, function-unit operand, or a
function-unit *trigger* that starts an operation). The exposed datapath lets
the compiler bypass the register file by hand, share operands between
operations and use three-input DSP operations, all on a register file with only
two read ports and one write port.

Both instruction sets run on one datapath. A RISC-V instruction is not
executed by a separate pipeline: a *microcode unit* in decode lowers it into
moves for the same interconnect and function units. Exposed-datapath code is
wide, so it can also be *compressed*: the program fills five small dictionaries
(one per move slot) at run time and then fetches bundles of three 20-bit
index tuples instead of full 64-bit words.

This repository holds synthesizable RTL for the core, its 64 kB instruction
and data scratchpads, the small test register banks, and self-checking
testbenches for every block.

## Block structure

```
            +---------+    +-------------+    +-----------+    +-----+    +----------------+
 IMEM ----> | ifetch  | -> | decompressor| -> | microcode | -> | e_q | -> | interconnect   |
 64 kB      | pc,mode |    | 5 dicts     |    | + mode mux|    |     |    | guards, RF     |
            +---------+    +-------------+    +-----------+    +-----+    | ports, sockets |
                 ^                                                        +----------------+
                 |  redirect / mode switch / flush                          |  |  |  |  |
                 +--------------------------------------------------- CU ALU SIMD MUL LSU -> DMEM
                                                                    RF (2R1W), BRF (b0,b1), IMM
```

| Module | Role |
|---|---|
| `beaivi_top` | Core + 64 kB IMEM + 64 kB DMEM + 128 B / 512 B test register banks + host port |
| `beaivi_core` | Pipeline: fetch, decode, execute |
| `beaivi_ifetch` | Program counter, instruction-set mode register, fetch address |
| `beaivi_decompressor` | Header/fill logic, five dictionaries, bundle expansion |
| `beaivi_microcode` | RV32IM to move lowering, bypass, stall counter, flush, mode mux, long immediate |
| `beaivi_ic` | Transport network: guard evaluation, RF port allocation, source mux, socket decode, IMM register |
| `beaivi_rf`, `beaivi_brf` | 32 x 32-bit register file (2R/1W, r0 = 0); two boolean guard registers |
| `beaivi_alu`, `beaivi_simd`, `beaivi_mul`, `beaivi_lsu`, `beaivi_cu` | Function units |
| `beaivi_fu_pipe` | Result pipeline shared by the multi-cycle units |
| `beaivi_imem`, `beaivi_dmem`, `beaivi_regbank` | Memories |
| `beaivi_pkg` | Encodings, types, latencies |

The pipeline has three stages. *Fetch* presents an address to the synchronous
IMEM. *Decode* is combinational: the decompressor turns the fetched word into
an uncompressed word, and the microcode unit either lowers the RISC-V
instruction in it or unpacks the five moves. The result is stored in the
decode/execute register `e_q`. In *execute* the five moves go over the
interconnect. Operand and trigger writes happen at the end of that cycle.
Function-unit results become readable after each unit's latency.

## Instruction words

Bits [63:62] give the word type.

| [63:62] | Word | Contents |
|---|---|---|
| `11` | uncompressed | five moves: slot 0 [14:0], slot 1 [29:15], slot 2 [37:30], slot 3 [45:38], slot 4 [60:46]; bit 61 unused |
| `01` | header | when no fill is pending: [5:0] = number of fill words that follow |
| `01` | fill | while fills are pending: same slot layout as an uncompressed word; each slot field goes into its dictionary |
| `10` | bundle | three compressed instructions, [19:0] first, [39:20] second, [59:40] third |
| `00` | long immediate | [31:0] is loaded into the IMM register; no moves |

In RISC-V mode the same 64-bit word holds two RV32 instructions. The one at
the lower address is in bits [31:0]. Address bit 2 selects the half.

### Moves

A full move is 15 bits: `guard[14:13] src[12:7] dst[6:0]`. Slots 2 and 3 are
narrow, 8 bits: `src3[7:5] dst5[4:0]`. They expand to `src = 0x20 | src3` and
`dst = 0x40 | dst5`, so they carry function-unit results to operand ports and
ALU triggers. A narrow slot with `dst5 = 0` is a no-op.

| Source code | Value |
|---|---|
| 0x00-0x1F | register r0..r31 (r0 reads 0) |
| 0x20 / 0x21 / 0x22 / 0x23 | ALU / SIMD / MUL / LSU result |
| 0x24 | CU return address |
| 0x25 | IMM register |
| 0x26 / 0x27 | b0 / b1 as 0 or 1 |
| 0x30-0x3F | 4-bit signed immediate |

| Destination code | Socket |
|---|---|
| 0x00-0x1F | register write |
| 0x20-0x3F | SIMD trigger, operation = code - 0x20 |
| 0x40 | no-op |
| 0x41 | ALU o1 |
| 0x42 / 0x43 | SIMD o1 / o2 |
| 0x44 / 0x45 | MUL o1 / o2 |
| 0x46 / 0x47 | LSU o1 / o2 |
| 0x48 / 0x49 | CU o1 / o2 |
| 0x4A / 0x4B | b0 / b1 |
| 0x50-0x5F | ALU trigger (16 operations) |
| 0x60-0x67 | MUL trigger |
| 0x68-0x6F | LSU trigger |
| 0x70-0x7F | CU trigger |

Guard 0 means always. Guard 1 means "if b0", guard 2 "if not b0", and guard 3
"if b1".

One instruction may read at most two distinct registers (r0 is free) and
write at most one. The interconnect gives the two read ports to the registers
in slot order. Simulation assertions check both limits. If two moves write the
same socket, the lowest slot wins.

### Function units

Every unit has operand registers (o1, o2) and a trigger. A trigger move starts
the operation on the trigger value t and the operands. An operand written in
the same instruction as the trigger is already used. The result stays readable
until the next result replaces it.

| Unit | Latency | Operation |
|---|---|---|
| ALU | 1 | `o1 OP t`: ADD SUB AND OR XOR SLL SRL SRA SLT SLTU EQ NE GE GEU MIN MAX |
| SIMD | 2 | packed 8x4 / 16x2 ops (below); o1 = a, t = b, o2 = third input |
| MUL | 3 | MUL, MULH, MULHSU, MULHU (as RV32M), MAC = o2 + o1*t |
| LSU | 2 | LW LH LHU LB LBU SW SH SB at byte address t + o2; o1 = store data |
| CU | 1 | JUMP/CALL to t; JALR to (t+o2)&~1; BEQ..BGEU compare o1 with t and go to o2; SWTTA/SWRV jump to t and switch mode |

The SIMD operations are the DSP extension set:
- ADD and SUB.
- ADDRHI and SUBRHI: rounded halving add and subtract, signed or unsigned.
- MULRHI: rounded upper half of the lane product.
- REFLECT: bit reversal.
- SATACCDOT: saturating dot product with accumulation, `o2 + sum(a_i * b_i)`, signed or unsigned.
- SATSUBU: subtraction that saturates at zero.
- SHRRU: rounding, saturating right shift.
- SHUFFLE2: picks lanes of {b, a} under control of the third input.
- VCAST: widens to 16-bit lanes or saturates down to 8-bit lanes.

`beaivi_simd.sv` gives the exact rounding and lane rules.

## Exposed-datapath timing rules

Code is statically scheduled. The hardware never interlocks in this mode:
- A result triggered in instruction *n* can be moved from instruction *n + latency* on.
- A register written in instruction *n* can be read from instruction *n + 1* on.
- An IMM value loaded by a long-immediate word is seen by the next word.
- A control transfer triggered in instruction *n* takes effect after two delay
  slots. Instructions *n + 1* and *n + 2* always execute. A bundle that has
  started always runs to its end. So if *n + 1* or *n + 2* is the first
  instruction of a bundle, the rest of that bundle also executes before the
  target. A branch placed first in a bundle has exactly that bundle's two
  remaining instructions as its delay slots.
- CALL's return address points past the delay slots (pc + 24).

`tb/tb_beaivi_core.sv` has a scheduled dot-product loop to copy from. It
processes four int8 pairs per iteration with SATACCDOT in nine instructions,
and uses its delay slots for useful work. The same test then runs the loop a
second time from compressed code. The nine instructions fit in three bundles:
the branch is first in the third bundle, and the bundle's other two
instructions are its delay slots. Each iteration then fetches three words
instead of nine, with the same cycle count.

## The RISC-V front end

Supported: RV32I and the RV32M multiplies. FENCE and SYSTEM run as no-ops.
Division is not supported and also runs as a no-op. Two custom instructions
use the custom-0 opcode (0001011):

| funct3 | Instruction |
|---|---|
| 000 | R-type SIMD: `rd = op(rs1, rs2)` with funct7 = SIMD operation code. Only two-input operations are accepted: ADD/SUB, ADDRHI/SUBRHI, MULRHI, SATSUBU, SHRRU and VCAST. |
| 001 | `SWTTA imm`: jump to pc + I-immediate and continue in exposed-datapath mode |

**Lowering.** Each instruction becomes at most three moves:
- Slot 4 carries rs1 (or another operand) to o1.
- Slot 3 carries the immediate from IMM to o2 when the unit needs it there.
- Slot 1 carries rs2 or the immediate to the trigger.

The immediate travels with the instruction into the IMM register. PC-relative
values (branch and JAL targets, AUIPC, SWTTA) are computed in decode.

**Result move and bypass.** The move `FU.result -> rd` cannot run in the
triggering cycle. It is held in the *rd_move* register and issued in slot 0
of the next instruction. If that next instruction reads rd, its operand move
is redirected to the function-unit result, which already holds the value. So
dependent ALU instructions issue back to back.

**Stalls.** The latency table loads a stall counter. A MUL (latency 3) is
followed by two empty cycles and a load (latency 2) by one. During those
cycles decode holds the next instruction and fetch holds the pc.

**Flushes.** A taken branch or jump is resolved in execute. The instruction
in decode is then replaced by an empty one. That empty instruction still
carries a pending rd_move, such as a JAL link write. The word being fetched is
marked invalid. A taken branch therefore costs two cycles.

**Mode switches.** SWTTA (RISC-V) and the CU operation SWRV (exposed datapath)
are jumps that also load the mode register in fetch. Every word in decode
carries the mode it was fetched in. The switch therefore has the timing of any
other jump in the mode it leaves: flushed in RISC-V mode, two delay slots in
exposed-datapath mode. Reset starts in RISC-V mode at address 0.

## Dictionary compression

Each move slot has its own dictionary:

| Slot | Entries | Index bits | Index position in a compressed instruction |
|---|---|---|---|
| 0 | 16 | 4 | [3:0] |
| 1 | 32 | 5 | [8:4] |
| 2 | 8 | 3 | [11:9] |
| 3 | 8 | 3 | [14:12] |
| 4 | 32 | 5 | [19:15] |

To program the dictionaries, code sends a header word with the number *n* of
fill words. The next *n* words of type `01` are fills. Fill *k* writes each of
its five slot fields into entry *k* of that slot's dictionary. Entries past a
smaller dictionary's depth are dropped. Headers and fills execute as no-ops.

A bundle word is expanded over three cycles: instruction 0, then 1, then 2.
The decompressor raises `hold` for the first two cycles, so fetch keeps its pc
and re-reads the bundle. The output is always an ordinary uncompressed word,
so nothing after the decompressor knows about compression. Dictionaries are
flip-flop arrays read combinationally, so compression adds no pipeline stage.
Compression applies only to exposed-datapath code. In RISC-V mode the
decompressor is bypassed.

## Subsystem, memories and host port

`beaivi_top` connects the core to:
- a 64 kB IMEM (8192 x 64 bit)
- a 64 kB DMEM (16384 x 32 bit, byte enables)

Both memories are synchronous with one-cycle reads. Each has a second port
for the host.

The host port is a simple synchronous bus. `host_sel` picks the memory, and
the address is a byte address. Read data comes back one cycle after the
request. The core is held in reset while `run` is low. Raise `run` to start
it. The core leaves reset one clock later.

With `bank_sel` high, the core uses two flip-flop register banks instead of
the scratchpads: 128 bytes of instructions (16 words) and 512 bytes of data.
Fetch, the LSU and the host port then all go to the banks, and addresses wrap
inside them. This runs small kernels with the scratchpads idle, which helps
with test and bring-up. The DMEM is not enabled in this mode. The IMEM fetch
port keeps reading, but its data is ignored.

Event strobes come out of the top for observation: bypass, stall, flush, mode
switch, dictionary header/fill, compressed instruction and squashed guarded
move.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own,
or through a watchdog. Each testbench needs only the two packages, its own
file and the library directories. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/beaivi_pkg.sv tb/beaivi_tb_pkg.sv tb/tb_beaivi_top.sv --top-module tb_beaivi_top
./obj_dir/Vtb_beaivi_top
```

| Testbench | What it checks |
|---|---|
| `tb_beaivi_top` | Full-size subsystem, default parameters. See the list below the table. |
| `tb_beaivi_core` | A 32-element int8 dot product computed three ways: scalar RISC-V, an exposed-datapath SIMD loop, and the same loop compressed into dictionaries. All results must agree. |
| `tb_beaivi_kernels` | Full-size subsystem running image-kernel arithmetic on random data: a DCT butterfly (ADDRHI, SUBRHI, MULRHI) and absolute byte differences (SATSUBU, SHRRU) in RISC-V mode, then a SATACCDOT error sum, REFLECT and SHUFFLE2 in exposed-datapath mode. Results are compared with reference arithmetic. |
| `tb_beaivi_microcode` | Generated moves, bypass, stall lengths, flush keeping the link write, exposed-datapath unpack, long immediate |
| `tb_beaivi_decompressor` | Random dictionary contents, headers of various lengths, bundle expansion and `hold` timing |
| `tb_beaivi_ic` | Random instructions against a reference model of guards, sources, sockets and RF ports |
| `tb_beaivi_alu`, `_simd`, `_mul`, `_lsu`, `_cu` | Random operands against reference functions, including result latency |
| `tb_beaivi_rf`, `_brf`, `_ifetch`, `_imem`, `_dmem`, `_regbank` | Reference models, random traffic |

`tb_beaivi_top` loads a program through the host port. The program exercises:
- RISC-V arithmetic, bypass, multiply and load stalls, a counted loop with flushes, a custom SIMD instruction, JAL, and SWTTA;
- exposed-datapath code with a header, two fills, a compressed bundle, guarded moves, long immediates, SATACCDOT, and SWRV with its two delay slots;
- a kernel in the register banks.

It counts every mechanism and fails if one never happened.

## Where this design departs from the published chip

The published Beaivi chip is described at the level of blocks and
principles. Everything below the block level here is this design's own:
- the move encoding and every source, destination and operation code
- the slot widths, and the narrow slots 2 and 3
- the latencies and the number of delay slots
- the long-immediate word type
- the custom RISC-V encodings and the SWTTA/SWRV mode-switch instructions
- the header and fill field layout
- the exact SIMD rounding, shuffle and cast rules

The dictionary depths (16/32/8/8/32), the word types and the three
instructions per bundle follow the original. So do the 2R/1W register file,
the 64 kB scratchpads and the 128 B / 512 B test banks.

Not built:
- the JTAG / AXI-slave program-load path (replaced by the host port)
- the AXI master that lets the LSU reach off-core memory. The core can only
  address its own DMEM, and exposed-datapath code has no way to wait for a
  variable-latency bus.
- the debug module
- the clock-domain crossing (everything here runs on one clock)
- the PLL
- the compiler and the dictionary entry-selection algorithm, which are software

The original is called dual-issue. Here, one 64-bit word can trigger up to
five units, and the scheduler (the programmer, in the testbenches) decides how
many. The RISC-V mode issues one instruction per cycle at most.

The RTL has not been timed or synthesized to a target clock. The original's
1 GHz in 22 nm says nothing about this code.
