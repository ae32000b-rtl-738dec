# AE32000B-style embedded core with LERI folding

This is a synthesizable SystemVerilog model of a small 32-bit embedded processor core of the
EISC kind. EISC packs a 32-bit datapath into fixed 16-bit instructions. An instruction has
room for only a few immediate bits. When a program needs a bigger constant, address offset
or branch distance, the compiler puts one or more **LERI** instructions in front of it. A
LERI has a 2-bit opcode and a 14-bit immediate, and it loads the *extension register* (ER).
The next ordinary instruction joins ER with its own short immediate field to form the full
value.

This keeps code dense, but a naive pipeline spends a whole cycle on each LERI. The core's
central idea is to **fold** LERIs:
- An eight-entry instruction queue sits between fetch and decode.
- A folding unit looks at the first four queue entries.
- In one cycle it absorbs the leading LERIs into ER and sends the instruction behind them
  to decode.

The LERIs then cost no pipeline slot.

Around that sits a conventional five-stage scalar pipeline (IF, ID, EX, MEM, WB). It has:
- 16 general registers;
- forwarding and hazard detection;
- a 32-bit ALU, a barrel shifter and a leading zero/one counter;
- a single-cycle 32x32+64 multiply-accumulate unit writing a 64-bit MH:ML pair;
- a passive coprocessor interface;
- an on-chip debug facility ("OSI", on-silicon ICE) with eight breakpoints/watchpoints.

## Pipeline at a glance

```
        +----------+   +-------------+   +----------+   +---------------+   +----+   +----+
imem <->| prefetch |-->| predecoder  |-->| 8-entry  |-->| LERI folding  |-->| ID |-->| EX |--> MEM --> WB
        | PC       |   | valid/isLERI|   | queue    |   | (4-entry view)|   |    |   |    |
        +----------+   +-------------+   +----------+   +---------------+   +----+   +----+
             ^                                                                |
             +------------ redirect (taken branch, exception, ERET, OSI exit) +
```

| Stage | What happens |
|---|---|
| IF | The prefetch PC requests 32-bit words, i.e. two instructions per word. At most two fetches are outstanding. The predecoder turns each returning word into two queue entries. |
| IF/ID | The folding unit absorbs LERIs and issues at most one instruction per cycle into the ID register. |
| ID | Reads two registers and builds the immediate from ER and the instruction field. Checks hazards. Hands coprocessor operations to the coprocessor. Resolves branches against flags forwarded from EX. Takes exceptions. |
| EX | Forwards operands from MEM and WB into the ALU, shifter, counter or MAC. Updates the N, Z, C and V flags. Computes the load/store address and aligns the store data. |
| MEM | Accesses data memory and runs coprocessor loads/stores. Aligns and extends load data. |
| WB | Writes one register per cycle. |

Branches are resolved in ID and have no delay slot. A taken branch empties the queue and
discards any fetch still in flight, so it costs about two cycles to refill. The source
design places the branch unit in ID; the penalty follows from the fetch timing chosen
here.

## LERI folding in detail

### Queue entries

Every halfword that enters the queue becomes a 21-bit entry:

| bits | field |
|---|---|
| 20 | valid |
| 19 | isLERI (set by the predecoder when bits [15:14] = `11`) |
| 18:16 | int_info = {instruction breakpoint, bus error, fetch interrupt} |
| 15:0 | the instruction |

The predecoder also drops the lower halfword when a branch lands on the upper half of a
word.

### What the folding unit does each cycle

The unit (`ae32_leri_fold`) scans the first four valid entries from the head of the queue:

1. Each leading LERI with clean int_info is absorbed into ER:
   - the first LERI of a group loads its sign-extended 14-bit immediate;
   - each further LERI shifts ER left by 14 and appends its own 14 bits.

   One LERI therefore gives 14 significant bits and two give 28; a third reaches 32.
2. The first entry that is not a clean LERI is issued, provided ID can accept it. It goes
   into the ID register together with the new ER value and an "ER valid" bit. ER is then
   cleared.
3. The unit pops every entry it consumed, up to four per cycle.

Two cases fall outside this pattern:
- **Only LERIs in the window.** They are absorbed anyway and nothing is issued. ER keeps
  them for the instruction that arrives later.
- **ID is stalled.** The LERIs are still absorbed and only the instruction waits.

### Building the immediate

In ID, `ae32_immgen` forms the immediate. With ER valid it is `(ER << len) | field`, where
`field` is the instruction's own `len`-bit immediate. Without ER it is the field,
sign-extended or zero-extended as the decoder says.

### Restart PCs after a fold

Folding makes the instruction PC non-trivial, so `ae32_pc_bta` tracks two addresses.

The PC of the issued instruction is the queue-head PC plus twice its position in the
window. Branch targets are computed from it: the target is that PC plus the immediate.

The *restart* PC is used when the instruction is cancelled by an exception and run again:
- if its LERIs were absorbed in an earlier cycle, it is the address of the first of those
  LERIs;
- otherwise it is the address of the instruction itself.

Restarting from the first LERI rebuilds ER on return. The exception logic saves this
restart PC.

### When folding fails

A LERI counts as folded (the `leri_folded` status output) when it is absorbed in a cycle
that also issues an instruction. It is not folded when the instruction behind it has not
arrived yet. The typical case is a branch target whose LERI sits in the upper half of a
fetch word. The LERI then arrives alone, and the rest of the constant comes one fetch
later.

`tb/tb_ae32_perf.sv` measures this on a loop where one instruction in nine is a LERI. That
is close to the 11 % LERI frequency reported for compiled benchmark code on this
architecture.

| Loop start | LERIs folded | Cycles per 9-instruction iteration | IPC (LERIs counted) |
|---|---|---|---|
| word-aligned | 199 of 199 | 11.98 | 0.751 |
| halfword after a word boundary | 0 of 199 | 12.98 | 0.693 |

Those IPCs include a load-use stall and a taken branch in every iteration. For reference,
the original design reports about 92 % of LERIs folded and an IPC of about 0.86 on
Dhrystone with zero-wait memory. That benchmark cannot be run here (see below).

## The decoder port

The 16-bit EISC instruction encoding is not published with the design, apart from the LERI
format. This RTL therefore contains everything **except the instruction decoder**:
- The top module presents the instruction in ID on `id_instr`, `id_er`, `id_er_valid` and
  `id_valid`.
- An outside, purely combinational decoder returns the control bundle `id_ctrl`, of type
  `ae32_pkg::id_ctrl_t`, in the same cycle.

`id_ctrl` carries:
- the source and destination registers and their use bits;
- the executing unit and its operation (`alu_op_e`, `shf_op_e`, `mac_op_e`, leading ones
  or zeros);
- the immediate field, its length and signedness, and `use_imm`;
- `set_flags`;
- memory read/write, size and sign extension;
- branch and condition (16 ARM-style conditions on N, Z, C, V), and `eret`;
- the coprocessor operation, number and index.

For testing, `tb/tb_ae32_decoder.sv` decodes a small made-up encoding (listed at the top of
that file). It is a test fixture only. To run real EISC code, replace it with a decoder for
the real encoding; nothing in `rtl/` depends on the test encoding except the LERI opcode in
`ae32_pkg`.

## Execute units

| Unit | File | Operations |
|---|---|---|
| ALU | `ae32_alu.sv` | add, add with carry, subtract, subtract with borrow, and, or, xor, move. For subtraction C means "no borrow". V is set for add and subtract. |
| Barrel shifter | `ae32_shifter.sv` | LSL, LSR, ASR and ROR by 0..31. C is the last bit shifted out. |
| Leading zero/one counter | `ae32_lzoc.sv` | Counts leading zeros or ones, 0..32. |
| MAC | `ae32_mac.sv` | MUL/MULU (32x32=64) and MAC/MACU (32x32+64), one cycle, into MH:ML. MH and ML are read back with the MFMH and MFML unit selections. Back-to-back MACs accumulate without a stall. |
| Flag generator | `ae32_flaggen.sv` | The ALU sets NZCV, the shifter NZC and the counter Z. GETC loads Z from the coprocessor status bit. |

Loads and stores are little-endian and naturally aligned:
- `ae32_store_align` replicates the store data into the byte lanes and forms the byte
  enables.
- `ae32_load_ext` picks the byte or halfword out of the read word and sign- or
  zero-extends it.

## Hazards and forwarding

`ae32_forward` takes each EX operand from the youngest source available: the instruction in
MEM, then the one in WB, then the register-file value read in ID. While MEM holds the
pipeline, the EX operand registers reload the forwarded values every cycle, because the
instructions they were forwarded from move on. The register file also
bypasses a same-cycle write into its read ports.

`ae32_hazard` holds ID (and the queue output) for these cases:

| Case | Condition |
|---|---|
| load-use | A load in EX writes a register that ID reads. |
| coprocessor source | The source register of an MTC is still being produced in EX or MEM. The register value goes to the coprocessor from ID, so it cannot be forwarded later. |
| cpout conflict | A coprocessor operation is in ID while an STC is in MEM, because both use `cpout`. |
| `id_cpbusy` | The coprocessor is not ready to accept the operation in ID. |
| MEM held | The data memory is not ready, or `mem_cpbusy` is high. |

## Coprocessor interface

The interface is passive. The core hands operations over and moves data, and the
coprocessor runs on its own. Signal names and widths are those of the original design;
the encodings and cycle timing are this implementation's.

| Signal | Dir | Meaning here |
|---|---|---|
| `cpctrl[3:0]` | out | Operation in ID: 0 none, 1 CMD, 2 MTC, 3 MFC, 4 LDC, 5 STC, 6 GETC, 7 EXEC. 15 means ABORT and is driven for one cycle when an exception is taken while `cpactive` is high. |
| `cpidx[3:0]`, `cpno[1:0]` | out | Coprocessor register index and coprocessor number. |
| `cpin[31:0]` | out | MTC: the forwarded source register. CMD: the instruction's immediate, which LERIs can widen to a full 32-bit coprocessor command. |
| `id_cpbusy` | in | Stalls ID; the operation is handed over in the first cycle it is low. |
| `cpout[31:0]` | in | MFC/GETC read data in ID, or STC store data in MEM. |
| `mem_cpacc` | out | An LDC/STC is in MEM. The data bus address and data belong to the coprocessor transfer. |
| `mem_cpbusy` | in | Holds MEM until the coprocessor has completed the transfer. |
| `cpactive` | in | The coprocessor is working. Interrupts are not taken while it is high. |
| `cpint` | in | Error status. EXEC raises a coprocessor exception when it is high. GETC copies `cpout[0]` into Z for polling. |

## Exceptions and the OSI debug mode

`ae32_exc` takes these exceptions, highest priority first. The handler address is
`VEC_BASE + 8*cause`, with `VEC_BASE = 0x100`.

| Cause | Source | Saved PC |
|---|---|---|
| 1 data watchpoint | Instruction in MEM | Next instruction |
| 2 instruction breakpoint | int_info of the instruction in ID | Restart PC |
| 3 instruction bus error | int_info of the instruction in ID | Restart PC |
| 4 fetch interrupt | int_info of the instruction in ID | Restart PC |
| 5 coprocessor exception (EXEC with `cpint`) | Instruction in ID | Next instruction |
| 6 external interrupt `irq` | — | Restart PC |

Rules for taking exceptions:
- **Interrupts (cause 6)** are taken only outside a handler, outside OSI mode, and while
  `cpactive` is low.
- **Other causes** are taken regardless of `cpactive`. If it is high, the core aborts the
  coprocessor operation (`cpctrl = 15`).
- **Cancellation.** A cause taken in MEM cancels EX and ID; a cause taken in ID cancels
  ID.
- **Return.** `ERET` returns to the saved PC and leaves the handler state.

`ae32_osi_brk` has eight slots, each an address plus a kind: 0 off, 1 instruction
breakpoint, 2 read watchpoint, 3 write watchpoint, 4 any-access watchpoint.
- Instruction breakpoints compare against each fetched word's two halfword addresses. A
  match sets the breakpoint bit in that entry's int_info.
- Watchpoints compare against the MEM-stage data address.

A break of either kind switches the core into **OSI mode**. In OSI mode:
- the debugger reads any register, MH, ML, the flags, the saved PC or the ID PC through
  `dbg_sel`/`dbg_rdata`;
- it writes general registers 0-15 with `dbg_we`/`dbg_wdata` to register `dbg_sel`. A
  write is accepted in a cycle where write-back leaves the register-file port free, and
  `dbg_wack` reports that cycle. The debugger holds `dbg_we` until it sees `dbg_wack`;
- it can rewrite the breakpoint slots;
- it leaves with a one-cycle `osi_exit` pulse, which resumes at the saved PC.

The physical debug link (parallel or serial port) is not modelled.

## Verifying and simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends with a
`TB_RESULT checks=<n> failures=<n>` line and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_ae32000b_top` | The whole core with default parameters. Runs six constrained-random programs against an instruction-level reference model (below). |
| `tb_ae32_perf` | The folding and IPC loop described above. |
| The others | One unit each, against an independent model, with random and corner-case stimulus. |

`tb_ae32000b_top` feeds each program with these models:
- an instruction memory with random grant and response delays;
- a data memory with random wait states;
- a behavioural coprocessor with random busy and active periods.

Each run includes random interrupts, a bus error, a fetch interrupt, a breakpoint and a
watchpoint with a debugger session in OSI mode (register reads and a write). At the end the registers, MH:ML, flags,
data memory and coprocessor registers must match the model. The test also counts each
pipeline mechanism (folds, queue full, each stall kind, each forwarding path, branches,
back-to-back MACs, each coprocessor operation, aborts, OSI entries, blocked interrupts,
each exception cause). It fails if any count is zero.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    --top-module tb_ae32000b_top -y rtl -y tb +libext+.sv \
    rtl/ae32_pkg.sv tb/tb_ae32000b_top.sv -o sim
./obj_dir/sim
```

Use `--top-module tb_ae32_perf` with `tb/tb_ae32_perf.sv` for the performance loop. Unit
testbenches follow the same pattern.

Register-file and queue storage are not reset, so run with random initial values
(`+verilator+rand+reset+2`) to check that nothing depends on them.

The netlist synthesizes with Yosys (slang front end) to roughly 970 generic cells,
1,258 flip-flop bits and a 512-bit register file, without the decoder.

## Where this model departs from, or adds to, the original

The original design does not give these, so they are this model's own choices:
- **Decoder.** Not included (see above).
- **Bus protocols.**
  - Instructions: request/grant, in-order responses, two outstanding.
  - Data: combinational read data with a ready signal.
- **ER accumulation and immediate joining.** Described above.
- **LERI opcode.** Placed at bits `[15:14] = 11`.
- **Branch conditions.** 16 ARM-style conditions; the target is relative to the branch.
- **Coprocessor.** cpctrl codes, the ABORT code, STC data from `cpout`, and GETC reading
  `cpout[0]`.
- **Exceptions.** Vectors, priorities, a single saved PC, no nesting of interrupts, and
  resumption from the first LERI.
- **Breakpoint slot kinds and debugger access.** The debugger can write general registers
  but not MH, ML, flags or the saved PC.
- **Write-back.** One write-back bus for registers. MH:ML and the flags are written
  directly from EX.
- **Reset.** The reset PC is 0.
- **Breaker location.** The breakpoint comparators sit inside the core next to the fetch
  and memory stages. The original allows the debug unit to live in the system
  coprocessor (CP0).

The original reports gate counts (under 47,000 gates in 0.35 µm, under 53,000 in 0.18 µm)
and clock rates. These are technology results and are not reproduced.

Known limitation: a data watchpoint cancels the two younger instructions in EX and ID. If
the ID one is a coprocessor operation that was already handed over, it is handed over
again after OSI mode. For CMD, MTC, MFC, GETC and EXEC this is harmless. An LDC or STC
directly after a watched load or store would be repeated.

## Files

| File | Contents |
|---|---|
| `rtl/ae32_pkg.sv` | Shared types: queue entry, flags, unit and operation enums, `id_ctrl_t`, condition check. |
| `rtl/ae32000b_top.sv` | The pipeline. |
| `rtl/ae32_prefetch_pc.sv`, `ae32_predecoder.sv`, `ae32_iqueue.sv` | Fetch, predecode, queue. |
| `rtl/ae32_leri_fold.sv`, `ae32_immgen.sv`, `ae32_pc_bta.sv` | Folding, immediate, PC and branch. |
| `rtl/ae32_regfile.sv`, `ae32_hazard.sv`, `ae32_forward.sv` | Registers and hazards. |
| `rtl/ae32_alu.sv`, `ae32_shifter.sv`, `ae32_lzoc.sv`, `ae32_mac.sv`, `ae32_flaggen.sv` | Execute units. |
| `rtl/ae32_store_align.sv`, `ae32_load_ext.sv`, `ae32_wb_ctrl.sv` | Memory side and write-back. |
| `rtl/ae32_cp_if.sv`, `ae32_osi_brk.sv`, `ae32_exc.sv` | Coprocessor, breakpoints, exceptions. |
| `tb/` | Testbenches, the test decoder and the performance loop. |
