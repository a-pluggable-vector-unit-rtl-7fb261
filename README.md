# A pluggable vector unit for a 64-bit in-order RISC-V core

This is a vector unit for the RISC-V "V" extension (draft v0.9). It attaches to a 64-bit in-order
scalar core (Ariane/CVA6 style) the way any other functional unit does. The core issues an
instruction with its scalar operands and a transaction id. Some time later it gets a write-back with
a result, an exception, or updates for the vector CSRs. The core keeps its own pipeline. It needs only
a few additions, and they are built here too:

- a pre-decoder that recognises vector instructions;
- the seven vector CSRs;
- a stall while a `vsetvl`/`vsetvli` is in flight;
- an update of the vector CSRs when a vector instruction retires.

Inside the unit, each vector instruction becomes a sequence of packed-SIMD micro-ops, one vector
register wide. SIMD functional units execute them against a banked vector register file (VRF).
Several micro-ops can be in flight at once and can chain one after another. This is safe because of
a **two-phase shared locking protocol** on the vector registers. Every micro-op holds a lock on every
register it touches before it touches it. That protocol is the heart of the design and gets the
most room below.

The scalar core itself is not included. Its signals are the ports of the top module,
`ariane_vector_ext`.

## The pieces and how an instruction flows

```
 core decode ──► vector_predecoder ──► (core's scoreboard / issue)
                                              │ instr, rs1/rs2 values, trans_id
                                              ▼
 ┌─────────────────────────── vector_unit ───────────────────────────────────┐
 │ sequencer                   execution_stage                 vector_        │
 │  vector_decoder ─┬► vector_exception ───────────────────────► write_back ──┼─► core write-back
 │                  ├► vector_config (strip-mining, stall) ────►  (static     │
 │                  └► vector_dispatcher ─► simd_fu[0] (ALU) ──►   priority)  │
 │                       (micro-ops,      ─► simd_fu[1] (MUL) ──►             │
 │                        hazard counters)       │    ▲                       │
 │                                               ▼    │                       │
 │                                          vrf (4 banks, lock allocator)     │
 └────────────────────────────────────────────────────────────────────────────┘
 core commit ──► vector_csrs (vl, vtype, vstart updates; CSR instruction muxes)
```

The unit has three logical stages: the sequencer, the execution stage and the vector write back.
Each stage uses valid/ready handshakes, so a stage can take more than one cycle without its
neighbours knowing.

## Core-side additions

**`vector_predecoder`** sits beside the core's decoder. It claims these instructions as vector
instructions:

- the OP-V opcode;
- the vector widths of LOAD-FP and STORE-FP.

For a vector instruction it tells the core which scalar register file each operand uses. Integer
registers are used for `.vx` forms, `vset{i}vl` and vector memory addresses. Floating-point registers
are used for `.vf` forms. `vmv.x.s` writes `x[rd]` and `vfmv.f.s` writes `f[rd]`. With this the
core's scoreboard tracks dependencies between scalar and vector instructions. Vector registers are
not renamed. For any other instruction the scalar decoder's entry passes through unchanged.

**`vector_csrs`** holds the seven vector CSRs at their V-draft addresses. The table below lists them.

| CSR | address | access |
|-----|---------|--------|
| vstart | 0x008 | read/write |
| vxsat | 0x009 | read/write |
| vxrm | 0x00A | read/write |
| vcsr | 0x00F | read/write |
| vl | 0xC20 | read-only |
| vtype | 0xC21 | read-only |
| vlenb | 0xC22 | read-only |

Two muxes connect it to the core's own CSR file:

- The input mux turns a CSR instruction that addresses a vector CSR into a no-op for the scalar
  CSR file.
- The output mux picks the read data.

A write to a read-only vector CSR is flagged illegal.

`vl`, `vtype` and `vstart` change only through `commit_vcsr_*`. These are the controls carried by
the write-back of the retiring vector instruction:

- a `vset{i}vl` writes `vl` and `vtype`;
- every vector instruction clears `vstart`.

An assertion checks the rule that a CSR instruction never commits in the same cycle as a vector
instruction. After reset, `vtype.vill` is set and `vl` is 0.

The unit reads `vtype` and `vl` straight from these registers. The core must not commit the same
vector instruction twice. It must also create a read-after-write dependency between a CSR update and
the vector instructions that follow it. The stall described next does this for `vset{i}vl`.

## Sequencer

The sequencer accepts one instruction at a time. It does so only when all three of its back-ends
are ready: exception, configuration and dispatcher. So instructions leave it in program order.

- **`vector_decoder`** fully decodes the instruction. It works out the operation, the operand form
  (`.vv`, `.vx`, `.vi`), the register fields, the target unit, the scalar operand (the `rs1` value
  or the sign-extended 5-bit immediate) and the new `vtype` of a `vset{i}vl`.
  - Masked forms (`vm=0`) are illegal. So are unknown encodings.
  - While `vtype.vill` is set, everything except `vset{i}vl` is illegal.
- **`vector_exception`** turns an illegal instruction into one write-back request. The request
  carries cause 2 (illegal instruction), and the instruction bits as `tval`.
- **`vector_config`** performs the strip-mining.
  - It computes `vl = min(AVL, VLMAX)`, where `VLMAX = LMUL·VLEN/SEW`.
  - `rs1 = x0` with `rd ≠ x0` gives `VLMAX`.
  - `rs1 = rd = x0` keeps the current `vl`, clipped to `VLMAX`.
  - An unsupported `vtype` gives `vill` and `vl = 0`.
  - It sends `vl` as the scalar result, together with write enables for `vl` and `vtype`.
  - **The whole unit then stalls until the core commits that instruction**, matched by trans_id.
    Only then does the next instruction see the new `vl`/`vtype`.
  - The parameter `CFG_STALL_UNTIL_COMMIT` (default 1) selects this. Set to 0, the stall ends as
    soon as the write back is granted. That is only safe with a core that itself holds later vector
    instructions until the vector CSRs are updated.
- **`vector_dispatcher`** splits an instruction into micro-ops, one register of the group each.
  Details follow.

### Micro-op splitting and tail handling

One vector register holds `EPR = VLEN/SEW` elements. An instruction with vector length `vl` becomes
`max(1, ceil(vl/EPR))` micro-ops. Micro-op *i* works on `vd+i`, `vs1+i` and `vs2+i`. Registers of the
LMUL group that hold only tail elements get no micro-op at all. Each micro-op carries a byte-enable
mask covering its active elements. In the last register, tail bytes are therefore left undisturbed.
`vmv.x.s` is always a single micro-op on `vs2`. The last micro-op of an instruction is flagged. Only
that one reports to the core.

### Hazards between functional units

Each unit executes its micro-ops in order, but the two units run independently. A later
instruction on the ALU can therefore overtake an earlier one on the multiplier. The dispatcher keeps
two 4-bit counters for every unit and every register: micro-ops in flight that read it, and micro-ops
in flight that write it.

- A micro-op is held back (`hazard_o`) while it has a RAW, WAR or WAW conflict with micro-ops still
  in flight in **another** unit.
- The counters drop when a unit retires a micro-op.

Because of this, register locks are only ever contended between micro-ops of the same unit, and
those arrive in program order. See the next section.

## Execution stage and the SIMD units

`execution_stage` holds `NR_FUS` SIMD functional units and the VRF. Unit *f* uses VRF port *f*. Each
`simd_fu` is a small pipeline:

1. **`uop_queue`** (4 entries) buffers micro-ops from the dispatcher.
2. **`simd_read_operands`** (RO) reads up to two source registers from the VRF.
3. **The EX** computes. `simd_alu` is combinational. `simd_mul` has one register stage.
4. **`simd_write_back`** (WB) writes the result into the VRF. For the last micro-op of an
   instruction, it then asks the vector write back to report to the core.

The EX sees only a plain interface: valid/ready in and out, SIMD operands, scalar operand, SEW,
operation, SIMD and scalar results, and exception. `simd_fu` is the wrapper around it. It keeps each
micro-op's metadata in a 2-entry FIFO beside the EX, and handles operand fetch, locking and write
back. A new EX, combinational or pipelined, can therefore be dropped in without knowing anything
about the rest. Adding a unit means three things:

- add a case to `simd_fu`;
- raise `NR_FUS`;
- teach the decoder its instructions.

Supported operations:

- **ALU:** `vadd`, `vsub`, `vrsub`, `vand`, `vor`, `vxor`, `vsll`, `vsrl`, `vsra`, `vminu`,
  `vmin`, `vmaxu`, `vmax`, `vmv.v.{v,x,i}` and `vmv.x.s`. Each comes in the `.vv`/`.vx`/`.vi` forms
  the V specification defines for it.
- **Multiplier:** `vmul`, `vmulh` and `vmulhu` (`.vv` and `.vx`).
- **SEW** can be 8, 16, 32 or 64. **LMUL** can be 1, 2, 4 or 8.

## The register file and the locking protocol

### Banks

`vrf` stores the 32 registers in **4 single-port (1RW) SRAM banks** (`vrf_bank`). Register *r* lives
in bank `r mod 4`, row `r / 4`. Each bank does one read or one write per cycle. Reads return data one
cycle after the grant. Writes have byte enables.

Units reach the banks over two buses:

- **WB bus:** one write channel per unit.
- **RO bus:** two read channels per unit.

Per bank, writes win over reads, and a lower unit or channel wins over a higher one. A write is acked
in the cycle it happens. A read that loses simply tries again. Consecutive registers of a group sit
in different banks, so the reads and writes of neighbouring micro-ops mostly proceed in parallel.

### Locks

`vrf_allocator` keeps, for every unit (port), a read-lock mask and a write-lock mask over the 32
registers. These are the lock rules:

- Several units may hold read locks on one register.
- A write lock excludes every other lock.
- A request asks for a set of read locks and write locks together, and is granted all or nothing.
- A read request is refused if any write lock is held on one of its registers.
- A write request is refused if any write lock, or another unit's read lock, is held on one of its
  registers.
- Within one cycle, ports are served in order. A port sees what lower ports were just granted.

Assertions in `vrf` check that every bank access is covered by a lock its unit holds.

### The protocol, step by step

Every micro-op must hold the proper lock on all its registers before it performs any operation. This
is how a micro-op moves through a unit:

1. **First micro-op.** When RO is idle, the queue requests the locks for its head micro-op.
   - Read locks cover `vs1`/`vs2`. The write lock covers `vd`.
   - When they are granted, the micro-op may move into RO.
2. **Operand read, and locking the next micro-op.** While RO reads its operands, it requests the
   locks for the *next* micro-op in the queue, reads and writes. This is how micro-ops chain: the
   next one is ready to go the moment this one leaves.
3. **Releasing read locks.** Read locks are released only when both of these hold:
   - the reads have completed;
   - the next micro-op's locks have been granted, or there is no next micro-op.

   The release is a mask. A register that the next micro-op also reads stays locked.
4. **Releasing the write lock.** The write lock on `vd` is released by the VRF's write ack, after
   WB has written the result. The micro-op then retires. This also drops the dispatcher's hazard
   counters.

Within one unit, these rules keep reads and writes of consecutive micro-ops and instructions in
order (RAW, WAR and WAW). Across units, the dispatcher's counters keep conflicting micro-ops from
being in flight together. So no unit ever waits on a lock held by a micro-op queued behind its own
head, and the protocol cannot deadlock.

## Vector write back

`vector_write_back` collects write-back requests from four sources: configuration, exception, and
one from each SIMD unit. Each request carries a trans_id, a scalar result, an exception, and the
vector-CSR controls (`vl_we`, `vl`, `vtype_we`, `vtype`, `vstart_clr`). A static priority scheme
passes them to the core's write-back port or ports (`NR_WB_PORTS`, default 1). The order of priority
is configuration, exception, unit 0, unit 1. A request is held, unchanged, until it is granted.
Write backs can reach the core out of program order. The core retires in order.

## Parameters

| name | default | where it comes from |
|------|---------|---------------------|
| XLEN | 64 | the host core |
| NR_VREGS | 32 | V extension |
| NR_BANKS | 4 | the banked VRF described above |
| VLEN | 128 | this design's choice |
| ELEN | 64 | this design's choice |
| NR_FUS | 2 (ALU, multiplier) | this design's choice |
| TRANS_ID_BITS | 3 | this design's choice (must match the core) |
| uop queue depth | 4 | this design's choice |
| NR_WB_PORTS | 1 | this design's choice |
| CFG_STALL_UNTIL_COMMIT | 1 | stall until commit (1) or write back (0); default is this design's choice |

`VLEN`, `ELEN`, `NR_FUS` and the id width are package constants in `vu_pkg`. The rest are module
parameters.

## Where this design departs from, or adds to, the original description

- **Dispatch length.** The original says an instruction becomes LMUL micro-ops. Here it becomes
  `ceil(vl/EPR)` micro-ops, and registers holding only tail elements are skipped. The result is the
  same under a tail-undisturbed policy.
- **Cross-unit hazard counters** in the dispatcher are this design's own. The original does not say
  how units running independently are kept in order.
- **The configuration stall** lasts until the `vset{i}vl` commits by default. The original allows
  "until retire or just write back". Both are built, and `CFG_STALL_UNTIL_COMMIT` chooses between
  them.
- **Masking is not implemented.** Masked instructions trap as illegal.
- **The EX does not receive all vector CSR values.** The original lists them as optional extra EX
  inputs. Here the EX gets SEW, the operation and the scalar operand only.
  `vxrm`/`vxsat` are stored, but no built instruction uses them.
- **Not built:**
  - the vector load/store unit (its memory architecture is left open in the original);
  - floating-point, fixed-point, widening/narrowing, reduction and permutation instructions;
  - any use of a non-zero `vstart` (it is only cleared).
- **Reset.** All control state resets asynchronously on the active-low `rst_ni`. VRF contents are not
  reset.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each compares against a model
written independently of the RTL and ends with a `TB_RESULT checks=N failures=M` line. Highlights:

- **`tb_ariane_vector_ext`** runs the whole top at its default parameters.
  - It issues 400 random instructions: random SEW/LMUL/vl, `vset{i}vl`, dependent chains across both
    units, `vmv.x.s` read-backs and illegal encodings.
  - It plays the core: issue, write back, in-order commit, CSR updates.
  - It also exercises the CSR muxes and the pre-decoder.
  - It keeps a full architectural model of the vector registers and compares every scalar result,
    and finally every register.
  - It counts each mechanism: configuration stall, exception, cross-unit hazard hold, chained lock
    acquisition, lock wait, bank conflict, write-back conflict, multi-micro-op instruction, tail
    bytes, queue full, multiplier use and shared read lock. A mechanism that never happens counts as
    a failure.
- **`tb_vrf_allocator`, `tb_vrf`, `tb_simd_read_operands`** check the lock rules, bank arbitration
  and read-lock release against models.
- **`tb_vector_dispatcher`** checks the micro-op split and byte enables. It also checks the hazard
  rule cycle by cycle.

Simulate any testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vu_pkg.sv tb/vtb_pkg.sv tb/tb_ariane_vector_ext.sv \
    --top-module tb_ariane_vector_ext --Mdir obj && ./obj/Vtb_ariane_vector_ext
```

Replace the testbench name to run another one. `vtb_pkg.sv` holds the instruction encoders and the
element-level reference shared by the testbenches.

## Lint notes

Verilator `-Wall` reports only these:

- unused bits of wide structs (each sub-block reads only the fields it needs);
- one deliberately unconnected observation port (`count_o` of the queue);
- `rst_ni` used both in `disable iff` of assertions and as the asynchronous reset;
- package constants a module does not use, when that module is linted on its own (the CSR
  addresses, for example, are used only by `vector_csrs`).

Each module's opening comment explains the warnings that concern it.

## Files

- **`rtl/vu_pkg.sv`** holds the types, constants and helpers shared by all modules.
- **Top:** `rtl/ariane_vector_ext.sv`.
- **Core side:** `vector_predecoder`, `vector_csrs`.
- **Unit:** `vector_unit`.
  - Sequencer: `sequencer`, `vector_decoder`, `vector_exception`, `vector_config`,
    `vector_dispatcher`.
  - Execution stage: `execution_stage`, `simd_fu`, `uop_queue`, `simd_read_operands`, `simd_alu`,
    `simd_mul`, `simd_write_back`, `vrf`, `vrf_bank`, `vrf_allocator`.
  - Write back: `vector_write_back`.
