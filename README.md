# A pluggable RISC-V vector unit

This is a vector unit for the RISC-V vector extension (RVV 1.0, Zve64x subset). It is built
to attach to an existing in-order scalar core as one more functional unit. The core changes
very little:
- it decodes just enough of a vector instruction to read its scalar operands;
- it passes the instruction to the unit together with the vector CSRs (`vl`, `vtype`,
  `vstart`) as they were at issue;
- it later receives a completion on an ordinary write-back port.

Inside, the unit keeps its own register file and its own hazard tracking. It runs three
functional units out of order with respect to each other. It executes speculatively, and a
trapping vector instruction still leaves a precise state.

The default size is VLEN = 256 bits with ELEN = 64 and 32 registers. A memory port moves
VLEN/2 bits per beat.

```
 core issue ──► instruction queue ──► sequencer ──┬─► VINT  ─┐
   (CSRs sampled at issue)               │        ├─► VMOV  ─┼──► VRF (banked, 2 copies/reg)
                                         │        └─► VLSU  ─┘        ▲
                                         │              │  └── MMU, memory (VLEN/2 per beat)
                                         └──────────────┴─► lock server (register locks)
                                   sequencer + units ──► vector write back ──► core WB ports
```

## Micro-operations

A vector instruction with a register-group multiplier (EMUL) of 1, 2, 4 or 8 is cut into
EMUL **micro-operations**. Fractional LMUL is accepted and runs as one micro-operation.
Each micro-operation handles exactly one vector register: it reads one register of each
source group and writes one register of the destination group. Each functional unit
handles one micro-operation at a time over the full VLEN-bit width.

## Register locks and chaining (the hardest part)

Dependencies between instructions are tracked per register, not per instruction. A lock
server (`vu_lock_server`) keeps two things for each of the 32 registers:
- an exclusive write lock;
- a small count of shared readers.

A lock request names a set of read locks and a set of write locks. It is granted whole or
not at all, within the same cycle.

The order of lock operations is the key idea:

1. The sequencer dispatches an instruction only when the locks of its first
   micro-operation are granted. Dispatch happens in program order, so an older instruction
   always holds its locks before a younger one asks for them.
2. While a unit works on micro-operation *u*, it requests the locks of *u+1*.
3. The unit releases the locks of *u* only after *u* is written and the locks of *u+1* are
   held. This is hand-over-hand locking.

Step 3 also applies to the write lock of *u*. A looser protocol could free it as soon as
*u* is written. Holding it a little longer is simpler and costs at most a few cycles of
chaining.

As a result, a younger instruction on a faster unit can follow an older one register by
register (chaining) but can never pass it. Take an add that reads the result of a load.
The add gets `v8` as soon as the load has written `v8` and moved on to `v9`. It then waits
on `v9`'s write lock. `ev_lock_wait_o` reports these waits.

Some cases hold their locks for the whole instruction:
- **Whole-group operands.** Gathers and slides lock a whole source group at once, because
  any destination element may come from any source register.
- **Reductions.** The destination group stays locked, because only its first element is
  written and only at the end.

Elements below `vstart` are neither computed nor written, but their registers are still
locked and released in order.

**Configuration hazard.** A lock is per register, but a running instruction moves through
its group one register at a time. The sequencer therefore stalls a new instruction when
all three of these hold:
- its EMUL is smaller than that of a running instruction;
- it overlaps a register group of that instruction;
- the overlap does not start at the group's first register.

The stall lasts until the older instruction completes (`ev_cfg_hazard_o`). Two more stalls
are this design's own additions:
- An instruction that locks a whole source group waits while a running instruction still
  writes into that group.
- A destination whose second copy is still speculative must wait (see next section).

## Speculation, retirement and precise traps

Each architectural register has two physical copies in the VRF (`vu_vrf`). A table keeps
two bits per register:
- which copy is architectural;
- whether the other copy holds an unretired, speculative result.

At dispatch, the sequencer fixes which copy each micro-operation reads and which it
writes. Every result goes to the speculative copy of its register.

When the core retires a vector instruction (`commit_i`, in issue order), the sequencer
pops its in-order list and promotes the instruction's destination copies.

`flush_i` makes every speculative copy invalid in one cycle. It also drops every lock,
queued instruction and micro-operation in flight.

An instruction that traps part way, such as a load that hits a page fault, reports the
`vstart` of its first element that was not done:
- all earlier elements are written;
- no later element is touched.

The core retires it, which makes the completed elements architectural, and then flushes
and takes the trap. After the handler runs, the same instruction is re-issued with that
`vstart` and finishes the job.

A configuration instruction (`vsetvli`, `vsetivli`, `vsetvl`) executes in the sequencer
right after decoding. Its new `vl` and `vtype` go out through the write back at once. The
instruction queue then accepts nothing more until the core retires it. This guarantees
that later instructions sample the new CSRs.

## Functional units

All three units share `vu_fu_wrapper`, which holds three parts:
- **Micro-operation queue.** It holds QD descriptors and steps through their
  micro-operations.
- **Read operands.** It reads operands from the VRF, one register per cycle on the unit's
  bank port, from the copies chosen at dispatch.
- **Write back.** It writes the result register and sends completion to the vector write
  back.

The wrapper runs the locking protocol. Its execute module only sees a request with
operands and returns a result register, a write enable, an optional exception and an
optional scalar result. A new unit therefore needs only a new execute module.

- **VINT** (`vu_vint_exec`, lanes in `vu_vint_lane`).
  - It supports add, sub, rsub, min/max (signed and unsigned), and/or/xor, shifts,
    `vmv.v.*`, and saturating add/sub (signed and unsigned).
  - All operands may be `.vv`, `.vx` or `.vi` where RVV defines them.
  - It has one bank of lanes per SEW. An element-wise micro-operation has a latency of
    one cycle.
  - Reductions (sum, and, or, xor, min/max signed and unsigned) fold one element per
    cycle into an accumulator that carries across micro-operations.
- **VMOV** (`vu_vmov_exec`).
  - It supports `vrgather.vv/.vx/.vi`, `vslideup/down .vx/.vi`, `vslide1up/down.vx`,
    `vmv.x.s` and the eight mask-logical `vm*.mm` operations.
  - It receives the whole source group with micro-operation 0.
- **VLSU** (`vu_vlsu_exec`).
  - It supports unit-stride `vle8/16/32/64.v` and `vse8/16/32/64.v`.
  - Each register moves as two beats of VLEN/2 bits, or three if it is not aligned.
    Beats without active elements are skipped.
  - It asks the single external MMU once per 4 KiB page touched.
  - A base address that is not element-aligned raises address-misaligned before any
    access.
  - There is no store-to-load forwarding.

Tail and inactive elements outside `[vstart, vl)` are always left undisturbed.

## Vector write back

`vu_vwb` is a combinational allocator with static priority. It connects the completion
requests of the sequencer, VINT, VMOV and VLSU (in that priority) to NWB write-back ports
of the core. Each port carries:
- the instruction tag;
- an exception (cause, value, `vstart`);
- the scalar result;
- commands to set `vl`/`vtype` or `vstart`.

## Interface of `vu_top`

| group | signals | protocol |
|---|---|---|
| issue | `iq_valid_i`, `iq_ready_o`, `iq_i` (instruction, rs1/rs2 values, vl, vtype, vstart, vill, tag) | valid/ready |
| retirement | `commit_i`, `commit_id_i`, `flush_i` | pulses, commits in issue order |
| write back | `wb_valid_o[NWB]`, `wb_o[NWB]` | always accepted |
| MMU | `mmu_req_valid_o`, `mmu_vaddr_o`, `mmu_store_o` / `mmu_resp_valid_i`, `mmu_paddr_i`, `mmu_fault_i` | request held until response |
| memory | `mem_req_valid_o/ready_i`, `mem_addr_o`, `mem_we_o`, `mem_wdata_o`, `mem_be_o` / `mem_rvalid_i`, `mem_rdata_i` | reads return in order |
| events | `ev_cfg_hazard_o`, `ev_spec_stall_o`, `ev_lock_stall_o`, `ev_lock_wait_o`, `ev_xlat_o` | one bit per cycle |

Parameters:
- Global sizes (`VLEN`, `ELEN`, `MEMW`) live in `vu_pkg`.
- The top has `IQ_DEPTH=4`, `NWB=2`, `QD=2`, `NBANKS=4` and `PAW=40`.
- Other sizes are chosen by changing `vu_pkg::VLEN`. With VLEN = 512 the end-to-end
  testbench passes unchanged. With VLEN = 128 the unit runs, but the testbench's
  page-fault scene loads 16 64-bit elements with LMUL = 4, which needs VLEN >= 256. That
  scene and the checks that follow it therefore fail at 128.

## What is not there

- **Core integration.** The core, its MMU and the memory are outside the unit. The
  testbench models them.
- **Selective flush.** There is no selective flush for branch speculation. Only a full
  flush exists.
- **Masked instructions.** Masked forms (`vm=0`) are not supported.
- **Missing instructions.** These raise an illegal-instruction exception:
  - widening and narrowing operations;
  - multiply and divide;
  - fixed-point rounding operations, and `vxsat` is never set;
  - strided, indexed, segment and fault-only-first memory accesses;
  - `vrgatherei16`, `vcompress`, `viota`/`vid`, `vcpop`/`vfirst`, `vmsbf/vmsif/vmsof`;
  - floating point.
- **XTS-AES.** A vectorized XTS-AES kernel cannot run as written, because it relies on
  `vrgatherei16`.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --assert rtl/vu_pkg.sv rtl/vu_vint_lane.sv rtl/vu_vint_exec.sv \
          tb/tb_vu_vint_exec.sv --top-module tb_vu_vint_exec -o sim && obj_dir/sim
```

`tb_vu_top` runs the whole unit at its default size. Compile it with all files in `rtl/`
and `--top-module tb_vu_top`.

It plays the scalar core, with a reorder buffer, CSR updates at retirement, trap handling
and re-issue. It also plays a page-table MMU and a byte-addressed memory. An
instruction-level reference model checks:
- every scalar result;
- the final contents of all registers, which the unit itself stores to memory.

The program makes each of these happen at least once, and the testbench counts each one:
- the configuration block of the queue;
- chaining lock waits;
- a configuration hazard;
- a whole-group stall;
- a speculative-destination stall;
- out-of-order completion;
- both write-back ports used in one cycle;
- a precise page fault with resume;
- two flushes;
- an illegal instruction;
- translation reuse.
