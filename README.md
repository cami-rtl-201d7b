# CAMI: context-aware memory isolation for a GPU memory path

A GPU programming model promises that each thread's local memory (its stack,
spilled registers, return addresses) is private. The hardware does not
guarantee it: local memory is usually reached through a special,
context-based address path (LDL/STL), but the same physical pages are also
mapped at ordinary virtual addresses that any thread can reach with generic
loads and stores (LDG/STG). A thread that works out its neighbour's alias
can read its secrets or overwrite its return address.

CAMI closes this gap in the address translation path, where every access
has to pass whatever address it used:

* each page table entry carries an **owner thread ID** and a **protection
  flag**;
* the load/store unit tags every memory request with the **ID of the thread
  that issued it** (the *Context Tracking Unit*, CTU);
* after translation, and before the request goes to memory, a comparator
  (the *Security Check Unit*, SCU) permits the access only if the page is
  unprotected or the requester is its owner. Otherwise the access is
  refused, the violation is recorded for system software, and the offending
  warp is halted.

This repository holds synthesizable SystemVerilog for the memory access path
of one streaming multiprocessor (SM) with CAMI: CTU, MMU (TLB, page table
walker, SCU) and violation registers, plus self-checking testbenches that
play integrity, confidentiality and control-flow-hijack attacks against it.

## Data flow

```
 warp memory instruction
        |
        v
 +-------------+  one request per lane,   +---------------------------------+
 | cami_ctu    |  tagged with its TID     | cami_mmu                        |
 | (in the LSU)| -----------------------> |  stage 1: cami_tlb lookup       |
 +-------------+                          |           miss -> cami_ptw walk |
        ^                                 |  stage 2: cami_scu owner check  |
        | halted[63:0]                    |           + valid / writable    |
 +-----------------+   fault record       +---------------------------------+
 | cami_fault_regs | <--------------------------|            |
 | (sw registers)  |                             | granted    | page-table reads
 +-----------------+                             v            v
                                             L2 / DRAM  (outside this design)
```

`cami_top` wires these together. The execution units, L2/DRAM and the driver
that writes page tables are not part of the RTL; their connections are
top-level ports.

## Thread identity

A thread is named by its global hardware ID, `tid_t = {sm[6:0], warp[5:0],
lane[4:0]}`, 18 bits. The widths come from 80 SMs, 64 resident warps per SM
and 32 lanes per warp. The 80 SMs are the evaluated GPU configuration; the
warp and lane counts are the usual Volta limits and are a choice here. The
SCU comparator is as wide as this ID.

The CTU (`cami_ctu`) takes a whole warp instruction (warp slot, opcode,
32-bit active mask, a 48-bit address or local offset and a 32-bit store word
per lane). It issues the active lanes one per cycle, lowest lane first, each
as its own request carrying the TID. Keeping lanes separate is what lets
the MMU tell two threads of the same warp apart, and that is exactly the
attacker/victim case (lane 1 against lane 0).

Local instructions use a formula on the thread context:

```
LDL/STL:  VA = LOCAL_BASE + TID * 4 KiB + offset[11:0]     (LOCAL_BASE = 0x7F00_0000_0000)
LDG/STG:  VA = operand
```

so each thread's local memory is exactly one page, which it can own. The
formula deliberately produces an ordinary virtual address: a generic store
to the same VA reaches the same page, like the aliasing the attacks use.
Isolation does not depend on the address path. It depends only on the
SCU's check, which every request passes, local or generic.

## Extended page table entry

Pages are 4 KiB, virtual addresses 48 bits, physical addresses 44 bits. The
page table has 4 levels of 512 entries, indexed by VPN bits [35:27],
[26:18], [17:9], [8:0]. Non-leaf entries are one 64-bit word. Leaf entries
are 16 bytes, so a leaf table spans 8 KiB:

| word | bits    | field           | meaning                                         |
|------|---------|-----------------|-------------------------------------------------|
| 0    | 43:12   | PFN             | physical frame (next table for non-leaf)        |
| 0    | 1       | W               | writable                                        |
| 0    | 0       | V               | valid                                           |
| 1    | 63:46   | Owner_Thread_ID | TID that owns the page                          |
| 1    | 45      | Protection_Flag | 1 = thread-private: check owner; 0 = bypass     |

Keeping the ownership metadata in a second word leaves the ordinary PTE
unchanged. The price is one extra memory read per page walk, which is where
CAMI's small performance cost comes from. The driver sets Protection_Flag
and Owner_Thread_ID when it allocates a thread-private local page. Global
and shared pages keep the flag clear and behave exactly as without CAMI.
Ownership never changes during a page's life. Releasing a page means
clearing its PTE and shooting the VPN down from the TLB (`inv_valid` /
`inv_vpn`, or `inv_all`).

## MMU pipeline and the check

`cami_mmu` has two stages.

1. **Lookup.** The VPN is looked up in `cami_tlb`, a 32-entry fully
   associative TLB with round-robin replacement. Each TLB entry holds the
   PFN, W, owner TID and protection flag, so a hit delivers the owner ID
   along with the mapping. On a miss the stage stalls while `cami_ptw`
   walks the table: one read per level plus the ownership word, one read
   outstanding. A valid result fills the TLB and moves on directly. An
   invalid entry at any level ends the walk as *not mapped*.
2. **Check.** The SCU compares the requester TID with the owner TID. The
   request is then handled in this order:
   * not mapped: refused with cause 1.
   * protected page and the IDs differ: refused with cause 3 (owner).
   * store to a page whose W bit is clear: refused with cause 2.
   * anything else: granted, and sent out on `mem_valid/mem_ready` with
     the physical address, TID, direction and store data.

   A refused request pulses `fault_valid`/`fault_irq` and is discarded.

After a fault, `cami_fault_regs` sets the warp's halt bit at the next clock
edge. From then on, the following are discarded, so nothing of a faulting
warp reaches memory after its fault:

* requests of that warp already in the pipeline (`ev_drop`);
* the lanes the CTU has not yet issued (`squash`);
* new instructions from the warp (`squash`).

Lanes that were granted before the faulting lane stay performed.

**Timing.**

* The CTU accepts an instruction only when idle. It offers the first lane
  in the next cycle.
* On a TLB hit, a lane offered in cycle *c* is granted or refused in cycle
  *c+2*. The MMU takes one request per cycle, so a full warp of hits
  streams at one lane per cycle.
* A walk costs 2 × 5 + 1 = 11 cycles with a one-cycle memory.
* While a walk runs, the SCU is idle and the pipeline stalls.

## Violation registers

Software reads the violation registers through a simple 32-bit port: `sw_addr`,
`sw_we`, `sw_wdata`, `sw_rdata` (combinational read).

| addr | name    | read                                            | write                          |
|------|---------|-------------------------------------------------|--------------------------------|
| 0    | STATUS  | [0] record valid, [1] overflow, [31:16] count   | bit 0 = 1: clear record        |
| 1    | TID     | requester TID of the recorded fault             | –                              |
| 2    | VA_LO   | faulting VA [31:0]                              | –                              |
| 3    | VA_HI   | faulting VA [47:32]                             | –                              |
| 4    | INFO    | [0] write, [2:1] cause                          | –                              |
| 5    | HALT_LO | halted warps 31..0                              | 1 bits resume those warps      |
| 6    | HALT_HI | halted warps 63..32                             | 1 bits resume those warps      |

The first fault after a clear is recorded. Later faults only count and set
overflow. Every fault halts its warp.

## Files

| file                       | what                                                       |
|----------------------------|------------------------------------------------------------|
| `rtl/cami_pkg.sv`          | widths, TID / PTE / request structs, cause codes           |
| `rtl/cami_ctu.sv`          | Context Tracking Unit: lane split, TID tag, local addresses |
| `rtl/cami_tlb.sv`          | TLB with ownership metadata                                |
| `rtl/cami_ptw.sv`          | page table walker with ownership-word fetch                |
| `rtl/cami_scu.sv`          | Security Check Unit (18-bit comparator + flag bypass)      |
| `rtl/cami_mmu.sv`          | two-stage MMU: TLB, PTW, SCU, permission checks            |
| `rtl/cami_fault_regs.sv`   | violation registers and warp halt state                    |
| `rtl/cami_top.sv`          | one SM's CAMI memory path                                  |
| `tb/tb_cami_*.sv`          | one self-checking testbench per module                     |
| `tb/tb_cami_fingerprint.sv`| the three attack experiments as access fingerprints        |
| `tb/tb_pt_pkg.sv`          | builds page tables in a sparse memory, as a driver would    |
| `tb/tb_pt_mem.sv`          | behavioural page-table memory with latency and stalls      |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. They
use the default parameters, except `tb_cami_ctu`, which sets `SM_ID` to 79
to exercise the SM field of the thread ID. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cami_pkg.sv tb/tb_pt_pkg.sv tb/tb_cami_top.sv --top-module tb_cami_top
./obj_dir/Vtb_cami_top
```

Replace `tb_cami_top` with `tb_cami_fingerprint`, `tb_cami_mmu`, `tb_cami_ctu`, `tb_cami_ptw`,
`tb_cami_tlb`, `tb_cami_scu` or `tb_cami_fault_regs` for the unit tests.
Each runs in seconds.

`tb_cami_top` maps a protected local page for each of the 64 threads of warps
0 and 1, plus an unprotected shared page and a read-only page. It then runs:

* **Legitimate traffic.** Every lane stores and reloads its own stack.
* **Integrity attack.** Lane 1 stores through the generic alias of lane 0's
  variable. The store is refused with the attacker's TID and the address in
  the registers. The victim's data is unchanged. The warp's next instruction
  is squashed while other warps keep running.
* **Confidentiality attack.** Lane 1 loads lane 0's secret. The load never
  reaches memory.
* **Control-flow hijack.** Lane 0 saves a return address. Lane 1 tries to
  overwrite it. Lane 0 reloads the original value.
* **Attack in the middle of a warp instruction.** Lanes behind the faulting
  lane are dropped.
* **Other paths:** shared-page accesses by all lanes (check bypassed),
  unmapped and read-only faults, and a page release with shootdown.

Memory backpressure is random throughout. A memory monitor checks that no
granted access ever touches a protected page it does not own. The test
counts each mechanism (TLB hit, walk, fault, squash, drop, bypass,
backpressure) and fails if one never occurred. It also checks the latency
on a TLB hit: an instruction accepted in cycle *c* puts its lane on
`mem_valid` in cycle *c+3*.

`tb_cami_fingerprint` repeats the three attacks the way they are usually
shown, as memory access fingerprints. Lanes 0 and 1 make random legitimate
reads and writes in their own first 128 bytes. Lane 1 then makes its
illegal accesses. The test prints, per scenario, how many reads and writes
landed in each thread's region, and requires that there be no point in a
foreign region. A typical run prints (the counts vary with the seed):

```
integrity       fingerprint: T0 region: T0 11R/10W, T1 0R/0W | T1 region: T1 3R/3W, T0 0R/0W | blocked 1
confidentiality fingerprint: T0 region: T0 14R/7W, T1 0R/0W | T1 region: T1 2R/4W, T0 0R/0W | blocked 4
control-flow    fingerprint: T0 region: T0 12R/6W, T1 0R/0W | T1 region: T1 4R/2W, T0 0R/0W | blocked 1
```


## What is specified and what is chosen

These parts are CAMI's design: owner ID and protection flag in the PTE
(and hence in the TLB), a requester ID attached at the LSU, an equality
check after translation and before memory, bypass for unprotected pages,
and a fault that halts the warp and records the requester ID and address.

The following are this implementation's own choices:

* the TID format and widths;
* the page size, address widths and table depth;
* the two-word leaf PTE and its bit layout;
* TLB size and replacement;
* the per-lane serialisation in the CTU;
* the local address formula (one 4 KiB page per thread);
* the two-stage pipeline and its latency;
* the order of fault causes and the write-permission check;
* dropping requests of halted warps;
* the register map and the resume mechanism;
* valid/ready handshakes and the active-low asynchronous reset.

Other decisions and limits:

* **Halt unit.** A violation halts the whole warp, not only the offending
  thread. When attacker and victim share a warp, the victim stops as well
  until software resumes the warp.
* **Generic accesses are tagged too.** The CTU attaches the TID to every
  request, not only to LDL/STL, because the attacks come through generic
  stores. The protection flag decides whether the TID is checked.
* **No local memory larger than one page per thread.** Change
  `LOCAL_OFS_W` in `cami_pkg` to give each thread several pages. A thread
  then needs each of its pages mapped with itself as owner.
* **No baseline mode.** There is no switch to disable CAMI. A page with the
  protection flag clear behaves as an unprotected system would. The only
  policy is strict thread-private ownership.
* **One SM.** A GPU would instantiate one `cami_top` per SM with its own
  `SM_ID`. TLB shootdown across SMs is left to the existing invalidation
  ports.
* **No read data path.** Loads leave as requests; returning load data is
  the memory system's job and not modelled.
* **Performance not reproduced.** The reported overheads (1.3% geometric
  mean, at most 4.7%) come from a full-GPU simulation and cannot be
  reproduced with this RTL.

Lint notes:

* Verilator warns that `rst_n` is used both asynchronously (flip-flops) and
  synchronously (the `disable iff` of the handshake assertions). This is
  intended.
* It also warns that the walker does not use the reserved PTE bits. They
  are ignored on purpose.
