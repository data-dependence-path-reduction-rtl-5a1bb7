# Tunneling loads: hiding the load-use stall without speculative cache access

In a classic 5-stage pipeline a load computes its address in EX and reads the
data cache in MEM. An instruction that uses the loaded value right away must
therefore wait one cycle (the load-use hazard). Load-address *prediction*
removes that wait by guessing the address early and reading the cache with
the guess. When the guess is wrong, that read wastes bandwidth, pollutes the
cache and can raise exceptions that never should have happened.

A **tunneling load** does not guess the address. It *computes* the address
one stage early, from the real register values, and then *checks* that
computation before touching the cache. Three pieces make this possible:

* a **register specifier buffer (RSB)** that remembers, for each load
  address, which registers the load uses as base and index;
* a **target program counter (TPC)** that runs one instruction ahead of the
  PC, so that the RSB can be read the cycle before the instruction is
  fetched;
* a **verification step** in decode (a scoreboard and two 5-bit
  comparators) that lets only a correctly formed address reach the cache.

A verified load reads the cache in EX, and its result is forwarded like an
ALU result. A load that fails verification simply proceeds as a normal load.
The mechanism never costs a cycle, and it never makes a cache access that
would not have happened anyway.

This repository holds synthesizable SystemVerilog for a single-issue 6-stage
pipeline built around this mechanism, plus self-checking testbenches.

## The pipeline

```
 stage:   RSB            IF                    ID                     EX              MEM          WB
 addr:    TPC            PC
          RSB lookup ->  fetch instruction     decode, operands       ALU / branch    normal load  write
          (base,index    read base/index       tunneling adder        tunneling load  store        back
           specifiers)   values (2 extra       verify: scoreboard +   reads port A    port B
                         register ports)       2 comparators
```

For a load L the timing is as follows:

| cycle | L is in | what happens for L |
|---|---|---|
| t   | RSB | The TPC addresses the RSB. On a hit it yields L's base and index specifiers. On a miss it yields the stack pointer (r29) and the zero register (r0). |
| t+1 | IF  | The PC now equals the TPC of cycle t, so L is fetched. The two extra register file ports read the values of the specifiers from t. Results still in EX or MEM are forwarded into this read. |
| t+2 | ID  | L is decoded. The tunneling adder forms base + index (LWX) or base + immediate (LW). Verification runs (next section). If L passes, the address travels with L into EX. If L's address was not in the RSB, L's specifiers are written into it. |
| t+3 | EX  | A verified L reads data cache port A, and its value is forwarded to the next instruction without a stall. An unverified L computes its address in the ALU path. |
| t+4 | MEM | An unverified L reads port B. A dependent instruction right behind it has stalled one cycle in ID, as in the 5-stage pipeline. |

Branches resolve in EX and flush IF and ID, which gives a two-cycle
misprediction penalty.

## Verifying a tunneling address

This part of the design needs the most care. The address formed in ID is
correct exactly when two conditions hold:

1. **The specifiers are L's own.** The RSB may hold nothing for L: the
   *primary miss*, where the default stack pointer/zero pair was supplied.
   The RSB may also have been read with a wrong TPC: the *bad-TPC miss*,
   after a branch misprediction. Two 5-bit comparators check the supplied
   base and index specifiers against the decoded ones. For a
   register + immediate load, the decoded index counts as r0. The default
   pair therefore passes for any stack-relative load, which can tunnel even
   without an RSB entry.
2. **The values read in IF were current.** Every older instruction
   except the one directly ahead of L is covered by forwarding into the IF
   read. The one directly ahead was still in ID during L's IF cycle, so
   nothing could be forwarded from it. The **scoreboard** covers it: one bit
   per register, set for the destination of the instruction that left ID in
   the previous cycle. If the bit of L's base or index is set, the address
   is squashed: the *address-generation miss*. The scoreboard keeps its bits
   while ID is stalled, so they always describe the instruction just ahead
   of L.

   One case escapes both mechanisms: a *normal* load two instructions ahead
   whose data only exists at the end of its MEM stage. The IF-stage read
   then marks its operand as *late*, and the address is squashed as an
   address-generation miss too.

`tl_verify` combines these checks. `tl_go` is high only for a valid load
whose specifiers match and whose operands are neither busy nor late. The
event priority is:

* bad-TPC is reported before primary miss;
* a specifier mismatch is reported before an address-generation miss.

As a safety net in simulation, an assertion in
`tl_core` requires every tunneling address to equal the address the normal
EX path computes for the same load.

## Register specifier buffer (`rsb`)

The RSB is fully associative with 64 entries. Each entry holds:

* a 32-bit instruction-address tag;
* a 5-bit base specifier and a 5-bit index specifier;
* a valid bit;
* an LRU age.

Lookup is combinational from the TPC, and the pipeline registers the result
at the end of the RSB stage.

An insertion comes from ID for a load whose address is not present. The
lookup that travelled with L is trusted only if it was made with L's own
address. Insertion rules:

* writing an address that is already present rewrites that entry;
* otherwise an invalid entry is filled;
* otherwise the least recently used entry is replaced, and `evict` pulses.

LRU is kept as one 6-bit age per entry; the ages form a permutation of
0..63. A lookup hit refreshes its entry. A write in the same cycle takes
priority over that refresh.

## TPC and branch prediction (`tpc_unit`, `bpred`)

Each cycle the PC takes the previous TPC, and the TPC moves on to the
predicted successor of its own address. The TPC therefore always holds the
predicted successor of the PC. Each instruction carries that value down the
pipeline, and EX compares it with the real successor. On a difference, the
PC is loaded with the real successor and the TPC with *its* prediction
(second predictor read port). The RSB result that reaches IF in that cycle
was read with the old TPC, which is exactly the bad-TPC case that
verification catches.

`bpred` is a gshare predictor:

* a 4096-entry table of 2-bit counters, indexed by address bits XOR a
  12-bit global history;
* a 1024-entry direct-mapped BTB with full tags.

It is updated when a conditional branch resolves in EX; the history is not
updated speculatively.

## Data cache ports (`dcache`)

The tunneling load needs a second data port:

* **port A** serves the tunneling load in EX;
* **port B** serves the MEM stage, which may hold an older load or store in
  the same cycle.

When port B stores to the word port A reads in the same cycle, port A
returns the new data (the store is older) and raises `a_bypass`.

The block is a 16 KB array of 32-bit words that always hits. The
set-associative organisation, write-back policy and miss handling of a real
cache are not modelled. Only aligned word accesses exist, and address bits
1:0 are ignored.

## Register file (`regfile`)

The register file holds 32 x 32 bits with r0 reading as zero. It has four
combinational read ports:

* two for ID operands;
* two for the tunneling base and index.

It has one write port. A read of the register being written in the same
cycle returns the new value.

## Instruction set

MIPS encodings, integer only:

| instruction | encoding | meaning |
|---|---|---|
| ADDU, SUBU, AND, OR, XOR, SLT rd, rs, rt | opcode 0, funct 0x21, 0x23, 0x24, 0x25, 0x26, 0x2A | ALU |
| ADDIU rt, rs, imm | 0x09 | rt = rs + sext(imm) |
| LW rt, imm(rs) | 0x23 | register + immediate load |
| **LWX rd, rs(rt)** | opcode 0, funct 0x0A (this design's own) | rd = mem[rs + rt], register + register load |
| SW rt, imm(rs) | 0x2B | store word |
| BEQ / BNE rs, rt, off | 0x04 / 0x05 | target = pc + 4 + (sext(off) << 2) |

Other encodings execute as no-ops. r29 serves as the stack pointer.

## Top level: `tl_core`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `imem_addr` / `imem_rdata` | out / in | fetch address (PC) and the instruction at that address, same cycle (combinational instruction memory) |
| `wb_valid`, `wb_pc`, `wb_we`, `wb_dst`, `wb_data` | out | retirement trace: one instruction per cycle at most |
| `st_valid`, `st_addr`, `st_data` | out | store in MEM |
| `events` (`tl_events_t`) | out | one-cycle pulses (list below) |

The pulses on `events` are:

* `tl_success`: a tunneling load read port A;
* `agen_miss`, `primary_miss`, `bad_tpc`, `spec_mismatch`: the miss kinds;
* `rsb_insert`, `rsb_evict`: RSB writes and replacements;
* `load_use_stall`: ID held behind a normal load;
* `redirect`: a misprediction corrected PC and TPC;
* `normal_load`: a load served by port B;
* `store_bypass`: port A took data from a store in MEM.

| parameter | default | |
|---|---|---|
| `RSB_ENTRIES` | 64 | RSB size |
| `DCACHE_BYTES` | 16384 | data array size |
| `BTB_ENTRIES`, `PHT_ENTRIES`, `BHR_BITS` | 1024, 4096, 12 | predictor sizes |
| `RESET_PC` | 0 | first fetch address |
| `TUNNEL_EN` | 1 | 0 gives the same pipeline without tunneling, for comparison |

All defaults except `RESET_PC` and `TUNNEL_EN` are the sizes of the
processor the mechanism was originally evaluated on.

## Files

`rtl/`:

* `tl_pkg.sv`: types, encodings and the event struct;
* `tl_core.sv`: the pipeline;
* `rsb.sv`, `tpc_unit.sv`, `bpred.sv`;
* `scoreboard.sv`, `tl_verify.sv`, `agen_adder.sv`;
* `regfile.sv`, `dcache.sv`, `tl_decoder.sv`.

`tb/` holds one self-checking testbench per block (`tb_<module>.sv`) and
`tb_kernels.sv`. Each prints `TB_RESULT checks=N failures=M` and stops via
a watchdog if it hangs.

* `tb_tl_core` runs the core at its default sizes. An independent
  instruction-set model checks every retirement and, at the end, the whole
  data memory. The programs are:
  * a latency program: a tunneled load feeds its user in the next cycle,
    and a load that cannot tunnel costs exactly one stall;
  * a directed loop that triggers every event, including the learned loop
    branch;
  * random looping programs with more distinct loads than RSB entries.

  It fails if any event never occurs.
* `tb_kernels` runs four small kernels (array sum, stack spill/reload, LWX
  table walk, pointer chase) on two cores, with and without tunneling. It
  checks the results and that tunneling is never slower. Typical output:
  gains of about 7 %, 20 %, 4.5 % and 0 % (pointer chasing: each load's base
  comes from the load just before, so it never tunnels).

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tl_pkg.sv tb/tb_tl_core.sv --top-module tb_tl_core
./obj_dir/Vtb_tl_core
```

Replace `tb_tl_core` with any other testbench name. Lint a block with
`verilator --lint-only -Wall -Irtl -y rtl rtl/tl_pkg.sv rtl/<module>.sv`.
Remaining lint warnings are all of the following kinds:

* unused package constants;
* unused upper address bits;
* the scoreboard's debug output left open in the core;
* `rst_n` used both as an asynchronous reset and in the assertion's
  `disable iff`.

## What was kept from the original proposal, and what was not

Kept:

* the six stages and their order;
* the TPC one instruction ahead of the PC;
* the RSB entry layout and its size of 64, fully associative with LRU;
* the stack pointer/zero default;
* the scoreboard of one bit per register;
* the two comparators and the extra adder;
* the two extra register read ports and the dual-ported data cache;
* the rule that a failed tunnel falls back to the normal MEM access.

This design's own choices:

* **Issue width 1.** The proposal was evaluated on in-order superscalar
  processors of 1 to 8 instructions per cycle, with most emphasis on four.
  Nothing here covers fetch groups, nor which load of a group uses the RSB.
* The instruction subset and the LWX encoding.
* Forwarding into the IF-stage register read, and the extra *late operand*
  squash it requires.
* The scoreboard holding its bits while ID is stalled.
* The LRU encoding.
* Predictor updates at resolution time.
* Write-through in the register file, and the port A/port B store bypass.

Not built:

* floating-point registers and units;
* multiply and divide;
* the instruction cache (its port is brought out);
* the data cache's tags, ways, write-back and 6-cycle miss handling;
* the second-level cache, which is ideal in the evaluated processor;
* the variant with a single-ported data cache;
* the idea of running the TPC more than one instruction ahead.
