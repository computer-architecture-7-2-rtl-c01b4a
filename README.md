# A four-stage pipelined RV32I-subset processor, with cache and memory-refill models

The main design here is a small in-order processor for five RV32I instructions:
`add`, `addi`, `lw`, `sw` and `bne`. It comes in two forms. `proc5s` is a
single-cycle machine. `proc8` is the same datapath cut into four pipeline stages.
The pipelined form deals with every data hazard of this instruction set without
ever stalling, using two mechanisms:

* a register file that passes a value being written straight through to a read
  in the same cycle;
* three forwarding multiplexers that feed the write-back value to the execute
  stage.

A taken branch squashes the two younger instructions.

Two other sets of hardware stand next to the processor. Neither is connected to
it:

* **Cache lookup arrays** (`cache1`, `sa_cache`). These cover the usual
  organizations: direct-mapped with one-word and four-word blocks, and 2-way and
  4-way set-associative.
* **A main-memory model** (`mem_org`). It refills a cache block over a one-word
  bus and reproduces the miss penalties of three memory organizations:
  one-word-wide, page-mode DRAM and four interleaved banks.

Everything is synthesizable SystemVerilog-2017. Each part has a self-checking
testbench.

---

## 1. Instruction subset and shared units

| unit | file | what it does |
|---|---|---|
| `gen_imm` | `rtl/gen_imm.sv` | Decodes the major opcode into format flags `r,i,s,b,u,j` plus `ld` (the `itype_t` struct in `rv_pkg`), and builds the sign-extended immediate of that format. |
| `rf` | `rtl/rf.sv` | 32 x 32-bit registers: two combinational read ports and one write port that writes on the clock edge. `x0` always reads as zero. |
| `rf2` | `rtl/rf2.sv` | `rf` plus a **write-to-read bypass**. When a read address equals the write address and `we` is high, the port returns `wd` in the same cycle. |
| `alu` | `rtl/alu.sv` | `sum = in1 + in2` (the result of add/addi, and the address for lw/sw). `tkn = in1 != in2` (bne taken). |
| `am_imem` | `rtl/am_imem.sv` | Instruction memory with asynchronous read: `insn = mem[pc/4]` in the same cycle. Has a load port for writing a program. |
| `am_dmem` | `rtl/am_dmem.sv` | Data memory with asynchronous read and a write on the clock edge. |
| `sm_imem`, `sm_dmem` | `rtl/sm_*.sv` | The same memories with synchronous read (registered output), as FPGA block RAM behaves. |

The operand rules are the same in both processors:

* The second ALU operand is the immediate, except for R-type and branch
  instructions, which use `rs2`.
* Stores and branches do not write a register.
* A load writes the loaded word; every other instruction that writes a register
  writes the ALU sum.

**End of program.** An instruction that writes `x30` marks the end of a program.
Both processors raise `halt` in the cycle that write happens; the register is
written as usual. The testbenches stop on `halt`.

## 2. The single-cycle processor (`proc5s`)

In one clock cycle, `proc5s` does all of the following:

1. reads `am_imem` at `pc`;
2. decodes the instruction and reads `rf`;
3. adds in the ALU;
4. reads or writes `am_dmem` at the sum;
5. at the clock edge, writes the result and loads the new pc: `pc+4`, or `pc+imm`
   for a taken `bne`.

Every instruction takes exactly one cycle. `proc5s` is there as the reference
point that `proc8` is built from, and the two share every unit.

## 3. The four-stage pipeline (`proc8`)

```
      IF              ID                   EX (+MA)                  WB
 pc -> am_imem -> P1 -> gen_imm, rf2 read -> P2 -> fwd muxes, ALU, -> P3 -> rf2 write
  ^                     tpc = P1_pc + imm         am_dmem read/write
  |_____________________________ P2_tpc when a bne is taken in EX ______|
```

* **P1** (IF/ID) holds `ir`, `pc` and a valid bit.
* **P2** (ID/EX) holds `pc`, `rs1`'s value, `rs2`'s value, the selected second
  operand `s2`, the branch target `tpc`, `rd`, `rs1`, `rs2`, the format flags and
  a valid bit.
* **P3** (EX/WB) holds `pc`, the ALU result, the loaded word, `rd`, the
  `s`/`b`/`ld` flags and a valid bit.

There is no separate memory stage. The data memory is read and written in the
same cycle as the ALU. This is why the pipeline has four stages and not five.

### 3.1 Data hazards: no stalls

A consumer can depend on a producer one, two, or three or more instructions ahead of
it. Look at the cycle in which the producer is in WB, writing `rf2`:

| distance | where the consumer is in that cycle | mechanism |
|---|---|---|
| 1 | In EX. Its operand was latched into P2 a cycle earlier, before the value existed. | Forwarding from WB to EX. |
| 2 | In ID, reading `rf2`. | `rf2` bypass: the read returns the value being written. |
| 3 or more | Still in IF. The register is written before the consumer reads it. | None needed. |

Forwarding applies when the instruction in WB is valid, writes a register (it is
not a store or a branch), and its `rd` is not `x0`. The three forwarding
multiplexers are then:

* **m11:** ALU operand 1 takes the write-back value when `P2_rs1 == P3_rd`.
* **m12:** ALU operand 2 takes it when `P2_rs2 == P3_rd` *and* the instruction
  uses `rs2` as an ALU operand (R-type or branch). Otherwise operand 2 is an
  immediate and must not be replaced.
* **m13:** the store data takes it when `P2_rs2 == P3_rd`.

Because the data memory is read in EX, a loaded word sits in P3 one cycle later
and is forwarded like any ALU result. A `lw` followed directly by a dependent
instruction therefore needs no bubble.

### 3.2 Control hazards

`bne` is resolved in EX. When it is taken (the instruction is valid and
`in1 != in2`), three things happen at the next clock edge:

* `pc` loads `P2_tpc`;
* the instruction being fetched enters P1 as invalid;
* the instruction in P1 enters P2 as invalid.

A taken branch therefore costs two cycles. An invalid instruction never writes a
register or memory, and never causes a squash. Fetch always continues at `pc+4`,
so it behaves as a predict-not-taken scheme.

### 3.3 Timing example

Program: `addi x1,x0,3; add x2,x1,x1; addi x10,x2,5`, then a halt. The halt
is written here as `addi x30,x10,0`, which matches the operands seen in cycle 6.
Cycle 1 is the first cycle after reset.

| cycle | pc | P1 pc | P2 pc | P3 pc | ALU in1 | ALU in2 | ALU out |
|---|---|---|---|---|---|---|---|
| 1 | 00 | 00 | 00 | 00 | 0 | 0 | 0 |
| 2 | 04 | 00 | 00 | 00 | 0 | 0 | 0 |
| 3 | 08 | 04 | 00 | 00 | 0 | 3 | 3 |
| 4 | 0c | 08 | 04 | 00 | 3 | 3 | 6 |
| 5 | 10 | 0c | 08 | 04 | 6 | 5 | 11 |
| 6 | 14 | 10 | 0c | 08 | 11 | 0 | 11 |
| 7 | 18 | 14 | 10 | 0c | 0 | 0 | 0 |

In cycles 4 and 5, both operands come through the forwarding path. In cycle 7,
`x30` is written and `halt` rises. `tb_proc8` checks this table value by value.

### 3.4 Synchronous-memory build

Setting the parameter `SYNC_MEM = 1` replaces the two asynchronous memories with
`sm_imem` and `sm_dmem`:

* the output register of `sm_imem` *is* `P1_ir`;
* the output register of `sm_dmem` *is* `P3_ldd`.

The pipeline timing is therefore unchanged. This is the form to use on an FPGA,
where memories read synchronously. The testbenches run both builds side by side
and require identical traces in every cycle.

### 3.5 Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | Clock, and synchronous active-high reset. Reset sets pc to 0, loads a nop into P1 and clears all valid bits and registers. |
| `ld_we`, `ld_addr`, `ld_data` | in | 1, 10, 32 | Writes one word of the instruction memory per clock. Use it while `rst` is high. |
| `halt` | out | 1 | `x30` is written in this cycle. |
| `trace` | out | `p8_trace_t` | The pcs of all four stages, the ALU operands and result, the squash and forwarding events, the rf2 bypass event, and the register write of this cycle. |

The data memory has no load port. Programs must store a word before they load
it. Memory contents are not reset.

## 4. Cache lookup arrays

A 32-bit byte address splits, from the most significant bit down, into:

* **tag**;
* **index**, which selects a set;
* **block offset**, which selects a word within the block;
* **2-bit byte offset**.

Each way keeps, per set, a valid bit, a tag and a block. In each way, a hit is
(valid AND tag match). The cache hit is the OR over all ways, and the hitting
way's block feeds a word multiplexer driven by the block offset.

`sa_cache` is parameterised by `WAYS`, `INDEX_BITS` and `OFF_BITS`:

| configuration | WAYS | INDEX_BITS | OFF_BITS | tag | capacity |
|---|---|---|---|---|---|
| direct-mapped, one-word blocks (default) | 1 | 10 | 0 | 20 | 1K words |
| direct-mapped, four-word blocks | 1 | 8 | 2 | 20 | 1K words |
| 2-way set-associative | 2 | 8 | 0 | 22 | 512 words |
| 4-way set-associative | 4 | 8 | 0 | 22 | 1K words |

**Lookups.** A lookup is combinational and returns `hit`, a one-hot `hit_way` and
`data`.

**Fills.** The fill port writes a whole block, its tag and valid = 1 at the clock
edge, into the way selected by the one-hot `fill_way`. There is no replacement
policy inside the array: the controller using it picks the victim way. It must
also never place one block in two ways of the same set, and an assertion checks
this.

**Reset.** Reset clears the valid bits only. Tags and data are plain RAM.

`cache1` is a fixed small version of the same idea:

* 32 entries with one word each;
* 58-bit entries laid out as `{valid, tag[24:0], data[31:0]}`;
* tag = `adr[31:7]`, index = `adr[6:2]`;
* entries are written whole through `wadr`/`we`/`wd`.

## 5. Refilling a block from main memory (`mem_org`)

`mem_org` holds the main memory behind a 32-bit bus.

**Requesting a block.** Raise `req` with any byte address inside the block while
`busy` is low. The block's words then return lowest first, one per `rvalid`
pulse, with their index on `rword` and `rlast` on the final word.

**Miss penalty.** Count the cycle in which the address is sent as cycle 1. Word
`k` of the block arrives in cycle `2 + T_CYCLE + k*STEP`:

| `ORG` | BLOCK_WORDS | STEP | miss penalty (last word) | bytes per cycle |
|---|---|---|---|---|
| `ORG_ONE_WORD` | 1 | - | 1 + 25 + 1 = **27** | 0.148 |
| `ORG_ONE_WORD` | 4 | `T_CYCLE` = 25 | 1 + 4*25 + 1 = **102** | 0.157 |
| `ORG_PAGE_MODE` | 4 | `T_PAGE` = 8 | 1 + 25 + 3*8 + 1 = **51** | 0.314 |
| `ORG_INTERLEAVED` | 4 | 1 | 1 + 25 + 3 + 1 = **30** | 0.533 |

How each organization gets its numbers:

* **One-word-wide:** there is one bank, and each word costs a full DRAM cycle.
  Returning word `k` on the bus overlaps with reading word `k+1`.
* **Page mode:** the first word opens the DRAM row and costs a full cycle. The
  other words come from the open row at the page access time.
* **Interleaved:** there is one bank per word of the block, with word `a` stored
  in bank `a mod 4`. All banks are read in parallel, and the bus then returns one
  word per cycle.

**Outputs and loading.** `rdata`, `rvalid`, `rword` and `rlast` are registered.
The memory (4096 words by default) is filled through a separate load port, one
word per clock, with no DRAM timing.

## 6. The top (`ca7_top`)

The parts above are separate designs, so `ca7_top` instantiates them side by side
with their own ports. All of them share `clk` and `rst`.

| instance | what it is | ports |
|---|---|---|
| `u_proc8` | The pipelined processor. | `p8_*` |
| `u_proc8_sm` | The same processor with `SYNC_MEM = 1`. | `p8s_*` |
| `u_proc5s` | The single-cycle processor. | `p5_*` |
| `u_cache1` | The 32-entry cache. | `c1_*` |
| `g_cache[0..3]` | `sa_cache` in the four configurations of section 4, in table order. | arrays `ca_*[0..3]` |
| `g_mem[0..3]` | `mem_org` in the four organizations of section 5, in table order. | arrays `mo_*[0..3]` |

Some instances are narrower than the shared port width. They use only the low
bits of that port:

* `ca_fill_way`: bits `[WAYS-1:0]`;
* `ca_fill_block`: bits `[32*words-1:0]`;
* `mo_rword`: bit 0 for the one-word memory.

## 7. Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and calls `$finish`, and a watchdog ends a run
that hangs. Build and run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rv_pkg.sv rtl/mem_pkg.sv tb/tb_rv_pkg.sv tb/tb_ca7_top.sv \
    --top-module tb_ca7_top -Mdir obj && ./obj/Vtb_ca7_top
```

Substitute the testbench name to run another one. The packages must come first;
the other modules are found through `-Irtl -Itb`.

| testbench | what it checks |
|---|---|
| `tb_proc8` | Checks the timing table above. Runs a directed program and 20 random programs, comparing every register write with an instruction-level reference model (`tb/tb_rv_pkg.sv`). Requires at least one squash, each of the three forwards, a forwarded load and an rf2 bypass. Checks that the `SYNC_MEM` build matches every cycle. |
| `tb_proc5s` | Runs the same programs against the reference model. Checks one cycle per instruction. |
| `tb_ca7_top` | Runs the whole top at its default sizes. Exercises the processors, every cache configuration (hits, misses, a full 4-way set) and every memory organization (data, and miss penalties 27, 102, 51 and 30). |
| `tb_sa_cache`, `tb_cache1` | Random fills and lookups against a model of the array, plus invalidation by reset. |
| `tb_mem_org` | Every word's arrival cycle and data, in all four organizations. |
| `tb_gen_imm`, `tb_rf`, `tb_rf2`, `tb_alu`, `tb_am_*`, `tb_sm_*` | Unit checks against values computed in the testbench. |

**Writing your own programs.** `tb_rv_pkg` has encoders (`enc_add`, `enc_addi`,
`enc_lw`, `enc_sw`, `enc_bne`). Load the program through `ld_*` while `rst` is
high, release reset, and wait for `halt`.

## 8. How far to trust it, and what is this design's own

**What the pipeline is based on.** The datapath of both processors, the pipeline
split, the three forwarding conditions, the rf2 bypass and the squash rule follow
a published teaching design. The timing table above is that design's own
example; only the encoding of its halt instruction is chosen here.

**Choices made here:**

* **Store and branch flags carried into P3.** The store and branch flags are
  copied into the EX/WB register, so that `sw` and `bne` never write a register.
  They are what disables the write-back. In the reference description they are
  declared but never loaded.
* **Reset and halt.** A synchronous reset replaces power-on initial values. End
  of program is an output (`halt` on a write to `x30`) rather than a simulator
  stop.
* **Decoder details.** The decoder's opcode classes and immediate layouts are the
  standard RV32I ones. Opcodes other than the five instructions are decoded into
  format flags, but the processors execute only `add`, `addi`, `lw`, `sw` and
  `bne`. Every other instruction behaves according to the datapath rules above
  and is not a correct RV32I implementation.
* **Memory ports and sizes.** Memory sizes (1K words for instructions and for
  data, 4K words behind `mem_org`), the program load port and the `mem_org`
  handshake are all chosen here.
* **Caches are lookup arrays only.** There is no cache controller, replacement
  policy or write policy. The 2-way and 4-way configurations keep 256 sets, so
  they hold 512 and 1024 words.
* **`mem_org` is a timing model.** It reproduces the miss-penalty arithmetic of
  the three organizations. It does not model DRAM row/column commands, refresh or
  a real DDR interface.
* **Not built:** second- and third-level caches, and any connection between a
  cache and the processors or `mem_org`.

**Verification** is by simulation only: directed and random tests against
independent models, with two-state Verilator. Nothing has been run on an FPGA.

## 9. Files

* `rtl/rv_pkg.sv`: opcodes, the `itype_t` flags and the `p8_trace_t` trace bundle.
* `rtl/mem_pkg.sv`: the `mem_org_e` organizations.
* `rtl/proc8.sv`, `rtl/proc5s.sv`: the processors.
* `rtl/gen_imm.sv`, `rtl/rf.sv`, `rtl/rf2.sv`, `rtl/alu.sv`: decoder, register
  files, ALU.
* `rtl/am_imem.sv`, `rtl/am_dmem.sv`, `rtl/sm_imem.sv`, `rtl/sm_dmem.sv`:
  memories.
* `rtl/cache1.sv`, `rtl/sa_cache.sv`: cache lookup arrays.
* `rtl/mem_org.sv`: main memory and refill timing.
* `rtl/ca7_top.sv`: the top.
* `tb/`: one testbench per unit (`tb_<unit>.sv`), the per-configuration helpers
  `tb_sa_cache_cfg.sv` and `tb_mem_org_cfg.sv`, and `tb_rv_pkg.sv` (encoders,
  reference model, program generators).
