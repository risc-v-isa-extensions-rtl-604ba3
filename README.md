# SCG SpMM extension: two extra backend pipelines for unstructured-sparse matrix multiplication

Pruned large language models leave weight matrices with zeros in no fixed pattern
(unstructured sparsity). Multiplying such a sparse matrix A by a dense activation
matrix B (SpMM) is hard to vectorise: every row of A has a different number of
nonzeros in different columns. This RTL implements a small instruction-set extension
for an out-of-order RISC-V core that makes the outer-product form of SpMM vectorisable:

* A is stored in **SCG (shift-compaction grouping)** form. Within a block of VLEN rows,
  the nonzeros of every row are shifted left (compacted), keeping their column
  indices; column j of the compacted block is one **group**: the j-th nonzero of each
  of the VLEN rows, padded with zeros for rows that have fewer. A group is a dense
  VLEN-element vector of values plus a vector of column indices, and the row of each
  element is implied by its lane.
* Each nonzero `a = A[r][k]` contributes `a * B[k][c0 .. c0+VLEN-1]` to row r of C: a
  **partial sum block**, produced by one scalar-times-vector multiply on VLEN
  multipliers, with B read contiguously along its rows.
* Partial sum blocks of the same output row are added pairwise by a single **MERGE**
  instruction on VLEN adders.
* Generation and merging run on **two separate pipelines** that share a four-block
  **Partial Sum Buffer (PSB)**, so the merge of earlier blocks overlaps the
  generation of the next one.

The default configuration is VLEN = 8 FP16 elements (128-bit vectors), 8 multipliers,
8 adders, four 128-bit vector registers and a 64-byte PSB.

## The kernel, instruction by instruction

For one output row r (lane i of row block rb) and one VLEN-wide column block cb, the host
runs, for every group j of the row block:

```
Gen P_j:
  LDVALIDX vr0, vr1, x10      // vr0 <- values of group j, vr1 <- their column indices
  VSMV     x3, vr1, i         // x3 <- column index k of row r's j-th nonzero
                              // host: x4 = B + k*ROWSIZE_B + cb*2*VLEN ; x5 = x4 + 2*VLEN
  LDPRF    vr2, x4, x5        // vr2 <- B[k][cb block], prefetch the next chunk
  VSMUL    vr3, vr0, vr2, i   // vr3[:] <- vr0[i] * vr2[:]
  STPS     vr3, x6            // PSB slot (x6) <- vr3
Merge (from j = 1 on):
  MERGE    x8, x6, x7         // PSB[x8] <- PSB[x6] + PSB[x7]
```

and finally `STRES x9, x6` writes the fully merged block to C. The first merge adds
P0 and P1; every later one adds the new P_j to the running sum. PSB slots are reused
in rotation: while the PSU writes P2 into a third slot, the MU reads P0 and P1 and
writes their sum into the fourth. The next block then goes into a slot whose contents
have already been consumed.

The host computes the B address from the index returned by VSMV. Everything else
(loads, products, merges, stores of C) runs inside the extension.

## Instruction set

All seven instructions use the R-type layout in the custom-0 major opcode `0x0b`;
funct3 selects the instruction. `x(f)` is the value of the general-purpose register
named by field f. `vr(f)` is the vector register named by it (low 2 bits).

| funct3 | name     | funct7 | rs2            | rs1             | rd                 | effect |
|-------:|----------|--------|----------------|-----------------|--------------------|--------|
| 0 | LDVALIDX | –     | vector dest0   | vector dest1    | input address      | `vr(rs2) <- mem[x(rd)]`, `vr(rs1) <- mem[x(rd)+2*VLEN]` |
| 1 | VSMV     | index | –              | vector src      | scalar dest        | `x(rd) <- zext(vr(rs1)[funct7])` |
| 2 | LDPRF    | –     | prefetch addr  | input addr      | vector dest        | `vr(rd) <- mem[x(rs1)]`, prefetch hint `x(rs2)` |
| 3 | VSMUL    | index | vector src1    | vector src0     | vector dest        | `vr(rd)[i] <- vr(rs1)[funct7] * vr(rs2)[i]` |
| 4 | STPS     | –     | –              | vector src      | buffer addr        | `PSB[x(rd)] <- vr(rs1)` |
| 5 | MERGE    | –     | buffer addr1   | buffer addr0    | buffer addr2       | `PSB[x(rd)] <- PSB[x(rs1)] + PSB[x(rs2)]` |
| 6 | STRES    | –     | –              | buffer addr     | output addr        | `mem[x(rd)] <- PSB[x(rs1)]` |

Four instructions (LDVALIDX, STPS, MERGE, STRES) use the **rd field as a source**: it
names a register that holds an address. The host must therefore read up to three
registers per instruction and pass their values with it. A PSB address is a byte
address in the 64-byte buffer, and the slot is `address / (2*VLEN)`. An element index
is the low log2(VLEN) bits of funct7. funct3 = 7 is illegal: the instruction is
accepted, dropped and flagged on `cmd_illegal`.

## Microarchitecture

```
 host core ──cmd (inst + x(rs1), x(rs2), x(rd))──► scg_decoder ─► scg_dispatch
                                                                   │        │
                                       generation queue ◄──────────┘        └──────► merge queue
                                       (scg_cmd_queue)                              (scg_cmd_queue)
                                             │ head may go?  ◄── PSB ordering tags ──► │
                                             ▼                                         ▼
  mem read / prefetch ◄──────────────── scg_psu ──── STPS ────► scg_psb ◄──MERGE──── scg_mu ───► mem write (C)
  VSMV result ──► host        8 x fp16_mul, controller           4 x 128 bit          8 x fp16_add, controller
                                  ▲ ▼                                 ▲  reads (2 ports)  │
                               scg_vrf (4 x 128 bit)                  └───────────────────┘
```

| module | role |
|---|---|
| `scg_pkg` | opcode, funct3 enum, command / queue-entry / response structs, default sizes |
| `scg_spmm_ext` | top: wires everything below |
| `scg_decoder` | recognises opcode 0x0b, extracts fields, chooses the pipeline, says which GPRs are read |
| `scg_dispatch` | in-order steering into the two queues; PSB ordering tags (next section) |
| `scg_cmd_queue` | 4-entry FIFO in front of each unit |
| `scg_psu` | Partial Sum Unit: LDVALIDX, VSMV, LDPRF, VSMUL (VLEN `fp16_mul`), STPS |
| `scg_vrf` | 4 x VLEN x FP16 vector register file, 1 write and 2 read ports |
| `scg_psb` | Partial Sum Buffer: 4 slots, one write port per pipeline, 2 read ports |
| `scg_mu` | Merge Unit: MERGE (VLEN `fp16_add`), STRES |
| `fp16_mul`, `fp16_add` | combinational binary16 multiplier and adder |

### Keeping the two pipelines in order on the PSB

Each pipeline executes its own instructions in program order. Only the PSB is shared,
so the ordering problem is confined to it. A MERGE must not read a slot before the
older STPS that fills it has written it. An STPS must not overwrite a slot before an
older MERGE or STRES has read it, or before an older MERGE writes it.

Stalling dispatch on such a conflict would be simple, but it would defeat the design.
The MERGE for P_j is issued right after the STPS of P_j, so it always conflicts for a
few cycles, and a stalled dispatch would hold back the LDVALIDX/VSMV/LDPRF of P_{j+1}
behind it. That is exactly the overlap the two pipelines exist for. So dispatch never
stops on a conflict. Instead, `scg_dispatch` keeps four counters per slot, modulo 16:

* `g_iss[s]`, `g_done[s]`: STPS to slot s dispatched and finished;
* `m_iss[s]`, `m_done[s]`: merge-side instructions touching s dispatched and finished
  (one count per instruction and slot).

At dispatch, an instruction records a **tag** for each slot it touches: the other
pipeline's issue count for that slot, i.e. how many older accesses of the other
pipeline it must wait for. It is then queued. The head of a queue is passed to its
unit only when the other pipeline's completion count equals each of its tags:

* STPS to slot s goes when `m_done[s] == tag0`;
* MERGE goes when `g_done` of its two source slots and its destination slot match its
  three tags; STRES checks its one source slot.

Younger accesses of the other pipeline cannot finish first, because they wait for this
one in turn. Equality is therefore exact, and the counters can wrap safely as long as
fewer than 16 accesses to one slot are in flight; with 4-entry queues there are at most
5. `gen_psb_wait` and `mrg_psb_wait` show a head waiting. In the end-to-end test,
merges wait for their STPS on almost every block, while the generation pipeline keeps
running.

### Timing

* Dispatch is combinational, from the command port to the queue push. A queued
  instruction reaches its unit one cycle later at the earliest.
* PSU: VSMUL and STPS execute in the cycle after acceptance, and the next instruction
  is accepted in the same cycle, so they sustain one per cycle. LDVALIDX makes two
  128-bit reads and LDPRF one, with one read outstanding at a time and responses in
  order. VSMV holds until the host takes the result (`resp_valid`/`resp_ready`).
* MU: MERGE reads both slots, adds and writes in one cycle, and merges sustain one
  per cycle. STRES holds its write request until `mem_wr_req_ready`.
* A PSB or VRF write is visible to readers in the next cycle.

The unit paths are single-cycle combinational FP16 operators with no pipelining. The
target clock (1 GHz in 12 nm) has not been checked against this RTL.

### FP16 arithmetic

Both operators round to nearest, ties to even. Subnormal inputs are read as zero, and
results below 2^-14 after rounding become a signed zero (flush to zero). Overflow gives
±inf, any NaN result is `0x7e00`, inf·0 and inf−inf are NaN, and an exact zero sum is
+0 unless both operands are −0. These choices are this implementation's own.

## Top-level interface (`scg_spmm_ext`)

| group | signals | protocol |
|---|---|---|
| command | `cmd_valid`, `cmd_ready`, `cmd_inst[31:0]`, `cmd_rs1_val`, `cmd_rs2_val`, `cmd_rd_val` (64 bit) | valid/ready; values of the GPRs named by rs1, rs2, rd |
| illegal | `cmd_illegal` | one-cycle pulse when an unrecognised instruction is dropped |
| VSMV result | `resp_valid`, `resp_ready`, `resp_rd[4:0]`, `resp_data[63:0]` | valid/ready |
| memory read | `mem_rd_req_valid/ready/addr`, `mem_rd_resp_valid`, `mem_rd_resp_data[VLEN*16-1:0]` | request valid/ready; response in order, one cycle valid; little-endian FP16 elements |
| prefetch | `mem_pf_valid`, `mem_pf_addr` | one-cycle hint, no handshake |
| memory write | `mem_wr_req_valid/ready/addr/data` | valid/ready |
| status | `psu_busy`, `mu_busy`, `gen_psb_wait`, `mrg_psb_wait` | levels |

`clk` is the only clock. `rst_n` is an asynchronous active-low reset that clears all
state, including the VRF and PSB. Parameters: `VLEN` (8), `NUM_VREGS` (4), `SLOTS` (4),
`QUEUE_DEPTH` (4). The upper 48 bits of `resp_data` are always zero, because VSMV
zero-extends a 16-bit element.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_fp16_mul`, `tb_fp16_add` | 20 000+ random and directed operands against a reference that computes exactly in `real` and rounds independently (`tb_fp16_ref_pkg`) |
| `tb_scg_cmd_queue` | random push/pop against a model FIFO, full back-pressure |
| `tb_scg_vrf`, `tb_scg_psb` | reset values, random writes and reads against a model array |
| `tb_scg_decoder` | all seven encodings with random fields, illegal funct3 and opcodes |
| `tb_scg_dispatch` | routing; no dispatch stall on a conflict; RAW, WAR and WAW waits at the queue heads and their release |
| `tb_scg_psu` | LDVALIDX / VSMV / LDPRF (with prefetch address) / VSMUL / STPS against the FP16 reference, random memory latency and back-pressure; VSMUL+STPS at one per cycle |
| `tb_scg_mu` | random MERGEs against the reference adder, completion reports, STRES through a memory with back-pressure; MERGE at one per cycle |
| `tb_scg_spmm_ext` | end to end, default parameters: random sparse A (M = 32, K = 256) at sparsity 0.4, 0.5 and 0.6 stored in SCG, dense B (N = 32), the full kernel above; compares all of C against a reference with the same rounding order; counts and requires generation/merge overlap, merge-waits-for-store, store-waits-for-merge, dispatch back-pressure, memory back-pressure, prefetches, VSMV responses and an illegal instruction |
| `tb_scg_llm_slice` | default parameters on slices of the targeted LLM layers: one full row block of the weights (8 output rows, all input columns) by 8 tokens, for every inner dimension of those layers (2048, 4096, 5632, 8192, 11008) at sparsity 0.4, 0.5 and 0.6; compares the 64 outputs of each slice with the same reference; prints the cycles per slice |

`tb_mem_model` is a behavioural memory (random ready, random in-order read latency)
used by the last four.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/scg_pkg.sv tb/tb_fp16_ref_pkg.sv tb/tb_scg_spmm_ext.sv --top-module tb_scg_spmm_ext
./obj_dir/Vtb_scg_spmm_ext
```

Replace the last file and the top module to run another testbench. The FP16 and unit
testbenches need only `rtl/scg_pkg.sv` and `tb/tb_fp16_ref_pkg.sv` ahead of them. The
simulator is two-state, so every register that is read is reset.

## What follows the source design and what does not

Taken from the published design:
* the seven instructions, their opcode, funct3 numbers and operand fields;
* the kernel structure of generation blocks and single-instruction merges;
* VLEN = 8 FP16 elements, with as many multipliers in the PSU and adders in the MU as
  VLEN;
* 4 x 128-bit vector registers, a 64-byte four-block PSB reused in rotation;
* two extended pipelines, each with a queue, that overlap generation and merging.

Choices of this implementation, where the source gives no detail:
* the command port that stands in for the core's coprocessor interface, and the
  reading of rd as a source register;
* the memory layout of one SCG group: values, then indices, 2*VLEN bytes apart;
* PSB byte addressing;
* the queue depth;
* the ordering tags between the two pipelines;
* the memory and response handshakes, and all latencies;
* the FP16 rounding, subnormal and NaN rules;
* the vector register file as one file. The source draws it as two halves, VRF_A and
  VRF_B, without saying how registers are divided.

Not included:
* the host core itself: fetch, decode integration, issue, register read, GPRs, and
  the load/store unit and caches. The top brings their connection points out as
  ports.
* the software that converts a matrix to SCG. The testbench contains a simple
  converter for its own data.

What the testbenches establish: the arithmetic is bit-exact against an independent
reference, and the complete kernel produces the right C at three sparsity levels with
random memory timing. What they do not establish: timing closure, area and power, and
performance relative to the source's figures. Area and power depend on the core and
the process, and the cycle counts depend on a host core that is not modelled here.

## Fit to the evaluated workloads

The extension streams all matrices through memory, and only VLEN-wide blocks live
inside it. Matrix size is therefore limited only by address width (64 bits) and by the
16-bit column index held in a vector element. A column index can address up to 65 536
columns. The largest dimension among the evaluated LLM projection layers is 11 008
(LLaMA2-7B up/down projections: 11008 x 4096 and 4096 x 11008), so all of them fit:
LLaMA2-7B, OPT-1.3B (8192 x 2048), TinyLLaMA-1.1B (5632 x 2048) and the 4096/2048-square
Q/K/V/O projections, at any sparsity. The end-to-end testbench runs the same kernel on
a reduced 32 x 256 by 256 x 32 product to keep simulation short. `tb_scg_llm_slice`
runs the full inner dimension of every targeted layer for one row block and 8 tokens.
With the testbench playing the host core (one instruction handed over per cycle at
best, a memory with random 1 to 4 cycle latency) one SCG group costs about 160 cycles
for 8 rows and 8 tokens; for example the 11 008-wide down projection of LLaMA2-7B at
sparsity 0.5 takes about 0.9 million cycles for its 5 593 groups. These figures
measure this testbench's host model, not a real core, and are not comparable with
published speedups. A whole layer (thousands of row blocks by 783 tokens, the average
prompt length of the evaluation data) is the same loop repeated, and was not simulated.
