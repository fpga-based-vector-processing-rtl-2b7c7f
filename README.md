# An eight-lane FPGA vector processor for sparse matrix solves

This is a small vector computer. It solves the large, very sparse linear systems of power-network
analysis with the W-matrix method, and also handles ordinary dense vector arithmetic. The W-matrix
method turns the forward and backward substitutions of an LDLᵀ solve into sparse matrix–vector
products. Those products are performed as long runs of *gather → multiply → add → scatter*, and this
machine is built to run them eight elements per clock.

It has two parts:

* a **five-stage pipelined 32-bit RISC scalar unit**. It fetches and decodes every instruction,
  runs loop and address arithmetic, and hands vector instructions to the vector unit;
* an **eight-lane vector unit**. Each lane owns one bank of the vector register file, one
  IEEE-754 single-precision adder, one multiplier, and a path into a bank-interleaved data memory.

Up to eight floating-point results are produced per clock, and up to eight memory words are moved
per clock.

```
             +-------------+      vector instr, rs value, VLR, VMR
 imem 256x32 | scalar unit |----------------------------------+
 ----------->| IF ID EX    |                                  v
             | MEM WB      |   scalar ld/st    +----------------------------------------+
             +-------------+------------------>|  vector unit                           |
                                               |  lane k = 0..7:                        |
                                               |   register bank k (2 read, 1 write)    |
                                               |   FP adder k, FP multiplier k (IP)     |
                                               |  vector memory interface (VMI):        |
                                               |   8x 8:1 mux memory->register          |
                                               |   8x 8:1 mux register->memory          |
                                               +-------------------+--------------------+
                                                                   |
                                   data memory: 2 groups x 8 banks x 512 x 32 (block RAM)
```

## Programming model

### Registers

* `r0`–`r15`: 32-bit scalar registers. `r0` always reads as zero.
* `VLR`, the vector length register. It holds 0..VLEN and sets how many elements a vector
  instruction processes.
* `VMR`, the vector mask register. It has one bit per element, and element *i* is written only if
  `VMR[i]` is 1. The mask applies to arithmetic results, loads and stores. Masked-off elements of
  a gather or scatter do not even touch memory.
* `v0`–`v7`: eight vector registers of VLEN 32-bit elements (default VLEN = 32).

`VLR` and `VMR` live in the scalar register file. They are written by `MTS`: `rd = 0` writes
`VLR = min(rs, VLEN)`, and `rd = 1` writes 32 bits of `VMR`, with the chunk chosen by the
immediate. After reset, `VLR = VLEN` and `VMR` is all ones.

### Instruction encoding

| bits    | scalar (bit 31 = 0)                | vector (bit 31 = 1)                             |
|---------|------------------------------------|-------------------------------------------------|
| 30:27   | opcode                             | opcode                                          |
| 26:23   | rd                                 | [26] 0, [25:23] vd                              |
| 22:19   | rs                                 | rs: scalar operand or base address register     |
| 18:15   | rt                                 | [18:16] va, [15:13] vb                          |
| 14:0    | imm15, sign-extended               | [12:0] imm13, added to the address mod 2¹³      |

Scalar opcodes (exactly 16):

| op | name | effect |
|----|------|--------|
| 0 | NOP  | |
| 1 | ADD  | rd = rs + rt |
| 2 | SUB  | rd = rs − rt |
| 3 | AND  | rd = rs & rt |
| 4 | OR   | rd = rs \| rt |
| 5 | SLL  | rd = rs << imm[4:0] |
| 6 | MUL  | rd = rs[15:0] × rt[15:0] (signed 16×16 → 32) |
| 7 | ADDI | rd = rs + imm |
| 8 | SLT  | rd = (rs < rt), signed |
| 9 | LW   | rd = M[rs + imm] |
| 10 | SW  | M[rs + imm] = rt |
| 11 | BEQ | if rs == rt: pc = pc + 1 + imm |
| 12 | BNE | if rs ≠ rt: pc = pc + 1 + imm |
| 13 | JMP | pc = imm |
| 14 | MTS | VLR / VMR ← rs (see above) |
| 15 | HALT | stop fetching; `done` rises when the vector unit is idle as well |

Vector opcodes:

| op | name  | effect for every element i < VLR with VMR[i] = 1 |
|----|-------|-----------------------------------------------|
| 0 | VADD  | vd[i] = va[i] + vb[i] |
| 1 | VSUB  | vd[i] = va[i] − vb[i] |
| 2 | VMUL  | vd[i] = va[i] × vb[i] |
| 3 | VADDS | vd[i] = va[i] + rs |
| 4 | VMULS | vd[i] = va[i] × rs |
| 5 | VLD   | vd[i] = M[rs + imm + i] |
| 6 | VST   | M[rs + imm + i] = vd[i] |
| 7 | VLDX  | vd[i] = M[rs + imm + vb[i]]  (gather; vb holds integer indices) |
| 8 | VSTX  | M[rs + imm + vb[i]] = vd[i]  (scatter) |

Addresses are word addresses, 13 bits wide, so the data space is 8192 words. The program counter is
8 bits wide and addresses the 256-word instruction memory.

## The banked vector register file

A register file with 2×8 read ports and 8 write ports in a single array would use up the FPGA's
logic. The file is therefore split into eight banks with two read ports and one write port each.
Element *e* of register *v* lives in bank `e mod 8`, at row `v·(VLEN/8) + e/8`:

```
          bank0   bank1   ...  bank7
row 0     v0(0)   v0(1)        v0(7)
row 1     v0(8)   v0(9)        v0(15)
...
row 31    v7(24)  v7(25)       v7(31)      (VLEN = 32)
```

One vector instruction reads two source operands and writes one result for eight consecutive
elements per clock, one element in each bank. At 70 MHz this gives 8 banks × 3 ports × 4 bytes ×
70 MHz = 6.72 GB/s. Reads are combinational (distributed RAM), and writes take effect at the clock
edge.

The FP adders, the FP multipliers and the memory interface all use the same bank ports. They take
turns: whichever unit is running the current vector instruction owns the ports. The vector unit
takes **one vector instruction at a time**. There is no chaining, and no overlap between two vector
instructions. This removes every vector-register hazard without a scoreboard.

## The vector memory interface (VMI)

This is the least obvious part of the design.

**Address map.** A word address is `{group[12], row[11:3], lane[2:0]}`. Consecutive words rotate
over the eight memory *lanes*. Each lane has two physical 512×32 banks, one per group. So a
unit-stride access can start at any bank and still find eight different lanes in every run of
eight elements.

**Crossbar.** Sixteen eight-to-one 32-bit multiplexers connect any register bank to any memory
lane:

* eight multiplexers, one per memory lane, choose which register bank that lane serves. They
  select the address and the store data;
* eight multiplexers, one per register bank, choose which memory lane the bank receives load data
  from.

**Sequencing.** A vector access is worked off in *groups* of eight elements, one per register bank.
The first group is elements 0–7, the next is 8–15, and so on. In every clock, each memory lane
serves at most one element of the current group. If several pending elements address the same
lane, the one from the lowest-numbered register bank wins, and the others wait for the next clock.
When all elements of the group are done, the next group starts.

* Unit stride (VLD/VST): the eight addresses of a group are consecutive and never collide. A load
  takes `ceil(VLR/8) + 1` clocks and a store takes `ceil(VLR/8)` clocks, whatever the start
  address.
* Indexed (VLDX/VSTX): each group takes as many clocks as the largest number of its elements that
  fall in one lane. The time therefore depends on how the data is spread over the banks. The
  `events.mem_conflict` flag is high in every clock in which an element had to wait.

Memory reads have one clock of latency. Load data is written into the register banks in the clock
after the memory access, so a load needs one extra clock at the end.

**Scalar accesses** use the same lanes. A scalar load's data arrives in the clock after the request,
which is the scalar unit's write-back stage. The scalar unit holds a load or store in its
memory-access stage while the VMI runs a vector access. This also keeps scalar and vector memory
operations in program order.

## The scalar pipeline and the hand-off

The scalar unit has five stages, IF, ID, EX, MEM and WB, and all hazards are handled in hardware:

* **Forwarding.** Execute takes its operands from EX/MEM or MEM/WB when a newer value exists.
  The forwarding unit handles this.
* **Load-use interlock.** Decode waits one clock if it needs the result of a load that is in
  execute. The hazard unit handles this.
* **VLR/VMR interlock.** A vector instruction waits in decode while an `MTS` is in execute or
  memory access. This way it always sees the latest vector length and mask.
* **Branches and jumps** are resolved in execute. A taken branch squashes the two younger
  instructions. There is no delay slot. A taken branch also cancels a decode stall, because the
  stalled instruction is squashed anyway.
* **Vector hand-off.** A vector instruction is passed to the vector unit from the execute stage. It
  carries the forwarded value of `rs` and the VLR/VMR values read in decode. If the vector unit is
  still busy, execute waits, and the instructions behind it wait too. Once accepted, the
  instruction leaves the scalar pipeline as a bubble. Scalar work after it overlaps the vector
  instruction.

The instruction memory is a synchronous block RAM. Its output register is the instruction half of
the IF/ID register, and a stall simply disables it.

`events` (type `vp_pkg::vp_events_t`) flags each of these situations for one clock: forward,
load_use, mts_wait, flush, vec_wait, mem_wait and mem_conflict. It is meant for performance
counters.

## Timing summary

| operation | clocks the vector unit is busy |
|-----------|--------------------------------|
| VADD/VSUB/VADDS, VLR = n | ceil(n/8) + FADD_LAT + 1 |
| VMUL/VMULS, VLR = n      | ceil(n/8) + FMUL_LAT + 1 |
| VLD, VLR = n             | ceil(n/8) + 1 |
| VST, VLR = n             | ceil(n/8) |
| VLDX / VSTX              | Σ over groups of the largest number of elements on one lane (+1 for VLDX) |

If the mask disables the last elements, an arithmetic instruction ends one clock after its last
enabled result has been written.

## Floating-point units

The FP adders and multipliers are bought-in IEEE-754 single-precision IP cores. They are **not part
of this RTL**. The top level brings out their ports for each lane:

* the vector unit drives `fadd_a[k]` and `fadd_b[k]`, and expects the sum on `fadd_y[k]` exactly
  `FADD_LAT` clocks later (default 4);
* the same holds for `fmul_*` with `FMUL_LAT` (default 3).

The cores must be fully pipelined, accept an operation every clock, and need no handshake. VSUB is
done in the adder by flipping the sign bit of the second operand. To use cores with other
latencies, change the two parameters. `tb/fp_add_model.sv` and `tb/fp_mul_model.sv` are
behavioural stand-ins for simulation. They compute the result in double precision and round it once
to single precision.

## Host interface

The processor sits on a PCI card, and the host loads the program and the data. Here that is a
plain port:

* `host_imem_we/addr/wdata` write the instruction memory;
* `host_dmem_en/we/addr/wdata` reach every data bank through its second block-RAM port.
  `host_dmem_rdata` returns the word one clock after the address;
* pulse `start` for one clock; the program then runs from address 0. Wait for `done`, then read
  back the results.

Use the host port only while the processor is idle. The PCI bridge itself is not included.

## Mapping the W-matrix solve

For A = LDLᵀ the solution is x = Wᵀ D⁻¹ W b with W = L⁻¹. W is applied as a sequence of sparse
column updates: `x[row] += w · x[col]`. The columns are packed into **pseudo-columns**. A
pseudo-column is a group of up to VLEN matrix elements, taken from one or more columns, such that:

* no two elements share a row;
* no element's column is also a row of the group.

A whole pseudo-column can then be applied at once without a recurrence:

```
loop: LW   r2, 0(r1)          ; length of the next pseudo-column (0 = end)
      BEQ  r2, r0, done
      MTS  VLR, r2
      VLD  v0, 1(r1)          ; row indices
      VLD  v1, 1(r6)          ; column indices   (r6 = r1 + len)
      VLD  v2, 1(r7)          ; values           (r7 = r1 + 2 len)
      VLDX v3, X(r0)[v0]      ; x[row]
      VLDX v4, X(r0)[v1]      ; x[col]
      VMUL v5, v2, v4
      VADD v3, v3, v5
      VSTX v3, X(r0)[v0]      ; x[row] updated
      ...advance r1, JMP loop
```

The diagonal step is a VLD/VLD/VMUL/VST loop over x and D⁻¹, VLEN elements at a time. The stored
values carry the sign of W, that is, the negated factor entries.

**What fits.** The data memory is 16 × 512 = 8192 words. With the layout above, each stored matrix
element takes three words: row, column and value. Count the forward and backward pass, with the
non-zero counts of W for standard power-network test cases:

* the 49-node case (≈265 non-zeros, ≈1.6 k words) fits;
* the 118-node case (≈792 non-zeros, ≈4.8 k words) fits;
* the 443-, 1454- and 1723-node cases (≈21 k–86 k words) do not fit in on-chip memory, and
  would need external memory or streaming from the host. That is not part of this design.

The 256-word instruction memory is ample, since the solver program is about 60 words.

Measured solve times on random sparse factors (about 8 % fill below the diagonal) are shown below.
They come from the included testbench, not from real network matrices.

| nodes | VLEN 8 | VLEN 16 | VLEN 32 | VLEN 64 |
|------:|-------:|--------:|--------:|--------:|
| 49    | 2907   | 2815    | 2777    | 2759    |
| 118   | 10426  | 8468    | 8155    | 8118    |

Longer vector registers help more as the matrix grows. Small matrices cannot fill long vectors,
and gather/scatter conflicts and FP latency then dominate.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `VLEN`    | 32 | elements per vector register (8, 16, 32 and 64 are supported; must be a multiple of 8) |
| `NVREG`   | 8  | vector registers |
| `FADD_LAT`, `FMUL_LAT` | 4, 3 | latency of the external FP cores |

The lane count (8), the bank sizes (512 × 32 data, 256 × 32 instructions) and the address map are
fixed in `rtl/vp_pkg.sv`.

## Where this design departs from the original, and what to trust

Taken from the original design:

* the scalar unit with a five-stage pipeline, forwarding and hazard units, and VLR/VMR in its
  register file;
* eight lanes, each with a register bank, an FP adder and an FP multiplier;
* eight vector registers of 32-bit elements, split over eight banks with two read ports and one
  write port each, and the interleaving shown above;
* the 16 data banks of 512 × 32 and the 256 × 32 instruction memory;
* a memory interface with unit-stride and indexed accesses from any bank, built from sixteen
  8:1 multiplexers;
* 16 scalar instructions;
* up to eight results and eight memory words per clock.

This design's own choices:

* the whole instruction encoding and the vector instruction set;
* the register count (16), and hand-off from execute rather than decode;
* strictly one vector instruction at a time (no chaining);
* the address map with lane = address mod 8 and group = address bit 12;
* lowest-bank-first conflict arbitration;
* the FP latencies, the host port, the reset values, and the clamping of VLR.

The original vector memory accesses had execution times that depended on the start address. Here a
unit-stride access does not, because the lane rotation avoids conflicts.

The test solve differs from the original in two ways:

* It runs forward, diagonal and backward passes as three separate steps. The original also folds
  the dense last partition of W together with its transpose into one step, which saves one pass.
  That is a preprocessing choice made on the host; the hardware does not change.
* The original reports that short vector registers (8 or 16 elements) can need fewer clocks on
  small matrices. The random factors used here do not show that: VLEN = 8 is always slowest.
  Real network matrices have a different structure, so this comparison says little.

The original solved systems of up to 1723 nodes, which needs more storage than the 8192 on-chip
words. Where it kept that data is not known, so this design offers no path for it.

Not included: the FP IP cores, the PCI/host bridge and the board's off-chip DDR SRAMs.

Verification: every module has a self-checking testbench. The scalar unit's test also runs 40
random programs against an instruction-level model of the ISA. Those programs have dense
dependences, loads and stores, forward branches, and MTS ahead of vector instructions. The end-to-end test runs the sparse solve
plus a masked/scalar section on the default configuration and compares results bit for bit with a
reference that rounds after each operation. It also checks that every pipeline and memory event
occurs. Another test runs the solve at VLEN = 8, 16, 32 and 64. Nothing has been checked on an FPGA.

## Files and simulation

`rtl/` (synthesizable):

| file | contents |
|------|----------|
| `vp_pkg.sv` | widths, opcodes, instruction and event types |
| `vector_processor.sv` | top level |
| `scalar_cpu.sv`, `scalar_regfile.sv`, `scalar_alu.sv`, `hazard_unit.sv`, `forwarding_unit.sv` | scalar unit |
| `imem.sv`, `dmem_bank.sv` | block-RAM memories |
| `vector_unit.sv`, `vector_regfile.sv`, `vrf_bank.sv`, `vmi.sv` | vector unit |

`tb/`:

* one `tb_<module>.sv` per module;
* `tb_vector_processor.sv`, the end-to-end test at default parameters;
* `tb_wmatrix_sizes.sv` with `wm_bench.sv`, the solve at four vector lengths;
* `vp_asm_pkg.sv`, instruction encoders and reference FP functions;
* the FP models.

Run any testbench with Verilator 5 from the top folder:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/vp_pkg.sv tb/vp_asm_pkg.sv tb/tb_vector_processor.sv \
    --top-module tb_vector_processor -o sim && ./obj_dir/sim
```

Each test ends with `TB_RESULT checks=N failures=M`.
