# Two-chip floating-point vector processor

This is synthesizable SystemVerilog for a small vector processing system built for array-heavy
scientific code: dense matrix multiplication and sparse matrix-vector products. The system has two
identical vector microprocessors, one per FPGA. A host PC hands work to each one through on-chip
dual-port memories. Each processor pairs a five-stage scalar pipeline with an eight-lane vector core.
The core works in IEEE 754 single precision. Its register file, arithmetic units and data memory
are all split into eight banks. When the banks line up, the core produces eight floating-point
results per clock, or moves eight words between the registers and memory per clock.

The architecture follows a published short description: two processors, eight banks, three read
ports and one write port per register-file bank, 16 scalar plus 8 vector instructions, and
dual-port memories with a task request/response link to the host. That description gives no
instruction encoding, memory sizes, vector length, pipeline details or handshake timing. Those are
this implementation's choices, and they are marked as such below and in the head comment of every
file.

## System organisation

```
            host (task scheduling)            -- outside this RTL
     ┌──────────────┴──────────────┐
  host port, task_req/task_resp   host port, task_req/task_resp
     │                             │
 vector_processor[0]          vector_processor[1]          (vps_system)
```

Each `vector_processor` contains the following blocks:

| block | role |
|---|---|
| `host_if` | Raises `task_req` while idle. On `task_resp` it starts the program and drops `task_req` until HALT retires. It also decodes host accesses into the two memories. |
| `imem` | Instruction memory, 1024 words. It is dual-port: the scalar unit fetches on one port and the host loads programs on the other. |
| `scalar_unit` | Five-stage pipeline (IF ID EX MEM WB). It runs the program and hands vector instructions to the vector unit. |
| `vector_unit` | The vector core: `vrf`, `vec_arith` and `vmcu`. |
| `vrf` / `vrf_bank` | 8 vector registers × 64 elements, stored across 8 banks. Each bank has 3 read ports and 1 write port. |
| `vec_arith` | 8 lanes. Each lane has an `fp_add` and an `fp_mul`, followed by one output register. |
| `vmcu` | Vector memory control unit. It runs unit-stride and indexed loads and stores, and it also serves scalar loads and stores. |
| `dmem` / `dmem_bank` | Data memory: 8 interleaved dual-port banks of 4096 words (128 KB). The host has the second port. |

The two processors do not talk to each other in this RTL. The original system draws a link
between the FPGAs, but it specifies nothing about that link. All sharing of work goes through the
host.

## The banked vector datapath

The core rests on one mapping. Element `i` of every vector register lives in bank `i mod 8`, at
row `i / 8`. One access to a row therefore reaches eight consecutive elements, one from each bank.
Every vector instruction walks its `vl` elements one row (an *element group*) per cycle.

The four register-file ports of every bank are shared in time between the units. Only one vector
instruction is in flight at a time, so the opcode alone decides who owns each port:

| port | used by |
|---|---|
| read A | first arithmetic operand `va` |
| read B | second arithmetic operand `vb`, or the index vector of an indexed access |
| read C | store data (`vd` field of VST/VSTX) |
| write | arithmetic results, or returning load data, with a per-lane mask |

**Arithmetic timing.** The banks are read combinationally (LUT-RAM style). The lanes compute in
the same cycle and register the result, which is written one cycle later. A VADD, VMUL, VSADD or
VSMUL with `vl` elements keeps the unit busy for `ceil(vl/8) + 1` cycles. Lanes beyond `vl` in the
last group are masked off. VSADD and VSMUL broadcast a scalar register to every lane as the second
operand.

**Floating point.** `fp_add` and `fp_mul` are single-cycle combinational units. They round to
nearest, ties to even. To keep them small they treat subnormals as zero, in both directions. Any
NaN input, `inf - inf` or `0 × inf` gives the quiet NaN `7fc00000`. Overflow gives a signed
infinity.

## Vector memory control (`vmcu`)

The data memory is interleaved by word: word `w` lives in bank `w mod 8`, at row `w / 8`. Every
bank port has its own row address, and a crossbar sits between lanes and banks. For each element
group the unit forms one address per lane:

* unit stride (VLD/VST): `base + i`;
* indexed (VLDX/VSTX): `base + vb[i]`, where `vb` holds integer word offsets.

Each cycle, every bank serves the lowest-numbered pending lane whose address falls in that bank.
The group advances once no lane is pending. Eight consecutive words always land in eight different
banks, so unit-stride accesses run at one group per cycle at any alignment. An indexed group takes
as many cycles as its busiest bank has elements. This is the gather/scatter cost of sparse code,
and the `bank_conflict` event counts those extra cycles. When a scatter writes the same word twice,
the later element wins, as in program order.

The banks are synchronous RAMs. Load data come back one cycle after the access and go through the
register-file write port. A unit-stride load of 64 elements therefore keeps the unit busy for 9
cycles, and a store of 64 elements for 8.

## Scalar pipeline and coupling

All instructions are 32 bits: `op[31:27] rd[26:23] rs1[22:19] rs2[18:15] imm[14:0]`. There are 16
scalar registers, and `r0` always reads as zero. `imm` is sign-extended, except in LUI and JMP.

| scalar | effect | vector | effect |
|---|---|---|---|
| NOP | — | VLD vd, imm(rs1) | `vd[i] = M[rs1+imm+i]` |
| ADD SUB AND OR XOR SLT | `rd = rs1 op rs2` (SLT signed) | VST vd, imm(rs1) | `M[rs1+imm+i] = vd[i]` |
| ADDI | `rd = rs1 + imm` | VLDX vd, imm(rs1), vb | `vd[i] = M[rs1+imm+vb[i]]` |
| LUI | `rd = imm << 17` | VSTX vd, imm(rs1), vb | `M[rs1+imm+vb[i]] = vd[i]` |
| LW / SW | `rd = M[rs1+imm]` / `M[rs1+imm] = rs2` | VADD / VMUL vd, va, vb | `vd[i] = va[i] op vb[i]` |
| BEQ / BNE | if `rs1 ==/!= rs2` then `pc = pc + imm` | VSADD / VSMUL vd, va, rs2 | `vd[i] = va[i] op rs2` |
| JMP | `pc = imm` | | |
| SETVL rs1 | `vl = min(rs1, 64)` | | |
| HALT | end of task | | |

How the pipeline behaves:

* The instruction memory is synchronous. The IF stage presents the next PC, and ID decodes the word
  that comes back. When ID stalls, the same address is simply read again.
* Results are forwarded from MEM and WB into EX. A load followed directly by its user costs one
  stall cycle. Branches and jumps are resolved in EX and squash the one instruction behind them.
* **Vector issue.** A vector instruction waits in EX until the vector unit is idle. It then goes
  over together with the base address (`rs1 + imm`), the scalar operand (`rs2`) and the current
  `vl`. Scalar work carries on while the vector unit is busy.
* **Memory order.** Scalar loads and stores wait in MEM while a vector memory instruction is
  running. Memory accesses therefore stay in program order without any address comparison. Load
  data reach WB straight from the RAM.
* **End of task.** HALT waits in EX until the vector unit has finished, then stops fetching. When
  HALT leaves WB, `done` goes to `host_if` and `task_req` rises again.

## Host protocol

`host_addr` is a word address. Its top bit selects the instruction memory (1) or the data memory
(0). Reads return `host_rdata` one cycle after `host_en`. A task runs like this:

1. The host waits for `task_req`.
2. It writes a program at instruction address 0, plus the data and any arguments.
3. It pulses `task_resp` for one cycle.
4. It waits for `task_req` to rise again, then reads the results.

The host may touch the memories at any time. Port A of a bank wins when both ports write the same
word in the same cycle.

## Workloads and sizes

Each processor holds 32768 data words. A dense `n×n` product needs `3n²` words, so it fits whole
for `n ≤ 64`. For 128 to 384, the larger sizes of the original evaluation, the host blocks the
work. Each processor owns half of the rows of C. The host loads 32 rows of A at a time, then one
column block of B at a time. The block is 64 columns wide, or 32 wide when `64n` words would not
fit. For each block it runs a task and reads back the block of C. Vectors longer than 64 elements
would be strip-mined with SETVL. The test programs avoid that by keeping block widths within 64.

The sparse program uses a padded-slot (ELL) layout: row `r`, slot `d` holds a value and a column
index. The program gathers `x` with VLDX, multiplies, and accumulates over the slots, in strips of
64 rows. The original sparse matrices are not reproduced here. The workload test instead uses
synthetic matrices of the same sizes, with 1 to 4 non-zeros per row.

Simulated cycle counts (compute only, host transfers excluded):

| workload | cycles |
|---|---|
| dense 32×32, one processor / two | 20 497 / 10 257 |
| dense 64×64, one processor / two | 122 832 / 61 424 |
| dense 128, 192, 256, 320, 384 on two processors, host-blocked | 0.49 M, 1.66 M, 3.93 M, 10.2 M, 17.7 M |
| sparse 144 / 992 / 5300 rows on two processors | 398 / 2 347 / 12 486 |

Splitting a dense product by rows over the two processors halves the time, because each processor
does exactly half the work. For sparse matrices the split is only as even as the non-zeros in each
half.

## Simulating

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`. Each one has a
watchdog. Files are looked up by module name, so pass both source folders as library directories.
For example, the end-to-end test of the whole system at default sizes (about 20 s to build, under
a second to run):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/vp_pkg.sv tb/fp_ref_pkg.sv tb/vp_asm_pkg.sv tb/vp_prog_pkg.sv \
    tb/tb_vps_system.sv --top-module tb_vps_system
./obj_dir/Vtb_vps_system
```

| testbench | what it covers |
|---|---|
| `tb_fp_add`, `tb_fp_mul` | 20 000 random operands against a double-precision reference rounded once to single, plus corner cases |
| `tb_vec_arith` | all lanes, add and multiply, one-cycle latency |
| `tb_vrf` | three read ports and the masked write port, random traffic |
| `tb_dmem`, `tb_imem` | both ports of the memories |
| `tb_vmcu` | unaligned and partial unit-stride accesses, gathers and scatters, exact cycle counts with and without bank conflicts, scalar grant |
| `tb_vector_unit` | all 8 vector instructions at several vector lengths, busy time of arithmetic |
| `tb_scalar_unit` | ALU, forwarding, load-use, loops, jumps, SETVL clamping, vector issue fields, HALT; random memory grant and vector readiness |
| `tb_host_if` | handshake and address decode |
| `tb_vector_processor` | one processor: 16×16 matrix product, then a 70-row sparse product (second strip partial) |
| `tb_vps_system` | both processors at default sizes: 64×64 product on one and on two processors (two must take ≤ 55 % of the time), then a 150-row sparse product split over both; every pipeline and memory event must occur |
| `tb_wl_matmul` | dense products of size 32 and 128 to 384 (host-blocked above 64), about a minute of simulation |
| `tb_wl_spmv` | sparse products of 144, 992 and 5300 rows split over both processors |

The reference models in `tb/fp_ref_pkg.sv` convert single to double exactly, compute in double and
round once to single. The random test data are chosen so that the double result is exact, which
makes that single rounding the correct IEEE result.

## Where this departs from, or adds to, the original

* These are this implementation's own choices: instruction encoding, the list of 16 scalar
  operations, register counts (16 scalar, 8 vector), maximum vector length (64) and memory sizes.
* There is no instruction overlap or chaining between vector instructions. The original does not
  say whether it has any.
* The three-read-port banks make it possible to run the adder and multiplier concurrently. Here
  only one vector instruction runs at a time, so the ports are shared but never all busy at once.
* The bank-conflict scheme of indexed accesses is this implementation's own.
* The floating-point units flush subnormals to zero and use a single rounding mode.
* The inter-FPGA link, the PCI interface and the host software are not modelled. Their signals are
  the ports of `vps_system`.
* No timing closure at the original 70 MHz is claimed. The FP units are combinational within one
  cycle.
* Every assertion uses `disable iff (!rst_n)` while the flops reset asynchronously. Verilator
  reports this mixed use of `rst_n` (`SYNCASYNCNET`); it has no effect on the logic.
