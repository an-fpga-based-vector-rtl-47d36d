# A small FPGA-style vector computer for sparse matrix–vector work

Sparse matrices are mostly zeros. A scalar processor working on them spends its
time in loops that fetch one element, test it, and branch; a vector processor
replaces each loop with one instruction, fetches and decodes it once, and then
streams whole vectors through its datapath. What makes a vector machine useful
for *sparse* data is its addressing: besides loading consecutive elements, it
can load elements a fixed distance apart (a matrix column, or regularly spaced
non-zeros) and it can *gather* elements through an index vector holding the
positions of the non-zeros, and *scatter* results back the same way.

This repository holds synthesizable SystemVerilog for such a machine, sized as a
modest FPGA design:

* a vector processor with four vector registers of sixteen 16-bit integer
  elements, a vector length register, a vector mask register and two scalar
  registers (R1, F0);
* a 128-word program memory;
* eight data memories of 128 words each (1024 words), low-order interleaved, so
  that consecutive vector elements fall into consecutive memories;
* one shared address and data bus between the processor and all nine memories;
* a host port through which programs and data are loaded and results read back.

The organisation, the sizes, the memory map, the instruction groups and the
cycle count of every instruction follow a published FPGA vector computer. The
instruction encoding, the register conventions and a handful of details the
published description leaves open are this design's own; they are collected in
[Departures and own choices](#departures-and-own-choices).

## Organisation

```
            +--------------------------------------------+
            |              vector_processor              |
            |  control (fetch/decode/sequence)           |
            |  vreg_file  scalar_regs  arith_unit        |
            |  compare_unit  addr_gen                    |
            +----------------------+---------------------+
                                   | bus_en/we, addr[11:0], wdata, rdata
            +----------------------+---------------------+
            |              memory_system                 |
            |  addr_decoder (processor side, host side)  |
            |  program memory   data memory 0 ... 7      |  <- host port
            |  (dp_ram, dual-ported: processor | host)   |
            +--------------------------------------------+
```

`vector_computer` (the top) contains only these two parts. Every memory is a
dual-port RAM: port A is on the processor's bus, port B on the host port.

## Memory map and interleaving

Addresses on the bus are 12 bits.

| Address        | Module                                           |
|----------------|--------------------------------------------------|
| `000`–`7FF`    | program memory (128 words, address bits 6:0)     |
| `800`–`FF0`, step 10h | data memory 0                             |
| `801`–`FF1`    | data memory 1                                    |
| …              | …                                                |
| `807`–`FF7`    | data memory 7                                    |

Bit 11 chooses between program and data (high-order interleaving). In a data
address, bits 2:0 choose the data memory, bit 3 is ignored (so `800` and `808`
name the same word) and bits 10:4 give the word inside the memory, the *row*.
Programs mostly use *element addresses* 0…1023 instead: element `k` is row
`k / 8` of data memory `k % 8`, bus address `800h | (k/8)<<4 | k%8`. Eight
consecutive elements therefore share one row address and sit in eight different
memories, and a 16-element vector register fills from two rows.

The program memory only decodes address bits 6:0, so its 128 words repeat
through `000`–`7FF`.

## Instruction set

Every instruction is one 16-bit word: an opcode byte above an operand byte.

```
 15        10 9   8 7                 0
+------------+-----+-------------------+
|     op     | vd  |      operand      |
+------------+-----+-------------------+
```

`vd` is the destination vector register, or the register being stored. The
operand byte is, depending on the instruction:

| Use                              | Operand byte                                     |
|----------------------------------|--------------------------------------------------|
| `LV SV LVWS SVWS`                | bits 6:0 = row; first element address = row × 8 |
| `LVI SVI`                        | bits 1:0 = index vector register                 |
| all six loads/stores             | bit 7 = 1: pipelined mode                        |
| vector arithmetic, `SUMV`        | bits 3:2 = `va`, bits 1:0 = `vb`                 |
| `CMPVV CMPVS`                    | bits 7:5 = condition, 3:2 = `va`, 1:0 = `vb`     |
| `FILL`                           | bits 3:0 = element of `vd`                       |
| `LDR1 LDF0 STR1 STF0`            | element address 0…255                            |

R1 and F0 are implied operands: R1 holds the stride, the base of indexed
accesses and the step of `CVI`; F0 holds the scalar of vector–scalar operations
and receives the vector sum.

CPE is the number of clock cycles per vector element; one-cycle instructions are
marked CPI 1.

| op | Mnemonic | Operation (for e = 0 … VLR−1)                 | Cycles   |
|----|----------|-----------------------------------------------|----------|
| 0  | `HALT`   | stop, raise `halted`                          | –        |
| 1  | `LV`     | Vd[e] ← M[row·8 + e]                          | CPE 3    |
| 2  | `SV`     | M[row·8 + e] ← Vd[e]                          | CPE 2    |
| 3  | `LVWS`   | Vd[e] ← M[row·8 + e·R1]  (strided)            | CPE 3    |
| 4  | `SVWS`   | M[row·8 + e·R1] ← Vd[e]                       | CPE 3    |
| 5  | `LVI`    | Vd[e] ← M[R1 + Vx[e]]  (gather)               | CPE 3    |
| 6  | `SVI`    | M[R1 + Vx[e]] ← Vd[e]  (scatter)              | CPE 3    |
| 7  | `CVM`    | set every mask bit                            | CPI 1    |
| 8  | `MVR1L`  | VLR ← R1 (values above 16 give 16)            | CPI 1    |
| 9  | `MVLR1`  | R1 ← VLR                                      | CPI 1    |
| 10 | `MVF0M`  | VM ← F0                                       | CPI 1    |
| 11 | `MVMF0`  | F0 ← VM                                       | CPI 1    |
| 12 | `POP`    | R1 ← number of ones in VM                     | CPI 1    |
| 13 | `ADDVV`  | Vd[e] ← Va[e] + Vb[e]                         | CPE 3    |
| 14 | `ADDVS`  | Vd[e] ← Va[e] + F0                            | CPE 2    |
| 15 | `SUBVV`  | Vd[e] ← Va[e] − Vb[e]                         | CPE 3    |
| 16 | `SUBVS`  | Vd[e] ← Va[e] − F0                            | CPE 3    |
| 17 | `SUBSV`  | Vd[e] ← F0 − Va[e]                            | CPE 3    |
| 18 | `MULVV`  | Vd[e] ← Va[e] × Vb[e]  (low 16 bits)          | CPE 3    |
| 19 | `MULVS`  | Vd[e] ← Va[e] × F0                            | CPE 2    |
| 20 | `CMPVV`  | VM[e] ← Va[e] cond Vb[e]                      | CPE 1    |
| 21 | `CMPVS`  | VM[e] ← Va[e] cond F0                         | CPE 1    |
| 22 | `CVI`    | Vd[e] ← e × R1  (create index vector)         | CPE 2    |
| 23 | `SUMV`   | F0 ← Σ Va[e]                                  | CPE 3    |
| 24 | `FILL`   | Vd[k] ← F0, k = operand bits 3:0              | CPI 1    |
| 25 | `LDR1`   | R1 ← M[operand]                               | 1 + 2    |
| 26 | `LDF0`   | F0 ← M[operand]                               | 1 + 2    |
| 27 | `STR1`   | M[operand] ← R1                               | 1 + 1    |
| 28 | `STF0`   | M[operand] ← F0                               | 1 + 1    |

Conditions: 0 EQ, 1 NE, 2 GT, 3 LT, 4 GE, 5 LE, all on signed 16-bit values.
Arithmetic wraps around at 16 bits. Element addresses wrap around at 1024.
Opcodes above 28 halt the processor like `HALT`.

Opcodes 1–24 are the published machine's 24 instructions. `FILL` is the operation
that puts a partial result (a dot product left in F0 by `SUMV`) into one element
of a row or column vector being built. Opcodes 25–28 and `HALT` are additions:
without them a program could not load R1 or F0 or stop.

The vector length register VLR (reset value 16) sets the element count of every
vector instruction, memory accesses included. Setting VLR to 8 makes `LV` a
single-row access; VLR = 0 turns vector instructions into one-cycle no-ops. The
mask register VM receives comparison results, bit `e` for element `e`, and can be
moved, set and counted. It does **not** yet gate execution: every element below
VLR is processed.

## Execution timing

Execution is strictly sequential: a vector instruction finishes before the next
one starts. Fetch overlaps decode: in the cycle an instruction is decoded, the
processor already reads the next word over the bus. One-cycle instructions
therefore issue back to back at one per clock. When the decoded instruction is a
vector instruction, the prefetched word is parked in a one-entry buffer while the
instruction occupies the bus for its own loads and stores, and decoding resumes
from that buffer.

A vector instruction costs **1 + VLR × CPE** cycles: one decode cycle, then CPE
cycles per element. Inside an element's CPE cycles:

```
        cycle 0          cycle 1          cycle 2
LV      (address)        read issued      word -> Vd[e]
SV      read Vd[e]       write issued
LVWS/LVI(address)        read issued      word -> Vd[e]
SVWS/SVI(address)        (address)        write issued
ADDVV   latch Va[e]      latch Vb[e]      result -> Vd[e]
ADDVS   latch Va[e],F0   result -> Vd[e]
SUBVS   latch Va[e]      latch F0         result -> Vd[e]
SUMV    latch Va[e]      -                acc += ; last element: F0
CVI     -                Vd[e] <- acc; acc += R1
CMP     VM[e] <- Va[e] cond Vb[e]/F0
```

So a full 16-element `LV` takes 49 cycles, `ADDVS` 33, a comparison 17, and
`MVR1L` 1. The memory is read with a synchronous one-cycle latency, and at most
one word moves on the bus per cycle.

### Pipelined loads and stores

The load/store table above is the non-pipelined mode. Setting bit 7 of the
operand byte of any of the six loads and stores selects the pipelined mode: the
processor puts out a new address every cycle, so the interleaved memories answer
in consecutive cycles. A pipelined store takes 1 + VLR cycles; a pipelined load
takes 1 + VLR + 1, because each word is written to the register one cycle after
its address went out and the last one needs an extra cycle. A 16-element `LV`
drops from 49 to 18 cycles. The addressing (unit, strided, indexed) is the same
in both modes.

## Running programs

The host holds `rst_n` low and writes the program (from address 0) and the data
through the host port (`h_en`, `h_we`, `h_addr`, `h_wdata`; reads return on
`h_rdata` one cycle after `h_en` with `h_we` low). It then releases `rst_n`. The
processor fetches from address 0, runs until `HALT`, and raises `halted`; the
host reads the results back. Reset clears the registers but not the memories, so
a long program can be run in segments: load the next segment, pulse reset, run.

A typical inner step, the dot product of row *i* of a sparse matrix with a dense
vector *x*, where V3 holds the column positions of the row's non-zeros:

```
LDR1  nnz_i        ; R1 = number of non-zeros in row i
MVR1L              ; VLR = nnz_i
LV    V3, idxrow_i ; column positions
LDR1  rowbase_i    ; R1 = address of A[i][0]
LVI   V0, (V3)     ; gather A[i][cols]
LDR1  xbase        ; R1 = address of x[0]
LVI   V1, (V3)     ; gather x[cols]
MULVV V1, V0, V1
SUMV  V1           ; F0 = y[i]
FILL  V2[i]        ; build y in V2
```

For dense matrix products, `CVI` with R1 = N makes the index vector 0, N, 2N, …
and `LVI` with R1 = the address of the column's first element gathers a column.

## Performance on the matrix products

`tb/tb_matmul.sv` multiplies 8×8 and 16×16 integer matrices with one dot product
per result element, as above. The program memory holds 128 words and the
instruction set has no branches, so the host runs the straight-line program in
segments (4 for 8×8, 16 for 16×16).

| Product | Instructions | Cycles, this RTL | Cycles reported for the published machine |
|---------|--------------|------------------|--------------------------------------------|
| 8×8     | 348          | 5 484            | 6 552 (48 instructions)                    |
| 16×16   | 1 360        | 40 592           | 26 208 (96 instructions)                   |

The published programs are not known, so the instruction counts are not
comparable; the cycle counts are those of this RTL's own programs. Data for both
sizes fits the 1024-word data memory (16×16: 768 words for A, B and C).

## Departures and own choices

Taken from the published design: the sizes (4 × 16 × 16-bit vector registers,
128-word program memory, 8 × 128-word data memories), the 12-bit memory map with
its unused bit 3, low-order interleaving of the data memories on one shared bus,
the 16-bit instruction with the opcode in the upper byte, the instruction groups
and the cycles of each instruction, overlapped fetch and decode, sequential
execution, dual-port memories, and the host loading memory, resetting, and
reading back.

This design's own:

* the split of the opcode byte into a 6-bit operation and a 2-bit register, the
  opcode numbers, the meaning of the operand byte and the condition codes;
* R1 as stride, index base and `CVI` step; F0 as the scalar operand and the sum's
  destination; comparisons writing the mask;
* `LDR1`, `LDF0`, `STR1`, `STF0`, `HALT`; unknown opcodes halt;
* how the cycles of an element are used (the table above). Only the totals are
  the published ones;
* the pipelined load/store mode's bit and timing. The published machine offers
  both modes but gives cycle figures without saying which mode they belong to;
  here they are the non-pipelined mode's;
* reset values (VLR = 16, all mask bits set, R1 = F0 = 0, vector registers clear),
  clamping of VLR at 16, signed comparison, wrap-around arithmetic and address
  wrap-around;
* the host port, standing in for the FPGA board's host interface.

Where this RTL differs from what the published machine describes:

* **Memory pipelining.** In the published machine the processor sends one
  address and the eight data memories answer in consecutive cycles. Here every
  access carries its full 12-bit address, the row part repeating for eight
  elements; in pipelined mode this still gives one word per cycle.
* **Mask-controlled execution** is described as planned, not built, in the
  published machine, and is not built here either: VM does not gate elements.
* **Floating point** is absent, as in the published machine; F0 holds an integer.

## Files

| File | Contents |
|------|----------|
| `rtl/vp_pkg.sv` | sizes, types, opcodes, cycles per element, address mapping |
| `rtl/vector_computer.sv` | top: processor + memory system, host port |
| `rtl/vector_processor.sv` | fetch, decode, element sequencer, bus control |
| `rtl/vreg_file.sv` | 4 × 16 vector registers, 3 read ports, 1 write port |
| `rtl/scalar_regs.sv` | VLR, VM, R1, F0 and the one-cycle pre-processing instructions |
| `rtl/arith_unit.sv` | 16-bit add, subtract, multiply |
| `rtl/compare_unit.sv` | six signed comparisons |
| `rtl/addr_gen.sv` | unit, strided, indexed and direct element addresses |
| `rtl/memory_system.sv` | program memory, eight data memories, read-back multiplexing |
| `rtl/addr_decoder.sv` | memory map decoding |
| `rtl/dp_ram.sv` | dual-port synchronous RAM |
| `tb/vp_ref_pkg.sv` | instruction-level reference model and assembler helpers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_vector_computer.sv` | end-to-end: sparse 8×8 matrix–vector product, 4×4 matrix product, all remaining instructions, all at full size |
| `tb/tb_matmul.sv` | 8×8 and 16×16 matrix products |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; each has
a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vp_pkg.sv tb/vp_ref_pkg.sv tb/tb_vector_computer.sv \
    --top-module tb_vector_computer -o sim
./obj_dir/sim
```

Replace the testbench and top-module names for the others. The package files must
come first. Everything runs in seconds.

How far the RTL has been checked:

* `tb_vector_processor` runs one directed program that uses every instruction,
  then 30 random programs of random instructions, pipelined or not. After each it compares the data memory, all registers
  and the cycle count of every instruction with the reference model.
* `tb_vector_computer` loads and reads through the host port. It also runs every
  load and store in pipelined mode. It checks y = A·x
  and C = A·B against products computed directly, and checks the whole memory
  and the total cycles against the model. It also counts that every mechanism
  occurred: decode from the prefetch buffer, back-to-back one-cycle issue, a
  two-row load, short vectors, strided access, gather, scatter, pipelined loads
  and stores, comparison,
  mask count, vector sum, fill, index-vector creation and halt.
* The unit testbenches compare each module with independent models over random
  and corner-case inputs.

The reference model was written from the same instruction definitions as the
RTL, so it catches implementation slips but not a misreading shared by both. The
matrix results in the end-to-end tests are checked against plain arithmetic in
the testbench, independent of that model.
