# SQRD vector processor with group-sort QR-update

A small reconfigurable vector processor that computes the sorted QR
decomposition (SQRD) of 4x4 complex MIMO channel matrices, H P = Q R. It is
written in SystemVerilog for an LTE-A style receiver.

## The design idea

A brute-force SQRD recomputes everything whenever the channel changes. In
LTE-A the reference signals of antenna ports 0 and 1 come more often than
those of ports 2 and 3. So half of the time only two columns of H are new
("half-H renewal").

The processor takes advantage of this in two steps:

1. **Group sort.** Columns are sorted in two groups, {0,1} and {2,3}, by
   total group energy. Inside each group they are sorted by column energy.
   The weakest group goes left and the strongest goes right.
2. **QR-update.** After a half-H renewal, suppose the new sort leaves ports 2
   and 3 in the two left positions, in the same order as before. Then the two
   left columns of Q and R are still valid. Only the right 2x2 corner has to
   be redone:
   - form the two new R columns as Q_old^H h̃;
   - one complex Givens rotation nulls r(3,2);
   - that rotation is applied to Q columns 2 and 3;
   - R columns 2 and 3 are recomputed.

   In every other case the processor falls back to the brute-force
   Gram-Schmidt SQRD.

The choice between the two paths is made at run time. PE4 computes an
*update flag* while it sorts, and the program branches on that flag. The
sort rule can also be switched at run time by reloading one PE4
configuration word:

| Mode | Behaviour | Use |
|---|---|---|
| precise | all four columns sorted by energy | — |
| group | as described above | — |
| fixed | ports 0 and 1 always right, each group sorted internally | receivers that tolerate a weaker ordering |

## Architecture

```
           ME1 (128 x 32 instr)
               |
             PE1 master ----- configuration index per PE, every cycle
               |                  |        |        |        |        |
        +------+------------- cfg PE2 -- cfg PE3 -- cfg PE4   cfg PE5  cfg PE6
        v                         v        v        v          v        v
  ME2 register bank ---------> PE2 ----> PE3 ----> PE4 ---+   PE5      PE6
  16 x vec4, 16 scalars,     operand   4 lanes x  shift,  |  DIV/SQRT  CORDIC
  permutation, update flag   shaping   4 CMAC     sort    |     |        |
        ^   ^   ^                                         |     |        |
        +---+---+-----------------------------------------+-----+--------+
```

| Unit | File | Role |
|---|---|---|
| PE1 | `pe1_master.sv` | In-order controller. Reads the instruction at `pc` without a clock edge and issues it in the same cycle. |
| ME1 | `me1_imem.sv` | Instruction memory, 128 x 32 bit = 4 Kbit. |
| config memories | `cfg_mem.sv` | Five of them, one each for PE2–PE6, 16 x 32 bit. The host loads them; PE1 picks an entry every cycle. |
| ME2 | `me2_regbank.sv` | 16 vector registers, each holding 4 complex words. Aligned groups of four registers form one 4x4 matrix. Also holds 16 complex scalars, the permutation register and the update flag. |
| PE2 | `pe2_pre.sv` | Builds the two 4x4 operand sets for the lanes. |
| PE3 | `pe3_cmac.sv`, `pe3_lane.sv` | Four lanes. Each lane has four complex multipliers and an adder tree, so it produces one 4-element complex dot product per cycle. It has a 40-bit accumulator with *new*, *add* and *subtract* modes. |
| PE4 | `pe4_post.sv` | Arithmetic shift with round-half-up and saturation to 16 bits, element write masks, scalar extraction, and the three sort modes. Produces the permutation and the update flag. |
| PE5 | `pe5_divsqrt.sv` | Bit-serial restoring square root followed by a restoring division. Gives sqrt(x) and 1/sqrt(x) together, or a/b. |
| PE6 | `pe6_cordic.sv` | 16-iteration CORDIC. Vectoring mode gives \|a\| and angle(a); rotation mode gives a·e^(jθ). |
| top | `sqrd_top.sv` | Connects the units and exposes the host ports. |
| package | `sqrd_pkg.sv` | Types and configuration formats. |

### Number format

Data words are complex, with a 16-bit signed real part and a 16-bit signed
imaginary part, in Q3.13 format (1.0 = 8192). Accumulators are 40 bits per
part. PE4's shift field sets the output scaling of each vector operation.
Reciprocals use a configurable number of fraction bits; the programs use 11,
so values up to 16 are representable.

### Vector pipeline

A vector operation goes through three stages:

| Cycle | Stage |
|---|---|
| t | PE1 issues the operation. PE2 reads the register groups `ra` and `rb` and shapes the operands. |
| t+1 | PE3 multiplies and accumulates. |
| t+2 | PE4 post-processes the result without a clock edge; ME2 stores it at the end of the cycle. |

The next operation can issue every cycle. The first operation that can see
a result is the one issued in t+3.

There is no forwarding and no scoreboard. Instead, every instruction carries
a *sync* bit. An instruction with sync set waits until the vector pipeline
and both accelerators are idle. The programs set sync exactly where a result
is consumed. An accelerator start also waits while that accelerator is
busy.

### Operand shaping (PE2)

PE2 is what lets one matrix-vector datapath run every step of the
algorithm.

**Operand A** comes from the register group `ra`, in one of four modes:

| Mode | Lane *l* receives |
|---|---|
| rows | vector *l* |
| transpose | element *l* of each vector |
| diagonal | element *l* of vector `ra` only, for element-wise products |
| identity | unit vector e_l |

Operand A can also be conjugated, permuted, and have elements forced to zero.

**Operand B** comes in one of four modes:

| Mode | Every lane receives |
|---|---|
| broadcast | vector `rb`, through an element crossbar |
| rows | vector *l* of the group `rb` (per lane) |
| scalar | a scalar register in every element |
| one | 1.0 in every element |

Operand B can also be conjugated, permuted, have elements forced to zero,
and have elements negated.

**Permutation.** The "permute" option reads vector or element p through
`perm[p]`. So the sorted matrix H P is never stored: it is formed on the fly
from H and the permutation register.

With these modes one instruction computes any of the following:

| Result | How |
|---|---|
| Q^H·v | rows of Q, conjugated, against broadcast v |
| Q·r | transposed Q against broadcast r |
| column energies of H | diagonal H against conjugated H |
| v·scalar | — |
| r(k,k) placed into a vector | identity against a scalar |
| the Givens-rotated Q columns | transpose with negate and element swap on B |

## Instruction and configuration formats

| Bits | Field |
|---|---|
| [31:29] | opcode: NOP, VEC, ACC, BRU, BRN, JMP, HALT |
| [28] | sync |
| VEC [27:16] | configuration indices for PE2, PE3 and PE4 |
| VEC [15:0] | `ra`, `rb`, `rd` and a 4-bit element mask |
| ACC [27] | unit: 0 = PE5, 1 = PE6 |
| ACC [26:23] | configuration index |
| BRU / BRN / JMP [6:0] | target |

BRU branches when the update flag is set. BRN branches when it is clear.
HALT waits for every issued operation to retire and then raises `done`.

The configuration fields of each PE are the packed structs in `sqrd_pkg.sv`:

| Struct | Fields |
|---|---|
| `pe2_cfg_t` | operand modes and options above |
| `pe3_cfg_t` | accumulate mode |
| `pe4_cfg_t` | shift, vector write enable, mask mode, scalar write (element and destination), sort mode |
| `pe5_cfg_t` | operation, sources, destinations, fraction bits of the result |
| `pe6_cfg_t` | mode, sources, destination |

## The programs

The test program keeps this register map:

| Registers | Contents |
|---|---|
| v0..v3 | H, one column per antenna port |
| v4..v7 | Q |
| v8..v11 | R, by column |
| v12..v15 | temporaries |
| s0, s1, s2 | norm², norm, and 1/norm |

**Full-H renewal** (entry 0):
1. One operation computes the column energies; PE4 sorts them and writes the
   permutation.
2. Classical Gram-Schmidt over the permuted columns. For each column k:
   - r_{0..k-1,k} = Q^H h̃_k;
   - v = h̃_k − Q r_k, computed as "load h̃_k" followed by "subtract";
   - ‖v‖²;
   - sqrt and 1/sqrt on PE5;
   - q_k = v / ‖v‖;
   - r_kk is written into R with an element mask.

   The whole program is 28 instructions.

**Half-H renewal** (entry 30):
1. Sort.
2. `BRN` to the brute-force code if the update flag is clear.
3. Otherwise run the update: eleven instructions that form c and s from
   eq. (7) through PE5, rotate Q columns 2 and 3, and rewrite R columns 2
   and 3.

The rotation uses rows [c s; −s* c*], with c = r(2,2)*/z, s = r(3,2)*/z and
z = sqrt(|r(2,2)|² + |r(3,2)|²).

Q' = Q G^H. R columns 2 and 3 are then recomputed as Q'^H h̃. This needs no
additional operand shapes and gives the same result as applying G to R.

### Measured cycle counts (from start to done)

| Case | Cycles |
|---|---|
| full-H renewal, sort + brute-force SQRD | 262 |
| half-H renewal, QR-update path | 75 |
| half-H renewal, fallback to brute force | 263 |

Most of these cycles are spent waiting, not computing:
- PE5 takes 50 cycles for sqrt plus reciprocal. It is bit-serial: 16 cycles
  for the root and 32 for the division.
- Every dependent step waits out the 3-cycle pipeline.

The reference design quotes 5 cycles per QR-update and 7.5 cycles per QRD,
with four channel matrices interleaved. This implementation does **not**
reach those figures:
- It processes one matrix at a time.
- Four interleaved matrices would need 48 vector registers for H, Q and R,
  against the 16 available.
- A pipelined or higher-radix DIV/SQRT unit would be the first thing to
  change.

## Verification

Every block has its own self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_pe3_cmac` | Random operands and accumulate modes against an integer model; 1-cycle latency and one result per cycle. |
| `tb_pe2_pre` | Every operand mode and option against a model. |
| `tb_pe4_post` | Rounding, saturation, masks and scalar writes; all sort modes, tie rules and the update flag. |
| `tb_pe5_divsqrt` | Exact integer sqrt, floor reciprocal and floor quotient; latencies of 50 and 33 cycles. |
| `tb_pe6_cordic` | Magnitude, angle and rotation within 4 LSB; latency of 17 cycles. |
| `tb_me2_regbank`, `tb_cfg_mem`, `tb_me1_imem` | Every port, write priority and reset. |
| `tb_pe1_master` | Every opcode, sync stalls, branch outcomes and accelerator busy waits. |
| `tb_sqrd_top` | End to end; described below. |

`tb_sqrd_top` loads the program and configurations and runs 13 random
channel pairs: a full-H renewal followed by a half-H renewal, under group,
precise and fixed sorting. Each result is checked against a floating-point
Gram-Schmidt model:

- permutation;
- branch taken;
- Q^H Q = I;
- Q R = H P;
- R upper triangular;
- Q and R element by element on the brute-force path;
- the cycle counts above.

It also runs a short CORDIC program. It counts how often each mechanism
fired: update path, fallback, stalls, PE5 and PE6 starts, subtract mode, and
each sort mode.

Running a testbench with Verilator 5 (the package first; replace the
testbench name for the block tests):

```
verilator --binary --timing --assert -Wno-fatal rtl/sqrd_pkg.sv \
    $(ls rtl/*.sv | grep -v sqrd_pkg) tb/tb_sqrd_top.sv --top-module tb_sqrd_top
./obj_dir/Vtb_sqrd_top
```

## Where this design fills gaps

The following are this design's choices:

- the instruction set and the configuration word formats;
- the pipeline depth;
- the host ports;
- the ME2 group addressing;
- the scalar register count;
- the PE5 and PE6 algorithms;
- the Q3.13 data format;
- tie-breaking in the sort (lower column index first; in group mode, group
  {0,1} goes right on a tie).

What is taken from the reference design:

- the unit partitioning into PE1–PE6 and ME1–ME2;
- 16-bit precision;
- 16 vector registers;
- 16 configurations per PE;
- a 4 Kbit instruction memory;
- four lanes of four CMACs, with a one-cycle dot product;
- the group-sort rule and the QR-update.

The CORDIC unit is built and tested. The QR programs do not use it, because
PE5 and PE3 form the Givens coefficients directly.
