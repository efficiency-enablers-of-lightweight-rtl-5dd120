# napCore: a small SIMD floating-point core for complex vector arithmetic

napCore is a programmable processor for the linear algebra in MIMO radio
receivers. That work means many small complex matrix and vector operations,
for example 2×2 and 4×4 Gram matrices, their inverses and matrix-vector
products, with one such operation per OFDM subcarrier. The core has three main
features:

* **Wide complex data path.** Each instruction operates on a vector of P = 4
  complex floating-point numbers. The four complex lanes use 16 real
  multipliers and 8 + 8 + 4 real adders. One vector register holds exactly one
  2×2 matrix, stored row by row. Larger matrices are handled block-wise
  ("divide and conquer").
* **Small permutation networks in front of the multipliers, and configurable
  adder trees behind them.** With these, one instruction can compute half a
  2×2 matrix product, a 2×2 matrix-vector product, a 2×2 determinant, an
  adjugate or a 4-element inner product.
* **Run-time precision control ("numerically aware processing").** A
  configuration instruction sets how many mantissa bits stay alive. Every
  operand and every arithmetic result has its lower mantissa bits forced to
  zero. The arithmetic units stay the same size, but fewer wires toggle, which
  saves energy when the algorithm tolerates lower precision.

The RTL is synthesizable SystemVerilog. The top module is `napcore` (`rtl/napcore.sv`).

## Number format

Each real number uses the format **s1m12e6**:

| Field | Bits | Notes |
|---|---|---|
| `sgn` | 1 | sign |
| `exp` | 6 | biased exponent, bias 31 |
| `man` | 12 | mantissa, with a hidden leading one |

* The value is (−1)^s · 1.man · 2^(exp−31).
* A complex number is {re, im} = 38 bits.
* A vector of four complex numbers is 152 bits. This is also the width of a
  vector-memory word.
* `exp == 0` means zero. There are no subnormals, infinities or NaNs.
* Overflow saturates to the largest magnitude. Underflow flushes to zero.
* Results are **truncated**, not rounded. This matches the masking, which also
  just clears low bits.

`MW`, `EW`, `P` and the memory sizes are `localparam`s in `rtl/napcore_pkg.sv`.
Changing `MW`/`EW` changes the format everywhere. Only the default s1m12e6 has
been simulated.

### Mantissa masking

`SETPREC k` (k = 0..12) sets the number of mantissa MSBs that survive.

* The value of `k` in force when an instruction is decoded travels with that
  instruction down the pipeline. Changing precision therefore takes effect on
  the very next instruction, with no pipeline flush.
* Masking is applied to all of the following:
  * the operands acquired in decode;
  * the third operand read in EX2;
  * the output of every multiplier and every adder;
  * load data and reciprocals as they enter the pipeline in EX1.
* The masking unit (`mant_mask`) is simply `man & keep_mask(k)`, applied to
  both the real and the imaginary part.

### Reciprocal (Newton-Raphson)

Division is replaced by a reciprocal, `VINV`, computed with Newton-Raphson
iterations. The unit is `nr_inv`; each lane has one.

* The mantissa m ∈ [1,2) has its reciprocal in (0.5,1]. The exponent is simply
  negated, and only the mantissa is iterated, in 18-bit fixed point:
  y ← 2y − y²·m.
* The start value is picked from two choices. The range (0.5,1] is split into
  two equal halves, giving y₀ = 0.875 when m < 4/3 and y₀ = 0.625 otherwise.
  After four iterations the result is accurate to the full 12-bit mantissa.
* One iteration is done per clock cycle. A `VINV` instruction therefore
  occupies EX1 for 4 cycles, and decode and fetch are held meanwhile.
* `VINV` inverts the **real part** of each lane. For the Hermitian
  positive-definite matrices of MMSE detection the determinant is real, so
  this is all that inversion needs. A general complex 1/z can be built in
  software as conj(z) · 1/|z|².

## Pipeline

```
PFE ─ FE ─ DC ─ EX1 ─ EX2 ─ RED1 ─ RED2 ─ WB
 │     │    │     │     │      │      │     └ write vREG lanes / sREG / VMEM
 │     │    │     │     │      │      └ 2 complex adders, forward vREG, lane map
 │     │    │     │     │      └ 4 complex adders, inputs chosen from EX2 results or vREG
 │     │    │     │     └ 8 real adders: complex products, conjugation; 3rd operand read
 │     │    │     └ permutation networks, 16 real multipliers, 4 NR reciprocal units, load data
 │     │    └ decode, operand acquisition, bypassing, masking, branches
 │     └ instruction word arrives
 └ program-memory address
```

**Fetch (`fetch_unit`, `pmem`).**
* The program counter addresses the 1024×32 program memory in PFE, and the
  word arrives one cycle later in FE.
* A stall in DC freezes PC, FE and DC together. The memory read enable is
  dropped so the word is held.
* Jumps and `DJNZ` are resolved in DC. A taken branch kills the instruction
  behind it, so it costs two cycles.
* `HALT` stops fetching. `busy` falls once the pipeline has drained.

**Decode and operand acquisition (`decoder`, `prepop_dc`, `bypass_unit`).**
Operand one and operand two can each be one of:

| `sel` | Operand |
|---|---|
| `VEC` | a whole vector register |
| `SBC` | a scalar register broadcast to all lanes |
| `EBC` | one element of a vector register broadcast to all lanes |
| `SCAL` | a scalar register in lane 0, other lanes zero |

For every lane of the source, a bypass unit looks for the youngest in-flight
instruction that writes that lane (see "Hazards"). Four masking units then
apply the precision.

**EX1 (`ex1_stage`, `perm_net`).** Operand one and operand two each pass through a small
permutation network, then go into 4 complex multipliers. Each complex
multiplier is four real multipliers producing the partial products rr, ii, ri
and ir. The networks work as follows:

* Operand one goes through a row select (hilo1/hilo2), which picks row 0 or
  row 1 of a 2×2 matrix for each lane pair. It then goes through crossbar cb1:
  pass, duplicate even elements, duplicate odd elements, or swap pairs.
* Operand two goes through crossbar cb2 (2×2 transpose), then the same row
  selects, then crossbar cb3: pass, reverse, adjugate pattern [x3, −x1, −x2,
  x0], or swap pairs.

EX1 also holds the four Newton-Raphson units. It passes vector-memory read
data into the pipeline for `LD`.

**EX2 (`ex2_stage`, `prepop_ex2`).**
* Eight adders form re = rr − ii and im = ri + ir.
* Conjugating operand one or operand two flips the signs of the relevant
  partial products, so H^H is free.
* The third operand (`rc`) is read from the vector register file here and
  masked.

**RED1 / RED2 (`red1_stage`, `red2_stage`).**
* RED1 has four complex adders. Each adder takes one EX2 result as x. Its y
  input is another EX2 result or a lane of the third operand. A disabled adder
  passes its own lane through.
* RED2 has two more adders, whose inputs are RED1 outputs or the third
  operand. Each output lane then takes the RED1 value, adder 0 or adder 1.

Inner products use adders 0/1 of RED1 and adder 0 of RED2 as a reduction tree.
Accumulation uses RED1 with the third operand.

**Write-back.** A write-back register after RED2 writes one of the following:
* chosen lanes of a vector register (the file is four separate banks, so
  single lanes can be written);
* a scalar register;
* a vector-memory word.

### Hazards and bypassing

Each instruction carries `vstage`, the number of arithmetic stages after which
its result is final:

| vstage | Instructions |
|---|---|
| 1 | LD, VINV |
| 2 | VMUL, MOV, MM2A, ADJ2, ST |
| 3 | VADD/VSUB, VMAC, MM2B, MV2, DET2 |
| 4 | VDOT, MV2A |

The bypass network checks five in-flight positions, youngest first: EX1, EX2,
RED1, RED2 and write-back.

* A position whose instruction writes the wanted register lane supplies the
  operand if it has already finished `vstage` stages.
* Otherwise DC stalls one cycle and inserts a bubble.
* Each lane is searched separately, because instructions may write single
  lanes.

Three more hazard rules apply:
* **Third operand (EX2 read, no bypass).** DC waits until the producer has
  reached RED2 or later. That way the value is in the register file by the
  time the consumer reaches EX2.
* **Loads after stores.** A load waits while a store to vector memory is still
  in flight.
* **Writing the vector register file.** It has one write port, and all results
  retire in order from the single write-back register, so there are no
  write-write conflicts.

With this scheme, independent instructions issue one per cycle. The
full-size testbench's 16-VDOT matrix-vector program runs with zero stalls.

## Instruction set

32-bit instructions. The fields are:

| Bits | Field | Meaning |
|---|---|---|
| [31:27] | op | opcode |
| [26] | ds | destination is a scalar register |
| [25:22] | rd | destination register |
| [21:18] | ra | operand one |
| [17:14] | rb | operand two |
| [13:10] | rc | third operand; for lane writes, `rc[1:0]` is the lane |
| [9:8] | asel | operand-one selection (VEC/SBC/EBC/SCAL) |
| [7:6] | ael | operand-one element for EBC |
| [5:4] | bsel | operand-two selection |
| [3:2] | bel | operand-two element for EBC |
| [1] | cja | conjugate operand one |
| [0] | cjb | conjugate operand two |

Immediates:

| Instructions | Immediate |
|---|---|
| LD/ST | address in [17:9] |
| JMP/DJNZ | target in [9:0] |
| SETLC | count in [15:0] |
| SETPREC | kept mantissa bits in [4:0], clamped to 12 |

| op | Mnemonic | Result |
|---|---|---|
| 0 | NOP | |
| 1 | HALT | stop fetching |
| 2 | JMP t | PC ← t |
| 3 | SETLC n | loop counter ← n |
| 4 | DJNZ t | if counter ≠ 0: counter−1, PC ← t |
| 5 | SETPREC k | keep k mantissa bits |
| 6 | LD rd, [a] | vREG[rd] ← VMEM[a] |
| 7 | ST [a], ra | VMEM[a] ← vREG[ra] |
| 8 | MOV | rd ← A. With bit 5 set, only lane rc[1:0] is written (element insert) |
| 9/10 | VADD / VSUB | rd ← A ± vREG[rc] |
| 11 | VMUL | rd ← A ⊙ B (lane-wise) |
| 12 | VMAC | rd ← A ⊙ B + vREG[rc] |
| 13 | VDOT | Σ A ⊙ B. With ds, writes sREG[rd]; otherwise writes lane rc[1:0] of vREG[rd] |
| 14 | MM2A | (2×2) A·B using column 0 of A and row 0 of B. Bit 4 selects B^T |
| 15 | MM2B | the same for column 1 / row 1, plus vREG[rc]. MM2A then MM2B gives A·B |
| 16 | MV2 | 2×2 matrix A times the 2-vector in half h = bit 4 of B, written to half bit 5 of rd |
| 17 | MV2A | MV2 plus the matching half of vREG[rc] |
| 18 | DET2 | a00·a11 − a01·a10 of B, written like VDOT |
| 19 | ADJ2 | A ⊙ adj(B); with A = 1/det broadcast, this is B⁻¹ |
| 20 | VINV | lane-wise 1/re(A) |

Example, the 2×2 MMSE equaliser for one subcarrier. H^T is in r1 and y in r2;
`tb/tb_napcore.sv` contains this code, extended with the SINR:

```
MM2A r3, r1, r1   (conj A, B^T)    ; H^H H, first half
MM2B r3, r1, r1, r3 (conj A, B^T)  ; H^H H
MV2  r4, r1, r2   (conj A)         ; H^H y
VADD r3, r3, r_n0I                 ; + N0 I
DET2 s1, r3
VINV r5, s1 (broadcast)            ; 1/det in every lane
ADJ2 r6, r5, r3                    ; (H^H H + N0 I)^-1
MV2  r7, r6, r4                    ; x = A^-1 H^H y
```

## Memories and host interface

* **Program memory:** 1024×32.
* **Vector memory:** 512×152 in two banks of 256. The address MSB selects the
  bank. It has one read port and one write port.
* Both are written as plain arrays with synchronous reads, so synthesis can
  map them onto SRAM macros.

While `busy` is low, the host can:
* write the program through `pm_we`/`pm_waddr`/`pm_wdata`;
* read and write the vector memory through `host_vm_*`. Read data appear one
  cycle later on `vm_rdata`. An assertion flags host accesses while the core
  runs.

A one-cycle `start` pulse runs the program from address 0. Reset selects full
precision. A precision set by `SETPREC` stays in force into the next run, so
programs should set it first. `cycles` and
`stalls` report the length of the last run and the number of cycles DC was
held.

## Verification

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog. Floating-point results are
compared against `real` arithmetic, using the helpers in `tb/tb_fp_pkg.sv`.
Tolerances are relative: a few units of the last mantissa place for single
operations, and up to a few percent for whole programs. Bit-exact blocks (masking, permutation,
register files, memories, bypassing) are compared exactly.

`tb/tb_napcore.sv` drives the complete core through its host ports with three
programs:

1. **Mechanism test.** It covers:
   * every instruction;
   * bypassing from each stage;
   * per-lane writes;
   * third-operand and load/store stalls;
   * NR stall;
   * taken and not-taken branches;
   * loops;
   * precision changes.

   A counter for each of these 16 mechanisms must end non-zero.
2. **2×2 and 2×4 MMSE equalisation and per-stream SINR**, each for six
   subcarriers with N0 = 0.5. The results are compared with a `real`
   reference. The same setups also run one MMSE-PIC step, which works the
   same way as the 4×4 iterative run described below. The 2×2 matrix
   inverse in both is `DET2`, `VINV`, `ADJ2`. Each program runs once with one
   subcarrier at a time. It runs again with two or three subcarriers
   interleaved instruction by instruction, each in its own registers.
3. **4×4 matrix times four vectors** with 16 `VDOT`s. This must run with no
   stalls.

`tb/tb_mimo_dnq.sv` runs open-loop MMSE detection with four transmit antennas
and four or eight receive antennas. Each run covers four subcarriers. The 4×4
matrix A = H^H H + N0 I is held as four 2×2 blocks [a b; c d] and inverted
block-wise:

```
ai = a⁻¹,  e = c·ai,  f = ai·b,  S = d − e·b,  Si = S⁻¹
A⁻¹ = [ ai + f·Si·e   −f·Si ]
      [ −Si·e          Si   ]
```

* Each 2×2 inverse is `DET2`, `VINV`, `ADJ2`.
* The channel streams in from the vector memory two 2×2 blocks at a time.
* x and the four blocks of A⁻¹ are compared with a complex Gauss-Jordan
  reference.
* The SINR of each stream, 1/(N0·[A⁻¹]kk) − 1, is computed from the diagonal
  of the inverse.
* An iterative run does one step of MMSE parallel interference cancellation
  (MMSE-PIC) for 4×4 and 4×8. Its inputs are soft symbols s and symbol variances λ.
  * It forms A = H^H H Λ + N0 I and inverts it with the same block program.
  * It returns, for each stream k, the interference-cancelled estimates
    x̂_k = w_k^H ŷ_k / (w_k^H h_k) and their SINRs.
  * The program never builds the cancelled vectors ŷ_k. Instead it uses
    A⁻¹ H^H H Λ = I − N0 A⁻¹, which gives w_k^H h_k = (1 − N0·[A⁻¹]kk)/λ_k.
  * The reference evaluates the defining formulas directly.
* One 4×4 run switches precision per section with `SETPREC`: 10 mantissa bits
  for the products, 11 for the inversion and 4 for the SINR. It then checks
  both the values and that no result carries more mantissa bits than its
  section allows.
* The program places independent matrix products next to each other, so that
  the second half of one product does not wait for the first half of the same
  product.

Simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
  rtl/napcore_pkg.sv tb/tb_fp_pkg.sv rtl/napcore.sv tb/tb_napcore.sv \
  --top-module tb_napcore
./obj_dir/Vtb_napcore
```

`tb_mimo_dnq` builds the same way, with `tb/tb_mimo_dnq.sv` and
`--top-module tb_mimo_dnq`. For a block testbench, replace `rtl/napcore.sv tb/tb_napcore.sv` and the top
name with the block's files, for example `rtl/fp_add.sv tb/tb_fp_add.sv
--top-module tb_fp_add`.

## What is this design's own, and how it differs from the original description

* **Instruction set and encoding.** The original describes the data path, the
  pipeline and a "versatile" instruction set, but gives no opcodes or encoding.
  Everything in the ISA section above is this design's own, including:
  * control flow (`JMP`, `SETLC`/`DJNZ`, `HALT`);
  * the host load ports.
* **Register counts.** There are 16 vector and 16 scalar registers. The
  original does not give the counts.
* **Hazard handling in detail.** The original describes the stage index that
  travels with each instruction and bypassing from every arithmetic stage.
  This design adds its own rules:
  * stalling when a result is not ready yet;
  * the third-operand rule;
  * the load/store rule;
  * the two-cycle branch penalty;
  * the extra write-back register after RED2.
* **Permutation patterns.** The original names hilo1/hilo2, cb1 (repeat an
  element), cb2 (transpose) and cb3 ("for matrix inversion"). The exact cb1
  and cb3 pattern sets, and the negation in the adjugate pattern, are chosen
  here.
* **Reciprocal.** The reciprocal works on the real part only, with an 18-bit
  fixed-point iterate. The iteration, the two-choice start value and the four
  iterations follow the original.
* **Rounding.** Rounding is truncation, and zero, saturation and the bias are
  defined here.
* **Cycle counts.** The test programs are hand-written. Unless a row says
  otherwise, they process one subcarrier after the other. The original's
  counts include equalisation and SINR computation.

  | Detection | Test programs (cycles/subcarrier) | Original (cycles) |
  |---|---|---|
  | 2×2, with SINR | 53.8 | 22 |
  | 2×2, with SINR, 3 subcarriers interleaved | 27.8 | 22 |
  | 2×4, with SINR | 59.8 | 24.5 |
  | 2×4, with SINR, 2 subcarriers interleaved | 37.3 | 24.5 |
  | 4×4, with SINR | 142 | 80 |
  | 4×8, with SINR | 181 | 101 |
  | 2×2 iterative (MMSE-PIC), with SINR | 72.8 | 32.5 |
  | 2×2 iterative, 2 subcarriers interleaved | 49.8 | 32.5 |
  | 2×4 iterative (MMSE-PIC), with SINR | 78.8 | 35 |
  | 2×4 iterative, 2 subcarriers interleaved | 53.8 | 35 |
  | 4×4 iterative (MMSE-PIC), with SINR | 172 | 112 |
  | 4×8 iterative (MMSE-PIC), with SINR | 211 | 137 |

  Rows not marked iterative are open-loop detection. Most of the gap is stall
  cycles in the serial dependency chain: determinant → reciprocal → adjugate →
  products → SINR reciprocal. Interleaving subcarriers one instruction at a
  time hides much of it:
  * the 2×2 program needs four vector registers per subcarrier, so three
    subcarriers fit beside the two constant registers;
  * the 2×4 program and the 2×2 and 2×4 MMSE-PIC programs need six, so two
    fit;
  * for 4×4 and larger a second subcarrier needs more registers or spills to
    the vector memory, and this has not been written.

  The original's counts are not reproduced here. They imply either a tighter
  schedule or different latencies.
* **Not simulated.** No program has been written for:
  * LLR computation;
  * the mapping from LLRs to soft symbols and variances. The iterative test
    receives these values as inputs.
* **Not modelled.** Area, timing, power and energy of the implementation are
  outside what RTL simulation can show. That covers the format sweep, the
  400 MHz layout and the energy per detection.
