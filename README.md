# Gauss machine: a GEQRNS systolic array for complex arithmetic

The Gauss machine speeds up complex-valued signal processing: matrix
products, inner products, and pointwise vector sums and products. It avoids
carry chains and wide multipliers. Every complex integer is held as a set of
small residues, and arithmetic on each residue runs independently in a 7-bit
channel. Two number-theory tricks make each channel cheap:

* **QRNS (quadratic residue number system).** For a prime p = 4k+1 there is a
  ĵ with ĵ² ≡ −1 (mod p). The map a + jb → (z, z*) = (a + ĵb, a − ĵb) mod p
  turns a complex product into two *independent* modular products: z·w and
  z*·w*. A complex multiply-accumulate is therefore one multiply-add in each
  of two channels, with no cross terms.
* **Galois enhancement (GEQRNS).** GF(p) has a generator α, so every non-zero
  residue is α^e for a unique exponent e in 0..p−2. A modular product is then
  an addition of exponents modulo p−1, followed by one table lookup. No
  multiplier array is needed.

This RTL uses three primes, 113, 109 and 101, each with a z and a z* channel:
six 7-bit channels in all. Their product M = 1,244,017 gives a dynamic range
of 20.25 bits, so each real or imaginary result is exact within ±622,008. The
six channels are identical 2×2 meshes of multiplier-accumulator cells. They
run in lockstep under one controller, and converters at the edges translate
to and from ordinary signed integers.

```
 in_re/in_im ──► fwd_conv ──► input FIFO ──┐ west rows 0,1 / south columns 0,1
  (4 ports)      (per modulus)  (x4)       ▼
                        ┌──────────── 6 x pe_array (113 z, 113 z*, 109 z, ...) ────────────┐
                        │   (1,0) ─► (1,1) ─►   top row                                     │
                        │     ▲        ▲                                                    │
                        │   (0,0) ─► (0,1) ─►   bottom row  = vector processor lanes 0, 1   │
                        │     ▲        ▲                                                    │
                        └─────┴────────┴────────────────────────────────────────────────────┘
                                               ▼ east rows 0,1
                              east FIFO (x2) ──► rev_conv ──► out_re/out_im (2 ports)
                 array_controller: sequencing, FIFO reads/writes, mode
```

## Number representation inside the machine

This is the part that most needs understanding before the RTL will make
sense.

| where | form of each 7-bit digit |
|---|---|
| host ports | none: signed integers `in_re`, `in_im` (8 bits), `out_re`, `out_im` (21 bits) |
| input FIFOs and array operands | **exponent code**: e with α^e ≡ digit (mod p), e ∈ 0..p−2; **127 (all ones) = the residue 0** |
| product register, accumulator, east FIFOs | **residue** 0..p−1 |

* `fwd_conv` (one per modulus and input port) reduces a and b mod p. It
  forms z = a + ĵb and z* = a − ĵb, using ĵ = 15, 33 and 10 for 113, 109 and
  101. It then looks both up in an `nt_log` table.
* `geqrns_mult` adds two exponent codes with an 8-bit adder. It indexes one
  256-entry table holding α^(i mod (p−1)), so the mod p−1 correction and the
  exponentiation are a single lookup. Any code ≥ p−1 means zero and forces a
  zero product.
* `rev_conv` undoes the QRNS map for each modulus: re = ½(z+z*),
  im = ½ĵ⁻¹(z−z*) mod p. It then applies the Chinese Remainder Theorem,
  X = Σ m_i⟨m_i⁻¹x_i⟩ mod M with m_i = M/p_i, and reads X > (M−1)/2 as
  negative.
* Generators: α = 3 for 113, 6 for 109, 2 for 101. Every table (logarithm,
  exponent, constants) is computed at elaboration by the constant functions
  in `gauss_pkg`, so there are no data files.

Overflow is not detected, as in any residue system. A result outside ±622,008
wraps modulo M. With 8-bit inputs of magnitude ≤ 100, an inner dimension of
up to about 30 is safe.

## The processing element (`mac_pe`)

Each cell has three register stages:

1. input registers for the west operand a and the south operand b. Their
   outputs also drive `east_o` and `north_o`, so operands move one cell per
   cycle;
2. a product register holding `geqrns_mult(a, b)`;
3. the accumulator, `acc <= (acc + prod) mod p`, done as one add and a
   conditional subtract.

An operand pair presented in cycle t is in the accumulator at the end of
cycle t+2.

**Shift-out.** While `shift` is high, `acc <= west_i` and `east_o = acc`, so
the accumulators of a row form a shift register. A residue 0 fed in at the
west edge clears them as the results leave, which readies the array for the
next block with no extra cycles.

**Vector tags.** `first_i` and `last_i` travel with the operand. A product
tagged *first* is loaded into the accumulator instead of added, which starts
a new group. One cycle after the *last* product is added, `res_valid_o`
pulses and `acc_o` holds the group result.

## Array mode: 2×2 blocks of a matrix product (`OP_MATMUL`)

For C = A·B with A m×n and B n×r, the host cuts C into 2×2 blocks. For each
block (rows 2i, 2i+1 of A; columns 2j, 2j+1 of B) it writes:

* west FIFO 0: A[2i][0..n−1] and west FIFO 1: A[2i+1][0..n−1];
* south FIFO 0: B[0..n−1][2j] and south FIFO 1: B[0..n−1][2j+1].

Odd m or r are padded with zero rows or columns. The command is
`cmd_len = n` and `cmd_cnt = number of blocks`. For every block the
controller:

| cycles | phase | what happens |
|---|---|---|
| 0 … n | FEED | row 0 / column 0 read in cycles 0…n−1; row 1 / column 1 read in cycles 1…n (the sloped data front); unread inputs get the zero code |
| n+1 … n+3 | DRAIN | the last operands reach cell (1,1)'s accumulator |
| n+4, n+5 | SHIFT | east FIFO r receives C[2i+r][2j+1], then C[2i+r][2j] |

A block takes **n + 6 cycles**, so the whole product takes
⌈m/2⌉·⌈r/2⌉·(n+6) cycles. The next block's FEED starts directly after the
shift, provided its operands are buffered. Before each block the controller
waits (state WAIT, output `waiting`) until every input FIFO holds n words and
the east FIFOs have room. Once a block has started it never stalls.

## Vector mode: the bottom row as a two-lane vector processor

In vector mode the bottom cells (0,0) and (0,1) are lanes 0 and 1. Lane k
takes a from west FIFO k and b from south FIFO k, and its group results go to
east FIFO k. The top row receives zero operands. `cmd_len` is the number of
words per lane. The usual split is even-indexed elements to lane 0 and odd to
lane 1, padding lane 1 with a zero for odd N.

| command | cmd_cnt | result per lane | cycles |
|---|---|---|---|
| `OP_VMUL` pointwise product | – | one product per word | len + 3 (N/2 + 3 for length N) |
| `OP_VADD` group sums (b forced to 1, south FIFOs unused) | group size K | sum of each K consecutive words | len + 3 |
| `OP_VMAC` multiply-accumulate groups | group size | Σ a·b per group | len + 3 |

To add K vectors of length N, write them element-major into the west FIFOs.
Word t of lane k is element 2⌊t/K⌋+k of vector t mod K, and `cmd_cnt = K`.
This takes K·N/2 + 3 cycles. An inner product of length N (`OP_VMAC` with the
group size set to the words per lane) leaves two partial sums, one per lane.
Their final sum is left to the host. A matrix-vector product y = A·v
(a level-2 operation) is a run of inner products: lane k takes the rows
2q+k of A, each row as one `OP_VMAC` group, with v repeated in the south
FIFOs. Each lane then delivers one element of y per group.

## Host-side interface (`gauss_machine`)

* `in_wr[k]`, `in_re[k]`, `in_im[k]`, `in_full[k]`: push one complex operand
  into input FIFO k (0, 1 = west rows 0, 1; 2, 3 = south columns 0, 1).
* `cmd_valid`/`cmd_ready`, `cmd_op` (`gauss_pkg::op_e`), `cmd_len`,
  `cmd_cnt`: start a command. It is accepted only when idle.
* `out_rd[k]`, `out_re[k]`, `out_im[k]`, `out_empty[k]`, `out_count[k]`: east
  FIFO k. The head is always shown, already converted, and `out_rd` pops it.
* `busy`, `waiting`, `done` (one-cycle pulse), `op_cycles`: the number of
  cycles from the first FEED cycle to the end of the last command.

Parameters: `DEPTH` = 1024 words per FIFO, `IN_W` = 8, `OUT_W` = 21,
`LW` = 16. Reset is synchronous and active low. There is one clock.

## Defect tolerance: a spare cell and a spare modulus (`gauss_top`)

Residue arithmetic splits a machine into independent pieces: cells of one
channel, and whole channels (moduli). A die with a fatal defect in one piece
can therefore still be used if there is a spare piece. Two such schemes are
built here, beside the machine in the top level `gauss_top`. They share only
the clock and reset with it.

**Spare cell in a linear array (`bypass_linear_array`).** There are N_WORK + 1 = 5
physical `mac_pe` cells (p = 113) in one row, using the same dataflow as a
row of the mesh. The a operands enter at the west and move east. Logical cell
j takes its b operands from `south_i[j]` one cycle after cell j−1, and sums
c_j = Σ a_k·b_kj in place. `bypass_idx` names the physical cell to switch
out:

* its west input is wired straight to the next cell, a plain mux with no
  register, so the timing does not change;
* it receives the zero code as its b operand;
* the cells after it take the next lower logical index, i.e. the
  south-input routing moves down by one.

The four working cells then behave exactly like a four-cell array with no
spare. `bypass_idx = 4` (the east-most cell) is the setting with no defect.
During shift-out `east_o` gives c_3 first, then c_2, c_1 and c_0. Because a
cell that rejoins the chain may still hold an old sum, shift zeros through
all five cells (or reset) after changing `bypass_idx`.

**Spare modulus (`spare_modulus_crt`).** A machine with five moduli
(113, 109, 101, 97, 89) needs only four. If one single-modulus array is bad,
its residue is ignored and the CRT rebuilds the value from the other four:
X = Σ_{i≠d} m_i⟨m_i⁻¹x_i⟩ mod M_d, with M_d the product of the four moduli
kept. The block holds one constant-coefficient CRT per choice of `drop` and a
mux. Results are exact for |X| ≤ 47,520,948, half of the smallest
four-modulus range 89·97·101·109. `drop = 4` leaves out the spare (89). The
CRT works on one real component. A complex result uses two of them, after the
inverse QRNS map. The 2×2 machine itself still has three moduli: the
five-modulus reconstruction is built on its own, to show the scheme.

The testbenches switch out every cell and discard every modulus in turn. They
force the switched-out cell's output to garbage, or put a random value on the
discarded residue, and check that the results do not change.

## Performance against the published figures

`tb/tb_table1.sv` runs the published workloads at the default parameters. It
checks every result and counts cycles:

| workload | cycles | rate at 10 MHz | published |
|---|---|---|---|
| 2×2 complex matrix product | 8 | 1.25 M/s | 1.25 M/s |
| 4×4 complex matrix product | 40 | 250 K/s | 250 K/s |
| 10×10 complex matrix product | 400 | 25.0 K/s | 26.7 K/s |
| 1000-point pointwise product | 503 | 19.9 K/s | 20 K/s |
| 1000-point pointwise sum | 1003 | 10.0 K/s | 10 K/s |

The 10×10 figure differs because the published table and the published
formula disagree: ⌈10/2⌉²·(10+6) = 400 cycles, not 375. This design follows
the formula. The published vector-addition formula, KN+3 cycles, also
conflicts with its own table (10 K/s needs about 1000 cycles for two
1000-point vectors). This design follows the table, spreading the work over
both vector lanes, so KN+3 holds per lane.

## How far to trust it, and where it departs from the original

Taken from the published design:

* the 2×2 mesh with unidirectional flow and FIFOs on the west, south and east
  ports;
* seven-bit GEQRNS channels, three moduli with z and z* channels, and p = 113
  with α = 3;
* the log, add, mod-(p−1) and exponentiate multiplier with a combined
  2^(N+1)-entry table, and the zero exception;
* accumulation in place with shift-out, the data skew of the matrix example,
  the vector subarray on two PEs, and the cycle counts.

Chosen here, because the source gives no details:

* moduli 109 and 101 and their generators. They are picked to reproduce the
  stated 20.2-bit / 122 dB range;
* the zero code (127), the shift mechanism, the vector tags and the
  vector-mode routing (lane k = bottom cell k, FIFO k in and out);
* FIFO depth and interface, the input and output widths, the command set and
  its encoding, the data order in the FIFOs, and waiting for a full block's
  operands;
* a hardwired controller. The prototype used a commercial microsequencer
  whose program is not published;
* converters in hardware at the array edges. The original host may have done
  part of this in software;
* the accumulator's modular adder is arithmetic (add and conditional
  subtract), not a lookup table.

Not built: the host interface processor (a 68030 with SCSI and serial links)
and the microsequencer part itself. The host-side ports stand in for them.
The two defect-tolerance schemes follow the published idea (switch out one
bad cell of a linear array; discard one bad modulus array given a spare) and
its sizes (four working cells plus one; four moduli plus one). How the bypass
is wired and set, what the linear array computes, the extra moduli and the
CRT form are this design's own. Defect tolerance inside the exponentiation
table is mentioned in the source but not described, and is not built. The
VLSI cell is represented by `mac_pe`
with its default p = 113, α = 3. Its layout-level details are not public.

Every module has a self-checking testbench. The reference values are
computed independently, by brute-force powers and logarithm search and plain
integer complex arithmetic. Each testbench has also been shown to fail on a
deliberately broken copy of its module.

## Files

| file | contents |
|---|---|
| `rtl/gauss_pkg.sv` | widths, moduli, generators, `qword_t`, `op_e`, table-building functions |
| `rtl/nt_log.sv` | logarithm table |
| `rtl/geqrns_mult.sv` | exponent-domain modular multiplier |
| `rtl/mac_pe.sv` | processing element |
| `rtl/pe_array.sv` | one channel: 2×2 mesh and vector routing |
| `rtl/fifo.sv` | show-ahead synchronous FIFO |
| `rtl/fwd_conv.sv`, `rtl/rev_conv.sv` | integer ↔ QRNS conversion |
| `rtl/array_controller.sv` | command sequencer |
| `rtl/gauss_machine.sv` | the machine: converters, FIFOs, six channels, controller |
| `rtl/bypass_linear_array.sv` | linear array with a spare cell |
| `rtl/spare_modulus_crt.sv` | five-modulus CRT that discards one modulus |
| `rtl/gauss_top.sv` | top level: the machine plus both defect-tolerance blocks |
| `tb/gauss_ref_pkg.sv` | independent reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_gauss_top` (whole design end to end, default parameters), `tb_gauss_machine` (the machine end to end) and `tb_table1` (published workloads) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. From the
directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gauss_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gauss_pkg.sv tb/gauss_ref_pkg.sv \
  tb/tb_gauss_top.sv -o sim && obj_dir/sim
```

Replace `tb_gauss_top` by any other `tb_*` module. Each run takes
seconds. To lint the design: `verilator --lint-only -Wall -y rtl
+libext+.sv rtl/gauss_pkg.sv rtl/gauss_top.sv`.

To change the moduli, edit `MODULI` and `ALPHAS` in `gauss_pkg`. Each must be
a 7-bit prime of the form 4k+1 with a primitive root. Then adjust `OUT_W` to
cover the new M.
