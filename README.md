# Approximate arithmetic for tactile (e-skin) signal and data processing

An electronic skin produces a steady stream of small, noisy samples from an
array of piezoelectric taxels. The processing that turns them into a touch
classification (filtering, then feature extraction by CORDIC-based angle
computations and a singular value decomposition) does not need exact
arithmetic, and the multipliers and adders dominate its power. This design
collects the hardware side of that idea in SystemVerilog:

* a family of **approximate adders** whose low bits are computed by cheap,
  inexact cells, including a new cell (AFA) whose carry saturates;
* two **approximate 8-bit multipliers**: *META*, which rounds both operands
  to powers of two so that a product needs only shifts and adders, and
  *Approx-BW*, an array multiplier whose low product columns are summed with
  AFA cells;
* three **application blocks** that use them: a 16-tap transposed FIR
  low-pass filter with Approx-BW multipliers, a 32-bit iterative CORDIC with
  lower-part-OR adders, and a Jacobi SVD engine whose rotation multipliers are
  Approx-BW.

The application blocks are separate case studies; the top level
`eskin_dsp_top` places them side by side, each with its own ports.

## Approximate adders (`approx_adder`, `approx_pkg`)

An N-bit adder is split into an exact upper part of N-K bits (ripple carry)
and an inexact lower part of K bits. `KIND` picks the lower part:

| kind  | lower-part sum bit                    | carry into the upper part        |
|-------|---------------------------------------|----------------------------------|
| AXA   | A XNOR B                              | exact majority carry, rippled    |
| NANDC | (A XNOR B) XOR Cin, carry = A NAND B  | rippled                          |
| ANDC  | A XOR B XOR Cin, carry = A AND B      | rippled                          |
| AFA   | carry = Cin OR AB, sum = carry OR (A XOR B) | rippled                    |
| LOA   | A OR B                                | A[K-1] AND B[K-1]                |
| IPP   | (A_i XOR B_i) OR (A_{i-1} AND B_{i-1}) | A[K-1] AND B[K-1]               |
| ETA   | control chain from bit K-1 down: from the first position with A = B = 1, that bit and all lower bits are 1 | none |
| RCA   | exact                                 | exact                            |

The one-bit cells are functions in `approx_pkg` returning `{carry, sum}`, so
adders and the multiplier array can chain them in generate loops. The AFA
cell is the one that matters most below: once its carry-in is one, both its
outputs are one, so a single saturated position forces every position that
follows in the chain to one.

## META multiplier (`meta_mult`, `meta_rounder`, `sign_extract`, `sign_set`)

With Mr and Nr the powers of two nearest to the magnitudes M and N,

    M*N = Mr*N + Nr*M - Mr*Nr + (Mr - M)(Nr - N)

and the last term, small when both operands are close to a power of two, is
dropped. The datapath is purely combinational:

1. `sign_extract` takes the two's complement magnitudes and signs;
2. `meta_rounder` rounds each magnitude to a one-hot power of two
   (3*2^(p-2) and above round up to 2^p, so 3 rounds to 2, 6 to 8) and gives
   its base-two logarithm;
3. three shifters form Mr*N, Nr*M and Mr*Nr;
4. a 16-bit ETA adder with 8 inexact bits adds the first two (`USE_ETA = 0`
   puts an exact adder there: the MRCA variant);
5. an exact subtractor removes Mr*Nr and `sign_set` negates the result when
   the operand signs differ (`SIGNED = 0` drops steps 1 and 5: the unsigned
   U-META / U-MRCA variants).

The ETA is a significant error source for small operands: for -4 * 8 the
sum 32 + 32 has bit 5 set in both operands, so the ETA returns 63 and the
product comes out as -31.

## Approx-BW multiplier (`approx_bw_mult`, `abw_array`)

A sign extractor and sign set wrap an unsigned N x N AND array
(`abw_array`). Columns K and above are added exactly. Columns K-1 down to 0
are the approximate part: inside a column, the partial products a[j]b[0],
a[j-1]b[1], ... are chained through AFA cells; column K-1 starts with
carry-in 0 and the final carry of each column is the carry-in of the next
lower column. Taken together this gives a simple rule:

* if a column receives a carry of one, or holds two or more partial products
  equal to one, its sum bit is one and so are all lower columns;
* otherwise its sum bit is the OR of its partial products (at most one is
  one) and it passes no carry.

The final carry of column K-1 is also added into column K of the exact part.
Defaults: N = 8, K = 8 (all eight low columns inexact). K = 0 gives an exact
multiplier. Over all 65536 signed operand pairs this implementation measures
MED 83.9, MRED 0.034 and 24 % exact results (`tb_mult_accuracy`); the
published figures for the same configuration are MED 232.33, MRED 0.101 and a
5.81 % pass rate. The difference most likely comes from the column order and
the carry between the two parts, which the description leaves open (see
*Departures* below). The same testbench gives S-META MED 124.3 and MRED
0.052 (published 154.15 and 0.09).

## FIR filter (`fir_transposed`)

Sixteen taps in transposed form: every coefficient multiplier sees the
current sample, and the products run through a chain of registered adders,

    r[0] <= H[0]*x,   r[k] <= r[k-1] + H[k]*x,   y = r[14] + H[15]*x

so `y` is the filtered output for the sample currently on `x`
(combinational), and the registers move only when `x_valid` is high. Input
samples are 8-bit two's complement; products, adder chain and output are 16
bits. Each multiplier is an 8 x 8 Approx-BW (`APPROX_K = 8`; 0 makes the
filter exact).

The coefficients are this design's own: a 16-tap Hamming-window low-pass
with its cut-off (882.5 Hz) halfway between a 775 Hz pass-band edge and a
990 Hz stop-band edge at 3.1 kS/s, quantised to Q0.7:
`0 -1 -1 4 0 -12 11 63 63 11 -12 0 4 -1 -1 0` (sum 128, so the DC gain is 1
and |y| <= 184 * 128 stays within 16 bits). Change the `COEF` parameter to use
another set.

On a noisy 100 Hz tone the approximate filter's output stays 25.5 dB above
its difference from the exact filter's output (`tb_fir_transposed`), in line
with the roughly 23 dB reported for the published filter.

## CORDIC (`cordic_iter`)

One shift-add unit per component x, y, z: a register, a multiplexer between
the start value and the last result, an arithmetic shifter and an
adder/subtractor. Iteration i computes

    x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atan(2^-i)

with d = +1 when z >= 0 (rotation mode) or y < 0 (vectoring mode). The 30
micro-rotation angles atan(2^-i), i = 0..29, are a constant table. The
control FSM has three states: S0 (`init`) waits for `start`, S1 (`load`) runs
one iteration per clock for 30 clocks, S2 (`done`) holds for one clock; `done`
rises 31 clocks after `start`. Words are 32 bits in Q2.30, angles in radians.
Started from (0.6072529, 0, angle) in rotation mode it returns cos and sin of
the angle; in vectoring mode it returns 1.6468 * |(x, y)| in x and atan(y/x)
in z.

All three adders are `approx_adder` instances, by default lower-part-OR with
16 inexact bits. Subtraction adds the inverted operand with carry-in one;
LOA drops that carry-in, an error of one LSB per step. Over the test
angles and vectors the worst cos/sin/atan error is 1.8e-4 with LOA, 2.5e-3
with `KIND = ADD_ETA` (whose lower part fills with ones below the first
position where both operands are one, a bias that builds up over the 30
steps) and 4e-8 with exact adders. This supports the choice of LOA as the
default.

## SVD engine (`jacobi_svd`, `givens_rotator`)

The engine computes the eigenvalues of A^T A (the squared singular values of
an N x N matrix A with 8-bit entries) and the right singular vectors, using
cyclic two-sided Jacobi rotations:

1. **Symmetrization.** S = A^T A, one exact multiply-accumulate per clock
   (N^3 clocks), stored with 8 fraction bits in 32-bit words. V is set to
   the identity (Q2.30).
2. **Phase solver.** For each pair p < q the shared CORDIC runs in vectoring
   mode on (S[q][q] - S[p][p], 2*S[p][q]) to get 2*phi, with both inputs
   negated when the first is negative and shifted together so that the
   larger lands at bit 28 (full angle resolution whatever the data scale).
   The angle is halved and the CORDIC runs again in rotation mode for cos
   and sin. A zero S[p][q] gives phi = 0.
3. **Rotations.** The rows p and q of S (pre-rotation), then its columns p
   and q, then the columns p and q of V (post-rotation) pass through
   `givens_rotator`, one element pair per clock:
   (u, v) -> (c*u - s*v, s*u + c*v). This zeroes S[p][q].
4. After `SWEEPS` sweeps over all pairs, `done` pulses for one clock.

`givens_rotator` holds the four multipliers of a rotation block, 32 x 32
Approx-BW with `K` inexact product columns (default 20, the largest count the
accuracy study found acceptable), and exact adders. Sums are rounded to
nearest before the shift back to the data format; truncation here makes
every rotation shrink the matrix a little and, over six sweeps, pulls small
eigenvalues down by several percent.

Latency from `start` to `done` is exactly

    N^3 + 1 + SWEEPS * N(N-1)/2 * (68 + 3N)  clocks

(15969 for the default N = 8, SWEEPS = 6): 32 clocks per CORDIC run, N + 1
per row, column and V pass, one for the pair step.

Ports: write A through `wr_en/wr_row/wr_col/wr_data` while idle, pulse
`start`, read S (`rd_v = 0`, Q.8) or V (`rd_v = 1`, Q2.30) through
`rd_row/rd_col/rd_data` after `done`. `rotations` counts the pair rotations.

## Top level (`eskin_dsp_top`)

Instantiates the FIR, a CORDIC (LOA), an 8 x 8 SVD engine and both 8-bit
multipliers with separate ports. Parts of the sensing system that are not
logic here, the sensor array, the charge-integrating converter chip and its
serial link, the processor running the tensor-kernel SVM classifier, appear
only as ports: `fir_valid/fir_x` take the converter samples, and the SVD
read port and the CORDIC and multiplier results are for the classifier. One
synchronous active-high reset `rst` (inverted for the FIR's asynchronous
active-low reset).

## Departures and open points

* **FIR coefficients** are this design's own design (see above); the
  published filter's coefficient values are not available.
* **CORDIC direction.** The textual description of which adder adds and which
  subtracts does not agree with the cos/sin result it states; this design
  follows the standard rotation so that x and y give cos and sin.
* **Sign extraction** uses an exact two's complement negation. A bit
  inversion, as one equation of the META description reads, would give
  |x| - 1.
* **Adder accuracy.** On 10^5 uniformly random 16-bit pairs with K = 8,
  `tb_adder_accuracy` measures MEDs of 51.3 (ETA), 47.9 (LOA), 75.1 (AXA),
  63.5 (AND-C), 211.9 (NAND-C) and 31.7 (IPP). The first four are within a
  few percent of the published figures (52.0, 45.6, 75.5, 60.7). NAND-C and
  IPP are built from their cell equations as written, and their MEDs do not
  match the published 75.6 and 89.7; the carry handling of those two
  published adders is therefore likely different from this reading. LOA and
  ETA remain the two most accurate of the carry-free kinds, which is why
  the CORDIC uses LOA.
* **Approx-BW carries.** The carry out of the approximate part also enters
  the exact part, and the partial products of a column are chained in order
  of decreasing index of operand a. Both are readings of a description that
  leaves them open; the accuracy figures above differ from the published
  ones.
* **META rounder** works on the magnitude widened by one bit, so unsigned
  operands close to 2^N round up to 2^N.
* **SVD.** The published engine used a vendor CORDIC core; here the same
  `cordic_iter` runs with exact adders. The SVD stops after a fixed number
  of sweeps (6, within the "five to ten" the algorithm needs) instead of a
  convergence test. One rotation unit is shared by the pre- and
  post-rotations, so a rotation takes 3N + 3 clocks instead of running the
  two blocks in parallel. Fixed-point formats are this design's choice.
  With 32-bit data and 64-bit products the inexact columns stay far below
  the data LSB: on random 5 x 5 matrices the eigenvalue errors are below
  0.001 % for K = 8 to 24 and below 0.01 % at K = 28 (`tb_jacobi_svd`
  prints them per K). The published study reports errors of several percent
  at 20 inexact bits and up to total loss at 28, presumably with narrower
  words; narrowing `DW` here trades accuracy for multiplier size.
* **Not covered:** the sensors, the converter chip, the acquisition setup,
  the processor and the SVM classifier running on it; larger SVDs such as
  the 4 x 80 and 20 x 16 tensor unfoldings classified in software. The
  comparison multipliers built from the other adder cells are not part of
  the design, though `approx_adder` provides their cells.

## Simulation

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing -Irtl rtl/approx_pkg.sv \
      $(ls rtl/*.sv | grep -v approx_pkg) tb/tb_eskin_dsp_top.sv \
      --top-module tb_eskin_dsp_top
    ./obj_dir/Vtb_eskin_dsp_top

| testbench            | what it checks |
|----------------------|----------------|
| `tb_approx_adder`    | AFA truth table, the ETA worked example, every kind against a bit-level reference on random operands |
| `tb_meta_mult`       | all four META variants exhaustively against a reference built from the rounding identity |
| `tb_approx_bw_mult`  | exhaustive 8 x 8 at K = 8 and K = 0, unsigned mode, random 16 x 16 at K = 20 against the column rule |
| `tb_adder_accuracy`  | MED / NMED / MRED / exact-result rate of the six inexact adders (16 bit, K = 8) on 10^5 random pairs, error bounds of LOA and ETA |
| `tb_mult_accuracy`   | MED / MRED / exact-result rate of both multipliers over all signed pairs, structural error bounds |
| `tb_fir_transposed`  | impulse response, random and sinusoidal inputs with idle gaps, exact and approximate; SNR on a noisy 100 Hz tone |
| `tb_cordic_iter`     | bit-exact model for LOA and exact adders, cos/sin and vectoring accuracy of LOA, ETA and exact units, 31-clock latency, state flags |
| `tb_givens_rotator`  | exact and approximate rotations against models, one-clock latency |
| `tb_jacobi_svd`      | 5 x 5 and 8 x 8, exact and K = 20: symmetrization, eigenvalues against a double-precision Jacobi, orthonormal V, exact latency; 5 x 5 sweep over K = 8 ... 28 |
| `tb_eskin_dsp_top`   | full-size top: FIR impulse, CORDIC in both modes, an 8 x 8 SVD with hand-computed eigenvalues, both multipliers; counts each mechanism |

The largest run (`tb_jacobi_svd`, nine engines) takes under ten seconds.
