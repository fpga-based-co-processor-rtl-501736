# SART co-processor: streaming QR and bidiagonalization of rephased signal matrices

Singular Value Array Reconciliation Tomography (SART) locates a radio
transmitter indoors, where reflections swamp the direct path. An array of
receive antennas picks up a multi-tone signal. For every candidate position
on a scan grid, the received tones are phase-corrected ("rephased") as if the
transmitter sat at that position. The signal matrix has rows = sub-carrier
tones and columns = antennas. When the candidate is right, the columns line
up and the matrix is close to rank one. Its largest singular value is then
large, and that value is the metric plotted over the grid.

That means one SVD per grid point: thousands of small complex matrices
(128 x 16 by default) per position fix. This RTL does the expensive part in
hardware:

1. **Rephasing.** Multiply the stored signal matrix element by element with
   the grid point's phase-reference matrix. The reference matrix is rebuilt
   on the fly from one phase step per antenna.
2. **QR decomposition** in a linear systolic array of Givens-rotation
   elements. It reduces the 128 x 16 matrix to a 16 x 16 upper-triangular
   factor with the same singular values.
3. **Bidiagonalization** of that factor, in several independent modules
   working on different grid points in turn.

The host reads back the 16 diagonal and 15 super-diagonal entries per grid
point. It finishes the (now tiny) singular-value problem in software.

```
 local bus ──► host_if ──► signal-matrix memory ─┐
      ▲            │                            ▼
      │            └──► phase-step SRAM ──► rephase ──► qr_array (COLS elements)
      │                                                   │
      │                                           distributor (round robin)
      │                                    ┌──────┬──────┼──────┐
      │                                 bidiag0 bidiag1 bidiag2 bidiag3
      └──────── result multiplexer ◄───────┴──────┴──────┴──────┘
```

All streams between stages are valid/ready handshakes, so every stage can
stall the one before it. No global schedule is needed. A matrix is always
sent as rows, bottom row first, with the elements of a row left to right.

## Number format

Every complex value is a packed struct `cplx_t {re, im}` of two 35-bit
two's-complement numbers (`sart_pkg`). Data are integers. Unit vectors
(rotation factors, phase references) use 33 fraction bits, so 1.0 =
2^33. A product `data x unit` is rounded to nearest and shifted back by 33.
Keep input data well below 2^33 so that rotations cannot overflow. The
norm of any row of the matrix only grows toward the diagonal, and it is
bounded by the Frobenius norm of the whole matrix. 2^27–2^28 per element
is a safe scale for 128 x 16.

## Rephasing with phase-step decompression (`rephase`)

The tones are evenly spaced in frequency. So, for a given grid point and
antenna, the phase shift grows linearly with the tone index: the reference
of tone k is `U_k = U_{k-1} · e^{jΔθ}`, with `U_0 = 1`. Only one unit vector
`e^{jΔθ}` per antenna and grid point is stored in the external SRAM, at word
`point*COLS + col`. This cuts the reference storage by the number of tones.

- Two FIFOs hold the COLS phase steps and the COLS current references.
- While a matrix is processed, both FIFOs recirculate. Each clock:
  - the step is pushed back unchanged;
  - the reference is pushed back multiplied by the step;
  - signal element × reference goes into the output FIFO.
- The first row processed is the bottom row of the matrix, and its reference
  is 1 in every column.
- Once the steps have arrived, an m x n matrix takes m·n clocks. It takes
  longer only if the QR array does not keep up.
- The recirculating FIFOs have one spare entry, so a pop and a push-back can
  meet in a full FIFO.

The SRAM belongs to the rephasing stage only while it fetches the COLS steps
of the next grid point. A host write that arrives during the fetch is held
(no acknowledge) until the fetch ends.

## The QR array (`qr_array`, `qr_pe`, `qr_measure`)

The textbook Givens QR walks over the whole matrix for every column. The
array instead lets the matrix *flow*: processing element k cleans up column
k as the rows stream past it, and it needs only two rows at a time.

**What one element does.** Element k (0-based) sees rows m = ROWS-1 down to
0.

- **Bottom row.** It is rephased so that its column-k element is real, and
  it becomes the *feedback row* F.
- **Each later sub-diagonal row:**
  1. The row is rephased the same way (`a ← a·e^{-jφ}`).
  2. It is Givens-rotated against F using the angle atan(|a_k| / F_k). One
     half of the rotation becomes the new F and holds all the column-k
     energy. The other half has a zero in column k and is sent on as row
     m+1.
- **Diagonal row (m = k).** After it is absorbed, F is itself sent on as
  row k.
- **Rows above the diagonal.** They are already final for this column. They
  go through a bypass FIFO and leave after F, so the element's output is
  again a complete matrix in the original row order.

After COLS elements, the matrix is upper-triangular below row COLS. The rows
below that are zero.

**Inside an element.** Each element has four parts:

- **Receive stage.** A FIFO of 2·COLS elements decouples the element from its
  neighbour. A row counter classifies each incoming row as sub-diagonal,
  diagonal or super-diagonal.
- **Measure-and-compare stage.** It has two CORDIC units.
  - *Phase unit.* While a row is unloaded into the primary buffer, its
    column-k element is latched. The phase unit returns its magnitude |a_k|
    and the unit vector `e^{-jφ}`.
  - *Compare unit.* It takes the vector `F_k + j|a_k|` and returns the
    Givens unit vector `u = (F_k − j|a_k|)/r`. Because F_k is kept real and
    non-negative, this `u` is cos θ − j sin θ for the rotation. It is
    computed in one step, with no separate arctangent and sin/cos.
- **Processing stage.** A state machine runs idle → feedback → output →
  rotate. Each state lasts COLS clocks and drives one vector processing
  unit (VPU):
  - *feedback*: F' = cos·F − sin·a, written into the second of two feedback
    buffers;
  - *output*: cos·a + sin·F, streamed to the next element;
  - *rotate*: the new row times `e^{-jφ}`, into the rotated-row buffer.

  Both CORDIC latencies are hidden behind the VPU passes:
  - The primary buffer has two banks. The next row loads, and its phase is
    measured, while the current row is processed.
  - The Givens vector for the row about to be rotated needs only the new
    F_k, which exists once the feedback pass has run. Its measurement starts
    with the output pass. It is taken over when the next feedback pass
    begins, so the old vector stays valid until then.

  The two-bank feedback buffer lets the feedback and output passes both read
  the old F.
- **Deposit.** After the diagonal row, one more feedback/output pass is
  made. Then an output pass with the unit vector `e^{jπ/2}` (cos = 0,
  sin = 1) passes F straight out as row k. The feedback buffer's
  zero input then clears F for the next matrix. The very first rotation of
  a matrix (against the empty F) has its output discarded.

Per row, an element needs 3·COLS clocks of VPU time plus a few clocks of
hand-over, about 52 clocks at the defaults. This holds as long as the
Givens measurement (ITER+2 clocks) fits into the output and rotate passes
(2·COLS clocks).

### Folding: combined elements sharing a VPU (`qr_combined`)

Element k only has COLS-k useful columns: its rows arrive with columns
0 … k-1 already zero. So the elements at the end of the array are nearly
idle. The array is therefore folded:

- Elements k and COLS-k are paired, and their loads add up to one full row.
  With 16 columns, that gives pairs (1,15), (2,14) … (7,9).
- Each pair shares one VPU, so the array needs 9 VPUs instead of 16.
- Element 0 and element COLS/2 keep their own VPU.

In a pair, each element still has its own streams, buffers and measure
stage. The two streams belong to different places in the chain: element 1
sits between 0 and 2, while element 15 sits at the end.

A shared element (`qr_pe` with `SHARED=1`):

- does not use the VPU on the known-zero columns left of its target column,
  and writes zero there;
- requests the VPU for every other column;
- advances its column counter only when granted.

A round-robin arbiter settles conflicts, so a losing element waits one
clock. At 128 x 16, the full-size test measured the folded QR array at
7.5k–8k clocks per matrix.

### CORDIC (`cordic`)

A vectoring CORDIC drives the input vector to angle zero with ITER = 32
micro-rotations, one per clock. A second, constant vector of length 1/K
(K is the CORDIC gain) starts at angle zero and gets the same
micro-rotations. At the end it is the unit vector `e^{-jφ}`. No table of
angles and no sin/cos evaluation is needed.

- A coarse 180° step handles inputs in the left half-plane.
- Six guard bits keep the accumulated truncation of the x/y recurrences
  below one output LSB.
- The magnitude is scaled by 1/K with one multiply at the end.
- Latency is ITER+2 clocks from `start` to `done`.

### Vector processing unit (`vpu`)

The VPU is combinational. It has three operations on complex operands
`ab`, `cd` and unit vector `cs = cos + j·sin`:

| op | result | used for |
|---|---|---|
| ROT | ab · cs (complex product) | phase rotation |
| OUT | cos·ab + sin·cd (per component) | output half of a Givens rotation |
| FB  | cos·cd − sin·ab (per component) | feedback half of a Givens rotation |

OUT and FB together form one real Givens rotation of two rows whose target
elements have already been made real.

## Bidiagonalization modules (`bidiag`)

The bidiagonalization does not map onto a linear array: each rotation
depends on the one before it. Several (NBD = 4) independent modules are used
instead. The distributor hands whole matrices to them round robin.

Each module:

- keeps the COLS x COLS triangular factor in a local main memory;
- annihilates the elements above the super-diagonal one at a time, reusing
  the same measure stage (two CORDIC units) and VPU as the QR element.

The order is as follows. For each row k = 0 … COLS-3, and for j = COLS-1
down to k+2:

1. A column rotation of columns j-1 and j moves R[k][j] into R[k][j-1]. This
   creates a fill-in at R[j][j-1].
2. A row rotation of rows j-1 and j moves that fill-in back onto the
   diagonal.

Each rotation works like a QR step:

1. The pivot vector is rephased so that its element is real (into the
   feedback buffer).
2. The target vector is rephased likewise (into the rotate buffer).
3. The Givens vector is measured.
4. The feedback and output halves are written back to main memory.

At the end, the diagonal d_i and super-diagonal e_i go into a result buffer:
entry 2i = d_i and entry 2i+1 = e_i. They are complex; their magnitudes are
the real bidiagonal. The module keeps its results until the host releases
it.

One module takes about (COLS-1)(COLS-2)·(3(ITER+2)+4·COLS) clocks per matrix.
With four modules this keeps up with the QR array at the defaults.

## Host interface (`host_if`)

The host reaches the co-processor through a PCI bridge. That bridge is not
part of this RTL. Its local bus is `lb_addr[23:0]`, `lb_wr`/`lb_rd`,
64-bit `lb_wdata`/`lb_rdata`, and a one-clock `lb_ack`. The strobe is held
until the acknowledge and then dropped.

The address map uses word addresses; the region is `lb_addr[23:20]`:

| region | offset | meaning |
|---|---|---|
| 0 | 0 | write bit0: start a run; read bit0: busy |
| 0 | 1 | number of grid points of the run |
| 0 | 2 | write: release mask (bit b frees module b); read: mask of modules holding results |
| 0 | 4+b | grid point whose results module b holds |
| 1 | row·COLS+col | signal matrix element `{re[31:0], im[31:0]}` (integers) |
| 2 | point·COLS+col | phase step `{re[31:0], im[31:0]}`, 30 fraction bits |
| 3 | module<<16 \| entry<<1 \| part | result entry, part 0 = real, 1 = imaginary, sign-extended |

A run goes as follows:

1. Load the matrix and the phase steps.
2. Write the number of points, then write start.
3. Poll the result mask. For each module that holds results, read its
   grid-point register and its 2·COLS-1 entries, then release it.

The machine keeps going while modules are free. It stalls, without losing
data, when all four hold unreleased results.

## Sizes, speed and accuracy

Defaults are ROWS = 128, COLS = 16, NBD = 4, ITER = 32 and MAX_POINTS = 16384.
The external SRAM has an 18-bit word address.

| quantity | this design | the reference design it follows |
|---|---|---|
| matrix | 128 x 16 (103 x 16 also works, set ROWS) | 128 x 16 evaluated, 103 x 16 in use |
| grid points | up to 16,384 | up to 16,384 |
| phase-step store | 2^18 words x 64 bits (16 Mbit) | one 1 Mbit SRAM |
| throughput | QR array ~7.5k–8k clocks per matrix; four bidiagonalization modules ~8.7k (~23k matrices/s at 200 MHz) | 41.67k matrices/s at 200 MHz |
| accuracy | σ1² within ~1e-7 relative of double precision | 25-bit fixed point |

Each bidiagonalization rotation here runs its measurements and VPU passes
one after another. That takes about 166 clocks per rotation and
(COLS-1)(COLS-2) rotations, about 35k clocks per matrix for one module. With
four modules, this stage sets the pace of the whole design. The QR array
alone is at about 60 clocks per row. That is somewhat above the
3·COLS = 48 clocks of VPU work, because of hand-over clocks and shared-VPU
conflicts.

## Where this design departs from its source architecture

- **VPU sharing schedule.** The reference runs both elements of a pair in
  lockstep, each processing state split into fixed time slots A and B. Here
  the two elements run independently and share the VPU through a
  request/grant arbiter. The two CORDIC units are not shared. The U-shaped
  placement is left to the floorplan.
- **CORDIC structure.** The reference builds each CORDIC from four DSP
  multiply-accumulate blocks as a 4-deep pipeline shared by four operands
  (two data vectors and two constant vectors). Here each CORDIC is a plain
  iterative shift-add unit that rotates one data vector and one constant
  vector. Two units per measure stage give the same two results.
- **Deposit and first-row handling** use a separate output pass with
  e^{jπ/2}, and the first row goes idle → rotate directly. The two-bank
  feedback buffer is also this design's own.
- **Bidiagonalization order and data flow.** The exact annihilation order
  and the routing of results between the main memory and the two buffers
  are this design's own choice. The reference writes the feedback result to
  the feedback buffer; here both halves are written back to main memory.
- **Host side.** The PCI bridge, its driver, the SRAM chip and the host's
  final diagonalization are outside the RTL. The local-bus protocol, the
  address map and the 64-bit data layout are this design's own.
- **Number width.** 35-bit data follow the reference's 35-bit multipliers.
  The 33-bit unit-vector fraction and the rounding are this design's own.

## Files and simulation

`rtl/`:

- `sart_pkg.sv`: types, constants, rounding products
- `sync_fifo.sv`
- `cordic.sv`
- `vpu.sv`
- `rephase.sv`
- `qr_measure.sv`
- `qr_pe.sv`
- `qr_combined.sv`
- `qr_array.sv`
- `bidiag.sv`
- `host_if.sv`
- `sart_coproc.sv` (top)

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`.

- `tb_qr_pe`, `tb_qr_combined` and `tb_qr_array` check the Gram matrix
  (A^H A), zeros below the diagonal, and the row timing.
  `tb_qr_combined` also checks that both elements of a pair got the VPU and
  that a conflict was resolved.
- `tb_bidiag` checks the largest singular value against power iteration,
  the product of |d_i| against |det R|, and that the elements above the
  super-diagonal are zero.
- `tb_sart_coproc` runs the top at its default size. It uses a behavioural
  SRAM with 2-clock latency and six grid points. It checks σ1² and the
  Frobenius norm of each point against a double-precision reference, and it
  counts every stall and bypass mechanism.

To simulate (the package must come first):

```
verilator --binary --timing --assert -Irtl rtl/sart_pkg.sv rtl/sync_fifo.sv \
  rtl/cordic.sv rtl/vpu.sv rtl/qr_measure.sv rtl/qr_pe.sv rtl/qr_combined.sv \
  rtl/qr_array.sv \
  rtl/bidiag.sv rtl/rephase.sv rtl/host_if.sv rtl/sart_coproc.sv \
  tb/tb_sart_coproc.sv --top-module tb_sart_coproc -Mdir obj && obj/Vtb_sart_coproc
```

For a single block, list only the files it uses. The full-size run takes
about a second of simulation time on a workstation.
