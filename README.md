# Analog array vector-matrix multiplier with digital resolution enhancement and offset compensation

This design computes large vector-matrix products

    Y^(m) = sum_n W^(m,n) X^(n),   n = 0..N-1, m = 0..M-1

on a charge-mode analog array, but all of its ports are digital. Each
multi-bit product is split into single-bit products. The analog array adds
N one-bit products on a single wire, which is where its density and speed
come from. Low-resolution flash converters then digitise every such sum, and
digital logic recombines the quantized sums with their binary weights. The
recombination averages the converters' errors, so the result is more precise
than any single conversion. A second idea handles offsets. A reference chip
that stores only zeros sees the same offsets as the working chips, and its
output is subtracted digitally.

The RTL here is a simulation-ready model of the whole multi-chip system. The
digital parts are synthesizable RTL: input bit-serialiser, matrix loader,
chip decoder, reference subtraction, reconstruction and sequencing. The two
analog parts are behavioural models: the CID/DRAM cell array and the flash
converters.

## Number representation

Matrix elements have I bits and inputs have J bits. Both are unsigned
fractions, with bit 0 as the MSB:

    W = sum_i 2^-(i+1) w_i        X = sum_j 2^-(j+1) x_j
    Y^(m) = sum_i sum_j 2^-(i+j+2) Y_ij^(m),   Y_ij^(m) = sum_n w_i^(m,n) x_j^(n)

`Y_ij` is a *binary-binary partial*: the number of cells in row (m, i) where
both the stored bit and the input bit are 1. In integer terms,
W_int = sum_i 2^(I-1-i) w_i and X_int = sum_j 2^(J-1-j) x_j. The RTL reports
every result as the integer

    q_out = sum_ij 2^(I+J-2-i-j) Q_ij  ( = 2^(I+J) * Q^(m) )

If every Q_ij is exact, q_out equals sum_n W_int * X_int. Only one-quadrant
(unsigned) arithmetic is built.

## The cell array (`cid_dram_array`, behavioural)

Each chip stores the matrix bit-parallel. Output component m owns I binary
rows, and row `m*I + i` holds bit w_i of all N elements of that component.
Each cell has three transistors:

- a DRAM part, written through its Row Select line;
- a charge-injection part, which moves the stored charge onto the row's
  output line while the column input is active.

A cell therefore computes the AND of its two bits. The row line collects the
sum of these ANDs, one `Y_ij` per row in every clock, for all rows at once.
The input vector is applied one bit-plane per clock, least significant bit
first.

The model gives the line voltage as a fixed-point number, in units of one
cell's charge step with 16 fraction bits (`vmm_pkg::FRAC_BITS`). It includes
two non-idealities, because the offset compensation exists to remove them:

| input x | stored w | line contribution |
|---|---|---|
| 0 | 0 | 0 |
| 0 | 1 | 0 |
| 1 | 0 | eps (input-output feedthrough) |
| 1 | 1 | 1 + eps |

- **Feedthrough.** `EPS_FX` sets eps. The default is about 0.02 of a cell
  step.
- **Leakage.** Each row has an age: the clocks since it was last written or
  refreshed. The row's line rises by `LEAK_FX * age * (active inputs) / N`.
  This law is the model's own choice. The published description only says
  that the offset depends on the inputs and on the time since refresh.
- **Refresh.** Each `refresh` pulse restores one row, taking the rows in
  turn.

Nonlinearity and noise of the analog sum are not modelled.

## Flash conversion (`flash_adc`, behavioural)

One L-bit flash converter (default 6 bits) sits on every row line, so there
are M*I converters per chip. It compares the line against 2^L-1 evenly spaced
thresholds and counts the comparators that trip. Full scale is `FS_CELLS`
cell steps, with default N. The thresholds sit half a level below each level,
so the converter rounds. Inputs above full scale clip.

Setting `FS_CELLS = 2^L-1 >= N` gives the *zero-error* case: each level is
exactly one cell count, and the product comes out exact. At the default size
(N = 1000, L = 6) one code spans about 16 cells.

## Reconstructing Q^(m) (`resolution_postproc`)

This is the part that gains resolution. For one m, the partials over J
clocks form an I x J matrix. Partials on a diagonal k = i + j carry the same
weight 2^-(k+2). So the sum becomes

    Q^(m) = sum_{k=0}^{K-1} 2^-(k+2) Q'_k,   Q'_k = sum over the diagonal,   K = I+J-1

The hardware does this with no multipliers:

1. **Diagonal adder chain.** Row 0 feeds a one-clock delay. Each later row
   i adds its current code to the delayed partial sum of the rows above it,
   with another delay after the adder except for the last row. Inputs arrive
   LSB column first (j = J-1 first). The chain output in clock t is therefore
   Q'_(K-1-t): the highest-k diagonal comes first.
2. **Shift-and-accumulate.** S(t) = Q'(t) + S(t-1)/2. After K diagonals,
   S = sum_k 2^-k Q'_k = 4 Q^(m).
3. **Output switch.** The total is registered after the K-th step.

Halving is a right shift. The accumulator keeps K-1 fraction bits, so the
shift loses nothing, and the result is the exact integer `q_out` defined
above. Presenting the LSB first means the result is complete as soon as the
last diagonal arrives, which keeps the accumulator short.

A new operation starts with `in_first`. J columns are taken, and I-1 further
clocks flush the chain with zeros. `out_valid` follows K clocks after
`in_first`. The inputs are signed because the reference subtraction can make
a partial negative.

**Why precision improves.** Suppose each code carries an independent
rounding error. The weighted sum then has an error standard deviation of
about 1/3 of one converter's, relative to full scale (for large I and J). In
median-absolute-error terms this is about a 3.85x gain, or 2 bits. The
full-size testbench measures 3.15x (1.66 bits) at I = J = 4 from converter
rounding alone, over 500 outputs. The formula predicts about 3.4x at that
size.

## The multi-chip system (`vmm_system`)

    X --> input_vector_reg --+--> vmm_processor 0 ----+
                             +--> ...                 +--> chip_decoder --+
                             +--> vmm_processor P-1 --+   (chip_select)   |
                             +--> reference chip (W = 0) -----------------+--> offset_compensator
    refresh --> all chips                                                       |
                                                        M x resolution_postproc  <-+--> q_out[M]

- **Chips.** There are P processor chips (default 2) and one reference chip.
  Each chip has its own matrix loader (`matrix_element_loader`) and input
  register (`input_vector_reg`). All chips receive the same input vector and
  the same refresh pulses. Every matrix write also writes zeros into the same
  rows of the reference chip, so the reference matrix stays all-zero.
- **A chip** (`vmm_processor`) is an array plus its converter bank. The
  scan-out strobe captures the codes into an output register.
- **Read-out.** One computation reads out one chip, the one named by
  `chip_select`. The chips compute in lock step, and the decoder picks one
  chip's partials. Reading all P chips takes P computations.
- **Offset compensation.** The reference partial of the same row is
  subtracted: `Q_ij,COMP = Q_ij(p) - Q_ij,REF`. The reference chip stores
  zeros and sees the same inputs, so its line holds exactly the feedthrough
  eps * (active inputs). It also holds the same leakage rise, because the
  refresh is synchronous. Subtracting it removes both offsets, leaving only
  the difference of two rounding errors.
- **Reconstruction.** One `resolution_postproc` per output component
  combines the compensated partials.

Two properties follow from the model, and users should know them:

- **Ages after writes.** A write clears the age of the rows it writes. Rows
  of a processor and of the reference chip can therefore have different ages
  until the refresh sweep has passed them again. Until then the leakage is
  not cancelled exactly. The small testbench bounds the error by one code
  per partial in that case.
- **Shared reference error.** The reference chip's rounding error is the
  same for every row that sees the same input plane. After subtraction that
  error is correlated across rows, so it does not average out. At the
  default size the compensated output is less precise than the rounding-only
  figure above, with a median error of about 0.3 codes against 0.07.

### Timing of one computation

Take the clock in which `start` is high as cycle 0 (`vmm_sequencer`):

| cycle | action |
|---|---|
| 0..J-1 | bit-plane c (LSB first) is selected |
| 1..J | column lines show plane c-1; arrays and converters settle; scan-out captures the codes |
| 2..J+1 | compensated partials enter the reconstruction (first column in cycle 2) |
| I+J+1 | `q_valid` pulses; `q_out[0..M-1]` and `q_chip` are valid |

A computation therefore takes I+J+2 clocks from `start` to the clock after
`q_valid`. A matrix row write takes 1 + I clocks. Loading the input vector
takes one clock and is ignored while `busy`.

## Modules and parameters

| module | kind | role |
|---|---|---|
| `vmm_pkg` | package | fixed-point format of line voltages, cell response table |
| `cid_dram_array` | behavioural | cell storage, AND-and-sum per row, feedthrough, leakage, refresh |
| `flash_adc` | behavioural | L-bit rounding flash converter |
| `vmm_processor` | structural + RTL | array, converter bank, scan-out register |
| `input_vector_reg` | RTL | input vector store, bit-plane output |
| `matrix_element_loader` | RTL | splits an I-bit row into I Row-Select writes |
| `chip_decoder` | RTL | chip-select multiplexer |
| `offset_compensator` | RTL | reference subtraction per row |
| `resolution_postproc` | RTL | diagonal chain and shift-and-accumulate |
| `vmm_sequencer` | RTL | bit-serial schedule, scan-out and reconstruction control |
| `vmm_system` | top | the multi-chip system |

Top-level parameters and their defaults:

| parameter | default | origin |
|---|---|---|
| `N` | 1000 | published array of 1000 x 1000 cells |
| `M` | 250 | 1000 binary rows / I |
| `I`, `J` | 4, 4 | the published example |
| `L` | 6 | published converter resolution |
| `P` | 2 | own choice (processor count not given) |
| `FS_CELLS` | N | own choice |
| `EPS_FX` | 1311 (about 0.02) | own choice |
| `LEAK_FX` | 8 | own choice |

`q_out` is `L+1+I+J` bits wide, signed.

## Where this design departs from or adds to the published architecture

- The port protocol is this design's own: `w_req`/`w_ready`, `x_load`, and
  `start`/`busy`/`q_valid`. So are the one-clock register stages around the
  array and the meaning of scan-out as a capture strobe.
- The number of processor chips is not given; P = 2 is a default.
- The converters' reference ladder and full scale are assumptions. The
  leakage law is also an assumption.
- Subtraction happens on the partials before reconstruction, which is where
  the published structure places it. Reconstruction then runs once per
  output component.
- Not built:
  - signed (four-quadrant) encoding, mentioned only as a possible extension;
  - cascading chips along the input dimension, by adding their outputs;
  - analog figures such as dynamic range, power and cycle time.

## Simulating

Every file under `rtl/` holds one module or package. Load the package first.
For example, the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
        rtl/vmm_pkg.sv tb/tb_vmm_system.sv --top-module tb_vmm_system
    ./obj_dir/Vtb_vmm_system

Each testbench prints `TB_RESULT checks=<n> failures=<n>`:

- **Block testbenches** (`tb/tb_<module>.sv`). Each compares its block with
  values computed independently inside the bench: a weighted-sum formula, a
  closed-form quantizer, or a cell-by-cell line model.
- **`tb_vmm_system`.** A small system: N = 15, M = 4, P = 2, with
  zero-error 4-bit converters and strong feedthrough and leakage. It predicts
  every result from its own chip model, checks the latency, and checks that
  compensated results match the ideal integer product. It also requires that
  writes, refresh, both chip selections, nonzero reference partials,
  leakage-moved codes and wrong uncompensated results all occur.
- **`tb_vmm_zero_error`.** Runs the zero-error operating point: N = 63
  cells per row and 6-bit converters whose 64 levels match the 0..63 cell
  counts. Every output must equal sum_n W*X exactly. That is the full
  I + J + log2(N+1) = 14-bit result, including the all-ones full-scale
  product.
- **`tb_vmm_system_full`.** Runs the top at its default size: two 1000 x 1000
  chips plus the reference. It loads both matrices, computes both chips for
  two input vectors, and checks all 1000 results against its model. It also
  reports the resolution gain. It takes about two to three minutes in
  Verilator, mostly compile time.

The behavioural models hold a full cell array per chip. Synthesis tools
therefore see very large logic for them. Only the digital blocks are meant
for synthesis.
