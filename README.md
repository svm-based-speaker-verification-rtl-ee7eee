# SVM speaker verification engine

A fixed-point hardware engine that enrols a speaker with a support vector
machine (SVM) and then verifies claimed identities. Each utterance is reduced,
outside this engine, to one vector: the time average of its 24 cepstral
features. This one-vector-per-utterance trick keeps the training set tiny. A
speaker is trained from 31 labelled utterance vectors: the speaker's own
(+1) and impostors' (−1). Training then means solving one small dense linear
system, and a test costs at most 31 kernel evaluations.

The engine is built from five controllers around a single SRAM:

| controller | module | job |
|---|---|---|
| train VMM (vector-matrix multiplication) | `train_vmm` | builds the kernel system matrix K′ in SRAM |
| kernel function | `kernel_ctrl` (+ `exp_lut`) | RBF kernel of two vectors stored in SRAM |
| Gauss-Jordan | `gj_ctrl` (+ `gj_big_finder`, `gj_swap`, `gj_big_row`, `gj_matrix_calc`) | solves K′ α′ = y′ for the Lagrange multipliers |
| support vector table | `svt_ctrl` | keeps the support vectors, writes the speaker's SV-table |
| test VMM | `test_vmm` | scores a test vector against a speaker's SVs |

`svm_sequencer` runs these controllers in order. `svm_arbiter` and
`svm_sram` provide the shared memory. `svm_top` wires everything together.

## The training system

The training set holds N labelled vectors (x_i, y_i). The RBF kernel is

    k(x, x_i) = exp(−‖x − x_i‖² / (2σ²)),   σ = 8

The engine solves the (N+1)×(N+1) system K′ α′ = y′:

    | 0   y_1  …  y_N |   | λ   |   | 0   |
    | 1   k_11 …  k_1N| · | α_1 | = | y_1 |
    | …               |   | …   |   | …   |
    | 1   k_N1 …  k_NN|   | α_N |   | y_N |

The first row enforces Σ y_j α_j = 0. Row i says that the model output at
training vector i equals its label:

    λ + Σ_j α_j k(x_i, x_j) = y_i

`train_vmm` writes this system as an augmented matrix [K′ | y′]:

- one row of `KCOLS = 33` words per equation;
- column N+1 holds y′;
- the rows start at `KMAT_BASE`.

It writes the border of labels and ones first. It then walks the upper
triangle i ≤ j and passes the two training-record addresses to
`kernel_ctrl`. Each returned k_ij is written to both (i, j) and (j, i), so
the N(N+1)/2 kernel evaluations cover the whole symmetric matrix.

## Numbers and the exponential table

- **Number format.** Every value is a 32-bit two's-complement Q16.16 number,
  with bit 31 as the sign.
- **Rounding.** Products are floored (arithmetic shift right by 16).
- **Saturation.** Sums and quotients saturate to ±(2³¹−1).

`kernel_ctrl` does not evaluate the exponential directly. It proceeds in
three steps:

1. It accumulates S = Σ (a_e − b_e)², one element per three cycles. Each
   squared term is floored to Q16.16, and the sum saturates at 2⁴⁸−1.
2. It forms u = S / 128 (2σ² = 2⁷) in steps of 1/16, as the table index
   `S >> 19`.
3. It reads exp(−u) from `exp_lut`.

`exp_lut` has 256 entries: `round(65536 · exp(−i/16))`. Entry 0 is 1.0.
Indices from 256 up (u ≥ 16) give 0, because exp(−16) is below one LSB. The
table is generated at elaboration by repeated 32-fraction-bit multiplication
by exp(−1/16), and it matches the real-valued formula exactly for all 256
entries. To change σ, set `SIGMA2_LOG2` = log2(2σ²); only powers of two are
supported.

## Gauss-Jordan elimination in SRAM

This is the largest block and the one to read first when changing the design.
`gj_ctrl` solves the augmented system in place, in the SRAM, with full
pivoting. It performs one step per unknown (n = N+1 steps). Each step has
four phases, and each phase belongs to a named unit:

1. **Big Finder** (`gj_big_finder`). Scans all n² words of K′, one SRAM read
   per cycle. It keeps the largest |a_rc| among rows and columns that have
   not been pivoted yet. A one-hot `ipiv` register marks the pivoted ones.
   On ties, the first word in row-major order wins.
2. **Swap** (`gj_swap`). If the pivot is at (r, c) with r ≠ c, it exchanges
   rows r and c word by word, so the pivot lands on the diagonal. While it
   runs, it owns the controller's SRAM port.
3. **Big Row** (`gj_big_row`). Divides every word of the pivot row by the
   pivot, using a restoring divider (49 cycles per word: (a·2¹⁶)/p, truncated
   toward zero). The pivot itself becomes exactly 1.0.
4. **Matrix Calculator** (`gj_matrix_calc`). For every other row r, with
   f = a_r,c, it replaces each word by a − f·p, where p is the normalised
   pivot-row word. This zeroes column c everywhere except the pivot.

Pivoting only exchanges rows, onto the diagonal. After n steps the left part
is therefore the identity, and α′_i is in column N+1 of row i. No column
unscrambling is needed for the solution vector. The controller copies α′ (λ
first) to `ALPHA_BASE`.

If the largest eligible magnitude is 0, the matrix is singular. The run then
stops with `singular = 1`. Two identical training vectors with opposite
labels produce this.

Cost per step:

- n² + 3 cycles to scan;
- 4(N+2)+2 cycles for a swap;
- about 53(N+2) cycles for the division;
- 4(n−1)(N+2) cycles for elimination.

For N = 31 this totals about 221,000 cycles.

## Support vectors, models and scoring

**Choosing support vectors.** `svt_ctrl` makes training vector i a support
vector when bit 31 of α_i is 0, that is when α_i ≥ 0. Zero counts as a
support vector. Each SV-table entry is two words: the address of the training
record, then α_i.

**Where the model goes.** Up to `NUM_SPK = 4` speaker models live in SRAM at
once. Speaker s gets:

- a table region at `SVT_BASE + s·SVT_STRIDE`;
- a three-word descriptor at `DIR_BASE + 3s`: table start, SV count, and λ.

**Scoring.** `test_vmm` reads the claimed speaker's descriptor and computes

    score = λ + Σ_{SV} α_i · k(x_test, x_i)

The claim is accepted when `score ≥ threshold`. This is the output function
defined by the system above. The design does not multiply by y_i: the solved
α_j already carry the class sign. Only non-negative α are kept, so the score
leans toward acceptance. In the end-to-end test, impostors against the
second model scored 0.66 to 0.84, above the threshold of 0. Set the
threshold (`ENV_THRESH`, Q16.16) with this in mind. The training vectors
must stay in SRAM while the model is in use, because the SV-table points at
them.

## Memory map (32-bit words, `svm_pkg`)

| address | content |
|---|---|
| 0 `ENV_N` | number of training vectors N (1…31) |
| 1 `ENV_D` | dimension D (1…24) |
| 2 `ENV_TRAIN_BASE` | address of training record 0; record i is at base + i(D+1): D features, then the label ±1.0 |
| 3 `ENV_SPK_ID` | speaker slot being trained (0…3) |
| 4 `ENV_CLAIM_ID` | speaker slot claimed by a test |
| 5 `ENV_TEST_BASE` | address of the test vector |
| 6 `ENV_THRESH` | decision threshold, Q16.16 |
| 7 `ENV_STATUS` | written at the end of a run: bit0 done, bit1 singular K′, bit2 configuration refused |
| 8 `ENV_SCORE` | last test score |
| 9 `ENV_DECISION` | 1 = accepted |
| 16…27 | speaker descriptors (3 words each) |
| 32…1087 | K′ augmented matrix, 32 rows × 33 |
| 1088…1119 | α′ = λ, α_1 … α_N |
| 1120…1375 | SV-tables, 64 words per speaker |
| 1376…4095 | free for training and test vectors (`FREE_BASE`) |

## Using the engine (`svm_top`)

1. While `busy` is low, write the environment words and the vectors through
   the host port: `host_req`, `host_we`, `host_addr`, `host_wdata`. Read
   data appears on `host_rdata` one cycle after a read request. An assertion
   flags host accesses while busy.
2. Pulse `start_train` or `start_test` for one cycle.
3. Wait for the one-cycle `done` pulse. At that point:
   - `singular`, `config_error`, `sv_count`, `score` and `accept` are valid;
   - the same results are in SRAM.

The sequencer refuses a configuration with N = 0, N > 31, D = 0 or D > 24
(testing ignores N). A refused run sets `config_error` and runs nothing.

One controller drives the SRAM at a time. `svm_arbiter` is a fixed-priority
multiplexer, and it asserts that no two masters request in the same cycle.
Reset is asynchronous and active low.

## Timing (N = 31, D = 24, measured in simulation)

| step | cycles | at 50 MHz |
|---|---|---|
| kernel evaluation | 3D + 2 = 74 | 1.5 µs |
| build K′ (`train_vmm`) | 4N + 3 + N(N+1)/2 · (3D+5) = 38,319 | 0.77 ms |
| Gauss-Jordan | ≈ 221,000 | 4.4 ms |
| whole training run | 259,755 | 5.2 ms |
| test, S support vectors | 7 + S(3D+7) (2,456 for S = 31) | ≤ 0.05 ms |

Both runs fit well inside the reference FPGA timings of 48.8 ms for training
and 0.66 ms for testing at 50 MHz. Everything is sequential over one memory
port, so there is plenty of room for parallel kernel or elimination units.

## Where this RTL fills gaps or departs

The published architecture names the five controllers, the four
Gauss-Jordan units, the σ = 8 RBF kernel with an exponential table, the
sign-bit rule for support vectors, and the configuration sizes (24
dimensions, 31 vectors). The following points are this implementation's own
choices:

- **Arithmetic.** Q16.16 fixed point throughout, with the rounding and
  saturation rules above. The source describes the kernel arithmetic both as
  real-number "float" arithmetic and as fixed-point; fixed point was chosen.
- **Exponential table.** Its size and resolution: 256 entries, step 1/16.
- **Memory.** The SRAM size (4096 words), the single-port interface with
  one-cycle read latency, and the whole memory map.
- **Number of elimination steps.** The elimination runs N+1 steps, one per
  row of K′. The source says it repeats "N times".
- **Pivot search.** The Big Finder searches only unpivoted rows and columns,
  and compares magnitudes.
- **Kernel symmetry.** Each kernel value is written to both (i, j) and
  (j, i), halving the kernel evaluations.
- **Speaker descriptor.** It stores λ and the SV count, and there are four
  speaker slots.
- **Score and threshold.** The score formula (λ + Σ α k, without y_i) and
  the threshold decision.
- **Protocol.** The start/done handshakes, the host port, the status word,
  the configuration check and the singular-matrix stop.

Not part of this RTL:

- the host processor and PCI bridge that load data and start runs;
- the feature extraction (framing, MFCCs, time averaging);
- the smart-card software version of the verifier.

## Files

- `rtl/svm_pkg.sv`: types (`fx_t`, `addr_t`, the `mem_req_t` SRAM request
  struct), sizes, the memory map, and the helpers `kaddr`, `sat32`,
  `fx_mul`.
- `rtl/*.sv`: one module per file, named as in the table at the top.
- `tb/svm_ref_pkg.sv`: a behavioural reference model of every arithmetic
  step. The testbenches compare against it bit for bit.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/tb_svm_top.sv` runs the whole engine at full size.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, the end-to-end test (about 3 million cycles of budget; it takes a
few seconds):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_svm_top \
        -y rtl -y tb +libext+.sv rtl/svm_pkg.sv tb/svm_ref_pkg.sv tb/tb_svm_top.sv
    ./obj_dir/Vtb_svm_top

Replace `tb_svm_top` with any other `tb_*` name to run a unit test. Linting a
module on its own:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/svm_pkg.sv rtl/gj_ctrl.sv

## How far it is verified

Every module has a self-checking testbench that compares results with the
reference model and checks cycle counts:

- kernel values over random pairs, including identical and far-apart
  vectors;
- the complete K′ matrix;
- Gauss-Jordan on kernel systems of order 4 to 32, a dense random system,
  and a singular one;
- SV-tables, including zero and most-negative multipliers;
- scores, including saturation;
- the sequencer's step order and error paths.

The end-to-end test runs at full size:

- it enrols two speakers of 31 vectors each and tests 15 claims;
- it then forces a singular matrix and a refused configuration;
- it checks every multiplier, table entry, score and decision against the
  reference model;
- it requires that each mechanism occurs at least once: row swap, rejected
  and kept SVs, kernel beyond the table, accept, reject, singular K′,
  refused configuration, and two resident speakers.

Each testbench was also shown to fail when its module has a deliberately
broken copy in place.

Not verified: speaker-verification accuracy on real speech features. The
arithmetic is exact against the model, but whether Q16.16 is precise enough
for a badly conditioned K′ depends on the data.
