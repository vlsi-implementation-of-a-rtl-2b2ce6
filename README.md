# Scalable pipeline MMSE MIMO detector for 4×4 MIMO-OFDM

A packet MIMO-OFDM receiver estimates one 4×4 channel matrix per subcarrier
from the training symbols, and must turn each of them into a linear detection
filter before the first data symbol arrives. Otherwise the data symbols have
to be buffered. The time available is about one OFDM symbol, FFT period plus
guard interval: 4 µs in IEEE 802.11n. In that time the MMSE filter

    G = (A·Aᴴ + σ²·I)⁻¹ · A          (A: 4×4 complex channel matrix)

has to be computed for every subcarrier, from 52 subcarriers up to several
hundred.

A fully pipelined detector that computes the whole filter in one pass can keep
up with any subcarrier count, but it is large. This design is a **scalable
pipeline** instead. The inversion is split into *M* steps. In every step all
*N* subcarriers stream through one small pipeline, one subcarrier per clock,
and the intermediate results go to a per-subcarrier memory that the next step
reads. The pipeline is *reconfigured* between steps: a select signal, `Sel`,
re-routes the data paths between the shared 2×2 matrix units. Choose *M* as
large as the latency budget allows and the hardware shrinks to what one step
needs.

Two configurations are implemented. They run side by side in the top level
`mmse_detector_top`:

| configuration | units (2×2) | pipeline depth α | target |
|---|---|---|---|
| 9-step (`det9`) | 2 MUL, 1 ADD, 1 INV | 12 | ~108 subcarriers at 250 MHz |
| 2-step (`det2`) | 10 MUL, 5 ADD, 1 INV | 15 | up to 472 subcarriers at 160 MHz |

## The computation: Strassen's block inversion

A is split into 2×2 blocks `h11 h12 / h21 h22`. The matrix B = A·Aᴴ + σ²·I is
Hermitian, so B is inverted blockwise and every operation is a 2×2 matrix
operation:

```
b11 = h11 h11ᴴ + h12 h12ᴴ + σ² I      c1 = b11⁻¹          c5 = c4⁻¹
b12 = h11 h21ᴴ + h12 h22ᴴ             c2 = b12ᴴ c1        c6 = c2ᴴ c5
b22 = h21 h21ᴴ + h22 h22ᴴ + σ² I      c3 = c2 b12         c7 = c6 c2
                                       c4 = b22 − c3       c8 = c1 + c7

B⁻¹ = [ c8  −c6 ; −c6ᴴ  c5 ]   so   g11 = c8 h11 − c6 h21     g12 = c8 h12 − c6 h22
                                     g21 = −c6ᴴ h11 + c5 h21   g22 = −c6ᴴ h12 + c5 h22
```

c4 is the Schur complement of b11. Both matrices that get inverted (b11 and
c4) are Hermitian positive definite, so the 2×2 inversions are always defined.
The 2×2 inverse is the adjugate divided by the determinant.

A note on conventions: written with a channel matrix H where y = H·s + n, the
textbook MMSE filter is (HᴴH + σ²I)⁻¹Hᴴ. This design works on A = Hᴴ, which
gives exactly the block equations above. The load port therefore takes the
matrix the equations call A (its blocks h11…h22), and G comes out in the same
orientation.

## Dividing the work into steps

Each step is one pass of all subcarriers through the pipeline. The equations
are spread over the steps so that every step needs about the same hardware:

| 9-step | computes | flow | writes back |
|---|---|---|---|
| 1 | b11 | A | b11 |
| 2 | b12 | A | b12 |
| 3 | b22 | A | b22 |
| 4 | c1, c2, c3, c4 | B | c1, c2, c4 |
| 5 | c5, c6, c7, c8 | B | c5, c6, c8 |
| 6–9 | g11, g12, g21, g22 | A | one G block per step (output) |

- **Type A** forms two products side by side and adds them, e.g. `c8·h11 − c6·h21`.
- **Type B** is a chain, INV → MUL → MUL → ADD, e.g. `c1 = b11⁻¹`,
  `c2 = b12ᴴ·c1`, `c3 = c2·b12`, `c4 = b22 − c3`.

Both flows need two MULs and one ADD, and Type B also needs the INV. So one
set of units serves all nine steps.

The 2-step version has two larger units:

- **4×4 MUL**: eight MULs feeding four ADDs.
- **4×4 INV HALF**: the Type B chain.

Step 1 runs 4×4 MUL → INV HALF: A goes in, and b11, b12, b22 become c1, c2, c4,
which go to memory. Step 2 runs INV HALF → 4×4 MUL: c4, c2, c1 go in, and
c5, c6, c8 combine with A to give the whole of G. `Sel` only swaps the order of
the two units.

## Processing time

A step streams N subcarriers and then waits α cycles for the pipeline to
drain, because the next step reads what this step wrote. The results of the
last step leave straight away. The first filter of the last step is therefore
ready

    T = ((N + α)(M − 1) + α) cycles

after the first read. The testbenches check this cycle for cycle:

| N | 9-step cycles | µs at 250 MHz | 2-step cycles | µs at 160 MHz | budget |
|---|---|---|---|---|---|
| 52 | 524 | 2.10 | 82 | 0.51 | 4 µs |
| 108 | 972 | 3.89 | 138 | 0.86 | 4 µs |
| 216 | 1836 | 7.34 | 246 | 1.54 | 4 µs |
| 472 | 3884 | 15.54 | 502 | 3.14 | 7.2 µs |

The 9-step detector is sized for 108 subcarriers: it meets the budget up to
that count, and is too slow for the 80 MHz channel counts. The 2-step detector
meets the budget at every count. The clock rates are those the original
implementation reached in a 90 nm process; this RTL has not been through
timing closure.

## The 9-step datapath (`dp9_datapath`)

```
 operands ──► INV (7) ──► MUL1 (2) ──► MUL2 (2) ──► ADD (1) ──► add_out   (b.., c4, c8, g..)
 (one cycle)   │            │   └─ D2 ─► ADD input in Type A
               │            └── D3 ──────────────────────────► mul1_out  (c2, c6)
               └── D5 ───────────────────────────────────────► inv_out   (c1, c5)
 stage:        0            7            9          11         12
```

The hardest part to follow is the timing. In *both* flows MUL1 starts at stage
7 and MUL2 at stage 9:

- In **Type B**, MUL1's right operand is the INV result and MUL2's left operand
  is MUL1's result.
- In **Type A**, all four factors come from memory and the INV result is
  ignored. MUL1's product is then two cycles early for the ADD, and the 2-cycle
  delay unit lines it up with MUL2's product.

The 3-cycle and 5-cycle delay units bring the MUL1 and INV results out in the
same cycle as the ADD result. So in a Type B step one memory write stores all
three results (c1, c2, c4 or c5, c6, c8). Every step therefore has the same
depth, α = 12.

All operands of one subcarrier are read in one cycle. Internal delay lines (7,
9 and 11 cycles) hold them until the stage that uses them.

The per-step options are in `dp9_ctl_t`:

- Hermitian transpose of either factor of either MUL;
- sign of either ADD operand;
- adding σ² to the diagonal.

`det9` decodes them, together with `Sel`, from the step number.

## The 2-step datapath (`det2`, `mat4_mul`, `inv_half`)

`inv_half` is the Type B chain with fixed wiring and 12 stages. Its input `sub`
picks `z − product` (step 1) or `z + product` (step 2).

`mat4_mul` has 3 stages. In Type A it produces blocks 11, 12 and 22 of
A·Aᴴ + σ²I; block 21 is not needed because it equals b12ᴴ, so that MUL pair is
idle. In Type B it produces G.

In step 2, A is read at stage 0 but is needed by `mat4_mul` at stage 12, so it
passes through a 12-cycle delay unit. Both steps are 3 + 12 = 15 stages deep.

## Number format

Every real component is a 24-bit two's-complement word with 12 fraction bits
(Q11.12), set in `mmse_pkg` (`W`, `FRAC`). Multipliers keep full precision
internally, then round to nearest and saturate. The inverse computes
1/det = conj(det)/|det|² with two integer divisions, keeping 24 fraction bits
before it multiplies into the adjugate. A singular block gives saturated values.

Against a double-precision reference, with channel entries up to ±0.6 and
σ² = 0.1–0.5, the largest error in any element of G is about 0.004. Smaller σ²
or badly conditioned channels need more headroom: change `W`/`FRAC` or add
scaling.

## Interfaces

Each detector (`d9_*` / `d2_*` on the top) has the same controls:

1. While `busy` is low, write the channel matrix of subcarrier k with `h_we`,
   `h_addr = k` and `h_wdata` (`mat4_t`: four `mat2_t` blocks, each four
   complex numbers, each `{re, im}`).
2. Set `sigma2` (real σ², Q11.12). Hold it until `done`.
3. Pulse `start` for one cycle with `n_sc = N` (1 … `N_MAX`).
4. Results stream out one per cycle with `g_valid`:
   - `det9`: one 2×2 block per valid cycle. `g_blk` gives which block (0 = g11,
     1 = g12, 2 = g21, 3 = g22, in steps 6–9), `g_idx` gives the subcarrier.
   - `det2`: the full 4×4 G of subcarrier `g_idx` per valid cycle, in step 2.
5. `done` pulses once after the last result.

`sel` and the step number are also brought out. The outputs feed the MIMO
decoder (ŝ = G·y), which is not part of this design.

`N_MAX` (default 512) sizes the buffers and the counters. The subcarrier count
itself is chosen at run time.

## Files

```
rtl/mmse_pkg.sv            types (cplx_t, mat2_t, mat4_t, sel_t, dp9_*), rounding/saturation helpers
rtl/cmat2_mul.sv           2x2 complex MUL, 2 stages, optional Hermitian operands
rtl/cmat2_add.sv           2x2 complex ADD/SUB, 1 stage, optional +σ²I
rtl/cmat2_inv.sv           2x2 complex INV, 7 stages
rtl/delay_line.sv          D-cycle delay unit
rtl/dp9_datapath.sv        reconfigurable 9-step datapath (INV, 2 MUL, ADD, Sel)
rtl/inv_half.sv            4x4 INV HALF chain
rtl/mat4_mul.sv            4x4 MUL (8 MUL + 4 ADD, Sel)
rtl/step_ctrl.sv           step sequencer: reads, write-back, step number
rtl/sc_mem.sv              per-subcarrier memory, per-field write enables
rtl/det9.sv, rtl/det2.sv   the two detectors
rtl/mmse_detector_top.sv   both detectors side by side
tb/mmse_tb_pkg.sv          double-precision reference models
tb/tb_<module>.sv          one self-checking testbench per module
tb/tb_mmse_workloads.sv    full-size run (N_MAX = 512) of 52/108/216/472 subcarriers
```

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mmse_pkg.sv tb/mmse_tb_pkg.sv tb/tb_det9.sv --top-module tb_det9
./obj_dir/Vtb_det9
```

The testbenches check results against floating-point models written
independently of the RTL structure; the MMSE reference uses Gauss–Jordan
elimination on the full 4×4 matrix. They also check:

- the exact latency of every unit (2, 1, 7, 12, 3 and 12 cycles);
- the processing-time formula for several subcarrier counts;
- that every subcarrier's result arrives exactly once;
- that `Sel` changes at the right steps.

`tb_mmse_detector_top` runs both detectors at once. It counts the Sel
switches, the memory write-backs and the outputs, and fails if any of them
never happens. `tb_mmse_workloads` runs the default-size top through the four
published subcarrier counts and compares the processing times with the
published figures. It takes about 20 s to build and well under a minute to run.

## What follows the original design and what does not

Taken from the original design:

- the Strassen equations and their division into 9 and 2 steps;
- the unit counts per step;
- the Type A / Type B flows and the `Sel` reconfiguration;
- the stage counts: INV 7, MUL 2, ADD 1, total 12; 4×4 MUL 3, total 15;
- the 2-, 3-, 5- and 12-cycle delay units;
- the 24-bit word length;
- the processing-time formula.

Choices of this implementation:

- **Operand timing.** All operands are read in one cycle and delayed inside
  the datapath. The original reads its shared external memory in a way that is
  not specified.
- **Memory.** The per-subcarrier memory is an array inside each detector, with
  an asynchronous read port. The original uses an external memory shared with
  channel estimation and decoding.
- **INV-path output in step 5.** This output (c5) is written back as well as
  c1, because steps 8 and 9 need it.
- **Inside the 2×2 units.** The internal structure of the MUL, ADD and INV is
  this design's own; only their stage counts are given.
- **Number format.** Plain fixed point, Q11.12. The original speaks of
  "dynamic floating scaling" without describing it. Nothing like it is
  implemented here, so the dynamic range is that of Q11.12.
- **Handshake and reset.** The start/done handshake, the load port and the
  asynchronous active-low reset are this design's own.
- **Where σ²·I is added.** The addition is placed in the ADD unit.

Not covered:

- channel estimation;
- the MIMO decoder;
- the FFT front end;
- any gate-count or power figures.
