# Soft-input soft-output MIMO detector: MMSE parallel interference cancellation

This RTL is the detector of an iterative MIMO receiver. In such a receiver, detection
and channel decoding swap soft information several times per packet.
For each received vector `y = H s + n`, the detector gets three things:

- a 4 x 4 complex channel `H`,
- the noise variance `N0`,
- a-priori log-likelihood ratios (LLRs) of every coded bit, from the decoder.

It returns extrinsic LLRs of all `4 x Q` bits. Four spatial streams are supported with BPSK
(Q = 1), QPSK (2), 16-QAM (4) and 64-QAM (6), using IEEE 802.11n Gray mapping.

The algorithm is MMSE parallel interference cancellation (PIC):

1. Convert the prior LLRs of each stream into a soft symbol `ŝ_i` (mean) and a variance `E_i`.
2. Subtract the soft estimates of all *other* streams from the received vector.
3. Run an MMSE filter on the remainder to get an estimate `z_i` and its SINR `ρ_i`.
4. Compute max-log LLRs of the bits of stream `i`: `L = ρ_i · λ_b(z_i)`.

The main idea behind the architecture is that everything is rewritten in terms of the
Gram matrix `G = HᴴH` and the matched-filter output `y_MF = Hᴴy`. Then one 4 x 4 matrix
per vector, `A = G·diag(E) + N0·I`, has to be inverted, instead of one matrix per stream.
Row `i` of `A⁻¹` is the MMSE filter of stream `i` up to a real scale factor:

    μ_i = a_i g_i          z_i = a_i ŷ_i / μ_i          ρ_i = μ_i / (1 − E_i μ_i)

Here `ŷ_i = y_MF − G ŝ + g_i ŝ_i` is the matched-filter output with the other streams
cancelled, and `g_i` is column `i` of `G`.

## Coarse-grained pipeline

The detector is made of eight processing units (PUs), each a small datapath with its own
flip-flop data memory. They form a pipeline that is six periods deep:

| period | PU(s)                                      | work per vector                         |
|--------|--------------------------------------------|-----------------------------------------|
| 1      | `gram_mf_pu`                               | `G = HᴴH`, `y_MF = Hᴴy`                 |
| 2      | `soft_symbol_pu`                           | `ŝ_i`, `E_i`, matrix `A`                |
| 3      | `pic1_pu` and `lu_fwd_pu` (in parallel)    | `t = y_MF − Gŝ`; `A = LU`, `L⁻¹`        |
| 4      | `pic2_pu` and `back_subst_pu`              | `ŷ_i = t + g_i ŝ_i`; `A⁻¹ = U⁻¹L⁻¹`     |
| 5      | `mmse_sinr_pu`                             | `μ_i`, `z_i`, `ρ_i`                     |
| 6      | `llr_pu`                                   | LLRs, output register                   |

Every PU must finish its work within a fixed period of **TS = 18 clock cycles**.

- The counter `cyc` in `control_unit` runs 0..17.
- Cycle 17 is the *exchange cycle* (`xchg`).
- At the end of the exchange cycle, every PU loads its data memory from the result
  registers of the PU before it, all at the same clock edge.
- Values a later PU needs but this PU does not change (`G`, `y_MF`, `E`, the mode) are
  copied through with the data ("feed-through").

A PU therefore has cycles 0..16 to compute. Its results must be in registers by the end of
cycle 16, and they stay there while the next PU reads them during the exchange.

Consequences:

- **Throughput:** one vector per 18 cycles, which is `4·Q/18` bits per cycle. At 64-QAM
  this is 1.33 bit/cycle, so 600 Mb/s (the 802.11n peak) needs a 450 MHz clock.
- **Latency:** exactly `6 × 18 = 108` cycles from acceptance to `out_valid`.
- **Parallel branches:** the PIC branch (periods 3–4) and the inversion branch (periods 3–4)
  work on the same vector in parallel. Both feed the MMSE PU in period 5.

Within a period, each PU follows its own fixed schedule, which is set by `cyc`. The
schedules are in the opening comment of each PU. Most PUs produce one output element per
cycle through one shared set of arithmetic units. The busiest PUs (both PIC parts and back
substitution) use cycles 0–15. The others finish by cycle 13.

### Handshake and control

`in_ready` is high only in the exchange cycle. A vector is accepted when `in_valid` is also
high in that cycle, so upstream logic must hold `din` until it sees `in_ready`.

A valid bit travels with each vector through `stage_valid[1..6]`. `out_valid` is high for
one whole period, 108 cycles after acceptance, and during it `llr` and `out_mode` are stable.
Gaps in the input simply leave holes in the pipeline. There is no back-pressure on the
output side, so the consumer must take each result within its 18-cycle window.

Reset (`rst_n`) is synchronous and active low, and it clears only the control state.
Datapath registers are not reset, because their contents only count when the matching
valid bit is set.

An assertion in `control_unit` checks that a vector enters only in an exchange cycle.

### Clocking and clock gating

The internal clock is made by an XOR of two input clocks, `clk_0` and `clk_90`, which have
the same frequency and a 90° phase offset (`clk_doubler`). The result has twice their
frequency, so the chip's pads only carry half the internal rate. The duty cycle of the
internal clock depends on how accurate the 90° offset is.

Each PU runs on its own gated copy of the clock (`clock_gate`: a latch that is transparent
while the clock is low, then an AND gate). The control unit enables a PU in two cases:

- its period holds a valid vector;
- it is the exchange cycle and its predecessor is handing a vector over.

PUs without data therefore get no clock edges. For a simulation model this matters in one
way: every register inside a PU sits in a gated domain, and `cyc` and `xchg` come from the
ungated domain.

## Number formats

All inputs and outputs are integers with fixed binary points. The widths are from the
original design. The positions of the binary points are this design's choice.

| signal          | width          | format                          |
|-----------------|----------------|---------------------------------|
| `H` entries     | 14 bit re/im   | signed, 11 fraction bits (±4)   |
| `y` entries     | 16 bit re/im   | signed, 11 fraction bits (±16)  |
| a-priori LLR    | 5 bit          | signed, LSB = 0.5 (±8)          |
| `N0`            | 16 bit         | unsigned, 16 fraction bits (`N0 < 1`) |
| extrinsic LLR   | 6 bit          | signed, LSB = 0.5 (−16…15.5), saturated |
| internal values | 28 bit         | signed, 16 fraction bits        |

One internal format (`fx_t`, defined in `mmse_pic_pkg`) is used everywhere. The original
optimised the word length of each unit separately, and its widest unit was 28 bits. All
adds and multiplies round toward −∞ after the product shift and saturate to 28 bits.

Symbols have unit average energy (`Es = 1`). The signal-to-noise range is limited by `N0 < 1`.

LLR layout: `llr[i][b]` is bit `b` of stream `i`. Bit 0 is the first bit of the Gray label:

- the first `Q/2` bits belong to the real part and the rest to the imaginary part;
- BPSK uses only bit 0, on the real axis;
- unused slots are 0.

A positive LLR favours bit value 1.

## Soft symbols without enumerating the constellation

`soft_symbol_pu` reads `tanh(L/2)` for each bit from a 17-entry table. The table is indexed
by `|L|` counted in LSBs of 0.5, with entry `k` equal to `round(2¹⁶·tanh(k/4))`.

With Gray mapping and independent bits, the mean and the second moment of one real
dimension turn out to be short polynomials in those `t` values. They are computed here on
the odd-integer grid before scaling by `Kmod`:

| bits per dimension | mean                     | E[x²]                              |
|--------------------|--------------------------|------------------------------------|
| 1                  | `t0`                     | `1`                                |
| 2                  | `t0(2 − t1)`             | `5 − 4t1`                          |
| 3                  | `t0(4 − 2t1 + t1t2)`     | `21 − 16t1 − 4t2 + 8t1t2`          |

From these, `ŝ = Kmod·(mean_I + j·mean_Q)` and
`E = Kmod²·(E_I[x²] − mean_I² + E_Q[x²] − mean_Q²)`, with `E` clamped at 0. With zero
priors (the first iteration), `ŝ = 0` and `E = 1`, and the detector is a plain MMSE detector.
These closed forms are this design's own. The original only says the step is done with
table look-ups.

## Matrix inversion: LU, forward and back substitution

`A⁻¹` is never formed by cofactors. The inversion is split across two PUs.

`lu_fwd_pu`:

- Factors `A = LU` in place (Doolittle form, no pivoting). This is safe because `A` is a
  Hermitian positive definite matrix times a positive diagonal, so every pivot is non-zero.
- Solves `L v_j = e_j` for the four unit vectors, which gives `L⁻¹`.
- Pivot `k` occupies cycles `4k..4k+3`:
  - cycle `4k`: `|U_kk|²` enters the reciprocal unit;
  - cycle `4k+2`: the result returns, `1/U_kk = conj(U_kk)·(1/|U_kk|²)` is formed, and column `k` of `L` is written;
  - cycle `4k+3`: the trailing submatrix is updated.
- The rows of `L⁻¹` follow in cycles 11–13.

`back_subst_pu` solves `U x_j = v_j`, one element per cycle (row 3 down to row 0). The
columns `x_j` are the columns of `A⁻¹`. It reuses the four pivot reciprocals from the LU PU,
so only the LU PU needs a reciprocal unit for the inversion.

The whole inversion is therefore built from adds, multiplies and real reciprocals.

## Newton–Raphson reciprocal

`recip_nr` is shared by the LU PU and the MMSE PU (one instance in each). It works in four
steps:

1. A leading-one shift normalises `x` to `x̃ ∈ [0.5, 1)` and records the shift as `e`.
2. The eight bits below the leading one address a 256-entry table of initial guesses,
   `x₀ = 1/midpoint`.
3. One Newton–Raphson step gives `x₁ = 2x₀ − x₀²·x̃`.
4. The output is `mant = x₁` (16 fraction bits, in (1, 2]) and the shift `e`, so that
   `1/x = mant · 2⁻¹⁶ · 2⁻ᵉ`. The caller applies `2⁻ᵉ` with an arithmetic shifter.

There is a register after the table and another after the squarer. The final multiply,
double and subtract are combinational, so the latency is 2 cycles and a new operand can
start every cycle.

The table is computed by a constant function at elaboration. Measured over random and edge
operands, the worst relative error is 3.9·10⁻⁵ (about 14.6 bits). Most of that error comes
from truncating `x̃` to 16 bits.

## LLR computation

`llr_pu` computes max-log LLRs without the prior term: `L_{i,b} = ρ_i · λ_b(z_i)`.

With Gray mapping, each bit depends on one real dimension only. For that dimension, let
`a0` and `a1` be the nearest PAM points whose bit `b` is 0 and 1. Then
`λ_b = (a1 − a0)(2z − a0 − a1)`. The unit finds `a0` and `a1` by comparing distances to the
(at most eight) grid points; `a1 − a0` is a small even integer. One stream is handled per
cycle.

The result is rounded to the 6-bit output and moved to the output register in the exchange
cycle.

## Files

| file | contents |
|------|----------|
| `rtl/mmse_pic_pkg.sv` | sizes, fixed-point types and helpers (`fx_mul`, `c_mul`, …), inter-PU structs, modulation constants |
| `rtl/mmse_pic_detector.sv` | top level |
| `rtl/control_unit.sv`, `rtl/clock_gate.sv`, `rtl/clk_doubler.sv` | control and clocking |
| `rtl/gram_mf_pu.sv` … `rtl/llr_pu.sv` | the eight PUs |
| `rtl/recip_nr.sv` | reciprocal unit |
| `tb/mmse_pic_ref_pkg.sv` | floating-point reference model, used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_packet_workload.sv` | one 108-vector packet, detected twice, through the full detector |

The reference model works with `real` values and differs from the RTL's method where it
can:

- the soft symbols come from enumerating every constellation point;
- the inverse comes from Gauss–Jordan elimination with pivoting;
- the LLRs come from an exhaustive max-log search.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_mmse_pic_detector` runs the top at its default size. It sends 48 random vectors through
the detector:

- 20 back to back, then with random gaps;
- all four modulations, with mode changes between vectors;
- with zero and non-zero priors.

It checks every LLR against the reference to within one LSB, and checks each vector's
108-cycle latency and the one-vector-per-18-cycles input rate. It also counts the
mechanisms that occurred: full pipeline, input gaps, gated clocks, mode changes and both
prior cases. It counts a failure for any mechanism that never happened.

`tb_packet_workload` runs one realistic packet through the detector. The scenario is 4 x 4
16-QAM with a rate-1/2 code and 864 information bits per packet, which gives 108 vectors.
The packet is detected twice, back to back:

- first with zero priors;
- then with priors that stand in for a decoder's output (mostly correct, 2 % wrong sign).

It checks all 216 outputs, the gap-free 18-cycle input rate and the total of 3978 cycles.
It also checks that the priors do not increase the number of wrong hard decisions; in a
typical run they drop from 187 to 70 of 1728 bits at `N0 = 0.12`.

### Simulating

With Verilator 5 (the packages must come first):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_mmse_pic_detector \
      -y rtl -y tb +libext+.sv rtl/mmse_pic_pkg.sv tb/mmse_pic_ref_pkg.sv \
      tb/tb_mmse_pic_detector.sv
    ./obj_dir/Vtb_mmse_pic_detector

The other testbenches are built the same way, by replacing the top-module name and the file.
The full detector test runs in a few seconds.

## Where this RTL departs from the original design

- **PU schedules and arithmetic-unit counts** are this design's own. Each PU instantiates
  what its schedule needs, so the number of adders, multipliers and tables per PU, and with
  it the area split between the PUs, differs from the original. Both designs agree on which
  PUs own a reciprocal unit (LU and MMSE) and which use a tanh table (soft symbols).
- **No pipeline registers at the arithmetic-unit inputs.** The original adds them to cut the
  critical path by about a third. Here, results go straight into the data-memory registers.
  The critical path is therefore longer, and the original's clock rate is not to be expected
  without adding them back.
- **Split of PIC between parts 1 and 2.** The original names the two parts but does not say
  how the work is divided.
- **Pivot reciprocals** are passed from the LU PU to the back-substitution PU.
- **A single 28-bit internal format** is used instead of optimised word lengths per unit.
  Binary points of the I/O are chosen here.
- **Soft-symbol and LLR arithmetic** use the closed forms described above.
- **Only the pipelined reciprocal** is built. A smaller sequential variant (4-bit table, two
  iterations, more cycles) exists as an alternative and is not included.
- **Not included:** the chip I/O interface logic (serialising the roughly 1000-bit input word
  onto pins), scan chains and pads. The top brings the full input and output words out as
  ports.
- **Outer loop is external.** The detector does one detection pass per vector. The channel
  decoder and the iteration loop (feeding decoder LLRs back as priors) are outside it.
