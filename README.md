# Streaming radix-2 FFT with CORDIC twiddle rotation (R2MDC pipeline)

This is a pipelined FFT that takes one complex sample per clock, without
stopping, and returns two frequency bins per clock. It uses no general
multiplier and no RAM. It is built for very high sample rates, such as
digitised acoustic-emission signals, where a new sample arrives on every
clock and the transform cannot fall behind.

Two ideas carry the design:

* **Radix-2 multi-path delay commutator (R2MDC).** The transform is a chain of
  log2(N) identical stages, one per column of the decimation-in-frequency
  butterfly diagram. Short shift registers and a 2x2 switch (the
  *commutator*) bring the two samples of every butterfly together at the
  right clock cycle. Intermediate results therefore flow from stage to stage
  and are never written to memory.
* **Twiddle factors as rotations.** Multiplying by a twiddle factor
  W = exp(-j·2πm/N) only turns a vector. Each stage turns its butterfly
  difference with a pipelined CORDIC, which uses 10 shift-and-add
  micro-rotations. The CORDIC's constant gain is then removed by a
  multiplier-free constant multiplication: the constant is recoded into
  signed radix-2^r digits.

The default configuration is the 16-point, four-stage pipeline. Every module
is generic in N (any power of two), and the testbenches also build it with
128 and 2048 points.

## How a frame moves through the pipeline

This is the part that takes the most thought. In stage `s` (counting from 1),
the butterfly pairs samples that lie `H = N / 2^s` apart: 8, 4, 2 and 1 for
N = 16.

**Stage 1.** Input arrives as one serial frame of N samples. The first N/2
samples enter an N/2-deep shift register, which shifts only on valid input.
While samples N/2 … N−1 arrive, the register's output is sample k and the
input is sample k + N/2. The butterfly then forms

    sum(k)  = (x[k] + x[k+N/2]) / 2
    diff(k) = (x[k] − x[k+N/2]) / 2 · W_N^k          k = 0 … N/2−1

The sum stream carries a half-length sequence whose DFT gives the even bins.
The difference stream gives the odd bins. The two streams leave side by side,
N/2 cycles long.

**Stages 2 … log2 N.** Each of these stages takes both streams together and
rearranges them so that its butterfly again sees pairs H apart:

    in_neg ──[delay H]──┐          ┌──[delay H]── butterfly input a
                        ├─commut.─┤
    in_pos ─────────────┘          └───────────── butterfly input b

Let t count cycles from the first valid pair of a frame. The commutator is
crossed while bit log2(H) of t is 1, which is the second half of every
2H-cycle block. With these settings the butterfly sees, for t = H … H+N/2−1:

* first H pairs (p[k], p[k+H]) from the positive stream of the block;
* then H pairs (n[k], n[k+H]) from the negative stream of the same block.

This repeats for every 2H-cycle block. The delays shift on every clock, so
the last pairs of a frame drain out after the input has gone idle. Stage `s`
multiplies its difference by W_N^(k·2^(s−1)), where k = t mod H. The last
stage's twiddle is always 1, so it has no rotator.

For N = 16 this gives the standard R2MDC count of log2 N − 1 = 3 rotators,
2·log2 N = 8 butterfly adders, and 8 + 2·(4+2+1) = 22 = 1.5N − 2 words of
commutator delay.

| stage | span H | delays on the stream path | twiddles used | rotator |
|-------|--------|---------------------------|---------------|---------|
| 1 | 8 | 8 (input, enabled by valid) | W16^0 … W16^7 | yes |
| 2 | 4 | 4 + 4 | W16^0, ^2, ^4, ^6 | yes |
| 3 | 2 | 2 + 2 | W16^0, ^4 | yes |
| 4 | 1 | 1 + 1 | 1 | no |

Each rotator takes 13 cycles. The sum stream of the same stage goes through
a 13-word delay, so the two streams stay aligned.

**Frames.** A frame must be N samples on consecutive cycles. Frames may follow
each other with no gap (continuous flow) or after any idle time. Stage 1 is
busy during the second half of each input frame. Every later stage handles
one frame in N/2 cycles, so the pipeline keeps up with one sample per clock
indefinitely.

## Output order, scaling and accuracy

The bins come out in bit-reversed order, two per cycle, for N/2 consecutive
cycles per frame. In output cycle c:

* `out_pos` holds bin bitrev(2c);
* `out_neg` holds bin bitrev(2c+1).

For N = 16 the order is (0, 8), (4, 12), (2, 10), (6, 14), (1, 9), (5, 13),
(3, 11), (7, 15). The ports `out_bin_pos` and `out_bin_neg` carry these
indices, so you do not need a reorder buffer to tell the bins apart.

Every butterfly halves its results by an arithmetic shift right. The outputs
are therefore the DFT divided by N, and the 16-bit word cannot overflow. A
rotation preserves magnitude, so a stage never produces a value larger than
its inputs. Keep the inputs inside the disk |x| ≤ 2^15 − 1: the rotator then
never reaches its saturation limit.

The main error source is the rotator. Ten micro-rotations leave a residual
angle of up to about 0.11°, a relative error near 0.2 % per rotated value.
The halvings add a fraction of an LSB per stage. In the testbenches the
largest bin error was:

* 17 LSB at N = 16 (inputs up to about 30 000 in magnitude);
* 22 LSB at N = 128;
* 38 LSB at N = 2048.

## The twiddle rotator (`cordic_rotator`)

`cordic_rotator` computes (x + jy)·exp(jw) in rotation mode. The stage's
twiddle ROM supplies the angle w. Angles use a 16-bit binary unit where 2^16
is one full turn. In this unit every twiddle angle −2πm/N is an exact
integer, −m·2^16/N, so the ROM is computed at elaboration time. No table of
cosines or sines is stored.

The rotator pipeline has 13 registers:

1. **Pre-rotation.** An angle beyond ±90° is first handled by an exact
   quarter turn, (x, y) → (−y, x) or (y, −x). This brings the remaining angle
   inside the ±99.7° convergence range of CORDIC. Stage 1 needs this, since
   its twiddles reach −157.5°.
2. **Ten micro-rotations** (`cordic_microrotation`). Iteration i turns the
   vector by ±atan(2^−i) using one shift and one add or subtract per
   coordinate. It subtracts the same angle from the residual, and the sign of
   the residual angle chooses the direction.
3. **Gain correction** (`radix2r_const_mult`). The micro-rotations scale the
   vector by 1.64676, so both coordinates are multiplied by
   1/1.64676 ≈ 39797/2^16. The constant is split into 4-bit segments. Each
   segment is recoded into a signed digit in [−8, 8). Each digit's product
   is a sum of shifted copies of the operand, and the partial products are
   added: only shifts and adders. The digits are worked out at elaboration.
4. **Output.** The 4 guard bits are rounded off and the result is saturated
   to 16 bits.

Inside the rotator, coordinates carry 2 extra integer bits (for the gain and
the quarter turn) and 4 extra fraction bits.

**Handshake.** `in_push` marks a valid input and `out_push_F` a valid output.
When `out_stall` is high while an output is valid, the whole pipeline holds
and `in_stall` goes high. An input offered during a stall must be held until
it is taken. Assertions check both rules. Inside the FFT, `out_stall` is tied
low, so the rotator never stalls and its latency is exactly 13 cycles.

## Top-level interface (`r2mdc_fft`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active-low reset; clears valid and control state only |
| `in_valid` | in | 1 | input sample valid; a frame is N consecutive valid cycles |
| `in_data` | in | `cplx_t` | `{re, im}`, 16-bit two's complement each |
| `out_valid` | out | 1 | output pair valid, N/2 consecutive cycles per frame |
| `out_pos` / `out_neg` | out | `cplx_t` | bins `out_bin_pos` / `out_bin_neg`, scaled by 1/N |
| `out_bin_pos` / `out_bin_neg` | out | log2 N | bin index of each output |

The only parameter is `N` (default 16). `cplx_t`, the angle type and the
rotator constants are defined in `fft_pkg`.

Latency is counted from the clock edge that takes the first sample of a frame
to the edge that presents its first output pair:

    N + (log2 N − 1) · 13 cycles   (55 cycles for N = 16)

Throughput is one sample per clock.

After generic synthesis, the 16-point design has about 320 flip-flop bits in
plain registers. About 5 200 further bits sit in register arrays: the
commutator delays, the sum-path delays and the rotator pipelines.

## Modules

| file | role |
|------|------|
| `rtl/fft_pkg.sv` | sample, complex and angle types; arctangent table; inverse-gain constant; rotator latency |
| `rtl/r2mdc_fft.sv` | top: chain of stages, bin-index counter |
| `rtl/r2mdc_stage.sv` | one stage: input delays and commutator (or the N/2 input register in stage 1), butterfly, twiddle ROM and rotator, sum-path delay |
| `rtl/stage_controller.sv` | per-stage counter: commutator select, butterfly-valid window, twiddle index |
| `rtl/shift_register.sv` | enabled delay line |
| `rtl/mdc_commutator.sv` | 2x2 straight/cross switch |
| `rtl/butterfly.sv` | radix-2 DIF butterfly with halving |
| `rtl/twiddle_rom.sv` | twiddle angles of one stage |
| `rtl/cordic_rotator.sv` | pipelined CORDIC rotator with push/stall handshake |
| `rtl/cordic_microrotation.sv` | one shift-add micro-rotation |
| `rtl/radix2r_const_mult.sv` | shift-add multiplication by a constant, signed radix-2^r digits |

## Relation to the published architecture

This RTL follows the R2MDC FFT with CORDIC-based twiddle multiplication and
radix-2^r constant multiplication described in *Efficient Hardware
Architecture for Ultra-High Sampling Rate FFT Analysis of Acoustic Emission
Signals*. The code and this description are independent of its authors.

Taken from that architecture:

* the 16-point, four-stage R2MDC pipeline with shift registers before the
  butterfly and after the multiplier;
* a commutator made of two multiplexers on one select line;
* a ROM-addressed twiddle for each multiplier;
* log2 N − 1 multipliers and 1.5N − 2 delay words;
* an unrolled, pipelined CORDIC with 10 iterations in place of complex
  multipliers;
* correction of the CORDIC scale factor by a radix-2^r shift-add constant
  multiplication;
* the rotator's port names and its 16-bit data width.

Chosen here, because the source leaves them open or is inconsistent:

* **No RAM.** One block diagram of the source shows a dual-port RAM and an
  address generator. Its text, however, describes a pipeline that needs no
  memory blocks and keeps all data in shift registers. This RTL follows the
  text. The diagram's RAM, address generator and the program-driven CORDIC
  processor shown as background were not built.
* **Unrolled rotator.** The source's rotator schematic looks iterative, with
  a register memory and a micro-rotation sequencer. Its text calls the
  rotator unrolled and pipelined. This RTL is unrolled: one register per
  micro-rotation.
* **Gain value.** The CORDIC gain correction uses 1/1.64676 = 0.607253, the
  true inverse gain of 10 micro-rotations. The source quotes a different
  value for the scaling factor, which does not match a 10-iteration CORDIC.
* **Angle input.** The rotator gets an angle input, `w_in`, and a
  quarter-turn pre-rotation.
* **Handshake.** The meaning of the push/stall signals is this design's own.
* **Twiddle exponents.** These are the standard DIF exponents,
  W_N^(k·2^(s−1)). The exponents printed on the source's 16-point flow graph
  were not used.
* **Stage boundary.** The delay that follows a stage's multiplier, and the
  commutator after it, sit at the input of the next stage module. The
  circuit is the same.
* **Sum-path delay.** The sum path is delayed to match the rotator latency.
  The source does not state the multiplier's latency.
* **Own conventions.** Halving in every butterfly, the frame and valid
  conventions, the per-stage counter controller, the bin-index outputs,
  `R` = 4 for the radix-2^r recoding, 4 guard bits, output saturation and
  reset behaviour are all this design's own.

The source also mentions 128- to 2048-point and non-power-of-two transform
sizes. The RTL covers power-of-two sizes by changing `N`, and the size
testbench exercises 128 and 2048. Non-power-of-two (prime-factor) lengths
are not supported.

## Simulating

Every testbench in `tb/` checks its own results. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example, the end-to-end test at the
default size:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/fft_pkg.sv tb/tb_r2mdc_fft.sv --top-module tb_r2mdc_fft
    ./obj_dir/Vtb_r2mdc_fft

The testbenches:

* `tb_r2mdc_fft`: 40 frames of impulses, DC, tones, decaying bursts shaped
  like acoustic-emission hits, and random data, some back to back and some
  after gaps. It compares every bin with a floating-point
  DFT/N. It also checks the bin indices and the 55-cycle latency. It counts
  back-to-back frames, frames after a gap, commutator crossings in stages
  2–4 and quarter-turn pre-rotations, and fails if any of them never
  happened.
* `tb_r2mdc_fft_lte_sizes`: the same comparison for N = 128 and N = 2048,
  using `fft_size_harness`.
* One testbench per module: `tb_r2mdc_stage`, `tb_stage_controller`,
  `tb_cordic_rotator`, `tb_cordic_microrotation`, `tb_radix2r_const_mult`,
  `tb_twiddle_rom`, `tb_butterfly`, `tb_mdc_commutator` and
  `tb_shift_register`. `tb_cordic_rotator` also exercises the stall
  handshake and checks the 13-cycle latency.

All of them finish in seconds.

## Limits

* Frames must be contiguous. A gap inside a frame is not supported.
  Assertions in the stage controllers report such a gap, and also a frame
  that reaches a stage before the previous one has left it.
* The rotator's `out_stall` cannot stall the FFT pipeline. The delay lines
  run freely, so back-pressure at the FFT output is not supported.
* The outputs are scaled by 1/N with 16-bit words. For small inputs and
  large N, quantization dominates: at N = 2048 the scaled output of
  noise-like input is only a few hundred LSB.
