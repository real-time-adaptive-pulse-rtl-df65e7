# Adaptive pulse compression SoC fabric

SystemVerilog RTL for the programmable-logic side of a radar adaptive pulse
compression (APC) system. It has five independent engines behind one top
module, `apc_soc`:

| engine | module | what it does |
|---|---|---|
| Pulse compressor | `pulse_compressor` | Real-time FFT matched filter on 16-bit I/Q samples, 8192 points |
| Matrix multiplier | `matmul_coproc` | Sequential fixed-point <16,1> matrix product, up to 20x20 |
| Matrix inverter | `matinv_coproc` | Cholesky decomposition, then forward and backward substitution, up to 20x20 |
| LS coprocessor | `ls_coproc` | Least-squares APC, x = (SᵀS)⁻¹Sᵀy, for 60 gates and 6-sample waveforms |
| RMMSE coprocessor | `rmmse_coproc` | One reiterative MMSE pass per range gate, for 16-sample waveforms and up to 500 gates |
| Arithmetic units | `rca_adder`, `carry_select_adder`, `carry_skip_adder`, `csa_multi_operand_adder`, `seq_mult_csa` | Stand-alone adder and multiplier architectures of the kind the matrix engines are built from |

The host CPU, its bus, the ADC/DAC board, DMA and serial links are not part
of this RTL. Their connections are brought out as ports of `apc_soc`.

All blocks share one clock (`clk`) and an asynchronous active-low reset
(`rst_n`). Each coprocessor takes its operands on a slave stream
(`s_valid/s_ready/s_data/s_last`). It returns results on a master stream
(`m_valid/m_ready/m_data/m_last`), and both streams have back-pressure.

## Pulse compressor

`pc_input_buffer` → `window_weight` → `fft_stream` → `cmul` (× `ref_spectrum_mem`) → `fft_stream` (inverse)

- **Input buffer** (`pc_input_buffer`):
  - A rising `trigger` captures `cfg_len` samples (0 means N) into an N-deep FIFO.
  - Each capture becomes one FFT frame: the captured samples followed by zeros up to N.
  - It has two frame slots. A trigger that finds no free slot, or that arrives while a capture is running, is dropped and pulses `overflow`.
- **Reference source** (`ref_src`):
  - `0`: the host writes a pre-computed reference spectrum through `ref_we/ref_addr/ref_re/ref_im`.
  - `1` and `2`: with `learn` set, the next capture is a template. For `1` it is taken from the receive channel; for `2` it comes from the dedicated template channel (`tmpl_re/tmpl_im`).
  - A template frame is windowed (if `win_en`), transformed by the same FFT, and stored conjugated. It is not multiplied. `template_done` pulses when it has been stored.
- **Window** (`window_weight`): the host loads a Kaiser (β=2.23), Hamming, Hanning or any other table through `win_*`. The values are unsigned fractions with 15 fraction bits (1.0 = 32767).
- **FFT** (`fft_stream`):
  - Radix-2 single-path delay-feedback stages (`fft_sdf_stage`), decimation in frequency.
  - Each stage's delay line is a RAM with a circular pointer.
  - A ping-pong bit-reversal buffer (`bitrev_reorder`) gives natural-order output.
  - Latency is (N−1) + log2 N + N + 1 clocks. It accepts one frame after another without gaps.
- **Numbers**:
  - Samples are padded to 24 bits inside.
  - The forward FFT scales by ½ per stage. The IFFT does not scale.
  - The output (`pc_re/pc_im`) is the top 16 bits of the correlation divided by N.
  - `pc_power` = re² + im² (32 bits) for display.
- **Wrap-around**: the correlation is circular. Keep (captured samples + template length − 1) ≤ N to avoid it.

## Matrix multiplication coprocessor

- **Input**: set `cfg_m, cfg_n, cfg_p`. Stream M1 (m×n), then M2 (n×p), both row by row.
- **Compute**: one multiply-accumulate per clock, m·p·(n+1) clocks in total.
- **Output**: MM (m×p) leaves row by row.
- **Format**: Q1.15 (<16,1>), with rounding and saturation.

## Matrix inversion coprocessor

- **Input**: stream a symmetric positive-definite n×n matrix, row by row (`cfg_n` ≤ 20). Only the lower triangle is used.
- **Steps**:
  1. Cholesky L·Lᵀ, using a bit-serial square root and a restoring divider for 1/Lᵢᵢ.
  2. Forward substitution, L·Z = I.
  3. Backward substitution, Lᵀ·X = Z.
- **Output**: the inverse, row by row.
- **Format**: Q15.16 in 32 bits. The 16-bit format cannot hold the entries of SᵀS.
- **Errors**: a pivot ≤ 0 sets `not_pd`.

## LS coprocessor

- **Input**: stream the waveform s (N words), then the received window y (L+N−1 words).
- **Compute**:
  - It forms G = SᵀS directly from s, where S is the (L+N−1)×L convolution matrix.
  - It inverts G with its own `matinv_coproc`.
  - It keeps A = G⁻¹Sᵀ on chip (`a_valid`), then outputs x = A·y as L words.
- **Fixed waveform**: with `cfg_reuse` set and A stored, only y is sent, and the output starts after one pass over A.
- **Format**: real-valued, Q15.16.

## RMMSE coprocessor

- **Input**: stream s (N), R (N×N), y (G+N−1) and ρ (G+2N−2), with G = `cfg_gates`.
- **Setup**: it first computes the 2N−1 matrices SS(n) = sₙsₙᵀ.
- **Per gate**:
  - `matsum_tree` streams C(g)+R = Σₙ ρ(g+n+N−1)·SS(n) + R, one element per clock, into a built-in `matinv_coproc`.
  - As the inverse leaves, it forms w = ρ(g+N−1)·(C+R)⁻¹s and x̂(g) = wᵀ[y(g) … y(g+N−1)].
  - x̂(g) goes out on the master stream. `m_last` marks the last gate.
- **Between iterations**: the host computes the new ρ (including the η scaling) and sends the next pass.

## Arithmetic units

These units stand alone in the top. They share the operands `ar_a`, `ar_b` and `ar_cin`, so the architectures can be compared on equal inputs. The matrix engines use the synthesiser's own `+` and `*` instead.

- `rca_adder`:
  - Ripple carry with propagate p = a⊕b and generate g = a·b.
  - The carry rule is c(i+1) = p ? c(i) : g.
- `carry_select_adder`:
  - 4-bit blocks, each added twice (carry-in 0 and 1).
  - The incoming carry selects one result.
- `carry_skip_adder`:
  - 4-bit ripple blocks.
  - If every bit of a block propagates, the block's carry-out is taken straight from its carry-in.
- `csa_multi_operand_adder`:
  - Takes one operand per clock into a carry-save (sum, carry) pair.
  - The result is resolved by one ripple add when `in_last` arrives, one clock later.
- `seq_mult_csa`:
  - Adds one AND partial product per clock into a carry-save pair.
  - The product is ready N+1 clocks after `start`.

## Files

- `rtl/`: one module or package per file. `apc_pkg` holds the reference-source enum and a saturation helper.
- `tb/`: self-checking testbenches. Each ends by printing `TB_RESULT checks=… failures=…`.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl --top-module tb_apc_soc rtl/apc_pkg.sv tb/tb_apc_soc.sv
    ./obj_dir/Vtb_apc_soc

## How far it is tested

Every block has a self-checking testbench. Each one compares the block against a model written in the testbench.

| testbench | what it covers |
|---|---|
| `tb_apc_soc` | The whole top **at its default sizes**, all engines running concurrently. 8192-point pulse compression with a 2000-sample chirp, in all three reference modes (one with a Hamming window), including a dropped trigger. A 4x4 product with output stalls. A 4x4 inverse and a non-positive-definite matrix. LS at 60 gates and 6 samples, plus a fixed-waveform rerun. RMMSE at N=16 over 3 gates. The arithmetic units. It counts every mechanism and fails if one never happened. About 200k clocks, under a second of Verilator time. |
| `tb_pulse_compressor` | N=64, the three reference modes, overflow |
| `tb_fft_stream` | N=64, forward FFT against a direct DFT, IFFT round trip, latency |
| `tb_pc_input_buffer`, `tb_window_weight`, `tb_ref_spectrum_mem`, `tb_cmul` | Sub-blocks of the pulse compressor |
| `tb_matmul_coproc` | 4x4 and 3x5·5x2 with stalls. 8x8 timed against m·p·(n+1) compute clocks. |
| `tb_matinv_coproc` | n = 4, 8 and 20, plus a non-positive-definite matrix |
| `tb_ls_coproc` | L=10, N=4, normal and reuse modes |
| `tb_rca_adder`, `tb_carry_select_adder`, `tb_carry_skip_adder`, `tb_csa_multi_operand_adder`, `tb_seq_mult_csa` | 16- and 64-bit adders on corner and random operands. Multi-operand sums of 1 to 16 operands. Multiplier result and latency. |
| `tb_matsum_tree`, `tb_rmmse_coproc` | The exact summation tree with latency and saturation. One RMMSE pass at N=4 over 6 gates, twice. |

How the results compare with the models:
- Integer paths (matrix product, summation tree, multipliers, window) match their models bit for bit.
- The FFT path is checked to within a few LSBs.
- The matrix engines are checked against double-precision solutions. Tolerances are about 1e-2 for LS and RMMSE estimates and 2e-3 for inverse entries.

## Where this design makes its own choices

- **Stream protocol**: the coprocessors use valid/ready streams with a fixed word order. The original system used bus buffers next to a soft processor.
- **Word formats**:
  - The inversion-based engines (inverter, LS, RMMSE) use 32-bit Q15.16, because their matrices do not fit the <16,1> format.
  - The pulse compressor works on 24 bits internally.
- **Real-valued data**: LS and RMMSE work on real data. Complex radar data would need the datapaths doubled.
- **Merged LS flow**: the LS coprocessor does, in one block, the flow that would otherwise run as multiply → invert → multiply on the two generic engines. The generic engines stop at 20x20, which is too small for that flow at 60 gates.
- **Run-time versus build-time sizes**:
  - The number of LS gates and waveform samples is fixed when the design is built.
  - The RMMSE gate count (up to 500) and the matrix sizes (up to 20) can be set at run time.
- **RMMSE iterations**: the host computes the new powers and the η scaling between iterations, then runs the next pass.
- **FFT**: the pipeline and its scaling are this design's, not a vendor core.
  - Frames must arrive as N contiguous samples, which the input buffer guarantees.
  - A template is stored conjugated after its own FFT pass.

## Changing sizes

All sizes are parameters of `apc_soc`: `PC_N` (power of two), `MM_DIM`, `MI_DIM`, `LS_L`, `LS_N`, `RM_N`, `RM_L`.

Memory grows as follows:
- Pulse compressor: about 3·N complex words, for the FIFO, the two reorder banks per FFT and the reference.
- LS: L·(L+N−1) words for A.
- RMMSE: (2N−1)·N² words for SS(n).

Synthesis of the top at these defaults is slow, because the FFT and the matrix memories are large arrays.
