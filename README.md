# Quantized min-sum decoder for 2-D single-parity-check product codes

This RTL decodes a two-dimensional product code built from single-parity-check
(SPC) codes, also called a TPC/SPC code, using only 5-bit soft values. Each row of
the code array is an even-parity (N1, N1-1) codeword, and so is each column (N2,
N2-1). The default is the high-rate (16,15)² code: 225 data bits in a 256-bit
block, rate 0.879. The decoder takes soft channel values (log-likelihood ratios,
LLRs). It passes extrinsic information back and forth between the row codes and the
column codes for three iterations. It returns a soft output and a hard decision for
every bit.

The idea it is built around comes from the study "Quantization and Quantization
Sensitivity of Soft-Output Product Codes for Fast-Speed Applications". With the
min-sum check rule, a uniform fixed-point format with 3 integer bits and 1
fractional bit, written (3,1), is good enough. That format takes 5 bits with the
sign. A gain (scaling factor) must be set ahead of the quantizer. The study reports
that this combination comes close to a sum-product decoder with 9-bit words, for far
less hardware. This design is that chosen configuration.

## The decoding rule

All LLRs use the convention bit 0 → +1 and bit 1 → −1, so a positive LLR favours 0.
With `Lch` the channel LLRs and `Le1`, `Le2` the extrinsic LLRs of the row and column
codes (both 0 at the start of a frame), one iteration is:

```
row pass    (every row i, every position j):
    Lo(i,j)  = Lch(i,j) + Le2(i,j)
    Le1(i,j) = ⊞_{t≠j} Lo(i,t)
column pass (every column j, every position i):
    Lo(i,j)  = Lch(i,j) + Le1(i,j)
    Le2(i,j) = ⊞_{t≠i} Lo(t,j)
```

After the last iteration the decoder outputs `Lc = Lch + Le1 + Le2` and decides
`u = (Lc > 0) ? 0 : 1`. A soft output of exactly zero is decided as 1.

`⊞` is the check operation, the LLR of the XOR of two bits. Min-sum approximates it by
`a ⊞ b ≈ sgn(a)·sgn(b)·min(|a|,|b|)`, with `sgn(0) = 0`. The exact form adds a
log-domain correction term, which min-sum drops. Over a whole SPC codeword, the
extrinsic value of position j is the product of the signs of all the other
positions times their smallest magnitude.

## Number format: the (P,Q) word and the gain stage

Every stored LLR is a (P,Q) word: a sign bit, P integer bits and Q fractional bits.
The defaults P = 3 and Q = 1 give 5 bits, steps of 0.5 and a range of ±7.5. Inside the
RTL a word is two's complement, clipped to the symmetric range ±(2^(P+Q) − 1) LSBs.
That is exactly the set of levels of a sign + magnitude word, without the second zero.

`llr_quantizer` converts the channel value in three steps:

1. It multiplies the channel LLR (12-bit signed, 6 fractional bits) by `scale`, an
   unsigned 8-bit gain with 7 fractional bits (0 to 1.99; 102 ≈ 0.8, 128 = 1.0).
2. It rounds the magnitude of the product to the nearest multiple of 2^−Q, with halves
   rounding away from zero, so the quantizer is symmetric about zero.
3. It clips to 2^P − 2^−Q and restores the sign.

Why a gain is needed: with a 3-bit integer part, LLRs are clipped at 7.5, and at
moderate to high SNR most channel LLRs are larger than that. A smaller gain trades
clipping for quantization noise. The best setting falls as the SNR rises. It is
about 0.8 at an SNR of 4 dB and close to 1 at low SNR. The best gain hardly depends on
the code rate (16×16 versus 32×32). `scale` is therefore a run-time input. It is
sampled while rows are loaded and may change between frames.

The sum `Lo = Lch + Le` in each SISO unit is clipped back to the (P,Q) range too, so
every stored or exchanged value is a 5-bit word. The soft output `Lc` is the one
exception: it is the unclipped 7-bit sum (P+Q+3 bits). Its sign, and so the decision,
is therefore exact.

## The SISO unit (`spc_minsum_siso`)

This is the core of the datapath. Two instances exist, one 16 wide for rows and one 16
wide for columns. Both are purely combinational. Instead of N separate (N−1)-input
minimum searches, one unit makes a single pass over its N a priori values
`Lo_j = sat(Lch_j + Le_in_j)` and finds three things:

* `parity`: the XOR of all sign bits;
* `min1`, `idx1`: the smallest magnitude and where it is;
* `min2`: the second smallest magnitude. If the smallest value occurs twice,
  `min2 = min1`.

Output j is then `(parity XOR sign_j) ? −m : m`, with `m = min2` when `j = idx1` and
`m = min1` otherwise. This matches the pairwise chain of min-sum check operations
exactly; the testbench computes that chain directly to confirm it. The rule
`sgn(0) = 0` needs no extra logic. If some `Lo_t` is 0, then 0 is the smallest
magnitude seen from every other position, so their outputs are 0 whatever sign is
used.

## Buffers, schedule and timing

Three `llr_matrix` instances hold `Lch`, `Le1` and `Le2`: 3 × 256 × 5 = 3840 flip-flops
at the defaults. Each can read or write a whole row or a whole column in one cycle,
with combinational reads. `tpc_ctrl` runs one frame at a time through four phases:

| phase | cycles (no stalls) | action per cycle |
|---|---|---|
| LOAD | N2 = 16 beats | quantize one input row, write it to `Lch` |
| ROW  | N2 = 16 | row i: SISO(`Lch` row, `Le2` row) → `Le1` row |
| COL  | N1 = 16 | column j: SISO(`Lch` column, `Le1` column) → `Le2` column |
| OUT  | N2 = 16 beats | row i: `Lc`, decisions; the last beat clears `Le1`/`Le2` |

ROW and COL alternate ITER = 3 times, so decoding takes ITER·(N1+N2) = 96 cycles. With
a source and sink that never stall, a frame takes 16 + 96 + 16 = 128 cycles. There is
one idle cycle between the last input beat and the first output beat. Input and output
never overlap: `in_ready` is high only in LOAD, and `out_valid` only in OUT.

## Ports of `tpc_minsum_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears all buffers) |
| `scale` | in | 8 | gain ahead of the quantizer, 7 fractional bits |
| `in_valid`, `in_ready` | in/out | 1 | input handshake: a row moves when both are high at a clock edge |
| `in_llr` | in | 16 × 12 | one row of channel LLRs, element j = column j, 6 fractional bits |
| `out_valid`, `out_ready` | out/in | 1 | output handshake; data stays stable while `out_ready` is low |
| `out_last` | out | 1 | the row on the output is row N2−1 |
| `out_lc` | out | 16 × 7 | soft outputs `Lc` of the row, in 0.5 units |
| `out_u` | out | 16 | hard decisions of the row |
| `out_qsat`, `out_dsat` | out | 1 | in this frame a channel value was clipped by the quantizer / an a priori sum was clipped |
| `busy` | out | 1 | a frame is being decoded or delivered |

All 16 decisions of every row are delivered, including the parity positions. The data
bits are rows 0 to 14, columns 0 to 14.

## Measured behaviour

The end-to-end testbench sends 100 random codewords at each of four operating points.
Every output word is compared bit for bit with a reference decoder in the testbench.
Typical decoded bit error rates come out as:

| SNR per code symbol | gain | channel BER | decoded BER |
|---|---|---|---|
| 2 dB | 1.0 | ≈ 4·10⁻² | ≈ 3·10⁻² |
| 4 dB | 0.8 | ≈ 1.3·10⁻² | ≈ 2·10⁻³ |
| 6 dB | 0.8 | ≈ 2·10⁻³ | 0 errors in 25 600 bits |
| 4 dB | 1.99 (too large) | ≈ 1.4·10⁻² | ≈ 5·10⁻³ |

Here SNR means the SNR per transmitted code symbol, σ² = 1/(2·SNR), not Eb/N0. With
that reading, the published curves for the (3,1) min-sum decoder (just above 10⁻³ at
4 dB) agree with a larger floating-point run of the same arithmetic (about 1.4·10⁻³).
Read as Eb/N0, the same decoder performs about 4× worse at 4 dB. The last row shows the
loss from a gain set too high, where too many channel values saturate. A 100-frame run
is too short for exact error rates, so treat these figures as a sanity check, not a
characterisation.

`tb_tpc_workloads` rebuilds the decoder at other sizes, all at 4 dB and at gains 0.6,
0.8 and 1.0:

* the (32,31)² code (rate 0.94) with 3 iterations;
* the (16,15)² code with 1, 2 and 4 iterations.

Each build is checked bit for bit against its reference. Decoded BERs from 40 to 60
frames come out roughly as follows:

* (32,31)², 3 iterations: about 7·10⁻³, nearly flat over the three gains;
* (16,15)², 1 iteration: about 3·10⁻³;
* (16,15)², 2 iterations: about 1.5·10⁻³;
* (16,15)², 4 iterations: about 1·10⁻³.

Most of the gain from iterating is already there after 2 to 3 iterations. The best
gain at a given SNR barely moves between the two code sizes. This matches the
published findings.

## What is not built, and own choices

Not built: the alternatives the source method was compared against. These are:

* the sum-product decoder, with an f(z) look-up for the check operation and (3,5),
  (3,4) or hybrid (4,2)/(1,5) and (4,1)/(1,4) quantizers;
* the modified min-sum decoder, with a fixed ±0.5 correction term.

Only the recommended (3,1) min-sum configuration is in the RTL.

Choices of this design, not given by the method:

* the row-/column-serial architecture with two SISO units and flip-flop buffers;
* the valid/ready handshakes and processing one frame at a time;
* the 12-bit input word and the 8-bit gain word;
* round to nearest in the quantizer;
* clipping of the a priori sum, and the unclipped 7-bit soft output;
* asynchronous active-low reset;
* the per-frame saturation flags.

Two readings of the published decoding table were needed:

* The overall LLR is `Lch + Le1 + Le2`. The table writes "Lo" for the first term, but
  Lo already contains an extrinsic term.
* The column rule excludes the position's own row index.

On the value range of a (p,q) word, the published range formula disagrees with its own
bit counts. The design follows the bit counts: 1 + p + q bits, magnitude at most
2^p − 2^−q.

## Files

`rtl/`:

* `tpc_pkg.sv`: default sizes and the controller state type.
* `llr_quantizer.sv`: gain and (P,Q) quantizer.
* `spc_minsum_siso.sv`: min-sum extrinsic computation for one component codeword.
* `llr_matrix.sv`: row/column LLR buffer.
* `soft_decision.sv`: `Lc` and the hard decisions.
* `tpc_ctrl.sv`: frame sequencer.
* `tpc_minsum_decoder.sv`: the top.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. `tb_tpc_minsum_decoder` runs the top at its default
parameters. It also checks the 96-cycle decoding time, input stalls, output
back-pressure, both kinds of clipping and error correction. `tb_tpc_workloads` runs
four configurations, each through one instance of the parameterized bench
`tpc_e2e_bench.sv`.

Simulate, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tpc_pkg.sv \
    tb/tb_tpc_minsum_decoder.sv --top-module tb_tpc_minsum_decoder -o sim
./obj_dir/sim
```

The other testbenches build the same way. `tb_tpc_workloads` also needs `-y tb`.
Each testbench runs in about a second or less.

## Changing the design

* `N1` and `N2` set the code, for example 32 and 32 for the (32,31)² code.
* `P` and `Q` set the word format.
* `ITER` sets the number of iterations.
* `IN_W`, `IN_F`, `SCALE_W` and `SCALE_F` set the port formats.

All of these are parameters of `tpc_minsum_decoder`, with defaults in `tpc_pkg`. The
datapath is combinational from buffer read to buffer write. Each cycle covers an
addition, a 16-input min1/min2 search and a negation. For a higher clock rate, the
first place to add a register stage is inside `spc_minsum_siso`, with the controller
extended to match.
