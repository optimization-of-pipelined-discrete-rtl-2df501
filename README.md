# Pipelined Daubechies-2 wavelet packet transform without multipliers

This is synthesizable SystemVerilog for a five-level discrete wavelet packet
transform (DWPT) processor with the Daubechies-2 (Db2) wavelet. It follows the
architecture in *Optimization of Pipelined Discrete Wavelet Packet Transform
Based on an Efficient Transpose Form and an Advanced Functional Sharing
Technique* (H.-N. Nguyen, C.-H. Kim, J.-M. Kim). Samples stream in at one per
clock. Every 1024-sample frame is split into 32 sub-bands of equal width with
32 coefficients each. The processor has no multipliers: it uses only shifts,
adders, registers and buffer memory. Three ideas make it small:

* **Filter after down-sampling.** Each filter works on even/odd sample pairs.
  It computes only the outputs that down-sampling keeps, one per pair.
* **Canonical signed digits.** The four Db2 coefficients are written with few
  non-zero digits, so every product is a short sum of shifted copies of the
  sample.
* **Shared partial sums.** All four coefficient products of a sample come from
  one network of 11 adders. The network first builds four partial sums, then
  combines them.

The pipeline is feed-forward: one stage per tree level, every stage working at
once on a different frame.

## The packet tree

A wavelet packet transform filters both outputs of every node again, not only
the low-pass one. A node's low-pass filter `h` and high-pass filter `g` each
keep every second output. Five levels therefore give 2^5 = 32 bands of equal
width.

Each node of the tree is a **WFPE** (wavelet filter processing element) cell.
A cell holds a frame buffer, a controller and a low-pass/high-pass filter pair.
Level *l* has 2^(l-1) cells, which makes 1 + 2 + 4 + 8 + 16 = 31 cells. The
cells are numbered in heap order:

* cell 1 is the root and takes the input stream;
* cell *c* feeds cell 2*c* from its low-pass output and cell 2*c*+1 from its
  high-pass output;
* the 16 last-level cells are 16 to 31. Cell 16+*k* produces sub-bands 2*k*
  (`oData_Low[k]`) and 2*k*+1 (`oData_High[k]`).

The sub-bands come out in tree order, not sorted by frequency. In tree order,
the high-pass branch reverses frequency at every level. Band *k* covers
frequency slot G⁻¹(*k*), where G is the binary-reflected Gray code. For
example, at two levels bands 0, 1, 2, 3 cover slots 0, 1, 3, 2.

## Inside a cell: buffer, pairs and the transpose form

```
 iData ──► buffer (even bank | odd bank) ──► x_e, x_o ─┬─► low-pass filter  ──► oData1
            ▲ write addr       ▲ pair addr             └─► high-pass filter ──► oData2
            └──── controller ──┴── enable / first / valid ───────────────────► oData_Valid
```

The buffer stores one frame of the cell's input, N words. Even-indexed words go
to one bank and odd-indexed words to the other. Once the frame is complete, the
controller reads it back as N/2 pairs, one per clock. Both filters use each pair
at the same time.

Each filter computes the down-sampled convolution

```
y(n) = c0·x(2n) + c1·x(2n-1) + c2·x(2n-2) + c3·x(2n-3)
```

in polyphase form. The even sample `x_e(n) = x(2n)` meets `c0` and `c2`. The
odd sample `x_o(n) = x(2n-1)` meets `c1` and `c3`. `x_o(n)` is the odd word of
the *previous* pair, kept in one register: this is the z⁻¹ ahead of the odd
down-sampler. Both samples go through a shared-product network. Then the
transpose form applies: the `c2` and `c3` products are held in a register for
one pair. They are added to the next pair's `c0` and `c1` products:

```
y(n) = c0·x_e(n) + c1·x_o(n) + [c2·x_e(n-1) + c3·x_o(n-1)]      (bracket from registers)
```

Low-pass `h = (-0.1294, 0.2241, 0.8365, 0.4830)`. High-pass
`g = (-h3, h2, -h1, h0) = (-0.4830, 0.8365, -0.2241, -0.1294)`. The high-pass
filter therefore uses the same four products as the low-pass filter, in a
different order and with different signs.

## Multiplying without multipliers (`afs_db2`)

With `C_k` = the operand shifted right by *k* (`C4 = X`, `C3 = X>>1`,
`C2 = X>>2`, `C1 = X>>3`):

| partial sum | value | | product | value | coefficient |
|---|---|---|---|---|---|
| B0 = C4 + C1 | 1.125·X | | Y0 = −C1 − B0>>8 | −0.1293945·X | h0 = −0.1294 |
| B1 = C4 + C2 | 1.25·X | | Y1 = C2 + B2>>5 − B1>>9 | 0.2241211·X | h1 = 0.2241 |
| B2 = C2 − C4 | −0.75·X | | Y2 = B3 − B1>>5 + B0>>11 | 0.8364868·X | h2 = 0.8365 |
| B3 = C4 − C1 | 0.875·X | | Y3 = C3 − B0>>6 + B0>>11 | 0.4829712·X | h3 = 0.4830 |

That is 4 adders for the partial sums and 7 for the products: 11 in total. The
deepest shift is 14 places (`B0>>11`, where B0 contains `X>>3`). The filter
therefore appends 14 zero bits to its operand before the network, and every
product is exact. In integer form, in units of 2⁻¹⁴, the coefficients are
h = (−2120, 3672, 13705, 7913). Their sum is 23170/16384 = 1.41418 ≈ √2, the
DC gain of the Db2 low-pass filter.

The source description defines B0, B1 and B2 at half the weight used here
(B0 = X>>4 + X>>1). With those definitions, its printed shift amounts would not
give its printed coefficients. This design keeps the shift amounts and
coefficients and scales the partial sums to match. The canonical signed digit
form of 0.2241 has a final −2⁻¹⁵ digit. The 11-adder network leaves it out, as
the source does.

## Frames, overlap and timing

* A frame is FRAME_LEN consecutive accepted samples (`iEn` high) after reset.
  There is no frame-start input, and `iEn` has no back-pressure.
* Each frame is transformed on its own. Samples before the start of a frame
  count as zero, and a node of length N yields exactly N/2 outputs. There is no
  periodic or symmetric border extension. The first few coefficients of each
  sub-band therefore differ from a transform that extends the frame's borders.
* A cell receives a frame in at least N cycles. It reads the frame out in N/2
  cycles, starting the cycle after the last word arrives. The next frame can
  therefore be written into the same buffer during the read-out without
  overtaking it. Writes go to a pair no earlier than the cycle in which that
  pair is read, and reads return the old contents. The controller asserts this
  rule.
* Cell timing: if the last sample of a frame is written at clock edge T,
  output *n* is valid after edge T+2+n.
* Top timing: with the defaults, if the last input sample of a frame is
  accepted at edge T, the 32 coefficients of every sub-band come out after
  edges T+970 to T+1001. The general form is
  T + 2 + Σ_{l<LEVELS}(2 + N_l/2) + n, with N_l = FRAME_LEN/2^(l−1).
* Throughput is one input sample per clock, continuously. Every stage finishes
  its frame in half the frame's arrival time.

## Number format, rounding and range

* `iData` is a 16-bit signed integer.
* Every internal word and every output is 26-bit signed with 10 fractional
  bits: the 16-bit integer range plus 10 bits of fraction. At the root, the
  input is placed at the integer end of that word.
* Each filter output is truncated toward minus infinity from the exact sum.
  This is the only rounding step per level.
* There is no saturation, so overflow wraps. The worst-case gain of five
  low-pass levels is (Σ|h|)^5 = 1.673^5 ≈ 13.1. The DC gain is (√2)^5 ≈ 5.66.
  No output can wrap while |iData| ≤ 2500. A steady constant input reaches the
  limit at about ±5790.
* For a full-scale 16-bit input, give the input fractional bits instead: set
  `IN_FRAC` of the root cell in `dwpt_top` to 10, so the input is read as
  Q6.10.
* Accuracy: `tb_dwpt_ae_frame` runs a synthetic acoustic-emission burst. It
  has two decaying tones at 1 MHz sampling and a peak of about half full
  scale. Against a double-precision transform with the exact Db2 coefficients,
  the average sub-band mean squared error is 1.3·10⁻¹⁰ and the worst is
  1.1·10⁻⁹, with full scale = 1.0. The source reports about 10⁻⁵ against its
  floating-point reference.

## Top-level interface (`dwpt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `iClk` | in | 1 | clock |
| `iReset_n` | in | 1 | synchronous active-low reset (controllers only) |
| `iEn` | in | 1 | `iData` valid this cycle |
| `iData` | in | 16 | signed input sample |
| `oData_Low[k]` | out | 16 × 26 | sub-band 2k, signed, 10 fractional bits |
| `oData_High[k]` | out | 16 × 26 | sub-band 2k+1 |
| `oData_Valid` | out | 1 | AND of all last-level valid flags |

Parameters: `FRAME_LEN` (default 1024, a power of two) and `LEVELS`
(default 5). FRAME_LEN/2^(LEVELS−1) must be at least 4. With the defaults, the
buffers hold 122,880 bits in total. The root buffer is 1024 × 16 bits, and
every further level holds 1024 × 26 bits spread over its cells.

## Files

| file | contents |
|---|---|
| `rtl/dwpt_pkg.sv` | word widths, guard bits, the 26-bit coefficient type |
| `rtl/afs_db2.sv` | shared shift-add network for the four coefficients |
| `rtl/wfpe_filter.sv` | low-pass or high-pass filter (`HIGH`) in transpose polyphase form |
| `rtl/wfpe_buffer.sv` | two-bank frame buffer, one word in and one pair out per cycle |
| `rtl/wfpe_controller.sv` | write counter, read-phase sequencer, enable/first/valid |
| `rtl/wfpe.sv` | one processing element: controller + buffer + two filters |
| `rtl/dwpt_top.sv` | the packet tree of 2^LEVELS − 1 cells |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the tests below |

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and stop themselves. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/dwpt_pkg.sv tb/tb_dwpt_top.sv --top-module tb_dwpt_top
./obj_dir/Vtb_dwpt_top
```

* `tb_dwpt_top`: the default configuration, end to end. It streams three
  1024-sample frames: two back to back, so every cell overlaps write and
  read-out, and one with random input gaps. It compares all 32 sub-bands with
  an independent integer model of the whole tree and checks the T+970 latency.
  It also counts that overlaps, gaps and output bursts occurred.
* `tb_dwpt_three_level`: the same test on a 3-level tree with 64-sample
  frames.
* `tb_dwpt_ae_frame`: the accuracy run described above.
* `tb_wfpe`, `tb_wfpe_filter`, `tb_wfpe_buffer`, `tb_wfpe_controller` and
  `tb_afs_db2`: unit tests with exact reference values and cycle checks.

Every one of these simulations takes well under a second.

## Departures from the source description, and what is not here

* One controller per cell, as in the published cell schematic, instead of one
  central control unit. The controller's read address, read enable and
  frame-start (`iFirst`) signals are this design's additions.
* The B0–B2 partial-sum weights are corrected as described above.
* The source's text gives 16-bit words for both input and output, but its cell
  schematic shows 26-bit outputs. This design follows the schematic: outputs
  are 26 bits with 10 fractional bits.
* Frame handling, zero history, reset behaviour, truncation and wrap-around
  are this design's choices. The source does not specify them.
* The baseline designs the source compares against are not included. These
  are the direct-form filter bank and the version without shared partial sums.
  The FPGA resource figures (flip-flops, LUTs, block RAM, no DSP blocks on a
  Virtex-7) are not reproduced. The RTL contains no multiplier, so it needs no
  DSP blocks.
