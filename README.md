# Sign-magnitude radix-2 FFT for FMCW radar

In an FMCW radar the range FFT output is sparse: most bins hold only noise.
The Doppler and angle FFTs that follow therefore process mostly small
numbers, and even inside one FFT most intermediate values are small. In two's
complement a small negative number has all its high bits set. Every sign change
then toggles the whole wide datapath, and a modified Booth multiplier toggles
its high bits even for positive operands, because it recodes them into
negative partial products.

This design keeps every value that is about to be **multiplied** in
**sign-magnitude** form and every value that is about to be **added** in
**two's complement** form. It multiplies the magnitudes with an **unsigned
radix-4 Booth multiplier** that never creates a negative partial product. For
small operands the high bits of the multipliers then stay at zero. The price
is the converters between the two formats, plus a larger multiplier.

The RTL is a 1024-bin FFT computed in place on a single pipelined butterfly.
Words are 32-bit Q2.30 and input samples are 12 bits wide.

## Number formats and where each word lives

A Q2.30 word is read as value = integer / 2^30.

* **Sign-magnitude (SM):** bit 31 is the sign and bits 30:0 are the
  magnitude. +0 and -0 both mean zero.
* **Two's complement (2C):** the usual form.

One operation converts in both directions: if the MSB is set, invert bits
30:0 and add 1. In its *conditional* form the MSB is first ANDed with a select
signal, and a word whose select is low passes through unchanged (`sm_conv`).
The operation maps -0 to 0. The one 2C value with no SM form, -2^31, maps to
0.

The sample memory holds words in both formats at once. Which format a word is
in depends on its role in the next stage:

| Word | Format | Why |
|---|---|---|
| loaded sample | SM | any sample may be multiplied in stage 0 |
| x1 operand of a butterfly (multiplied by W) | SM | the multipliers take magnitudes |
| x0 operand in stage 0 | SM, converted on entry (`cin`) | it was loaded as SM |
| x0 operand in later stages | 2C | the previous stage left it that way |
| butterfly output | 2C, or SM if it is an x1 operand of the next stage (`cout0`, `cout1`) | convert only where needed |
| final bins | 2C | the last stage never converts |

In the decimation-in-time schedule used here, word `i` is an x1 operand in
stage `s` exactly when bit `s` of `i` is set. So an output of stage `s` is
converted back to SM when bit `s+1` of its index is set. The two outputs of
one butterfly differ only in bit `s`, so `cout0` always equals `cout1`.

Twiddle factors are stored in SM (`twiddle_rom`).

## The hybrid butterfly (`bf_hybrid`)

The butterfly computes `X0 = x0 + x1*W` and `X1 = x0 - x1*W`. It is pipelined
into two stages, so it accepts one butterfly per cycle and answers two cycles
later.

**Stage 1: multiply and convert.** Four `ub_mult` instances form the 62-bit
magnitude products |x1.re|·|W.re|, |x1.im|·|W.im|, |x1.re|·|W.im| and
|x1.im|·|W.re|. Each product's sign is the XOR of its operand signs. The sign
of the imaginary twiddle part is inverted on its way to the x1.im·W.im product
("sign change"). The real part of x1·W is then a sum of two products, and no
subtractor is needed.

Each product is turned into 2C only halfway: it is XORed with its sign,
giving a 63-bit row, and its sign bit is kept. The missing "+sign" is added
later. In parallel, x0 goes through the conditional converter (`cin`). All of
this is registered; this is the pipeline register after the converters.

**Stage 2: add, round, convert.** `bf_out_adder` adds `x0·2^30` to the two
rows with one carry-save row. The two sign bits, which complete the two
conversions, enter as carry-ins: one in the free bit 0 of the carry row, one
as the carry into the final adder. The final adder is split:

* a 30-bit low part, which is cut away; its MSB is the fraction bit **F**;
* a 34-bit high part, the truncated sum.

X1 uses the same rows and sign bits, all inverted. Inverting a row XORed with
`s` gives the row XORed with `~s`, so the products are simply negated and no
subtracter is needed.

`round_conv` then handles scaling, rounding and conversion:

* **Scaling:** when `scale` is set, the cut moves up one bit, which divides
  by two. The new fraction bit is the lowest kept bit.
* **Rounding:** F is added to negative results.
* **Conversion:** negative results are converted to SM when `cout` is set.

Rounding and conversion both need a "+1", and they never need it at the same
time, so one incrementer does both:

```
q = truncated sum (low 32 bits), F = fraction bit
q >= 0                 : y = q
q <  0, keep 2C        : y = q + F
q <  0, convert to SM  : y = {1, ~q[30:0]} + ~F      (= SM of q + F)
```

A negative value that rounds to zero comes out as -0.

## The unsigned Booth multiplier (`ub_mult`)

The multiplier b is split into two-bit digits d ∈ {0,1,2,3}. The multiple 3a
would need an adder of its own, so each digit gets two partial products
instead of one:

| d | first (a·{0,1,2}) | second (a·{0,1}) |
|---|---|---|
| 0 | 0 | 0 |
| 1 | a | 0 |
| 2 | 2a | 0 |
| 3 | 2a | a |

With 31-bit magnitudes this gives 16 digits and 32 non-negative partial
products. `wallace_tree` reduces them to two rows in eight levels of 3:2
counters (32→22→15→10→7→5→4→3→2), and one adder finishes the product. Each
level of the tree is a generate block with its own row array. Nothing inside the
multiplier is ever negative, so small operands leave the upper rows at zero.

## FFT sequencing (`fft_ctrl`, `sample_ram`, `twiddle_rom`)

The FFT is a decimation-in-time radix-2 FFT, computed in place:

* Samples are stored at bit-reversed addresses, so the bins come out in
  natural order.
* In stage `s` (span h = 2^s), butterfly `b` uses
  `i0 = ((b >> s) << (s+1)) | (b mod h)`, `i1 = i0 + h`, and twiddle
  `W_N^((b mod h)·N/2h)`.
* `scale` is set in stages 1, 3, 5, 7 and 9. The five divisions by two make
  1/32 = 1/sqrt(1024) in total. This keeps noise at a constant amplitude and
  lets a coherent signal grow only by sqrt(N).

Pipeline timing, counted in cycles after a butterfly is issued:

| Cycle | What happens |
|---|---|
| 0 | read addresses and twiddle index leave the sequencer |
| 1 | memory and ROM answer; the operands and `bf_ctrl` reach the butterfly |
| 3 | the results are written back |

Between stages the sequencer stalls 3 cycles (the *drain*). This way a stage
only reads words the previous stage has already written. One transform takes
exactly `LOGN·(N/2 + 3)` = **5150 cycles** for N = 1024.

`sample_ram` is an array with two synchronous read ports and two write ports.
It serves one butterfly per cycle. An assertion checks that the two write
ports never hit the same word in one cycle.

The twiddle table, N/2 entries of cos and -sin truncated to 30 fraction bits,
is computed at elaboration by a constant function using `$cos`/`$sin`. No data
file is needed.

## Using `sm_fft`

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `LOGN` | 10 | log2 of the number of bins |
| `IN_W` | 12 | width of the input samples |
| `IN_SHIFT` | 12 | placement of a sample inside the Q2.30 word |

The transform size is chosen at run time: `logn = L` selects 2^L bins, with
1 ≤ L ≤ LOGN. Hold `logn` from the first sample loaded to the last bin read.
One core therefore does both the 1024-bin range FFTs and the 512-bin Doppler
FFTs of a radar frame. The twiddle index for stage `s` does not depend on L,
so the same 512-entry table serves every size.

Using it takes three steps:

1. **Load.** While `in_ready` is high (the core is idle), give 2^L samples in
   natural order with `in_valid`, with gaps allowed. Each sample goes to its
   bit-reversed address, and the load counter wraps after 2^L samples.
   * With `in_word = 0`, `in_re` and `in_im` are IN_W-bit 2C integers. Each is
     stored as the SM word `sample · 2^IN_SHIFT`.
   * With `in_word = 1`, `in_wre` and `in_wim` are full 2C Q2.30 words, such
     as range-FFT bins on their way into a Doppler FFT. They pass through the
     same SM converter as everything else.
2. **Compute.** Pulse `start`. `busy` stays high for `L·(2^L/2 + 3)` cycles
   (5150 for 1024 bins, 2331 for 512), then `done` pulses.
3. **Read.** While idle, raise `out_rd` with `out_addr = k`. Bin X[k] appears
   one cycle later on `out_re`/`out_im`, with `out_valid`. The bin is in 2C
   Q2.30.

As integers, the bins equal the DFT of the input times `2^IN_SHIFT` (samples
only) divided by `2^floor(L/2)`. For L = 10 that is a division by 32 =
sqrt(1024). For a 512-bin transform it is a division by 16, not by
sqrt(512). In simulation single transforms lie within about 11 LSB of the
exact value, against peaks of up to 2^26 LSB. After a full range-Doppler
frame, the Doppler bins lie within about 19 LSB of the exact DFT of their
inputs.

Results outside the Q2.30 range wrap; nothing saturates. `IN_SHIFT = 12`
leaves about five bits of headroom above a full-scale coherent sine. Raise it
only if the inputs are known to be small.

A 2D range-Doppler transform needs a frame store outside the core. A 1024 ×
512 frame takes 512 range transforms. The upper half of each is discarded,
because the input is real. Then come 512 Doppler transforms of 512 bins each,
loaded as words. That is about 5.5 million cycles in total, load and read-out
included.

## What follows the design description and what is this design's own

These parts follow the design description:

* Q2.30 words and 12-bit samples.
* The unsigned Booth encoding and the Wallace tree.
* The retimed butterfly: SM data and twiddles, conditional input conversion,
  conversion back only before a multiplication, and the pipeline register
  after the product converters.
* The sign-change trick.
* The +1 of the conversions folded into carry-save adders.
* The split final adder with fraction bit F.
* Rounding by adding F to negative results.
* The shared incrementer for rounding and conversion.
* Division by two every second stage.
* N = 1024 on a single butterfly; 512-bin Doppler transforms of range results.

These are choices made for this RTL:

* The output register of the butterfly (latency 2) and the reset of the valid
  bits only.
* The memory organisation (two read and two write ports), the issue order and
  the 3-cycle drain.
* The load, start and read handshake, and the bit-reversed load.
* The run-time size `logn` and the word load port.
* `IN_SHIFT`, and wrapping instead of saturating.
* The way division by two is done: the cut moves up one bit in `round_conv`.
* Final bins left in 2C.
* The twiddle truncation.
* Upper part of the final adder:
  * The reference structure uses carry-save adders over the top 32 bits.
  * Here one carry-save row covers all 64 bits, followed by a plain 34-bit
    adder.
  * The truncated sum is 34 bits wide, not 33, so that no intermediate bit is
    lost before the 32-bit word is stored.
  * Carry-lookahead and other adder structures are left to synthesis.
* The 62-bit products imply 31-bit magnitudes, which is what `ub_mult` is
  built for. The multiplier is also described as 32×32; both widths give the
  same 16 encoders and 32 partial products.

Not included:

* The RF front-end and ADC that deliver the samples.
* Any frame memory for the 2D range-Doppler transform.
* The two's complement reference design with modified Booth multipliers, a
  baseline the design is compared against.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| Testbench | Checks |
|---|---|
| `tb_ub_mult` | corners, every digit in every position, random operands of every length, against `*` |
| `tb_sm_conv` | pass-through, SM→2C, 2C→SM, -0 |
| `tb_bf_out_adder` | random rows against 64-bit signed arithmetic, high bits and F |
| `tb_round_conv` | random sums, scale/conv combinations, against an integer model |
| `tb_bf_hybrid` | 3000 random butterflies with gaps, exact integer model, latency of exactly 2 |
| `tb_twiddle_rom` | all 512 entries against `$cos`/`$sin`, within 1 LSB, signs, W^0 = 1 |
| `tb_sample_ram` | random dual-port traffic against a shadow array |
| `tb_fft_ctrl` | the full schedule (addresses, twiddles, controls, write-back), drain cycles and busy time for 1024-, 512- and 8-bin runs |
| `tb_sm_fft` | the whole core at its defaults; see below |
| `tb_sm_fft_frame` | a full 512-chirp × 1024-sample range-Doppler frame on one default core |

`tb_sm_fft` runs four transforms:

* a 1024-bin strong sine (4000/4096 of full scale) plus noise;
* a 1024-bin weak sine (1 LSB) plus noise;
* 1024 bins of random complex 12-bit data;
* 512 bins of random Q2.30 words, loaded through the word port.

Every bin is compared with a double-precision DFT, within 24 LSB. The
testbench also checks the cycle count. It counts input conversions, output
conversions, scaled butterflies, rounding increments, negative conversions
and drain cycles, and fails if any of them never occurs.

`tb_sm_fft_frame` synthesises a frame with two moving targets, one strong and
one weak, plus noise. It runs every range and Doppler transform on the core.
Each result is compared with a DFT of exactly the data the core was given,
within 24 LSB. The strongest cell of the range-Doppler map must sit at the
strong target's range and Doppler bins. It takes about 10 seconds.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sm_fft \
    rtl/sm_fft_pkg.sv tb/tb_sm_fft.sv
./obj_dir/Vtb_sm_fft
```

The other testbenches run the same way: replace the top module and the
testbench file. `-Irtl` lets Verilator find each module in `rtl/<module>.sv`.
The full-size run takes a few seconds.

## Files

| File | Content |
|---|---|
| `rtl/sm_fft_pkg.sv` | widths, `cplx_t`, `bf_ctrl_t` |
| `rtl/sm_fft.sv` | top: load, sequencing, butterfly, read-out |
| `rtl/fft_ctrl.sv` | sequencer |
| `rtl/sample_ram.sv` | in-place sample memory |
| `rtl/twiddle_rom.sv` | twiddle factors |
| `rtl/bf_hybrid.sv` | pipelined hybrid butterfly |
| `rtl/bf_out_adder.sv` | carry-save output adder with split final adder |
| `rtl/round_conv.sv` | scaling, rounding and conditional conversion |
| `rtl/sm_conv.sv` | conditional SM/2C converter |
| `rtl/ub_mult.sv` | unsigned radix-4 Booth multiplier |
| `rtl/wallace_tree.sv` | 3:2 reduction tree, one generate block per level |
| `rtl/csa.sv` | one row of 3:2 counters |
