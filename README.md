# Combinational 2-point and 8-point radix-2 FFT

This design computes the discrete Fourier transform of eight complex samples in one
combinational pass. It uses the radix-2 decimation-in-time (DIT) algorithm: an 8-point DFT
splits into two 4-point DFTs, which split into four 2-point DFTs. That gives log2(8) = 3 stages
of four identical two-point *butterflies*, twelve in all. There is no clock, register or control
logic. Samples go in on one side, and after three butterfly delays the spectrum comes out on the
other. The butterfly is a block of its own, `fft_radix_2`. On its own it is the 2-point FFT.

| module        | what it is                                                            |
|---------------|-----------------------------------------------------------------------|
| `fft_pkg`     | shared constants: widths, twiddle binary point, transform size        |
| `fft_radix_2` | one complex butterfly, `A = x + w*y`, `B = x - w*y` (the 2-point FFT) |
| `fft_8_point` | top: 12 butterflies in 3 stages                                       |

## The butterfly (`fft_radix_2`)

Ports: `x_r x_i y_r y_i w_r w_i` in, `A_r A_i B_r B_i` out. All are 8-bit signed two's complement.

* `w*y` is formed from four full-precision 8x8 products:
  `(w_r*y_r - w_i*y_i) + j(w_r*y_i + w_i*y_r)`.
* The product is shifted right arithmetically by `TW_FRAC` (6) bits. This truncates towards
  minus infinity.
* The shifted product is added to `x` and subtracted from it at full width.
* The low 8 bits are returned. An out-of-range result **wraps around**: there is no
  saturation and no scaling.

With `w = +1` (the code 64) the outputs are exactly `x + y` and `x - y`, the 2-point DFT.

## The twiddle format

Twiddle factors are inputs. No table is built in. Each is a signed 8-bit number with 6
fractional bits, so +1.0 = 64 and -1.0 = -64 are both exact. The eight-point transform needs
`w_k = W_8^k = exp(-j*2*pi*k/8)` for k = 0..3. Rounded to this format they are:

| k | w_k exact          | `w_r` | `w_i` |
|---|--------------------|-------|-------|
| 0 | 1                  | 64    | 0     |
| 1 | (1 - j)/sqrt(2)    | 45    | -45   |
| 2 | -j                 | 0     | -64   |
| 3 | -(1 + j)/sqrt(2)   | -45   | -45   |

The formula is `w_r = round(64*cos(2*pi*k/8))` and `w_i = round(-64*sin(2*pi*k/8))`. If you
drive other values, the network computes with them just the same. Any set of roots of unity in
this format will work, for example the conjugates, which give an unscaled inverse transform.

## The butterfly network (`fft_8_point`)

Each stage has four butterflies, numbered b = 0..3. Butterfly b writes its `A` output to
position `2b` of the next signal vector and its `B` output to `2b+1`. The stage table gives
each butterfly's inputs as (x, y) and its twiddle:

| stage | in -> out | b=0            | b=1            | b=2            | b=3            |
|-------|-----------|----------------|----------------|----------------|----------------|
| 1     | s -> g1   | (s0,s4) w0     | (s2,s6) w0     | (s1,s5) w0     | (s3,s7) w0     |
| 2     | g1 -> g2  | (g1_0,g1_2) w0 | (g1_1,g1_3) w2 | (g1_4,g1_6) w0 | (g1_5,g1_7) w2 |
| 3     | g2 -> y   | (g2_0,g2_4) w0 | (g2_2,g2_6) w1 | (g2_1,g2_5) w2 | (g2_3,g2_7) w3 |

What each stage computes:

* **Stage 1** takes the inputs in natural order and pairs them in bit-reversed order. It forms
  four 2-point DFTs.
* **Stage 2** forms the 4-point DFTs. The DFT of the even samples goes to `g2_0..g2_3`, in bin
  order 0, 2, 1, 3. The DFT of the odd samples goes to `g2_4..g2_7`, in the same order.
* **Stage 3** combines even bin k with odd bin k using `w_k`.

### Output order: read this before using `Y`

Stage 3 writes its two results next to each other. So the outputs are in **butterfly order, not
natural order**. With `X_k = sum_n s_n * W_8^(n*k)`:

    y_{2k} = X_k,   y_{2k+1} = X_{k+4}     (k = 0..3)
    y_0..y_7 = X_0 X_4 X_1 X_5 X_2 X_6 X_3 X_7

If you need natural order, unscramble the outputs outside this block. This takes only wiring.

### Packed ports

| port            | width | contents                                      |
|-----------------|-------|-----------------------------------------------|
| `S_r`, `S_i`    | 64    | sample `s_n` in bits `[8n+7:8n]`              |
| `Win_r`,`Win_i` | 32    | twiddle `w_k` in bits `[8k+7:8k]`             |
| `Y_r`, `Y_i`    | 64    | output `y_n` in bits `[8n+7:8n]` (order above) |

## Range and accuracy

Nothing is scaled between stages. A transform can grow the signal up to 8x, and more in a single
real or imaginary part. Every butterfly keeps only 8 bits. So the result is exact modulo 256
but meaningful only if nothing overflows:

* **Inputs that cannot overflow.** This holds when every input part satisfies |part| <= 13.
  Stages 1 and 2 use only the trivial twiddles 1 and -j, and at most double the signal. Stage 3
  can multiply a part by up to 1 + sqrt(2). The bound is 13 * 2 * 2 * 2.414 < 128.
* **Error in that range.** The outputs differ from the exact DFT by less than 2 LSB. The error
  comes from truncating the product in stage 3 and from rounding 1/sqrt(2) to 45/64.
* **Larger inputs.** Scale them down before the block, or widen `DATA_W`.

## Timing and cost

The design is purely combinational. The critical path is three butterflies long, and each
butterfly is a multiply followed by two adds. The block computes one transform each time its
inputs settle. To get a throughput of one transform per clock, register the ports around it. For
higher clock rates, add registers between the stages. Synthesised for a generic target, each
butterfly is two multiply-accumulate cells and four adders. All 12 butterflies are built, even
though the twiddles of stages 1 and 2 are trivial. This keeps the network regular and lets any
twiddle set be driven in.

## Parameters

`DATA_W` (8), `TW_W` (8) and `TW_FRAC` (6) are parameters of both modules. Their defaults come
from `fft_pkg`. The 8-point structure itself is fixed by the stage table.

## Where this design makes its own choices

The block structure is the published one. The following details are choices of this design:

* **Port widths and names, the 12-butterfly network, and the twiddle indices of each
  butterfly.** These are the published ones.
* **Operation order of the butterfly**, the **twiddle binary point**, **truncation of the
  product**, and **wrap-around instead of saturation or scaling.** These are this design's
  choices.
* **Order of samples inside the packed vectors** (sample 0 in the lowest bits). This is also
  this design's choice.
* **No registers, and twiddles as inputs.** This mirrors the published block symbols, which
  have no clock pin and do carry twiddle inputs.

## Simulating

Both testbenches check themselves and print `TB_RESULT checks=N failures=M` at the end.

    verilator --binary --timing -Irtl rtl/fft_pkg.sv rtl/fft_radix_2.sv tb/tb_fft_radix_2.sv --top-module tb_fft_radix_2
    ./obj_dir/Vtb_fft_radix_2

    verilator --binary --timing -Irtl rtl/fft_pkg.sv rtl/fft_radix_2.sv rtl/fft_8_point.sv tb/tb_fft_8_point.sv --top-module tb_fft_8_point
    ./obj_dir/Vtb_fft_8_point

**`tb_fft_radix_2`** applies about 20,000 operand sets. These include extreme values, the
twiddles +/-1 and +/-j, and random full-range values. It compares every output with a
real-arithmetic model.

**`tb_fft_8_point`** runs the top at its default sizes. It applies the following inputs:

* an impulse
* a constant
* the eight single-bin complex tones
* 3,000 random blocks small enough not to overflow
* 3,000 random full-range blocks

It checks every output bit-exactly against a textbook in-place radix-2 model whose result is
remapped to butterfly order. For the small inputs it also checks against the DFT computed in
floating point, to within 2 LSB. It confirms that wrap-around happened in the full-range blocks,
and that each block finishes in the cycle it was applied.
