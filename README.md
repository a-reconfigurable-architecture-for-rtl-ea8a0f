# Keyed wavelet transform for lightweight image and video encryption

This design encrypts an image while it is being compressed, and the encryption costs almost no
extra arithmetic. The transform is a multi-level 2-D discrete wavelet transform (DWT). It is the
front end of a wavelet image coder. Its filters are not fixed: they come from a *parameterized*
9/7 biorthogonal filter pair. One free parameter, alpha, picks one filter pair out of a
continuous family. Each one-dimensional pass of the transform uses its own secret alpha.
After the transform, each subband is also read out in one of eight secret orientations:
transposed or not, with rows and columns in forward or reverse order. A receiver with the same
key can undo the transform. A receiver with the wrong key gets a badly degraded image.

The hardware filter has no multipliers. The key-dependent filter constants are multiplied in by
*reconfigurable constant multipliers* (RCMs). These are look-up tables whose contents are
rewritten whenever the key changes. What remains is one look-up and a few additions per sample.

The default configuration handles 512 x 512 frames with 6 decomposition levels. It uses
12 one-dimensional passes (a row pass and a column pass per level) and has 19 subbands. The key
is 12 x 8 + 19 x 3 = **153 bits**.

## The key

| bits of `key_in`            | meaning |
|-----------------------------|---------|
| `[8*j +: 8]`, j = 0..11     | alpha code of pass j. Pass 2l is the row pass and pass 2l+1 the column pass of level l; l = 0 is the finest level. |
| `[96 + 3*s +: 3]`, s = 0..18 | orientation of subband s, as `{transpose, row_rev, col_rev}`. s = 0 is the final LL band. s = 1 + 3(l-1) + {0,1,2} are the HL, LH and HH bands of level l, with l = 1 the finest. |

An alpha code c selects **alpha = 1 + 3c/256**. This splits [1, 4) into 256 steps of 0.0117.
Outside roughly 1 to 4 the filters compress poorly, so the key uses only this range.
For other sizes, `pdwt_pkg::key_width(LEVELS)` gives the key width: 16*LEVELS + 3*(3*LEVELS+1).

## The parameterized 9/7 filter pair

The analysis low pass has 9 taps and the high pass has 7. With `w0 = x(k)` and
`wi = x(k+i) + x(k-i)`:

    low(k)  = K0 w0 + K1 w1 + K2 w2 + K3 w3 + K4 w4
    high(k) = Kh0 w0 + Kh1 w1 + Kh2 w2 + Kh3 w3

    K4 = -9a/64 + a^2/32 + 15/64 - 1/(8a)     K3 = -a^2/16 + 11a/32 - 11/16 + 1/(2a)
    K2 = 1/8 - 1/(2a)                         K1 =  a^2/16 - 11a/32 + 15/16 - 1/(2a)
    K0 = 9a/32 - a^2/16 - 7/32 + 5/(4a)
    Kh0 = 1/4 + a/8    Kh1 = -(7/32 + a/32)    Kh2 = 1/8 - a/16    Kh3 = -(1/32 - a/32)

The low pass has DC gain 1 for every alpha. The high pass has gain 0 at DC and gain 1 at the
Nyquist frequency. The high-pass constants are the 7-tap synthesis low pass with its odd taps
negated. That sign convention is this implementation's choice.

The constants are signed 12-bit numbers with 10 fractional bits (Q1.10). For every alpha code they
lie in (-2, 2).

### `coef_gen`: key byte to constants

`coef_gen` uses no multiplier. Let q = 256 + 3c, so that alpha = q/256.

1. For 33 clocks, two loops run in parallel. A shift-and-add loop forms q^2. A restoring divider
   forms floor(2^32/q), which is 1/alpha with 24 fractional bits.
2. Every constant is then a sum of shifted copies of q, q^2, 1/alpha and fixed numbers. It is
   evaluated with 24 fractional bits, then rounded to nearest at 10 bits.

`busy` lasts 34 clocks. The results are within 0.51 LSB of the exact expressions; the testbench
checks all 256 codes.

## The filter datapath (`pdwt_filter`)

The filter takes one sample per clock and has three register stages:

1. **Delay line and tap folding.** Eight registers and the live input form the nine-sample
   window x(k+4) .. x(k-4). The delay line advances only on `in_valid`. Four adders fold the
   eight outer taps into w1..w4. The centre tap is w0. The w values are registered.
2. **Constant multipliers.** Nine RCMs form Ki·wi (five for the low pass) and Khi·wi (four for
   the high pass).
3. **Adder trees, rounding and saturation.** Four adders sum the low pass and three the high
   pass. Both sums are rounded to nearest and saturated to `OUT_W`.

The datapath therefore has 4 + 4 + 3 = 11 adders and no multiplier. Its critical path is one
look-up plus a chain of additions.

**Latency.** A sample taken at clock edge e is the newest sample of the window whose result
appears with `out_valid` right after edge e+2. The result refers to the window centred four
samples earlier. The pipeline never stalls.

**Changing alpha.** Pulse `cfg_start` with `cfg_alpha`. `coef_gen` computes the nine constants,
then all nine RCMs reload their tables. `cfg_busy` stays high for 52 clocks. Do not feed samples
during that time.

## Reconfigurable constant multipliers (`rcm`, `rcm_lut`)

This is the least conventional part of the design. An RCM multiplies a stream by a constant that
changes only with the key. It works as follows:

- **Digit slices.** The signed `IN_W`-bit input is sign-extended and cut into `LUT_IN`-bit
  digits (4 by default).
- **One table per digit.** Each digit addresses its own table, which holds `digit x constant`.
  The lower digits are unsigned (0..15). The top digit is a two's-complement digit (-8..7), so
  its table holds `(j - 16) x constant` for j >= 8.
- **Shift and add.** The product is the sum of the table outputs, each shifted left by 4 times
  its digit position. It is registered, so the product appears one clock after `x`.

Example: an 8-bit input and a 12-bit constant use two 16-entry tables and one 20-bit adder.
Setting `LUT_IN = IN_W` gives the other extreme: one wide table with no adder, but 2^IN_W
entries.

**Reload.** A pulse on `load` starts the reload. For 2^LUT_IN clocks the RCM accumulates the
constant (0, c, 2c, ...) and writes entry j of every slice table. `ready` is low during the
reload. FPGA look-up tables would instead receive these contents through the device
configuration; generating them on chip lets the key change at run time without a new bit stream.

**Wide tables.** `rcm_lut` builds a table with more than 4 inputs from 16-entry banks and a tree
of 2:1 multiplexers. A (k+1)-input table is two k-input tables plus a multiplexer steered by
address bit k.

## The 2-D transform and its schedule (`dwt2d_ctrl`)

One frame goes through four phases:

1. **LOAD.** N x N pixels arrive in raster order. An input is accepted in every cycle that both
   `pix_ready` and `pix_valid` are high. The pixels are stored, zero-extended, in the 16-bit
   frame RAM.
2. **PASSES.** For level l = 0..LEVELS-1, the sequencer works on the top-left S x S block,
   with S = N >> l. It runs a row pass with alpha code 2l, then a column pass with code 2l+1.
   Before each pass it reconfigures the filter and waits for `cfg_busy` to fall. Each line goes
   through three steps:
   - It is copied into a one-line buffer (S reads).
   - It is streamed through the filter with whole-sample symmetric extension
     (x(-i) = x(i), x(S-1+i) = x(S-1-i)), S + 8 samples in all.
   - The results go back to the frame in place. The low pass of an even centre k goes to
     position k/2. The high pass of an odd centre k goes to position S/2 + k/2. Both are
     saturated to 16 bits.

   The result is the usual Mallat layout. The line buffer is what allows the in-place
   overwrite.
3. **OUT.** Output positions are visited in raster order. Each position is translated by
   `subband_reorient` into the address actually read. Coefficients leave on
   `coef_valid`/`coef_data` one clock later. There is no back-pressure.
4. **DONE.** `done` pulses for one clock.

**Cycle cost.**

- A line of S samples takes 2S + 14 clocks.
- A reconfiguration between passes takes 53 clocks.
- A whole frame takes 2N^2 + (sum over levels of 2S(2S+14)) + 53 per pass + 2 clocks,
  including load and read-out.
- A 512 x 512, 6-level frame therefore takes 1,950,910 clocks, about 19 ms at 103 MHz.
- A 256 x 256, 6-level frame takes 495,262 clocks, about 4.8 ms.

Two choices of this implementation set that figure:

- **Single filter.** One filter is time-shared by all 12 passes.
- **Copy before filtering.** Each line is copied to the buffer before it is filtered.

A faster schedule would overlap the copy of one line with the filtering of the previous one, or
instantiate one filter per pass. The 1-D filter itself keeps up with one sample per clock.

**Size limits.** N must be a power of two. The coarsest block, N >> (LEVELS-1), must be at
least 8 samples, so that the symmetric extension stays inside the line.

## Subband re-orientation (`subband_reorient`)

The mapping is combinational. For output position (r, c) it does four things:

1. It finds the subband that contains (r, c), and that subband's size S and base position.
2. It forms the local coordinates (i, j).
3. If `transpose` is set, it swaps i and j.
4. It reverses the row index if `row_rev` is set (i -> S-1-i), and the column index if
   `col_rev` is set.

The eight codes give the eight symmetries of a square block: the four reading orders and their
transposes. Only the read address changes, so re-orientation adds no arithmetic and no cycles.
The LL band and all detail subbands are square because the frame is square.

## Top level (`secure_dwt_top`)

| port | dir | width | |
|------|-----|-------|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (control state only, memories not reset) |
| `key_we`, `key_in` | in | 1, 153 | load the key register; ignored while `busy` |
| `start` | in | 1 | begin a frame |
| `busy`, `done` | out | 1 | frame in progress; one-clock end pulse |
| `pix_ready`, `pix_valid`, `pix_data` | out/in/in | 1, 1, 8 | pixel input, raster order |
| `coef_valid`, `coef_data` | out | 1, 16 | signed coefficients, raster order of the re-oriented Mallat layout |

Parameters: `N` (512), `LEVELS` (6), `PIX_W` (8), `MEM_W` (16), `LUT_IN` (4).

Blocks:

- `dwt2d_ctrl`: the sequencer.
- `pdwt_filter`: the filter. It contains `coef_gen` and nine `rcm`, each made of `rcm_lut`
  tables.
- `subband_reorient`: the read-address map.
- `frame_ram`, two instances: the N x N frame and the one-line buffer.

`pdwt_pkg` holds the shared constants, the `orient_t` struct and the key-width functions.

## How far it can be trusted, and where it departs from the original description

Each block has a self-checking testbench. Each testbench compares the block against an
independent model in `tb/pdwt_ref_pkg.sv`, which uses plain integer and real arithmetic. The
models cover:

- the constants, both as closed-form reals and as an exact fixed-point recipe;
- the 9-tap and 7-tap filters;
- the complete keyed 2-D transform;
- the re-orientation map.

What the testbenches check:

- **End-to-end, reduced size.** `tb_secure_dwt_top` runs 64 x 64 frames with 3 levels. It checks
  every output coefficient of three frames under two keys. It also counts the design's mechanisms
  and fails if any never occurs: each reconfiguration, each level, both extension ends, low and
  high pass writes, all eight orientations, and input stalls.
- **End-to-end, full size.** `tb_secure_dwt_full` runs one frame at full size (512 x 512,
  6 levels, 153-bit key) and checks all 262,144 coefficients. `tb_secure_dwt_256` does the
  same for a 256 x 256 frame.
- **Exact numbers.** The filter latency (2), the reconfiguration times (34, 52 and 16 clocks),
  and that a changed key alters most coefficients.

Choices made here where the architecture description is silent:

- the constant format (Q1.10);
- the key bit layout and the subband numbering;
- boundary extension and decimation phase;
- the high-pass sign convention;
- the 16-bit coefficient memory and the saturation into it;
- the line-buffer schedule;
- reset behaviour;
- generating table contents and filter constants on chip, rather than receiving them in an
  FPGA configuration bit stream.

The centre tap w0 is the plain centre sample x(k). A literal reading of the tap-folding formula
would give 2x(k) instead.

Known departures:

- **Throughput.** The reported hardware times are 456 us for a 256 x 256 frame and 1890 us
  for a 512 x 512 frame. This implementation needs about ten times as many clocks, because of the single shared filter and
  the copy-then-filter line schedule.
- **Direct-multiplier filter not built.** An earlier 13-multiplier version of the filter exists:
  alpha, alpha^2 and 1/alpha are multiplied with w0..w4, followed by shift-and-add logic. It is
  the slower alternative to the RCM filter and is not built here.
- **No decoder.** Decryption needs the inverse transform and the inverse re-orientation. Neither
  is included, and neither is an entropy coder such as SPIHT.
- **Fixed frame size.** The build transforms exactly N x N square frames. Other sizes need a
  different `N`. Non-square frames, such as 1024 x 768 video, are not supported.

## Simulating

The testbenches use only plain Verilator (5.x). Example for the reduced-size end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/pdwt_pkg.sv tb/pdwt_ref_pkg.sv tb/tb_secure_dwt_top.sv \
        --top-module tb_secure_dwt_top -o sim
    ./obj_dir/sim

Every testbench ends with one line `TB_RESULT checks=<n> failures=<m>`.

The available testbenches:

- `tb_rcm_lut`, `tb_rcm`, `tb_coef_gen`, `tb_pdwt_filter`, `tb_subband_reorient` and
  `tb_frame_ram`: one block each.
- `tb_secure_dwt_top`: the end-to-end test at 64 x 64.
- `tb_secure_dwt_full`: 512 x 512 at the default parameters. It runs in a few seconds.
- `tb_secure_dwt_256`: one 256 x 256 frame with 6 levels.

The two frame-level testbenches also check the clock count against the formula above.

## Changing it

- **Frame size and depth.** `N` and `LEVELS` set these. The key width follows from `LEVELS`.
- **Table width.** `LUT_IN` trades table size against adder count in the RCMs. With 4 the tables
  have 16 entries; with 8, one 256-entry table per multiplier.
- **Constant precision.** `CW`/`CF` on `pdwt_filter` and `coef_gen` set it. The testbench model
  assumes Q1.10.
- **Coefficient word.** `MEM_W` sets its width. The filter works on `MEM_W`-bit signed samples
  and saturates into `MEM_W` bits.
