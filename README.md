# Kernel-correlation object tracker: FFT, CORDIC and VGA datapath in SystemVerilog

This is the hardware side of a *tracking-by-detection* tracker. Each frame,
a stored template of the object is compared with a search patch at every cyclic
shift at once. It is compared through a Gaussian kernel, and the shift with the
strongest response is where the object has moved. The comparison at all shifts
is a circular correlation, so it runs in the frequency domain: two FFTs, a
bin-by-bin product and one inverse FFT, instead of N separate dot products.
The Gaussian then needs one exponential per shift, which a hyperbolic CORDIC
computes with shifts and adds only. The tracked position is shown as a
cross-hair on a 640 x 480 VGA output.

The design was reconstructed from a published description of an FPGA
implementation. That description gives the building blocks and their
interfaces in some detail, and says almost nothing about how they connect.
The sections below say which parts follow it and which are choices made
here.

## Blocks

| module | what it is |
|---|---|
| `fft_r2sdf_stage` | one stage of a radix-2 single-path delay-feedback FFT: butterfly, feedback FIFO, twiddle ROM, complex multiplier |
| `fft_r2sdf` | pipelined FFT/IFFT, 64..1024 points chosen at run time, bit-reversed output |
| `fft2d` | 2-D FFT/IFFT of a 64 x 64 frame by rows, then columns, on one `fft_r2sdf` |
| `cordic_sincos` | combinational circular CORDIC: angle to 127·cos, 127·sin |
| `cordic_exp` | combinational hyperbolic CORDIC: argument to cosh, sinh, exp |
| `gauss_kernel` | Gaussian kernel response for all 64 shifts (3 FFT cores and `cordic_exp`) |
| `peak_detect` | index and value of the largest response |
| `vga_top` | 640 x 480 @ 60 Hz timing, pixel address, cursor overlay |
| `tracker_top` | the system: kernel, peak, then position register, then VGA cursor. `cordic_sincos` and `fft2d` sit beside it |
| `tracker_pkg` | shared constants and elaboration-time table functions (twiddles, CORDIC angles and gains) |

Every file starts with a comment giving the block's interface and timing.

## The R2SDF FFT and its variable length

`fft_r2sdf` chains `LOG2N_MAX` (10) stages. Stage *k* has a feedback delay of
D = 2^(9-k): 512, 256, …, 1. A stage counts the samples of its current span of
2D, and the count restarts on the frame sync:

* first half of the span (c < D): the incoming sample is parked in the FIFO.
  The word leaving the FIFO is a difference from the previous span. It goes
  out multiplied by the twiddle W_2D^c.
* second half (c ≥ D): the butterfly combines the FIFO head *a* with the input
  *b*. It sends *a + b* out and parks *a − b*.

Each stage therefore delays the stream by D samples. Its twiddles depend only
on its own D, not on the transform length, so an N-point transform is just the
last log2(N) stages of the 1024-point chain. The only run-time reconfiguration
is a multiplexer in front of each stage. It passes the external input to stage
`10 − log2n` and the previous stage's output to the stages after it. A small
controller latches `log2n` with `in_sync` and steers these multiplexers.

Details that matter when using it:

* **Order and numbering.** Results leave in bit-reversed order. `out_index`
  gives the natural bin number of each result, and `out_sync` marks bin 0.
* **Flow.** The pipeline moves only when `in_valid` is high. The tail of a
  frame is pushed out by the next frame, or by N padding samples. With
  continuous input, the first result appears N − 1 + log2(N) cycles after the
  sync sample is presented.
* **Direction per frame.** `inverse` is sampled with the sync and travels down
  the pipeline with the frame. Forward and inverse frames may follow each
  other back to back. The IFFT is not divided by N.
* **Length changes.** Drain the previous frame before the sync that changes
  `log2n`. Results between that drain and the new frame's `out_sync` are junk;
  capture from `out_sync` onwards.
* **Widths.** The input is sign-extended by one guard bit. Each stage then
  grows the word by one bit, so the output is `IN_W + LOG2N_MAX + 1` = 19 bits
  and cannot overflow. Twiddles are 16-bit with 14 fractional bits, and each
  product is rounded. Expect about √N LSB of rounding noise on a full-scale
  1024-point transform.

## 2-D FFT

`fft2d` stores a frame in a buffer, then runs it through the 1-D core twice.
First each row goes through, and its results are written back at their natural
column positions. Then each column goes through (the core's length switches
when rows and columns differ), and its results are written back at their
natural row positions. Finally the frame is read out in raster order. A row
or column is rewritten only after it has been read completely, so one buffer
serves both passes. After each pass the core is padded with zeros until the
last result is written. Unlike the 1-D core, an inverse 2-D transform includes
the 1/(rows x columns) factor. It is applied on read-out as a rounded
arithmetic shift. Load, rows, columns and read-out take 4096 cycles each for a
64 x 64 frame, plus the two drains.

## Gaussian kernel response

For template x and patch z of N = 64 samples, `gauss_kernel` computes

    c[n] = Σ_m x[m] · z[m+n]             = IFFT(conj(X) · Z)[n] / N
    k[n] = exp(−(|x|² + |z|² − 2 c[n]) / σ²)

For each shift n, the bracket is the squared distance between the template and
the patch shifted back by n. So k[n] peaks at the object's displacement.

* X and Z come from two FFT cores fed side by side, while the norms |x|² and
  |z|² are summed. The samples enter with 4 extra fractional bits (`GUARD`).
  Without them, FFT rounding noise is comparable to the small distances near
  the peak, which is exactly where accuracy matters.
* conj(X)·Z is written into a product buffer at natural bin positions. A third
  core, in inverse mode, reads it back in order.
* A three-register pipeline forms d (clamped at 0) and then a = d · `inv_sigma2`
  (an unsigned number with 24 fractional bits). It evaluates exp(−a) by range
  reduction: a = q·ln2 + r with 0 ≤ r < ln2, so exp(−a) = exp(−r) · 2^−q.
  exp(−r) comes from `cordic_exp`, whose series converges only for |r| < 1.118.
  Any a ≥ 16 gives 0.
* k[n] is output in Q2.14 (16384 = 1.0), in bit-reversed order of n, with
  the index alongside.

One load-and-evaluate cycle takes about 4N clocks. The response is the kernel
correlation itself. Learning the classifier coefficients (a regularised
regression solved in the Fourier domain) is not part of this hardware.

## CORDIC units

Both units are combinational, with no clock, as in the original block
symbols. Their ports are 16 bits wide and they have a `reset` that clears the
outputs.

* `cordic_sincos`: `angle` is in degrees × 128 (30° = 3840), and x, y = 127·cos,
  127·sin. It uses a 32-bit datapath and 20 rotations. Angles beyond ±90° are
  folded by 180° and the result negated. `reset` is active high.
* `cordic_exp`: `angle` is Q2.14 (16384 = 1.0). x = cosh, y = sinh, and z = x + y
  = exp, all Q8.8 (256 = 1.0). The output format is a parameter (`OFRAC`), and
  the kernel uses Q1.14. Steps 4 and 13 are repeated, as the hyperbolic
  iteration requires. Inputs beyond about ±1.118 saturate: 1.5 gives about 3.0
  rather than 4.48. `reset` is active low.

The reset polarities and number scales match the values in the original
simulation waveforms: 127/110/90/64/0 for 0/30/45/60/90°, and
exp(1.0) = 696/256. Those waveform values are used as test vectors.

## Tracker top level and display

`tracker_top` runs everything from one clock, the 25 MHz pixel clock. Each
`track_valid` pulse reports the peak shift n, read cyclically: n < 32 moves
right by n, otherwise left by 64 − n. The position register `pos_x` moves by
that amount, clamped to 0..639. `pos_x` drives the cursor column of `vga_top`,
and `cursor_y` sets the cursor row. The host processor that would load
templates, choose σ and set the initial position is outside this RTL. Its
signals are the top-level ports.

`vga_top` keeps the original port names. It uses standard 640 x 480 @ 60 Hz
timing: an 800 x 525 raster, 96-clock horizontal sync and 2-line vertical
sync, both active low. For each visible pixel it publishes the coordinates and
the address y·640 + x. It registers the colour arriving in the same clock to
the DAC outputs, together with syncs and blanking. `iCursor_RGB_EN[3]` turns
the cross-hair on, and bits 2:0 choose which of R, G and B take the cursor
colour. `oVGA_BLANK` is active low (high while visible), and `oVGA_CLOCK` is
the inverted pixel clock.

## Where this departs from, or adds to, the original

* The system wiring (kernel → peak → position → cursor), the single clock and
  the 1-D search along one image line are choices made here. The original
  gives no system-level diagram.
* The kernel formula as printed has no conjugate on either spectrum. A
  conjugate is needed for correlation, so conj(X)·Z is used.
* The original's exponential CORDIC equations are printed in the circular
  form. The hyperbolic form is used here, because only it produces cosh/sinh
  and the published values.
* Added here: range reduction for the exponential, frame sizes (64-sample
  kernel, 64 x 64 2-D FFT), fixed-point formats, FFT output numbering,
  guard bits and flow control.
* A synthesis report for an 8-point FFT exists, but the described core is
  64..1024 points. The default follows the latter; set `LOG2N_MAX=3`,
  `LOG2N_MIN=3` for 8 points.
* Not built: the FPGA fabric, the soft processor and vendor IP, classifier
  training, and a vectoring (magnitude/phase) mode for the CORDIC. The
  original sine/cosine block has no mode input, so only rotation is built.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Each compares against floating-point
references computed in the testbench: DFTs, cos/sin/exp, and the kernel
formula. `tb_tracker_top` runs the whole system at its default sizes. It
performs six tracking steps (left, right, both screen-edge clamps), one
forward and one inverse 64 x 64 2-D FFT, CORDIC angles and one full video
frame with the cursor. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
        rtl/tracker_pkg.sv tb/tb_tracker_top.sv --top tb_tracker_top
    ./obj_dir/Vtb_tracker_top

Use the same command with any other `tb/tb_<block>.sv` and `--top tb_<block>`.
Testbenches with an asynchronous reset drive it high, then low, at start-up,
so the reset edge is seen. The 1-D FFT test uses the full 1024-point size,
with 64-, 256- and 1024-point frames, bubbles and both directions. The 2-D
test uses 8 x 16 frames so that the length switch is exercised.
`tb_fft_8point` builds the core as the 8-point size of the published synthesis
figures and checks it against a direct DFT.
