// fft_r2sdf_stage: one stage of a radix-2 single-path delay-feedback (R2SDF)
// decimation-in-frequency FFT pipeline.
//
// The stage owns a feedback FIFO of D complex words, a radix-2 butterfly, a
// twiddle ROM of D entries and a complex multiplier. A counter c runs over the
// 2D samples of one butterfly span, restarting at in_sync:
//   c <  D : the input is parked in the FIFO; the FIFO head (a difference
//            left there by the previous span) leaves, multiplied by the
//            twiddle W_2D^m (m = c), W = exp(-j*2*pi/2D), conjugated in inverse mode;
//   c >= D : the butterfly takes the FIFO head a and the input b, sends a+b
//            out and parks a-b in the FIFO.
// So the output stream is the input stream delayed by D samples. Data widths
// grow by one bit per stage (W_IN -> W_IN+1); the twiddled product is rounded
// and saturated to W_IN+1 bits.
//
// Timing: the pipeline advances only on in_valid (one sample per clock at
// most); out_* are registered, one clock after the input that produced them.
// out_valid rises once D samples of the first frame have gone in; out_sync
// marks the first output of each frame (input index D after in_sync).
//
// The stage structure (butterfly, feedback FIFO, twiddle ROM, counter
// controlled multiplexers) is the published one; the valid-driven advance,
// bit growth, rounding and saturation are this design's choices.
module fft_r2sdf_stage
  import tracker_pkg::*;
#(
  parameter int W_IN = 8,   // input word width (real and imaginary)
  parameter int D    = 4    // feedback delay (butterfly half-span)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  inverse,
  input  logic                  in_valid,
  input  logic                  in_sync,
  input  logic signed [W_IN-1:0] in_re,
  input  logic signed [W_IN-1:0] in_im,
  output logic                  out_valid,
  output logic                  out_sync,
  output logic                  out_inverse,
  output logic signed [W_IN:0]  out_re,
  output logic signed [W_IN:0]  out_im
);

  localparam int CW = $clog2(2 * D);          // counter width
  localparam int AW = (D > 1) ? $clog2(D) : 1; // FIFO address width
  localparam int WO = W_IN + 1;

  typedef logic signed [WO-1:0] word_t;
  typedef tw_t rom_t [D];

  function automatic rom_t gen_rom(input logic want_sin);
    rom_t t;
    for (int m = 0; m < D; m++) t[m] = want_sin ? tw_sin(m, 2 * D) : tw_cos(m, 2 * D);
    return t;
  endfunction

  localparam rom_t COS_ROM = gen_rom(1'b0);
  localparam rom_t SIN_ROM = gen_rom(1'b1);

  word_t fifo_re [D];
  word_t fifo_im [D];

  logic [CW-1:0] cnt_q, c;
  logic          active_q, primed_q, pending_q;
  logic          inv_q, inv_frame, inv_diff_q;
  logic [AW-1:0] addr;
  logic          phase;
  word_t         head_re, head_im, x_re, x_im;
  word_t         y_re, y_im, push_re, push_im;
  tw_t           wc, ws;

  assign c     = in_sync ? '0 : cnt_q;
  assign phase = (c >= CW'(D));
  // The inverse flag travels with the frame: latched at in_sync, and the
  // differences parked in the FIFO remember the flag of the frame that
  // produced them, so frames of both directions can follow each other.
  assign inv_frame = in_sync ? inverse : inv_q;
  assign addr  = (D > 1) ? AW'(c) : '0;
  assign x_re  = word_t'(in_re);
  assign x_im  = word_t'(in_im);
  assign head_re = fifo_re[addr];
  assign head_im = fifo_im[addr];
  assign wc    = COS_ROM[addr];
  assign ws    = SIN_ROM[addr];

  // Round a product with TW_FRAC fractional bits and saturate to WO bits.
  function automatic word_t scale_sat(input logic signed [WO+TW_W:0] p);
    logic signed [WO+TW_W:0] r;
    r = (p + (WO+TW_W+1)'(1 <<< (TW_FRAC - 1))) >>> TW_FRAC;
    if (r > (WO+TW_W+1)'(2 ** (WO - 1) - 1)) return word_t'(2 ** (WO - 1) - 1);
    if (r < -(WO+TW_W+1)'(2 ** (WO - 1))) return word_t'(-(2 ** (WO - 1)));
    return word_t'(r);
  endfunction

  always_comb begin
    logic signed [WO+TW_W:0] pr, pi;
    pr = '0;
    pi = '0;
    if (phase) begin
      y_re    = head_re + x_re;
      y_im    = head_im + x_im;
      push_re = head_re - x_re;
      push_im = head_im - x_im;
    end else begin
      // forward: (a + jb)(c - js); inverse: (a + jb)(c + js)
      if (!inv_diff_q) begin
        pr = head_re * wc + head_im * ws;
        pi = head_im * wc - head_re * ws;
      end else begin
        pr = head_re * wc - head_im * ws;
        pi = head_im * wc + head_re * ws;
      end
      y_re    = scale_sat(pr);
      y_im    = scale_sat(pi);
      push_re = x_re;
      push_im = x_im;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      fifo_re[addr] <= push_re;
      fifo_im[addr] <= push_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      active_q  <= 1'b0;
      primed_q  <= 1'b0;
      pending_q <= 1'b0;
      inv_q     <= 1'b0;
      inv_diff_q <= 1'b0;
      out_inverse <= 1'b0;
      out_valid <= 1'b0;
      out_sync  <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sync  <= 1'b0;
      if (in_valid) begin
        cnt_q  <= (c == CW'(2 * D - 1)) ? '0 : c + 1'b1;
        out_re <= y_re;
        out_im <= y_im;
        if (in_sync) active_q <= 1'b1;
        inv_q <= inv_frame;
        if (phase) inv_diff_q <= inv_frame;
        if ((active_q || in_sync) && (primed_q || phase)) begin
          out_valid <= 1'b1;
          if (phase) primed_q <= 1'b1;
        end
        if (in_sync) pending_q <= 1'b1;
        if ((pending_q || in_sync) && c == CW'(D)) begin
          out_sync    <= 1'b1;
          out_inverse <= inv_q;
          pending_q   <= 1'b0;
        end
      end
    end
  end

endmodule
