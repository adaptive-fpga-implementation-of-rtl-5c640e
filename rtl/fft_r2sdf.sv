// fft_r2sdf: pipelined radix-2 single-path delay-feedback FFT/IFFT with a
// length chosen at run time.
//
// LOG2N_MAX stages are chained; stage k has feedback delay 2^(LOG2N_MAX-1-k).
// Because an N-point R2SDF pipeline is exactly the last log2(N) stages of a
// longer one (a stage's twiddles depend only on its own delay), a shorter
// transform is obtained by entering the chain part-way: the inter-stage
// multiplexers feed the input samples to stage LOG2N_MAX-log2n and the earlier
// stages are idle. The small controller here latches log2n at each in_sync
// (clamped to LOG2N_MIN..LOG2N_MAX) and steers those multiplexers; each stage
// sequences its own butterfly/twiddle phases from the frame sync that travels
// with the data.
//
// Interface:
//   in_valid/in_sync/in_re/in_im  sample stream, natural order, in_sync on the
//                                 first sample of each frame of N samples
//   inverse                       0 = FFT (W = exp(-j2pi/N)), 1 = IFFT (conjugate
//                                 twiddles, no 1/N scaling); sampled with
//                                 in_sync and carried along with the frame
//   log2n                         transform length, sampled with in_sync
//   out_*                         results, bit-reversed order; out_sync on the
//                                 first bin (bin 0) of each frame, out_index
//                                 gives the natural bin number of each output
// Timing: one sample per clock; with continuous streaming a frame's first
// result is registered N - 2 + log2(N) clock edges after the edge that takes
// its in_sync sample (it is on the outputs N - 1 + log2(N) cycles after
// the sync sample was presented). The pipeline moves only on in_valid, so the last frame
// is pushed out by the next frame (or by N samples of padding).
// Changing log2n corrupts a frame still inside the pipeline: drain it first.
//
// The R2SDF stages, lengths 64..1024, 8-bit real/imaginary input, inverse
// mode, frame sync and bit-reversed output follow the published description;
// the width growth (one guard bit, then one bit per stage, no scaling, so no
// overflow is possible), the out_index port and the
// valid-driven flow are this design's choices.
module fft_r2sdf #(
  parameter int IN_W      = 8,    // input width, real and imaginary
  parameter int LOG2N_MAX = 10,   // longest transform: 1024 points
  parameter int LOG2N_MIN = 6,    // shortest transform: 64 points
  localparam int OUT_W    = IN_W + LOG2N_MAX + 1,
  localparam int LW       = $clog2(LOG2N_MAX + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  inverse,
  input  logic [LW-1:0]         log2n,
  input  logic                  in_valid,
  input  logic                  in_sync,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                  out_valid,
  output logic                  out_sync,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic [LOG2N_MAX-1:0]  out_index
);

  localparam int S = LOG2N_MAX;

  // ---- controller: length register and entry-stage select ----
  logic [LW-1:0] len_q, len_in, len_cur;
  logic [LW-1:0] entry;

  always_comb begin
    len_in = log2n;
    if (log2n < LW'(LOG2N_MIN)) len_in = LW'(LOG2N_MIN);
    if (log2n > LW'(LOG2N_MAX)) len_in = LW'(LOG2N_MAX);
  end

  assign len_cur = in_sync ? len_in : len_q;
  assign entry   = LW'(S) - len_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) len_q <= LW'(LOG2N_MAX);
    else if (in_valid && in_sync) len_q <= len_in;
  end

  // ---- datapath: chain of stages, all buses OUT_W wide ----
  logic signed [OUT_W-1:0] s_re [S+1];
  logic signed [OUT_W-1:0] s_im [S+1];
  logic                    s_v  [S+1];
  logic                    s_sy [S+1];
  logic                    s_inv [S+1];

  for (genvar k = 0; k < S; k++) begin : g_stage
    localparam int WI = IN_W + 1 + k;
    logic signed [WI-1:0] i_re, i_im;
    logic signed [WI:0]   o_re, o_im;
    logic                 i_v, i_sy, i_inv;

    // Inter-stage multiplexer: external samples at the entry stage,
    // the previous stage's results after it, nothing before it.
    always_comb begin
      if (k == int'(entry)) begin
        i_re = WI'(in_re);
        i_im = WI'(in_im);
        i_v  = in_valid;
        i_sy = in_sync;
        i_inv = inverse;
      end else begin
        i_re = s_re[k][WI-1:0];
        i_im = s_im[k][WI-1:0];
        i_v  = (k > int'(entry)) ? s_v[k] : 1'b0;
        i_sy = (k > int'(entry)) ? s_sy[k] : 1'b0;
        i_inv = s_inv[k];
      end
    end

    fft_r2sdf_stage #(.W_IN(WI), .D(2 ** (S - 1 - k))) u_stage (
      .clk, .rst_n, .inverse(i_inv),
      .in_valid(i_v), .in_sync(i_sy), .in_re(i_re), .in_im(i_im),
      .out_valid(s_v[k+1]), .out_sync(s_sy[k+1]),
      .out_inverse(s_inv[k+1]), .out_re(o_re), .out_im(o_im)
    );

    assign s_re[k+1] = OUT_W'(o_re);
    assign s_im[k+1] = OUT_W'(o_im);
  end

  assign s_re[0] = '0;
  assign s_im[0] = '0;
  assign s_v[0]  = 1'b0;
  assign s_sy[0] = 1'b0;
  assign s_inv[0] = 1'b0;

  assign out_valid = s_v[S];
  assign out_sync  = s_sy[S];
  assign out_re    = s_re[S];
  assign out_im    = s_im[S];

  // ---- output bin numbering ----
  // The length of the frame leaving is captured with its first bin, so a
  // new length latched at the input does not disturb the numbering.
  logic [LOG2N_MAX-1:0] ocnt_q, ocnt;
  logic [LW-1:0]        olen_q, olen;

  assign ocnt = out_sync ? '0 : ocnt_q;
  assign olen = out_sync ? len_q : olen_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ocnt_q <= '0;
      olen_q <= LW'(LOG2N_MAX);
    end else if (out_valid) begin
      ocnt_q <= ocnt + 1'b1;
      olen_q <= olen;
    end
  end

  always_comb begin
    out_index = '0;
    for (int b = 0; b < LOG2N_MAX; b++)
      if (b < int'(olen)) out_index[int'(olen) - 1 - b] = ocnt[b];
  end

endmodule
