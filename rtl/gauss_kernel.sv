// gauss_kernel: Gaussian kernel correlation between a template x and a test
// patch z for all N cyclic shifts at once, computed in the frequency domain:
//
//   k[n] = exp( -(|x|^2 + |z|^2 - 2 * c[n]) / sigma^2 ),
//   c[n] = sum_m x[m] z[m+n]  =  IFFT( conj(FFT(x)) .* FFT(z) )[n] / N
//
// k[n] is the similarity of the patch to the template moved by n samples,
// i.e. the classifier response of every shifted window, so the object's
// displacement is where k peaks (see peak_detect).
//
// Datapath: two R2SDF FFT cores transform x and z as they stream in while
// the squared norms are accumulated; their bit-reversed results are
// multiplied bin by bin (conj(X) * Z) and parked at natural positions in a
// product buffer; the samples enter the forward cores with GUARD extra
// fractional bits, which keeps the cores' rounding noise well below one
// unit of c[n] near the peak, where d is small. A third core in inverse mode transforms the buffer, and
// each result goes through a three-register pipeline: d = |x|^2 + |z|^2 - 2c
// (clamped at 0), a = d / sigma^2, then exp(-a). The exponential uses the
// hyperbolic CORDIC (cordic_exp) after range reduction a = q*ln2 + r,
// 0 <= r < ln2, so exp(-a) = exp(-r) * 2^-q with exp(-r) inside the CORDIC's
// convergence range; a >= 16 gives k = 0.
//
// Interface: in_ready is high while a new pair of vectors can be loaded;
// in_valid/in_x/in_z stream the N samples of x and z side by side.
// inv_sigma2 is 1/sigma^2 as an unsigned fixed-point number with ISF
// fractional bits, sampled with the first sample. k_valid/k_index/k_value
// return the N kernel values in bit-reversed index order, k_value in Q2.14
// (16384 = 1.0); k_last marks the last one.
// Timing: N load cycles, then the forward cores are drained with zero
// padding (about N + log2(N) cycles), then N + log2(N) + 3 cycles for the
// inverse core and the output pipeline, plus drain: about 4N cycles per patch.
//
// The kernel formula, FFT-based correlation and the CORDIC exponential are
// the published method; the 1-D vectors, conj(FFT(x)) placement, fixed-point
// formats, range reduction and three-core schedule are this design's choices.
module gauss_kernel #(
  parameter int IN_W  = 8,    // sample width of x and z (signed)
  parameter int LOG2N = 6,    // vector length N = 64
  parameter int ISF   = 24,   // fractional bits of inv_sigma2
  parameter int GUARD = 4     // extra fractional bits carried through the FFTs
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [15:0]            inv_sigma2,
  output logic                   in_ready,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_x,
  input  logic signed [IN_W-1:0] in_z,
  output logic                   k_valid,
  output logic                   k_last,
  output logic [LOG2N-1:0]       k_index,
  output logic [15:0]            k_value
);

  localparam int N   = 1 << LOG2N;
  localparam int LW  = $clog2(LOG2N + 1);
  localparam int GW  = IN_W + GUARD;              // forward FFT input width
  localparam int FW  = GW + LOG2N + 1;            // forward FFT output width
  localparam int PW  = 2 * FW + 1;                // product width
  localparam int IW  = PW + LOG2N + 1;            // inverse FFT output width
  localparam int DW  = 2 * IN_W + LOG2N + 2;      // norm / distance width
  localparam int AW2 = DW + 16;                   // d * inv_sigma2 width
  localparam int LN2_Q14     = 11357;             // round(ln2 * 2^14)
  localparam int INV_LN2_Q16 = 94548;             // round(2^16 / ln2)
  localparam int A_MAX       = 16 << 14;          // exp(-16) < 2^-14: k = 0

  typedef enum logic [1:0] {LOAD, FWD, INV} state_e;
  state_e state_q;

  logic [LOG2N:0]   cnt_q;      // samples fed in the current phase
  logic [LOG2N:0]   pcnt_q;     // products stored / IFFT results taken
  logic             cap_q;
  logic [15:0]      isig_q;
  logic [DW-1:0]    nx_q, nz_q;
  logic signed [DW-1:0] ex, ez;
  logic [DW-1:0]    sqx, sqz;

  assign ex  = DW'(in_x);
  assign ez  = DW'(in_z);
  assign sqx = DW'(ex * ex);
  assign sqz = DW'(ez * ez);

  // ---------------- forward transforms ----------------
  logic                 f_valid, f_sync;
  logic signed [GW-1:0] fx, fz;
  logic                 ax_valid, ax_sync, bz_valid, bz_sync;
  logic signed [FW-1:0] ax_re, ax_im, bz_re, bz_im;
  logic [LOG2N-1:0]     ax_index, bz_index;

  assign f_valid = (state_q == LOAD) ? in_valid : (state_q == FWD);
  assign f_sync  = (state_q == LOAD) && in_valid && (cnt_q == '0);
  // samples enter the cores scaled by 2^GUARD so rounding noise stays small
  assign fx      = (state_q == LOAD) ? (GW'(in_x) <<< GUARD) : '0;
  assign fz      = (state_q == LOAD) ? (GW'(in_z) <<< GUARD) : '0;

  fft_r2sdf #(.IN_W(GW), .LOG2N_MAX(LOG2N), .LOG2N_MIN(LOG2N)) u_fft_x (
    .clk, .rst_n, .inverse(1'b0), .log2n(LW'(LOG2N)),
    .in_valid(f_valid), .in_sync(f_sync), .in_re(fx), .in_im('0),
    .out_valid(ax_valid), .out_sync(ax_sync), .out_re(ax_re), .out_im(ax_im),
    .out_index(ax_index)
  );

  fft_r2sdf #(.IN_W(GW), .LOG2N_MAX(LOG2N), .LOG2N_MIN(LOG2N)) u_fft_z (
    .clk, .rst_n, .inverse(1'b0), .log2n(LW'(LOG2N)),
    .in_valid(f_valid), .in_sync(f_sync), .in_re(fz), .in_im('0),
    .out_valid(bz_valid), .out_sync(bz_sync), .out_re(bz_re), .out_im(bz_im),
    .out_index(bz_index)
  );

  // ---------------- spectral product conj(X) * Z ----------------
  logic signed [PW-1:0] pbuf_re [N];
  logic signed [PW-1:0] pbuf_im [N];
  logic signed [PW-1:0] p_re, p_im;
  logic                 p_take;

  logic signed [PW-1:0] axr, axi, bzr, bzi;
  assign axr    = PW'(ax_re);
  assign axi    = PW'(ax_im);
  assign bzr    = PW'(bz_re);
  assign bzi    = PW'(bz_im);
  assign p_re   = axr * bzr + axi * bzi;
  assign p_im   = axr * bzi - axi * bzr;

  // The two forward cores run in lockstep on the same control.
  always_ff @(posedge clk)
    if (rst_n) assert ({ax_valid, ax_sync, ax_index} == {bz_valid, bz_sync, bz_index})
      else $error("gauss_kernel: forward FFT cores out of step");
  assign p_take = (state_q == FWD) && ax_valid && (ax_sync || cap_q) && !pcnt_q[LOG2N];

  // ---------------- inverse transform ----------------
  logic                 i_valid_q, i_sync_q, i_pad_q;
  logic signed [PW-1:0] rd_re_q, rd_im_q;
  logic                 c_valid, c_sync;
  logic signed [IW-1:0] c_re, c_im;
  logic [LOG2N-1:0]     c_index;
  logic                 c_take;

  always_ff @(posedge clk) begin
    if (p_take) begin
      pbuf_re[ax_index] <= p_re;
      pbuf_im[ax_index] <= p_im;
    end
    rd_re_q <= pbuf_re[cnt_q[LOG2N-1:0]];
    rd_im_q <= pbuf_im[cnt_q[LOG2N-1:0]];
  end

  fft_r2sdf #(.IN_W(PW), .LOG2N_MAX(LOG2N), .LOG2N_MIN(LOG2N)) u_ifft (
    .clk, .rst_n, .inverse(1'b1), .log2n(LW'(LOG2N)),
    .in_valid(i_valid_q), .in_sync(i_sync_q),
    .in_re(i_pad_q ? '0 : rd_re_q), .in_im(i_pad_q ? '0 : rd_im_q),
    .out_valid(c_valid), .out_sync(c_sync), .out_re(c_re), .out_im(c_im),
    .out_index(c_index)
  );

  assign c_take = (state_q == INV) && c_valid && (c_sync || cap_q) && !pcnt_q[LOG2N];

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= LOAD;
      cnt_q     <= '0;
      pcnt_q    <= '0;
      cap_q     <= 1'b0;
      isig_q    <= '0;
      nx_q      <= '0;
      nz_q      <= '0;
      i_valid_q <= 1'b0;
      i_sync_q  <= 1'b0;
      i_pad_q   <= 1'b0;
    end else begin
      i_valid_q <= 1'b0;
      i_sync_q  <= 1'b0;
      unique case (state_q)
        LOAD: if (in_valid) begin
          if (cnt_q == '0) begin
            isig_q <= inv_sigma2;
            nx_q   <= sqx;
            nz_q   <= sqz;
          end else begin
            nx_q   <= nx_q + sqx;
            nz_q   <= nz_q + sqz;
          end
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == (LOG2N+1)'(N - 1)) begin
            state_q <= FWD;
            pcnt_q  <= '0;
            cap_q   <= 1'b0;
          end
        end
        FWD: begin
          if (p_take) begin
            pcnt_q <= pcnt_q + 1'b1;
            cap_q  <= 1'b1;
          end
          if (pcnt_q[LOG2N]) begin
            state_q <= INV;
            cnt_q   <= '0;
            pcnt_q  <= '0;
            cap_q   <= 1'b0;
          end
        end
        INV: begin
          // feed the product buffer, then zero padding until all N results are out
          i_valid_q <= 1'b1;
          i_sync_q  <= (cnt_q == '0);
          i_pad_q   <= cnt_q[LOG2N];
          if (!cnt_q[LOG2N]) cnt_q <= cnt_q + 1'b1;
          if (c_take) begin
            pcnt_q <= pcnt_q + 1'b1;
            cap_q  <= 1'b1;
          end
          if (pcnt_q[LOG2N]) begin
            state_q   <= LOAD;
            cnt_q     <= '0;
            i_valid_q <= 1'b0;
          end
        end
        default: state_q <= LOAD;
      endcase
    end
  end

  assign in_ready = (state_q == LOAD);

  // ---------------- kernel pipeline ----------------
  // stage 1: squared distance d = |x|^2 + |z|^2 - 2 c, c = IFFT / N
  logic                   s1_v, s1_last;
  logic [LOG2N-1:0]       s1_idx;
  logic [DW-1:0]          s1_d;
  // stage 2: argument a = d / sigma^2 (Q14), reduced as q*ln2 + r
  logic                   s2_v, s2_last, s2_zero;
  logic [LOG2N-1:0]       s2_idx;
  logic [4:0]             s2_q;
  logic [15:0]            s2_r;

  logic signed [DW+1:0]   d_full;
  logic signed [IW-1:0]   c_corr;
  always_comb begin
    // rounded c[n]: remove N and the two guard scalings
    c_corr = (c_re + (IW'(1) <<< (LOG2N + 2 * GUARD - 1))) >>> (LOG2N + 2 * GUARD);
    d_full = (DW+2)'(nx_q) + (DW+2)'(nz_q) - (DW+2)'(c_corr <<< 1);
  end

  logic [AW2-1:0] a_full;
  logic [AW2+16:0] qprod;
  logic [AW2-1:0] q_est, r_est;
  always_comb begin
    a_full = AW2'((AW2'(s1_d) * AW2'(isig_q)) >> (ISF - 14));
    qprod  = (AW2+17)'(a_full) * (AW2+17)'(INV_LN2_Q16);
    q_est  = AW2'(qprod >> 30);
    r_est  = a_full - AW2'(q_est * AW2'(LN2_Q14));
    if (r_est >= AW2'(LN2_Q14)) begin   // correct the estimate by one step
      r_est = r_est - AW2'(LN2_Q14);
      q_est = q_est + 1'b1;
    end
  end

  logic signed [15:0] e_angle, e_x, e_y, e_z;
  assign e_angle = -$signed({1'b0, s2_r[14:0]});

  cordic_exp #(.OFRAC(14)) u_exp (
    .reset(1'b1), .angle(e_angle), .x(e_x), .y(e_y), .z(e_z)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_last <= 1'b0; s1_idx <= '0; s1_d <= '0;
      s2_v <= 1'b0; s2_last <= 1'b0; s2_zero <= 1'b0; s2_idx <= '0; s2_q <= '0; s2_r <= '0;
      k_valid <= 1'b0; k_last <= 1'b0; k_index <= '0; k_value <= '0;
    end else begin
      s1_v    <= c_take;
      s1_last <= c_take && (pcnt_q == (LOG2N+1)'(N - 1));
      s1_idx  <= c_index;
      s1_d    <= (d_full < 0) ? '0 : DW'(d_full);

      s2_v    <= s1_v;
      s2_last <= s1_last;
      s2_idx  <= s1_idx;
      s2_zero <= (a_full >= AW2'(A_MAX));
      s2_q    <= 5'(q_est);
      s2_r    <= 16'(r_est);

      k_valid <= s2_v;
      k_last  <= s2_last;
      k_index <= s2_idx;
      k_value <= s2_zero ? '0 : 16'($unsigned(e_z) >> s2_q);
    end
  end

endmodule
