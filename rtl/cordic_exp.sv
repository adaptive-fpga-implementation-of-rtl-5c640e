// cordic_exp: combinational hyperbolic CORDIC in rotation mode, giving
// cosh, sinh and exp of its input.
//
// A vector starting at (1/K', 0) is rotated by +/-artanh(2^-i), i = 1, 2, ...
// with steps 4 and 13 done twice (needed for convergence); each step is
//   x' = x + s*2^-i*y,  y' = y + s*2^-i*x,  z' = z - s*artanh(2^-i)
// with s the sign of the residual angle z. At the end x = cosh(a),
// y = sinh(a) and z-out = x + y = exp(a). Only add, subtract and shift are used.
// The series converges for |a| <= about 1.118; a larger input saturates at
// the value for that limit (exp about 3.06).
//
// Interface (names and widths as in the published block symbol):
//   angle  signed Q2.14 argument (16384 = 1.0)
//   reset  active low: while 0, x, y and z are forced to 0
//   x      cosh(angle), signed Q8.8 (256 = 1.0)
//   y      sinh(angle), signed Q8.8
//   z      exp(angle) = x + y, signed Q8.8
// Timing: purely combinational.
//
// The port list, the Q2.14 / Q8.8 scales, the sum x + y as the exponential and
// the active-low reset are read from the published symbol and simulation
// values; step count, internal widths and rounding are this design's choices.
module cordic_exp
  import tracker_pkg::*;
#(
  parameter int W     = 16,   // port width
  parameter int IW    = 32,   // internal datapath width
  parameter int STEPS = 18,   // hyperbolic steps including the repeats
  parameter int AFRAC = 14,   // fractional bits of angle
  parameter int OFRAC = 8     // fractional bits of x, y, z
) (
  input  logic                reset,
  input  logic signed [W-1:0] angle,
  output logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] z
);

  localparam int F = 26;   // internal fractional bits of x, y and the angle

  typedef logic signed [IW-1:0] iw_t;
  typedef iw_t tab_t [STEPS];
  typedef int  sh_t  [STEPS];

  function automatic tab_t gen_atanh();
    tab_t t;
    for (int s = 0; s < STEPS; s++) t[s] = iw_t'(cordic_atanh(hyp_shift(s), F));
    return t;
  endfunction

  function automatic sh_t gen_shift();
    sh_t t;
    for (int s = 0; s < STEPS; s++) t[s] = hyp_shift(s);
    return t;
  endfunction

  localparam tab_t ATANH = gen_atanh();
  localparam sh_t  SH    = gen_shift();
  localparam iw_t  X0    = iw_t'($rtoi($floor(cordic_hgain(STEPS) * (2.0 ** F) + 0.5)));

  iw_t xs [STEPS+1];
  iw_t ys [STEPS+1];
  iw_t zs [STEPS+1];

  always_comb begin
    xs[0] = X0;
    ys[0] = '0;
    zs[0] = iw_t'(angle) <<< (F - AFRAC);
    for (int s = 0; s < STEPS; s++) begin
      if (zs[s] >= 0) begin
        xs[s+1] = xs[s] + (ys[s] >>> SH[s]);
        ys[s+1] = ys[s] + (xs[s] >>> SH[s]);
        zs[s+1] = zs[s] - ATANH[s];
      end else begin
        xs[s+1] = xs[s] - (ys[s] >>> SH[s]);
        ys[s+1] = ys[s] - (xs[s] >>> SH[s]);
        zs[s+1] = zs[s] + ATANH[s];
      end
    end
  end

  function automatic logic signed [W-1:0] to_out(input iw_t v);
    iw_t r;
    r = (v + iw_t'(1 <<< (F - OFRAC - 1))) >>> (F - OFRAC);
    return r[W-1:0];
  endfunction

  always_comb begin
    if (!reset) begin
      x = '0;
      y = '0;
      z = '0;
    end else begin
      x = to_out(xs[STEPS]);
      y = to_out(ys[STEPS]);
      z = to_out(xs[STEPS] + ys[STEPS]);
    end
  end

endmodule
