// cordic_sincos: combinational circular CORDIC in rotation mode, turning an
// angle into a cosine/sine pair.
//
// A vector starting at (AMP/K, 0) is rotated ITER times by +/-atan(2^-i); the
// sign of each step follows the sign of the angle still left to rotate, so the
// datapath needs only adders, subtractors and shifts. Angles beyond +/-90
// degrees are first folded by 180 degrees and the result negated, so the whole
// 16-bit input range (about +/-256 degrees) is covered.
//
// Interface (names and widths as in the published block symbol):
//   angle  signed, degrees x 128 (so 30 deg = 3840, 180 deg = 23040)
//   reset  active high; forces x and y to 0
//   x, y   signed AMP*cos(angle), AMP*sin(angle), rounded to integers (AMP = 127)
// Timing: purely combinational, no clock; the result is valid one
// propagation delay after angle changes.
//
// The angle scale, the output amplitude 127, the combinational structure and
// the 32-bit internal datapath with 20 steps follow the published block, its
// simulation values and its synthesis statistics; the 180-degree fold, the
// rounding and the internal fixed-point split are this design's choices.
module cordic_sincos
  import tracker_pkg::*;
#(
  parameter int W     = 16,   // port width
  parameter int IW    = 32,   // internal datapath width
  parameter int ITER  = 20,   // rotation steps
  parameter int AMP   = 127,  // output amplitude
  parameter int AFRAC = 7     // fractional bits of the angle port (degrees x 2^7)
) (
  input  logic signed [W-1:0] angle,
  input  logic                reset,
  output logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int ZF = 23;            // internal angle: degrees x 2^23
  localparam int XF = 16;            // internal x/y fractional bits
  localparam int ZSH = ZF - AFRAC;   // port angle -> internal angle shift

  typedef logic signed [IW-1:0] iw_t;
  typedef iw_t tab_t [ITER];

  function automatic tab_t gen_atan();
    tab_t t;
    for (int i = 0; i < ITER; i++) t[i] = iw_t'(cordic_atan(i, ZF));
    return t;
  endfunction

  localparam tab_t ATAN = gen_atan();
  localparam iw_t  X0   = iw_t'($rtoi($floor(real'(AMP) * cordic_gain(ITER) * (2.0 ** XF) + 0.5)));
  localparam iw_t  D90  = iw_t'(90 <<< ZF);
  localparam iw_t  D180 = iw_t'(180 <<< ZF);

  iw_t xs [ITER+1];
  iw_t ys [ITER+1];
  iw_t zs [ITER+1];
  logic neg;

  always_comb begin
    iw_t a;
    a   = iw_t'(angle) <<< ZSH;
    neg = 1'b0;
    if (a > D90) begin
      a   = a - D180;
      neg = 1'b1;
    end else if (a < -D90) begin
      a   = a + D180;
      neg = 1'b1;
    end
    xs[0] = X0;
    ys[0] = '0;
    zs[0] = a;
    for (int i = 0; i < ITER; i++) begin
      if (zs[i] >= 0) begin
        xs[i+1] = xs[i] - (ys[i] >>> i);
        ys[i+1] = ys[i] + (xs[i] >>> i);
        zs[i+1] = zs[i] - ATAN[i];
      end else begin
        xs[i+1] = xs[i] + (ys[i] >>> i);
        ys[i+1] = ys[i] - (xs[i] >>> i);
        zs[i+1] = zs[i] + ATAN[i];
      end
    end
  end

  // Round to the output grid, then undo the fold.
  function automatic logic signed [W-1:0] to_out(input iw_t v, input logic n);
    iw_t r;
    r = (v + iw_t'(1 <<< (XF - 1))) >>> XF;
    if (n) r = -r;
    return r[W-1:0];
  endfunction

  always_comb begin
    if (reset) begin
      x = '0;
      y = '0;
    end else begin
      x = to_out(xs[ITER], neg);
      y = to_out(ys[ITER], neg);
    end
  end

endmodule
