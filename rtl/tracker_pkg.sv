// tracker_pkg: constants and elaboration-time helper functions shared by the
// tracker's datapath blocks.
//
// * bitrev()            reverses the low `bits` bits of an index (FFT output order).
// * tw_cos()/tw_sin()   twiddle factor components cos(2*pi*m/n) and sin(2*pi*m/n)
//                       in signed Q1.14 (16384 = 1.0); used only to fill ROM
//                       constants at elaboration, never as hardware.
// * cordic_atan()       arctan(2^-i) in degrees scaled by 2^(ANG_FRAC), the
//                       angle table of the circular CORDIC.
// * cordic_atanh()      artanh(2^-i) scaled by 2^FRAC, the hyperbolic CORDIC table.
// * cordic_gain()       1/K for the circular CORDIC after `iters` steps.
// * cordic_hgain()      1/K' for the hyperbolic CORDIC with repeated steps 4, 13, 40.
// The twiddle ROM format (16-bit, 14 fractional bits) is a choice of this design.
package tracker_pkg;

  localparam int TW_W    = 16;   // twiddle word width
  localparam int TW_FRAC = 14;   // twiddle fractional bits (16384 = 1.0)
  localparam real PI     = 3.14159265358979323846;

  typedef logic signed [TW_W-1:0] tw_t;

  // Reverse the low `bits` bits of v.
  function automatic int unsigned bitrev(input int unsigned v, input int bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic tw_t tw_round(input real v);
    return tw_t'($rtoi($floor(v * real'(1 << TW_FRAC) + 0.5)));
  endfunction

  function automatic tw_t tw_cos(input int m, input int n);
    return tw_round($cos(2.0 * PI * real'(m) / real'(n)));
  endfunction

  function automatic tw_t tw_sin(input int m, input int n);
    return tw_round($sin(2.0 * PI * real'(m) / real'(n)));
  endfunction

  // arctan(2^-i) in degrees, times 2^frac.
  function automatic longint cordic_atan(input int i, input int frac);
    return longint'($floor($atan(2.0 ** (-i)) * 180.0 / PI * (2.0 ** frac) + 0.5));
  endfunction

  // artanh(2^-i), times 2^frac.
  function automatic longint cordic_atanh(input int i, input int frac);
    real t;
    t = 2.0 ** (-i);
    return longint'($floor(0.5 * $ln((1.0 + t) / (1.0 - t)) * (2.0 ** frac) + 0.5));
  endfunction

  // 1/K of the circular CORDIC after iters steps (i = 0 .. iters-1).
  function automatic real cordic_gain(input int iters);
    real k;
    k = 1.0;
    for (int i = 0; i < iters; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return 1.0 / k;
  endfunction

  // Hyperbolic step schedule: steps run i = 1, 2, 3, 4, 4, 5, ... with 4, 13
  // and 40 executed twice so the series converges.
  function automatic int hyp_shift(input int step);
    int cnt, reps;
    cnt = 0;
    for (int i = 1; i < 64; i++) begin
      reps = (i == 4 || i == 13 || i == 40) ? 2 : 1;
      if (step < cnt + reps) return i;
      cnt += reps;
    end
    return 63;
  endfunction

  // 1/K' of the hyperbolic CORDIC after `steps` steps.
  function automatic real cordic_hgain(input int steps);
    real k;
    k = 1.0;
    for (int s = 0; s < steps; s++) k = k * $sqrt(1.0 - 2.0 ** (-2 * hyp_shift(s)));
    return 1.0 / k;
  endfunction

endpackage
