// tb_cordic_exp: checks the hyperbolic CORDIC against real cosh/sinh/exp
// (within 2 LSB of Q8.8) over its convergence range, against the reference
// waveform values of the published simulation (within 4 LSB), that an
// out-of-range argument saturates near exp(1.118), and that the active-low
// reset clears the outputs.
module tb_cordic_exp;
  logic signed [15:0] angle, x, y, z;
  logic reset;
  int checks = 0, failures = 0;
  int saturations = 0;

  cordic_exp dut (.reset(reset), .angle(angle), .x(x), .y(y), .z(z));

  task automatic check_val(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: angle=%0d got %0d expected %0d", what, angle, got, exp);
    end
  endtask

  int ref_a [4] = '{16384, 8192, -16384, 24576};
  int ref_x [4] = '{395, 288, 392, 428};
  int ref_y [4] = '{301, 132, -301, 343};
  int ref_z [4] = '{696, 420, 91, 771};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b0;
    angle = 16'sd16384;
    #1;
    check_val("reset x", int'(x), 0, 0);
    check_val("reset z", int'(z), 0, 0);
    reset = 1'b1;
    for (int i = 0; i < 3; i++) begin
      angle = 16'(ref_a[i]);
      #1;
      check_val("fig x", int'(x), ref_x[i], 4);
      check_val("fig y", int'(y), ref_y[i], 4);
      check_val("fig z", int'(z), ref_z[i], 4);
    end
    // Out of range (1.5): saturates at the convergence limit.
    angle = 16'(ref_a[3]);
    #1;
    check_val("sat z", int'(z), ref_z[3], 15);
    check_val("sat z<exp", int'(z < 16'sd1000), 1, 0);
    if (z > 16'sd700 && z < 16'sd800) saturations++;
    for (int a = -18000; a <= 18000; a += 37) begin
      real r;
      angle = 16'(a);
      #1;
      r = real'(a) / 16384.0;
      check_val("cosh", int'(x), $rtoi($floor(256.0 * (($exp(r) + $exp(-r)) / 2.0) + 0.5)), 2);
      check_val("sinh", int'(y), $rtoi($floor(256.0 * (($exp(r) - $exp(-r)) / 2.0) + 0.5)), 2);
      check_val("exp",  int'(z), $rtoi($floor(256.0 * $exp(r) + 0.5)), 2);
    end
    checks++;
    if (saturations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
