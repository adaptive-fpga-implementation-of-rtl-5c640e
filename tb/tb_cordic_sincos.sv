// tb_cordic_sincos: checks the circular CORDIC against real-valued cos/sin
// (within 1 LSB) over a sweep of angles, against the reference waveform values
// of the published simulation (within 2 LSB), and checks that reset clears
// the outputs.
module tb_cordic_sincos;
  localparam real PI = 3.14159265358979323846;
  logic signed [15:0] angle, x, y;
  logic reset;
  int checks = 0, failures = 0;

  cordic_sincos dut (.angle(angle), .reset(reset), .x(x), .y(y));

  task automatic check_val(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: angle=%0d got %0d expected %0d", what, angle, got, exp);
    end
  endtask

  // Degrees and expected x, y from the reference waveform.
  int ref_deg [7] = '{0, 30, 45, 60, 90, 135, 180};
  int ref_x   [7] = '{127, 110, 90, 64, 0, -91, -128};
  int ref_y   [7] = '{0, 64, 90, 110, 127, 90, 0};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    angle = 16'sd3840;
    #1;
    check_val("reset x", int'(x), 0, 0);
    check_val("reset y", int'(y), 0, 0);
    reset = 1'b0;
    for (int i = 0; i < 7; i++) begin
      angle = 16'(ref_deg[i] * 128);
      #1;
      check_val("fig x", int'(x), ref_x[i], 2);
      check_val("fig y", int'(y), ref_y[i], 2);
    end
    for (int a = -32768; a < 32768; a += 97) begin
      real r;
      angle = 16'(a);
      #1;
      r = real'(a) / 128.0 * PI / 180.0;
      check_val("cos", int'(x), $rtoi($floor(127.0 * $cos(r) + 0.5)), 1);
      check_val("sin", int'(y), $rtoi($floor(127.0 * $sin(r) + 0.5)), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
