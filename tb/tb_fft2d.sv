// tb_fft2d: 2-D FFT of random 8 x 16 frames (rows and columns of different
// length, so the core's length switch is used in every frame), one forward
// and one inverse (scaled by 1/(NR*NC)), compared bin by bin with a direct 2-D DFT in floating
// point. Also checks the output order and the end-of-frame marker.
module tb_fft2d;
  localparam int LR = 3, LC = 4;
  localparam int NR = 1 << LR, NC = 1 << LC;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 1;
  logic inverse = 0, in_ready, in_valid = 0;
  logic signed [7:0] in_re = 0, in_im = 0;
  logic out_valid, out_last;
  logic [LR-1:0] out_row;
  logic [LC-1:0] out_col;
  logic signed [8+LC+1+LC:0] out_re, out_im;

  fft2d #(.LOG2R(LR), .LOG2C(LC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NR][NC], xi [NR][NC];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input bit inv);
    int pos;
    real tol;
    tol = inv ? 1.5 : 4.0 + $sqrt(real'(NR * NC));
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        xr[r][c] = int'($urandom_range(0, 255)) - 128;
        xi[r][c] = int'($urandom_range(0, 255)) - 128;
      end
    while (!in_ready) @(posedge clk);
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        in_valid <= 1;
        inverse  <= inv;
        in_re    <= 8'(xr[r][c]);
        in_im    <= 8'(xi[r][c]);
        @(posedge clk);
      end
    in_valid <= 0;
    pos = 0;
    while (pos < NR * NC) begin
      @(posedge clk);
      if (out_valid) begin
        real sr, si, a, sg;
        sg = inv ? 1.0 : -1.0;
        sr = 0; si = 0;
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < NC; c++) begin
            a = sg * 2.0 * PI * (real'(int'(out_row) * r) / NR + real'(int'(out_col) * c) / NC);
            sr += xr[r][c] * $cos(a) - xi[r][c] * $sin(a);
            si += xr[r][c] * $sin(a) + xi[r][c] * $cos(a);
          end
        checks++;
        if (int'(out_row) * NC + int'(out_col) != pos || out_last != (pos == NR * NC - 1)) begin
          failures++;
          $display("FAIL order at %0d: row %0d col %0d", pos, out_row, out_col);
        end
        if (inv) begin             // the inverse includes 1/(NR*NC)
          sr = sr / (NR * NC);
          si = si / (NR * NC);
        end
        checks++;
        if (out_re - sr > tol || sr - out_re > tol || out_im - si > tol || si - out_im > tol) begin
          failures++;
          if (failures < 10)
            $display("FAIL bin (%0d,%0d): got (%0d,%0d) expected (%f,%f)",
                     out_row, out_col, out_re, out_im, sr, si);
        end
        pos++;
      end
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_frame(0);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
