// tb_gauss_kernel: feeds template/patch pairs where the patch is the
// template cyclically shifted by a known amount plus small noise, and
// compares all N kernel values with exp(-(|x|^2+|z|^2-2c[n]) / sigma^2)
// computed here in floating point. Checks that every lag appears once, that
// the largest value sits at the known shift, and that both the
// range-reduced (k < 0.5) and the saturated (k = 0) exponential paths occur.
module tb_gauss_kernel;
  localparam int LOG2N = 6;
  localparam int N = 1 << LOG2N;

  logic clk = 0, rst_n = 1;
  logic [15:0] inv_sigma2 = 0;
  logic in_ready, in_valid = 0;
  logic signed [7:0] in_x = 0, in_z = 0;
  logic k_valid, k_last;
  logic [LOG2N-1:0] k_index;
  logic [15:0] k_value;

  gauss_kernel dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reduced = 0, n_zero = 0;
  int x [N], z [N];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_patch(input int shift, input int isig);
    real kexp [N];
    real nx, nz;
    bit seen [N];
    int got, best, best_n, cnt;
    real tol;
    for (int m = 0; m < N; m++) x[m] = int'($urandom_range(0, 120)) - 60;
    for (int m = 0; m < N; m++) z[(m + shift) % N] = x[m] + int'($urandom_range(0, 4)) - 2;
    nx = 0; nz = 0;
    for (int m = 0; m < N; m++) begin
      nx += x[m] * x[m];
      nz += z[m] * z[m];
    end
    for (int n = 0; n < N; n++) begin
      real c;
      c = 0;
      for (int m = 0; m < N; m++) c += x[m] * z[(m + n) % N];
      kexp[n] = 16384.0 * $exp(-(nx + nz - 2.0 * c) * real'(isig) / (2.0 ** 24));
      seen[n] = 0;
    end
    while (!in_ready) @(posedge clk);
    for (int m = 0; m < N; m++) begin
      in_valid   <= 1;
      in_x       <= 8'(x[m]);
      in_z       <= 8'(z[m]);
      inv_sigma2 <= 16'(isig);
      @(posedge clk);
    end
    in_valid <= 0;
    cnt = 0; best = -1; best_n = -1;
    while (cnt < N) begin
      @(posedge clk);
      if (k_valid) begin
        got = int'(k_value);
        checks++;
        // c[n] is accurate to a few units (fixed-point FFT rounding), so the
        // tolerance is 12 units of d on the argument, plus CORDIC rounding.
        tol = 8.0 + kexp[k_index] * (0.003 + 12.0 * real'(isig) / (2.0 ** 24));
        if (seen[k_index] || real'(got) > kexp[k_index] + tol ||
            real'(got) < kexp[k_index] - tol) begin
          failures++;
          $display("FAIL shift %0d lag %0d: got %0d expected %f", shift, k_index, got, kexp[k_index]);
        end
        seen[k_index] = 1;
        if (got > best) begin
          best = got;
          best_n = int'(k_index);
        end
        if (got == 0) n_zero++;
        else if (got < 8192) n_reduced++;
        cnt++;
        checks++;
        if (k_last != (cnt == N)) begin
          failures++;
          $display("FAIL k_last at %0d", cnt);
        end
      end
    end
    checks++;
    if (best_n != shift) begin
      failures++;
      $display("FAIL peak at %0d, expected %0d", best_n, shift);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run_patch(5, 400);
    run_patch(0, 150);
    run_patch(61, 2000);
    run_patch(33, 60000);
    checks++;
    if (n_reduced == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL exp paths: reduced=%0d zero=%0d", n_reduced, n_zero);
    end
    $display("range-reduced values=%0d saturated to zero=%0d", n_reduced, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
