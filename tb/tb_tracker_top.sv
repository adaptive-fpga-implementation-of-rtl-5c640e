// tb_tracker_top: end-to-end test of the tracker at its default sizes
// (64-sample kernel search, 64 x 64 2-D FFT, 640 x 480 display).
//
// Tracking: template/patch pairs whose patch is the template cyclically
// shifted by a known amount (right, left, and past both screen edges) go
// through the kernel classifier; each step must report that shift and move
// pos_x accordingly, clamping at 0 and 639. Display: over a full frame the
// cursor cross-hair must appear in the cursor colour at the tracked column
// and on cursor_y, with the video colour everywhere else. The sine/cosine
// CORDIC (both folded and unfolded angles) and one forward and one inverse
// 64 x 64 2-D FFT are checked against floating-point references.
// Each mechanism is counted and a failure is counted for one that never
// happened: right/left moves, both clamps, the exponential's range reduction
// and its saturation to zero, cursor pixels, 180-degree fold, inverse FFT.
module tb_tracker_top;
  localparam int N = 64;
  localparam int L2 = 6;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 1;
  logic [15:0] inv_sigma2 = 16'd400;
  logic feat_ready, feat_valid = 0;
  logic signed [7:0] feat_x = 0, feat_z = 0;
  logic pos_load = 0;
  logic [9:0] pos_init = 0, pos_x;
  logic track_valid;
  logic signed [6:0] track_shift;
  logic [15:0] track_score;
  logic [9:0] vga_red, vga_green, vga_blue;
  logic [9:0] cursor_r = 10'h3ff, cursor_g = 10'h001, cursor_b = 10'h200;
  logic [3:0] cursor_rgb_en = 4'b1111;
  logic [9:0] cursor_y = 10'd240;
  logic [19:0] vga_address;
  logic [9:0] vga_coord_x, vga_coord_y, vga_r, vga_g, vga_b;
  logic vga_blank, vga_clock, vga_hsync, vga_sync, vga_vsync;
  logic signed [15:0] cs_angle = 0, cs_cos, cs_sin;
  logic cs_reset = 0;
  logic f2_inverse = 0, f2_in_ready, f2_in_valid = 0;
  logic signed [7:0] f2_in_re = 0, f2_in_im = 0;
  logic f2_out_valid, f2_out_last;
  logic [5:0] f2_out_row, f2_out_col;
  logic signed [21:0] f2_out_re, f2_out_im;

  tracker_top dut (.*);

  always #20 clk = ~clk;

  assign vga_red   = vga_coord_x;
  assign vga_green = vga_coord_y;
  assign vga_blue  = 10'h0f0;

  int checks = 0, failures = 0;
  int n_right = 0, n_left = 0, n_clamp_lo = 0, n_clamp_hi = 0;
  int n_reduced = 0, n_zero = 0, n_cursor = 0, n_fold = 0, n_inv = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kernel values seen inside the design (exponential paths)
  always @(posedge clk)
    if (dut.k_valid) begin
      if (dut.k_value == 0) n_zero++;
      else if (dut.k_value < 16'd8192) n_reduced++;
    end

  // ---------------- tracking ----------------
  task automatic track_step(input int shift);
    int x [N], z [N];
    int exp_pos;
    exp_pos = int'(pos_x) + shift;
    if (exp_pos < 0) begin
      exp_pos = 0;
      n_clamp_lo++;
    end
    if (exp_pos > 639) begin
      exp_pos = 639;
      n_clamp_hi++;
    end
    for (int m = 0; m < N; m++) x[m] = int'($urandom_range(0, 120)) - 60;
    for (int m = 0; m < N; m++) z[(m + shift + N) % N] = x[m] + int'($urandom_range(0, 2)) - 1;
    while (!feat_ready) @(posedge clk);
    for (int m = 0; m < N; m++) begin
      feat_valid <= 1;
      feat_x <= 8'(x[m]);
      feat_z <= 8'(z[m]);
      @(posedge clk);
    end
    feat_valid <= 0;
    while (!track_valid) @(posedge clk);
    chk(int'(track_shift) == shift, $sformatf("shift %0d reported %0d", shift, track_shift));
    @(posedge clk);
    chk(int'(pos_x) == exp_pos, $sformatf("position %0d expected %0d", pos_x, exp_pos));
    if (shift > 0) n_right++;
    if (shift < 0) n_left++;
  endtask

  task automatic load_pos(input int p);
    pos_init <= 10'(p);
    pos_load <= 1;
    @(posedge clk);
    pos_load <= 0;
    @(posedge clk);
  endtask

  // ---------------- display ----------------
  bit check_video = 0;
  logic [9:0] cx_d, cy_d;
  // colour outputs are registered: they belong to the previous clock's coordinates
  always @(posedge clk) begin
    if (check_video && vga_blank) begin
      bit cur;
      cur = (cx_d == pos_x) || (cy_d == cursor_y);
      if (cur) begin
        chk(vga_r == cursor_r && vga_g == cursor_g && vga_b == cursor_b, "cursor colour");
        n_cursor++;
      end else
        chk(vga_r == cx_d && vga_g == cy_d && vga_b == 10'h0f0, "video colour");
    end
    cx_d = vga_coord_x;
    cy_d = vga_coord_y;
  end

  // ---------------- 2-D FFT ----------------
  task automatic fft2d_frame(input bit inv);
    int xr [64][64], xi [64][64];
    real tr [64][64], ti [64][64];
    real sg, tol;
    int pos;
    sg = inv ? 1.0 : -1.0;
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 64; c++) begin
        xr[r][c] = int'($urandom_range(0, 255)) - 128;
        xi[r][c] = int'($urandom_range(0, 255)) - 128;
      end
    // reference: rows then columns
    for (int r = 0; r < 64; r++)
      for (int l = 0; l < 64; l++) begin
        real a;
        tr[r][l] = 0; ti[r][l] = 0;
        for (int c = 0; c < 64; c++) begin
          a = sg * 2.0 * PI * real'((l * c) % 64) / 64.0;
          tr[r][l] += xr[r][c] * $cos(a) - xi[r][c] * $sin(a);
          ti[r][l] += xr[r][c] * $sin(a) + xi[r][c] * $cos(a);
        end
      end
    while (!f2_in_ready) @(posedge clk);
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 64; c++) begin
        f2_in_valid <= 1;
        f2_inverse  <= inv;
        f2_in_re    <= 8'(xr[r][c]);
        f2_in_im    <= 8'(xi[r][c]);
        @(posedge clk);
      end
    f2_in_valid <= 0;
    pos = 0;
    while (pos < 4096) begin
      @(posedge clk);
      if (f2_out_valid) begin
        real sr, si, a;
        int k, l;
        k = int'(f2_out_row);
        l = int'(f2_out_col);
        sr = 0; si = 0;
        for (int r = 0; r < 64; r++) begin
          a = sg * 2.0 * PI * real'((k * r) % 64) / 64.0;
          sr += tr[r][l] * $cos(a) - ti[r][l] * $sin(a);
          si += tr[r][l] * $sin(a) + ti[r][l] * $cos(a);
        end
        if (inv) begin             // inverse includes 1/(64*64)
          sr = sr / 4096.0;
          si = si / 4096.0;
        end
        tol = inv ? 1.5 : 68.0;
        chk(k * 64 + l == pos, "2-D FFT order");
        chk(f2_out_re - sr < tol && sr - f2_out_re < tol &&
            f2_out_im - si < tol && si - f2_out_im < tol,
            $sformatf("2-D FFT bin (%0d,%0d): (%0d,%0d) vs (%f,%f)", k, l, f2_out_re, f2_out_im, sr, si));
        pos++;
      end
    end
    if (inv) n_inv++;
  endtask

  // ---------------- sine/cosine ----------------
  task automatic sincos_check();
    int degs [6] = '{0, 30, 100, 179, -135, -60};
    for (int i = 0; i < 6; i++) begin
      real r;
      cs_angle = 16'(degs[i] * 128);
      #1;
      r = degs[i] * PI / 180.0;
      chk(cs_cos - 127.0 * $cos(r) < 1.6 && 127.0 * $cos(r) - cs_cos < 1.6 &&
          cs_sin - 127.0 * $sin(r) < 1.6 && 127.0 * $sin(r) - cs_sin < 1.6,
          $sformatf("sincos %0d deg: %0d %0d", degs[i], cs_cos, cs_sin));
      if (degs[i] > 90 || degs[i] < -90) n_fold++;
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    sincos_check();
    load_pos(300);
    track_step(5);
    track_step(-7);
    inv_sigma2 <= 16'd60000;   // narrow kernel: most lags saturate to zero
    track_step(12);
    inv_sigma2 <= 16'd400;
    load_pos(3);
    track_step(-10);
    load_pos(636);
    track_step(9);
    load_pos(320);
    track_step(31);
    fft2d_frame(0);
    fft2d_frame(1);
    // one full video frame with the cursor at the tracked column
    check_video = 1;
    repeat (420000) @(posedge clk);
    check_video = 0;
    chk(n_right > 0 && n_left > 0, "moves in both directions");
    chk(n_clamp_lo > 0 && n_clamp_hi > 0, "both clamps");
    chk(n_reduced > 0 && n_zero > 0, "exponential range reduction and saturation");
    chk(n_cursor == 640 + 480 - 1, $sformatf("cursor pixels %0d", n_cursor));
    chk(n_fold > 0 && n_inv > 0, "CORDIC fold and inverse 2-D FFT");
    $display("moves right=%0d left=%0d clamps lo=%0d hi=%0d exp reduced=%0d zero=%0d cursor=%0d fold=%0d inverse=%0d",
             n_right, n_left, n_clamp_lo, n_clamp_hi, n_reduced, n_zero, n_cursor, n_fold, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
