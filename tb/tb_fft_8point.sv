// tb_fft_8point: the pipelined FFT built as an 8-point core
// (LOG2N_MAX = LOG2N_MIN = 3), the size of the published synthesis figures.
// Streams 40 random frames back to back, alternating forward and inverse
// every fourth frame, and compares each bin with a direct DFT; also checks
// the bit-reversed bin numbering and the 8 - 1 + 3 = 10 cycle latency.
module tb_fft_8point;
  localparam int L = 3;
  localparam int N = 1 << L;
  localparam int NF = 40;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 1;
  logic inverse = 0, in_valid = 0, in_sync = 0;
  logic [1:0] log2n = 2'd3;
  logic signed [7:0] in_re = 0, in_im = 0;
  logic out_valid, out_sync;
  logic signed [11:0] out_re, out_im;
  logic [2:0] out_index;

  fft_r2sdf #(.LOG2N_MAX(L), .LOG2N_MIN(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NF][N], xi [NF][N];
  bit finv [NF];
  longint cyc = 0, sync_cyc [NF];
  int sf = 0, mf = 0, mpos = 0;
  int gr [N], gi [N];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc = cyc + 1;
    if (in_valid && in_sync && sf < NF) begin
      sync_cyc[sf] = cyc;
      sf++;
    end
    if (out_valid && mf < NF) begin
      if (out_sync) begin
        mpos = 0;
        checks++;
        if (cyc - sync_cyc[mf] != longint'(N - 1 + L)) begin
          failures++;
          $display("FAIL latency %0d", cyc - sync_cyc[mf]);
        end
      end
      checks++;
      if (int'(out_index) != (((mpos & 1) << 2) | (mpos & 2) | ((mpos >> 2) & 1))) begin
        failures++;
        $display("FAIL index %0d at %0d", out_index, mpos);
      end
      gr[out_index] = int'(out_re);
      gi[out_index] = int'(out_im);
      mpos++;
      if (mpos == N) begin
        for (int k = 0; k < N; k++) begin
          real sr, si, a;
          sr = 0; si = 0;
          for (int t = 0; t < N; t++) begin
            a = (finv[mf] ? 1.0 : -1.0) * 2.0 * PI * real'((k * t) % N) / N;
            sr += xr[mf][t] * $cos(a) - xi[mf][t] * $sin(a);
            si += xr[mf][t] * $sin(a) + xi[mf][t] * $cos(a);
          end
          checks++;
          if (gr[k] - sr > 2.5 || sr - gr[k] > 2.5 || gi[k] - si > 2.5 || si - gi[k] > 2.5) begin
            failures++;
            $display("FAIL frame %0d bin %0d: (%0d,%0d) vs (%f,%f)", mf, k, gr[k], gi[k], sr, si);
          end
        end
        mf++;
        mpos = 0;
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      finv[f] = (f % 8) >= 4;
      for (int t = 0; t < N; t++) begin
        xr[f][t] = int'($urandom_range(0, 255)) - 128;
        xi[f][t] = int'($urandom_range(0, 255)) - 128;
      end
    end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NF; f++)
      for (int t = 0; t < N; t++) begin
        in_valid <= 1;
        in_sync  <= (t == 0);
        inverse  <= finv[f];
        in_re    <= 8'(xr[f][t]);
        in_im    <= 8'(xi[f][t]);
        @(posedge clk);
      end
    for (int t = 0; t < 2 * N; t++) begin
      in_valid <= 1;
      in_sync  <= 0;
      in_re    <= 0;
      in_im    <= 0;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (mf != NF) begin
      failures++;
      $display("FAIL %0d frames out", mf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
