// tb_fft_r2sdf: drives the pipelined FFT at its default size (up to 1024
// points) with random frames of 64, 256 and 1024 points, forward and inverse,
// back to back and with input bubbles, and compares every bin with a
// direct DFT computed here in floating point. Also checks the bin numbering
// (out_index is the bit reverse of the output position), the latency
// (N - 2 + log2(N) clock edges from the edge taking in_sync to the edge
// registering out_sync) for continuous streaming, and that the length
// switch, inverse mode and stall (bubble) paths all were exercised.
module tb_fft_r2sdf;
  localparam int LMAX = 10;
  localparam int NMAX = 1 << LMAX;
  localparam int NF   = 6;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 0, rst_n = 1;   // driven low at 1 ns: an edge for the asynchronous reset
  logic inverse = 0, in_valid = 0, in_sync = 0;
  logic [3:0] log2n = 4'd6;
  logic signed [7:0] in_re = 0, in_im = 0;
  logic out_valid, out_sync;
  logic signed [18:0] out_re, out_im;
  logic [9:0] out_index;

  fft_r2sdf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_switch = 0, n_inverse = 0, n_bubble = 0;

  // frame description
  int f_len [NF] = '{6, 6, 6, 10, 8, 8};
  bit f_inv [NF] = '{0, 0, 1, 0, 1, 0};
  bit f_bub [NF] = '{0, 0, 0, 0, 0, 1};
  int x_re [NF][NMAX];
  int x_im [NF][NMAX];
  longint sync_cyc [NF];
  longint cyc = 0;
  int sf = 0;

  always @(posedge clk) begin
    cyc = cyc + 1;
    if (in_valid && in_sync && sf < NF) begin
      sync_cyc[sf] = cyc;
      sf++;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitor ----------------
  int mf = 0, mpos = 0;
  longint cyc_now;
  bit capturing = 0;
  int got_re [NMAX], got_im [NMAX];

  task automatic check_frame(input int f);
    int n;
    real tol;
    n = 1 << f_len[f];
    tol = 4.0 + $sqrt(real'(n));  // rounding noise of log2(N) rounded stages
    for (int k = 0; k < n; k++) begin
      real sr, si, a, sg;
      sr = 0.0; si = 0.0;
      sg = f_inv[f] ? 1.0 : -1.0;
      for (int t = 0; t < n; t++) begin
        a = sg * 2.0 * PI * real'((k * t) % n) / real'(n);
        sr += real'(x_re[f][t]) * $cos(a) - real'(x_im[f][t]) * $sin(a);
        si += real'(x_re[f][t]) * $sin(a) + real'(x_im[f][t]) * $cos(a);
      end
      checks++;
      if ((real'(got_re[k]) - sr) > tol || (sr - real'(got_re[k])) > tol ||
          (real'(got_im[k]) - si) > tol || (si - real'(got_im[k])) > tol) begin
        failures++;
        if (failures < 10)
          $display("FAIL frame %0d bin %0d: got (%0d,%0d) expected (%f,%f)", f, k,
                   got_re[k], got_im[k], sr, si);
      end
    end
  endtask

  always @(posedge clk) begin
    if (out_valid && mf < NF) begin
      if (out_sync) begin
        cyc_now = cyc;
        capturing = 1;
        mpos = 0;
        if (!f_bub[mf]) begin
          checks++;
          if (cyc_now - sync_cyc[mf] != longint'((1 << f_len[mf]) - 2 + f_len[mf])) begin
            failures++;
            $display("FAIL latency frame %0d: %0d cycles", mf, cyc_now - sync_cyc[mf]);
          end
        end
      end
      if (capturing) begin
        int exp_idx;
        exp_idx = 0;
        for (int b = 0; b < f_len[mf]; b++) if (mpos & (1 << b)) exp_idx |= 1 << (f_len[mf] - 1 - b);
        checks++;
        if (int'(out_index) != exp_idx) begin
          failures++;
          $display("FAIL index frame %0d pos %0d: %0d", mf, mpos, out_index);
        end
        got_re[out_index] = int'(out_re);
        got_im[out_index] = int'(out_im);
        mpos++;
        if (mpos == (1 << f_len[mf])) begin
          check_frame(mf);
          capturing = 0;
          mf++;
        end
      end
    end
  end

  // ---------------- driver ----------------
  task automatic send(input bit v, input bit s, input int re, input int im);
    in_valid <= v;
    in_sync  <= s;
    in_re    <= 8'(re);
    in_im    <= 8'(im);
    @(posedge clk);
  endtask

  initial begin
    for (int f = 0; f < NF; f++)
      for (int t = 0; t < NMAX; t++) begin
        x_re[f][t] = int'($urandom_range(0, 255)) - 128;
        x_im[f][t] = int'($urandom_range(0, 255)) - 128;
      end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      int n;
      n = 1 << f_len[f];
      if (f > 0 && f_len[f] != f_len[f-1]) begin
        // drain the previous frame before switching length
        for (int t = 0; t < (1 << f_len[f-1]); t++) send(1, 0, 0, 0);
        n_switch++;
      end
      inverse <= f_inv[f];
      log2n   <= 4'(f_len[f]);
      if (f_inv[f]) n_inverse++;
      for (int t = 0; t < n; t++) begin
        if (f_bub[f] && ($urandom_range(0, 3) == 0)) begin
          send(0, 0, 0, 0);
          n_bubble++;
        end
        send(1, t == 0, x_re[f][t], x_im[f][t]);
      end
    end
    for (int t = 0; t < NMAX + 20; t++) send(1, 0, 0, 0);
    send(0, 0, 0, 0);
    repeat (20) @(posedge clk);
    checks++;
    if (mf != NF) begin
      failures++;
      $display("FAIL only %0d frames came out", mf);
    end
    checks++;
    if (n_switch == 0 || n_inverse == 0 || n_bubble == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: switch=%0d inverse=%0d bubble=%0d",
               n_switch, n_inverse, n_bubble);
    end
    $display("length switches=%0d inverse frames=%0d bubbles=%0d", n_switch, n_inverse, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
