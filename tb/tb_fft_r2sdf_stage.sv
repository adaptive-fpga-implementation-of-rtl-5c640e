// tb_fft_r2sdf_stage: one R2SDF stage with D = 8, fed with continuous random
// spans of 2D complex samples in both directions. Each output is compared
// with the expected butterfly result: x[m] + x[m+D] in the second half of a
// span, and (x[m] - x[m+D]) * W_2D^(+/-m) at the start of the following span.
// Also checks out_sync position and the inverse flag carried to out_inverse.
module tb_fft_r2sdf_stage;
  localparam int D = 8;
  localparam int NS = 6;          // spans
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 1;   // driven low at 1 ns: an edge for the asynchronous reset
  logic inverse = 0, in_valid = 0, in_sync = 0;
  logic signed [9:0] in_re = 0, in_im = 0;
  logic out_valid, out_sync, out_inverse;
  logic signed [10:0] out_re, out_im;

  fft_r2sdf_stage #(.W_IN(10), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NS][2*D], xi [NS][2*D];
  bit sinv [NS];
  real er [$], ei [$];
  int  es [$];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // expected output stream
  initial begin
    for (int s = 0; s < NS; s++) begin
      sinv[s] = (s >= 3);
      for (int t = 0; t < 2 * D; t++) begin
        xr[s][t] = int'($urandom_range(0, 511)) - 256;  // one guard bit, as in fft_r2sdf
        xi[s][t] = int'($urandom_range(0, 511)) - 256;
      end
    end
    for (int s = 0; s < NS; s++) begin
      if (s > 0)
        for (int m = 0; m < D; m++) begin
          real a, dr, di, sg;
          sg = sinv[s-1] ? 1.0 : -1.0;
          a  = sg * 2.0 * PI * m / (2.0 * D);
          dr = xr[s-1][m] - xr[s-1][m+D];
          di = xi[s-1][m] - xi[s-1][m+D];
          er.push_back(dr * $cos(a) - di * $sin(a));
          ei.push_back(dr * $sin(a) + di * $cos(a));
          es.push_back(0);
        end
      for (int m = 0; m < D; m++) begin
        er.push_back(real'(xr[s][m] + xr[s][m+D]));
        ei.push_back(real'(xi[s][m] + xi[s][m+D]));
        es.push_back((m == 0 && (s == 0 || s == 3)) ? 1 : 0);
      end
    end
  end

  int nout = 0;
  always @(posedge clk) begin
    if (out_valid && nout < er.size()) begin
      chk(out_re - er[nout] < 1.01 && er[nout] - out_re < 1.01 &&
          out_im - ei[nout] < 1.01 && ei[nout] - out_im < 1.01,
          $sformatf("output %0d: (%0d,%0d) vs (%f,%f)", nout, out_re, out_im, er[nout], ei[nout]));
      chk(int'(out_sync) == es[nout], $sformatf("out_sync at output %0d", nout));
      if (out_sync) chk(out_inverse == (nout > 3 * D), "out_inverse");
      nout++;
    end
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < NS; s++)
      for (int t = 0; t < 2 * D; t++) begin
        in_valid <= 1;
        in_sync  <= (t == 0 && (s == 0 || s == 3));
        inverse  <= sinv[s];
        in_re    <= 10'(xr[s][t]);
        in_im    <= 10'(xi[s][t]);
        @(posedge clk);
        if (t == 5) begin   // a bubble: the stage must hold its state
          in_valid <= 0;
          @(posedge clk);
        end
      end
    for (int t = 0; t < D; t++) begin
      in_valid <= 1;
      in_sync <= 0;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    chk(nout == er.size(), $sformatf("output count %0d", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
