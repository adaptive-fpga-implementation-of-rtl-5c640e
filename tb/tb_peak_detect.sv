// tb_peak_detect: streams random response maps (some with a repeated
// maximum, one of a single value) and checks the reported index and value
// against a search done here, including the first-of-equals rule and the
// one-clock result latency.
module tb_peak_detect;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_last = 0;
  logic [15:0] in_value = 0;
  logic [5:0] in_index = 0;
  logic peak_valid;
  logic [5:0] peak_index;
  logic [15:0] peak_value;

  peak_detect dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_map(input int len, input bit ties);
    int v [64];
    int bi, bv;
    bv = -1; bi = 0;
    for (int i = 0; i < len; i++) begin
      v[i] = ties ? int'($urandom_range(0, 3)) : int'($urandom_range(0, 65535));
      if (v[i] > bv) begin
        bv = v[i];
        bi = i ^ 6'h2a;   // indices arrive in a scrambled order
      end
    end
    for (int i = 0; i < len; i++) begin
      in_valid <= 1;
      in_last  <= (i == len - 1);
      in_value <= 16'(v[i]);
      in_index <= 6'(i ^ 6'h2a);
      @(posedge clk);
      checks++;
      if (peak_valid) begin
        failures++;
        $display("FAIL early peak_valid");
      end
    end
    in_valid <= 0;
    in_last  <= 0;
    @(posedge clk);
    checks++;
    if (!peak_valid || int'(peak_index) != bi || int'(peak_value) != bv) begin
      failures++;
      $display("FAIL map: got %0d/%0d (valid %0b) expected %0d/%0d", peak_index, peak_value,
               peak_valid, bi, bv);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 20; t++) run_map(64, t % 3 == 0);
    run_map(1, 0);
    run_map(7, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
