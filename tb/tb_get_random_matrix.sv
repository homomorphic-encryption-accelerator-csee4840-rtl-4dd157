// tb_get_random_matrix: generates matrices of several sizes and checks that
// exactly length*width samples come out on consecutive cycles, within the
// range of the sum of four 4-bit uniforms less its mean (-30..30), with done on
// the last. Over a full 256x16 matrix it checks that the sample mean is near 0,
// the variance near 4*(16^2-1)/12 = 85 and the samples are not all alike, and
// that two generated matrices differ.
module tb_get_random_matrix;
  import he_pkg::*;
  logic clk = 0, reset = 1, chipselect = 0, gen = 0, out_valid, done;
  logic [8:0] length = 0;
  logic [4:0] width = 0;
  elem_t S_star_ij;
  int checks = 0, failures = 0;

  get_random_matrix dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ok(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int m, int n, output int samples [$]);
    int wait_cycles;
    samples = {};
    @(negedge clk);
    chipselect = 1; gen = 1; length = 9'(m); width = 5'(n);
    @(negedge clk);
    chipselect = 0; gen = 0;
    wait_cycles = 0;
    while (!out_valid && wait_cycles < m * n + 10) begin
      @(negedge clk);
      wait_cycles++;
    end
    ok(wait_cycles == m * n + 2, $sformatf("first sample after %0d cycles", wait_cycles));
    for (int i = 0; i < m * n; i++) begin
      ok(out_valid, "sample valid on consecutive cycles");
      ok(done == (i == m * n - 1), "done with the last sample");
      ok(S_star_ij >= -30 && S_star_ij <= 30, $sformatf("sample %0d in range", S_star_ij));
      samples.push_back(S_star_ij);
      @(negedge clk);
    end
    ok(!out_valid, "no extra sample");
  endtask

  initial begin
    int s1 [$], s2 [$];
    real mean, var_s;
    int same;
    repeat (2) @(negedge clk);
    reset = 0;
    run(2, 3, s1);
    run(1, 1, s1);
    run(256, 16, s1);
    mean = 0;
    foreach (s1[i]) mean += s1[i];
    mean /= s1.size();
    var_s = 0;
    foreach (s1[i]) var_s += (s1[i] - mean) * (s1[i] - mean);
    var_s /= s1.size();
    ok(mean > -1.0 && mean < 1.0, $sformatf("mean %f near 0", mean));
    ok(var_s > 70.0 && var_s < 100.0, $sformatf("variance %f near 85", var_s));
    run(256, 16, s2);
    same = 0;
    foreach (s1[i]) if (s1[i] == s2[i]) same++;
    ok(same < 1000, $sformatf("%0d of 4096 samples repeat", same));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
