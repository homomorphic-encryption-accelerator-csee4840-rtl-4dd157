// tb_bit_repr_vector: the key-switching example (c = [1, -2], l = 3 gives
// c* = [0,0,1, 0,-1,0], most significant digit first) and random vectors of
// random length and l. Checks every digit against the bits of |c_i| with the
// sign of c_i, that the n*l digits come on consecutive cycles starting three
// cycles after the last element is written, output_length, and done.
module tb_bit_repr_vector;
  import he_pkg::*;
  logic clk = 0, reset = 1, chipselect = 0, write = 0, out_valid, done;
  logic [8:0] width = 0;
  logic [5:0] ell = 0;
  elem_t c_i = 0, c_star_i;
  logic [14:0] output_length;
  int checks = 0, failures = 0;

  bit_repr_vector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic run(int n, int l, int vals [$]);
    int exp [$];
    for (int i = 0; i < n; i++) begin
      int mag;
      mag = (vals[i] < 0) ? -vals[i] : vals[i];
      for (int k = l - 1; k >= 0; k--)
        exp.push_back(((mag >> k) & 1) == 0 ? 0 : ((vals[i] < 0) ? -1 : 1));
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      chipselect = 1; write = 1; width = 9'(n); ell = 6'(l); c_i = vals[i];
    end
    @(negedge clk);
    chipselect = 0; write = 0;
    ok(!out_valid, "no output in the priming cycles");
    @(negedge clk);
    ok(!out_valid, "no output in the priming cycles");
    for (int d = 0; d < n * l; d++) begin
      @(negedge clk);
      ok(out_valid, "digit valid on consecutive cycles");
      ok(c_star_i == exp[d], $sformatf("digit %0d = %0d expected %0d", d, c_star_i, exp[d]));
      ok(done == 0, "done not early");
      if (d == 0) ok(output_length == 15'(n * l), "output_length");
    end
    @(negedge clk);
    ok(!out_valid && done, "done after last digit");
  endtask

  initial begin
    int vals [$];
    repeat (2) @(negedge clk);
    reset = 0;
    vals = '{1, -2};
    run(2, 3, vals);
    for (int t = 0; t < 30; t++) begin
      int n, l;
      n = $urandom_range(1, (t == 0) ? 256 : 40);
      l = (t < 3) ? 1 : $urandom_range(1, 31);
      vals = {};
      for (int i = 0; i < n; i++)
        vals.push_back(int'($urandom_range(0, (1 << l) - 1)) * (($urandom_range(0, 1) == 1) ? -1 : 1));
      run(n, l, vals);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
