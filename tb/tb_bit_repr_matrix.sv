// tb_bit_repr_matrix: the key-switching example, loaded both entry by entry
// and row by row, (S = [1 2; 3 4], l = 3 gives
// S* = [4 2 1 8 4 2; 12 6 3 16 8 4]) and random keys of random size and l, alternating
// between the two ways of loading.
// Checks every entry of S* row-major against 2^p S_ij computed here, that the
// m*n*l entries come on consecutive cycles after two priming cycles, the output
// sizes, and done.
module tb_bit_repr_matrix;
  import he_pkg::*;
  logic clk = 0, reset = 1, chipselect = 0, write = 0, out_valid, done;
  logic [4:0] width = 0;
  logic [8:0] length = 0, output_length;
  logic [5:0] ell = 0;
  logic [10:0] output_width;
  elem_t S_ij = 0, S_star_ij;
  logic row_write = 0;
  elem_t [15:0] S_row = '0;
  int checks = 0, failures = 0;

  bit_repr_matrix dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic run(int m, int n, int l, int vals [$], int given [$], bit rows = 0);
    int exp [$];
    for (int i = 0; i < m * n; i++)
      for (int p = l - 1; p >= 0; p--) exp.push_back(vals[i] * (1 << p));
    if (given.size() != 0) exp = given;
    if (rows)
      for (int r = 0; r < m; r++) begin        // one row per cycle on S_row
        @(negedge clk);
        chipselect = 1; row_write = 1; width = 5'(n); length = 9'(m); ell = 6'(l);
        S_row = '0;
        for (int j = 0; j < n; j++) S_row[j] = vals[r * n + j];
      end
    else
      for (int i = 0; i < m * n; i++) begin    // one entry per cycle on S_ij
        @(negedge clk);
        chipselect = 1; write = 1; width = 5'(n); length = 9'(m); ell = 6'(l); S_ij = vals[i];
      end
    @(negedge clk);
    chipselect = 0; write = 0; row_write = 0;
    ok(!out_valid, "no output in the priming cycles");
    @(negedge clk);
    ok(!out_valid, "no output in the priming cycles");
    for (int d = 0; d < m * n * l; d++) begin
      @(negedge clk);
      ok(out_valid && !done, "entry valid on consecutive cycles");
      ok(S_star_ij == exp[d], $sformatf("entry %0d = %0d expected %0d", d, S_star_ij, exp[d]));
    end
    ok(output_length == 9'(m) && output_width == 11'(n * l), "output sizes");
    @(negedge clk);
    ok(!out_valid && done, "done after last entry");
  endtask

  initial begin
    int vals [$], given [$];
    repeat (2) @(negedge clk);
    reset = 0;
    vals  = '{1, 2, 3, 4};
    given = '{4, 2, 1, 8, 4, 2, 12, 6, 3, 16, 8, 4};
    run(2, 2, 3, vals, given);
    given = {};
    for (int t = 0; t < 20; t++) begin
      int m, n, l;
      m = (t == 0) ? 256 : $urandom_range(1, 30);
      n = (t == 0) ? 16 : $urandom_range(1, 16);
      l = (t == 0) ? 1 : $urandom_range(1, 12);
      vals = {};
      for (int i = 0; i < m * n; i++) vals.push_back(int'($urandom_range(0, 2000)) - 1000);
      run(m, n, l, vals, given, t % 2 == 1);
    end
    vals  = '{1, 2, 3, 4};
    given = '{4, 2, 1, 8, 4, 2, 12, 6, 3, 16, 8, 4};
    run(2, 2, 3, vals, given, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
