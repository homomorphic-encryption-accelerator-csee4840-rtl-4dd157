// tb_vectorize: feeds random matrices row by row to three instances, a 4x4 one
// emitting one 16-entry chunk (the weighted inner product case), a 3x5 one
// emitting 4-entry chunks with zero padding, and a 16x16 one given n x n
// matrices of random n = 1..16 with unused columns zero (the client's vec of
// S^T H S), whose output must be vec() of the n x n matrix then zeros. Monitors compare every chunk with
// vec() (columns stacked) computed here, and check the chunk index, the last
// flag and that the first chunk follows the last row by one cycle.
module tb_vectorize;
  localparam int W = 64;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic in_valid_a = 0, out_valid_a, out_last_a;
  logic [3:0][W-1:0] in_row_a = '0;
  logic [15:0][W-1:0] out_chunk_a;
  logic [0:0] out_idx_a;
  vectorize #(.ROWS(4), .COLS(4), .OUT_LANES(16), .W(W)) dut_a (
    .clk, .reset, .rows(3'd4), .in_valid(in_valid_a), .in_row(in_row_a), .out_valid(out_valid_a),
    .out_chunk(out_chunk_a), .out_idx(out_idx_a), .out_last(out_last_a));

  logic in_valid_b = 0, out_valid_b, out_last_b;
  logic [4:0][W-1:0] in_row_b = '0;
  logic [3:0][W-1:0] out_chunk_b;
  logic [1:0] out_idx_b;
  vectorize #(.ROWS(3), .COLS(5), .OUT_LANES(4), .W(W)) dut_b (
    .clk, .reset, .rows(2'd3), .in_valid(in_valid_b), .in_row(in_row_b), .out_valid(out_valid_b),
    .out_chunk(out_chunk_b), .out_idx(out_idx_b), .out_last(out_last_b));

  logic in_valid_c = 0, out_valid_c, out_last_c;
  logic [4:0] rows_c = 0;
  logic [15:0][31:0] in_row_c = '0, out_chunk_c;
  logic [3:0] out_idx_c;
  vectorize #(.ROWS(16), .COLS(16), .OUT_LANES(16), .W(32)) dut_c (
    .clk, .reset, .rows(rows_c), .in_valid(in_valid_c), .in_row(in_row_c),
    .out_valid(out_valid_c), .out_chunk(out_chunk_c), .out_idx(out_idx_c),
    .out_last(out_last_c));
  logic [31:0] exp_c [$];
  int first_c [$];
  int k_c = 0, n_c = 0;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!reset && out_valid_c) begin
      ok(out_idx_c == 4'(k_c) && out_last_c == (k_c == 15), "C index/last");
      if (k_c == 0) ok(first_c.pop_front() == cyc, "C first-chunk timing");
      for (int l = 0; l < 16; l++) ok(out_chunk_c[l] == exp_c.pop_front(), "C entry");
      k_c = (k_c == 15) ? 0 : k_c + 1;
    end
  end

  initial begin
    logic [31:0] mc [16][16];
    repeat (2) @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      int n;
      n = (t < 16) ? t + 1 : $urandom_range(1, 16);
      rows_c = 5'(n);
      for (int r = 0; r < n; r++) begin
        @(negedge clk);
        in_valid_c = 1; in_row_c = '0;
        for (int c = 0; c < n; c++) begin
          mc[r][c] = $urandom;
          in_row_c[c] = mc[r][c];
        end
        if (r == n - 1) first_c.push_back(cyc + 2);
      end
      for (int v = 0; v < 256; v++) exp_c.push_back((v < n * n) ? mc[v % n][v / n] : '0);
      @(negedge clk);
      in_valid_c = 0;
      repeat (17) @(negedge clk);
      n_c++;
    end
  end

  // expected outputs: entry stream in vec order, with the cycle of the first chunk
  logic [W-1:0] exp_a [$], exp_b [$];
  int first_a [$], first_b [$];
  int k_a = 0, k_b = 0;

  task automatic ok(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!reset && out_valid_a) begin
      ok(out_idx_a == 0 && out_last_a, "A index/last");
      if (k_a == 0) ok(first_a.pop_front() == cyc, "A first-chunk timing");
      for (int l = 0; l < 16; l++) ok(out_chunk_a[l] == exp_a.pop_front(), "A entry");
    end
    if (!reset && out_valid_b) begin
      ok(out_idx_b == 2'(k_b) && out_last_b == (k_b == 3), "B index/last");
      if (k_b == 0) ok(first_b.pop_front() == cyc, "B first-chunk timing");
      for (int l = 0; l < 4; l++) ok(out_chunk_b[l] == exp_b.pop_front(), "B entry");
      k_b = (k_b == 3) ? 0 : k_b + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ma [4][4];
    logic [W-1:0] mb [3][5];
    repeat (2) @(negedge clk);
    reset = 0;
    for (int t = 0; t < 30; t++) begin
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        in_valid_a = 1;
        for (int c = 0; c < 4; c++) begin
          ma[r][c] = {$urandom, $urandom};
          in_row_a[c] = ma[r][c];
        end
        in_valid_b = (r < 3);
        if (r < 3)
          for (int c = 0; c < 5; c++) begin
            mb[r][c] = {$urandom, $urandom};
            in_row_b[c] = mb[r][c];
          end
        if (r == 2) first_b.push_back(cyc + 2);
        if (r == 3) first_a.push_back(cyc + 2);
      end
      for (int v = 0; v < 16; v++) exp_a.push_back(ma[v % 4][v / 4]);
      for (int v = 0; v < 16; v++) exp_b.push_back((v < 15) ? mb[v % 3][v / 3] : '0);
      @(negedge clk);
      in_valid_a = 0; in_valid_b = 0;
      repeat (4) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    while (n_c < 40) @(negedge clk);
    repeat (3) @(negedge clk);
    ok(exp_a.size() == 0 && exp_b.size() == 0 && exp_c.size() == 0, "all chunks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
