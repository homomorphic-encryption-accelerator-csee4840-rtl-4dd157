// tb_weighted_inner_prod: the weighted inner product unit with 4-element ciphertexts.
// Each job sends c1, c2, w and the row count, then the rows of a random
// key-switching matrix M in 16-entry chunks (with idle gaps), and compares
// every result with M round(vec(c1e c2e^T) / w) computed here in 64-bit
// arithmetic, where c1e, c2e are c1, c2 themselves. It checks the row numbers, that
// results come one every 1 cycle(s), done on the last, and how many cycles
// pass from the last chunk to the first result.
module tb_weighted_inner_prod;
  import he_pkg::*;
  localparam int N = 4, EXT = 0, NE = N + EXT, L = NE * NE;
  localparam int CH = (L + 15) / 16;
  logic clk = 0, reset = 1, chipselect = 0, write = 0, c_valid, done, busy;
  elem_t w = 0, c;
  elem_t [N-1:0] c1 = '0, c2 = '0;
  logic [8:0] length = 0, c_row;
  row_t W_row = '0;
  int checks = 0, failures = 0;
  int cyc = 0;

  weighted_inner_prod dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  function automatic int nint(longint a, int d);
    longint ua, ud, q;
    ua = (a < 0) ? -a : a;
    ud = (d < 0) ? -d : d;
    q  = (2 * ua + ud) / (2 * ud);
    return ((a < 0) != (d < 0)) ? -int'(q) : int'(q);
  endfunction

  task automatic job(int m, int wv, int cmax, int mmax);
    int a [NE], b [NE], cp [CH * 16], exp [$];
    int mm [$];
    int last_chunk_cyc, first_res_cyc, prev_cyc, got;
    @(negedge clk);
    w = wv;
    for (int i = 0; i < N; i++) begin
      c1[i] = int'($urandom_range(0, 2 * cmax)) - cmax;
      c2[i] = int'($urandom_range(0, 2 * cmax)) - cmax;
      a[i + EXT] = c1[i];
      b[i + EXT] = c2[i];
    end
    if (EXT != 0) begin
      a[0] = wv;
      b[0] = wv;
    end
    for (int v = 0; v < CH * 16; v++)
      cp[v] = (v < L) ? nint(longint'(a[v % NE]) * longint'(b[v / NE]), wv) : 0;
    length = 9'(m);
    chipselect = 1; write = 1;
    @(negedge clk);
    c1 = '0; c2 = '0; w = 0;        // latched on the first write
    for (int r = 0; r < m; r++) begin
      int s;
      s = 0;
      for (int k = 0; k < CH; k++) begin
        while ($urandom_range(0, 4) == 0) begin   // idle cycle
          chipselect = 0; write = 0;
          @(negedge clk);
        end
        chipselect = 1; write = 1;
        for (int l = 0; l < 16; l++) begin
          W_row[l] = (k * 16 + l < L) ? int'($urandom_range(0, 2 * mmax)) - mmax : 0;
          s += W_row[l] * cp[k * 16 + l];
        end
        last_chunk_cyc = cyc;
        @(negedge clk);
      end
      exp.push_back(s);
    end
    chipselect = 0; write = 0;
    ok(busy, "busy while computing");
    got = 0;
    first_res_cyc = -1;
    prev_cyc = 0;
    while (got < m && cyc < last_chunk_cyc + m * CH + 4 * L + 64) begin
      @(negedge clk);
      if (c_valid) begin
        if (first_res_cyc < 0) first_res_cyc = cyc;
        else ok(cyc - prev_cyc == CH, "one result every CH cycles");
        prev_cyc = cyc;
        ok(c == exp[got], $sformatf("row %0d: %0d expected %0d", got, c, exp[got]));
        ok(c_row == 9'(got), "row number");
        ok(done == (got == m - 1), "done with the last result");
        got++;
      end
    end
    ok(got == m, $sformatf("%0d of %0d results", got, m));
    ok(first_res_cyc - last_chunk_cyc == NE + 2 * CH + 5,
       $sformatf("first result %0d cycles after the last chunk", first_res_cyc - last_chunk_cyc));
    @(negedge clk);
    ok(!busy, "idle after the job");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    job(1, 1 << 16, 1 << 18, 100);
    job(5, 3, 100, 1000);
    job(256, 1 << 12, 1 << 20, 1000);
    for (int t = 0; t < 6; t++)
      job($urandom_range(1, 20), int'($urandom_range(1, 1 << 14)) * (t % 2 == 0 ? 1 : -1),
          1 << 20, 1 << 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
