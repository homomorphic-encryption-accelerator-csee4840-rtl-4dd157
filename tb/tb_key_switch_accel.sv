// tb_key_switch_accel: runs the client-side steps of key switching and
// decryption through the accelerator's units. For the worked example
// (S = [1 2; 3 4], c = [1, -2], l = 3) and for random keys (m x 2, l = 8) it
// forms S* and c* with the bit-representation units, multiplies S* c* and S c
// with the matrix multiplier and checks both equal S c computed here (the
// identity the key switch relies on). It also draws a Gaussian matrix, divides
// a vector by w with rounding (the decryption step), vectorizes n x n
// matrices (n = 1..16, the client's vec(S^T H S)), fills rows of all eight
// Dmems of the matrix cache and reads them back, and counts interrupts.
module tb_key_switch_accel;
  import he_pkg::*;
  logic clk = 0, reset = 1;
  logic brv_chipselect = 0, brv_write = 0, brv_out_valid;
  logic [8:0] brv_width = 0;
  logic [5:0] brv_ell = 0;
  elem_t brv_c_i = 0, brv_c_star_i;
  logic [14:0] brv_output_length;
  logic brm_chipselect = 0, brm_write = 0, brm_out_valid;
  logic [4:0] brm_width = 0;
  logic [8:0] brm_length = 0, brm_output_length;
  logic [5:0] brm_ell = 0;
  elem_t brm_S_ij = 0, brm_S_star_ij;
  logic brm_row_write = 0;
  row_t brm_S_row = '0;
  logic [10:0] brm_output_width;
  logic rnd_chipselect = 0, rnd_gen = 0, rnd_out_valid;
  logic [8:0] rnd_length = 0;
  logic [4:0] rnd_width = 0;
  elem_t rnd_S_star_ij;
  logic mm_b_we = 0, mm_a_valid = 0, mm_p_valid;
  logic [3:0] mm_b_row_idx = 0;
  row_t mm_b_row = '0, mm_a_row = '0, mm_p_row;
  logic div_in_valid = 0, div_out_valid;
  prod_t [15:0] div_in_vec = '0;
  elem_t div_w = 1;
  row_t div_out_vec;
  logic [4:0] vz_rows = 0;
  logic vz_in_valid = 0, vz_out_valid, vz_out_last;
  row_t vz_in_row = '0, vz_out_chunk;
  logic [3:0] vz_out_idx;
  logic km_we = 0;
  logic [2:0] km_wbank = 0, km_rbank = 0;
  logic [7:0] km_waddr = 0, km_raddr = 0;
  row_t km_wdata = '0, km_rdata;
  logic irq;
  int checks = 0, failures = 0, irqs = 0;

  key_switch_accel dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!reset && irq) irqs++;

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

  function automatic bit same(int a [$], int b [$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic get_cstar(int c [$], int l, output int cs [$]);
    cs = {};
    foreach (c[i]) begin
      @(negedge clk);
      brv_chipselect = 1; brv_write = 1; brv_width = 9'(c.size()); brv_ell = 6'(l); brv_c_i = c[i];
    end
    @(negedge clk);
    brv_chipselect = 0; brv_write = 0;
    while (cs.size() < c.size() * l) begin
      @(negedge clk);
      if (brv_out_valid) cs.push_back(brv_c_star_i);
    end
  endtask

  task automatic get_sstar(int s [$], int m, int n, int l, output int ss [$]);
    ss = {};
    foreach (s[i]) begin
      @(negedge clk);
      brm_chipselect = 1; brm_write = 1; brm_width = 5'(n); brm_length = 9'(m);
      brm_ell = 6'(l); brm_S_ij = s[i];
    end
    @(negedge clk);
    brm_chipselect = 0; brm_write = 0;
    while (ss.size() < m * n * l) begin
      @(negedge clk);
      if (brm_out_valid) ss.push_back(brm_S_star_ij);
    end
  endtask

  // product of a rows x k matrix (row-major) with a k-vector, by the multiplier
  task automatic mat_vec(int a [$], int rows, int k, int v [$], output int p [$]);
    p = {};
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      mm_b_we = 1; mm_b_row_idx = 4'(r); mm_b_row = '0;
      mm_b_row[0] = (r < k) ? v[r] : 0;
    end
    @(negedge clk) mm_b_we = 0;
    for (int r = 0; r < rows; r++) begin
      mm_a_valid = 1; mm_a_row = '0;
      for (int j = 0; j < k; j++) mm_a_row[j] = a[r * k + j];
      @(negedge clk);
      mm_a_valid = 0;
      ok(mm_p_valid, "product one cycle after the row");
      p.push_back(mm_p_row[0]);
    end
  endtask

  task automatic check_switch(int s [$], int m, int n, int c [$], int l);
    int cs [$], ss [$], p1 [$], p2 [$];
    get_cstar(c, l, cs);
    get_sstar(s, m, n, l, ss);
    mat_vec(ss, m, n * l, cs, p1);
    mat_vec(s, m, n, c, p2);
    for (int r = 0; r < m; r++) begin
      int e;
      e = 0;
      for (int j = 0; j < n; j++) e += s[r * n + j] * c[j];
      ok(p1[r] == e, $sformatf("(S* c*)[%0d] = %0d expected %0d", r, p1[r], e));
      ok(p2[r] == e, $sformatf("(S c)[%0d] = %0d expected %0d", r, p2[r], e));
    end
  endtask

  initial begin
    int s [$], c [$], cs [$], ss [$], exp [$];
    int n_rnd;
    repeat (2) @(negedge clk);
    reset = 0;
    // worked example
    c = '{1, -2};
    s = '{1, 2, 3, 4};
    get_cstar(c, 3, cs);
    exp = '{0, 0, 1, 0, -1, 0};
    ok(same(cs, exp), "c* of the example");
    get_sstar(s, 2, 2, 3, ss);
    exp = '{4, 2, 1, 8, 4, 2, 12, 6, 3, 16, 8, 4};
    ok(same(ss, exp), "S* of the example");
    check_switch(s, 2, 2, c, 3);
    // random keys: n = 2, l = 8 fills the 16 columns of the multiplier
    for (int t = 0; t < 10; t++) begin
      int m;
      m = $urandom_range(1, 12);
      s = {}; c = {};
      for (int i = 0; i < m * 2; i++) s.push_back(int'($urandom_range(0, 20)) - 10);
      for (int j = 0; j < 2; j++) c.push_back(int'($urandom_range(0, 510)) - 255);
      check_switch(s, m, 2, c, 8);
    end
    // Gaussian matrix for E (2 x 6)
    @(negedge clk);
    rnd_chipselect = 1; rnd_gen = 1; rnd_length = 2; rnd_width = 6;
    @(negedge clk);
    rnd_chipselect = 0; rnd_gen = 0;
    n_rnd = 0;
    repeat (40) begin
      @(negedge clk);
      if (rnd_out_valid) begin
        n_rnd++;
        ok(rnd_S_star_ij >= -30 && rnd_S_star_ij <= 30, "Gaussian sample range");
      end
    end
    ok(n_rnd == 12, $sformatf("%0d Gaussian samples, expected 12", n_rnd));
    // decryption rounding: x = round((w x + e) / w)
    for (int t = 0; t < 20; t++) begin
      int x [16];
      @(negedge clk);
      div_in_valid = 1;
      div_w = 1 << 16;
      for (int i = 0; i < 16; i++) begin
        x[i] = int'($urandom_range(0, 2000)) - 1000;
        div_in_vec[i] = prod_t'(x[i]) * (1 << 16) + int'($urandom_range(0, 60000)) - 30000;
      end
      @(negedge clk);
      div_in_valid = 0;
      ok(div_out_valid, "division result one cycle later");
      for (int i = 0; i < 16; i++) ok(div_out_vec[i] == x[i], "decrypted entry");
    end
    // vectorization of n x n matrices: 16 chunks, vec() then zeros
    for (int t = 0; t < 20; t++) begin
      int n, got;
      int hm [16][16];
      n = (t < 16) ? 16 - t : $urandom_range(1, 16);
      for (int r = 0; r < n; r++) begin
        @(negedge clk);
        vz_rows = 5'(n); vz_in_valid = 1; vz_in_row = '0;
        for (int c = 0; c < n; c++) begin
          hm[r][c] = $urandom;
          vz_in_row[c] = hm[r][c];
        end
      end
      @(negedge clk) vz_in_valid = 0;
      got = 0;
      for (int k = 0; k < 40 && got < 16; k++) begin
        if (vz_out_valid) begin
          ok(vz_out_idx == 4'(got) && vz_out_last == (got == 15), "vec chunk index");
          for (int l = 0; l < 16; l++) begin
            int v;
            v = got * 16 + l;
            ok(vz_out_chunk[l] == ((v < n * n) ? hm[v % n][v / n] : 0), "vec entry");
          end
          got++;
        end
        @(negedge clk);
      end
      ok(got == 16, "16 vec chunks");
    end
    // matrix cache: one row pattern per Dmem, then read back in random order
    begin
      row_t km_model [8][32];
      for (int b = 0; b < 8; b++)
        for (int a = 0; a < 32; a++) begin
          @(negedge clk);
          km_we = 1; km_wbank = 3'(b); km_waddr = 8'(a * 7);
          for (int i = 0; i < 16; i++) km_wdata[i] = $urandom;
          km_model[b][a] = km_wdata;
        end
      @(negedge clk) km_we = 0;
      for (int t = 0; t < 200; t++) begin
        int b, a;
        b = $urandom_range(0, 7); a = $urandom_range(0, 31);
        km_rbank = 3'(b); km_raddr = 8'(a * 7);
        @(negedge clk);
        ok(km_rdata == km_model[b][a], "matrix cache read back");
      end
    end
    repeat (3) @(negedge clk);
    ok(irqs > 30, $sformatf("%0d interrupts", irqs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
