// tb_he_accel: end-to-end run of the whole accelerator at its default sizes.
// Plaintexts x (16 small integers) are encrypted as c = w x + e under the
// identity key (S c = w x + e with S = I, w = 2^16, |e| <= 3) and stored in the
// server. The client side first checks the key-switching identity S* c* = S c
// on the worked example and draws a Gaussian matrix. Then the server computes,
// and the client decrypts with x = round(S c / w) (matrix multiplier, then the
// rounding divider):
//   addition            -> x1 + x2
//   linear transform    -> G x1                      (M = G for the key S = I)
//   weighted inner prod -> x1^T H_j x2 over 4 elements (rows of M = vec(H_j)^T)
//   polynomial          -> f(x) = x2^2 - 4 x1 x3 (the weights of the worked
//                          example) plus 5 + 3 x1, over [1, x]
// For the last two the client forms each row of M as vec(S^T H S) = vec(H)
// (S = I) with its vectorizer. Each M is written into the client's matrix
// cache (one Dmem per kind of operation) and streamed to the server from there.
// Every mechanism is counted and a failure is counted for one that never ran.
module tb_he_accel;
  import he_pkg::*;
  localparam int W = 1 << 16;
  logic clk = 0, reset = 1;
  logic cl_brv_chipselect = 0, cl_brv_write = 0, cl_brv_out_valid;
  logic [8:0] cl_brv_width = 0;
  logic [5:0] cl_brv_ell = 0;
  elem_t cl_brv_c_i = 0, cl_brv_c_star_i;
  logic [14:0] cl_brv_output_length;
  logic cl_brm_chipselect = 0, cl_brm_write = 0, cl_brm_out_valid;
  logic [4:0] cl_brm_width = 0;
  logic [8:0] cl_brm_length = 0, cl_brm_output_length;
  logic [5:0] cl_brm_ell = 0;
  elem_t cl_brm_S_ij = 0, cl_brm_S_star_ij;
  logic cl_brm_row_write = 0;
  row_t cl_brm_S_row = '0;
  logic [10:0] cl_brm_output_width;
  logic cl_rnd_chipselect = 0, cl_rnd_gen = 0, cl_rnd_out_valid;
  logic [8:0] cl_rnd_length = 0;
  logic [4:0] cl_rnd_width = 0;
  elem_t cl_rnd_S_star_ij;
  logic cl_mm_b_we = 0, cl_mm_a_valid = 0, cl_mm_p_valid;
  logic [3:0] cl_mm_b_row_idx = 0;
  row_t cl_mm_b_row = '0, cl_mm_a_row = '0, cl_mm_p_row;
  logic cl_div_in_valid = 0, cl_div_out_valid;
  prod_t [15:0] cl_div_in_vec = '0;
  elem_t cl_div_w = 1;
  row_t cl_div_out_vec;
  logic cl_irq;
  logic [4:0] cl_vz_rows = 0;
  logic cl_vz_in_valid = 0, cl_vz_out_valid, cl_vz_out_last;
  row_t cl_vz_in_row = '0, cl_vz_out_chunk;
  logic [3:0] cl_vz_out_idx;
  logic cl_km_we = 0;
  logic [2:0] cl_km_wbank = 0, cl_km_rbank = 0;
  logic [7:0] cl_km_waddr = 0, cl_km_raddr = 0;
  row_t cl_km_wdata = '0, cl_km_rdata;
  logic sv_ct_we = 0;
  logic [7:0] sv_ct_waddr = 0, sv_cmd_addr1 = 0, sv_cmd_addr2 = 0;
  row_t sv_ct_wdata = '0, sv_m_row = '0, sv_res_data;
  logic sv_cmd_valid = 0, sv_cmd_ready, sv_m_valid = 0, sv_m_ready, sv_res_valid, sv_irq;
  op_t sv_cmd_op = OP_ADD;
  elem_t sv_cmd_w = 0;
  logic [8:0] sv_cmd_length = 0, sv_res_row;

  int checks = 0, failures = 0;
  int n_brv = 0, n_brm = 0, n_rnd = 0, n_mm = 0, n_div = 0, n_add = 0, n_lin = 0,
      n_wip = 0, n_poly = 0, n_vz = 0, n_cl_irq = 0, n_sv_irq = 0;
  int x [8][16];
  row_t mon [$];

  he_accel dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!reset) begin
    if (sv_res_valid) mon.push_back(sv_res_data);
    if (cl_irq) n_cl_irq++;
    if (sv_irq) n_sv_irq++;
    if (cl_brv_out_valid) n_brv++;
    if (cl_brm_out_valid) n_brm++;
    if (cl_rnd_out_valid) n_rnd++;
    if (cl_mm_p_valid) n_mm++;
    if (cl_div_out_valid) n_div++;
    if (cl_vz_out_valid) n_vz++;
  end

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

  // client: decrypt one 16-entry ciphertext with key S = I: round((S c) / w)
  task automatic decrypt(row_t c, output row_t xd);
    for (int r = 0; r < 16; r++) begin        // load c as column 0 of B
      @(negedge clk);
      cl_mm_b_we = 1; cl_mm_b_row_idx = 4'(r); cl_mm_b_row = '0; cl_mm_b_row[0] = c[r];
    end
    @(negedge clk) cl_mm_b_we = 0;
    for (int r = 0; r < 16; r++) begin        // rows of S = I
      cl_mm_a_valid = 1; cl_mm_a_row = '0; cl_mm_a_row[r] = 1;
      @(negedge clk);
      cl_mm_a_valid = 0;
      cl_div_in_vec[r] = prod_t'(cl_mm_p_row[0]);
    end
    cl_div_in_valid = 1; cl_div_w = W;
    @(negedge clk);
    cl_div_in_valid = 0;
    xd = cl_div_out_vec;
  endtask

  // server: one request, its M stream, and the results it returns
  task automatic request(op_t op, int a1, int a2, int len, row_t rows [$], output row_t res [$]);
    int irq0;
    foreach (rows[i]) begin                  // the client keeps M in its cache
      @(negedge clk);
      cl_km_we = 1; cl_km_wbank = 3'(op); cl_km_waddr = 8'(i); cl_km_wdata = rows[i];
    end
    @(negedge clk) cl_km_we = 0;
    while (!sv_cmd_ready) @(negedge clk);
    mon = {};
    irq0 = n_sv_irq;
    sv_cmd_valid = 1; sv_cmd_op = op; sv_cmd_addr1 = 8'(a1); sv_cmd_addr2 = 8'(a2);
    sv_cmd_w = W; sv_cmd_length = 9'(len);
    @(negedge clk);
    sv_cmd_valid = 0;
    foreach (rows[i]) begin
      while (!sv_m_ready) @(negedge clk);
      cl_km_rbank = 3'(op); cl_km_raddr = 8'(i);   // fetch row i of M from the cache
      @(negedge clk);
      sv_m_valid = 1; sv_m_row = cl_km_rdata;
      ok(cl_km_rdata == rows[i], "M row read back from the client cache");
      @(negedge clk);
      sv_m_valid = 0;
    end
    for (int k = 0; k < 500 && n_sv_irq == irq0; k++) @(negedge clk);
    @(negedge clk);
    res = mon;
    ok(n_sv_irq == irq0 + 1, "server irq");
  endtask

  // client: vec(H) of an n x n weight matrix through the vectorizer, 16 chunks
  task automatic vectorize_h(int n, int hm [16][16], output row_t chunks [$]);
    chunks = {};
    for (int r = 0; r < n; r++) begin
      @(negedge clk);
      cl_vz_rows = 5'(n); cl_vz_in_valid = 1; cl_vz_in_row = '0;
      for (int c = 0; c < n; c++) cl_vz_in_row[c] = hm[r][c];
    end
    @(negedge clk) cl_vz_in_valid = 0;
    while (chunks.size() < 16) begin
      if (cl_vz_out_valid) chunks.push_back(cl_vz_out_chunk);
      @(negedge clk);
    end
  endtask

  // decrypt a scalar result (lane 0)
  task automatic decrypt_scalar(elem_t v, output int xd);
    row_t c, d;
    c = '0; c[0] = v;
    decrypt(c, d);
    xd = d[0];
  endtask

  initial begin
    row_t rows [$], res [$], xd;
    int cs [$];
    repeat (2) @(negedge clk);
    reset = 0;

    // ---- client: key-switching building blocks on the worked example ------
    for (int i = 0; i < 2; i++) begin
      @(negedge clk);
      cl_brv_chipselect = 1; cl_brv_write = 1; cl_brv_width = 2; cl_brv_ell = 3;
      cl_brv_c_i = (i == 0) ? 1 : -2;
    end
    @(negedge clk) begin cl_brv_chipselect = 0; cl_brv_write = 0; end
    while (cs.size() < 6) begin
      @(negedge clk);
      if (cl_brv_out_valid) cs.push_back(cl_brv_c_star_i);
    end
    for (int r = 0; r < 2; r++) begin          // S loaded one row per cycle
      @(negedge clk);
      cl_brm_chipselect = 1; cl_brm_row_write = 1; cl_brm_width = 2; cl_brm_length = 2;
      cl_brm_ell = 3; cl_brm_S_row = '0;
      cl_brm_S_row[0] = 2 * r + 1; cl_brm_S_row[1] = 2 * r + 2;
    end
    @(negedge clk) begin cl_brm_chipselect = 0; cl_brm_row_write = 0; end
    begin
      int ss [$];
      while (ss.size() < 12) begin
        @(negedge clk);
        if (cl_brm_out_valid) ss.push_back(cl_brm_S_star_ij);
      end
      // S* c* through the multiplier must equal S c = [-3, -5]
      for (int r = 0; r < 16; r++) begin
        @(negedge clk);
        cl_mm_b_we = 1; cl_mm_b_row_idx = 4'(r); cl_mm_b_row = '0;
        cl_mm_b_row[0] = (r < 6) ? cs[r] : 0;
      end
      @(negedge clk) cl_mm_b_we = 0;
      for (int r = 0; r < 2; r++) begin
        cl_mm_a_valid = 1; cl_mm_a_row = '0;
        for (int j = 0; j < 6; j++) cl_mm_a_row[j] = ss[r * 6 + j];
        @(negedge clk);
        cl_mm_a_valid = 0;
        ok(cl_mm_p_row[0] == ((r == 0) ? -3 : -5), "S* c* = S c");
      end
    end
    @(negedge clk);
    cl_rnd_chipselect = 1; cl_rnd_gen = 1; cl_rnd_length = 2; cl_rnd_width = 6;
    @(negedge clk) begin cl_rnd_chipselect = 0; cl_rnd_gen = 0; end
    repeat (20) @(negedge clk);

    // ---- encrypt and store plaintexts --------------------------------------
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      sv_ct_we = 1; sv_ct_waddr = 8'(a);
      for (int i = 0; i < 16; i++) begin
        x[a][i] = int'($urandom_range(0, 14)) - 7;
        sv_ct_wdata[i] = x[a][i] * W + int'($urandom_range(0, 6)) - 3;
      end
    end
    @(negedge clk) sv_ct_we = 0;

    // ---- addition ----------------------------------------------------------
    for (int t = 0; t < 3; t++) begin
      int a1, a2;
      a1 = $urandom_range(0, 7); a2 = $urandom_range(0, 7);
      rows = {};
      request(OP_ADD, a1, a2, 0, rows, res);
      ok(res.size() == 1, "one sum");
      decrypt(res[0], xd);
      for (int i = 0; i < 16; i++) ok(xd[i] == x[a1][i] + x[a2][i], "decrypted sum");
      n_add++;
    end

    // ---- linear transform ----------------------------------------------------
    begin
      int a1, m;
      a1 = 3; m = 5;
      rows = {};
      for (int r = 0; r < m; r++) begin
        row_t g;
        for (int k = 0; k < 16; k++) g[k] = int'($urandom_range(0, 6)) - 3;
        rows.push_back(g);
      end
      request(OP_LIN, a1, 0, m, rows, res);
      ok(res.size() == m, "linear transform results");
      for (int r = 0; r < m && r < res.size(); r++) begin
        int e, d;
        e = 0;
        for (int k = 0; k < 16; k++) e += rows[r][k] * x[a1][k];
        decrypt_scalar(res[r][0], d);
        ok(d == e, $sformatf("decrypted (G x)[%0d] = %0d expected %0d", r, d, e));
      end
      n_lin++;
    end

    // ---- weighted inner products: three weight matrices at once --------------
    begin
      int h [3][16];
      rows = {};
      for (int j = 0; j < 3; j++) begin
        int hm [16][16];
        row_t ch [$];
        foreach (hm[r, c]) hm[r][c] = 0;
        for (int k = 0; k < 16; k++) begin
          h[j][k] = int'($urandom_range(0, 4)) - 2;
          hm[k % 4][k / 4] = h[j][k];             // H_j, 4 x 4
        end
        vectorize_h(4, hm, ch);                   // row j of M = vec(H_j)^T
        for (int k = 0; k < 16; k++) ok(ch[0][k] == h[j][k], "vec(H_j) entry");
        for (int k = 1; k < 16; k++) ok(ch[k] == '0, "vec(H_j) padding");
        rows.push_back(ch[0]);
      end
      request(OP_WIP, 1, 2, 3, rows, res);
      ok(res.size() == 3, "inner product results");
      for (int j = 0; j < 3 && j < res.size(); j++) begin
        int e, d;
        e = 0;
        for (int v = 0; v < 16; v++) e += h[j][v] * x[1][v % 4] * x[2][v / 4];
        decrypt_scalar(res[j][0], d);
        ok(d == e, $sformatf("decrypted x1^T H_%0d x2 = %0d expected %0d", j, d, e));
      end
      n_wip++;
    end

    // ---- polynomial: f(x) = x2^2 - 4 x1 x3 + 3 x1 + 5 over [1, x] -------------
    begin
      int hp [256];
      int e, d, a;
      a = 4;
      foreach (hp[i]) hp[i] = 0;
      // H over [1, x1, x2, x3]: index (i, j) -> vec position j*16 + i
      hp[0 * 16 + 0] = 5;
      hp[1 * 16 + 0] = 3;                 // 3 x1 (row 0, column 1)
      hp[2 * 16 + 2] = 1;                 // x2^2
      hp[3 * 16 + 1] = -2;                // -2 x1 x3
      hp[1 * 16 + 3] = -2;                // -2 x3 x1
      begin
        int hm [16][16];
        foreach (hm[r, c]) hm[r][c] = hp[c * 16 + r];
        vectorize_h(16, hm, rows);                // the 256-entry row of M
      end
      for (int k = 0; k < 16; k++)
        for (int l = 0; l < 16; l++) ok(rows[k][l] == hp[k * 16 + l], "vec(H) entry");
      request(OP_POLY, a, a, 1, rows, res);
      ok(res.size() == 1, "polynomial result");
      e = x[a][1] * x[a][1] - 4 * x[a][0] * x[a][2] + 3 * x[a][0] + 5;
      if (res.size() > 0) begin
        decrypt_scalar(res[0][0], d);
        ok(d == e, $sformatf("decrypted f(x) = %0d expected %0d", d, e));
      end
      n_poly++;
    end

    repeat (3) @(negedge clk);
    ok(n_brv > 0, "bit representation of a vector ran");
    ok(n_brm > 0, "bit representation of a matrix ran");
    ok(n_rnd == 12, "Gaussian matrix drawn");
    ok(n_mm > 0, "matrix multiplier ran");
    ok(n_div > 0, "rounding divider ran");
    ok(n_vz == 4 * 16, "vectorizer ran for every weight matrix");
    ok(n_add > 0 && n_lin > 0 && n_wip > 0 && n_poly > 0, "all four server operations ran");
    ok(n_cl_irq > 0 && n_sv_irq == 6, "interrupts of both sides");
    $display("mechanisms: brv %0d brm %0d rnd %0d mm %0d div %0d vz %0d add %0d lin %0d wip %0d poly %0d cl_irq %0d sv_irq %0d",
             n_brv, n_brm, n_rnd, n_mm, n_div, n_vz, n_add, n_lin, n_wip, n_poly, n_cl_irq, n_sv_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
