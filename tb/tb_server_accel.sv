// tb_server_accel: fills the ciphertext memory with random ciphertexts and
// runs every operation of the server accelerator through its request port:
// additions, linear transforms, weighted inner products and degree-2
// polynomial steps, at random addresses. Results are compared with the
// arithmetic done here (c1 + c2, M c, M round(vec(c1e c2e^T) / w)). It also
// checks the addition latency (the sum is there 3 cycles after the cycle
// that presents the request: two reads, issue, add), the one-result-per-row linear transform, and irq.
module tb_server_accel;
  import he_pkg::*;
  logic clk = 0, reset = 1;
  logic ct_we = 0;
  logic [7:0] ct_waddr = 0, cmd_addr1 = 0, cmd_addr2 = 0;
  row_t ct_wdata = '0, m_row = '0, res_data;
  logic cmd_valid = 0, cmd_ready, m_valid = 0, m_ready, res_valid, irq;
  op_t cmd_op = OP_ADD;
  elem_t cmd_w = 0;
  logic [8:0] cmd_length = 0, res_row;
  int checks = 0, failures = 0, cyc = 0;
  int mem [256][16];

  server_accel dut (.*);
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

  // monitor: every result with its row number and cycle; irq count
  row_t mon [$];
  int mon_row [$], mon_cyc [$], irqs = 0;
  always @(posedge clk) if (!reset) begin
    if (res_valid) begin
      mon.push_back(res_data);
      mon_row.push_back(int'(res_row));
      mon_cyc.push_back(cyc);
    end
    if (irq) irqs++;
  end

  // issue a request; stream `chunks` rows of M; collect `nres` results
  task automatic request(op_t op, int a1, int a2, int w, int len, int chunks,
                         row_t rows [$], int nres, output row_t res [$], output int t_acc,
                         output int t_res);
    int irq0;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    mon = {}; mon_row = {}; mon_cyc = {};
    irq0 = irqs;
    cmd_valid = 1; cmd_op = op; cmd_addr1 = 8'(a1); cmd_addr2 = 8'(a2);
    cmd_w = w; cmd_length = 9'(len);
    t_acc = cyc;
    @(negedge clk);
    cmd_valid = 0;
    for (int i = 0; i < chunks; i++) begin
      while (!m_ready) @(negedge clk);
      m_valid = 1; m_row = rows[i];
      @(negedge clk);
      m_valid = 0;
    end
    for (int k = 0; k < 400 && irqs == irq0; k++) @(negedge clk);
    repeat (2) @(negedge clk);
    res = mon;
    t_res = (mon_cyc.size() > 0) ? mon_cyc[0] : -1;
    ok(res.size() == nres, $sformatf("op %s: %0d results, expected %0d", op.name(), res.size(), nres));
    ok(irqs == irq0 + 1, "one irq at the end of the operation");
    if (op != OP_ADD)
      foreach (mon_row[i]) ok(mon_row[i] == i, "result row number");
  endtask

  initial begin
    row_t rows [$], res [$];
    int t_acc, t_res;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      ct_we = 1; ct_waddr = 8'(a);
      for (int i = 0; i < 16; i++) begin
        mem[a][i] = int'($urandom_range(0, 1 << 21)) - (1 << 20);
        ct_wdata[i] = mem[a][i];
      end
    end
    @(negedge clk) ct_we = 0;

    for (int t = 0; t < 24; t++) begin
      int a1, a2, m, w;
      a1 = $urandom_range(0, 255);
      a2 = $urandom_range(0, 255);
      w  = int'($urandom_range(1, 1 << 15));
      unique case (t % 4)
        0: begin
          rows = {};
          request(OP_ADD, a1, a2, w, 0, 0, rows, 1, res, t_acc, t_res);
          ok(t_res - t_acc == 3, $sformatf("addition result after %0d cycles", t_res - t_acc));
          for (int i = 0; i < 16; i++) ok(res[0][i] == mem[a1][i] + mem[a2][i], "sum");
        end
        1: begin
          m = $urandom_range(1, 30);
          rows = {};
          for (int r = 0; r < m; r++) begin
            row_t x;
            for (int k = 0; k < 16; k++) x[k] = int'($urandom_range(0, 200)) - 100;
            rows.push_back(x);
          end
          request(OP_LIN, a1, a2, w, m, m, rows, m, res, t_acc, t_res);
          for (int r = 0; r < m && r < res.size(); r++) begin
            int e;
            e = 0;
            for (int k = 0; k < 16; k++) e += rows[r][k] * mem[a1][k];
            ok(res[r][0] == e, $sformatf("linear transform row %0d", r));
          end
        end
        default: begin
          int ne, ch, cp [256];
          bit poly;
          poly = (t % 4 == 3);
          ne = poly ? 16 : 4;
          ch = poly ? 16 : 1;
          for (int v = 0; v < ne * ne; v++) begin
            int i, j;
            longint x, y;
            i = v % ne; j = v / ne;
            x = poly ? ((i == 0) ? w : mem[a1][i - 1]) : mem[a1][i];
            y = poly ? ((j == 0) ? w : mem[a2][j - 1]) : mem[a2][j];
            cp[v] = nint(x * y, w);
          end
          m = $urandom_range(1, 12);
          rows = {};
          for (int r = 0; r < m * ch; r++) begin
            row_t x;
            for (int k = 0; k < 16; k++) x[k] = int'($urandom_range(0, 200)) - 100;
            rows.push_back(x);
          end
          request(poly ? OP_POLY : OP_WIP, a1, a2, w, m, m * ch, rows, m, res, t_acc, t_res);
          for (int r = 0; r < m && r < res.size(); r++) begin
            int e;
            e = 0;
            for (int k = 0; k < ch; k++)
              for (int l = 0; l < 16; l++) e += rows[r * ch + k][l] * cp[k * 16 + l];
            ok(res[r][0] == e, $sformatf("%s row %0d: %0d expected %0d",
                                         poly ? "polynomial" : "inner product", r, res[r][0], e));
          end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
