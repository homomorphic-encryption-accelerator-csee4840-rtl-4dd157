// tb_mat_mult: loads random 16x16 matrices B, streams random rows of A (some
// back to back, some with gaps) and checks each product row against a
// reference computed here, and that it arrives exactly one cycle after its row.
module tb_mat_mult;
  import he_pkg::*;
  logic clk = 0, reset = 1, b_we = 0, a_valid = 0, p_valid;
  logic [3:0] b_row_idx = 0;
  row_t b_row = '0, a_row = '0, p_row;
  int checks = 0, failures = 0;
  int bm [16][16];
  row_t expq [$];

  mat_mult #(.N(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: a product must appear exactly one cycle after each a_valid
  logic a_valid_d = 0;
  always @(posedge clk) begin
    a_valid_d <= a_valid & !reset;
    if (!reset) begin
      if (p_valid !== a_valid_d) begin
        checks++; failures++;
        $display("FAIL p_valid %b one cycle after a_valid %b", p_valid, a_valid_d);
      end
      if (p_valid) begin
        row_t e;
        e = expq.pop_front();
        checks++;
        if (p_row !== e) begin
          failures++;
          $display("FAIL product row mismatch");
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int trial = 0; trial < 4; trial++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        b_we = 1; b_row_idx = 4'(k);
        for (int j = 0; j < 16; j++) begin
          bm[k][j] = (trial == 0) ? ((k == j) ? 1 : 0) : int'($urandom_range(0, 2000)) - 1000;
          b_row[j] = bm[k][j];
        end
      end
      @(negedge clk) b_we = 0;
      for (int r = 0; r < 20; r++) begin
        row_t e;
        @(negedge clk);
        a_valid = ($urandom_range(0, 3) != 0);
        for (int k = 0; k < 16; k++)
          a_row[k] = (trial == 3) ? $urandom : int'($urandom_range(0, 2000)) - 1000;
        for (int j = 0; j < 16; j++) begin
          int s;
          s = 0;
          for (int k = 0; k < 16; k++) s += a_row[k] * bm[k][j];
          e[j] = s;
        end
        if (a_valid) expq.push_back(e);
      end
      @(negedge clk) a_valid = 0;
      repeat (2) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d products missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
