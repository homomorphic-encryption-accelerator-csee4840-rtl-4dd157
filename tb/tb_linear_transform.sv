// tb_linear_transform: applies random m x 16 matrices (m up to 256) to random
// ciphertexts, one row per cycle, and checks each y_i against the dot product
// computed here, the row number, that each result comes one cycle after its
// row (m rows in m cycles) and that done marks the last row.
module tb_linear_transform;
  import he_pkg::*;
  logic clk = 0, reset = 1, chipselect = 0, write = 0, y_valid, done;
  logic [8:0] length = 0, y_row;
  row_t W_row = '0, c = '0;
  elem_t y_i;
  int checks = 0, failures = 0;

  linear_transform dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int t = 0; t < 8; t++) begin
      int m;
      m = (t == 0) ? 256 : $urandom_range(1, 40);
      for (int i = 0; i < 16; i++) c[i] = (t == 1) ? $urandom : int'($urandom_range(0, 1 << 20));
      length = 9'(m);
      for (int r = 0; r < m; r++) begin
        int e;
        @(negedge clk);
        chipselect = 1; write = 1;
        e = 0;
        for (int k = 0; k < 16; k++) begin
          W_row[k] = int'($urandom_range(0, 200)) - 100;
          e += W_row[k] * c[k];
        end
        @(posedge clk);
        #1;
        checks++;
        if (!y_valid || y_i !== e || y_row !== 9'(r) || done !== (r == m - 1)) begin
          failures++;
          $display("FAIL row %0d: valid %b y %0d expected %0d row %0d done %b",
                   r, y_valid, y_i, e, y_row, done);
        end
      end
      @(negedge clk);
      chipselect = 0; write = 0;
      @(posedge clk);
      #1;
      checks++;
      if (y_valid) begin
        failures++;
        $display("FAIL result without a row");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
