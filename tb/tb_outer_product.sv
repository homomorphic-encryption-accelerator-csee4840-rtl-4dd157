// tb_outer_product: random 4-element vectors (full 32-bit range); checks the N
// rows a[i]*b against 64-bit products computed here, their order, that they
// come on N consecutive cycles starting one cycle after start, and done.
module tb_outer_product;
  import he_pkg::*;
  localparam int N = 4;
  logic clk = 0, reset = 1, start = 0, row_valid, done;
  elem_t [N-1:0] a = '0, b = '0;
  prod_t [N-1:0] row;
  int checks = 0, failures = 0;

  outer_product #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int t = 0; t < 50; t++) begin
      elem_t [N-1:0] a0, b0;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        a[i] = (t < 10) ? int'($urandom_range(0, 200)) - 100 : $urandom;
        b[i] = (t < 10) ? int'($urandom_range(0, 200)) - 100 : $urandom;
      end
      a0 = a; b0 = b;
      start = 1;
      @(negedge clk);
      start = 0;
      a = '0; b = '0;   // inputs are latched at start
      for (int i = 0; i < N; i++) begin
        @(posedge clk);
        #1;
        checks++;
        if (!row_valid || (done !== (i == N - 1))) begin
          failures++;
          $display("FAIL row %0d: valid %b done %b", i, row_valid, done);
        end
        for (int j = 0; j < N; j++) begin
          checks++;
          if (row[j] !== longint'(a0[i]) * longint'(b0[j])) begin
            failures++;
            $display("FAIL row %0d col %0d", i, j);
          end
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (row_valid) begin
        failures++;
        $display("FAIL extra row");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
