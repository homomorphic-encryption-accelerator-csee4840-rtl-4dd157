// tb_vec_addition: random 16-element ciphertext pairs (full 32-bit range) added
// in one cycle: the sum of every lane must appear, wrapped to 32 bits, on the
// cycle after the write, and out_valid only then.
module tb_vec_addition;
  import he_pkg::*;
  logic clk = 0, reset = 1, chipselect = 0, write = 0, out_valid;
  row_t c1 = '0, c2 = '0, c;
  int checks = 0, failures = 0;

  vec_addition dut (.*);
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
    for (int t = 0; t < 500; t++) begin
      row_t e;
      bit go;
      @(negedge clk);
      go = ($urandom_range(0, 3) != 0);
      chipselect = go; write = go || ($urandom_range(0, 1) == 1);
      for (int i = 0; i < 16; i++) begin
        c1[i] = $urandom;
        c2[i] = $urandom;
        e[i]  = 32'(longint'(c1[i]) + longint'(c2[i]));
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== go || (go && c !== e)) begin
        failures++;
        $display("FAIL trial %0d: valid %b sum mismatch %b", t, out_valid, c !== e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
