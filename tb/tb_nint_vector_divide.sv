// tb_nint_vector_divide: random 16-entry vectors of 64-bit dividends (outer
// product magnitudes) and random divisors, including exact ties and w = 0;
// each result is compared with a floating-point nearest-integer reference and
// must arrive one cycle after its input.
module tb_nint_vector_divide;
  import he_pkg::*;
  logic clk = 0, reset = 1, in_valid = 0, out_valid;
  prod_t [15:0] in_vec = '0;
  elem_t w = 1;
  row_t out_vec;
  int checks = 0, failures = 0;

  nint_vector_divide #(.N(16)) dut (.*);
  always #5 clk = ~clk;

  function automatic int ref_div(longint a, int d);
    real q;
    if (d == 0) return 0;
    q = real'(a) / real'(d);
    return (q < 0) ? -int'($floor(-q + 0.5)) : int'($floor(q + 0.5));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = 1;
      w = (t == 5) ? 0 : int'($urandom_range(1, 1 << 18)) * (($urandom_range(0, 1) == 1) ? -1 : 1);
      for (int i = 0; i < 16; i++) begin
        if (i == 0)      in_vec[i] = prod_t'(w) * 7 + prod_t'(w) / 2;   // near a tie
        else if (i == 1) in_vec[i] = -(prod_t'(w) * 3);
        else in_vec[i] = longint'(int'($urandom)) * longint'($urandom_range(0, 1 << 14));
      end
      @(posedge clk);
      #1;
      in_valid = 0;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("FAIL out_valid missing one cycle after input");
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(out_vec[i]) != ref_div(in_vec[i], w)) begin
          failures++;
          $display("FAIL %0d / %0d = %0d expected %0d", in_vec[i], w, out_vec[i],
                   ref_div(in_vec[i], w));
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL out_valid stays high");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
