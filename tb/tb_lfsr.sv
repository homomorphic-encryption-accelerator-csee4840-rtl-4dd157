// tb_lfsr: compares the LFSR with a bit-level model of the Galois register for
// x^32+x^22+x^2+x+1, checks reset, seed loading (including the zero seed), that
// en = 0 holds the state, and that the state does not repeat within 5000 steps.
module tb_lfsr;
  logic clk = 0, reset = 1, en = 0, seed_load = 0;
  logic [31:0] seed = 0, state, model;
  int checks = 0, failures = 0;

  lfsr #(.SEED(32'hACE1_2345)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] step(logic [31:0] s);
    logic [31:0] n;
    logic fb;
    fb = s[0];
    for (int i = 0; i < 31; i++) n[i] = s[i + 1];
    n[31] = fb;
    // taps of x^22, x^2 and x^1 (bit positions 21, 1, 0 after the shift)
    n[21] = n[21] ^ fb;
    n[1]  = n[1] ^ fb;
    n[0]  = n[0] ^ fb;
    return n;
  endfunction

  task automatic expect_state(logic [31:0] e, string what);
    checks++;
    if (state !== e) begin
      failures++;
      $display("FAIL %s: state %h expected %h", what, state, e);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] first;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    expect_state(32'hACE1_2345, "reset");
    model = state;
    en = 1;
    first = state;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      model = step(model);
      expect_state(model, "step");
      checks++;
      if (state == first) begin
        failures++;
        $display("FAIL state repeated after %0d steps", i + 1);
      end
    end
    en = 0;
    repeat (3) @(negedge clk);
    expect_state(model, "hold");
    seed_load = 1; seed = 32'h0;
    @(negedge clk) seed_load = 0;
    expect_state(32'h1, "zero seed");
    seed_load = 1; seed = 32'h1234_5678;
    @(negedge clk) seed_load = 0; en = 1;
    expect_state(32'h1234_5678, "seed");
    @(negedge clk);
    expect_state(step(32'h1234_5678), "step after seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
