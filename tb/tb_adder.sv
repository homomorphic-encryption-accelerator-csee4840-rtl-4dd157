// tb_adder: random and corner-case operands, result compared with a 64-bit sum
// truncated to 32 bits (two's-complement wrap).
module tb_adder;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  adder #(.W(32)) dut (.*);

  task automatic check(logic [31:0] x, logic [31:0] z);
    longint s;
    a = x; b = z;
    #1;
    s = longint'(x) + longint'(z);
    checks++;
    if (y !== s[31:0]) begin
      failures++;
      $display("FAIL %h + %h = %h", x, z, y);
    end
  endtask

  initial begin
    check(32'h7fff_ffff, 32'h1);
    check(32'hffff_ffff, 32'hffff_ffff);
    check(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 1000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
