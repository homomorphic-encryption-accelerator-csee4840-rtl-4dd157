// tb_dmem: writes random words to random addresses of a small dmem, keeps a
// model of the contents and checks every read one cycle after its address,
// including a read of an address written in the same cycle (old data).
module tb_dmem;
  localparam int DEPTH = 64, WIDTH = 40;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  dmem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = {$urandom, $urandom} & {WIDTH{1'b1}};
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [WIDTH-1:0] exp;
      @(negedge clk);
      raddr = 6'($urandom_range(0, DEPTH - 1));
      we    = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 6'($urandom_range(0, DEPTH - 1));
      wdata = {$urandom, $urandom} & {WIDTH{1'b1}};
      exp   = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL read %0d got %h expected %h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
