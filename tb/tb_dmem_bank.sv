// tb_dmem_bank: random writes to random banks and rows of an 8-bank cache,
// with a model of every bank here; every read is checked one cycle after its
// bank and row are presented (changing them afterwards must not matter), and
// writes must touch only the selected bank.
module tb_dmem_bank;
  logic clk = 0, we = 0;
  logic [2:0] wbank = 0, rbank = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] model [8][64];
  int checks = 0, failures = 0;

  dmem_bank #(.NUM_BANKS(8), .DEPTH(64), .WIDTH(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 8; b++)
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        we = 1; wbank = 3'(b); waddr = 6'(a); wdata = {$urandom, $urandom};
        model[b][a] = wdata;
      end
    @(negedge clk) we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] exp;
      @(negedge clk);
      rbank = 3'($urandom_range(0, 7)); raddr = 6'($urandom_range(0, 63));
      we = $urandom_range(0, 1); wbank = 3'($urandom_range(0, 7));
      waddr = ($urandom_range(0, 1) == 1) ? raddr : 6'($urandom_range(0, 63));
      wdata = {$urandom, $urandom};
      exp = model[rbank][raddr];
      @(posedge clk);
      if (we) model[wbank][waddr] = wdata;
      #1;
      rbank = 3'($urandom_range(0, 7)); raddr = 6'($urandom_range(0, 63));  // must not matter
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL bank %0d row %0d: %h expected %h", rbank, raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
