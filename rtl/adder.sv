// adder: W-bit two's-complement integer adder (combinational), the building
// block of the 16-lane vector addition accelerator. Overflow wraps.
module adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a + b;
endmodule
