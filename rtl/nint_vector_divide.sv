// nint_vector_divide: divides every entry of a LANES-entry vector by the scalar
// w and rounds to the nearest integer (ties away from zero), as decryption
// (x = round(Sc / w)) and the weighted inner product (round(vec(c1 c2^T) / w))
// require. Dividends are 64-bit so that outer-product entries fit; quotients are
// 32-bit. A vector presented with in_valid gives out_vec with out_valid one
// cycle later. The rounding rule for ties, the zero result for w = 0 and the
// single-cycle latency are this design's choice.
module nint_vector_divide
  import he_pkg::*;
#(
  parameter int N = LANES
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           in_valid,
  input  prod_t [N-1:0]  in_vec,
  input  elem_t          w,
  output logic           out_valid,
  output elem_t [N-1:0]  out_vec
);
  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      out_vec   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < N; i++) out_vec[i] <= nint_div(in_vec[i], w);
    end
  end
endmodule
