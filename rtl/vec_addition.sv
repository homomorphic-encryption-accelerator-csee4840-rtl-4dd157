// vec_addition: addition accelerator of the server. Encrypted-domain addition
// is plain element-wise addition of the ciphertexts (c = c1 + c2, Eq. 11).
// LANES 32-bit adders work in parallel, so two 16-element ciphertexts are added
// in one cycle: a cycle with chipselect and write high gives the sum on c with
// out_valid high on the next cycle. The 16 parallel adders follow the design;
// registering the result is this design's choice.
module vec_addition
  import he_pkg::*;
#(
  parameter int N = LANES
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           chipselect,
  input  logic           write,
  input  elem_t [N-1:0]  c1,
  input  elem_t [N-1:0]  c2,
  output elem_t [N-1:0]  c,
  output logic           out_valid
);
  elem_t [N-1:0] sum;

  for (genvar i = 0; i < N; i++) begin : g_add
    adder #(.W(DATA_W)) u_adder (.a(c1[i]), .b(c2[i]), .y(sum[i]));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      c         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= chipselect && write;
      if (chipselect && write) c <= sum;
    end
  end
endmodule
