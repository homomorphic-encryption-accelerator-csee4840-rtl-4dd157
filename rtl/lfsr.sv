// lfsr: 32-bit Galois linear-feedback shift register, the random source of the
// Gaussian matrix generator. Feedback polynomial x^32+x^22+x^2+x+1 (maximal
// length); the polynomial and the seeding are this design's choice. When en is
// high the state advances one step per clock; seed_load loads a new seed (a zero
// seed, which would lock the register, is replaced by 1). Reset loads SEED.
module lfsr #(
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        en,
  input  logic        seed_load,
  input  logic [31:0] seed,
  output logic [31:0] state
);
  localparam logic [31:0] TAPS = 32'h8020_0003;

  always_ff @(posedge clk) begin
    if (reset)
      state <= (SEED == 0) ? 32'h1 : SEED;
    else if (seed_load)
      state <= (seed == 0) ? 32'h1 : seed;
    else if (en)
      state <= state[0] ? ((state >> 1) ^ TAPS) : (state >> 1);
  end
endmodule
