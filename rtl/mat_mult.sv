// mat_mult: matrix multiplier of the client-side accelerator (products TA, Sc,
// GS, HS and S^T HS of the key-switching flow). The right operand B, up to
// LANES x LANES, is loaded one row per cycle (b_we, b_row_idx, b_row) and held
// in registers. Then each cycle with a_valid high presents one row a of the left
// operand, and the next cycle p_row = a * B (p[j] = sum_k a[k] * B[k][j]) with
// p_valid high, so an m-row product takes m cycles after B is loaded. Smaller
// matrices are zero-padded; larger ones are split into LANES-sized blocks by the
// driver. The multiply-accumulate array and its timing are this design's
// choice; the design only names the function. Arithmetic wraps modulo 2^32.
module mat_mult
  import he_pkg::*;
#(
  parameter int N = LANES
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    b_we,
  input  logic [$clog2(N)-1:0]    b_row_idx,
  input  elem_t [N-1:0]           b_row,
  input  logic                    a_valid,
  input  elem_t [N-1:0]           a_row,
  output logic                    p_valid,
  output elem_t [N-1:0]           p_row
);
  elem_t [N-1:0] b_mat [N];
  elem_t [N-1:0] p_next;

  always_ff @(posedge clk) begin
    if (b_we) b_mat[b_row_idx] <= b_row;
  end

  always_comb begin
    for (int j = 0; j < N; j++) begin
      p_next[j] = '0;
      for (int k = 0; k < N; k++)
        p_next[j] = p_next[j] + a_row[k] * b_mat[k][j];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      p_valid <= 1'b0;
      p_row   <= '0;
    end else begin
      p_valid <= a_valid;
      if (a_valid) p_row <= p_next;
    end
  end
endmodule
