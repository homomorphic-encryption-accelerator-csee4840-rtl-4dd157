// outer_product: forms the outer product a * b^T of two N-element vectors, one
// row per cycle. A start pulse latches a and b; on each of the following N
// cycles row_valid is high and row holds a[i] * b (64-bit products), row i = 0
// first; done marks the last row. The row-per-cycle schedule is this design's
// choice; the design gives only the function (c1 c2^T of Eq. 18).
module outer_product
  import he_pkg::*;
#(
  parameter int N = 4
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  elem_t [N-1:0]  a,
  input  elem_t [N-1:0]  b,
  output logic           row_valid,
  output prod_t [N-1:0]  row,
  output logic           done
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  elem_t [N-1:0] a_q, b_q;
  logic [IW-1:0] idx;
  logic          busy;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy      <= 1'b0;
      idx       <= '0;
      row_valid <= 1'b0;
      done      <= 1'b0;
      row       <= '0;
      a_q       <= '0;
      b_q       <= '0;
    end else begin
      row_valid <= 1'b0;
      done      <= 1'b0;
      if (start && !busy) begin
        a_q  <= a;
        b_q  <= b;
        busy <= 1'b1;
        idx  <= '0;
      end else if (busy) begin
        for (int j = 0; j < N; j++) row[j] <= prod_t'(a_q[idx]) * prod_t'(b_q[j]);
        row_valid <= 1'b1;
        if (idx == IW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
