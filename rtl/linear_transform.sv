// linear_transform: linear transformation accelerator of the server. It
// applies the key-switching matrix M received from the client to a ciphertext
// c (c' = M c, Eq. 13). Each cycle with chipselect and write high brings one
// LANES-element row W_row of M together with c; the next cycle y_i holds the
// inner product W_row . c (wrapping modulo 2^32), with y_valid high and y_row
// giving the row number. An m-row matrix (length = m) takes m cycles; done
// marks the result of the last row, after which the row count restarts. The
// row-per-cycle dot product follows the design; unused columns are sent as
// zeros instead of using a width field.
module linear_transform
  import he_pkg::*;
#(
  parameter int N        = LANES,
  parameter int MAX_ROWS = 256,
  localparam int RW      = $clog2(MAX_ROWS + 1)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           chipselect,
  input  logic           write,
  input  logic [RW-1:0]  length,
  input  elem_t [N-1:0]  W_row,
  input  elem_t [N-1:0]  c,
  output elem_t          y_i,
  output logic           y_valid,
  output logic [RW-1:0]  y_row,
  output logic           done
);
  logic [RW-1:0] current_row_num;
  elem_t         dot;

  always_comb begin
    dot = '0;
    for (int k = 0; k < N; k++) dot = dot + W_row[k] * c[k];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      current_row_num <= '0;
      y_i             <= '0;
      y_valid         <= 1'b0;
      y_row           <= '0;
      done            <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      done    <= 1'b0;
      if (chipselect && write) begin
        y_i     <= dot;
        y_valid <= 1'b1;
        y_row   <= current_row_num;
        if (current_row_num + 1'b1 >= length) begin
          current_row_num <= '0;
          done            <= 1'b1;
        end else begin
          current_row_num <= current_row_num + 1'b1;
        end
      end
    end
  end
endmodule
