// polynomial_accel: polynomial accelerator of the server. A degree-2
// polynomial of the plaintext is a weighted inner product of the extended
// plaintext [1, x], whose ciphertext is [w, c] under the key of Eq. 19. This
// unit is the weighted inner product engine with that extension built in:
// ciphertexts of N = 15 elements become 16-element vectors, so each row of the
// key-switching matrix has 256 entries and arrives in 16 writes of 16 entries.
// Interface and timing are those of weighted_inner_prod. Higher degrees are
// built by software from a sequence of such inner products. Reusing the inner
// product engine follows the design; reading "16-element vectors" as the
// extended length is this design's choice.
module polynomial_accel
  import he_pkg::*;
#(
  parameter int N        = LANES - 1,
  parameter int MAX_ROWS = 256,
  localparam int RW      = $clog2(MAX_ROWS + 1)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           chipselect,
  input  logic           write,
  input  elem_t          w,
  input  elem_t [N-1:0]  c1,
  input  elem_t [N-1:0]  c2,
  input  logic [RW-1:0]  length,
  input  row_t           W_row,
  output elem_t          c,
  output logic           c_valid,
  output logic [RW-1:0]  c_row,
  output logic           done,
  output logic           busy
);
  weighted_inner_prod #(.N(N), .EXTEND(1), .MAX_ROWS(MAX_ROWS)) u_wip (
    .clk, .reset, .chipselect, .write, .w, .c1, .c2, .length, .W_row,
    .c, .c_valid, .c_row, .done, .busy
  );
endmodule
