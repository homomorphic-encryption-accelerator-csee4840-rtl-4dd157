// he_pkg: constants and types shared by the homomorphic-encryption accelerator.
// Every ciphertext, key and matrix element is a 32-bit signed integer and the
// vector datapaths are 16 lanes wide, as the design specifies. Products of two
// elements (outer products) are kept at 64 bits until they are divided by w.
package he_pkg;
  localparam int LANES  = 16;   // elements handled per cycle
  localparam int DATA_W = 32;   // element width
  localparam int PROD_W = 64;   // width of a product of two elements

  typedef logic signed [DATA_W-1:0] elem_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef elem_t [LANES-1:0]        row_t;     // one 16-element row or vector

  // Operations of the server-side accelerator.
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,   // c = c1 + c2
    OP_LIN  = 2'd1,   // c' = M c
    OP_WIP  = 2'd2,   // weighted inner product, Eq. 18
    OP_POLY = 2'd3    // degree-2 polynomial (extended ciphertexts)
  } op_t;

  // Nearest-integer division, ties away from zero; divisor 0 gives 0.
  function automatic elem_t nint_div(input prod_t a, input elem_t w);
    logic [PROD_W:0]   ua, uw;
    logic [DATA_W-1:0] q;
    logic neg;
    if (w == 0) return '0;
    neg = a[PROD_W-1] ^ w[DATA_W-1];
    ua  = a[PROD_W-1] ? {1'b0, -a} : {1'b0, a};
    uw  = w[DATA_W-1] ? {{(PROD_W-DATA_W+1){1'b0}}, -w} : {{(PROD_W-DATA_W+1){1'b0}}, w};
    q   = DATA_W'((2 * ua + uw) / (2 * uw));
    return neg ? -elem_t'(q) : elem_t'(q);
  endfunction
endpackage
