// key_switch_accel: client-side accelerator. It holds the units the client's
// driver needs to build a key-switching matrix M = [S* - TA + E; A] (Eq. 6) and
// to decrypt (x = round(Sc / w), Eq. 9):
//   brv_*  bit_repr_vector     c  -> c*                          (Eq. 3)
//   brm_*  bit_repr_matrix     S  -> S*                          (Eq. 4)
//   rnd_*  get_random_matrix   Gaussian matrices A and E         (Eq. 6)
//   mm_*   mat_mult            TA, Sc, GS, HS, S^T HS
//   div_*  nint_vector_divide  round(v / w)
//   vz_*   vectorize           vec(S^T H S) for the polynomial key (16 x 16 at
//                              most, vz_rows = n, 16 chunks of 16 entries)
//   km_*   dmem_bank           8 Dmems of 256 x 512 bits holding matrices
//                              (S, S*, A, E, M) between the steps above
// Each unit is reached by its own group of ports, one group per ioctl of the
// driver, and the driver sequences them; the units share no data path, as the
// software flow of the design assembles M from their results. irq pulses when
// any unit finishes (the OR of their done / valid strobes); this merging of
// interrupts is this design's choice. Timing is that of each unit.
module key_switch_accel
  import he_pkg::*;
#(
  parameter int MAX_N    = 256,
  parameter int MAX_ROWS = 256,
  parameter int MAX_COLS = LANES,
  parameter int MAX_ELL  = 32,
  localparam int NW      = $clog2(MAX_N + 1),
  localparam int RW      = $clog2(MAX_ROWS + 1),
  localparam int CW      = $clog2(MAX_COLS + 1),
  localparam int EW      = $clog2(MAX_ELL + 1)
) (
  input  logic                 clk,
  input  logic                 reset,
  // bit representation of a vector
  input  logic                 brv_chipselect,
  input  logic                 brv_write,
  input  logic [NW-1:0]        brv_width,
  input  logic [EW-1:0]        brv_ell,
  input  elem_t                brv_c_i,
  output logic [NW+EW-1:0]     brv_output_length,
  output logic                 brv_out_valid,
  output elem_t                brv_c_star_i,
  // bit representation of a matrix
  input  logic                 brm_chipselect,
  input  logic                 brm_write,
  input  logic [CW-1:0]        brm_width,
  input  logic [RW-1:0]        brm_length,
  input  logic [EW-1:0]        brm_ell,
  input  elem_t                brm_S_ij,
  input  logic                 brm_row_write,
  input  elem_t [MAX_COLS-1:0] brm_S_row,
  output logic [RW-1:0]        brm_output_length,
  output logic [CW+EW-1:0]     brm_output_width,
  output logic                 brm_out_valid,
  output elem_t                brm_S_star_ij,
  // random Gaussian matrix
  input  logic                 rnd_chipselect,
  input  logic                 rnd_gen,
  input  logic [RW-1:0]        rnd_length,
  input  logic [CW-1:0]        rnd_width,
  output logic                 rnd_out_valid,
  output elem_t                rnd_S_star_ij,
  // matrix multiplication
  input  logic                 mm_b_we,
  input  logic [$clog2(LANES)-1:0] mm_b_row_idx,
  input  row_t                 mm_b_row,
  input  logic                 mm_a_valid,
  input  row_t                 mm_a_row,
  output logic                 mm_p_valid,
  output row_t                 mm_p_row,
  // nearest-integer vector division
  input  logic                 div_in_valid,
  input  prod_t [LANES-1:0]    div_in_vec,
  input  elem_t                div_w,
  output logic                 div_out_valid,
  output row_t                 div_out_vec,
  // matrix vectorization
  input  logic [4:0]           vz_rows,
  input  logic                 vz_in_valid,
  input  row_t                 vz_in_row,
  output logic                 vz_out_valid,
  output row_t                 vz_out_chunk,
  output logic [3:0]           vz_out_idx,
  output logic                 vz_out_last,
  // matrix cache: write (km_we, km_wbank, km_waddr, km_wdata); km_rdata holds
  // row km_raddr of Dmem km_rbank one cycle after they are presented
  input  logic                 km_we,
  input  logic [2:0]           km_wbank,
  input  logic [7:0]           km_waddr,
  input  row_t                 km_wdata,
  input  logic [2:0]           km_rbank,
  input  logic [7:0]           km_raddr,
  output row_t                 km_rdata,
  // interrupt
  output logic                 irq
);
  logic brv_done, brm_done, rnd_done;

  dmem_bank #(.NUM_BANKS(8), .DEPTH(256), .WIDTH(LANES * DATA_W)) u_km (
    .clk, .we(km_we), .wbank(km_wbank), .waddr(km_waddr), .wdata(km_wdata),
    .rbank(km_rbank), .raddr(km_raddr), .rdata(km_rdata)
  );

  bit_repr_vector #(.MAX_N(MAX_N), .MAX_ELL(MAX_ELL)) u_brv (
    .clk, .reset, .chipselect(brv_chipselect), .write(brv_write), .width(brv_width),
    .ell(brv_ell), .c_i(brv_c_i), .output_length(brv_output_length),
    .out_valid(brv_out_valid), .c_star_i(brv_c_star_i), .done(brv_done)
  );

  bit_repr_matrix #(.MAX_ROWS(MAX_ROWS), .MAX_COLS(MAX_COLS), .MAX_ELL(MAX_ELL)) u_brm (
    .clk, .reset, .chipselect(brm_chipselect), .write(brm_write), .width(brm_width),
    .length(brm_length), .ell(brm_ell), .S_ij(brm_S_ij),
    .row_write(brm_row_write), .S_row(brm_S_row),
    .output_length(brm_output_length), .output_width(brm_output_width),
    .out_valid(brm_out_valid), .S_star_ij(brm_S_star_ij), .done(brm_done)
  );

  get_random_matrix #(.MAX_ROWS(MAX_ROWS), .MAX_COLS(MAX_COLS)) u_rnd (
    .clk, .reset, .chipselect(rnd_chipselect), .gen(rnd_gen), .length(rnd_length),
    .width(rnd_width), .out_valid(rnd_out_valid), .S_star_ij(rnd_S_star_ij), .done(rnd_done)
  );

  mat_mult #(.N(LANES)) u_mm (
    .clk, .reset, .b_we(mm_b_we), .b_row_idx(mm_b_row_idx), .b_row(mm_b_row),
    .a_valid(mm_a_valid), .a_row(mm_a_row), .p_valid(mm_p_valid), .p_row(mm_p_row)
  );

  nint_vector_divide #(.N(LANES)) u_div (
    .clk, .reset, .in_valid(div_in_valid), .in_vec(div_in_vec), .w(div_w),
    .out_valid(div_out_valid), .out_vec(div_out_vec)
  );

  vectorize #(.ROWS(LANES), .COLS(LANES), .OUT_LANES(LANES), .W(DATA_W)) u_vz (
    .clk, .reset, .rows(vz_rows), .in_valid(vz_in_valid), .in_row(vz_in_row),
    .out_valid(vz_out_valid), .out_chunk(vz_out_chunk), .out_idx(vz_out_idx),
    .out_last(vz_out_last)
  );

  always_ff @(posedge clk) begin
    if (reset) irq <= 1'b0;
    else       irq <= brv_done | brm_done | rnd_done | mm_p_valid | div_out_valid | vz_out_last;
  end
endmodule
