// he_accel: top level of the homomorphic encryption accelerator for integer
// vectors. The client-side key-switching accelerator (key_switch_accel) and the
// server-side encrypted-domain accelerator (server_accel) stand side by side:
// client and server exchange key-switching matrices and results only through
// software, so the two share nothing but clock and reset. Ports prefixed cl_
// belong to the client side, sv_ to the server side; their meaning and timing
// are described in those two modules.
module he_accel
  import he_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  // ---- client side --------------------------------------------------------
  input  logic                 cl_brv_chipselect,
  input  logic                 cl_brv_write,
  input  logic [8:0]           cl_brv_width,
  input  logic [5:0]           cl_brv_ell,
  input  elem_t                cl_brv_c_i,
  output logic [14:0]          cl_brv_output_length,
  output logic                 cl_brv_out_valid,
  output elem_t                cl_brv_c_star_i,
  input  logic                 cl_brm_chipselect,
  input  logic                 cl_brm_write,
  input  logic [4:0]           cl_brm_width,
  input  logic [8:0]           cl_brm_length,
  input  logic [5:0]           cl_brm_ell,
  input  elem_t                cl_brm_S_ij,
  input  logic                 cl_brm_row_write,
  input  row_t                 cl_brm_S_row,
  output logic [8:0]           cl_brm_output_length,
  output logic [10:0]          cl_brm_output_width,
  output logic                 cl_brm_out_valid,
  output elem_t                cl_brm_S_star_ij,
  input  logic                 cl_rnd_chipselect,
  input  logic                 cl_rnd_gen,
  input  logic [8:0]           cl_rnd_length,
  input  logic [4:0]           cl_rnd_width,
  output logic                 cl_rnd_out_valid,
  output elem_t                cl_rnd_S_star_ij,
  input  logic                 cl_mm_b_we,
  input  logic [3:0]           cl_mm_b_row_idx,
  input  row_t                 cl_mm_b_row,
  input  logic                 cl_mm_a_valid,
  input  row_t                 cl_mm_a_row,
  output logic                 cl_mm_p_valid,
  output row_t                 cl_mm_p_row,
  input  logic                 cl_div_in_valid,
  input  prod_t [LANES-1:0]    cl_div_in_vec,
  input  elem_t                cl_div_w,
  output logic                 cl_div_out_valid,
  output row_t                 cl_div_out_vec,
  input  logic [4:0]           cl_vz_rows,
  input  logic                 cl_vz_in_valid,
  input  row_t                 cl_vz_in_row,
  output logic                 cl_vz_out_valid,
  output row_t                 cl_vz_out_chunk,
  output logic [3:0]           cl_vz_out_idx,
  output logic                 cl_vz_out_last,
  input  logic                 cl_km_we,
  input  logic [2:0]           cl_km_wbank,
  input  logic [7:0]           cl_km_waddr,
  input  row_t                 cl_km_wdata,
  input  logic [2:0]           cl_km_rbank,
  input  logic [7:0]           cl_km_raddr,
  output row_t                 cl_km_rdata,
  output logic                 cl_irq,
  // ---- server side --------------------------------------------------------
  input  logic                 sv_ct_we,
  input  logic [7:0]           sv_ct_waddr,
  input  row_t                 sv_ct_wdata,
  input  logic                 sv_cmd_valid,
  output logic                 sv_cmd_ready,
  input  op_t                  sv_cmd_op,
  input  logic [7:0]           sv_cmd_addr1,
  input  logic [7:0]           sv_cmd_addr2,
  input  elem_t                sv_cmd_w,
  input  logic [8:0]           sv_cmd_length,
  input  logic                 sv_m_valid,
  output logic                 sv_m_ready,
  input  row_t                 sv_m_row,
  output logic                 sv_res_valid,
  output row_t                 sv_res_data,
  output logic [8:0]           sv_res_row,
  output logic                 sv_irq
);
  key_switch_accel u_client (
    .clk, .reset,
    .brv_chipselect(cl_brv_chipselect), .brv_write(cl_brv_write), .brv_width(cl_brv_width),
    .brv_ell(cl_brv_ell), .brv_c_i(cl_brv_c_i), .brv_output_length(cl_brv_output_length),
    .brv_out_valid(cl_brv_out_valid), .brv_c_star_i(cl_brv_c_star_i),
    .brm_chipselect(cl_brm_chipselect), .brm_write(cl_brm_write), .brm_width(cl_brm_width),
    .brm_length(cl_brm_length), .brm_ell(cl_brm_ell), .brm_S_ij(cl_brm_S_ij),
    .brm_row_write(cl_brm_row_write), .brm_S_row(cl_brm_S_row),
    .brm_output_length(cl_brm_output_length), .brm_output_width(cl_brm_output_width),
    .brm_out_valid(cl_brm_out_valid), .brm_S_star_ij(cl_brm_S_star_ij),
    .rnd_chipselect(cl_rnd_chipselect), .rnd_gen(cl_rnd_gen), .rnd_length(cl_rnd_length),
    .rnd_width(cl_rnd_width), .rnd_out_valid(cl_rnd_out_valid), .rnd_S_star_ij(cl_rnd_S_star_ij),
    .mm_b_we(cl_mm_b_we), .mm_b_row_idx(cl_mm_b_row_idx), .mm_b_row(cl_mm_b_row),
    .mm_a_valid(cl_mm_a_valid), .mm_a_row(cl_mm_a_row), .mm_p_valid(cl_mm_p_valid),
    .mm_p_row(cl_mm_p_row),
    .div_in_valid(cl_div_in_valid), .div_in_vec(cl_div_in_vec), .div_w(cl_div_w),
    .div_out_valid(cl_div_out_valid), .div_out_vec(cl_div_out_vec),
    .vz_rows(cl_vz_rows), .vz_in_valid(cl_vz_in_valid), .vz_in_row(cl_vz_in_row),
    .vz_out_valid(cl_vz_out_valid), .vz_out_chunk(cl_vz_out_chunk),
    .vz_out_idx(cl_vz_out_idx), .vz_out_last(cl_vz_out_last),
    .km_we(cl_km_we), .km_wbank(cl_km_wbank), .km_waddr(cl_km_waddr),
    .km_wdata(cl_km_wdata), .km_rbank(cl_km_rbank), .km_raddr(cl_km_raddr),
    .km_rdata(cl_km_rdata),
    .irq(cl_irq)
  );

  server_accel u_server (
    .clk, .reset,
    .ct_we(sv_ct_we), .ct_waddr(sv_ct_waddr), .ct_wdata(sv_ct_wdata),
    .cmd_valid(sv_cmd_valid), .cmd_ready(sv_cmd_ready), .cmd_op(sv_cmd_op),
    .cmd_addr1(sv_cmd_addr1), .cmd_addr2(sv_cmd_addr2), .cmd_w(sv_cmd_w),
    .cmd_length(sv_cmd_length),
    .m_valid(sv_m_valid), .m_ready(sv_m_ready), .m_row(sv_m_row),
    .res_valid(sv_res_valid), .res_data(sv_res_data), .res_row(sv_res_row), .irq(sv_irq)
  );
endmodule
