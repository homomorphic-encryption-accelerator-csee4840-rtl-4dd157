// server_accel: server-side accelerator. It stores the encrypted database and
// runs the four encrypted-domain operations on it. Every operation has the two
// steps of the design: MEMORY READ fetches the ciphertexts at the addresses the
// driver gives, OPERATION runs the unit for the requested operation.
//
//   ct_*   write port of the ciphertext Dmem: one ciphertext of up to 16
//          elements per word, CT_DEPTH words.
//   cmd_*  a request, accepted when cmd_ready is high: operation (op_t),
//          addresses of c1 and c2, the scalar w and the number of rows of M.
//   m_*    rows of M (OP_LIN: one 16-element row per write) or chunks of rows
//          (OP_WIP: one write per row, OP_POLY: 16 writes per row), accepted
//          while m_ready is high, after the request.
//   res_*  results: the 16-element sum for OP_ADD, otherwise one 32-bit entry
//          of the result in lane 0 per row, res_row giving the row.
//   irq    pulses when the operation has delivered its last result.
// Timing: MEMORY READ takes the accept cycle (c1 addressed) and one more (c2
// addressed), then one issue cycle; an addition then answers on the next cycle, a linear
// transform one cycle after each row of M, the inner product units after their
// compute phase. OP_WIP uses the first 4 elements of each ciphertext, OP_POLY
// the first 15. The split into the two steps, the four units and the Dmem
// follow the design; the request format and the shared M and result streams
// are this design's choices.
module server_accel
  import he_pkg::*;
#(
  parameter int CT_DEPTH = 256,
  parameter int MAX_ROWS = 256,
  localparam int CA      = $clog2(CT_DEPTH),
  localparam int RW      = $clog2(MAX_ROWS + 1)
) (
  input  logic           clk,
  input  logic           reset,
  // ciphertext store
  input  logic           ct_we,
  input  logic [CA-1:0]  ct_waddr,
  input  row_t           ct_wdata,
  // request
  input  logic           cmd_valid,
  output logic           cmd_ready,
  input  op_t            cmd_op,
  input  logic [CA-1:0]  cmd_addr1,
  input  logic [CA-1:0]  cmd_addr2,
  input  elem_t          cmd_w,
  input  logic [RW-1:0]  cmd_length,
  // key-switching matrix stream
  input  logic           m_valid,
  output logic           m_ready,
  input  row_t           m_row,
  // results
  output logic           res_valid,
  output row_t           res_data,
  output logic [RW-1:0]  res_row,
  output logic           irq
);
  localparam int WIP_N  = 4;
  localparam int POLY_N = LANES - 1;
  localparam int POLY_CHUNKS = ((POLY_N + 1) * (POLY_N + 1) + LANES - 1) / LANES;
  localparam int MW     = RW + $clog2(POLY_CHUNKS + 1);

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_ISSUE, S_STREAM, S_WAIT} state_t;
  state_t         state;
  op_t            op_q;
  logic [CA-1:0]  addr2_q, raddr;
  elem_t          w_q;
  logic [RW-1:0]  len_q;
  logic [MW-1:0]  m_cnt, m_total;       // writes of M expected and received
  row_t           c1_q, ct_rdata;

  // ---- MEMORY READ: ciphertext Dmem -------------------------------------
  dmem #(.DEPTH(CT_DEPTH), .WIDTH(LANES * DATA_W)) u_ctmem (
    .clk, .we(ct_we), .waddr(ct_waddr), .wdata(ct_wdata), .raddr, .rdata(ct_rdata)
  );
  assign raddr = (state == S_IDLE) ? cmd_addr1 : addr2_q;

  // ---- OPERATION: the four units ----------------------------------------
  logic add_go, lin_go, wip_go, poly_go;
  row_t add_c;
  logic add_valid;
  elem_t lin_y, wip_c, poly_c;
  logic lin_valid, lin_done, wip_valid, wip_done, poly_valid, poly_done;
  logic [RW-1:0] lin_row, wip_row, poly_row;
  elem_t [WIP_N-1:0]  wip_c1, wip_c2;
  elem_t [POLY_N-1:0] poly_c1, poly_c2;
  logic               issue, m_fire;
  logic               wip_busy, poly_busy;

  assign issue  = (state == S_ISSUE);
  assign m_fire = (state == S_STREAM) && m_valid;
  assign add_go  = issue && (op_q == OP_ADD);
  assign lin_go  = m_fire && (op_q == OP_LIN);
  assign wip_go  = (issue || m_fire) && (op_q == OP_WIP);
  assign poly_go = (issue || m_fire) && (op_q == OP_POLY);

  for (genvar i = 0; i < WIP_N; i++) begin : g_wip_ct
    assign wip_c1[i] = c1_q[i];
    assign wip_c2[i] = ct_rdata[i];
  end
  for (genvar i = 0; i < POLY_N; i++) begin : g_poly_ct
    assign poly_c1[i] = c1_q[i];
    assign poly_c2[i] = ct_rdata[i];
  end

  vec_addition u_add (
    .clk, .reset, .chipselect(add_go), .write(add_go), .c1(c1_q), .c2(ct_rdata),
    .c(add_c), .out_valid(add_valid)
  );

  linear_transform #(.MAX_ROWS(MAX_ROWS)) u_lin (
    .clk, .reset, .chipselect(lin_go), .write(lin_go), .length(len_q), .W_row(m_row),
    .c(c1_q), .y_i(lin_y), .y_valid(lin_valid), .y_row(lin_row), .done(lin_done)
  );

  weighted_inner_prod #(.N(WIP_N), .MAX_ROWS(MAX_ROWS)) u_wip (
    .clk, .reset, .chipselect(wip_go), .write(wip_go), .w(w_q), .c1(wip_c1), .c2(wip_c2),
    .length(len_q), .W_row(m_row), .c(wip_c), .c_valid(wip_valid), .c_row(wip_row),
    .done(wip_done), .busy(wip_busy)
  );

  polynomial_accel #(.MAX_ROWS(MAX_ROWS)) u_poly (
    .clk, .reset, .chipselect(poly_go), .write(poly_go), .w(w_q), .c1(poly_c1), .c2(poly_c2),
    .length(len_q), .W_row(m_row), .c(poly_c), .c_valid(poly_valid), .c_row(poly_row),
    .done(poly_done), .busy(poly_busy)
  );

  // ---- control ----------------------------------------------------------
  logic op_done;
  always_comb begin
    unique case (op_q)
      OP_ADD:  op_done = add_valid;
      OP_LIN:  op_done = lin_done;
      OP_WIP:  op_done = wip_done;
      default: op_done = poly_done;
    endcase
  end

  assign cmd_ready = (state == S_IDLE);
  assign m_ready   = (state == S_STREAM);

  always_ff @(posedge clk) begin
    if (reset) begin
      state   <= S_IDLE;
      op_q    <= OP_ADD;
      addr2_q <= '0;
      w_q     <= '0;
      len_q   <= '0;
      c1_q    <= '0;
      m_cnt   <= '0;
      m_total <= '0;
      irq     <= 1'b0;
    end else begin
      irq <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op_q    <= cmd_op;
          addr2_q <= cmd_addr2;
          w_q     <= cmd_w;
          len_q   <= cmd_length;
          state   <= S_RD1;
        end
        S_RD1: begin                           // c1 is on ct_rdata, c2 follows
          c1_q  <= ct_rdata;
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          m_cnt   <= '0;
          m_total <= (op_q == OP_POLY) ? MW'(len_q) * MW'(POLY_CHUNKS) : MW'(len_q);
          state   <= (op_q == OP_ADD) ? S_WAIT : S_STREAM;
        end
        S_STREAM: if (m_fire) begin
          m_cnt <= m_cnt + 1'b1;
          if (m_cnt + 1'b1 >= m_total) state <= S_WAIT;
        end
        S_WAIT: if (op_done) begin
          irq   <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // An inner-product unit must still be taking M while rows are streamed to it.
  a_m_stream_wip: assert property (@(posedge clk) disable iff (reset)
    (state == S_STREAM && op_q == OP_WIP) |-> wip_busy);
  a_m_stream_poly: assert property (@(posedge clk) disable iff (reset)
    (state == S_STREAM && op_q == OP_POLY) |-> poly_busy);

  // ---- result mux -------------------------------------------------------
  always_comb begin
    res_data  = '0;
    res_valid = 1'b0;
    res_row   = '0;
    unique case (op_q)
      OP_ADD: begin
        res_data  = add_c;
        res_valid = add_valid;
      end
      OP_LIN: begin
        res_data[0] = lin_y;
        res_valid   = lin_valid;
        res_row     = lin_row;
      end
      OP_WIP: begin
        res_data[0] = wip_c;
        res_valid   = wip_valid;
        res_row     = wip_row;
      end
      default: begin
        res_data[0] = poly_c;
        res_valid   = poly_valid;
        res_row     = poly_row;
      end
    endcase
  end
endmodule
