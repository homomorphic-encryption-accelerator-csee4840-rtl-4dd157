// weighted_inner_prod: weighted inner product accelerator of the server
// (Eq. 16-18). Given ciphertexts c1, c2 of N elements, the scalar w and a
// key-switching matrix M it returns c'' = M round(vec(c1 c2^T) / w), whose
// entries decrypt to weighted inner products x1^T H_j x2.
//
// Operation, one job at a time:
//  1. LOAD   - the first cycle with chipselect and write high latches c1, c2, w
//              and length (rows of M). Each following write delivers one
//              LANES-entry chunk of a row of M; a row of NE*NE entries takes
//              CHUNKS writes. The chunks are kept in a Dmem.
//  2. OUTER  - outer_product forms c1 c2^T one row per cycle, vectorize stacks
//              its columns (vec of Definition B5) and emits LANES-entry chunks,
//              and nint_vector_divide rounds each chunk divided by w; the
//              result c' is held in registers.
//  3. DOT    - the rows of M are read back and each is dotted with c'; one
//              32-bit result per row appears on c with c_valid, c_row giving
//              the row, one row every CHUNKS cycles; done marks the last.
// The first result comes NE + 2*CHUNKS + 5 cycles after the cycle of the last
// chunk of M (11 cycles for N = 4, 53 for the polynomial unit).
// With EXTEND = 1 both ciphertexts are first extended to [w, c] (Eq. 19), which
// turns the unit into the polynomial accelerator. The stages, the Dmem for M and
// the helper units follow the design; the chunked row transfer, the streamed
// results and the exact cycle schedule are this design's choices. Arithmetic
// after the division wraps modulo 2^32.
module weighted_inner_prod
  import he_pkg::*;
#(
  parameter int N        = 4,
  parameter int EXTEND   = 0,
  parameter int MAX_ROWS = 256,
  localparam int NE      = N + EXTEND,
  localparam int L       = NE * NE,
  localparam int CHUNKS  = (L + LANES - 1) / LANES,
  localparam int KW      = (CHUNKS > 1) ? $clog2(CHUNKS) : 1,
  localparam int RW      = $clog2(MAX_ROWS + 1),
  localparam int DEPTH   = MAX_ROWS * CHUNKS,
  localparam int AW      = $clog2(DEPTH)
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
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_OUTER, S_DOT} state_t;
  state_t         state;
  elem_t [NE-1:0] a_q, b_q;
  elem_t          w_q;
  logic [RW-1:0]  m_q;
  logic [RW-1:0]  ld_row, rd_row, rd_row_d;
  logic [KW-1:0]  ld_k, rd_k, rd_k_d;
  logic           rd_active, rd_valid_d, rd_last_d;
  row_t           cprime [CHUNKS];
  elem_t          acc, chunk_dot;

  // ---- M storage -------------------------------------------------------
  logic           we;
  logic [AW-1:0]  waddr, raddr;
  row_t           rdata;

  assign we    = (state == S_LOAD) && chipselect && write;
  assign waddr = AW'(ld_row * CHUNKS + ld_k);
  assign raddr = AW'(rd_row * CHUNKS + rd_k);

  dmem #(.DEPTH(DEPTH), .WIDTH(LANES * DATA_W)) u_mmem (
    .clk, .we, .waddr, .wdata(W_row), .raddr, .rdata(rdata)
  );

  // ---- outer product -> vectorize -> nearest-integer division -----------
  logic                 op_start, op_valid, op_done;
  prod_t [NE-1:0]       op_row;
  logic                 vz_valid, vz_last;
  prod_t [LANES-1:0]    vz_chunk;
  logic [KW-1:0]        vz_idx, dv_idx;
  logic                 dv_valid, dv_last;
  elem_t [LANES-1:0]    dv_vec;

  assign op_start = (state == S_LOAD) && we && (ld_row + 1'b1 >= m_q) &&
                    (ld_k == KW'(CHUNKS - 1));

  outer_product #(.N(NE)) u_outer (
    .clk, .reset, .start(op_start), .a(a_q), .b(b_q),
    .row_valid(op_valid), .row(op_row), .done(op_done)
  );

  vectorize #(.ROWS(NE), .COLS(NE), .OUT_LANES(LANES), .W(PROD_W)) u_vec (
    .clk, .reset, .rows(($clog2(NE + 1))'(NE)), .in_valid(op_valid), .in_row(op_row),
    .out_valid(vz_valid), .out_chunk(vz_chunk), .out_idx(vz_idx), .out_last(vz_last)
  );

  nint_vector_divide #(.N(LANES)) u_div (
    .clk, .reset, .in_valid(vz_valid), .in_vec(vz_chunk), .w(w_q),
    .out_valid(dv_valid), .out_vec(dv_vec)
  );

  always_comb begin
    chunk_dot = '0;
    for (int l = 0; l < LANES; l++) chunk_dot = chunk_dot + rdata[l] * cprime[rd_k_d][l];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= S_IDLE;
      a_q        <= '0;
      b_q        <= '0;
      w_q        <= '0;
      m_q        <= '0;
      ld_row     <= '0;
      ld_k       <= '0;
      rd_row     <= '0;
      rd_k       <= '0;
      rd_row_d   <= '0;
      rd_k_d     <= '0;
      rd_active  <= 1'b0;
      rd_valid_d <= 1'b0;
      rd_last_d  <= 1'b0;
      dv_idx     <= '0;
      dv_last    <= 1'b0;
      acc        <= '0;
      c          <= '0;
      c_valid    <= 1'b0;
      c_row      <= '0;
      done       <= 1'b0;
      for (int k = 0; k < CHUNKS; k++) cprime[k] <= '0;
    end else begin
      c_valid <= 1'b0;
      done    <= 1'b0;
      // index and last flag travel alongside the divider's one-cycle latency
      dv_idx  <= vz_idx;
      dv_last <= vz_last;
      unique case (state)
        S_IDLE: if (chipselect && write) begin
          for (int i = 0; i < N; i++) begin
            a_q[i + EXTEND] <= c1[i];
            b_q[i + EXTEND] <= c2[i];
          end
          if (EXTEND != 0) begin
            a_q[0] <= w;
            b_q[0] <= w;
          end
          w_q    <= w;
          m_q    <= length;
          ld_row <= '0;
          ld_k   <= '0;
          state  <= S_LOAD;
        end
        S_LOAD: if (we) begin
          if (ld_k == KW'(CHUNKS - 1)) begin
            ld_k <= '0;
            if (ld_row + 1'b1 >= m_q) state <= S_OUTER;
            else ld_row <= ld_row + 1'b1;
          end else begin
            ld_k <= ld_k + 1'b1;
          end
        end
        S_OUTER: if (dv_valid) begin
          cprime[dv_idx] <= dv_vec;
          if (dv_last) begin
            state     <= S_DOT;
            rd_row    <= '0;
            rd_k      <= '0;
            rd_active <= 1'b1;
            acc       <= '0;
          end
        end
        S_DOT: begin
          // issue stage: walk the Dmem addresses of M row by row
          if (rd_active) begin
            if (rd_k == KW'(CHUNKS - 1)) begin
              rd_k <= '0;
              if (rd_row + 1'b1 >= m_q) rd_active <= 1'b0;
              else rd_row <= rd_row + 1'b1;
            end else begin
              rd_k <= rd_k + 1'b1;
            end
          end
          // accumulate stage: the chunk read last cycle is in rdata
          if (rd_valid_d) begin
            if (rd_k_d == KW'(CHUNKS - 1)) begin
              c       <= acc + chunk_dot;
              c_valid <= 1'b1;
              c_row   <= rd_row_d;
              acc     <= '0;
              if (rd_last_d) begin
                done  <= 1'b1;
                state <= S_IDLE;
              end
            end else begin
              acc <= acc + chunk_dot;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
      rd_valid_d <= (state == S_DOT) && rd_active;
      rd_k_d     <= rd_k;
      rd_row_d   <= rd_row;
      rd_last_d  <= (rd_k == KW'(CHUNKS - 1)) && (rd_row + 1'b1 >= m_q);
    end
  end

  assign busy = (state != S_IDLE);

  // unused observation of the outer product's completion flag
  logic unused_ok;
  assign unused_ok = op_done;
endmodule
