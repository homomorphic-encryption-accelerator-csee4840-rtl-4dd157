// bit_repr_matrix: bit representation S* of a secret key S (key switching,
// Eq. 4). Every entry S_ij becomes the l entries [2^(l-1) S_ij, ..., 2 S_ij,
// S_ij], so an m x n key becomes m x n*l and S* c* = S c.
//
// Operation: S is loaded row by row (length = m rows, width = n columns,
// ell = l, all held while loading), either one entry per cycle (chipselect and
// write, S_ij) or one whole row per cycle over MAX_COLS 32-bit inputs
// (chipselect and row_write, S_row). Each column has its own Dmem, one word per
// row, so both kinds of write take one cycle. After the last write two
// priming cycles follow, then S* streams out row-major on S_star_ij, one entry
// per cycle with out_valid high; done pulses with the last entry.
// output_length = m, output_width = n*l. Entries wrap modulo 2^32. The
// load / convert / read-out structure, the per-entry write and the 16-wide
// row write follow the design; the per-column Dmems, the ell input and the
// count widths are this design's choices.
module bit_repr_matrix
  import he_pkg::*;
#(
  parameter int MAX_ROWS = 256,
  parameter int MAX_COLS = 16,
  parameter int MAX_ELL  = 32,
  localparam int RW      = $clog2(MAX_ROWS + 1),
  localparam int CW      = $clog2(MAX_COLS + 1),
  localparam int EW      = $clog2(MAX_ELL + 1),
  localparam int RA      = $clog2(MAX_ROWS),
  localparam int CA      = $clog2(MAX_COLS)
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                chipselect,
  input  logic                write,
  input  logic [CW-1:0]       width,
  input  logic [RW-1:0]       length,
  input  logic [EW-1:0]       ell,
  input  elem_t               S_ij,
  input  logic                row_write,
  input  elem_t [MAX_COLS-1:0] S_row,
  output logic [RW-1:0]       output_length,
  output logic [CW+EW-1:0]    output_width,
  output logic                out_valid,
  output elem_t               S_star_ij,
  output logic                done
);
  typedef enum logic [1:0] {S_LOAD, S_WAIT, S_PRIME, S_EMIT} state_t;
  state_t        state;
  logic [RW-1:0] m_q, wr_row, rd_row;
  logic [CW-1:0] n_q, wr_col, rd_col;
  logic [EW-1:0] ell_q, pos;          // pos = power of two of the current entry
  elem_t         cur;
  elem_t         rdata;
  elem_t [MAX_COLS-1:0] lane_rdata;
  logic          we, rwe, consume;
  logic [RW-1:0] nx_row;
  logic [CW-1:0] nx_col;

  assign we  = (state == S_LOAD) && chipselect && write;
  assign rwe = (state == S_LOAD) && chipselect && row_write && !write;

  for (genvar j = 0; j < MAX_COLS; j++) begin : g_col
    dmem #(.DEPTH(MAX_ROWS), .WIDTH(32)) u_dmem (
      .clk,
      .we(rwe || (we && wr_col == CW'(j))),
      .waddr(wr_row[RA-1:0]),
      .wdata(rwe ? S_row[j] : S_ij),
      .raddr(consume ? nx_row[RA-1:0] : rd_row[RA-1:0]),
      .rdata(lane_rdata[j])
    );
  end
  assign rdata = lane_rdata[rd_col[CA-1:0]];

  // (rd_row, rd_col) is the next entry to enter cur; when cur takes it the
  // Dmem is already asked for the one after, so an entry leaves every cycle
  assign consume = (state == S_PRIME) || (state == S_EMIT && pos == 0);
  assign nx_col  = (rd_col + 1'b1 >= n_q) ? '0 : rd_col + 1'b1;
  assign nx_row  = (rd_col + 1'b1 >= n_q) ? rd_row + 1'b1 : rd_row;

  assign output_length = m_q;
  assign output_width  = (CW+EW)'(n_q) * ell_q;
  assign out_valid     = (state == S_EMIT);
  assign S_star_ij     = cur << pos;

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= S_LOAD;
      m_q    <= '0;
      n_q    <= '0;
      ell_q  <= '0;
      wr_row <= '0;
      wr_col <= '0;
      rd_row <= '0;
      rd_col <= '0;
      pos    <= '0;
      cur    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_LOAD: if (we || rwe) begin
          m_q   <= length;
          n_q   <= width;
          ell_q <= ell;
          if (rwe || wr_col + 1'b1 >= width) begin
            wr_col <= '0;
            if (wr_row + 1'b1 >= length) begin
              wr_row <= '0;
              rd_row <= '0;
              rd_col <= '0;
              state  <= S_WAIT;
            end else begin
              wr_row <= wr_row + 1'b1;
            end
          end else begin
            wr_col <= wr_col + 1'b1;
          end
        end
        S_WAIT:  state <= S_PRIME;      // address 0 is read after the last write
        S_PRIME: begin                 // rdata holds S_00; prefetch S_01 or S_10
          cur   <= rdata;
          pos   <= ell_q - 1'b1;
          state <= S_EMIT;
          rd_row <= nx_row;
          rd_col <= nx_col;
        end
        S_EMIT: begin
          if (pos == 0) begin
            if (rd_row >= m_q) begin
              done  <= 1'b1;
              state <= S_LOAD;
            end else begin
              cur <= rdata;
              pos <= ell_q - 1'b1;
              rd_row <= nx_row;
              rd_col <= nx_col;
            end
          end else begin
            pos <= pos - 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
