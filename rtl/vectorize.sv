// vectorize: turns a rows x COLS matrix A (rows <= ROWS, an input held while
// the matrix is loaded), delivered one row per cycle, into vec(A), the columns
// of A stacked (entry (r, c) goes to position c*rows + r), and emits all CHUNKS
// chunks of OUT_LANES entries; positions past rows*COLS are zero. A matrix with
// fewer than COLS columns is sent with its unused columns zero, so that an
// n x n matrix (n <= COLS, rows = n) gives vec(A) followed by zeros. After the
// rows-th row arrives the chunks follow on consecutive cycles (out_valid,
// out_idx, out_last on the final one). A new matrix may start once out_last has
// been seen. The column-major order follows the design's definition of vec();
// the runtime row count and the streaming interface are this design's choice.
module vectorize
  import he_pkg::*;
#(
  parameter int ROWS      = 4,
  parameter int COLS      = 4,
  parameter int OUT_LANES = LANES,
  parameter int W         = PROD_W,
  localparam int CHUNKS   = (ROWS * COLS + OUT_LANES - 1) / OUT_LANES,
  localparam int CW       = (CHUNKS > 1) ? $clog2(CHUNKS) : 1,
  localparam int NW       = $clog2(ROWS + 1)
) (
  input  logic                              clk,
  input  logic                              reset,
  input  logic [NW-1:0]                     rows,
  input  logic                              in_valid,
  input  logic [COLS-1:0][W-1:0]            in_row,
  output logic                              out_valid,
  output logic [OUT_LANES-1:0][W-1:0]       out_chunk,
  output logic [CW-1:0]                     out_idx,
  output logic                              out_last
);
  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  logic [W-1:0] vec [CHUNKS * OUT_LANES];
  logic [RW-1:0] row_cnt;
  logic [CW-1:0] chunk;
  logic          emitting;

  always_ff @(posedge clk) begin
    if (reset) begin
      row_cnt   <= '0;
      chunk     <= '0;
      emitting  <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_chunk <= '0;
      for (int i = 0; i < CHUNKS * OUT_LANES; i++) vec[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (in_valid && !emitting) begin
        for (int c = 0; c < COLS; c++) vec[c * int'(rows) + int'(row_cnt)] <= in_row[c];
        if (int'(row_cnt) + 1 >= int'(rows)) begin
          row_cnt  <= '0;
          emitting <= 1'b1;
          chunk    <= '0;
        end else begin
          row_cnt <= row_cnt + 1'b1;
        end
      end else if (emitting) begin
        for (int l = 0; l < OUT_LANES; l++)
          out_chunk[l] <= (int'(chunk) * OUT_LANES + l < COLS * int'(rows))
                          ? vec[int'(chunk) * OUT_LANES + l] : '0;
        out_valid <= 1'b1;
        out_idx   <= chunk;
        if (chunk == CW'(CHUNKS - 1)) begin
          out_last <= 1'b1;
          emitting <= 1'b0;
        end else begin
          chunk <= chunk + 1'b1;
        end
      end
    end
  end
endmodule
