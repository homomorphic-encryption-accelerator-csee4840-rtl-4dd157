// get_random_matrix: random Gaussian matrix generator of the key-switching
// accelerator (the matrices A and E of Eq. 6). NUM_LFSR LFSRs advance every
// cycle; each sample is the sum of their low U_BITS bits minus the mean of that
// sum, which by the central limit theorem is close to a zero-mean Gaussian
// (range +-NUM_LFSR*(2^U_BITS-1)/2; about sigma 9.2 with the defaults).
//
// Operation: a cycle with chipselect and gen high starts generation of a
// length x width matrix (length <= MAX_ROWS, width <= MAX_COLS), one sample per
// cycle, into a Dmem. Then the matrix is read out row-major on S_star_ij, one
// sample per cycle with out_valid high, the first one length*width+3 cycles
// after the gen cycle; done pulses with the last. The use of several LFSRs per
// Gaussian sample follows the design; the sum-of-uniforms construction, the
// seeds and the spread are this design's choices (the design gives no sigma).
module get_random_matrix
  import he_pkg::*;
#(
  parameter int NUM_LFSR = 4,
  parameter int U_BITS   = 4,
  parameter int MAX_ROWS = 256,
  parameter int MAX_COLS = 16,
  localparam int RW      = $clog2(MAX_ROWS + 1),
  localparam int CW      = $clog2(MAX_COLS + 1),
  localparam int RA      = $clog2(MAX_ROWS),
  localparam int CA      = $clog2(MAX_COLS)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           chipselect,
  input  logic           gen,
  input  logic [RW-1:0]  length,
  input  logic [CW-1:0]  width,
  output logic           out_valid,
  output elem_t          S_star_ij,
  output logic           done
);
  localparam int MEAN = NUM_LFSR * ((1 << U_BITS) - 1) / 2;

  typedef enum logic [1:0] {S_IDLE, S_GEN, S_READ} state_t;
  state_t        state;
  logic [RW-1:0] m_q, row;
  logic [CW-1:0] n_q, col;
  logic [31:0]   lfsr_state [NUM_LFSR];
  elem_t         sample;
  logic          rd_active, rd_last;

  for (genvar g = 0; g < NUM_LFSR; g++) begin : g_lfsr
    lfsr #(.SEED(32'h1 + 32'h9E37_79B9 * (g + 1))) u_lfsr (
      .clk, .reset, .en(1'b1), .seed_load(1'b0), .seed(32'h0),
      .state(lfsr_state[g])
    );
  end

  always_comb begin
    sample = -elem_t'(MEAN);
    for (int g = 0; g < NUM_LFSR; g++)
      sample = sample + elem_t'({1'b0, lfsr_state[g][U_BITS-1:0]});
  end

  dmem #(.DEPTH(MAX_ROWS * MAX_COLS), .WIDTH(32)) u_dmem (
    .clk, .we(state == S_GEN), .waddr({row[RA-1:0], col[CA-1:0]}), .wdata(sample),
    .raddr({row[RA-1:0], col[CA-1:0]}), .rdata(S_star_ij)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_IDLE;
      m_q       <= '0;
      n_q       <= '0;
      row       <= '0;
      col       <= '0;
      rd_active <= 1'b0;
      rd_last   <= 1'b0;
      out_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      // the Dmem read is one cycle late: delay valid and last to match it
      out_valid <= rd_active;
      done      <= rd_last;
      rd_active <= 1'b0;
      rd_last   <= 1'b0;
      unique case (state)
        S_IDLE: if (chipselect && gen) begin
          m_q   <= length;
          n_q   <= width;
          row   <= '0;
          col   <= '0;
          state <= S_GEN;
        end
        S_GEN, S_READ: begin
          if (state == S_READ) rd_active <= 1'b1;
          if (col + 1'b1 >= n_q) begin
            col <= '0;
            if (row + 1'b1 >= m_q) begin
              row   <= '0;
              if (state == S_READ) rd_last <= 1'b1;
              state <= (state == S_GEN) ? S_READ : S_IDLE;
            end else begin
              row <= row + 1'b1;
            end
          end else begin
            col <= col + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
