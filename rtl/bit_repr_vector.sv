// bit_repr_vector: bit representation c* of a ciphertext c (key switching,
// Eq. 3). Each element c_i is written as l signed digits b_ik in {-1, 0, 1}
// with c_i = sum_k b_ik 2^k, most significant digit first, so that
// c* = [b_1^T, ..., b_n^T]^T and S* c* = S c for the S* of bit_repr_matrix.
// A negative element gives the negated bits of its magnitude.
//
// Operation: with chipselect and write high, one element c_i per cycle is
// stored in a Dmem; width (n) and ell (l) must be held while loading. After the
// n-th element two priming cycles follow, then the n*l digits stream out on
// c_star_i, one per cycle with out_valid high, without gaps (the next element is
// prefetched from the Dmem while the current one is emitted). done pulses with
// the last digit. output_length = n*l. The load / convert / read-out structure
// follows the design; forming each digit during read-out instead of in a
// separate pass, the ell input and the wider count fields are this design's
// choices.
module bit_repr_vector
  import he_pkg::*;
#(
  parameter int MAX_N   = 256,
  parameter int MAX_ELL = 32,
  localparam int NW     = $clog2(MAX_N + 1),
  localparam int EW     = $clog2(MAX_ELL + 1),
  localparam int AW     = $clog2(MAX_N)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 chipselect,
  input  logic                 write,
  input  logic [NW-1:0]        width,
  input  logic [EW-1:0]        ell,
  input  elem_t                c_i,
  output logic [NW+EW-1:0]     output_length,
  output logic                 out_valid,
  output elem_t                c_star_i,
  output logic                 done
);
  typedef enum logic [1:0] {S_LOAD, S_WAIT, S_PRIME, S_EMIT} state_t;
  state_t        state;
  logic [NW-1:0] n_q, write_index, read_index;
  logic [EW-1:0] ell_q, digit;        // digit = position of the digit being emitted
  logic [31:0]   cur_mag;
  logic          cur_neg;
  logic [31:0]   rdata;
  logic          we, consume;
  logic [AW-1:0] raddr;

  assign we = (state == S_LOAD) && chipselect && write;

  dmem #(.DEPTH(MAX_N), .WIDTH(32)) u_dmem (
    .clk, .we, .waddr(write_index[AW-1:0]), .wdata(c_i),
    .raddr, .rdata(rdata)
  );

  // read_index is the next element to enter cur; when cur takes it, the Dmem
  // is already asked for the one after, so a digit leaves every cycle even
  // when l = 1
  assign consume = (state == S_PRIME) || (state == S_EMIT && digit == 0);
  assign raddr   = AW'(consume ? read_index + 1'b1 : read_index);

  assign output_length = NW'(n_q) * ell_q;
  assign out_valid     = (state == S_EMIT);
  assign c_star_i      = !cur_mag[digit[4:0]] ? '0 : (cur_neg ? -32'sd1 : 32'sd1);

  always_ff @(posedge clk) begin
    if (reset) begin
      state       <= S_LOAD;
      write_index <= '0;
      read_index  <= '0;
      n_q         <= '0;
      ell_q       <= '0;
      digit       <= '0;
      cur_mag     <= '0;
      cur_neg     <= 1'b0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_LOAD: if (we) begin
          n_q   <= width;
          ell_q <= ell;
          if (write_index + 1'b1 >= width) begin
            write_index <= '0;
            read_index  <= '0;
            state       <= S_WAIT;
          end else begin
            write_index <= write_index + 1'b1;
          end
        end
        S_WAIT:  state <= S_PRIME;      // address 0 is read after the last write
        S_PRIME: begin                 // rdata now holds element 0
          cur_neg    <= rdata[31];
          cur_mag    <= rdata[31] ? -rdata : rdata;
          digit      <= ell_q - 1'b1;
          read_index <= 1;
          state      <= S_EMIT;
        end
        S_EMIT: begin
          if (digit == 0) begin
            if (read_index >= n_q) begin
              done  <= 1'b1;
              state <= S_LOAD;
            end else begin
              cur_neg    <= rdata[31];
              cur_mag    <= rdata[31] ? -rdata : rdata;
              digit      <= ell_q - 1'b1;
              read_index <= read_index + 1'b1;
            end
          end else begin
            digit <= digit - 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
