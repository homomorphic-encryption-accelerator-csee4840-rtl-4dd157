// dmem_bank: a bank of NUM_BANKS Dmems behind one write port and one read port,
// used as the client accelerator's matrix cache. Each Dmem holds DEPTH rows of
// a matrix of up to 16 32-bit elements (512 bits), so one Dmem holds a whole
// 256 x 16 key-switching matrix (16 kB) and the default 8 Dmems 128 kB, the
// client-side memory of the design's budget. A write (we, wbank, waddr, wdata)
// takes one cycle; rdata holds row raddr of Dmem rbank one cycle after they are
// presented. Only the selected Dmem is written. The port arrangement is this
// design's choice; the design gives only the number and size of the Dmems.
module dmem_bank #(
  parameter int NUM_BANKS = 8,
  parameter int DEPTH     = 256,
  parameter int WIDTH     = 512,
  localparam int BW       = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [BW-1:0]    wbank,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [BW-1:0]    rbank,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] bank_rdata [NUM_BANKS];
  logic [BW-1:0]    rbank_q;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    dmem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_dmem (
      .clk, .we(we && wbank == BW'(b)), .waddr, .wdata, .raddr, .rdata(bank_rdata[b])
    );
  end

  always_ff @(posedge clk) rbank_q <= rbank;
  assign rdata = bank_rdata[rbank_q];
endmodule
