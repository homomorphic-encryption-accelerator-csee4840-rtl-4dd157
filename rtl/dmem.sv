// dmem: on-chip data memory ("Dmem"). One synchronous write port and one
// synchronous read port; rdata holds the word at raddr one cycle after raddr is
// presented. The default 256 words of 512 bits (16 elements of 32 bits) is the
// block size of the design's memory budget: 16 kB per Dmem. The two-port
// organisation and the read latency are this design's choice. The contents are
// not reset; every user writes a word before reading it.
module dmem #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 512,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
