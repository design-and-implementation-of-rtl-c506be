// jls_bram: simple dual-port block RAM holding raw or compressed block data.
//
// One write port and one read port on the same clock; the read data appears
// one cycle after the read address (registered output, as in an FPGA block
// RAM). A read of the address being written returns the old word. DEPTH words
// of WIDTH bits; no reset of the contents.
//
// The original IP cores keep raw and compressed block data in block RAMs;
// width, depth and the registered read port are this design's choices.
module jls_bram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
