// edge_buffer: the roadmap edge store.
//
// Each word is one collision-free edge, the indices of its two end nodes
// (a in the upper half, b in the lower half). One write port and one
// synchronous read port (rdata one cycle after raddr). DEPTH = 500 is n * k
// for the source design's n = 100 nodes and k = 5 neighbours, the most
// edges node connection can produce.
module edge_buffer #(
  parameter int DEPTH = 500,
  parameter int NW    = 7,              // bits of a node index
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [2*NW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [2*NW-1:0] rdata
);
  logic [2*NW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
