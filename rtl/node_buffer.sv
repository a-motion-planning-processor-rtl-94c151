// node_buffer: the roadmap node store.
//
// Holds the collision-free configurations found by node generation; node
// connection and the query read them back. One write port and one
// synchronous read port (rdata one cycle after raddr). DEPTH = 100 is the
// node count of the source design's experiments (100 collision-free
// configurations).
module node_buffer
  import mpp_pkg::*;
#(
  parameter int DEPTH = 100,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cfg_t          wdata,
  input  logic [AW-1:0] raddr,
  output cfg_t          rdata
);
  cfg_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
