// tri_mem: triangle memory, one 288-bit triangle per clock.
//
// A simple dual-port memory (one write port, one read port) whose word is a
// whole triangle of nine 32-bit coordinates. In the source design four
// 36-bit-wide Block RAMs with two data paths each are cascaded to 288 bits
// so a triangle is read in one cycle, and four Block RAMs hold 256
// triangles; DEPTH = 256 follows that. Reads are synchronous: rdata holds the
// word at raddr one cycle after raddr is presented. A write and a read of
// the same address in one cycle return the old word.
module tri_mem
  import mpp_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  tri_t          wdata,
  input  logic [AW-1:0] raddr,
  output tri_t          rdata
);
  tri_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
