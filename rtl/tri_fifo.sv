// tri_fifo: first-in first-out buffer of transformed robot triangles.
//
// It sits between the transformation circuit and the collision detection
// circuits so that transformation can run ahead while collision tests are
// in progress, as the source design describes. The head word is always
// visible on rdata while empty is low (first-word fall-through); pop removes
// it. push while full and pop while empty are ignored (and flagged by
// assertions). flush empties the buffer in one cycle; it is used when a
// collision ends a check early. DEPTH (16) and the flush are this
// implementation's choices: the source gives neither.
module tri_fifo
  import mpp_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        push,
  input  tri_t        wdata,
  input  logic        pop,
  output tri_t        rdata,
  output logic        empty,
  output logic        full,
  output logic [AW:0] count
);
  tri_t        mem [DEPTH];
  logic [AW-1:0] rp, wp;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rdata   = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
    end else if (flush) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) !(push && full && !flush));
  a_no_underflow: assert property (@(posedge clk) !(pop && empty && !flush));
endmodule
