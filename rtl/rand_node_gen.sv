// rand_node_gen: random node generation circuit.
//
// Produces one random robot configuration per clock while en is high: six
// independent xorshift32 generators, one per degree of freedom, each step
// once per cycle, so all six numbers of a configuration are made in the same
// cycle as the source design requires. Positions are spread over the
// bounding box: x = r[15:0] * BOX gives a Q16.16 value in [0, BOX). Angles
// take the low ANG_W bits. cfg is the current value; it changes on the clock
// edge where en is high. The generator kind and the seeding (SEED, mixed
// with the degree-of-freedom number, never zero) are this implementation's
// choices; BOX = 240 is the side of the source's test environments.
module rand_node_gen
  import mpp_pkg::*;
#(
  parameter int unsigned SEED = 32'h1234_5678,
  parameter int          BOX  = 240
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output cfg_t cfg
);
  logic [31:0] s [6];

  function automatic logic [31:0] xorshift(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] seed_of(int d);
    logic [31:0] v;
    v = SEED ^ (32'h9E37_79B9 * 32'(d + 1));
    return (v == 0) ? 32'h0000_0001 : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < 6; d++) s[d] <= seed_of(d);
    end else if (en) begin
      for (int d = 0; d < 6; d++) s[d] <= xorshift(s[d]);
    end
  end

  always_comb begin
    cfg.x = fx_t'(s[0][15:0] * 32'(BOX));
    cfg.y = fx_t'(s[1][15:0] * 32'(BOX));
    cfg.z = fx_t'(s[2][15:0] * 32'(BOX));
    cfg.a = s[3][ANG_W-1:0];
    cfg.b = s[4][ANG_W-1:0];
    cfg.c = s[5][ANG_W-1:0];
  end
endmodule
