// fx_mul: pipelined signed multiplier, 32 x 32 -> 64 bits.
//
// The product of a and b appears on p two clock edges after the operands
// are presented (operands are registered, then the product). The latency of
// two cycles and the 32-bit inputs / 64-bit output follow the multiplier the
// source design generated for its fixed point arithmetic; a new pair can be
// accepted every cycle. The enable input en freezes both stages.
module fx_mul #(
  parameter int W = 32
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);
  logic signed [W-1:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (en) begin
      a_q <= a;
      b_q <= b;
      p   <= a_q * b_q;
    end
  end
endmodule
