// trig_lut: sine and cosine lookup table.
//
// The angle input has ANG_W = 10 bits, one full turn being 1024 steps; the
// outputs are 32-bit signed Q16.16 values of sin and cos of that angle. The
// table is computed at elaboration time (round(sin(2*pi*i/1024) * 65536))
// and only the first quarter turn is stored: the other three quarters and the
// cosine follow from the symmetry of the sine. The address is registered,
// then the output, so the result appears two cycles after the angle, the
// latency the source design reports for its distributed-memory table. The
// 10-bit input and 32-bit output follow the source design; the quarter-wave
// storage and Q16.16 scaling are this implementation's choices.
module trig_lut
  import mpp_pkg::*;
#(
  parameter int AW = ANG_W
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] angle,
  output fx_t           sin_o,
  output fx_t           cos_o
);
  localparam int QN = 1 << (AW - 2);          // entries per quarter turn
  typedef fx_t quarter_t [QN + 1];            // includes the 90 degree point

  function automatic quarter_t make_quarter();
    quarter_t t;
    for (int i = 0; i <= QN; i++)
      t[i] = fx_t'(longint'($floor($sin(3.14159265358979323846 * i / (2.0 * QN))
                                  * 65536.0 + 0.5)));
    return t;
  endfunction

  localparam quarter_t QTAB = make_quarter();

  // sin of a full-turn angle from the quarter table
  function automatic fx_t sin_of(logic [AW-1:0] ang);
    logic [1:0]    quad;
    logic [AW-3:0] off;
    fx_t           v;
    quad = ang[AW-1 -: 2];
    off  = ang[AW-3:0];
    unique case (quad)
      2'd0: v =  QTAB[{1'b0, off}];
      2'd1: v =  QTAB[QN - int'(off)];
      2'd2: v = -QTAB[{1'b0, off}];
      default: v = -QTAB[QN - int'(off)];
    endcase
    return v;
  endfunction

  logic [AW-1:0] ang_q;

  always_ff @(posedge clk) begin
    if (en) begin
      ang_q <= angle;
      sin_o <= sin_of(ang_q);
      cos_o <= sin_of(ang_q + AW'(QN));      // cos(x) = sin(x + quarter turn)
    end
  end
endmodule
