// local_planner: straight-line local planning between two configurations.
//
// The intermediate point finder places LP_STEPS - 1 equally spaced points
// on the straight line from cfg_a to cfg_b (point s at fraction
// s / LP_STEPS, s = 1 .. LP_STEPS-1) and sends each to the feasibility
// checker. The edge is free if every point is free; the first colliding
// point ends the check. The end points are roadmap nodes, already known to
// be free, and are not checked again. Angles move along the shorter way
// round the circle. This follows the source design's local planning
// circuit (intermediate points on a straight line, each checked); the
// number of points is not given there, and LP_STEPS = 8 (a power of two, so
// the spacing needs no division) is this implementation's choice.
//
// Timing: start (one cycle) with cfg_a / cfg_b held until done; done pulses
// with free one cycle after the answer for the last point checked.
module local_planner
  import mpp_pkg::*;
#(
  parameter int LP_STEPS = 8,
  parameter int SW       = $clog2(LP_STEPS)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cfg_t  cfg_a,
  input  cfg_t  cfg_b,
  output logic  busy,
  output logic  done,
  output logic  free,
  // feasibility checker
  output logic  fq_valid,
  output cfg_t  fq_cfg,
  input  logic  fq_ready,
  input  logic  fr_valid,
  input  logic  fr_collide
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_t;
  state_t state;
  logic [SW:0] s;

  function automatic fx_t lerp(fx_t a, fx_t b, logic [SW:0] k);
    logic signed [FX_W+SW+2:0] d;
    d = (FX_W+SW+3)'(b) - (FX_W+SW+3)'(a);
    d = d * $signed({1'b0, k});
    return a + fx_t'(d >>> SW);
  endfunction

  function automatic logic [ANG_W-1:0] alerp(logic [ANG_W-1:0] a, logic [ANG_W-1:0] b,
                                             logic [SW:0] k);
    logic signed [ANG_W+SW+1:0] d;
    d = (ANG_W+SW+2)'($signed(b - a));           // shorter way round
    d = d * $signed({1'b0, k});
    return a + ANG_W'(d >>> SW);
  endfunction

  always_comb begin
    fq_cfg.x = lerp(cfg_a.x, cfg_b.x, s);
    fq_cfg.y = lerp(cfg_a.y, cfg_b.y, s);
    fq_cfg.z = lerp(cfg_a.z, cfg_b.z, s);
    fq_cfg.a = alerp(cfg_a.a, cfg_b.a, s);
    fq_cfg.b = alerp(cfg_a.b, cfg_b.b, s);
    fq_cfg.c = alerp(cfg_a.c, cfg_b.c, s);
  end

  assign fq_valid = (state == S_REQ);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      free  <= 1'b0;
      s     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          s <= (SW+1)'(1);
          if (LP_STEPS < 2) begin
            done  <= 1'b1;
            free  <= 1'b1;
          end else begin
            state <= S_REQ;
          end
        end
        S_REQ: if (fq_ready) state <= S_WAIT;
        S_WAIT: if (fr_valid) begin
          if (fr_collide) begin
            done  <= 1'b1;
            free  <= 1'b0;
            state <= S_IDLE;
          end else if (s == (SW+1)'(LP_STEPS - 1)) begin
            done  <= 1'b1;
            free  <= 1'b1;
            state <= S_IDLE;
          end else begin
            s     <= s + 1'b1;
            state <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
