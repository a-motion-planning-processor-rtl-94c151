// tb_feas_model: behavioural stand-in for the collision detector used by the
// roadmap testbenches. A configuration "collides" when the integer part of
// its x coordinate lies in [LO, HI) (a wall across the box). Ready is
// dropped at random and answers come 1 to 6 cycles after acceptance, so the
// handshakes are exercised. Counts accepted requests and colliding answers.
module tb_feas_model
  import mpp_pkg::*;
#(
  parameter int LO = 100,
  parameter int HI = 140
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fq_valid,
  input  cfg_t fq_cfg,
  output logic fq_ready,
  output logic fr_valid,
  output logic fr_collide,
  output int   n_req,
  output int   n_hit
);
  logic pend;
  int   wait_c;
  logic hit_q;

  function automatic logic wall(cfg_t c);
    int xi;
    xi = int'(c.x >>> 16);
    return xi >= LO && xi < HI;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 0; wait_c <= 0; hit_q <= 0; fq_ready <= 0;
      fr_valid <= 0; fr_collide <= 0; n_req <= 0; n_hit <= 0;
    end else begin
      fr_valid <= 0;
      if (!pend) begin
        fq_ready <= ($urandom_range(0, 3) != 0);
        if (fq_valid && fq_ready) begin
          pend <= 1; fq_ready <= 0;
          hit_q <= wall(fq_cfg);
          wait_c <= $urandom_range(0, 5);
          n_req <= n_req + 1;
          if (wall(fq_cfg)) n_hit <= n_hit + 1;
        end
      end else if (wait_c == 0) begin
        pend <= 0; fr_valid <= 1; fr_collide <= hit_q;
      end else begin
        wait_c <= wait_c - 1;
      end
    end
  end
endmodule
