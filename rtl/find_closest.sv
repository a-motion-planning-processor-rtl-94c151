// find_closest: one closest-configuration finding circuit.
//
// Keeps the K configurations nearest to its own node, sorted by distance,
// while candidate nodes stream past one per cycle. A candidate is inserted
// in one cycle: it is compared with all K kept entries at once, the farther
// entries shift down a place and the last one falls out. The node itself is
// skipped. Distance is the squared Euclidean distance between positions;
// the source design does not say which metric it uses, so this, and leaving
// the rotation out of it, are this implementation's choices. K = 5 follows
// the source design. Ties keep the earlier candidate first.
//
// Interface: load (one cycle) sets own_idx / own_cfg and empties the list;
// cand_valid/cand_idx/cand_cfg offer one candidate per cycle. nb_valid,
// nb_idx and nb_cfg hold the list, nearest first.
module find_closest
  import mpp_pkg::*;
#(
  parameter int K   = 5,
  parameter int NIW = 7
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [NIW-1:0] own_idx_i,
  input  cfg_t           own_cfg_i,
  input  logic           cand_valid,
  input  logic [NIW-1:0] cand_idx,
  input  cfg_t           cand_cfg,
  output logic [NIW-1:0] own_idx,
  output cfg_t           own_cfg,
  output logic [K-1:0]   nb_valid,
  output logic [NIW-1:0] nb_idx [K],
  output cfg_t           nb_cfg [K]
);
  typedef logic [FX_W+1:0]   diff_t;    // |difference| of two coordinates
  typedef logic [2*FX_W+5:0] dist_t;

  dist_t nb_dist [K];
  dist_t d;
  logic [K-1:0] closer;                 // candidate goes before entry m

  function automatic diff_t absdiff(fx_t a, fx_t b);
    logic signed [FX_W+1:0] t;
    t = (FX_W+2)'(a) - (FX_W+2)'(b);
    return (t < 0) ? diff_t'(-t) : diff_t'(t);
  endfunction

  always_comb begin
    diff_t dx, dy, dz;
    dx = absdiff(cand_cfg.x, own_cfg.x);
    dy = absdiff(cand_cfg.y, own_cfg.y);
    dz = absdiff(cand_cfg.z, own_cfg.z);
    d  = dist_t'(dx) * dist_t'(dx) + dist_t'(dy) * dist_t'(dy) + dist_t'(dz) * dist_t'(dz);
    for (int m = 0; m < K; m++) closer[m] = !nb_valid[m] || (d < nb_dist[m]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nb_valid <= '0;
      own_idx  <= '0;
      own_cfg  <= '0;
      nb_dist  <= '{default: '0};
      nb_idx   <= '{default: '0};
      nb_cfg   <= '{default: '0};
    end else if (load) begin
      nb_valid <= '0;
      own_idx  <= own_idx_i;
      own_cfg  <= own_cfg_i;
    end else if (cand_valid && cand_idx != own_idx) begin
      for (int m = K - 1; m >= 0; m--) begin
        if (closer[m]) begin
          if (m == 0 || !closer[m-1]) begin           // insertion point
            nb_valid[m] <= 1'b1;
            nb_dist[m]  <= d;
            nb_idx[m]   <= cand_idx;
            nb_cfg[m]   <= cand_cfg;
          end else begin                              // shift down
            nb_valid[m] <= nb_valid[m-1];
            nb_dist[m]  <= nb_dist[m-1];
            nb_idx[m]   <= nb_idx[m-1];
            nb_cfg[m]   <= nb_cfg[m-1];
          end
        end
      end
    end
  end
endmodule
