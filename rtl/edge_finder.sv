// edge_finder: finds the k nearest neighbours of a group of nodes.
//
// N_CLOSEST closest-finding circuits work side by side, each for one node of
// the group base .. base + N_CLOSEST - 1. The node buffer is read twice:
// first the group's own configurations are loaded (N_CLOSEST reads), then
// every node 0 .. n_nodes-1 is read once and offered to all circuits in the
// same cycle, so one pass of the buffer serves the whole group. Each
// resulting (node, neighbour) pair is a candidate roadmap edge. N_CLOSEST =
// 10 and K = 5 follow the source design; sharing one read pass among the
// circuits is this implementation's choice.
//
// Timing: start (one cycle) with base; done pulses N_CLOSEST + n_nodes + 2
// cycles later. own_valid marks circuits whose node exists (< n_nodes).
module edge_finder
  import mpp_pkg::*;
#(
  parameter int N_CLOSEST = 10,
  parameter int K         = 5,
  parameter int MAX_NODES = 100,
  parameter int NIW       = $clog2(MAX_NODES)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NIW:0]   base,
  input  logic [NIW:0]   n_nodes,
  output logic           busy,
  output logic           done,
  output logic [NIW-1:0] node_raddr,
  input  cfg_t           node_rdata,      // one cycle after node_raddr
  output logic [N_CLOSEST-1:0] own_valid,
  output logic [NIW-1:0] own_idx [N_CLOSEST],
  output cfg_t           own_cfg [N_CLOSEST],
  output logic [K-1:0]   nb_valid [N_CLOSEST],
  output logic [NIW-1:0] nb_idx [N_CLOSEST][K],
  output cfg_t           nb_cfg [N_CLOSEST][K]
);
  typedef enum logic [1:0] {S_IDLE, S_OWN, S_SCAN, S_DRAIN} state_t;
  state_t state;

  logic [NIW:0] ptr;                       // next address to read
  logic [NIW:0] base_q;
  logic         rd_v;                      // a read returns this cycle
  logic         rd_own;                    // ... for the own-node pass
  logic [NIW:0] rd_idx;

  assign busy       = (state != S_IDLE);
  assign node_raddr = ptr[NIW-1:0];

  for (genvar c = 0; c < N_CLOSEST; c++) begin : g_fc
    find_closest #(.K(K), .NIW(NIW)) u_fc (
      .clk, .rst_n,
      .load(rd_v && rd_own && rd_idx == base_q + (NIW+1)'(c)),
      .own_idx_i(rd_idx[NIW-1:0]), .own_cfg_i(node_rdata),
      .cand_valid(rd_v && !rd_own), .cand_idx(rd_idx[NIW-1:0]), .cand_cfg(node_rdata),
      .own_idx(own_idx[c]), .own_cfg(own_cfg[c]),
      .nb_valid(nb_valid[c]), .nb_idx(nb_idx[c]), .nb_cfg(nb_cfg[c]));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                         own_valid[c] <= 1'b0;
      else if (start && state == S_IDLE)  own_valid[c] <= (32'(base) + c < 32'(n_nodes));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      rd_v  <= 1'b0;
      ptr   <= '0;
      base_q <= '0;
      rd_idx <= '0;
      rd_own <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_v <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          base_q <= base;
          ptr    <= base;
          state  <= S_OWN;
        end
        S_OWN: begin
          rd_v   <= 1'b1;
          rd_own <= 1'b1;
          rd_idx <= ptr;
          if (ptr + 1'b1 == base_q + (NIW+1)'(N_CLOSEST) || ptr + 1'b1 >= n_nodes) begin
            ptr   <= '0;
            state <= S_SCAN;
          end else begin
            ptr <= ptr + 1'b1;
          end
        end
        S_SCAN: begin
          rd_v   <= 1'b1;
          rd_own <= 1'b0;
          rd_idx <= ptr;
          ptr    <= ptr + 1'b1;
          if (ptr + 1'b1 == n_nodes) state <= S_DRAIN;
        end
        S_DRAIN: begin                      // last candidate is inserted this cycle
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
