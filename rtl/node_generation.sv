// node_generation: finds n collision-free random configurations.
//
// N_RAND random node generation circuits each make one configuration per
// clock, so a batch of N_RAND candidates appears in a single cycle. The
// candidates are sent to the feasibility checker; a free one is written to
// the node buffer, a colliding one is dropped. When the batch is used up a
// new one is drawn, until n_target free configurations are stored. This
// follows the source design (N_RAND = 10 generators, batch in one cycle,
// keep free / discard colliding). The candidates of a batch are checked one
// after the other because there is one feasibility checker; that ordering
// is this implementation's choice.
//
// Timing: start (one cycle) with n_target (1..MAX_NODES) -> done pulses
// when node n_target - 1 has been written. node_we/node_waddr/node_wdata
// write the node buffer. tried / rejected count the candidates checked and
// found colliding since start.
module node_generation
  import mpp_pkg::*;
#(
  parameter int N_RAND    = 10,
  parameter int MAX_NODES = 100,
  parameter int BOX       = 240,
  parameter int NIW       = $clog2(MAX_NODES)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NIW:0]   n_target,
  output logic           busy,
  output logic           done,
  output logic [NIW:0]   node_count,
  output logic           node_we,
  output logic [NIW-1:0] node_waddr,
  output cfg_t           node_wdata,
  output logic [31:0]    tried,
  output logic [31:0]    rejected,
  // feasibility checker
  output logic           fq_valid,
  output cfg_t           fq_cfg,
  input  logic           fq_ready,
  input  logic           fr_valid,
  input  logic           fr_collide
);
  localparam int RIW = (N_RAND > 1) ? $clog2(N_RAND) : 1;

  typedef enum logic [1:0] {S_IDLE, S_GEN, S_REQ, S_WAIT} state_t;
  state_t state;

  cfg_t         gen_cfg [N_RAND];
  cfg_t         cand    [N_RAND];
  logic [RIW:0] ci;
  logic         gen_en;

  for (genvar g = 0; g < N_RAND; g++) begin : g_gen
    rand_node_gen #(.SEED(32'h2545_F491 + 32'(g) * 32'h6C07_8965), .BOX(BOX)) u_rng (
      .clk, .rst_n, .en(gen_en), .cfg(gen_cfg[g]));
  end

  assign gen_en   = (state == S_GEN);
  assign busy     = (state != S_IDLE);
  assign fq_valid = (state == S_REQ);
  assign fq_cfg   = cand[ci[RIW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      node_we    <= 1'b0;
      node_count <= '0;
      tried      <= '0;
      rejected   <= '0;
      ci         <= '0;
      node_waddr <= '0;
      node_wdata <= '0;
    end else begin
      done    <= 1'b0;
      node_we <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          node_count <= '0;
          tried      <= '0;
          rejected   <= '0;
          state      <= (n_target == 0) ? S_IDLE : S_GEN;
          done       <= (n_target == 0);
        end
        S_GEN: begin                                  // one batch in one cycle
          for (int g = 0; g < N_RAND; g++) cand[g] <= gen_cfg[g];
          ci    <= '0;
          state <= S_REQ;
        end
        S_REQ: if (fq_ready) state <= S_WAIT;
        S_WAIT: if (fr_valid) begin
          tried <= tried + 1;
          if (fr_collide) begin
            rejected <= rejected + 1;
          end else begin
            node_we    <= 1'b1;
            node_waddr <= node_count[NIW-1:0];
            node_wdata <= cand[ci[RIW-1:0]];
            node_count <= node_count + 1'b1;
          end
          if (!fr_collide && node_count + 1'b1 == n_target) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (ci == (RIW+1)'(N_RAND - 1)) begin
            state <= S_GEN;
          end else begin
            ci    <= ci + 1'b1;
            state <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
