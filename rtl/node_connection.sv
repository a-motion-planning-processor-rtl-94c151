// node_connection: builds the roadmap edges.
//
// Nodes are taken in groups of N_CLOSEST. For each group the edge finder
// picks every node's K nearest neighbours; then each closest-finding circuit
// hands its K candidate edges to its N_LP local planners (neighbour m goes
// to planner m mod N_LP). The planners of all circuits run at the same time
// and share the feasibility checker through a round-robin arbiter. An edge
// whose intermediate points are all free is written to the edge buffer as
// the pair (node, neighbour); the planners' writes are serialised, lowest
// planner first, one per cycle. The group structure, N_CLOSEST = 10, K = 5
// and N_LP = 1 follow the source design. An edge found from both of its ends
// is checked and stored twice, which the source does not rule out.
//
// Timing: start (one cycle) with n_nodes; done pulses when the last group
// is finished; n_edges is then the number of stored edges.
module node_connection
  import mpp_pkg::*;
#(
  parameter int N_CLOSEST = 10,
  parameter int K         = 5,
  parameter int N_LP      = 1,
  parameter int LP_STEPS  = 8,
  parameter int MAX_NODES = 100,
  parameter int MAX_EDGES = MAX_NODES * K,
  parameter int NIW       = $clog2(MAX_NODES),
  parameter int EAW       = $clog2(MAX_EDGES)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NIW:0]   n_nodes,
  output logic           busy,
  output logic           done,
  output logic [EAW:0]   n_edges,
  output logic [31:0]    edges_tried,
  // node buffer read port
  output logic [NIW-1:0] node_raddr,
  input  cfg_t           node_rdata,
  // edge buffer write port
  output logic           edge_we,
  output logic [EAW-1:0] edge_waddr,
  output logic [2*NIW-1:0] edge_wdata,
  // feasibility checker
  output logic           fq_valid,
  output cfg_t           fq_cfg,
  input  logic           fq_ready,
  input  logic           fr_valid,
  input  logic           fr_collide
);
  localparam int NP = N_CLOSEST * N_LP;          // local planners in all
  localparam int KW = $clog2(K + N_LP) + 1;

  typedef enum logic [1:0] {S_IDLE, S_FIND, S_PLAN} state_t;
  state_t state;

  logic [NIW:0] base;
  logic         ef_start, ef_busy, ef_done;
  logic [N_CLOSEST-1:0] own_valid;
  logic [NIW-1:0] own_idx [N_CLOSEST];
  cfg_t           own_cfg [N_CLOSEST];
  logic [K-1:0]   nb_valid [N_CLOSEST];
  logic [NIW-1:0] nb_idx [N_CLOSEST][K];
  cfg_t           nb_cfg [N_CLOSEST][K];

  edge_finder #(.N_CLOSEST(N_CLOSEST), .K(K), .MAX_NODES(MAX_NODES)) u_ef (
    .clk, .rst_n, .start(ef_start), .base, .n_nodes, .busy(ef_busy), .done(ef_done),
    .node_raddr, .node_rdata, .own_valid, .own_idx, .own_cfg, .nb_valid, .nb_idx, .nb_cfg);

  // ------------------------------------------------ local planners
  logic [NP-1:0] p_fq_valid, p_fq_ready, p_fr_valid, p_idle, p_pend, p_grant;
  cfg_t          p_fq_cfg [NP];
  logic [2*NIW-1:0] p_edge [NP];
  logic          plan_go;
  logic [NP-1:0] lp_starts;                      // local planning jobs started
  logic          a_collide;

  for (genvar c = 0; c < N_CLOSEST; c++) begin : g_circ
    for (genvar p = 0; p < N_LP; p++) begin : g_lp
      localparam int Q = c * N_LP + p;
      typedef enum logic [1:0] {P_IDLE, P_NEXT, P_RUN, P_WRITE} pstate_t;
      pstate_t      ps;
      logic [KW-1:0] m;
      logic         lp_start, lp_done, lp_free;
      cfg_t         cb;

      assign cb = nb_cfg[c][m < KW'(K) ? m[$clog2(K+1)-1:0] : '0];

      local_planner #(.LP_STEPS(LP_STEPS)) u_lp (
        .clk, .rst_n, .start(lp_start), .cfg_a(own_cfg[c]), .cfg_b(cb),
        .busy(), .done(lp_done), .free(lp_free),
        .fq_valid(p_fq_valid[Q]), .fq_cfg(p_fq_cfg[Q]), .fq_ready(p_fq_ready[Q]),
        .fr_valid(p_fr_valid[Q]), .fr_collide(a_collide));

      assign lp_start  = (ps == P_NEXT) && m < KW'(K) && nb_valid[c][m[$clog2(K+1)-1:0]];
      assign p_idle[Q] = (ps == P_IDLE);
      assign lp_starts[Q] = lp_start;
      assign p_pend[Q] = (ps == P_WRITE);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          ps <= P_IDLE;
          m  <= '0;
        end else begin
          unique case (ps)
            P_IDLE: if (plan_go && own_valid[c]) begin
              m  <= KW'(p);
              ps <= P_NEXT;
            end
            P_NEXT: begin
              if (m >= KW'(K))  ps <= P_IDLE;
              else if (lp_start) ps <= P_RUN;
              else               m  <= m + KW'(N_LP);   // no such neighbour
            end
            P_RUN: if (lp_done) begin
              if (lp_free) begin
                p_edge[Q] <= {own_idx[c], nb_idx[c][m[$clog2(K+1)-1:0]]};
                ps        <= P_WRITE;
              end else begin
                m  <= m + KW'(N_LP);
                ps <= P_NEXT;
              end
            end
            P_WRITE: if (p_grant[Q]) begin
              m  <= m + KW'(N_LP);
              ps <= P_NEXT;
            end
            default: ps <= P_IDLE;
          endcase
        end
      end
    end
  end

  feas_arbiter #(.N(NP)) u_arb (
    .clk, .rst_n, .req_valid(p_fq_valid), .req_cfg(p_fq_cfg), .req_ready(p_fq_ready),
    .resp_valid(p_fr_valid), .resp_collide(a_collide),
    .m_req_valid(fq_valid), .m_req_cfg(fq_cfg), .m_req_ready(fq_ready),
    .m_resp_valid(fr_valid), .m_resp_collide(fr_collide));

  // edge writes: lowest pending planner first
  always_comb begin
    p_grant = '0;
    for (int q = NP - 1; q >= 0; q--)
      if (p_pend[q]) p_grant = NP'(1) << q;
  end

  always_comb begin
    edge_wdata = '0;
    for (int q = 0; q < NP; q++)
      if (p_grant[q]) edge_wdata = p_edge[q];
  end
  assign edge_we    = (p_grant != '0);
  assign edge_waddr = n_edges[EAW-1:0];

  // ------------------------------------------------ group sequencing
  logic plan_started;
  assign busy     = (state != S_IDLE);
  assign ef_start = (state == S_FIND) && !ef_busy && !ef_done && !plan_started;
  assign plan_go  = (state == S_PLAN) && !plan_started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      done         <= 1'b0;
      base         <= '0;
      n_edges      <= '0;
      edges_tried  <= '0;
      plan_started <= 1'b0;
    end else begin
      done <= 1'b0;
      if (edge_we) n_edges <= n_edges + 1'b1;
      if (state != S_IDLE) edges_tried <= edges_tried + 32'($countones(lp_starts));
      unique case (state)
        S_IDLE: if (start) begin
          base        <= '0;
          n_edges     <= '0;
          edges_tried <= '0;
          state       <= (n_nodes == 0) ? S_IDLE : S_FIND;
          done        <= (n_nodes == 0);
        end
        S_FIND: if (ef_done) begin
          state        <= S_PLAN;
          plan_started <= 1'b0;
        end
        S_PLAN: begin
          if (!plan_started) begin
            plan_started <= 1'b1;
          end else if (p_idle == '1) begin
            plan_started <= 1'b0;
            if (32'(base) + N_CLOSEST >= 32'(n_nodes)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              base  <= base + (NIW+1)'(N_CLOSEST);
              state <= S_FIND;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
