// query: answers a path query on a finished roadmap.
//
// 1. Both the start and the goal configuration are compared with every
//    roadmap node in one pass of the node buffer, each by a closest-finding
//    circuit that keeps its K nearest nodes.
// 2. Two local planners, one for the start and one for the goal side, run at
//    the same time: each tries its nearest nodes in order until the straight
//    line to one of them is free. That node is the side's connection node.
// 3. A breadth-first search over the stored edges, edges taken as
//    undirected, looks for the goal's connection node starting from the
//    start's. For each node taken off the search queue the whole edge list
//    is read once.
// 4. The path is recovered by following the parent pointers back from the
//    goal side and can be read out in start-to-goal order.
// The source design names the steps (find the closest roadmap point for
// start and end, local planning, path search in the roadmap) but not how
// they are built; the search method and everything else here is this
// implementation's choice.
//
// Timing: start (one cycle) with start_cfg / goal_cfg held until done. done
// pulses with found; path_len nodes can then be read with path_raddr
// (path_node is combinational), entry 0 being the start's connection node.
// The own index of the two closest-finding circuits is set to 2**NIW - 1,
// so MAX_NODES must be below 2**NIW.
module query
  import mpp_pkg::*;
#(
  parameter int K         = 5,
  parameter int LP_STEPS  = 8,
  parameter int MAX_NODES = 100,
  parameter int MAX_EDGES = MAX_NODES * K,
  parameter int NIW       = $clog2(MAX_NODES),
  parameter int EAW       = $clog2(MAX_EDGES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  cfg_t             start_cfg,
  input  cfg_t             goal_cfg,
  input  logic [NIW:0]     n_nodes,
  input  logic [EAW:0]     n_edges,
  output logic             busy,
  output logic             done,
  output logic             found,
  output logic [NIW:0]     path_len,
  input  logic [NIW-1:0]   path_raddr,
  output logic [NIW-1:0]   path_node,
  // roadmap reads
  output logic [NIW-1:0]   node_raddr,
  input  cfg_t             node_rdata,
  output logic [EAW-1:0]   edge_raddr,
  input  logic [2*NIW-1:0] edge_rdata,
  // feasibility checker
  output logic             fq_valid,
  output cfg_t             fq_cfg,
  input  logic             fq_ready,
  input  logic             fr_valid,
  input  logic             fr_collide
);
  localparam int KW = $clog2(K + 1);
  localparam logic [NIW-1:0] NONE = '1;

  typedef enum logic [3:0] {S_IDLE, S_LOAD, S_SCAN, S_DRAIN, S_CONNECT, S_POP, S_EDGES,
                            S_EDRAIN, S_WALK, S_FINISH} state_t;
  state_t state;

  // ------------------------------------------------ closest nodes
  logic           sc_load, sc_v;
  logic [NIW:0]   ptr;
  logic [NIW-1:0] sc_idx;
  logic [K-1:0]   s_nb_valid, g_nb_valid;
  logic [NIW-1:0] s_nb_idx [K], g_nb_idx [K];
  cfg_t           s_nb_cfg [K], g_nb_cfg [K];

  find_closest #(.K(K), .NIW(NIW)) u_fc_start (
    .clk, .rst_n, .load(sc_load), .own_idx_i(NONE), .own_cfg_i(start_cfg),
    .cand_valid(sc_v), .cand_idx(sc_idx), .cand_cfg(node_rdata),
    .own_idx(), .own_cfg(), .nb_valid(s_nb_valid), .nb_idx(s_nb_idx), .nb_cfg(s_nb_cfg));
  find_closest #(.K(K), .NIW(NIW)) u_fc_goal (
    .clk, .rst_n, .load(sc_load), .own_idx_i(NONE), .own_cfg_i(goal_cfg),
    .cand_valid(sc_v), .cand_idx(sc_idx), .cand_cfg(node_rdata),
    .own_idx(), .own_cfg(), .nb_valid(g_nb_valid), .nb_idx(g_nb_idx), .nb_cfg(g_nb_cfg));

  assign sc_load    = (state == S_LOAD);
  assign node_raddr = ptr[NIW-1:0];

  // ------------------------------------------------ start / goal local planning
  logic [1:0]   lp_fq_valid, lp_fq_ready, lp_fr_valid;
  cfg_t         lp_fq_cfg [2];
  logic         lp_collide;
  logic [KW-1:0] sm, gm;                  // neighbour being tried
  logic         s_ok, g_ok, s_fail, g_fail;
  logic [NIW-1:0] s_node, g_node;
  logic         s_lp_start, g_lp_start, s_lp_busy, g_lp_busy, s_lp_done, g_lp_done;
  logic         s_lp_free, g_lp_free;
  logic         connecting;

  assign connecting = (state == S_CONNECT);
  assign s_lp_start = connecting && !s_ok && !s_fail && !s_lp_busy && !s_lp_done &&
                      sm < KW'(K) && s_nb_valid[sm];
  assign g_lp_start = connecting && !g_ok && !g_fail && !g_lp_busy && !g_lp_done &&
                      gm < KW'(K) && g_nb_valid[gm];

  local_planner #(.LP_STEPS(LP_STEPS)) u_lp_start (
    .clk, .rst_n, .start(s_lp_start), .cfg_a(start_cfg), .cfg_b(s_nb_cfg[sm < KW'(K) ? sm : '0]),
    .busy(s_lp_busy), .done(s_lp_done), .free(s_lp_free),
    .fq_valid(lp_fq_valid[0]), .fq_cfg(lp_fq_cfg[0]), .fq_ready(lp_fq_ready[0]),
    .fr_valid(lp_fr_valid[0]), .fr_collide(lp_collide));
  local_planner #(.LP_STEPS(LP_STEPS)) u_lp_goal (
    .clk, .rst_n, .start(g_lp_start), .cfg_a(goal_cfg), .cfg_b(g_nb_cfg[gm < KW'(K) ? gm : '0]),
    .busy(g_lp_busy), .done(g_lp_done), .free(g_lp_free),
    .fq_valid(lp_fq_valid[1]), .fq_cfg(lp_fq_cfg[1]), .fq_ready(lp_fq_ready[1]),
    .fr_valid(lp_fr_valid[1]), .fr_collide(lp_collide));

  feas_arbiter #(.N(2)) u_arb (
    .clk, .rst_n, .req_valid(lp_fq_valid), .req_cfg(lp_fq_cfg), .req_ready(lp_fq_ready),
    .resp_valid(lp_fr_valid), .resp_collide(lp_collide),
    .m_req_valid(fq_valid), .m_req_cfg(fq_cfg), .m_req_ready(fq_ready),
    .m_resp_valid(fr_valid), .m_resp_collide(fr_collide));

  // ------------------------------------------------ breadth-first search
  logic [MAX_NODES-1:0] visited;
  logic [NIW-1:0] parent [MAX_NODES];
  logic [NIW-1:0] queue  [MAX_NODES];
  logic [NIW:0]   qhead, qtail;
  logic [NIW-1:0] u;
  logic [EAW:0]   eptr;
  logic           e_v;
  logic [NIW-1:0] ea, eb;
  logic [NIW-1:0] path [MAX_NODES];
  logic [NIW-1:0] walk;

  assign edge_raddr = eptr[EAW-1:0];
  assign ea = edge_rdata[2*NIW-1:NIW];
  assign eb = edge_rdata[NIW-1:0];
  assign path_node = path[NIW'(path_len - 1'b1 - (NIW+1)'(path_raddr))];
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      found    <= 1'b0;
      sc_v     <= 1'b0;
      ptr      <= '0;
      path_len <= '0;
      e_v      <= 1'b0;
      eptr     <= '0;
      s_fail   <= 1'b0;
      g_fail   <= 1'b0;
      s_ok     <= 1'b0;
      g_ok     <= 1'b0;
      s_node   <= '0;
      g_node   <= '0;
      sm       <= '0;
      gm       <= '0;
      qhead    <= '0;
      qtail    <= '0;
      sc_idx   <= '0;
      u        <= '0;
      visited  <= '0;
      walk     <= '0;
    end else begin
      done <= 1'b0;
      sc_v <= 1'b0;
      e_v  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ptr      <= '0;
          path_len <= '0;
          found    <= 1'b0;
          state    <= (n_nodes == 0) ? S_FINISH : S_LOAD;
        end
        S_LOAD: state <= S_SCAN;
        S_SCAN: begin                          // one node per cycle to both circuits
          sc_v   <= 1'b1;
          sc_idx <= ptr[NIW-1:0];
          ptr    <= ptr + 1'b1;
          if (ptr + 1'b1 == n_nodes) state <= S_DRAIN;
        end
        S_DRAIN: begin
          sm <= '0; gm <= '0;
          s_ok <= 1'b0; g_ok <= 1'b0; s_fail <= 1'b0; g_fail <= 1'b0;
          state <= S_CONNECT;
        end
        S_CONNECT: begin
          if (s_lp_done) begin
            if (s_lp_free) begin s_ok <= 1'b1; s_node <= s_nb_idx[sm]; end
            else sm <= sm + 1'b1;
          end else if (!s_ok && !s_lp_busy && !s_lp_start) s_fail <= 1'b1;
          if (g_lp_done) begin
            if (g_lp_free) begin g_ok <= 1'b1; g_node <= g_nb_idx[gm]; end
            else gm <= gm + 1'b1;
          end else if (!g_ok && !g_lp_busy && !g_lp_start) g_fail <= 1'b1;
          if ((s_ok || s_fail) && (g_ok || g_fail) && !s_lp_busy && !g_lp_busy) begin
            if (s_ok && g_ok) begin
              visited          <= '0;
              visited[s_node]  <= 1'b1;
              queue[0]         <= s_node;
              qhead            <= '0;
              qtail            <= (NIW+1)'(1);
              state            <= (s_node == g_node) ? S_WALK : S_POP;
              walk             <= g_node;
            end else begin
              state <= S_FINISH;
            end
          end
        end
        S_POP: begin
          if (visited[g_node]) begin
            state <= S_WALK;
          end else if (qhead == qtail || n_edges == 0) begin
            state <= S_FINISH;                 // goal not reachable
          end else begin
            u     <= queue[qhead[NIW-1:0]];
            qhead <= qhead + 1'b1;
            eptr  <= '0;
            state <= S_EDGES;
          end
        end
        S_EDGES: begin                         // stream the edge list
          e_v  <= 1'b1;
          eptr <= eptr + 1'b1;
          if (eptr + 1'b1 == n_edges) state <= S_EDRAIN;
        end
        S_EDRAIN: state <= S_POP;
        S_WALK: begin                          // goal side back to start side
          path[path_len[NIW-1:0]] <= walk;
          path_len <= path_len + 1'b1;
          if (walk == s_node) begin
            found <= 1'b1;
            state <= S_FINISH;
          end else begin
            walk <= parent[walk];
          end
        end
        S_FINISH: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // neighbour discovery, one edge per cycle (edge data of the previous read)
      if (e_v) begin
        if (ea == u && !visited[eb]) begin
          visited[eb] <= 1'b1;
          parent[eb]  <= u;
          queue[qtail[NIW-1:0]] <= eb;
          qtail <= qtail + 1'b1;
        end else if (eb == u && !visited[ea]) begin
          visited[ea] <= 1'b1;
          parent[ea]  <= u;
          queue[qtail[NIW-1:0]] <= ea;
          qtail <= qtail + 1'b1;
        end
      end
    end
  end
endmodule
