// mpp_top: motion planning processor (probabilistic roadmap method).
//
// A host sends the obstacle and robot models as triangle meshes over a
// serial line; the processor builds a probabilistic roadmap (random
// collision-free configurations joined by collision-free straight-line
// edges), answers path queries on it, and can also check single
// configurations for collision. Its parts, as in the source design:
//   I/O                  uart_rx, uart_tx and the command decoder host_io
//   memory               robot and obstacle triangle memories (inside the
//                        collision detector), node and edge buffers (inside
//                        the roadmap builder)
//   roadmap builder      node generation, then node connection
//   query                connects start / goal and searches the roadmap
//   feasibility checker  collision_detector: transformation circuit, FIFO,
//                        N_CD parallel triangle-triangle collision circuits
// The builder, the query and the host's direct collision check share the
// one feasibility checker through a round-robin arbiter.
//
// Interface: clk (50 MHz in the source design), active-low asynchronous
// reset, serial in and out (8N1, CLKS_PER_BIT clocks per bit), and status
// outputs for the running jobs. Default parameters are the source design's
// main configuration: 25 collision circuits, 10 random node generators, 10
// closest-finding circuits with 1 local planner each, k = 5, up to 100
// nodes, 256 triangles per memory bank.
//
// Lint notes: the statistics counters of the roadmap builder and the
// triangle counts of the collision detector are left unconnected here on
// purpose (they serve testbenches and debugging), which lint reports as
// empty pin connections.
module mpp_top
  import mpp_pkg::*;
#(
  parameter int CLKS_PER_BIT = 434,
  parameter int N_CD         = 25,
  parameter int BANK_DEPTH   = 256,
  parameter int ROBOT_DEPTH  = 256,
  parameter int FIFO_DEPTH   = 16,
  parameter int N_RAND       = 10,
  parameter int N_CLOSEST    = 10,
  parameter int K            = 5,
  parameter int N_LP         = 1,
  parameter int LP_STEPS     = 8,
  parameter int MAX_NODES    = 100,
  parameter int BOX          = 240
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic building,
  output logic querying,
  output logic checking
);
  localparam int MAX_EDGES = MAX_NODES * K;
  localparam int NIW = $clog2(MAX_NODES);
  localparam int EAW = $clog2(MAX_EDGES);
  localparam int BAW = $clog2(BANK_DEPTH);
  localparam int RAW = $clog2(ROBOT_DEPTH);
  localparam int BKW = (N_CD > 1) ? $clog2(N_CD) : 1;

  // ------------------------------------------------ I/O
  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (.clk, .rst_n, .rx(uart_rxd), .valid(rx_valid), .data(rx_data));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (.clk, .rst_n, .valid(tx_valid), .data(tx_data),
                                              .ready(tx_ready), .tx(uart_txd));

  logic           clear, env_we, rob_we;
  tri_t           tri_wdata;
  logic           rb_start, rb_busy, rb_done, q_start, q_busy, q_done, q_found;
  logic [NIW:0]   rb_n_target, n_nodes, q_path_len;
  logic [EAW:0]   n_edges;
  logic [NIW-1:0] h_node_raddr, q_node_raddr, q_path_raddr, q_path_node;
  logic [EAW-1:0] h_edge_raddr, q_edge_raddr;
  cfg_t           node_rdata, q_start_cfg, q_goal_cfg;
  logic [2*NIW-1:0] edge_rdata;

  // feasibility requesters: 0 roadmap builder, 1 query, 2 host
  logic [2:0] fq_valid, fq_ready, fr_valid;
  cfg_t       fq_cfg [3];
  logic       fr_collide;
  logic       d_req_valid, d_req_ready, d_resp_valid, d_resp_collide;
  cfg_t       d_req_cfg;

  host_io #(.MAX_NODES(MAX_NODES), .MAX_EDGES(MAX_EDGES)) u_host (
    .clk, .rst_n, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .clear, .env_we, .rob_we, .tri_wdata,
    .fq_valid(fq_valid[2]), .fq_cfg(fq_cfg[2]), .fq_ready(fq_ready[2]),
    .fr_valid(fr_valid[2]), .fr_collide,
    .rb_start, .rb_n_target, .rb_done, .rb_n_nodes(n_nodes), .rb_n_edges(n_edges),
    .node_raddr(h_node_raddr), .node_rdata, .edge_raddr(h_edge_raddr), .edge_rdata,
    .q_start, .q_start_cfg, .q_goal_cfg, .q_done, .q_found, .q_path_len,
    .q_path_raddr, .q_path_node);

  // ------------------------------------------------ roadmap builder
  roadmap_builder #(.N_RAND(N_RAND), .N_CLOSEST(N_CLOSEST), .K(K), .N_LP(N_LP),
                    .LP_STEPS(LP_STEPS), .MAX_NODES(MAX_NODES), .BOX(BOX)) u_rb (
    .clk, .rst_n, .start(rb_start), .n_target(rb_n_target), .busy(rb_busy), .done(rb_done),
    .n_nodes, .n_edges, .nodes_tried(), .nodes_rejected(), .edges_tried(),
    .x_node_raddr(q_busy ? q_node_raddr : h_node_raddr), .x_node_rdata(node_rdata),
    .x_edge_raddr(q_busy ? q_edge_raddr : h_edge_raddr), .x_edge_rdata(edge_rdata),
    .fq_valid(fq_valid[0]), .fq_cfg(fq_cfg[0]), .fq_ready(fq_ready[0]),
    .fr_valid(fr_valid[0]), .fr_collide);

  // ------------------------------------------------ query
  query #(.K(K), .LP_STEPS(LP_STEPS), .MAX_NODES(MAX_NODES), .MAX_EDGES(MAX_EDGES)) u_query (
    .clk, .rst_n, .start(q_start), .start_cfg(q_start_cfg), .goal_cfg(q_goal_cfg),
    .n_nodes, .n_edges, .busy(q_busy), .done(q_done), .found(q_found),
    .path_len(q_path_len), .path_raddr(q_path_raddr), .path_node(q_path_node),
    .node_raddr(q_node_raddr), .node_rdata, .edge_raddr(q_edge_raddr), .edge_rdata,
    .fq_valid(fq_valid[1]), .fq_cfg(fq_cfg[1]), .fq_ready(fq_ready[1]),
    .fr_valid(fr_valid[1]), .fr_collide);

  // ------------------------------------------------ feasibility checker
  feas_arbiter #(.N(3)) u_arb (
    .clk, .rst_n, .req_valid(fq_valid), .req_cfg(fq_cfg), .req_ready(fq_ready),
    .resp_valid(fr_valid), .resp_collide(fr_collide),
    .m_req_valid(d_req_valid), .m_req_cfg(d_req_cfg), .m_req_ready(d_req_ready),
    .m_resp_valid(d_resp_valid), .m_resp_collide(d_resp_collide));

  collision_detector #(.N_CD(N_CD), .BANK_DEPTH(BANK_DEPTH), .ROBOT_DEPTH(ROBOT_DEPTH),
                       .FIFO_DEPTH(FIFO_DEPTH)) u_cd (
    .clk, .rst_n, .clear, .env_we, .env_wdata(tri_wdata), .rob_we, .rob_wdata(tri_wdata),
    .rob_count(), .env_count(),
    .req_valid(d_req_valid), .req_cfg(d_req_cfg), .req_ready(d_req_ready),
    .resp_valid(d_resp_valid), .resp_collide(d_resp_collide));

  assign building = rb_busy;
  assign querying = q_busy;
  assign checking = !d_req_ready;
endmodule
