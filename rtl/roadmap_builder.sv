// roadmap_builder: the roadmap building module.
//
// Runs node generation until n_target collision-free configurations are in
// the node buffer, then node connection, which tries to join every node to
// its K nearest neighbours and stores the free edges in the edge buffer.
// The two phases follow each other, as in the source design, and use the
// one feasibility port in turn. Outside a build the node and edge buffers
// can be read through the x_* ports (by the query module or the host).
//
// Timing: start (one cycle) with n_target; done pulses when the roadmap is
// complete, with n_nodes and n_edges valid from then until the next start.
// Buffer reads return data one cycle after the address.
module roadmap_builder
  import mpp_pkg::*;
#(
  parameter int N_RAND    = 10,
  parameter int N_CLOSEST = 10,
  parameter int K         = 5,
  parameter int N_LP      = 1,
  parameter int LP_STEPS  = 8,
  parameter int MAX_NODES = 100,
  parameter int BOX       = 240,
  parameter int MAX_EDGES = MAX_NODES * K,
  parameter int NIW       = $clog2(MAX_NODES),
  parameter int EAW       = $clog2(MAX_EDGES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NIW:0]     n_target,
  output logic             busy,
  output logic             done,
  output logic [NIW:0]     n_nodes,
  output logic [EAW:0]     n_edges,
  output logic [31:0]      nodes_tried,
  output logic [31:0]      nodes_rejected,
  output logic [31:0]      edges_tried,
  // buffer reads from outside (when not building)
  input  logic [NIW-1:0]   x_node_raddr,
  output cfg_t             x_node_rdata,
  input  logic [EAW-1:0]   x_edge_raddr,
  output logic [2*NIW-1:0] x_edge_rdata,
  // feasibility checker
  output logic             fq_valid,
  output cfg_t             fq_cfg,
  input  logic             fq_ready,
  input  logic             fr_valid,
  input  logic             fr_collide
);
  typedef enum logic [1:0] {S_IDLE, S_GEN, S_CONN} state_t;
  state_t state;

  logic           ng_start, ng_busy, ng_done, ng_we;
  logic [NIW-1:0] ng_waddr;
  cfg_t           ng_wdata;
  logic           ng_fq_valid, ng_fq_ready;
  cfg_t           ng_fq_cfg;
  logic           nc_start, nc_busy, nc_done;
  logic           nc_fq_valid, nc_fq_ready;
  cfg_t           nc_fq_cfg;
  logic [NIW-1:0] nc_node_raddr;
  logic           e_we;
  logic [EAW-1:0] e_waddr;
  logic [2*NIW-1:0] e_wdata;

  node_generation #(.N_RAND(N_RAND), .MAX_NODES(MAX_NODES), .BOX(BOX)) u_gen (
    .clk, .rst_n, .start(ng_start), .n_target, .busy(ng_busy), .done(ng_done),
    .node_count(n_nodes), .node_we(ng_we), .node_waddr(ng_waddr), .node_wdata(ng_wdata),
    .tried(nodes_tried), .rejected(nodes_rejected),
    .fq_valid(ng_fq_valid), .fq_cfg(ng_fq_cfg), .fq_ready(ng_fq_ready),
    .fr_valid(fr_valid && state == S_GEN), .fr_collide);

  node_buffer #(.DEPTH(MAX_NODES)) u_nodes (
    .clk, .we(ng_we), .waddr(ng_waddr), .wdata(ng_wdata),
    .raddr((state == S_CONN) ? nc_node_raddr : x_node_raddr), .rdata(x_node_rdata));

  node_connection #(.N_CLOSEST(N_CLOSEST), .K(K), .N_LP(N_LP), .LP_STEPS(LP_STEPS),
                    .MAX_NODES(MAX_NODES), .MAX_EDGES(MAX_EDGES)) u_conn (
    .clk, .rst_n, .start(nc_start), .n_nodes, .busy(nc_busy), .done(nc_done),
    .n_edges, .edges_tried, .node_raddr(nc_node_raddr), .node_rdata(x_node_rdata),
    .edge_we(e_we), .edge_waddr(e_waddr), .edge_wdata(e_wdata),
    .fq_valid(nc_fq_valid), .fq_cfg(nc_fq_cfg), .fq_ready(nc_fq_ready),
    .fr_valid(fr_valid && state == S_CONN), .fr_collide);

  edge_buffer #(.DEPTH(MAX_EDGES), .NW(NIW)) u_edges (
    .clk, .we(e_we), .waddr(e_waddr), .wdata(e_wdata),
    .raddr(x_edge_raddr), .rdata(x_edge_rdata));

  assign ng_start    = (state == S_IDLE) && start;
  assign nc_start    = (state == S_GEN) && ng_done;
  assign fq_valid    = (state == S_GEN) ? ng_fq_valid : (state == S_CONN) && nc_fq_valid;
  assign fq_cfg      = (state == S_GEN) ? ng_fq_cfg : nc_fq_cfg;
  assign ng_fq_ready = (state == S_GEN) && fq_ready;
  assign nc_fq_ready = (state == S_CONN) && fq_ready;
  assign busy        = (state != S_IDLE) || ng_busy || nc_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_GEN;
        S_GEN:  if (ng_done) state <= S_CONN;
        S_CONN: if (nc_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
