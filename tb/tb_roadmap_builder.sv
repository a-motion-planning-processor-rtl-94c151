// tb_roadmap_builder: builds a 60-node roadmap against the wall feasibility
// model (wall at x in [100, 130)), then reads the node and edge buffers
// through the external read ports. Every node must be outside the wall and
// the edges must equal the reference (K nearest neighbours whose
// intermediate points miss the wall), as a multiset. Also checks the node
// and edge counters and that both kinds of rejection happened.
module tb_roadmap_builder;
  import mpp_pkg::*;
  import tb_geom_pkg::*;
  localparam int N = 60, K = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] n_target, n_nodes;
  logic busy, done;
  logic [9:0] n_edges;
  logic [31:0] nodes_tried, nodes_rejected, edges_tried;
  logic [6:0] x_node_raddr;
  cfg_t x_node_rdata;
  logic [8:0] x_edge_raddr;
  logic [13:0] x_edge_rdata;
  logic fq_valid, fq_ready, fr_valid, fr_collide;
  cfg_t fq_cfg;
  int n_req, n_hit;
  int checks = 0, failures = 0;

  roadmap_builder dut (.*);
  tb_feas_model #(.LO(100), .HI(130)) fm (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    cfg_t nodes [];
    int exp_e [int], got [int];
    int n_exp = 0, n_rej = 0;
    nodes = new [N];
    x_node_raddr = '0; x_edge_raddr = '0; n_target = N;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (n_nodes != 8'(N)) begin failures++; $display("FAIL n_nodes %0d", n_nodes); end
    for (int i = 0; i < N; i++) begin
      automatic int xi;
      x_node_raddr = 7'(i);
      @(negedge clk);
      nodes[i] = x_node_rdata;
      xi = int'(nodes[i].x >>> 16);
      checks++;
      if (xi >= 100 && xi < 130) begin failures++; $display("FAIL node %0d in wall", i); end
    end
    for (int e = 0; e < int'(n_edges); e++) begin
      x_edge_raddr = 9'(e);
      @(negedge clk);
      got[int'(x_edge_rdata)]++;
    end
    for (int i = 0; i < N; i++) begin
      idxq_t nb;
      nb = knn(nodes, N, i, nodes[i], K);
      foreach (nb[m]) begin
        automatic bit ok = 1;
        for (int s = 1; s < 8; s++) begin
          automatic int xi = int'(point8(nodes[i], nodes[nb[m]], s).x >>> 16);
          if (xi >= 100 && xi < 130) ok = 0;
        end
        if (ok) begin exp_e[(i << 7) | nb[m]]++; n_exp++; end
        else n_rej++;
      end
    end
    checks++;
    if (int'(n_edges) != n_exp) begin failures++; $display("FAIL n_edges %0d expected %0d", n_edges, n_exp); end
    foreach (exp_e[e]) begin
      checks++;
      if (!got.exists(e) || got[e] != exp_e[e]) begin failures++; $display("FAIL missing edge %0d-%0d", e >> 7, e & 127); end
    end
    foreach (got[e]) begin
      checks++;
      if (!exp_e.exists(e)) begin failures++; $display("FAIL extra edge %0d-%0d", e >> 7, e & 127); end
    end
    checks++;
    if (edges_tried != 32'(N * K)) begin failures++; $display("FAIL edges_tried"); end
    checks++;
    if (nodes_tried != 32'(N) + nodes_rejected) begin failures++; $display("FAIL nodes_tried"); end
    checks++;
    if (nodes_rejected == 0 || n_rej == 0) begin failures++; $display("FAIL no rejections: nodes %0d edges %0d", nodes_rejected, n_rej); end
    $display("nodes tried %0d rejected %0d; edges kept %0d rejected %0d", nodes_tried, nodes_rejected, n_exp, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
