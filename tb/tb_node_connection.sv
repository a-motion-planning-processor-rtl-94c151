// tb_node_connection: 43 random nodes (some groups partly filled) and the
// wall feasibility model. The stored edges must equal, as a multiset, the
// reference: for every node i and each of its K nearest nodes j, edge (i, j)
// when all LP_STEPS-1 intermediate points miss the wall. Also checks
// edges_tried = n_nodes * K, that some edges were rejected and some kept,
// and that the checker was asked only for intermediate points.
module tb_node_connection;
  import mpp_pkg::*;
  import tb_geom_pkg::*;
  localparam int N = 43, K = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] n_nodes;
  logic busy, done;
  logic [9:0] n_edges;
  logic [31:0] edges_tried;
  logic [6:0] node_raddr;
  cfg_t node_rdata;
  logic edge_we;
  logic [8:0] edge_waddr;
  logic [13:0] edge_wdata;
  logic fq_valid, fq_ready, fr_valid, fr_collide;
  cfg_t fq_cfg;
  int n_req, n_hit;
  int checks = 0, failures = 0;
  cfg_t nodes [];
  int got [int];
  int n_written = 0;

  node_connection dut (.*);
  tb_feas_model #(.LO(100), .HI(102)) fm (.*);
  always #5 clk = ~clk;
  always @(posedge clk) node_rdata <= nodes[node_raddr];
  always @(posedge clk) if (edge_we) begin
    if (edge_waddr != 9'(n_written)) begin failures++; $display("FAIL edge address"); end
    got[int'(edge_wdata)]++;
    n_written++;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int exp_e [int];
    int n_exp = 0, n_rej = 0;
    nodes = new [128];
    foreach (nodes[i]) begin
      nodes[i] = '0;
      // keep nodes out of the thin wall [100, 102)
      nodes[i].x = fx_t'($urandom_range(80 << 16, 117 << 16));
      if (nodes[i].x >= (100 << 16)) nodes[i].x += (2 << 16);
      nodes[i].y = fx_t'($urandom_range(0, 30 << 16));
      nodes[i].z = fx_t'($urandom_range(0, 30 << 16));
      nodes[i].a = 10'($urandom); nodes[i].b = 10'($urandom); nodes[i].c = 10'($urandom);
    end
    for (int i = 0; i < N; i++) begin
      idxq_t nb;
      nb = knn(nodes, N, i, nodes[i], K);
      foreach (nb[m]) begin
        automatic bit ok = 1;
        for (int s = 1; s < 8; s++) begin
          automatic int xi = int'(point8(nodes[i], nodes[nb[m]], s).x >>> 16);
          if (xi >= 100 && xi < 102) ok = 0;
        end
        if (ok) begin exp_e[(i << 7) | nb[m]]++; n_exp++; end
        else n_rej++;
      end
    end
    n_nodes = N;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (int'(n_edges) != n_exp || n_written != n_exp) begin
      failures++; $display("FAIL n_edges %0d written %0d expected %0d", n_edges, n_written, n_exp);
    end
    foreach (exp_e[e]) begin
      checks++;
      if (!got.exists(e) || got[e] != exp_e[e]) begin failures++; $display("FAIL missing edge %0d-%0d", e >> 7, e & 127); end
    end
    foreach (got[e]) begin
      checks++;
      if (!exp_e.exists(e)) begin failures++; $display("FAIL extra edge %0d-%0d", e >> 7, e & 127); end
    end
    checks++;
    if (edges_tried != 32'(N * K)) begin failures++; $display("FAIL edges_tried %0d", edges_tried); end
    checks++;
    if (n_rej == 0 || n_exp == 0) begin failures++; $display("FAIL workload: kept %0d rejected %0d", n_exp, n_rej); end
    $display("kept %0d rejected %0d checker requests %0d", n_exp, n_rej, n_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
