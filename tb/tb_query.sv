// tb_query: a hand-made roadmap of 40 nodes in two unconnected halves
// (left and right of a wall at x in [100, 130)) with random edges inside
// each half, and 40 random start/goal queries against the wall feasibility
// model. For each query the reference picks the connection nodes (first of
// the K nearest with a free straight line) and the breadth-first hop
// distance. found must match, path_len must be that distance + 1, the path
// must start and end at the connection nodes and follow stored edges. Both
// found and not-found answers must occur.
module tb_query;
  import mpp_pkg::*;
  import tb_geom_pkg::*;
  localparam int N = 40, NE = 50, K = 5;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_t start_cfg, goal_cfg;
  logic [7:0] n_nodes;
  logic [9:0] n_edges;
  logic busy, done, found;
  logic [7:0] path_len;
  logic [6:0] path_raddr, path_node;
  logic [6:0] node_raddr;
  cfg_t node_rdata;
  logic [8:0] edge_raddr;
  logic [13:0] edge_rdata;
  logic fq_valid, fq_ready, fr_valid, fr_collide;
  cfg_t fq_cfg;
  int n_req, n_hit;
  int checks = 0, failures = 0;
  cfg_t nodes [];
  int ea [NE], eb [NE];

  query dut (.*);
  tb_feas_model #(.LO(100), .HI(130)) fm (.*);
  always #5 clk = ~clk;
  always @(posedge clk) node_rdata <= nodes[node_raddr];
  always @(posedge clk) edge_rdata <= {7'(ea[edge_raddr]), 7'(eb[edge_raddr])};

  function automatic cfg_t rnd_cfg();
    cfg_t c;
    c = '0;
    c.x = fx_t'($urandom_range(0, 209 << 16));
    if (c.x >= (100 << 16)) c.x += (30 << 16);
    c.y = fx_t'($urandom_range(0, 240 << 16));
    c.z = fx_t'($urandom_range(0, 240 << 16));
    c.a = 10'($urandom); c.b = 10'($urandom); c.c = 10'($urandom);
    return c;
  endfunction
  function automatic bit lp_free(cfg_t a, cfg_t b);
    for (int s = 1; s < 8; s++) begin
      automatic int xi = int'(point8(a, b, s).x >>> 16);
      if (xi >= 100 && xi < 130) return 0;
    end
    return 1;
  endfunction
  function automatic int connect(cfg_t q);
    idxq_t nb;
    nb = knn(nodes, N, -1, q, K);
    foreach (nb[m]) if (lp_free(q, nodes[nb[m]])) return nb[m];
    return -1;
  endfunction
  function automatic bit is_edge(int a, int b);
    for (int e = 0; e < NE; e++)
      if ((ea[e] == a && eb[e] == b) || (ea[e] == b && eb[e] == a)) return 1;
    return 0;
  endfunction
  function automatic int hops(int s, int g);
    int d [N];
    int q [$];
    foreach (d[i]) d[i] = -1;
    d[s] = 0; q.push_back(s);
    while (q.size() > 0) begin
      automatic int u = q.pop_front();
      for (int e = 0; e < NE; e++) begin
        int v;
        v = ea[e] == u ? eb[e] : (eb[e] == u ? ea[e] : -1);
        if (v >= 0 && d[v] < 0) begin d[v] = d[u] + 1; q.push_back(v); end
      end
    end
    return d[g];
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int n_found = 0, n_lost = 0;
    nodes = new [128];
    foreach (nodes[i]) nodes[i] = rnd_cfg();
    // random edges that never cross the wall
    for (int e = 0; e < NE; e++) begin
      do begin
        ea[e] = $urandom_range(0, N - 1); eb[e] = $urandom_range(0, N - 1);
      end while (ea[e] == eb[e] || ((nodes[ea[e]].x < (100 << 16)) != (nodes[eb[e]].x < (100 << 16))));
    end
    n_nodes = N; n_edges = NE; path_raddr = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int sn, gn, h;
      start_cfg = rnd_cfg(); goal_cfg = rnd_cfg();
      sn = connect(start_cfg); gn = connect(goal_cfg);
      h = (sn < 0 || gn < 0) ? -1 : hops(sn, gn);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (found != (h >= 0)) begin failures++; $display("FAIL query %0d found %0d hops %0d", t, found, h); end
      if (found && h >= 0) begin
        checks++;
        if (int'(path_len) != h + 1) begin failures++; $display("FAIL query %0d path_len %0d hops %0d", t, path_len, h); end
        path_raddr = 0; #1;
        checks++;
        if (int'(path_node) != sn) begin failures++; $display("FAIL path start"); end
        path_raddr = 7'(path_len - 1); #1;
        checks++;
        if (int'(path_node) != gn) begin failures++; $display("FAIL path end"); end
        for (int i = 0; i + 1 < int'(path_len); i++) begin
          automatic int a, b;
          path_raddr = 7'(i); #1; a = path_node;
          path_raddr = 7'(i + 1); #1; b = path_node;
          checks++;
          if (!is_edge(a, b)) begin failures++; $display("FAIL query %0d step %0d: %0d-%0d not an edge", t, i, a, b); end
        end
      end
      if (found) n_found++; else n_lost++;
    end
    checks++;
    if (n_found == 0 || n_lost == 0) begin failures++; $display("FAIL coverage found %0d not found %0d", n_found, n_lost); end
    $display("found %0d not found %0d", n_found, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
