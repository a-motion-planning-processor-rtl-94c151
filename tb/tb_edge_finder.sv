// tb_edge_finder: 37 random nodes in a node buffer model; for every group
// (bases 0, 10, 20, 30) each circuit's neighbour list must equal a brute
// force k-nearest search, circuits past the last node must be marked
// invalid, and done must come N_CLOSEST + n_nodes + 2 cycles after start
// for full groups.
module tb_edge_finder;
  import mpp_pkg::*;
  import tb_geom_pkg::*;
  localparam int NC = 10, K = 5, N = 37;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] base, n_nodes;
  logic busy, done;
  logic [6:0] node_raddr;
  cfg_t node_rdata;
  logic [NC-1:0] own_valid;
  logic [6:0] own_idx [NC];
  cfg_t own_cfg [NC];
  logic [K-1:0] nb_valid [NC];
  logic [6:0] nb_idx [NC][K];
  cfg_t nb_cfg [NC][K];
  cfg_t nodes [];
  int checks = 0, failures = 0;
  edge_finder dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) node_rdata <= nodes[node_raddr];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    nodes = new [128];
    foreach (nodes[i]) begin
      nodes[i] = '0;
      nodes[i].x = fx_t'($urandom_range(0, 240 << 16));
      nodes[i].y = fx_t'($urandom_range(0, 240 << 16));
      nodes[i].z = fx_t'($urandom_range(0, 240 << 16));
    end
    n_nodes = N;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < N; b += NC) begin
      int lat;
      @(negedge clk); base = 8'(b); start = 1;
      @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      if (b + NC <= N) begin
        checks++;
        if (lat != NC + N + 2) begin failures++; $display("FAIL latency %0d", lat); end
      end
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (own_valid[c] != (b + c < N)) begin failures++; $display("FAIL own_valid %0d", c); end
        if (b + c < N) begin
          idxq_t ref_q;
          ref_q = knn(nodes, N, b + c, nodes[b + c], K);
          checks++;
          if (own_idx[c] != 7'(b + c) || own_cfg[c] !== nodes[b + c]) begin failures++; $display("FAIL own %0d", c); end
          for (int m = 0; m < K; m++) begin
            checks++;
            if (!nb_valid[c][m] || nb_idx[c][m] != 7'(ref_q[m]) || nb_cfg[c][m] !== nodes[ref_q[m]]) begin
              failures++; $display("FAIL node %0d neighbour %0d: %0d vs %0d", b + c, m, nb_idx[c][m], ref_q[m]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
