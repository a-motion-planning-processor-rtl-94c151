// tb_host_io: the command decoder on its own, with simple models around it.
// Bytes are fed straight into rx_valid/rx_data and taken from tx_valid/
// tx_data with a randomly stalling tx_ready. The models: a node buffer and
// an edge buffer (one-cycle reads), a roadmap builder that finishes a few
// cycles after rb_start with fixed counts, a checker that answers "collides"
// when bit 16 of x is set, and a query that reports a fixed path. Checks
// the triangle load strobes and data, the clear pulse, the requested node
// count, and every byte of the three kinds of answer.
module tb_host_io;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, tx_valid, tx_ready = 0;
  logic [7:0] rx_data = 0, tx_data;
  logic clear, env_we, rob_we;
  tri_t tri_wdata;
  logic fq_valid, fq_ready = 0, fr_valid = 0, fr_collide = 0;
  cfg_t fq_cfg;
  logic rb_start, rb_done = 0;
  logic [7:0] rb_n_target, rb_n_nodes = 0;
  logic [9:0] rb_n_edges = 0;
  logic [6:0] node_raddr;
  cfg_t node_rdata;
  logic [8:0] edge_raddr;
  logic [13:0] edge_rdata;
  logic q_start, q_done = 0, q_found = 0;
  cfg_t q_start_cfg, q_goal_cfg;
  logic [7:0] q_path_len = 0;
  logic [6:0] q_path_raddr, q_path_node;
  int checks = 0, failures = 0;
  byte unsigned txq [$];
  cfg_t nodes [128];
  int n_env = 0, n_rob = 0, n_clear = 0;
  tri_t last_tri;

  host_io dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    node_rdata <= nodes[node_raddr];
    edge_rdata <= {7'(edge_raddr * 2 % 5), 7'(edge_raddr + 1)};
    tx_ready <= ($urandom_range(0, 2) != 0);
    if (tx_valid && tx_ready) txq.push_back(tx_data);
    if (env_we) begin n_env++; last_tri <= tri_wdata; end
    if (rob_we) begin n_rob++; last_tri <= tri_wdata; end
    if (clear) n_clear++;
  end
  // path i (start side first) is node 3 * i + 1
  assign q_path_node = 7'(3 * q_path_raddr + 1);

  // checker model
  initial forever begin
    @(posedge clk);
    if (fq_valid) begin
      automatic logic c = fq_cfg.x[16];
      fq_ready <= 1; @(posedge clk); fq_ready <= 0;
      repeat ($urandom_range(0, 4)) @(posedge clk);
      fr_valid <= 1; fr_collide <= c; @(posedge clk); fr_valid <= 0;
    end
  end
  // builder and query models (sampled at the falling edge, away from the
  // registered pulses)
  initial forever begin
    @(negedge clk);
    if (rb_start) begin
      checks++;
      if (rb_n_target != 8'd6) begin failures++; $display("FAIL n_target %0d", rb_n_target); end
      repeat (7) @(negedge clk);
      rb_n_nodes = 6; rb_n_edges = 3; rb_done = 1; @(negedge clk); rb_done = 0;
    end
    if (q_start) begin
      repeat (5) @(negedge clk);
      q_found = 1; q_path_len = 3; q_done = 1; @(negedge clk); q_done = 0;
    end
  end

  task automatic put(byte unsigned b);
    @(negedge clk); rx_valid = 1; rx_data = b;
    @(negedge clk); rx_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask
  task automatic put_cfg(cfg_t c);
    logic [127:0] w;
    w = 128'(c);
    for (int i = 15; i >= 0; i--) put(w[i*8 +: 8]);
  endtask
  task automatic expect_bytes(byte unsigned e [$], string what);
    int guard;
    guard = 0;
    while (txq.size() < e.size() && guard < 100000) begin @(negedge clk); guard++; end
    foreach (e[i]) begin
      checks++;
      if (txq.size() == 0 || txq[0] != e[i]) begin
        failures++; $display("FAIL %s byte %0d", what, i);
      end
      if (txq.size() != 0) void'(txq.pop_front());
    end
    // on a real line the last byte is still being shifted out here
    repeat (20) @(negedge clk);
  endtask
  function automatic void push_cfg(ref byte unsigned q [$], input cfg_t c);
    logic [127:0] w;
    w = 128'(c);
    for (int i = 15; i >= 0; i--) q.push_back(w[i*8 +: 8]);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL watchdog, %0d bytes waiting", txq.size());
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    tri_t t;
    byte unsigned e [$];
    foreach (nodes[i]) nodes[i] = cfg_t'({$urandom, $urandom, $urandom, $urandom});
    repeat (2) @(negedge clk); rst_n = 1;
    // load 3 obstacle and 2 robot triangles, then clear
    for (int k = 0; k < 5; k++) begin
      t = tri_t'({9{$urandom}});
      put(k < 3 ? 8'h01 : 8'h02);
      for (int i = 35; i >= 0; i--) put(t[i*8 +: 8]);
      repeat (2) @(negedge clk);
      checks++;
      if (last_tri !== t) begin failures++; $display("FAIL triangle %0d data", k); end
    end
    put(8'h03);
    repeat (2) @(negedge clk);
    checks++;
    if (n_env != 3 || n_rob != 2 || n_clear != 1) begin
      failures++; $display("FAIL strobes env %0d rob %0d clear %0d", n_env, n_rob, n_clear);
    end
    // collision checks
    for (int k = 0; k < 6; k++) begin
      cfg_t c;
      c = nodes[k + 50];
      put(8'h05); put_cfg(c);
      e = '{8'h85, 8'(c.x[16])};
      expect_bytes(e, "check answer");
    end
    // roadmap of 6 nodes, model reports 3 edges
    put(8'h04); put(8'd6);
    e = '{8'h84, 8'd6, 8'd0, 8'd3};
    for (int k = 0; k < 3; k++) begin
      push_cfg(e, nodes[k * 2 % 5]);
      push_cfg(e, nodes[k + 1]);
    end
    expect_bytes(e, "roadmap answer");
    // query
    put(8'h06); put_cfg(nodes[60]); put_cfg(nodes[61]);
    e = '{8'h86, 8'd1, 8'd3};
    for (int k = 0; k < 3; k++) push_cfg(e, nodes[3 * k + 1]);
    expect_bytes(e, "query answer");
    checks++;
    if (q_start_cfg !== nodes[60] || q_goal_cfg !== nodes[61]) begin failures++; $display("FAIL query configurations"); end
    // an unknown command byte is ignored
    put(8'h7e); put(8'h05); put_cfg(nodes[70]);
    e = '{8'h85, 8'(nodes[70].x[16])};
    expect_bytes(e, "after unknown command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
