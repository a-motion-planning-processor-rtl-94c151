// tb_node_generation: node generation against the wall feasibility model.
// Every request sent to the checker is recorded; the stored nodes must be
// exactly the non-colliding requests in order, the count must reach the
// target, tried = requested, rejected = colliding requests, and the node
// count must never pass the target. Runs targets 100 and 7.
module tb_node_generation;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] n_target;
  logic busy, done;
  logic [7:0] node_count;
  logic node_we;
  logic [6:0] node_waddr;
  cfg_t node_wdata;
  logic [31:0] tried, rejected;
  logic fq_valid, fq_ready, fr_valid, fr_collide;
  cfg_t fq_cfg;
  int n_req, n_hit;
  int checks = 0, failures = 0;
  cfg_t reqs [$];
  cfg_t stored [128];
  int n_stored;

  node_generation dut (.*);
  tb_feas_model fm (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (fq_valid && fq_ready) reqs.push_back(fq_cfg);
    if (node_we) begin
      stored[node_waddr] = node_wdata;
      n_stored++;
    end
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int targets [2] = '{100, 7};
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (targets[t]) begin
      automatic int j = 0;
      reqs.delete(); n_stored = 0;
      @(negedge clk); n_target = 8'(targets[t]); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);  // let the monitor see the last write
      checks++;
      if (node_count != 8'(targets[t]) || n_stored != targets[t]) begin
        failures++; $display("FAIL count %0d stored %0d target %0d", node_count, n_stored, targets[t]);
      end
      checks++;
      if (tried != 32'(reqs.size())) begin failures++; $display("FAIL tried %0d vs %0d", tried, reqs.size()); end
      foreach (reqs[i]) begin
        automatic int xi = int'(reqs[i].x >>> 16);
        if (!(xi >= 100 && xi < 140)) begin
          checks++;
          if (j < n_stored && stored[j] !== reqs[i]) begin failures++; $display("FAIL node %0d", j); end
          j++;
        end
      end
      checks++;
      // the last batch may have extra free candidates that were not needed
      if (j < targets[t]) begin failures++; $display("FAIL free requests %0d", j); end
      checks++;
      if (rejected != 32'(reqs.size() - j)) begin failures++; $display("FAIL rejected"); end
      checks++;
      if (rejected == 0) begin failures++; $display("FAIL no rejection seen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
