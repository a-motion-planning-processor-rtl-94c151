// tb_find_closest: streams random nodes past the circuit (its own index
// included) and compares the kept list with a brute-force sort of squared
// distances, order included. Repeated with several own nodes.
module tb_find_closest;
  import mpp_pkg::*;
  localparam int K = 5, NN = 60;
  logic clk = 0, rst_n = 0, load = 0, cand_valid = 0;
  logic [6:0] own_idx_i, cand_idx, own_idx;
  cfg_t own_cfg_i, cand_cfg, own_cfg;
  logic [K-1:0] nb_valid;
  logic [6:0] nb_idx [K];
  cfg_t nb_cfg [K];
  int checks = 0, failures = 0;
  find_closest #(.K(K), .NIW(7)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  cfg_t nodes [NN];
  function automatic real sqdist(cfg_t a, cfg_t b);
    real dx, dy, dz;
    dx = real'(a.x) - real'(b.x); dy = real'(a.y) - real'(b.y); dz = real'(a.z) - real'(b.z);
    return dx*dx + dy*dy + dz*dz;
  endfunction
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      int own, n;
      int order [$];
      n = (r == 0) ? 3 : NN;                     // fewer nodes than K once
      for (int i = 0; i < n; i++) begin
        nodes[i] = '0;
        nodes[i].x = fx_t'($urandom_range(0, 240 << 16));
        nodes[i].y = fx_t'($urandom_range(0, 240 << 16));
        nodes[i].z = fx_t'($urandom_range(0, 240 << 16));
        nodes[i].a = 10'($urandom);
      end
      own = $urandom_range(0, n - 1);
      order.delete();
      @(negedge clk); load = 1; own_idx_i = 7'(own); own_cfg_i = nodes[own];
      @(negedge clk); load = 0;
      for (int i = 0; i < n; i++) begin
        cand_valid = 1; cand_idx = 7'(i); cand_cfg = nodes[i];
        @(negedge clk);
      end
      cand_valid = 0;
      // reference: indices sorted by distance, stable
      for (int i = 0; i < n; i++) if (i != own) order.push_back(i);
      for (int i = 1; i < order.size(); i++)
        for (int j = i; j > 0 && sqdist(nodes[order[j]], nodes[own]) < sqdist(nodes[order[j-1]], nodes[own]); j--) begin
          int t; t = order[j]; order[j] = order[j-1]; order[j-1] = t;
        end
      for (int m = 0; m < K; m++) begin
        checks++;
        if (m < order.size()) begin
          if (!nb_valid[m] || nb_idx[m] != 7'(order[m]) || nb_cfg[m] !== nodes[order[m]]) begin
            failures++; $display("FAIL round %0d entry %0d got %0d exp %0d", r, m, nb_idx[m], order[m]);
          end
        end else if (nb_valid[m]) begin
          failures++; $display("FAIL round %0d entry %0d should be empty", r, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
