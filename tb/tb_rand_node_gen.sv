// tb_rand_node_gen: the generator must match an independent xorshift32
// model of each degree of freedom, stay inside the 240-unit box, hold its
// value while en is low, and spread its positions over the box.
module tb_rand_node_gen;
  import mpp_pkg::*;
  localparam int unsigned SEED = 32'hCAFE_F00D;
  logic clk = 0, rst_n = 0, en = 0;
  cfg_t cfg;
  int checks = 0, failures = 0;
  rand_node_gen #(.SEED(SEED)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    bit [31:0] m [6];
    int hist [8];
    cfg_t prev;
    for (int d = 0; d < 6; d++) begin
      m[d] = SEED ^ (32'h9E37_79B9 * (d + 1));
      if (m[d] == 0) m[d] = 1;
    end
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      en = (i % 5 != 4);
      prev = cfg;
      @(negedge clk);
      if (en) for (int d = 0; d < 6; d++) begin
        m[d] ^= m[d] << 13; m[d] ^= m[d] >> 17; m[d] ^= m[d] << 5;
      end
      checks++;
      if (!en && cfg !== prev) begin failures++; $display("FAIL changed while disabled"); end
      checks++;
      if (cfg.x !== fx_t'(m[0][15:0] * 240) || cfg.y !== fx_t'(m[1][15:0] * 240) ||
          cfg.z !== fx_t'(m[2][15:0] * 240) || cfg.a !== m[3][9:0] ||
          cfg.b !== m[4][9:0] || cfg.c !== m[5][9:0]) begin
        failures++; $display("FAIL sequence at %0d", i);
      end
      checks++;
      if (cfg.x < 0 || cfg.x >= (240 << 16)) begin failures++; $display("FAIL outside box"); end
      hist[cfg.x / (30 << 16)]++;
    end
    foreach (hist[i]) begin
      checks++;
      if (hist[i] < 300) begin failures++; $display("FAIL bin %0d has %0d", i, hist[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
