// tb_local_planner: a model checker answers "collision" for points whose x
// lies in a forbidden slab. For random pairs the planner must ask for
// exactly the points a + (b - a) * s / 8, s = 1..7, in order (angles the
// short way round), stop at the first colliding one and report the edge
// free only if none collides.
module tb_local_planner;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_t cfg_a, cfg_b, fq_cfg;
  logic busy, done, free, fq_valid, fq_ready, fr_valid, fr_collide;
  int checks = 0, failures = 0, n_free = 0, n_col = 0;
  local_planner dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  fx_t slab_lo, slab_hi;
  cfg_t seen [$];
  bit   pend;
  int   dly;
  assign fq_ready = !pend;
  always @(posedge clk) begin
    fr_valid <= 0;
    if (fq_valid && fq_ready) begin seen.push_back(fq_cfg); pend <= 1; dly <= $urandom_range(0, 4); end
    else if (pend) begin
      if (dly == 0) begin
        pend <= 0; fr_valid <= 1;
        fr_collide <= (seen[$].x >= slab_lo && seen[$].x <= slab_hi);
      end else dly <= dly - 1;
    end
  end
  function automatic fx_t lerp(fx_t a, fx_t b, int s);
    longint d;
    d = (longint'(b) - longint'(a)) * s;
    return fx_t'(longint'(a) + (d >>> 3));
  endfunction
  function automatic logic [9:0] alerp(logic [9:0] a, logic [9:0] b, int s);
    int d;
    d = int'(b) - int'(a);
    if (d > 511) d -= 1024;
    if (d < -512) d += 1024;
    return 10'(int'(a) + ((d * s) >>> 3));
  endfunction
  initial begin
    pend = 0; fr_valid = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      bit exp_free;
      int nexp;
      cfg_a = {$urandom, $urandom, $urandom, $urandom};
      cfg_b = {$urandom, $urandom, $urandom, $urandom};
      cfg_a.x = fx_t'($urandom_range(0, 240 << 16)); cfg_b.x = fx_t'($urandom_range(0, 240 << 16));
      slab_lo = fx_t'($urandom_range(0, 240 << 16)); slab_hi = slab_lo + (20 << 16);
      seen.delete();
      exp_free = 1; nexp = 7;
      for (int s = 1; s < 8; s++)
        if (exp_free && lerp(cfg_a.x, cfg_b.x, s) >= slab_lo && lerp(cfg_a.x, cfg_b.x, s) <= slab_hi) begin
          exp_free = 0; nexp = s;
        end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks += 2;
      if (free !== exp_free) begin failures++; $display("FAIL free=%0d exp %0d", free, exp_free); end
      if (seen.size() != nexp) begin failures++; $display("FAIL %0d points, exp %0d", seen.size(), nexp); end
      for (int s = 1; s <= seen.size(); s++) begin
        checks++;
        if (seen[s-1].x !== lerp(cfg_a.x, cfg_b.x, s) || seen[s-1].y !== lerp(cfg_a.y, cfg_b.y, s) ||
            seen[s-1].z !== lerp(cfg_a.z, cfg_b.z, s) || seen[s-1].a !== alerp(cfg_a.a, cfg_b.a, s) ||
            seen[s-1].b !== alerp(cfg_a.b, cfg_b.b, s) || seen[s-1].c !== alerp(cfg_a.c, cfg_b.c, s)) begin
          failures++; $display("FAIL point %0d", s);
        end
      end
      if (exp_free) n_free++; else n_col++;
    end
    checks++;
    if (n_free < 20 || n_col < 20) begin failures++; $display("FAIL coverage %0d %0d", n_free, n_col); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
