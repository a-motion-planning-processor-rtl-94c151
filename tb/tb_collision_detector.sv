// tb_collision_detector: random box worlds against an axis-aligned box
// overlap reference.
//
// Obstacles are 48 x 48 x 16 boxes at random positions (random fractions, so
// faces never exactly touch) inside a 240-unit cube, the robot a 48 x 24 x 24
// box centred on its configuration, rotated by multiples of 90 degrees so the
// table sine/cosine values are exact. Every configuration's answer is
// compared with the box overlap reference; both answers must occur. Two
// worlds (10 and 20 obstacles) are loaded, with a clear in between.
module tb_collision_detector;
  import mpp_pkg::*;
  import tb_geom_pkg::*;

  localparam int NOB_MAX = 20;
  logic clk = 0, rst_n = 0;
  logic clear = 0, env_we = 0, rob_we = 0, req_valid = 0;
  tri_t env_wdata, rob_wdata;
  cfg_t req_cfg;
  logic [8:0] rob_count;
  logic [13:0] env_count;
  logic req_ready, resp_valid, resp_collide;
  int checks = 0, failures = 0, n_col = 0, n_free = 0;
  real ox [NOB_MAX], oy [NOB_MAX], oz [NOB_MAX];
  int nob;

  always #5 clk = ~clk;

  collision_detector dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_world(int n);
    box_tris_t bt;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    nob = n;
    for (int o = 0; o < n; o++) begin
      fx_t x, y, z;
      x = fx_t'($urandom_range(0, 192 << 16));
      y = fx_t'($urandom_range(0, 192 << 16));
      z = fx_t'($urandom_range(0, 224 << 16));
      ox[o] = fr(x); oy[o] = fr(y); oz[o] = fr(z);
      bt = box_tris(x, y, z, 48 << 16, 48 << 16, 16 << 16);
      for (int t = 0; t < 12; t++) begin
        env_we = 1; env_wdata = bt[t]; @(negedge clk);
      end
    end
    env_we = 0;
    bt = box_tris(-(24 << 16), -(12 << 16), -(12 << 16), 48 << 16, 24 << 16, 24 << 16);
    for (int t = 0; t < 12; t++) begin
      rob_we = 1; rob_wdata = bt[t]; @(negedge clk);
    end
    rob_we = 0;
    checks += 2;
    if (env_count != 14'(12 * n)) begin failures++; $display("FAIL env_count %0d", env_count); end
    if (rob_count != 9'd12) begin failures++; $display("FAIL rob_count %0d", rob_count); end
  endtask

  task automatic query(cfg_t c);
    real ex, ey, ez, cx, cy, cz;
    bit exp_col;
    robot_extent(c, 24.0, 12.0, 12.0, ex, ey, ez);
    cx = fr(c.x); cy = fr(c.y); cz = fr(c.z);
    exp_col = 0;
    for (int o = 0; o < nob; o++)
      exp_col |= iv_overlap(cx - ex, cx + ex, ox[o], ox[o] + 48.0) &&
                 iv_overlap(cy - ey, cy + ey, oy[o], oy[o] + 48.0) &&
                 iv_overlap(cz - ez, cz + ez, oz[o], oz[o] + 16.0);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_cfg = c;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    checks++;
    if (resp_collide !== exp_col) begin
      failures++;
      $display("FAIL cfg (%f %f %f) rot %0d %0d %0d collide=%0d expected %0d",
               cx, cy, cz, c.a, c.b, c.c, resp_collide, exp_col);
    end
    if (exp_col) n_col++; else n_free++;
  endtask

  initial begin
    cfg_t c;
    env_wdata = '0; rob_wdata = '0; req_cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (ox[i]) begin ox[i] = 0; oy[i] = 0; oz[i] = 0; end
    for (int w = 0; w < 2; w++) begin
      load_world(w == 0 ? 10 : 20);
      for (int q = 0; q < 60; q++) begin
        c.x = fx_t'($urandom_range(0, 240 << 16));
        c.y = fx_t'($urandom_range(0, 240 << 16));
        c.z = fx_t'($urandom_range(0, 240 << 16));
        c.a = 10'($urandom_range(0, 3) << 8);
        c.b = 10'($urandom_range(0, 3) << 8);
        c.c = 10'($urandom_range(0, 3) << 8);
        query(c);
      end
    end
    checks++;
    if (n_col < 5 || n_free < 5) begin
      failures++;
      $display("FAIL coverage collide=%0d free=%0d", n_col, n_free);
    end
    $display("collide=%0d free=%0d", n_col, n_free);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
