// tb_collision_circuit: one circuit with a bank of obstacle box triangles.
// A robot triangle is checked against the bank; the expected answer comes
// from running each pair through the same floating point reference idea as
// the box test: a triangle placed well inside an obstacle's face region hits,
// one far away misses. Also checks the empty bank, the early stop at the
// first hit (latency) and cancel.
module tb_collision_circuit;
  import mpp_pkg::*;
  import tb_geom_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, cancel = 0;
  tri_t t_r;
  logic [8:0] env_count;
  logic [7:0] env_raddr;
  tri_t env_rdata;
  logic busy, done, hit;
  logic we = 0; logic [7:0] waddr; tri_t wdata;
  int checks = 0, failures = 0;
  tri_mem u_mem (.clk, .we, .waddr, .wdata, .raddr(env_raddr), .rdata(env_rdata));
  collision_circuit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam fx_t U = 1 << 16;
  task automatic check(tri_t t, int cnt, bit exp_hit, int max_lat, string what);
    int lat;
    @(negedge clk);
    t_r = t; env_count = 9'(cnt); start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (hit !== exp_hit) begin failures++; $display("FAIL %s hit=%0d", what, hit); end
    if (lat > max_lat) begin failures++; $display("FAIL %s latency %0d > %0d", what, lat, max_lat); end
  endtask
  initial begin
    box_tris_t bt;
    tri_t near_t, far_t;
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // four boxes side by side along x: 48 triangles
    for (int b = 0; b < 4; b++) begin
      bt = box_tris(fx_t'(b * 100) * U, 0, 0, 48 * U, 48 * U, 16 * U);
      for (int t = 0; t < 12; t++) begin
        we = 1; waddr = 8'(b * 12 + t); wdata = bt[t]; @(negedge clk);
      end
    end
    we = 0;
    // a vertical triangle piercing the top face of box 3 (x 300..348)
    near_t = mkt(mkv(320 * U, 10 * U, 10 * U), mkv(330 * U, 10 * U, 30 * U), mkv(320 * U, 20 * U, 30 * U));
    far_t  = mkt(mkv(320 * U, 10 * U, 60 * U), mkv(330 * U, 10 * U, 80 * U), mkv(320 * U, 20 * U, 80 * U));
    // 48 pairs at no more than 8 cycles each, plus start and done
    check(near_t, 48, 1, 48 * 8 + 2, "pierce box 3");
    check(far_t, 48, 0, 48 * 8 + 2, "above box 3");
    check(near_t, 36, 0, 36 * 8 + 2, "box 3 not in bank");
    check(near_t, 39, 1, 39 * 8 + 2, "hit on the last triangle of the bank");
    check(near_t, 0, 0, 2, "empty bank");
    // triangle piercing box 0 must stop early (first faces of the bank)
    near_t = mkt(mkv(20 * U, 10 * U, 10 * U), mkv(30 * U, 10 * U, 30 * U), mkv(20 * U, 20 * U, 30 * U));
    check(near_t, 48, 1, 12 * 8 + 2, "early stop");
    // cancel
    @(negedge clk); t_r = far_t; env_count = 48; start = 1;
    @(negedge clk); start = 0;
    repeat (20) @(negedge clk);
    cancel = 1; @(negedge clk); cancel = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL cancel"); end
    check(far_t, 48, 0, 48 * 8 + 2, "after cancel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
