// tb_transform_unit: checks the robot transformation against a floating
// point reference (rotation Rz*Ry*Rx from $sin/$cos, then translation),
// within 1/256 of a unit per coordinate. Runs once with the FIFO drained
// every cycle, where the job must take robot_count + 9 cycles, and once with
// a slow drain that forces back-pressure; also checks that cancel stops a job.
module tb_transform_unit;
  import mpp_pkg::*;

  localparam int NT = 12;
  logic clk = 0, rst_n = 0;
  logic start = 0, cancel = 0;
  cfg_t cfg;
  logic [8:0] robot_count;
  logic [7:0] rob_raddr;
  tri_t rob_rdata;
  logic out_valid, busy, done;
  tri_t out_tri;
  logic we = 0; logic [7:0] waddr; tri_t wdata;
  logic pop;
  tri_t head;
  logic empty, full;
  logic [4:0] fifo_count;
  int checks = 0, failures = 0;
  tri_t robot [NT];
  int popped;

  always #5 clk = ~clk;

  tri_mem u_mem (.clk, .we, .waddr, .wdata, .raddr(rob_raddr), .rdata(rob_rdata));
  tri_fifo u_fifo (.clk, .rst_n, .flush(1'b0), .push(out_valid), .wdata(out_tri), .pop,
                   .rdata(head), .empty, .full, .count(fifo_count));
  transform_unit dut (.clk, .rst_n, .start, .cfg, .cancel, .robot_count, .rob_raddr,
                      .rob_rdata, .fifo_count, .out_valid, .out_tri, .busy, .done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v); return v < 0 ? -v : v; endfunction
  function automatic real fr(fx_t v); return real'(v) / 65536.0; endfunction

  function automatic void chk_vtx(vec3_t got, vec3_t in, cfg_t c, int idx);
    real a, b, g, x, y, z, x1, y1, z1, x2, y2, z2, x3, y3, z3;
    a = 2.0 * 3.14159265358979 * c.a / 1024.0;
    b = 2.0 * 3.14159265358979 * c.b / 1024.0;
    g = 2.0 * 3.14159265358979 * c.c / 1024.0;
    x = fr(in.x); y = fr(in.y); z = fr(in.z);
    x1 = x; y1 = y * $cos(a) - z * $sin(a); z1 = y * $sin(a) + z * $cos(a);     // Rx
    x2 = x1 * $cos(b) + z1 * $sin(b); y2 = y1; z2 = -x1 * $sin(b) + z1 * $cos(b); // Ry
    x3 = x2 * $cos(g) - y2 * $sin(g); y3 = x2 * $sin(g) + y2 * $cos(g); z3 = z2;  // Rz
    x3 += fr(c.x); y3 += fr(c.y); z3 += fr(c.z);
    checks++;
    if (fabs(fr(got.x) - x3) > 1.0/256 || fabs(fr(got.y) - y3) > 1.0/256 ||
        fabs(fr(got.z) - z3) > 1.0/256) begin
      failures++;
      $display("FAIL tri %0d got (%f %f %f) expected (%f %f %f)", idx,
               fr(got.x), fr(got.y), fr(got.z), x3, y3, z3);
    end
  endfunction

  function automatic vec3_t rvec();
    vec3_t v;
    v.x = fx_t'(int'($urandom_range(0, 48 << 16)) - (24 << 16));
    v.y = fx_t'(int'($urandom_range(0, 48 << 16)) - (24 << 16));
    v.z = fx_t'(int'($urandom_range(0, 48 << 16)) - (24 << 16));
    return v;
  endfunction

  // consumer: pops and checks every triangle; slow = pop one cycle in four
  bit slow;
  cfg_t cur;
  int cyc = 0;
  always @(posedge clk) cyc++;
  assign pop = !empty && (!slow || (cyc % 4 == 0));
  always @(posedge clk) begin
    if (pop) begin
      chk_vtx(head.v0, robot[popped].v0, cur, popped);
      chk_vtx(head.v1, robot[popped].v1, cur, popped);
      chk_vtx(head.v2, robot[popped].v2, cur, popped);
      popped++;
    end
  end

  task automatic job(bit s, output int lat);
    @(negedge clk);
    slow = s; popped = 0;
    cfg.x = fx_t'($urandom_range(0, 240 << 16));
    cfg.y = fx_t'($urandom_range(0, 240 << 16));
    cfg.z = fx_t'($urandom_range(0, 240 << 16));
    cfg.a = 10'($urandom); cfg.b = 10'($urandom); cfg.c = 10'($urandom);
    cur = cfg; start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    while (!empty) @(negedge clk);
    @(negedge clk);
    checks++;
    if (popped != NT) begin failures++; $display("FAIL popped %0d", popped); end
  endtask

  initial begin
    int lat;
    slow = 0; popped = 0; cfg = '0; robot_count = NT;
    for (int i = 0; i < NT; i++) begin
      robot[i].v0 = rvec(); robot[i].v1 = rvec(); robot[i].v2 = rvec();
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NT; i++) begin
      we = 1; waddr = 8'(i); wdata = robot[i];
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < 20; r++) begin
      job(0, lat);
      checks++;
      if (lat != NT + 9) begin failures++; $display("FAIL latency %0d", lat); end
      job(1, lat);
    end
    // cancel in the middle of a job
    @(negedge clk);
    start = 1; cfg.a = 0;
    @(negedge clk); start = 0;
    repeat (7) @(negedge clk);
    cancel = 1;
    @(negedge clk); cancel = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after cancel"); end
    repeat (10) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
