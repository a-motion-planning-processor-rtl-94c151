// tb_tri_tri_isect: self-checking test of the triangle-triangle test.
//
// Random triangle pairs (general position, coplanar pairs, far-apart pairs
// and pairs scaled up to nearly the full 32-bit range) are checked against a
// reference written independently in floating point: for non-coplanar pairs
// an edge-crosses-triangle test in both directions, for coplanar pairs a 2-D
// segment-crossing and point-in-triangle test. The latency is checked too:
// 4 cycles when a half-plane check separates the pair, 5 for a coplanar pair
// and 6 for the interval test.
module tb_tri_tri_isect;
  import mpp_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, flush = 0;
  tri_t t_r, t_e;
  logic busy, done, hit;
  int checks = 0, failures = 0;
  int n_hit = 0, n_copl = 0, n_half = 0;

  tri_tri_isect dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef real vr_t [3];
  typedef vr_t tr_t [3];

  function automatic vr_t sub(vr_t a, vr_t b);
    return '{a[0]-b[0], a[1]-b[1], a[2]-b[2]};
  endfunction
  function automatic vr_t vcross(vr_t a, vr_t b);
    return '{a[1]*b[2]-a[2]*b[1], a[2]*b[0]-a[0]*b[2], a[0]*b[1]-a[1]*b[0]};
  endfunction
  function automatic real dot(vr_t a, vr_t b);
    return a[0]*b[0] + a[1]*b[1] + a[2]*b[2];
  endfunction

  // does segment p-q cross triangle t (non-coplanar case)
  function automatic bit seg_tri(vr_t p, vr_t q, tr_t t);
    vr_t n, x;
    real dp, dq, s1, s2, s3;
    n  = vcross(sub(t[1], t[0]), sub(t[2], t[0]));
    dp = dot(n, sub(p, t[0]));
    dq = dot(n, sub(q, t[0]));
    if (dp * dq > 0.0 || dp == dq) return 0;
    for (int i = 0; i < 3; i++) x[i] = p[i] + (q[i] - p[i]) * dp / (dp - dq);
    s1 = dot(n, vcross(sub(t[1], t[0]), sub(x, t[0])));
    s2 = dot(n, vcross(sub(t[2], t[1]), sub(x, t[1])));
    s3 = dot(n, vcross(sub(t[0], t[2]), sub(x, t[2])));
    return (s1 >= 0 && s2 >= 0 && s3 >= 0) || (s1 <= 0 && s2 <= 0 && s3 <= 0);
  endfunction

  function automatic real orient(vr_t a, vr_t b, vr_t c);   // 2-D, x/y
    return (b[0]-a[0])*(c[1]-a[1]) - (b[1]-a[1])*(c[0]-a[0]);
  endfunction
  function automatic bit seg_seg2(vr_t a, vr_t b, vr_t c, vr_t d);
    real o1, o2, o3, o4;
    o1 = orient(a, b, c); o2 = orient(a, b, d);
    o3 = orient(c, d, a); o4 = orient(c, d, b);
    return (o1 * o2 <= 0) && (o3 * o4 <= 0);
  endfunction
  function automatic bit in_tri2(vr_t p, tr_t t);
    real a, b, c;
    a = orient(t[0], t[1], p); b = orient(t[1], t[2], p); c = orient(t[2], t[0], p);
    return (a > 0 && b > 0 && c > 0) || (a < 0 && b < 0 && c < 0);
  endfunction

  function automatic bit ref_hit(tr_t v, tr_t u, output bit copl, output bit half);
    vr_t n1, n2;
    real dv[3], du[3];
    bit r;
    n1 = vcross(sub(v[1], v[0]), sub(v[2], v[0]));
    n2 = vcross(sub(u[1], u[0]), sub(u[2], u[0]));
    for (int i = 0; i < 3; i++) begin
      dv[i] = dot(n2, sub(v[i], u[0]));
      du[i] = dot(n1, sub(u[i], v[0]));
    end
    half = (dv[0]*dv[1] > 0 && dv[0]*dv[2] > 0) || (du[0]*du[1] > 0 && du[0]*du[2] > 0);
    copl = !half && dv[0] == 0 && dv[1] == 0 && dv[2] == 0;
    if (half) return 0;
    r = 0;
    if (copl) begin   // test generator makes coplanar pairs only in z = const planes
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          r |= seg_seg2(v[i], v[(i+1)%3], u[j], u[(j+1)%3]);
      r |= in_tri2(v[0], u) || in_tri2(u[0], v);
    end else begin
      for (int i = 0; i < 3; i++) begin
        r |= seg_tri(v[i], v[(i+1)%3], u);
        r |= seg_tri(u[i], u[(i+1)%3], v);
      end
    end
    return r;
  endfunction

  function automatic tr_t to_real(tri_t t);
    tr_t r;
    r[0] = '{real'(t.v0.x), real'(t.v0.y), real'(t.v0.z)};
    r[1] = '{real'(t.v1.x), real'(t.v1.y), real'(t.v1.z)};
    r[2] = '{real'(t.v2.x), real'(t.v2.y), real'(t.v2.z)};
    return r;
  endfunction

  function automatic fx_t rnd(int span, int off);
    return fx_t'(int'($urandom_range(0, 2*span)) - span + off);
  endfunction

  function automatic vec3_t rv(int span, int ox, int oy, int oz);
    vec3_t v;
    v.x = rnd(span, ox); v.y = rnd(span, oy); v.z = rnd(span, oz);
    return v;
  endfunction

  function automatic tri_t scale(tri_t t, int sh);
    tri_t r;
    r.v0.x = t.v0.x <<< sh; r.v0.y = t.v0.y <<< sh; r.v0.z = t.v0.z <<< sh;
    r.v1.x = t.v1.x <<< sh; r.v1.y = t.v1.y <<< sh; r.v1.z = t.v1.z <<< sh;
    r.v2.x = t.v2.x <<< sh; r.v2.y = t.v2.y <<< sh; r.v2.z = t.v2.z <<< sh;
    return r;
  endfunction

  task automatic run(tri_t a, tri_t b, bit exp_hit, int exp_lat);
    int lat;
    @(negedge clk);
    t_r = a; t_e = b; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (hit !== exp_hit) begin
      failures++;
      $display("FAIL hit=%0d expected %0d  r=%h e=%h", hit, exp_hit, a, b);
    end
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL latency %0d expected %0d", lat, exp_lat);
    end
  endtask

  initial begin
    tri_t a, b;
    bit eh, copl, half;
    int lat;
    t_r = '0; t_e = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1200; k++) begin
      automatic int kind = k % 4;
      automatic int span = 4096;
      if (kind == 1) begin            // coplanar pair in a z = const plane
        automatic fx_t zc = rnd(100000, 0);
        a.v0 = rv(span, 0, 0, 0); a.v1 = rv(span, 0, 0, 0); a.v2 = rv(span, 0, 0, 0);
        b.v0 = rv(span, 0, 0, 0); b.v1 = rv(span, 0, 0, 0); b.v2 = rv(span, 0, 0, 0);
        a.v0.z = zc; a.v1.z = zc; a.v2.z = zc; b.v0.z = zc; b.v1.z = zc; b.v2.z = zc;
      end else if (kind == 2) begin   // far apart
        a.v0 = rv(span, 0, 0, 0); a.v1 = rv(span, 0, 0, 0); a.v2 = rv(span, 0, 0, 0);
        b.v0 = rv(span, 20000, 0, 0); b.v1 = rv(span, 20000, 0, 0); b.v2 = rv(span, 20000, 0, 0);
      end else begin                  // general position, overlapping boxes
        a.v0 = rv(span, 0, 0, 0); a.v1 = rv(span, 0, 0, 0); a.v2 = rv(span, 0, 0, 0);
        b.v0 = rv(span, 0, 0, 0); b.v1 = rv(span, 0, 0, 0); b.v2 = rv(span, 0, 0, 0);
      end
      eh  = ref_hit(to_real(a), to_real(b), copl, half);
      lat = half ? 4 : (copl ? 5 : 6);
      n_hit  += int'(eh);
      n_copl += int'(copl);
      n_half += int'(half);
      run(a, b, eh, lat);
      if (kind == 3) run(scale(a, 17), scale(b, 17), eh, lat);   // near full range
    end
    if (n_hit < 100 || n_copl < 100 || n_half < 100) begin
      failures++;
      $display("FAIL poor coverage hit=%0d copl=%0d half=%0d", n_hit, n_copl, n_half);
    end
    $display("hits=%0d coplanar=%0d half-plane=%0d", n_hit, n_copl, n_half);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
