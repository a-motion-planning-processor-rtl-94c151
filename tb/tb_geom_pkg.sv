// tb_geom_pkg: test geometry shared by the testbenches.
//
// Builds the 12 triangles of an axis-aligned box (two per face) and decides
// box-box contact independently of the hardware: two boxes whose surfaces
// meet overlap on all three axes, and for the box sizes used in the tests
// (obstacles 48 x 48 x 16, robot 48 x 24 x 24) neither can enclose the
// other, so overlap is exactly surface contact.
package tb_geom_pkg;
  import mpp_pkg::*;

  typedef tri_t box_tris_t [12];

  function automatic vec3_t mkv(fx_t x, fx_t y, fx_t z);
    vec3_t v;
    v.x = x; v.y = y; v.z = z;
    return v;
  endfunction

  function automatic tri_t mkt(vec3_t a, vec3_t b, vec3_t c);
    tri_t t;
    t.v0 = a; t.v1 = b; t.v2 = c;
    return t;
  endfunction

  // box with its lower corner at (x, y, z) and size (sx, sy, sz), Q16.16
  function automatic box_tris_t box_tris(fx_t x, fx_t y, fx_t z, fx_t sx, fx_t sy, fx_t sz);
    vec3_t c [8];
    box_tris_t t;
    for (int i = 0; i < 8; i++)
      c[i] = mkv(x + ((i & 1) ? sx : 0), y + ((i & 2) ? sy : 0), z + ((i & 4) ? sz : 0));
    t[0]  = mkt(c[0], c[1], c[3]);  t[1]  = mkt(c[0], c[3], c[2]);   // z low
    t[2]  = mkt(c[4], c[5], c[7]);  t[3]  = mkt(c[4], c[7], c[6]);   // z high
    t[4]  = mkt(c[0], c[1], c[5]);  t[5]  = mkt(c[0], c[5], c[4]);   // y low
    t[6]  = mkt(c[2], c[3], c[7]);  t[7]  = mkt(c[2], c[7], c[6]);   // y high
    t[8]  = mkt(c[0], c[2], c[6]);  t[9]  = mkt(c[0], c[6], c[4]);   // x low
    t[10] = mkt(c[1], c[3], c[7]);  t[11] = mkt(c[1], c[7], c[5]);   // x high
    return t;
  endfunction

  function automatic bit iv_overlap(real a0, real a1, real b0, real b1);
    return !(a1 < b0 || b1 < a0);
  endfunction

  // robot box, half sizes (hx, hy, hz) around the configuration position,
  // rotated by multiples of 90 degrees only (angles 0, 256, 512, 768)
  function automatic void robot_extent(cfg_t c, real hx, real hy, real hz,
                                       output real ex, output real ey, output real ez);
    real x, y, z, t;
    x = hx; y = hy; z = hz;
    if (c.a[8]) begin t = y; y = z; z = t; end      // about x: swap y, z
    if (c.b[8]) begin t = x; x = z; z = t; end      // about y: swap x, z
    if (c.c[8]) begin t = x; x = y; y = t; end      // about z: swap x, y
    ex = x; ey = y; ez = z;
  endfunction

  function automatic real fr(fx_t v);
    return real'(v) / 65536.0;
  endfunction

  // ---- references for roadmap tests

  function automatic real sqdist(cfg_t a, cfg_t b);
    real dx, dy, dz;
    dx = real'(a.x) - real'(b.x); dy = real'(a.y) - real'(b.y); dz = real'(a.z) - real'(b.z);
    return dx*dx + dy*dy + dz*dz;
  endfunction

  // point s of 8 on the straight line a -> b (angles the short way round)
  function automatic fx_t lerp8(fx_t a, fx_t b, int s);
    longint d;
    d = (longint'(b) - longint'(a)) * s;
    return fx_t'(longint'(a) + (d >>> 3));
  endfunction
  function automatic logic [9:0] alerp8(logic [9:0] a, logic [9:0] b, int s);
    int d;
    d = int'(b) - int'(a);
    if (d > 511) d -= 1024;
    if (d < -512) d += 1024;
    return 10'(int'(a) + ((d * s) >>> 3));
  endfunction
  function automatic cfg_t point8(cfg_t a, cfg_t b, int s);
    cfg_t p;
    p.x = lerp8(a.x, b.x, s); p.y = lerp8(a.y, b.y, s); p.z = lerp8(a.z, b.z, s);
    p.a = alerp8(a.a, b.a, s); p.b = alerp8(a.b, b.b, s); p.c = alerp8(a.c, b.c, s);
    return p;
  endfunction

  // indices of the k nearest nodes of node own among n (stable order)
  typedef int idxq_t [$];
  function automatic idxq_t knn(cfg_t nodes [], int n, int own, cfg_t me, int k);
    idxq_t order;
    for (int i = 0; i < n; i++) if (i != own) order.push_back(i);
    for (int i = 1; i < order.size(); i++)
      for (int j = i; j > 0 && sqdist(nodes[order[j]], me) < sqdist(nodes[order[j-1]], me); j--) begin
        int t;
        t = order[j]; order[j] = order[j-1]; order[j-1] = t;
      end
    while (order.size() > k) void'(order.pop_back());
    return order;
  endfunction

  // ---- exact reference for a rotated robot box against an axis-aligned box

  // rotate by R = Rz(c) * Ry(b) * Rx(a); angle units of 2*pi/1024
  function automatic void rot(cfg_t q, real x, real y, real z, output real ox, output real oy, output real oz);
    real a, b, g, x1, y1, z1, x2, y2, z2;
    a = 2.0 * 3.14159265358979 * q.a / 1024.0;
    b = 2.0 * 3.14159265358979 * q.b / 1024.0;
    g = 2.0 * 3.14159265358979 * q.c / 1024.0;
    x1 = x; y1 = y * $cos(a) - z * $sin(a); z1 = y * $sin(a) + z * $cos(a);
    x2 = x1 * $cos(b) + z1 * $sin(b); y2 = y1; z2 = -x1 * $sin(b) + z1 * $cos(b);
    ox = x2 * $cos(g) - y2 * $sin(g); oy = x2 * $sin(g) + y2 * $cos(g); oz = z2;
  endfunction

  // separating-axis test of the robot box (half sizes rh, centred on the
  // configuration position, rotated) against the box with centre bc and half
  // sizes bh. Returns the largest separation over the 15 axes: > 0 means
  // apart, < 0 means the solids overlap.
  function automatic real obb_sep(cfg_t q, real rh [3], real bc [3], real bh [3]);
    real ax [3][3];      // robot axes (columns of R)
    real t [3], l [3], best, d, ra, rb, n;
    real e [3][3] = '{'{1.0, 0.0, 0.0}, '{0.0, 1.0, 0.0}, '{0.0, 0.0, 1.0}};
    for (int i = 0; i < 3; i++) rot(q, e[i][0], e[i][1], e[i][2], ax[i][0], ax[i][1], ax[i][2]);
    t[0] = fr(q.x) - bc[0]; t[1] = fr(q.y) - bc[1]; t[2] = fr(q.z) - bc[2];
    best = -1.0e30;
    for (int k = 0; k < 15; k++) begin
      if (k < 3) l = e[k];
      else if (k < 6) l = ax[k-3];
      else begin
        automatic int i = (k - 6) / 3, j = (k - 6) % 3;
        l[0] = e[i][1] * ax[j][2] - e[i][2] * ax[j][1];
        l[1] = e[i][2] * ax[j][0] - e[i][0] * ax[j][2];
        l[2] = e[i][0] * ax[j][1] - e[i][1] * ax[j][0];
      end
      n = $sqrt(l[0]*l[0] + l[1]*l[1] + l[2]*l[2]);
      if (n > 1.0e-6) begin
        d = t[0]*l[0] + t[1]*l[1] + t[2]*l[2];
        if (d < 0) d = -d;
        ra = 0; rb = 0;
        for (int m = 0; m < 3; m++) begin
          automatic real p = ax[m][0]*l[0] + ax[m][1]*l[1] + ax[m][2]*l[2];
          ra += rh[m] * (p < 0 ? -p : p);
          rb += bh[m] * (l[m] < 0 ? -l[m] : l[m]);
        end
        d = (d - ra - rb) / n;
        if (d > best) best = d;
      end
    end
    return best;
  endfunction
endpackage
