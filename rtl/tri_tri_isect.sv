// tri_tri_isect: exact, division-free triangle-triangle intersection test.
//
// Decides whether a robot triangle V (t_r) and an environment triangle U
// (t_e) intersect, following the steps of the fast triangle-triangle test
// the source design uses:
//   1. plane equations of both triangles (normals N1 of V and N2 of U),
//   2. signed distances of each triangle's vertices to the other's plane,
//   3. half-plane check: all three vertices of one triangle strictly on one
//      side of the other's plane means no intersection,
//   4a. coplanar triangles (every vertex of V on U's plane): project both on
//      the axis plane where their area is largest and run a 2-D test (edge
//      against edge for all nine pairs, then vertex-in-triangle both ways),
//   4b. otherwise the line L where the planes meet crosses both triangles;
//      the two intervals on L are compared for overlap.
// As in the source design there is no division: each interval end a + b/x is
// compared after multiplying every end by the same product of the
// denominators, so the comparison keeps its outcome. Unlike the source
// (32-bit products truncated back to 32 bits), every intermediate value here
// is kept at full width, so the result is exact for any 32-bit coordinates;
// the widths are derived below.
//
// Timing: start (one cycle, with t_r / t_e valid) -> done pulses for one
// cycle with hit. Counting clock edges from the one that samples start,
// done is high after 4 edges when the half-plane check separates the
// triangles, after 5 for coplanar triangles and after 6 for the interval test. busy is
// high from the cycle after start until done. start while busy is ignored;
// flush drops a test in progress without a done pulse.
module tri_tri_isect
  import mpp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic flush,      // synchronous: abandon the current test
  input  tri_t t_r,
  input  tri_t t_e,
  output logic busy,
  output logic done,
  output logic hit
);
  // widths: coordinate 32, edge 33, normal 2*33+1, distance 68+33+2,
  // line direction 2*68+1, interval numerators 33+104+1, denominators 105
  localparam int CW = FX_W;
  localparam int EW = CW + 1;
  localparam int NW = 2*EW + 2;        // 68
  localparam int DW = NW + EW + 3;     // 104
  localparam int LW = 2*NW + 2;        // 138
  localparam int BW = EW + DW + 2;     // 139
  localparam int XW = DW + 2;          // 106
  localparam int PW = 2*XW;            // 212
  localparam int QW = 2*PW;            // 424
  localparam int IW = BW + XW + PW + 4; // 461

  typedef logic signed [CW-1:0] c_t;
  typedef logic signed [NW-1:0] n_t;
  typedef logic signed [DW-1:0] d_t;
  typedef logic signed [LW-1:0] l_t;
  typedef logic signed [BW-1:0] b_t;
  typedef logic signed [XW-1:0] x_t;
  typedef logic signed [PW-1:0] p_t;
  typedef logic signed [QW-1:0] q_t;
  typedef logic signed [IW-1:0] i_t;

  typedef struct packed { n_t x; n_t y; n_t z; } nvec_t;
  typedef struct packed { c_t a; b_t b; b_t c; x_t x0; x_t x1; } intv_t;

  // ---------------------------------------------------------------- helpers
  function automatic nvec_t tri_normal(tri_t t);
    n_t e1x, e1y, e1z, e2x, e2y, e2z;
    nvec_t n;
    e1x = n_t'(t.v1.x) - n_t'(t.v0.x);
    e1y = n_t'(t.v1.y) - n_t'(t.v0.y);
    e1z = n_t'(t.v1.z) - n_t'(t.v0.z);
    e2x = n_t'(t.v2.x) - n_t'(t.v0.x);
    e2y = n_t'(t.v2.y) - n_t'(t.v0.y);
    e2z = n_t'(t.v2.z) - n_t'(t.v0.z);
    n.x = e1y * e2z - e1z * e2y;
    n.y = e1z * e2x - e1x * e2z;
    n.z = e1x * e2y - e1y * e2x;
    return n;
  endfunction

  // signed distance (times |n|) of point p to the plane through o with normal n
  function automatic d_t plane_dist(nvec_t n, vec3_t p, vec3_t o);
    d_t dx, dy, dz;
    dx = d_t'(p.x) - d_t'(o.x);
    dy = d_t'(p.y) - d_t'(o.y);
    dz = d_t'(p.z) - d_t'(o.z);
    return d_t'(n.x) * dx + d_t'(n.y) * dy + d_t'(n.z) * dz;
  endfunction

  // all three nonzero and of one sign
  function automatic logic one_side(d_t d0, d_t d1, d_t d2);
    return (d0 != 0) && (d1 != 0) && (d2 != 0) &&
           (d0[DW-1] == d1[DW-1]) && (d0[DW-1] == d2[DW-1]);
  endfunction

  function automatic logic same_sign_nz(d_t a, d_t b);
    return (a != 0) && (b != 0) && (a[DW-1] == b[DW-1]);
  endfunction

  function automatic intv_t mk_intv(c_t p0, c_t p1, c_t p2, d_t d0, d_t d1, d_t d2,
                                    logic [1:0] sel);
    intv_t r;
    unique case (sel)
      2'd2: begin
        r.a = p2; r.b = b_t'(b_t'(p0) - b_t'(p2)) * b_t'(d2); r.c = b_t'(b_t'(p1) - b_t'(p2)) * b_t'(d2);
        r.x0 = x_t'(d2) - x_t'(d0); r.x1 = x_t'(d2) - x_t'(d1);
      end
      2'd1: begin
        r.a = p1; r.b = b_t'(b_t'(p0) - b_t'(p1)) * b_t'(d1); r.c = b_t'(b_t'(p2) - b_t'(p1)) * b_t'(d1);
        r.x0 = x_t'(d1) - x_t'(d0); r.x1 = x_t'(d1) - x_t'(d2);
      end
      default: begin
        r.a = p0; r.b = b_t'(b_t'(p1) - b_t'(p0)) * b_t'(d0); r.c = b_t'(b_t'(p2) - b_t'(p0)) * b_t'(d0);
        r.x0 = x_t'(d0) - x_t'(d1); r.x1 = x_t'(d0) - x_t'(d2);
      end
    endcase
    return r;
  endfunction

  // which vertex lies alone on its side of the other plane
  function automatic logic [1:0] lone_vertex(d_t d0, d_t d1, d_t d2);
    if (same_sign_nz(d0, d1))      return 2'd2;
    else if (same_sign_nz(d0, d2)) return 2'd1;
    else if (same_sign_nz(d1, d2) || d0 != 0) return 2'd0;
    else if (d1 != 0)              return 2'd1;
    else                           return 2'd2;
  endfunction

  function automatic c_t pick(vec3_t v, logic [1:0] ax);
    unique case (ax)
      2'd0:    return v.x;
      2'd1:    return v.y;
      default: return v.z;
    endcase
  endfunction

  function automatic logic [1:0] max_axis_n(n_t x, n_t y, n_t z);
    n_t ax, ay, az;
    ax = (x < 0) ? -x : x;
    ay = (y < 0) ? -y : y;
    az = (z < 0) ? -z : z;
    if (ax >= ay && ax >= az) return 2'd0;
    else if (ay >= az)        return 2'd1;
    else                      return 2'd2;
  endfunction

  function automatic logic [1:0] max_axis_l(l_t x, l_t y, l_t z);
    l_t ax, ay, az;
    ax = (x < 0) ? -x : x;
    ay = (y < 0) ? -y : y;
    az = (z < 0) ? -z : z;
    if (ax >= ay && ax >= az) return 2'd0;
    else if (ay >= az)        return 2'd1;
    else                      return 2'd2;
  endfunction

  // ---- 2-D tests (coplanar case); 2-D points carried as (u, v) pairs
  localparam int FW = 2*EW + 2;     // 68
  typedef logic signed [FW-1:0] f_t;

  // does segment p0 + s*a (0<=s<=1) meet segment u0-u1 ?
  function automatic logic edge_edge(c_t p0u, c_t p0v, f_t au, f_t av,
                                     c_t u0u, c_t u0v, c_t u1u, c_t u1v);
    f_t bu, bv, cu, cv, f, d, e;
    logic r;
    bu = f_t'(u0u) - f_t'(u1u);
    bv = f_t'(u0v) - f_t'(u1v);
    cu = f_t'(p0u) - f_t'(u0u);
    cv = f_t'(p0v) - f_t'(u0v);
    f  = av * bu - au * bv;
    d  = bv * cu - bu * cv;
    r  = 1'b0;
    if ((f > 0 && d >= 0 && d <= f) || (f < 0 && d <= 0 && d >= f)) begin
      e = au * cv - av * cu;
      if (f > 0) r = (e >= 0 && e <= f);
      else       r = (e <= 0 && e >= f);
    end
    return r;
  endfunction

  function automatic f_t side2(c_t pu, c_t pv, c_t au, c_t av, c_t bu, c_t bv);
    f_t a, b;
    a = f_t'(bv) - f_t'(av);
    b = f_t'(au) - f_t'(bu);
    return a * (f_t'(pu) - f_t'(au)) + b * (f_t'(pv) - f_t'(av));
  endfunction

  function automatic logic pos_prod(f_t a, f_t b);
    return (a != 0) && (b != 0) && (a[FW-1] == b[FW-1]);
  endfunction

  function automatic logic point_in_tri(c_t pu, c_t pv, c_t u0u, c_t u0v,
                                        c_t u1u, c_t u1v, c_t u2u, c_t u2v);
    f_t d0, d1, d2;
    d0 = side2(pu, pv, u0u, u0v, u1u, u1v);
    d1 = side2(pu, pv, u1u, u1v, u2u, u2v);
    d2 = side2(pu, pv, u2u, u2v, u0u, u0v);
    return pos_prod(d0, d1) && pos_prod(d0, d2);
  endfunction

  function automatic logic coplanar_2d(tri_t v, tri_t u, logic [1:0] nax);
    logic [1:0] i0, i1;
    c_t vu [3]; c_t vv [3]; c_t uu [3]; c_t uv [3];
    logic r;
    unique case (nax)           // drop the axis where the normal is largest
      2'd0:    begin i0 = 2'd1; i1 = 2'd2; end
      2'd1:    begin i0 = 2'd0; i1 = 2'd2; end
      default: begin i0 = 2'd0; i1 = 2'd1; end
    endcase
    vu[0] = pick(v.v0, i0); vv[0] = pick(v.v0, i1);
    vu[1] = pick(v.v1, i0); vv[1] = pick(v.v1, i1);
    vu[2] = pick(v.v2, i0); vv[2] = pick(v.v2, i1);
    uu[0] = pick(u.v0, i0); uv[0] = pick(u.v0, i1);
    uu[1] = pick(u.v1, i0); uv[1] = pick(u.v1, i1);
    uu[2] = pick(u.v2, i0); uv[2] = pick(u.v2, i1);
    r = 1'b0;
    for (int i = 0; i < 3; i++) begin
      f_t au, av;
      au = f_t'(vu[(i+1)%3]) - f_t'(vu[i]);
      av = f_t'(vv[(i+1)%3]) - f_t'(vv[i]);
      for (int j = 0; j < 3; j++)
        r |= edge_edge(vu[i], vv[i], au, av, uu[j], uv[j], uu[(j+1)%3], uv[(j+1)%3]);
    end
    r |= point_in_tri(vu[0], vv[0], uu[0], uv[0], uu[1], uv[1], uu[2], uv[2]);
    r |= point_in_tri(uu[0], uv[0], vu[0], vv[0], vu[1], vv[1], vu[2], vv[2]);
    return r;
  endfunction

  // ---------------------------------------------------------------- state
  typedef enum logic [2:0] {S_IDLE, S_PLANE, S_DIST, S_HALF, S_COPL, S_PROD, S_CMP} state_t;
  state_t state;

  tri_t  tv, tu;
  nvec_t n1, n2;
  d_t    dv0, dv1, dv2, du0, du1, du2;
  intv_t iv, iu;
  p_t    xx, yy;
  q_t    xxyy;
  logic [1:0] lax;

  // line direction L = N1 x N2; the axis where it is largest is the one the
  // triangles are projected on (used in S_HALF)
  function automatic logic [1:0] line_axis(nvec_t a, nvec_t b);
    l_t lx, ly, lz;
    lx = l_t'(a.y) * l_t'(b.z) - l_t'(a.z) * l_t'(b.y);
    ly = l_t'(a.z) * l_t'(b.x) - l_t'(a.x) * l_t'(b.z);
    lz = l_t'(a.x) * l_t'(b.y) - l_t'(a.y) * l_t'(b.x);
    return max_axis_l(lx, ly, lz);
  endfunction

  // interval ends scaled by xx*yy, then sorted and compared (used in S_CMP)
  function automatic logic overlap(intv_t v, intv_t u, p_t pxx, p_t pyy, q_t pxxyy);
    i_t s1a, s1b, s2a, s2b, t1, t2, lo1, hi1, lo2, hi2;
    t1  = i_t'(v.a) * i_t'(pxxyy);
    s1a = t1 + i_t'(v.b) * i_t'(v.x1) * i_t'(pyy);
    s1b = t1 + i_t'(v.c) * i_t'(v.x0) * i_t'(pyy);
    t2  = i_t'(u.a) * i_t'(pxxyy);
    s2a = t2 + i_t'(u.b) * i_t'(pxx) * i_t'(u.x1);
    s2b = t2 + i_t'(u.c) * i_t'(pxx) * i_t'(u.x0);
    lo1 = (s1a < s1b) ? s1a : s1b;  hi1 = (s1a < s1b) ? s1b : s1a;
    lo2 = (s2a < s2b) ? s2a : s2b;  hi2 = (s2a < s2b) ? s2b : s2a;
    return !(hi1 < lo2 || hi2 < lo1);
  endfunction

  assign busy = (state != S_IDLE);
  assign lax  = line_axis(n1, n2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      hit   <= 1'b0;
      tv    <= '0;
      tu    <= '0;
      n1    <= '0;
      n2    <= '0;
      {dv0, dv1, dv2, du0, du1, du2} <= '0;
      iv    <= '0;
      iu    <= '0;
      xx    <= '0;
      yy    <= '0;
      xxyy  <= '0;
    end else begin
      done <= 1'b0;
      if (flush) state <= S_IDLE;
      else unique case (state)
        S_IDLE: if (start) begin
          tv    <= t_r;
          tu    <= t_e;
          state <= S_PLANE;
        end
        S_PLANE: begin
          n1    <= tri_normal(tv);
          n2    <= tri_normal(tu);
          state <= S_DIST;
        end
        S_DIST: begin
          dv0 <= plane_dist(n2, tv.v0, tu.v0);
          dv1 <= plane_dist(n2, tv.v1, tu.v0);
          dv2 <= plane_dist(n2, tv.v2, tu.v0);
          du0 <= plane_dist(n1, tu.v0, tv.v0);
          du1 <= plane_dist(n1, tu.v1, tv.v0);
          du2 <= plane_dist(n1, tu.v2, tv.v0);
          state <= S_HALF;
        end
        S_HALF: begin
          if (one_side(dv0, dv1, dv2) || one_side(du0, du1, du2)) begin
            hit   <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (dv0 == 0 && dv1 == 0 && dv2 == 0) begin
            state <= S_COPL;
          end else begin
            iv    <= mk_intv(pick(tv.v0, lax), pick(tv.v1, lax), pick(tv.v2, lax),
                             dv0, dv1, dv2, lone_vertex(dv0, dv1, dv2));
            iu    <= mk_intv(pick(tu.v0, lax), pick(tu.v1, lax), pick(tu.v2, lax),
                             du0, du1, du2, lone_vertex(du0, du1, du2));
            state <= S_PROD;
          end
        end
        S_COPL: begin
          hit   <= coplanar_2d(tv, tu, max_axis_n(n1.x, n1.y, n1.z));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_PROD: begin
          xx    <= p_t'(iv.x0) * p_t'(iv.x1);
          yy    <= p_t'(iu.x0) * p_t'(iu.x1);
          xxyy  <= q_t'(iv.x0) * q_t'(iv.x1) * q_t'(iu.x0) * q_t'(iu.x1);
          state <= S_CMP;
        end
        S_CMP: begin
          hit   <= overlap(iv, iu, xx, yy, xxyy);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
