// mpp_pkg: types and constants shared by the motion planning processor.
//
// Numbers are 32-bit signed fixed point with 16 fraction bits (Q16.16). A
// vertex is three such numbers (96 bits) and a triangle three vertices
// (288 bits), the layouts the processor's memories hold. A configuration of
// the rigid robot is a position (three Q16.16 numbers) and three rotation
// angles of ANG_W bits each, one full turn being 2**ANG_W steps, which is the
// 10-bit input of the sine/cosine table. The 32-bit width and the 288-bit
// triangle follow the source design; the 16-bit fraction split is a choice
// of this implementation.
package mpp_pkg;

  localparam int FX_W   = 32;   // fixed point word
  localparam int FRAC_W = 16;   // fraction bits of a coordinate
  localparam int ANG_W  = 10;   // angle: 2**ANG_W steps per turn

  typedef logic signed [FX_W-1:0] fx_t;

  typedef struct packed {
    fx_t x;
    fx_t y;
    fx_t z;
  } vec3_t;                      // 96 bits

  typedef struct packed {
    vec3_t v0;
    vec3_t v1;
    vec3_t v2;
  } tri_t;                       // 288 bits

  typedef struct packed {
    fx_t              x;
    fx_t              y;
    fx_t              z;
    logic [ANG_W-1:0] a;         // rotation about x
    logic [ANG_W-1:0] b;         // rotation about y
    logic [ANG_W-1:0] c;         // rotation about z
  } cfg_t;                       // 126 bits

  localparam int CFG_W = $bits(cfg_t);
  localparam int TRI_W = $bits(tri_t);

  // Q16.16 product, truncated back to Q16.16 (bits 47:16 of the 64-bit product).
  function automatic fx_t fx_mul_q(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return p[FRAC_W +: FX_W];
  endfunction

endpackage
