// transform_unit: places the robot at a configuration.
//
// Given a configuration (position x, y, z and rotation angles a, b, c about
// the x, y and z axes), it first computes the transformation matrix
// R = Rz(c) * Ry(b) * Rx(a) from the sine/cosine tables, then reads every
// robot triangle from the robot memory, rotates and translates its three
// vertices (v' = R v + t) and pushes the result into the triangle FIFO. The
// two steps and the FIFO follow the source design's transformation circuit;
// the rotation order and Q16.16 scaling are this implementation's choices.
//
// Timing: start (one cycle) latches cfg. The sine/cosine tables take 2
// cycles and the matrix 2 more; from then on one triangle read is issued per
// cycle while the FIFO has room for it and for those still in flight. A read
// reaches the FIFO 4 cycles after it is issued (memory 1 cycle, the
// 2-cycle multipliers, then a sum register). done pulses the cycle after
// the last triangle is pushed, so a job of n triangles whose FIFO never
// fills takes n + 9 cycles from start to done. cancel returns to idle at once and drops
// triangles in flight.
module transform_unit
  import mpp_pkg::*;
#(
  parameter int ROBOT_DEPTH = 256,
  parameter int RAW         = $clog2(ROBOT_DEPTH),
  parameter int FIFO_DEPTH  = 16,
  parameter int FCW         = $clog2(FIFO_DEPTH) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  cfg_t           cfg,
  input  logic           cancel,         // drop the current job
  input  logic [RAW:0]   robot_count,   // triangles of the robot
  output logic [RAW-1:0] rob_raddr,
  input  tri_t           rob_rdata,     // one cycle after rob_raddr
  input  logic [FCW-1:0] fifo_count,
  output logic           out_valid,
  output tri_t           out_tri,
  output logic           busy,
  output logic           done
);
  typedef enum logic [2:0] {S_IDLE, S_TRIG0, S_TRIG1, S_MAT1, S_MAT2, S_STREAM} state_t;
  state_t state;

  cfg_t cfg_q;
  fx_t  sa, ca, sb, cb, sc, cc;

  trig_lut u_trig_a (.clk, .en(1'b1), .angle(cfg_q.a), .sin_o(sa), .cos_o(ca));
  trig_lut u_trig_b (.clk, .en(1'b1), .angle(cfg_q.b), .sin_o(sb), .cos_o(cb));
  trig_lut u_trig_c (.clk, .en(1'b1), .angle(cfg_q.c), .sin_o(sc), .cos_o(cc));

  fx_t m [3][3];                                // rotation matrix
  fx_t p_ccsb, p_scsb, p_scca, p_scsa, p_ccca, p_ccsa;

  // -------------------------------------------------- vertex datapath
  logic [2:0]   vld;                            // rdata, operands, product valid
  logic [RAW:0] rd_idx;
  logic [2:0]   in_flight;
  logic         issue;

  fx_t                 vin  [3][3];             // [vertex][axis] of rob_rdata
  logic signed [63:0]  prod [3][3][3];          // [vertex][row][col]

  always_comb begin
    vin[0] = '{rob_rdata.v0.x, rob_rdata.v0.y, rob_rdata.v0.z};
    vin[1] = '{rob_rdata.v1.x, rob_rdata.v1.y, rob_rdata.v1.z};
    vin[2] = '{rob_rdata.v2.x, rob_rdata.v2.y, rob_rdata.v2.z};
  end

  for (genvar v = 0; v < 3; v++) begin : g_vtx
    for (genvar r = 0; r < 3; r++) begin : g_row
      for (genvar c = 0; c < 3; c++) begin : g_col
        fx_mul u_mul (.clk, .en(1'b1), .a(m[r][c]), .b(vin[v][c]), .p(prod[v][r][c]));
      end
    end
  end

  function automatic fx_t row_sum(logic signed [63:0] p0, logic signed [63:0] p1,
                                  logic signed [63:0] p2, fx_t t);
    logic signed [65:0] s;
    s = 66'(p0) + 66'(p1) + 66'(p2);
    return s[FRAC_W +: FX_W] + t;
  endfunction

  assign in_flight = 3'(vld[0]) + 3'(vld[1]) + 3'(vld[2]) + 3'(out_valid);
  assign issue = (state == S_STREAM) && !cancel && (rd_idx < robot_count) &&
                 (32'(fifo_count) + 32'(in_flight) < FIFO_DEPTH);
  assign rob_raddr = rd_idx[RAW-1:0];
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      vld       <= '0;
      rd_idx    <= '0;
      out_valid <= 1'b0;
      done      <= 1'b0;
      cfg_q     <= '0;
      out_tri   <= '0;
      {p_ccca, p_ccsa, p_ccsb, p_scca, p_scsa, p_scsb} <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      vld       <= {vld[1:0], issue};
      if (vld[2] && !cancel) begin
        out_valid <= 1'b1;
        out_tri.v0.x <= row_sum(prod[0][0][0], prod[0][0][1], prod[0][0][2], cfg_q.x);
        out_tri.v0.y <= row_sum(prod[0][1][0], prod[0][1][1], prod[0][1][2], cfg_q.y);
        out_tri.v0.z <= row_sum(prod[0][2][0], prod[0][2][1], prod[0][2][2], cfg_q.z);
        out_tri.v1.x <= row_sum(prod[1][0][0], prod[1][0][1], prod[1][0][2], cfg_q.x);
        out_tri.v1.y <= row_sum(prod[1][1][0], prod[1][1][1], prod[1][1][2], cfg_q.y);
        out_tri.v1.z <= row_sum(prod[1][2][0], prod[1][2][1], prod[1][2][2], cfg_q.z);
        out_tri.v2.x <= row_sum(prod[2][0][0], prod[2][0][1], prod[2][0][2], cfg_q.x);
        out_tri.v2.y <= row_sum(prod[2][1][0], prod[2][1][1], prod[2][1][2], cfg_q.y);
        out_tri.v2.z <= row_sum(prod[2][2][0], prod[2][2][1], prod[2][2][2], cfg_q.z);
      end
      if (cancel) begin
        state <= S_IDLE;
        vld   <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            cfg_q  <= cfg;
            rd_idx <= '0;
            state  <= S_TRIG0;
          end
          S_TRIG0: state <= S_TRIG1;            // table address registered
          S_TRIG1: state <= S_MAT1;             // table outputs registered
          S_MAT1: begin
            m[0][0] <= fx_mul_q(cc, cb);
            m[1][0] <= fx_mul_q(sc, cb);
            m[2][0] <= -sb;
            m[2][1] <= fx_mul_q(cb, sa);
            m[2][2] <= fx_mul_q(cb, ca);
            p_ccsb  <= fx_mul_q(cc, sb);
            p_scsb  <= fx_mul_q(sc, sb);
            p_scca  <= fx_mul_q(sc, ca);
            p_scsa  <= fx_mul_q(sc, sa);
            p_ccca  <= fx_mul_q(cc, ca);
            p_ccsa  <= fx_mul_q(cc, sa);
            state   <= S_MAT2;
          end
          S_MAT2: begin
            m[0][1] <= fx_mul_q(p_ccsb, sa) - p_scca;
            m[0][2] <= fx_mul_q(p_ccsb, ca) + p_scsa;
            m[1][1] <= fx_mul_q(p_scsb, sa) + p_ccca;
            m[1][2] <= fx_mul_q(p_scsb, ca) - p_ccsa;
            state   <= S_STREAM;
          end
          S_STREAM: begin
            if (issue) rd_idx <= rd_idx + 1'b1;
            if (rd_idx == robot_count && vld == 3'b000 && !issue) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
