// collision_detector: the feasibility checker (collision detection module).
//
// Answers "does the robot, placed at configuration cfg, touch any obstacle?"
// The transformation circuit places the robot triangles one by one into a
// FIFO. The triangle at the head of the FIFO is handed to all N_CD collision
// circuits at once; circuit i holds environment triangles i, i + N_CD,
// i + 2*N_CD, ... in its own memory bank, so one robot triangle is compared
// with N_CD environment triangles in parallel. The circuits' results are
// ORed. The check stops at the first intersecting pair (collide = 1) or when
// every robot triangle has been compared with every environment triangle
// (collide = 0). This structure (transformation, FIFO, parallel circuits with
// interleaved banks, OR) follows the source design; the loading ports and
// request handshake are this implementation's own.
//
// Loading: env_we appends one environment triangle (it goes to the next bank
// in turn), rob_we appends one robot triangle, clear forgets both sets.
// Request: req_valid with req_cfg is accepted when req_ready is high (idle);
// resp_valid pulses one cycle with resp_collide when the check ends. Loading
// while a check runs is not allowed (flagged by an assertion).
module collision_detector
  import mpp_pkg::*;
#(
  parameter int N_CD        = 25,
  parameter int BANK_DEPTH  = 256,
  parameter int ROBOT_DEPTH = 256,
  parameter int FIFO_DEPTH  = 16,
  parameter int BAW         = $clog2(BANK_DEPTH),
  parameter int RAW         = $clog2(ROBOT_DEPTH),
  parameter int BKW         = (N_CD > 1) ? $clog2(N_CD) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // loading
  input  logic         clear,
  input  logic         env_we,
  input  tri_t         env_wdata,
  input  logic         rob_we,
  input  tri_t         rob_wdata,
  output logic [RAW:0] rob_count,
  output logic [BAW+BKW:0] env_count,
  // feasibility request / response
  input  logic         req_valid,
  input  cfg_t         req_cfg,
  output logic         req_ready,
  output logic         resp_valid,
  output logic         resp_collide
);
  localparam int FCW = $clog2(FIFO_DEPTH) + 1;

  // ------------------------------------------------ bank write pointers
  logic [BKW-1:0] wbank;
  logic [BAW:0]   waddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= '0; waddr <= '0; rob_count <= '0; env_count <= '0;
    end else if (clear) begin
      wbank <= '0; waddr <= '0; rob_count <= '0; env_count <= '0;
    end else begin
      if (env_we) begin
        env_count <= env_count + 1'b1;
        if (wbank == BKW'(N_CD - 1)) begin
          wbank <= '0;
          waddr <= waddr + 1'b1;
        end else begin
          wbank <= wbank + 1'b1;
        end
      end
      if (rob_we) rob_count <= rob_count + 1'b1;
    end
  end

  // ------------------------------------------------ robot memory, transform, FIFO
  logic [RAW-1:0] rob_raddr;
  tri_t           rob_rdata;
  logic           tr_start, tr_cancel, tr_valid, tr_busy, tr_done;
  tri_t           tr_tri;
  logic           f_pop, f_flush, f_empty, f_full;
  tri_t           f_head;
  logic [FCW-1:0] f_count;

  tri_mem #(.DEPTH(ROBOT_DEPTH)) u_robot_mem (
    .clk, .we(rob_we), .waddr(rob_count[RAW-1:0]), .wdata(rob_wdata),
    .raddr(rob_raddr), .rdata(rob_rdata));

  transform_unit #(.ROBOT_DEPTH(ROBOT_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_transform (
    .clk, .rst_n, .start(tr_start), .cfg(req_cfg), .cancel(tr_cancel),
    .robot_count(rob_count), .rob_raddr, .rob_rdata, .fifo_count(f_count),
    .out_valid(tr_valid), .out_tri(tr_tri), .busy(tr_busy), .done(tr_done));

  tri_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .flush(f_flush), .push(tr_valid), .wdata(tr_tri), .pop(f_pop),
    .rdata(f_head), .empty(f_empty), .full(f_full), .count(f_count));

  // ------------------------------------------------ parallel collision circuits
  logic [N_CD-1:0] cc_start, cc_done, cc_hit, cc_busy;
  logic            cc_cancel;
  tri_t            t_cur;

  for (genvar i = 0; i < N_CD; i++) begin : g_cd
    logic [BAW-1:0] raddr;
    tri_t           rdata;
    logic [BAW:0]   cnt;
    // triangles in bank i: one per full round, plus one if the current round reached it
    assign cnt = waddr + ((BKW'(i) < wbank) ? (BAW+1)'(1) : '0);

    tri_mem #(.DEPTH(BANK_DEPTH)) u_bank (
      .clk, .we(env_we && (wbank == BKW'(i))), .waddr(waddr[BAW-1:0]), .wdata(env_wdata),
      .raddr, .rdata);

    collision_circuit #(.BANK_DEPTH(BANK_DEPTH)) u_cc (
      .clk, .rst_n, .start(cc_start[i]), .cancel(cc_cancel), .t_r(t_cur),
      .env_count(cnt), .env_raddr(raddr), .env_rdata(rdata),
      .busy(cc_busy[i]), .done(cc_done[i]), .hit(cc_hit[i]));
  end

  // ------------------------------------------------ control
  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_COMPARE} state_t;
  state_t state;

  logic [N_CD-1:0] fin;
  logic [RAW:0]    tri_done;
  logic            any_hit;

  assign any_hit   = |(cc_done & cc_hit);           // the OR of all circuits
  assign req_ready = (state == S_IDLE);
  assign tr_start  = (state == S_IDLE) && req_valid;
  assign cc_start  = {N_CD{(state == S_LAUNCH) && !f_empty}};
  assign f_pop     = (state == S_COMPARE) && !any_hit && ((fin | cc_done) == '1);
  assign f_flush   = (state == S_COMPARE) && any_hit;
  assign tr_cancel  = f_flush;
  assign cc_cancel  = f_flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      resp_valid   <= 1'b0;
      resp_collide <= 1'b0;
      fin          <= '0;
      tri_done     <= '0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          tri_done <= '0;
          state    <= S_LAUNCH;
        end
        S_LAUNCH: begin
          if (tri_done == rob_count) begin       // every robot triangle compared
            resp_valid   <= 1'b1;
            resp_collide <= 1'b0;
            state        <= S_IDLE;
          end else if (!f_empty) begin
            t_cur <= f_head;
            fin   <= '0;
            state <= S_COMPARE;
          end
        end
        S_COMPARE: begin
          if (any_hit) begin
            resp_valid   <= 1'b1;
            resp_collide <= 1'b1;
            state        <= S_IDLE;
          end else if (f_pop) begin
            tri_done <= tri_done + 1'b1;
            state    <= S_LAUNCH;
          end else begin
            fin <= fin | cc_done;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_load_while_busy: assert property (@(posedge clk)
                                         (env_we || rob_we || clear) |-> state == S_IDLE);
endmodule
