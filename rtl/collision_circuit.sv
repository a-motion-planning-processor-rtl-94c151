// collision_circuit: one collision detection circuit.
//
// Holds one (transformed) robot triangle and compares it with every
// environment triangle of its own memory bank, one pair at a time, using the
// triangle-triangle test. It stops at the first intersecting pair (hit = 1)
// or after the last triangle of the bank (hit = 0), as the source design's
// collision detection circuit does. Several of these run side by side, each
// on its own bank, with the same robot triangle.
//
// Timing: start (one cycle) with t_r valid; t_r must stay valid until done.
// Each environment triangle costs one memory read cycle, one start cycle and
// the 4..6 cycles of the test. done pulses one cycle with hit. An empty bank
// (env_count = 0) gives done with hit = 0 one cycle after start. cancel
// returns the circuit to idle without a done pulse.
module collision_circuit
  import mpp_pkg::*;
#(
  parameter int BANK_DEPTH = 256,
  parameter int BAW        = $clog2(BANK_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           cancel,
  input  tri_t           t_r,
  input  logic [BAW:0]   env_count,
  output logic [BAW-1:0] env_raddr,
  input  tri_t           env_rdata,     // one cycle after env_raddr
  output logic           busy,
  output logic           done,
  output logic           hit
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_TEST, S_WAIT} state_t;
  state_t state;

  logic [BAW:0] idx;
  logic         t_start, t_done, t_hit;

  tri_tri_isect u_isect (.clk, .rst_n, .start(t_start), .flush(cancel), .t_r,
                         .t_e(env_rdata), .busy(), .done(t_done), .hit(t_hit));

  assign env_raddr = idx[BAW-1:0];
  assign t_start   = (state == S_TEST);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      done  <= 1'b0;
      hit   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cancel) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            idx <= '0;
            if (env_count == 0) begin
              done <= 1'b1;
              hit  <= 1'b0;
            end else begin
              state <= S_READ;
            end
          end
          S_READ: state <= S_TEST;               // env_rdata valid next cycle
          S_TEST: state <= S_WAIT;               // test started
          S_WAIT: if (t_done) begin
            if (t_hit) begin
              done  <= 1'b1;
              hit   <= 1'b1;
              state <= S_IDLE;
            end else if (idx + 1'b1 == env_count) begin
              done  <= 1'b1;
              hit   <= 1'b0;
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_READ;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) start |-> !busy);
endmodule
