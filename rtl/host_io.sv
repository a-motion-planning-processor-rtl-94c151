// host_io: the host command interface of the processor.
//
// The host talks to the processor over the serial port in bytes. host_io
// decodes commands from the receiver, loads the models into the on-chip
// memories, starts the processor's jobs and sends the answers back through
// the transmitter. Multi-byte fields are sent most significant byte first;
// a configuration travels as 16 bytes holding the 126-bit cfg_t (x, y, z,
// then angles a, b, c) in the low bits.
//
//   0x01 + 36 bytes  append an obstacle triangle (288 bits: v0, v1, v2; x, y, z)
//   0x02 + 36 bytes  append a robot triangle
//   0x03             forget all obstacle and robot triangles
//   0x04 + n         build a roadmap of n nodes; answer 0x84, node count,
//                    edge count (2 bytes), then per edge the configurations
//                    of its two end nodes (2 x 16 bytes)
//   0x05 + 16 bytes  collision check of one configuration (the processor
//                    used as a collision detection co-processor); answer
//                    0x85 and 1 (collision) or 0 (free)
//   0x06 + 2 x 16    path query from a start to a goal configuration; answer
//                    0x86, found (1/0), path length, then the configurations
//                    of the path's roadmap nodes from start to goal side
// Unknown command bytes are ignored. A new command must not start before
// the previous answer has been sent (bytes arriving meanwhile are dropped).
// The source design says only that the host sends the objects as
// triangles over RS-232 and receives the roadmap as edges given by their
// end points; the command set, byte order and answer format are this
// implementation's own.
module host_io
  import mpp_pkg::*;
#(
  parameter int MAX_NODES = 100,
  parameter int MAX_EDGES = 500,
  parameter int NIW       = $clog2(MAX_NODES),
  parameter int EAW       = $clog2(MAX_EDGES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // serial port bytes
  input  logic             rx_valid,
  input  logic [7:0]       rx_data,
  output logic             tx_valid,
  output logic [7:0]       tx_data,
  input  logic             tx_ready,
  // model loading
  output logic             clear,
  output logic             env_we,
  output logic             rob_we,
  output tri_t             tri_wdata,
  // collision check
  output logic             fq_valid,
  output cfg_t             fq_cfg,
  input  logic             fq_ready,
  input  logic             fr_valid,
  input  logic             fr_collide,
  // roadmap builder
  output logic             rb_start,
  output logic [NIW:0]     rb_n_target,
  input  logic             rb_done,
  input  logic [NIW:0]     rb_n_nodes,
  input  logic [EAW:0]     rb_n_edges,
  output logic [NIW-1:0]   node_raddr,
  input  cfg_t             node_rdata,
  output logic [EAW-1:0]   edge_raddr,
  input  logic [2*NIW-1:0] edge_rdata,
  // query
  output logic             q_start,
  output cfg_t             q_start_cfg,
  output cfg_t             q_goal_cfg,
  input  logic             q_done,
  input  logic             q_found,
  input  logic [NIW:0]     q_path_len,
  output logic [NIW-1:0]   q_path_raddr,
  input  logic [NIW-1:0]   q_path_node
);
  typedef enum logic [4:0] {
    S_CMD, S_PAY, S_EXEC, S_TX,
    S_BUILD, S_E_NEXT, S_E_W1, S_E_A, S_E_WA, S_E_B, S_E_WB, S_E_SEND,
    S_CHK_REQ, S_CHK_WAIT,
    S_Q_WAIT, S_P_NEXT, S_P_A, S_P_W, S_P_SEND
  } state_t;
  state_t state, tx_ret;

  logic [7:0]   cmd;
  logic [5:0]   need;                      // payload bytes still to come
  logic [287:0] pay;
  logic [255:0] tx_sr;
  logic [5:0]   tx_cnt;
  logic [EAW:0] e;
  logic [NIW:0] pi;
  cfg_t         cfg_a;

  assign tx_valid  = (state == S_TX) && (tx_cnt != 0);
  assign tx_data   = tx_sr[255:248];
  assign tri_wdata = pay;
  assign fq_valid  = (state == S_CHK_REQ);
  assign fq_cfg    = pay[CFG_W-1:0];
  assign q_start_cfg = pay[128 +: CFG_W];
  assign q_goal_cfg  = pay[CFG_W-1:0];
  assign rb_n_target = pay[NIW:0];

  function automatic logic [5:0] payload_len(logic [7:0] c);
    unique case (c)
      8'h01, 8'h02: return 6'd36;
      8'h04:        return 6'd1;
      8'h05:        return 6'd16;
      8'h06:        return 6'd32;
      default:      return 6'd0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CMD;
      tx_ret   <= S_CMD;
      clear    <= 1'b0;
      env_we   <= 1'b0;
      rob_we   <= 1'b0;
      rb_start <= 1'b0;
      q_start  <= 1'b0;
      tx_cnt   <= '0;
      need     <= '0;
      cmd      <= '0;
      pay      <= '0;
      tx_sr    <= '0;
      e        <= '0;
      pi       <= '0;
      cfg_a    <= '0;
      node_raddr   <= '0;
      edge_raddr   <= '0;
      q_path_raddr <= '0;
    end else begin
      clear    <= 1'b0;
      env_we   <= 1'b0;
      rob_we   <= 1'b0;
      rb_start <= 1'b0;
      q_start  <= 1'b0;
      unique case (state)
        S_CMD: if (rx_valid) begin
          cmd  <= rx_data;
          need <= payload_len(rx_data);
          if (rx_data == 8'h03) clear <= 1'b1;
          else if (payload_len(rx_data) != 0) state <= S_PAY;
        end
        S_PAY: if (rx_valid) begin
          pay  <= {pay[279:0], rx_data};
          need <= need - 1'b1;
          if (need == 6'd1) state <= S_EXEC;
        end
        S_EXEC: begin
          unique case (cmd)
            8'h01: begin env_we <= 1'b1; state <= S_CMD; end
            8'h02: begin rob_we <= 1'b1; state <= S_CMD; end
            8'h04: begin rb_start <= 1'b1; state <= S_BUILD; end
            8'h05: state <= S_CHK_REQ;
            8'h06: begin q_start <= 1'b1; state <= S_Q_WAIT; end
            default: state <= S_CMD;
          endcase
        end
        S_TX: begin
          if (tx_cnt == 0) state <= tx_ret;
          else if (tx_ready) begin
            tx_sr  <= {tx_sr[247:0], 8'h00};
            tx_cnt <= tx_cnt - 1'b1;
          end
        end
        // ---------------------------------------- roadmap
        S_BUILD: if (rb_done) begin
          tx_sr  <= {8'h84, 8'(rb_n_nodes), 16'(rb_n_edges), 224'h0};
          tx_cnt <= 6'd4;
          tx_ret <= S_E_NEXT;
          e      <= '0;
          state  <= S_TX;
        end
        S_E_NEXT: begin
          if (e == rb_n_edges) state <= S_CMD;
          else begin
            edge_raddr <= e[EAW-1:0];
            state      <= S_E_W1;
          end
        end
        S_E_W1: state <= S_E_A;
        S_E_A: begin
          node_raddr <= edge_rdata[2*NIW-1:NIW];
          pi         <= (NIW+1)'(edge_rdata[NIW-1:0]);   // b, kept for later
          state      <= S_E_WA;
        end
        S_E_WA: state <= S_E_B;
        S_E_B: begin
          cfg_a      <= node_rdata;
          node_raddr <= pi[NIW-1:0];
          state      <= S_E_WB;
        end
        S_E_WB: state <= S_E_SEND;
        S_E_SEND: begin
          tx_sr  <= {128'(cfg_a), 128'(node_rdata)};
          tx_cnt <= 6'd32;
          tx_ret <= S_E_NEXT;
          e      <= e + 1'b1;
          state  <= S_TX;
        end
        // ---------------------------------------- collision check
        S_CHK_REQ: if (fq_ready) state <= S_CHK_WAIT;
        S_CHK_WAIT: if (fr_valid) begin
          tx_sr  <= {8'h85, 8'(fr_collide), 240'h0};
          tx_cnt <= 6'd2;
          tx_ret <= S_CMD;
          state  <= S_TX;
        end
        // ---------------------------------------- query
        S_Q_WAIT: if (q_done) begin
          tx_sr  <= {8'h86, 8'(q_found), 8'(q_path_len), 232'h0};
          tx_cnt <= 6'd3;
          tx_ret <= S_P_NEXT;
          pi     <= '0;
          state  <= S_TX;
        end
        S_P_NEXT: begin
          if (!q_found || pi == q_path_len) state <= S_CMD;
          else begin
            q_path_raddr <= pi[NIW-1:0];
            state        <= S_P_A;
          end
        end
        S_P_A: begin
          node_raddr <= q_path_node;
          state      <= S_P_W;
        end
        S_P_W: state <= S_P_SEND;
        S_P_SEND: begin
          tx_sr  <= {128'(node_rdata), 128'h0};
          tx_cnt <= 6'd16;
          tx_ret <= S_P_NEXT;
          pi     <= pi + 1'b1;
          state  <= S_TX;
        end
        default: state <= S_CMD;
      endcase
    end
  end
endmodule
