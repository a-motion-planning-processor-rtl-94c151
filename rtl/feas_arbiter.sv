// feas_arbiter: shares one feasibility checker among N requesters.
//
// Each requester raises req_valid[i] with its configuration and holds it
// until req_ready[i]. The arbiter forwards one request at a time, chosen
// round-robin starting after the last winner, and routes the answer back:
// resp_valid[i] pulses with the common resp_collide for the requester that
// owns the outstanding request. Only one request is outstanding; the next
// is forwarded the cycle after the answer arrives. The source design shows
// many feasibility users wired to one collision detection module but not how
// they share it; this arbiter is this implementation's choice.
module feas_arbiter
  import mpp_pkg::*;
#(
  parameter int N = 2,
  parameter int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // requesters
  input  logic [N-1:0] req_valid,
  input  cfg_t         req_cfg [N],
  output logic [N-1:0] req_ready,
  output logic [N-1:0] resp_valid,
  output logic         resp_collide,
  // shared checker
  output logic         m_req_valid,
  output cfg_t         m_req_cfg,
  input  logic         m_req_ready,
  input  logic         m_resp_valid,
  input  logic         m_resp_collide
);
  logic          pending;
  logic [IW-1:0] owner, last, pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = last;
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (int'(last) + k) % N;
      if (!any && req_valid[idx]) begin
        any  = 1'b1;
        pick = IW'(idx);
      end
    end
  end

  assign m_req_valid  = !pending && any;
  assign m_req_cfg    = req_cfg[pick];
  assign resp_collide = m_resp_collide;

  always_comb begin
    req_ready  = '0;
    resp_valid = '0;
    if (!pending && any && m_req_ready) req_ready[pick] = 1'b1;
    if (pending && m_resp_valid)        resp_valid[owner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      owner   <= '0;
      last    <= IW'(N - 1);
    end else if (!pending) begin
      if (any && m_req_ready) begin
        pending <= 1'b1;
        owner   <= pick;
        last    <= pick;
      end
    end else if (m_resp_valid) begin
      pending <= 1'b0;
    end
  end

  a_resp_only_when_pending: assert property (@(posedge clk)
                                             m_resp_valid |-> pending);
endmodule
