// tb_feas_arbiter: four requesters with random request timing share a
// model checker that answers after a random delay with a known function of
// the configuration. Every requester must get exactly its own answers, one
// request may be outstanding at a time, and a requester that keeps asking
// must not starve (round-robin: at most N-1 others served in between).
module tb_feas_arbiter;
  import mpp_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_valid, req_ready, resp_valid;
  cfg_t req_cfg [N];
  logic resp_collide;
  logic m_req_valid, m_req_ready, m_resp_valid, m_resp_collide;
  cfg_t m_req_cfg;
  int checks = 0, failures = 0;
  feas_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // model checker: collide = parity of x
  int delay; bit busy_m; cfg_t held;
  assign m_req_ready = !busy_m;
  always @(posedge clk) begin
    m_resp_valid <= 0;
    if (!busy_m && m_req_valid) begin busy_m <= 1; held <= m_req_cfg; delay <= $urandom_range(0, 6); end
    else if (busy_m) begin
      if (delay == 0) begin busy_m <= 0; m_resp_valid <= 1; m_resp_collide <= ^held.x; end
      else delay <= delay - 1;
    end
  end
  // requesters
  int served [N];
  int since [N];
  for (genvar i = 0; i < N; i++) begin : g_req
    bit waiting;
    always @(posedge clk) begin
      if (!rst_n) begin req_valid[i] <= 0; waiting <= 0; end
      else if (req_valid[i] && req_ready[i]) begin
        req_valid[i] <= 0; waiting <= 1;
      end else if (waiting && resp_valid[i]) begin
        checks++;
        if (resp_collide !== ^req_cfg[i].x) begin failures++; $display("FAIL answer %0d", i); end
        waiting <= 0; served[i]++;
      end else if (!waiting && !req_valid[i] && (i == 0 || $urandom_range(0, 3) == 0)) begin
        req_valid[i] <= 1;
        req_cfg[i] <= '{x: fx_t'($urandom), y: 0, z: 0, a: 0, b: 0, c: 0};
      end
    end
  end
  // requester 0 always asks: count others served between two of its grants
  int others;
  always @(posedge clk) if (rst_n) begin
    if (|resp_valid && !resp_valid[0]) others++;
    if (resp_valid[0]) begin
      checks++;
      if (others > N - 1) begin failures++; $display("FAIL starvation %0d", others); end
      others = 0;
    end
    checks++;
    if ($countones(resp_valid) > 1) begin failures++; $display("FAIL two answers"); end
  end
  initial begin
    busy_m = 0; m_resp_valid = 0; others = 0;
    foreach (served[i]) served[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (20000) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] < 50) begin failures++; $display("FAIL requester %0d served %0d", i, served[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
