// tb_uart_rx: drives serial frames with a bit time slightly off the
// nominal one (+-3 %) and random gaps, and checks each received byte; a
// frame with a low stop bit must be dropped.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 0, rst_n = 0, rx = 1, valid;
  logic [7:0] data;
  int checks = 0, failures = 0, got = 0;
  logic [7:0] q [$];
  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (valid) begin
    checks++;
    got++;
    if (q.size() == 0 || data !== q[0]) begin failures++; $display("FAIL got %h exp %h", data, q.size() ? q[0] : 8'h00); end
    if (q.size() != 0) void'(q.pop_front());
  end
  task automatic send(logic [7:0] b, bit good_stop, int bt);
    logic [9:0] f;
    f = {good_stop, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rx = f[k];
      repeat (bt) @(negedge clk);
    end
    rx = 1;
    repeat (bt) @(negedge clk);
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      logic [7:0] b;
      int bt;
      b = 8'($urandom);
      bt = CPB + $urandom_range(0, 2) - 1;
      if (i % 17 == 5) send(b, 0, bt);        // framing error: dropped
      else begin q.push_back(b); send(b, 1, bt); end
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d bytes lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
