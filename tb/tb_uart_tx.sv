// tb_uart_tx: sends random bytes and samples the line in the middle of each
// bit: start bit low, eight data bits LSB first, stop bit high, each
// CLKS_PER_BIT cycles; ready must stay low for exactly 10 bit times.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, valid = 0, ready, tx;
  logic [7:0] data;
  int checks = 0, failures = 0;
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // every frame must keep the transmitter busy for exactly 10 bit times
  int blen = 0;
  always @(negedge clk) begin
    if (!ready) blen++;
    else if (blen > 0) begin
      checks++;
      if (blen != 10 * CPB) begin failures++; $display("FAIL frame lasted %0d cycles", blen); end
      blen = 0;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    checks++;
    if (tx !== 1'b1) begin failures++; $display("FAIL idle line"); end
    for (int i = 0; i < 100; i++) begin
      logic [7:0] b;
      logic [9:0] got;
      int busy_cycles;
      b = 8'($urandom);
      while (!ready) @(negedge clk);
      valid = 1; data = b;
      @(negedge clk); valid = 0;
      repeat (CPB / 2 - 1) @(negedge clk);
      for (int k = 0; k < 10; k++) begin
        got[k] = tx;
        repeat (CPB) @(negedge clk);
      end
      checks++;
      if (got !== {1'b1, b, 1'b0}) begin failures++; $display("FAIL frame %b for %h", got, b); end
      busy_cycles = 0;
      while (!ready) begin @(negedge clk); busy_cycles++; end
      checks++;
      if (busy_cycles > CPB) begin failures++; $display("FAIL frame too long"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
