// tb_fx_mul: random and corner operands; the product must appear exactly two
// cycles after the operands, one new pair every cycle.
module tb_fx_mul;
  logic clk = 0;
  logic signed [31:0] a, b;
  logic signed [63:0] p;
  logic signed [63:0] expq [$];
  int checks = 0, failures = 0;
  fx_mul dut (.clk, .en(1'b1), .a, .b, .p);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic signed [63:0] e;
    int corner [6] = '{0, 1, -1, 32'h7fffffff, 32'h80000000, 12345};
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i < 36) begin a = corner[i % 6]; b = corner[i / 6]; end
      else begin a = $urandom; b = $urandom; end
      expq.push_back(64'(a) * 64'(b));
      if (i >= 2) begin
        e = expq.pop_front();
        checks++;
        if (p !== e) begin failures++; $display("FAIL %0d got %0d exp %0d", i, p, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
