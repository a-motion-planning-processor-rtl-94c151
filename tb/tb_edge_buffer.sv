// tb_edge_buffer: writes all 500 entries with random node pairs and reads
// them back in random order, one cycle after the address.
module tb_edge_buffer;
  logic clk = 0, we = 0;
  logic [8:0] waddr, raddr;
  logic [13:0] wdata, rdata;
  logic [13:0] model [500];
  int checks = 0, failures = 0;
  edge_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    raddr = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 1; waddr = 9'(i); wdata = 14'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      int r;
      r = $urandom_range(0, 499);
      raddr = 9'(r);
      @(negedge clk);
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
