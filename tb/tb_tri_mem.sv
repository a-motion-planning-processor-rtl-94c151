// tb_tri_mem: fills all 256 words with random triangles, reads them back in
// random order (data one cycle after the address) and checks that a read of
// the word being written returns the old value.
module tb_tri_mem;
  import mpp_pkg::*;
  logic clk = 0, we = 0;
  logic [7:0] waddr, raddr;
  tri_t wdata, rdata;
  tri_t model [256];
  int checks = 0, failures = 0;
  tri_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic tri_t rtri();
    tri_t t;
    for (int i = 0; i < 9; i++) t[i*32 +: 32] = $urandom;
    return t;
  endfunction
  initial begin
    raddr = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = rtri(); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      int r;
      r = $urandom_range(0, 255);
      raddr = 8'(r);
      @(negedge clk);
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL addr %0d", r); end
    end
    // read during write of the same word: old data
    raddr = 8'd7; waddr = 8'd7; we = 1; wdata = rtri();
    @(negedge clk); we = 0;
    checks++;
    if (rdata !== model[7]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++;
    if (rdata !== wdata) begin failures++; $display("FAIL new data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
