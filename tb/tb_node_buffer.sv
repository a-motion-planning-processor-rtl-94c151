// tb_node_buffer: writes all 100 entries with random configurations and
// reads them back in random order, one cycle after the address.
module tb_node_buffer;
  import mpp_pkg::*;
  logic clk = 0, we = 0;
  logic [6:0] waddr, raddr;
  cfg_t wdata, rdata;
  cfg_t model [100];
  int checks = 0, failures = 0;
  node_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    raddr = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 400; i++) begin
      int r;
      r = $urandom_range(0, 99);
      raddr = 7'(r);
      @(negedge clk);
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
