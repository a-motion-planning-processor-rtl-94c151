// tb_tri_fifo: random pushes and pops against a queue model, including
// filling it to full and draining it, and a flush.
module tb_tri_fifo;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  tri_t wdata, rdata;
  logic empty, full;
  logic [4:0] count;
  tri_t model [$];
  int checks = 0, failures = 0, n_full = 0;
  tri_fifo dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      phase = (i / 500) % 2;                 // alternate fill-biased and drain-biased
      @(negedge clk);
      checks++;
      if (count != 5'(model.size()) || empty != (model.size() == 0) || full != (model.size() == 16)) begin
        failures++; $display("FAIL count %0d model %0d", count, model.size());
      end
      if (!empty) begin
        checks++;
        if (rdata !== model[0]) begin failures++; $display("FAIL head"); end
      end
      n_full += int'(full);
      push = !full && ($urandom_range(0, 9) < (phase ? 3 : 7));
      pop  = !empty && ($urandom_range(0, 9) < (phase ? 7 : 3));
      for (int w = 0; w < 9; w++) wdata[w*32 +: 32] = $urandom;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    @(negedge clk); push = 0; pop = 0; flush = 1;
    @(negedge clk); flush = 0; model.delete();
    checks++;
    if (!empty) begin failures++; $display("FAIL flush"); end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
