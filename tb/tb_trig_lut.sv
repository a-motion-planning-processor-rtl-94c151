// tb_trig_lut: every one of the 1024 angles against $sin/$cos (error at most
// one least significant bit of Q16.16), with the result two cycles after the
// angle.
module tb_trig_lut;
  import mpp_pkg::*;
  logic clk = 0;
  logic [9:0] angle;
  fx_t s, c;
  int checks = 0, failures = 0;
  trig_lut dut (.clk, .en(1'b1), .angle, .sin_o(s), .cos_o(c));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int err(fx_t got, real want);
    real d;
    d = real'(got) - want * 65536.0;
    return (d > 1.0 || d < -1.0) ? 1 : 0;
  endfunction
  initial begin
    for (int i = 0; i < 1024 + 2; i++) begin
      @(negedge clk);
      angle = 10'(i);
      if (i >= 2) begin
        real th;
        th = 2.0 * 3.14159265358979 * (i - 2) / 1024.0;
        checks += 2;
        if (err(s, $sin(th)) != 0) begin failures++; $display("FAIL sin %0d got %0d", i - 2, s); end
        if (err(c, $cos(th)) != 0) begin failures++; $display("FAIL cos %0d got %0d", i - 2, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
