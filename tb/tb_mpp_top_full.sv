// tb_mpp_top_full: the processor at its full default size (25 collision
// circuits, 256-triangle banks, 115200 baud at 50 MHz, 100-node buffers,
// 10 generators, 10 closest-finding circuits) with no parameter changed.
// Because every serial byte takes 4340 clocks the workload is small: the
// box robot, one box obstacle, 4 collision checks, a 4-node roadmap and 2
// path queries, all compared with the exact reference of tb_mpp_body.svh.
// Mechanism coverage is left to tb_mpp_top.
module tb_mpp_top_full;
  import mpp_pkg::*;
  import tb_geom_pkg::*;
  localparam int CPB = 434, N_OBS = 1, N_CHECK = 4, N_BUILD = 4, N_QUERY = 2, COVER = 0;
  localparam int WATCHDOG = 60_000_000;
  logic clk = 0, rst_n = 0, uart_rxd, uart_txd, building, querying, checking;

  mpp_top dut (.*);

  `include "tb_mpp_body.svh"
endmodule
