// tb_mpp_top: end-to-end test of the whole processor through its serial
// port, with the bit time shortened to 8 clocks, 4 collision circuits and a
// 4-entry triangle FIFO so that every mechanism shows up in a short run.
// Loads a box robot and 3 box obstacles, runs 40 collision checks, builds a
// 30-node roadmap and answers 6 path queries, comparing everything with an
// exact geometric reference (see tb_mpp_body.svh). Counts a failure for each
// mechanism (FIFO back-pressure, early stop, node and edge rejection,
// arbiter contention, broken frame, both check answers, found and not-found
// paths) that never happened.
module tb_mpp_top;
  import mpp_pkg::*;
  import tb_geom_pkg::*;
  localparam int CPB = 8, N_OBS = 3, N_CHECK = 40, N_BUILD = 30, N_QUERY = 6, COVER = 1;
  localparam int WATCHDOG = 20_000_000;
  logic clk = 0, rst_n = 0, uart_rxd, uart_txd, building, querying, checking;

  mpp_top #(.CLKS_PER_BIT(CPB), .N_CD(4), .BANK_DEPTH(16), .ROBOT_DEPTH(16), .FIFO_DEPTH(4)) dut (.*);

  `include "tb_mpp_body.svh"
endmodule
