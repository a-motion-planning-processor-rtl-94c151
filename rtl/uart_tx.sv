// uart_tx: RS-232 style serial transmitter, 8 data bits, no parity, 1 stop
// bit.
//
// When ready is high, valid loads data and the frame starts: a low start
// bit, the eight data bits least significant first, a high stop bit, each
// CLKS_PER_BIT clocks long. ready is low for the whole frame, which lasts
// 10 * CLKS_PER_BIT cycles. 434 clocks per bit is 115200 baud at 50 MHz;
// frame format and baud rate are this implementation's choices.
module uart_tx #(
  parameter int CLKS_PER_BIT = 434,
  parameter int CW           = $clog2(CLKS_PER_BIT + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       tx
);
  logic [9:0]    sr;          // stop, data[7:0], start; bit 0 is on the line
  logic [3:0]    idx;         // bit being sent
  logic          busy;
  logic [CW-1:0] cnt;

  assign ready = !busy;
  assign tx    = busy ? sr[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      cnt  <= '0;
      sr   <= '1;
    end else if (!busy) begin
      if (valid) begin
        sr   <= {1'b1, data, 1'b0};
        busy <= 1'b1;
        idx  <= '0;
        cnt  <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else if (idx == 4'd9) begin
      busy <= 1'b0;                 // stop bit sent
    end else begin
      idx <= idx + 1'b1;
      sr  <= {1'b1, sr[9:1]};
      cnt <= CW'(CLKS_PER_BIT - 1);
    end
  end
endmodule
