// uart_rx: RS-232 style serial receiver, 8 data bits, no parity, 1 stop bit.
//
// The line idles high. A falling edge starts a frame; the line is sampled in
// the middle of the start bit, of each data bit (least significant first)
// and of the stop bit. A frame whose stop bit is high delivers its byte on
// data with valid high for one cycle; otherwise it is dropped and the
// receiver waits for the line to return high before looking for a new start
// bit. CLKS_PER_BIT
// is the clock frequency over the baud rate: 434 is 115200 baud at the
// 50 MHz clock of the source design. The source only says an RS-232 serial
// port is used; frame format and baud rate are this implementation's
// choices. The input is passed through two flip-flops against metastability.
module uart_rx #(
  parameter int CLKS_PER_BIT = 434,
  parameter int CW           = $clog2(CLKS_PER_BIT + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_STOP, S_BREAK} state_t;
  state_t state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    sr;
  logic          line;

  assign line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= S_IDLE;
      valid <= 1'b0;
      cnt   <= '0;
      bitn  <= '0;
      data  <= '0;
      sr    <= '0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (!line) begin
          cnt   <= CW'(CLKS_PER_BIT / 2);
          state <= S_START;
        end
        S_START: if (cnt == 0) begin            // middle of the start bit
          if (!line) begin
            cnt   <= CW'(CLKS_PER_BIT - 1);
            bitn  <= '0;
            state <= S_DATA;
          end else begin
            state <= S_IDLE;                    // glitch
          end
        end else cnt <= cnt - 1'b1;
        S_DATA: if (cnt == 0) begin
          sr   <= {line, sr[7:1]};
          cnt  <= CW'(CLKS_PER_BIT - 1);
          bitn <= bitn + 1'b1;
          if (bitn == 3'd7) state <= S_STOP;
        end else cnt <= cnt - 1'b1;
        S_STOP: if (cnt == 0) begin
          if (line) begin
            valid <= 1'b1;
            data  <= sr;
            state <= S_IDLE;
          end else begin
            state <= S_BREAK;                   // framing error
          end
        end else cnt <= cnt - 1'b1;
        S_BREAK: if (line) state <= S_IDLE;     // wait for the idle level
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
