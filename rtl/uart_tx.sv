// uart_tx: UART transmitter.
//
// A shift register loaded in parallel on tx_start (when not busy) and sent
// LSB first at one bit per CLKS_PER_BIT clock cycles: start bit 0, 8 data
// bits, an optional parity bit (PARITY: 0 none, 1 odd, 2 even) and one stop
// bit 1. The line idles at 1. busy is high from the cycle after tx_start
// until the stop bit has been on the line for a full bit time.
//
// Frame format as in the usual UART scheme; the defaults (115200 baud at an
// assumed 100 MHz clock, no parity) are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned PARITY       = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] tx_data,
  input  logic       tx_start,
  output logic       tx,
  output logic       busy
);
  localparam int unsigned NBITS = (PARITY != 0) ? 11 : 10;
  localparam int unsigned CW    = $clog2(CLKS_PER_BIT + 1);

  logic [10:0]   frame;
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;
  logic          par;

  assign par  = (PARITY == 1) ? ~(^tx_data) : (^tx_data);
  assign busy = (bits_left != 0);
  assign tx   = busy ? frame[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
    end else if (!busy) begin
      clk_cnt <= '0;
      if (tx_start) begin
        frame     <= (PARITY != 0) ? {1'b1, par, tx_data, 1'b0} : {2'b11, tx_data, 1'b0};
        bits_left <= 4'(NBITS);
      end
    end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
      clk_cnt   <= '0;
      frame     <= {1'b1, frame[10:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end
endmodule
