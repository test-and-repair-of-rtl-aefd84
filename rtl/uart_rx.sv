// uart_rx: UART receiver with mid-bit sampling.
//
// The line idles at 1. A frame is a start bit (0), 8 data bits LSB first, an
// optional parity bit and one stop bit (1). The receiver synchronises the
// line with two flip-flops, detects the 1-to-0 edge of the start bit, waits
// half a bit time, checks the start bit is still 0, then samples each
// further bit at its centre, CLKS_PER_BIT clock cycles apart. When the stop
// bit has been sampled it pulses rx_valid for one cycle with the byte on
// rx_data; frame_err flags a stop bit of 0 and parity_err a parity mismatch
// (PARITY: 0 none, 1 odd, 2 even).
//
// The frame format and centre sampling follow the usual UART scheme; the
// 115200 baud of the evaluation at an assumed 100 MHz clock gives the
// default CLKS_PER_BIT = 868. No parity is the default, this design's choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned PARITY       = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       frame_err,
  output logic       parity_err
);
  typedef enum logic [2:0] {IDLE, START, DATA, PAR, STOP} rx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  rx_state_e     state;
  logic [1:0]    sync;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          line;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync       <= 2'b11;
      state      <= IDLE;
      clk_cnt    <= '0;
      bit_idx    <= '0;
      shreg      <= '0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
      frame_err  <= 1'b0;
      parity_err <= 1'b0;
    end else begin
      sync     <= {sync[0], rx};
      rx_valid <= 1'b0;
      unique case (state)
        IDLE: begin
          clk_cnt <= '0;
          if (!line) state <= START;
        end
        START:
          if (clk_cnt == CW'(CLKS_PER_BIT/2 - 1)) begin
            clk_cnt <= '0;
            bit_idx <= '0;
            state   <= line ? IDLE : DATA;      // a glitch is not a start bit
          end else clk_cnt <= clk_cnt + 1'b1;
        DATA:
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            shreg   <= {line, shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= (PARITY != 0) ? PAR : STOP;
          end else clk_cnt <= clk_cnt + 1'b1;
        PAR:
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt    <= '0;
            // odd: data plus parity holds an odd number of ones
            parity_err <= ((^shreg) ^ line) != (PARITY == 1);
            state      <= STOP;
          end else clk_cnt <= clk_cnt + 1'b1;
        STOP:
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt   <= '0;
            rx_data   <= shreg;
            rx_valid  <= 1'b1;
            frame_err <= !line;
            state     <= IDLE;
          end else clk_cnt <= clk_cnt + 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
