// fault_detector: bit-by-bit comparison of expected and received sequences.
//
// In each cycle in which the delayer raises enable, the expected bit
// (delayer_in) is compared with the bit at the network's output (sib_in).
// At the first mismatch the detector stops and reports test_out = 1 together
// with generator_en = 1. If all P bits of the step (FULL_LEN in FULLTEST,
// ONE_LEN in ONEBYONE) match, it reports test_out = 0, generator_en = 1.
// The report is held in FINISH until detector_en falls, which returns the
// detector to IDLE with both outputs low.
//
// The datatest_full / datatest_one structure and the early stop at the first
// differing bit follow the published chart; the held-level handshake with
// the sequence generator is this design's choice. Outputs are registered:
// the report appears the cycle after the deciding comparison.
module fault_detector #(
  parameter int unsigned N_SIB    = 150,
  parameter int unsigned LEN      = 8,
  parameter int unsigned FULL_LEN = N_SIB*(LEN+1),
  parameter int unsigned ONE_LEN  = N_SIB+LEN
) (
  input  logic clk,
  input  logic rst,
  input  logic detector_en,
  input  logic fulltest,
  input  logic onebyone,
  input  logic enable,
  input  logic delayer_in,
  input  logic sib_in,
  output logic test_out,
  output logic generator_en
);
  typedef enum logic [1:0] {IDLE, DATATEST_FULL, DATATEST_ONE, FINISH} fd_state_e;

  localparam int unsigned CW = $clog2(FULL_LEN + 1);

  fd_state_e     state;
  logic [CW-1:0] cnt;
  logic [CW-1:0] last;

  assign last = (state == DATATEST_FULL) ? CW'(FULL_LEN - 1) : CW'(ONE_LEN - 1);

  always_ff @(posedge clk) begin
    if (rst || !detector_en) begin
      state        <= IDLE;
      cnt          <= '0;
      test_out     <= 1'b0;
      generator_en <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (fulltest)      state <= DATATEST_FULL;
          else if (onebyone) state <= DATATEST_ONE;
        end
        DATATEST_FULL, DATATEST_ONE:
          if (enable) begin
            cnt <= cnt + 1'b1;
            if (delayer_in != sib_in) begin
              test_out     <= 1'b1;
              generator_en <= 1'b1;
              state        <= FINISH;
            end else if (cnt == last) begin
              test_out     <= 1'b0;
              generator_en <= 1'b1;
              state        <= FINISH;
            end
          end
        FINISH: state <= FINISH;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
