// delayer: aligns the expected test sequence with the network's output.
//
// The sequence generator hands the expected sequence to the detector at once,
// as a parallel vector, while the same bits come out of the network only
// after the control bits, the update and the whole test sequence have been
// shifted in. The delayer therefore counts the same phases as the SU
// controller: N_SIB+1 cycles for the control bits and update
// (count_for_control), P cycles for the test data (count_for_data1/2) and P
// cycles for the dummy bits (count_for_dummy1/2). During the dummy phase it
// presents expected bit j on data_out with enable = 1, which is exactly the
// cycle in which bit j is at TDO. P is FULL_LEN or ONE_LEN depending on the
// fulltest / onebyone mode. Dropping detector_en returns it to IDLE.
//
// The phase structure follows the published delayer chart; folding the
// update cycle into the control count is this design's choice, needed to
// match the SU controller exactly.
module delayer #(
  parameter int unsigned N_SIB    = 150,
  parameter int unsigned LEN      = 8,
  parameter int unsigned FULL_LEN = N_SIB*(LEN+1),
  parameter int unsigned ONE_LEN  = N_SIB+LEN
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                detector_en,
  input  logic                fulltest,
  input  logic                onebyone,
  input  logic [FULL_LEN-1:0] test_in1,
  input  logic [ONE_LEN-1:0]  test_in2,
  output logic                data_out,
  output logic                enable
);
  typedef enum logic [2:0] {
    IDLE, COUNT_FOR_CONTROL, COUNT_FOR_DATA1, COUNT_FOR_DUMMY1,
    COUNT_FOR_DATA2, COUNT_FOR_DUMMY2, FINISH
  } dl_state_e;

  localparam int unsigned CW = $clog2(FULL_LEN + N_SIB + 1);

  dl_state_e     state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !detector_en) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          state <= COUNT_FOR_CONTROL;
          cnt   <= '0;
        end
        COUNT_FOR_CONTROL:
          if (cnt == CW'(N_SIB)) begin
            cnt   <= '0;
            state <= fulltest ? COUNT_FOR_DATA1 : onebyone ? COUNT_FOR_DATA2 : FINISH;
          end else cnt <= cnt + 1'b1;
        COUNT_FOR_DATA1:
          if (cnt == CW'(FULL_LEN - 1)) begin state <= COUNT_FOR_DUMMY1; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        COUNT_FOR_DUMMY1:
          if (cnt == CW'(FULL_LEN - 1)) begin state <= FINISH; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        COUNT_FOR_DATA2:
          if (cnt == CW'(ONE_LEN - 1)) begin state <= COUNT_FOR_DUMMY2; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        COUNT_FOR_DUMMY2:
          if (cnt == CW'(ONE_LEN - 1)) begin state <= FINISH; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        FINISH: state <= FINISH;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    enable   = 1'b0;
    data_out = 1'b0;
    if (state == COUNT_FOR_DUMMY1) begin
      enable   = 1'b1;
      data_out = test_in1[cnt];
    end else if (state == COUNT_FOR_DUMMY2) begin
      enable   = 1'b1;
      data_out = test_in2[cnt];
    end
  end
endmodule
