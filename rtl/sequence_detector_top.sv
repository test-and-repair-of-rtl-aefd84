// sequence_detector_top: the sequence detector of the built-in test block.
//
// A delayer that replays the expected test sequence in step with the
// network's output, and a fault detector that compares the two bit by bit
// and reports the result (test_out) with a completion flag (generator_en) to
// the sequence generator. Ports follow the published block diagram; the
// report arrives one cycle after the deciding bit is at the network output.
module sequence_detector_top #(
  parameter int unsigned N_SIB    = 150,
  parameter int unsigned LEN      = 8,
  parameter int unsigned FULL_LEN = N_SIB*(LEN+1),
  parameter int unsigned ONE_LEN  = N_SIB+LEN
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                detector_en,
  input  logic [FULL_LEN-1:0] test_in1,
  input  logic [ONE_LEN-1:0]  test_in2,
  input  logic                sib_in,
  input  logic                fulltest,
  input  logic                onebyone,
  output logic                generator_en,
  output logic                test_out
);
  logic dl_data, dl_enable;

  delayer #(.N_SIB(N_SIB), .LEN(LEN), .FULL_LEN(FULL_LEN), .ONE_LEN(ONE_LEN)) u_delayer (
    .clk, .rst, .detector_en, .fulltest, .onebyone, .test_in1, .test_in2,
    .data_out(dl_data), .enable(dl_enable)
  );

  fault_detector #(.N_SIB(N_SIB), .LEN(LEN), .FULL_LEN(FULL_LEN), .ONE_LEN(ONE_LEN)) u_fd (
    .clk, .rst, .detector_en, .fulltest, .onebyone,
    .enable(dl_enable), .delayer_in(dl_data), .sib_in,
    .test_out, .generator_en
  );
endmodule
