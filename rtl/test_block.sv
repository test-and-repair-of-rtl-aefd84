// test_block: built-in test of the flat scan network.
//
// Wires the sequence generator, the SU controller and the sequence detector
// as in the published test-block diagram. test_en (a one-cycle pulse from the
// command decoder) starts a test; the block then owns the network
// (network_en = 1 during each step) and drives it through ctrl, watches its
// TDO on sib_in, and leaves the fault locations in scr_test with repair = 1
// when any register failed. net_clr asks for a network reset between steps;
// test_done pulses at the end. capture_en is never used by the test.
//
// Cycle count: the FULLTEST step takes N_SIB + 1 + 2*FULL_LEN cycles plus a
// few of handshake; each ONEBYONE step N_SIB + 1 + 2*ONE_LEN plus handshake.
// A mismatch ends a step early.
module test_block #(
  parameter int unsigned N_SIB    = 150,
  parameter int unsigned LEN      = 8,
  parameter int unsigned FULL_LEN = N_SIB*(LEN+1),
  parameter int unsigned ONE_LEN  = N_SIB+LEN
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                test_en,
  input  logic                sib_in,
  output rsn_pkg::scan_ctrl_t ctrl,
  output logic                network_en,
  output logic                net_clr,
  output logic                test_done,
  output logic                busy,
  output logic                fulltest,
  output logic                onebyone,
  output logic [N_SIB-1:0]    scr_test,
  output logic                repair
);
  logic [FULL_LEN-1:0] d_det1, d_sib1;
  logic [ONE_LEN-1:0]  d_det2, d_sib2;
  logic                detector_en, control_en, test_out, gen_en;
  logic [N_SIB-1:0]    scr_control;

  sequence_generator #(.N_SIB(N_SIB), .LEN(LEN), .FULL_LEN(FULL_LEN), .ONE_LEN(ONE_LEN)) u_gen (
    .clk, .rst, .test_en, .test_out, .enable_from_detector(gen_en),
    .data_to_detector1(d_det1), .data_to_sib1(d_sib1),
    .data_to_detector2(d_det2), .data_to_sib2(d_sib2),
    .detector_en, .control_en, .network_en, .scr_control,
    .fulltest, .onebyone, .scr_test, .repair, .net_clr, .test_done, .busy
  );

  su_controller #(.N_SIB(N_SIB), .LEN(LEN), .FULL_LEN(FULL_LEN), .ONE_LEN(ONE_LEN)) u_su (
    .clk, .rst, .control_en, .fulltest, .onebyone,
    .scr_in(scr_control), .data_in1(d_sib1), .data_in2(d_sib2),
    .data_out(ctrl.si), .shift_en(ctrl.shift_en), .update_en(ctrl.update_en)
  );
  assign ctrl.capture_en = 1'b0;

  sequence_detector_top #(.N_SIB(N_SIB), .LEN(LEN), .FULL_LEN(FULL_LEN), .ONE_LEN(ONE_LEN)) u_det (
    .clk, .rst, .detector_en, .test_in1(d_det1), .test_in2(d_det2),
    .sib_in, .fulltest, .onebyone, .generator_en(gen_en), .test_out
  );
endmodule
