// sequence_generator: main FSM of the built-in test of the flat network.
//
// On test_en it runs the FULLTEST step: every SIB is opened (SCR_control all
// ones) and the alternating pattern 1010... is sent through the whole path.
// If the sequence detector reports no mismatch the test ends with no fault.
// Otherwise the ONEBYONE process (localization) tests the scan registers one
// at a time: SCR_control is one-hot, starting at register 0 (the one nearest
// TDI) and moving one place per step. A register whose step fails is marked
// in the repair register SCR_reg. After the last register SCR_reg is copied
// to SCR_test and repair is raised if any bit is set.
//
// Between steps the FSM passes through CLEAR, where all enables are low and
// net_clr is high: the SU controller and detector return to IDLE and the
// network is reset so that every step starts from an all-closed network.
// FINISH also raises net_clr and test_done for one cycle.
//
// Handshake: network_en, control_en and detector_en are high for the whole of
// a step; the detector answers with enable_from_detector (held) and test_out.
// Test sequences leave as parallel vectors (data_to_SIB*/data_to_detector*),
// bit 0 shifted first. The states test_fault, localization and repair and the
// port list follow the published chart and block diagram; the CLEAR state,
// net_clr, test_done and the bit ordering are this design's choices.
module sequence_generator #(
  parameter int unsigned N_SIB    = 150,
  parameter int unsigned LEN      = 8,
  parameter int unsigned FULL_LEN = N_SIB*(LEN+1),
  parameter int unsigned ONE_LEN  = N_SIB+LEN
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                test_en,
  input  logic                test_out,
  input  logic                enable_from_detector,
  output logic [FULL_LEN-1:0] data_to_detector1,
  output logic [FULL_LEN-1:0] data_to_sib1,
  output logic [ONE_LEN-1:0]  data_to_detector2,
  output logic [ONE_LEN-1:0]  data_to_sib2,
  output logic                detector_en,
  output logic                control_en,
  output logic                network_en,
  output logic [N_SIB-1:0]    scr_control,
  output logic                fulltest,
  output logic                onebyone,
  output logic [N_SIB-1:0]    scr_test,
  output logic                repair,
  output logic                net_clr,
  output logic                test_done,
  output logic                busy
);
  typedef enum logic [2:0] {
    IDLE, CLEAR, TEST_FAULT, LOCALIZATION, REPAIR, NEXT, FINISH
  } sg_state_e;

  localparam int unsigned KW = $clog2(N_SIB + 1);

  function automatic logic [FULL_LEN-1:0] full_pattern();
    logic [FULL_LEN-1:0] p;
    for (int unsigned k = 0; k < FULL_LEN; k++) p[k] = rsn_pkg::test_bit(k);
    return p;
  endfunction

  function automatic logic [ONE_LEN-1:0] one_pattern();
    logic [ONE_LEN-1:0] p;
    for (int unsigned k = 0; k < ONE_LEN; k++) p[k] = rsn_pkg::test_bit(k);
    return p;
  endfunction

  localparam logic [FULL_LEN-1:0] FULL_PAT = full_pattern();
  localparam logic [ONE_LEN-1:0]  ONE_PAT  = one_pattern();

  sg_state_e        state;
  logic             mode_one;     // step to run after CLEAR: 0 FULLTEST, 1 ONEBYONE
  logic [KW-1:0]    counter;
  logic [N_SIB-1:0] scr_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      mode_one    <= 1'b0;
      counter     <= '0;
      scr_reg     <= '0;
      scr_control <= '0;
      scr_test    <= '0;
      repair      <= 1'b0;
    end else begin
      unique case (state)
        IDLE:
          if (test_en) begin
            mode_one    <= 1'b0;
            scr_control <= '1;
            scr_reg     <= '0;
            scr_test    <= '0;
            repair      <= 1'b0;
            counter     <= '0;
            state       <= CLEAR;
          end
        CLEAR: state <= mode_one ? LOCALIZATION : TEST_FAULT;
        TEST_FAULT:
          if (enable_from_detector) begin
            if (!test_out) state <= FINISH;
            else begin
              scr_control <= N_SIB'(1);
              counter     <= '0;
              mode_one    <= 1'b1;
              state       <= CLEAR;
            end
          end
        LOCALIZATION:
          if (enable_from_detector) state <= test_out ? REPAIR : NEXT;
        REPAIR: begin
          scr_reg[counter] <= 1'b1;
          state            <= NEXT;
        end
        NEXT:
          if (counter == KW'(N_SIB - 1)) begin
            scr_test <= scr_reg;
            repair   <= |scr_reg;
            state    <= FINISH;
          end else begin
            counter     <= counter + 1'b1;
            scr_control <= {scr_control[N_SIB-2:0], 1'b0};
            state       <= CLEAR;
          end
        FINISH: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    fulltest          = (state == TEST_FAULT);
    onebyone          = (state == LOCALIZATION);
    network_en        = fulltest || onebyone;
    control_en        = network_en;
    detector_en       = network_en;
    data_to_sib1      = fulltest ? FULL_PAT : '0;
    data_to_detector1 = data_to_sib1;
    data_to_sib2      = onebyone ? ONE_PAT : '0;
    data_to_detector2 = data_to_sib2;
    net_clr           = (state == CLEAR) || (state == FINISH);
    test_done         = (state == FINISH);
    busy              = (state != IDLE);
  end
endmodule
