// su_controller: shift-update (SU) controller of the built-in test block.
//
// Drives the shift and update enables and the serial input of the flat
// network for one test step. When control_en rises it shifts the N_SIB SIB
// control bits (shift_control), pulses update_en for one cycle so the SIBs
// take them (update_control), then shifts the test sequence through the
// resulting scan path (shift_fulltest or shift_onebyone) and finally shifts
// the same number of dummy zeros (dummybits_full or dummybits_one) so the
// test sequence comes out at TDO. In the FULLTEST step the path holds every
// SIB and every scan register, FULL_LEN = N_SIB*(LEN+1) bits; in a ONEBYONE
// step it holds every SIB and one register, ONE_LEN = N_SIB+LEN bits.
// Dropping control_en aborts the step and returns to IDLE.
//
// Timing: outputs are decoded from the state. One cycle after control_en is
// seen high the first control bit is on data_out; the step lasts
// N_SIB + 1 + 2*P cycles (P = FULL_LEN or ONE_LEN), after which the
// controller rests in FINISH until control_en falls.
//
// The state sequence and the parallel input vectors indexed by a counter
// follow the published ASMD chart. The shift order of the control vector
// (bit N_SIB-1 first, so bit k lands in SIB k) and the path lengths that
// count the SIB shift bits are this design's choices.
module su_controller #(
  parameter int unsigned N_SIB    = 150,
  parameter int unsigned LEN      = 8,
  parameter int unsigned FULL_LEN = N_SIB*(LEN+1),
  parameter int unsigned ONE_LEN  = N_SIB+LEN
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                control_en,
  input  logic                fulltest,
  input  logic                onebyone,
  input  logic [N_SIB-1:0]    scr_in,
  input  logic [FULL_LEN-1:0] data_in1,
  input  logic [ONE_LEN-1:0]  data_in2,
  output logic                data_out,
  output logic                shift_en,
  output logic                update_en
);
  typedef enum logic [2:0] {
    IDLE, SHIFT_CONTROL, UPDATE_CONTROL, SHIFT_FULLTEST, DUMMYBITS_FULL,
    SHIFT_ONEBYONE, DUMMYBITS_ONE, FINISH
  } su_state_e;

  localparam int unsigned CW = $clog2(FULL_LEN + N_SIB + 1);

  su_state_e       state;
  logic [CW-1:0]   cnt;

  always_ff @(posedge clk) begin
    if (rst || !control_en) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          state <= SHIFT_CONTROL;
          cnt   <= '0;
        end
        SHIFT_CONTROL:
          if (cnt == CW'(N_SIB - 1)) begin state <= UPDATE_CONTROL; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        UPDATE_CONTROL:
          if (fulltest)      state <= SHIFT_FULLTEST;
          else if (onebyone) state <= SHIFT_ONEBYONE;
          else               state <= FINISH;
        SHIFT_FULLTEST:
          if (cnt == CW'(FULL_LEN - 1)) begin state <= DUMMYBITS_FULL; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        DUMMYBITS_FULL:
          if (cnt == CW'(FULL_LEN - 1)) begin state <= FINISH; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        SHIFT_ONEBYONE:
          if (cnt == CW'(ONE_LEN - 1)) begin state <= DUMMYBITS_ONE; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        DUMMYBITS_ONE:
          if (cnt == CW'(ONE_LEN - 1)) begin state <= FINISH; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        FINISH: state <= FINISH;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    shift_en  = 1'b0;
    update_en = 1'b0;
    data_out  = 1'b0;
    unique case (state)
      SHIFT_CONTROL: begin
        shift_en = 1'b1;
        data_out = scr_in[N_SIB - 1 - int'(cnt)];
      end
      UPDATE_CONTROL: update_en = 1'b1;
      SHIFT_FULLTEST: begin
        shift_en = 1'b1;
        data_out = data_in1[cnt];
      end
      SHIFT_ONEBYONE: begin
        shift_en = 1'b1;
        data_out = data_in2[cnt];
      end
      DUMMYBITS_FULL, DUMMYBITS_ONE: shift_en = 1'b1;
      default: ;
    endcase
  end
endmodule
