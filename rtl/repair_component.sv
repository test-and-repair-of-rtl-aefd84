// repair_component: fault-location store of the network controller.
//
// When repair_en pulses, the FSM walks the fault vector scr_test_in from the
// test block, one bit per two cycles (states S0 and S1): in S0 it checks bit
// SCR_counter and, if set, writes the running location counter
// (FAULTScanRegister_counter, ADDR_W bits) into entry SCR_counter of the
// FAULTScanRegister_reg array; in S1 both counters advance. After N_SIB bits
// it finishes. A new repair_en first clears the array.
//
// query_addr / query_hit let the command decoder ask whether an address is a
// stored fault location: query_hit compares the address with every valid
// entry (combinational). The FSM and the array of 8-bit locations follow the
// published chart; the valid bit per entry, which keeps location 0 apart from
// an empty entry, is this design's choice.
module repair_component #(
  parameter int unsigned N_SIB  = 150,
  parameter int unsigned ADDR_W = rsn_pkg::ADDR_W
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           repair_en,
  input  logic [N_SIB-1:0]               scr_test_in,
  input  logic [ADDR_W-1:0]              query_addr,
  output logic                           query_hit,
  output logic [N_SIB-1:0][ADDR_W-1:0]   fault_reg,
  output logic [N_SIB-1:0]               fault_valid,
  output logic                           busy
);
  typedef enum logic [1:0] {IDLE, S0, S1, FINISH} rc_state_e;

  localparam int unsigned KW = $clog2(N_SIB + 1);

  rc_state_e        state;
  logic [KW-1:0]    scr_counter;
  logic [ADDR_W-1:0] fault_counter;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= IDLE;
      scr_counter   <= '0;
      fault_counter <= '0;
      fault_reg     <= '0;
      fault_valid   <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          scr_counter   <= '0;
          fault_counter <= '0;
          if (repair_en) begin
            fault_reg   <= '0;
            fault_valid <= '0;
            state       <= S0;
          end
        end
        S0:
          if (scr_counter < KW'(N_SIB)) begin
            if (scr_test_in[scr_counter]) begin
              fault_reg[scr_counter]   <= fault_counter;
              fault_valid[scr_counter] <= 1'b1;
            end
            state <= S1;
          end else state <= FINISH;
        S1: begin
          scr_counter   <= scr_counter + 1'b1;
          fault_counter <= fault_counter + 1'b1;
          state         <= S0;
        end
        FINISH: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    query_hit = 1'b0;
    for (int unsigned k = 0; k < N_SIB; k++)
      if (fault_valid[k] && fault_reg[k] == query_addr) query_hit = 1'b1;
  end

  assign busy = (state != IDLE);
endmodule
