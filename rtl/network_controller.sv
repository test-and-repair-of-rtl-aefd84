// network_controller: command decoder and IEEE 1687 access engine.
//
// Receives the host's 16-bit command words as byte pairs (high byte first)
// from the UART and turns them into scan operations on the flat network.
//
//   setup word   bit15 = 0, bit14 = 1 iWrite / 0 iRead, bits 7:0 register
//                address. Queued in the SIB control register (SCR) until
//                the next iApply. An address found in the repair
//                component's fault list is bypassed: its SIB stays closed.
//   iApply word  bit15 = 1, low 15 bits = number of data bytes that follow.
//   iTest        high byte 0x7F: pulses test_en to the test block and waits
//                for test_done; the test leaves the network reset.
//   iRepair      high byte 0x7E: pulses repair_en so the repair component
//                loads the fault locations from the test block, and waits
//                until it has finished (2*N_SIB+2 cycles) so that no access
//                is checked against a half-loaded list.
//
// An iApply runs in two passes over the current scan path, both walking the
// segments from the TDO end (segment N_SIB-1) towards TDI, so that the first
// bit shifted ends nearest TDO. The first pass (CSU: configure, shift,
// update) shifts the new SIB bits, with LEN filler zeros for every register
// that is open now, and pulses update_en; the TDO bits are discarded. If any
// read is queued, capture_en then loads the selected registers from their
// instruments. The second pass shifts the data: the SIB bits again (so the
// configuration is kept) and, for each queued register, one data byte from
// the UART, LSB first. The byte that leaves TDO at the same time is the
// register's old content; it is sent back on the UART for reads and
// discarded for writes and SIB bits (the discard unit). Bytes for bypassed
// registers are consumed and dropped. An update pulse ends the pass when the
// apply contains a write. Leftover bytes up to the announced count are
// drained.
//
// The four parts named for the controller - the 1687 FSM, the SCR, the
// instrument length memory (here every register is LEN = 8 bits, one data
// byte) and the discard unit - are given only by their function; this
// implementation, the byte order and the command fields other than those
// printed in the command tables are this design's choices. Received bytes
// are held in a one-byte buffer; overrun flags a byte lost because the
// previous one had not been taken.
module network_controller #(
  parameter int unsigned N_SIB  = 150,
  parameter int unsigned LEN    = 8,
  parameter int unsigned ADDR_W = rsn_pkg::ADDR_W
) (
  input  logic                          clk,
  input  logic                          rst,
  // UART side
  input  logic [7:0]                    rx_data,
  input  logic                          rx_valid,
  output logic [7:0]                    tx_data,
  output logic                          tx_start,
  input  logic                          tx_busy,
  // test block side
  output logic                          test_en,
  input  logic                          test_done,
  input  logic [N_SIB-1:0]              scr_test,
  // network side
  output rsn_pkg::scan_ctrl_t           ctrl,
  input  logic                          tdo,
  // status
  output logic [N_SIB-1:0]              fault_valid,
  output logic [N_SIB-1:0][ADDR_W-1:0]  fault_reg,
  output logic [15:0]                   bypass_count,
  output logic                          overrun,
  output logic                          idle
);
  typedef enum logic [3:0] {
    GET_HI, GET_LO, DECODE, WAIT_TEST, CSU_S, CSU_R, CSU_UPD, CAPTURE,
    DAT_S, DAT_GET, DAT_R, DAT_SEND, DAT_UPD, DRAIN, WAIT_REPAIR
  } nc_state_e;

  localparam int unsigned KW = $clog2(N_SIB + 1);
  localparam int unsigned BW = $clog2(LEN + 1);

  nc_state_e        state;
  logic [7:0]       hi_byte;
  logic [15:0]      word;
  logic [N_SIB-1:0] req_sel, wr_sel, eff_sel, cur_sel;
  logic [KW-1:0]    k;
  logic [BW-1:0]    b;
  logic [LEN-1:0]   byte_in, byte_out;
  logic [14:0]      nbytes, consumed;
  logic             pend_valid;
  logic [7:0]       pend_data;
  logic             take;
  logic             repair_en;
  logic             rep_busy;
  logic             q_hit;
  logic [ADDR_W-1:0] q_addr;
  logic             any_read, any_write;

  assign q_addr    = word[ADDR_W-1:0];
  assign any_read  = |(eff_sel & ~wr_sel);
  assign any_write = |(eff_sel & wr_sel);
  assign idle      = (state == GET_HI) && !pend_valid;

  repair_component #(.N_SIB(N_SIB), .ADDR_W(ADDR_W)) u_repair (
    .clk, .rst, .repair_en, .scr_test_in(scr_test),
    .query_addr(q_addr), .query_hit(q_hit),
    .fault_reg, .fault_valid, .busy(rep_busy)
  );

  // one-byte receive buffer
  always_ff @(posedge clk) begin
    if (rst) begin
      pend_valid <= 1'b0;
      pend_data  <= '0;
      overrun    <= 1'b0;
    end else begin
      if (rx_valid) begin
        pend_data  <= rx_data;
        pend_valid <= 1'b1;
        if (pend_valid && !take) overrun <= 1'b1;
      end else if (take) begin
        pend_valid <= 1'b0;
      end
    end
  end

  always_comb begin
    take = 1'b0;
    unique case (state)
      GET_HI, GET_LO, DAT_GET, DRAIN: take = pend_valid && !(state == DRAIN && consumed >= nbytes);
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= GET_HI;
      hi_byte      <= '0;
      word         <= '0;
      req_sel      <= '0;
      wr_sel       <= '0;
      eff_sel      <= '0;
      cur_sel      <= '0;
      k            <= '0;
      b            <= '0;
      byte_in      <= '0;
      byte_out     <= '0;
      nbytes       <= '0;
      consumed     <= '0;
      test_en      <= 1'b0;
      repair_en    <= 1'b0;
      tx_start     <= 1'b0;
      tx_data      <= '0;
      bypass_count <= '0;
    end else begin
      test_en   <= 1'b0;
      repair_en <= 1'b0;
      tx_start  <= 1'b0;
      unique case (state)
        GET_HI:
          if (take) begin
            hi_byte <= pend_data;
            state   <= GET_LO;
          end
        GET_LO:
          if (take) begin
            word  <= {hi_byte, pend_data};
            state <= DECODE;
          end
        DECODE:
          if (word[15:8] == rsn_pkg::CMD_ITEST_BYTE) begin
            test_en <= 1'b1;
            state   <= WAIT_TEST;
          end else if (word[15:8] == rsn_pkg::CMD_IREPAIR_BYTE) begin
            repair_en <= 1'b1;
            state     <= WAIT_REPAIR;
          end else if (!word[15]) begin
            if (int'(q_addr) < N_SIB) begin
              req_sel[q_addr] <= 1'b1;
              wr_sel[q_addr]  <= word[14];
              if (q_hit) bypass_count <= bypass_count + 1'b1;
              else       eff_sel[q_addr] <= 1'b1;
            end
            state <= GET_HI;
          end else begin
            nbytes   <= word[14:0];
            consumed <= '0;
            k        <= KW'(N_SIB - 1);
            state    <= CSU_S;
          end
        WAIT_TEST:
          if (test_done) begin
            cur_sel <= '0;
            state   <= GET_HI;
          end
        // ---- configure pass ----
        CSU_S:
          if (cur_sel[k]) begin
            b     <= '0;
            state <= CSU_R;
          end else if (k == 0) state <= CSU_UPD;
          else k <= k - 1'b1;
        CSU_R:
          if (b == BW'(LEN - 1)) begin
            if (k == 0) state <= CSU_UPD;
            else begin
              k     <= k - 1'b1;
              state <= CSU_S;
            end
          end else b <= b + 1'b1;
        CSU_UPD: begin
          cur_sel <= eff_sel;
          k       <= KW'(N_SIB - 1);
          state   <= any_read ? CAPTURE : DAT_S;
        end
        CAPTURE: state <= DAT_S;
        // ---- data pass ----
        DAT_S:
          if (req_sel[k]) state <= DAT_GET;
          else if (k == 0) state <= DAT_UPD;
          else k <= k - 1'b1;
        DAT_GET:
          if (take) begin
            byte_in  <= pend_data[LEN-1:0];
            consumed <= consumed + 1'b1;
            b        <= '0;
            if (eff_sel[k]) state <= DAT_R;
            else if (k == 0) state <= DAT_UPD;
            else begin
              k     <= k - 1'b1;
              state <= DAT_S;
            end
          end
        DAT_R: begin
          byte_out[b] <= tdo;
          if (b == BW'(LEN - 1)) begin
            if (!wr_sel[k]) state <= DAT_SEND;
            else if (k == 0) state <= DAT_UPD;
            else begin
              k     <= k - 1'b1;
              state <= DAT_S;
            end
          end else b <= b + 1'b1;
        end
        DAT_SEND:
          if (!tx_busy && !tx_start) begin
            tx_data  <= 8'(byte_out);
            tx_start <= 1'b1;
            if (k == 0) state <= DAT_UPD;
            else begin
              k     <= k - 1'b1;
              state <= DAT_S;
            end
          end
        DAT_UPD: begin
          req_sel <= '0;
          wr_sel  <= '0;
          eff_sel <= '0;
          state   <= DRAIN;
        end
        DRAIN:
          if (consumed >= nbytes) state <= GET_HI;
          else if (take) consumed <= consumed + 1'b1;
        WAIT_REPAIR:
          if (!repair_en && !rep_busy) state <= GET_HI;
        default: state <= GET_HI;
      endcase
    end
  end

  // scan control outputs, decoded from the state
  always_comb begin
    ctrl = '0;
    unique case (state)
      CSU_S: begin ctrl.shift_en = 1'b1; ctrl.si = eff_sel[k]; end
      CSU_R: ctrl.shift_en = 1'b1;
      CSU_UPD: ctrl.update_en = 1'b1;
      CAPTURE: ctrl.capture_en = 1'b1;
      DAT_S: begin ctrl.shift_en = 1'b1; ctrl.si = eff_sel[k]; end
      DAT_R: begin ctrl.shift_en = 1'b1; ctrl.si = byte_in[b]; end
      DAT_UPD: ctrl.update_en = any_write;
      default: ;
    endcase
  end

  // a byte is handed to the transmitter only while it is free
  a_tx_free: assert property (@(posedge clk) disable iff (rst) tx_start |-> !tx_busy);
endmodule
