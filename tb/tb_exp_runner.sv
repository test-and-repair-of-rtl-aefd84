// tb_exp_runner: one instance of the complete design plus a UART host model,
// used by tb_experiments to repeat the hardware-solution measurements on a
// network of N_SIB SIBs.
//
// Each time `start` is pulsed the runner injects `mask` (scan registers
// replaced by inverters), sends iTest, then iRepair, and measures:
//   host_bits     bits the host sent for the two commands (data overhead,
//                 start/stop bits excluded), which must be 16 + 16;
//   dev_bytes     bytes the device sent back, which must be 0;
//   full_bits     shift cycles of the FULLTEST step on TDI;
//   one_bits_ok   every ONEBYONE step of a healthy register shifted
//                 N + 2*(N+LEN) bits;
// and checks that the reported fault vector and the repair component's
// contents equal the injected mask. Results are counted into checks and
// failures; `done` rises when the run is over and stays high until the next
// start. The runner never calls $finish; the enclosing testbench does.
module tb_exp_runner #(
  parameter int unsigned N_SIB = 50,
  parameter int unsigned CPB   = 16
) (
  input  logic             clk,
  input  logic             start,
  input  logic [N_SIB-1:0] mask,
  output logic             done,
  output int               checks,
  output int               failures,
  output int               host_bits,
  output int               dev_bytes,
  output int               full_bits
);
  import rsn_pkg::*;
  localparam int unsigned LEN = 8;

  logic rst = 1'b1;
  logic uart_rxd = 1'b1;
  logic uart_txd;
  logic [N_SIB-1:0]          fault_mask = '0;
  logic [N_SIB-1:0][LEN-1:0] instr_out = '0;
  logic [N_SIB-1:0][LEN-1:0] instr_in;
  logic [N_SIB-1:0]          sib_sel, scr_test, fault_valid;
  logic                      test_busy, repair, rx_overrun, rx_frame_err, rx_parity_err, ctrl_idle;
  logic [15:0]               bypass_count;

  rsn_test_repair_top #(.N_SIB(N_SIB), .LEN(LEN), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .uart_rxd, .uart_txd, .fault_mask, .instr_out, .instr_in,
    .sib_sel, .test_busy, .repair, .scr_test, .fault_valid, .bypass_count,
    .rx_overrun, .rx_frame_err, .rx_parity_err, .ctrl_idle
  );

  initial begin
    checks = 0; failures = 0; host_bits = 0; dev_bytes = 0; full_bits = 0;
    done = 1'b0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (N=%0d): %s", N_SIB, what);
    end
  endtask

  task automatic send_byte(input logic [7:0] b);
    host_bits += 8;
    uart_rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rxd = 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  task automatic send_word(input logic [15:0] w);
    send_byte(w[15:8]);
    send_byte(w[7:0]);
  endtask

  // device-to-host traffic
  always @(negedge uart_txd) if (!rst) dev_bytes++;

  task automatic wait_idle();
    repeat (4*CPB) @(posedge clk);
    while (!ctrl_idle || test_busy || dut.tx_busy) @(posedge clk);
    repeat (12*CPB) @(posedge clk);
  endtask

  // step measurements
  int  step_shifts = 0, step_idx = 0;
  bit  one_bad = 0;
  logic prev_net_en = 1'b0, prev_full = 1'b0;
  always @(posedge clk) begin
    if (dut.network_en && dut.tb_ctrl.shift_en) step_shifts++;
    if (dut.network_en && !prev_net_en) begin
      step_shifts = dut.tb_ctrl.shift_en ? 1 : 0;
      prev_full   = dut.u_test.fulltest;
    end
    if (!dut.network_en && prev_net_en) begin
      if (prev_full) begin
        full_bits = step_shifts;
        step_idx  = 0;
      end else begin
        if (!fault_mask[step_idx] && step_shifts != int'(N_SIB + 2*(N_SIB+LEN))) begin
          one_bad = 1;
          $display("ONEBYONE step %0d of N=%0d shifted %0d bits", step_idx, N_SIB, step_shifts);
        end
        step_idx++;
      end
    end
    prev_net_en <= dut.network_en;
  end

  initial begin
    repeat (10) @(posedge clk);
    rst = 1'b0;
    forever begin
      @(posedge clk iff start);
      done = 1'b0;
      host_bits = 0; dev_bytes = 0; one_bad = 0;
      fault_mask = mask;
      send_word({CMD_ITEST_BYTE, 8'h00});
      wait_idle();
      check(scr_test == mask, $sformatf("fault vector %h, expected %h", scr_test, mask));
      check(repair == (mask != '0), "repair flag wrong");
      check(!one_bad, "a ONEBYONE step of a healthy register had the wrong length");
      send_word({CMD_IREPAIR_BYTE, 8'h00});
      wait_idle();
      check(fault_valid == mask, "repair component does not hold the fault locations");
      for (int k = 0; k < N_SIB; k++)
        if (mask[k]) check(int'(dut.fault_reg[k]) == k, $sformatf("fault entry %0d holds %0d", k, dut.fault_reg[k]));
      check(host_bits == 32, $sformatf("host sent %0d bits for iTest + iRepair, expected 32", host_bits));
      check(dev_bytes == 0, $sformatf("device sent %0d bytes", dev_bytes));
      check(!rx_overrun && !rx_frame_err, "UART receive error");
      done = 1'b1;
    end
  end
endmodule
