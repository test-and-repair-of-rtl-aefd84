// tb_rsn_full_size: end-to-end test of the UART-accessed scan network with built-in
// test and repair, with every parameter of the top at its default (150 SIBs, 115200 baud at 100 MHz).
//
// A host model drives the UART receive line with 16-bit command words (high
// byte first) and decodes the transmit line into a byte queue. The sequence:
//   1. iTest on a fault-free network: no fault may be reported and the
//      FULLTEST step must shift N*(2*LEN+3) bits (control bits, test bits and
//      dummy bits over the SIB and register flip-flops).
//   2. Faults are injected (scan registers replaced by inverters). A read
//      before repair returns one byte per register; registers that reach TDO
//      without crossing a fault must read back exactly.
//   3. iTest: the reported fault vector must equal the injected mask; every
//      ONEBYONE step of a healthy register must shift N + 2*(N+LEN) bits.
//   4. iRepair: the repair component must hold exactly the faulty addresses.
//   5. Write and read accesses after repair: accesses to faulty registers are
//      bypassed, healthy registers are written and read back exactly.
// Each mechanism (FULLTEST, ONEBYONE, mismatch, repair load, bypass, capture,
// update, discard of SIB bits) is counted; one that never happened fails.
module tb_rsn_full_size;
  import rsn_pkg::*;

  localparam int unsigned N_SIB = 150;
  localparam int unsigned LEN   = 8;
  localparam int unsigned CPB   = 868;
  localparam int unsigned NACC  = 150;   // registers accessed in steps 2 and 5
  localparam longint unsigned WATCHDOG = 100000000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic uart_rxd = 1'b1;
  logic uart_txd;
  logic [N_SIB-1:0]          fault_mask = '0;
  logic [N_SIB-1:0][LEN-1:0] instr_out;
  logic [N_SIB-1:0][LEN-1:0] instr_in;
  logic [N_SIB-1:0]          sib_sel, scr_test, fault_valid;
  logic                      test_busy, repair, rx_overrun, rx_frame_err, rx_parity_err, ctrl_idle;
  logic [15:0]               bypass_count;

  always #5 clk = ~clk;

  rsn_test_repair_top dut (
    .clk, .rst, .uart_rxd, .uart_txd, .fault_mask, .instr_out, .instr_in,
    .sib_sel, .test_busy, .repair, .scr_test, .fault_valid, .bypass_count,
    .rx_overrun, .rx_frame_err, .rx_parity_err, .ctrl_idle
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host UART ----------------
  task automatic send_byte(input logic [7:0] b);
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

  logic [7:0] rxq[$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (CPB/2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      rxq.push_back(b);
    end
  end

  task automatic wait_idle();
    // the controller has taken every byte and finished its work
    repeat (4*CPB) @(posedge clk);
    while (!ctrl_idle || test_busy || dut.tx_busy) @(posedge clk);
    repeat (12*CPB) @(posedge clk);
  endtask

  // ---------------- mechanism counters ----------------
  int n_fullstep = 0, n_onestep = 0, n_mismatch = 0, n_capture = 0, n_update_wr = 0;
  int n_discard = 0, n_repair_load = 0;
  int step_shifts = 0, step_idx = 0;
  logic prev_net_en = 1'b0;
  logic prev_full = 1'b0;
  logic [N_SIB-1:0] cur_expect_fault;

  always @(posedge clk) begin
    if (dut.network_en && dut.tb_ctrl.shift_en) step_shifts++;
    if (dut.network_en && !prev_net_en) begin
      step_shifts = (dut.tb_ctrl.shift_en) ? 1 : 0;
      prev_full = dut.u_test.fulltest;
      if (dut.u_test.fulltest) n_fullstep++; else n_onestep++;
    end
    if (!dut.network_en && prev_net_en) begin
      // a step that found no mismatch must have shifted the whole sequence
      if (prev_full) begin
        if (cur_expect_fault == '0)
          check(step_shifts == int'(N_SIB*(2*LEN+3)),
                $sformatf("FULLTEST shifted %0d bits, expected %0d", step_shifts, N_SIB*(2*LEN+3)));
        step_idx = 0;
      end else begin
        if (!cur_expect_fault[step_idx])
          check(step_shifts == int'(N_SIB + 2*(N_SIB+LEN)),
                $sformatf("ONEBYONE step %0d shifted %0d bits, expected %0d", step_idx, step_shifts, N_SIB + 2*(N_SIB+LEN)));
        step_idx++;
      end
    end
    prev_net_en <= dut.network_en;
    if (dut.u_test.u_det.u_fd.enable && (dut.u_test.u_det.u_fd.delayer_in != dut.tdo)) n_mismatch++;
    if (!dut.network_en && dut.net_ctrl.capture_en) n_capture++;
    if (!dut.network_en && dut.net_ctrl.update_en && dut.u_nc.state == 4'd12) n_update_wr++;
    if (!dut.network_en && dut.net_ctrl.shift_en && (dut.u_nc.state == 4'd4 || dut.u_nc.state == 4'd8)) n_discard++;
    if (dut.u_nc.repair_en) n_repair_load++;
  end

  // ---------------- stimulus ----------------
  function automatic logic [7:0] instr_val(input int k);
    return 8'((k * 37 + 11) ^ 8'h5A);
  endfunction

  function automatic logic [7:0] wr_val(input int k);
    return 8'((k * 73 + 29) ^ 8'hC3);
  endfunction

  logic [N_SIB-1:0] faults;
  int acc[$];       // register numbers accessed, highest first
  int bypass_before;
  int last_fault;

  initial begin
    for (int k = 0; k < N_SIB; k++) instr_out[k] = instr_val(k);
    // faulty registers: 1, 3 and the last but one
    faults = '0;
    faults[1] = 1'b1;
    faults[3] = 1'b1;
    faults[N_SIB-2] = 1'b1;
    last_fault = N_SIB - 2;
    // accessed registers: the NACC highest ones and the lowest ones
    for (int k = N_SIB-1; k >= 0; k--)
      if (k >= int'(N_SIB) - NACC/2 || k < int'(NACC - NACC/2)) acc.push_back(k);
    cur_expect_fault = '0;

    repeat (10) @(posedge clk);
    rst = 1'b0;
    repeat (10) @(posedge clk);

    // 1. iTest on a fault-free network
    send_word({CMD_ITEST_BYTE, 8'h00});
    wait_idle();
    check(repair == 1'b0, "fault-free network reported a fault");
    check(scr_test == '0, "fault-free network: fault vector not zero");

    // 2. inject faults, read the accessed registers before repair
    fault_mask = faults;
    cur_expect_fault = faults;
    foreach (acc[i]) send_word({2'b00, 6'd0, 8'(acc[i])});
    send_word(16'h8000 | 16'(acc.size()));
    foreach (acc[i]) send_byte(8'h00);
    wait_idle();
    check(rxq.size() == acc.size(), $sformatf("pre-repair read returned %0d bytes, expected %0d", rxq.size(), acc.size()));
    // registers above the last faulty one reach TDO without crossing a fault
    foreach (acc[i]) begin
      int k;
      logic [7:0] got;
      k = acc[i];
      if (rxq.size() > 0) begin
        got = rxq.pop_front();
        if (k > last_fault)
          check(got == instr_val(k), $sformatf("pre-repair read of register %0d: got %02h expected %02h", k, got, instr_val(k)));
      end
    end
    rxq.delete();

    // 3. iTest with faults
    send_word({CMD_ITEST_BYTE, 8'h00});
    wait_idle();
    check(repair == 1'b1, "faults not reported");
    check(scr_test == faults, $sformatf("fault vector %h expected %h", scr_test, faults));
    check(sib_sel == '0, "network not left closed after the test");

    // 4. iRepair
    send_word({CMD_IREPAIR_BYTE, 8'h00});
    wait_idle();
    check(fault_valid == faults, "repair component does not hold the fault locations");
    for (int k = 0; k < N_SIB; k++)
      if (faults[k]) check(int'(dut.fault_reg[k]) == k, $sformatf("fault entry %0d holds %0d", k, dut.fault_reg[k]));

    // 5a. write accesses after repair
    bypass_before = bypass_count;
    foreach (acc[i]) send_word({2'b01, 6'd0, 8'(acc[i])});
    send_word(16'h8000 | 16'(acc.size()));
    foreach (acc[i]) send_byte(wr_val(acc[i]));
    wait_idle();
    begin
      int nf = 0;
      foreach (acc[i]) if (faults[acc[i]]) nf++;
      check(int'(bypass_count) - bypass_before == nf, $sformatf("bypassed %0d accesses, expected %0d", int'(bypass_count) - bypass_before, nf));
    end
    foreach (acc[i]) begin
      int k;
      k = acc[i];
      if (!faults[k]) check(instr_in[k] == wr_val(k), $sformatf("register %0d wrote %02h expected %02h", k, instr_in[k], wr_val(k)));
      else            check(sib_sel[k] == 1'b0, $sformatf("faulty register %0d was opened", k));
    end
    check(rxq.size() == 0, "write produced read-back bytes");

    // 5b. read accesses after repair
    foreach (acc[i]) send_word({2'b00, 6'd0, 8'(acc[i])});
    send_word(16'h8000 | 16'(acc.size()));
    foreach (acc[i]) send_byte(8'h00);
    wait_idle();
    begin
      int nh = 0;
      foreach (acc[i]) if (!faults[acc[i]]) nh++;
      check(rxq.size() == nh, $sformatf("post-repair read returned %0d bytes, expected %0d", rxq.size(), nh));
    end
    foreach (acc[i]) begin
      int k;
      k = acc[i];
      if (!faults[k] && rxq.size() > 0) begin
        logic [7:0] got;
        got = rxq.pop_front();
        check(got == instr_val(k), $sformatf("post-repair read of register %0d: got %02h expected %02h", k, got, instr_val(k)));
      end
    end

    check(!rx_overrun && !rx_frame_err, "UART receive error");

    // mechanisms
    $display("mechanisms: fulltest=%0d onebyone=%0d mismatch_bits=%0d capture=%0d write_update=%0d discarded_bits=%0d repair_load=%0d bypass=%0d",
             n_fullstep, n_onestep, n_mismatch, n_capture, n_update_wr, n_discard, n_repair_load, bypass_count);
    check(n_fullstep >= 2, "FULLTEST step never ran twice");
    check(n_onestep == int'(N_SIB), $sformatf("ONEBYONE ran %0d steps, expected %0d", n_onestep, N_SIB));
    check(n_mismatch > 0, "no mismatch was ever seen");
    check(n_capture > 0, "capture never happened");
    check(n_update_wr > 0, "write update never happened");
    check(n_discard > 0, "no bit was discarded");
    check(n_repair_load > 0, "repair load never happened");
    check(bypass_count > 0, "no access was bypassed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
