// tb_network_controller: the controller drives a real 5-segment flat network
// while the testbench plays the UART byte interface and the test block.
// Checked: iTest raises test_en and waits for test_done; writes reach the
// instruments; reads return the instrument values in descending register
// order; surplus data bytes of an iApply are drained; after iRepair the
// faulty register's accesses are bypassed (its SIB stays closed, no byte
// returned) while the others still work.
module tb_network_controller;
  import rsn_pkg::*;
  localparam int N = 5, LEN = 8;
  logic clk = 0, rst = 1;
  logic [7:0] rx_data = '0, tx_data;
  logic rx_valid = 0, tx_start, tx_busy;
  logic test_en, test_done = 0;
  logic [N-1:0] scr_test = '0, fault_valid, sel, fault_mask = '0;
  scan_ctrl_t ctrl;
  logic tdo;
  logic [N-1:0][7:0] fault_reg;
  logic [15:0] bypass_count;
  logic overrun, idle;
  logic [N-1:0][LEN-1:0] instr_out, instr_in;
  int checks = 0, failures = 0;
  int n_test_en = 0;

  network_controller #(.N_SIB(N), .LEN(LEN)) dut (.*);
  flat_rsn #(.N_SIB(N), .LEN(LEN)) u_net (
    .clk, .rst, .ctrl, .tdo, .fault_mask, .instr_out, .instr_in, .sel
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // transmitter model: busy for 30 cycles after each start
  logic [7:0] txq[$];
  int busy_cnt = 0;
  assign tx_busy = (busy_cnt != 0);
  always @(posedge clk) begin
    if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (tx_start) begin
      if (tx_busy) begin failures++; $display("FAIL: start while busy"); end
      txq.push_back(tx_data);
      busy_cnt <= 30;
    end
  end

  // test block model: test_done 50 cycles after test_en
  always @(posedge clk) if (test_en) begin
    n_test_en++;
    fork begin repeat (50) @(posedge clk); #1 test_done = 1; @(posedge clk); #1 test_done = 0; end join_none
  end

  task automatic send_byte(input logic [7:0] b);
    #1 rx_data = b; rx_valid = 1;
    @(posedge clk); #1 rx_valid = 0;
    repeat (150) @(posedge clk);
  endtask

  task automatic send_word(input logic [15:0] w);
    send_byte(w[15:8]);
    send_byte(w[7:0]);
  endtask

  // the controller must not report idle while the fault list is loading
  int n_idle_loading = 0, n_loading = 0;
  always @(posedge clk) if (!rst && dut.u_repair.busy) begin
    n_loading++;
    if (idle) n_idle_loading++;
  end

  task automatic wait_idle();
    repeat (5) @(posedge clk);
    while (!idle || tx_busy) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  logic [N-1:0][7:0] wv;

  initial begin
    for (int k = 0; k < N; k++) instr_out[k] = 8'(8'h17 * (k + 3));
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // iTest
    send_word(16'h7F00);
    wait_idle();
    chk(n_test_en == 1, "iTest did not raise test_en once");
    // write registers 4, 2, 0
    for (int k = 0; k < N; k++) wv[k] = 8'($urandom);
    send_word(16'h4004); send_word(16'h4002); send_word(16'h4000);
    send_word(16'h8003);
    send_byte(wv[4]); send_byte(wv[2]); send_byte(wv[0]);
    wait_idle();
    chk(sel == 5'b10101, $sformatf("select lines %b", sel));
    foreach (wv[k]) if (k % 2 == 0) chk(instr_in[k] == wv[k], $sformatf("write %0d: %h expected %h", k, instr_in[k], wv[k]));
    chk(txq.size() == 0, "write returned bytes");
    // read all registers, with two surplus bytes to drain
    for (int k = N-1; k >= 0; k--) send_word(16'(k));
    send_word(16'h8000 | 16'(N + 2));
    for (int k = 0; k < N + 2; k++) send_byte(8'h00);
    wait_idle();
    chk(txq.size() == N, $sformatf("read returned %0d bytes", txq.size()));
    for (int k = N-1; k >= 0; k--) if (txq.size() > 0) begin
      logic [7:0] got;
      got = txq.pop_front();
      chk(got == instr_out[k], $sformatf("read %0d: %h expected %h", k, got, instr_out[k]));
    end
    // commands still decoded after the drain: write register 1
    send_word(16'h4001); send_word(16'h8001); send_byte(8'hA5);
    wait_idle();
    chk(instr_in[1] == 8'hA5, "write after drain failed");
    // iRepair with register 2 faulty
    scr_test = 5'b00100;
    send_word(16'h7E00);
    wait_idle();
    chk(n_loading > 0 && n_idle_loading == 0, "idle raised while the fault list was loading");
    chk(fault_valid == 5'b00100 && fault_reg[2] == 8'd2, "fault list not loaded");
    for (int k = N-1; k >= 0; k--) send_word(16'(k));
    send_word(16'h8000 | 16'(N));
    for (int k = 0; k < N; k++) send_byte(8'h00);
    wait_idle();
    chk(bypass_count == 1, $sformatf("bypass count %0d", bypass_count));
    chk(sel[2] == 1'b0 && sel == 5'b11011, $sformatf("select lines %b after repair", sel));
    chk(txq.size() == N - 1, $sformatf("read after repair returned %0d bytes", txq.size()));
    for (int k = N-1; k >= 0; k--) if (k != 2 && txq.size() > 0) begin
      logic [7:0] got;
      got = txq.pop_front();
      chk(got == instr_out[k], $sformatf("read %0d after repair: %h expected %h", k, got, instr_out[k]));
    end
    chk(!overrun, "overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
