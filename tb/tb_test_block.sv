// tb_test_block: the test block on a real 6-segment flat network with
// injected inverting faults. For several fault masks the reported fault
// vector must equal the mask, repair must be raised exactly when a fault
// exists, and the run must take the cycle count worked out from the step
// structure when there is no fault: 1 clear + (N+1+2P+1) step + handshake.
module tb_test_block;
  import rsn_pkg::*;
  localparam int N = 6, LEN = 8, FULL = N*(LEN+1);
  logic clk = 0, rst = 1, test_en = 0;
  logic sib_in;
  scan_ctrl_t ctrl;
  logic network_en, net_clr, test_done, busy, fulltest, onebyone, repair;
  logic [N-1:0] scr_test, fault_mask, sel;
  logic [N-1:0][LEN-1:0] instr_out, instr_in;
  int checks = 0, failures = 0;

  test_block #(.N_SIB(N), .LEN(LEN)) dut (.*);
  flat_rsn #(.N_SIB(N), .LEN(LEN)) u_net (
    .clk, .rst(rst || net_clr), .ctrl, .tdo(sib_in), .fault_mask, .instr_out, .instr_in, .sel
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run(input logic [N-1:0] m);
    int cyc = 0;
    fault_mask = m;
    #1 test_en = 1;
    @(posedge clk); #1 test_en = 0;
    while (!test_done) begin @(posedge clk); #1; cyc++; end
    chk(scr_test == m, $sformatf("fault vector %b expected %b", scr_test, m));
    chk(repair == (m != 0), "repair flag");
    // no fault: IDLE->CLEAR, CLEAR->TEST_FAULT, SU: 1 + N + 1 + 2*FULL,
    // detector report 1, generator reacts 1
    if (m == 0) chk(cyc == 4 + N + 2*FULL, $sformatf("fault-free test took %0d cycles, expected %0d", cyc, 4 + N + 2*FULL));
    @(posedge clk); #1;
    chk(sel == '0, "network not left closed");
  endtask

  initial begin
    for (int k = 0; k < N; k++) instr_out[k] = 8'(k);
    fault_mask = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(6'b100001); run('0); run(6'b000010); run(6'b111111); run(6'b010100); run(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
