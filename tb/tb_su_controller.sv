// tb_su_controller: records the serial stream the SU controller produces for
// a FULLTEST and a ONEBYONE step of a 3-SIB, 8-bit network and compares it,
// cycle by cycle, with the expected sequence: N control bits (SIB N-1
// first), one update cycle, P test bits, P dummy zeros, then idle. Also
// checks that dropping control_en aborts a step.
module tb_su_controller;
  localparam int N = 3, LEN = 8, FULL = N*(LEN+1), ONE = N+LEN;
  logic clk = 0, rst = 1, control_en = 0, fulltest = 0, onebyone = 0;
  logic [N-1:0] scr_in = '0;
  logic [FULL-1:0] data_in1;
  logic [ONE-1:0] data_in2;
  logic data_out, shift_en, update_en;
  int checks = 0, failures = 0;

  su_controller #(.N_SIB(N), .LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // expected {shift_en, update_en, data_out} for cycle c of a step
  function automatic logic [2:0] expect_at(input int c, input bit full);
    int p = full ? FULL : ONE;
    c = c - 1;                       // one cycle to leave IDLE
    if (c < 0) return 3'b000;
    if (c < N) return {2'b10, scr_in[N-1-c]};
    c -= N;
    if (c == 0) return 3'b010;
    c -= 1;
    if (c < p) return {2'b10, full ? data_in1[c] : data_in2[c]};
    c -= p;
    if (c < p) return 3'b100;
    return 3'b000;
  endfunction

  task automatic run_step(input bit full);
    int p = full ? FULL : ONE;
    int nshift = 0;
    #1 fulltest = full; onebyone = !full;
    control_en = 1;
    for (int c = 0; c < N + 2*p + 6; c++) begin
      #1;
      chk({shift_en, update_en, data_out} == expect_at(c, full),
          $sformatf("%s cycle %0d: got %b expected %b", full ? "FULLTEST" : "ONEBYONE", c,
                    {shift_en, update_en, data_out}, expect_at(c, full)));
      nshift += shift_en;
      @(posedge clk);
    end
    chk(nshift == N + 2*p, $sformatf("shift cycles %0d expected %0d", nshift, N + 2*p));
    #1 control_en = 0; fulltest = 0; onebyone = 0;
    @(posedge clk);
  endtask

  initial begin
    for (int k = 0; k < FULL; k++) data_in1[k] = 1'($urandom);
    for (int k = 0; k < ONE; k++) data_in2[k] = 1'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    scr_in = 3'b111; run_step(1);
    scr_in = 3'b001; run_step(0);
    scr_in = 3'b010; run_step(0);
    scr_in = 3'b110; run_step(1);
    // abort in the middle
    fulltest = 1; control_en = 1;
    repeat (10) @(posedge clk);
    #1 control_en = 0;
    @(posedge clk); #1;
    chk(!shift_en && !update_en, "abort did not stop the controller");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
