// tb_fault_detector: feeds P compared bit pairs with gaps; a run with no
// difference must end with test_out = 0 after exactly P bits, a run with a
// difference at bit j must report test_out = 1 right after bit j.
module tb_fault_detector;
  localparam int N = 3, LEN = 8, FULL = N*(LEN+1), ONE = N+LEN;
  logic clk = 0, rst = 1, detector_en = 0, fulltest = 0, onebyone = 0;
  logic enable = 0, delayer_in = 0, sib_in = 0;
  logic test_out, generator_en;
  int checks = 0, failures = 0;

  fault_detector #(.N_SIB(N), .LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run(input bit full, input int bad);  // bad < 0: no mismatch
    int p = full ? FULL : ONE;
    int sent = 0;
    int done_at = -1;
    fulltest = full; onebyone = !full; detector_en = 1;
    @(posedge clk);
    while (sent < p + 3 && done_at < 0) begin
      #1;
      enable = (sent < p) && ($urandom_range(0, 3) != 0);
      delayer_in = 1'($urandom);
      sib_in = delayer_in ^ (enable && sent == bad);
      @(posedge clk);
      if (enable) sent++;
      #1;
      if (generator_en) done_at = sent;
    end
    enable = 0;
    if (bad < 0) begin
      chk(done_at == p, $sformatf("pass reported after %0d bits, expected %0d", done_at, p));
      chk(test_out == 0, "false fault");
    end else begin
      chk(done_at == bad + 1, $sformatf("fault reported after %0d bits, expected %0d", done_at, bad + 1));
      chk(test_out == 1, "fault missed");
    end
    repeat (3) @(posedge clk);
    chk(generator_en && test_out == (bad >= 0), "report not held");
    #1 detector_en = 0; fulltest = 0; onebyone = 0;
    @(posedge clk); #1;
    chk(!generator_en && !test_out, "report not cleared");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(1, -1); run(0, -1); run(1, 5); run(0, 0); run(0, ONE-1); run(1, FULL-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
