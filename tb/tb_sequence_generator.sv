// tb_sequence_generator: the generator is driven by a detector model that
// answers each step after a random delay with test_out derived from a fault
// mask: FULLTEST fails when any register is faulty, a ONEBYONE step fails
// when its own register is. Checked: the test sequences and control bits of
// each step, the step order, the network clear before every step, and the
// final fault vector and repair flag.
module tb_sequence_generator;
  localparam int N = 5, LEN = 8, FULL = N*(LEN+1), ONE = N+LEN;
  logic clk = 0, rst = 1, test_en = 0, test_out = 0, enable_from_detector = 0;
  logic [FULL-1:0] data_to_detector1, data_to_sib1;
  logic [ONE-1:0] data_to_detector2, data_to_sib2;
  logic detector_en, control_en, network_en, fulltest, onebyone, repair, net_clr, test_done, busy;
  logic [N-1:0] scr_control, scr_test;
  int checks = 0, failures = 0;
  logic [N-1:0] mask;

  sequence_generator #(.N_SIB(N), .LEN(LEN)) dut (.*);

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

  task automatic run(input logic [N-1:0] m);
    int steps = 0;
    bit cleared = 0;
    bit done = 0;
    mask = m;
    #1 test_en = 1;
    @(posedge clk); #1 test_en = 0;
    while (!done) begin
      if (net_clr) cleared = 1;
      if (test_done) done = 1;
      if (detector_en) begin
        chk(cleared, "step started without a network clear");
        cleared = 0;
        chk(control_en && network_en, "enables not together");
        if (steps == 0) begin
          chk(fulltest && !onebyone, "first step is not FULLTEST");
          chk(scr_control == '1, "FULLTEST control bits not all ones");
          for (int k = 0; k < FULL; k++)
            chk(data_to_sib1[k] == ~k[0] && data_to_detector1[k] == ~k[0], "FULLTEST pattern");
        end else begin
          chk(onebyone && !fulltest, "later step is not ONEBYONE");
          chk(scr_control == N'(1) << (steps - 1), $sformatf("control bits %b in step %0d", scr_control, steps));
          for (int k = 0; k < ONE; k++)
            chk(data_to_sib2[k] == ~k[0] && data_to_detector2[k] == ~k[0], "ONEBYONE pattern");
        end
        repeat ($urandom_range(1, 20)) @(posedge clk);
        #1;
        test_out = (steps == 0) ? |mask : mask[steps-1];
        enable_from_detector = 1;
        while (detector_en) begin @(posedge clk); #1; end
        enable_from_detector = 0; test_out = 0;
        steps++;
      end else begin
        @(posedge clk); #1;
      end
    end
    chk(steps == ((mask != 0) ? N + 1 : 1), $sformatf("%0d steps for mask %b", steps, mask));
    @(posedge clk); #1;
    chk(scr_test == mask, $sformatf("fault vector %b expected %b", scr_test, mask));
    chk(repair == (mask != 0), "repair flag");
    chk(!busy, "generator still busy");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(5'b00000); run(5'b00010); run(5'b10001); run(5'b11111); run(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
