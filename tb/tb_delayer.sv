// tb_delayer: the delayer must raise enable exactly N+1+P cycles after it
// leaves IDLE (control bits, update, test bits) and then present the
// expected sequence bit by bit for P cycles, for both modes.
module tb_delayer;
  localparam int N = 4, LEN = 8, FULL = N*(LEN+1), ONE = N+LEN;
  logic clk = 0, rst = 1, detector_en = 0, fulltest = 0, onebyone = 0;
  logic [FULL-1:0] test_in1;
  logic [ONE-1:0] test_in2;
  logic data_out, enable;
  int checks = 0, failures = 0;

  delayer #(.N_SIB(N), .LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit full);
    int p = full ? FULL : ONE;
    int first = -1, n = 0;
    #1 fulltest = full; onebyone = !full; detector_en = 1;
    for (int c = 0; c < N + 2*p + 8; c++) begin
      #1;
      if (enable) begin
        if (first < 0) first = c;
        checks++;
        if (data_out !== (full ? test_in1[n] : test_in2[n])) begin
          failures++; $display("FAIL: bit %0d wrong", n);
        end
        n++;
      end
      @(posedge clk);
    end
    checks += 2;
    if (first != N + 2 + p) begin failures++; $display("FAIL: enable at %0d expected %0d", first, N + 2 + p); end
    if (n != p) begin failures++; $display("FAIL: %0d bits presented, expected %0d", n, p); end
    #1 detector_en = 0; fulltest = 0; onebyone = 0;
    @(posedge clk);
  endtask

  initial begin
    for (int k = 0; k < FULL; k++) test_in1[k] = 1'($urandom);
    for (int k = 0; k < ONE; k++) test_in2[k] = 1'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(1); run(0); run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
