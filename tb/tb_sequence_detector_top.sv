// tb_sequence_detector_top: the detector is run against an ideal network
// model (a shift register of the step's path length fed with the control
// bits, test bits and dummy bits in the SU controller's timing). A clean
// path must pass, whatever the pattern, and report after the same number of
// cycles every time; a single inverted bit at any position of the returning
// sequence, in either mode, must be reported as a fault.
module tb_sequence_detector_top;
  localparam int N = 3, LEN = 8, FULL = N*(LEN+1), ONE = N+LEN;
  logic clk = 0, rst = 1, detector_en = 0, fulltest = 0, onebyone = 0;
  logic [FULL-1:0] test_in1;
  logic [ONE-1:0] test_in2;
  logic sib_in;
  logic generator_en, test_out;
  int checks = 0, failures = 0;
  logic [FULL-1:0] path;
  int plen;
  logic inv;
  logic si, sh;

  sequence_detector_top #(.N_SIB(N), .LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign sib_in = path[plen-1] ^ inv;
  always @(posedge clk) if (sh) path <= {path[FULL-2:0], si};

  int lat_clean[2] = '{-1, -1};

  task automatic run(input bit full, input bit fault, input int pos);
    int p = full ? FULL : ONE;
    bit seen = 0;
    plen = p; inv = 0; path = '0; sh = 0; si = 0;
    fulltest = full; onebyone = !full; detector_en = 1;
    @(posedge clk); #1;
    // control bits and update (not part of the test path here)
    repeat (N + 1) @(posedge clk);
    #1;
    for (int c = 0; c < 2*p + 4; c++) begin
      sh = (c < 2*p);
      si = (c < p) ? (full ? test_in1[c] : test_in2[c]) : 1'b0;
      inv = fault && (c == p + pos);
      @(posedge clk); #1;
      if (generator_en) begin
        seen = 1;
        if (!fault) begin
          checks++;
          if (lat_clean[full] < 0) lat_clean[full] = c;
          else if (lat_clean[full] != c) begin
            failures++; $display("FAIL: clean report after %0d cycles, earlier %0d", c, lat_clean[full]);
          end
        end
        break;
      end
    end
    sh = 0;
    checks++;
    if (!seen || test_out != fault) begin
      failures++; $display("FAIL: full=%0d fault=%0d pos=%0d seen=%0d test_out=%0d", full, fault, pos, seen, test_out);
    end
    detector_en = 0; fulltest = 0; onebyone = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    for (int k = 0; k < FULL; k++) test_in1[k] = 1'($urandom);
    for (int k = 0; k < ONE; k++) test_in2[k] = 1'($urandom);
    sh = 0; si = 0; inv = 0; plen = FULL;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < FULL; k++) test_in1[k] = 1'($urandom);
      for (int k = 0; k < ONE; k++) test_in2[k] = 1'($urandom);
      run(1, 0, 0);
      run(0, 0, 0);
    end
    for (int pos = 0; pos < int'(FULL); pos++) run(1, 1, pos);
    for (int pos = 0; pos < int'(ONE); pos++) run(0, 1, pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
