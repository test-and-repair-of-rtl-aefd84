// tb_experiments: repeats the two published experiments on the hardware
// solution and checks the numbers that the design itself determines.
//
// Experiment 1: flat networks of 50, 100 and 150 SIBs with 8-bit scan
// registers and one faulty register, the first one (SIB 0, next to TDI).
//   - iTest and iRepair each cost the host 16 bits, whatever the size;
//   - a fault-free FULLTEST step shifts N*(2*LEN+3) bits on TDI and every
//     ONEBYONE step 3*N+2*LEN, so the bits a host would have to shift in and
//     out to run the same test itself are 2*(N*(2*LEN+3) + N*(3*N+2*LEN)):
//     18500, 67000 and 145500 for 50, 100 and 150 SIBs.
// Experiment 2: the 150-SIB network with 1, 2, 3, 4, 5, 25, 50, 100 and 150
// faulty registers spread evenly; iTest and iRepair stay at 16 bits each and
// the fault vector and repair contents must equal the injected faults.
// The three networks run side by side, each driven by a tb_exp_runner; the
// UART runs at 16 clocks per bit to keep the run short (the bit count, not
// the bit time, is what is measured).
module tb_experiments;
  localparam int unsigned LEN = 8;
  localparam int unsigned CPB = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- the three networks ----
  logic s50 = 0, s100 = 0, s150 = 0;
  logic d50, d100, d150;
  logic [49:0]  m50;
  logic [99:0]  m100;
  logic [149:0] m150;
  int c50, f50, h50, b50, fb50;
  int c100, f100, h100, b100, fb100;
  int c150, f150, h150, b150, fb150;

  tb_exp_runner #(.N_SIB(50),  .CPB(CPB)) r50  (.clk, .start(s50),  .mask(m50),  .done(d50),  .checks(c50),  .failures(f50),  .host_bits(h50),  .dev_bytes(b50),  .full_bits(fb50));
  tb_exp_runner #(.N_SIB(100), .CPB(CPB)) r100 (.clk, .start(s100), .mask(m100), .done(d100), .checks(c100), .failures(f100), .host_bits(h100), .dev_bytes(b100), .full_bits(fb100));
  tb_exp_runner #(.N_SIB(150), .CPB(CPB)) r150 (.clk, .start(s150), .mask(m150), .done(d150), .checks(c150), .failures(f150), .host_bits(h150), .dev_bytes(b150), .full_bits(fb150));

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c50 + c100 + c150, failures + f50 + f100 + f150 + 1);
    $finish;
  end

  function automatic longint tdi_bits(input int n);
    return longint'(n) * (2*LEN + 3) + longint'(n) * (3*n + 2*LEN);
  endfunction

  int nf_list[9] = '{1, 2, 3, 4, 5, 25, 50, 100, 150};

  initial begin
    repeat (40) @(posedge clk);

    // the published totals for the method without either solution
    check(2*tdi_bits(50) == 18500, "50 SIBs: total test bits formula");
    check(2*tdi_bits(100) == 67000, "100 SIBs: total test bits formula");
    check(2*tdi_bits(150) == 145500, "150 SIBs: total test bits formula");

    // fault-free FULLTEST length on each network
    m50 = '0; m100 = '0; m150 = '0;
    s50 = 1; s100 = 1; s150 = 1;
    @(posedge clk); #1;
    s50 = 0; s100 = 0; s150 = 0;
    @(posedge clk);
    wait (d50 && d100 && d150);
    check(fb50  == 50*(2*LEN+3),  $sformatf("50 SIBs: FULLTEST shifted %0d bits", fb50));
    check(fb100 == 100*(2*LEN+3), $sformatf("100 SIBs: FULLTEST shifted %0d bits", fb100));
    check(fb150 == 150*(2*LEN+3), $sformatf("150 SIBs: FULLTEST shifted %0d bits", fb150));

    // experiment 1: one fault in the first scan register
    m50 = '0; m100 = '0; m150 = '0;
    m50[0] = 1; m100[0] = 1; m150[0] = 1;
    s50 = 1; s100 = 1; s150 = 1;
    @(posedge clk); #1;
    s50 = 0; s100 = 0; s150 = 0;
    @(posedge clk);
    wait (d50 && d100 && d150);
    $display("experiment 1: host bits for iTest+iRepair: N=50 %0d, N=100 %0d, N=150 %0d", h50, h100, h150);
    $display("experiment 1: bits without either solution: N=50 %0d, N=100 %0d, N=150 %0d",
             2*tdi_bits(50), 2*tdi_bits(100), 2*tdi_bits(150));
    check(h50 == 32 && h100 == 32 && h150 == 32, "experiment 1: data overhead is not 16 + 16 bits");

    // experiment 2: 150 SIBs, growing number of faults
    foreach (nf_list[i]) begin
      int nf;
      nf = nf_list[i];
      m150 = '0;
      for (int j = 0; j < nf; j++) m150[(j * 150) / nf] = 1'b1;
      s150 = 1;
      @(posedge clk); #1;
      s150 = 0;
      @(posedge clk);
      wait (d150);
      check($countones(m150) == nf, "experiment 2: fault pattern");
      check(h150 == 32, $sformatf("experiment 2, %0d faults: host sent %0d bits", nf, h150));
      $display("experiment 2: %0d faults, test %0d bits, repair %0d bits, device replies %0d bytes", nf, 16, h150 - 16, b150);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks + c50 + c100 + c150, failures + f50 + f100 + f150);
    $finish;
  end
endmodule
