// tb_flat_rsn: configures a 5-segment flat network through its SIBs and
// checks the scan-path length, the select lines, data reaching the
// instruments, captured data leaving at TDO and the fault model (a register
// replaced by an inverter: the path inverts and loses the register's bits).
// The reference is a bit-list model of the current scan path.
module tb_flat_rsn;
  import rsn_pkg::*;
  localparam int N = 5, LEN = 8;
  logic clk = 0, rst = 1;
  scan_ctrl_t ctrl = '0;
  logic tdo;
  logic [N-1:0] fault_mask = '0, sel;
  logic [N-1:0][LEN-1:0] instr_out, instr_in;
  int checks = 0, failures = 0;

  flat_rsn #(.N_SIB(N), .LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // shift one bit, return the bit seen at TDO before the edge
  task automatic shift1(input logic b, output logic o);
    ctrl = '0; ctrl.shift_en = 1; ctrl.si = b;
    #1 o = tdo;
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  task automatic pulse_update();
    ctrl = '0; ctrl.update_en = 1;
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  task automatic pulse_capture();
    ctrl = '0; ctrl.capture_en = 1;
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  // path length of a configuration
  function automatic int plen(input logic [N-1:0] cfg);
    int l = N;
    for (int k = 0; k < N; k++) if (cfg[k]) l += LEN;
    return l;
  endfunction

  // configure from "cur" to "nxt": S bits from the TDO end, fillers for open registers
  task automatic configure(input logic [N-1:0] cur, input logic [N-1:0] nxt);
    logic o;
    for (int k = N-1; k >= 0; k--) begin
      shift1(nxt[k], o);
      if (cur[k]) for (int b = 0; b < LEN; b++) shift1(1'b0, o);
    end
    pulse_update();
  endtask

  logic [N-1:0] cfg;
  logic o;
  int lat;

  initial begin
    for (int k = 0; k < N; k++) instr_out[k] = 8'(8'h31 * (k + 1));
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(sel == '0, "SIBs not closed after reset");
    // measure the path length of several configurations with a single 1
    cfg = '0;
    foreach (cfg[i]) ;
    for (int t = 0; t < 6; t++) begin
      logic [N-1:0] nxt;
      nxt = (t == 5) ? '1 : N'($urandom);
      configure(cfg, nxt);
      cfg = nxt;
      chk(sel == cfg, $sformatf("select lines %b expected %b", sel, cfg));
      // flush with zeros, then send a single 1 and count cycles to TDO
      for (int b = 0; b < plen(cfg); b++) shift1(1'b0, o);
      shift1(1'b1, o);
      lat = 0;
      for (int b = 0; b < plen(cfg) + 5; b++) begin
        shift1(1'b0, o);
        if (o) begin lat = b + 1; break; end
      end
      chk(lat == plen(cfg), $sformatf("path length %0d expected %0d (cfg %b)", lat, plen(cfg), cfg));
      // restore SIB bits that the marker test disturbed
      configure(cfg, cfg);
    end
    // write every register through the all-open path, then update
    begin
      logic [N-1:0][LEN-1:0] wv;
      for (int k = 0; k < N; k++) wv[k] = 8'($urandom);
      for (int k = N-1; k >= 0; k--) begin
        shift1(1'b1, o);
        for (int b = 0; b < LEN; b++) shift1(wv[k][b], o);
      end
      pulse_update();
      for (int k = 0; k < N; k++) chk(instr_in[k] == wv[k], $sformatf("instrument %0d got %h expected %h", k, instr_in[k], wv[k]));
      chk(sel == '1, "configuration lost by write");
    end
    // capture and read every register of the healthy network
    pulse_capture();
    for (int k = N-1; k >= 0; k--) begin
      logic [LEN-1:0] got;
      shift1(1'b1, o);
      for (int b = 0; b < LEN; b++) begin shift1(1'b0, o); got[b] = o; end
      chk(got == instr_out[k], $sformatf("read of %0d got %h expected %h", k, got, instr_out[k]));
    end
    // register 2 faulty: an inverter without storage in the open path
    fault_mask = N'(1) << 2;
    for (int b = 0; b < plen(cfg); b++) shift1(1'b0, o);
    chk(o == 1'b1, "zeros through the faulty register not inverted");
    shift1(1'b1, o);
    lat = 0;
    for (int b = 0; b < plen(cfg) + 5; b++) begin
      shift1(1'b0, o);
      if (!o) begin lat = b + 1; break; end
    end
    chk(lat == plen(cfg) - LEN, $sformatf("faulty path length %0d expected %0d", lat, plen(cfg) - LEN));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
