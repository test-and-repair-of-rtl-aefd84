// tb_uart_rx: sends random frames (no parity, then an even-parity instance)
// with a line driven by the testbench, including a frame with a bad stop bit
// and one with a bad parity bit, and checks the bytes, the flags and that
// each byte is delivered one stop bit after its start edge (10 or 11 bit
// times, within a bit time).
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, rx0 = 1, rx2 = 1;
  logic [7:0] d0, d2;
  logic v0, v2, fe0, fe2, pe0, pe2;
  int checks = 0, failures = 0;

  uart_rx #(.CLKS_PER_BIT(CPB), .PARITY(0)) u0 (.clk, .rst, .rx(rx0), .rx_data(d0), .rx_valid(v0), .frame_err(fe0), .parity_err(pe0));
  uart_rx #(.CLKS_PER_BIT(CPB), .PARITY(2)) u2 (.clk, .rst, .rx(rx2), .rx_data(d2), .rx_valid(v2), .frame_err(fe2), .parity_err(pe2));

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

  task automatic frame(input int which, input logic [7:0] b, input bit bad_stop, input bit bad_par);
    logic [11:0] bits;
    int n;
    int t = 0, got_at = -1;
    logic [7:0] got;
    logic fe, pe;
    if (which == 0) begin bits = {2'b11, ~bad_stop, b, 1'b0}; n = 10; end
    else begin bits = {1'b1, ~bad_stop, (^b) ^ bad_par, b, 1'b0}; n = 11; end
    for (int i = 0; i < n; i++) begin
      if (which == 0) rx0 = bits[i]; else rx2 = bits[i];
      for (int c = 0; c < CPB; c++) begin
        @(posedge clk); #1; t++;
        if (which == 0 && v0) begin got = d0; fe = fe0; pe = pe0; got_at = t; end
        if (which == 2 && v2) begin got = d2; fe = fe2; pe = pe2; got_at = t; end
      end
    end
    rx0 = 1; rx2 = 1;
    for (int c = 0; c < 2*CPB && got_at < 0; c++) begin
      @(posedge clk); #1; t++;
      if (which == 0 && v0) begin got = d0; fe = fe0; pe = pe0; got_at = t; end
      if (which == 2 && v2) begin got = d2; fe = fe2; pe = pe2; got_at = t; end
    end
    chk(got_at >= 0, "no byte delivered");
    if (got_at >= 0) begin
      chk(got == b, $sformatf("got %h expected %h", got, b));
      chk(fe == bad_stop, "frame error flag");
      if (which == 2) chk(pe == bad_par, "parity error flag");
      chk(got_at > (n-1)*CPB && got_at <= n*CPB + 4, $sformatf("delivered after %0d cycles", got_at));
    end
    repeat (CPB) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 20; i++) frame(0, 8'($urandom), 0, 0);
    frame(0, 8'h3C, 1, 0);
    frame(0, 8'h00, 0, 0);
    frame(0, 8'hFF, 0, 0);
    for (int i = 0; i < 20; i++) frame(2, 8'($urandom), 0, 0);
    frame(2, 8'h5A, 0, 1);
    frame(2, 8'h7F, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
