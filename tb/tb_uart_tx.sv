// tb_uart_tx: sends random bytes through transmitters without parity and
// with odd parity and decodes the line in the testbench, sampling each bit
// at its centre. Checked: start bit, data LSB first, parity, stop bit, the
// frame length (busy for 10 or 11 bit times) and the idle level.
module tb_uart_tx;
  localparam int CPB = 12;
  logic clk = 0, rst = 1;
  logic [7:0] td = '0;
  logic st0 = 0, st1 = 0;
  logic tx0, tx1, b0, b1;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB), .PARITY(0)) u0 (.clk, .rst, .tx_data(td), .tx_start(st0), .tx(tx0), .busy(b0));
  uart_tx #(.CLKS_PER_BIT(CPB), .PARITY(1)) u1 (.clk, .rst, .tx_data(td), .tx_start(st1), .tx(tx1), .busy(b1));

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

  task automatic send(input int which, input logic [7:0] b);
    int n = which ? 11 : 10;
    logic [10:0] seen;
    int busy_cycles = 0;
    #1 td = b;
    if (which) st1 = 1; else st0 = 1;
    @(posedge clk); #1 st0 = 0; st1 = 0;
    for (int i = 0; i < n; i++) begin
      for (int c = 0; c < CPB; c++) begin
        if (c == CPB/2) seen[i] = which ? tx1 : tx0;
        busy_cycles += which ? b1 : b0;
        @(posedge clk); #1;
      end
    end
    chk(seen[0] == 1'b0, "start bit");
    chk(seen[8:1] == b, $sformatf("data %h expected %h", seen[8:1], b));
    if (which) chk(seen[9] == ~(^b), "odd parity bit");
    chk(seen[n-1] == 1'b1, "stop bit");
    chk(busy_cycles == n*CPB, $sformatf("busy for %0d cycles, expected %0d", busy_cycles, n*CPB));
    chk(!(which ? b1 : b0) && (which ? tx1 : tx0), "not idle after the frame");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(tx0 && tx1, "line not idle high");
    for (int i = 0; i < 30; i++) send(0, 8'($urandom));
    for (int i = 0; i < 30; i++) send(1, 8'($urandom));
    send(1, 8'h00); send(1, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
