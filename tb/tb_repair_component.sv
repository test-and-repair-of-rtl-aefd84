// tb_repair_component: loads several fault vectors and checks the stored
// locations, the valid bits, the address query, and that loading takes two
// cycles per register (states S0 and S1) plus the final check.
module tb_repair_component;
  localparam int N = 10, AW = 8;
  logic clk = 0, rst = 1, repair_en = 0;
  logic [N-1:0] scr_test_in = '0;
  logic [AW-1:0] query_addr = '0;
  logic query_hit, busy;
  logic [N-1:0][AW-1:0] fault_reg;
  logic [N-1:0] fault_valid;
  int checks = 0, failures = 0;

  repair_component #(.N_SIB(N), .ADDR_W(AW)) dut (.*);

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

  task automatic load(input logic [N-1:0] m);
    int cyc = 0;
    #1 scr_test_in = m; repair_en = 1;
    @(posedge clk); #1 repair_en = 0;
    while (busy) begin @(posedge clk); #1; cyc++; end
    chk(cyc == 2*N + 2, $sformatf("load took %0d cycles, expected %0d", cyc, 2*N + 2));
    chk(fault_valid == m, $sformatf("valid %b expected %b", fault_valid, m));
    for (int k = 0; k < N; k++) if (m[k]) chk(int'(fault_reg[k]) == k, $sformatf("entry %0d holds %0d", k, fault_reg[k]));
    for (int a = 0; a < N + 3; a++) begin
      query_addr = AW'(a);
      #1 chk(query_hit == (a < N && m[a]), $sformatf("query %0d hit=%b", a, query_hit));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(fault_valid == '0, "not empty after reset");
    load(10'b0000000010); load(10'b1000000001); load('0); load('1); load(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
