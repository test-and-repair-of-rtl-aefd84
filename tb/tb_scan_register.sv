// tb_scan_register: random capture/shift/update operations, with and without
// the select line and the fault input, checked against an independent model.
module tb_scan_register;
  localparam int LEN = 8;
  logic clk = 0, rst = 1, sel = 0, shift_en = 0, capture_en = 0, update_en = 0, si = 0, fault = 0;
  logic so;
  logic [LEN-1:0] instr_out = '0, instr_in;
  logic [LEN-1:0] sr_m, upd_m;
  int checks = 0, failures = 0;

  scan_register #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sr_m = '0; upd_m = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      sel = ($urandom_range(0, 4) != 0);
      fault = (i > 1500) && 1'($urandom);
      {shift_en, capture_en, update_en} = '0;
      case ($urandom_range(0, 4))
        0: capture_en = 1;
        1: update_en = 1;
        2, 3: shift_en = 1;
        default: ;
      endcase
      si = 1'($urandom);
      instr_out = 8'($urandom);
      #1;
      checks++;
      if (so !== (fault ? ~si : sr_m[0]) || instr_in !== upd_m) begin
        failures++;
        $display("FAIL cycle %0d: so=%b instr_in=%h exp=%h", i, so, instr_in, upd_m);
      end
      @(posedge clk);
      if (sel) begin
        if (update_en) upd_m = sr_m;
        if (capture_en) sr_m = instr_out;
        else if (shift_en) sr_m = {si, sr_m[LEN-1:1]};
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
