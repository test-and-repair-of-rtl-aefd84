// tb_sib: random-stimulus check of the segment insertion bit against an
// independent model of its two flip-flops and its select multiplexer.
module tb_sib;
  logic clk = 0, rst = 1, shift_en = 0, update_en = 0, tdi = 0, fso = 0;
  logic tsi, to_sel, tdo;
  logic s_m, u_m;
  int checks = 0, failures = 0;

  sib dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_m = 0; u_m = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      // shift and update never together, as in the access protocol
      case ($urandom_range(0, 3))
        0: begin shift_en = 1; update_en = 0; end
        1: begin shift_en = 0; update_en = 1; end
        default: begin shift_en = 0; update_en = 0; end
      endcase
      tdi = 1'($urandom);
      fso = 1'($urandom);
      #1;
      checks++;
      if (tsi !== tdi || to_sel !== u_m || tdo !== s_m) begin
        failures++;
        $display("FAIL cycle %0d: tsi=%b tdi=%b sel=%b/%b tdo=%b/%b", i, tsi, tdi, to_sel, u_m, tdo, s_m);
      end
      @(posedge clk);
      if (update_en) u_m = s_m;
      if (shift_en)  s_m = u_m ? fso : tdi;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
