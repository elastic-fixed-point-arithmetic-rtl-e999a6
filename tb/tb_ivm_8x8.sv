// tb_ivm_8x8: checks the 8x8 improved Vedic multiplier against a*b,
// over every pair of operands.
module tb_ivm_8x8;
  int checks = 0, failures = 0;
  logic [7:0] a, b;
  logic [15:0] pr;

  ivm_8x8 dut (.a(a), .b(b), .pr(pr));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [15:0] exp = 16'(a) * 16'(b);
    checks++;
    if (pr !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h exp=%h got=%h", a, b, exp, pr);
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << 8); i++)
      for (int j = 0; j < (1 << 8); j++) begin
        a = 8'(i); b = 8'(j); #1; check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
