// tb_ivm_4x4: checks the 4x4 improved Vedic multiplier against a*b,
// over every pair of operands.
module tb_ivm_4x4;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] pr;

  ivm_4x4 dut (.a(a), .b(b), .pr(pr));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [7:0] exp = 8'(a) * 8'(b);
    checks++;
    if (pr !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h exp=%h got=%h", a, b, exp, pr);
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << 4); i++)
      for (int j = 0; j < (1 << 4); j++) begin
        a = 4'(i); b = 4'(j); #1; check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
