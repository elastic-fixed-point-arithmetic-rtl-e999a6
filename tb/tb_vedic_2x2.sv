// tb_vedic_2x2: exhaustive check of the 2x2 Vedic cell against a*b.
module tb_vedic_2x2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] pr;

  vedic_2x2 dut (.a(a), .b(b), .pr(pr));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j); #1;
        checks++;
        if (pr != 4'(i * j)) begin failures++; $display("FAIL %0d*%0d=%0d", i, j, pr); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
