// tb_ivm_32x32: checks the 32x32 improved Vedic multiplier against a*b,
// on corner operands (zero, one, all ones, half-word boundaries) and
// random operands, including ones with all-ones halves that drive the
// middle-stage carries.
module tb_ivm_32x32;
  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [63:0] pr;

  ivm_32x32 dut (.a(a), .b(b), .pr(pr));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [63:0] exp = 64'(a) * 64'(b);
    checks++;
    if (pr !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h exp=%h got=%h", a, b, exp, pr);
    end
  endtask

  initial begin
    logic [31:0] corner [6];
    corner = '{'0, 32'd1, '1, {1'b1, {(32-1){1'b0}}}, {{(32/2){1'b0}}, {(32/2){1'b1}}},
               {{(32/2){1'b1}}, {(32/2){1'b0}}}};
    foreach (corner[i])
      foreach (corner[j]) begin
        a = corner[i]; b = corner[j]; #1; check();
      end
    for (int i = 0; i < 40000; i++) begin
      a = 32'({$urandom, $urandom});
      b = 32'({$urandom, $urandom});
      if (i % 3 == 0) a[32/2-1:0] = '1;
      if (i % 5 == 0) b[32-1:32/2] = '1;
      #1; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
