// tb_han_carlson_adder: exhaustive check of the Han-Carlson adder at the
// block widths the EHC-CSLAs use (2 to 7 bits), both carry-in values,
// against the + operator.
module tb_han_carlson_adder;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar W = 2; W <= 7; W++) begin : g_w
    logic [W-1:0] a, b, s;
    logic cin, cout;
    han_carlson_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end

  task automatic report(input string what, input int exp, input int got);
    checks++;
    if (exp != got) begin
      failures++;
      if (failures < 10) $display("FAIL %s exp=%0h got=%0h", what, exp, got);
    end
  endtask

  `define HCA_SWEEP(W) \
    for (int av = 0; av < (1 << W); av++) \
      for (int bv = 0; bv < (1 << W); bv++) \
        for (int c = 0; c < 2; c++) begin \
          g_w[W].a = W'(av); g_w[W].b = W'(bv); g_w[W].cin = 1'(c); #1; \
          report($sformatf("W=%0d %0d+%0d+%0d", W, av, bv, c), av + bv + c, \
                 int'({g_w[W].cout, g_w[W].s})); \
        end

  initial begin
    `HCA_SWEEP(2)
    `HCA_SWEEP(3)
    `HCA_SWEEP(4)
    `HCA_SWEEP(5)
    `HCA_SWEEP(6)
    `HCA_SWEEP(7)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
