// tb_ib1c: exhaustive check of the increment-by-1 converter (2 and 4 bits),
// enabled and disabled.
module tb_ib1c;
  int checks = 0, failures = 0;
  logic [1:0] x2, y2;
  logic [3:0] x4, y4;
  logic en;

  ib1c #(.W(2)) dut2 (.x(x2), .en(en), .y(y2));
  ib1c #(.W(4)) dut4 (.x(x4), .en(en), .y(y4));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 16; v++) begin
        en = 1'(e); x2 = 2'(v); x4 = 4'(v); #1;
        checks += 2;
        if (y2 != 2'(v + e)) begin failures++; $display("FAIL W=2 x=%0d en=%0d y=%0d", v, e, y2); end
        if (y4 != 4'(v + e)) begin failures++; $display("FAIL W=4 x=%0d en=%0d y=%0d", v, e, y4); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
