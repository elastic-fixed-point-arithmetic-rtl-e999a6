// tb_be1c: exhaustive check of the excess-1 converter at 4 to 7 bits
// against x+1 modulo 2^W.
module tb_be1c;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar W = 4; W <= 7; W++) begin : g_w
    logic [W-1:0] x, y;
    be1c #(.W(W)) dut (.x(x), .y(y));
  end

  `define BE1C_SWEEP(W) \
    for (int v = 0; v < (1 << W); v++) begin \
      g_w[W].x = W'(v); #1; checks++; \
      if (g_w[W].y != W'(v + 1)) begin \
        failures++; $display("FAIL W=%0d x=%0h y=%0h", W, v, g_w[W].y); \
      end \
    end

  initial begin
    `BE1C_SWEEP(4)
    `BE1C_SWEEP(5)
    `BE1C_SWEEP(6)
    `BE1C_SWEEP(7)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
