// tb_adj_xor: random and corner checks of the N-bit XOR gate.
module tb_adj_xor;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y;

  adj_xor #(.N(32)) dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = (i == 0) ? '0 : (i == 1) ? '1 : $urandom;
      b = (i == 1) ? '0 : $urandom;
      #1;
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (y[k] != (a[k] != b[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
