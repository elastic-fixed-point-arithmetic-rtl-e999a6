// tb_carry_save_adder: random and corner checks that x+y+z == s + 2*c for a
// 16-bit and a 32-bit carry-save adder, plus the exact per-bit values.
module tb_carry_save_adder;
  int checks = 0, failures = 0;
  logic [15:0] x16, y16, z16, s16;
  logic [16:1] c16;
  logic [31:0] x32, y32, z32, s32;
  logic [32:1] c32;

  carry_save_adder #(.N(16)) d16 (.x(x16), .y(y16), .z(z16), .s(s16), .c(c16));
  carry_save_adder #(.N(32)) d32 (.x(x32), .y(y32), .z(z32), .s(s32), .c(c32));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i < 2) begin
        {x16, y16, z16} = i == 0 ? '0 : '1;
        {x32, y32, z32} = i == 0 ? '0 : '1;
      end else begin
        x16 = 16'($urandom); y16 = 16'($urandom); z16 = 16'($urandom);
        x32 = $urandom; y32 = $urandom; z32 = $urandom;
      end
      #1;
      checks += 2;
      if (18'(x16) + 18'(y16) + 18'(z16) != 18'(s16) + {c16, 1'b0}) begin
        failures++; $display("FAIL16 %h %h %h", x16, y16, z16);
      end
      if (34'(x32) + 34'(y32) + 34'(z32) != 34'(s32) + {c32, 1'b0}) begin
        failures++; $display("FAIL32 %h %h %h", x32, y32, z32);
      end
      checks++;
      if (s32 != (x32 ^ y32 ^ z32)) begin failures++; $display("FAIL32 sum bits"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
