// tb_arithmetic_unit: every real and complex arithmetic select code, with
// corner and random operands, against the reference model (result and
// carry out), at N=32.
module tb_arithmetic_unit;
  import alu_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, x, y;
  logic        rc, cout;
  logic [3:0]  s;
  logic [63:0] z;

  arithmetic_unit #(.N(32)) dut (.a(a), .b(b), .x(x), .y(y), .rc(rc), .s(s), .z(z), .cout(cout));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    alu_res_t e = alu(32, a, b, x, y, rc, {1'b0, s});
    checks++;
    if (z != e.z || cout != e.cout) begin
      failures++;
      if (failures < 10)
        $display("FAIL rc=%0d s=%b a=%h b=%h x=%h y=%h exp=%h/%0d got=%h/%0d",
                 rc, s, a, b, x, y, e.z, e.cout, z, cout);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin a = '0; b = '0; x = '0; y = '0; end
        1: begin a = '1; b = 32'd1; x = 32'h0000_FFFF; y = 32'h0000_0001; end
        2: begin a = 32'h128; b = 32'h89; x = 32'h0025_00af; y = 32'h0013_0067; end
        3: begin a = '1; b = '1; x = '1; y = '1; end
        default: begin a = $urandom; b = $urandom; x = $urandom; y = $urandom; end
      endcase
      for (int r = 0; r < 2; r++)
        for (int k = 0; k < 16; k++) begin
          rc = 1'(r); s = 4'(k); #1; check();
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
