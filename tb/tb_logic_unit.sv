// tb_logic_unit: all eight logic functions on the published example
// operands and on random operands, against the reference model.
module tb_logic_unit;
  import alu_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, z;
  logic [2:0]  sel;

  logic_unit #(.N(32)) dut (.a(a), .b(b), .sel(sel), .z(z));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    alu_res_t e = alu(32, a, b, '0, '0, 1'b0, {2'b10, sel});
    checks++;
    if (z != e.z[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL sel=%0d a=%h b=%h exp=%h got=%h", sel, a, b, e.z[31:0], z);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i == 0) begin a = 32'h128; b = 32'h89; end
      else begin a = $urandom; b = $urandom; end
      for (int k = 0; k < 8; k++) begin
        sel = 3'(k); #1; check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
