// tb_real_complex_alu_n16: end-to-end test of the real/complex ALU in its 16-bit configuration.
//
// It sweeps all 19 defined functions (8 real arithmetic, 3 complex,
// 8 logic) and the two undefined select codes over corner and random operands,
// switching R_C back and forth, and compares Z and Cout with the reference
// model. It counts how often each function and each mechanism ran: a carry
// out of the real adder, a carry out of the low complex half that must not
// reach the high half, a product wider than N bits, and a real/complex mode
// switch. A function or mechanism that never occurs counts as a failure.
module tb_real_complex_alu_n16;
  import alu_ref_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic [N-1:0]   A, B, X, Y;
  logic           R_C, Cout;
  logic [4:0]     S;
  logic [2*N-1:0] Z;

  real_complex_alu #(.N(16)) dut (.A(A), .B(B), .X(X), .Y(Y), .R_C(R_C), .S(S), .Z(Z), .Cout(Cout));

  initial begin : watchdog
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fn_count [string];
  int n_real_carry = 0, n_split_carry = 0, n_wide_product = 0, n_mode_switch = 0;
  logic last_rc = 1'b0;

  function automatic string fn_name(input logic rc, input logic [4:0] s);
    if (s[4]) return $sformatf("logic%0d", s[2:0]);
    if (s[3]) return "mul";
    if (!rc) return $sformatf("real%0d", s[2:0]);
    return $sformatf("cplx%0d", s[1:0]);
  endfunction

  task automatic apply_check(input logic [4:0] s, input logic rc);
    alu_res_t e;
    logic [N:0] lo_sum;
    S = s; R_C = rc; #1;
    e = alu(N, 32'(A), 32'(B), 32'(X), 32'(Y), rc, s);
    checks++;
    if (Z != e.z[2*N-1:0] || Cout != e.cout) begin
      failures++;
      if (failures < 10)
        $display("FAIL rc=%0d s=%b A=%h B=%h X=%h Y=%h exp=%h/%0d got=%h/%0d",
                 rc, s, A, B, X, Y, e.z[2*N-1:0], e.cout, Z, Cout);
    end
    fn_count[fn_name(rc, s)]++;
    if (rc != last_rc) n_mode_switch++;
    last_rc = rc;
    if (!rc && !s[4] && !s[3] && Cout) n_real_carry++;
    if (!s[4] && s[3] && Z[2*N-1:N] != 0) n_wide_product++;
    lo_sum = (N+1)'(X[N/2-1:0]) + (N+1)'(Y[N/2-1:0]);
    if (rc && !s[4] && !s[3] && s[1:0] == 2'b00 && lo_sum[N/2]) n_split_carry++;
  endtask

  task automatic expect_z(input logic [4:0] s, input logic rc, input logic [31:0] exp);
    S = s; R_C = rc; #1;
    checks++;
    if (Z[31:0] != exp) begin
      failures++;
      $display("FAIL example rc=%0d s=%b exp=%h got=%h", rc, s, exp, Z[31:0]);
    end
  endtask

  initial begin

    for (int i = 0; i < 400; i++) begin
      case (i)
        0: begin A = '0; B = '0; X = '0; Y = '0; end
        1: begin A = '1; B = '1; X = '1; Y = '1; end
        2: begin A = '1; B = N'(1); X = {N{1'b1}} >> (N/2); Y = N'(1); end
        3: begin A = {1'b1, {(N-1){1'b0}}}; B = A; X = {1'b0, {(N/2-1){1'b1}}, {(N/2){1'b1}}}; Y = N'(3); end
        default: begin
          A = N'($urandom); B = N'($urandom); X = N'($urandom); Y = N'($urandom);
        end
      endcase
      for (int k = 0; k < 32; k++)
        for (int r = 0; r < 2; r++) begin
          if (k[4] && r == 1) continue;  // logic functions are real-only
          apply_check(5'(k), 1'(r));
        end
    end
    // every defined function and every mechanism must have occurred
    for (int k = 0; k < 8; k++) begin
      if (fn_count[$sformatf("real%0d", k)] == 0) begin failures++; $display("never ran: real%0d", k); end
      if (fn_count[$sformatf("logic%0d", k)] == 0) begin failures++; $display("never ran: logic%0d", k); end
    end
    for (int k = 0; k < 3; k++)
      if (fn_count[$sformatf("cplx%0d", k)] == 0) begin failures++; $display("never ran: cplx%0d", k); end
    if (fn_count["mul"] == 0) begin failures++; $display("never ran: mul"); end
    if (n_real_carry == 0)   begin failures++; $display("never happened: real carry out"); end
    if (n_split_carry == 0)  begin failures++; $display("never happened: complex low-half carry"); end
    if (n_wide_product == 0) begin failures++; $display("never happened: wide product"); end
    if (n_mode_switch == 0)  begin failures++; $display("never happened: mode switch"); end
    $display("counts: mul=%0d real_carry=%0d split_carry=%0d wide_product=%0d mode_switch=%0d",
             fn_count["mul"], n_real_carry, n_split_carry, n_wide_product, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
