// tb_elastic_ehc_csla: checks the elastic adder at N=32 and N=16.
// Real mode (rc=0): one N-bit sum a+b+cin with carry out. Complex mode
// (rc=1): two independent N/2-bit sums, each with carry-in cin, and cout
// equal to the OR of both halves' carries. Includes operands whose low-half
// carry would leak into the upper half if the halves were not separated.
module tb_elastic_ehc_csla;
  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic        cin, rc;
  logic [31:0] s32;
  logic [15:0] s16;
  logic        co32, co16;

  elastic_ehc_csla #(.N(32)) d32 (.a(a), .b(b), .cin(cin), .rc(rc), .s(s32), .cout(co32));
  elastic_ehc_csla #(.N(16)) d16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .rc(rc), .s(s16), .cout(co16));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [32:0] ref_add(input int n, input logic [31:0] x, input logic [31:0] y,
                                          input logic c, input logic r);
    logic [31:0] m = (n == 32) ? '1 : (32'd1 << n) - 1;
    int h = n / 2;
    logic [31:0] mh = (32'd1 << h) - 1;
    logic [32:0] full, lo, hi;
    if (!r) begin
      full = 33'(x & m) + 33'(y & m) + 33'(c);
      return {full[n], 32'(full & 33'(m))};
    end
    lo = 33'(x & mh) + 33'(y & mh) + 33'(c);
    hi = 33'(32'(x >> h) & mh) + 33'(32'(y >> h) & mh) + 33'(c);
    return {lo[h] | hi[h], 32'((hi & 33'(mh)) << h | (lo & 33'(mh)))};
  endfunction

  task automatic check();
    logic [32:0] e32, e16;
    e32 = ref_add(32, a, b, cin, rc);
    e16 = ref_add(16, a, b, cin, rc);
    checks += 2;
    if ({co32, s32} != e32) begin
      failures++;
      if (failures < 10) $display("FAIL N=32 rc=%0d a=%h b=%h cin=%0d exp=%h got=%h", rc, a, b, cin, e32, {co32, s32});
    end
    if ({co16, s16} != {e16[32], e16[15:0]}) begin
      failures++;
      if (failures < 10) $display("FAIL N=16 rc=%0d a=%h b=%h cin=%0d exp=%h got=%h", rc, a[15:0], b[15:0], cin, e16, {co16, s16});
    end
  endtask

  initial begin
    for (int r = 0; r < 2; r++) begin
      rc = 1'(r);
      a = 32'h0000_FFFF; b = 32'h0000_0001; cin = 0; #1; check();
      a = 32'h00FF_00FF; b = 32'h0001_0001; cin = 0; #1; check();
      a = 32'hFFFF_FFFF; b = 32'h0; cin = 1; #1; check();
      a = 32'h8000_8000; b = 32'h8000_8000; cin = 0; #1; check();
      for (int i = 0; i < 20000; i++) begin
        a = $urandom; b = $urandom; cin = 1'($urandom);
        if (i % 4 == 0) b = ~a ^ (32'd1 << ($urandom % 32));
        #1; check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
