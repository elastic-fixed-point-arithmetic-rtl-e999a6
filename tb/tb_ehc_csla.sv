// tb_ehc_csla: checks the EHC-CSLA at every width the design uses (3, 4, 7,
// 8, 15, 16, 31, 32 bits) against the + operator: operands that make the
// carry run through every block (all ones plus one, alternating patterns),
// then random operands with random carry-in.
module tb_ehc_csla;
  int checks = 0, failures = 0;
  localparam int NW = 8;
  localparam int WS [NW] = '{3, 4, 7, 8, 15, 16, 31, 32};

  logic [31:0] a, b;
  logic        cin;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W = WS[k];
    logic [W-1:0] s;
    logic         cout;
    ehc_csla #(.W(W)) dut (.a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .s(s), .cout(cout));
    logic [32:0] got;
    assign got = 33'({cout, s});
  end

  logic [32:0] got_w [NW];
  for (genvar k = 0; k < NW; k++) begin : g_collect
    assign got_w[k] = g_w[k].got;
  end

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [32:0] exp;
    for (int k = 0; k < NW; k++) begin
      logic [31:0] m;
      m = (WS[k] == 32) ? '1 : (32'd1 << WS[k]) - 1;
      exp = 33'(a & m) + 33'(b & m) + 33'(cin);
      checks++;
      if (got_w[k] != exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL W=%0d a=%h b=%h cin=%0d exp=%h got=%h", WS[k], a & m, b & m, cin, exp, got_w[k]);
      end
    end
  endtask

  initial begin
    // carry propagation through every block
    a = '1; b = '0; cin = 1; #1; check_all();
    a = '1; b = 32'd1; cin = 0; #1; check_all();
    a = '1; b = '1; cin = 1; #1; check_all();
    a = 32'h5555_5555; b = 32'hAAAA_AAAA; cin = 1; #1; check_all();
    a = '0; b = '0; cin = 0; #1; check_all();
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (i % 4 == 0) b = ~a ^ (32'd1 << ($urandom % 32));  // long carry chains
      #1; check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
