// ivm_combine: recombination stage of an improved Vedic multiplier (IVM).
//
// Takes the four N-bit partial products of an (N/2 x N/2) split of an N x N
// product and forms the 2N-bit result in three stages:
//   * low stage:  pr[H-1:0] = ll[H-1:0] (H = N/2), passed straight through;
//   * middle:     an N-bit carry-save adder reduces hl, lh and
//                 {hh[H-1:0], ll[N-1:H]} to sum S and carry C (carry out Co1);
//                 S[0] is pr[H]; an (N-1)-bit EHC-CSLA adds S[N-1:1] and
//                 C[N-1:1] into pr[N+H-1:H+1] with carry out Co2;
//   * high stage: hh[N-1:H] plus the middle-stage overflow gives pr[2N-1:N+H].
// For N=4 the overflow can only be 0 or 1, and the high stage is the
// published 2-bit increment-by-1 converter enabled by Co1 OR Co2. For N>=8
// both carries can be 1 together (for 8x8, 248 of the 65536 operand pairs), so ORing
// them, as the published diagrams show, would lose a carry; this design
// instead feeds Co1 as the low bit of the second operand and Co2 as the
// carry-in of the H-bit EHC-CSLA whose second operand is otherwise zero,
// which adds both carries exactly.
//
// Interface: ll = aL*bL, hl = aH*bL, lh = aL*bH, hh = aH*bH -> pr.
// Purely combinational.
module ivm_combine #(
  parameter int N = 8
) (
  input  logic [N-1:0]   ll,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   hh,
  output logic [2*N-1:0] pr
);
  localparam int H = N / 2;

  logic [N-1:0] cs_s;
  logic [N:1]   cs_c;
  logic         co1, co2;
  logic [N-2:0] mid;

  carry_save_adder #(.N(N)) u_csa (
    .x(hl), .y(lh), .z({hh[H-1:0], ll[N-1:H]}), .s(cs_s), .c(cs_c)
  );
  assign co1 = cs_c[N];

  ehc_csla #(.W(N-1)) u_mid (
    .a(cs_s[N-1:1]), .b(cs_c[N-1:1]), .cin(1'b0), .s(mid), .cout(co2)
  );

  assign pr[H-1:0]       = ll[H-1:0];
  assign pr[H]           = cs_s[0];
  assign pr[N+H-1:H+1]   = mid;

  if (N == 4) begin : g_inc
    ib1c #(.W(H)) u_top (.x(hh[N-1:H]), .en(co1 | co2), .y(pr[2*N-1:N+H]));
  end else begin : g_add
    // top_co is always 0 because the product fits in 2N bits; it is left
    // unconnected on purpose (lint reports it as unused).
    logic top_co;
    ehc_csla #(.W(H)) u_top (
      .a(hh[N-1:H]), .b({{(H-1){1'b0}}, co1}), .cin(co2),
      .s(pr[2*N-1:N+H]), .cout(top_co)
    );
  end
endmodule
