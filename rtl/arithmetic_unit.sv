// arithmetic_unit: N-bit arithmetic unit of the real/complex ALU.
//
// Operand path (all combinational):
//   * K1 = R/C ? X : A and K2 = R/C ? Y : B pick the real or the complex
//     operands; K2 is split into its real part K2[N-1:N/2] and imaginary
//     part K2[N/2-1:0] (the 1:2 demultiplexer of the design).
//   * Real mode: a 7-input multiplexer on S2..S0 gives the adder's second
//     operand: B, ~B, all ones, zero, ~B, B or A, for A+B, A-B, A-1, A+1,
//     A-B-1, A+B+1 and 2A. Complex mode: a 3-input multiplexer on S1..S0
//     gives Y, ~Y or {0, ~Yim}.
//   * For the complex conjugate (R/C & S1 & ~S0) the first operand is forced
//     to zero; otherwise it is K1. The adder's carry-in is S0 OR that
//     conjugate term.
//   * The elastic EHC-CSLA adds them as one N-bit or two N/2-bit numbers.
//   * For the conjugate the result is {Yre, low half of the sum} = Yre - iYim.
//   * S3 selects the N x N improved Vedic product of A and B (2N bits)
//     instead of the zero-extended N-bit sum.
// The multiplexer inputs and select terms follow the published 32-bit
// schematic and function table. Select codes the table leaves undefined are
// this design's choice: real S2..S0=111 adds zero with carry (A+1), complex
// S1..S0=11 adds X+Y+1 per part. cout is the elastic adder's carry out.
//
// Interface: a, b, x, y (N bits), rc, s (S3..S0) -> z (2N bits), cout.
// N must be 4, 8, 16 or 32 (the multiplier sizes).
module arithmetic_unit
  import alu_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic           rc,
  input  logic [3:0]     s,
  output logic [2*N-1:0] z,
  output logic           cout
);
  localparam int H = N / 2;

  logic [N-1:0] k1, k2, rmux, cmux, opa, opb, f, fsel;
  logic [H-1:0] k2_re, k2_im;
  logic         conj, cin;
  logic [2*N-1:0] prod;

  assign k1 = rc ? x : a;
  assign k2 = rc ? y : b;
  assign {k2_re, k2_im} = k2;

  always_comb begin
    unique case (real_op_e'(s[2:0]))
      R_ADD:     rmux = k2;
      R_SUB:     rmux = ~k2;
      R_DEC:     rmux = '1;
      R_INC:     rmux = '0;
      R_SUB_BRW: rmux = ~k2;
      R_ADD_CRY: rmux = k2;
      R_DOUBLE:  rmux = k1;
      default:   rmux = '0;
    endcase
    unique case (cplx_op_e'(s[1:0]))
      C_ADD:   cmux = k2;
      C_SUB:   cmux = ~k2;
      C_CONJ:  cmux = {{H{1'b0}}, ~k2_im};
      default: cmux = k2;
    endcase
  end

  assign conj = rc & s[1] & ~s[0];
  assign cin  = s[0] | conj;
  assign opa  = conj ? '0 : k1;
  assign opb  = rc ? cmux : rmux;

  elastic_ehc_csla #(.N(N)) u_add (
    .a(opa), .b(opb), .cin(cin), .rc(rc), .s(f), .cout(cout)
  );

  assign fsel = conj ? {k2_re, f[H-1:0]} : f;

  if (N == 32) begin : g_m32
    ivm_32x32 u_ivm (.a(a), .b(b), .pr(prod));
  end else if (N == 16) begin : g_m16
    ivm_16x16 u_ivm (.a(a), .b(b), .pr(prod));
  end else if (N == 8) begin : g_m8
    ivm_8x8 u_ivm (.a(a), .b(b), .pr(prod));
  end else if (N == 4) begin : g_m4
    ivm_4x4 u_ivm (.a(a), .b(b), .pr(prod));
  end else begin : g_bad
    $error("arithmetic_unit: N must be 4, 8, 16 or 32");
  end

  assign z = s[3] ? prod : {{N{1'b0}}, fsel};
endmodule
