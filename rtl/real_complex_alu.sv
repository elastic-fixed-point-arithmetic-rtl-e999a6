// real_complex_alu: elastic N-bit fixed-point real/complex ALU (top level).
//
// One combinational unit that performs, on unsigned/two's-complement
// fixed-point words:
//   real (R_C=0): A+B, A-B, A-1, A+1, A-B-1, A+B+1, 2A, A*B;
//   complex (R_C=1, operands X and Y as {real, imaginary} halves of N/2
//   bits each): X+Y, X-Y (each part independently), conjugate of Y;
//   logic (S4=1): AND, OR, NAND, NOR, XOR, XNOR, NOT A, A.
// The arithmetic unit (elastic EHC-CSLA adder plus improved Vedic
// multiplier) and the logic unit work in parallel; S4 picks one of their
// results. Z is 2N bits wide: the product fills it, sums and logic results
// are zero-extended. Cout is the adder's carry out (in complex mode the OR of
// both halves' carries). Select coding: see alu_pkg.
//
// Interface: A, B, X, Y (N bits), R_C, S[4:0] -> Z (2N bits), Cout.
// No clock: the result settles after the combinational delay. The default
// N=32 is the main published configuration; N=16 is the other one.
module real_complex_alu #(
  parameter int N = 32
) (
  input  logic [N-1:0]   A,
  input  logic [N-1:0]   B,
  input  logic [N-1:0]   X,
  input  logic [N-1:0]   Y,
  input  logic           R_C,
  input  logic [4:0]     S,
  output logic [2*N-1:0] Z,
  output logic           Cout
);
  logic [2*N-1:0] arith_z;
  logic [N-1:0]   logic_z;

  arithmetic_unit #(.N(N)) u1 (
    .a(A), .b(B), .x(X), .y(Y), .rc(R_C), .s(S[3:0]), .z(arith_z), .cout(Cout)
  );

  logic_unit #(.N(N)) u2 (.a(A), .b(B), .sel(S[2:0]), .z(logic_z));

  alu_out_mux #(.W(2*N)) u31 (
    .w0(arith_z), .w1({{N{1'b0}}, logic_z}), .sel(S[4]), .e(Z)
  );
endmodule
