// vedic_2x2: 2x2-bit Urdhva-Tiryagbhyam (vertically and crosswise) multiplier.
//
// Four AND gates form the partial products; a half adder adds the two cross
// products into pr[1] and a carry, and a second half adder adds that carry
// to the product of the upper bits to give pr[3:2]. This is the standard
// 2x2 Vedic cell the design builds every larger multiplier from.
//
// Interface: a, b (2 bits) -> pr (4 bits). Purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] pr
);
  logic p00, p10, p01, p11, c1;
  assign p00 = a[0] & b[0];
  assign p10 = a[1] & b[0];
  assign p01 = a[0] & b[1];
  assign p11 = a[1] & b[1];

  assign pr[0] = p00;
  assign pr[1] = p10 ^ p01;   // half adder 1
  assign c1    = p10 & p01;
  assign pr[2] = p11 ^ c1;    // half adder 2
  assign pr[3] = p11 & c1;
endmodule
