// ivm_8x8: 8x8-bit improved Vedic multiplier (unsigned).
//
// Urdhva-Tiryagbhyam split: the operands are halved, four 4x4 multipliers
// form aL*bL, aH*bL, aL*bH and aH*bH, and ivm_combine adds them with a
// carry-save adder followed by EHC-CSLAs into the 16-bit product.
// It is built like the published 4x4 and 16x16 ones, one level up: four
// 4x4 IVMs, an 8-bit carry-save adder, a 7-bit and a 4-bit EHC-CSLA. Its
// internal diagram is not published; the structure is inferred.
// The high-stage carry handling of the 8x8 and larger sizes departs from
// the published diagrams (see ivm_combine).
//
// Interface: a, b (8 bits) -> pr (16 bits). Purely combinational.
module ivm_8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] pr
);
  logic [7:0] ll, hl, lh, hh;

  ivm_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .pr(ll));
  ivm_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .pr(hl));
  ivm_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .pr(lh));
  ivm_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .pr(hh));

  ivm_combine #(.N(8)) u_comb (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .pr(pr));
endmodule
