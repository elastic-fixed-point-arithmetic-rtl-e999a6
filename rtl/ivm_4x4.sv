// ivm_4x4: 4x4-bit improved Vedic multiplier (unsigned).
//
// Urdhva-Tiryagbhyam split: the operands are halved, four 2x2 multipliers
// form aL*bL, aH*bL, aL*bH and aH*bH, and ivm_combine adds them with a
// carry-save adder followed by EHC-CSLAs into the 8-bit product.
// This matches the published 4x4 diagram: four 2x2 Vedic cells, a 4-bit carry-save adder,
// a 3-bit EHC-CSLA and a 2-bit increment-by-1 converter.
// The high-stage carry handling of the 8x8 and larger sizes departs from
// the published diagrams (see ivm_combine).
//
// Interface: a, b (4 bits) -> pr (8 bits). Purely combinational.
module ivm_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] pr
);
  logic [3:0] ll, hl, lh, hh;

  vedic_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .pr(ll));
  vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .pr(hl));
  vedic_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .pr(lh));
  vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .pr(hh));

  ivm_combine #(.N(4)) u_comb (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .pr(pr));
endmodule
