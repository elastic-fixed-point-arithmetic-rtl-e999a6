// ivm_16x16: 16x16-bit improved Vedic multiplier (unsigned).
//
// Urdhva-Tiryagbhyam split: the operands are halved, four 8x8 multipliers
// form aL*bL, aH*bL, aL*bH and aH*bH, and ivm_combine adds them with a
// carry-save adder followed by EHC-CSLAs into the 32-bit product.
// It follows the published 16x16 diagram: four 8x8 IVMs, a 16-bit
// carry-save adder, a 15-bit and an 8-bit EHC-CSLA.
// The high-stage carry handling of the 8x8 and larger sizes departs from
// the published diagrams (see ivm_combine).
//
// Interface: a, b (16 bits) -> pr (32 bits). Purely combinational.
module ivm_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] pr
);
  logic [15:0] ll, hl, lh, hh;

  ivm_8x8 u_ll (.a(a[7:0]), .b(b[7:0]), .pr(ll));
  ivm_8x8 u_hl (.a(a[15:8]), .b(b[7:0]), .pr(hl));
  ivm_8x8 u_lh (.a(a[7:0]), .b(b[15:8]), .pr(lh));
  ivm_8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .pr(hh));

  ivm_combine #(.N(16)) u_comb (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .pr(pr));
endmodule
