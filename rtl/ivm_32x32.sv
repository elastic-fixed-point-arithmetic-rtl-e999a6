// ivm_32x32: 32x32-bit improved Vedic multiplier (unsigned).
//
// Urdhva-Tiryagbhyam split: the operands are halved, four 16x16 multipliers
// form aL*bL, aH*bL, aL*bH and aH*bH, and ivm_combine adds them with a
// carry-save adder followed by EHC-CSLAs into the 64-bit product.
// It follows the published 32x32 diagram: four 16x16 IVMs, a 32-bit
// carry-save adder, a 31-bit and a 16-bit EHC-CSLA.
// The high-stage carry handling of the 8x8 and larger sizes departs from
// the published diagrams (see ivm_combine).
//
// Interface: a, b (32 bits) -> pr (64 bits). Purely combinational.
module ivm_32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] pr
);
  logic [31:0] ll, hl, lh, hh;

  ivm_16x16 u_ll (.a(a[15:0]), .b(b[15:0]), .pr(ll));
  ivm_16x16 u_hl (.a(a[31:16]), .b(b[15:0]), .pr(hl));
  ivm_16x16 u_lh (.a(a[15:0]), .b(b[31:16]), .pr(lh));
  ivm_16x16 u_hh (.a(a[31:16]), .b(b[31:16]), .pr(hh));

  ivm_combine #(.N(32)) u_comb (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .pr(pr));
endmodule
