// alu_out_mux: W-bit 2:1 result multiplexer of the ALU.
//
// Passes w0 (the arithmetic result) when sel is 0 and w1 (the logic result)
// when sel is 1; in the ALU, sel is S4 and W is 2N (64 bits for N=32).
// This is the 64-bit output multiplexer of the published 32-bit ALU, made
// width-generic here. Purely combinational.
module alu_out_mux #(
  parameter int W = 64
) (
  input  logic [W-1:0] w0,
  input  logic [W-1:0] w1,
  input  logic         sel,
  output logic [W-1:0] e
);
  assign e = sel ? w1 : w0;
endmodule
