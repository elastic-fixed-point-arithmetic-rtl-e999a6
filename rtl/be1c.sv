// be1c: binary-to-excess-1 converter, W bits.
//
// Adds one to its input without a carry-propagate adder: bit 0 is inverted
// and every higher bit is flipped when all bits below it are 1. In an
// EHC-CSLA block it turns the {carry, sum} of the Han-Carlson adder (computed
// with carry-in 0) into the result for carry-in 1; that is why a k-bit block
// uses a (k+1)-bit converter. The role is the design's; the gate form is the
// usual one. The result wraps modulo 2^W. Purely combinational.
module be1c #(
  parameter int W = 4
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W-1:0] all1;  // all1[i] = AND of x[i-1:0]
  assign all1[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_chain
    assign all1[i] = all1[i-1] & x[i-1];
  end
  assign y = x ^ all1;
endmodule
