// ib1c: W-bit increment-by-1 converter with enable.
//
// Returns x+1 (modulo 2^W) when en is 1 and x unchanged otherwise, using an
// AND chain and XORs rather than an adder. The 4x4 multiplier uses a 2-bit
// one to add the middle-stage carry to its two most significant product
// bits. Purely combinational.
module ib1c #(
  parameter int W = 2
) (
  input  logic [W-1:0] x,
  input  logic         en,
  output logic [W-1:0] y
);
  logic [W-1:0] t;  // t[i]: en AND x[i-1:0] all ones
  assign t[0] = en;
  for (genvar i = 1; i < W; i++) begin : g_chain
    assign t[i] = t[i-1] & x[i-1];
  end
  assign y = x ^ t;
endmodule
