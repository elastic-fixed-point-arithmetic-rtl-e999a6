// adj_xor: N-bit XOR gate of the logic unit.
//
// The design uses an "adjusted" XOR gate taken from earlier work whose gate
// structure is not given here, so this module realises the same Boolean
// function, y = a XOR b, with the plain operator and leaves the gate mapping
// to synthesis. Purely combinational.
module adj_xor #(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);
  assign y = a ^ b;
endmodule
