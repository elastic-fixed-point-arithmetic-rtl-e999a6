// carry_save_adder: N-bit 3:2 carry-save adder.
//
// One full adder per bit reduces three N-bit vectors x, y, z to a sum vector
// and a carry vector with x+y+z = s + 2*c. The carry of bit i is reported at
// position i+1 (c[N:1]); c[N] is the carry out of the top bit, called Co1 in
// the multipliers. The multipliers' use of it, and its bit numbering, follow
// the published diagrams; the full-adder form is the usual one.
// Purely combinational.
module carry_save_adder #(
  parameter int N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic [N:1]   c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);
endmodule
