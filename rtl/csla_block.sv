// csla_block: one carry-select block of an EHC-CSLA.
//
// A BW-bit Han-Carlson adder forms {carry, sum} for carry-in hc_cin (0 in a
// plain chain), a (BW+1)-bit excess-1 converter forms the same plus one, and
// a 2:1 multiplexer picks the second when sel (the carry out of the block
// below) is 1. The elastic adder drives hc_cin with its own carry-in and
// forces sel to 0 in complex mode so that the block starts a new addition.
// The HC-A / excess-1 / multiplexer arrangement is the published one.
// Purely combinational.
module csla_block #(
  parameter int BW = 4
) (
  input  logic [BW-1:0] a,
  input  logic [BW-1:0] b,
  input  logic          hc_cin,
  input  logic          sel,
  output logic [BW-1:0] s,
  output logic          cout
);
  logic [BW:0] r0, r1;

  han_carlson_adder #(.W(BW)) u_hca (
    .a(a), .b(b), .cin(hc_cin), .s(r0[BW-1:0]), .cout(r0[BW])
  );
  be1c #(.W(BW+1)) u_be1c (.x(r0), .y(r1));

  assign {cout, s} = sel ? r1 : r0;
endmodule
