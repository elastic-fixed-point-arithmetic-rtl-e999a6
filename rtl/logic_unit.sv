// logic_unit: N-bit logic unit of the real/complex ALU.
//
// Eight bitwise functions of the real operands A and B are formed in
// parallel (AND, OR, NAND, NOR, XOR, XNOR, NOT A, A) and an 8:1 multiplexer
// driven by S2..S0 picks one, in the order of the ALU's function table. The
// XOR and XNOR use the adj_xor gate.
//
// Interface: a, b (N bits), sel (S2..S0) -> z (N bits). Purely combinational.
module logic_unit
  import alu_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [2:0]   sel,
  output logic [N-1:0] z
);
  logic [N-1:0] x;
  adj_xor #(.N(N)) u_xor (.a(a), .b(b), .y(x));

  always_comb begin
    unique case (logic_op_e'(sel))
      L_AND:   z = a & b;
      L_OR:    z = a | b;
      L_NAND:  z = ~(a & b);
      L_NOR:   z = ~(a | b);
      L_XOR:   z = x;
      L_XNOR:  z = ~x;
      L_NOT:   z = ~a;
      default: z = a;  // L_BUF
    endcase
  end
endmodule
