// ehc_csla: W-bit enhanced Han-Carlson carry-select adder (EHC-CSLA).
//
// The operands are cut into blocks (partition in ehc_pkg). The lowest block
// is a Han-Carlson adder that takes cin directly. Each higher block computes
// its sum for carry-in 0 with a Han-Carlson adder and for carry-in 1 with an
// excess-1 converter, and the carry out of the block below selects between
// them, so the carry only ripples through one multiplexer per block. The
// structure follows the published block diagrams; the widths of blocks the
// diagrams leave out are this design's choice (see ehc_pkg).
//
// Interface: a, b (W bits), cin -> s (W bits), cout. Purely combinational.
module ehc_csla
  import ehc_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam logic [31:0] CODE = blk_code(W);
  localparam int NB = code_count(CODE);

  logic [NB:0] c;  // c[i]: carry out of block i-1, c[0] = cin
  assign c[0] = cin;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    localparam int LO = code_lo(CODE, i);
    localparam int BW = code_size(CODE, i);
    if (i == 0) begin : g_first
      han_carlson_adder #(.W(BW)) u_hca (
        .a(a[LO +: BW]), .b(b[LO +: BW]), .cin(c[0]),
        .s(s[LO +: BW]), .cout(c[1])
      );
    end else begin : g_sel
      csla_block #(.BW(BW)) u_blk (
        .a(a[LO +: BW]), .b(b[LO +: BW]), .hc_cin(1'b0), .sel(c[i]),
        .s(s[LO +: BW]), .cout(c[i+1])
      );
    end
  end

  assign cout = c[NB];
endmodule
