// elastic_ehc_csla: N-bit real/complex (elastic) EHC-CSLA.
//
// An EHC-CSLA whose lower and upper halves can be joined or separated by the
// R/C signal. Three R/C-controlled multiplexers sit at the boundary:
//   * the Han-Carlson adder of the first upper block gets 0 as carry-in
//     for R/C=0 and cin for R/C=1;
//   * the select of that block's carry multiplexer is the lower half's carry
//     for R/C=0 and 0 for R/C=1;
//   * the lower half's carry reaches the carry-out OR gate only for R/C=1.
// So R/C=0 gives one N-bit addition a+b+cin, and R/C=1 two independent
// N/2-bit additions, each with carry-in cin, as needed for the real and
// imaginary parts of a complex number. cout is the upper carry, ORed with
// the lower carry in complex mode. This boundary logic follows the published
// 32-bit diagram; the block widths of the 16-bit version are this design's
// choice (see ehc_pkg).
//
// Interface: a, b (N bits, N even), cin, rc -> s (N bits), cout.
// Purely combinational.
module elastic_ehc_csla
  import ehc_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic         rc,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int H = N / 2;
  localparam logic [31:0] LCODE = blk_code(H);
  localparam logic [31:0] UCODE = upper_code(N);
  localparam int NL = code_count(LCODE);
  localparam int NU = code_count(UCODE);

  logic [NL:0] cl;  // lower-half block carries
  logic [NU:0] cu;  // upper-half block carries
  logic        lo_cout;

  assign cl[0] = cin;

  for (genvar i = 0; i < NL; i++) begin : g_lo
    localparam int LO = code_lo(LCODE, i);
    localparam int BW = code_size(LCODE, i);
    if (i == 0) begin : g_first
      han_carlson_adder #(.W(BW)) u_hca (
        .a(a[LO +: BW]), .b(b[LO +: BW]), .cin(cl[0]),
        .s(s[LO +: BW]), .cout(cl[1])
      );
    end else begin : g_sel
      csla_block #(.BW(BW)) u_blk (
        .a(a[LO +: BW]), .b(b[LO +: BW]), .hc_cin(1'b0), .sel(cl[i]),
        .s(s[LO +: BW]), .cout(cl[i+1])
      );
    end
  end
  assign lo_cout = cl[NL];

  // boundary multiplexers controlled by R/C
  logic up_hc_cin, up_sel, lo_to_or;
  assign up_hc_cin = rc ? cin : 1'b0;
  assign up_sel    = rc ? 1'b0 : lo_cout;
  assign lo_to_or  = rc ? lo_cout : 1'b0;

  assign cu[0] = up_sel;
  for (genvar i = 0; i < NU; i++) begin : g_up
    localparam int LO = H + code_lo(UCODE, i);
    localparam int BW = code_size(UCODE, i);
    csla_block #(.BW(BW)) u_blk (
      .a(a[LO +: BW]), .b(b[LO +: BW]), .hc_cin(i == 0 ? up_hc_cin : 1'b0),
      .sel(cu[i]), .s(s[LO +: BW]), .cout(cu[i+1])
    );
  end

  assign cout = cu[NU] | lo_to_or;
endmodule
