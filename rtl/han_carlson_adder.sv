// han_carlson_adder: W-bit Han-Carlson parallel-prefix adder.
//
// The building block of every EHC-CSLA block. Generate/propagate pairs are
// formed per bit (the carry-in is folded into bit 0's generate). The first
// prefix level merges each odd bit with the even bit below it; Kogge-Stone
// levels with spans 2, 4, ... then run on the odd bits only; a last level
// merges each even bit with the finished odd bit below it. Sum bits are
// p XOR carry. The adder is named by the design; the prefix network is the
// textbook Han-Carlson form.
//
// Interface: a, b (W bits), cin -> s (W bits), cout. Purely combinational.
module han_carlson_adder #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  // number of Kogge-Stone levels on the odd bits (spans 2,4,.. below W)
  localparam int KS = (W <= 2) ? 0 : $clog2(W) - 1;
  localparam int NL = KS + 2;  // level 0 = bit g/p, 1 = odd pairing, .., NL = even fix-up

  logic [W-1:0] p;
  logic [W-1:0] g [NL+1];
  logic [W-1:0] q [NL+1];

  assign p = a ^ b;

  always_comb begin
    g[0]    = a & b;
    g[0][0] = (a[0] & b[0]) | (p[0] & cin);
    q[0]    = p;
    // level 1: odd bits absorb their even neighbour
    g[1] = g[0];
    q[1] = q[0];
    for (int i = 1; i < W; i += 2) begin
      g[1][i] = g[0][i] | (q[0][i] & g[0][i-1]);
      q[1][i] = q[0][i] & q[0][i-1];
    end
    // Kogge-Stone on odd bits, span 2^l
    for (int l = 1; l <= KS; l++) begin
      g[l+1] = g[l];
      q[l+1] = q[l];
      for (int i = 1; i < W; i += 2) begin
        if (i - (1 << l) >= 0) begin
          g[l+1][i] = g[l][i] | (q[l][i] & g[l][i-(1<<l)]);
          q[l+1][i] = q[l][i] & q[l][i-(1<<l)];
        end
      end
    end
    // final level: even bits take the finished odd prefix below them
    g[NL] = g[NL-1];
    q[NL] = q[NL-1];
    for (int i = 2; i < W; i += 2) begin
      g[NL][i] = g[NL-1][i] | (q[NL-1][i] & g[NL-1][i-1]);
      q[NL][i] = q[NL-1][i] & q[NL-1][i-1];
    end
  end

  // carry into bit i is the group generate of bits i-1..0 (with cin)
  logic [W:0] c;
  assign c = {g[NL], cin};
  assign s    = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
