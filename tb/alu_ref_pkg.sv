// alu_ref_pkg: behavioural reference of the real/complex ALU for the
// testbenches. It states each operation by its meaning (A-B, A-1, conjugate,
// ...) rather than by the adder operands the hardware uses. Widths up to 32.
package alu_ref_pkg;

  typedef struct packed {
    logic        cout;
    logic [63:0] z;
  } alu_res_t;

  // n-bit result and carry of one real add/sub form (op = S2..S0)
  function automatic logic [32:0] real_op(input int n, input logic [2:0] op,
                                          input logic [31:0] a, input logic [31:0] b);
    logic [63:0] m  = (64'd1 << n) - 1;
    logic [63:0] av = 64'(a) & m, bv = 64'(b) & m, r;
    logic        c;
    case (op)
      3'b000: begin r = av + bv;     c = r[n];        end
      3'b001: begin r = av - bv;     c = av >= bv;    end
      3'b010: begin r = av - 1;      c = av != 0;     end
      3'b011: begin r = av + 1;      c = av == m;     end
      3'b100: begin r = av - bv - 1; c = av > bv;     end
      3'b101: begin r = av + bv + 1; c = r[n];        end
      3'b110: begin r = av << 1;     c = av[n-1];     end
      default: begin r = av + 1;     c = av == m;     end
    endcase
    return {c, 32'(r & m)};
  endfunction

  function automatic alu_res_t alu(input int n, input logic [31:0] a, input logic [31:0] b,
                                   input logic [31:0] x, input logic [31:0] y,
                                   input logic rc, input logic [4:0] s);
    alu_res_t res;
    logic [31:0] m = (n == 32) ? '1 : (32'd1 << n) - 1;
    int h = n / 2;
    logic [32:0] lo, hi, sum;
    logic [31:0] mh = (32'd1 << h) - 1;
    logic [31:0] yre = (y >> h) & mh, yim = y & mh;
    // adder part (drives cout in every arithmetic case)
    if (!rc) begin
      sum = real_op(n, s[2:0], a, b);
    end else if (s[1:0] == 2'b10) begin
      // conjugate of Y: real part kept, imaginary part negated
      lo  = {yim == 0, (-yim) & mh};
      sum = {lo[32], (yre << h) | lo[31:0]};
    end else begin
      case (s[1:0])
        2'b00: begin lo = real_op(h, 3'b000, x, y); hi = real_op(h, 3'b000, x >> h, y >> h); end
        2'b01: begin lo = real_op(h, 3'b001, x, y); hi = real_op(h, 3'b001, x >> h, y >> h); end
        default: begin lo = real_op(h, 3'b101, x, y); hi = real_op(h, 3'b101, x >> h, y >> h); end
      endcase
      sum = {lo[32] | hi[32], (hi[31:0] << h) | lo[31:0]};
    end
    res.cout = sum[32];
    if (s[4]) begin
      logic [31:0] lz;
      case (s[2:0])
        3'b000: lz = a & b;
        3'b001: lz = a | b;
        3'b010: lz = ~(a & b);
        3'b011: lz = ~(a | b);
        3'b100: lz = a ^ b;
        3'b101: lz = ~(a ^ b);
        3'b110: lz = ~a;
        default: lz = a;
      endcase
      res.z = {32'b0, lz & m};
    end else if (s[3]) begin
      res.z = 64'(a & m) * 64'(b & m);
    end else begin
      res.z = 64'(sum[31:0] & m);
    end
    return res;
  endfunction

endpackage
