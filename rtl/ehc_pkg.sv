// ehc_pkg: block partitions of the hybrid Han-Carlson / carry-select adders.
//
// An EHC-CSLA of width W is cut into blocks, least significant first. The
// first block is a plain Han-Carlson adder that takes the carry-in; every
// further block is a Han-Carlson adder with carry-in 0 plus an excess-1
// converter, selected by the carry of the block below. A partition is coded
// as a 32-bit word of 4-bit block widths, lowest block in the lowest nibble.
//
// Partitions that follow the published block diagrams:
//   15 bits: 3,3,4,5           (15-bit adder of the 16x16 multiplier)
//   16 bits: 3,3,4,6           (lower half of the elastic 32-bit adder)
//   32-bit elastic upper half: 5,4,4,3
// Partly published (first blocks, last block and block count known; the
// four middle widths are this design's choice):
//   31 bits: 3,3,4,6,4,4,4,3   32 bits: 3,3,4,6,4,4,4,4
// Other widths are this design's choice; unlisted widths use 3,3,4,5,6,...
// with a short remainder merged into the last block.
package ehc_pkg;

  function automatic logic [31:0] blk_code(input int w);
    logic [31:0] code;
    int rem, sz, i;
    case (w)
      1:  code = 32'h0000_0001;
      2:  code = 32'h0000_0002;
      3:  code = 32'h0000_0003;
      4:  code = 32'h0000_0022;
      7:  code = 32'h0000_0043;
      8:  code = 32'h0000_0053;
      15: code = 32'h0000_5433;
      16: code = 32'h0000_6433;
      31: code = 32'h3444_6433;
      32: code = 32'h4444_6433;
      default: begin
        // 3,3,4,5,... ; a remainder below 3 is added to the last block
        code = '0;
        rem  = w;
        i    = 0;
        sz   = 3;
        while (rem > 0 && i < 8) begin
          if (rem - sz < 3 || i == 7) sz = rem;
          code[4*i +: 4] = 4'(sz);
          rem = rem - sz;
          if (i >= 1) sz = sz + 1;
          i = i + 1;
        end
      end
    endcase
    return code;
  endfunction

  // Upper-half partition of the elastic (real/complex) adder of width n.
  function automatic logic [31:0] upper_code(input int n);
    case (n)
      32:      return 32'h0000_3445;
      16:      return 32'h0000_0035;
      default: return blk_code(n / 2);
    endcase
  endfunction

  function automatic int code_count(input logic [31:0] code);
    int c = 0;
    for (int i = 0; i < 8; i++) if (code[4*i +: 4] != 0) c++;
    return c;
  endfunction

  function automatic int code_size(input logic [31:0] code, input int i);
    return int'(code[4*i +: 4]);
  endfunction

  // Bit position of the lowest bit of block i.
  function automatic int code_lo(input logic [31:0] code, input int i);
    int lo = 0;
    for (int k = 0; k < i; k++) lo += int'(code[4*k +: 4]);
    return lo;
  endfunction

endpackage
