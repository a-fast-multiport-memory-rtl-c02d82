// mpmem_pkg: shared constants and Galois-field helpers of the dual-port memory.
//
// The bin addressing of the memory works in GF(2^m), where m is the width of the
// bin index (n0). A field element is an m-bit vector of polynomial coefficients,
// bit i being the coefficient of x^i. Addition is bitwise XOR; multiplication is
// carry-less polynomial multiplication reduced modulo a primitive polynomial of
// degree m. The choice of polynomial is this design's own: any irreducible
// polynomial of degree m gives a field, and the unit-overlap property only needs
// a field. The table covers m = 1 to 16.
package mpmem_pkg;

  localparam int unsigned GF_MAX_M = 16;

  // Primitive polynomial of degree m, including the x^m term (0 for an unsupported m).
  function automatic logic [31:0] gf_poly(int unsigned m);
    if (m > GF_MAX_M) return 32'h0000_0000;
    case (m)
      1:       return 32'h0000_0003;  // x + 1
      2:       return 32'h0000_0007;  // x^2 + x + 1
      3:       return 32'h0000_000B;  // x^3 + x + 1
      4:       return 32'h0000_0013;  // x^4 + x + 1
      5:       return 32'h0000_0025;  // x^5 + x^2 + 1
      6:       return 32'h0000_0043;  // x^6 + x + 1
      7:       return 32'h0000_0083;  // x^7 + x + 1
      8:       return 32'h0000_011D;  // x^8 + x^4 + x^3 + x^2 + 1
      9:       return 32'h0000_0211;  // x^9 + x^4 + 1
      10:      return 32'h0000_0409;  // x^10 + x^3 + 1
      11:      return 32'h0000_0805;  // x^11 + x^2 + 1
      12:      return 32'h0000_1053;  // x^12 + x^6 + x^4 + x + 1
      13:      return 32'h0000_201B;  // x^13 + x^4 + x^3 + x + 1
      14:      return 32'h0000_4443;  // x^14 + x^10 + x^6 + x + 1
      15:      return 32'h0000_8003;  // x^15 + x + 1
      16:      return 32'h0001_100B;  // x^16 + x^12 + x^3 + x + 1
      default: return 32'h0000_0000;
    endcase
  endfunction

  // Product of a and b in GF(2^m) (shift-and-add, reducing after every shift).
  // When one operand is a constant, synthesis folds this into a fixed XOR network.
  function automatic logic [31:0] gf_mul(logic [31:0] a, logic [31:0] b, int unsigned m);
    logic [31:0] poly;
    logic [31:0] acc;
    logic [31:0] sh;
    poly = gf_poly(m);
    acc  = '0;
    sh   = a;
    for (int unsigned i = 0; i < m; i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = sh << 1;
      if (sh[m]) sh = sh ^ poly;
    end
    return acc;
  endfunction

endpackage
