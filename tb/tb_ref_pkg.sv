// tb_ref_pkg: reference arithmetic for the testbenches, written independently of
// the RTL. Multiplication in GF(2^m) is done as a full carry-less product followed
// by long division by the field polynomial (the RTL reduces after every shift).
package tb_ref_pkg;

  function automatic int unsigned ref_poly(int unsigned m);
    case (m)
      2:       return 'h7;
      3:       return 'hB;
      4:       return 'h13;
      5:       return 'h25;
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned ref_gfmul(int unsigned a, int unsigned b, int unsigned m);
    int unsigned prod;
    prod = 0;
    for (int i = 0; i < 16; i++)
      if ((b >> i) & 1) prod ^= (a << i);
    for (int i = 31; i >= int'(m); i--)
      if ((prod >> i) & 1) prod ^= (ref_poly(m) << (i - int'(m)));
    return prod;
  endfunction

  // Bin of column y holding the word at address {x0, x1}.
  function automatic int unsigned ref_bin(int unsigned x0, int unsigned x1, int unsigned y,
                                          int unsigned n0, int unsigned n1);
    return x0 ^ ref_gfmul(x1 << (n0 - n1), y, n0);
  endfunction

endpackage
