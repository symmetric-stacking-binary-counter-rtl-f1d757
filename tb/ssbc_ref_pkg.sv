// ssbc_ref_pkg -- reference model shared by the testbenches.
//
// ref_mult gives the product of the approximate multiplier without using
// its counter tree: the partial products of the lsb lowest columns are
// removed from the exact product a*b, and each of those columns is
// replaced by the OR of its partial products. Operands up to 64 bits.
package ssbc_ref_pkg;
  function automatic logic [127:0] ref_mult(logic [63:0] a, logic [63:0] b,
                                            int n, int lsb);
    logic [127:0] full, lowsum, orbits;
    int ones;
    full   = 128'(a) * 128'(b);
    lowsum = '0;
    orbits = '0;
    for (int c = 0; c < lsb; c++) begin
      ones = 0;
      for (int i = 0; i < n; i++) begin
        if (c - i >= 0 && c - i < n) if (a[i] && b[c-i]) ones++;
      end
      lowsum += 128'(ones) << c;
      if (ones > 0) orbits[c] = 1'b1;
    end
    return (full - lowsum) | orbits;
  endfunction
endpackage
