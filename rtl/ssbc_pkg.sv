// ssbc_pkg -- reduction schedule of the stacking-counter Wallace tree.
//
// The multiplier's partial-product matrix is described by one height per
// column (how many bits of that weight are still to be added). Every
// reduction stage treats each column alike:
//   - as many 7:3 counters as fit (h / 7),
//   - of the remainder r = h % 7: one 6:3 counter if r = 6, one 3:2 counter
//     if 3 <= r <= 5, then one 2:2 counter if two bits are still left,
//   - a single leftover bit is passed on unchanged.
// A counter in column c puts its outputs in columns c, c+1 and c+2. Stages
// are added until no column holds more than two bits; a carry-propagate
// adder then adds the two remaining rows.
//
// The functions below compute that schedule while the design elaborates.
// Heights are kept HW bits wide in one packed vector, column c at
// [c*HW +: HW]. The bits of a column are laid out, in every stage, as:
// passed bit first, then the sum outputs of the column's own counters,
// then the carry outputs of column c-1's counters, then the second carry
// outputs of column c-2's 7:3 and 6:3 counters.
package ssbc_pkg;

  localparam int unsigned HW       = 10;   // bits per column height
  localparam int unsigned MAX_COLS = 512;  // supports operands up to 256 bits

  typedef logic [MAX_COLS*HW-1:0] heights_t;

  function automatic int unsigned hget(heights_t v, int unsigned c);
    return int'(v[c*HW +: HW]);
  endfunction

  function automatic int unsigned n73(int unsigned h);
    return h / 7;
  endfunction

  function automatic int unsigned n63(int unsigned h);
    return ((h % 7) == 6) ? 1 : 0;
  endfunction

  function automatic int unsigned n32(int unsigned h);
    return ((h % 7) >= 3 && (h % 7) <= 5) ? 1 : 0;
  endfunction

  function automatic int unsigned n22(int unsigned h);
    return ((h % 7) - 6 * n63(h) - 3 * n32(h) == 2) ? 1 : 0;
  endfunction

  // Bits passed to the next stage unchanged (0 or 1).
  function automatic int unsigned npass(int unsigned h);
    return (h % 7) - 6 * n63(h) - 3 * n32(h) - 2 * n22(h);
  endfunction

  // Counters in a column: each gives a sum and a first carry bit.
  function automatic int unsigned ncnt(int unsigned h);
    return n73(h) + n63(h) + n32(h) + n22(h);
  endfunction

  // Counters that also give a second carry (7:3 and 6:3).
  function automatic int unsigned ncnt3(int unsigned h);
    return n73(h) + n63(h);
  endfunction

  // Column heights of the partial-product matrix of an n x n multiplier.
  // Columns below lsb are left out of the tree (approximated elsewhere).
  function automatic heights_t initial_heights(int unsigned n, int unsigned lsb);
    heights_t v = '0;
    for (int unsigned c = 0; c + 1 < 2 * n; c++) begin
      if (c >= lsb) begin
        v[c*HW +: HW] = HW'((c < n) ? c + 1 : 2 * n - 1 - c);
      end
    end
    return v;
  endfunction

  // Heights after one stage. Outputs above column cols-1 are dropped: in
  // an n x n product with cols = 2n they are always zero.
  function automatic heights_t next_heights(heights_t v, int unsigned cols);
    heights_t nv = '0;
    int unsigned h;
    int unsigned acc [3];
    for (int unsigned c = 0; c < cols; c++) begin
      h = hget(v, c);
      acc[0] = npass(h) + ncnt(h);
      acc[1] = (c >= 1) ? ncnt(hget(v, c - 1)) : 0;
      acc[2] = (c >= 2) ? ncnt3(hget(v, c - 2)) : 0;
      nv[c*HW +: HW] = HW'(acc[0] + acc[1] + acc[2]);
    end
    return nv;
  endfunction

  function automatic int unsigned max_height(heights_t v, int unsigned cols);
    int unsigned m = 0;
    for (int unsigned c = 0; c < cols; c++) begin
      if (hget(v, c) > m) m = hget(v, c);
    end
    return m;
  endfunction

  // Number of reduction stages until every column has at most two bits.
  function automatic int unsigned num_stages(int unsigned n, int unsigned lsb);
    heights_t v = initial_heights(n, lsb);
    int unsigned s = 0;
    while (max_height(v, 2 * n) > 2 && s < 64) begin
      v = next_heights(v, 2 * n);
      s++;
    end
    return s;
  endfunction

  // Column heights entering stage s (s = 0: the partial products).
  function automatic heights_t stage_heights(int unsigned n, int unsigned lsb,
                                             int unsigned s);
    heights_t v = initial_heights(n, lsb);
    for (int unsigned i = 0; i < s; i++) v = next_heights(v, 2 * n);
    return v;
  endfunction

  // Index of the first bit of column c in a stage's flat bit vector; with
  // c = cols it is the total number of bits of the stage.
  function automatic int unsigned col_offset(heights_t v, int unsigned c);
    int unsigned o = 0;
    for (int unsigned i = 0; i < c; i++) o += hget(v, i);
    return o;
  endfunction

endpackage
