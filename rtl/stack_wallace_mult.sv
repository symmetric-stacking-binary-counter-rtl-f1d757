// stack_wallace_mult -- unsigned multiplier with a stacking-counter
// Wallace tree and an approximated low part.
//
// Fast multiplication in three steps:
//   1. Partial products: a[i] & b[j] is a bit of weight i+j.
//   2. Reduction: the columns of partial products are compressed stage by
//      stage with 7:3 and 6:3 symmetric stacking counters, plus a 3:2 and a
//      2:2 counter for small leftovers, until every column holds at most
//      two bits. The schedule (how many counters of each kind per column
//      and stage, and where every output lands) is computed at elaboration
//      by ssbc_pkg, so the tree follows N.
//   3. Final carry-propagate addition of the two remaining rows.
// Approximate computing: the APPROX_LSB lowest product columns are not
// added at all. Product bit c there is the OR of that column's partial
// products -- the top bit of the column's bit stack, "at least one 1" --
// and no carry leaves those columns. The upper product bits are the exact
// sum of the remaining columns, so the result is never above a*b and
// APPROX_LSB = 0 gives the exact product.
//
// Follows the description: counter-based Wallace tree with 7:3 and 6:3
// stacking counters, approximated LSB part, N = 64 (the smaller of the two
// widths named). This design's own choices: unsigned operands, the
// counter allocation rule, OR as the approximation, APPROX_LSB = N/8, and
// a plain '+' as the final adder.
//
// Interface: a, b  N-bit unsigned operands; p  2N-bit product.
// Timing: purely combinational.
module stack_wallace_mult
  import ssbc_pkg::*;
#(
  parameter int unsigned N          = 64,
  parameter int unsigned APPROX_LSB = N / 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned COLS = 2 * N;
  localparam int unsigned NST  = num_stages(N, APPROX_LSB);
  localparam heights_t    H0   = stage_heights(N, APPROX_LSB, 0);
  localparam heights_t    HF   = stage_heights(N, APPROX_LSB, NST);
  localparam int unsigned T0   = col_offset(H0, COLS);
  localparam int unsigned TF   = col_offset(HF, COLS);

  initial begin
    assert (N >= 2) else $error("stack_wallace_mult: N must be at least 2");
    assert (APPROX_LSB + 1 < 2 * N)
      else $error("stack_wallace_mult: APPROX_LSB leaves no exact column");
  end

  // ---------------------------------------------------------------- step 1
  logic [T0-1:0] pp;        // partial products of the exact columns
  logic [COLS-1:0] low;     // approximated columns (only [APPROX_LSB-1:0] used)

  for (genvar c = 0; c < COLS; c++) begin : g_pp
    localparam int unsigned ILO = (c >= N) ? c - N + 1 : 0;
    localparam int unsigned IHI = (c < N) ? c : N - 1;
    if (c + 1 < COLS) begin : g_col
      logic [IHI-ILO:0] col;
      for (genvar i = ILO; i <= IHI; i++) begin : g_bit
        assign col[i-ILO] = a[i] & b[c-i];
      end
      if (c >= APPROX_LSB) begin : g_exact
        assign pp[col_offset(H0, c) +: IHI-ILO+1] = col;
        assign low[c] = 1'b0;
      end else begin : g_approx
        assign low[c] = |col;
      end
    end else begin : g_top
      assign low[c] = 1'b0;
    end
  end

  // ---------------------------------------------------------------- step 2
  for (genvar s = 0; s < NST; s++) begin : g_st
    localparam heights_t    HC = stage_heights(N, APPROX_LSB, s);
    localparam heights_t    HN = next_heights(HC, COLS);
    localparam int unsigned TC = col_offset(HC, COLS);
    localparam int unsigned TN = col_offset(HN, COLS);

    logic [TC-1:0] cur;
    logic [TN-1:0] nxt;

    if (s == 0) begin : g_in0
      assign cur = pp;
    end else begin : g_in
      assign cur = g_st[s-1].nxt;
    end

    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned H    = hget(HC, c);
      localparam int unsigned H1   = (c + 1 < COLS) ? hget(HC, c + 1) : 0;
      localparam int unsigned H2   = (c + 2 < COLS) ? hget(HC, c + 2) : 0;
      localparam int unsigned BASE = col_offset(HC, c);
      localparam int unsigned A7   = n73(H);
      localparam int unsigned A6   = n63(H);
      localparam int unsigned A3   = n32(H);
      localparam int unsigned A2   = n22(H);
      localparam int unsigned PASS = npass(H);
      // First bit, in the next stage, of this column's sum outputs, of its
      // first carries (column c+1) and of its second carries (column c+2).
      localparam int unsigned D0 = col_offset(HN, c) + PASS;
      localparam int unsigned D1 = (c + 1 < COLS) ?
          col_offset(HN, c + 1) + npass(H1) + ncnt(H1) : 0;
      localparam int unsigned D2 = (c + 2 < COLS) ?
          col_offset(HN, c + 2) + npass(H2) + ncnt(H2) + ncnt(H1) : 0;

      if (PASS == 1) begin : g_pass
        assign nxt[col_offset(HN, c)] = cur[BASE + H - 1];
      end

      for (genvar j = 0; j < A7; j++) begin : g_c73
        logic [2:0] cnt;
        counter73 u_cnt (.x(cur[BASE + 7*j +: 7]), .count(cnt));
        assign nxt[D0 + j] = cnt[0];
        if (c + 1 < COLS) begin : g_c1
          assign nxt[D1 + j] = cnt[1];
        end
        if (c + 2 < COLS) begin : g_c2
          assign nxt[D2 + j] = cnt[2];
        end
      end

      if (A6 == 1) begin : g_c63
        logic [2:0] cnt;
        counter63 u_cnt (.x(cur[BASE + 7*A7 +: 6]), .count(cnt));
        assign nxt[D0 + A7] = cnt[0];
        if (c + 1 < COLS) begin : g_c1
          assign nxt[D1 + A7] = cnt[1];
        end
        if (c + 2 < COLS) begin : g_c2
          assign nxt[D2 + A7] = cnt[2];
        end
      end

      if (A3 == 1) begin : g_c32
        logic [1:0] cnt;
        counter32 u_cnt (.x(cur[BASE + 7*A7 +: 3]), .count(cnt));
        assign nxt[D0 + A7] = cnt[0];
        if (c + 1 < COLS) begin : g_c1
          assign nxt[D1 + A7] = cnt[1];
        end
      end

      if (A2 == 1) begin : g_c22
        logic [1:0] cnt;
        counter22 u_cnt (.x(cur[BASE + 7*A7 + 6*A6 + 3*A3 +: 2]),
                         .count(cnt));
        assign nxt[D0 + A7 + A6 + A3] = cnt[0];
        if (c + 1 < COLS) begin : g_c1
          assign nxt[D1 + A7 + A6 + A3] = cnt[1];
        end
      end
    end
  end

  // ---------------------------------------------------------------- step 3
  logic [TF-1:0]   fin;
  logic [COLS-1:0] row_a, row_b, upper;

  if (NST == 0) begin : g_fin0
    assign fin = pp;
  end else begin : g_fin
    assign fin = g_st[NST-1].nxt;
  end

  for (genvar c = 0; c < COLS; c++) begin : g_rows
    localparam int unsigned H   = hget(HF, c);
    localparam int unsigned OFF = col_offset(HF, c);
    if (H >= 1) begin : g_a
      assign row_a[c] = fin[OFF];
    end else begin : g_a0
      assign row_a[c] = 1'b0;
    end
    if (H >= 2) begin : g_b
      assign row_b[c] = fin[OFF + 1];
    end else begin : g_b0
      assign row_b[c] = 1'b0;
    end
  end

  assign upper = row_a + row_b;

  if (APPROX_LSB == 0) begin : g_exact_out
    assign p = upper;
  end else begin : g_approx_out
    assign p = {upper[COLS-1:APPROX_LSB], low[APPROX_LSB-1:0]};
  end
endmodule
