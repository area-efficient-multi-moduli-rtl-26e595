// msq_pkg: shared types and elaboration-time geometry of the Booth-encoded
// multi-moduli squarers.
//
// The squarers compute A^2 modulo 2^N-1, 2^N or 2^N+1 (diminished-one, and in
// the four-moduli squarer also the normal representation).  The square of a
// radix-4 Booth-recoded operand is A^2 = sum 2^(4i) C_i + sum 2^(4i+3) P_i with
// C_i = A_i*A_i (bits at weights 4i and 4i+2) and P_i = A_i * Y_i, a two's
// complement term of N-1-2i bits starting at weight 4i+3.  Every such bit is
// called a partial-product (pp) bit here and is numbered k = 0 .. NPP-1:
//   k = 2i     : C_i bit 0 (|A_i| = 1)          weight 4i
//   k = 2i + 1 : C_i bit 2 (|A_i| = 2)          weight 4i+2
//   k >= N     : P_i bit j, P_0 first            weight 4i+3+j
// A bit of weight w >= N is folded into column w mod N.  The functions below
// decide, at elaboration, in which column and row of the reduction matrix
// each bit lands, how many rows the matrix has and which constant correction
// word each modulus needs.  Rows are packed so that the matrix has as many
// rows as its tallest column (the column heights of the folded matrix).
//
// The correction words follow from the bit folding rules (a folded bit of
// weight 2^(N+i) is worth 2^i modulo 2^N-1 and -2^i modulo 2^N+1), from the
// +1 that every inverted end-around-carry CSA adds modulo 2^N+1 (so each
// needs a -1 correction), and from the final diminished-one adder, which also
// adds 1.  They are worked out here rather than stored so that any even N is
// supported.  The 2^N-1 word (D5 at N = 8) and the four-moduli normal word
// (89) agree with the original description of the architecture; its
// diminished-one words (88..8 or 22..2) are one larger than the ones derived
// here (87 and 86 at N = 8), which are the ones that give correct results
// with the final adder of this design.
//
// Which bits fold and how (inversion, constants), the Booth terms, the Dadda
// reduction and the Kogge-Stone final adder follow the original description;
// the row packing, the mode encoding and the correction-word derivation are
// this design's own.
package msq_pkg;

  // Modulus select, f[1:0].  The encoding is this design's own choice.
  typedef enum logic [1:0] {
    MOD_M1   = 2'b00,  // modulo 2^N - 1
    MOD_POW2 = 2'b01,  // modulo 2^N
    MOD_DIM  = 2'b10,  // modulo 2^N + 1, diminished-one operand and result
    MOD_NORM = 2'b11   // modulo 2^N + 1, normal (N+1 bit) operand and result
  } msq_mode_e;

  // Number of C and P bits of an N-bit Booth-encoded squarer: N + N^2/4 - 1.
  function automatic int num_pp(input int n);
    return n + (n * n) / 4 - 1;
  endfunction

  // Width of the term P_i.
  function automatic int p_width(input int n, input int i);
    return n - 1 - 2 * i;
  endfunction

  // Offset of P_i inside the packed vector of all P bits.
  function automatic int p_offset(input int n, input int i);
    int off;
    off = 0;
    for (int t = 0; t < i; t++) off += p_width(n, t);
    return off;
  endfunction

  // Weight (bit position in the unreduced square) of pp bit k.
  function automatic int pp_weight(input int n, input int k);
    int r;
    if (k < n) return 4 * (k / 2) + 2 * (k % 2);
    r = k - n;
    for (int i = 0; i < n / 2 - 1; i++) begin
      if (r < p_width(n, i)) return 4 * i + 3 + r;
      r -= p_width(n, i);
    end
    return -1;
  endfunction

  // 1 when pp bit k is the sign bit of a P term.
  function automatic bit pp_is_msb(input int n, input int k);
    int r;
    if (k < n) return 1'b0;
    r = k - n;
    for (int i = 0; i < n / 2 - 1; i++) begin
      if (r < p_width(n, i)) return (r == p_width(n, i) - 1);
      r -= p_width(n, i);
    end
    return 1'b0;
  endfunction

  // Number of pp bits that fold into column c.
  function automatic int col_count(input int n, input int c);
    int cnt;
    cnt = 0;
    for (int k = 0; k < num_pp(n); k++)
      if (pp_weight(n, k) % n == c) cnt++;
    return cnt;
  endfunction

  // Rows of the folded matrix: tallest column, counting one correction bit
  // per column and, in the four-moduli squarer, one bit of <-2A>.
  function automatic int num_rows(input int n, input bit four);
    int h;
    h = 0;
    for (int c = 0; c < n; c++)
      if (col_count(n, c) > h) h = col_count(n, c);
    return h + 1 + (four ? 1 : 0);
  endfunction

  // What drives row r of column c: a pp bit index k >= 0, -1 for nothing
  // (constant 0), -2 for the correction bit t[c], -3 for the <-2A> bit.
  // pp bits fill a column from row 0 in index order; t and <-2A> follow.
  function automatic int cell_src(input int n, input bit four, input int r, input int c);
    int cnt;
    cnt = 0;
    for (int k = 0; k < num_pp(n); k++) begin
      if (pp_weight(n, k) % n == c) begin
        if (cnt == r) return k;
        cnt++;
      end
    end
    if (r == cnt) return -2;
    if (four && r == cnt + 1) return -3;
    return -1;
  endfunction

  // Dadda height sequence 2, 3, 4, 6, 9, 13, ...: largest member below h.
  function automatic int dadda_target(input int h);
    int d, nxt;
    d = 2;
    nxt = 3;
    while (nxt < h) begin
      d = nxt;
      nxt = (nxt * 3) / 2;
    end
    return d;
  endfunction

  // Row count of a CSA tree after l reduction levels.
  function automatic int tree_height(input int rows, input int l);
    int h;
    h = rows;
    for (int t = 0; t < l; t++) if (h > 2) h = dadda_target(h);
    return h;
  endfunction

  // Reduction levels needed to reach two rows.
  function automatic int tree_levels(input int rows);
    int l;
    l = 0;
    while (tree_height(rows, l) > 2) l++;
    return l;
  endfunction

  // Correction word modulo 2^N - 1: the inverted P sign bits stand for
  // -2^(2i+1) each, i = 0 .. N/2-2.
  function automatic logic [63:0] corr_m1(input int n);
    logic [63:0] m, s;
    m = (64'd1 << n) - 64'd1;
    s = 64'd0;
    for (int i = 0; i < n / 2 - 1; i++) s += (64'd1 << (2 * i + 1));
    return (m - (s % m)) % m;
  endfunction

  // Correction word modulo 2^N + 1, diminished-one.  Folded non-sign bits of
  // weight 2^(N+i) are inverted, each leaving -2^i; the CSA tree adds +1 per
  // CSA and the final adder +1 more; the result is to be <A^2 - 1>.
  function automatic logic [63:0] corr_dim(input int n, input bit four);
    logic [63:0] m, neg;
    int w;
    m = (64'd1 << n) + 64'd1;
    neg = 64'd0;
    for (int k = 0; k < num_pp(n); k++) begin
      w = pp_weight(n, k);
      if (w >= n && !pp_is_msb(n, k)) neg += (64'd1 << (w - n));
    end
    neg += 64'(num_rows(n, four) - 2) + 64'd2;
    return (m - (neg % m)) % m;
  endfunction

  // Correction word modulo 2^N + 1, normal representation: the diminished
  // word plus 3, the constant part of <-2A> (its vector is ~a[N-2:0], a[N-1]).
  function automatic logic [63:0] corr_norm(input int n);
    logic [63:0] m;
    m = (64'd1 << n) + 64'd1;
    return (corr_dim(n, 1'b1) + 64'd3) % m;
  endfunction

endpackage
