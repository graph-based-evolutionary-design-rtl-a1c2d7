// egg_pkg: types and elaboration-time functions shared by the counter-tree
// arithmetic circuits.
//
// Every operand of a counter tree is a bit vector in a positional number system.
// Two per-bit attributes travel with it as parameters, never as signals:
//   * the active mask: which digit positions can be non-zero (inactive ones are
//     constant 0 and generate no logic), and
//   * the sign mask: a 1 marks a digit of negative weight (signed-weight, SW,
//     representation), so the vector stands for sum_i (+/-) v[i] * 2^i.
// The functions below propagate both masks through a 3-2 counter node, recode a
// constant coefficient into canonic signed-digit (CSD) form and lay out the
// Wallace-style reduction tree of the constant-coefficient multiplier. They are
// only evaluated at elaboration time.
package egg_pkg;

  // Widest vector the mask functions handle.
  localparam int unsigned MAXW = 64;
  // Most operands at any level of a multiplier tree (a 31-bit coefficient has
  // at most 16 non-zero CSD digits).
  localparam int unsigned MAXOPS = 32;

  typedef logic [MAXW-1:0] mask_t;

  // Mask with the low w bits set.
  function automatic mask_t low_mask(int unsigned w);
    mask_t m;
    m = '0;
    for (int unsigned i = 0; i < MAXW; i++)
      if (i < w) m[i] = 1'b1;
    return m;
  endfunction

  // One bit as a count of 0 or 1.
  function automatic int unsigned b2i(logic b);
    return b ? 1 : 0;
  endfunction

  // Number of active inputs at digit i of a 3-2 counter.
  function automatic int unsigned n_active(mask_t aa, mask_t ab, mask_t ac, int unsigned i);
    return b2i(aa[i]) + b2i(ab[i]) + b2i(ac[i]);
  endfunction

  // Active mask of the carry output: a carry leaves digit i (towards i+1) only
  // where a half or a full adder sits, i.e. where two or three inputs are active.
  function automatic mask_t c_active(mask_t aa, mask_t ab, mask_t ac);
    mask_t m;
    m = '0;
    for (int unsigned i = 0; i + 1 < MAXW; i++)
      if (n_active(aa, ab, ac, i) >= 2) m[i+1] = 1'b1;
    return m;
  endfunction

  // Active mask of the sum output: every position with at least one input.
  function automatic mask_t s_active(mask_t aa, mask_t ab, mask_t ac);
    return aa | ab | ac;
  endfunction

  // Majority sign at digit i of a signed-weight counter: 1 (negative) when the
  // negative active inputs outnumber the positive ones, else 0 (ties go to +).
  function automatic logic maj_sign(mask_t aa, mask_t ab, mask_t ac,
                                    mask_t sa, mask_t sb, mask_t sc, int unsigned i);
    int unsigned nn, np;
    nn = b2i(aa[i] & sa[i]) + b2i(ab[i] & sb[i]) + b2i(ac[i] & sc[i]);
    np = n_active(aa, ab, ac, i) - nn;
    return (nn > np);
  endfunction

  // Sign mask of the carry output: the carry takes the majority sign.
  function automatic mask_t c_sign(mask_t aa, mask_t ab, mask_t ac,
                                   mask_t sa, mask_t sb, mask_t sc);
    mask_t m;
    m = '0;
    for (int unsigned i = 0; i + 1 < MAXW; i++)
      if (n_active(aa, ab, ac, i) >= 2) m[i+1] = maj_sign(aa, ab, ac, sa, sb, sc, i);
    return m;
  endfunction

  // Sign mask of the sum output: majority sign when all active inputs agree,
  // the opposite (minority) sign when they are mixed.
  function automatic mask_t s_sign(mask_t aa, mask_t ab, mask_t ac,
                                   mask_t sa, mask_t sb, mask_t sc);
    mask_t m;
    logic  mj, mixed;
    int unsigned nn, n;
    m = '0;
    for (int unsigned i = 0; i < MAXW; i++) begin
      n  = n_active(aa, ab, ac, i);
      nn = b2i(aa[i] & sa[i]) + b2i(ab[i] & sb[i]) + b2i(ac[i] & sc[i]);
      mj = maj_sign(aa, ab, ac, sa, sb, sc, i);
      mixed = (nn != 0) && (nn != n);
      if (n >= 1) m[i] = mixed ? ~mj : mj;
    end
    return m;
  endfunction

  // ---------------------------------------------------------------------------
  // CSD recoding. Digit k of r in {-1, 0, +1}; no two adjacent digits non-zero.
  // ---------------------------------------------------------------------------
  function automatic mask_t csd_pos(int unsigned r);
    mask_t m;
    longint unsigned v;
    m = '0;
    v = 64'(r);
    for (int unsigned k = 0; k < MAXW; k++) begin
      if (v[0]) begin
        if (v[1]) v = v + 1;        // ...11 -> digit -1, carry into the rest
        else begin
          m[k] = 1'b1;              // ...01 -> digit +1
          v = v - 1;
        end
      end
      v = v >> 1;
    end
    return m;
  endfunction

  function automatic mask_t csd_neg(int unsigned r);
    mask_t m;
    longint unsigned v;
    m = '0;
    v = 64'(r);
    for (int unsigned k = 0; k < MAXW; k++) begin
      if (v[0]) begin
        if (v[1]) begin
          m[k] = 1'b1;
          v = v + 1;
        end else v = v - 1;
      end
      v = v >> 1;
    end
    return m;
  endfunction

  // Number of non-zero CSD digits of r.
  function automatic int unsigned csd_weight(int unsigned r);
    return $countones(csd_pos(r) | csd_neg(r));
  endfunction

  // Position of the k-th (from the least significant) non-zero CSD digit.
  function automatic int unsigned csd_nth_pos(int unsigned r, int unsigned k);
    mask_t nz;
    int unsigned seen;
    nz = csd_pos(r) | csd_neg(r);
    seen = 0;
    for (int unsigned i = 0; i < MAXW; i++)
      if (nz[i]) begin
        if (seen == k) return i;
        seen++;
      end
    return 0;
  endfunction

  // ---------------------------------------------------------------------------
  // Multiplier reduction tree. Level 0 holds one partial product per non-zero
  // CSD digit d_k: x shifted left by k, every digit carrying the sign of d_k.
  // Each level groups its operands in threes from index 0 upwards; group j
  // becomes a signed-weight 3-2 counter whose carry is operand 2j and whose sum
  // is operand 2j+1 of the next level; the one or two left over pass straight
  // down. Levels are added until at most two operands remain.
  // ---------------------------------------------------------------------------
  typedef enum logic [1:0] {TREE_ACT, TREE_SGN} tree_attr_e;

  function automatic int unsigned tree_nops(int unsigned r, int unsigned level);
    int unsigned n;
    n = csd_weight(r);
    for (int unsigned l = 0; l < level; l++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int unsigned tree_levels(int unsigned r);
    int unsigned n, l;
    n = csd_weight(r);
    l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      l++;
    end
    return l;
  endfunction

  // Active or sign mask of operand idx at the given level, for an n_bits-wide
  // input and iw-bit internal vectors (higher digits are dropped, which is
  // exact modulo 2^iw). With x_signed the input is two's complement: its top
  // digit has negative weight, so that digit's sign flips in every partial
  // product.
  function automatic mask_t tree_mask(int unsigned r, int unsigned n_bits,
                                      int unsigned iw, int unsigned level,
                                      int unsigned idx, tree_attr_e attr,
                                      bit x_signed = 1'b0);
    mask_t act [MAXOPS];
    mask_t sgn [MAXOPS];
    mask_t nact [MAXOPS];
    mask_t nsgn [MAXOPS];
    mask_t neg, iwm;
    int unsigned n, g, p;
    neg = csd_neg(r);
    iwm = low_mask(iw);
    n   = csd_weight(r);
    for (int unsigned k = 0; k < MAXOPS; k++) begin
      act[k] = '0;
      sgn[k] = '0;
      nact[k] = '0;
      nsgn[k] = '0;
    end
    for (int unsigned k = 0; k < MAXOPS; k++)
      if (k < n) begin
        p = csd_nth_pos(r, k);
        act[k] = (low_mask(n_bits) << p) & iwm;
        sgn[k] = neg[p] ? act[k] : '0;
        if (x_signed && (p + n_bits - 1 < iw)) sgn[k] = sgn[k] ^ (mask_t'(1) << (p + n_bits - 1));
      end
    for (int unsigned l = 0; l < level; l++) begin
      g = n / 3;
      for (int unsigned k = 0; k < MAXOPS; k++) begin
        nact[k] = '0;
        nsgn[k] = '0;
      end
      for (int unsigned j = 0; j < MAXOPS / 3; j++)
        if (j < g) begin
          nact[2*j]   = c_active(act[3*j], act[3*j+1], act[3*j+2]) & iwm;
          nsgn[2*j]   = c_sign(act[3*j], act[3*j+1], act[3*j+2],
                               sgn[3*j], sgn[3*j+1], sgn[3*j+2]) & iwm;
          nact[2*j+1] = s_active(act[3*j], act[3*j+1], act[3*j+2]);
          nsgn[2*j+1] = s_sign(act[3*j], act[3*j+1], act[3*j+2],
                               sgn[3*j], sgn[3*j+1], sgn[3*j+2]);
        end
      for (int unsigned k = 0; k < 2; k++)
        if (k < n % 3) begin
          nact[2*g+k] = act[3*g+k];
          nsgn[2*g+k] = sgn[3*g+k];
        end
      for (int unsigned k = 0; k < MAXOPS; k++) begin
        act[k] = nact[k];
        sgn[k] = nsgn[k];
      end
      n = 2 * g + (n % 3);
    end
    if (idx >= n) return '0;
    return (attr == TREE_ACT) ? act[idx] : sgn[idx];
  endfunction

endpackage
