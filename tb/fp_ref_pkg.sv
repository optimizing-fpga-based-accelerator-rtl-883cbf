// Reference single-precision arithmetic for the testbenches, built on the
// simulator's double-precision `real`: operands are widened exactly, the
// operation is done in double precision and the result rounded to single
// precision (nearest, ties to even) by bit manipulation. For one addition or
// multiplication this double rounding gives the correctly rounded result.
// Subnormals are flushed to zero, matching the datapath's convention.
package fp_ref_pkg;

  typedef logic [31:0] word_t;

  function automatic real f2r(word_t f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) d = {f[31], 63'd0};
    else d = {f[31], 11'({3'b000, f[30:23]} + 11'd896), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic word_t r2f(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] keep;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    keep = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || keep[0])) keep = keep + 1;
    if (keep[24]) begin
      keep = keep >> 1;
      e = e + 1;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), keep[22:0]};
  endfunction

  function automatic word_t fmul_ref(word_t a, word_t b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic word_t fadd_ref(word_t a, word_t b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // random value with magnitude in [2^-4, 2^5)
  function automatic word_t rand_fp();
    word_t v;
    v[31]    = 1'($urandom);
    v[30:23] = 8'(123 + ($urandom % 9));
    v[22:0]  = 23'($urandom);
    return v;
  endfunction

  // binary adder tree over the leaves, padded with +0 to a power of two,
  // pairing (0,1), (2,3), ... level by level
  function automatic word_t tree_ref(word_t leaves[$]);
    word_t lvl[$];
    word_t nxt[$];
    int p2 = 1;
    while (p2 < leaves.size()) p2 = p2 * 2;
    if (p2 < 2) p2 = 2;
    lvl = leaves;
    while (lvl.size() < p2) lvl.push_back(32'h0);
    while (lvl.size() > 1) begin
      nxt = {};
      for (int k = 0; k < lvl.size(); k += 2) nxt.push_back(fadd_ref(lvl[k], lvl[k+1]));
      lvl = nxt;
    end
    return lvl[0];
  endfunction

endpackage
