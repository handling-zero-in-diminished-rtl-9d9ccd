// dimone_pkg -- types and operators shared by the diminished-one modulo 2^n+1 adders.
//
// Every adder here works on (generate, propagate) pairs. gp_op() is the usual
// carry operator  (g_h,p_h) o (g_l,p_l) = (g_h | p_h&g_l, p_h&p_l), with the
// more significant pair on the left; it is the "black circle" cell of the prefix
// drawings. gp_dual() is the pair that the diminished-one adders need when a
// group is re-entered with an inverted carry: read as a function of its carry
// input c, a pair computes g | p&c; the dual computes not(g | p & not c), which
// is the pair (not g & not p, not g). For a single bit, not g & not p is not t,
// where t = a|b, so the dual of a bit cell is (not t_i, not g_i), the extra
// output of the shaded input cell in the totally parallel-prefix drawing.
// Taking the dual commutes with gp_op(), which is what lets a prefix tree carry
// the re-entering carry through every level.
package dimone_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  function automatic gp_t gp_op(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  function automatic gp_t gp_dual(gp_t x);
    gp_t r;
    r.g = ~x.g & ~x.p;
    r.p = ~x.g;
    return r;
  endfunction

  // Number of prefix levels for an n-bit tree: ceil(log2 n), at least 1.
  function automatic int unsigned prefix_levels(int unsigned n);
    int unsigned l;
    l = 0;
    while ((1 << l) < n) l++;
    return (l == 0) ? 1 : l;
  endfunction

endpackage
