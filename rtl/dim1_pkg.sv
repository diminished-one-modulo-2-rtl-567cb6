// dim1_pkg -- shared types and operators for the diminished-one modulo 2^n+1
// adders.
//
// A bit position (or a group of bit positions) of a binary adder is described
// by a generate/propagate pair (g, p): the carry leaving it is g | (p & c_in).
// The prefix operator "o" composes two such pairs, the more significant one on
// the left:  (g_h, p_h) o (g_l, p_l) = (g_h | p_h & g_l, p_h & p_l).  It is
// associative but not commutative.
//
// The dual of a bit-level pair, (~p, ~g), describes the same bit as a map from
// the inverted incoming carry to the inverted outgoing carry (~c_out =
// ~p | ~g & ~c_in, which holds because g implies p at bit level).  The modulo
// 2^n+1 carry networks use dual pairs for the bits whose carry passes through
// the inverted end-around path.  The dual is taken only of bit-level pairs,
// never of composed ones, where g no longer implies p.
//
// Propagate is the inclusive OR a | b, not the exclusive OR, as in the
// adders this package serves.
package dim1_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Prefix operator: hi o lo.
  function automatic gp_t gp_op(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Dual of a bit-level pair: (g, p) -> (~p, ~g).
  function automatic gp_t gp_dual(gp_t x);
    gp_t r;
    r.g = ~x.p;
    r.p = ~x.g;
    return r;
  endfunction

endpackage
