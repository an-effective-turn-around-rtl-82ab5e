// pp_pkg - types and the prefix operator shared by the parallel-prefix adders.
//
// A prefix adder works on (generate, propagate) pairs. Two adjacent groups
// combine with the associative prefix operator
//     G(i:j) = G(i:k) | P(i:k) & G(k-1:j)
//     P(i:j) = P(i:k) & P(k-1:j)
// A node that forms both halves is a "black cell"; one that only needs the
// generate half is a "gray cell". In this RTL every node forms both halves and
// synthesis removes the propagate logic nobody reads, so gray cells fall out of
// the netlist on their own.
//
// tree_e selects the prefix carry tree: Brent-Kung (fewest cells, low fan-out)
// or Kogge-Stone (log2(N) levels, fastest). Both are the trees the hybrid
// adders are built and compared with.
package pp_pkg;

  typedef enum logic {
    PP_BK = 1'b0,   // Brent-Kung prefix tree
    PP_KS = 1'b1    // Kogge-Stone prefix tree
  } tree_e;

  typedef struct packed {
    logic g;        // group generate
    logic p;        // group propagate
  } gp_t;

  // Prefix operator: hi covers the more significant bits, lo the bits below.
  function automatic gp_t pp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
