// bk_tree - Brent-Kung parallel-prefix carry tree.
//
// Input: bit generate g[i] and propagate p[i]. Output: the group pairs
// gg[i] = G(i:0) and pp[i] = P(i:0) for every bit, from which the carry into
// bit i+1 is gg[i] (with any carry-in already folded into bit 0).
//
// The tree has two halves. The up-sweep forms, at level l, the spans of
// 2^(l+1) bits ending at bit positions i with (i+1) a multiple of 2^(l+1).
// The down-sweep then fills in the remaining positions, from the coarsest
// level to the finest, by combining each with the completed prefix just below
// its span. For N = 4 this gives exactly the four cells of the textbook 4-bit
// Brent-Kung network: (1:0) and (3:2), then (3:0), then (2:0). Any N >= 1 is
// accepted; N need not be a power of two.
//
// Bit 0 is its own prefix, so gg[0] = g[0] and pp[0] = p[0] are plain wires.
// The 4-bit cell pattern follows the published Brent-Kung example; the
// generalisation to any N is the standard recurrence.
// Purely combinational. Depth is 2*log2(N)-1 prefix cells.
module bk_tree
  import pp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  localparam int unsigned L = (N > 1) ? $clog2(N) : 1;

  always_comb begin
    gp_t node [N];
    for (int i = 0; i < N; i++) node[i] = '{g: g[i], p: p[i]};

    // Up-sweep: level l joins spans of 2^l into spans of 2^(l+1).
    for (int l = 0; l < int'(L); l++) begin
      for (int i = 0; i < int'(N); i++) begin
        if (((i + 1) % (2 << l)) == 0) node[i] = pp_combine(node[i], node[i - (1 << l)]);
      end
    end

    // Down-sweep: complete the prefixes that the up-sweep left partial.
    for (int l = int'(L) - 1; l >= 0; l--) begin
      for (int i = 0; i < int'(N); i++) begin
        if ((((i + 1) % (2 << l)) == (1 << l)) && ((i + 1) > (1 << l)))
          node[i] = pp_combine(node[i], node[i - (1 << l)]);
      end
    end

    for (int i = 0; i < N; i++) begin
      gg[i] = node[i].g;
      pp[i] = node[i].p;
    end
  end

endmodule
