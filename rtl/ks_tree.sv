// ks_tree - Kogge-Stone parallel-prefix carry tree.
//
// Input: bit generate g[i] and propagate p[i]. Output: the group pairs
// gg[i] = G(i:0) and pp[i] = P(i:0) for every bit.
//
// At level l every bit i >= 2^l combines its current span with the span of
// bit i-2^l, so after ceil(log2(N)) levels every bit holds the prefix down to
// bit 0. This is the minimum-depth tree with fan-out of two per cell, at the
// cost of about N*log2(N) cells and long wires.
//
// Bit 0 is its own prefix, so gg[0] = g[0] and pp[0] = p[0] are plain wires.
// The Kogge-Stone tree is named as one of the two trees the hybrid adders are
// built with; its wiring here is the standard one.
// Purely combinational. Depth is ceil(log2(N)) prefix cells.
module ks_tree
  import pp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  always_comb begin
    gp_t node [N];
    gp_t prev [N];
    for (int i = 0; i < N; i++) node[i] = '{g: g[i], p: p[i]};

    for (int d = 1; d < int'(N); d = d * 2) begin
      prev = node;
      for (int i = d; i < int'(N); i++) node[i] = pp_combine(prev[i], prev[i - d]);
    end

    for (int i = 0; i < N; i++) begin
      gg[i] = node[i].g;
      pp[i] = node[i].p;
    end
  end

endmodule
