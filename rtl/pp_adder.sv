// pp_adder - regular N-bit parallel-prefix adder.
//
// Three stages, as in every prefix adder:
//   preprocessing   g[i] = a[i] & b[i], p[i] = a[i] ^ b[i]
//   prefix tree     Brent-Kung or Kogge-Stone (parameter TREE) forms G(i:0)
//   postprocessing  s[i] = p[i] ^ c[i]
// The carry-in enters as the generate of an imaginary bit -1 whose propagate
// is zero; it is folded into the generate of bit 0 before the tree, so the
// carry into bit i+1 is simply the tree output gg[i].
//
// Besides the sum the adder exports the carry out G(N-1:0) (carry-in
// included) and the whole-word propagate P(N-1:0) = &(a ^ b). The hybrid
// modulo adder uses these two signals as its increment control.
//
// The three stages and the carry-in as generate of bit -1 follow the published
// equations; exporting P(N-1:0) and the carry out is what the hybrid adders need.
// Purely combinational.
module pp_adder
  import pp_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter tree_e       TREE = PP_BK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout,
  output logic         p_all
);

  logic [N-1:0] g, p, gin, gg, pp, c;

  // Preprocessing.
  assign g = a & b;
  assign p = a ^ b;

  // Carry-in folded into bit 0: G(0:-1) = g0 | p0 & cin.
  always_comb begin
    gin    = g;
    gin[0] = g[0] | (p[0] & cin);
  end

  // Prefix carry tree.
  if (TREE == PP_KS) begin : g_ks
    ks_tree #(.N(N)) u_tree (.g(gin), .p(p), .gg(gg), .pp(pp));
  end else begin : g_bk
    bk_tree #(.N(N)) u_tree (.g(gin), .p(p), .gg(gg), .pp(pp));
  end

  // Postprocessing.
  always_comb begin
    c[0] = cin;
    for (int i = 1; i < N; i++) c[i] = gg[i-1];
  end

  assign s     = p ^ c;
  assign cout  = gg[N-1];
  assign p_all = pp[N-1];

endmodule
