// hmpe - hybrid modulo 2^N-1 adder with parallel prefix and excess-one unit.
//
// s_h = (a + b + cin) mod (2^N - 1), zero encoded as all zeros (cin = 1: see below).
// A regular prefix adder (Brent-Kung or Kogge-Stone, parameter TREE) adds the
// operands; its carry out G(N-1:0) and whole-word propagate P(N-1:0) form the
// control that the excess-one unit uses to add one more. This replaces the
// end-around-carry carry-propagate adder of a modulo 2^N-1 datapath: there is
// no second carry pass through the tree and no all-ones detector.
//
// Operand range: a and b are residues in [0, 2^N-2]. With cin = 0 the result
// is always in [0, 2^N-2]. The published structure has no carry-in; the
// evaluated 16-bit adders have a cin port but are shown only with cin = 0.
// Here cin enters the prefix adder as a plain carry-in (this design's
// choice). The result is always congruent to a+b+cin mod 2^N-1; in the one
// case a+b = 2^N-2, cin = 1, it is all ones, the second encoding of zero.
//
// Default N = 16 and the ports a, b, cin, s_h match the published 16-bit
// adders. Purely combinational.
module hmpe
  import pp_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter tree_e       TREE = PP_KS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s_h
);

  logic [N-1:0] s;
  logic         g_all, p_all;

  pp_adder #(.N(N), .TREE(TREE)) u_add (
    .a(a), .b(b), .cin(cin), .s(s), .cout(g_all), .p_all(p_all)
  );

  excess_one_unit #(.N(N)) u_eo (
    .s(s), .p_all(p_all), .g_all(g_all), .s_out(s_h)
  );

endmodule
