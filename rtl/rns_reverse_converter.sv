// rns_reverse_converter - residue-to-binary converter for {2^n-1, 2^n, 2^n+1}.
//
// Given residues r1 = X mod (2^n-1), r2 = X mod 2^n and r3 = X mod (2^n+1),
// it returns X in [0, (2^2n-1)*2^n). The low n bits of X are r2 itself. The
// upper 2n bits Y = floor(X / 2^n) follow from the Chinese remainder theorem
// for the pair {2^n-1, 2^n+1}:
//     Y = 2^(n-1) * [ (2^n+1)*r1 - 2*r2 - (2^n-1)*r3 ]  mod (2^2n - 1)
// Modulo 2^2n-1, a power-of-two factor is a rotation and negation is the
// bitwise complement, so the bracket is the sum of four 2n-bit vectors:
//     v1 = {r1, r1}                      = (2^n+1)*r1
//     v2 = ~{0..0, r2, 0}                = -2*r2
//     v3 = {0..0, r3}                    = r3
//     v4 = ~{r3[n-1:0], 0..0, r3[n]}     = -2^n*r3
// (r3 = 2^n sets only r3[n]; 2^2n = 1 puts that bit at position 0.)
// Two end-around-carry CSA levels reduce the four vectors to two, and a 2n-bit
// HMPE adds them with a single-zero result. The final factor 2^(n-1) is a
// rotation by n-1, which is wiring.
//
// Structure: CSA-EAC tree + HMPE. This is how a converter of the first class
// (CSA tree with EAC, then a modulo 2^k-1 adder) is meant to use the HMPE. The
// operand vectors are this design's own derivation.
//
// Inputs must be proper residues: r1 <= 2^n-2, r2 <= 2^n-1, r3 <= 2^n. The HMPE
// cannot see two all-ones operands here: that would need v3 to be all ones. So
// Y never takes the all-ones value. NR = n = 8 gives a 16-bit HMPE, the width
// of the evaluated adders. Purely combinational.
module rns_reverse_converter
  import pp_pkg::*;
#(
  parameter int unsigned NR   = 8,
  parameter tree_e       TREE = PP_KS
) (
  input  logic [NR-1:0]   r1,
  input  logic [NR-1:0]   r2,
  input  logic [NR:0]     r3,
  output logic [3*NR-1:0] x
);

  localparam int unsigned W = 2 * NR;

  logic [W-1:0] v1, v2, v3, v4;
  logic [W-1:0] s1, c1, s2, c2, w, y;

  assign v1 = {r1, r1};
  assign v2 = ~{{(NR-1){1'b0}}, r2, 1'b0};
  assign v3 = {{(NR-1){1'b0}}, r3};
  assign v4 = ~{r3[NR-1:0], {(NR-1){1'b0}}, r3[NR]};

  csa_eac #(.W(W)) u_csa1 (.x(v1), .y(v2), .z(v3), .s(s1), .c(c1));
  csa_eac #(.W(W)) u_csa2 (.x(s1), .y(c1), .z(v4), .s(s2), .c(c2));

  hmpe #(.N(W), .TREE(TREE)) u_hmpe (.a(s2), .b(c2), .cin(1'b0), .s_h(w));

  // Multiply by 2^(n-1) modulo 2^2n-1: rotate left by n-1.
  assign y = (NR > 1) ? ((w << (NR-1)) | (w >> (W-NR+1))) : w;

  assign x = {y, r2};

endmodule
