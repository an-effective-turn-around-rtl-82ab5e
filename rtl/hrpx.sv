// hrpx - hybrid regular parallel-prefix adder with XOR/OR upper part.
//
// s = (a + {ones(N-K), b}) mod 2^N: the second operand's upper N-K bits are
// the constant one, as happens in the final subtractor of some RNS reverse
// converters. The low K bits are added by a regular prefix adder (Brent-Kung
// by default, parameter TREE). In the upper bits a full adder with one input
// tied to 1 reduces to
//     s[i]   = ~(a[i] ^ c[i])      (XOR with the constant folded in)
//     c[i+1] =   a[i] | c[i]        (OR)
// so the upper part is a short XOR/OR ripple fed by the prefix adder's carry
// out. The carry out of bit N-1 is not needed and is dropped.
//
// Defaults N = 18 and K = 8 are the operand widths of the published example
// (a17..a0 against b7..b0). Purely combinational.
module hrpx
  import pp_pkg::*;
#(
  parameter int unsigned N    = 18,
  parameter int unsigned K    = 8,
  parameter tree_e       TREE = PP_BK
) (
  input  logic [N-1:0] a,
  input  logic [K-1:0] b,
  output logic [N-1:0] s
);

  logic [K-1:0] s_lo;
  logic         c_lo;
  logic         unused_p;
  logic [N:K]   c;

  pp_adder #(.N(K), .TREE(TREE)) u_lo (
    .a(a[K-1:0]), .b(b), .cin(1'b0), .s(s_lo), .cout(c_lo), .p_all(unused_p)
  );

  always_comb begin
    s[K-1:0] = s_lo;
    c[K]     = c_lo;
    for (int i = K; i < N; i++) begin
      s[i]   = ~(a[i] ^ c[i]);
      c[i+1] = a[i] | c[i];
    end
  end

endmodule
