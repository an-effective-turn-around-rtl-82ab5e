// excess_one_unit - conditional increment that closes a modulo 2^N-1 adder.
//
// The increment control is P(N-1:0) | G(N-1:0) from the prefix adder before
// it. When it is set, s_out = s + 1 (mod 2^N); otherwise s_out = s. The
// increment is the binary-to-excess-one structure: a chain of AND gates forms
// the carry into each bit (c[0] = control, c[i+1] = c[i] & s[i]) and an XOR
// per bit applies it (s_out[i] = s[i] ^ c[i]).
//
// Why this gives a single-zero modulo 2^N-1 result: adding 1 when the carry
// out G is set is the end-around carry. Adding 1 when the operands are
// bitwise complementary (P set, sum = 2^N-1) turns the all-ones pattern, the
// second encoding of zero, into 0.
//
// The control P|G and the ripple AND/XOR incrementer follow the published
// circuit; a synthesis tool is free to restructure the chain. Purely combinational.
module excess_one_unit #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s,
  input  logic         p_all,
  input  logic         g_all,
  output logic [N-1:0] s_out
);

  always_comb begin
    logic c;                  // carry into the current bit
    c = p_all | g_all;
    for (int i = 0; i < N; i++) begin
      s_out[i] = s[i] ^ c;
      c        = c & s[i];
    end
  end

endmodule
