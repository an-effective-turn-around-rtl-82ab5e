// csa_eac - carry-save adder modulo 2^W-1 (end-around carry).
//
// Reduces three W-bit operands to two: s is the bitwise sum x^y^z, c the
// majority carries shifted up one place, with the carry out of bit W-1
// wrapped round to bit 0. Because 2^W = 1 (mod 2^W-1), the wrap keeps the
// value: x + y + z = s + c (mod 2^W-1). No carry ripples; the delay is one
// full adder whatever W is.
//
// The CSA with end-around carry is only named in the source; this is the
// standard circuit, and the width is this design's choice.
// A tree of these followed by one two-operand modulo 2^W-1 adder is the
// usual shape of an RNS reverse converter. Purely combinational.
module csa_eac #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-1:0] maj;

  assign s   = x ^ y ^ z;
  assign maj = (x & y) | (x & z) | (y & z);
  assign c   = {maj[W-2:0], maj[W-1]};

endmodule
