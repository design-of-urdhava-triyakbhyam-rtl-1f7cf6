// Special adder: a four-input one-bit adder (a 4:3 counter).
//
// It adds four bits A, B, C, D of the same weight and returns the count as
// {c1, c0, sum}: sum has weight 1, c0 (the carry LSB) weight 2 and c1 (the
// carry MSB) weight 4. It replaces two cascaded full adders in column 3 of the
// 4x4 Vedic multiplier, where four partial products meet.
//
// sum = A^B^C^D is the specified sum bit. The carry bits are this design's
// own gate form of the specified function: c1 is set only when all four inputs
// are 1 (count 4); c0 is set when two or three inputs are 1. Combinational,
// no clock.
module special_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic sum,
  output logic c0,
  output logic c1
);
  logic any_pair;   // at least two inputs are 1

  always_comb begin
    sum      = a ^ b ^ c ^ d;
    any_pair = (a & b) | (a & c) | (a & d) | (b & c) | (b & d) | (c & d);
    c1       = a & b & c & d;
    c0       = any_pair & ~c1;
  end
endmodule
