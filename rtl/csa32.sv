// csa32: a row of (3,2) counters (full adders), W bits wide.
//
// Reduces the three registered components of the MAC's redundant result to
// a sum row s and a carry row cy, which are fed back as the two accumulate
// operands.  s = a ^ b ^ c bit by bit; cy is the bitwise majority moved one
// column up, with the carry out of bit W-1 dropped (arithmetic is modulo
// 2^W).  So s + cy = a + b + c (mod 2^W).  Combinational.
module csa32 #(
  parameter int W = 40
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign cy  = {maj[W-2:0], 1'b0};

endmodule
