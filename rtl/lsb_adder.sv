// lsb_adder -- adds the two least significant positions of two operands
// in the "double 2^0" number representation.
//
// In this representation an (n+1)-bit residue has bit weights
// 2^(n-1), ..., 2^1, 2^0, 2^0: bits 1 and 0 both weigh one. A nonzero
// residue X is stored as X-1 in bits [n:1] with bit 0 set, and zero is
// all zeros, so the pair {bit1, bit0} of a valid operand is never 2'b10.
// This block adds the four weight-one bits a1, a0, b1, b0 (a count of
// 0..4) and returns it as carry c (weight 2) plus s1 and s0 (weight 1
// each), using the same convention: s0 is 1 whenever the count is not 0.
//
//   s0 = a1 | a0 | b1 | b0          (four-input OR)
//   s1 = s0 & ~(a1 ^ a0 ^ b1 ^ b0)  (count is 2 or 4)
//   c  = (a1 & b0) | (b1 & a0)      (count is 3 or 4)
//
// The truth table with its don't-care rows, the four-input OR for s0 and
// the two-level shape of the c and s1 logic follow the published design;
// the exact product terms chosen for c are this design's own reading of
// that truth table. For an invalid pair (2'b10) the outputs are defined
// by these equations but carry no meaning.
//
// Ports: a = {a1, a0}, b = {b1, b0}; outputs c, s1, s0. Purely
// combinational, no clock.
module lsb_adder (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       c,
  output logic       s1,
  output logic       s0
);

  always_comb begin
    s0 = a[1] | a[0] | b[1] | b[0];
    s1 = s0 & ~(a[1] ^ a[0] ^ b[1] ^ b[0]);
    c  = (a[1] & b[0]) | (b[1] & a[0]);
  end

endmodule
