// full_adder -- one-bit full adder, a cell of the first (phase-1) ripple
// row of the modulo 2^n+1 adder.
//
// s = x ^ y ^ ci and co = majority(x, y, ci). The published design only
// names this cell; the gate-level form here is the textbook one.
//
// Ports: addends x and y, carry in ci; sum s, carry out co.
// Purely combinational, no clock.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = x ^ y ^ ci;
    co = (x & y) | (ci & (x ^ y));
  end

endmodule
