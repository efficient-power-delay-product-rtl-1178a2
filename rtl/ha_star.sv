// ha_star -- "HA*", a full adder whose third input is tied to logic 1.
//
// It is the cell of the second (phase-2) row, which adds the constant
// 2^n - 1 to the phase-1 sum; that constant has a 1 in every position
// except bit 0, so each cell sees a + b + 1:
//   s = ~(a ^ b)   (sum of a + b + 1, low bit)
//   c = a | b      (a + b + 1 >= 2)
// The two equations follow the published cell; they are the only ones
// that compute a + b + 1.
//
// Ports: a = phase-1 sum bit, b = carry in; sum s, carry out c.
// Purely combinational, no clock.
module ha_star (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_comb begin
    s = ~(a ^ b);
    c = a | b;
  end

endmodule
