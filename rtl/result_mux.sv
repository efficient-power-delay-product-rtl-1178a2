// result_mux -- output selection of the modulo 2^n+1 adder.
//
// The adder keeps two candidate results: the phase-1 sum S (bits s[N:1]
// and s0) and the phase-2 sum X = S + (2^N - 1) (bits x[N:1]; its bit 0
// equals s0). SEL = cout1 & cout2 picks x[N:1] when both rows carried
// out, i.e. when A + B > 2^N + 1 and 2^N + 1 must be subtracted;
// otherwise s[N:1] passes. Bit 0 of the result is s0. Both the AND for
// SEL and the N-bit 2:1 multiplexer follow the published design.
//
// One case needs more than that. When A + B = 2^N + 1 exactly, row 1
// carries out (cout1 = 1) with s[N:1] = 0 and s0 = 1, and row 2 does not
// (cout2 = 0), so the plain structure returns 0...01, which in this
// representation is the residue 1, while the right residue is 0 (all
// zeros). With ZERO_FIX = 1 (default) bit 0 is cleared in exactly that
// case: z[0] = s0 & ~(cout1 & ~cout2). The upper bits are already 0
// there, so one gate corrects it. This correction is this design's own;
// ZERO_FIX = 0 gives the unmodified published output stage.
//
// Ports: s_hi = s[N:1], x_hi = x[N:1], s0, cout1, cout2; z = result in
// the same (N+1)-bit representation; sel = SEL, brought out for
// observation. Purely combinational, no clock.
module result_mux #(
  parameter int unsigned N        = 4,
  parameter bit          ZERO_FIX = 1'b1
) (
  input  logic [N-1:0] s_hi,
  input  logic [N-1:0] x_hi,
  input  logic         s0,
  input  logic         cout1,
  input  logic         cout2,
  output logic [N:0]   z,
  output logic         sel
);

  always_comb begin
    sel     = cout1 & cout2;
    z[N:1]  = sel ? x_hi : s_hi;
    z[0]    = ZERO_FIX ? (s0 & ~(cout1 & ~cout2)) : s0;
  end

endmodule
