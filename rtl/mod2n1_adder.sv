// mod2n1_adder -- modulo 2^N+1 adder for residues coded in the
// "double 2^0" representation.
//
// Number format: an (N+1)-bit word whose bit weights are 2^(N-1), ...,
// 2^1, 2^0, 2^0. Residue 0 is all zeros; a nonzero residue X (1..2^N) is
// X-1 in bits [N:1] with bit 0 set to 1. E.g. for N = 2: 0 = 000,
// 1 = 001, 2 = 011, 3 = 101, 4 = 111.
//
// Datapath (all combinational):
//   phase 1  S = A + B. Bits 1..0 of both operands (four weight-one bits)
//            go through lsb_adder, which gives s1, s0 and a carry into
//            position 2; positions 2..N are a ripple row of full_adder
//            cells with carry out cout1 (weight 2^N).
//   phase 2  X = S + (2^N - 1), with the constant coded as 1...10 (ones in
//            bits N..1, zero in bit 0). Bit 0 therefore needs no adder
//            (x0 = s0), bit 1 has no carry in and reduces to x1 = ~s1 with
//            carry s1, and positions 2..N are a row of ha_star cells with
//            carry out cout2.
//   select   result_mux takes x[N:1] if cout1 & cout2 (A + B > 2^N + 1),
//            else s[N:1]; bit 0 is s0.
// Adding 2^N - 1 and dropping the 2^N carry subtracts 2^N + 1.
//
// The representation, the LSB logic, the two rows, the NOT at bit 1, the
// HA* cell and SEL = cout1 & cout2 follow the published structure (drawn
// there for N = 4, the default here). The published structure returns
// 0...01 (residue 1) when A + B = 2^N + 1; result_mux with ZERO_FIX = 1
// (default) corrects that case to 0, ZERO_FIX = 0 keeps the original.
// Inputs must be valid codes (bit 0 = 0 only for the all-zero word);
// other words give meaningless results.
//
// Ports: a, b operands, z result, each N+1 bits; sel is the multiplexer
// select (1 when the phase-2 sum was taken), for observation. N >= 2. No clock, no
// reset, no latency: z settles one ripple-carry delay after a or b.
module mod2n1_adder #(
  parameter int unsigned N        = 4,
  parameter bit          ZERO_FIX = 1'b1
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] z,
  output logic       sel
);

  if (N < 2) begin : g_bad_n
    $error("mod2n1_adder: N must be at least 2");
  end

  logic [N:0]   s;     // phase-1 sum, same representation
  logic [N:1]   x;     // phase-2 sum bits N..1 (bit 0 equals s[0])
  logic [N+1:2] cy1;   // phase-1 carries into positions 2..N, cy1[N+1] = cout1
  logic [N+1:2] cy2;   // phase-2 carries into positions 2..N, cy2[N+1] = cout2

  // Phase 1, bits 1..0.
  lsb_adder u_lsb (
    .a  (a[1:0]),
    .b  (b[1:0]),
    .c  (cy1[2]),
    .s1 (s[1]),
    .s0 (s[0])
  );

  // Phase 2, bit 1: HA* with carry in 0 is an inverter; its carry is s1.
  always_comb begin
    x[1]   = ~s[1];
    cy2[2] = s[1];
  end

  for (genvar i = 2; i <= N; i++) begin : g_pos
    full_adder u_fa (
      .x  (a[i]),
      .y  (b[i]),
      .ci (cy1[i]),
      .s  (s[i]),
      .co (cy1[i+1])
    );

    ha_star u_has (
      .a (s[i]),
      .b (cy2[i]),
      .s (x[i]),
      .c (cy2[i+1])
    );
  end

  result_mux #(
    .N        (N),
    .ZERO_FIX (ZERO_FIX)
  ) u_mux (
    .s_hi  (s[N:1]),
    .x_hi  (x[N:1]),
    .s0    (s[0]),
    .cout1 (cy1[N+1]),
    .cout2 (cy2[N+1]),
    .z     (z),
    .sel   (sel)
  );

endmodule
