// tb_mod2n1_adder -- end-to-end, exhaustive test of the modulo 2^N+1
// adder at its default size (N = 4, ZERO_FIX on).
//
// Every pair of residues 0..2^N is coded in the double-2^0 format
// (0 -> all zeros, X -> {X-1, 1'b1}), added, and the result is decoded
// by its bit weights (bits [N:1] as a binary number plus bit 0) and
// compared with (X + Y) mod (2^N + 1). The code of the result must also
// be the canonical one, and sel must be 1 exactly when X + Y > 2^N + 1.
// The three cases of the adder are counted, and each must occur:
//   below  X + Y <= 2^N          phase-1 sum taken, no carry out
//   equal  X + Y  = 2^N + 1      result 0 (the corrected case)
//   above  X + Y  > 2^N + 1      phase-2 sum taken (sel = 1)
// plus the LSB carry into position 2, observed as a[1:0] + b[1:0] >= 3.
module tb_mod2n1_adder;
  localparam int N = 4;
  localparam int M = (1 << N) + 1;

  logic [N:0] a, b, z;
  logic       sel;
  int checks = 0, failures = 0;
  int n_below = 0, n_equal = 0, n_above = 0, n_lsb_carry = 0;

  mod2n1_adder dut (.a(a), .b(b), .z(z), .sel(sel));

  function automatic logic [N:0] enc(int v);
    return (v == 0) ? '0 : {N'(v - 1), 1'b1};
  endfunction

  function automatic int dec(logic [N:0] w);
    return int'(w[N:1]) + int'(w[0]);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, want;
    for (int x = 0; x < M; x++) begin
      for (int y = 0; y < M; y++) begin
        a = enc(x);
        b = enc(y);
        #1;
        sum  = x + y;
        want = sum % M;
        checks++;
        if (dec(z) != want || z !== enc(want)) begin
          failures++;
          $display("FAIL %0d + %0d: z=%b (value %0d), expected %b (%0d)", x, y, z, dec(z), enc(want), want);
        end
        checks++;
        if (sel !== (sum > M)) begin
          failures++;
          $display("FAIL %0d + %0d: sel=%b", x, y, sel);
        end
        if (sum < M)       n_below++;
        else if (sum == M) n_equal++;
        else               n_above++;
        if ($countones({a[1:0], b[1:0]}) >= 3) n_lsb_carry++;
      end
    end
    $display("cases: below=%0d equal=%0d above=%0d lsb_carry=%0d", n_below, n_equal, n_above, n_lsb_carry);
    checks++;
    if (n_below == 0 || n_equal == 0 || n_above == 0 || n_lsb_carry == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
