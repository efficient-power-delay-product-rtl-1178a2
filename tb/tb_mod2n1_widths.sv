// tb_mod2n1_widths -- runs the adder at the three sizes n = 4, 6 and 8
// that its area, power and delay figures are quoted for, and checks the
// unmodified output stage (ZERO_FIX = 0) against its expected behaviour.
//
// Each size is tested exhaustively: all (2^n+1)^2 residue pairs (up to
// 66049 for n = 8) are coded, added and decoded by their bit weights.
// With ZERO_FIX = 1 the result must be (X + Y) mod (2^n + 1) in every
// case. With ZERO_FIX = 0 (n = 4) it must be the same except when
// X + Y = 2^n + 1, where the plain structure returns the code 0...01.
module tb_mod2n1_widths;
  localparam int M4 = 17, M6 = 65, M8 = 257;   // 2^n + 1
  int checks = 0, failures = 0;

  logic [4:0] a4, b4, z4, z4raw;
  logic [6:0] a6, b6, z6;
  logic [8:0] a8, b8, z8;
  logic       sel4, sel6, sel8;
  int         n_sel = 0;           // results taken from the phase-2 row
  int         raw_equal_cases = 0;   // X + Y = 2^n + 1 cases seen

  mod2n1_adder #(.N(4))                  dut4    (.a(a4), .b(b4), .z(z4),    .sel(sel4));
  mod2n1_adder #(.N(4), .ZERO_FIX(1'b0)) dut4raw (.a(a4), .b(b4), .z(z4raw), .sel());
  mod2n1_adder #(.N(6))                  dut6    (.a(a6), .b(b6), .z(z6),    .sel(sel6));
  mod2n1_adder #(.N(8))                  dut8    (.a(a8), .b(b8), .z(z8),    .sel(sel8));

  // code of residue v in the double-2^0 format, as a 9-bit word
  function automatic logic [8:0] enc(int v);
    return (v == 0) ? 9'd0 : 9'(((v - 1) << 1) | 1);
  endfunction

  // value of a word by its bit weights: bits [n:1] as binary, plus bit 0
  function automatic int dec(logic [8:0] w);
    return int'(w[8:1]) + int'(w[0]);
  endfunction

  task automatic check(int n, int x, int y, logic [8:0] z, int want, logic [8:0] want_code);
    checks++;
    if (dec(z) != want || z !== want_code) begin
      failures++;
      if (failures < 20)
        $display("FAIL n=%0d %0d + %0d: z=%b (value %0d), expected %0d", n, x, y, z, dec(z), want);
    end
  endtask

  task automatic note(logic took_phase2, logic equal_case);
    if (took_phase2) n_sel++;
    if (equal_case)  raw_equal_cases++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0; a6 = '0; b6 = '0; a8 = '0; b8 = '0;

    for (int x = 0; x < M4; x++) for (int y = 0; y < M4; y++) begin
      a4 = 5'(enc(x)); b4 = 5'(enc(y));
      #1;
      check(4, x, y, 9'(z4), (x + y) % M4, enc((x + y) % M4));
      note(sel4, 1'b0);
      if (x + y == M4) begin
        note(1'b0, 1'b1);
        check(4, x, y, 9'(z4raw), 1, 9'd1);
      end else begin
        check(4, x, y, 9'(z4raw), (x + y) % M4, enc((x + y) % M4));
      end
    end

    for (int x = 0; x < M6; x++) for (int y = 0; y < M6; y++) begin
      a6 = 7'(enc(x)); b6 = 7'(enc(y));
      #1;
      check(6, x, y, 9'(z6), (x + y) % M6, enc((x + y) % M6));
      note(sel6, 1'b0);
    end

    for (int x = 0; x < M8; x++) for (int y = 0; y < M8; y++) begin
      a8 = enc(x); b8 = enc(y);
      #1;
      check(8, x, y, z8, (x + y) % M8, enc((x + y) % M8));
      note(sel8, 1'b0);
    end

    checks++;
    if (n_sel == 0) begin
      failures++;
      $display("FAIL the phase-2 sum was never selected");
    end
    checks++;
    if (raw_equal_cases == 0) begin
      failures++;
      $display("FAIL the X + Y = 2^n + 1 case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
