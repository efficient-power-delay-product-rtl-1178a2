// tb_lsb_adder -- exhaustive check of lsb_adder against the truth table
// of the two least significant positions.
//
// Every pair of valid LSB codes ({a1,a0} and {b1,b0} each in 00, 01, 11)
// is applied; c, s1 and s0 are compared with the expected row, which is
// written out below from the count of ones: count 0 -> 000, 1 -> 001,
// 2 -> 011, 3 -> 101, 4 -> 111 (c s1 s0). The invalid code 10 is a
// don't-care input and is not checked. A watchdog ends the run if it hangs.
module tb_lsb_adder;
  logic [1:0] a, b;
  logic       c, s1, s0;
  int checks = 0, failures = 0;

  lsb_adder dut (.a(a), .b(b), .c(c), .s1(s1), .s0(s0));

  // expected {c, s1, s0} indexed by the number of ones among a1 a0 b1 b0
  localparam logic [2:0] EXP [5] = '{3'b000, 3'b001, 3'b011, 3'b101, 3'b111};
  localparam logic [1:0] CODES [3] = '{2'b00, 2'b01, 2'b11};

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    foreach (CODES[i]) foreach (CODES[j]) begin
      a = CODES[i];
      b = CODES[j];
      #1;
      ones = $countones({a, b});
      checks++;
      if ({c, s1, s0} !== EXP[ones]) begin
        failures++;
        $display("FAIL a=%b b=%b: got c s1 s0 = %b, expected %b", a, b, {c, s1, s0}, EXP[ones]);
      end
      // the outputs must also carry the same total weight
      checks++;
      if (2 * c + s1 + s0 != ones) begin
        failures++;
        $display("FAIL a=%b b=%b: weight %0d, expected %0d", a, b, 2 * c + s1 + s0, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
