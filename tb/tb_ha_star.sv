// tb_ha_star -- exhaustive check of ha_star: for all four input
// combinations {c, s} must equal the integer sum a + b + 1.
module tb_ha_star;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  ha_star dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (2 * c + s != a + b + 1) begin
        failures++;
        $display("FAIL a=%b b=%b: c=%b s=%b", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
