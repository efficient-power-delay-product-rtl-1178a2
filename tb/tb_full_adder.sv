// tb_full_adder -- exhaustive check of full_adder: for all eight input
// combinations {co, s} must equal the integer sum x + y + ci.
module tb_full_adder;
  logic x, y, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, ci} = 3'(v);
      #1;
      checks++;
      if (2 * co + s != x + y + ci) begin
        failures++;
        $display("FAIL x=%b y=%b ci=%b: co=%b s=%b", x, y, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
