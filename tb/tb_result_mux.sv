// tb_result_mux -- checks the output stage with random candidate sums
// and every combination of the two row carries, for both settings of
// ZERO_FIX (N = 4).
//
// Expected: sel = cout1 & cout2; z[N:1] = x_hi when sel else s_hi;
// z[0] = s0, except that with ZERO_FIX = 1 it is 0 when cout1 = 1 and
// cout2 = 0.
module tb_result_mux;
  localparam int N = 4;
  logic [N-1:0] s_hi, x_hi;
  logic         s0, cout1, cout2;
  logic [N:0]   z_fix, z_raw;
  logic         sel_fix, sel_raw;
  int checks = 0, failures = 0;

  result_mux #(.N(N), .ZERO_FIX(1'b1)) dut_fix (
    .s_hi(s_hi), .x_hi(x_hi), .s0(s0), .cout1(cout1), .cout2(cout2),
    .z(z_fix), .sel(sel_fix));
  result_mux #(.N(N), .ZERO_FIX(1'b0)) dut_raw (
    .s_hi(s_hi), .x_hi(x_hi), .s0(s0), .cout1(cout1), .cout2(cout2),
    .z(z_raw), .sel(sel_raw));

  task automatic check(input logic [N:0] got, input logic [N:0] exp,
                       input logic got_sel, input logic exp_sel, input string tag);
    checks++;
    if (got !== exp || got_sel !== exp_sel) begin
      failures++;
      $display("FAIL %s: s_hi=%b x_hi=%b s0=%b cout1=%b cout2=%b got z=%b sel=%b exp z=%b sel=%b",
               tag, s_hi, x_hi, s0, cout1, cout2, got, got_sel, exp, exp_sel);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic         esel;
    logic [N-1:0] ehi;
    for (int r = 0; r < 200; r++) begin
      s_hi = N'($urandom);
      x_hi = N'($urandom);
      {s0, cout1, cout2} = 3'(r);
      #1;
      esel = cout1 && cout2;
      ehi  = esel ? x_hi : s_hi;
      check(z_raw, {ehi, s0}, sel_raw, esel, "raw");
      check(z_fix, {ehi, (cout1 && !cout2) ? 1'b0 : s0}, sel_fix, esel, "fix");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
