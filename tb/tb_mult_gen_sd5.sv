// tb_mult_gen_sd5: X and 2X in (4221) must equal their values and -X, -2X
// must be their 9's complements over D+1 digits.
module tb_mult_gen_sd5;
  import dec_tb_pkg::*;
  localparam int D = 16;
  logic [4*D-1:0] x;
  logic [4*(D+1)-1:0] m1, m2, mn1, mn2;
  int checks = 0, failures = 0;

  mult_gen_sd5 #(.D(D)) dut (.x(x), .m1(m1), .m2(m2), .mn1(mn1), .mn2(mn2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      num_t xv, top;
      xv = (t == 0) ? 0 : (t == 1) ? pow10(D) - 1 : rand_val(D, t % 2);
      x = 64'(to_bcd(xv, D));
      top = pow10(D + 1) - 1;
      #1;
      checks += 4;
      if (wval(wide_t'(m1), D + 1, C4221) !== xv) begin failures++; $display("FAIL X"); end
      if (wval(wide_t'(m2), D + 1, C4221) !== 2 * xv) begin failures++; $display("FAIL 2X"); end
      if (wval(wide_t'(mn1), D + 1, C4221) !== top - xv) begin failures++; $display("FAIL -X"); end
      if (wval(wide_t'(mn2), D + 1, C4221) !== top - 2 * xv) begin failures++; $display("FAIL -2X"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
