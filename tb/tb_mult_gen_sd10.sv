// tb_mult_gen_sd10: the five (4221) multiples of random 16-digit BCD
// multiplicands (and of all-nines and zero) must equal k*X.
module tb_mult_gen_sd10;
  import dec_tb_pkg::*;
  localparam int D = 16;
  logic [4*D-1:0] x;
  logic [4*(D+1)-1:0] m [1:5];
  int checks = 0, failures = 0;

  mult_gen_sd10 #(.D(D)) dut (.x(x), .m1(m[1]), .m2(m[2]), .m3(m[3]), .m4(m[4]), .m5(m[5]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      num_t xv;
      xv = (t == 0) ? 0 : (t == 1) ? pow10(D) - 1 : rand_val(D, t % 2);
      x = 64'(to_bcd(xv, D));
      #1;
      for (int k = 1; k <= 5; k++) begin
        checks++;
        if (wval(wide_t'(m[k]), D + 1, C4221) !== num_t'(k) * xv) begin
          failures++;
          $display("FAIL %0dX x=%h", k, x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
