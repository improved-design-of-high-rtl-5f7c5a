// tb_adder_setup: for random (4221) words H and S, h2_bcd must be 2H
// (mod 10**N) in valid BCD and s_xs6 must hold each digit of S plus 6.
module tb_adder_setup;
  import dec_tb_pkg::*;
  localparam int N = 8;
  logic [4*N-1:0] h, s, h2, sx;
  int checks = 0, failures = 0;

  adder_setup #(.N(N)) dut (.h(h), .s(s), .h2_bcd(h2), .s_xs6(sx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      h = 32'(rand_word(N));
      s = 32'(rand_word(N));
      #1;
      checks += 2;
      if (!is_bcd(wide_t'(h2), N) || wval(wide_t'(h2), N, BCD) !== (2 * wval(wide_t'(h), N, C4221)) % pow10(N)) begin
        failures++; $display("FAIL 2H h=%h h2=%h", h, h2);
      end
      for (int i = 0; i < N; i++) begin
        if (int'(sx[4*i +: 4]) !== dval(s[4*i +: 4], C4221) + 6) begin
          failures++; $display("FAIL xs6 digit %0d", i);
          break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
