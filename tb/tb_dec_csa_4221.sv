// tb_dec_csa_4221: random test of the decimal 3:2 CSA for (4221) words:
// A + B + C = S + 2H exactly, and h2 (+ carry out) = 2H + carry in.
module tb_dec_csa_4221;
  import dec_tb_pkg::*;
  localparam int N = 6;
  logic [4*N-1:0] a, b, c, s, h, h2;
  logic ci, co;
  int checks = 0, failures = 0;

  dec_csa_4221 #(.N(N)) dut (.a(a), .b(b), .c(c), .cin(ci), .s(s), .h(h), .h2(h2), .cout(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = 24'(rand_word(N));
      b = 24'(rand_word(N));
      c = 24'(rand_word(N));
      ci = 1'($urandom_range(0, 1));
      #1;
      checks += 2;
      if (wval(wide_t'(s), N, C4221) + 2 * wval(wide_t'(h), N, C4221) !=
          wval(wide_t'(a), N, C4221) + wval(wide_t'(b), N, C4221) + wval(wide_t'(c), N, C4221)) begin
        failures++; $display("FAIL sum a=%h b=%h c=%h", a, b, c);
      end
      if (wval(wide_t'(h2), N, C4221) + num_t'(co) * pow10(N) !== 2 * wval(wide_t'(h), N, C4221) + num_t'(ci)) begin
        failures++; $display("FAIL x2 h=%h h2=%h", h, h2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
