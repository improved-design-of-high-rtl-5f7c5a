// tb_dec_csa_5211: random test of the (5211) decimal 3:2 CSA in both output
// forms: A + B + C + cin = S + h2 + cout*10**N, with h2 in (5211) or (4221).
module tb_dec_csa_5211;
  import dec_tb_pkg::*;
  localparam int N = 6;
  logic [4*N-1:0] a, b, c, s0, h0, s1, h1;
  logic ci, co0, co1;
  int checks = 0, failures = 0;

  dec_csa_5211 #(.N(N), .MIXED(1'b0)) u0 (.a(a), .b(b), .c(c), .cin(ci), .s(s0), .h2(h0), .cout(co0));
  dec_csa_5211 #(.N(N), .MIXED(1'b1)) u1 (.a(a), .b(b), .c(c), .cin(ci), .s(s1), .h2(h1), .cout(co1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      num_t ref_v;
      a = 24'(rand_word(N));
      b = 24'(rand_word(N));
      c = 24'(rand_word(N));
      ci = 1'($urandom_range(0, 1));
      #1;
      ref_v = wval(wide_t'(a), N, C5211) + wval(wide_t'(b), N, C5211) + wval(wide_t'(c), N, C5211) + num_t'(ci);
      checks += 2;
      if (wval(wide_t'(s0), N, C5211) + wval(wide_t'(h0), N, C5211) + num_t'(co0) * pow10(N) !== ref_v) begin
        failures++; $display("FAIL 5211 out a=%h b=%h c=%h", a, b, c);
      end
      if (wval(wide_t'(s1), N, C5211) + wval(wide_t'(h1), N, C4221) + num_t'(co1) * pow10(N) !== ref_v) begin
        failures++; $display("FAIL mixed out a=%h b=%h c=%h", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
