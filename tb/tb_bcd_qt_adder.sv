// tb_bcd_qt_adder: 32-digit BCD additions, random and with long carry
// chains (nines plus one), for the excess-6 and the plain BCD operand form.
module tb_bcd_qt_adder;
  import dec_tb_pkg::*;
  localparam int N = 32;
  logic [4*N-1:0] a, b, bx, s6, s0;
  logic ci, c6, c0;
  int checks = 0, failures = 0;
  int chains = 0;

  bcd_qt_adder #(.N(N), .B_XS6(1'b1)) u6 (.a(a), .b(bx), .cin(ci), .s(s6), .cout(c6));
  bcd_qt_adder #(.N(N), .B_XS6(1'b0)) u0 (.a(a), .b(b),  .cin(ci), .s(s0), .cout(c0));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      num_t av, bv, r;
      av = rand_val(N, int'(t % 3 == 1));
      bv = (t % 3 == 2) ? pow10(N) - 1 - av : rand_val(N, int'(t % 3 == 1));   // sums of all nines
      ci = 1'($urandom_range(0, 1));
      a = 128'(to_bcd(av, N));
      b = 128'(to_bcd(bv, N));
      for (int i = 0; i < N; i++) bx[4*i +: 4] = b[4*i +: 4] + 4'd6;
      #1;
      r = av + bv + num_t'(ci);
      if (t % 3 == 2 && ci) chains++;
      checks += 2;
      if (wval(wide_t'(s6), N, BCD) + num_t'(c6) * pow10(N) !== r || !is_bcd(wide_t'(s6), N)) begin
        failures++; $display("FAIL xs6 a=%h b=%h", a, b);
      end
      if (wval(wide_t'(s0), N, BCD) + num_t'(c0) * pow10(N) !== r || !is_bcd(wide_t'(s0), N)) begin
        failures++; $display("FAIL bcd a=%h b=%h", a, b);
      end
    end
    checks++;
    if (chains == 0) failures++;
    $display("full-length carry chains: %0d", chains);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
