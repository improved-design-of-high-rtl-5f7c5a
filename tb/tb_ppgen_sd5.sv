// tb_ppgen_sd5: SD radix-5 partial products for rows 0, 1 and D-1 of a
// 4-digit multiplier, driven by the real recoder for every digit value:
// PP^U (5211) must be 5*Yu*X plus the hot one of a negative PP^L (plus a
// constant 10**(D+1) in row 0), and PP^L (4221) Yl*X or its 9's complement
// with the row's sign digit.
module tb_ppgen_sd5;
  import dec_tb_pkg::*;
  localparam int D = 4;
  logic [4*D-1:0] x;
  logic [3:0] yd;
  logic [4*(D+1)-1:0] m1, m2, mn1, mn2;
  logic [2:1] yu, ylp, ylm;
  logic ysl;
  logic [4*(D+2)-1:0] u0, l0, u1, l1, ul, ll;
  int checks = 0, failures = 0;

  mult_gen_sd5 #(.D(D)) u_gen (.x(x), .m1(m1), .m2(m2), .mn1(mn1), .mn2(mn2));
  sd5_recoder u_rec (.y(yd), .yu(yu), .ylp(ylp), .ylm(ylm), .ysl(ysl));
  ppgen_sd5 #(.D(D), .ROW(0))   u_r0 (.m1(m1), .m2(m2), .mn1(mn1), .mn2(mn2), .yu(yu), .ylp(ylp), .ylm(ylm), .ysl(ysl), .ppu(u0), .ppl(l0));
  ppgen_sd5 #(.D(D), .ROW(1))   u_r1 (.m1(m1), .m2(m2), .mn1(mn1), .mn2(mn2), .yu(yu), .ylp(ylp), .ylm(ylm), .ysl(ysl), .ppu(u1), .ppl(l1));
  ppgen_sd5 #(.D(D), .ROW(D-1)) u_rl (.m1(m1), .m2(m2), .mn1(mn1), .mn2(mn2), .yu(yu), .ylp(ylp), .ylm(ylm), .ysl(ysl), .ppu(ul), .ppl(ll));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      num_t xv, uexp, lexp;
      int v, u, l;
      xv = rand_val(D, t % 2);
      x = 16'(to_bcd(xv, D));
      v = t % 10;
      yd = 4'(v);
      u = (v >= 8) ? 2 : (v >= 3) ? 1 : 0;
      l = v - 5 * u;
      #1;
      uexp = num_t'(5 * u) * xv + ((l < 0) ? 1 : 0);
      lexp = (l < 0) ? pow10(D + 1) - 1 - num_t'(int'(-l)) * xv : num_t'(l) * xv;
      checks += 6;
      if (wval(wide_t'(u0), D + 2, C5211) !== uexp + pow10(D + 1)) begin failures++; $display("FAIL U row0 Y=%0d", v); end
      if (wval(wide_t'(u1), D + 2, C5211) !== uexp) begin failures++; $display("FAIL U row1 Y=%0d", v); end
      if (wval(wide_t'(ul), D + 2, C5211) !== uexp) begin failures++; $display("FAIL U rowlast Y=%0d", v); end
      if (wval(wide_t'(l0), D + 2, C4221) !== lexp + pow10(D + 1) * ((l < 0) ? 8 : 9)) begin failures++; $display("FAIL L row0 Y=%0d", v); end
      if (wval(wide_t'(l1), D + 2, C4221) !== lexp + pow10(D + 1) * ((l < 0) ? 8 : 9)) begin failures++; $display("FAIL L row1 Y=%0d", v); end
      if (wval(wide_t'(ll), D + 2, C4221) !== lexp) begin failures++; $display("FAIL L rowlast Y=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
