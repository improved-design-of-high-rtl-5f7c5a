// tb_ppgen_sd10: SD radix-10 partial product selection for the first, a
// middle and the last row of a 4-digit multiplier. For every select and sign
// the low D+1 digits must be |Yb|*X or its 9's complement, and the leading
// digits must carry the sign encoding of the row.
module tb_ppgen_sd10;
  import dec_tb_pkg::*;
  localparam int D = 4;
  logic [4*D-1:0] x;
  logic [4*(D+1)-1:0] m1, m2, m3, m4, m5;
  logic [5:1] sel;
  logic ys;
  logic [4*(D+3)-1:0] pp0, pp1, ppd;
  int checks = 0, failures = 0;

  mult_gen_sd10 #(.D(D)) u_gen (.x(x), .m1(m1), .m2(m2), .m3(m3), .m4(m4), .m5(m5));
  ppgen_sd10 #(.D(D), .ROW(0)) u_r0 (.m1(m1), .m2(m2), .m3(m3), .m4(m4), .m5(m5), .sel(sel), .ys(ys), .pp(pp0));
  ppgen_sd10 #(.D(D), .ROW(1)) u_r1 (.m1(m1), .m2(m2), .m3(m3), .m4(m4), .m5(m5), .sel(sel), .ys(ys), .pp(pp1));
  ppgen_sd10 #(.D(D), .ROW(D)) u_rd (.m1(m1), .m2(m2), .m3(m3), .m4(m4), .m5(m5), .sel(sel), .ys(1'b0), .pp(ppd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      num_t xv, mag;
      int k;
      xv = rand_val(D, t % 2);
      x = 16'(to_bcd(xv, D));
      k = t % 6;
      sel = (k == 0) ? 5'b0 : 5'(1 << (k - 1));
      ys = 1'((t / 6) % 2);
      #1;
      mag = num_t'(k) * xv;
      checks += 3;
      if (wval(wide_t'(pp0), D + 1, C4221) !== (ys ? pow10(D + 1) - 1 - mag : mag) ||
          dval(pp0[4*(D+1) +: 4], C4221) !== (ys ? 9 : 0) || dval(pp0[4*(D+2) +: 4], C4221) !== (ys ? 0 : 1)) begin
        failures++; $display("FAIL row0 k=%0d ys=%0d", k, ys);
      end
      if (wval(wide_t'(pp1), D + 1, C4221) !== (ys ? pow10(D + 1) - 1 - mag : mag) ||
          dval(pp1[4*(D+1) +: 4], C4221) !== (ys ? 8 : 9) || pp1[4*(D+2) +: 4] !== 0) begin
        failures++; $display("FAIL row1 k=%0d ys=%0d", k, ys);
      end
      if (wval(wide_t'(ppd), D + 3, C4221) !== mag) begin
        failures++; $display("FAIL rowD k=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
