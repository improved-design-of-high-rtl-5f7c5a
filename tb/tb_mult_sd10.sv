// tb_mult_sd10: products of the SD radix-10 multiplier against 136-bit
// integer arithmetic, for three configurations: 16 digits with the
// area-optimized 17:2 tree, 16 digits with the delay-optimized 17:2 tree, and
// 5 digits (six partial products, 6:2 tree). Operands are random, biased
// towards digits 9 and 0, plus all-nines and zero.
module tb_mult_sd10;
  import dec_tb_pkg::*;
  localparam int D = 16, DS = 5;
  logic [4*D-1:0]  x, y;
  logic [8*D-1:0]  pa, pd;
  logic [4*DS-1:0] xs, ys;
  logic [8*DS-1:0] ps;
  int checks = 0, failures = 0;

  mult_sd10 #(.D(D))                      u_area  (.x(x), .y(y), .p(pa));
  mult_sd10 #(.D(D), .DELAY_TREE(1'b1))   u_delay (.x(x), .y(y), .p(pd));
  mult_sd10 #(.D(DS))                     u_small (.x(xs), .y(ys), .p(ps));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      num_t xv, yv, xsv, ysv;
      xv  = (t == 0) ? pow10(D) - 1 : (t == 1) ? 0 : rand_val(D, t % 2);
      yv  = (t == 0) ? pow10(D) - 1 : rand_val(D, (t / 2) % 2);
      xsv = (t == 0) ? pow10(DS) - 1 : rand_val(DS, t % 2);
      ysv = (t == 0) ? pow10(DS) - 1 : rand_val(DS, (t / 2) % 2);
      x  = 64'(to_bcd(xv, D));
      y  = 64'(to_bcd(yv, D));
      xs = 20'(to_bcd(xsv, DS));
      ys = 20'(to_bcd(ysv, DS));
      #1;
      checks += 3;
      if (wide_t'(pa) !== to_bcd(xv * yv, 2 * D)) begin failures++; $display("FAIL area x=%h y=%h p=%h", x, y, pa); end
      if (wide_t'(pd) !== to_bcd(xv * yv, 2 * D)) begin failures++; $display("FAIL delay x=%h y=%h p=%h", x, y, pd); end
      if (wide_t'(ps) !== to_bcd(xsv * ysv, 2 * DS)) begin failures++; $display("FAIL small x=%h y=%h p=%h", xs, ys, ps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
