// tb_mult_sd5: products of the SD radix-5 multiplier against 136-bit integer
// arithmetic for 16 digits (mixed 32:2 tree), 8 digits (mixed 16:2 tree) and
// 3 digits (mixed 6:2 tree). Operands are random, biased towards digits 9
// and 0, plus all-nines and zero.
module tb_mult_sd5;
  import dec_tb_pkg::*;
  localparam int D = 16, DM = 8, DS = 3;
  logic [4*D-1:0]  x, y;
  logic [8*D-1:0]  p;
  logic [4*DM-1:0] xm, ym;
  logic [8*DM-1:0] pm;
  logic [4*DS-1:0] xs, ys;
  logic [8*DS-1:0] ps;
  int checks = 0, failures = 0;

  mult_sd5 #(.D(D))  u_big   (.x(x),  .y(y),  .p(p));
  mult_sd5 #(.D(DM)) u_mid   (.x(xm), .y(ym), .p(pm));
  mult_sd5 #(.D(DS)) u_small (.x(xs), .y(ys), .p(ps));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      num_t xv, yv, xmv, ymv, xsv, ysv;
      xv  = (t == 0) ? pow10(D) - 1 : (t == 1) ? 0 : rand_val(D, t % 2);
      yv  = (t == 0) ? pow10(D) - 1 : rand_val(D, (t / 2) % 2);
      xmv = (t == 0) ? pow10(DM) - 1 : rand_val(DM, t % 2);
      ymv = (t == 0) ? pow10(DM) - 1 : rand_val(DM, (t / 2) % 2);
      xsv = (t == 0) ? pow10(DS) - 1 : rand_val(DS, t % 2);
      ysv = (t == 0) ? pow10(DS) - 1 : rand_val(DS, (t / 2) % 2);
      x  = 64'(to_bcd(xv, D));   y  = 64'(to_bcd(yv, D));
      xm = 32'(to_bcd(xmv, DM)); ym = 32'(to_bcd(ymv, DM));
      xs = 12'(to_bcd(xsv, DS)); ys = 12'(to_bcd(ysv, DS));
      #1;
      checks += 3;
      if (wide_t'(p)  !== to_bcd(xv * yv, 2 * D))    begin failures++; $display("FAIL 16 x=%h y=%h p=%h", x, y, p); end
      if (wide_t'(pm) !== to_bcd(xmv * ymv, 2 * DM)) begin failures++; $display("FAIL 8 x=%h y=%h p=%h", xm, ym, pm); end
      if (wide_t'(ps) !== to_bcd(xsv * ysv, 2 * DS)) begin failures++; $display("FAIL 3 x=%h y=%h p=%h", xs, ys, ps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
