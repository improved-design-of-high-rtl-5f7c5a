// tb_dec_mult_top: end-to-end test of both 16-digit multipliers at their
// default size. Random and structured operands are multiplied by both
// datapaths and compared with 136-bit integer arithmetic. The testbench also
// counts how often each mechanism of the two datapaths was exercised and
// fails if one never was:
//   SD radix-10: negative digits, each magnitude 1..5, a negative zero digit
//                (Y = 9 with an incoming sign), the extra leading partial
//                product (top multiplier digit >= 5);
//   SD radix-5 : Yu = 1 and 2, Yl = -2, -1, +1, +2, a negative row 0;
//   final adder: a decimal carry rippling through a digit whose binary sum is
//                15 (the propagate case), in each multiplier.
module tb_dec_mult_top;
  import dec_tb_pkg::*;
  localparam int D = 16;
  logic [4*D-1:0] x, y;
  logic [8*D-1:0] p10, p5;
  int checks = 0, failures = 0;
  int cnt [string];

  dec_mult_top dut (.x(x), .y(y), .p_sd10(p10), .p_sd5(p5));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_digits(input num_t yv);
    int ysp = 0;
    for (int i = 0; i < D; i++) begin
      int v, yb, u, l;
      v  = int'(yv % 10);
      yv = yv / 10;
      yb = v + ysp - ((v >= 5) ? 10 : 0);
      if (v >= 5) cnt["sd10 negative digit"]++;
      if (yb != 0) cnt[$sformatf("sd10 magnitude %0d", (yb < 0) ? -yb : yb)]++;
      if (v == 9 && ysp == 1) cnt["sd10 negative zero"]++;
      if (i == D - 1 && v >= 5) cnt["sd10 leading partial product"]++;
      ysp = (v >= 5) ? 1 : 0;
      u = (v >= 8) ? 2 : (v >= 3) ? 1 : 0;
      l = v - 5 * u;
      if (u != 0) cnt[$sformatf("sd5 Yu=%0d", u)]++;
      if (l != 0) cnt[$sformatf("sd5 Yl=%0d", l)]++;
      if (i == 0 && l < 0) cnt["sd5 negative row 0"]++;
    end
  endtask

  initial begin
    static string names [$] = '{"sd10 negative digit", "sd10 magnitude 1", "sd10 magnitude 2",
      "sd10 magnitude 3", "sd10 magnitude 4", "sd10 magnitude 5", "sd10 negative zero",
      "sd10 leading partial product", "sd5 Yu=1", "sd5 Yu=2", "sd5 Yl=-2", "sd5 Yl=-1",
      "sd5 Yl=1", "sd5 Yl=2", "sd5 negative row 0", "sd10 adder propagate", "sd5 adder propagate"};
    foreach (names[k]) cnt[names[k]] = 0;
    for (int t = 0; t < 2000; t++) begin
      num_t xv, yv;
      case (t)
        0: begin xv = pow10(D) - 1; yv = pow10(D) - 1; end
        1: begin xv = 0; yv = pow10(D) - 1; end
        2: begin xv = pow10(D) - 1; yv = 1; end
        3: begin xv = 1; yv = num_t'(64'd5555555555555555); end
        default: begin xv = rand_val(D, t % 2); yv = rand_val(D, (t / 2) % 2); end
      endcase
      x = 64'(to_bcd(xv, D));
      y = 64'(to_bcd(yv, D));
      #1;
      count_digits(yv);
      if ((dut.u_sd10.u_add.p[0] & dut.u_sd10.u_add.c[2*D-1:0]) != '0) cnt["sd10 adder propagate"]++;
      if ((dut.u_sd5.u_add.p[0]  & dut.u_sd5.u_add.c[2*D-1:0])  != '0) cnt["sd5 adder propagate"]++;
      checks += 2;
      if (wide_t'(p10) !== to_bcd(xv * yv, 2 * D)) begin failures++; $display("FAIL sd10 x=%h y=%h p=%h", x, y, p10); end
      if (wide_t'(p5)  !== to_bcd(xv * yv, 2 * D)) begin failures++; $display("FAIL sd5 x=%h y=%h p=%h", x, y, p5); end
    end
    foreach (names[k]) begin
      checks++;
      $display("mechanism %-30s %0d", names[k], cnt[names[k]]);
      if (cnt[names[k]] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", names[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
