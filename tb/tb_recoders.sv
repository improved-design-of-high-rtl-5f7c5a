// tb_recoders: exhaustive test of the digit recoders.
// Every digit pattern is applied (two digits at a time); the value must be
// preserved, the (5211s) output must double correctly after a one-bit shift,
// and BCD outputs must hold valid digits. The (4221s)->(5211s) recoder is fed
// the ten (4221s) digits made by BCD->(4221) and must match the general
// (4221)->(5211s) recoder bit for bit.
module tb_recoders;
  import dec_tb_pkg::*;
  logic [7:0] d, o5211s, o4221, o4221b, o5421, o5421b, oxs6, o5211t, o5211u;
  int checks = 0, failures = 0;

  rec_4221_5211s #(.N(2)) u_a (.d(d), .o(o5211s));
  rec_bcd_4221   #(.N(2)) u_b (.bcd(d), .o(o4221));
  rec_5211_4221  #(.N(2)) u_c (.d(d), .o(o4221b));
  rec_bcd_5421   #(.N(2)) u_d (.bcd(d), .o(o5421));
  rec_4221_5421  #(.N(2)) u_e (.d(d), .o(o5421b));
  rec_4221_xs6   #(.N(2)) u_f (.d(d), .o(oxs6));
  rec_4221s_5211s #(.N(2)) u_g (.d(o4221), .o(o5211t));
  rec_4221_5211s #(.N(2)) u_h (.d(o4221), .o(o5211u));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s d=%b", what, d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      d = 8'(v);
      #1;
      for (int i = 0; i < 2; i++) begin
        logic [3:0] di;
        logic [4:0] dbl;
        di = d[4*i +: 4];
        chk(dval(o5211s[4*i +: 4], C5211) === dval(di, C4221), "4221->5211s value");
        // shifted (5211s) digit: weight-5 bit is the carry, rest is 2Z mod 10
        dbl = {o5211s[4*i +: 4], 1'b0};
        chk(10 * int'(dbl[4]) + dval(dbl[3:0], C4221) === 2 * dval(di, C4221), "5211s doubling");
        chk(dval(o4221b[4*i +: 4], C4221) === dval(di, C5211), "5211->4221 value");
        chk(dval(o5421b[4*i +: 4], C5421) === dval(di, C4221) && o5421b[4*i +: 4] <= 4'd12,
            "4221->5421 value");
        chk(int'(oxs6[4*i +: 4]) === dval(di, C4221) + 6, "4221->xs6 value");
        if (di <= 4'd9) begin
          chk(dval(o4221[4*i +: 4], C4221) === int'(di), "bcd->4221 value");
          chk(dval(o5421[4*i +: 4], C5421) === int'(di) && o5421[4*i +: 4] <= 4'd12, "bcd->5421 value");
          chk(o5211t[4*i +: 4] === o5211u[4*i +: 4], "4221s->5211s code");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
