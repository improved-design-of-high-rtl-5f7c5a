// tb_sd10_recoder: exhaustive test of the SD radix-10 digit recoder.
// For every BCD digit Y and neighbour sign ysp the recoded digit must be
// Yb = Y + ysp - 10*ys with ys = (Y >= 5), given as one hot select of |Yb|.
module tb_sd10_recoder;
  logic [3:0] y;
  logic       ysp, ys;
  logic [5:1] sel;
  int checks = 0, failures = 0;

  sd10_recoder dut (.y(y), .ysp(ysp), .sel(sel), .ys(ys));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 10; v++) begin
      for (int c = 0; c < 2; c++) begin
        int yb, mag;
        logic [5:1] exp_sel;
        y = 4'(v);
        ysp = 1'(c);
        #1;
        yb  = v + c - ((v >= 5) ? 10 : 0);
        mag = (yb < 0) ? -yb : yb;
        exp_sel = (mag == 0) ? 5'b0 : 5'(1 << (mag - 1));
        checks += 2;
        if (ys !== (v >= 5)) begin failures++; $display("FAIL ys Y=%0d ysp=%0d", v, c); end
        if (sel !== exp_sel) begin failures++; $display("FAIL sel Y=%0d ysp=%0d sel=%b", v, c, sel); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
