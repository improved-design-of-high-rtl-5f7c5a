// tb_sd5_recoder: exhaustive test of the SD radix-5 digit recoder.
// For every BCD digit Y: Y = 5*Yu + Yl, Yu in {0,1,2}, Yl in {-2..2}, each
// given as one hot select, and ysl = (Yl < 0).
module tb_sd5_recoder;
  logic [3:0] y;
  logic [2:1] yu, ylp, ylm;
  logic       ysl;
  int checks = 0, failures = 0;

  sd5_recoder dut (.y(y), .yu(yu), .ylp(ylp), .ylm(ylm), .ysl(ysl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 10; v++) begin
      int u, l;
      y = 4'(v);
      #1;
      u = (yu === 2'b10) ? 2 : (yu === 2'b01) ? 1 : 0;
      l = (ylp === 2'b10) ? 2 : (ylp === 2'b01) ? 1 : (ylm === 2'b10) ? -2 : (ylm === 2'b01) ? -1 : 0;
      checks += 3;
      if (5 * u + l !== v) begin failures++; $display("FAIL value Y=%0d u=%0d l=%0d", v, u, l); end
      if ($countones(yu) > 1 || $countones({ylp, ylm}) > 1) begin failures++; $display("FAIL onehot Y=%0d", v); end
      if (ysl !== (l < 0)) begin failures++; $display("FAIL ysl Y=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
