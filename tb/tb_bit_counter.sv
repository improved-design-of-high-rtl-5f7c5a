// tb_bit_counter: exhaustive test of the 9-bit and 8-bit (4221) counters and
// the 7:3 counter: the output digit must equal the number of ones.
module tb_bit_counter;
  import dec_tb_pkg::*;
  logic [8:0] x;
  logic [3:0] z9, z8, z7;
  int checks = 0, failures = 0;

  bit_counter #(.NB(9)) u9 (.x(x),      .z(z9));
  bit_counter #(.NB(8)) u8 (.x(x[7:0]), .z(z8));
  bit_counter #(.NB(7)) u7 (.x(x[6:0]), .z(z7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      x = 9'(v);
      #1;
      checks += 3;
      if (dval(z9, C4221) !== $countones(x)) begin failures++; $display("FAIL 9 x=%b z=%b", x, z9); end
      if (dval(z8, C4221) !== $countones(x[7:0])) begin failures++; $display("FAIL 8 x=%b z=%b", x, z8); end
      if (int'({z7[3], z7[1], z7[0]}) !== $countones(x[6:0]) || z7[2]) begin
        failures++; $display("FAIL 7 x=%b z=%b", x, z7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
