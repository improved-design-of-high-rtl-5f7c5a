// tb_dec_digit_adder: random test of the 9:4, 8:4 and 7:3 decimal digit
// adders with (4221) and with (5211) operands:
//   sum(x) = 4*o3 + 2*o2 + 2*o1 + o0, each output word in the input code.
module tb_dec_digit_adder;
  import dec_tb_pkg::*;
  localparam int N = 4;
  logic [4*N-1:0] x9 [9], x8 [8], x7 [7];
  logic [4*N-1:0] o9 [4], o8 [4], o7 [4];
  int checks = 0, failures = 0;

  dec_digit_adder #(.N(N), .NIN(9)) u9 (.x(x9), .o(o9));
  dec_digit_adder #(.N(N), .NIN(8)) u8 (.x(x8), .o(o8));
  dec_digit_adder #(.N(N), .NIN(7)) u7 (.x(x7), .o(o7));

  function automatic num_t outsum(input logic [4*N-1:0] o [4], input int code);
    return 4 * wval(wide_t'(o[3]), N, code) + 2 * wval(wide_t'(o[2]), N, code) +
           2 * wval(wide_t'(o[1]), N, code) + wval(wide_t'(o[0]), N, code);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int code;
      num_t r9, r8, r7;
      code = (t % 2 == 0) ? C4221 : C5211;
      r9 = 0; r8 = 0; r7 = 0;
      for (int k = 0; k < 9; k++) begin
        x9[k] = 16'(rand_word(N));
        r9 += wval(wide_t'(x9[k]), N, code);
      end
      for (int k = 0; k < 8; k++) begin
        x8[k] = (t < 20) ? '1 : 16'(rand_word(N));
        r8 += wval(wide_t'(x8[k]), N, code);
      end
      for (int k = 0; k < 7; k++) begin
        x7[k] = 16'(rand_word(N));
        r7 += wval(wide_t'(x7[k]), N, code);
      end
      #1;
      checks += 4;
      if (outsum(o9, code) !== r9) begin failures++; $display("FAIL 9:4 code %0d", code); end
      if (outsum(o8, code) !== r8) begin failures++; $display("FAIL 8:4 code %0d", code); end
      if (outsum(o7, code) !== r7) begin failures++; $display("FAIL 7:3 code %0d", code); end
      if (o7[2] !== '0) begin failures++; $display("FAIL 7:3 o2 not zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
