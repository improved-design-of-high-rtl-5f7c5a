// tb_tree6_mixed: random test of the mixed decimal 6:2 tree tree6_mixed with 3 (4221)
// and 3 (5211) 6-digit words (every digit pattern, and all-ones words):
// modulo 10**6 the tree must return S + 2H = sum of its inputs.
module tb_tree6_mixed;
  import dec_tb_pkg::*;
  localparam int N = 6;
  logic [4*N-1:0] zv [3], zb [3];
  logic [4*N-1:0] h, s;
  int checks = 0, failures = 0;

  tree6_mixed #(.N(N)) dut (.z4221(zv), .z5211(zb), .h(h), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      num_t r;
      r = 0;
      for (int k = 0; k < 3; k++) begin
        zv[k] = (t < 4) ? '1 : 24'(rand_word(N));
        zb[k] = (t < 4) ? '1 : 24'(rand_word(N));
        r += wval(wide_t'(zv[k]), N, C4221) + wval(wide_t'(zb[k]), N, C5211);
      end
      #1;
      checks++;
      if ((wval(wide_t'(s), N, C4221) + 2 * wval(wide_t'(h), N, C4221)) % pow10(N) !== r % pow10(N)) begin
        failures++;
        $display("FAIL t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
