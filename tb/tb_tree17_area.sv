// tb_tree17_area: random test of the decimal 17:2 tree tree17_area on 6-digit (4221)
// words with every digit pattern (and all-ones words): modulo 10**6 the tree
// must return S + 2H = sum of its inputs.
module tb_tree17_area;
  import dec_tb_pkg::*;
  localparam int N = 6;
  logic [4*N-1:0] z [17];
  logic [4*N-1:0] h, s;
  int checks = 0, failures = 0;

  tree17_area #(.N(N)) dut (.z(z), .h(h), .s(s));

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
      for (int k = 0; k < 17; k++) begin
        z[k] = (t < 4) ? '1 : 24'(rand_word(N));
        r += wval(wide_t'(z[k]), N, C4221);
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
