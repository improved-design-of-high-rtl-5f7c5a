// tb_dec_x2n_4221: random test of the x2, x4 and x8 blocks on 5-digit (4221)
// words with every digit pattern, including the lateral carry inputs/outputs.
module tb_dec_x2n_4221;
  import dec_tb_pkg::*;
  localparam int N = 5;
  logic [4*N-1:0] d, o1, o2, o3;
  logic [0:0] ci1, co1;
  logic [1:0] ci2, co2;
  logic [2:0] ci3, co3;
  int checks = 0, failures = 0;

  dec_x2n_4221 #(.N(N), .SH(1)) u_1 (.d(d), .cin(ci1), .o(o1), .cout(co1));
  dec_x2n_4221 #(.N(N), .SH(2)) u_2 (.d(d), .cin(ci2), .o(o2), .cout(co2));
  dec_x2n_4221 #(.N(N), .SH(3)) u_3 (.d(d), .cin(ci3), .o(o3), .cout(co3));

  function automatic num_t lhs(input wide_t o, input logic [2:0] co, input int sh);
    lhs = wval(o, N, C4221);
    for (int k = 0; k < sh; k++) lhs += num_t'(co[k]) * pow10(N) * (num_t'(1) << (sh - 1 - k));
  endfunction
  function automatic num_t rhs(input wide_t dd, input logic [2:0] ci, input int sh);
    rhs = wval(dd, N, C4221) << sh;
    for (int k = 0; k < sh; k++) rhs += num_t'(ci[k]) << (sh - 1 - k);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      d = 20'(rand_word(N));
      {ci3, ci2, ci1} = (t < 1500) ? 6'd0 : 6'($urandom_range(0, 63));
      #1;
      checks += 3;
      if (lhs(wide_t'(o1), 3'(co1), 1) !== rhs(wide_t'(d), 3'(ci1), 1)) begin failures++; $display("FAIL x2 d=%h", d); end
      if (lhs(wide_t'(o2), 3'(co2), 2) !== rhs(wide_t'(d), 3'(ci2), 2)) begin failures++; $display("FAIL x4 d=%h", d); end
      if (lhs(wide_t'(o3), co3, 3) !== rhs(wide_t'(d), ci3, 3)) begin failures++; $display("FAIL x8 d=%h", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
