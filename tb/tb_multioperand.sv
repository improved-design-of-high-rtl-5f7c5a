// tb_multioperand: decimal multioperand addition of sixteen 16-digit (64-bit)
// BCD operands, the workload on which the proposed carry-save trees are
// compared with other decimal tree adders.
//
// Each BCD operand is recoded to (4221) by rec_bcd_4221 and widened to
// N = 18 digits, enough for the largest sum 16 * (10**16 - 1). Three
// reductions run side by side, each followed by the conversion of 2H and S
// to BCD (adder_setup) and a BCD carry-propagate addition (bcd_qt_adder):
//   area   tree17_area  with the 16 operands and one zero word
//   delay  tree17_delay with the 16 operands and one zero word
//   mixed  tree16_mixed with operands 0..7 in (4221) and operands 8..15
//          recoded to (5211) by rec_4221_5211s
// Every BCD sum is compared with the sum of the operand values. Vectors:
// all nines, all zero, then random operands, half of them biased toward the
// digit 9 so that long carry chains occur. Combinational DUT, one vector per
// time step; a watchdog ends the run if it hangs.
module tb_multioperand;
  import dec_tb_pkg::*;
  localparam int D = 16;   // digits per operand
  localparam int N = 18;   // digits of the sum
  localparam int K = 16;   // operands

  logic [4*D-1:0] op [K];
  logic [4*N-1:0] z4221 [17];
  logic [4*N-1:0] zlo [8], zhi [8];
  logic [4*N-1:0] ha, sa, hd, sd, hm, sm;
  logic [4*N-1:0] h2a, s6a, h2d, s6d, h2m, s6m;
  logic [4*N-1:0] pa, pd, pm;
  logic           ca, cd, cm;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < K; k++) begin : g_op
    rec_bcd_4221 #(.N(N)) u_rec (.bcd({8'h00, op[k]}), .o(z4221[k]));
  end
  assign z4221[16] = '0;

  for (genvar k = 0; k < 8; k++) begin : g_mix
    assign zlo[k] = z4221[k];
    rec_4221_5211s #(.N(N)) u_r5 (.d(z4221[k+8]), .o(zhi[k]));
  end

  tree17_area  #(.N(N)) u_area  (.z(z4221), .h(ha), .s(sa));
  tree17_delay #(.N(N)) u_delay (.z(z4221), .h(hd), .s(sd));
  tree16_mixed #(.N(N)) u_mixed (.z4221(zlo), .z5211(zhi), .h(hm), .s(sm));

  adder_setup #(.N(N)) u_set_a (.h(ha), .s(sa), .h2_bcd(h2a), .s_xs6(s6a));
  adder_setup #(.N(N)) u_set_d (.h(hd), .s(sd), .h2_bcd(h2d), .s_xs6(s6d));
  adder_setup #(.N(N)) u_set_m (.h(hm), .s(sm), .h2_bcd(h2m), .s_xs6(s6m));

  bcd_qt_adder #(.N(N)) u_add_a (.a(h2a), .b(s6a), .cin(1'b0), .s(pa), .cout(ca));
  bcd_qt_adder #(.N(N)) u_add_d (.a(h2d), .b(s6d), .cin(1'b0), .s(pd), .cout(cd));
  bcd_qt_adder #(.N(N)) u_add_m (.a(h2m), .b(s6m), .cin(1'b0), .s(pm), .cout(cm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      num_t r;
      wide_t want;
      r = 0;
      for (int k = 0; k < K; k++) begin
        num_t v;
        v = (t == 0) ? pow10(D) - 1 : (t == 1) ? 0 : rand_val(D, t % 2);
        op[k] = 64'(to_bcd(v, D));
        r += v;
      end
      want = to_bcd(r, N);
      #1;
      checks += 3;
      if (wide_t'(pa) !== want || ca !== 1'b0) begin failures++; $display("FAIL area t=%0d sum=%h", t, pa); end
      if (wide_t'(pd) !== want || cd !== 1'b0) begin failures++; $display("FAIL delay t=%0d sum=%h", t, pd); end
      if (wide_t'(pm) !== want || cm !== 1'b0) begin failures++; $display("FAIL mixed t=%0d sum=%h", t, pm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
