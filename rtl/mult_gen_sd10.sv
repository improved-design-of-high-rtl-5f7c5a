// mult_gen_sd10: multiplicand multiples X, 2X, 3X, 4X, 5X in (4221) for the
// SD radix-10 multiplier.
//
// From a D-digit BCD multiplicand x, every output is a (D+1)-digit (4221) word:
//   X   BCD->(4221) recoding (lands in the (4221s) subset)
//   2X  BCD->(5421) recoding, a one-bit left shift (giving 2X in BCD), then
//       BCD->(4221)
//   4X  x2 of 2X: 2X is in (4221s), so the smaller (4221s)->(5211s) recoder and a one-bit shift
//   5X  a three-bit left shift of X(4221), which is 5X in (5211), then the
//       one-full-adder (5211)->(4221) recoder
//   3X  the only carry-propagating multiple: X + 2X in a (D+1)-digit BCD
//       adder, then BCD->(4221); it sets the latency of this block
// Some output bits are plain wires or constants (the top digit of X is zero,
// the recoders pass the weight-1 bit through, 5X and 2X end in fixed bits).
// Combinational.
module mult_gen_sd10 #(
  parameter int unsigned D = 16
) (
  input  logic [4*D-1:0]     x,
  output logic [4*(D+1)-1:0] m1,
  output logic [4*(D+1)-1:0] m2,
  output logic [4*(D+1)-1:0] m3,
  output logic [4*(D+1)-1:0] m4,
  output logic [4*(D+1)-1:0] m5
);
  logic [4*D-1:0]     x4221, x5421;
  logic [4*(D+1)-1:0] x2bcd, x3bcd, x5_5211;
  logic               c4, c3;

  rec_bcd_4221 #(.N(D)) u_x (.bcd(x), .o(x4221));
  assign m1 = {4'b0000, x4221};

  rec_bcd_5421 #(.N(D)) u_x5421 (.bcd(x), .o(x5421));
  assign x2bcd = {3'b000, x5421, 1'b0};
  rec_bcd_4221 #(.N(D+1)) u_x2 (.bcd(x2bcd), .o(m2));

  dec_x2n_4221 #(.N(D+1), .SH(1), .S_IN(1'b1)) u_x4 (.d(m2), .cin(1'b0), .o(m4), .cout(c4));

  assign x5_5211 = {1'b0, x4221, 3'b000};
  rec_5211_4221 #(.N(D+1)) u_x5 (.d(x5_5211), .o(m5));

  bcd_qt_adder #(.N(D+1), .B_XS6(1'b0)) u_add3 (.a({4'b0000, x}), .b(x2bcd), .cin(1'b0),
                                               .s(x3bcd), .cout(c3));
  rec_bcd_4221 #(.N(D+1)) u_x3 (.bcd(x3bcd), .o(m3));
endmodule
