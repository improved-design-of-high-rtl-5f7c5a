// mult_gen_sd5: multiplicand multiples X, -X, 2X, -2X in (4221) for the
// SD radix-5 multiplier.
//
// X is the BCD->(4221) recoding of the D-digit multiplicand, 2X one x2 stage
// ((4221s)->(5211s) recoding and a one-bit shift), and the negatives are bit
// inversions, i.e. 9's complements (10**(D+1) - 1 - kX); the missing unit is
// added later as a hot one. All outputs are D+1 digits wide. No carry
// propagates, so this block is a few gate levels deep. Some output bits are
// plain wires or constants: the top digit of X is zero (of -X, all ones), and
// the BCD->(4221) recoding passes the weight-1 bit through. Combinational.
module mult_gen_sd5 #(
  parameter int unsigned D = 16
) (
  input  logic [4*D-1:0]     x,
  output logic [4*(D+1)-1:0] m1,
  output logic [4*(D+1)-1:0] m2,
  output logic [4*(D+1)-1:0] mn1,
  output logic [4*(D+1)-1:0] mn2
);
  logic [4*D-1:0] x4221;
  logic           c2;

  rec_bcd_4221 #(.N(D)) u_x (.bcd(x), .o(x4221));
  assign m1 = {4'b0000, x4221};
  dec_x2n_4221 #(.N(D+1), .SH(1), .S_IN(1'b1)) u_x2 (.d(m1), .cin(1'b0), .o(m2), .cout(c2));
  assign mn1 = ~m1;
  assign mn2 = ~m2;
endmodule
