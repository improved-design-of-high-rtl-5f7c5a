// tree16_mixed: delay-optimized decimal 16:2 tree for mixed operands.
//
// Eight (4221) words z4221[] and eight (5211) words z5211[] are reduced to
// (4221) words S and H with sum = S + 2*H (mod 10**N). Each half enters an
// 8:4 decimal digit adder. The (4221) adder's words (x4, x2, x2, x1) are used
// as they are. The (5211) adder's words are converted cheaply: a one-bit
// shift turns a (5211) word of factor 2^k into a (4221) word of factor
// 2^(k-1), and the x1 word goes through the (5211)->(4221) recoder. The
// (5211) operands are available earlier than the (4221) ones, so their
// conversions overlap the first CSA level. Schedule (factor in brackets):
//   Q1 = CSA(a2, a1, 2*a3)            [2]
//   Q2 = CSA(L1 b2, L1 b1, rec b0)    [1]
//   Q3 = CSA(S1, 2*H1, H2)            [2]
//   Q4 = CSA(a0, S2, 2*(L1 b3))       [1]
//   Q5 = CSA(S4, 2*H4, 2*S3)          [1]
//   Q6 = CSA(S5, 2*H5, 4*H3)          -> S, H
// The grouping is this design's own reading of the document's tree.
// H is returned undoubled. Combinational.
module tree16_mixed #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0] z4221 [8],
  input  logic [4*N-1:0] z5211 [8],
  output logic [4*N-1:0] h,
  output logic [4*N-1:0] s
);
  logic [4*N-1:0] a [4], b [4];
  logic [4*N-1:0] a3x2, b3l, b3x2, b2l, b1l, b0r;
  logic [4*N-1:0] s1, h1, d1, s2, h2, d2, s3, h3, d3, s4, h4, d4, s5, h5, d5, d6;
  logic [4*N-1:0] s3x2, h3x4;
  logic [1:0]     c4;
  logic [8:0]     co;

  dec_digit_adder #(.N(N), .NIN(8)) u_da (.x(z4221), .o(a));
  dec_digit_adder #(.N(N), .NIN(8)) u_db (.x(z5211), .o(b));

  // (5211) words shifted left one bit: double value, now (4221)
  assign b3l = {b[3][4*N-2:0], 1'b0};
  assign b2l = {b[2][4*N-2:0], 1'b0};
  assign b1l = {b[1][4*N-2:0], 1'b0};
  rec_5211_4221 #(.N(N)) u_rb0 (.d(b[0]), .o(b0r));

  dec_x2n_4221 #(.N(N), .SH(1)) u_a3 (.d(a[3]), .cin(1'b0), .o(a3x2), .cout(co[0]));
  dec_x2n_4221 #(.N(N), .SH(1)) u_b3 (.d(b3l),  .cin(1'b0), .o(b3x2), .cout(co[1]));

  dec_csa_4221 #(.N(N)) u_q1 (.a(a[2]), .b(a[1]), .c(a3x2), .cin(1'b0), .s(s1), .h(h1), .h2(d1), .cout(co[2]));
  dec_csa_4221 #(.N(N)) u_q2 (.a(b2l),  .b(b1l),  .c(b0r),  .cin(1'b0), .s(s2), .h(h2), .h2(d2), .cout(co[3]));
  dec_csa_4221 #(.N(N)) u_q3 (.a(s1),   .b(d1),   .c(h2),   .cin(1'b0), .s(s3), .h(h3), .h2(d3), .cout(co[4]));
  dec_csa_4221 #(.N(N)) u_q4 (.a(a[0]), .b(s2),   .c(b3x2), .cin(1'b0), .s(s4), .h(h4), .h2(d4), .cout(co[5]));
  dec_x2n_4221 #(.N(N), .SH(1)) u_s3 (.d(s3), .cin(1'b0), .o(s3x2), .cout(co[6]));
  dec_x2n_4221 #(.N(N), .SH(2)) u_h3 (.d(h3), .cin('0),   .o(h3x4), .cout(c4));
  dec_csa_4221 #(.N(N)) u_q5 (.a(s4),   .b(d4),   .c(s3x2), .cin(1'b0), .s(s5), .h(h5), .h2(d5), .cout(co[7]));
  dec_csa_4221 #(.N(N)) u_q6 (.a(s5),   .b(d5),   .c(h3x4), .cin(1'b0), .s(s),  .h(h),  .h2(d6), .cout(co[8]));
endmodule
