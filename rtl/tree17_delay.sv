// tree17_delay: delay-optimized decimal 17:2 carry-save tree, (4221) operands.
//
// Reduces 17 N-digit (4221) words to S and H with sum(z) = S + 2*H
// (mod 10**N). The first level is not a row of 3:2 CSAs but two decimal digit
// adders built from bit counters: an 8:4 on z[0..7] and a 9:4 on z[8..16].
// Each returns four words worth x4, x2, x2 and x1. The x4 words are doubled
// twice while the other words are already being added, so the slow
// multiplications run in parallel with the CSA levels:
//   P1 = CSA(a2, a1, b2)               at x2
//   P2 = CSA(a0, b0, 2*b1)             at x1
//   P3 = CSA(S1, H2, 2*H1)             at x2
//   P4 = CSA(S2, 4*a3, 4*b3)           at x1
//   P5 = CSA(S4, 2*H4, 2*S3)           at x1
//   P6 = CSA(S5, 2*H5, 4*H3)           -> S, H
// The grouping is this design's own reading of the document's delay-optimized
// tree. H is returned undoubled. Carries out of the top digit are dropped.
// Combinational.
module tree17_delay #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0] z [17],
  output logic [4*N-1:0] h,
  output logic [4*N-1:0] s
);
  logic [4*N-1:0] za [8], zb [9];
  logic [4*N-1:0] a [4], b [4];
  logic [4*N-1:0] b1x2, a3x4, b3x4, s3x2, h3x4;
  logic [4*N-1:0] s1, h1, d1, s2, h2, d2, s3, h3, d3, s4, h4, d4, s5, h5, d5, d6;
  logic [1:0]     c4a, c4b, c4c;
  logic [7:0]     co;

  always_comb begin
    for (int k = 0; k < 8; k++) za[k] = z[k];
    for (int k = 0; k < 9; k++) zb[k] = z[8+k];
  end

  dec_digit_adder #(.N(N), .NIN(8)) u_da8 (.x(za), .o(a));
  dec_digit_adder #(.N(N), .NIN(9)) u_da9 (.x(zb), .o(b));

  dec_x2n_4221 #(.N(N), .SH(1)) u_b1 (.d(b[1]), .cin(1'b0), .o(b1x2), .cout(co[0]));
  dec_x2n_4221 #(.N(N), .SH(2)) u_a3 (.d(a[3]), .cin('0),   .o(a3x4), .cout(c4a));
  dec_x2n_4221 #(.N(N), .SH(2)) u_b3 (.d(b[3]), .cin('0),   .o(b3x4), .cout(c4b));

  dec_csa_4221 #(.N(N)) u_p1 (.a(a[2]), .b(a[1]), .c(b[2]), .cin(1'b0), .s(s1), .h(h1), .h2(d1), .cout(co[1]));
  dec_csa_4221 #(.N(N)) u_p2 (.a(a[0]), .b(b[0]), .c(b1x2), .cin(1'b0), .s(s2), .h(h2), .h2(d2), .cout(co[2]));
  dec_csa_4221 #(.N(N)) u_p3 (.a(s1),   .b(h2),   .c(d1),   .cin(1'b0), .s(s3), .h(h3), .h2(d3), .cout(co[3]));
  dec_csa_4221 #(.N(N)) u_p4 (.a(s2),   .b(a3x4), .c(b3x4), .cin(1'b0), .s(s4), .h(h4), .h2(d4), .cout(co[4]));
  dec_x2n_4221 #(.N(N), .SH(1)) u_s3 (.d(s3), .cin(1'b0), .o(s3x2), .cout(co[5]));
  dec_x2n_4221 #(.N(N), .SH(2)) u_h3 (.d(h3), .cin('0),   .o(h3x4), .cout(c4c));
  dec_csa_4221 #(.N(N)) u_p5 (.a(s4),   .b(d4),   .c(s3x2), .cin(1'b0), .s(s5), .h(h5), .h2(d5), .cout(co[6]));
  dec_csa_4221 #(.N(N)) u_p6 (.a(s5),   .b(d5),   .c(h3x4), .cin(1'b0), .s(s),  .h(h),  .h2(d6), .cout(co[7]));
endmodule
