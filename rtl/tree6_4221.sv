// tree6_4221: decimal 6:2 carry-save tree for (4221) operands.
//
// Six N-digit (4221) words are reduced to a sum word S and a carry word H with
//   z[0] + ... + z[5] = S + 2*H   (mod 10**N).
// Two decimal 3:2 CSAs take z[0..2] and z[3..5]; their doubled carries are
// fed to later levels the way the document draws its 6:2 column: the second
// CSA's 2H joins both sums in a middle CSA, and the first CSA's 2H joins the
// middle CSA's outputs in the last one. Every x2 sends a lateral decimal carry
// to the next digit; digit 0 receives 0 and the carry out of the top digit is
// dropped (the caller sizes N to hold the result). H is returned undoubled.
// Combinational.
module tree6_4221 #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0] z [6],
  output logic [4*N-1:0] h,
  output logic [4*N-1:0] s
);
  logic [4*N-1:0] s1, s2, s3, t1, t2, t3, u1, u2, u3, hx;
  logic           co1, co2, co3, co4;

  dec_csa_4221 #(.N(N)) u_c1 (.a(z[0]), .b(z[1]), .c(z[2]), .cin(1'b0), .s(s1), .h(u1), .h2(t1), .cout(co1));
  dec_csa_4221 #(.N(N)) u_c2 (.a(z[3]), .b(z[4]), .c(z[5]), .cin(1'b0), .s(s2), .h(u2), .h2(t2), .cout(co2));
  dec_csa_4221 #(.N(N)) u_c3 (.a(s1),   .b(t2),   .c(s2),   .cin(1'b0), .s(s3), .h(u3), .h2(t3), .cout(co3));
  dec_csa_4221 #(.N(N)) u_c4 (.a(t1),   .b(t3),   .c(s3),   .cin(1'b0), .s(s),  .h(h),  .h2(hx), .cout(co4));
endmodule
