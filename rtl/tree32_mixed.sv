// tree32_mixed: delay-optimized decimal 32:2 tree for mixed operands; the
// partial product reduction of the SD radix-5 multiplier.
//
// Sixteen (4221) words z4221[] and sixteen (5211) words z5211[] are reduced
// to (4221) words S and H with sum = S + 2*H (mod 10**N). Four 8:4 decimal
// digit adders form the first level, two per code. Words from the (5211)
// adders are converted by wiring (a one-bit shift halves the factor and gives
// (4221)) or by the one-full-adder recoder (the x1 word). From then on words of
// equal factor share 3:2 CSAs and the survivors are brought back to factor 1
// with x2, x4 and x8 blocks (factor in brackets):
//   R1..R2  CSA(a2, a1, 2*a3) and CSA(b2, b1, 2*b3)        [2]
//   R3..R4  CSA(L1 c2, L1 c1, rec c0), same for d          [1]
//   R5      CSA(a0, b0, 2*(L1 c3))                         [1]
//   R6      CSA(S3, S4, S5)                                [1]
//   R7, R8  CSA(S1, S2, H3), CSA(H4, H5, L1 d3)             [2]
//   R9      CSA(H6, S7, S8)                                [2]
//   R10     CSA(H1, H2, H7)                                [4]
//   R11     CSA(H8, H9, S10)                               [4]
//   R12     CSA(S6, 2*S9, 4*S11)                           [1]
//   R13     CSA(S12, 2*H12, 8*H10)                         [1]
//   R14     CSA(S13, 2*H13, 8*H11) -> S, H
// The grouping is this design's own reading of the document's tree.
// H is returned undoubled. Carries out of the top digit are dropped.
// Combinational.
module tree32_mixed #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0] z4221 [16],
  input  logic [4*N-1:0] z5211 [16],
  output logic [4*N-1:0] h,
  output logic [4*N-1:0] s
);
  logic [4*N-1:0] xa [8], xb [8], xc [8], xd [8];
  logic [4*N-1:0] a [4], b [4], c [4], d [4];
  logic [4*N-1:0] c3l, c2l, c1l, c0r, d3l, d2l, d1l, d0r;
  logic [4*N-1:0] a3x2, b3x2, c3x2;
  logic [4*N-1:0] rs [15], rh [15], rd [15];
  logic [4*N-1:0] s9x2, s11x4, h10x8, h11x8;
  logic [14:0]    co;
  logic [3:0]     cx;
  logic [1:0]     c4;
  logic [2:0]     c8a, c8b;

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      xa[k] = z4221[k];
      xb[k] = z4221[8+k];
      xc[k] = z5211[k];
      xd[k] = z5211[8+k];
    end
  end

  dec_digit_adder #(.N(N), .NIN(8)) u_da (.x(xa), .o(a));
  dec_digit_adder #(.N(N), .NIN(8)) u_db (.x(xb), .o(b));
  dec_digit_adder #(.N(N), .NIN(8)) u_dc (.x(xc), .o(c));
  dec_digit_adder #(.N(N), .NIN(8)) u_dd (.x(xd), .o(d));

  assign c3l = {c[3][4*N-2:0], 1'b0};
  assign c2l = {c[2][4*N-2:0], 1'b0};
  assign c1l = {c[1][4*N-2:0], 1'b0};
  assign d3l = {d[3][4*N-2:0], 1'b0};
  assign d2l = {d[2][4*N-2:0], 1'b0};
  assign d1l = {d[1][4*N-2:0], 1'b0};
  rec_5211_4221 #(.N(N)) u_rc0 (.d(c[0]), .o(c0r));
  rec_5211_4221 #(.N(N)) u_rd0 (.d(d[0]), .o(d0r));

  dec_x2n_4221 #(.N(N), .SH(1)) u_a3 (.d(a[3]), .cin(1'b0), .o(a3x2), .cout(cx[0]));
  dec_x2n_4221 #(.N(N), .SH(1)) u_b3 (.d(b[3]), .cin(1'b0), .o(b3x2), .cout(cx[1]));
  dec_x2n_4221 #(.N(N), .SH(1)) u_c3 (.d(c3l),  .cin(1'b0), .o(c3x2), .cout(cx[2]));

  dec_csa_4221 #(.N(N)) u_r1  (.a(a[2]),  .b(a[1]),  .c(a3x2),  .cin(1'b0), .s(rs[1]),  .h(rh[1]),  .h2(rd[1]),  .cout(co[1]));
  dec_csa_4221 #(.N(N)) u_r2  (.a(b[2]),  .b(b[1]),  .c(b3x2),  .cin(1'b0), .s(rs[2]),  .h(rh[2]),  .h2(rd[2]),  .cout(co[2]));
  dec_csa_4221 #(.N(N)) u_r3  (.a(c2l),   .b(c1l),   .c(c0r),   .cin(1'b0), .s(rs[3]),  .h(rh[3]),  .h2(rd[3]),  .cout(co[3]));
  dec_csa_4221 #(.N(N)) u_r4  (.a(d2l),   .b(d1l),   .c(d0r),   .cin(1'b0), .s(rs[4]),  .h(rh[4]),  .h2(rd[4]),  .cout(co[4]));
  dec_csa_4221 #(.N(N)) u_r5  (.a(a[0]),  .b(b[0]),  .c(c3x2),  .cin(1'b0), .s(rs[5]),  .h(rh[5]),  .h2(rd[5]),  .cout(co[5]));
  dec_csa_4221 #(.N(N)) u_r6  (.a(rs[3]), .b(rs[4]), .c(rs[5]), .cin(1'b0), .s(rs[6]),  .h(rh[6]),  .h2(rd[6]),  .cout(co[6]));
  dec_csa_4221 #(.N(N)) u_r7  (.a(rs[1]), .b(rs[2]), .c(rh[3]), .cin(1'b0), .s(rs[7]),  .h(rh[7]),  .h2(rd[7]),  .cout(co[7]));
  dec_csa_4221 #(.N(N)) u_r8  (.a(rh[4]), .b(rh[5]), .c(d3l),   .cin(1'b0), .s(rs[8]),  .h(rh[8]),  .h2(rd[8]),  .cout(co[8]));
  dec_csa_4221 #(.N(N)) u_r9  (.a(rh[6]), .b(rs[7]), .c(rs[8]), .cin(1'b0), .s(rs[9]),  .h(rh[9]),  .h2(rd[9]),  .cout(co[9]));
  dec_csa_4221 #(.N(N)) u_r10 (.a(rh[1]), .b(rh[2]), .c(rh[7]), .cin(1'b0), .s(rs[10]), .h(rh[10]), .h2(rd[10]), .cout(co[10]));
  dec_csa_4221 #(.N(N)) u_r11 (.a(rh[8]), .b(rh[9]), .c(rs[10]),.cin(1'b0), .s(rs[11]), .h(rh[11]), .h2(rd[11]), .cout(co[11]));

  dec_x2n_4221 #(.N(N), .SH(1)) u_s9  (.d(rs[9]),  .cin(1'b0), .o(s9x2),  .cout(cx[3]));
  dec_x2n_4221 #(.N(N), .SH(2)) u_s11 (.d(rs[11]), .cin('0),   .o(s11x4), .cout(c4));
  dec_x2n_4221 #(.N(N), .SH(3)) u_h10 (.d(rh[10]), .cin('0),   .o(h10x8), .cout(c8a));
  dec_x2n_4221 #(.N(N), .SH(3)) u_h11 (.d(rh[11]), .cin('0),   .o(h11x8), .cout(c8b));

  dec_csa_4221 #(.N(N)) u_r12 (.a(rs[6]),  .b(s9x2),   .c(s11x4), .cin(1'b0), .s(rs[12]), .h(rh[12]), .h2(rd[12]), .cout(co[12]));
  dec_csa_4221 #(.N(N)) u_r13 (.a(rs[12]), .b(rd[12]), .c(h10x8), .cin(1'b0), .s(rs[13]), .h(rh[13]), .h2(rd[13]), .cout(co[13]));
  dec_csa_4221 #(.N(N)) u_r14 (.a(rs[13]), .b(rd[13]), .c(h11x8), .cin(1'b0), .s(s),      .h(h),      .h2(rd[14]), .cout(co[14]));

  assign rs[0] = '0;
  assign rh[0] = '0;
  assign rd[0] = '0;
  assign rs[14] = s;
  assign rh[14] = h;
  assign co[0] = 1'b0;
endmodule
