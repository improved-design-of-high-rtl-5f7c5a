// tree17_area: area-optimized decimal 17:2 carry-save tree, (4221) operands.
//
// Reduces 17 N-digit (4221) words to S and H with sum(z) = S + 2*H
// (mod 10**N). The area saving comes from postponing the decimal doublings:
// every intermediate word carries a power-of-two factor, words of equal factor
// are added in a 3:2 CSA first (2^n*(A+B+C) = 2^n*S + 2^(n+1)*H), and only the
// few survivors are brought back to factor 1 by x2, x4 and x8 blocks. Schedule
// (factor in brackets):
//   L1  five CSAs on z[0..14]               -> 5 S [1], 5 H [2]
//   L2  S0,S1,S2 | S3,S4,z15 | H0,H1,H2     -> [1],[2] | [1],[2] | [2],[4]
//   L3  with z16 at [1]; two H of L2 and S of the H-CSA at [2]
//   L4  one more [2] CSA; L5 one [4] CSA giving a [8] word
//   then three CSAs at [1], fed through x2, x4 and x8 blocks.
// The exact placement of every CSA is this design's own; it follows the
// document's area-optimized rule rather than a gate-for-gate copy of its
// figure. H is returned undoubled. Carries out of the top digit are dropped.
// Combinational.
module tree17_area #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0] z [17],
  output logic [4*N-1:0] h,
  output logic [4*N-1:0] s
);
  // sX/hX: sum and raw carry of CSA X; dX: doubled carry (unused where the
  // doubling is postponed)
  logic [4*N-1:0] sa [5], ha [5], da [5];
  logic [4*N-1:0] sb [3], hb [3], db [3];
  logic [4*N-1:0] sc [2], hc [2], dc [2];
  logic [4*N-1:0] sd, hd, dd, se, he, de;
  logic [4*N-1:0] sg, hg, dg, sh, hh, dh, di;
  logic [4*N-1:0] sd_x2, ha4_x2, hg_x2, se_x4, hh_x2, he_x8;
  logic [12:0]    co;
  logic [1:0]     co4;
  logic [2:0]     co8;
  logic [2:0]     co2;
  logic           co2b;

  for (genvar k = 0; k < 5; k++) begin : g_l1
    dec_csa_4221 #(.N(N)) u_a (.a(z[3*k]), .b(z[3*k+1]), .c(z[3*k+2]), .cin(1'b0),
                              .s(sa[k]), .h(ha[k]), .h2(da[k]), .cout(co[k]));
  end
  dec_csa_4221 #(.N(N)) u_b0 (.a(sa[0]), .b(sa[1]), .c(sa[2]), .cin(1'b0), .s(sb[0]), .h(hb[0]), .h2(db[0]), .cout(co[5]));
  dec_csa_4221 #(.N(N)) u_b1 (.a(sa[3]), .b(sa[4]), .c(z[15]), .cin(1'b0), .s(sb[1]), .h(hb[1]), .h2(db[1]), .cout(co[6]));
  dec_csa_4221 #(.N(N)) u_b2 (.a(ha[0]), .b(ha[1]), .c(ha[2]), .cin(1'b0), .s(sb[2]), .h(hb[2]), .h2(db[2]), .cout(co[7]));
  dec_csa_4221 #(.N(N)) u_c0 (.a(sb[0]), .b(sb[1]), .c(z[16]), .cin(1'b0), .s(sc[0]), .h(hc[0]), .h2(dc[0]), .cout(co[8]));
  dec_csa_4221 #(.N(N)) u_c1 (.a(hb[0]), .b(hb[1]), .c(sb[2]), .cin(1'b0), .s(sc[1]), .h(hc[1]), .h2(dc[1]), .cout(co[9]));
  dec_csa_4221 #(.N(N)) u_d0 (.a(hc[0]), .b(sc[1]), .c(ha[3]), .cin(1'b0), .s(sd),    .h(hd),    .h2(dd),    .cout(co[10]));
  dec_csa_4221 #(.N(N)) u_e0 (.a(hb[2]), .b(hc[1]), .c(hd),    .cin(1'b0), .s(se),    .h(he),    .h2(de),    .cout(co[11]));

  // back to factor 1
  dec_x2n_4221 #(.N(N), .SH(1)) u_m0 (.d(sd),    .cin(1'b0), .o(sd_x2),  .cout(co2[0]));
  dec_x2n_4221 #(.N(N), .SH(1)) u_m1 (.d(ha[4]), .cin(1'b0), .o(ha4_x2), .cout(co2[1]));
  dec_x2n_4221 #(.N(N), .SH(2)) u_m2 (.d(se),    .cin('0),   .o(se_x4),  .cout(co4));
  dec_x2n_4221 #(.N(N), .SH(3)) u_m3 (.d(he),    .cin('0),   .o(he_x8),  .cout(co8));

  dec_csa_4221 #(.N(N)) u_g (.a(sc[0]), .b(sd_x2), .c(ha4_x2), .cin(1'b0), .s(sg), .h(hg), .h2(dg), .cout(co[12]));
  assign hg_x2 = dg;
  dec_csa_4221 #(.N(N)) u_h (.a(sg), .b(hg_x2), .c(se_x4), .cin(1'b0), .s(sh), .h(hh), .h2(dh), .cout(co2[2]));
  assign hh_x2 = dh;
  dec_csa_4221 #(.N(N)) u_i (.a(sh), .b(hh_x2), .c(he_x8), .cin(1'b0), .s(s), .h(h), .h2(di), .cout(co2b));
endmodule
