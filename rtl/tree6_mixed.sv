// tree6_mixed: decimal 6:2 carry-save tree for mixed (4221)/(5211) operands.
//
// z4221[0..2] are (4221) words and z5211[0..2] are (5211) words; the tree
// returns (4221) words S and H with sum = S + 2*H (mod 10**N).
// The (4221) half goes through a decimal 3:2 CSA with a doubled carry. The
// (5211) half goes through a binary 3:2 CSA whose carry word is doubled by a
// one-bit shift alone (a shifted (5211) word is twice its value in (4221)),
// and whose sum word is turned into (4221) by a one-full-adder recoder that
// runs in parallel with the middle CSA. Carries out of the top digit are
// dropped; H is returned undoubled. Combinational.
module tree6_mixed #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0] z4221 [3],
  input  logic [4*N-1:0] z5211 [3],
  output logic [4*N-1:0] h,
  output logic [4*N-1:0] s
);
  logic [4*N-1:0] sl, hl, dl, sr, dr, sr4, sm, hm, dm, df;
  logic [3:0]     co;

  dec_csa_4221 #(.N(N)) u_l (.a(z4221[0]), .b(z4221[1]), .c(z4221[2]), .cin(1'b0),
                            .s(sl), .h(hl), .h2(dl), .cout(co[0]));
  dec_csa_5211 #(.N(N), .MIXED(1'b1)) u_r (.a(z5211[0]), .b(z5211[1]), .c(z5211[2]), .cin(1'b0),
                                          .s(sr), .h2(dr), .cout(co[1]));
  rec_5211_4221 #(.N(N)) u_rec (.d(sr), .o(sr4));
  dec_csa_4221 #(.N(N)) u_m (.a(dl), .b(sl), .c(dr), .cin(1'b0), .s(sm), .h(hm), .h2(dm), .cout(co[2]));
  dec_csa_4221 #(.N(N)) u_f (.a(dm), .b(sm), .c(sr4), .cin(1'b0), .s(s), .h(h), .h2(df), .cout(co[3]));
endmodule
