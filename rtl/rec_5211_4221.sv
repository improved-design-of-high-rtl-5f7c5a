// rec_5211_4221: (5211) to (4221) digit recoder for an N-digit word.
//
// Z = 5*z3 + 2*z2 + z1 + z0 = 4*z3 + 2*z2 + (z3 + z1 + z0); one full adder per
// digit turns the three unit-weight bits into a (2,1) pair, so the (4221)
// digit is {z3, z2, carry, sum}. Combinational, one full-adder delay.
module rec_5211_4221 #(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] d,
  output logic [4*N-1:0] o
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      o[4*i+3] = d[4*i+3];
      o[4*i+2] = d[4*i+2];
      o[4*i+1] = (d[4*i+3] & d[4*i+1]) | (d[4*i+3] & d[4*i+0]) | (d[4*i+1] & d[4*i+0]);
      o[4*i+0] = d[4*i+3] ^ d[4*i+1] ^ d[4*i+0];
    end
  end
endmodule
