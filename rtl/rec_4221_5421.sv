// rec_4221_5421: (4221) to (5421) recoder for an N-digit word.
//
// Used in front of the final adder: a (5421) word shifted left by one bit is
// twice its value in BCD, so the carry word H becomes 2H in BCD by this
// recoding plus wiring. Combinational.
module rec_4221_5421
  import dec_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] d,
  output logic [4*N-1:0] o
);
  always_comb begin
    for (int i = 0; i < N; i++) o[4*i +: 4] = enc5421(val4221(d[4*i +: 4]));
  end
endmodule
