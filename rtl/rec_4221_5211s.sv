// rec_4221_5211s: (4221) to (5211s) digit recoder for an N-digit word.
//
// Any of the 16 (4221) patterns of a digit is mapped to the single (5211s)
// pattern of the same value (0000 0001 0100 0101 0111 1000 1001 1100 1101
// 1111 for 0..9). Shifting the result left by one bit gives twice the value in
// (4221s), which is how every decimal x2 in the design is built. The logic is
// written from the value and the code table; a synthesis tool minimises it.
module rec_4221_5211s
  import dec_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] d,
  output logic [4*N-1:0] o
);
  always_comb begin
    for (int i = 0; i < N; i++) o[4*i +: 4] = enc5211s(val4221(d[4*i +: 4]));
  end
endmodule
