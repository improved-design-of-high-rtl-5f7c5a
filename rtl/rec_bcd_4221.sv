// rec_bcd_4221: BCD to (4221) recoder for an N-digit word.
//
// Each digit is mapped with w3 = x3|x2, w2 = x3, w1 = x3|x1, w0 = x0, which
// lands exactly on the (4221s) subset, so a following x2 can use the simpler
// (4221s)->(5211s) recoding. Purely combinational.
module rec_bcd_4221 #(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] bcd,
  output logic [4*N-1:0] o
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      o[4*i+3] = bcd[4*i+3] | bcd[4*i+2];
      o[4*i+2] = bcd[4*i+3];
      o[4*i+1] = bcd[4*i+3] | bcd[4*i+1];
      o[4*i+0] = bcd[4*i+0];
    end
  end
endmodule
