// rec_4221s_5211s: (4221s) to (5211s) digit recoder for an N-digit word.
//
// The input digits must lie in the non-redundant subset (4221s)
// (0000 0001 0010 0011 1000 1001 1010 1011 1110 1111 for 0..9), which is what
// BCD->(4221) recoding and every x2 step produce. Knowing that, the recoder
// needs fewer gates and less depth than the general (4221)->(5211s) one; the
// paper uses it after the first x2 of a cascade and after BCD->(4221). The
// output is the (5211s) code of the same value. Per digit (i3..i0 in, o3..o0
// out):
//   o3 = i3 (i1 | i0)
//   o2 = i3 ? (i2 | ~(i1 ^ i0)) : i1
//   o1 = i3 (~i1 ~i0 | i2 i0)
//   o0 = i3 ? (~i0 | i2) : i0
// These equations are this design's own minimisation over the ten valid
// inputs; other inputs give unspecified outputs. Combinational.
module rec_4221s_5211s #(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] d,
  output logic [4*N-1:0] o
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic i3, i2, i1, i0;
      {i3, i2, i1, i0} = d[4*i +: 4];
      o[4*i+3] = i3 & (i1 | i0);
      o[4*i+2] = i3 ? (i2 | ~(i1 ^ i0)) : i1;
      o[4*i+1] = i3 & ((~i1 & ~i0) | (i2 & i0));
      o[4*i+0] = i3 ? (~i0 | i2) : i0;
    end
  end
endmodule
