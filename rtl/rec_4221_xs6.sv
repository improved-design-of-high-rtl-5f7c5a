// rec_4221_xs6: (4221) to BCD excess-6 recoder for an N-digit word.
//
// Each digit becomes the 4-bit binary value of (digit + 6), 6..15. Feeding the
// sum word to the final adder in excess-6 lets the adder detect decimal
// carries as plain 4-bit binary carries. Combinational.
module rec_4221_xs6
  import dec_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] d,
  output logic [4*N-1:0] o
);
  always_comb begin
    for (int i = 0; i < N; i++) o[4*i +: 4] = val4221(d[4*i +: 4]) + 4'd6;
  end
endmodule
