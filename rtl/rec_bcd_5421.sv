// rec_bcd_5421: BCD to (5421) recoder for an N-digit word.
//
// The (5421) code is non-redundant: digits 0..4 keep their BCD pattern and
// 5..9 become 1000..1100. A one-bit left shift of a (5421) word is the BCD
// word of twice its value, used to build 2X. Combinational.
module rec_bcd_5421
  import dec_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] bcd,
  output logic [4*N-1:0] o
);
  always_comb begin
    for (int i = 0; i < N; i++) o[4*i +: 4] = enc5421(bcd[4*i +: 4]);
  end
endmodule
