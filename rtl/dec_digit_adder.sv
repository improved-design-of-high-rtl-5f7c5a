// dec_digit_adder: decimal digit adder reducing NIN words to four (9:4, 8:4)
// or three (7:3) words.
//
// Every bit column (same digit, same bit weight) of the NIN input words is
// summed by a bit counter, which gives a (4221) count digit. The count bits
// are regrouped by their binary weight: o[k] takes bit k of the count of every
// column, keeping the column's place, so o[k] is a word in the input code
// ((4221) or (5211), whichever the inputs use) that carries a multiplicative
// factor: o[3] is worth x4, o[2] and o[1] x2, o[0] x1.
//   sum(x) = 4*o[3] + 2*o[2] + 2*o[1] + o[0]
// For NIN = 7 the count is a binary (421) value and o[2] is all zero.
// All output bits see the same counter delay. Combinational.
module dec_digit_adder #(
  parameter int unsigned N   = 16,
  parameter int unsigned NIN = 9
) (
  input  logic [4*N-1:0] x [NIN],
  output logic [4*N-1:0] o [4]
);
  for (genvar b = 0; b < 4*N; b++) begin : g_col
    logic [NIN-1:0] col;
    logic [3:0]     cnt;
    always_comb begin
      for (int k = 0; k < NIN; k++) col[k] = x[k][b];
    end
    bit_counter #(.NB(NIN)) u_cnt (.x(col), .z(cnt));
    assign o[3][b] = cnt[3];
    assign o[2][b] = cnt[2];
    assign o[1][b] = cnt[1];
    assign o[0][b] = cnt[0];
  end
endmodule
