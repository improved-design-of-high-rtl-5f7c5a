// dec_mult_top: the two combinational decimal fixed-point multipliers side
// by side, fed with the same operands.
//
// x and y are D-digit unsigned BCD integers; p_sd10 and p_sd5 are their
// 2D-digit BCD product, computed once by the SD radix-10 multiplier
// (d+1 partial products, area-optimized (4221) tree) and once by the SD
// radix-5 multiplier (2d partial products, mixed (4221)/(5211) tree). Both
// outputs are equal for every input; the two datapaths trade partial product
// generation speed against reduction tree size. Purely combinational: the
// product is valid one propagation delay after the inputs settle, and a
// surrounding pipeline may register inputs and outputs as it needs.
module dec_mult_top #(
  parameter int unsigned D = 16
) (
  input  logic [4*D-1:0] x,
  input  logic [4*D-1:0] y,
  output logic [8*D-1:0] p_sd10,
  output logic [8*D-1:0] p_sd5
);
  mult_sd10 #(.D(D)) u_sd10 (.x(x), .y(y), .p(p_sd10));
  mult_sd5  #(.D(D)) u_sd5  (.x(x), .y(y), .p(p_sd5));
endmodule
