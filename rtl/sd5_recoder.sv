// sd5_recoder: recodes one BCD multiplier digit Y into a pair of radix-5
// signed digits, Y = 5*Yu + Yl with Yu in {0,1,2} and Yl in {-2..2}.
//
// Yu is given as hot-one selects yu[2:1], Yl as hot-one selects ylp[2:1]
// (+2, +1) and ylm[2:1] (-2, -1), and ysl flags a negative Yl. There is no
// dependence between digits. All equations are the document's.
// Combinational.
module sd5_recoder (
  input  logic [3:0] y,
  output logic [2:1] yu,
  output logic [2:1] ylp,
  output logic [2:1] ylm,
  output logic       ysl
);
  always_comb begin
    yu[2]  = y[3];
    yu[1]  = y[2] | (y[1] & y[0]);
    ylp[2] = y[1] & ((y[2] & y[0]) | (~y[2] & ~y[0]));
    ylp[1] = (~y[3] & ~y[2] & ~y[1] & y[0]) | (y[2] & y[1] & ~y[0]);
    ylm[1] = (y[3] & y[0]) | (y[2] & ~y[1] & ~y[0]);
    ylm[2] = (y[3] & ~y[0]) | (~y[2] & y[1] & y[0]);
    ysl    = y[3] | (y[2] & ~y[1] & ~y[0]) | (~y[2] & y[1] & y[0]);
  end
endmodule
