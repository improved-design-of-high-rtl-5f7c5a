// sd10_recoder: recodes one BCD multiplier digit into a signed radix-10 digit
// Yb in {-5..5}.
//
// Yb_i = Y_i + ys_{i-1} - 10*ys_i, where ys_i = (Y_i >= 5). The magnitude is
// given as five hot-one selects y1..y5 (all zero for Yb = 0) and the sign as
// ys. ys depends on the digit alone, so recoding all digits is parallel; the
// only lateral input is the neighbour's ys_{i-1}. The sign and the y5, y4, y3
// equations are the document's; y2 and y1 are written here so that they
// satisfy the definition above for all inputs. Combinational.
module sd10_recoder (
  input  logic [3:0] y,    // BCD digit Y_i
  input  logic       ysp,  // ys_{i-1} of the next lower digit (0 for digit 0)
  output logic [5:1] sel,  // hot-one |Yb_i|: sel[k] = 1 selects kX
  output logic       ys    // sign of Yb_i (1 = negative)
);
  always_comb begin
    ys     = y[3] | (y[2] & (y[1] | y[0]));
    sel[5] = y[2] & ~y[1] & (y[0] ^ ysp);
    sel[4] = (ysp & y[0] & (y[2] ^ y[1])) | (~ysp & y[2] & ~y[0]);
    sel[3] = y[1] & (y[0] ^ ysp);
    sel[2] = (~ysp & ~y[0] & (y[3] | (~y[2] & y[1]))) | (ysp & ~y[3] & y[0] & ~(y[2] ^ y[1]));
    sel[1] = ~y[2] & ~y[1] & (y[0] ^ ysp);
  end
endmodule
