// ppgen_sd10: one SD radix-10 partial product PP[ROW] in (4221).
//
// A 5:1 hot-one multiplexer picks |Yb| * X from the (D+1)-digit multiples
// (none selected gives 0), and a row of XOR gates inverts it when the digit is
// negative (ys = 1), giving its 9's complement. The missing +1 of the 10's
// complement is not added here: the caller places ys as a hot one in the
// next partial product. Instead of sign extension, two leading digits encode
// the sign so that the constants of all rows cancel modulo 10**(2D):
//   ROW = 0      : digit D+2 = (0,0,0,~ys), digit D+1 = (ys,ys,ys,ys)
//   0 < ROW < D  : digit D+2 = 0,          digit D+1 = (1,1,1,~ys)
//   ROW = D      : both 0 (this row is +X or 0, never negative)
// Output: D+3 digits, not yet shifted to the row's weight. Combinational.
module ppgen_sd10 #(
  parameter int unsigned D   = 16,
  parameter int unsigned ROW = 0
) (
  input  logic [4*(D+1)-1:0] m1,
  input  logic [4*(D+1)-1:0] m2,
  input  logic [4*(D+1)-1:0] m3,
  input  logic [4*(D+1)-1:0] m4,
  input  logic [4*(D+1)-1:0] m5,
  input  logic [5:1]         sel,
  input  logic               ys,
  output logic [4*(D+3)-1:0] pp
);
  logic [4*(D+1)-1:0] mux;
  logic [3:0]         sgn1, sgn2;

  always_comb begin
    mux = ({(4*(D+1)){sel[1]}} & m1) | ({(4*(D+1)){sel[2]}} & m2) |
          ({(4*(D+1)){sel[3]}} & m3) | ({(4*(D+1)){sel[4]}} & m4) |
          ({(4*(D+1)){sel[5]}} & m5);
    if (ROW == 0) begin
      sgn2 = {3'b000, ~ys};
      sgn1 = {4{ys}};
    end else if (ROW < D) begin
      sgn2 = 4'b0000;
      sgn1 = {3'b111, ~ys};
    end else begin
      sgn2 = 4'b0000;
      sgn1 = 4'b0000;
    end
    pp = {sgn2, sgn1, mux ^ {(4*(D+1)){ys}}};
  end
endmodule
