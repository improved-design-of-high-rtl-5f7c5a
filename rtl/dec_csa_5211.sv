// dec_csa_5211: decimal 3:2 carry-save adder for N-digit (5211) words.
//
// A row of binary full adders gives a sum word S and a carry word W, both
// valid (5211) digits, with A + B + C = S + 2*W. A one-bit left shift of a
// (5211) word doubles it and yields (4221) digits, so 2W needs only wiring.
//   MIXED = 1: the doubled carry is left in (4221) (h2 is 2W in (4221)).
//   MIXED = 0: 2W is recoded back to (5211s) so that both outputs are (5211).
// s is always (5211). Digit 0 takes cin as its shifted-in carry; cout is the
// weight-5 bit shifted out of the top digit. Combinational.
module dec_csa_5211 #(
  parameter int unsigned N     = 16,
  parameter bit          MIXED = 1'b0
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic [4*N-1:0] c,
  input  logic           cin,
  output logic [4*N-1:0] s,
  output logic [4*N-1:0] h2,
  output logic           cout
);
  logic [4*N-1:0] w, w2;

  assign s = a ^ b ^ c;
  assign w = (a & b) | (a & c) | (b & c);
  assign w2 = {w[4*N-2:0], cin};
  assign cout = w[4*N-1];

  if (MIXED) begin : g_mixed
    assign h2 = w2;
  end else begin : g_5211
    rec_4221_5211s #(.N(N)) u_rec (.d(w2), .o(h2));
  end
endmodule
