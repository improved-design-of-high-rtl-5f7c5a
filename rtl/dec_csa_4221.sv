// dec_csa_4221: decimal 3:2 carry-save adder for N-digit (4221) words.
//
// A row of binary full adders adds the three words bit by bit. Because the
// four bit weights of (4221) sum to 9, the sum bits S and the carry bits H are
// again valid (4221) digits with A + B + C = S + 2*H, and no decimal
// correction is needed. The carry word is then doubled by a (4221)->(5211s)
// recoder and a one-bit left shift, so h2 = 2*H in (4221). The raw carry word h
// is also brought out for trees that postpone the doubling. Digit 0 takes
// cin as its shifted-in decimal carry; cout is the carry out of the top digit.
// The full adder is written as sum = a^b^c and the majority carry; the
// fast-carry gate form of the document's full adder is left to synthesis.
// Combinational.
module dec_csa_4221 #(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic [4*N-1:0] c,
  input  logic           cin,
  output logic [4*N-1:0] s,
  output logic [4*N-1:0] h,
  output logic [4*N-1:0] h2,
  output logic           cout
);
  assign s = a ^ b ^ c;
  assign h = (a & b) | (a & c) | (b & c);

  dec_x2n_4221 #(.N(N), .SH(1)) u_x2 (.d(h), .cin(cin), .o(h2), .cout(cout));
endmodule
