// bit_counter: counts the ones in a column of NB equally weighted bits.
//
//   NB = 9: two levels of full adders. Three full adders reduce x0..x8 to
//           three sum and three carry bits; a full adder on the carries gives
//           the weight-4 and one weight-2 output, a full adder on the sums the
//           other weight-2 and the weight-1 output. z is a (4221) digit.
//   NB = 8: x0..x3 and x4..x7 are each counted into 3-bit binary values
//           Q0, Q1 in 0..4; a final level combines them into a (4221) digit.
//   NB = 7: a conventional 7:3 counter; z = {z4, 0, z2, z1}, i.e. a binary
//           (421) count placed in the 4-, 2- and 1-weight bits of a (4221) digit.
// The final combining level of the 8-bit counter and the gate form of the
// 7:3 counter are this design's own; the counts they produce are exact.
// Combinational.
module bit_counter #(
  parameter int unsigned NB = 9
) (
  input  logic [NB-1:0] x,
  output logic [3:0]    z
);
  function automatic logic [1:0] fa(input logic a, input logic b, input logic c);
    return {(a & b) | (a & c) | (b & c), a ^ b ^ c};
  endfunction

  if (NB == 9) begin : g_nine
    logic [1:0] f0, f1, f2, fc, fs;
    always_comb begin
      f0 = fa(x[0], x[1], x[2]);
      f1 = fa(x[3], x[4], x[5]);
      f2 = fa(x[6], x[7], x[8]);
      fc = fa(f0[1], f1[1], f2[1]);
      fs = fa(f0[0], f1[0], f2[0]);
      z  = {fc[1], fc[0], fs[1], fs[0]};
    end
  end else if (NB == 8) begin : g_eight
    logic [2:0] q0, q1;
    logic       c0;
    logic [2:0] t;   // count of weight-2 units, 0..4
    always_comb begin
      // Q0 = x0+x1+x2+x3 as a 3-bit binary count
      q0[0] = x[0] ^ x[1] ^ x[2] ^ x[3];
      q0[1] = ((x[0] & x[1]) ^ (x[2] & x[3])) | ((x[0] ^ x[1]) & (x[2] ^ x[3]));
      q0[2] = x[0] & x[1] & x[2] & x[3];
      q1[0] = x[4] ^ x[5] ^ x[6] ^ x[7];
      q1[1] = ((x[4] & x[5]) ^ (x[6] & x[7])) | ((x[4] ^ x[5]) & (x[6] ^ x[7]));
      q1[2] = x[4] & x[5] & x[6] & x[7];
      c0    = q0[0] & q1[0];
      t     = 3'(q0[1]) + 3'(q1[1]) + 3'(c0) + 3'({q0[2], 1'b0}) + 3'({q1[2], 1'b0});
      z[0]  = q0[0] ^ q1[0];
      z[3]  = (t >= 3'd2);
      z[2]  = t[0] | (t == 3'd4);
      z[1]  = (t == 3'd4);
    end
  end else begin : g_seven
    logic [1:0] f0, f1, f2, f3;
    always_comb begin
      f0 = fa(x[0], x[1], x[2]);
      f1 = fa(x[3], x[4], x[5]);
      f2 = fa(f0[0], f1[0], x[6]);
      f3 = fa(f0[1], f1[1], f2[1]);
      z  = {f3[1], 1'b0, f3[0], f2[0]};
    end
  end
endmodule
