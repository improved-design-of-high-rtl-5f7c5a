// adder_setup: prepares the reduction tree outputs for the final adder.
//
// The tree leaves P = 2*H + S with H and S in (4221). In parallel:
//   x2: H is recoded to (5421) and shifted left one bit, which is 2H in BCD
//       (the weight-5 bit of each digit moves up as the next digit's unit);
//   +6: S is recoded to BCD excess-6.
// The carry out of the top digit of 2H is dropped (results are modulo
// 10**N). Combinational.
module adder_setup #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0] h,
  input  logic [4*N-1:0] s,
  output logic [4*N-1:0] h2_bcd,
  output logic [4*N-1:0] s_xs6
);
  logic [4*N-1:0] h5421;

  rec_4221_5421 #(.N(N)) u_h (.d(h), .o(h5421));
  assign h2_bcd = {h5421[4*N-2:0], 1'b0};
  rec_4221_xs6 #(.N(N)) u_s (.d(s), .o(s_xs6));
endmodule
