// dec_x2n_4221: multiplies an N-digit (4221) word by 2**SH.
//
// One x2 stage recodes every digit (4221)->(5211s) and shifts the whole bit
// vector left by one: the weight-5 bit of digit i leaves as a decimal carry
// (weight 10) and enters digit i+1 as its weight-1 bit. x4 and x8 are cascades
// of two and three such stages, each passing its own lateral carry between
// adjacent digit columns. cin[k] is the carry into digit 0 at stage k and
// cout[k] the carry out of the top digit at stage k (weight 10**N * 2**(SH-1-k)).
// The first stage uses the general (4221)->(5211s) recoder unless S_IN says
// the input is already in (4221s); every later stage gets (4221s) digits (a
// shifted (5211s) digit plus the carry bit) and uses the smaller
// (4221s)->(5211s) recoder, as the paper describes for x2**n. Combinational.
module dec_x2n_4221 #(
  parameter int unsigned N  = 16,
  parameter int unsigned SH = 1,
  parameter bit          S_IN = 1'b0   // input digits are in (4221s)
) (
  input  logic [4*N-1:0] d,
  input  logic [SH-1:0]  cin,
  output logic [4*N-1:0] o,
  output logic [SH-1:0]  cout
);
  for (genvar k = 0; k < SH; k++) begin : g_stage
    logic [4*N-1:0] din, w, dout;
    if (k == 0) begin : g_first
      assign din = d;
    end else begin : g_next
      assign din = g_stage[k-1].dout;
    end
    if (k == 0 && !S_IN) begin : g_gen
      rec_4221_5211s #(.N(N)) u_rec (.d(din), .o(w));
    end else begin : g_sub
      rec_4221s_5211s #(.N(N)) u_rec (.d(din), .o(w));
    end
    always_comb begin
      for (int i = 0; i < N; i++) begin
        dout[4*i+1 +: 3] = w[4*i +: 3];
        dout[4*i]        = (i == 0) ? cin[k] : w[4*i-1];
      end
    end
    assign cout[k] = w[4*N-1];
  end

  assign o = g_stage[SH-1].dout;
endmodule
