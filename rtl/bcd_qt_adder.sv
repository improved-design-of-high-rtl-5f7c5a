// bcd_qt_adder: N-digit BCD carry-propagate adder using conditional
// speculative decimal addition and a logarithmic carry tree.
//
// Operand b is expected in BCD excess-6 (each digit + 6) when B_XS6 = 1; with
// B_XS6 = 0 it is plain BCD and the +6 is added per digit here. Per digit the
// 4-bit binary sum t = a + b(+6) is formed at once; t >= 16 means the digit
// generates a decimal carry and t = 15 that it propagates one. A parallel
// prefix (Kogge-Stone) network over these generate/propagate pairs gives
// every decimal carry in log2(N) levels. Each sum digit is then chosen between
// the two speculated values t and t+1: a value >= 16 already is the BCD digit
// in its low four bits, any other value is corrected by -6.
// The document names this adder and its method but does not give its
// insides; the carry network and the selection logic are this design's own.
// Combinational.
module bcd_qt_adder #(
  parameter int unsigned N     = 32,
  parameter bit          B_XS6 = 1'b1
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic           cin,
  output logic [4*N-1:0] s,
  output logic           cout
);
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;

  logic [4:0]   t    [N];
  logic [N-1:0] g    [LV+1];
  logic [N-1:0] p    [LV+1];
  logic [N:0]   c;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      t[i] = 5'(a[4*i +: 4]) + 5'(b[4*i +: 4]) + (B_XS6 ? 5'd0 : 5'd6);
      g[0][i] = t[i][4];
      p[0][i] = (t[i] == 5'd15);
    end
    // fold the carry-in into digit 0
    g[0][0] = g[0][0] | (p[0][0] & cin);
    for (int l = 0; l < LV; l++) begin
      for (int i = 0; i < N; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
          p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    c[0] = cin;
    for (int i = 0; i < N; i++) c[i+1] = g[LV][i];
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [4:0] v;
      v = t[i] + 5'(c[i]);
      s[4*i +: 4] = v[4] ? v[3:0] : (v[3:0] - 4'd6);
    end
  end

  assign cout = c[N];
endmodule
