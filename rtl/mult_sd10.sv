// mult_sd10: combinational D x D digit BCD multiplier with SD radix-10
// recoding of the multiplier.
//
// Data flow (P = X * Y, all BCD, P has 2D digits):
//  1. mult_gen_sd10 builds X..5X in (4221); 3X needs a BCD carry-propagate
//     adder and dominates this stage.
//  2. Every multiplier digit is recoded to Yb_i in {-5..5}; Yb_D = ys_{D-1}.
//  3. D+1 partial products: 5:1 mux + XOR, sign-encoding digits, and the
//     10's-complement hot one of row i placed at digit i of row i+1.
//  4. The rows, aligned to their weights in 2D-digit words, are reduced to
//     S and H in (4221) by a decimal carry-save tree: tree6_4221 when D+1 <= 6,
//     otherwise the area-optimized 17:2 tree (DELAY_TREE = 0, the default)
//     or the delay-optimized one (DELAY_TREE = 1). Unused inputs are zero.
//  5. adder_setup forms 2H in BCD and S in excess-6; bcd_qt_adder adds them.
// Words are reduced digit-column by digit-column in whole-word form, so a
// column with fewer partial product digits simply sees zero inputs.
// Everything is computed modulo 10**(2D), which is exact because
// X*Y < 10**(2D). Combinational, no clock.
module mult_sd10 #(
  parameter int unsigned D          = 16,
  parameter bit          DELAY_TREE = 1'b0
) (
  input  logic [4*D-1:0]   x,
  input  logic [4*D-1:0]   y,
  output logic [8*D-1:0]   p
);
  localparam int unsigned N  = 2 * D;
  localparam int unsigned NP = D + 1;                    // partial products
  localparam int unsigned NT = (NP <= 6) ? 6 : 17;       // tree inputs

  if (D < 2 || D > 16) begin : g_bad_d
    $error("mult_sd10: D must be in 2..16");
  end

  logic [4*(D+1)-1:0] m1, m2, m3, m4, m5;
  logic [5:1]         sel [NP];
  logic [NP-1:0]      ys;
  logic [4*(D+3)-1:0] pp  [NP];
  logic [4*N-1:0]     op  [NT];
  logic [4*N-1:0]     th, ts, h2, sx;
  logic               co;

  mult_gen_sd10 #(.D(D)) u_gen (.x(x), .m1(m1), .m2(m2), .m3(m3), .m4(m4), .m5(m5));

  logic [D-1:0] ysp;
  assign ysp = {ys[D-2:0], 1'b0};

  for (genvar i = 0; i < D; i++) begin : g_rec
    sd10_recoder u_rec (.y(y[4*i +: 4]), .ysp(ysp[i]),
                        .sel(sel[i]), .ys(ys[i]));
  end
  // leading digit Yb_D = ys_{D-1} in {0, 1}
  assign sel[D] = {4'b0000, ys[D-1]};
  assign ys[D]  = 1'b0;

  for (genvar i = 0; i < NP; i++) begin : g_pp
    logic [4*(N+D+3)-1:0] wide;
    ppgen_sd10 #(.D(D), .ROW(i)) u_pp (.m1(m1), .m2(m2), .m3(m3), .m4(m4), .m5(m5),
                                      .sel(sel[i]), .ys(ys[i]), .pp(pp[i]));
    logic [4*(N+D+3)-1:0] hot;
    if (i > 0) begin : g_hot
      // hot one completing the 10's complement of the row below
      assign hot = (4*(N+D+3))'(ys[i-1]) << (4*(i-1));
    end else begin : g_nohot
      assign hot = '0;
    end
    assign wide  = ((4*(N+D+3))'(pp[i]) << (4*i)) | hot;
    assign op[i] = wide[4*N-1:0];
  end
  for (genvar i = NP; i < NT; i++) begin : g_zero
    assign op[i] = '0;
  end

  if (NT == 6) begin : g_t6
    tree6_4221 #(.N(N)) u_tree (.z(op), .h(th), .s(ts));
  end else if (DELAY_TREE) begin : g_t17d
    tree17_delay #(.N(N)) u_tree (.z(op), .h(th), .s(ts));
  end else begin : g_t17a
    tree17_area #(.N(N)) u_tree (.z(op), .h(th), .s(ts));
  end

  adder_setup #(.N(N)) u_setup (.h(th), .s(ts), .h2_bcd(h2), .s_xs6(sx));
  bcd_qt_adder #(.N(N), .B_XS6(1'b1)) u_add (.a(h2), .b(sx), .cin(1'b0), .s(p), .cout(co));
endmodule
