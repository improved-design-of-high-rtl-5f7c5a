// mult_sd5: combinational D x D digit BCD multiplier with SD radix-5
// recoding of the multiplier.
//
// Data flow (P = X * Y, all BCD, P has 2D digits):
//  1. mult_gen_sd5 builds X, 2X, -X, -2X in (4221) without any carry
//     propagation.
//  2. Every multiplier digit is recoded as Y_i = 5*Yu_i + Yl_i.
//  3. Each digit gives two partial products of weight 10**i: PP^U = Yu*5X in
//     (5211), from a three-bit shift of X or 2X, and PP^L = Yl*X in (4221),
//     with its sign digit; the hot one of a negative PP^L sits in PP^U.
//  4. The 2D rows, aligned in 2D-digit words, go to a mixed (4221)/(5211)
//     carry-save tree: tree6_mixed for D <= 3, tree16_mixed for D <= 8,
//     tree32_mixed (the document's 16-digit configuration) for D <= 16.
//     Unused inputs are zero.
//  5. adder_setup and bcd_qt_adder assimilate 2H + S into BCD.
// Results are computed modulo 10**(2D), exact since X*Y < 10**(2D).
// Combinational, no clock.
module mult_sd5 #(
  parameter int unsigned D = 16
) (
  input  logic [4*D-1:0] x,
  input  logic [4*D-1:0] y,
  output logic [8*D-1:0] p
);
  localparam int unsigned N  = 2 * D;
  localparam int unsigned NT = (D <= 3) ? 3 : (D <= 8) ? 8 : 16;  // per code

  if (D < 2 || D > 16) begin : g_bad_d
    $error("mult_sd5: D must be in 2..16");
  end

  logic [4*(D+1)-1:0] m1, m2, mn1, mn2;
  logic [4*(D+2)-1:0] ppu [D], ppl [D];
  logic [4*N-1:0]     opl [NT], opu [NT];
  logic [4*N-1:0]     th, ts, h2, sx;
  logic               co;

  mult_gen_sd5 #(.D(D)) u_gen (.x(x), .m1(m1), .m2(m2), .mn1(mn1), .mn2(mn2));

  for (genvar i = 0; i < D; i++) begin : g_pp
    logic [2:1] yu, ylp, ylm;
    logic       ysl;
    logic [4*(N+D+2)-1:0] wu, wl;
    sd5_recoder u_rec (.y(y[4*i +: 4]), .yu(yu), .ylp(ylp), .ylm(ylm), .ysl(ysl));
    ppgen_sd5 #(.D(D), .ROW(i)) u_pp (.m1(m1), .m2(m2), .mn1(mn1), .mn2(mn2),
                                     .yu(yu), .ylp(ylp), .ylm(ylm), .ysl(ysl),
                                     .ppu(ppu[i]), .ppl(ppl[i]));
    assign wu = (4*(N+D+2))'(ppu[i]) << (4*i);
    assign wl = (4*(N+D+2))'(ppl[i]) << (4*i);
    assign opu[i] = wu[4*N-1:0];
    assign opl[i] = wl[4*N-1:0];
  end
  for (genvar i = D; i < NT; i++) begin : g_zero
    assign opu[i] = '0;
    assign opl[i] = '0;
  end

  if (NT == 3) begin : g_t6
    tree6_mixed #(.N(N)) u_tree (.z4221(opl), .z5211(opu), .h(th), .s(ts));
  end else if (NT == 8) begin : g_t16
    tree16_mixed #(.N(N)) u_tree (.z4221(opl), .z5211(opu), .h(th), .s(ts));
  end else begin : g_t32
    tree32_mixed #(.N(N)) u_tree (.z4221(opl), .z5211(opu), .h(th), .s(ts));
  end

  adder_setup #(.N(N)) u_setup (.h(th), .s(ts), .h2_bcd(h2), .s_xs6(sx));
  bcd_qt_adder #(.N(N), .B_XS6(1'b1)) u_add (.a(h2), .b(sx), .cin(1'b0), .s(p), .cout(co));
endmodule
