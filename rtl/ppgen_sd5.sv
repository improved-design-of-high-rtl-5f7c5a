// ppgen_sd5: the two SD radix-5 partial products of multiplier digit ROW.
//
// ppu = Yu * 5X in (5211): a 2:1 hot-one multiplexer between 5X and 10X,
//   which are X(4221) and 2X(4221) shifted left by three bits (a three-bit
//   shift of a (4221) word multiplies it by 5 and yields (5211)). Its digit 0
//   then holds 0 or 5 in its weight-5 bit only, so the hot one ysl that
//   completes the 10's complement of ppl is written into its weight-1 bit.
// ppl = Yl * X in (4221): a 4:1 hot-one multiplexer over X, 2X, -X, -2X
//   (negatives are bit-inverted, i.e. 9's complements).
// Leading sign digit (digit D+1) instead of sign extension:
//   ppl: (1,1,1,~ysl) for ROW < D-1, 0 for ROW = D-1
//   ppu: (0,0,0,1) for ROW = 0, 0 otherwise
// The constant unit in ppu of row 0 is what makes all row constants cancel
// modulo 10**(2D). Outputs are D+2 digits, not yet shifted to the row's weight.
// Combinational.
module ppgen_sd5 #(
  parameter int unsigned D   = 16,
  parameter int unsigned ROW = 0
) (
  input  logic [4*(D+1)-1:0] m1,
  input  logic [4*(D+1)-1:0] m2,
  input  logic [4*(D+1)-1:0] mn1,
  input  logic [4*(D+1)-1:0] mn2,
  input  logic [2:1]         yu,
  input  logic [2:1]         ylp,
  input  logic [2:1]         ylm,
  input  logic               ysl,
  output logic [4*(D+2)-1:0] ppu,
  output logic [4*(D+2)-1:0] ppl
);
  logic [4*(D+1)-1:0] x5, x10, lmux, umux;

  always_comb begin
    // three-bit left shift; the top three bits of each multiple are zero
    x5   = {m1[4*(D+1)-4:0], 3'b000};
    x10  = {m2[4*(D+1)-4:0], 3'b000};
    umux = ({(4*(D+1)){yu[1]}} & x5) | ({(4*(D+1)){yu[2]}} & x10);
    lmux = ({(4*(D+1)){ylp[1]}} & m1)  | ({(4*(D+1)){ylp[2]}} & m2) |
           ({(4*(D+1)){ylm[1]}} & mn1) | ({(4*(D+1)){ylm[2]}} & mn2);
    ppu  = {((ROW == 0) ? 4'b0001 : 4'b0000), umux[4*(D+1)-1:1], ysl};
    ppl  = {((ROW < D - 1) ? {3'b111, ~ysl} : 4'b0000), lmux};
  end
endmodule
