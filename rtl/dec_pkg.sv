// dec_pkg: digit codings shared by the decimal multiplier RTL.
//
// A decimal digit is a 4-bit vector whose bits carry weights (r3 r2 r1 r0).
// Besides BCD (8421) and (5421), the datapath uses the redundant codes (4221)
// and (5211), where every one of the 16 bit patterns is a valid digit and the
// 9's complement is a plain bit inversion. The functions below give the value
// of a digit and the canonical encodings of the non-redundant subsets (4221s)
// and (5211s), which satisfy 2*Z(4221s) = (Z(5211s) shifted left by one bit).
// Words are packed vectors of digits, digit i in bits [4i+3:4i].
package dec_pkg;

  typedef logic [3:0] digit_t;

  // Value of a (4221) digit.
  function automatic logic [3:0] val4221(input digit_t d);
    return 4'(d[3]) * 4'd4 + 4'(d[2]) * 4'd2 + 4'(d[1]) * 4'd2 + 4'(d[0]);
  endfunction

  // Value of a (5211) digit.
  function automatic logic [3:0] val5211(input digit_t d);
    return 4'(d[3]) * 4'd5 + 4'(d[2]) * 4'd2 + 4'(d[1]) + 4'(d[0]);
  endfunction

  // Canonical (5211s) code of a value 0..9 (the recoder target of Table 2):
  // 0000 0001 0100 0101 0111 1000 1001 1100 1101 1111. Written as gates on
  // the binary value v; values 10..15 never occur.
  function automatic digit_t enc5211s(input logic [3:0] v);
    digit_t o;
    o[3] = v[3] | (v[2] & (v[1] | v[0]));
    o[2] = v[3] | (~v[2] & v[1]) | (v[2] & ~(v[1] ^ v[0]));
    o[1] = (v[2] & ~v[1] & ~v[0]) | (v[3] & v[0]);
    o[0] = v[3] | (v[2] ^ v[0]);
    return o;
  endfunction

  // (5421) code of a value 0..9 (unique).
  function automatic digit_t enc5421(input logic [3:0] v);
    return (v >= 4'd5) ? (v + 4'd3) : v;
  endfunction

endpackage
