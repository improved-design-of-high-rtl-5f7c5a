// dec_tb_pkg: reference arithmetic for the decimal multiplier testbenches.
//
// Values are computed here from the bit weights of each code, independently
// of the RTL's own coding functions. Words of up to 40 digits are held in
// 160-bit vectors (digit i in bits [4i+3:4i]); values in 136-bit integers.
package dec_tb_pkg;

  typedef logic [159:0] wide_t;
  typedef logic [135:0] num_t;

  // code numbers
  localparam int BCD = 0, C4221 = 1, C5211 = 2, C5421 = 3;

  function automatic int dval(input logic [3:0] d, input int code);
    int w [4];
    case (code)
      C4221:   w = '{1, 2, 2, 4};
      C5211:   w = '{1, 1, 2, 5};
      C5421:   w = '{1, 2, 4, 5};
      default: w = '{1, 2, 4, 8};
    endcase
    dval = 0;
    for (int j = 0; j < 4; j++) if (d[j]) dval += w[j];
  endfunction

  function automatic num_t pow10(input int n);
    pow10 = 1;
    for (int i = 0; i < n; i++) pow10 = pow10 * 10;
  endfunction

  // value of the low n digits of w in the given code
  function automatic num_t wval(input wide_t w, input int n, input int code);
    wval = 0;
    for (int i = n - 1; i >= 0; i--) wval = wval * 10 + num_t'(dval(w[4*i +: 4], code));
  endfunction

  // n-digit BCD word of v (mod 10**n)
  function automatic wide_t to_bcd(input num_t v, input int n);
    to_bcd = '0;
    for (int i = 0; i < n; i++) begin
      to_bcd[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
  endfunction

  // true if every digit of the low n digits is a BCD digit
  function automatic bit is_bcd(input wide_t w, input int n);
    is_bcd = 1'b1;
    for (int i = 0; i < n; i++) if (w[4*i +: 4] > 4'd9) is_bcd = 1'b0;
  endfunction

  // random word with any bit pattern in each of its n digits
  function automatic wide_t rand_word(input int n);
    rand_word = '0;
    for (int i = 0; i < n; i++) rand_word[4*i +: 4] = 4'($urandom_range(0, 15));
  endfunction

  // random n-digit BCD value; mode 1 favours 0 and 9 digits
  function automatic num_t rand_val(input int n, input int mode);
    rand_val = 0;
    for (int i = 0; i < n; i++) begin
      int d;
      if (mode == 1) d = ($urandom_range(0, 1) != 0) ? 9 : int'($urandom_range(0, 9));
      else d = int'($urandom_range(0, 9));
      rand_val = rand_val * 10 + num_t'(d);
    end
  endfunction

endpackage
