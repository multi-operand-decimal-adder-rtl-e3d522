// Reference arithmetic for the BCD adder testbenches.
//
// Numbers are held as up to 64 BCD digits in a 256-bit vector. The reference
// adds digit by digit with a decimal carry, the schoolbook way, and knows
// nothing of the extended code beyond reading 1110/1111 as 8/9, so it is
// independent of the adders under test.
package bcd_tb_pkg;

  localparam int MAXD = 64;
  typedef logic [4*MAXD-1:0] bcd_t;

  // Value of an extended-BCD digit (1110 = 8, 1111 = 9); -1 if not a digit.
  function automatic int digit_val(input logic [3:0] d);
    if (d <= 4'd9) return int'(d);
    if (d == 4'hE) return 8;
    if (d == 4'hF) return 9;
    return -1;
  endfunction

  // Random plain BCD number of nd digits. mode 0: uniform digits; 1: all
  // nines; 2: digits 4..9 (the +6 pre-correction is then often needed).
  function automatic bcd_t rand_bcd(input int nd, input int mode);
    bcd_t r;
    r = '0;
    for (int i = 0; i < nd; i++) begin
      case (mode)
        1:       r[4*i +: 4] = 4'd9;
        2:       r[4*i +: 4] = 4'(4 + $urandom_range(5));
        default: r[4*i +: 4] = 4'($urandom_range(9));
      endcase
    end
    return r;
  endfunction

  // Recode some 8s and 9s as 1110 and 1111 (same value, extended code).
  function automatic bcd_t to_ext(input bcd_t a, input int nd);
    bcd_t r;
    r = a;
    for (int i = 0; i < nd; i++)
      if (a[4*i+3] && $urandom_range(1) == 1) r[4*i +: 4] = a[4*i +: 4] | 4'b0110;
    return r;
  endfunction

  // Plain BCD sum a + b + ci over MAXD digits (inputs may be extended).
  function automatic bcd_t ref_add(input bcd_t a, input bcd_t b, input bit ci);
    bcd_t r;
    int   c;
    int   t;
    r = '0;
    c = int'(ci);
    for (int i = 0; i < MAXD; i++) begin
      t = digit_val(a[4*i +: 4]) + digit_val(b[4*i +: 4]) + c;
      r[4*i +: 4] = 4'(t % 10);
      c = t / 10;
    end
    return r;
  endfunction

  // Decode an extended-BCD number of nd digits to plain BCD; ok is cleared
  // if a digit is not a valid extended-BCD code.
  function automatic bcd_t decode(input bcd_t a, input int nd, output bit ok);
    bcd_t r;
    r  = '0;
    ok = 1'b1;
    for (int i = 0; i < nd; i++) begin
      if (digit_val(a[4*i +: 4]) < 0) ok = 1'b0;
      else r[4*i +: 4] = 4'(digit_val(a[4*i +: 4]));
    end
    return r;
  endfunction

  // True if every one of the nd digits is plain BCD (0000..1001).
  function automatic bit is_plain(input bcd_t a, input int nd);
    for (int i = 0; i < nd; i++)
      if (a[4*i +: 4] > 4'd9) return 1'b0;
    return 1'b1;
  endfunction

endpackage
