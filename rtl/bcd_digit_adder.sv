// One-digit BCD carry-ripple adder cell.
//
// Adds two decimal digits x, y and a carry-in ci, giving the sum digit z and
// the decimal carry-out co. Digits use the extended BCD code: 0..7 as usual,
// 8 as 1000 or 1110 and 9 as 1001 or 1111. The sum is a plain 4-bit binary
// addition of the digits, except that +6 is added first when the upper three
// bits of the two digits, read as even numbers X^U + Y^U, sum to 8 or more
// (signal a_u), and an input digit coded 1110/1111 is first taken back by 6.
// The result is a correct decimal digit with a correct decimal carry; when the
// +6 turns out to be in excess (X+Y = 8 or 9 without a carry out) the digit
// comes out as 1110 or 1111, which the extended code accepts, so no
// correction is needed between cascaded adders.
//
// Structure, as in the original design: four 6-input functions give a binary
// propagate p[j] and generate g[j] per bit with all pre-correction folded in
// (g[1] = g[2] = 0), and a 4-bit carry chain of multiplexers (carry = p ? carry
// : g) and XOR gates (z = p ^ carry) forms the sum. The equations for p, g and
// a_u are the original design's; reading each overbar in them as covering one
// literal is this design's interpretation, confirmed by exhaustive test.
//
// Purely combinational; the only path through the chain is ci -> co.
module bcd_digit_adder (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       ci,
  output logic [3:0] z,
  output logic       co
);

  logic       a_u;
  logic [3:0] p;
  logic [3:0] g;

  // X^U + Y^U >= 8
  assign a_u = x[3] | y[3] | (x[2] & y[2]) | ((x[2] | y[2]) & x[1] & y[1]);

  always_comb begin
    p[0] = x[0] ^ y[0];
    g[0] = x[0] & y[0];

    p[1] = (~y[3] & y[1]) ^ (~x[3] & x[1]) ^ a_u;
    g[1] = 1'b0;

    p[2] = (~y[3] & y[2]) ^ (~x[3] & x[2])
         ^ ((x[1] & y[1] & ~a_u) | ((x[3] | ~x[1]) & (y[3] | ~y[1]) & a_u));
    g[2] = 1'b0;

    p[3] = ((x[3] ^ y[3]) & ~x[2] & ~y[2] & ~x[1] & ~y[1])
         | (~x[3] & ~y[3] & ((x[2] & y[2] & ~x[1] & ~y[1]) | ((x[2] ^ y[2]) & x[1] & y[1])))
         | (x[3] & ~y[3] & ~y[2] & ~y[1])
         | (y[3] & ~x[3] & ~x[2] & ~x[1]);
    g[3] = (x[3] & y[3]) | (x[3] & (y[2] | y[1])) | (y[3] & (x[2] | x[1]))
         | (x[2] & y[2] & (x[1] | y[1]));
  end

  // Carry chain: a multiplexer per bit passes the incoming carry when the bit
  // propagates, otherwise the bit's generate signal.
  logic c1, c2, c3;

  assign c1 = p[0] ? ci : g[0];
  assign c2 = p[1] ? c1 : g[1];
  assign c3 = p[2] ? c2 : g[2];
  assign co = p[3] ? c3 : g[3];

  assign z = p ^ {c3, c2, c1, ci};

endmodule
