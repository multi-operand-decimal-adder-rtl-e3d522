// Two-operand BCD carry-ripple adder of NDIG digits.
//
// A row of one-digit cells (bcd_digit_adder) with the decimal carry rippling
// from digit 0 upwards, as the original design builds each adder of the tree. Both
// operands and the sum are in extended BCD (8 = 1000/1110, 9 = 1001/1111), so
// the output of one adder feeds the next level without correction. The carry
// input lets a long adder be cut into pipelined chunks; a whole adder ties it
// to 0. Purely combinational; the longest path is ci through all NDIG cells
// to co.
module bcd_cr_adder #(
  parameter int NDIG = 16
) (
  input  logic [4*NDIG-1:0] x,
  input  logic [4*NDIG-1:0] y,
  input  logic              ci,
  output logic [4*NDIG-1:0] s,
  output logic              co
);

  // One carry signal per digit, each the carry out of that digit's cell.
  for (genvar i = 0; i < NDIG; i++) begin : g_digit
    logic cin;
    logic cout;
    if (i == 0) begin : g_first
      assign cin = ci;
    end else begin : g_next
      assign cin = g_digit[i-1].cout;
    end
    bcd_digit_adder u_cell (
      .x  (x[4*i +: 4]),
      .y  (y[4*i +: 4]),
      .ci (cin),
      .z  (s[4*i +: 4]),
      .co (cout)
    );
  end

  assign co = g_digit[NDIG-1].cout;

endmodule
