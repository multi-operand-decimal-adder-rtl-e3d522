// Exhaustive test of the one-digit BCD carry-ripple cell: every pair of
// extended-BCD digits (0..9, 1110, 1111) and both carry-ins. The sum digit
// must be a valid extended-BCD code whose value, plus ten times the carry
// out, equals the decimal sum of the input values. Also counts how often the
// cell produced a 1110/1111 digit, which must happen.
module tb_bcd_digit_adder;
  import bcd_tb_pkg::*;

  logic [3:0] x, y, z;
  logic       ci, co;
  int checks = 0, failures = 0, ext_out = 0;

  bcd_digit_adder dut (.x(x), .y(y), .ci(ci), .z(z), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 2; c++) begin
          if (digit_val(4'(a)) < 0 || digit_val(4'(b)) < 0) continue;
          x = 4'(a); y = 4'(b); ci = c[0];
          #1;
          checks++;
          if (digit_val(z) < 0 ||
              digit_val(z) + 10 * int'(co) != digit_val(x) + digit_val(y) + c) begin
            failures++;
            $display("FAIL x=%b y=%b ci=%0d -> z=%b co=%0d", x, y, ci, z, co);
          end
          if (z >= 4'hE) ext_out++;
        end
    checks++;
    if (ext_out == 0) begin
      failures++;
      $display("FAIL no 1110/1111 sum digit was ever produced");
    end
    $display("extended-code sum digits produced: %0d", ext_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
