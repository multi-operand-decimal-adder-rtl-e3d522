// Random and corner-case test of the N-digit BCD carry-ripple adder with
// extended-BCD operands and both carry-ins. Checks validity of every sum
// digit, the decoded sum and the carry out against a digit-by-digit
// reference. Two sizes: the 16-digit and the 34-digit operands of the
// IEEE 754-2008 Decimal64 and Decimal128 coefficients.
module tb_bcd_cr_adder;
  import bcd_tb_pkg::*;

  localparam int N1 = 16;
  localparam int N2 = 34;

  logic [4*N1-1:0] x1, y1, s1;
  logic [4*N2-1:0] x2, y2, s2;
  logic            ci, co1, co2;
  int checks = 0, failures = 0;

  bcd_cr_adder #(.NDIG(N1)) dut1 (.x(x1), .y(y1), .ci(ci), .s(s1), .co(co1));
  bcd_cr_adder #(.NDIG(N2)) dut2 (.x(x2), .y(y2), .ci(ci), .s(s2), .co(co2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int nd, input bcd_t a, input bcd_t b, input bcd_t s, input bit c);
    bcd_t exp, got, mask;
    bit   ok;
    exp  = ref_add(a, b, ci);
    got  = decode(s, nd, ok);
    mask = (bcd_t'(1) << (4*nd)) - 1;
    checks++;
    if (!ok || (got & mask) != (exp & mask) || c != exp[4*nd]) begin
      failures++;
      $display("FAIL nd=%0d a=%h b=%h ci=%0d s=%h co=%0d exp=%h", nd, a & mask,
               b & mask, ci, s & mask, c, exp);
    end
  endtask

  initial begin
    bcd_t a, b;
    for (int t = 0; t < 3000; t++) begin
      int mode;
      mode = (t < 10) ? 1 : t % 3;
      a = rand_bcd(N2, mode);
      b = rand_bcd(N2, (t % 7 == 0) ? 1 : mode);
      if (t % 2 == 1) begin
        a = to_ext(a, N2);
        b = to_ext(b, N2);
      end
      ci = 1'($urandom_range(1));
      x1 = a[4*N1-1:0]; y1 = b[4*N1-1:0];
      x2 = a[4*N2-1:0]; y2 = b[4*N2-1:0];
      #1;
      check(N1, bcd_t'(x1), bcd_t'(y1), bcd_t'(s1), co1);
      check(N2, bcd_t'(x2), bcd_t'(y2), bcd_t'(s2), co2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
