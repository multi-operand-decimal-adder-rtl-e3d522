// Test of the final correction row: random extended-BCD numbers must come
// out as plain BCD of the same value; plain BCD must pass unchanged.
module tb_bcd_correction;
  import bcd_tb_pkg::*;

  localparam int ND = 18;

  logic [4*ND-1:0] s_ext, s;
  int checks = 0, failures = 0;

  bcd_correction #(.NDIG(ND)) dut (.s_ext(s_ext), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bcd_t a, e, exp;
    bit   ok;
    for (int t = 0; t < 2000; t++) begin
      a = rand_bcd(ND, t % 3);
      e = (t % 4 == 0) ? a : to_ext(a, ND);
      s_ext = e[4*ND-1:0];
      #1;
      exp = decode(e, ND, ok);
      checks++;
      if (!ok || s != exp[4*ND-1:0] || !is_plain(bcd_t'(s), ND)) begin
        failures++;
        $display("FAIL in=%h out=%h exp=%h", s_ext, s, exp[4*ND-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
