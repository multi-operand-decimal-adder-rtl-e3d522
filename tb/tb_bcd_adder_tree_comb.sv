// Test of the combinational multi-operand BCD adder tree at the original design's
// size (16 operands of 16 digits) and at a small odd size (5 operands of 3
// digits, which exercises pass-through nodes). Random operands, operands of
// digits 4..9, and all-nines operands (the largest sum, which must fill the
// extension bits exactly). The sum must be plain BCD and equal a
// digit-by-digit reference sum.
module tb_bcd_adder_tree_comb;
  import bcd_tb_pkg::*;

  localparam int P1 = 16, M1 = 16, W1 = 4*P1 + 5;   // l = 5 for m = 16
  localparam int P2 = 3,  M2 = 5,  W2 = 4*P2 + 3;   // sum of 5 needs 3 bits

  logic [M1-1:0][4*P1-1:0] z1;
  logic [M2-1:0][4*P2-1:0] z2;
  logic [W1-1:0]           s1;
  logic [W2-1:0]           s2;
  int checks = 0, failures = 0, top_used = 0;

  bcd_adder_tree_comb #(.P(P1), .M(M1)) dut1 (.z(z1), .s(s1));
  bcd_adder_tree_comb #(.P(P2), .M(M2)) dut2 (.z(z2), .s(s2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bcd_t exp1, exp2, op;
    for (int t = 0; t < 1500; t++) begin
      int mode;
      mode = (t < 4) ? 1 : t % 3;
      exp1 = '0;
      exp2 = '0;
      for (int k = 0; k < M1; k++) begin
        op = rand_bcd(P1, mode);
        z1[k] = op[4*P1-1:0];
        exp1 = ref_add(exp1, op, 1'b0);
      end
      for (int k = 0; k < M2; k++) begin
        op = rand_bcd(P2, mode);
        z2[k] = op[4*P2-1:0];
        exp2 = ref_add(exp2, op, 1'b0);
      end
      #1;
      checks++;
      if (exp1[4*MAXD-1:W1] != 0 || s1 != exp1[W1-1:0] || !is_plain(bcd_t'(s1), (W1+3)/4)) begin
        failures++;
        $display("FAIL m=16 s=%h exp=%h", s1, exp1[W1-1:0]);
      end
      checks++;
      if (exp2[4*MAXD-1:W2] != 0 || s2 != exp2[W2-1:0] || !is_plain(bcd_t'(s2), (W2+3)/4)) begin
        failures++;
        $display("FAIL m=5 s=%h exp=%h", s2, exp2[W2-1:0]);
      end
      if (s1[W1-1:4*P1+4] != 0) top_used++;
    end
    checks++;
    if (top_used == 0) begin
      failures++;
      $display("FAIL the top extension bit was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
