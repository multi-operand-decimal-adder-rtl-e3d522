// The larger configuration the adder trees are sized for: 34 operands of 34
// digits (the IEEE 754-2008 Decimal128 coefficient length), built with
// parameters. 34 is not a power of two, so the tree has six levels and
// operands without a partner pass down a level. Checks the combinational
// tree on random, digits 4..9 and all-nines operands (the sum then needs the
// full 4p + 6 bits), and the pipelined tree with 16-bit chunks, whose sum
// must arrive ceil(136/16) + 6 = 15 cycles after its operands.
module tb_bcd_workload_p34;
  import bcd_tb_pkg::*;

  localparam int P = 34, M = 34, W = 4*P + 6, LAT = 15;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  in_valid;
  logic [M-1:0][4*P-1:0] z;
  logic [W-1:0]          s_comb, s_pipe;
  logic                  out_valid;

  bcd_adder_tree_comb #(.P(P), .M(M)) u_comb (.z(z), .s(s_comb));
  bcd_adder_tree_pipe #(.P(P), .M(M), .K(16)) u_pipe (
    .clk, .rst_n, .in_valid, .z, .out_valid, .s(s_pipe)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, nset = 0, got = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bcd_t e_drv;
  bcd_t exp_q [$];
  int   cyc_q [$];

  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid) begin
      exp_q.push_back(e_drv);
      cyc_q.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      checks++;
      if (cycle - cyc_q[got] != LAT || s_pipe != exp_q[got][W-1:0]) begin
        failures++;
        $display("FAIL pipelined set %0d latency %0d s=%h exp=%h", got, cycle - cyc_q[got],
                 s_pipe, exp_q[got][W-1:0]);
      end
      got++;
    end
  end

  initial begin
    bcd_t e, op;
    rst_n = 1'b0;
    in_valid = 1'b0;
    z = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      e = '0;
      for (int k = 0; k < M; k++) begin
        op = rand_bcd(P, (t < 3) ? 1 : t % 3);
        z[k] = op[4*P-1:0];
        e = ref_add(e, op, 1'b0);
      end
      e_drv = e;
      if (in_valid) nset++;
      #1;
      checks++;
      if (s_comb != e[W-1:0] || (e >> W) != 0) begin
        failures++;
        $display("FAIL combinational s=%h exp=%h", s_comb, e[W-1:0]);
      end
      if (t == 0) begin
        checks++;
        // 34 * (10^34 - 1) = 33 99..99 66: the top extension bits are used.
        if (s_comb[W-1:W-2] != 2'b11) begin
          failures++;
          $display("FAIL all-nines sum %h", s_comb);
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (got != nset) begin
      failures++;
      $display("FAIL %0d sums out for %0d sets in", got, nset);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
