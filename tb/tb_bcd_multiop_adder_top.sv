// End-to-end test of the multi-operand BCD adder at its default size: 16
// operands of 16 digits, pipelined tree cut into 16-bit chunks.
//
// Operand sets stream in on random cycles, mostly back to back. Each set's
// sum is checked on the combinational output in the same cycle and on the
// pipelined output exactly 8 cycles later (ceil(64/16) + log2(16)), against
// a digit-by-digit reference. The test also counts, and requires at least
// once each, the mechanisms the design relies on:
//   - a +6 pre-correction inside a digit cell,
//   - a 1110/1111 digit reaching the final correction (it is then fixed),
//   - a decimal carry crossing a chunk boundary through its carry register,
//   - a sum large enough to use the extension bits above 4p,
//   - operand sets entering on consecutive cycles, and idle cycles.
module tb_bcd_multiop_adder_top;
  import bcd_tb_pkg::*;

  localparam int P = 16, M = 16, W = 4*P + 5, LAT = 8;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  in_valid;
  logic [M-1:0][4*P-1:0] z;
  logic [W-1:0]          s_comb, s_pipe;
  logic                  out_valid;

  bcd_multiop_adder_top dut (
    .clk, .rst_n, .in_valid, .z, .s_comb, .out_valid, .s_pipe
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, nset = 0, got = 0;
  int n_precorr = 0, n_extfix = 0, n_chunk_carry = 0, n_ext_bits = 0, n_b2b = 0, n_idle = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bcd_t e_drv;
  bcd_t exp_q [$];
  int   cyc_q [$];
  bit   last_valid = 1'b0;

  // Mechanism monitors, read from inside the design.
  always @(posedge clk) begin
    if (dut.u_comb.g_lvl[1].g_node[0].g_add.u_add.g_digit[3].u_cell.a_u) n_precorr++;
    for (int i = 0; i < (W+3)/4; i++) begin
      if (dut.u_pipe.u_corr.s_ext[4*i+3] && (dut.u_pipe.u_corr.s_ext[4*i+2] || dut.u_pipe.u_corr.s_ext[4*i+1]))
        n_extfix++;
    end
    if (dut.u_pipe.g_lvl[4].g_node[0].g_add.g_chunk[0].cy) n_chunk_carry++;
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid) begin
      exp_q.push_back(e_drv);
      cyc_q.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      checks++;
      if (cycle - cyc_q[got] != LAT) begin
        failures++;
        $display("FAIL set %0d latency %0d", got, cycle - cyc_q[got]);
      end
      checks++;
      if (s_pipe != exp_q[got][W-1:0]) begin
        failures++;
        $display("FAIL pipelined set %0d s=%h exp=%h", got, s_pipe, exp_q[got][W-1:0]);
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
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      e = '0;
      for (int k = 0; k < M; k++) begin
        op = rand_bcd(P, (t < 3) ? 1 : t % 3);
        z[k] = op[4*P-1:0];
        e = ref_add(e, op, 1'b0);
      end
      e_drv = e;
      #1;
      checks++;
      if (s_comb != e[W-1:0] || (e >> W) != 0) begin
        failures++;
        $display("FAIL combinational s=%h exp=%h", s_comb, e[W-1:0]);
      end
      if (in_valid) begin
        nset++;
        if (e[W-1:4*P] != 0) n_ext_bits++;
        if (last_valid) n_b2b++;
      end else begin
        n_idle++;
      end
      last_valid = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (got != nset) begin
      failures++;
      $display("FAIL %0d sums out for %0d sets in", got, nset);
    end
    $display("sets %0d: +6 pre-corrections %0d, 1110/1111 digits corrected %0d, chunk carries %0d, extension used %0d, back to back %0d, idle %0d",
             nset, n_precorr, n_extfix, n_chunk_carry, n_ext_bits, n_b2b, n_idle);
    checks++;
    if (n_precorr == 0 || n_extfix == 0 || n_chunk_carry == 0 || n_ext_bits == 0 || n_b2b == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
