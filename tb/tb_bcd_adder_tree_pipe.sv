// Test of the pipelined multi-operand BCD adder tree with 16 operands of 16
// digits at the four chunk sizes k = 32, 24, 16, 12 bits, and at a small odd
// size (5 operands of 3 digits, k = 4). Operand sets enter on random cycles,
// often back to back; each sum is compared with a digit-by-digit reference
// and must leave exactly the expected number of cycles after it entered
// (6, 7, 8, 10 cycles for the four k, as the original design's synthesis table
// lists; ceil(12/4) + 3 = 6 for the small tree).
module tb_bcd_adder_tree_pipe;
  import bcd_tb_pkg::*;

  localparam int P = 16, M = 16, W = 4*P + 5;
  localparam int NK = 5;
  localparam int PS = 3, MS = 5, WS = 4*PS + 3;
  localparam int LAT_EXP [NK] = '{6, 7, 8, 10, 6};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [M-1:0][4*P-1:0]   z;
  logic [MS-1:0][4*PS-1:0] zs;
  logic [NK-1:0]           ov;
  logic [W-1:0]            s [NK];

  int checks = 0, failures = 0, cycle = 0, b2b = 0;

  bcd_adder_tree_pipe #(.P(P), .M(M), .K(32)) d32 (.clk, .rst_n, .in_valid, .z, .out_valid(ov[0]), .s(s[0]));
  bcd_adder_tree_pipe #(.P(P), .M(M), .K(24)) d24 (.clk, .rst_n, .in_valid, .z, .out_valid(ov[1]), .s(s[1]));
  bcd_adder_tree_pipe #(.P(P), .M(M), .K(16)) d16 (.clk, .rst_n, .in_valid, .z, .out_valid(ov[2]), .s(s[2]));
  bcd_adder_tree_pipe #(.P(P), .M(M), .K(12)) d12 (.clk, .rst_n, .in_valid, .z, .out_valid(ov[3]), .s(s[3]));
  logic [WS-1:0] ss;
  bcd_adder_tree_pipe #(.P(PS), .M(MS), .K(4)) dsm (.clk, .rst_n, .in_valid, .z(zs), .out_valid(ov[4]), .s(ss));
  assign s[4] = W'(ss);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected sums and their entry cycles, oldest first.
  bcd_t exp_q [$];
  bcd_t exps_q [$];
  int   cyc_q [$];
  int   got [NK];

  bcd_t e_drv, es_drv;   // sums of the operands currently driven

  // At every rising edge: count the edge, record an operand set the tree
  // samples on this edge, and check every output the tree presents to it.
  // Latency is the number of edges from sampling to sampling the sum.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid) begin
      exp_q.push_back(e_drv);
      exps_q.push_back(es_drv);
      cyc_q.push_back(cycle);
    end
    if (rst_n) begin
      for (int i = 0; i < NK; i++) begin
        if (ov[i]) begin
          bcd_t e;
          int   idx;
          int   wi;
          idx = got[i];
          got[i]++;
          e  = (i == 4) ? exps_q[idx] : exp_q[idx];
          wi = (i == 4) ? WS : W;
          checks++;
          if (cycle - cyc_q[idx] != LAT_EXP[i]) begin
            failures++;
            $display("FAIL inst %0d set %0d latency %0d exp %0d", i, idx, cycle - cyc_q[idx], LAT_EXP[i]);
          end
          checks++;
          if (s[i] != W'(e & ((bcd_t'(1) << wi) - 1)) || (e >> wi) != 0) begin
            failures++;
            $display("FAIL inst %0d set %0d s=%h exp=%h", i, idx, s[i], W'(e));
          end
        end
      end
    end
  end

  initial begin
    bcd_t e, es, op;
    int   nset;
    bit   last;
    rst_n = 1'b0;
    in_valid = 1'b0;
    z = '0;
    zs = '0;
    for (int i = 0; i < NK; i++) got[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    nset = 0;
    last = 1'b0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      if (in_valid) begin
        int mode;
        mode = (nset < 3) ? 1 : nset % 3;
        e = '0;
        es = '0;
        for (int k = 0; k < M; k++) begin
          op = rand_bcd(P, mode);
          z[k] = op[4*P-1:0];
          e = ref_add(e, op, 1'b0);
        end
        for (int k = 0; k < MS; k++) begin
          op = rand_bcd(PS, mode);
          zs[k] = op[4*PS-1:0];
          es = ref_add(es, op, 1'b0);
        end
        e_drv = e;
        es_drv = es;
        nset++;
        if (last) b2b++;
      end else begin
        // Change the data while idle: it must not be summed.
        for (int k = 0; k < M; k++) z[k] = rand_bcd(P, 0);
      end
      last = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(posedge clk);
    for (int i = 0; i < NK; i++) begin
      checks++;
      if (got[i] != nset) begin
        failures++;
        $display("FAIL inst %0d produced %0d sums for %0d sets", i, got[i], nset);
      end
    end
    $display("operand sets %0d, back to back %0d", nset, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
