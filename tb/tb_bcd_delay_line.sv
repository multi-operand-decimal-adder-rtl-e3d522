// Test of the delay line: a random stream must reappear exactly DEPTH
// cycles later, for DEPTH 3 and DEPTH 0 (a wire).
module tb_bcd_delay_line;
  localparam int WD = 16;
  localparam int DP = 3;

  logic          clk = 1'b0;
  logic [WD-1:0] d, q3, q0;
  logic [WD-1:0] hist [DP+1];
  int checks = 0, failures = 0;

  bcd_delay_line #(.WIDTH(WD), .DEPTH(DP)) dut3 (.clk(clk), .d(d), .q(q3));
  bcd_delay_line #(.WIDTH(WD), .DEPTH(0))  dut0 (.clk(clk), .d(d), .q(q0));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      d = WD'($urandom);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("FAIL wire t=%0d", t); end
      @(posedge clk);
      for (int i = DP; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d;
      #1;
      if (t >= DP) begin
        checks++;
        if (q3 !== hist[DP-1]) begin
          failures++;
          $display("FAIL t=%0d q=%h exp=%h", t, q3, hist[DP-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
