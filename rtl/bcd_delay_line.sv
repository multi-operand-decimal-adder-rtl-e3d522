// Fixed delay line: WIDTH bits delayed by DEPTH clock cycles.
//
// Used by the pipelined adder tree to skew the operand chunks (chunk j of an
// operand waits j cycles so that it meets the carry of chunk j-1) and to
// realign the result chunks. A plain chain of registers without reset; on an
// FPGA it packs into shift-register LUTs. DEPTH = 0 is a wire.
module bcd_delay_line #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
    assign q = sr[DEPTH-1];
  end

endmodule
