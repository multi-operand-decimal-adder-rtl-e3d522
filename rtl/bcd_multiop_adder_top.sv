// Multi-operand BCD adder: combinational and pipelined trees side by side.
//
// Both versions of the adder tree sum the same M operands of P BCD digits.
// s_comb is the combinational tree's sum, valid in the same cycle as z;
// s_pipe is the pipelined tree's sum, valid with out_valid LAT =
// ceil(4P/K) + ceil(log2 M) cycles after in_valid (8 cycles at the defaults
// P = M = K = 16). Both sums are plain BCD of W = 4P + l bits (69 bits at
// the defaults). Offering the two versions in one top is this design's own
// arrangement; each tree follows the original design.
module bcd_multiop_adder_top
  import bcd_pkg::*;
#(
  parameter  int P  = 16,
  parameter  int M  = 16,
  parameter  int K  = 16,
  localparam int LV = tree_levels(M),
  localparam int W  = level_width(P, M, LV)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][4*P-1:0] z,
  output logic [W-1:0]          s_comb,
  output logic                  out_valid,
  output logic [W-1:0]          s_pipe
);

  bcd_adder_tree_comb #(.P(P), .M(M)) u_comb (
    .z (z),
    .s (s_comb)
  );

  bcd_adder_tree_pipe #(.P(P), .M(M), .K(K)) u_pipe (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .z         (z),
    .out_valid (out_valid),
    .s         (s_pipe)
  );

endmodule
