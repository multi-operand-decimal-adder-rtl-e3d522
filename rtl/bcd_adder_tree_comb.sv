// Combinational multi-operand BCD adder tree.
//
// Reduces M operands of P BCD digits to their decimal sum S with a binary
// tree of ceil(log2 M) levels of two-operand BCD carry-ripple adders
// (bcd_cr_adder), operands 2i and 2i+1 of a level feeding one adder. Partial
// sums stay in extended BCD (8 and 9 may appear as 1110/1111), so no decimal
// correction is done between levels; a single row of correction gates
// (bcd_correction) at the output turns the final sum into plain BCD. Each
// level is one bit wider than the one before for as long as the sum needs it:
// a node that has summed n operands is 4P + ext_bits(n) bits wide, ending at
// 4P + l bits with l = 5 for M = 16. Because the adders are carry-ripple and
// a level can start with the low digits of the level above, the carry chains
// of the levels overlap and the delay grows with 4P + l plus the level count
// rather than with their product.
//
// The tree shape and the widths follow the original design. An odd operand left
// without a partner at some level (M not a power of two) passes to the next
// level unchanged; that case is this design's own.
//
// Interface: z[k] is operand Z[k], plain BCD, digit i in bits 4i+3..4i.
// s is the BCD sum, W bits. No clock: the result is combinational.
module bcd_adder_tree_comb
  import bcd_pkg::*;
#(
  parameter  int P  = 16,
  parameter  int M  = 16,
  localparam int LV = tree_levels(M),
  localparam int W  = level_width(P, M, LV)
) (
  input  logic [M-1:0][4*P-1:0] z,
  output logic [W-1:0]          s
);

  localparam int D = digits_of(W);   // digits of the widest partial sum

  // g_lvl[l].g_node[n].v: n-th partial sum at level l (level 0 = operands),
  // zero above the level width.
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int NPREV = (l == 0) ? M : level_nodes(M, l-1);
    localparam int NCUR  = level_nodes(M, l);
    localparam int WL    = level_width(P, M, l);
    localparam int DL    = digits_of(WL);

    for (genvar n = 0; n < NCUR; n++) begin : g_node
      logic [4*D-1:0] v;
      if (l == 0) begin : g_in
        assign v = {{(4*D-4*P){1'b0}}, z[n]};
      end else if (2*n+1 < NPREV) begin : g_add
        logic [4*DL-1:0] sum;
        logic            co_unused;
        bcd_cr_adder #(.NDIG(DL)) u_add (
          .x  (g_lvl[l-1].g_node[2*n].v[4*DL-1:0]),
          .y  (g_lvl[l-1].g_node[2*n+1].v[4*DL-1:0]),
          .ci (1'b0),
          .s  (sum),
          .co (co_unused)
        );
        assign v = {{(4*D-WL){1'b0}}, sum[WL-1:0]};
      end else begin : g_pass
        assign v = g_lvl[l-1].g_node[2*n].v;
      end
    end
  end

  logic [4*D-1:0] s_bcd;

  bcd_correction #(.NDIG(D)) u_corr (
    .s_ext (g_lvl[LV].g_node[0].v),
    .s     (s_bcd)
  );

  assign s = s_bcd[W-1:0];

endmodule
