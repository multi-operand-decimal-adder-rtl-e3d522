// Fully pipelined multi-operand BCD adder tree.
//
// Same arithmetic as the combinational tree (bcd_adder_tree_comb): M operands
// of P BCD digits, ceil(log2 M) levels of two-operand BCD carry-ripple adders
// in extended BCD, one correction row at the end. Two cuts make it a deep
// pipeline, as the original design proposes: every tree level is a pipeline stage,
// and every carry-ripple adder is cut into chunks of K bits (K/4 digits) with
// a register on the decimal carry between neighbouring chunks. Chunk j of a
// level therefore works one cycle after chunk j-1 of the same level and one
// cycle after chunk j of the level above, so the operands enter skewed:
// after a common input register, chunk j of every operand waits j more
// cycles in the input synchronization registers. The leftmost chunk also
// carries the growth bits above 4P. At the output the chunks are realigned
// by delays of NC-1-j cycles, so the whole sum leaves together and is
// corrected to plain BCD by combinational gates after the last register.
//
// Timing: a new operand set can enter every cycle. Its sum is on s, with
// out_valid high, LAT = ceil(4P/K) + ceil(log2 M) cycles later (8 for the
// defaults P = M = K = 16). The chunking, skewing and stage count follow the
// document (the stage count as its synthesis table gives it); the output
// realignment, the valid bits and their reset are this design's own. K must
// be a multiple of 4 so that chunks end on digit boundaries.
//
// Interface: z[k] is operand Z[k], plain BCD, digit i in bits 4i+3..4i;
// in_valid marks a new operand set; s (W bits, plain BCD) and out_valid.
// rst_n (active low, synchronous) clears only the valid pipeline.
module bcd_adder_tree_pipe
  import bcd_pkg::*;
#(
  parameter  int P   = 16,
  parameter  int M   = 16,
  parameter  int K   = 16,
  localparam int LV  = tree_levels(M),
  localparam int W   = level_width(P, M, LV),
  localparam int LAT = pipe_latency(P, M, K)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][4*P-1:0] z,
  output logic                  out_valid,
  output logic [W-1:0]          s
);

  localparam int D  = digits_of(W);      // digits of the widest partial sum
  localparam int KD = K / 4;             // digits per chunk
  localparam int NC = num_chunks(P, K);  // chunks per adder

  // Digit range of chunk j: the last chunk runs up to the top digit D-1.
  function automatic int chunk_lo(input int j);
    return j * KD;
  endfunction
  function automatic int chunk_nd(input int j);
    return (j == NC - 1) ? D - j * KD : KD;
  endfunction

  initial begin
    assert (K % 4 == 0 && K > 0)
      else $fatal(1, "K must be a positive multiple of 4");
    assert (M >= 2) else $fatal(1, "M must be at least 2");
  end

  // g_lvl[l].g_node[n].v: registered partial sum n of level l (level 0 =
  // the skewed operands). Its chunks are written in successive cycles: chunk
  // j holds digits of the operand set that entered j cycles before the one
  // whose digits chunk 0 holds.
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int NPREV = (l == 0) ? M : level_nodes(M, l-1);
    localparam int NCUR  = level_nodes(M, l);
    localparam int WL    = level_width(P, M, l);

    for (genvar n = 0; n < NCUR; n++) begin : g_node
      logic [4*D-1:0] v;
      if (l == 0) begin : g_in
        // Input register plus synchronization skew: chunk j waits 1 + j cycles.
        logic [4*D-1:0] zx;
        assign zx = {{(4*D-4*P){1'b0}}, z[n]};
        for (genvar j = 0; j < NC; j++) begin : g_chunk
          bcd_delay_line #(.WIDTH(4*chunk_nd(j)), .DEPTH(1 + j)) u_skew (
            .clk (clk),
            .d   (zx[4*chunk_lo(j) +: 4*chunk_nd(j)]),
            .q   (v[4*chunk_lo(j) +: 4*chunk_nd(j)])
          );
        end
      end else if (2*n+1 < NPREV) begin : g_add
        for (genvar j = 0; j < NC; j++) begin : g_chunk
          localparam int LO = 4 * chunk_lo(j);
          localparam int NB = 4 * chunk_nd(j);
          // Bits of this chunk that lie inside the level width.
          localparam int NV = (WL - LO < NB) ? WL - LO : NB;
          logic          cin;
          logic [NB-1:0] sum;
          logic          co;
          logic [NV-1:0] r;   // chunk result register
          logic          cy;  // registered carry to chunk j+1
          if (j == 0) begin : g_first
            assign cin = 1'b0;
          end else begin : g_next
            assign cin = g_chunk[j-1].cy;
          end
          bcd_cr_adder #(.NDIG(chunk_nd(j))) u_add (
            .x  (g_lvl[l-1].g_node[2*n].v[LO +: NB]),
            .y  (g_lvl[l-1].g_node[2*n+1].v[LO +: NB]),
            .ci (cin),
            .s  (sum),
            .co (co)
          );
          always_ff @(posedge clk) begin
            r  <= sum[NV-1:0];
            cy <= co;
          end
          if (NV < NB) begin : g_pad
            assign v[LO +: NB] = {{(NB-NV){1'b0}}, r};
          end else begin : g_full
            assign v[LO +: NB] = r;
          end
        end
      end else begin : g_pass
        always_ff @(posedge clk) v <= g_lvl[l-1].g_node[2*n].v;
      end
    end
  end

  // Realign the result chunks: chunk j waits NC-1-j more cycles.
  logic [4*D-1:0] s_ext;
  for (genvar j = 0; j < NC; j++) begin : g_out
    bcd_delay_line #(.WIDTH(4*chunk_nd(j)), .DEPTH(NC - 1 - j)) u_align (
      .clk (clk),
      .d   (g_lvl[LV].g_node[0].v[4*chunk_lo(j) +: 4*chunk_nd(j)]),
      .q   (s_ext[4*chunk_lo(j) +: 4*chunk_nd(j)])
    );
  end

  logic [4*D-1:0] s_bcd;
  bcd_correction #(.NDIG(D)) u_corr (
    .s_ext (s_ext),
    .s     (s_bcd)
  );
  assign s = s_bcd[W-1:0];

  // Valid bits travel alongside the data.
  logic [LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

endmodule
