// Shared width and timing arithmetic for the multi-operand BCD adder trees.
//
// A sum of n p-digit BCD operands is below n*10^p, so above the 4p operand
// bits it needs room for the value n-1, written as whole BCD digits plus a
// partial top digit of as few bits as that digit needs. ext_bits(n) returns
// that number of bits (the extension l of the final adder: 5 for n = 16, 6
// for n = 34). Every tree level uses the same rule with n set to the number of
// operands it has summed, which reproduces the 4p+1, 4p+2, ... widths of the
// combinational tree. The pipelined tree cuts the 4p operand bits into chunks
// of k bits and needs ceil(4p/k) + ceil(log2 m) clock cycles. The width rule
// and the stage count follow the original design; computing them exactly from
// the digits of n-1 is this package's own formulation.
package bcd_pkg;

  // Bits above 4p needed to hold the sum of n operands.
  function automatic int ext_bits(input int n);
    int t;
    int b;
    t = n - 1;
    b = 0;
    while (t >= 10) begin
      b += 4;
      t /= 10;
    end
    return b + $clog2(t + 1);
  endfunction

  // Number of adder levels of a tree over m operands.
  function automatic int tree_levels(input int m);
    return (m <= 1) ? 0 : $clog2(m);
  endfunction

  // Operands summed by one node at level lvl (level 0 = the inputs).
  function automatic int level_span(input int m, input int lvl);
    return ((1 << lvl) < m) ? (1 << lvl) : m;
  endfunction

  // Bit width of a partial sum at level lvl.
  function automatic int level_width(input int p, input int m, input int lvl);
    return 4 * p + ext_bits(level_span(m, lvl));
  endfunction

  // Nodes at level lvl (level 0 = the m operands).
  function automatic int level_nodes(input int m, input int lvl);
    int n;
    n = m;
    for (int i = 0; i < lvl; i++) n = (n + 1) / 2;
    return n;
  endfunction

  // Whole digits that hold w bits.
  function automatic int digits_of(input int w);
    return (w + 3) / 4;
  endfunction

  // Carry-ripple chunks of k bits over the 4p operand bits.
  function automatic int num_chunks(input int p, input int k);
    return (4 * p + k - 1) / k;
  endfunction

  // Clock cycles from operands in to sum out of the pipelined tree.
  function automatic int pipe_latency(input int p, input int m, input int k);
    return num_chunks(p, k) + tree_levels(m);
  endfunction

endpackage
