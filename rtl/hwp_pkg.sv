// hwp_pkg -- shared types and construction rules of the hybrid wave-pipelined
// parallel adder.
//
// The carry network is a divide-and-conquer prefix tree: at level L (1..log2 N)
// every bit whose bit (L-1) is set combines its group with the top bit of the
// next-lower block of 2^(L-1) bits, so after level L the group of bit i spans
// down to bit i rounded down to a multiple of 2^L. This is the wiring drawn for
// the 32-bit adder; the functions below derive it for any power-of-two width.
//
// Four cell kinds appear in the network, named after their drawing symbols:
//   BLACK_CIRCLE  (g,p) o (g',p')      -- group still open, needs g and p
//   BLACK_SQUARE  g + p*g'             -- result is already a final carry
//   WHITE_CIRCLE  buffer of f, g, p    -- group of more than one bit, idle
//   WHITE_SQUARE  buffer of f, g       -- final carry or one-bit group, idle
// A one-bit group carries no separate p wire: its propagate is its half sum f.
package hwp_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [1:0] {
    BLACK_CIRCLE = 2'd0,
    BLACK_SQUARE = 2'd1,
    WHITE_CIRCLE = 2'd2,
    WHITE_SQUARE = 2'd3
  } cell_e;

  // Number of prefix levels for an N-bit adder (N a power of two).
  function automatic int unsigned num_levels(input int unsigned n);
    return $clog2(n);
  endfunction

  // True if bit i takes part in a combination at level lvl.
  function automatic bit combines(input int unsigned lvl, input int unsigned i);
    return ((i >> (lvl - 1)) & 1) == 1;
  endfunction

  // Bit whose group is the lower operand of bit i at level lvl.
  function automatic int unsigned partner(input int unsigned lvl, input int unsigned i);
    return ((i >> (lvl - 1)) << (lvl - 1)) - 1;
  endfunction

  // True if, after `done` levels, the group of bit i is bit i alone
  // (its group propagate is then carried as f).
  function automatic bit single_bit_group(input int unsigned done, input int unsigned i);
    return (i % (1 << done)) == 0;
  endfunction

  // Cell drawn at level lvl for bit i.
  function automatic cell_e cell_kind(input int unsigned lvl, input int unsigned i);
    if (combines(lvl, i))
      return (i < (1 << lvl)) ? BLACK_SQUARE : BLACK_CIRCLE;
    else if (i < (1 << (lvl - 1)) || single_bit_group(lvl, i))
      return WHITE_SQUARE;
    else
      return WHITE_CIRCLE;
  endfunction
endpackage
