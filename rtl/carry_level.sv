// carry_level -- one level of the parallel carry (prefix) network.
//
// Level LEVEL (1..log2 N) works on groups of 2^(LEVEL-1) bits. A bit whose bit
// (LEVEL-1) is set combines its group with the group held by bit
// j = floor(i / 2^(LEVEL-1)) * 2^(LEVEL-1) - 1, the top bit of the lower
// neighbouring block; all other bits pass through a buffer cell. The cell kind
// of each bit follows hwp_pkg::cell_kind, which reproduces the cell map of the
// 32-bit design: after level L bits 0..2^L-1 hold final carries c_i = G_i.
// The buffer cells (open circles and squares) only equalise path delays in
// the circuit; logically they are wires and are written as such here.
// The fan-out of a partner bit is 2^(LEVEL-1), 16 at the last level of a
// 32-bit adder.
//
// Bus convention: f = half sums (p_i of the generate stage), g = group
// generates, p = group propagates. Square cells carry no p; their p_o is 0.
// The propagate of a one-bit group is its f, so p_i of such a bit is ignored.
// Purely combinational.
module carry_level
  import hwp_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned LEVEL = 1
) (
  input  logic [N-1:0] f_i,
  input  logic [N-1:0] g_i,
  input  logic [N-1:0] p_i,
  output logic [N-1:0] f_o,
  output logic [N-1:0] g_o,
  output logic [N-1:0] p_o
);
  timeunit 1ps;
  timeprecision 1ps;

  // Effective group propagate of every bit entering this level.
  logic [N-1:0] pe;
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      pe[i] = single_bit_group(LEVEL - 1, i) ? f_i[i] : p_i[i];
  end

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam cell_e KIND = cell_kind(LEVEL, i);
    localparam int unsigned J = combines(LEVEL, i) ? partner(LEVEL, i) : i;
    if (KIND == BLACK_CIRCLE) begin : g_bc
      cell_black_circle u_cell (
        .f_i(f_i[i]), .gl(g_i[i]), .pl(pe[i]), .gr(g_i[J]), .pr(pe[J]),
        .f_o(f_o[i]), .g_o(g_o[i]), .p_o(p_o[i])
      );
    end else if (KIND == BLACK_SQUARE) begin : g_bs
      cell_black_square u_cell (
        .f_i(f_i[i]), .gl(g_i[i]), .pl(pe[i]), .gr(g_i[J]),
        .f_o(f_o[i]), .g_o(g_o[i])
      );
      assign p_o[i] = 1'b0;
    end else if (KIND == WHITE_CIRCLE) begin : g_wc
      // Delay-matching buffer of f, g and p: a wire in logic.
      assign f_o[i] = f_i[i];
      assign g_o[i] = g_i[i];
      assign p_o[i] = pe[i];
    end else begin : g_ws
      // Delay-matching buffer of f and g only: a wire in logic.
      assign f_o[i] = f_i[i];
      assign g_o[i] = g_i[i];
      assign p_o[i] = 1'b0;
    end
  end
endmodule
