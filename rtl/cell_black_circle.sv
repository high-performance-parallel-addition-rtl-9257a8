// cell_black_circle -- full prefix operator of the carry network.
//
// Combines the group of this bit (gl, pl) with the adjacent lower group
// (gr, pr): (gl, pl) o (gr, pr) = (gl + pl*gr, pl*pr). The bit's half sum f is
// passed along unchanged so that it reaches the sum stage with the same delay
// as the carries. In the circuit every output goes through two NAND levels;
// here the cell is written by its logic function, which is the original
// design's. Combinational.
module cell_black_circle (
  input  logic f_i,
  input  logic gl,
  input  logic pl,
  input  logic gr,
  input  logic pr,
  output logic f_o,
  output logic g_o,
  output logic p_o
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    f_o = f_i;
    g_o = gl | (pl & gr);
    p_o = pl & pr;
  end
endmodule
