// cell_black_square -- generate-only prefix operator of the carry network.
//
// Used where the lower operand gr is already a final carry, so the result
// g = gl + pl*gr is itself the final carry of this bit and no group propagate
// is needed any more. f is passed along. The function and where the cell is
// used follow the original design. Combinational.
module cell_black_square (
  input  logic f_i,
  input  logic gl,
  input  logic pl,
  input  logic gr,
  output logic f_o,
  output logic g_o
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    f_o = f_i;
    g_o = gl | (pl & gr);
  end
endmodule
