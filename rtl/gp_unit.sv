// gp_unit -- bitwise generate and propagate of the parallel adder.
//
// g_i = a_i AND b_i, p_i = a_i XOR b_i for every bit (the Brent-Kung
// formulation). p_i is also the half sum that travels to the sum stage.
// The equations are those of the original design. Purely combinational.
module gp_unit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    g = a & b;
    p = a ^ b;
  end
endmodule
