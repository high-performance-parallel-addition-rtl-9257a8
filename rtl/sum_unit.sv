// sum_unit -- final sum of the parallel adder.
//
// With c_i = G_i the carry out of bits i..0, sum_i = p_i XOR c_(i-1) and
// sum_0 = p_0 (the adder has no carry input). f carries the half sums p_i.
// co is the carry out of the top bit, c_(N-1).
// The sum equation is the original design's; the co output is an addition.
// Purely combinational.
module sum_unit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] f,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic         co
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    s  = f ^ {c[N-2:0], 1'b0};
    co = c[N-1];
  end
endmodule
