// dff_rank -- one rank of D flip-flops of the pipelined adder.
//
// Every register rank of the adder (input, the two intermediate ranks and the
// output rank) is one of these, clocked by its own local clock. The flops take
// d on the rising edge of clk. rst_n clears the rank to zero asynchronously, so
// the outputs read 0 until the first data wave has reached them, as the
// original design describes; the reset itself is this design's own choice.
//
// Interface: clk, rst_n, d[W-1:0] -> q[W-1:0]; one clock of latency.
module dff_rank #(
  parameter int unsigned W = 96
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
