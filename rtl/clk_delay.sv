// clk_delay -- behavioural model of a local clock generator (inverter chain).
//
// Each register rank of the adder is clocked by the clock of the rank before
// it, delayed by a chain of inverters so that the clock travels through the
// pipe together with the data wave it belongs to. This model is a chain of
// N_INV inverters, each with an inertial delay of INV_PS picoseconds, giving a
// total delay of N_INV*INV_PS. N_INV must be even so the clock is not
// inverted. In synthesis the delays are ignored and the chain reduces to a
// wire, which turns the design into a conventionally clocked pipeline.
// Chain length and inverter delay are this design's choices.
module clk_delay #(
  parameter int unsigned N_INV  = 78,
  parameter int unsigned INV_PS = 20
) (
  input  logic clk_i,
  output logic clk_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_INV:0] node;
  assign node[0] = clk_i;
  for (genvar k = 0; k < N_INV; k++) begin : g_inv
    assign #(INV_PS) node[k+1] = ~node[k];
  end
  assign clk_o = node[N_INV];

  if (N_INV % 2 != 0) begin : g_bad_len
    $error("clk_delay: N_INV must be even");
  end
endmodule
