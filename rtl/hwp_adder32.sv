// hwp_adder32 -- three-stage hybrid wave-pipelined 32-bit parallel adder.
//
// Datapath (N = 32, five prefix levels):
//   rank 0  input flip-flops on a, b                       clock clk
//   stage 1 generate/propagate, carry levels 1..2
//   rank 1  flip-flops on f, g, p                          clock clk1
//   stage 2 carry levels 3..4
//   rank 2  flip-flops on f, g, p                          clock clk2
//   stage 3 carry level 5 (c_i = G_i for all bits), sum
//   rank 3  output flip-flops on sum, cout                 clock clk_out
// This split of the levels over the stages and the cell map of every level
// follow the original 32-bit design.
//
// Clocking: each rank's clock is the previous rank's clock delayed by an
// inverter chain (clk_delay) that is a little longer than the stage's longest
// logic delay (modelled by stage_delay). A wave launched by rank k on a clock
// edge is therefore captured by rank k+1 on the delayed copy of that same
// edge, however long the stage is relative to the clock period. The next wave
// must not start to arrive before that, so the clock period must exceed the
// clock delay minus the stage's shortest delay: with the default dispersion
// of 460 ps that is 520 ps. With the default delays (1500/1500/1000 ps
// longest, 1040/1040/540 ps shortest, 1560/1560/1040 ps of clock delay) and a
// 560 ps clock, stages 1 and 2 each hold up to three waves and stage 3 two,
// eight waves in the pipe in all. Any slower clock works as well. Choosing the
// clock delay from the logic delay plus CLK_MARGIN_PS, and all the delay
// values themselves, are this design's choices; the structure is the
// original's.
//
// Timing seen from outside: a, b are sampled on a rising edge of clk; the sum
// of that pair appears on sum/cout at the corresponding rising edge of
// clk_out, S1+S2+S3 clock-delay picoseconds later. In synthesis (no delays)
// all clocks coincide and the adder is an ordinary three-stage pipeline whose
// result appears three clk edges after the operands were sampled.
//
// cout (c31) is brought out in addition to the sum; it is this design's
// addition. rst_n clears every rank asynchronously, so outputs read 0 until the
// first wave arrives.
module hwp_adder32
  import hwp_pkg::*;
#(
  parameter int unsigned N             = 32,
  parameter int unsigned S1_LEVELS     = 2,
  parameter int unsigned S2_LEVELS     = 2,
  parameter int unsigned S1_LOGIC_PS   = 1500,
  parameter int unsigned S2_LOGIC_PS   = 1500,
  parameter int unsigned S3_LOGIC_PS   = 1000,
  parameter int unsigned DISPERSION_PS = 460,
  parameter int unsigned CLK_MARGIN_PS = 40,
  parameter int unsigned INV_PS        = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned L = num_levels(N);
  localparam int unsigned R1_AFTER = S1_LEVELS;             // rank 1 follows this level
  localparam int unsigned R2_AFTER = S1_LEVELS + S2_LEVELS; // rank 2 follows this level

  // Inverter count of each local clock chain: stage logic delay plus margin,
  // rounded up to an even number of inverters.
  function automatic int unsigned chain_len(input int unsigned logic_ps);
    if (logic_ps == 0) return 0;
    return 2 * ((logic_ps + CLK_MARGIN_PS + 2 * INV_PS - 1) / (2 * INV_PS));
  endfunction

  // Shortest path delay of a stage: its longest minus the dispersion.
  function automatic int unsigned min_delay(input int unsigned logic_ps);
    return (logic_ps >= DISPERSION_PS) ? logic_ps - DISPERSION_PS : 0;
  endfunction

  if ((N & (N - 1)) != 0 || N < 4) begin : g_bad_n
    $error("hwp_adder32: N must be a power of two, at least 4");
  end
  if (R2_AFTER >= L || S1_LEVELS == 0 || S2_LEVELS == 0) begin : g_bad_split
    $error("hwp_adder32: each stage needs at least one carry level");
  end

  // ---------------- local clocks ----------------
  logic clk1, clk2, clk3;
  clk_delay #(.N_INV(chain_len(S1_LOGIC_PS)), .INV_PS(INV_PS)) u_dly1 (.clk_i(clk),  .clk_o(clk1));
  clk_delay #(.N_INV(chain_len(S2_LOGIC_PS)), .INV_PS(INV_PS)) u_dly2 (.clk_i(clk1), .clk_o(clk2));
  clk_delay #(.N_INV(chain_len(S3_LOGIC_PS)), .INV_PS(INV_PS)) u_dly3 (.clk_i(clk2), .clk_o(clk3));
  assign clk_out = clk3;

  // ---------------- rank 0 and generate/propagate ----------------
  logic [N-1:0] a_q, b_q, g0, p0;
  dff_rank #(.W(2*N)) u_rank0 (.clk(clk), .rst_n(rst_n), .d({a, b}), .q({a_q, b_q}));
  gp_unit  #(.N(N))   u_gp    (.a(a_q), .b(b_q), .g(g0), .p(p0));

  // ---------------- carry network ----------------
  // lv_*[k] is the output of level k (lv_*[0]: generate/propagate);
  // in_*[k] is what level k reads, taken from a register rank where one sits.
  logic [N-1:0] lv_f [L+1];
  logic [N-1:0] lv_g [L+1];
  logic [N-1:0] lv_p [L+1];
  logic [N-1:0] in_f [1:L];
  logic [N-1:0] in_g [1:L];
  logic [N-1:0] in_p [1:L];

  assign lv_f[0] = p0;
  assign lv_g[0] = g0;
  assign lv_p[0] = p0;

  logic [3*N-1:0] s1_out, s2_out, r1_q, r2_q;

  assign s1_out = {lv_f[R1_AFTER], lv_g[R1_AFTER], lv_p[R1_AFTER]};
  assign s2_out = {lv_f[R2_AFTER], lv_g[R2_AFTER], lv_p[R2_AFTER]};

  logic [3*N-1:0] s1_dly, s2_dly;
  stage_delay #(.W(3*N), .DELAY_PS(S1_LOGIC_PS), .MIN_DELAY_PS(min_delay(S1_LOGIC_PS))) u_sd1 (.din(s1_out), .dout(s1_dly));
  dff_rank    #(.W(3*N))                         u_rank1 (.clk(clk1), .rst_n(rst_n), .d(s1_dly), .q(r1_q));
  stage_delay #(.W(3*N), .DELAY_PS(S2_LOGIC_PS), .MIN_DELAY_PS(min_delay(S2_LOGIC_PS))) u_sd2 (.din(s2_out), .dout(s2_dly));
  dff_rank    #(.W(3*N))                         u_rank2 (.clk(clk2), .rst_n(rst_n), .d(s2_dly), .q(r2_q));

  for (genvar k = 1; k <= L; k++) begin : g_lvl
    if (k - 1 == R1_AFTER) begin : g_from_r1
      assign {in_f[k], in_g[k], in_p[k]} = r1_q;
    end else if (k - 1 == R2_AFTER) begin : g_from_r2
      assign {in_f[k], in_g[k], in_p[k]} = r2_q;
    end else begin : g_from_lvl
      assign in_f[k] = lv_f[k-1];
      assign in_g[k] = lv_g[k-1];
      assign in_p[k] = lv_p[k-1];
    end
    carry_level #(.N(N), .LEVEL(k)) u_level (
      .f_i(in_f[k]), .g_i(in_g[k]), .p_i(in_p[k]),
      .f_o(lv_f[k]), .g_o(lv_g[k]), .p_o(lv_p[k])
    );
  end

  // ---------------- sum and output rank ----------------
  logic [N-1:0] s_comb;
  logic         co_comb;
  sum_unit #(.N(N)) u_sum (.f(lv_f[L]), .c(lv_g[L]), .s(s_comb), .co(co_comb));

  logic [N:0] s3_dly;
  stage_delay #(.W(N+1), .DELAY_PS(S3_LOGIC_PS), .MIN_DELAY_PS(min_delay(S3_LOGIC_PS))) u_sd3 (.din({co_comb, s_comb}), .dout(s3_dly));
  dff_rank    #(.W(N+1))                         u_rank3 (.clk(clk3), .rst_n(rst_n), .d(s3_dly), .q({cout, sum}));

  // The last level's propagates are not used: every bit holds a final carry.
  logic unused_p;
  assign unused_p = ^lv_p[L];
endmodule
