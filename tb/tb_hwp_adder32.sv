// tb_hwp_adder32 -- end-to-end test of the hybrid wave-pipelined adder.
//
// Two copies of the adder run side by side on the same operands:
//   dut_w  default parameters: stage logic delays 1500/1500/1000 ps and local
//          clocks delayed to match, i.e. the wave-pipelined timing;
//   dut_z  all delays zero: the logic as synthesis sees it, a conventional
//          three-stage pipeline on one clock.
// Phases: 300 operations at a 560 ps clock, 100 at 2000 ps (slower clock),
// then the global clock is stopped and the waves still inside dut_w must
// drain out on their own local clocks.
// Checks: every dut_w result (clk_out edge k carries the operands sampled on
// clk edge k), every dut_z result (three clk edges of latency), zero outputs
// before the first wave arrives, and the number of waves in flight per stage
// and in the whole pipe. Each of these mechanisms is counted and must occur.
module tb_hwp_adder32;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 32;
  localparam int unsigned MAXOPS = 1024;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] a = '0, b = '0;
  logic [N-1:0] sum_w, sum_z;
  logic cout_w, cout_z, clko_w, clko_z;

  hwp_adder32 dut_w (.clk(clk), .rst_n(rst_n), .a(a), .b(b),
                     .sum(sum_w), .cout(cout_w), .clk_out(clko_w));
  hwp_adder32 #(.S1_LOGIC_PS(0), .S2_LOGIC_PS(0), .S3_LOGIC_PS(0)) dut_z (
                     .clk(clk), .rst_n(rst_n), .a(a), .b(b),
                     .sum(sum_z), .cout(cout_z), .clk_out(clko_z));

  int checks = 0, failures = 0;
  logic [N:0] expv [MAXOPS];
  int m0 = 0, m1 = 0, m2 = 0, m3 = 0;        // rising edges of each rank's clock
  int half = 280;                             // half clock period, ps
  bit clk_on = 1'b0;
  bit started = 1'b0;                        // set once the clock chains have settled
  int phase = 0;
  // maxima of waves in flight, per phase
  int mx_s1 [2], mx_s2 [2], mx_s3 [2], mx_all [2];
  // mechanism counters
  int n_multiwave = 0, n_slow = 0, n_empty = 0, n_conv = 0, n_drain = 0, n_cout = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %0t: %s", $time, msg);
  endtask

  initial begin
    #5000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Global clock.
  initial begin
    forever begin
      #(half);
      if (clk_on || clk) clk = ~clk;
    end
  end

  // Operands sampled by rank 0 and their expected sums.
  always @(posedge clk) begin
    expv[m0 % MAXOPS] = {1'b0, a} + {1'b0, b};
    m0++;
  end
  always @(posedge dut_w.clk1) m1++;
  always @(posedge dut_w.clk2) m2++;

  // Waves in flight: launched by one rank, not yet captured by the next.
  always @(m0 or m1 or m2 or m3) begin
    if (phase < 2) begin
      if (m0 - m1 > mx_s1[phase]) mx_s1[phase] = m0 - m1;
      if (m1 - m2 > mx_s2[phase]) mx_s2[phase] = m1 - m2;
      if (m2 - m3 > mx_s3[phase]) mx_s3[phase] = m2 - m3;
      if (m0 - m3 > mx_all[phase]) mx_all[phase] = m0 - m3;
      if (m0 - m1 >= 2) n_multiwave++;
    end
  end

  // Wave-pipelined copy: clk_out edge k carries the operands of clk edge k.
  always @(posedge clko_w) if (started) begin
    int k;
    k = m3;
    m3++;
    #20;
    checks++;
    if ({cout_w, sum_w} !== expv[k % MAXOPS])
      fail($sformatf("dut_w op %0d: got %h expected %h", k, {cout_w, sum_w}, expv[k % MAXOPS]));
    else begin
      if (phase == 1) n_slow++;
      if (phase == 2) n_drain++;
      if (cout_w) n_cout++;
    end
  end

  // Before the first wave reaches the output rank, both copies read zero;
  // afterwards the zero-delay copy lags three clk edges.
  always @(negedge clk) begin
    if (m3 == 0) begin
      checks++;
      if ({cout_w, sum_w} !== '0) fail("dut_w output not zero before the pipe filled");
      else n_empty++;
    end
    checks++;
    if (m0 < 4) begin
      if ({cout_z, sum_z} !== '0) fail("dut_z output not zero before the pipe filled");
      else n_empty++;
    end else if ({cout_z, sum_z} !== expv[(m0 - 4) % MAXOPS])
      fail($sformatf("dut_z op %0d: got %h expected %h", m0 - 4, {cout_z, sum_z}, expv[(m0 - 4) % MAXOPS]));
    else n_conv++;
  end

  // New operands half a period after each edge.
  task automatic drive(input int n);
    logic [N-1:0] x, y;
    case (n % 16)
      0: begin x = '1; y = 1; end               // carry through all bits
      1: begin x = '1; y = '1; end
      2: begin x = 32'h8000_0000; y = 32'h8000_0000; end
      3: begin x = '0; y = '0; end
      4: begin x = 32'h5555_5555; y = 32'hAAAA_AAAB; end
      default: begin x = $urandom; y = $urandom; end
    endcase
    a = x;
    b = y;
  endtask

  initial begin
    mx_s1 = '{0, 0}; mx_s2 = '{0, 0}; mx_s3 = '{0, 0}; mx_all = '{0, 0};
    #1 rst_n = 1'b0;
    #10000 rst_n = 1'b1;
    // The inverter chains start from arbitrary states; by now they have
    // settled low and any start-up pulses have left them.
    m0 = 0; m1 = 0; m2 = 0; m3 = 0;
    started = 1'b1;
    mx_s1 = '{0, 0}; mx_s2 = '{0, 0}; mx_s3 = '{0, 0}; mx_all = '{0, 0};
    #1000 clk_on = 1'b1;
    for (int n = 0; n < 400; n++) begin
      if (n == 300) begin
        @(posedge clk);
        half = 1000;                          // slower clock, same hardware
      end
      @(negedge clk);
      drive(n);
      if (n == 306) phase = 1;             // fast-clock waves have left
    end
    // Stop the global clock: no more edges enter, the ones inside keep going.
    @(negedge clk);
    clk_on = 1'b0;
    phase = 2;
    #20000;
    checks++;
    if (m3 != m0) fail($sformatf("%0d waves admitted, %0d left the pipe", m0, m3));

    checks++;
    if (mx_s1[0] != 3 || mx_s2[0] != 3 || mx_s3[0] != 2 || mx_all[0] != 8)
      fail($sformatf("waves in flight at 560 ps: %0d/%0d/%0d total %0d, expected 3/3/2 total 8",
                     mx_s1[0], mx_s2[0], mx_s3[0], mx_all[0]));
    checks++;
    if (mx_s1[1] != 1 || mx_s2[1] != 1 || mx_s3[1] != 1)
      fail($sformatf("waves per stage at 2000 ps: %0d/%0d/%0d, expected 1/1/1",
                     mx_s1[1], mx_s2[1], mx_s3[1]));
    $display("waves in flight, 560 ps clock: stage1 %0d stage2 %0d stage3 %0d pipe %0d",
             mx_s1[0], mx_s2[0], mx_s3[0], mx_all[0]);
    $display("mechanisms: multi-wave stage %0d, slow-clock results %0d, drained after clock stop %0d,",
             n_multiwave, n_slow, n_drain);
    $display("            zero before fill %0d, conventional-pipeline results %0d, carry out %0d",
             n_empty, n_conv, n_cout);
    checks++; if (n_multiwave == 0) fail("no stage ever held two waves");
    checks++; if (n_slow == 0)      fail("no result at the slow clock");
    checks++; if (n_drain == 0)     fail("no wave drained after the clock stopped");
    checks++; if (n_empty == 0)     fail("output never seen empty before fill");
    checks++; if (n_conv == 0)      fail("no zero-delay pipeline result");
    checks++; if (n_cout == 0)      fail("carry out never set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
