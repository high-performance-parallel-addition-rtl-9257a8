// tb_hwp_adder32_period -- minimum clock period of the wave-pipelined adder.
//
// Runs 60 random additions at each of several clock periods, with the pipe
// drained in between, through the adder at its default parameters. With
// those, the clock delays exceed the shortest stage delays by at most 520 ps,
// so every period above that must give only correct sums, and a period below
// it must give wrong ones: the next wave starts to arrive at a register
// before the wave it should capture has been taken (data overrun). The
// periods 800, 600, 560 and 540 ps must be clean; 500 and 460 ps must show
// overrun.
module tb_hwp_adder32_period;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 32;
  localparam int NOPS = 60;
  localparam int NPER = 6;
  localparam int PERIODS [NPER] = '{800, 600, 560, 540, 500, 460};
  localparam int MIN_OK = 520;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] a = '0, b = '0, sum;
  logic cout, clk_out;

  hwp_adder32 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b),
                   .sum(sum), .cout(cout), .clk_out(clk_out));

  int checks = 0, failures = 0;
  logic [N:0] expv [NOPS * NPER];
  int m_in = 0, m_out = 0;
  int wrong [NPER];
  int cur = 0;
  bit started = 1'b0;
  int n_overrun = 0, n_clean = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    expv[m_in] = {1'b0, a} + {1'b0, b};
    m_in++;
  end

  always @(posedge clk_out) if (started) begin
    int k;
    k = m_out;
    m_out++;
    #20;
    if ({cout, sum} !== expv[k]) wrong[cur]++;
  end

  initial begin
    int half;
    wrong = '{default: 0};
    #1 rst_n = 1'b0;
    #10000 rst_n = 1'b1;
    started = 1'b1;
    for (int p = 0; p < NPER; p++) begin
      cur = p;
      half = PERIODS[p] / 2;
      for (int n = 0; n < NOPS; n++) begin
        a = $urandom;
        b = $urandom;
        #(half) clk = 1'b1;
        #(half) clk = 1'b0;
      end
      #10000;                                 // drain with the clock stopped
      checks++;
      if (m_out != m_in) begin
        failures++;
        $display("FAIL period %0d ps: %0d waves in, %0d out", PERIODS[p], m_in, m_out);
      end
      $display("period %0d ps: %0d of %0d sums wrong", PERIODS[p], wrong[p], NOPS);
      checks++;
      if (PERIODS[p] > MIN_OK) begin
        if (wrong[p] != 0) begin
          failures++;
          $display("FAIL period %0d ps should be safe", PERIODS[p]);
        end else n_clean++;
      end else begin
        if (wrong[p] == 0) begin
          failures++;
          $display("FAIL period %0d ps is below the minimum but showed no overrun", PERIODS[p]);
        end else n_overrun++;
      end
    end
    checks++;
    if (n_overrun == 0 || n_clean == 0) begin
      failures++;
      $display("FAIL overrun or clean operation never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
