// tb_hwp_adder32_full -- the adder with every parameter at its default.
//
// Runs 1000 additions (corner cases and random operands) through the
// wave-pipelined adder at a 560 ps clock and checks each result on clk_out:
// the k-th rising edge of clk_out carries the sum of the operands sampled on
// the k-th rising edge of clk. Also checks that eight waves are in flight in
// the pipe at once and that every admitted wave leaves after the clock stops.
module tb_hwp_adder32_full;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 32;
  localparam int unsigned NOPS = 1000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] a = '0, b = '0, sum;
  logic cout, clk_out;

  hwp_adder32 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b),
                   .sum(sum), .cout(cout), .clk_out(clk_out));

  int checks = 0, failures = 0;
  logic [N:0] expv [NOPS + 8];
  int m_in = 0, m_out = 0, max_inflight = 0;
  bit started = 1'b0;

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
    if (m_in - m_out > max_inflight) max_inflight = m_in - m_out;
  end

  always @(posedge clk_out) if (started) begin
    int k;
    k = m_out;
    m_out++;
    #20;
    checks++;
    if ({cout, sum} !== expv[k]) begin
      failures++;
      if (failures < 20)
        $display("FAIL op %0d: got %h expected %h", k, {cout, sum}, expv[k]);
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #10000 rst_n = 1'b1;
    started = 1'b1;
    #1000;
    for (int n = 0; n < NOPS; n++) begin
      case (n)
        0: begin a = '1; b = 32'h1; end
        1: begin a = '1; b = '1; end
        2: begin a = '0; b = '0; end
        3: begin a = 32'h7FFF_FFFF; b = 32'h1; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #280 clk = 1'b1;
      #280 clk = 1'b0;
    end
    #20000;
    checks++;
    if (m_out != NOPS) begin
      failures++;
      $display("FAIL %0d operations in, %0d out", NOPS, m_out);
    end
    checks++;
    if (max_inflight != 8) begin
      failures++;
      $display("FAIL %0d waves in flight at most, expected 8", max_inflight);
    end
    $display("waves in flight at most: %0d", max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
