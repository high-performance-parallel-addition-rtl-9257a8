// tb_clk_delay -- self-checking test of the local clock delay line.
// Drives a 560 ps clock through a 78-inverter chain of 20 ps inverters and
// checks that every rising and falling edge comes out 1560 ps later with the
// same polarity, and that the number of output edges equals the input's.
module tb_clk_delay;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_INV = 78, INV_PS = 20, DELAY = N_INV * INV_PS;
  logic clk_i = 1'b0, clk_o;
  int checks = 0, failures = 0;
  longint t_rise [$];
  longint t_fall [$];
  int n_in = 0, n_out = 0;

  clk_delay #(.N_INV(N_INV), .INV_PS(INV_PS)) dut (.clk_i(clk_i), .clk_o(clk_o));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_i) begin t_rise.push_back($time); n_in++; end
  always @(negedge clk_i) t_fall.push_back($time);

  always @(posedge clk_o) begin
    if ($time > 5000) begin
      n_out++;
      checks++;
      if (t_rise.size() == 0 || $time - t_rise.pop_front() != DELAY) begin
        failures++;
        $display("FAIL rising edge at %0t not %0d ps after input", $time, DELAY);
      end
    end
  end
  always @(negedge clk_o) begin
    if ($time > 5000) begin
      checks++;
      if (t_fall.size() == 0 || $time - t_fall.pop_front() != DELAY) begin
        failures++;
        $display("FAIL falling edge at %0t not %0d ps after input", $time, DELAY);
      end
    end
  end

  initial begin
    #5000;                       // let the chain settle with the clock low
    repeat (50) begin
      #280 clk_i = 1'b1;
      #280 clk_i = 1'b0;
    end
    #(2 * DELAY);
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("FAIL %0d input edges, %0d output edges", n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
