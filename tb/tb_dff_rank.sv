// tb_dff_rank -- self-checking test of one flip-flop rank.
// Checks asynchronous reset to zero, capture on the rising edge only, and
// that q holds between edges, with random 8-bit data.
module tb_dff_rank;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;

  dff_rank #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] held;
    d = 8'hA5;
    #1 rst_n = 1'b0;
    #10 check('0, "in reset");
    clk = 1'b1; #10 check('0, "edge during reset");
    clk = 1'b0; rst_n = 1'b1; #10;
    for (int n = 0; n < 200; n++) begin
      held = q;
      d = W'($urandom);
      #10 check(held, "no edge yet");
      clk = 1'b1; #1 check(d, "rising edge");
      held = d;
      d = ~d;
      #9 check(held, "hold while high");
      clk = 1'b0; #1 check(held, "falling edge");
      #9;
    end
    rst_n = 1'b0; #1 check('0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
