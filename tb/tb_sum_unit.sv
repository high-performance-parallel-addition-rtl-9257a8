// tb_sum_unit -- self-checking test of the sum stage.
// Random half sums and carries; expected sum bit i is the parity of f_i and
// the carry out of bit i-1 (none into bit 0), carry out is c_(N-1).
module tb_sum_unit;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 32;
  logic [N-1:0] f, c, s;
  logic co;
  int checks = 0, failures = 0;

  sum_unit #(.N(N)) dut (.f(f), .c(c), .s(s), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] es;
    for (int n = 0; n < 1000; n++) begin
      f = $urandom; c = $urandom;
      if (n == 0) begin f = '0; c = '1; end
      #1;
      for (int i = 0; i < N; i++)
        es[i] = (i == 0) ? f[0] : (f[i] != c[i-1]);
      checks++;
      if (s !== es || co !== c[N-1]) begin
        failures++;
        $display("FAIL f=%h c=%h s=%h expected %h", f, c, s, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
