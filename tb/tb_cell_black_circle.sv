// tb_cell_black_circle -- exhaustive test of the full prefix operator.
// All 32 input combinations; expected values from the meaning of the
// operator: the combined group generates if the upper group generates, or if
// it propagates and the lower group generates; it propagates if both do.
module tb_cell_black_circle;
  timeunit 1ps;
  timeprecision 1ps;

  logic f_i, gl, pl, gr, pr, f_o, g_o, p_o;
  int checks = 0, failures = 0;

  cell_black_circle dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep;
    for (int v = 0; v < 32; v++) begin
      {f_i, gl, pl, gr, pr} = 5'(v);
      #1;
      if (gl) eg = 1'b1; else if (pl) eg = gr; else eg = 1'b0;
      ep = (pl == 1'b1) && (pr == 1'b1);
      checks++;
      if (f_o !== f_i || g_o !== eg || p_o !== ep) begin
        failures++;
        $display("FAIL in=%b out f=%b g=%b p=%b", 5'(v), f_o, g_o, p_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
