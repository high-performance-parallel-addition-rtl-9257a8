// tb_cell_black_square -- exhaustive test of the generate-only operator.
// All 16 input combinations; expected carry from the group meaning.
module tb_cell_black_square;
  timeunit 1ps;
  timeprecision 1ps;

  logic f_i, gl, pl, gr, f_o, g_o;
  int checks = 0, failures = 0;

  cell_black_square dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg;
    for (int v = 0; v < 16; v++) begin
      {f_i, gl, pl, gr} = 4'(v);
      #1;
      if (gl) eg = 1'b1; else if (pl) eg = gr; else eg = 1'b0;
      checks++;
      if (f_o !== f_i || g_o !== eg) begin
        failures++;
        $display("FAIL in=%b out f=%b g=%b", 4'(v), f_o, g_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
