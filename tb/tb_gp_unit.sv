// tb_gp_unit -- self-checking test of the generate/propagate stage.
// Random and corner operands; expected g and p are built bit by bit from the
// one-bit addition table (g = carry of a_i + b_i, p = its sum bit).
module tb_gp_unit;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 32;
  logic [N-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  gp_unit #(.N(N)) dut (.a(a), .b(b), .g(g), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] eg, ep;
    logic [1:0] s;
    for (int n = 0; n < 1000; n++) begin
      case (n)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = '0; end
        3: begin a = 32'hAAAA_AAAA; b = 32'h5555_5555; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      for (int i = 0; i < N; i++) begin
        s = 2'(a[i]) + 2'(b[i]);
        eg[i] = s[1];
        ep[i] = s[0];
      end
      checks++;
      if (g !== eg || p !== ep) begin
        failures++;
        $display("FAIL a=%h b=%h g=%h/%h p=%h/%h", a, b, g, eg, p, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
