// tb_carry_level -- self-checking test of the carry network levels.
// Chains all five levels of a 32-bit network, fed from random a, b. After
// level k the group of bit i spans bits lo..i with lo = i rounded down to a
// multiple of 2^k; the expected group generate and propagate are computed by
// a bit-serial ripple over that span. The half sums must arrive unchanged and
// square cells must carry no propagate.
module tb_carry_level;
  import hwp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 32;
  localparam int unsigned L = 5;
  logic [N-1:0] a, b;
  logic [N-1:0] f [L+1];
  logic [N-1:0] g [L+1];
  logic [N-1:0] p [L+1];
  int checks = 0, failures = 0;

  assign f[0] = a ^ b;
  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar k = 1; k <= L; k++) begin : g_lvl
    carry_level #(.N(N), .LEVEL(k)) dut (
      .f_i(f[k-1]), .g_i(g[k-1]), .p_i(p[k-1]),
      .f_o(f[k]),   .g_o(g[k]),   .p_o(p[k])
    );
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lo;
    logic eg, ep, circle;
    for (int n = 0; n < 400; n++) begin
      case (n)
        0: begin a = '1; b = 32'h1; end
        1: begin a = '1; b = '0; end
        2: begin a = 32'h8000_0000; b = 32'h8000_0000; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      for (int unsigned k = 1; k <= L; k++) begin
        for (int unsigned i = 0; i < N; i++) begin
          lo = (i >> k) << k;
          eg = 1'b0;
          ep = 1'b1;
          for (int unsigned j = lo; j <= i; j++) begin
            eg = (a[j] & b[j]) | ((a[j] ^ b[j]) & eg);
            ep = ep & (a[j] ^ b[j]);
          end
          circle = (cell_kind(k, i) == BLACK_CIRCLE) || (cell_kind(k, i) == WHITE_CIRCLE);
          checks++;
          if (g[k][i] !== eg || f[k][i] !== (a[i] ^ b[i]) ||
              (circle && p[k][i] !== ep) || (!circle && p[k][i] !== 1'b0)) begin
            failures++;
            if (failures < 10)
              $display("FAIL level %0d bit %0d: g=%b/%b p=%b/%b", k, i, g[k][i], eg, p[k][i], ep);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
