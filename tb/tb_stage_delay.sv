// tb_stage_delay -- self-checking test of the stage delay model.
// A new random word enters every 300 ps. The longest path delay is 1000 ps,
// so several words are in flight at once; each must be on the output intact
// from 1000 ps after it entered until the next one starts to arrive, 800 ps
// (shortest path) after that one entered. Between the two the output must
// show neither the old nor the new word.
module tb_stage_delay;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 16, DMAX = 1000, DMIN = 800, SLOT = 300;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0, n_window = 0;

  stage_delay #(.W(W), .DELAY_PS(DMAX), .MIN_DELAY_PS(DMIN)) dut (.din(din), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Word n enters at 1 + n*SLOT. It is valid from 1 + n*SLOT + DMAX to
  // 1 + (n+1)*SLOT + DMIN, i.e. 1000..1100 ps after it entered; the window
  // of word n+1 follows, 1100..1300 ps after word n entered.
  initial begin
    #(1 + DMAX + 50);                         // word 0 valid
    repeat (150) begin
      checks++;
      if (dout !== hist[0]) begin
        failures++;
        $display("FAIL at %0t: dout=%h expected %h", $time, dout, hist[0]);
      end
      #150;                                   // inside word n+1's window
      checks++;
      if (hist[1] != hist[0]) begin
        n_window++;
        if (dout === hist[1] || dout === hist[0]) begin
          failures++;
          $display("FAIL at %0t: output valid inside the dispersion window", $time);
        end
      end
      void'(hist.pop_front());
      #(SLOT - 150);
    end
    checks++;
    if (n_window == 0) begin
      failures++;
      $display("FAIL dispersion window never checked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    forever begin
      din = W'($urandom);
      hist.push_back(din);
      #(SLOT);
    end
  end
endmodule
