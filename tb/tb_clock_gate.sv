// tb_clock_gate: self-checking test of the clock gate.
//
// Drives a 10-unit clock and changes the enable at random points of both
// clock phases. A reference records the enable value at the end of each low
// phase; each rising clock edge must appear on the gated clock exactly when
// that value was 1, and each gated pulse must last the full high phase (no
// glitches from enable changes while the clock is high).
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, exp_pulses = 0;
  logic en_at_rise;
  realtime t_rise;
  bit rose = 1'b0;   // a gated pulse has started (the latch powers up unknown)

  clock_gate dut (.*);

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      #3 en = 1'($urandom);       // low phase: decides the coming edge
      #1 en_at_rise = en;
      clk = 1'b1;
      #2 if (n % 3 == 0) en = ~en; // glitch attempt during the high phase
      #3 clk = 1'b0;
      if (en_at_rise) exp_pulses++;
      #1 checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("FAIL gated clock high while clock low at cycle %0d", n);
      end
    end
    checks++;
    if (pulses != exp_pulses) begin
      failures++;
      $display("FAIL pulses %0d expected %0d", pulses, exp_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) begin
    pulses++;
    rose = 1'b1;
    t_rise = $realtime;
    checks++;
    if (!clk || !en_at_rise) begin
      failures++;
      $display("FAIL gated edge not allowed at %0t", $time);
    end
  end
  always @(negedge gclk) if (rose) begin
    checks++;
    if ($realtime - t_rise != 5.0 || clk) begin
      failures++;
      $display("FAIL gated pulse of %0t", $realtime - t_rise);
    end
  end
endmodule
