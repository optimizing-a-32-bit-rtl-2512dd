// tb_clock_gen: runs the two-phase clock model from a master clock of period
// 40 time units and samples both phases every time unit.  It checks that
// phi1 and phi2 are never high together, that each phase pulses once per
// master cycle, that phi1 is high in the middle of each high half of mclk and
// phi2 in the middle of each low half, and that a non-overlap gap of at least one buffer delay
// separates the fall of one phase from the rise of the other.
// The phase properties checked are those the design asks of its clock
// generator; the delays are the model's own.  A watchdog stops the run.
module tb_clock_gen;
  logic mclk = 1'b0, phi1, phi2;
  int   checks = 0, failures = 0;
  int   rises1 = 0, rises2 = 0, last_fall = -1000, t = 0, min_gap = 1000;
  logic p1q = 1'b0, p2q = 1'b0, mq = 1'b0;
  int   medge = 0;

  clock_gen dut (.*);

  always #20 mclk = ~mclk;

  initial begin
    #100;                                             // let the latch settle
    repeat (4000) begin
      #1 t++;
      checks++;
      if (phi1 && phi2) begin
        failures++;
        $display("FAIL phases overlap at %0d", t);
      end
      if (mclk !== mq) medge = t;
      mq = mclk;
      if (t - medge >= 10 && (phi1 !== mclk || phi2 !== !mclk)) begin
        failures++;
        $display("FAIL phase does not follow its half of mclk at %0d", t);
      end
      if ((!phi1 && p1q) || (!phi2 && p2q)) last_fall = t;
      if ((phi1 && !p1q) || (phi2 && !p2q)) begin
        if (t - last_fall < min_gap) min_gap = t - last_fall;
      end
      if (phi1 && !p1q) rises1++;
      if (phi2 && !p2q) rises2++;
      p1q = phi1; p2q = phi2;
    end
    checks++;
    if (rises1 < 99 || rises1 > 101 || rises2 < 99 || rises2 > 101) begin
      failures++;
      $display("FAIL pulses: phi1 %0d phi2 %0d in 100 cycles", rises1, rises2);
    end
    checks++;
    if (min_gap < 4) begin
      failures++;
      $display("FAIL non-overlap gap %0d", min_gap);
    end
    $display("phi1 pulses %0d, phi2 pulses %0d, smallest gap %0d", rises1, rises2, min_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
