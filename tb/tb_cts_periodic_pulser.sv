// tb_cts_periodic_pulser: checks the periodical pulser.
//
// For several low periods N (including 0 = constantly high) the distance
// between consecutive pulses must be exactly N+1 cycles and each pulse must
// last one cycle. A 32-bit period of 2^32-1 is checked to keep the output low
// for a long stretch.
module tb_cts_periodic_pulser;
  logic clk = 0, rst = 1;
  logic [31:0] low_period;
  logic pulse;
  int checks = 0, failures = 0;

  cts_periodic_pulser dut (.clk, .rst, .low_period, .pulse);
  always #5 clk = ~clk;

  initial begin
    int periods [6] = '{0, 1, 2, 7, 99, 1000};
    low_period = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (periods[p]) begin
      int last, n;
      low_period = periods[p];
      // align to a pulse
      repeat (2) @(negedge clk);
      while (!pulse) @(negedge clk);
      last = 0; n = 0;
      for (int c = 1; c <= 5 * (periods[p] + 1); c++) begin
        @(negedge clk);
        if (pulse) begin
          checks++;
          if (c - last != periods[p] + 1) begin
            failures++;
            $display("FAIL period N=%0d distance %0d", periods[p], c - last);
          end
          last = c; n++;
        end
      end
      checks++;
      if (n != 5) begin failures++; $display("FAIL N=%0d pulses %0d", periods[p], n); end
    end
    low_period = 32'hffff_ffff;
    repeat (2) @(negedge clk);
    begin
      int highs; highs = 0;
      repeat (5000) begin @(negedge clk); if (pulse) highs++; end
      checks++;
      if (highs > 1) begin failures++; $display("FAIL long period pulses %0d", highs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
