// tb_cts_throttle: checks the per-millisecond event limit and the stop bit.
//
// Uses a 1000-cycle window to keep the run short. With a limit of M events
// and an acceptance attempted every cycle while not inhibited, exactly M
// events must pass per window. With throttling disabled nothing is
// inhibited, and the stop bit inhibits permanently.
module tb_cts_throttle;
  localparam int MS = 1000;
  logic clk = 0, rst = 1;
  logic [9:0] max_events;
  logic enable, stop, accepted, inhibit;
  int checks = 0, failures = 0;

  cts_throttle #(.MS_CYCLES(MS)) dut (.clk, .rst, .max_events, .enable, .stop, .accepted, .inhibit);
  always #5 clk = ~clk;

  // try to accept an event in every cycle that is not inhibited
  assign accepted = !inhibit && !rst;

  initial begin
    int limits [4] = '{1, 5, 100, 1023};
    max_events = 0; enable = 0; stop = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // disabled: never inhibited
    repeat (3 * MS) begin
      @(negedge clk);
      checks++;
      if (inhibit) begin failures++; $display("FAIL inhibit while disabled"); break; end
    end
    foreach (limits[k]) begin
      int n;
      max_events = 10'(limits[k]);
      enable = 1;
      // wait for the window boundary
      while (dut.tick != 0) @(negedge clk);
      n = 0;
      repeat (MS) begin
        if (accepted) n++;
        @(negedge clk);
      end
      checks++;
      if (n != (limits[k] < MS ? limits[k] : MS)) begin
        failures++;
        $display("FAIL limit %0d passed %0d", limits[k], n);
      end
    end
    stop = 1; enable = 0;
    repeat (2 * MS) begin
      @(negedge clk);
      checks++;
      if (!inhibit) begin failures++; $display("FAIL stop not inhibiting"); break; end
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
