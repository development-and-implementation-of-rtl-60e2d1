// tb_cts_statistics: checks the trigger statistics.
//
// Plays a sequence of trigger pulses and TD-FSM busy periods with known
// lengths and compares the asserted/edge/accepted counters, the idle time,
// the dead time and the time between accepted triggers with the values the
// testbench derives from its own schedule.
module tb_cts_statistics;
  logic clk = 0, rst = 1;
  logic trg_asserted, accepted, td_idle;
  logic [31:0] cnt_asserted, cnt_edges, cnt_accepted, last_idle_time, last_dead_time, last_period;
  int checks = 0, failures = 0;
  int cyc = 0;   // index of the last clock edge
  always @(posedge clk) cyc++;

  cts_statistics dut (.clk, .rst, .trg_asserted, .accepted, .td_idle,
                      .cnt_asserted, .cnt_edges, .cnt_accepted,
                      .last_idle_time, .last_dead_time, .last_period);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, int unsigned want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, want); end
  endtask

  initial begin
    int exp_asserted, exp_edges;
    int a_prev, a_now, r_prev, r_now;
    trg_asserted = 0; accepted = 0; td_idle = 1;
    exp_asserted = 0; exp_edges = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    r_prev = cyc; a_prev = 0;
    for (int ev = 1; ev <= 20; ev++) begin
      int idle_len, dead_len, high_len;
      idle_len = $urandom_range(1, 50);   // cycles idle before the trigger
      dead_len = $urandom_range(6, 60);   // cycles the FSM is busy
      high_len = $urandom_range(1, 5);
      repeat (idle_len) @(negedge clk);
      // trigger: accepted in its first cycle
      trg_asserted = 1; accepted = 1; exp_asserted += high_len; exp_edges++;
      a_now = cyc + 1;
      @(negedge clk);
      accepted = 0; td_idle = 0;
      repeat (high_len - 1) @(negedge clk);
      trg_asserted = 0;
      repeat (dead_len - high_len) @(negedge clk);
      td_idle = 1;
      r_now = cyc + 1;
      @(negedge clk);
      @(negedge clk);
      chk("accepted", cnt_accepted, ev);
      chk("asserted", cnt_asserted, exp_asserted);
      chk("edges", cnt_edges, exp_edges);
      chk("dead time", last_dead_time, r_now - a_now);
      if (ev > 1) begin
        chk("idle time", last_idle_time, a_now - r_prev);
        chk("period", last_period, a_now - a_prev);
      end
      a_prev = a_now; r_prev = r_now;
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
