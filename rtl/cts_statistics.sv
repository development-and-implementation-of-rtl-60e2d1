// cts_statistics: trigger statistics of the network logic.
//
// Counts, as free-running 32-bit counters, the clock cycles in which the
// trigger decision was asserted, its rising edges and the triggers accepted
// by the trigger distribution. It also measures, per accepted trigger, the
// idle time (cycles the trigger distribution waited in its idle state before
// accepting the event), the dead time (cycles from acceptance until it was
// idle again) and the time between the last two accepted triggers. The set
// of values follows the design's fixed registers 0xa000-0xa002, 0xa00a and
// 0xa00b and its event data description; the exact start and stop points of
// each interval are this implementation's choices.
//
// Timing: all outputs are registered and change one cycle after the event.
// Interval counters saturate at 2^32 - 1.
module cts_statistics (
  input  logic        clk,
  input  logic        rst,
  input  logic        trg_asserted,  // trigger decision
  input  logic        accepted,      // pulse: trigger accepted
  input  logic        td_idle,       // trigger distribution is idle
  output logic [31:0] cnt_asserted,
  output logic [31:0] cnt_edges,
  output logic [31:0] cnt_accepted,
  output logic [31:0] last_idle_time,
  output logic [31:0] last_dead_time,
  output logic [31:0] last_period
);

  logic        trg_q;
  logic        idle_q;
  logic [31:0] idle_run;
  logic [31:0] dead_run;
  logic [31:0] period_run;

  function automatic logic [31:0] sat_inc(logic [31:0] v);
    return (v == '1) ? v : v + 32'd1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      trg_q          <= 1'b0;
      idle_q         <= 1'b1;
      cnt_asserted   <= '0;
      cnt_edges      <= '0;
      cnt_accepted   <= '0;
      last_idle_time <= '0;
      last_dead_time <= '0;
      last_period    <= '0;
      idle_run       <= '0;
      dead_run       <= '0;
      period_run     <= '0;
    end else begin
      trg_q  <= trg_asserted;
      idle_q <= td_idle;
      if (trg_asserted)           cnt_asserted <= cnt_asserted + 32'd1;
      if (trg_asserted && !trg_q) cnt_edges    <= cnt_edges + 32'd1;

      period_run <= sat_inc(period_run);
      if (accepted) begin
        cnt_accepted   <= cnt_accepted + 32'd1;
        last_idle_time <= idle_run;
        last_period    <= period_run;
        period_run     <= 32'd1;
      end

      // idle time: cycles in the idle state since the last return to idle
      if (td_idle && !accepted) idle_run <= sat_inc(idle_run);
      else                      idle_run <= '0;

      // dead time: cycles from acceptance until idle again
      if (accepted)       dead_run <= 32'd1;
      else if (!td_idle)  dead_run <= sat_inc(dead_run);
      if (td_idle && !idle_q) last_dead_time <= dead_run;
    end
  end

endmodule
