// cts_throttle: limits the rate of accepted triggers.
//
// A free-running counter divides the clock into windows of one millisecond
// (MS_CYCLES cycles, 100 000 at 100 MHz). Within each window the accepted
// triggers are counted; when throttling is enabled and the count has
// reached the programmed maximum, the inhibit output stops the trigger
// distribution until the next window starts. The stop bit inhibits all
// triggers regardless of the rate. The register fields (maximum 9:0,
// enable 10, stop 31 of register 0xa00c) follow the design's register table;
// the fixed-window counting method is this implementation's choice.
//
// Timing: inhibit is combinational from the window count and the register,
// so the trigger after the one that reached the limit is already held back.
module cts_throttle #(
  parameter int unsigned MS_CYCLES = 100_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] max_events,  // events accepted per millisecond
  input  logic       enable,
  input  logic       stop,        // stop all triggers
  input  logic       accepted,    // one pulse per accepted trigger
  output logic       inhibit
);

  localparam int unsigned TICK_W = $clog2(MS_CYCLES);

  logic [TICK_W-1:0] tick;
  logic [10:0]       events;
  logic              window_end;

  assign window_end = (32'(tick) == MS_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      tick   <= '0;
      events <= '0;
    end else begin
      tick <= window_end ? '0 : tick + 1'b1;
      if (window_end)                events <= '0;
      else if (accepted && !events[10]) events <= events + 11'd1;
    end
  end

  assign inhibit = stop || (enable && (events >= {1'b0, max_events}));

endmodule
