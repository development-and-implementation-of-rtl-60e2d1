// cts_periodic_pulser: periodic artificial trigger source.
//
// The output is high for one clock cycle and then low for the number of
// cycles given by the 32-bit low-period register, so the period is
// low_period + 1 cycles (10 ns steps at 100 MHz, up to about 42.9 s). A low
// period of 0 gives a constantly high output. The meaning of the register
// value follows the design's register description of the periodical pulser
// block (0x30); the single-cycle high phase is this implementation's
// choice.
//
// Timing: the output is registered. After reset the first pulse appears in
// the second cycle; a new low period takes effect at the next comparison.
module cts_periodic_pulser #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] low_period,
  output logic             pulse
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else if (cnt >= low_period) begin
      cnt   <= '0;
      pulse <= 1'b1;
    end else begin
      cnt   <= cnt + 1'b1;
      pulse <= 1'b0;
    end
  end

endmodule
