// cts_event_counters: statistics counters for a group of trigger lines.
//
// For every channel two free-running 32-bit counters are kept: the number
// of clock cycles in which the line was high and the number of its rising
// edges. They wrap around without notice (after about 42.9 s at 100 MHz)
// and are read through the slow-control register file. The design uses one
// such group for the trigger inputs (block 0x11, before the input modules)
// and one for the 16 internal trigger channels (block 0x01). The counting
// rules follow the design's register description; the reset to zero is this
// implementation's choice.
//
// Timing: the counters are updated one cycle after the line changes. Edge
// detection compares with the value of the previous cycle.
module cts_event_counters #(
  parameter int unsigned NUM_CH = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NUM_CH-1:0] lines,
  output logic [31:0]       cnt_asserted [NUM_CH],
  output logic [31:0]       cnt_edges    [NUM_CH]
);

  logic [NUM_CH-1:0] lines_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      lines_q <= '0;
      for (int i = 0; i < NUM_CH; i++) begin
        cnt_asserted[i] <= '0;
        cnt_edges[i]    <= '0;
      end
    end else begin
      lines_q <= lines;
      for (int i = 0; i < NUM_CH; i++) begin
        if (lines[i])               cnt_asserted[i] <= cnt_asserted[i] + 32'd1;
        if (lines[i] && !lines_q[i]) cnt_edges[i]   <= cnt_edges[i] + 32'd1;
      end
    end
  end

endmodule
