// cts_itc_masking: enable and edge/level selection of the internal trigger
// channels (ITCs).
//
// Each ITC is disabled after reset and has to be enabled through bits 15:0
// of the masking register (block 0x00). Bits 31:16 of the same register
// select per channel whether a rising edge (bit set) or a high level (bit
// clear) counts as activity. An edge-sensitive channel is active for the
// single cycle in which it rises; a level-sensitive channel for as long as
// it is high. The register layout follows the design's description of block
// 0x00; which value of the select bit means "edge" is this implementation's
// choice.
//
// Timing: one register stage; the active mask appears one cycle after the
// ITC changes.
module cts_itc_masking
  import cts_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  itc_mask_t itc,          // raw channel lines
  input  itc_mask_t enable,       // register bits 15:0
  input  itc_mask_t edge_sel,     // register bits 31:16, 1 = rising edge
  output itc_mask_t active        // enabled channels that fired
);

  itc_mask_t itc_q;
  itc_mask_t fired;

  assign fired = (itc & ~itc_q & edge_sel) | (itc & ~edge_sel);

  always_ff @(posedge clk) begin
    if (rst) begin
      itc_q  <= '0;
      active <= '0;
    end else begin
      itc_q  <= itc;
      active <= fired & enable;
    end
  end

endmodule
