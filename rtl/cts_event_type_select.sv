// cts_event_type_select: trigger decision and trigger type.
//
// The trigger is asserted whenever at least one enabled ITC is active. The
// trigger type is the 4-bit type ID configured for the lowest-numbered
// active ITC, so lower channels have priority. The 16 type IDs come from the
// two event type registers (block 0x40): ITC 0 in the lowest nibble of the
// first register, 8 types per register. The priority rule and the register
// layout follow the design's description; everything else is plain logic.
//
// Timing: one register stage; together with cts_itc_masking the ITC
// handling takes 2 cycles.
module cts_event_type_select
  import cts_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  itc_mask_t        active,
  input  logic [63:0]      types,         // {register 1, register 0}
  output logic             trg_asserted,
  output trg_type_t        trg_type
);

  trg_type_t type_sel;

  always_comb begin
    type_sel = '0;
    for (int i = NUM_ITC - 1; i >= 0; i--)
      if (active[i]) type_sel = types[4*i +: 4];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      trg_asserted <= 1'b0;
      trg_type     <= '0;
    end else begin
      trg_asserted <= |active;
      trg_type     <= type_sel;
    end
  end

endmodule
