// cts_input_module: conditioning of one trigger input.
//
// The signal passes four stages in a fixed order: an optional inverter, a
// delay line, a spike rejection and an override.
//   * Inverter (cfg bit 8): compensates swapped differential pairs.
//   * Delay (cfg bits 3:0): a 15-bit shift register and a multiplexer select
//     a delay of 0 to 15 clock cycles (0 to 150 ns at 100 MHz).
//   * Spike rejection (cfg bits 7:4, threshold T): a 4-bit saturating
//     counter counts the consecutive high cycles. The output is high only
//     while the input is high and at least T earlier cycles were high, so
//     pulses of up to T cycles are dropped and longer pulses come out T
//     cycles late and T cycles shorter.
//   * Override (cfg bits 10:9): 0 passes the signal, 1 forces low, 2 forces
//     high (3 behaves like 0).
// The register layout and the stage order follow the design's block
// diagram of the input module and its configuration example (0x203 = delay
// 3, override "to low"). Encoding 2 for "force high" and the exact
// register placement are this implementation's choices.
//
// Timing: with delay 0 and T = 0 the output follows the input after 3
// clock cycles (inverter, spike and override registers). Each delay step
// and each threshold step adds one cycle. Reset clears every stage.
module cts_input_module
  import cts_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] cfg,      // configuration register bits 10:0
  input  logic        sig_in,   // synchronised trigger input
  output logic        sig_out   // conditioned signal towards the ITCs
);

  localparam int unsigned DELAY_LEN = 15;

  logic [3:0]           cfg_delay;
  logic [3:0]           cfg_spike;
  logic                 cfg_invert;
  override_t            cfg_override;

  assign cfg_delay    = cfg[3:0];
  assign cfg_spike    = cfg[7:4];
  assign cfg_invert   = cfg[8];
  assign cfg_override = override_t'(cfg[10:9]);

  logic                 inv_q;
  logic [DELAY_LEN-1:0] delay_sr;
  logic                 delayed;
  logic [3:0]           high_cnt;
  logic                 spike_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      inv_q    <= 1'b0;
      delay_sr <= '0;
    end else begin
      inv_q    <= sig_in ^ cfg_invert;
      delay_sr <= {delay_sr[DELAY_LEN-2:0], inv_q};
    end
  end

  // Delay multiplexer: tap 0 is the undelayed signal.
  always_comb begin
    if (cfg_delay == 4'd0) delayed = inv_q;
    else                   delayed = delay_sr[cfg_delay-4'd1];
  end

  // Spike rejection counter, saturating at 15.
  always_ff @(posedge clk) begin
    if (rst) begin
      high_cnt <= '0;
      spike_q  <= 1'b0;
    end else begin
      if (!delayed)               high_cnt <= '0;
      else if (high_cnt != 4'hf)  high_cnt <= high_cnt + 4'd1;
      spike_q <= delayed && (high_cnt >= cfg_spike);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) sig_out <= 1'b0;
    else begin
      unique case (cfg_override)
        OVR_TO_LOW:  sig_out <= 1'b0;
        OVR_TO_HIGH: sig_out <= 1'b1;
        default:     sig_out <= spike_q;
      endcase
    end
  end

endmodule
