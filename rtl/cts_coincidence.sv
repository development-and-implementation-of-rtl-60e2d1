// cts_coincidence: coincidence detection over the conditioned trigger inputs.
//
// Every input has a rising-edge detector followed by a pulse generator. A
// rising edge starts an artificial pulse of W+1 clock cycles, where W is the
// coincidence window (cfg bits 19:16, 0 to 15 cycles = 0 to 150 ns). The
// edge condition holds as long as the pulses of all inputs selected by the
// coincidence mask (cfg bits 7:0) are high, i.e. when all selected inputs
// rose no more than W cycles apart. The result is gated by the inhibit mask
// (cfg bits 15:8): every input selected there must be high at the same time.
// With only one mask set, the unit monitors rising lines or asserted lines
// alone; with both masks zero the output stays low.
//
// The field positions follow the design's block diagram of the coincidence
// unit (window 19:16, mask 15:8 next to the level path, mask 7:0 next to the
// pulse path). The W+1 pulse length, re-triggering of a running pulse by a
// new edge and the "both masks zero gives no output" rule are this
// implementation's choices.
//
// Timing: the output is registered. It rises 2 cycles after the last
// required rising edge and stays high as long as the condition holds.
module cts_coincidence #(
  parameter int unsigned NUM_INPUTS = 8   // at most 8: the masks are 8 bits wide
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [19:0]           cfg,
  input  logic [NUM_INPUTS-1:0] sig_in,
  output logic                  coin_out
);

  logic [3:0]            window;
  logic [NUM_INPUTS-1:0] coin_mask;
  logic [NUM_INPUTS-1:0] inhib_mask;

  assign window     = cfg[19:16];
  assign coin_mask  = cfg[NUM_INPUTS-1:0];
  assign inhib_mask = cfg[8 +: NUM_INPUTS];

  logic [NUM_INPUTS-1:0] sig_q;
  logic [NUM_INPUTS-1:0] pulse;
  logic [4:0]            remain [NUM_INPUTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      sig_q <= '0;
      for (int i = 0; i < NUM_INPUTS; i++) remain[i] <= '0;
    end else begin
      sig_q <= sig_in;
      for (int i = 0; i < NUM_INPUTS; i++) begin
        if (sig_in[i] && !sig_q[i])  remain[i] <= {1'b0, window} + 5'd1;
        else if (remain[i] != '0)    remain[i] <= remain[i] - 5'd1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_INPUTS; i++) pulse[i] = (remain[i] != '0);
  end

  logic edge_ok, level_ok, any_mask;
  assign edge_ok  = &(pulse | ~coin_mask);
  assign level_ok = &(sig_q | ~inhib_mask);
  assign any_mask = |{coin_mask, inhib_mask};

  always_ff @(posedge clk) begin
    if (rst) coin_out <= 1'b0;
    else     coin_out <= edge_ok && level_ok && any_mask;
  end

endmodule
