// tb_trbnet_model: behavioural stand-in for the TrbNet side of the CTS.
//
// Not synthesizable; used only by testbenches. It plays the CTS endpoint and
// the CTS's own frontend endpoint:
//   * trigger channel: lvl1_send makes lvl1_busy rise in the next cycle. After
//     TRG_LATENCY cycles the frontend endpoint reports fee_trg_received. The
//     busy is released RELEASE_DELAY cycles after the CTS's own frontend
//     released it (fee_trg_release), standing for the other frontends.
//   * frontend data: words written between the trigger and
//     fee_data_finished are collected per event in 'event_words'.
//   * readout channel: ipu_start makes ipu_busy rise in the next cycle for
//     RO_CYCLES cycles.
// Protocol violations (a new trigger or readout while busy, data outside an
// event) are counted in 'violations'; the numbers of triggers and readouts
// and the trigger numbers seen are kept for the testbench to check.
module tb_trbnet_model #(
  parameter int TRG_LATENCY   = 40,
  parameter int RELEASE_DELAY = 5,
  parameter int RO_CYCLES     = 30
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lvl1_send,
  input  logic [3:0]  lvl1_type,
  input  logic [15:0] lvl1_number,
  input  logic [7:0]  lvl1_code,
  output logic        lvl1_busy,
  input  logic        ipu_start,
  input  logic [15:0] ipu_number,
  input  logic [7:0]  ipu_code,
  input  logic [3:0]  ipu_type,
  output logic        ipu_busy,
  output logic        fee_trg_received,
  input  logic [31:0] fee_data,
  input  logic        fee_data_write,
  input  logic        fee_data_finished,
  input  logic        fee_trg_release
);
  int n_triggers = 0;
  int n_readouts = 0;
  int violations = 0;
  int n_words_last = 0;
  logic [31:0] event_words [$];
  logic [31:0] last_event [$];
  logic [15:0] trg_numbers [$];
  logic [15:0] ro_numbers [$];
  logic [3:0]  trg_types [$];
  int trg_timer = 0, rel_timer = 0, ro_timer = 0;
  logic in_event = 0;

  always @(posedge clk) begin
    fee_trg_received <= 1'b0;
    if (rst) begin
      lvl1_busy <= 1'b0;
      ipu_busy  <= 1'b0;
      trg_timer = 0; rel_timer = 0; ro_timer = 0; in_event = 0;
    end else begin
      // trigger channel
      if (lvl1_send) begin
        if (lvl1_busy) violations++;
        n_triggers++;
        trg_numbers.push_back(lvl1_number);
        trg_types.push_back(lvl1_type);
        lvl1_busy <= 1'b1;
        trg_timer = TRG_LATENCY;
      end else if (trg_timer > 0) begin
        trg_timer--;
        if (trg_timer == 0) begin
          fee_trg_received <= 1'b1;
          in_event = 1;
          event_words.delete();
        end
      end
      if (fee_data_write) begin
        if (!in_event) violations++;
        event_words.push_back(fee_data);
      end
      if (fee_data_finished) begin
        in_event = 0;
        last_event = event_words;
        n_words_last = event_words.size();
      end
      if (fee_trg_release) rel_timer = RELEASE_DELAY + 1;
      if (rel_timer > 0) begin
        rel_timer--;
        if (rel_timer == 0) lvl1_busy <= 1'b0;
      end
      // readout channel
      if (ipu_start) begin
        if (ipu_busy) violations++;
        n_readouts++;
        ro_numbers.push_back(ipu_number);
        ipu_busy <= 1'b1;
        ro_timer = RO_CYCLES;
      end else if (ro_timer > 0) begin
        ro_timer--;
        if (ro_timer == 0) ipu_busy <= 1'b0;
      end
    end
  end

  // unused request fields
  logic unused;
  assign unused = ^{lvl1_code, ipu_code, ipu_type};
endmodule
