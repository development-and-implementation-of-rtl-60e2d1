// cts_top: Central Trigger System (CTS) for TrbNet-based data acquisition.
//
// The CTS decides when an event of interest has happened, distributes the
// trigger to all frontends through the TrbNet CTS endpoint, adds its own
// event data through a frontend endpoint and schedules the readout of every
// accepted event. It consists of two parts connected only by the trigger
// decision, the trigger type and the counters:
//   * cts_trigger_logic: input conditioning, coincidences, pulsers and the
//     16 internal trigger channels, plus its enumerable registers at 0xa100;
//   * cts_network_logic: trigger distribution FSM, readout queue, readout
//     FSM, throttle and statistics, plus the fixed registers at 0xa000;
// and a cts_regio_handler that splits the slow-control bus between them.
// The TrbNet stack (hub, CTS endpoint, frontend endpoint) and any external
// trigger logic sit outside this module; their signals are ports.
//
// Interfaces: asynchronous trigger inputs; the external trigger logic port
// (trigger line into ITC 0, CTS busy, control/status word, readout data);
// the trigger and readout channels of the CTS endpoint; the data port of the
// frontend endpoint; the 100 ns time reference output; the slow-control bus
// (16-bit address, 32-bit data, one-cycle strobes, ack/unknown answer one
// cycle later). All logic runs on a single clock, 100 MHz in the design.
//
// EXT_LOGIC tells the CTS whether an external trigger logic is attached
// (the design passes this as a synthesis-time setting of the external
// module); only then does the event carry its readout data.
//
// Latency: an input edge reaches the time reference output after 8 cycles
// (80 ns at 100 MHz) with the shortest input module settings.
module cts_top
  import cts_pkg::*;
#(
  parameter int unsigned NUM_INPUTS     = 8,
  parameter int unsigned NUM_COIN       = 2,
  parameter int unsigned NUM_PERIODIC   = 2,
  parameter int unsigned NUM_RANDOM     = 1,
  parameter int unsigned QUEUE_DEPTH    = 512,
  parameter int unsigned MS_CYCLES      = 100_000,
  parameter int unsigned TIMEREF_CYCLES = 10,
  parameter logic [15:0] TIMEREF_TYPES  = 16'hffff,
  parameter bit          EXT_LOGIC      = 1'b1    // external trigger logic attached
) (
  input  logic                  clk,
  input  logic                  rst,
  // trigger inputs
  input  logic [NUM_INPUTS-1:0] trg_in,
  // external trigger logic
  input  logic                  ext_trg,
  input  logic [31:0]           ext_status,
  output logic [31:0]           ext_control,
  output logic                  ext_busy,
  output logic                  ext_ro_start,
  input  logic [31:0]           ext_ro_data,
  input  logic                  ext_ro_write,
  input  logic                  ext_ro_finished,
  // CTS endpoint: trigger channel
  output logic                  lvl1_send,
  output trg_type_t             lvl1_type,
  output logic [15:0]           lvl1_number,
  output logic [7:0]            lvl1_code,
  input  logic                  lvl1_busy,
  // CTS endpoint: readout channel
  output logic                  ipu_start,
  output logic [15:0]           ipu_number,
  output logic [7:0]            ipu_code,
  output trg_type_t             ipu_type,
  input  logic                  ipu_busy,
  // frontend endpoint of the CTS
  input  logic                  fee_trg_received,
  output logic [31:0]           fee_data,
  output logic                  fee_data_write,
  output logic                  fee_data_finished,
  output logic                  fee_trg_release,
  // time reference and busy
  output logic                  timeref,
  output logic                  busy,
  // slow control
  input  regio_req_t            sc_req,
  output regio_rsp_t            sc_rsp
);

  regio_req_t net_req, trg_req;
  regio_rsp_t net_rsp, trg_rsp;

  logic        trg_asserted;
  trg_type_t   trg_type;
  itc_mask_t   itc_raw;
  logic [31:0] in_cnt_asserted  [NUM_INPUTS];
  logic [31:0] in_cnt_edges     [NUM_INPUTS];
  logic [31:0] itc_cnt_asserted [NUM_ITC];
  logic [31:0] itc_cnt_edges    [NUM_ITC];

  cts_regio_handler u_regio (
    .clk, .rst, .req(sc_req), .rsp(sc_rsp),
    .net_req, .net_rsp, .trg_req, .trg_rsp
  );

  cts_trigger_logic #(
    .NUM_INPUTS(NUM_INPUTS), .NUM_COIN(NUM_COIN),
    .NUM_PERIODIC(NUM_PERIODIC), .NUM_RANDOM(NUM_RANDOM)
  ) u_trigger (
    .clk, .rst, .trg_in, .ext_trg, .ext_status, .ext_control,
    .sc_req(trg_req), .sc_rsp(trg_rsp),
    .trg_asserted, .trg_type, .itc_raw,
    .in_cnt_asserted, .in_cnt_edges, .itc_cnt_asserted, .itc_cnt_edges
  );

  // Bit 0 of the external logic's control register keeps its data out of
  // the event. Without external logic (EXT_LOGIC = 0) the TD-FSM never
  // waits for its readout.
  cts_network_logic #(
    .NUM_INPUTS(NUM_INPUTS), .QUEUE_DEPTH(QUEUE_DEPTH), .MS_CYCLES(MS_CYCLES),
    .TIMEREF_CYCLES(TIMEREF_CYCLES), .TIMEREF_TYPES(TIMEREF_TYPES)
  ) u_network (
    .clk, .rst, .trg_asserted, .trg_type, .itc_raw,
    .in_cnt_asserted, .in_cnt_edges, .itc_cnt_asserted, .itc_cnt_edges,
    .ext_data_enable(EXT_LOGIC && !ext_control[0]),
    .lvl1_send, .lvl1_type, .lvl1_number, .lvl1_code, .lvl1_busy,
    .ipu_start, .ipu_number, .ipu_code, .ipu_type, .ipu_busy,
    .fee_trg_received, .fee_data, .fee_data_write, .fee_data_finished, .fee_trg_release,
    .ext_ro_start, .ext_ro_data, .ext_ro_write, .ext_ro_finished,
    .timeref, .busy, .sc_req(net_req), .sc_rsp(net_rsp)
  );

  assign ext_busy = busy;

endmodule
