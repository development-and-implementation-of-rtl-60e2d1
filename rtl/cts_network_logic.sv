// cts_network_logic: the network side of the CTS.
//
// Connects the trigger decision to the TrbNet endpoints. It holds the
// trigger distribution FSM (cts_td_fsm), the readout queue
// (cts_readout_queue), the readout FSM (cts_ro_fsm), the event throttle
// (cts_throttle) and the statistics unit (cts_statistics), wired as in the
// design's network logic diagram: the TD-FSM fills the queue, the RO-FSM
// empties it, the throttle inhibits the TD-FSM and the statistics watch it.
//
// It also owns the fixed slow-control registers 0xa000-0xa00c:
//   0xa000-0xa002  trigger asserted cycles, rising edges, accepted (ro)
//   0xa003  current trigger: bitmask 15:0, type 19:16, asserted 20 (ro)
//   0xa004  buffered trigger of the last accepted event: bitmask, type (ro)
//   0xa005  TD-FSM state, one-hot (ro)
//   0xa006  RO-FSM state, one-hot (ro)
//   0xa007  readout queue: words 15:0, empty 30, full 31 (ro)
//   0xa008  debug limits: triggers 15:0, readouts 31:16, 0xFFFF = none (rw)
//   0xa009  event content: input counters 0, channel counters 1,
//           idle/dead time 2, trigger statistics 3, timestamp 4 (rw)
//   0xa00a  dead time of the last trigger (ro)
//   0xa00b  time between the last two accepted triggers (ro)
//   0xa00c  throttle: max events per ms 9:0, enable 10, stop 31 (rw)
// The register map follows the design's table of fixed registers. Reset
// values (no debug limit, empty event content, throttle off), the fact that
// any write to 0xa008 restarts both debug counts, and the bus timing are this
// implementation's choices.
//
// Timing: requests are answered one cycle later with ack, or with unknown
// for an address in 0xa00d-0xa0ff.
module cts_network_logic
  import cts_pkg::*;
#(
  parameter int unsigned NUM_INPUTS     = 8,
  parameter int unsigned QUEUE_DEPTH    = 512,
  parameter int unsigned MS_CYCLES      = 100_000,
  parameter int unsigned TIMEREF_CYCLES = 10,
  parameter logic [15:0] TIMEREF_TYPES  = 16'hffff
) (
  input  logic        clk,
  input  logic        rst,
  // trigger logic
  input  logic        trg_asserted,
  input  trg_type_t   trg_type,
  input  itc_mask_t   itc_raw,
  input  logic [31:0] in_cnt_asserted  [NUM_INPUTS],
  input  logic [31:0] in_cnt_edges     [NUM_INPUTS],
  input  logic [31:0] itc_cnt_asserted [NUM_ITC],
  input  logic [31:0] itc_cnt_edges    [NUM_ITC],
  input  logic        ext_data_enable,
  // CTS endpoint: trigger channel
  output logic        lvl1_send,
  output trg_type_t   lvl1_type,
  output logic [15:0] lvl1_number,
  output logic [7:0]  lvl1_code,
  input  logic        lvl1_busy,
  // CTS endpoint: readout channel
  output logic        ipu_start,
  output logic [15:0] ipu_number,
  output logic [7:0]  ipu_code,
  output trg_type_t   ipu_type,
  input  logic        ipu_busy,
  // frontend endpoint of the CTS
  input  logic        fee_trg_received,
  output logic [31:0] fee_data,
  output logic        fee_data_write,
  output logic        fee_data_finished,
  output logic        fee_trg_release,
  // external trigger logic readout
  output logic        ext_ro_start,
  input  logic [31:0] ext_ro_data,
  input  logic        ext_ro_write,
  input  logic        ext_ro_finished,
  // outputs
  output logic        timeref,
  output logic        busy,
  // slow control (0xa000-0xa0ff)
  input  regio_req_t  sc_req,
  output regio_rsp_t  sc_rsp
);

  // ------------------------------------------------------- registers
  logic [31:0] debug_limits;
  logic [4:0]  content;
  logic [31:0] throttle_reg;
  logic        limit_clear;

  // ------------------------------------------------------- internals
  logic        inhibit;
  logic        accepted, td_idle;
  logic [13:0] td_state;
  logic [4:0]  ro_state;
  logic        ro_idle;
  itc_mask_t   buf_bitmask;
  trg_type_t   buf_type;
  logic        q_push, q_pop, q_empty, q_full;
  logic [15:0] q_count;
  ro_token_t   q_din;
  logic [31:0] q_dout;
  logic [31:0] st_asserted, st_edges, st_accepted, st_idle, st_dead, st_period;

  cts_statistics u_stats (
    .clk, .rst, .trg_asserted, .accepted, .td_idle,
    .cnt_asserted(st_asserted), .cnt_edges(st_edges), .cnt_accepted(st_accepted),
    .last_idle_time(st_idle), .last_dead_time(st_dead), .last_period(st_period)
  );

  cts_throttle #(.MS_CYCLES(MS_CYCLES)) u_throttle (
    .clk, .rst, .max_events(throttle_reg[9:0]), .enable(throttle_reg[10]),
    .stop(throttle_reg[31]), .accepted, .inhibit
  );

  cts_td_fsm #(
    .NUM_INPUTS(NUM_INPUTS), .TIMEREF_CYCLES(TIMEREF_CYCLES), .TIMEREF_TYPES(TIMEREF_TYPES)
  ) u_td (
    .clk, .rst, .trg_asserted, .trg_type, .itc_raw,
    .in_cnt_asserted, .in_cnt_edges, .itc_cnt_asserted, .itc_cnt_edges,
    .st_asserted, .st_edges, .st_accepted, .st_idle_time(st_idle), .st_dead_time(st_dead),
    .inhibit, .queue_full(q_full), .limit(debug_limits[15:0]), .limit_clear,
    .content, .ext_data_enable,
    .lvl1_send, .lvl1_type, .lvl1_number, .lvl1_code, .lvl1_busy, .timeref,
    .fee_trg_received, .fee_data, .fee_data_write, .fee_data_finished, .fee_trg_release,
    .ext_ro_start, .ext_ro_data, .ext_ro_write, .ext_ro_finished,
    .queue_push(q_push), .token(q_din),
    .accepted, .idle(td_idle), .state_onehot(td_state), .buf_bitmask, .buf_type
  );

  cts_readout_queue #(.DEPTH(QUEUE_DEPTH), .WIDTH(32)) u_queue (
    .clk, .rst, .push(q_push), .din(q_din), .pop(q_pop), .dout(q_dout),
    .empty(q_empty), .full(q_full), .count(q_count)
  );

  cts_ro_fsm u_ro (
    .clk, .rst, .token(ro_token_t'(q_dout)), .queue_empty(q_empty), .queue_pop(q_pop),
    .ipu_start, .ipu_number, .ipu_code, .ipu_type, .ipu_busy,
    .limit(debug_limits[31:16]), .limit_clear, .state_onehot(ro_state), .idle(ro_idle)
  );

  assign busy = !td_idle;

  // ------------------------------------------------------- slow control
  logic        in_range;
  logic [7:0]  reg_idx;
  logic [31:0] rd_word;

  assign in_range = (sc_req.addr[15:8] == ADDR_NET_BASE[15:8]) && (sc_req.addr[7:0] <= REG_THROTTLE);
  assign reg_idx  = sc_req.addr[7:0];

  always_comb begin
    unique case (reg_idx)
      REG_STAT_ASSERTED: rd_word = st_asserted;
      REG_STAT_EDGES:    rd_word = st_edges;
      REG_STAT_ACCEPTED: rd_word = st_accepted;
      REG_TRG_STATUS:    rd_word = {11'd0, trg_asserted, trg_type, itc_raw};
      REG_TRG_BUFFERED:  rd_word = {12'd0, buf_type, buf_bitmask};
      REG_TD_STATE:      rd_word = 32'(td_state);
      REG_RO_STATE:      rd_word = 32'(ro_state);
      REG_RO_QUEUE:      rd_word = {q_full, q_empty, 14'd0, q_count};
      REG_DEBUG_LIMITS:  rd_word = debug_limits;
      REG_EVENT_CONTENT: rd_word = 32'(content);
      REG_DEAD_TIME:     rd_word = st_dead;
      REG_TRG_PERIOD:    rd_word = st_period;
      REG_THROTTLE:      rd_word = throttle_reg;
      default:           rd_word = '0;
    endcase
  end

  assign limit_clear = sc_req.write && in_range && (reg_idx == REG_DEBUG_LIMITS);

  always_ff @(posedge clk) begin
    if (rst) begin
      debug_limits <= '1;
      content      <= '0;
      throttle_reg <= '0;
      sc_rsp       <= '0;
    end else begin
      if (sc_req.write && in_range) begin
        unique case (reg_idx)
          REG_DEBUG_LIMITS:  debug_limits <= sc_req.wdata;
          REG_EVENT_CONTENT: content      <= sc_req.wdata[4:0];
          REG_THROTTLE:      throttle_reg <= {sc_req.wdata[31], 20'd0, sc_req.wdata[10:0]};
          default: ;
        endcase
      end
      sc_rsp.rdata   <= (sc_req.read && in_range) ? rd_word : '0;
      sc_rsp.ack     <= (sc_req.read || sc_req.write) && in_range;
      sc_rsp.unknown <= (sc_req.read || sc_req.write) && !in_range;
    end
  end

  // unused bits of the status words
  logic unused_ok;
  assign unused_ok = ^{ro_idle, q_dout[31:28]};

endmodule
