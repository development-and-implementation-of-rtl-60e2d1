// cts_td_fsm: trigger distribution state machine (TD-FSM) with its datapath.
//
// Runs one fixed sequence per accepted event:
//   IDLE            wait for the trigger decision; hold back while the
//                   throttle inhibits, the readout queue is full, the CTS
//                   endpoint's trigger channel is still busy or the debug
//                   limit is reached. On acceptance a snapshot of every value
//                   later sent in the event data is latched.
//   SEND_TRIGGER    one-cycle strobe to the CTS endpoint with the trigger
//                   type, the 16-bit sequential trigger number and an 8-bit
//                   pseudo random code (x <- x + 113 mod 256). For the trigger
//                   types selected by TIMEREF_TYPES a 100 ns time reference
//                   pulse is started.
//   WAIT_FEE_RECV_TRIGGER  wait until the CTS's own frontend endpoint has
//                   received the trigger, then write the header word.
//   FEE_ENQUEUE_*   write the enabled parts of the event data, selected by
//                   the event content register 0xa009: input counters,
//                   channel counters, idle/dead time, trigger statistics,
//                   timestamp, and finally the data of the external trigger
//                   logic if that is enabled.
//   FEE_FINISH, FEE_RELEASE  close the event in the frontend endpoint and
//                   send its busy release.
//   WAIT_TRIGGER_IDLE  wait for the busy releases of all frontends (the CTS
//                   endpoint's trigger channel becomes idle).
//   ENQUEUE_TOKEN   push the readout token and return to IDLE, or stop in
//                   DEBUG_LIMIT_REACHED when the debug trigger limit is hit.
// The sequence, the number and code generators, the 100 ns time reference,
// the data contents and the one-hot bits 0-3, 12 and 13 of the state
// register 0xa005 follow the design. The names and order of the states in
// between, the header word layout and the endpoint handshakes are this
// implementation's choices.
//
// Header word: 4:0 content bits, 5 external data present, 15:8 number of
// inputs, 23:16 number of ITCs, 27:24 trigger type.
//
// Timing: the time reference rises 2 cycles after the trigger decision is
// seen in IDLE and lasts TIMEREF_CYCLES cycles. The state outputs are
// decoded combinationally from the state register.
module cts_td_fsm
  import cts_pkg::*;
#(
  parameter int unsigned NUM_INPUTS     = 8,
  parameter int unsigned TIMEREF_CYCLES = 10,        // 100 ns at 100 MHz
  parameter logic [15:0] TIMEREF_TYPES  = 16'hffff   // types with a time reference
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
  // statistics
  input  logic [31:0] st_asserted,
  input  logic [31:0] st_edges,
  input  logic [31:0] st_accepted,
  input  logic [31:0] st_idle_time,
  input  logic [31:0] st_dead_time,
  // inhibits
  input  logic        inhibit,
  input  logic        queue_full,
  input  logic [15:0] limit,
  input  logic        limit_clear,
  // configuration
  input  logic [4:0]  content,
  input  logic        ext_data_enable,
  // CTS endpoint, trigger channel
  output logic        lvl1_send,
  output trg_type_t   lvl1_type,
  output logic [15:0] lvl1_number,
  output logic [7:0]  lvl1_code,
  input  logic        lvl1_busy,
  output logic        timeref,
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
  // readout queue
  output logic        queue_push,
  output ro_token_t   token,
  // status
  output logic        accepted,
  output logic        idle,
  output logic [13:0] state_onehot,
  output itc_mask_t   buf_bitmask,
  output trg_type_t   buf_type
);

  td_state_t   state, state_n;
  logic [5:0]  widx, widx_n;
  logic [15:0] trg_number;
  logic [7:0]  prn;
  logic [15:0] trg_cnt;
  logic [31:0] timestamp;
  logic [3:0]  tr_cnt;
  logic        ext_started;
  logic        limit_hit;

  // snapshot
  logic [31:0] s_in_a  [NUM_INPUTS];
  logic [31:0] s_in_e  [NUM_INPUTS];
  logic [31:0] s_itc_a [NUM_ITC];
  logic [31:0] s_itc_e [NUM_ITC];
  logic [31:0] s_st_asserted, s_st_edges, s_st_accepted, s_st_idle, s_st_dead;
  logic [31:0] s_timestamp;
  logic [4:0]  s_content;
  logic        s_ext;

  assign limit_hit = (limit != 16'hffff) && (trg_cnt >= limit);
  assign accepted  = (state == TD_IDLE) && trg_asserted && !inhibit && !queue_full
                     && !lvl1_busy && !limit_hit;

  // First enabled data section after state 'from', or FEE_FINISH.
  function automatic td_state_t next_section(td_state_t from, logic [4:0] cnt_en, logic ext_en);
    td_state_t r;
    r = TD_FEE_FINISH;
    for (int s = 8; s >= 3; s--) begin
      if (s > int'(from)) begin
        if ((s == 8) ? ext_en : cnt_en[s-3]) r = td_state_t'(s);
      end
    end
    return r;
  endfunction

  function automatic int unsigned section_len(td_state_t s);
    case (s)
      TD_FEE_ENQUEUE_INPUT_CNT: return 2 * NUM_INPUTS;
      TD_FEE_ENQUEUE_CHAN_CNT:  return 2 * NUM_ITC;
      TD_FEE_ENQUEUE_IDLE_DEAD: return 2;
      TD_FEE_ENQUEUE_TRG_STATS: return 3;
      default:                  return 1;
    endcase
  endfunction

  // Data word of the current section.
  localparam int unsigned IN_IDX_W = (NUM_INPUTS > 1) ? $clog2(NUM_INPUTS) : 1;
  logic [IN_IDX_W-1:0] in_idx;
  assign in_idx = IN_IDX_W'(widx[5:1]);

  logic [31:0] word;
  always_comb begin
    word = '0;
    unique case (state)
      TD_FEE_ENQUEUE_INPUT_CNT: word = widx[0] ? s_in_e[in_idx] : s_in_a[in_idx];
      TD_FEE_ENQUEUE_CHAN_CNT:  word = widx[0] ? s_itc_e[widx[4:1]] : s_itc_a[widx[4:1]];
      TD_FEE_ENQUEUE_IDLE_DEAD: word = widx[0] ? s_st_dead : s_st_idle;
      TD_FEE_ENQUEUE_TRG_STATS: word = (widx == 6'd0) ? s_st_asserted :
                                       (widx == 6'd1) ? s_st_edges : s_st_accepted;
      TD_FEE_ENQUEUE_TIMESTAMP: word = s_timestamp;
      default:                  word = '0;
    endcase
  end

  logic [31:0] header;
  assign header = {4'd0, buf_type, 8'(NUM_ITC), 8'(NUM_INPUTS), 2'd0, s_ext, s_content};

  always_comb begin
    state_n          = state;
    widx_n           = widx;
    fee_data         = '0;
    fee_data_write   = 1'b0;
    unique case (state)
      TD_IDLE:
        if (limit_hit && !limit_clear) state_n = TD_DEBUG_LIMIT_REACHED;
        else if (accepted) state_n = TD_SEND_TRIGGER;
      TD_SEND_TRIGGER:     state_n = TD_WAIT_FEE_RECV_TRIGGER;
      TD_WAIT_FEE_RECV_TRIGGER:
        if (fee_trg_received) begin
          fee_data       = header;
          fee_data_write = 1'b1;
          widx_n         = '0;
          state_n        = next_section(TD_WAIT_FEE_RECV_TRIGGER, s_content, s_ext);
        end
      TD_FEE_ENQUEUE_INPUT_CNT, TD_FEE_ENQUEUE_CHAN_CNT, TD_FEE_ENQUEUE_IDLE_DEAD,
      TD_FEE_ENQUEUE_TRG_STATS, TD_FEE_ENQUEUE_TIMESTAMP: begin
        fee_data       = word;
        fee_data_write = 1'b1;
        if (32'(widx) == section_len(state) - 1) begin
          widx_n  = '0;
          state_n = next_section(state, s_content, s_ext);
        end else begin
          widx_n  = widx + 6'd1;
        end
      end
      TD_FEE_ENQUEUE_EXTERNAL: begin
        fee_data       = ext_ro_data;
        fee_data_write = ext_ro_write && ext_started;
        if (ext_started && ext_ro_finished) state_n = TD_FEE_FINISH;
      end
      TD_FEE_FINISH:       state_n = TD_FEE_RELEASE;
      TD_FEE_RELEASE:      state_n = TD_WAIT_TRIGGER_IDLE;
      TD_WAIT_TRIGGER_IDLE:
        if (!lvl1_busy)    state_n = TD_ENQUEUE_TOKEN;
      TD_ENQUEUE_TOKEN:
        state_n = ((limit != 16'hffff) && (trg_cnt + 16'd1 >= limit))
                  ? TD_DEBUG_LIMIT_REACHED : TD_IDLE;
      TD_DEBUG_LIMIT_REACHED:
        if (limit_clear)   state_n = TD_IDLE;
      default:             state_n = TD_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= TD_IDLE;
      widx        <= '0;
      trg_number  <= '0;
      prn         <= '0;
      trg_cnt     <= '0;
      timestamp   <= '0;
      tr_cnt      <= '0;
      ext_started <= 1'b0;
      buf_bitmask <= '0;
      buf_type    <= '0;
    end else begin
      state     <= state_n;
      widx      <= widx_n;
      timestamp <= timestamp + 32'd1;
      ext_started <= (state == TD_FEE_ENQUEUE_EXTERNAL);
      if (accepted) begin
        buf_bitmask <= itc_raw;
        buf_type    <= trg_type;
      end
      if (state == TD_SEND_TRIGGER && TIMEREF_TYPES[buf_type])
        tr_cnt <= 4'(TIMEREF_CYCLES);
      else if (tr_cnt != '0)
        tr_cnt <= tr_cnt - 4'd1;
      if (state == TD_ENQUEUE_TOKEN) begin
        trg_number <= trg_number + 16'd1;
        prn        <= prn + 8'd113;
        trg_cnt    <= trg_cnt + 16'd1;
      end
      if (limit_clear) trg_cnt <= '0;
    end
  end

  // Snapshot of the event data, taken on acceptance.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_INPUTS; i++) begin s_in_a[i] <= '0; s_in_e[i] <= '0; end
      for (int i = 0; i < NUM_ITC; i++)    begin s_itc_a[i] <= '0; s_itc_e[i] <= '0; end
      s_st_asserted <= '0; s_st_edges <= '0; s_st_accepted <= '0;
      s_st_idle <= '0; s_st_dead <= '0; s_timestamp <= '0;
      s_content <= '0; s_ext <= 1'b0;
    end else if (accepted) begin
      s_in_a  <= in_cnt_asserted;
      s_in_e  <= in_cnt_edges;
      s_itc_a <= itc_cnt_asserted;
      s_itc_e <= itc_cnt_edges;
      s_st_asserted <= st_asserted;
      s_st_edges    <= st_edges;
      s_st_accepted <= st_accepted;
      s_st_idle     <= st_idle_time;
      s_st_dead     <= st_dead_time;
      s_timestamp   <= timestamp;
      s_content     <= content;
      s_ext         <= ext_data_enable;
    end
  end

  assign lvl1_send         = (state == TD_SEND_TRIGGER);
  assign lvl1_type         = buf_type;
  assign lvl1_number       = trg_number;
  assign lvl1_code         = prn;
  assign timeref           = (tr_cnt != '0);
  assign fee_data_finished = (state == TD_FEE_FINISH);
  assign fee_trg_release   = (state == TD_FEE_RELEASE);
  assign ext_ro_start      = (state == TD_FEE_ENQUEUE_EXTERNAL) && !ext_started;
  assign queue_push        = (state == TD_ENQUEUE_TOKEN);
  assign token             = '{reserved: 4'd0, trg_type: buf_type, code: prn, number: trg_number};
  assign idle              = (state == TD_IDLE);
  assign state_onehot      = 14'(1) << state;

  a_push_not_full: assert property (@(posedge clk) disable iff (rst) queue_push |-> !queue_full);

endmodule
