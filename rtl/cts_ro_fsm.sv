// cts_ro_fsm: readout state machine of the network logic.
//
// Works the readout queue off one token at a time. When the queue holds a
// token, the machine issues a readout request to the CTS endpoint with the
// event's number, random code and trigger type (one-cycle ipu_start
// strobe), waits until the endpoint reports busy, then until it is idle
// again, and only then pops the token and starts over. A debug limit stops
// the machine after a programmed number of readouts (0xFFFF = no limit) in
// the RO_DEBUG_LIMIT_REACHED state; a write to the debug limit register
// (limit_clear) restarts the count and releases the machine. The state
// sequence and the one-hot status encoding (register 0xa006) follow the
// design; the endpoint handshake signals are this implementation's
// simplification of the endpoint's readout port.
//
// Timing: ipu_start is high for the single cycle spent in RO_SEND_REQUEST,
// one cycle after a token becomes visible. The token is popped in the cycle
// the endpoint's busy falls.
module cts_ro_fsm
  import cts_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // readout queue
  input  ro_token_t   token,
  input  logic        queue_empty,
  output logic        queue_pop,
  // CTS endpoint readout port
  output logic        ipu_start,
  output logic [15:0] ipu_number,
  output logic [7:0]  ipu_code,
  output trg_type_t   ipu_type,
  input  logic        ipu_busy,
  // debug limit
  input  logic [15:0] limit,
  input  logic        limit_clear,
  output logic [4:0]  state_onehot,
  output logic        idle
);

  ro_state_t   state, state_n;
  logic [15:0] done_cnt;
  logic        limit_hit;

  assign limit_hit = (limit != 16'hffff) && (done_cnt >= limit);

  always_comb begin
    state_n = state;
    unique case (state)
      RO_IDLE:
        if (limit_hit && !limit_clear) state_n = RO_DEBUG_LIMIT_REACHED;
        else if (!queue_empty)  state_n = RO_SEND_REQUEST;
      RO_SEND_REQUEST:          state_n = RO_WAIT_BECOME_BUSY;
      RO_WAIT_BECOME_BUSY:
        if (ipu_busy)           state_n = RO_WAIT_BECOME_IDLE;
      RO_WAIT_BECOME_IDLE:
        if (!ipu_busy)          state_n = RO_IDLE;
      RO_DEBUG_LIMIT_REACHED:
        if (limit_clear)        state_n = RO_IDLE;
      default:                  state_n = RO_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= RO_IDLE;
      done_cnt <= '0;
    end else begin
      state <= state_n;
      if (limit_clear)    done_cnt <= '0;
      else if (queue_pop) done_cnt <= done_cnt + 16'd1;
    end
  end

  assign queue_pop    = (state == RO_WAIT_BECOME_IDLE) && !ipu_busy;
  assign ipu_start    = (state == RO_SEND_REQUEST);
  assign ipu_number   = token.number;
  assign ipu_code     = token.code;
  assign ipu_type     = token.trg_type;
  assign state_onehot = 5'(1) << state;
  assign idle         = (state == RO_IDLE);

  // the reserved token bits carry nothing
  logic unused_ok;
  assign unused_ok = ^token.reserved;

endmodule
