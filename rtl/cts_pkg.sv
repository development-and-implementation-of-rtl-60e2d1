// cts_pkg: types and constants shared by the central trigger system (CTS).
//
// Holds the slow-control bus structs, the fixed register addresses of the
// network logic, the block identifiers of the enumerable trigger-logic
// address space, the header word layout, the readout token and the one-hot
// state encodings of the two network-logic state machines.
//
// Register addresses (0xa000 .. 0xa00c), the header layout, the block IDs and
// the bit positions of the state and queue status words follow the register
// tables of the design. Struct packing, the token layout, the state names
// between TD_FSM_FEE_ENQUEUE_INPUT_COUNTER and TD_FSM_WAIT_TRIGGER_BECOME_IDLE
// and the slow-control handshake are choices of this implementation.
package cts_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_ITC       = 16;  // internal trigger channels
  localparam int unsigned TRG_TYPE_W    = 4;   // trigger type ID width
  localparam int unsigned SC_ADDR_W     = 16;  // slow-control address width
  localparam int unsigned SC_DATA_W     = 32;  // slow-control data width

  typedef logic [TRG_TYPE_W-1:0] trg_type_t;
  typedef logic [NUM_ITC-1:0]    itc_mask_t;

  // ------------------------------------------------------ slow-control bus
  // A request is a one-cycle read or write strobe with address and data.
  // The addressed unit answers with exactly one cycle of ack (data valid on
  // reads) or unknown (no register at that address).
  typedef struct packed {
    logic [SC_ADDR_W-1:0] addr;
    logic [SC_DATA_W-1:0] wdata;
    logic                 read;
    logic                 write;
  } regio_req_t;

  typedef struct packed {
    logic [SC_DATA_W-1:0] rdata;
    logic                 ack;
    logic                 unknown;
  } regio_rsp_t;

  // --------------------------------------------- network logic registers
  localparam logic [15:0] ADDR_NET_BASE     = 16'ha000;
  localparam logic [15:0] ADDR_TRG_BASE     = 16'ha100;
  localparam logic [7:0]  REG_STAT_ASSERTED = 8'h00;
  localparam logic [7:0]  REG_STAT_EDGES    = 8'h01;
  localparam logic [7:0]  REG_STAT_ACCEPTED = 8'h02;
  localparam logic [7:0]  REG_TRG_STATUS    = 8'h03;
  localparam logic [7:0]  REG_TRG_BUFFERED  = 8'h04;
  localparam logic [7:0]  REG_TD_STATE      = 8'h05;
  localparam logic [7:0]  REG_RO_STATE      = 8'h06;
  localparam logic [7:0]  REG_RO_QUEUE      = 8'h07;
  localparam logic [7:0]  REG_DEBUG_LIMITS  = 8'h08;
  localparam logic [7:0]  REG_EVENT_CONTENT = 8'h09;
  localparam logic [7:0]  REG_DEAD_TIME     = 8'h0a;
  localparam logic [7:0]  REG_TRG_PERIOD    = 8'h0b;
  localparam logic [7:0]  REG_THROTTLE      = 8'h0c;

  // Bits of the event content register (0xa009): 0 input counters,
  // 1 channel counters, 2 idle/dead time, 3 trigger statistics, 4 timestamp.
  // Bit k enables the data section of TD-FSM state TD_FEE_ENQUEUE_INPUT_CNT+k.

  // --------------------------------------------- trigger logic enumeration
  localparam logic [7:0] BLK_ITC_MASK     = 8'h00;
  localparam logic [7:0] BLK_ITC_COUNTER  = 8'h01;
  localparam logic [7:0] BLK_INPUT_CONFIG = 8'h10;
  localparam logic [7:0] BLK_INPUT_COUNT  = 8'h11;
  localparam logic [7:0] BLK_COIN_CONFIG  = 8'h20;
  localparam logic [7:0] BLK_PERIODIC     = 8'h30;
  localparam logic [7:0] BLK_EVENT_TYPES  = 8'h40;
  localparam logic [7:0] BLK_RANDOM       = 8'h50;
  localparam logic [7:0] BLK_EXTERNAL     = 8'h60;

  // Block identification header (one word in front of every block).
  typedef struct packed {
    logic       last;      // 31    : enumeration stops after this block
    logic [4:0] reserved;  // 30:26
    logic [4:0] itc_len;   // 25:21 : number of ITCs assigned to the block
    logic [4:0] itc_base;  // 20:16 : first ITC assigned to the block
    logic [7:0] len;       // 15:8  : registers following the header
    logic [7:0] id;        // 7:0   : block type
  } blk_header_t;

  function automatic logic [31:0] make_header(logic [7:0] id, logic [7:0] len,
                                              logic [4:0] itc_base, logic [4:0] itc_len,
                                              logic last);
    blk_header_t h;
    h.last     = last;
    h.reserved = '0;
    h.itc_len  = itc_len;
    h.itc_base = itc_base;
    h.len      = len;
    h.id       = id;
    return h;
  endfunction

  // -------------------------------------------------------- readout token
  // One 32-bit word per accepted event, pushed by the TD-FSM, popped by the
  // RO-FSM.
  typedef struct packed {
    logic [3:0]  reserved;
    trg_type_t   trg_type;
    logic [7:0]  code;     // 8-bit pseudo random number of the event
    logic [15:0] number;   // 16-bit sequential trigger number
  } ro_token_t;

  // ------------------------------------------------------ state encodings
  // TD-FSM: bit positions are the one-hot bits of register 0xa005.
  typedef enum logic [3:0] {
    TD_IDLE                  = 4'd0,
    TD_SEND_TRIGGER          = 4'd1,
    TD_WAIT_FEE_RECV_TRIGGER = 4'd2,
    TD_FEE_ENQUEUE_INPUT_CNT = 4'd3,
    TD_FEE_ENQUEUE_CHAN_CNT  = 4'd4,
    TD_FEE_ENQUEUE_IDLE_DEAD = 4'd5,
    TD_FEE_ENQUEUE_TRG_STATS = 4'd6,
    TD_FEE_ENQUEUE_TIMESTAMP = 4'd7,
    TD_FEE_ENQUEUE_EXTERNAL  = 4'd8,
    TD_FEE_FINISH            = 4'd9,
    TD_FEE_RELEASE           = 4'd10,
    TD_ENQUEUE_TOKEN         = 4'd11,
    TD_WAIT_TRIGGER_IDLE     = 4'd12,
    TD_DEBUG_LIMIT_REACHED   = 4'd13
  } td_state_t;

  // RO-FSM: bit positions are the one-hot bits of register 0xa006.
  typedef enum logic [2:0] {
    RO_IDLE                = 3'd0,
    RO_SEND_REQUEST        = 3'd1,
    RO_WAIT_BECOME_BUSY    = 3'd2,
    RO_WAIT_BECOME_IDLE    = 3'd3,
    RO_DEBUG_LIMIT_REACHED = 3'd4
  } ro_state_t;

  // Input module configuration (block 0x10), bits 10:0 of the register.
  typedef enum logic [1:0] {
    OVR_OFF     = 2'd0,
    OVR_TO_LOW  = 2'd1,
    OVR_TO_HIGH = 2'd2
  } override_t;

endpackage
