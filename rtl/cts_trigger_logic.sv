// cts_trigger_logic: the trigger logic of the CTS.
//
// Turns the external trigger inputs, the external trigger logic and the
// artificial pulsers into one trigger decision and a trigger type.
//
// Structure (one trigger module per coloured block of the design's trigger
// logic diagram):
//   * each trigger input is sampled by one flip-flop against metastability
//     and then conditioned by a cts_input_module;
//   * NUM_COIN coincidence units watch the conditioned inputs;
//   * NUM_PERIODIC periodical and NUM_RANDOM random pulsers;
//   * the 16 internal trigger channels (ITCs) collect all of them:
//       ITC 0                       external trigger logic (highest priority)
//       next NUM_PERIODIC ITCs      periodical pulsers
//       next NUM_RANDOM ITCs        random pulsers
//       next NUM_INPUTS ITCs        conditioned inputs
//       next NUM_COIN ITCs          coincidence units
//       remaining ITCs              tied low
//   * cts_itc_masking and cts_event_type_select form the trigger decision;
//   * two cts_event_counters groups count the sampled inputs and the ITCs.
// The order of the sources on the ITCs follows the diagram from top to
// bottom; the numbers of inputs and of module instances are this
// implementation's defaults.
//
// Slow control: the registers form a chain of blocks starting at 0xa100.
// Each block starts with a header word (block type 7:0, number of registers
// 15:8, first ITC 20:16, number of ITCs 25:21, last-block flag 31) so that
// software can enumerate the blocks. Blocks in address order: 0x00 ITC
// masking, 0x01 ITC counters, 0x10 input configuration, 0x11 input
// counters, 0x20 coincidence configuration, 0x30 periodical pulsers, 0x40
// event types, 0x50 random pulsers, 0x60 external logic (control, status).
// The header layout and block types follow the design; the block order is
// this implementation's choice. A request is answered one cycle later with
// ack, or with unknown for an address beyond the last block; writes to
// read-only words are acknowledged and ignored.
//
// Timing: input to trigger decision takes 1 (sampling) + 3 (input module,
// shortest settings) + 2 (ITC handling) = 6 cycles.
module cts_trigger_logic
  import cts_pkg::*;
#(
  parameter int unsigned NUM_INPUTS   = 8,
  parameter int unsigned NUM_COIN     = 2,
  parameter int unsigned NUM_PERIODIC = 2,
  parameter int unsigned NUM_RANDOM   = 1
) (
  input  logic                  clk,
  input  logic                  rst,
  // trigger inputs (asynchronous)
  input  logic [NUM_INPUTS-1:0] trg_in,
  // external trigger logic
  input  logic                  ext_trg,
  input  logic [31:0]           ext_status,
  output logic [31:0]           ext_control,
  // slow control (addresses 0xa100 and above)
  input  regio_req_t            sc_req,
  output regio_rsp_t            sc_rsp,
  // towards the network logic
  output logic                  trg_asserted,
  output trg_type_t             trg_type,
  output itc_mask_t             itc_raw,
  output logic [31:0]           in_cnt_asserted  [NUM_INPUTS],
  output logic [31:0]           in_cnt_edges     [NUM_INPUTS],
  output logic [31:0]           itc_cnt_asserted [NUM_ITC],
  output logic [31:0]           itc_cnt_edges    [NUM_ITC]
);

  // ------------------------------------------------------- ITC assignment
  localparam int unsigned ITC_EXT      = 0;
  localparam int unsigned ITC_PERIODIC = 1;
  localparam int unsigned ITC_RANDOM   = ITC_PERIODIC + NUM_PERIODIC;
  localparam int unsigned ITC_INPUT    = ITC_RANDOM + NUM_RANDOM;
  localparam int unsigned ITC_COIN     = ITC_INPUT + NUM_INPUTS;
  localparam int unsigned ITC_USED     = ITC_COIN + NUM_COIN;

  // --------------------------------------------------------- register map
  localparam int unsigned H_MASK    = 0;
  localparam int unsigned H_ITCCNT  = H_MASK + 2;
  localparam int unsigned H_INCFG   = H_ITCCNT + 1 + 2 * NUM_ITC;
  localparam int unsigned H_INCNT   = H_INCFG + 1 + NUM_INPUTS;
  localparam int unsigned H_COIN    = H_INCNT + 1 + 2 * NUM_INPUTS;
  localparam int unsigned H_PERIOD  = H_COIN + 1 + NUM_COIN;
  localparam int unsigned H_TYPES   = H_PERIOD + 1 + NUM_PERIODIC;
  localparam int unsigned H_RANDOM  = H_TYPES + 3;
  localparam int unsigned H_EXT     = H_RANDOM + 1 + NUM_RANDOM;
  localparam int unsigned REG_WORDS = H_EXT + 3;

  // ----------------------------------------------------- config registers
  logic [31:0] itc_mask_reg;
  logic [10:0] in_cfg     [NUM_INPUTS];
  logic [19:0] coin_cfg   [NUM_COIN];
  logic [31:0] pp_period  [NUM_PERIODIC];
  logic [31:0] rp_thresh  [NUM_RANDOM];
  logic [63:0] type_regs;

  // ------------------------------------------------------------- datapath
  logic [NUM_INPUTS-1:0] in_sync;
  logic [NUM_INPUTS-1:0] in_cond;
  logic [NUM_COIN-1:0]   coin;
  logic [NUM_PERIODIC-1:0] pp_pulse;
  logic [NUM_RANDOM-1:0] rp_pulse;
  itc_mask_t             itc_active;

  always_ff @(posedge clk) begin
    if (rst) in_sync <= '0;
    else     in_sync <= trg_in;
  end

  for (genvar i = 0; i < NUM_INPUTS; i++) begin : g_input
    cts_input_module u_in (
      .clk, .rst, .cfg(in_cfg[i]), .sig_in(in_sync[i]), .sig_out(in_cond[i])
    );
  end

  for (genvar i = 0; i < NUM_COIN; i++) begin : g_coin
    cts_coincidence #(.NUM_INPUTS(NUM_INPUTS)) u_coin (
      .clk, .rst, .cfg(coin_cfg[i]), .sig_in(in_cond), .coin_out(coin[i])
    );
  end

  for (genvar i = 0; i < NUM_PERIODIC; i++) begin : g_periodic
    cts_periodic_pulser u_pp (
      .clk, .rst, .low_period(pp_period[i]), .pulse(pp_pulse[i])
    );
  end

  for (genvar i = 0; i < NUM_RANDOM; i++) begin : g_random
    logic [31:0] prn_unused;
    cts_random_pulser #(.SEED(32'hffff_ffff ^ 32'(i))) u_rp (
      .clk, .rst, .threshold(rp_thresh[i]), .pulse(rp_pulse[i]), .prn(prn_unused)
    );
  end

  always_comb begin
    itc_raw = '0;
    itc_raw[ITC_EXT] = ext_trg;
    itc_raw[ITC_PERIODIC +: NUM_PERIODIC] = pp_pulse;
    itc_raw[ITC_RANDOM   +: NUM_RANDOM]   = rp_pulse;
    itc_raw[ITC_INPUT    +: NUM_INPUTS]   = in_cond;
    itc_raw[ITC_COIN     +: NUM_COIN]     = coin;
  end

  cts_itc_masking u_mask (
    .clk, .rst, .itc(itc_raw), .enable(itc_mask_reg[15:0]),
    .edge_sel(itc_mask_reg[31:16]), .active(itc_active)
  );

  cts_event_type_select u_type (
    .clk, .rst, .active(itc_active), .types(type_regs),
    .trg_asserted, .trg_type
  );

  cts_event_counters #(.NUM_CH(NUM_INPUTS)) u_in_cnt (
    .clk, .rst, .lines(in_sync),
    .cnt_asserted(in_cnt_asserted), .cnt_edges(in_cnt_edges)
  );

  cts_event_counters #(.NUM_CH(NUM_ITC)) u_itc_cnt (
    .clk, .rst, .lines(itc_raw),
    .cnt_asserted(itc_cnt_asserted), .cnt_edges(itc_cnt_edges)
  );

  // ------------------------------------------------------- slow control
  logic [15:0] idx;
  logic        in_range;
  logic [31:0] rd_word;

  assign idx      = sc_req.addr - ADDR_TRG_BASE;
  assign in_range = (sc_req.addr >= ADDR_TRG_BASE) && (32'(idx) < REG_WORDS);

  // Read multiplexer over the block chain.
  always_comb begin
    int unsigned a;
    a = 32'(idx);
    rd_word = '0;
    if (a == H_MASK)
      rd_word = make_header(BLK_ITC_MASK, 8'(1), 5'(0), 5'(0), 1'b0);
    else if (a == H_MASK + 1)
      rd_word = itc_mask_reg;
    else if (a == H_ITCCNT)
      rd_word = make_header(BLK_ITC_COUNTER, 8'(2 * NUM_ITC), 5'(0), 5'(0), 1'b0);
    else if (a > H_ITCCNT && a < H_INCFG) begin
      if (((a - H_ITCCNT - 1) % 2) == 0) rd_word = itc_cnt_asserted[(a - H_ITCCNT - 1) / 2];
      else                               rd_word = itc_cnt_edges[(a - H_ITCCNT - 1) / 2];
    end
    else if (a == H_INCFG)
      rd_word = make_header(BLK_INPUT_CONFIG, 8'(NUM_INPUTS), 5'(ITC_INPUT), 5'(NUM_INPUTS), 1'b0);
    else if (a > H_INCFG && a < H_INCNT)
      rd_word = 32'(in_cfg[a - H_INCFG - 1]);
    else if (a == H_INCNT)
      rd_word = make_header(BLK_INPUT_COUNT, 8'(2 * NUM_INPUTS), 5'(0), 5'(0), 1'b0);
    else if (a > H_INCNT && a < H_COIN) begin
      if (((a - H_INCNT - 1) % 2) == 0) rd_word = in_cnt_asserted[(a - H_INCNT - 1) / 2];
      else                              rd_word = in_cnt_edges[(a - H_INCNT - 1) / 2];
    end
    else if (a == H_COIN)
      rd_word = make_header(BLK_COIN_CONFIG, 8'(NUM_COIN), 5'(ITC_COIN), 5'(NUM_COIN), 1'b0);
    else if (a > H_COIN && a < H_PERIOD)
      rd_word = 32'(coin_cfg[a - H_COIN - 1]);
    else if (a == H_PERIOD)
      rd_word = make_header(BLK_PERIODIC, 8'(NUM_PERIODIC), 5'(ITC_PERIODIC), 5'(NUM_PERIODIC), 1'b0);
    else if (a > H_PERIOD && a < H_TYPES)
      rd_word = pp_period[a - H_PERIOD - 1];
    else if (a == H_TYPES)
      rd_word = make_header(BLK_EVENT_TYPES, 8'(2), 5'(0), 5'(0), 1'b0);
    else if (a == H_TYPES + 1)
      rd_word = type_regs[31:0];
    else if (a == H_TYPES + 2)
      rd_word = type_regs[63:32];
    else if (a == H_RANDOM)
      rd_word = make_header(BLK_RANDOM, 8'(NUM_RANDOM), 5'(ITC_RANDOM), 5'(NUM_RANDOM), 1'b0);
    else if (a > H_RANDOM && a < H_EXT)
      rd_word = rp_thresh[a - H_RANDOM - 1];
    else if (a == H_EXT)
      rd_word = make_header(BLK_EXTERNAL, 8'(2), 5'(ITC_EXT), 5'(1), 1'b1);
    else if (a == H_EXT + 1)
      rd_word = ext_control;
    else if (a == H_EXT + 2)
      rd_word = ext_status;
  end

  // Register writes. Everything resets to zero: all ITCs disabled, pulsers
  // off (random threshold 0), inputs pass unchanged, coincidence masks empty.
  // A periodical pulser with low period 0 would be constantly high, which
  // is harmless while its ITC is disabled.
  always_ff @(posedge clk) begin
    if (rst) begin
      itc_mask_reg <= '0;
      type_regs    <= '0;
      ext_control  <= '0;
      for (int i = 0; i < NUM_INPUTS; i++)   in_cfg[i]    <= '0;
      for (int i = 0; i < NUM_COIN; i++)     coin_cfg[i]  <= '0;
      for (int i = 0; i < NUM_PERIODIC; i++) pp_period[i] <= '0;
      for (int i = 0; i < NUM_RANDOM; i++)   rp_thresh[i] <= '0;
    end else if (sc_req.write && in_range) begin
      int unsigned a;
      a = 32'(idx);
      if (a == H_MASK + 1)                  itc_mask_reg <= sc_req.wdata;
      if (a > H_INCFG && a < H_INCNT)       in_cfg[a - H_INCFG - 1] <= sc_req.wdata[10:0];
      if (a > H_COIN && a < H_PERIOD)       coin_cfg[a - H_COIN - 1] <= sc_req.wdata[19:0];
      if (a > H_PERIOD && a < H_TYPES)      pp_period[a - H_PERIOD - 1] <= sc_req.wdata;
      if (a == H_TYPES + 1)                 type_regs[31:0] <= sc_req.wdata;
      if (a == H_TYPES + 2)                 type_regs[63:32] <= sc_req.wdata;
      if (a > H_RANDOM && a < H_EXT)        rp_thresh[a - H_RANDOM - 1] <= sc_req.wdata;
      if (a == H_EXT + 1)                   ext_control <= sc_req.wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) sc_rsp <= '0;
    else begin
      sc_rsp.rdata   <= (sc_req.read && in_range) ? rd_word : '0;
      sc_rsp.ack     <= (sc_req.read || sc_req.write) && in_range;
      sc_rsp.unknown <= (sc_req.read || sc_req.write) && !in_range;
    end
  end

  initial begin
    assert (ITC_USED <= NUM_ITC) else $error("more trigger sources than ITCs");
    assert (NUM_INPUTS <= 8) else $error("coincidence masks hold 8 inputs");
  end

endmodule
