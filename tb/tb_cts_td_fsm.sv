// tb_cts_td_fsm: checks the trigger distribution FSM.
//
// The TrbNet side is the behavioural model tb_trbnet_model. The counter
// inputs hold known values that the testbench changes right after each
// trigger is sent, so the event data must show the snapshot taken at
// acceptance. For several event-content settings, with and without data
// from the external logic, the testbench checks: the time reference starts
// 2 cycles after the decision and lasts 10 cycles; the trigger numbers count
// up and the codes follow x + 113 mod 256; the event data words (header,
// counters, statistics, timestamp, external words) in order; one readout
// token per event with matching fields, pushed only after the busy release;
// no acceptance while inhibited or while the queue is full; the debug
// trigger limit.
module tb_cts_td_fsm;
  import cts_pkg::*;
  localparam int NI = 8;
  logic clk = 0, rst = 1;
  logic trg_asserted;
  trg_type_t trg_type;
  itc_mask_t itc_raw;
  logic [31:0] in_cnt_asserted [NI], in_cnt_edges [NI], itc_cnt_asserted [NUM_ITC], itc_cnt_edges [NUM_ITC];
  logic [31:0] st_asserted, st_edges, st_accepted, st_idle_time, st_dead_time;
  logic inhibit, queue_full, limit_clear;
  logic [15:0] limit;
  logic [4:0] content;
  logic ext_data_enable;
  logic lvl1_send, lvl1_busy, timeref;
  trg_type_t lvl1_type;
  logic [15:0] lvl1_number;
  logic [7:0] lvl1_code;
  logic fee_trg_received, fee_data_write, fee_data_finished, fee_trg_release;
  logic [31:0] fee_data;
  logic ext_ro_start, ext_ro_write, ext_ro_finished;
  logic [31:0] ext_ro_data;
  logic queue_push, accepted, idle;
  ro_token_t token;
  logic [13:0] state_onehot;
  itc_mask_t buf_bitmask;
  trg_type_t buf_type;
  int checks = 0, failures = 0;
  int cyc = 0;
  int base = 0;          // counter values are base + offset
  ro_token_t tokens [$];
  int push_while_busy = 0;

  cts_td_fsm #(.NUM_INPUTS(NI)) dut (.*);

  tb_trbnet_model #(.TRG_LATENCY(40), .RELEASE_DELAY(5)) ep (
    .clk, .rst, .lvl1_send, .lvl1_type, .lvl1_number, .lvl1_code, .lvl1_busy,
    .ipu_start(1'b0), .ipu_number(16'd0), .ipu_code(8'd0), .ipu_type(4'd0), .ipu_busy(),
    .fee_trg_received, .fee_data, .fee_data_write, .fee_data_finished, .fee_trg_release
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always_comb begin
    for (int i = 0; i < NI; i++) begin in_cnt_asserted[i] = 32'(base + 32'h100 + i); in_cnt_edges[i] = 32'(base + 32'h200 + i); end
    for (int i = 0; i < NUM_ITC; i++) begin itc_cnt_asserted[i] = 32'(base + 32'h300 + i); itc_cnt_edges[i] = 32'(base + 32'h400 + i); end
    st_asserted = 32'(base + 32'h500); st_edges = 32'(base + 32'h501); st_accepted = 32'(base + 32'h502);
    st_idle_time = 32'(base + 32'h503); st_dead_time = 32'(base + 32'h504);
  end

  // change the counter values right after a trigger was sent
  always @(posedge clk) if (lvl1_send) base <= base + 32'h10000;

  // external logic stand-in: 3 words after each start
  int ext_n = 0;
  always @(posedge clk) begin
    ext_ro_write <= 0; ext_ro_finished <= 0;
    if (ext_ro_start) ext_n <= 1;
    else if (ext_n >= 1 && ext_n <= 3) begin
      ext_ro_write <= 1; ext_ro_data <= 32'hE0000000 + 32'(ext_n); ext_n <= ext_n + 1;
    end else if (ext_n == 4) begin ext_ro_finished <= 1; ext_n <= 0; end
  end

  always @(posedge clk) if (queue_push) begin
    tokens.push_back(token);
    if (lvl1_busy) push_while_busy++;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // run one event and check everything about it
  task automatic run_event(int n, logic [4:0] cont, logic ext, trg_type_t ty);
    int c0, b0;
    logic [31:0] exp [$];
    content = cont; ext_data_enable = ext; trg_type = ty; itc_raw = 16'h0001 << ty;
    @(negedge clk);
    trg_asserted = 1;
    b0 = base;
    c0 = cyc;
    @(negedge clk);
    trg_asserted = 0;
    chk("accepted", ep.n_triggers == n || state_onehot[1]);
    // time reference 2 cycles after the decision was seen
    while (!timeref && cyc < c0 + 10) @(negedge clk);
    chk($sformatf("timeref latency %0d", cyc - c0), cyc - c0 == 2);
    begin
      int len; len = 0;
      while (timeref) begin len++; @(negedge clk); end
      chk($sformatf("timeref length %0d", len), len == 10);
    end
    wait (idle);
    @(negedge clk);
    chk("trigger count", ep.n_triggers == n);
    chk("trigger number", ep.trg_numbers[n-1] == 16'(n-1));
    chk("trigger type", ep.trg_types[n-1] == ty);
    // expected event data
    exp.push_back({4'd0, ty, 8'(NUM_ITC), 8'(NI), 2'd0, ext, cont});
    if (cont[0]) for (int i = 0; i < NI; i++) begin exp.push_back(32'(b0 + 32'h100 + i)); exp.push_back(32'(b0 + 32'h200 + i)); end
    if (cont[1]) for (int i = 0; i < NUM_ITC; i++) begin exp.push_back(32'(b0 + 32'h300 + i)); exp.push_back(32'(b0 + 32'h400 + i)); end
    if (cont[2]) begin exp.push_back(32'(b0 + 32'h503)); exp.push_back(32'(b0 + 32'h504)); end
    if (cont[3]) begin exp.push_back(32'(b0 + 32'h500)); exp.push_back(32'(b0 + 32'h501)); exp.push_back(32'(b0 + 32'h502)); end
    if (cont[4]) exp.push_back(32'(c0 - 3));   // free-running timestamp, counted from reset
    if (ext) for (int i = 1; i <= 3; i++) exp.push_back(32'hE0000000 + 32'(i));
    chk($sformatf("event length %0d exp %0d", ep.last_event.size(), exp.size()), ep.last_event.size() == exp.size());
    for (int i = 0; i < exp.size() && i < ep.last_event.size(); i++)
      if (i != exp.size() - 1 - (ext ? 3 : 0) || !cont[4])
        chk($sformatf("word %0d: %h exp %h", i, ep.last_event[i], exp[i]), ep.last_event[i] == exp[i]);
    chk("token count", tokens.size() == n);
    chk("token fields", tokens[n-1].number == 16'(n-1) && tokens[n-1].code == 8'((n-1) * 113) && tokens[n-1].trg_type == ty);
    chk("buffered type", buf_type == ty && buf_bitmask == (16'h0001 << ty));
  endtask

  initial begin
    int n;
    trg_asserted = 0; trg_type = 0; itc_raw = 0; inhibit = 0; queue_full = 0;
    limit = 16'hffff; limit_clear = 0; content = 0; ext_data_enable = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    chk("reset state", state_onehot == 14'b1);
    n = 0;
    run_event(++n, 5'b00000, 0, 4'h1);
    run_event(++n, 5'b11111, 0, 4'h2);
    run_event(++n, 5'b00001, 1, 4'h3);
    run_event(++n, 5'b01100, 0, 4'h4);
    run_event(++n, 5'b11111, 1, 4'h5);
    for (int k = 0; k < 5; k++) run_event(++n, 5'($urandom()), 1'($urandom()), 4'($urandom_range(0, 15)));
    chk("no token before busy release", push_while_busy == 0);
    chk("no protocol violation", ep.violations == 0);
    // inhibit and full queue keep the FSM idle
    inhibit = 1; trg_asserted = 1;
    repeat (20) @(negedge clk);
    chk("inhibit", idle && ep.n_triggers == n);
    inhibit = 0; queue_full = 1;
    repeat (20) @(negedge clk);
    chk("queue full", idle && ep.n_triggers == n);
    trg_asserted = 0; queue_full = 0;
    @(negedge clk);
    // debug limit: two more triggers
    limit = 16'(2); limit_clear = 1;
    @(negedge clk);
    limit_clear = 0; trg_asserted = 1;
    repeat (400) @(negedge clk);
    trg_asserted = 0;
    chk($sformatf("debug limit: %0d triggers", ep.n_triggers - n), ep.n_triggers == n + 2);
    chk("debug limit state", state_onehot == 14'b1 << 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
