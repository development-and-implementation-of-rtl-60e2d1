// tb_cts_network_logic: checks the network side of the CTS as one unit.
//
// The TrbNet side is the behavioural model tb_trbnet_model. The trigger
// logic is replaced by a trigger source that asserts trg_asserted with a
// random type when the testbench wants triggers. Everything is controlled
// through the slow-control registers 0xa000-0xa00c, as software would.
// Checks, in phases:
//   * register access: read-back of 0xa008, 0xa009, 0xa00c, 'unknown' above
//     0xa00c, reset values;
//   * free running: every trigger is read out once, in order, with the same
//     number; the accepted counter (0xa002) equals the triggers sent;
//   * queue full: readout debug limit 0 holds the RO-FSM, the 8-token queue
//     (reduced depth) fills, 0xa007 shows full and no further trigger is
//     accepted; clearing the limit drains the queue in order;
//   * throttle: at most N accepted triggers per millisecond window
//     (1000 cycles here instead of 100000);
//   * stop bit: no trigger while 0xa00c bit 31 is set;
//   * debug trigger limit: exactly L triggers, TD-FSM state bit 13.
// Every phase counts the times its mechanism acted; a phase whose mechanism
// never acted is a failure.
module tb_cts_network_logic;
  import cts_pkg::*;
  localparam int NI = 8;
  localparam int DEPTH = 8;
  localparam int MS = 1000;
  logic clk = 0, rst = 1;
  logic trg_asserted;
  trg_type_t trg_type;
  itc_mask_t itc_raw;
  logic [31:0] in_cnt_asserted [NI], in_cnt_edges [NI], itc_cnt_asserted [NUM_ITC], itc_cnt_edges [NUM_ITC];
  logic ext_data_enable;
  logic lvl1_send, lvl1_busy, ipu_start, ipu_busy;
  trg_type_t lvl1_type, ipu_type;
  logic [15:0] lvl1_number, ipu_number;
  logic [7:0] lvl1_code, ipu_code;
  logic fee_trg_received, fee_data_write, fee_data_finished, fee_trg_release;
  logic [31:0] fee_data;
  logic ext_ro_start, ext_ro_write, ext_ro_finished;
  logic [31:0] ext_ro_data;
  logic timeref, busy;
  regio_req_t sc_req;
  regio_rsp_t sc_rsp;
  int checks = 0, failures = 0;
  int cyc = 0;

  cts_network_logic #(.NUM_INPUTS(NI), .QUEUE_DEPTH(DEPTH), .MS_CYCLES(MS)) dut (.*);

  tb_trbnet_model #(.TRG_LATENCY(20), .RELEASE_DELAY(3), .RO_CYCLES(15)) ep (
    .clk, .rst, .lvl1_send, .lvl1_type, .lvl1_number, .lvl1_code, .lvl1_busy,
    .ipu_start, .ipu_number, .ipu_code, .ipu_type, .ipu_busy,
    .fee_trg_received, .fee_data, .fee_data_write, .fee_data_finished, .fee_trg_release
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always_comb
    for (int i = 0; i < NI; i++) begin in_cnt_asserted[i] = 32'(i); in_cnt_edges[i] = 32'(i + 100); end
  always_comb
    for (int i = 0; i < NUM_ITC; i++) begin itc_cnt_asserted[i] = 32'(i); itc_cnt_edges[i] = 32'(i + 200); end

  assign ext_data_enable = 1'b0;
  assign ext_ro_data = '0;
  assign ext_ro_write = 1'b0;
  assign ext_ro_finished = 1'b0;

  // trigger source: a new random type every cycle while enabled
  logic trg_on = 0;
  always @(posedge clk) begin
    trg_asserted <= trg_on;
    trg_type     <= 4'($urandom_range(0, 15));
  end
  assign itc_raw = 16'h0001 << trg_type;

  // accepted triggers per throttle window
  int win_cnt = 0, win_max = 0, win_start = 0;
  always @(posedge clk) begin
    if (dut.accepted) win_cnt++;
    if (cyc - win_start >= MS) begin
      if (win_cnt > win_max) win_max = win_cnt;
      win_cnt = 0; win_start = cyc;
    end
  end

  // cycles in which the throttle held back a pending trigger
  int thr_inh = 0;
  always @(posedge clk) if (dut.u_throttle.inhibit && trg_asserted && !dut.u_throttle.stop) thr_inh++;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic sc_write(logic [15:0] a, logic [31:0] d);
    sc_req = '{addr: a, wdata: d, read: 1'b0, write: 1'b1};
    @(negedge clk);
    sc_req = '0;
    chk($sformatf("write ack %h", a), sc_rsp.ack);
  endtask

  task automatic sc_read(logic [15:0] a, output logic [31:0] d);
    sc_req = '{addr: a, wdata: '0, read: 1'b1, write: 1'b0};
    @(negedge clk);
    sc_req = '0;
    chk($sformatf("read ack %h", a), sc_rsp.ack && !sc_rsp.unknown);
    d = sc_rsp.rdata;
  endtask

  task automatic drain();
    trg_on = 0;
    repeat (30) @(negedge clk);
    wait (!busy && dut.u_ro.idle && dut.q_empty && !ipu_busy);
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    int n0, queue_full_seen, throttle_seen, stop_seen, limit_seen;
    sc_req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // ---- register access
    sc_read(16'ha008, d); chk("debug limit reset", d == 32'hffffffff);
    sc_read(16'ha009, d); chk("content reset", d == 0);
    sc_read(16'ha00c, d); chk("throttle reset", d == 0);
    sc_read(16'ha005, d); chk("TD idle", d == 1);
    sc_read(16'ha006, d); chk("RO idle", d == 1);
    sc_read(16'ha007, d); chk("queue empty", d == 32'h40000000);
    sc_write(16'ha009, 32'h1f); sc_read(16'ha009, d); chk("content rw", d == 32'h1f);
    sc_write(16'ha00c, 32'h800007ff); sc_read(16'ha00c, d); chk("throttle rw", d == 32'h800007ff);
    sc_write(16'ha00c, 0);
    sc_write(16'ha009, 32'h03);
    sc_req = '{addr: 16'ha00d, wdata: '0, read: 1'b1, write: 1'b0};
    @(negedge clk); sc_req = '0;
    chk("unknown above 0xa00c", sc_rsp.unknown && !sc_rsp.ack);
    // ---- free running
    trg_on = 1;
    repeat (3000) @(negedge clk);
    drain();
    chk($sformatf("some triggers (%0d)", ep.n_triggers), ep.n_triggers > 20);
    chk("all read out", ep.n_readouts == ep.n_triggers);
    for (int i = 0; i < ep.n_triggers && i < ep.n_readouts; i++)
      chk($sformatf("readout order %0d", i), ep.ro_numbers[i] == ep.trg_numbers[i] && ep.trg_numbers[i] == 16'(i));
    chk("event size", ep.n_words_last == 1 + 2 * NI + 2 * NUM_ITC);
    sc_read(16'ha002, d); chk($sformatf("accepted counter %0d", d), d == ep.n_triggers);
    sc_read(16'ha00b, d); chk("trigger period nonzero", d > 0);
    sc_read(16'ha00a, d); chk("dead time nonzero", d > 0);
    // ---- queue full
    sc_write(16'ha009, 32'h00);
    sc_write(16'ha008, 32'h0000ffff);   // readout limit 0
    n0 = ep.n_triggers;
    trg_on = 1;
    repeat (3000) @(negedge clk);
    trg_on = 0;
    sc_read(16'ha007, d);
    queue_full_seen = int'(d[31]);
    chk($sformatf("queue full flag %h", d), d[31] && d[15:0] == 16'(DEPTH));
    chk("no readout during limit", ep.n_readouts == n0);
    chk("triggers stop at full queue", ep.n_triggers - n0 == DEPTH);
    sc_read(16'ha006, d); chk("RO limit state", d == 32'h10);
    sc_write(16'ha008, 32'hffffffff);
    drain();
    chk("drained", ep.n_readouts == ep.n_triggers);
    for (int i = n0; i < ep.n_readouts; i++)
      chk("order after drain", ep.ro_numbers[i] == ep.trg_numbers[i]);
    // ---- throttle
    win_max = 0;
    sc_write(16'ha00c, 32'h00000403);   // enable, 3 per window
    n0 = ep.n_triggers;
    trg_on = 1;
    repeat (5 * MS) @(negedge clk);
    drain();
    throttle_seen = (win_max <= 3 && ep.n_triggers - n0 >= 8) ? 1 : 0;
    chk($sformatf("throttle: max %0d per window, %0d total", win_max, ep.n_triggers - n0), throttle_seen == 1);
    chk($sformatf("throttle inhibit acted %0d cycles", thr_inh), thr_inh > 0);
    // ---- stop bit
    sc_write(16'ha00c, 32'h80000000);
    n0 = ep.n_triggers;
    trg_on = 1;
    repeat (1000) @(negedge clk);
    stop_seen = (ep.n_triggers == n0) ? 1 : 0;
    chk("stop bit", stop_seen == 1);
    sc_write(16'ha00c, 0);
    drain();
    // ---- debug trigger limit
    sc_write(16'ha008, 32'hffff0005);
    n0 = ep.n_triggers;
    trg_on = 1;
    repeat (2000) @(negedge clk);
    trg_on = 0;
    limit_seen = (ep.n_triggers - n0 == 5) ? 1 : 0;
    chk($sformatf("debug limit %0d", ep.n_triggers - n0), limit_seen == 1);
    sc_read(16'ha005, d); chk("TD limit state", d == 32'h2000);
    sc_write(16'ha008, 32'hffffffff);
    sc_read(16'ha005, d); chk("TD back to idle", d == 1);
    drain();
    chk("no protocol violation", ep.violations == 0);
    $display("mechanisms: queue_full=%0d throttle=%0d stop=%0d debug_limit=%0d",
             queue_full_seen, throttle_seen, stop_seen, limit_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
