// tb_cts_top: end-to-end test of the complete CTS at its default sizes.
//
// cts_top is instantiated without a parameter list: 8 inputs, 16 ITCs, a
// 512-token readout queue, a 100000-cycle (1 ms) throttle window and a
// 100 ns time reference. Around it sit the behavioural TrbNet model
// (tb_trbnet_model: 450 ns trigger latency, busy release, 300 ns readouts)
// and a stand-in for an external trigger logic that fires ITC 0, reports
// the time of its last trigger in its status word and sends two data words
// per event. The testbench configures everything through the slow-control
// bus after walking the trigger logic's block chain, as the control
// software does. Every ITC gets its own number as trigger type, so the type
// of a distributed trigger names the source that caused it.
//
// Phases, each making one mechanism act and counting it:
//   input trigger and time reference (latency 8 cycles = 80 ns), input
//   delay, spike rejection, coincidence, periodical and random pulsers,
//   external trigger with external data, external data switched off,
//   busy (triggers lost while an event is in flight), throttle, stop bit,
//   readout queue full (readout debug limit 0 until 512 tokens wait),
//   trigger debug limit, unknown slow-control address, and a 100 kHz
//   trigger rate with full 55-word event data without losing a trigger.
// Throughout, it checks that every distributed trigger is read out once and
// in order, that trigger numbers and codes are consecutive, that the event
// data of the CTS has the expected header and length, and that the
// statistics registers agree with the model. A mechanism that never acted
// counts as a failure.
module tb_cts_top;
  import cts_pkg::*;
  localparam int NI = 8;
  logic clk = 0, rst = 1;
  logic [NI-1:0] trg_in;
  logic ext_trg;
  logic [31:0] ext_status, ext_control;
  logic ext_busy, ext_ro_start, ext_ro_write, ext_ro_finished;
  logic [31:0] ext_ro_data;
  logic lvl1_send, lvl1_busy, ipu_start, ipu_busy;
  trg_type_t lvl1_type, ipu_type;
  logic [15:0] lvl1_number, ipu_number;
  logic [7:0] lvl1_code, ipu_code;
  logic fee_trg_received, fee_data_write, fee_data_finished, fee_trg_release;
  logic [31:0] fee_data;
  logic timeref, busy;
  regio_req_t sc_req;
  regio_rsp_t sc_rsp;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [15:0] blk [logic [7:0]];

  cts_top dut (.*);

  tb_trbnet_model #(.TRG_LATENCY(45), .RELEASE_DELAY(5), .RO_CYCLES(30)) ep (
    .clk, .rst, .lvl1_send, .lvl1_type, .lvl1_number, .lvl1_code, .lvl1_busy,
    .ipu_start, .ipu_number, .ipu_code, .ipu_type, .ipu_busy,
    .fee_trg_received, .fee_data, .fee_data_write, .fee_data_finished, .fee_trg_release
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // ------------------------------------------------ external logic stand-in
  int ext_fire = 0;       // cycles between own triggers, 0 = silent
  int ext_timer = 0, ext_n = 0;
  int ext_last = 0;
  always @(posedge clk) begin
    ext_trg <= 1'b0;
    ext_ro_write <= 1'b0;
    ext_ro_finished <= 1'b0;
    if (ext_fire > 0) begin
      ext_timer++;
      if (ext_timer >= ext_fire && !ext_busy) begin
        ext_trg <= 1'b1; ext_timer = 0; ext_last = cyc;
      end
    end
    if (ext_ro_start) ext_n = 1;
    else if (ext_n == 1 || ext_n == 2) begin
      ext_ro_write <= 1'b1;
      ext_ro_data <= {8'hC0 + 8'(ext_n), 24'(cyc)};
      ext_n++;
    end else if (ext_n == 3) begin
      ext_ro_finished <= 1'b1; ext_n = 0;
    end
  end
  assign ext_status = {8'h00, 24'(ext_last)};

  // ------------------------------------------------ mechanism counters
  int n_timeref = 0, n_busy_lost = 0, n_throttle = 0, n_stop = 0, n_queue_full = 0;
  int n_td_limit = 0, n_ro_limit = 0, n_ext_data = 0, n_ext_off = 0, n_unknown = 0;
  int n_spike = 0, n_delay = 0, n_rate100k = 0;
  int n_by_type [16];
  logic timeref_q = 0;
  always @(posedge clk) begin
    timeref_q <= timeref;
    if (timeref && !timeref_q && !rst) n_timeref++;
    if (lvl1_send) n_by_type[lvl1_type]++;
    if (dut.trg_asserted && busy) n_busy_lost++;
    if (dut.trg_asserted && dut.u_network.u_throttle.inhibit && !dut.u_network.u_throttle.stop && !busy) n_throttle++;
    if (dut.trg_asserted && dut.u_network.u_throttle.stop && !busy) n_stop++;
    if (dut.trg_asserted && dut.u_network.q_full && !busy) n_queue_full++;
    if (dut.u_network.td_state[13] && dut.trg_asserted) n_td_limit++;
    if (dut.u_network.ro_state[4] && !dut.u_network.q_empty) n_ro_limit++;
  end

  // event data checks
  int n_events = 0;
  logic [4:0] content_now = 5'h1f;
  always @(posedge clk) if (fee_data_finished) begin
    logic [31:0] hd;
    int exp_len;
    @(negedge clk);
    n_events++;
    hd = ep.last_event[0];
    exp_len = 1 + (hd[0] ? 2 * NI : 0) + (hd[1] ? 2 * NUM_ITC : 0) + (hd[2] ? 2 : 0) +
              (hd[3] ? 3 : 0) + (hd[4] ? 1 : 0) + (hd[5] ? 2 : 0);
    chk("event header", hd[4:0] == content_now && hd[23:16] == 8'(NUM_ITC) && hd[15:8] == 8'(NI) &&
        hd[27:24] == ep.trg_types[ep.trg_types.size() - 1]);
    chk($sformatf("event length %0d exp %0d", ep.n_words_last, exp_len), ep.n_words_last == exp_len);
    if (hd[5]) begin
      n_ext_data++;
      chk("external words", ep.last_event[exp_len - 2][31:24] == 8'hC1 && ep.last_event[exp_len - 1][31:24] == 8'hC2);
    end else if (ext_control[0]) n_ext_off++;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic sc_write(logic [15:0] a, logic [31:0] d);
    sc_req = '{addr: a, wdata: d, read: 1'b0, write: 1'b1};
    @(negedge clk);
    sc_req = '0;
    chk($sformatf("write ack %h", a), sc_rsp.ack && !sc_rsp.unknown);
  endtask

  task automatic sc_read(logic [15:0] a, output logic [31:0] d);
    sc_req = '{addr: a, wdata: '0, read: 1'b1, write: 1'b0};
    @(negedge clk);
    sc_req = '0;
    chk($sformatf("read ack %h", a), sc_rsp.ack && !sc_rsp.unknown);
    d = sc_rsp.rdata;
  endtask

  task automatic set_itc(logic [15:0] en, logic [15:0] edge_sel);
    sc_write(blk[BLK_ITC_MASK] + 16'd1, {edge_sel, en});
  endtask

  task automatic set_content(logic [4:0] c);
    sc_write(16'ha009, 32'(c));
    content_now = c;
  endtask

  // wait until every distributed trigger has been read out
  task automatic settle();
    repeat (20) @(negedge clk);
    wait (!busy && dut.u_network.q_empty && !ipu_busy && !lvl1_busy && dut.u_network.ro_idle);
    repeat (5) @(negedge clk);
  endtask

  // one pulse of 'len' cycles on input i
  task automatic pulse_in(int i, int len);
    @(negedge clk);
    trg_in[i] = 1'b1;
    repeat (len) @(negedge clk);
    trg_in[i] = 1'b0;
  endtask

  initial begin
    logic [31:0] d, h;
    logic [15:0] a;
    int c0, lat, n0, t0;
    trg_in = '0; sc_req = '0;
    repeat (5) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // ---- enumerate the trigger logic
    a = ADDR_TRG_BASE;
    for (int k = 0; k < 20; k++) begin
      blk_header_t bh;
      sc_read(a, h);
      bh = blk_header_t'(h);
      blk[bh.id] = a;
      a = a + 16'd1 + 16'(bh.len);
      if (bh.last) break;
    end
    chk("all blocks found", blk.num() == 9);
    sc_req = '{addr: a, wdata: '0, read: 1'b1, write: 1'b0};
    @(negedge clk); sc_req = '0;
    if (sc_rsp.unknown) n_unknown++;
    sc_req = '{addr: 16'h8000, wdata: '0, read: 1'b0, write: 1'b1};
    @(negedge clk); sc_req = '0;
    if (sc_rsp.unknown) n_unknown++;
    // every ITC i gets trigger type i
    sc_write(blk[BLK_EVENT_TYPES] + 16'd1, 32'h76543210);
    sc_write(blk[BLK_EVENT_TYPES] + 16'd2, 32'hfedcba98);
    set_content(5'h1f);
    sc_write(blk[BLK_EXTERNAL] + 16'd1, 32'h1);     // no external data yet

    // ---- input 0 (ITC 4): latency to the time reference
    set_itc(16'h0010, 16'h0010);
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      trg_in[0] = 1'b1; c0 = cyc; lat = -1;
      repeat (20) begin @(negedge clk); if (timeref && lat < 0) lat = cyc - c0; end
      trg_in[0] = 1'b0;
      chk($sformatf("input to time reference %0d cycles", lat), lat == 8);
      settle();
    end
    // ---- input delay 7
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'd7);
    @(negedge clk);
    trg_in[0] = 1'b1; c0 = cyc; lat = -1;
    repeat (30) begin @(negedge clk); if (timeref && lat < 0) lat = cyc - c0; end
    trg_in[0] = 1'b0;
    chk($sformatf("delayed input %0d cycles", lat), lat == 15);
    if (lat == 15) n_delay++;
    settle();
    // ---- spike rejection on input 0, T = 5
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h50);
    n0 = ep.n_triggers;
    for (int k = 0; k < 4; k++) begin pulse_in(0, 3); repeat (40) @(negedge clk); end
    if (ep.n_triggers == n0) n_spike += 4;
    chk("spikes rejected", ep.n_triggers == n0);
    pulse_in(0, 12);
    settle();
    chk("long pulse passes", ep.n_triggers == n0 + 1);
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h0);
    // ---- coincidence 0: inputs 3 and 4 within 5 cycles (ITC 12)
    sc_write(blk[BLK_COIN_CONFIG] + 16'd1, 32'h50018);
    set_itc(16'h1000, 16'h1000);
    // edges 0..7 cycles apart: the 6 of them within the window coincide
    for (int k = 0; k < 8; k++) begin
      fork
        pulse_in(3, 8);
        begin repeat (k) @(negedge clk); pulse_in(4, 8); end
      join
      settle();
    end
    chk($sformatf("coincidences %0d", n_by_type[12]), n_by_type[12] == 6);
    // ---- periodical pulser 0 (ITC 1): 1 high + 999 low, busy loses none
    sc_write(blk[BLK_PERIODIC] + 16'd1, 32'd999);
    set_itc(16'h0002, 16'h0002);
    repeat (10000) @(negedge clk);
    set_itc(16'h0000, 16'h0000);
    settle();
    chk($sformatf("periodic triggers %0d", n_by_type[1]), n_by_type[1] >= 9 && n_by_type[1] <= 11);
    // ---- random pulser (ITC 3) at 1/64 per cycle: many triggers lost to busy
    sc_write(blk[BLK_RANDOM] + 16'd1, 32'h04000000);
    set_itc(16'h0008, 16'h0008);
    repeat (10000) @(negedge clk);
    set_itc(16'h0000, 16'h0000);
    settle();
    chk($sformatf("random triggers %0d", n_by_type[3]), n_by_type[3] > 20);
    chk($sformatf("busy lost triggers %0d", n_busy_lost), n_busy_lost > 0);
    // ---- external trigger (ITC 0), data off and on
    ext_fire = 300;
    set_itc(16'h0001, 16'h0001);
    repeat (2000) @(negedge clk);
    sc_write(blk[BLK_EXTERNAL] + 16'd1, 32'h0);     // external data on
    repeat (3000) @(negedge clk);
    ext_fire = 0;
    settle();
    sc_read(blk[BLK_EXTERNAL] + 16'd2, d);
    chk("external status", d[23:0] == 24'(ext_last));
    chk($sformatf("external triggers %0d", n_by_type[0]), n_by_type[0] >= 10);
    // ---- 100 kHz workload: periodic pulser 1 every 1000 cycles, full
    //      event data (55 words); no trigger may be lost
    set_content(5'h1f);
    sc_write(blk[BLK_PERIODIC] + 16'd2, 32'd999);
    n0 = ep.n_triggers;
    set_itc(16'h0004, 16'h0004);
    repeat (20000) @(negedge clk);
    set_itc(16'h0000, 16'h0000);
    settle();
    chk($sformatf("100 kHz: %0d triggers in 200 us", ep.n_triggers - n0), ep.n_triggers - n0 >= 19 && ep.n_triggers - n0 <= 21);
    sc_read(16'ha00a, d);
    chk($sformatf("100 kHz: dead time %0d cycles below the 1000-cycle period", d), d > 0 && d < 1000);
    if (ep.n_triggers - n0 >= 19) n_rate100k++;
    // ---- throttle: 5 events per ms, periodic pulser 1 (ITC 2) every 1 us
    set_content(5'h00);
    sc_write(blk[BLK_PERIODIC] + 16'd2, 32'd99);
    sc_write(16'ha00c, 32'h00000405);
    n0 = ep.n_triggers;
    set_itc(16'h0004, 16'h0004);
    repeat (150000) @(negedge clk);
    set_itc(16'h0000, 16'h0000);
    settle();
    chk($sformatf("throttled triggers %0d", ep.n_triggers - n0), ep.n_triggers - n0 >= 5 && ep.n_triggers - n0 <= 10);
    // ---- stop bit
    sc_write(16'ha00c, 32'h80000000);
    n0 = ep.n_triggers;
    set_itc(16'h0004, 16'h0004);
    repeat (2000) @(negedge clk);
    set_itc(16'h0000, 16'h0000);
    chk("stop bit", ep.n_triggers == n0);
    sc_write(16'ha00c, 32'h0);
    settle();
    // ---- queue full: readout limit 0, 512 tokens pile up
    sc_write(16'ha008, 32'h0000ffff);
    n0 = ep.n_triggers;
    t0 = ep.n_readouts;
    set_itc(16'h0004, 16'h0004);
    while (ep.n_triggers - n0 < 512 && cyc < 2000000) @(negedge clk);
    repeat (1000) @(negedge clk);
    set_itc(16'h0000, 16'h0000);
    repeat (200) @(negedge clk);
    sc_read(16'ha007, d);
    chk($sformatf("queue status %h", d), d[31] && d[15:0] == 16'd512);
    chk("no readout while limited", ep.n_readouts == t0);
    chk("no trigger beyond full queue", ep.n_triggers - n0 == 512);
    sc_write(16'ha008, 32'hffffffff);
    settle();
    // ---- trigger debug limit 3
    sc_write(16'ha008, 32'hffff0003);
    n0 = ep.n_triggers;
    set_itc(16'h0004, 16'h0004);
    repeat (3000) @(negedge clk);
    set_itc(16'h0000, 16'h0000);
    chk($sformatf("debug limit %0d", ep.n_triggers - n0), ep.n_triggers - n0 == 3);
    sc_read(16'ha005, d); chk("TD-FSM in limit state", d[13]);
    sc_write(16'ha008, 32'hffffffff);
    settle();
    // ---- final consistency
    chk("no protocol violation", ep.violations == 0);
    chk($sformatf("readouts %0d triggers %0d", ep.n_readouts, ep.n_triggers), ep.n_readouts == ep.n_triggers);
    for (int i = 0; i < ep.n_triggers && i < ep.n_readouts; i++)
      if (ep.ro_numbers[i] != ep.trg_numbers[i] || ep.trg_numbers[i] != 16'(i)) begin
        chk($sformatf("order at %0d", i), 0); break;
      end
    chk("events = triggers", n_events == ep.n_triggers);
    sc_read(16'ha002, d); chk($sformatf("accepted counter %0d", d), d == 32'(ep.n_triggers));
    sc_read(16'ha00a, d); chk("dead time register", d > 0);
    sc_read(16'ha00b, d); chk("period register", d > 0);
    $display("triggers=%0d readouts=%0d events=%0d cycles=%0d", ep.n_triggers, ep.n_readouts, n_events, cyc);
    $display("mechanisms: timeref=%0d delay=%0d spike_rejected=%0d coincidence=%0d periodic=%0d random=%0d external=%0d",
             n_timeref, n_delay, n_spike, n_by_type[12], n_by_type[1] + n_by_type[2], n_by_type[3], n_by_type[0]);
    $display("mechanisms: ext_data=%0d ext_data_off=%0d busy_lost=%0d throttle=%0d stop=%0d queue_full=%0d ro_limit=%0d td_limit=%0d unknown=%0d",
             n_ext_data, n_ext_off, n_busy_lost, n_throttle, n_stop, n_queue_full, n_ro_limit, n_td_limit, n_unknown);
    chk("mech timeref", n_timeref > 0);
    chk("mech delay", n_delay > 0);
    chk("mech spike rejection", n_spike > 0);
    chk("mech coincidence", n_by_type[12] > 0);
    chk("mech periodic", n_by_type[1] + n_by_type[2] > 0);
    chk("mech random", n_by_type[3] > 0);
    chk("mech external trigger", n_by_type[0] > 0);
    chk("mech external data", n_ext_data > 0);
    chk("mech external data off", n_ext_off > 0);
    chk("mech busy", n_busy_lost > 0);
    chk("mech throttle", n_throttle > 0);
    chk("mech stop", n_stop > 0);
    chk("mech queue full", n_queue_full > 0);
    chk("mech readout limit", n_ro_limit > 0);
    chk("mech trigger limit", n_td_limit > 0);
    chk("mech unknown address", n_unknown == 2);
    chk("workload 100 kHz with full event data", n_rate100k > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
