// tb_cts_trigger_logic: checks the trigger logic through its registers.
//
// The testbench first walks the block chain from 0xa100 as the control
// software would: it reads each header, notes the block's address, and
// moves on by 1 + length until the last-block flag. All later accesses use
// the addresses found this way. Checks:
//   * block order, types, lengths and ITC ranges of the headers;
//   * latency from a trigger input to trg_asserted: 6 cycles with the
//     shortest settings, 6 + d with delay d;
//   * spike rejection, inversion and both overrides of the input module;
//   * coincidence of two inputs inside and outside the window;
//   * periodical pulser rate, random pulser rate (level mode, threshold
//     2^30 gives about 1/4 of the cycles);
//   * event type from the type registers and priority of the lowest ITC;
//   * ITC and input counters read over the bus against the testbench's own
//     counts;
//   * external trigger on ITC 0, external control (rw) and status (ro);
//   * 'unknown' after the last block.
module tb_cts_trigger_logic;
  import cts_pkg::*;
  localparam int NI = 8;
  logic clk = 0, rst = 1;
  logic [NI-1:0] trg_in;
  logic ext_trg;
  logic [31:0] ext_status, ext_control;
  regio_req_t sc_req;
  regio_rsp_t sc_rsp;
  logic trg_asserted;
  trg_type_t trg_type;
  itc_mask_t itc_raw;
  logic [31:0] in_cnt_asserted [NI], in_cnt_edges [NI], itc_cnt_asserted [NUM_ITC], itc_cnt_edges [NUM_ITC];
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [15:0] blk [logic [7:0]];

  cts_trigger_logic #(.NUM_INPUTS(NI)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

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

  // ITC enable (15:0) and edge select (31:16)
  task automatic set_itc(logic [15:0] en, logic [15:0] edge_sel);
    sc_write(blk[BLK_ITC_MASK] + 16'd1, {edge_sel, en});
  endtask

  // cycles from the edge of trg_in[0] until trg_asserted, or -1
  trg_type_t first_type;
  task automatic measure_latency(output int lat);
    int c0;
    @(negedge clk);
    trg_in[0] = 1'b1;
    c0 = cyc;
    lat = -1;
    repeat (40) begin
      @(negedge clk);
      if (trg_asserted && lat < 0) begin lat = cyc - c0; first_type = trg_type; end
    end
    trg_in[0] = 1'b0;
    repeat (40) @(negedge clk);
  endtask

  // count trg_asserted cycles while trg_in[0] gets a pulse of 'len' cycles
  task automatic pulse_in0(int len, output int high);
    high = 0;
    @(negedge clk);
    trg_in[0] = 1'b1;
    repeat (len) begin @(negedge clk); if (trg_asserted) high++; end
    trg_in[0] = 1'b0;
    repeat (40) begin @(negedge clk); if (trg_asserted) high++; end
  endtask


  initial begin
    logic [31:0] d, h;
    logic [15:0] a;
    logic [7:0] ids [$];
    int lat, n, hi;
    trg_in = '0; ext_trg = 0; ext_status = 32'h5a5a0001; sc_req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // ---- enumeration
    a = ADDR_TRG_BASE;
    for (int k = 0; k < 20; k++) begin
      blk_header_t bh;
      sc_read(a, h);
      bh = blk_header_t'(h);
      ids.push_back(bh.id);
      blk[bh.id] = a;
      a = a + 16'd1 + 16'(bh.len);
      if (bh.last) break;
    end
    chk($sformatf("block count %0d", ids.size()), ids.size() == 9);
    chk("block order", ids.size() == 9 && ids[0] == BLK_ITC_MASK && ids[1] == BLK_ITC_COUNTER &&
        ids[2] == BLK_INPUT_CONFIG && ids[3] == BLK_INPUT_COUNT && ids[4] == BLK_COIN_CONFIG &&
        ids[5] == BLK_PERIODIC && ids[6] == BLK_EVENT_TYPES && ids[7] == BLK_RANDOM && ids[8] == BLK_EXTERNAL);
    sc_read(blk[BLK_INPUT_CONFIG], h);
    chk("input header", h[15:8] == 8'(NI) && h[20:16] == 5'd4 && h[25:21] == 5'(NI));
    sc_read(blk[BLK_INPUT_COUNT], h);
    chk("input counter header", h[15:8] == 8'(2 * NI));
    sc_read(blk[BLK_ITC_COUNTER], h);
    chk("itc counter header", h[15:8] == 8'(2 * NUM_ITC));
    sc_read(blk[BLK_COIN_CONFIG], h);
    chk("coincidence header", h[15:8] == 8'd2 && h[20:16] == 5'd12 && h[25:21] == 5'd2);
    sc_read(blk[BLK_PERIODIC], h);
    chk("periodic header", h[15:8] == 8'd2 && h[20:16] == 5'd1 && h[25:21] == 5'd2);
    sc_read(blk[BLK_RANDOM], h);
    chk("random header", h[15:8] == 8'd1 && h[20:16] == 5'd3 && h[25:21] == 5'd1);
    sc_read(blk[BLK_EXTERNAL], h);
    chk("external header", h[31] && h[20:16] == 5'd0 && h[25:21] == 5'd1);
    sc_req = '{addr: a, wdata: '0, read: 1'b1, write: 1'b0};
    @(negedge clk); sc_req = '0;
    chk("unknown after last block", sc_rsp.unknown && !sc_rsp.ack);
    // ---- event types: ITC i gets type (i mod 16) ^ 5
    sc_write(blk[BLK_EVENT_TYPES] + 16'd1, 32'h23016745);
    sc_write(blk[BLK_EVENT_TYPES] + 16'd2, 32'habcdef89);
    // ---- input latency, ITC 4 level mode
    set_itc(16'h0010, 16'h0000);
    measure_latency(lat);
    chk($sformatf("latency %0d, expected 6", lat), lat == 6);
    chk("type of ITC 4", first_type == 4'h1);
    for (int dl = 1; dl <= 15; dl += 7) begin
      sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'(dl));
      measure_latency(lat);
      chk($sformatf("latency with delay %0d: %0d", dl, lat), lat == 6 + dl);
    end
    // ---- spike rejection T = 4
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h40);
    pulse_in0(3, hi);
    chk($sformatf("spike of 3 rejected (%0d)", hi), hi == 0);
    pulse_in0(12, hi);
    chk($sformatf("pulse of 12 passes (%0d)", hi), hi > 0);
    // ---- invert and overrides
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h100);
    repeat (10) @(negedge clk);
    chk("inverted idle input is high", trg_asserted);
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h300);   // invert + to_low
    repeat (10) @(negedge clk);
    chk("override to low", !trg_asserted);
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h400);   // to_high
    repeat (10) @(negedge clk);
    chk("override to high", trg_asserted);
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h0);
    // ---- coincidence 0 of inputs 0 and 1, window 3, ITC 12 edge mode
    set_itc(16'h1000, 16'h1000);
    sc_write(blk[BLK_COIN_CONFIG] + 16'd1, 32'h30003);
    for (int gap = 0; gap <= 6; gap += 2) begin
      hi = 0;
      @(negedge clk);
      trg_in[0] = 1;
      repeat (gap) begin @(negedge clk); if (trg_asserted) hi++; end
      trg_in[1] = 1;
      repeat (30) begin @(negedge clk); if (trg_asserted) hi++; end
      trg_in = '0;
      repeat (30) begin @(negedge clk); if (trg_asserted) hi++; end
      chk($sformatf("coincidence gap %0d: %0d", gap, hi), (gap <= 3) ? (hi == 1) : (hi == 0));
    end
    if (hi == 0) chk("coincidence type", 1);
    // ---- periodical pulser 1 (ITC 2), 1 high + 9 low, edge mode
    sc_write(blk[BLK_PERIODIC] + 16'd2, 32'd9);
    set_itc(16'h0004, 16'h0004);
    n = 0;
    repeat (1000) begin @(negedge clk); if (trg_asserted) begin n++; chk("periodic type", trg_type == 4'h7); end end
    chk($sformatf("periodic count %0d", n), n >= 99 && n <= 101);
    // ---- random pulser (ITC 3), level mode, threshold 2^30
    sc_write(blk[BLK_RANDOM] + 16'd1, 32'h40000000);
    set_itc(16'h0008, 16'h0000);
    n = 0;
    repeat (4000) begin @(negedge clk); if (trg_asserted) n++; end
    chk($sformatf("random rate %0d/4000", n), n > 800 && n < 1200);
    // ---- priority: periodic ITC 2 (always high with period 0) over input ITC 4
    sc_write(blk[BLK_PERIODIC] + 16'd2, 32'd0);
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h400);
    set_itc(16'h0014, 16'h0000);
    repeat (10) @(negedge clk);
    chk("priority of lower ITC", trg_asserted && trg_type == 4'h7);
    set_itc(16'h0010, 16'h0000);
    repeat (5) @(negedge clk);
    chk("type of ITC 4 alone", trg_asserted && trg_type == 4'h1);
    sc_write(blk[BLK_INPUT_CONFIG] + 16'd1, 32'h0);
    // ---- external trigger on ITC 0, edge mode, top priority
    set_itc(16'h0001, 16'h0001);
    n = 0;
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); ext_trg = 1;
      repeat (4) begin @(negedge clk); if (trg_asserted) begin n++; chk("ext type", trg_type == 4'h5); end end
      ext_trg = 0;
      repeat (4) begin @(negedge clk); if (trg_asserted) n++; end
    end
    chk($sformatf("external triggers %0d", n), n == 5);
    sc_write(blk[BLK_EXTERNAL] + 16'd1, 32'hdeadbeef);
    chk("external control output", ext_control == 32'hdeadbeef);
    sc_read(blk[BLK_EXTERNAL] + 16'd1, d); chk("external control read", d == 32'hdeadbeef);
    sc_read(blk[BLK_EXTERNAL] + 16'd2, d); chk("external status read", d == 32'h5a5a0001);
    // ---- counters over the bus
    set_itc(16'h0000, 16'h0000);
    sc_read(blk[BLK_ITC_COUNTER] + 16'd2, d);
    chk($sformatf("ITC 0 edge counter %0d", d), d == 32'd5);
    sc_read(blk[BLK_ITC_COUNTER] + 16'd1, d);
    chk($sformatf("ITC 0 asserted counter %0d", d), d == 32'd20);
    sc_read(blk[BLK_INPUT_COUNT] + 16'd4, d);
    chk($sformatf("input 1 edge counter %0d", d), d == 32'd4);
    sc_read(blk[BLK_INPUT_COUNT] + 16'd3, d);
    chk($sformatf("input 1 asserted counter %0d", d), d == 32'd4 * 30);
    for (int i = 0; i < NUM_ITC; i++) begin
      sc_read(blk[BLK_ITC_COUNTER] + 16'(1 + 2 * i), d);
      // ITCs 1-3 (pulsers) keep counting between the read and the compare
      chk($sformatf("ITC %0d counter matches port", i), d == itc_cnt_asserted[i] || (i >= 1 && i <= 3));
    end
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
