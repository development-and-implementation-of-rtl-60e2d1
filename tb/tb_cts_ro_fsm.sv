// tb_cts_ro_fsm: checks the readout state machine.
//
// A small reference queue supplies tokens; an endpoint stand-in raises busy
// a few cycles after each request and drops it later. Each token must be
// requested exactly once, in order, with its number/code/type, and popped
// only after busy fell. The debug readout limit must stop the machine after
// the programmed number of readouts until the limit is rewritten.
module tb_cts_ro_fsm;
  import cts_pkg::*;
  logic clk = 0, rst = 1;
  ro_token_t token;
  logic queue_empty, queue_pop;
  logic ipu_start, ipu_busy, limit_clear, idle;
  logic [15:0] ipu_number, limit;
  logic [7:0] ipu_code;
  trg_type_t ipu_type;
  logic [4:0] state_onehot;
  int checks = 0, failures = 0;
  ro_token_t tq [$];
  int requests = 0, busy_cnt = 0;
  int next_num = 0;

  cts_ro_fsm dut (.clk, .rst, .token, .queue_empty, .queue_pop, .ipu_start, .ipu_number,
                  .ipu_code, .ipu_type, .ipu_busy, .limit, .limit_clear, .state_onehot, .idle);
  always #5 clk = ~clk;

  assign queue_empty = (tq.size() == 0);
  assign token = queue_empty ? '0 : tq[0];

  // endpoint stand-in
  always @(posedge clk) begin
    if (rst) begin ipu_busy <= 0; busy_cnt <= 0; end
    else if (ipu_start) begin
      requests++;
      checks++;
      if (ipu_number !== 16'(next_num) || ipu_code !== 8'(next_num * 113) || ipu_type !== 4'(next_num)) begin
        failures++; $display("FAIL request %0d got number %0d", next_num, ipu_number);
      end
      next_num++;
      busy_cnt <= 3 + $urandom_range(0, 10);
    end else if (busy_cnt > 1) begin busy_cnt <= busy_cnt - 1; ipu_busy <= 1; end
    else if (busy_cnt == 1) begin busy_cnt <= 0; ipu_busy <= 0; end
    if (queue_pop) begin
      checks++;
      if (ipu_busy) begin failures++; $display("FAIL pop while busy"); end
      void'(tq.pop_front());
    end
  end

  task automatic add_tokens(int n);
    static int num = 0;
    repeat (n) begin
      ro_token_t t;
      t.reserved = 0; t.trg_type = 4'(num); t.code = 8'(num * 113); t.number = 16'(num);
      tq.push_back(t);
      num++;
    end
  endtask

  initial begin
    limit = 16'hffff; limit_clear = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (state_onehot != 5'b00001) begin failures++; $display("FAIL reset state"); end
    add_tokens(10);
    repeat (400) @(negedge clk);
    checks++;
    if (requests != 10 || tq.size() != 0) begin failures++; $display("FAIL %0d requests", requests); end
    // debug limit: 4 more readouts allowed after clearing
    limit = 4; limit_clear = 1;
    @(negedge clk); limit_clear = 0;
    add_tokens(10);
    repeat (400) @(negedge clk);
    checks += 2;
    if (requests != 14) begin failures++; $display("FAIL limit: %0d requests", requests); end
    if (state_onehot != 5'b10000) begin failures++; $display("FAIL not in limit state %b", state_onehot); end
    limit = 16'hffff; limit_clear = 1;
    @(negedge clk); limit_clear = 0;
    repeat (400) @(negedge clk);
    checks++;
    if (requests != 20 || !idle) begin failures++; $display("FAIL after release: %0d", requests); end
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
