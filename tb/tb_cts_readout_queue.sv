// tb_cts_readout_queue: checks the token FIFO at its full 512-entry depth.
//
// Random pushes and pops are compared with a SystemVerilog queue used as the
// reference; the count, empty and full flags are checked every cycle. The
// queue is also filled completely to see the full flag and the order of all
// 512 tokens.
module tb_cts_readout_queue;
  localparam int DEPTH = 512;
  logic clk = 0, rst = 1;
  logic push, pop, empty, full;
  logic [31:0] din, dout;
  logic [15:0] count;
  int checks = 0, failures = 0;
  logic [31:0] ref_q [$];
  int full_seen = 0;

  cts_readout_queue #(.DEPTH(DEPTH)) dut (.clk, .rst, .push, .din, .pop, .dout, .empty, .full, .count);
  always #5 clk = ~clk;

  task automatic step(logic do_push, logic do_pop);
    push = do_push && !full;
    pop  = do_pop && !empty;
    din  = $urandom();
    checks++;
    if (!empty && dout !== ref_q[0]) begin failures++; if (failures < 5) $display("FAIL head %h exp %h", dout, ref_q[0]); end
    @(posedge clk);
    if (pop)  void'(ref_q.pop_front());
    if (push) ref_q.push_back(din);
    @(negedge clk);
    push = 0; pop = 0;
    checks++;
    if (count != 16'(ref_q.size()) || empty != (ref_q.size() == 0) || full != (ref_q.size() == DEPTH)) begin
      failures++;
      if (failures < 5) $display("FAIL flags count=%0d size=%0d", count, ref_q.size());
    end
    if (full) full_seen++;
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    repeat (2000) step($urandom_range(0, 1) == 1, $urandom_range(0, 2) == 0);
    repeat (DEPTH + 5) step(1, 0);
    repeat (DEPTH + 5) step(0, 1);
    repeat (3000) step($urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1);
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL never full"); end
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
