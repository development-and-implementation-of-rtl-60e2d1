// tb_cts_event_type_select: checks the trigger decision and type priority.
//
// Random active masks and type tables; one cycle later the trigger must be
// asserted iff any channel is active and the type must be that of the
// lowest-numbered active channel.
module tb_cts_event_type_select;
  import cts_pkg::*;
  logic clk = 0, rst = 1;
  itc_mask_t active;
  logic [63:0] types;
  logic trg_asserted;
  trg_type_t trg_type;
  int checks = 0, failures = 0;

  cts_event_type_select dut (.clk, .rst, .active, .types, .trg_asserted, .trg_type);
  always #5 clk = ~clk;

  initial begin
    logic exp_a;
    logic [3:0] exp_t;
    active = 0; types = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 4000; c++) begin
      if (c % 100 == 0) types = {$urandom(), $urandom()};
      active = (c % 3 == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'($urandom() & $urandom() & $urandom());
      exp_a = 0; exp_t = 0;
      for (int i = 0; i < 16; i++) if (active[i] && !exp_a) begin exp_a = 1; exp_t = types[4*i +: 4]; end
      @(negedge clk);
      checks++;
      if (trg_asserted !== exp_a || (exp_a && trg_type !== exp_t)) begin
        failures++;
        if (failures < 5) $display("FAIL act=%h got %b/%h exp %b/%h", active, trg_asserted, trg_type, exp_a, exp_t);
      end
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
