// tb_cts_event_counters: checks the asserted-cycle and rising-edge counters.
//
// Random activity on 16 lines; the testbench keeps its own counts from the
// values it drives and compares all 32 counters at the end and at several
// points in between.
module tb_cts_event_counters;
  logic clk = 0, rst = 1;
  logic [15:0] lines;
  logic [31:0] cnt_asserted [16];
  logic [31:0] cnt_edges [16];
  int checks = 0, failures = 0;
  int exp_a [16], exp_e [16];
  logic [15:0] prev;

  cts_event_counters #(.NUM_CH(16)) dut (.clk, .rst, .lines, .cnt_asserted, .cnt_edges);
  always #5 clk = ~clk;

  initial begin
    lines = 0; prev = 0;
    foreach (exp_a[i]) begin exp_a[i] = 0; exp_e[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      lines = 16'($urandom());
      if (c % 7 == 0) lines = lines & 16'h00ff;
      for (int i = 0; i < 16; i++) begin
        if (lines[i]) exp_a[i]++;
        if (lines[i] && !prev[i]) exp_e[i]++;
      end
      prev = lines;
      @(negedge clk);
      if (c % 500 == 499) begin
        for (int i = 0; i < 16; i++) begin
          checks += 2;
          if (cnt_asserted[i] != 32'(exp_a[i])) begin failures++; $display("FAIL asserted[%0d] %0d exp %0d", i, cnt_asserted[i], exp_a[i]); end
          if (cnt_edges[i] != 32'(exp_e[i])) begin failures++; $display("FAIL edges[%0d] %0d exp %0d", i, cnt_edges[i], exp_e[i]); end
        end
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
