// tb_cts_itc_masking: checks enabling and edge/level selection of the ITCs.
//
// Random channel activity under random enable and edge-select masks; the
// active mask one cycle later must equal enable & (edge ? rising : level),
// computed here from the driven values.
module tb_cts_itc_masking;
  import cts_pkg::*;
  logic clk = 0, rst = 1;
  itc_mask_t itc, enable, edge_sel, active;
  itc_mask_t prev, expect_q;
  int checks = 0, failures = 0;

  cts_itc_masking dut (.clk, .rst, .itc, .enable, .edge_sel, .active);
  always #5 clk = ~clk;

  initial begin
    itc = 0; enable = 0; edge_sel = 0; prev = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // disabled after reset: nothing active
    itc = 16'hffff;
    @(negedge clk);
    checks++;
    if (active != 0) begin failures++; $display("FAIL active while disabled"); end
    prev = itc;
    for (int c = 0; c < 4000; c++) begin
      if (c % 200 == 0) begin enable = 16'($urandom()); edge_sel = 16'($urandom()); end
      itc = 16'($urandom()) & 16'($urandom());
      expect_q = enable & ((itc & ~prev & edge_sel) | (itc & ~edge_sel));
      prev = itc;
      @(negedge clk);
      checks++;
      if (active !== expect_q) begin failures++; if (failures < 5) $display("FAIL %h exp %h", active, expect_q); end
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
