// tb_cts_random_pulser: checks the pseudo random pulser.
//
// An independent bit-serial CRC-32 (polynomial 0x04C11DB7, constant data
// word 0) predicts the pseudo random number of every cycle; the output must
// be high exactly when the previous number was below the threshold. The
// mean rate over 20000 cycles must match threshold / 2^32 within a loose
// statistical bound, for three thresholds.
module tb_cts_random_pulser;
  logic clk = 0, rst = 1;
  logic [31:0] threshold, prn;
  logic pulse;
  int checks = 0, failures = 0;

  cts_random_pulser dut (.clk, .rst, .threshold, .pulse, .prn);
  always #5 clk = ~clk;

  function automatic logic [31:0] ref_next(logic [31:0] c);
    // shift the 32 zero data bits in one at a time
    for (int i = 0; i < 32; i++) c = c[31] ? ((c << 1) ^ 32'h04c1_1db7) : (c << 1);
    return c;
  endfunction

  initial begin
    logic [31:0] model, prev;
    real fr [3] = '{0.5, 0.1, 0.01};
    threshold = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    model = 32'hffff_ffff;
    checks++;
    if (prn !== model) begin failures++; $display("FAIL seed"); end
    foreach (fr[k]) begin
      int n;
      threshold = 32'($rtoi(fr[k] * 4294967295.0));
      n = 0;
      for (int c = 0; c < 20000; c++) begin
        prev = model;
        @(negedge clk);
        model = ref_next(model);
        if (c < 200 || c % 97 == 0) begin
          checks++;
          if (prn !== model) begin failures++; if (failures < 5) $display("FAIL prn %h exp %h", prn, model); end
        end
        if (c > 0) begin
          checks++;
          if (pulse !== (prev < threshold)) begin failures++; if (failures < 5) $display("FAIL pulse"); end
        end
        if (pulse) n++;
      end
      checks++;
      if ($itor(n) < fr[k] * 20000.0 * 0.8 - 20.0 || $itor(n) > fr[k] * 20000.0 * 1.2 + 20.0) begin
        failures++;
        $display("FAIL rate for %f: %0d of 20000", fr[k], n);
      end
    end
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
