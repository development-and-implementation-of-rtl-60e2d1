// tb_cts_input_module: self-checking test of the input module.
//
// Drives random pulse trains (1 to 20 cycles high/low) through the module
// under a series of configurations (delay, spike threshold, inversion,
// override) and compares every output cycle with a reference computed from
// the recorded input history: the output after clock edge m equals the
// (possibly inverted) input sampled at edge m-2-D, provided the T samples
// before it were high as well. Also checks the 3-cycle minimum latency.
module tb_cts_input_module;
  logic clk = 0, rst = 1;
  logic [10:0] cfg;
  logic sig_in, sig_out;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic xs [0:20000];
  int settle;

  cts_input_module dut (.clk, .rst, .cfg, .sig_in, .sig_out);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    xs[cyc + 1] = sig_in;
  end

  function automatic logic model(int m);
    int d, t;
    logic v;
    d = int'(cfg[3:0]);
    t = int'(cfg[7:4]);
    if (cfg[10:9] == 2'd1) return 1'b0;
    if (cfg[10:9] == 2'd2) return 1'b1;
    v = xs[m-2-d] ^ cfg[8];
    for (int k = 1; k <= t; k++) v = v & (xs[m-2-d-k] ^ cfg[8]);
    return v;
  endfunction

  initial begin
    for (int i = 0; i <= 20000; i++) xs[i] = 1'b0;
    cfg = '0; sig_in = 0; settle = 100;
    repeat (3) @(negedge clk);
    rst = 0;
    // latency with shortest settings
    @(negedge clk); sig_in = 1;
    begin
      int c0; c0 = cyc;
      while (!sig_out && cyc < c0 + 20) @(negedge clk);
      checks++;
      if (cyc - c0 != 3) begin failures++; $display("FAIL latency %0d", cyc - c0); end
    end
    sig_in = 0;
    for (int run = 0; run < 24; run++) begin
      logic [10:0] c;
      c = {2'(run % 8 == 7 ? 1 : (run % 8 == 6 ? 2 : 0)), 1'(run % 3 == 1), 4'($urandom_range(0, 15)), 4'($urandom_range(0, 15))};
      if (run == 0) c = 11'h000;
      if (run == 1) c = 11'h0f0;     // reject up to 15 cycles
      if (run == 2) c = 11'h00f;     // longest delay
      cfg = c;
      repeat (40) @(negedge clk);    // let the pipeline fill with the new setting
      repeat (25) begin
        int len;
        sig_in = ~sig_in;
        len = $urandom_range(1, 20);
        repeat (len) begin
          @(negedge clk);
          checks++;
          if (sig_out !== model(cyc)) begin
            failures++;
            if (failures < 10) $display("FAIL cfg=%h cyc=%0d out=%b exp=%b", cfg, cyc, sig_out, model(cyc));
          end
        end
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
