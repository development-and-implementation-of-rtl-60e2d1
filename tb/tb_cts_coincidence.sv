// tb_cts_coincidence: self-checking test of the coincidence unit.
//
// Drives random edges on 8 inputs under random window/mask settings and
// compares the output every cycle with a reference that tracks the last
// rising edge of every input: the output after edge m is high when every
// input of the coincidence mask rose at an edge within [m-1-W, m-1] and
// every input of the inhibit mask was high at edge m-1. Directed cases check
// a coincidence just inside and just outside the window.
module tb_cts_coincidence;
  logic clk = 0, rst = 1;
  logic [19:0] cfg;
  logic [7:0] sig_in;
  logic coin_out;
  int checks = 0, failures = 0;
  int cyc = 0;
  int last_rise [8];
  logic [7:0] prev_s, xs_m1, xs_cur;
  int hits = 0;

  cts_coincidence #(.NUM_INPUTS(8)) dut (.clk, .rst, .cfg, .sig_in, .coin_out);

  always #5 clk = ~clk;

  // reference bookkeeping at every edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    xs_m1 = xs_cur;
    xs_cur = sig_in;
    for (int i = 0; i < 8; i++)
      if (sig_in[i] && !prev_s[i] && !rst) last_rise[i] = cyc + 1;
    prev_s = rst ? 8'h00 : sig_in;
  end

  function automatic logic model(int m);
    logic ok;
    int w;
    w = int'(cfg[19:16]);
    if (cfg[15:0] == 0) return 1'b0;
    ok = 1'b1;
    for (int i = 0; i < 8; i++) begin
      if (cfg[i] && !(last_rise[i] >= m - 1 - w && last_rise[i] <= m - 1)) ok = 1'b0;
      if (cfg[8+i] && !xs_m1[i]) ok = 1'b0;
    end
    return ok;
  endfunction

  task automatic check_cycle();
    checks++;
    if (coin_out !== model(cyc)) begin
      failures++;
      if (failures < 10) $display("FAIL cfg=%h cyc=%0d out=%b exp=%b", cfg, cyc, coin_out, model(cyc));
    end
    if (coin_out) hits++;
  endtask

  initial begin
    for (int i = 0; i < 8; i++) last_rise[i] = -1000;
    prev_s = 0; xs_m1 = 0; xs_cur = 0;
    cfg = '0; sig_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // directed: inputs 0 and 1 with window 3, skew 3 (inside) then 4 (outside)
    cfg = {4'd3, 8'h00, 8'h03};
    for (int skew = 3; skew <= 4; skew++) begin
      int seen;
      seen = 0;
      sig_in = 8'h01;
      repeat (skew) begin @(negedge clk); check_cycle(); end
      sig_in = 8'h03;
      repeat (8) begin @(negedge clk); check_cycle(); if (coin_out) seen = 1; end
      checks++;
      if (seen != (skew == 3)) begin failures++; $display("FAIL window skew=%0d seen=%0d", skew, seen); end
      sig_in = 8'h00;
      repeat (20) begin @(negedge clk); check_cycle(); end
    end
    // random
    for (int run = 0; run < 40; run++) begin
      cfg = {4'($urandom_range(0, 15)), 8'($urandom() & $urandom()), 8'($urandom() & $urandom() & $urandom())};
      if (run % 5 == 0) cfg[15:8] = 0;
      for (int k = 0; k < 200; k++) begin
        @(negedge clk);
        if (k >= 20) check_cycle();   // pulses of the previous setting have ended
        if ($urandom_range(0, 3) == 0) sig_in = sig_in ^ 8'(1 << $urandom_range(0, 7));
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no coincidence seen"); end
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
