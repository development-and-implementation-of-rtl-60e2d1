// tb_cts_regio_handler: checks the slow-control address split.
//
// Two register stand-ins answer for 0xa000-0xa0ff and 0xa100-0xa1ff. Random
// reads and writes over 0x9f00-0xa2ff must reach only the right stand-in,
// and the merged answer must carry its data, or 'unknown' from the handler
// for addresses outside both ranges, one cycle after the strobe.
module tb_cts_regio_handler;
  import cts_pkg::*;
  logic clk = 0, rst = 1;
  regio_req_t req, net_req, trg_req;
  regio_rsp_t rsp, net_rsp, trg_rsp;
  int checks = 0, failures = 0;

  cts_regio_handler dut (.clk, .rst, .req, .rsp, .net_req, .net_rsp, .trg_req, .trg_rsp);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    net_rsp <= '{rdata: (net_req.read ? {16'h4e00, net_req.addr} : 32'h0), ack: net_req.read || net_req.write, unknown: 1'b0};
    trg_rsp <= '{rdata: (trg_req.read ? {16'h5400, trg_req.addr} : 32'h0), ack: trg_req.read || trg_req.write, unknown: 1'b0};
  end

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2000) begin
      logic [15:0] a;
      logic rd;
      a = 16'h9f00 + 16'($urandom_range(0, 16'h03ff));
      rd = $urandom_range(0, 1) == 1;
      req = '{addr: a, wdata: $urandom(), read: rd, write: !rd};
      #1;
      checks++;
      if ((net_req.read || net_req.write) != (a[15:8] == 8'ha0) ||
          (trg_req.read || trg_req.write) != (a[15:8] == 8'ha1)) begin
        failures++; $display("FAIL routing %h", a);
      end
      @(negedge clk);
      req = '0;
      checks++;
      if (a[15:8] == 8'ha0 || a[15:8] == 8'ha1) begin
        if (!rsp.ack || rsp.unknown || (rd && rsp.rdata != {(a[15:8] == 8'ha0) ? 16'h4e00 : 16'h5400, a})) begin
          failures++; $display("FAIL answer %h: %h ack=%b", a, rsp.rdata, rsp.ack);
        end
      end else if (rsp.ack || !rsp.unknown) begin
        failures++; $display("FAIL no unknown for %h", a);
      end
      @(negedge clk);
      checks++;
      if (rsp.ack || rsp.unknown) begin failures++; $display("FAIL answer longer than one cycle"); end
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
